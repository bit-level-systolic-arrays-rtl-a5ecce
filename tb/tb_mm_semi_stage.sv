// tb_mm_semi_stage: pipelined random test of one semi-systolic stage at its
// default n = 8. Each cycle a new (A bit, B, M = -N, C, S) enters with
// 0 <= C + S < N + 2^(n-1) (the range a stage hands to the next), split
// randomly into C and S. Three cycles later the stage must deliver
// X = 2(C + S) + A*B reduced by a multiple of N, k*N with k in 0..3, into
// [0, N + 2^(n-1)), together with the unchanged B and M.
module tb_mm_semi_stage;
  import mm_pkg::*;
  localparam int unsigned NB = 8;
  localparam int unsigned W  = cs_width(NB);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         a = 1'b0;
  logic [W-1:0] b_in = '0, m_in = '0, c_in = '0, s_in = '0;
  logic [W-1:0] b_out, m_out, c_out, s_out;

  mm_semi_stage #(.N_BITS(NB)) dut (
    .clk(clk), .a(a), .b_in(b_in), .m_in(m_in), .c_in(c_in), .s_in(s_in),
    .b_out(b_out), .m_out(m_out), .c_out(c_out), .s_out(s_out)
  );

  typedef struct { int x; int n; logic [W-1:0] b, m; } exp_t;
  exp_t pipe [3];
  bit   pv   [3] = '{0, 0, 0};
  int checks = 0, failures = 0;
  int n_k[4] = '{0, 0, 0, 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int nn, pp, bb, xx;
      logic [W-1:0] cc;
      nn = $urandom_range(128, 255);
      pp = $urandom_range(0, nn + 127);
      bb = $urandom_range(0, nn - 1);
      cc = W'($urandom);
      @(negedge clk);
      // Result of the operand set that entered three cycles ago.
      if (pv[2]) begin
        int o, k;
        o = int'($signed(W'(c_out + s_out)));
        k = (pipe[2].x - o) / pipe[2].n;
        check(o >= 0 && o < pipe[2].n + 128, $sformatf("result %0d out of range, N=%0d", o, pipe[2].n));
        check(pipe[2].x - o == k * pipe[2].n && k >= 0 && k <= 3,
              $sformatf("result %0d is not %0d - kN, N=%0d", o, pipe[2].x, pipe[2].n));
        check(b_out == pipe[2].b && m_out == pipe[2].m, "B/M not passed through");
        check(c_out[0] == 1'b0, "carry word not weight-aligned");
        if (k >= 0 && k <= 3) n_k[k]++;
      end
      pipe[2] = pipe[1]; pv[2] = pv[1];
      pipe[1] = pipe[0]; pv[1] = pv[0];
      a    = 1'($urandom);
      xx   = 2 * pp + (a ? bb : 0);
      b_in = W'(bb);
      m_in = W'(-nn);
      c_in = cc;
      s_in = W'(pp) - cc;
      pipe[0] = '{x: xx, n: nn, b: W'(bb), m: W'(-nn)};
      pv[0] = 1'b1;
    end
    $display("subtracted 0N:%0d 1N:%0d 2N:%0d 3N:%0d", n_k[0], n_k[1], n_k[2], n_k[3]);
    check(n_k[0] > 0 && n_k[1] > 0 && n_k[2] > 0 && n_k[3] > 0, "some multiple of N never subtracted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (4000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
