// mm_tb_array_run: stimulus and checking for one modular-multiplier array
// (systolic when SYSTOLIC = 1, semi-systolic otherwise) of size N_BITS, or,
// with WITH_TOP = 1, for the whole multiplier (mm_modmul_top) built with
// that array.
//
// Feeds NOPS random operand sets (N in [2^(n-1), 2^n), B < N, any n-bit A)
// with random idle gaps, and checks every carry-save result against a product
// computed here: 0 <= C + S < 2N, C + S = A*B (mod N), the M output equals the
// operand's M, and the result appears exactly LAT cycles after its operands
// were captured (6n + ceil(n/2) - 2 or 3n). With WITH_TOP = 1 it also checks
// that P = A*B mod N appears one cycle after (C, S); the M check then does
// not apply. Also checks that every operand
// set produced exactly one result. Raises done when finished; checks and
// failures hold the counts.
module mm_tb_array_run
  import mm_pkg::*;
#(
  parameter int unsigned N_BITS   = 6,
  parameter bit          SYSTOLIC = 1'b1,
  parameter int unsigned NOPS     = 500,
  parameter bit          WITH_TOP = 1'b0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned W   = cs_width(N_BITS);
  localparam int unsigned LAT = SYSTOLIC ? 6 * N_BITS + (N_BITS + 1) / 2 - 2 : 3 * N_BITS;

  logic              rst_n = 1'b0;
  logic              in_valid = 1'b0;
  logic [N_BITS-1:0] a = '0, b = '0, m = '0;
  logic              out_valid;
  logic [W-1:0]      c, s;
  logic [N_BITS-1:0] m_out;

  logic              p_valid;
  logic [N_BITS-1:0] p;

  if (WITH_TOP) begin : g_top
    mm_modmul_top #(.N_BITS(N_BITS), .SYSTOLIC(SYSTOLIC)) u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .m(m),
      .cs_valid(out_valid), .c(c), .s(s), .p_valid(p_valid), .p(p)
    );
    assign m_out = '0;
  end else if (SYSTOLIC) begin : g_sys
    mm_sys_array #(.N_BITS(N_BITS)) u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .m(m),
      .out_valid(out_valid), .c(c), .s(s), .m_out(m_out)
    );
    assign p_valid = 1'b0;
    assign p       = '0;
  end else begin : g_semi
    assign p_valid = 1'b0;
    assign p       = '0;
    mm_semi_array #(.N_BITS(N_BITS)) u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .m(m),
      .out_valid(out_valid), .c(c), .s(s), .m_out(m_out)
    );
  end

  typedef struct {
    logic [N_BITS-1:0] a, b, n;
    longint unsigned   t_in;
  } op_t;
  op_t q[$], qp[$];

  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    done = 1'b0; checks = 0; failures = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 5) $display("FAIL n=%0d sys=%0d @%0d: %s", N_BITS, SYSTOLIC, cycle, what);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    op_t op;
    logic [W-1:0]          v;
    logic [W+N_BITS:0]     v_ext, n_ext;
    logic [2*N_BITS-1:0]   prod;
    if (q.size() == 0) begin
      check(1'b0, "result without operands");
    end else begin
      op    = q.pop_front();
      v     = c + s;
      v_ext = (W+N_BITS+1)'(v);
      n_ext = (W+N_BITS+1)'(op.n);
      prod  = op.a * op.b;
      check(!v[W-1] && v_ext < 2 * n_ext, $sformatf("C+S=%0d outside [0,2N), N=%0d", $signed(v), op.n));
      check((v_ext % n_ext) == (W+N_BITS+1)'(prod % (2*N_BITS)'(op.n)),
            $sformatf("C+S=%0d wrong residue of %0d*%0d mod %0d", v, op.a, op.b, op.n));
      if (!WITH_TOP) check(m_out == N_BITS'(~op.n + 1'b1), "M output");
      else           qp.push_back(op);
      check(cycle - op.t_in == longint'(LAT), $sformatf("latency %0d, expected %0d", cycle - op.t_in, LAT));
    end
  end

  always @(posedge clk) if (rst_n && p_valid) begin
    op_t op;
    logic [2*N_BITS-1:0] prod;
    if (qp.size() == 0) begin
      check(1'b0, "product without operands");
    end else begin
      op   = qp.pop_front();
      prod = op.a * op.b;
      check(p == N_BITS'(prod % (2*N_BITS)'(op.n)),
            $sformatf("P=%0d for %0d*%0d mod %0d", p, op.a, op.b, op.n));
      check(cycle - op.t_in == longint'(LAT) + 1, "product latency");
    end
  end

  initial begin
    logic [N_BITS-1:0] nn;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < NOPS; k++) begin
      if ($urandom_range(0, 4) == 0) begin
        in_valid <= 1'b0;
      end else begin
        op_t op;
        nn = N_BITS'({$urandom, $urandom, $urandom, $urandom}) | (N_BITS'(1) << (N_BITS - 1));
        op.n = nn;
        op.a = N_BITS'({$urandom, $urandom, $urandom, $urandom});
        op.b = N_BITS'((2*N_BITS)'({$urandom, $urandom, $urandom, $urandom}) % (2*N_BITS)'(nn));
        op.t_in = cycle + 1;   // the edge that captures it
        q.push_back(op);
        a <= op.a; b <= op.b; m <= N_BITS'(~nn + 1'b1); in_valid <= 1'b1;
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    check(q.size() == 0 && qp.size() == 0, "operands without result");
    done = 1'b1;
  end
endmodule
