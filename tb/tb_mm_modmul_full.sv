// tb_mm_modmul_full: the modular multiplier exactly as built by default
// (systolic array, n = 6), with no parameter overridden.
//
// Runs the published worked example 47 * 48 mod 50 (C + S must be 56, the
// pair itself (100000000, 100111000), and P must be 6) as one complete
// operation, then a back-to-back stream of
// random operand sets with random moduli. Every result is checked against
// A*B mod N computed here, together with 0 <= C + S < 2N and the latencies
// (6n + ceil(n/2) - 2 cycles to (C, S), one more to P).
module tb_mm_modmul_full;
  import mm_pkg::*;

  localparam int unsigned NB   = 6;   // the top's default size
  localparam int unsigned W    = cs_width(NB);
  localparam int unsigned LAT  = 6 * NB + (NB + 1) / 2 - 2;
  localparam int unsigned NOPS = 1000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid = 1'b0;
  logic [NB-1:0] a = '0, b = '0, m = '0;
  logic          cs_valid, p_valid;
  logic [W-1:0]  c, s;
  logic [NB-1:0] p;

  mm_modmul_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .m(m),
    .cs_valid(cs_valid), .c(c), .s(s), .p_valid(p_valid), .p(p)
  );

  typedef struct { int a, b, n; longint t_in; } op_t;
  op_t q_cs[$], q_p[$];
  int checks = 0, failures = 0, results = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (cs_valid) begin
      op_t op;
      int  v;
      op = q_cs.pop_front();
      v  = int'($signed(W'(c + s)));
      check(v >= 0 && v < 2 * op.n, $sformatf("C+S=%0d outside [0,2N), N=%0d", v, op.n));
      check(v % op.n == (op.a * op.b) % op.n, $sformatf("C+S=%0d wrong residue", v));
      check(cycle - op.t_in == longint'(LAT), "carry-save latency");
      if (op.a == 47 && op.b == 48 && op.n == 50) begin
        check(v == 56, "worked example: C+S != 56");
        // Bit-exact pair, worked out by hand from the cell equations (a
        // rejected trial re-encodes S, C as S^C, S&C): C = 100000000,
        // S = 100111000.
        check(c == 9'b100000000 && s == 9'b100111000,
              $sformatf("worked example: (C,S) = (%b,%b)", c, s));
      end
      q_p.push_back(op);
    end
    if (p_valid) begin
      op_t op;
      op = q_p.pop_front();
      check(int'(p) == (op.a * op.b) % op.n,
            $sformatf("P=%0d for %0d*%0d mod %0d", p, op.a, op.b, op.n));
      check(cycle - op.t_in == longint'(LAT) + 1, "product latency");
      if (op.a == 47 && op.b == 48 && op.n == 50) check(p == NB'(6), "worked example: P != 6");
      results++;
    end
  end

  task automatic drive(input int aa, bb, nn);
    op_t op;
    a <= NB'(aa); b <= NB'(bb); m <= NB'(-nn); in_valid <= 1'b1;
    op = '{a: aa, b: bb, n: nn, t_in: cycle + 1};
    q_cs.push_back(op);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    drive(47, 48, 50);
    @(posedge clk);
    for (int k = 0; k < NOPS; k++) begin
      int nn;
      nn = $urandom_range(32, 63);
      drive($urandom_range(0, 63), $urandom_range(0, nn - 1), nn);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LAT + 5) @(posedge clk);
    check(results == NOPS + 1, $sformatf("%0d results for %0d operand sets", results, NOPS + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NOPS + 200) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
