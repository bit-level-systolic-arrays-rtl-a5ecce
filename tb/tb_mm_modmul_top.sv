// tb_mm_modmul_top: end-to-end test of the modular multiplier at its default
// size (n = 6).
//
// Two copies of the top run on the same operand stream: the systolic one with
// every parameter at its default and the semi-systolic one. The stream starts
// with the worked example 47 * 48 mod 50 (C + S = 56, P = 6) and continues
// with random moduli N in [2^(n-1), 2^n), B < N and any n-bit A, entering
// back to back or with idle gaps. For every result the bench checks, against
// products computed here with wide integer arithmetic:
//   * P = A*B mod N;
//   * 0 <= C + S < 2N and C + S = A*B (mod N);
//   * the carry-save latency (6n + ceil(n/2) - 2, resp. 3n) and one more
//     cycle to P;
//   * that both arrays produce the same (C, S).
// It counts how often each mechanism occurred and fails if one never did:
// sign estimate negative / non-negative in the supercells, final selection
// of C + S and of C + S - N, back-to-back operations, idle gaps, a change of
// modulus between consecutive operations.
module tb_mm_modmul_top;
  import mm_pkg::*;

  localparam int unsigned NB    = 6;            // the top's default size
  localparam int unsigned W     = cs_width(NB);
  localparam int unsigned LSYS  = 6 * NB + (NB + 1) / 2 - 2;
  localparam int unsigned LSEMI = 3 * NB;
  localparam int unsigned NOPS  = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid;
  logic [NB-1:0] a, b, m;
  logic          cs_valid_y, p_valid_y, cs_valid_i, p_valid_i;
  logic [W-1:0]  c_y, s_y, c_i, s_i;
  logic [NB-1:0] p_y, p_i;

  mm_modmul_top dut_sys (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .m(m),
    .cs_valid(cs_valid_y), .c(c_y), .s(s_y), .p_valid(p_valid_y), .p(p_y)
  );

  mm_modmul_top #(.N_BITS(NB), .SYSTOLIC(1'b0)) dut_semi (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .m(m),
    .cs_valid(cs_valid_i), .c(c_i), .s(s_i), .p_valid(p_valid_i), .p(p_i)
  );

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    logic [NB-1:0]   a, b, n;
    longint unsigned t_in;
  } op_t;

  op_t q_sys_cs[$], q_sys_p[$], q_semi_cs[$], q_semi_p[$];
  logic [2*W-1:0] q_semi_pair[$];   // (C, S) of the semi array, for comparison
  logic [2*W-1:0] q_sys_pair[$];

  // Mechanism counters.
  int n_r_neg = 0, n_r_pos = 0, n_sel_diff = 0, n_sel_sum = 0;
  int n_b2b = 0, n_gap = 0, n_nchange = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic logic [NB-1:0] ref_mod(input logic [NB-1:0] x, y, n);
    logic [2*NB-1:0] prod;
    prod = x * y;
    return NB'(prod % {{NB{1'b0}}, n});
  endfunction

  // Check a carry-save result: 0 <= C + S < 2N and C + S = A*B mod N.
  task automatic check_cs(input op_t op, input logic [W-1:0] cc, ss,
                          input longint unsigned t_out, input int unsigned lat,
                          input string tag);
    logic [W-1:0]   v;
    logic [W+NB:0]  v_ext, n_ext;
    v     = cc + ss;
    v_ext = (W+NB+1)'(v);
    n_ext = (W+NB+1)'(op.n);
    check(!v[W-1] && (v_ext < 2 * n_ext), $sformatf("%s C+S=%0d outside [0,2N) N=%0d", tag, $signed(v), op.n));
    check(NB'(v_ext % n_ext) == ref_mod(op.a, op.b, op.n),
          $sformatf("%s C+S=%0d wrong residue for %0d*%0d mod %0d", tag, v, op.a, op.b, op.n));
    check(t_out - op.t_in == longint'(lat), $sformatf("%s latency %0d, expected %0d", tag, t_out - op.t_in, lat));
    if (v_ext >= n_ext) n_sel_diff++; else n_sel_sum++;
  endtask

  // Results.
  always @(posedge clk) if (rst_n) begin
    if (cs_valid_y) begin
      op_t op;
      op = q_sys_cs.pop_front();
      check_cs(op, c_y, s_y, cycle, LSYS, "sys");
      q_sys_p.push_back(op);
      q_sys_pair.push_back({c_y, s_y});
      if (op.a == NB'(47) && op.b == NB'(48) && op.n == NB'(50))
        check(W'(c_y + s_y) == W'(56), "worked example: C+S != 56");
    end
    if (cs_valid_i) begin
      op_t op;
      op = q_semi_cs.pop_front();
      check_cs(op, c_i, s_i, cycle, LSEMI, "semi");
      q_semi_p.push_back(op);
      q_semi_pair.push_back({c_i, s_i});
    end
    if (p_valid_y) begin
      op_t op;
      op = q_sys_p.pop_front();
      check(p_y == ref_mod(op.a, op.b, op.n),
            $sformatf("sys P=%0d for %0d*%0d mod %0d", p_y, op.a, op.b, op.n));
      check(cycle - op.t_in == longint'(LSYS) + 1, "sys P latency");
    end
    if (p_valid_i) begin
      op_t op;
      op = q_semi_p.pop_front();
      check(p_i == ref_mod(op.a, op.b, op.n),
            $sformatf("semi P=%0d for %0d*%0d mod %0d", p_i, op.a, op.b, op.n));
      check(cycle - op.t_in == longint'(LSEMI) + 1, "semi P latency");
    end
    while (q_sys_pair.size() > 0 && q_semi_pair.size() > 0)
      check(q_sys_pair.pop_front() == q_semi_pair.pop_front(), "arrays disagree on (C,S)");
  end

  // Sign estimates of the systolic supercells: row j's supercell works on
  // the operand set that entered 2j cycles earlier.
  logic [LSYS:0] vhist;
  always @(posedge clk) vhist <= {vhist[LSYS-1:0], in_valid & rst_n};

  for (genvar j = 1; j < 3 * NB; j++) begin : g_rmon
    if (j % 3 != 0) begin : g_sub
      always @(negedge clk) if (rst_n && ((j == 0) ? in_valid : vhist[2*j-1])) begin
        if (dut_sys.g_systolic.u_array.g_row[j].g_node[(NB+1)/2-1].g_ly.u_ly.r) n_r_neg++;
        else                                                                 n_r_pos++;
      end
    end
  end

  // Stimulus.
  function automatic logic [NB-1:0] rand_n();
    return NB'($urandom) | (NB'(1) << (NB - 1));
  endfunction

  task automatic drive(input logic [NB-1:0] aa, bb, nn);
    op_t op;
    a <= aa; b <= bb; m <= NB'(~nn + 1'b1); in_valid <= 1'b1;
    op.a = aa; op.b = bb; op.n = nn; op.t_in = cycle + 1;  // the edge that captures it
    q_sys_cs.push_back(op);
    q_semi_cs.push_back(op);
  endtask

  initial begin
    logic [NB-1:0] nn, prev_n;
    bit prev_valid;
    in_valid = 1'b0; a = '0; b = '0; m = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Worked example: 47 * 48 mod 50.
    drive(NB'(47), NB'(48), NB'(50));
    prev_n = NB'(50); prev_valid = 1'b1;
    @(posedge clk);
    for (int k = 0; k < NOPS; k++) begin
      if ($urandom_range(0, 3) == 0) begin
        in_valid <= 1'b0;
        if (prev_valid) n_gap++;
        prev_valid = 1'b0;
      end else begin
        nn = ($urandom_range(0, 3) == 0) ? prev_n : rand_n();
        drive(NB'($urandom), NB'($urandom_range(0, int'(nn) - 1)), nn);
        if (prev_valid) n_b2b++;
        if (nn != prev_n) n_nchange++;
        prev_n = nn; prev_valid = 1'b1;
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LSYS + 5) @(posedge clk);
    check(q_sys_cs.size() == 0 && q_sys_p.size() == 0, "systolic results missing");
    check(q_semi_cs.size() == 0 && q_semi_p.size() == 0, "semi-systolic results missing");
    $display("mechanisms: R negative %0d, R non-negative %0d, select C+S-N %0d, select C+S %0d, back-to-back %0d, gaps %0d, modulus changes %0d",
             n_r_neg, n_r_pos, n_sel_diff, n_sel_sum, n_b2b, n_gap, n_nchange);
    check(n_r_neg > 0, "sign estimate never negative");
    check(n_r_pos > 0, "sign estimate never non-negative");
    check(n_sel_diff > 0, "final stage never selected C+S-N");
    check(n_sel_sum > 0, "final stage never selected C+S");
    check(n_b2b > 0, "no back-to-back operations");
    check(n_gap > 0, "no idle gaps");
    check(n_nchange > 0, "modulus never changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NOPS + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
