// tb_mm_final_reduce: random test of the final reduction at n = 6 and n = 32.
// C + S is drawn from [0, 2N), split randomly into C and S; one cycle later P
// must equal (C + S) mod N, and out_valid must follow in_valid by one cycle.
module tb_mm_final_reduce;
  import mm_pkg::*;
  localparam int unsigned N1 = 6,  W1 = cs_width(N1);
  localparam int unsigned N2 = 32, W2 = cs_width(N2);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic          v_in = 1'b0, v1, v2;
  logic [W1-1:0] c1 = '0, s1 = '0;
  logic [N1-1:0] m1 = '0, p1;
  logic [W2-1:0] c2 = '0, s2 = '0;
  logic [N2-1:0] m2 = '0, p2;

  mm_final_reduce dut1 (.clk(clk), .rst_n(rst_n), .in_valid(v_in), .c(c1), .s(s1), .m(m1),
                        .out_valid(v1), .p(p1));
  mm_final_reduce #(.N_BITS(N2)) dut2 (.clk(clk), .rst_n(rst_n), .in_valid(v_in), .c(c2), .s(s2),
                                       .m(m2), .out_valid(v2), .p(p2));

  int checks = 0, failures = 0, n_sub = 0, n_keep = 0;
  longint unsigned e1, e2;
  bit ev;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    ev = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      longint unsigned n1, n2, x1, x2;
      @(negedge clk);
      checks++;
      if (v1 !== ev || v2 !== ev) failures++;
      if (ev) begin
        checks += 2;
        if (p1 != N1'(e1)) failures++;
        if (p2 != N2'(e2)) failures++;
      end
      ev   = 1'($urandom);
      n1   = longint'($urandom_range(32, 63));
      x1   = longint'($urandom) % (2 * n1);
      n2   = longint'($urandom) | 64'h8000_0000;
      x2   = {$urandom, $urandom} % (2 * n2);
      if (x2 >= n2) n_sub++; else n_keep++;
      e1   = x1 % n1;
      e2   = x2 % n2;
      v_in = ev;
      c1 = W1'($urandom); s1 = W1'(x1) - c1; m1 = N1'(-n1);
      c2 = W2'({$urandom, $urandom}); s2 = W2'(x2) - c2; m2 = N2'(-n2);
    end
    checks++;
    if (n_sub == 0 || n_keep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
