// tb_mm_super_x: random test of the X^5 and X^2 supercells. Every cell k must
// satisfy s_out[k] + 2*c_out[k] = A*B[k] + S[k] + C[k], with A shared.
module tb_mm_super_x;
  logic       a;
  logic [4:0] b5, s5, c5, so5, co5;
  logic [1:0] b2, s2, c2, so2, co2;
  int checks = 0, failures = 0;

  mm_super_x #(.K(5)) dut5 (.a(a), .b(b5), .s(s5), .c(c5), .s_out(so5), .c_out(co5));
  mm_super_x #(.K(2)) dut2 (.a(a), .b(b2), .s(s2), .c(c2), .s_out(so2), .c_out(co2));

  initial begin
    for (int t = 0; t < 400; t++) begin
      {a, b5, s5, c5, b2, s2, c2} = 22'($urandom);
      #1;
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (int'(so5[k]) + 2 * int'(co5[k]) != int'({a & b5[k]}) + int'(s5[k]) + int'(c5[k])) failures++;
      end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (int'(so2[k]) + 2 * int'(co2[k]) != int'({a & b2[k]}) + int'(s2[k]) + int'(c2[k])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
