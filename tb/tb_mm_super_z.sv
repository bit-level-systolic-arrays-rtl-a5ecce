// tb_mm_super_z: random test of the Z^2/W^2 supercell. Every cell k must
// satisfy s_out[k] + 2*c_out[k] = M[k] + S[k] + C[k] when R = 0 and
// S[k] + C[k] when R = 1, with R shared.
module tb_mm_super_z;
  logic       r;
  logic [1:0] m, s, c, so, co;
  int checks = 0, failures = 0;

  mm_super_z #(.K(2)) dut (.r(r), .m(m), .s(s), .c(c), .s_out(so), .c_out(co));

  initial begin
    for (int v = 0; v < 128; v++) begin
      {r, m, s, c} = 7'(v);
      #1;
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (int'(so[k]) + 2 * int'(co[k]) != (r ? 0 : int'(m[k])) + int'(s[k]) + int'(c[k])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
