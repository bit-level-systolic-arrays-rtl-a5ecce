// tb_mm_super_ly: exhaustive test of the LY^5/LU^5 supercell over all 2^15
// inputs. Index 0 is bit position n-2. Reference: the trial sum M + S + C in
// five bits less its lowest sum bit (which lies below the estimation
// precision) gives the estimated sign R as its bit 4; the outputs must then
// add up, position by position, to M + S + C (R = 0) or S + C (R = 1).
module tb_mm_super_ly;
  logic [4:0] m, s, c, so, co;
  logic       r;
  int checks = 0, failures = 0;

  mm_super_ly dut (.m(m), .s(s), .c(c), .r(r), .s_out(so), .c_out(co));

  initial begin
    for (int v = 0; v < 32768; v++) begin
      logic [4:0] trunc;
      logic       r_ref;
      {m, s, c} = 15'(v);
      trunc = m + s + c - 5'({m[0] ^ s[0] ^ c[0]});
      r_ref = trunc[4];
      #1;
      checks++;
      if (r != r_ref) failures++;
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (int'(so[k]) + 2 * int'(co[k]) != (r_ref ? 0 : int'(m[k])) + int'(s[k]) + int'(c[k])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
