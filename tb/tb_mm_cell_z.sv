// tb_mm_cell_z: exhaustive test of the Z/W cell:
// s_out + 2*c_out = M + S + C when R = 0 and S + C when R = 1.
module tb_mm_cell_z;
  logic m, s, c, r, s_out, c_out;
  int checks = 0, failures = 0;

  mm_cell_z dut (.m(m), .s(s), .c(c), .r(r), .s_out(s_out), .c_out(c_out));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {m, s, c, r} = 4'(v);
      #1;
      checks++;
      if (int'(s_out) + 2 * int'(c_out) != (r ? 0 : int'(m)) + int'(s) + int'(c)) begin
        failures++;
        $display("FAIL m=%0d s=%0d c=%0d r=%0d", m, s, c, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
