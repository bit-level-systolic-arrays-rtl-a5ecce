// tb_mm_cell_x: exhaustive test of the X cell: for all 16 input combinations
// the outputs must satisfy s_out + 2*c_out = A*B + S + C.
module tb_mm_cell_x;
  logic a, b, s, c, s_out, c_out;
  int checks = 0, failures = 0;

  mm_cell_x dut (.a(a), .b(b), .s(s), .c(c), .s_out(s_out), .c_out(c_out));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, s, c} = 4'(v);
      #1;
      checks++;
      if (int'(s_out) + 2 * int'(c_out) != int'({a & b}) + int'(s) + int'(c)) begin
        failures++;
        $display("FAIL a=%0d b=%0d s=%0d c=%0d -> s_out=%0d c_out=%0d", a, b, s, c, s_out, c_out);
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
