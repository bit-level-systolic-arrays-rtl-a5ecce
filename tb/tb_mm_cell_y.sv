// tb_mm_cell_y: exhaustive test of the Y/U cell. The trial bits must satisfy
// s_hat + 2*c_hat = M + S + C; the outputs must satisfy
// s_out + 2*c_out = M + S + C when R = 0 and S + C when R = 1.
module tb_mm_cell_y;
  logic m, s, c, r, c_hat, s_hat, s_out, c_out;
  int checks = 0, failures = 0;

  mm_cell_y dut (.m(m), .s(s), .c(c), .r(r), .c_hat(c_hat), .s_hat(s_hat),
                 .s_out(s_out), .c_out(c_out));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {m, s, c, r} = 4'(v);
      #1;
      checks += 2;
      if (int'(s_hat) + 2 * int'(c_hat) != int'(m) + int'(s) + int'(c)) begin
        failures++;
        $display("FAIL trial bits for m=%0d s=%0d c=%0d", m, s, c);
      end
      if (int'(s_out) + 2 * int'(c_out) != (r ? 0 : int'(m)) + int'(s) + int'(c)) begin
        failures++;
        $display("FAIL outputs for m=%0d s=%0d c=%0d r=%0d", m, s, c, r);
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
