// tb_mm_sign_est: exhaustive test of the sign estimator over all 256 input
// combinations. Relative to bit position n-2, c_hat[k] and s_hat[k] both have
// weight k+1; the reference adds the two 4-bit words shifted by one in five
// bits and takes bit 4, the sign of the truncated sum T(C^) + T(S^).
module tb_mm_sign_est;
  logic [3:0] c_hat, s_hat;
  logic       r;
  int checks = 0, failures = 0;

  mm_sign_est dut (.c_hat(c_hat), .s_hat(s_hat), .r(r));

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [4:0] sum;
      {c_hat, s_hat} = 8'(v);
      sum = {c_hat, 1'b0} + {s_hat, 1'b0};
      #1;
      checks++;
      if (r != sum[4]) begin
        failures++;
        $display("FAIL c_hat=%b s_hat=%b r=%0d expected %0d", c_hat, s_hat, r, sum[4]);
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
