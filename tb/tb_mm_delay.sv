// tb_mm_delay: checks that delay lines of depth 0, 1 and 7 reproduce a random
// bus exactly that many cycles later.
module tb_mm_delay;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] d = '0, q0, q1, q7;
  logic [7:0] hist [8];

  mm_delay #(.WIDTH(8), .DEPTH(0)) u0 (.clk(clk), .d(d), .q(q0));
  mm_delay #(.WIDTH(8), .DEPTH(1)) u1 (.clk(clk), .d(d), .q(q1));
  mm_delay #(.WIDTH(8), .DEPTH(7)) u7 (.clk(clk), .d(d), .q(q7));

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      d = 8'($urandom);
      hist[0] = d;
      #1;
      checks++;
      if (q0 != hist[0]) failures++;
      if (t >= 1) begin checks++; if (q1 != hist[1]) failures++; end
      if (t >= 7) begin checks++; if (q7 != hist[7]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
