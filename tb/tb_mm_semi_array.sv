// tb_mm_semi_array: self-checking test of the semi-systolic array at n = 8
// (its default, the size of the published stage drawing, latency 24), at
// n = 4 (the size of the published pipelining example, latency 12), at an
// odd n = 7, at n = 16 and at n = 64, all running together. See
// mm_tb_array_run for the checks.
module tb_mm_semi_array;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NRUN = 5;
  logic done [NRUN];
  int   chk  [NRUN];
  int   fail [NRUN];

  mm_tb_array_run #(.N_BITS(8), .SYSTOLIC(1'b0), .NOPS(1500)) u_n8 (
    .clk(clk), .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  mm_tb_array_run #(.N_BITS(4), .SYSTOLIC(1'b0), .NOPS(1500)) u_n4 (
    .clk(clk), .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  mm_tb_array_run #(.N_BITS(7), .SYSTOLIC(1'b0), .NOPS(1500)) u_n7 (
    .clk(clk), .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  mm_tb_array_run #(.N_BITS(16), .SYSTOLIC(1'b0), .NOPS(1500)) u_n16 (
    .clk(clk), .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  mm_tb_array_run #(.N_BITS(64), .SYSTOLIC(1'b0), .NOPS(1500)) u_n64 (
    .clk(clk), .done(done[4]), .checks(chk[4]), .failures(fail[4]));

  function automatic int total(input int v [NRUN]);
    int t = 0;
    foreach (v[k]) t += v[k];
    return t;
  endfunction

  function automatic bit all_done();
    foreach (done[k]) if (!done[k]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    @(posedge clk);
    while (!all_done()) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail));
    $finish;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail) + 1);
    $finish;
  end
endmodule
