// tb_mm_modmul_sizes: the complete multiplier (array plus final reduction)
// at the other sizes the design is drawn at, and at larger ones:
//   n = 4, semi-systolic  (the pipelining example, latency 12 + 1)
//   n = 8, semi-systolic  (the size of the stage drawing, latency 24 + 1)
//   n = 8, systolic       (latency 50 + 1)
//   n = 32, systolic      (latency 206 + 1)
//   n = 64, semi-systolic (latency 192 + 1)
// Each run streams 1500 random operand sets with idle gaps and checks C + S,
// P = A*B mod N and both latencies (see mm_tb_array_run).
module tb_mm_modmul_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NRUN = 5;
  logic done [NRUN];
  int   chk  [NRUN];
  int   fail [NRUN];

  mm_tb_array_run #(.N_BITS(4),  .SYSTOLIC(1'b0), .NOPS(1500), .WITH_TOP(1'b1)) u_semi4 (
    .clk(clk), .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  mm_tb_array_run #(.N_BITS(8),  .SYSTOLIC(1'b0), .NOPS(1500), .WITH_TOP(1'b1)) u_semi8 (
    .clk(clk), .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  mm_tb_array_run #(.N_BITS(8),  .SYSTOLIC(1'b1), .NOPS(1500), .WITH_TOP(1'b1)) u_sys8 (
    .clk(clk), .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  mm_tb_array_run #(.N_BITS(32), .SYSTOLIC(1'b1), .NOPS(1500), .WITH_TOP(1'b1)) u_sys32 (
    .clk(clk), .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  mm_tb_array_run #(.N_BITS(64), .SYSTOLIC(1'b0), .NOPS(1500), .WITH_TOP(1'b1)) u_semi64 (
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
