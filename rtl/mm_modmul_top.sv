// mm_modmul_top: pipelined modular multiplier P = A*B mod N, one result per
// cycle.
//
// An array computes a carry-save pair (C, S) with C + S = A*B (mod N) and
// 0 <= C + S < 2N using Blakley's shift-add reduction with sign estimation;
// the final-reduction stage then adds C + S and selects C + S or C + S - N.
// The array is the broadcast-free systolic one (SYSTOLIC = 1, latency
// 6n + ceil(n/2) - 2) or the semi-systolic one (SYSTOLIC = 0, latency 3n,
// but A bits and the estimated sign reach a whole row in the same cycle).
// Both produce bit-identical (C, S).
//
// Interface: present A, B and M = -N (its low n bits, i.e. 2^n - N) with
// in_valid; 2^(n-1) <= N < 2^n and B < N. After the array latency out_valid
// marks c, s; one cycle later p_valid marks the reduced product p. A new
// operand set, with its own modulus, may enter every cycle. The default
// n = 6 is the size of the published worked example and systolic schedule.
module mm_modmul_top
  import mm_pkg::*;
#(
  parameter int unsigned N_BITS   = 6,
  parameter bit          SYSTOLIC = 1'b1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [N_BITS-1:0]           a,
  input  logic [N_BITS-1:0]           b,
  input  logic [N_BITS-1:0]           m,
  output logic                        cs_valid,
  output logic [cs_width(N_BITS)-1:0] c,
  output logic [cs_width(N_BITS)-1:0] s,
  output logic                        p_valid,
  output logic [N_BITS-1:0]           p
);
  logic [N_BITS-1:0] m_arr;

  if (SYSTOLIC) begin : g_systolic
    mm_sys_array #(.N_BITS(N_BITS)) u_array (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .m(m),
      .out_valid(cs_valid), .c(c), .s(s), .m_out(m_arr)
    );
  end else begin : g_semi
    mm_semi_array #(.N_BITS(N_BITS)) u_array (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .m(m),
      .out_valid(cs_valid), .c(c), .s(s), .m_out(m_arr)
    );
  end

  mm_final_reduce #(.N_BITS(N_BITS)) u_reduce (
    .clk(clk), .rst_n(rst_n), .in_valid(cs_valid), .c(c), .s(s), .m(m_arr),
    .out_valid(p_valid), .p(p)
  );
endmodule
