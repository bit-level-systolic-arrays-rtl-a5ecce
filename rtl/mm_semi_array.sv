// mm_semi_array: semi-systolic modular multiplier for an n-bit modulus.
//
// Computes a carry-save pair (C, S) with C + S = A*B (mod N) and
// 0 <= C + S < 2N, by running the reduction algorithm with sign estimation
// through n cascaded three-row stages (mm_semi_stage), one per bit of A from
// the most significant down. Stage k needs bit A_(n-1-k) three cycles after
// stage k-1 needed its bit, so the bits of A pass through a triangle of
// delays on the way in; B and M travel down with the data.
//
// Interface: present A, B and M = -N (its low n bits; the three bits above
// are always 1 for an n-bit N and are supplied here) together with in_valid
// in one cycle. Exactly 3n cycles later out_valid is high and c, s (n+3 bits,
// two's complement, aligned by weight) and m_out (M of the same operand set)
// hold the result. A new operand set may enter every cycle. Requires
// 2^(n-1) <= N < 2^n and B < N. Only the valid flag is reset.
//
// The array, its latency and throughput follow the published semi-systolic
// design; the valid flag and the delivery of M at the output are additions of
// this design, for use by the final reduction.
module mm_semi_array
  import mm_pkg::*;
#(
  parameter int unsigned N_BITS = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [N_BITS-1:0]           a,
  input  logic [N_BITS-1:0]           b,
  input  logic [N_BITS-1:0]           m,
  output logic                        out_valid,
  output logic [cs_width(N_BITS)-1:0] c,
  output logic [cs_width(N_BITS)-1:0] s,
  output logic [N_BITS-1:0]           m_out
);
  localparam int unsigned W   = cs_width(N_BITS);
  localparam int unsigned LAT = semi_latency(N_BITS);

  logic [W-1:0] b_q [N_BITS+1];
  logic [W-1:0] m_q [N_BITS+1];
  logic [W-1:0] c_q [N_BITS+1];
  logic [W-1:0] s_q [N_BITS+1];

  assign b_q[0] = {3'b000, b};
  assign m_q[0] = {3'b111, m};
  assign c_q[0] = '0;
  assign s_q[0] = '0;

  for (genvar k = 0; k < N_BITS; k++) begin : g_stage
    logic a_k;
    mm_delay #(.WIDTH(1), .DEPTH(3 * k)) u_askew (
      .clk(clk), .d(a[N_BITS-1-k]), .q(a_k)
    );
    mm_semi_stage #(.N_BITS(N_BITS)) u_stage (
      .clk(clk), .a(a_k),
      .b_in(b_q[k]), .m_in(m_q[k]), .c_in(c_q[k]), .s_in(s_q[k]),
      .b_out(b_q[k+1]), .m_out(m_q[k+1]), .c_out(c_q[k+1]), .s_out(s_q[k+1])
    );
  end

  assign c     = c_q[N_BITS];
  assign s     = s_q[N_BITS];
  assign m_out = m_q[N_BITS][N_BITS-1:0];

  logic [LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];
endmodule
