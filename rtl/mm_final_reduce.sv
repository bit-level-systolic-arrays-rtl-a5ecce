// mm_final_reduce: brings the array's carry-save result into [0, N).
//
// The array delivers (C, S) with 0 <= C + S < 2N. Two carry-propagate adders
// form P = C + S and P^ = C + S - N = C + S + M in (n+3)-bit two's
// complement; P^ is taken when it is non-negative, P otherwise. The result
// is registered, so it appears one cycle after c, s, m and in_valid.
//
// The two adders and the selection are as published; the output register,
// the valid flag and taking N in the form M = -N (the form the array already
// carries) are choices of this design. An assertion checks the range that
// the array guarantees.
module mm_final_reduce
  import mm_pkg::*;
#(
  parameter int unsigned N_BITS = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [cs_width(N_BITS)-1:0] c,
  input  logic [cs_width(N_BITS)-1:0] s,
  input  logic [N_BITS-1:0]           m,      // low n bits of -N
  output logic                        out_valid,
  output logic [N_BITS-1:0]           p       // (C + S) mod N
);
  localparam int unsigned W = cs_width(N_BITS);

  logic [W-1:0] sum, diff;
  assign sum  = c + s;
  assign diff = sum + {3'b111, m};

  always_ff @(posedge clk) begin
    p <= diff[W-1] ? sum[N_BITS-1:0] : diff[N_BITS-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  // 0 <= C + S < 2N, i.e. C + S non-negative and C + S - 2N negative.
  logic [W-1:0] diff2;
  assign diff2 = sum + {2'b11, m, 1'b0};
  a_range : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (!sum[W-1] && diff2[W-1]))
    else $error("carry-save result outside [0, 2N)");
endmodule
