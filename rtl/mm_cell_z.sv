// mm_cell_z: Z cell (Step 2b) and W cell (Step 2c) of the low bit positions.
//
// A full adder whose M input is gated by the complement of the estimated
// sign R, so one adder yields the selected result directly:
//   c_out = ~R(MS + MC) + SC
//   s_out = (~R & M) ^ S ^ C
// With R = 1 the cell only re-encodes S + C. The equations follow the
// published Z and W cells; Z is fed bits of -2N and W bits of -N.
// Combinational.
module mm_cell_z (
  input  logic m,
  input  logic s,
  input  logic c,
  input  logic r,
  output logic s_out,
  output logic c_out
);
  logic mg;
  assign mg    = m & ~r;
  assign s_out = mg ^ s ^ c;
  assign c_out = (mg & s) | (mg & c) | (s & c);
endmodule
