// mm_super_x: X^K supercell, K neighbouring X cells of one Step-2a row of the
// systolic array (K = 5 for the X^5 supercell at the top bit positions,
// K = 2 for the X^2 pairs, K = 1 for the lone low column of an odd n).
//
// The K cells share the multiplier bit A and do not talk to each other within
// the row: every carry leaves the supercell towards the next row. Grouping
// the cells this way is what makes the dependence graph of the array regular.
// Combinational; the array latches the outputs.
module mm_super_x #(
  parameter int unsigned K = 5
) (
  input  logic         a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] s,
  input  logic [K-1:0] c,
  output logic [K-1:0] s_out,
  output logic [K-1:0] c_out
);
  for (genvar k = 0; k < K; k++) begin : g_cell
    mm_cell_x u_x (
      .a(a), .b(b[k]), .s(s[k]), .c(c[k]), .s_out(s_out[k]), .c_out(c_out[k])
    );
  end
endmodule
