// mm_super_z: Z^K / W^K supercell, K neighbouring Z (Step 2b) or W (Step 2c)
// cells of one row of the systolic array (K = 2 for the published pairs,
// K = 1 for the lone low column of an odd n).
//
// All K cells use the same estimated sign R, which reaches the supercell
// through the row's chain of R registers. Combinational.
module mm_super_z #(
  parameter int unsigned K = 2
) (
  input  logic         r,
  input  logic [K-1:0] m,
  input  logic [K-1:0] s,
  input  logic [K-1:0] c,
  output logic [K-1:0] s_out,
  output logic [K-1:0] c_out
);
  for (genvar k = 0; k < K; k++) begin : g_cell
    mm_cell_z u_z (
      .m(m[k]), .s(s[k]), .c(c[k]), .r(r), .s_out(s_out[k]), .c_out(c_out[k])
    );
  end
endmodule
