// mm_super_ly: LY^5 / LU^5 supercell, the sign estimator L merged with the
// five Y (Step 2b) or U (Step 2c) cells of bit positions n-2 .. n+2.
//
// The five cells form the trial sum S + C + M; L estimates its sign R from
// the trial bits; the cells then keep the trial bits (R = 0) or re-encode
// S + C (R = 1). R is also an output: in the systolic array it travels east
// through one register per column to the Z or W cells of the same row.
// Index 0 of every vector is bit position n-2. Combinational.
module mm_super_ly (
  input  logic [4:0] m,
  input  logic [4:0] s,
  input  logic [4:0] c,
  output logic       r,
  output logic [4:0] s_out,
  output logic [4:0] c_out
);
  logic [4:0] c_hat, s_hat;

  for (genvar k = 0; k < 5; k++) begin : g_cell
    mm_cell_y u_y (
      .m(m[k]), .s(s[k]), .c(c[k]), .r(r),
      .c_hat(c_hat[k]), .s_hat(s_hat[k]), .s_out(s_out[k]), .c_out(c_out[k])
    );
  end

  // The carry of position n+2 leaves the word and the sum of position n-2 lies
  // below the estimation precision, so neither reaches L.
  mm_sign_est u_l (
    .c_hat(c_hat[3:0]), .s_hat(s_hat[4:1]), .r(r)
  );
endmodule
