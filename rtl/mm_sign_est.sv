// mm_sign_est: L cell, the sign estimator.
//
// Estimates the sign of the trial carry-save pair (C^, S^) from its top bits
// only: the low n-1 bit positions are dropped (t = n-1), so the estimate
// never calls a non-negative value negative, and errs only on values in
// [0, 2^t). Indices below are relative to bit position n-2 of the row; the
// carry of a cell at position p has weight p+1, so at weight i the two bits to
// add are c_hat of position i-1 and s_hat of position i. A 3-bit carry
// look-ahead over weights n-1, n, n+1 produces the carry into the sign
// position n+2:
//   P_i = c_hat_{i-1} | s_hat_i,  G_i = c_hat_{i-1} & s_hat_i
//   R   = s_hat_{n+2} ^ c_hat_{n+1} ^ (G_{n+1} | G_n P_{n+1} | G_{n-1} P_n P_{n+1})
// The formula is the published one. Combinational; R = 1 means negative.
module mm_sign_est (
  input  logic [3:0] c_hat,  // trial carries of positions n-2 .. n+1
  input  logic [3:0] s_hat,  // trial sums   of positions n-1 .. n+2
  output logic       r
);
  // Weight k+n-2 for k = 1..3: carry bit c_hat[k-1], sum bit s_hat[k-1].
  // P of the lowest weight is never needed.
  logic [3:1] g;
  logic [3:2] p;
  always_comb begin
    for (int k = 1; k <= 3; k++) g[k] = c_hat[k-1] & s_hat[k-1];
    for (int k = 2; k <= 3; k++) p[k] = c_hat[k-1] | s_hat[k-1];
    r = s_hat[3] ^ c_hat[3] ^ (g[3] | (g[2] & p[3]) | (g[1] & p[2] & p[3]));
  end
endmodule
