// mm_cell_y: Y cell (Step 2b) and U cell (Step 2c) of the top five bit
// positions.
//
// It always forms the trial sum S + C + M (M is -2N for a Y cell and -N for a
// U cell) and hands the trial bits C^, S^ to the sign estimator. The
// estimated sign R then chooses the result:
//   R = 0 (trial sum non-negative): keep the trial bits  C^, S^
//   R = 1 (negative):               re-encode S + C as   SC, S^C
// The equations follow the published Y and U cells; one module serves both
// because they differ only in which M bit is wired to them. Combinational.
module mm_cell_y (
  input  logic m,      // bit of -2N (Y cell) or -N (U cell)
  input  logic s,
  input  logic c,
  input  logic r,      // estimated sign, 1 = negative
  output logic c_hat,  // trial carry, to the sign estimator
  output logic s_hat,  // trial sum,   to the sign estimator
  output logic s_out,
  output logic c_out
);
  assign c_hat = (m & s) | (m & c) | (s & c);
  assign s_hat = m ^ s ^ c;
  assign c_out = r ? (s & c) : c_hat;
  assign s_out = r ? (s ^ c) : s_hat;
endmodule
