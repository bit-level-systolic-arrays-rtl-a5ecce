// mm_cell_x: X cell, the shift-and-add cell of Step 2a.
//
// Adds the partial-product bit A&B to the incoming sum bit S and carry bit C
// with one full adder:
//   s_out = (A&B) ^ S ^ C
//   c_out = (A&B)S + (A&B)C + SC      (weight of the next bit position)
// The cell equations are those of the published X cell. Purely
// combinational; the enclosing array latches the outputs.
module mm_cell_x (
  input  logic a,      // multiplier bit A_k, the same for the whole row
  input  logic b,      // multiplicand bit B_j
  input  logic s,      // sum bit of the doubled previous partial product
  input  logic c,      // carry bit of the doubled previous partial product
  output logic s_out,
  output logic c_out
);
  logic ab;
  assign ab    = a & b;
  assign s_out = ab ^ s ^ c;
  assign c_out = (ab & s) | (ab & c) | (s & c);
endmodule
