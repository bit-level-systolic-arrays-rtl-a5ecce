// mm_delay: a chain of DEPTH registers on a WIDTH-bit bus.
//
// These are the single-cycle delay elements that skew the operand bits on
// their way into the arrays and re-align the result bits on their way out.
// DEPTH = 0 is a plain wire. No reset: the chain only carries data, whose
// validity travels on a separate, reset flag.
module mm_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int unsigned i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
    assign q = stage[DEPTH-1];
  end
endmodule
