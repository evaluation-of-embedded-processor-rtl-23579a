// nisc_multiplier: integer multiplier unit of the NISC data path.
//
// Multiplies two WIDTH-bit operands combinationally and returns the low
// WIDTH bits of the product, which are the same for signed and unsigned
// operands. The data path captures the result in the unit's output register
// one clock after the operands are on the buses.
//
// The unit itself belongs to the processor; its single-cycle timing and
// the truncated product are this design's choices.
module nisc_multiplier #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  // The product is evaluated at WIDTH bits, which keeps the low half.
  assign y = a * b;

endmodule
