// exu_add: adder execution unit (EXU) of a filter data path.
//
// Adds its two operand registers' values in two's complement and wraps to the word size,
// as the adders of the filter data paths do. It is purely combinational: the operands
// come from the EXU's own register files and the sum is captured by whichever registers
// load from this EXU's output bus in the same clock cycle. Zero is the identity element
// of this EXU, which is why a constant 0 forced into one operand register makes the other
// operand appear unchanged on the output bus.
//
// Interface: a, b operands, z = a + b (WIDTH bits, overflow wraps).
// The word size default of 20 bits is the one given for the filter data paths; the
// wrap-around on overflow is this design's own choice.
module exu_add #(
  parameter int WIDTH = 20
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  output logic signed [WIDTH-1:0] z
);
  always_comb z = a + b;
endmodule
