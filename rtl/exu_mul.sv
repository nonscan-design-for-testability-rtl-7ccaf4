// exu_mul: multiplier execution unit (EXU) of a filter data path.
//
// Multiplies a data operand by a filter coefficient in two's-complement fixed point.
// The full 2*WIDTH-bit product is shifted right arithmetically by FRAC bits and the low
// WIDTH bits are kept, so a coefficient equal to 2**FRAC is the value one and passes the
// data operand through unchanged. Combinational; the result appears on the output bus in
// the cycle the operands are presented.
//
// Interface: a data operand, c coefficient, z = (a * c) >>> FRAC, truncated to WIDTH bits.
// The 20-bit word follows the filter data paths' word size. The fixed-point format
// (FRAC fractional bits) and truncation are this design's own choices.
module exu_mul #(
  parameter int WIDTH = 20,
  parameter int FRAC  = 10
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] c,
  output logic signed [WIDTH-1:0] z
);
  localparam int PW = 2 * WIDTH;
  logic signed [PW-1:0] prod;

  always_comb begin
    prod = PW'(a) * PW'(c);
    z    = WIDTH'(prod >>> FRAC);
  end
endmodule
