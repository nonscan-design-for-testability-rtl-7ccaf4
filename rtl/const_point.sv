// const_point: constant test point in front of a data-path register.
//
// In test mode (ntest = 1) the register is loaded with the constant K instead of its
// functional input; usually K is the identity element of the EXU the register feeds
// (0 for an adder), so that the EXU's other operand can be justified at its output in
// one more time frame. Because one input is a constant, the 2:1 multiplexor reduces to
// one gate per bit (an AND with ~ntest for bits of K that are 0, an OR with ntest for
// bits that are 1), which is why a constant is cheaper than a full controllability
// point. Combinational.
//
// Interface: d functional input, ntest test pin, y = ntest ? K : d.
// Using 0 as the default constant follows the described design.
module const_point #(
  parameter int             WIDTH = 20,
  parameter logic [WIDTH-1:0] K   = '0
) (
  input  logic [WIDTH-1:0] d,
  input  logic             ntest,
  output logic [WIDTH-1:0] y
);
  always_comb y = (d & {WIDTH{~ntest}}) | (K & {WIDTH{ntest}});
endmodule
