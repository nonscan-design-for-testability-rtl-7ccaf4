// test_mux: nonscan test-point multiplexor.
//
// One 2:1 multiplexor steered by the test pin ntest serves for all three kinds of test
// point of the nonscan scheme:
//  * controllability point: func = an EXU output bus or a register input, tst = a
//    primary input (or another controllable node); the node becomes controllable;
//  * observability point: func = a primary output, tst = the node to be observed; the
//    node is seen at the new primary output y;
//  * dual point: func = a register input on one loop, tst = an EXU output on another
//    loop; one loop gains controllability while the other gains observability.
// ntest = 0 passes func (normal operation), ntest = 1 passes tst. Combinational.
//
// Interface: func, tst (WIDTH bits), ntest, y. The 1/0 input labelling and the
// "normal mode: ntest = 0" rule follow the described scheme.
module test_mux #(
  parameter int WIDTH = 20
) (
  input  logic [WIDTH-1:0] func,
  input  logic [WIDTH-1:0] tst,
  input  logic             ntest,
  output logic [WIDTH-1:0] y
);
  always_comb y = ntest ? tst : func;
endmodule
