// dp_reg: data-path register with hold multiplexor.
//
// One WIDTH-bit register of a register file, or the register of a transfer unit (TU).
// When ld is 1 the register takes d at the rising clock edge; otherwise its hold
// multiplexor feeds q back so the value is kept until new data is stored, which is how a
// transfer unit carries a value produced in one filter iteration into a later one.
// Asynchronous active-low reset clears it.
//
// Interface: clk, rst_n, ld, d -> q (one cycle latency).
// Load/hold follows the described transfer units; the reset is this design's own choice.
module dp_reg #(
  parameter int WIDTH = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
endmodule
