// src_mux: operand multiplexor in front of a data-path register.
//
// In the dedicated register-file model a register may be loaded from several EXU output
// buses; this N-input multiplexor picks the bus named by the controller's select code.
// Select codes at or above N_IN pick input 0. Combinational.
//
// Interface: d[N_IN] source buses, sel select code, y selected bus.
// Following the data paths, every bus is WIDTH bits wide; the out-of-range behaviour is
// this design's own choice.
module src_mux #(
  parameter int WIDTH = 20,
  parameter int N_IN  = 4,
  localparam int SELW = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic [WIDTH-1:0] d [N_IN],
  input  logic [SELW-1:0]  sel,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    y = d[0];
    for (int i = 1; i < N_IN; i++)
      if (sel == SELW'(i)) y = d[i];
  end
endmodule
