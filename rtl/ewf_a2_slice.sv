// ewf_a2_slice: one adder of an elliptic-wave-filter data path with its register files,
// made controllable by the register-file-based nonscan scheme.
//
// Adder A2 reads its left operand from register file RF1 (registers L1, L2) and its right
// operand from RF2 (R1..R4). Each register has its own set of sources: L1 <- A1, A2, A3 or
// M2; L2 <- A2; R1 <- A1 or A2; R2 <- A1; R3 <- A2; R4 <- A2, where A1, A3 and M2 are the
// output buses of other EXUs and A2 is this adder's own output Z. Instead of a
// controllability point on Z, one register of each file is made controllable:
//   * L2 is loaded from the primary input pi when ntest = 1;
//   * R4 is loaded with the constant 0, the identity of addition, when ntest = 1.
// Reading L2 and R4 then puts any value of pi on Z one cycle after it is loaded, so Z is
// controllable without adding a multiplexor on the output bus.
//
// Interface: clk, rst_n (asynchronous, active low), ntest, pi, bus_a1, bus_a3, bus_m2
// (other EXUs' outputs), l1_src (0: A1, 1: A2, 2: A3, 3: M2), r1_src (0: A1, 1: A2),
// ld_l[1:0] / ld_r[3:0] register loads (bit i loads L(i+1) / R(i+1)), lsel / rsel
// register-file read selects, z = A2 output (combinational from the selected registers).
//
// Follows the described design: register names, their sources, the adder and the places
// and values of the two test points. This design's own choices: separate load enables,
// read-select codes, the 20-bit default word (the word size of the filter data paths) and
// the reset.
module ewf_a2_slice
  import ndft_pkg::*;
#(
  parameter int WIDTH = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ntest,
  input  logic [WIDTH-1:0] pi,
  input  logic [WIDTH-1:0] bus_a1,
  input  logic [WIDTH-1:0] bus_a3,
  input  logic [WIDTH-1:0] bus_m2,
  input  logic [1:0]       l1_src,
  input  logic             r1_src,
  input  logic [1:0]       ld_l,
  input  logic [3:0]       ld_r,
  input  lsel_e            lsel,
  input  rsel_e            rsel,
  output logic [WIDTH-1:0] z
);
  logic [WIDTH-1:0] l1, l2, r1, r2, r3, r4;
  logic [WIDTH-1:0] l1_d, l2_d, r1_d, r4_d;
  logic [WIDTH-1:0] opl, opr;

  // RF1
  src_mux  #(.WIDTH(WIDTH), .N_IN(4)) u_l1_mux (.d('{bus_a1, z, bus_a3, bus_m2}), .sel(l1_src), .y(l1_d));
  dp_reg   #(.WIDTH(WIDTH)) u_l1 (.clk, .rst_n, .ld(ld_l[0]), .d(l1_d), .q(l1));
  test_mux #(.WIDTH(WIDTH)) u_l2_cp (.func(z), .tst(pi), .ntest, .y(l2_d));   // controllability point
  dp_reg   #(.WIDTH(WIDTH)) u_l2 (.clk, .rst_n, .ld(ld_l[1]), .d(l2_d), .q(l2));

  // RF2
  src_mux  #(.WIDTH(WIDTH), .N_IN(2)) u_r1_mux (.d('{bus_a1, z}), .sel(r1_src), .y(r1_d));
  dp_reg   #(.WIDTH(WIDTH)) u_r1 (.clk, .rst_n, .ld(ld_r[0]), .d(r1_d),   .q(r1));
  dp_reg   #(.WIDTH(WIDTH)) u_r2 (.clk, .rst_n, .ld(ld_r[1]), .d(bus_a1), .q(r2));
  dp_reg   #(.WIDTH(WIDTH)) u_r3 (.clk, .rst_n, .ld(ld_r[2]), .d(z),      .q(r3));
  const_point #(.WIDTH(WIDTH), .K('0)) u_r4_k (.d(z), .ntest, .y(r4_d));     // constant 0
  dp_reg   #(.WIDTH(WIDTH)) u_r4 (.clk, .rst_n, .ld(ld_r[3]), .d(r4_d),   .q(r4));

  // register-file read ports
  src_mux #(.WIDTH(WIDTH), .N_IN(2)) u_rd_l (.d('{l1, l2}), .sel(lsel), .y(opl));
  src_mux #(.WIDTH(WIDTH), .N_IN(4)) u_rd_r (.d('{r1, r2, r3, r4}), .sel(rsel), .y(opr));

  exu_add #(.WIDTH(WIDTH)) u_a2 (.a(opl), .b(opr), .z(z));
endmodule
