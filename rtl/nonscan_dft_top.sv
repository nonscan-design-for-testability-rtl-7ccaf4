// nonscan_dft_top: the nonscan testable filter data paths side by side.
//
// Three independent data paths share only the clock and the reset:
//   * cas_*  : the two-level testable fourth-order IIR cascade data path (iir_cascade_dp),
//              two constant test points;
//   * par_*  : the three-level testable fourth-order IIR parallel data path
//              (iir_parallel_dp), two constants and two dual points;
//   * ewf_*  : one adder of an elliptic-wave-filter data path with its register files
//              (ewf_a2_slice), one controllability point from the primary input and one
//              constant in its register files.
// None of them has scan registers: each enters test mode through its own ntest pin and is
// tested at the clock rate through its ordinary primary inputs and outputs. The
// controllers that would drive the control words, transfer-unit loads and
// register-file selects are not included, so those signals are ports of this top.
// Each data path is instantiated in its preferred test configuration (cascade DFT_LEVEL 2,
// parallel DFT_LEVEL 3). The parallel data path's second test pin belongs only to its
// zero-level version, so it is tied to 0 here. Placing the designs side by side, each
// with its own ports, is this design's own arrangement.
//
// Timing: every register loads at the rising edge of clk; rst_n clears all registers
// asynchronously. See each data path for its latencies.
module nonscan_dft_top
  import ndft_pkg::*;
#(
  parameter int WIDTH = 20,
  parameter int FRAC  = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // IIR cascade data path
  input  logic                    cas_ntest,
  input  cas_ctrl_t               cas_ctrl,
  input  logic signed [WIDTH-1:0] cas_in,
  input  logic signed [WIDTH-1:0] cas_k1,
  input  logic signed [WIDTH-1:0] cas_k2,
  input  logic signed [WIDTH-1:0] cas_k3,
  input  logic signed [WIDTH-1:0] cas_k4,
  output logic signed [WIDTH-1:0] cas_out,
  // IIR parallel data path
  input  logic                    par_ntest,
  input  logic [3:0]              par_tu_ld,
  input  logic signed [WIDTH-1:0] par_pi,
  input  logic signed [WIDTH-1:0] par_k1,
  input  logic signed [WIDTH-1:0] par_k2,
  input  logic signed [WIDTH-1:0] par_k3,
  input  logic signed [WIDTH-1:0] par_k4,
  input  logic signed [WIDTH-1:0] par_k5,
  input  logic signed [WIDTH-1:0] par_k6,
  output logic signed [WIDTH-1:0] par_po,
  // EWF adder slice
  input  logic                    ewf_ntest,
  input  logic [WIDTH-1:0]        ewf_pi,
  input  logic [WIDTH-1:0]        ewf_bus_a1,
  input  logic [WIDTH-1:0]        ewf_bus_a3,
  input  logic [WIDTH-1:0]        ewf_bus_m2,
  input  logic [1:0]              ewf_l1_src,
  input  logic                    ewf_r1_src,
  input  logic [1:0]              ewf_ld_l,
  input  logic [3:0]              ewf_ld_r,
  input  lsel_e                   ewf_lsel,
  input  rsel_e                   ewf_rsel,
  output logic [WIDTH-1:0]        ewf_z
);
  iir_cascade_dp #(.WIDTH(WIDTH), .FRAC(FRAC)) u_cas (
    .clk, .rst_n, .ntest(cas_ntest), .ctrl(cas_ctrl), .din(cas_in),
    .k1(cas_k1), .k2(cas_k2), .k3(cas_k3), .k4(cas_k4), .dout(cas_out));

  iir_parallel_dp #(.WIDTH(WIDTH), .FRAC(FRAC)) u_par (
    .clk, .rst_n, .ntest(par_ntest), .ntest_po(1'b0), .tu_ld(par_tu_ld), .pi(par_pi),
    .k1(par_k1), .k2(par_k2), .k3(par_k3), .k4(par_k4), .k5(par_k5), .k6(par_k6),
    .po(par_po));

  ewf_a2_slice #(.WIDTH(WIDTH)) u_ewf (
    .clk, .rst_n, .ntest(ewf_ntest), .pi(ewf_pi), .bus_a1(ewf_bus_a1),
    .bus_a3(ewf_bus_a3), .bus_m2(ewf_bus_m2), .l1_src(ewf_l1_src), .r1_src(ewf_r1_src),
    .ld_l(ewf_ld_l), .ld_r(ewf_ld_r), .lsel(ewf_lsel), .rsel(ewf_rsel), .z(ewf_z));
endmodule
