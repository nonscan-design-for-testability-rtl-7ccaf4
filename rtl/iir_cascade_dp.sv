// iir_cascade_dp: nonscan testable data path of a fourth-order IIR cascade filter
// (two-level testable by default).
//
// The data path has three multipliers (M1, M2, M3), two adders (A1, A2), twelve registers
// (operand registers LM1, LM2, LM3, LA1, RA1, LA2, RA2, the output register Out and the
// four transfer units TU1..TU4) and twelve multiplexors (eight operand multiplexors and
// the four hold multiplexors of the transfer units). The controller is not included: its
// register loads and multiplexor selects arrive as the control word `ctrl`.
//
// Nonscan design for testability: the adders A1 and A2 break every loop of the data path.
// DFT_LEVEL selects how far the loops are made controllable/observable (a node is k-level
// controllable/observable when any value can be justified at it / propagated from it to
// a primary output in at most k+1 clock cycles):
//   * 2 (default): two constant test points force the right operand registers RA1 and
//     RA2 to 0, the identity of addition, while ntest = 1. With RA1 = RA2 = 0 any value v
//     is justified at A1 in three cycles from the input (In -> LM3 -> M3 -> LA2 -> A2 ->
//     LA1 -> A1, coefficient K4 set to one) and any value at A1 reaches the output
//     register in three cycles (A1 -> LA2 -> A2 -> Out): every loop is at most two-level
//     controllable and observable, at the cost of two gated register inputs;
//   * 1: constant 0 on RA2, a controllability point that puts In on the A1 bus, and an
//     observability point that shows A1 on the primary output (one-level testable);
//   * 0: controllability points from In on both the A1 and the A2 bus and the A1
//     observability point (zero-level testable: every loop directly broken).
// All test hardware is steered by ntest; with ntest = 0 it is transparent and the data
// path is unchanged. In test mode ntest may change from cycle to cycle, e.g. to read the
// Out register through the observability-point multiplexor. No register is scanned, so
// the data path is tested at speed from its one input and one output.
//
// Interface: clk, rst_n (asynchronous, active low), ntest, ctrl (ndft_pkg::cas_ctrl_t),
// din (filter input "In"), k1..k4 coefficients (fixed point, FRAC fractional bits),
// dout (register Out; at DFT_LEVEL <= 1 and ntest = 1, the A1 adder output instead).
// Every register loads at the rising edge when its load bit is set; EXUs are
// combinational, so a value moves one register stage per cycle.
//
// Follows the described design: the unit and register names, the coefficient inputs of
// each multiplier (M1: K1/K3, M2: K2/K4, M3: K4), the two transfer-unit chains, A2 feeding
// Out, the test points of the three DFT levels, and the 20-bit word. This design's own
// choices: the exact source list of each adder operand multiplexor beyond the links the
// design's testability argument relies on (M3 -> LA2, A1 -> LA2, A2 -> LA1), which adder
// feeds which transfer-unit chain (A2 -> TU1 -> TU2, A1 -> TU3 -> TU4), the load enables on
// every register, the primary input In as the source of both controllability points
// (the data path has no other), the fixed-point format and the reset.
module iir_cascade_dp
  import ndft_pkg::*;
#(
  parameter int WIDTH     = 20,
  parameter int FRAC      = 10,
  parameter int DFT_LEVEL = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ntest,
  input  cas_ctrl_t               ctrl,
  input  logic signed [WIDTH-1:0] din,
  input  logic signed [WIDTH-1:0] k1,
  input  logic signed [WIDTH-1:0] k2,
  input  logic signed [WIDTH-1:0] k3,
  input  logic signed [WIDTH-1:0] k4,
  output logic signed [WIDTH-1:0] dout
);
  // EXU output buses; a1/a2 are the buses the registers see (after any controllability
  // point), a1_raw/a2_raw the adder outputs themselves
  logic [WIDTH-1:0] m1, m2, m3, a1, a2, a1_raw, a2_raw;
  // registers
  logic [WIDTH-1:0] lm1, lm2, lm3, la1, ra1, la2, ra2, out_q;
  logic [WIDTH-1:0] tu1, tu2, tu3, tu4;
  // register inputs
  logic [WIDTH-1:0] lm1_d, lm2_d, la1_d, ra1_d, la2_d, ra2_d;
  logic [WIDTH-1:0] ra1_t, ra2_t;        // after the constant test points
  logic [WIDTH-1:0] c1, c2;              // selected coefficients of M1, M2

  if (DFT_LEVEL < 0 || DFT_LEVEL > 2) begin : g_bad_level
    $error("iir_cascade_dp: DFT_LEVEL must be 0, 1 or 2");
  end

  // ---------------- multipliers ----------------
  dp_reg #(.WIDTH(WIDTH)) u_lm3 (.clk, .rst_n, .ld(ctrl.ld_lm3), .d(din), .q(lm3));
  exu_mul #(.WIDTH(WIDTH), .FRAC(FRAC)) u_m3 (.a(lm3), .c(k4), .z(m3));

  src_mux #(.WIDTH(WIDTH), .N_IN(2)) u_lm2_mux (.d('{tu2, tu4}), .sel(ctrl.sel_lm2), .y(lm2_d));
  dp_reg  #(.WIDTH(WIDTH)) u_lm2 (.clk, .rst_n, .ld(ctrl.ld_lm2), .d(lm2_d), .q(lm2));
  src_mux #(.WIDTH(WIDTH), .N_IN(2)) u_k2_mux (.d('{k2, k4}), .sel(ctrl.sel_k2), .y(c2));
  exu_mul #(.WIDTH(WIDTH), .FRAC(FRAC)) u_m2 (.a(lm2), .c(c2), .z(m2));

  src_mux #(.WIDTH(WIDTH), .N_IN(2)) u_lm1_mux (.d('{tu1, tu3}), .sel(ctrl.sel_lm1), .y(lm1_d));
  dp_reg  #(.WIDTH(WIDTH)) u_lm1 (.clk, .rst_n, .ld(ctrl.ld_lm1), .d(lm1_d), .q(lm1));
  src_mux #(.WIDTH(WIDTH), .N_IN(2)) u_k1_mux (.d('{k1, k3}), .sel(ctrl.sel_k1), .y(c1));
  exu_mul #(.WIDTH(WIDTH), .FRAC(FRAC)) u_m1 (.a(lm1), .c(c1), .z(m1));

  // ---------------- adder A2 ----------------
  src_mux #(.WIDTH(WIDTH), .N_IN(4)) u_la2_mux (.d('{m3, m1, a1, a2}), .sel(ctrl.sel_la2), .y(la2_d));
  dp_reg  #(.WIDTH(WIDTH)) u_la2 (.clk, .rst_n, .ld(ctrl.ld_la2), .d(la2_d), .q(la2));
  src_mux #(.WIDTH(WIDTH), .N_IN(4)) u_ra2_mux (.d('{m2, m1, a1, a2}), .sel(ctrl.sel_ra2), .y(ra2_d));
  if (DFT_LEVEL >= 1) begin : g_ra2_k
    const_point #(.WIDTH(WIDTH), .K('0)) u_ra2_k (.d(ra2_d), .ntest, .y(ra2_t));
  end else begin : g_ra2_plain
    assign ra2_t = ra2_d;
  end
  dp_reg  #(.WIDTH(WIDTH)) u_ra2 (.clk, .rst_n, .ld(ctrl.ld_ra2), .d(ra2_t), .q(ra2));
  exu_add #(.WIDTH(WIDTH)) u_a2 (.a(la2), .b(ra2), .z(a2_raw));
  if (DFT_LEVEL == 0) begin : g_a2_cp       // controllability point on the A2 bus
    test_mux #(.WIDTH(WIDTH)) u_a2_cp (.func(a2_raw), .tst(din), .ntest, .y(a2));
  end else begin : g_a2_bus
    assign a2 = a2_raw;
  end

  // ---------------- adder A1 ----------------
  src_mux #(.WIDTH(WIDTH), .N_IN(4)) u_la1_mux (.d('{m2, m1, a2, a1}), .sel(ctrl.sel_la1), .y(la1_d));
  dp_reg  #(.WIDTH(WIDTH)) u_la1 (.clk, .rst_n, .ld(ctrl.ld_la1), .d(la1_d), .q(la1));
  src_mux #(.WIDTH(WIDTH), .N_IN(4)) u_ra1_mux (.d('{m2, m1, a1, a2}), .sel(ctrl.sel_ra1), .y(ra1_d));
  if (DFT_LEVEL >= 2) begin : g_ra1_k
    const_point #(.WIDTH(WIDTH), .K('0)) u_ra1_k (.d(ra1_d), .ntest, .y(ra1_t));
  end else begin : g_ra1_plain
    assign ra1_t = ra1_d;
  end
  dp_reg  #(.WIDTH(WIDTH)) u_ra1 (.clk, .rst_n, .ld(ctrl.ld_ra1), .d(ra1_t), .q(ra1));
  exu_add #(.WIDTH(WIDTH)) u_a1 (.a(la1), .b(ra1), .z(a1_raw));
  if (DFT_LEVEL <= 1) begin : g_a1_cp       // controllability point on the A1 bus
    test_mux #(.WIDTH(WIDTH)) u_a1_cp (.func(a1_raw), .tst(din), .ntest, .y(a1));
  end else begin : g_a1_bus
    assign a1 = a1_raw;
  end

  // ---------------- transfer units and output ----------------
  dp_reg #(.WIDTH(WIDTH)) u_tu1 (.clk, .rst_n, .ld(ctrl.ld_tu[0]), .d(a2),  .q(tu1));
  dp_reg #(.WIDTH(WIDTH)) u_tu2 (.clk, .rst_n, .ld(ctrl.ld_tu[1]), .d(tu1), .q(tu2));
  dp_reg #(.WIDTH(WIDTH)) u_tu3 (.clk, .rst_n, .ld(ctrl.ld_tu[2]), .d(a1),  .q(tu3));
  dp_reg #(.WIDTH(WIDTH)) u_tu4 (.clk, .rst_n, .ld(ctrl.ld_tu[3]), .d(tu3), .q(tu4));
  dp_reg #(.WIDTH(WIDTH)) u_out (.clk, .rst_n, .ld(ctrl.ld_out),   .d(a2),  .q(out_q));

  if (DFT_LEVEL <= 1) begin : g_a1_op      // observability point: A1 on the primary output
    test_mux #(.WIDTH(WIDTH)) u_a1_op (.func(out_q), .tst(a1_raw), .ntest, .y(dout));
  end else begin : g_po
    assign dout = out_q;
  end
endmodule
