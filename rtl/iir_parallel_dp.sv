// iir_parallel_dp: testable data path of a fourth-order IIR parallel filter.
//
// The filter is built with no hardware sharing: twelve EXUs (multipliers 1*..6*, adders
// 1+..6+), each with its own two operand registers, and four transfer units (TU1..TU4)
// that carry values between filter iterations. Without sharing there are no operand
// multiplexors; the operand registers load every clock cycle and only the transfer units
// have a load enable (tu_ld, from the controller, which is not part of this module).
//   1* = PI*k1             1+ = 1* + 2+          TU1 <- 1+, TU2 <- TU1
//   2* = TU1*k2            3* = TU2*k3           5* = TU1*k5
//   2+ = 2* + 3*           4+ = 1+ + 5*          3+ = 1* + 4*
//   TU4 <- 3+, 4* = TU4*k4 5+ = 4+ + 3+          6+ = 5+ + 6*
//   TU3 <- 6+, 6* = TU3*k6 PO = 6+
// (each arrow of an EXU operand passes through that EXU's operand register).
//
// DFT_LEVEL selects the test hardware (3, 1 or 0). ntest = 0 is normal operation in all
// versions.
//
// DFT_LEVEL = 3 (default): two constants and two dual points, all steered by ntest.
//   * constant 0 into the feedback operand register of 1+ (the one fed by 2+), so that the
//     loops through 1+ become one-level controllable from PI;
//   * dual point 1: the output of 1+ replaces 4* as the feedback operand of 3+. The loops
//     through 3+ gain controllability and the loops through 1+ gain observability;
//   * constant 0 into the operand register of 6+ fed by 5+;
//   * dual point 2: the output of 3+ replaces 6* as the other operand of 6+, so the loops
//     through 3+ become observable at PO and those through 6+ controllable.
//   This makes the data path three-level testable: every loop has a node whose output can
//   be set from PI, or seen at PO, within four clock cycles. ntest_po is not used.
//
// DFT_LEVEL = 0: every loop is broken directly, with three controllability and two
// observability points and a second test pin.
//   * ntest = 1 puts PI on the output buses of 1+, 3+ and 6+ (PO shows the 6+ bus);
//   * the two probe points, the raw sums of 1+ and 3+, share one multiplexor: ntest = 0
//     selects 1+, ntest = 1 selects 3+;
//   * ntest_po = 1 shows that probe on po instead of the normal output.
//   A probe is seen on po in the same cycle; a bus is set from pi in the same cycle.
//
// DFT_LEVEL = 1: as level 0, but the controllability points on 1+ and 3+ are replaced by
// constants 0 into their feedback operand registers (from 2+ and from 4*). Both sums then
// follow 1*, so they are set from pi two edges after it is applied (one-level).
//
// Interface: clk, rst_n (asynchronous, active low), ntest, ntest_po, tu_ld[3:0] (bit i
// loads TU(i+1)), pi, k1..k6 coefficients (fixed point, FRAC fractional bits), po =
// output of 6+ (combinational from its operand registers and, at levels 0 and 1, from pi).
//
// Follows the described design: the EXUs and their connections, registered coefficient
// inputs, the transfer units, the places of the constants, dual points, controllability
// and observability points, the two test pins of the zero- and one-level versions, the
// 20-bit word.
// This design's own choices: which operand register of 1+ takes the constant (the one on
// the loop, so that the testability argument holds), which probe each value of ntest
// selects, the free-running operand registers, the fixed-point format and the reset.
module iir_parallel_dp #(
  parameter int WIDTH = 20,
  parameter int FRAC  = 10,
  parameter int DFT_LEVEL = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ntest,
  input  logic                    ntest_po,
  input  logic [3:0]              tu_ld,
  input  logic signed [WIDTH-1:0] pi,
  input  logic signed [WIDTH-1:0] k1,
  input  logic signed [WIDTH-1:0] k2,
  input  logic signed [WIDTH-1:0] k3,
  input  logic signed [WIDTH-1:0] k4,
  input  logic signed [WIDTH-1:0] k5,
  input  logic signed [WIDTH-1:0] k6,
  output logic signed [WIDTH-1:0] po
);
  // EXU output buses: mN = N*, aN = N+
  logic [WIDTH-1:0] m1, m2, m3, m4, m5, m6;
  logic [WIDTH-1:0] a1, a2, a3, a4, a5, a6;
  logic [WIDTH-1:0] tu1, tu2, tu3, tu4;
  // operand registers: <exu>_x (left) and <exu>_y (right)
  logic [WIDTH-1:0] m1_x, m1_y, m2_x, m2_y, m3_x, m3_y, m4_x, m4_y, m5_x, m5_y, m6_x, m6_y;
  logic [WIDTH-1:0] a1_x, a1_y, a2_x, a2_y, a3_x, a3_y, a4_x, a4_y, a5_x, a5_y, a6_x, a6_y;
  // raw adder sums of 1+, 3+, 6+ ahead of any controllability point
  logic [WIDTH-1:0] a1_raw, a3_raw, a6_raw;
  // operand-register inputs that may pass through a test point
  logic [WIDTH-1:0] a1_y_d, a3_y_d, a6_x_d, a6_y_d;

  // ---------------- multipliers ----------------
  dp_reg #(.WIDTH(WIDTH)) r_m1_x (.clk, .rst_n, .ld(1'b1), .d(pi),  .q(m1_x));
  dp_reg #(.WIDTH(WIDTH)) r_m1_y (.clk, .rst_n, .ld(1'b1), .d(k1),  .q(m1_y));
  dp_reg #(.WIDTH(WIDTH)) r_m2_x (.clk, .rst_n, .ld(1'b1), .d(tu1), .q(m2_x));
  dp_reg #(.WIDTH(WIDTH)) r_m2_y (.clk, .rst_n, .ld(1'b1), .d(k2),  .q(m2_y));
  dp_reg #(.WIDTH(WIDTH)) r_m3_x (.clk, .rst_n, .ld(1'b1), .d(tu2), .q(m3_x));
  dp_reg #(.WIDTH(WIDTH)) r_m3_y (.clk, .rst_n, .ld(1'b1), .d(k3),  .q(m3_y));
  dp_reg #(.WIDTH(WIDTH)) r_m4_x (.clk, .rst_n, .ld(1'b1), .d(tu4), .q(m4_x));
  dp_reg #(.WIDTH(WIDTH)) r_m4_y (.clk, .rst_n, .ld(1'b1), .d(k4),  .q(m4_y));
  dp_reg #(.WIDTH(WIDTH)) r_m5_x (.clk, .rst_n, .ld(1'b1), .d(tu1), .q(m5_x));
  dp_reg #(.WIDTH(WIDTH)) r_m5_y (.clk, .rst_n, .ld(1'b1), .d(k5),  .q(m5_y));
  dp_reg #(.WIDTH(WIDTH)) r_m6_x (.clk, .rst_n, .ld(1'b1), .d(tu3), .q(m6_x));
  dp_reg #(.WIDTH(WIDTH)) r_m6_y (.clk, .rst_n, .ld(1'b1), .d(k6),  .q(m6_y));

  exu_mul #(.WIDTH(WIDTH), .FRAC(FRAC)) u_m1 (.a(m1_x), .c(m1_y), .z(m1));
  exu_mul #(.WIDTH(WIDTH), .FRAC(FRAC)) u_m2 (.a(m2_x), .c(m2_y), .z(m2));
  exu_mul #(.WIDTH(WIDTH), .FRAC(FRAC)) u_m3 (.a(m3_x), .c(m3_y), .z(m3));
  exu_mul #(.WIDTH(WIDTH), .FRAC(FRAC)) u_m4 (.a(m4_x), .c(m4_y), .z(m4));
  exu_mul #(.WIDTH(WIDTH), .FRAC(FRAC)) u_m5 (.a(m5_x), .c(m5_y), .z(m5));
  exu_mul #(.WIDTH(WIDTH), .FRAC(FRAC)) u_m6 (.a(m6_x), .c(m6_y), .z(m6));

  // ---------------- test points ----------------
  if (DFT_LEVEL != 0 && DFT_LEVEL != 1 && DFT_LEVEL != 3) begin : g_bad_level
    $error("iir_parallel_dp: DFT_LEVEL must be 0, 1 or 3");
  end
  if (DFT_LEVEL <= 1) begin : g_direct
    logic [WIDTH-1:0] probe;
    test_mux #(.WIDTH(WIDTH)) u_cp6 (.func(a6_raw), .tst(pi), .ntest, .y(a6));       // cp at 6+
    test_mux #(.WIDTH(WIDTH)) u_opsel (.func(a1_raw), .tst(a3_raw), .ntest, .y(probe)); // probes
    test_mux #(.WIDTH(WIDTH)) u_op (.func(a6), .tst(probe), .ntest(ntest_po), .y(po));
    assign a6_x_d = a5;
    assign a6_y_d = m6;
    if (DFT_LEVEL == 0) begin : g_cp13
      test_mux #(.WIDTH(WIDTH)) u_cp1 (.func(a1_raw), .tst(pi), .ntest, .y(a1));     // cp at 1+
      test_mux #(.WIDTH(WIDTH)) u_cp3 (.func(a3_raw), .tst(pi), .ntest, .y(a3));     // cp at 3+
      assign a1_y_d = a2;
      assign a3_y_d = m4;
    end else begin : g_k13
      const_point #(.WIDTH(WIDTH), .K('0)) u_c1 (.d(a2), .ntest, .y(a1_y_d));        // constant into 1+
      const_point #(.WIDTH(WIDTH), .K('0)) u_c3 (.d(m4), .ntest, .y(a3_y_d));        // constant into 3+
      assign a1 = a1_raw;
      assign a3 = a3_raw;
    end
  end else begin : g_lev3
    logic unused_ntest_po;
    assign unused_ntest_po = ntest_po;
    const_point #(.WIDTH(WIDTH), .K('0)) u_c1 (.d(a2), .ntest, .y(a1_y_d));                  // constant into 1+
    test_mux    #(.WIDTH(WIDTH))         u_dp1 (.func(m4), .tst(a1_raw), .ntest, .y(a3_y_d)); // dual point 1+ -> 3+
    const_point #(.WIDTH(WIDTH), .K('0)) u_c6 (.d(a5), .ntest, .y(a6_x_d));                  // constant into 6+
    test_mux    #(.WIDTH(WIDTH))         u_dp2 (.func(m6), .tst(a3_raw), .ntest, .y(a6_y_d)); // dual point 3+ -> 6+
    assign a1 = a1_raw;
    assign a3 = a3_raw;
    assign a6 = a6_raw;
    assign po = a6;
  end

  // ---------------- adders ----------------
  dp_reg #(.WIDTH(WIDTH)) r_a1_x (.clk, .rst_n, .ld(1'b1), .d(m1),     .q(a1_x));
  dp_reg #(.WIDTH(WIDTH)) r_a1_y (.clk, .rst_n, .ld(1'b1), .d(a1_y_d), .q(a1_y));
  dp_reg #(.WIDTH(WIDTH)) r_a2_x (.clk, .rst_n, .ld(1'b1), .d(m2),     .q(a2_x));
  dp_reg #(.WIDTH(WIDTH)) r_a2_y (.clk, .rst_n, .ld(1'b1), .d(m3),     .q(a2_y));
  dp_reg #(.WIDTH(WIDTH)) r_a3_x (.clk, .rst_n, .ld(1'b1), .d(m1),     .q(a3_x));
  dp_reg #(.WIDTH(WIDTH)) r_a3_y (.clk, .rst_n, .ld(1'b1), .d(a3_y_d), .q(a3_y));
  dp_reg #(.WIDTH(WIDTH)) r_a4_x (.clk, .rst_n, .ld(1'b1), .d(a1),     .q(a4_x));
  dp_reg #(.WIDTH(WIDTH)) r_a4_y (.clk, .rst_n, .ld(1'b1), .d(m5),     .q(a4_y));
  dp_reg #(.WIDTH(WIDTH)) r_a5_x (.clk, .rst_n, .ld(1'b1), .d(a4),     .q(a5_x));
  dp_reg #(.WIDTH(WIDTH)) r_a5_y (.clk, .rst_n, .ld(1'b1), .d(a3),     .q(a5_y));
  dp_reg #(.WIDTH(WIDTH)) r_a6_x (.clk, .rst_n, .ld(1'b1), .d(a6_x_d), .q(a6_x));
  dp_reg #(.WIDTH(WIDTH)) r_a6_y (.clk, .rst_n, .ld(1'b1), .d(a6_y_d), .q(a6_y));

  exu_add #(.WIDTH(WIDTH)) u_a1 (.a(a1_x), .b(a1_y), .z(a1_raw));
  exu_add #(.WIDTH(WIDTH)) u_a2 (.a(a2_x), .b(a2_y), .z(a2));
  exu_add #(.WIDTH(WIDTH)) u_a3 (.a(a3_x), .b(a3_y), .z(a3_raw));
  exu_add #(.WIDTH(WIDTH)) u_a4 (.a(a4_x), .b(a4_y), .z(a4));
  exu_add #(.WIDTH(WIDTH)) u_a5 (.a(a5_x), .b(a5_y), .z(a5));
  exu_add #(.WIDTH(WIDTH)) u_a6 (.a(a6_x), .b(a6_y), .z(a6_raw));

  // ---------------- transfer units ----------------
  dp_reg #(.WIDTH(WIDTH)) u_tu1 (.clk, .rst_n, .ld(tu_ld[0]), .d(a1),  .q(tu1));
  dp_reg #(.WIDTH(WIDTH)) u_tu2 (.clk, .rst_n, .ld(tu_ld[1]), .d(tu1), .q(tu2));
  dp_reg #(.WIDTH(WIDTH)) u_tu3 (.clk, .rst_n, .ld(tu_ld[2]), .d(a6),  .q(tu3));
  dp_reg #(.WIDTH(WIDTH)) u_tu4 (.clk, .rst_n, .ld(tu_ld[3]), .d(a3),  .q(tu4));

endmodule
