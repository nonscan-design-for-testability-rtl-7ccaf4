// tb_iir_cascade_dp: self-checking test of the two-level testable IIR cascade data path.
//
// Part 1 (directed, test mode): the two-level controllability and observability
// sequences of adder A1. With ntest = 1 and K4 = one, a value v applied at the input is
// justified at A1 after three clock edges (In -> LM3 -> LA2/RA2=0 -> LA1/RA1=0), and A1 is
// then propagated to the output in three more edges (LA2/RA2=0 -> Out -> dout). The
// checks are on the value and on the exact cycle it appears.
// Part 2 (directed, normal mode): with ntest = 0 the constant points are transparent, so
// RA2 keeps a functional value and A2 = LA2 + RA2 reaches the output.
// Part 3 (random): random control words, inputs, coefficients and ntest; a register-level
// reference model written here predicts the output register every cycle.
module tb_iir_cascade_dp;
  import ndft_pkg::*;
  localparam int W  = 20;
  localparam int FR = 10;
  localparam logic signed [W-1:0] ONE = W'(1 << FR);

  logic clk = 0, rst_n = 0, ntest = 0;
  cas_ctrl_t ctrl;
  logic signed [W-1:0] din, k1, k2, k3, k4, dout;
  int checks = 0, failures = 0, cycles = 0;

  iir_cascade_dp #(.WIDTH(W), .FRAC(FR)) dut (.clk, .rst_n, .ntest, .ctrl, .din,
                                              .k1, .k2, .k3, .k4, .dout);
  logic ntest_l = 0;
  logic signed [W-1:0] dout_l1, dout_l0;
  iir_cascade_dp #(.WIDTH(W), .FRAC(FR), .DFT_LEVEL(1)) dut_l1 (.clk, .rst_n, .ntest(ntest_l),
    .ctrl, .din, .k1, .k2, .k3, .k4, .dout(dout_l1));
  iir_cascade_dp #(.WIDTH(W), .FRAC(FR), .DFT_LEVEL(0)) dut_l0 (.clk, .rst_n, .ntest(ntest_l),
    .ctrl, .din, .k1, .k2, .k3, .k4, .dout(dout_l0));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // ---------------- reference model ----------------
  logic signed [W-1:0] r_lm1, r_lm2, r_lm3, r_la1, r_ra1, r_la2, r_ra2, r_out;
  logic signed [W-1:0] r_tu [4];

  function automatic logic signed [W-1:0] fmul(logic signed [W-1:0] x, logic signed [W-1:0] c);
    longint p;
    p = longint'(x) * longint'(c);
    return W'(p >>> FR);
  endfunction

  task automatic model_step();
    logic signed [W-1:0] m1, m2, m3, a1, a2, la2_d, ra2_d, la1_d, ra1_d;
    m3 = fmul(r_lm3, k4);
    m2 = fmul(r_lm2, ctrl.sel_k2 ? k4 : k2);
    m1 = fmul(r_lm1, ctrl.sel_k1 ? k3 : k1);
    a1 = r_la1 + r_ra1;
    a2 = r_la2 + r_ra2;
    case (ctrl.sel_la2) LA2_M3: la2_d = m3; LA2_M1: la2_d = m1; LA2_A1: la2_d = a1; default: la2_d = a2; endcase
    case (ctrl.sel_ra2) RA2_M2: ra2_d = m2; RA2_M1: ra2_d = m1; RA2_A1: ra2_d = a1; default: ra2_d = a2; endcase
    case (ctrl.sel_la1) LA1_M2: la1_d = m2; LA1_M1: la1_d = m1; LA1_A2: la1_d = a2; default: la1_d = a1; endcase
    case (ctrl.sel_ra1) RA1_M2: ra1_d = m2; RA1_M1: ra1_d = m1; RA1_A1: ra1_d = a1; default: ra1_d = a2; endcase
    if (ntest) begin ra1_d = '0; ra2_d = '0; end
    // the operand registers of M1/M2 read the transfer units before they update
    if (ctrl.ld_lm1) r_lm1 = ctrl.sel_lm1 ? r_tu[2] : r_tu[0];
    if (ctrl.ld_lm2) r_lm2 = ctrl.sel_lm2 ? r_tu[3] : r_tu[1];
    if (ctrl.ld_tu[1]) r_tu[1] = r_tu[0];
    if (ctrl.ld_tu[3]) r_tu[3] = r_tu[2];
    if (ctrl.ld_tu[0]) r_tu[0] = a2;
    if (ctrl.ld_tu[2]) r_tu[2] = a1;
    if (ctrl.ld_lm3) r_lm3 = din;
    if (ctrl.ld_la1) r_la1 = la1_d;
    if (ctrl.ld_ra1) r_ra1 = ra1_d;
    if (ctrl.ld_la2) r_la2 = la2_d;
    if (ctrl.ld_ra2) r_ra2 = ra2_d;
    if (ctrl.ld_out) r_out = a2;
  endtask

  task automatic model_reset();
    {r_lm1, r_lm2, r_lm3, r_la1, r_ra1, r_la2, r_ra2, r_out} = '0;
    foreach (r_tu[i]) r_tu[i] = '0;
  endtask

  // one clock: apply ctrl at the negative edge, let the model follow the rising edge
  task automatic step();
    @(posedge clk);
    model_step();
    @(negedge clk);
  endtask

  task automatic idle();
    ctrl = '0;
  endtask

  task automatic expect_out(input logic signed [W-1:0] v, input string what);
    checks++;
    if (dout !== v) begin
      failures++;
      $display("FAIL %s: dout=%0d expected %0d (cycle %0d)", what, dout, v, cycles);
    end
  endtask

  int t0, tj, tp;
  logic signed [W-1:0] v;

  initial begin
    idle(); din = '0; k1 = ONE; k2 = ONE; k3 = ONE; k4 = ONE;
    model_reset();
    #12 rst_n = 1;
    @(negedge clk);

    // ---------- part 1: two-level controllability / observability of A1 ----------
    for (int rep = 0; rep < 8; rep++) begin
      v = (rep == 0) ? W'(15) : W'($urandom);
      ntest = 1;
      // preload the right registers with their constant and scramble the left ones
      idle(); ctrl.ld_ra1 = 1; ctrl.ld_ra2 = 1; step();
      t0 = cycles;
      idle(); din = v; ctrl.ld_lm3 = 1; step();                                 // frame 3: In -> LM3
      idle(); din = W'($urandom); ctrl.ld_la2 = 1; ctrl.sel_la2 = LA2_M3; step(); // frame 2: M3 -> LA2
      idle(); ctrl.ld_la1 = 1; ctrl.sel_la1 = LA1_A2; step();                    // frame 1: A2 -> LA1
      tj = cycles - t0;                                                          // A1 now holds v
      // propagate A1 to the primary output
      idle(); ctrl.ld_la2 = 1; ctrl.sel_la2 = LA2_A1; step();                    // A1 -> LA2
      idle(); ctrl.ld_out = 1; step();                                           // A2 -> Out
      tp = cycles - t0 - tj;
      expect_out(v, "A1 justified from In and propagated to Out");
      checks++;
      if (tj != 3 || tp != 2) begin
        failures++;
        $display("FAIL latency: justify %0d cycles (expected 3), propagate %0d (expected 2 + output)", tj, tp);
      end
      if (dout !== r_out) begin failures++; $display("FAIL model mismatch in part 1"); end
    end
    ntest = 0;

    // ---------- part 2: normal mode keeps the functional operand ----------
    ntest = 1; idle(); ctrl.ld_ra2 = 1; step();                                  // RA2 = 0
    ntest = 0;
    idle(); din = W'(100); ctrl.ld_lm3 = 1; step();                               // LM3 = 100
    idle(); ctrl.ld_la2 = 1; ctrl.sel_la2 = LA2_M3; step();                       // LA2 = 100
    idle(); ctrl.ld_ra2 = 1; ctrl.sel_ra2 = RA2_A2; step();                       // RA2 = A2 = 100
    idle(); ctrl.ld_out = 1; step();                                              // Out = 200
    expect_out(W'(200), "normal mode: RA2 takes A2, not the constant");

    // ---------- part 3: random operation against the model ----------
    for (int t = 0; t < 3000; t++) begin
      ctrl  = cas_ctrl_t'({$urandom, $urandom});
      ntest = ($urandom % 4) == 0;
      din   = W'($urandom);
      if (t % 50 == 0) begin k1 = W'($urandom); k2 = W'($urandom); k3 = W'($urandom); k4 = W'($urandom); end
      step();
      expect_out(r_out, "random operation");
    end

    // ---------- part 4: normal mode, all DFT levels equal the model ----------
    ntest = 0; ntest_l = 0; idle();
    @(negedge clk) rst_n = 0;
    model_reset();
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      ctrl = cas_ctrl_t'({$urandom, $urandom});
      din  = W'($urandom);
      step();
      expect_out(r_out, "normal mode, level 2");
      checks += 2;
      if (dout_l1 !== r_out) begin failures++; $display("FAIL normal mode, level 1"); end
      if (dout_l0 !== r_out) begin failures++; $display("FAIL normal mode, level 0"); end
    end

    // ---------- part 5: zero-level controllability and observability points ----------
    k4 = ONE;
    for (int rep = 0; rep < 10; rep++) begin
      v = W'($urandom);
      ntest_l = 1; din = v;
      idle(); ctrl.ld_la2 = 1; ctrl.sel_la2 = LA2_A1; ctrl.ld_ra2 = 1; ctrl.sel_ra2 = RA2_A1;
      ctrl.ld_out = 1; step();               // level 1: LA2 = In (via A1 bus), RA2 = 0; level 0: Out = In
      idle(); ctrl.ld_out = 1; step();       // level 1: Out = A2 = In; level 0: Out = In again
      ntest_l = 0; #1;
      checks += 2;
      if (dout_l1 !== v) begin failures++; $display("FAIL level 1: In via A1 bus at Out: %0d vs %0d", dout_l1, v); end
      if (dout_l0 !== v) begin failures++; $display("FAIL level 0: In via A2 bus at Out: %0d vs %0d", dout_l0, v); end
      // observability point: A1 = LA1 + RA1 = 2 * In seen directly on the output
      ntest_l = 1; din = W'($urandom);
      idle(); ctrl.ld_la1 = 1; ctrl.sel_la1 = LA1_A1; ctrl.ld_ra1 = 1; ctrl.sel_ra1 = RA1_A1; step();
      idle(); #1;
      checks += 2;
      if (dout_l1 !== W'(2 * din)) begin failures++; $display("FAIL level 1: A1 at the observability point"); end
      if (dout_l0 !== W'(2 * din)) begin failures++; $display("FAIL level 0: A1 at the observability point"); end
      ntest_l = 0;
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
