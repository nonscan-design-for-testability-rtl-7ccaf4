// tb_iir_parallel_dp: self-checking test of the IIR parallel data path in its three-level
// testable version (dut, the default), its one-level version (dut1, DFT_LEVEL = 1) and its
// zero-level version (dut0, DFT_LEVEL = 0).
//
// Part 1 (directed, test mode, k1 = one): with ntest = 1 the constants cut the loops of
// 1+ and 6+ and the dual points route 1+ -> 3+ -> 6+, so any target value T is justified
// at 6+ of dut from two consecutive input values x and T - x: pi = x in cycle n-1 and
// T - x in cycle n give po = T after the third rising edge following cycle n (four time
// frames in all, i.e. 6+ is three-level controllable). The two input values reach 3+
// through paths of different register counts (1* -> 3+ directly and through 1+), which
// is the unequal-weight reconvergence that lets them differ. Value and cycle count are
// checked.
// Part 2 (random): random inputs, coefficients, transfer-unit loads, ntest and ntest_po;
// a register-level reference model written here predicts po of all instances every
// cycle.
// Part 3 (directed, dut0): the controllability point shows pi on the 6+ bus in the same
// cycle, and a value sent in at pi is read back two edges later through the probes of
// 1+ (ntest = 0) and 3+ (ntest = 1) with ntest_po = 1.
// Part 4 (directed, dut): sums left on 1+ and 3+ by normal operation are read at po one
// and two edges after switching to test mode (observability through the dual points).
// The expected values are the two sums as the reference model has them.
// Part 5 (directed, dut1, DFT_LEVEL = 1): the constants of 1+ and 3+ let a value at pi
// set both sums two edges later, read through the probes; pi shows on the 6+ bus at once.
module tb_iir_parallel_dp;
  localparam int W  = 20;
  localparam int FR = 10;
  localparam logic signed [W-1:0] ONE = W'(1 << FR);

  logic clk = 0, rst_n = 0, ntest = 0, ntest_po = 0;
  logic [3:0] tu_ld = '0;
  logic signed [W-1:0] pi = '0, k1, k2, k3, k4, k5, k6, po, po0, po1;
  int checks = 0, failures = 0, cycles = 0;

  iir_parallel_dp #(.WIDTH(W), .FRAC(FR)) dut (.clk, .rst_n, .ntest, .ntest_po, .tu_ld, .pi,
                                               .k1, .k2, .k3, .k4, .k5, .k6, .po);
  // zero-level version: three controllability points, two observability points
  iir_parallel_dp #(.WIDTH(W), .FRAC(FR), .DFT_LEVEL(0)) dut0 (
    .clk, .rst_n, .ntest, .ntest_po, .tu_ld, .pi, .k1, .k2, .k3, .k4, .k5, .k6, .po(po0));
  // one-level version: two constants, one controllability point, two observability points
  iir_parallel_dp #(.WIDTH(W), .FRAC(FR), .DFT_LEVEL(1)) dut1 (
    .clk, .rst_n, .ntest, .ntest_po, .tu_ld, .pi, .k1, .k2, .k3, .k4, .k5, .k6, .po(po1));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // ---------------- reference model ----------------
  // x[e]/y[e]: operand registers of EXU e; e = 0..5 multipliers 1*..6*, 6..11 adders 1+..6+
  typedef struct {
    logic signed [W-1:0] x [12];
    logic signed [W-1:0] y [12];
    logic signed [W-1:0] tu [4];
  } state_t;
  state_t s3, s1, s0;   // models of the level-3, level-1 and level-0 instances

  function automatic logic signed [W-1:0] fmul(logic signed [W-1:0] a, logic signed [W-1:0] c);
    longint p;
    p = longint'(a) * longint'(c);
    return W'(p >>> FR);
  endfunction

  function automatic logic signed [W-1:0] exu(state_t s, int e);
    return (e < 6) ? fmul(s.x[e], s.y[e]) : W'(s.x[e] + s.y[e]);
  endfunction

  // EXU output buses: ntest puts pi on the buses of 1+, 3+ and 6+ at level 0, and on the
  // bus of 6+ at level 1
  function automatic logic signed [W-1:0] bus(state_t s, int lev, int e);
    if (lev == 0 && ntest && (e == 6 || e == 8 || e == 11)) return pi;
    if (lev == 1 && ntest && e == 11) return pi;
    return exu(s, e);
  endfunction

  function automatic logic signed [W-1:0] model_po(state_t s, int lev);
    if (lev <= 1 && ntest_po) return ntest ? exu(s, 8) : exu(s, 6);
    return bus(s, lev, 11);
  endfunction

  task automatic model_step(inout state_t s, input int lev);
    logic signed [W-1:0] o [12];
    logic signed [W-1:0] otu [4];
    logic t3, t1;
    t3 = (lev == 3) && ntest;   // constants and dual points active
    t1 = (lev == 1) && ntest;   // constants of 1+ and 3+ active
    for (int e = 0; e < 12; e++) o[e] = bus(s, lev, e);
    otu = s.tu;
    // multipliers: 1* PI/k1, 2* TU1/k2, 3* TU2/k3, 4* TU4/k4, 5* TU1/k5, 6* TU3/k6
    s.x[0] = pi;     s.y[0] = k1;
    s.x[1] = otu[0]; s.y[1] = k2;
    s.x[2] = otu[1]; s.y[2] = k3;
    s.x[3] = otu[3]; s.y[3] = k4;
    s.x[4] = otu[0]; s.y[4] = k5;
    s.x[5] = otu[2]; s.y[5] = k6;
    // adders: 1+ = 1* + 2+, 2+ = 2* + 3*, 3+ = 1* + 4*, 4+ = 1+ + 5*, 5+ = 4+ + 3+, 6+ = 5+ + 6*
    s.x[6]  = o[0];              s.y[6]  = (t3 || t1) ? '0 : o[7];
    s.x[7]  = o[1];              s.y[7]  = o[2];
    s.x[8]  = o[0];              s.y[8]  = t3 ? o[6] : t1 ? '0 : o[3];
    s.x[9]  = o[6];              s.y[9]  = o[4];
    s.x[10] = o[9];              s.y[10] = o[8];
    s.x[11] = t3 ? '0 : o[10];   s.y[11] = t3 ? o[8] : o[5];
    if (tu_ld[0]) s.tu[0] = o[6];
    if (tu_ld[1]) s.tu[1] = otu[0];
    if (tu_ld[2]) s.tu[2] = o[11];
    if (tu_ld[3]) s.tu[3] = o[8];
  endtask

  task automatic step();
    @(posedge clk);
    model_step(s3, 3);
    model_step(s1, 1);
    model_step(s0, 0);
    @(negedge clk);
  endtask

  task automatic expect_po(input logic signed [W-1:0] v, input string what);
    checks++;
    if (po !== v) begin
      failures++;
      $display("FAIL %s: po=%0d expected %0d (cycle %0d)", what, po, v, cycles);
    end
  endtask

  task automatic expect_po0(input logic signed [W-1:0] v, input string what);
    checks++;
    if (po0 !== v) begin
      failures++;
      $display("FAIL %s: po0=%0d expected %0d (cycle %0d)", what, po0, v, cycles);
    end
  endtask

  task automatic expect_po1(input logic signed [W-1:0] v, input string what);
    checks++;
    if (po1 !== v) begin
      failures++;
      $display("FAIL %s: po1=%0d expected %0d (cycle %0d)", what, po1, v, cycles);
    end
  endtask

  logic signed [W-1:0] target, part;
  int tstart;

  initial begin
    foreach (s3.x[i]) begin s3.x[i] = '0; s3.y[i] = '0; end
    foreach (s3.tu[i]) s3.tu[i] = '0;
    s0 = s3;
    s1 = s3;
    k1 = ONE; k2 = W'($urandom); k3 = W'($urandom); k4 = W'($urandom); k5 = W'($urandom); k6 = W'($urandom);
    #12 rst_n = 1;
    @(negedge clk);

    // ---------- part 1: justify arbitrary values at 6+ (three-level controllable) ----------
    ntest = 1;
    tu_ld = 4'b1111;
    for (int rep = 0; rep < 20; rep++) begin
      target = (rep == 0) ? W'(11) : W'($urandom);
      part   = (rep == 0) ? W'(6)  : W'($urandom);
      pi = part; step();                 // time frame 4: first value
      tstart = cycles;
      pi = target - part; step();        // time frame 3: second value
      pi = W'($urandom);  step();        // frames 2 and 1: inputs no longer matter
      pi = W'($urandom);  step();
      expect_po(target, "value justified at 6+ from two input values");
      checks++;
      if (cycles - tstart != 3) begin failures++; $display("FAIL justification took %0d edges", cycles - tstart); end
      // the model must agree
      expect_po(model_po(s3, 3), "model agreement in test mode");
    end

    // ---------- part 2: random operation against the model ----------
    for (int t = 0; t < 3000; t++) begin
      ntest = (t / 200) % 2 == 1 ? 1'b1 : (($urandom % 8) == 0);
      tu_ld = 4'($urandom);
      ntest_po = ($urandom % 4) == 0;
      pi    = W'($urandom);
      if (t % 100 == 0) begin
        k1 = W'($urandom); k2 = W'($urandom); k3 = W'($urandom);
        k4 = W'($urandom); k5 = W'($urandom); k6 = W'($urandom);
      end
      step();
      expect_po(model_po(s3, 3), "random operation");
      expect_po0(model_po(s0, 0), "level 0: random operation");
      expect_po1(model_po(s1, 1), "level 1: random operation");
    end

    // ---------- part 3: zero-level version, directed ----------
    // k1 = one and k2 = k3 = k4 = 0, so 2+ and 4* are 0 and 1+ and 3+ both sum 1* + 0.
    ntest = 0; ntest_po = 0; tu_ld = 4'b1111;
    k1 = ONE; k2 = '0; k3 = '0; k4 = '0;
    step(); step(); step(); step();
    for (int rep = 0; rep < 50; rep++) begin
      target = W'($urandom);
      ntest = 1; ntest_po = 0;
      pi = target;
      #1 expect_po0(target, "level 0: cp puts pi on the 6+ bus in the same cycle");
      expect_po0(model_po(s0, 0), "level 0: model agreement, cp");
      tstart = cycles;
      step();
      pi = W'($urandom);
      step();
      checks++;
      if (cycles - tstart != 2) begin failures++; $display("FAIL level 0 probe latency %0d", cycles - tstart); end
      ntest = 1; ntest_po = 1;
      #1 expect_po0(target, "level 0: op shows raw 3+ (fed from pi two edges earlier)");
      expect_po0(model_po(s0, 0), "level 0: model agreement, probe 3+");
      ntest = 0;
      #1 expect_po0(target, "level 0: op shows raw 1+ (fed from pi two edges earlier)");
      expect_po0(model_po(s0, 0), "level 0: model agreement, probe 1+");
      ntest_po = 0;
      #1 expect_po0(model_po(s0, 0), "level 0: model agreement, normal output");
      expect_po(model_po(s3, 3), "level 3: model agreement during part 3");
      step();
    end
    // ---------- part 4: observing 1+ and 3+ through the dual points (dut) ----------
    // In normal mode, stop the input one cycle early so that 1* is 0, note the sums on
    // 1+ and 3+, then switch to test mode: 3+ appears at po after one edge (via dual
    // point 2), 1+ after two edges (via dual point 1, 3+ and dual point 2).
    ntest_po = 0; tu_ld = 4'b1111;
    k1 = W'($urandom); k2 = W'($urandom); k3 = W'($urandom);
    k4 = W'($urandom); k5 = W'($urandom); k6 = W'($urandom);
    for (int rep = 0; rep < 30; rep++) begin
      logic signed [W-1:0] seen1, seen3;
      ntest = 0;
      repeat (5) begin pi = W'($urandom); step(); end
      pi = '0; step();
      seen1 = exu(s3, 6);   // 1+ sum, from the reference model
      seen3 = exu(s3, 8);   // 3+ sum, from the reference model
      ntest = 1;
      tstart = cycles;
      step();
      expect_po(seen3, "3+ observed one edge after switching to test mode");
      step();
      expect_po(seen1, "1+ observed two edges after switching to test mode");
      checks++;
      if (cycles - tstart != 2) begin failures++; $display("FAIL observation took %0d edges", cycles - tstart); end
      expect_po(model_po(s3, 3), "model agreement during observation");
    end

    // ---------- part 5: one-level version, directed ----------
    // k1 = one; the other coefficients are random, since the constants cut the loops.
    ntest_po = 0; tu_ld = 4'b1111;
    k1 = ONE; k2 = W'($urandom); k3 = W'($urandom); k4 = W'($urandom);
    for (int rep = 0; rep < 50; rep++) begin
      ntest = 0;
      repeat (3) begin pi = W'($urandom); step(); end
      target = W'($urandom);
      ntest = 1; ntest_po = 0;
      pi = target;
      #1 expect_po1(target, "level 1: cp puts pi on the 6+ bus in the same cycle");
      tstart = cycles;
      step();
      pi = W'($urandom);
      step();
      checks++;
      if (cycles - tstart != 2) begin failures++; $display("FAIL level 1 latency %0d", cycles - tstart); end
      ntest_po = 1;
      #1 expect_po1(target, "level 1: 3+ set from pi two edges earlier, seen at its probe");
      ntest = 0;
      #1 expect_po1(target, "level 1: 1+ set from pi two edges earlier, seen at its probe");
      expect_po1(model_po(s1, 1), "level 1: model agreement");
      ntest_po = 0;
      step();
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
