// tb_nonscan_dft_top: end-to-end test of the three nonscan testable data paths at their
// default sizes (20-bit words). Each mechanism of the design is exercised and counted;
// a mechanism that never occurs counts as a failure.
//   cas_justify   : IIR cascade, test mode: a value applied at In is justified at adder A1
//                   in three cycles through the two constant points (two-level
//                   controllable);
//   cas_observe   : IIR cascade, test mode: that A1 value reaches the output register Out
//                   through LA2 + (RA2 = 0) (two-level observable);
//   cas_tu_hold   : IIR cascade, normal mode: a sum parked in transfer unit TU1 is held
//                   while A2 changes, moved to TU2 and used by M2 in a later iteration;
//   cas_normal    : IIR cascade, normal mode: RA2 takes its functional operand, not 0;
//   par_justify   : IIR parallel, test mode: a target value at 6+ from two different input
//                   values (unequal-weight reconvergence through the dual point 1+ -> 3+);
//   par_recirc    : IIR parallel, normal mode: the 6+ -> TU3 -> 6* -> 6+ loop recirculates
//                   the output with period three when k6 = one;
//   par_loop_cut  : IIR parallel, test mode: the constant and dual point cut that loop, so
//                   the output falls to zero once the input is zero;
//   ewf_cp        : EWF slice, test mode: pi reaches Z through L2 and the constant in R4;
//   mode_switch   : ntest changes between normal and test operation.
module tb_nonscan_dft_top;
  import ndft_pkg::*;
  localparam int W  = 20;
  localparam int FR = 10;
  localparam logic signed [W-1:0] ONE = W'(1 << FR);

  logic clk = 0, rst_n = 0;
  // cascade
  logic cas_ntest = 0;
  cas_ctrl_t cas_ctrl = '0;
  logic signed [W-1:0] cas_in = '0, cas_k1 = ONE, cas_k2 = ONE, cas_k3 = ONE, cas_k4 = ONE, cas_out;
  // parallel
  logic par_ntest = 0;
  logic [3:0] par_tu_ld = '0;
  logic signed [W-1:0] par_pi = '0, par_k1 = ONE, par_k2 = '0, par_k3 = '0, par_k4 = '0,
                       par_k5 = '0, par_k6 = ONE, par_po;
  // ewf
  logic ewf_ntest = 0;
  logic [W-1:0] ewf_pi = '0, ewf_bus_a1 = '0, ewf_bus_a3 = '0, ewf_bus_m2 = '0, ewf_z;
  logic [1:0] ewf_l1_src = '0, ewf_ld_l = '0;
  logic ewf_r1_src = '0;
  logic [3:0] ewf_ld_r = '0;
  lsel_e ewf_lsel = RD_L1;
  rsel_e ewf_rsel = RD_R1;

  int checks = 0, failures = 0, cycles = 0;
  int n_cas_justify = 0, n_cas_observe = 0, n_cas_tu_hold = 0, n_cas_normal = 0;
  int n_par_justify = 0, n_par_recirc = 0, n_par_loop_cut = 0, n_ewf_cp = 0, n_mode_switch = 0;

  nonscan_dft_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic prev_modes [3];
  always @(posedge clk) begin
    if (rst_n && (prev_modes[0] != cas_ntest || prev_modes[1] != par_ntest || prev_modes[2] != ewf_ntest))
      n_mode_switch++;
    prev_modes = '{cas_ntest, par_ntest, ewf_ntest};
  end

  task automatic tick(); @(posedge clk); @(negedge clk); endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cycles); end
  endtask

  // ---------------- IIR cascade ----------------
  task automatic cas_test_mode_round(input logic signed [W-1:0] v);
    int t0;
    cas_ntest = 1;
    cas_ctrl = '0; cas_ctrl.ld_ra1 = 1; cas_ctrl.ld_ra2 = 1; tick();
    t0 = cycles;
    cas_ctrl = '0; cas_in = v; cas_ctrl.ld_lm3 = 1; tick();
    cas_ctrl = '0; cas_in = W'($urandom); cas_ctrl.ld_la2 = 1; cas_ctrl.sel_la2 = LA2_M3; tick();
    cas_ctrl = '0; cas_ctrl.ld_la1 = 1; cas_ctrl.sel_la1 = LA1_A2; tick();
    check(cycles - t0 == 3, "cascade: A1 justified in three time frames");
    n_cas_justify++;
    cas_ctrl = '0; cas_ctrl.ld_la2 = 1; cas_ctrl.sel_la2 = LA2_A1; tick();
    cas_ctrl = '0; cas_ctrl.ld_out = 1; tick();
    cas_ctrl = '0;
    check(cas_out === v, $sformatf("cascade: A1 = %0d observed at Out (got %0d)", v, cas_out));
    check(cycles - t0 == 5, "cascade: A1 reaches Out three edges after it is justified");
    n_cas_observe++;
  endtask

  task automatic cas_tu_round(input logic signed [W-1:0] v, input logic signed [W-1:0] w);
    cas_ntest = 1; cas_ctrl = '0; cas_ctrl.ld_ra2 = 1; tick();          // RA2 = 0
    cas_ntest = 0;
    cas_ctrl = '0; cas_in = v; cas_ctrl.ld_lm3 = 1; tick();             // LM3 = v
    cas_ctrl = '0; cas_ctrl.ld_la2 = 1; cas_ctrl.sel_la2 = LA2_M3; tick(); // A2 = v
    cas_ctrl = '0; cas_ctrl.ld_tu[0] = 1; tick();                        // TU1 = v
    for (int i = 0; i < 4; i++) begin                                    // A2 changes, TU1 holds
      cas_ctrl = '0; cas_in = W'($urandom); cas_ctrl.ld_lm3 = 1; cas_ctrl.ld_la2 = 1;
      cas_ctrl.sel_la2 = LA2_M3; tick();
    end
    cas_ctrl = '0; cas_ctrl.ld_tu[1] = 1; cas_in = w; cas_ctrl.ld_lm3 = 1; tick(); // TU2 = v, LM3 = w
    cas_ctrl = '0; cas_ctrl.ld_lm2 = 1; cas_ctrl.sel_lm2 = 1'b0;
    cas_ctrl.ld_la2 = 1; cas_ctrl.sel_la2 = LA2_M3; tick();              // LM2 = v, LA2 = w
    cas_ctrl = '0; cas_ctrl.ld_ra2 = 1; cas_ctrl.sel_ra2 = RA2_M2; cas_ctrl.sel_k2 = 1'b0; tick(); // RA2 = v*K2
    cas_ctrl = '0; cas_ctrl.ld_out = 1; tick();                          // Out = w + v
    cas_ctrl = '0;
    check(cas_out === W'(v + w), $sformatf("cascade: TU-carried %0d + %0d at Out (got %0d)", v, w, cas_out));
    n_cas_tu_hold++;
    n_cas_normal++;
  endtask

  // ---------------- IIR parallel ----------------
  task automatic par_justify_round(input logic signed [W-1:0] target, input logic signed [W-1:0] first);
    par_ntest = 1; par_tu_ld = 4'b1111;
    par_pi = first; tick();
    par_pi = target - first; tick();
    par_pi = W'($urandom); tick();
    par_pi = W'($urandom); tick();
    check(par_po === target, $sformatf("parallel: %0d justified at 6+ (got %0d)", target, par_po));
    if (first != target - first) n_par_justify++;
  endtask

  logic signed [W-1:0] hist [$];

  task automatic par_loop_round(input logic signed [W-1:0] v);
    // normal mode, only TU3 loads: an impulse enters the 6+ loop and recirculates
    par_ntest = 0; par_tu_ld = 4'b0100; par_k6 = ONE;
    par_pi = '0; repeat (8) tick();
    // flush anything still circulating by breaking the loop for a while
    par_k6 = '0; repeat (8) tick();
    par_k6 = ONE;
    par_pi = v; tick();
    par_pi = '0; repeat (8) tick();
    hist.delete();
    for (int i = 0; i < 12; i++) begin hist.push_back(par_po); tick(); end
    for (int i = 3; i < 12; i++)
      check(hist[i] === hist[i-3], "parallel: 6+ loop recirculates with period three");
    check(hist[0] != 0 || hist[1] != 0 || hist[2] != 0, "parallel: recirculating value is not zero");
    n_par_recirc++;
    // test mode cuts the loop: with the input at zero the output must die out
    par_ntest = 1; par_tu_ld = 4'b1111; par_pi = '0; repeat (6) tick();
    check(par_po === '0, "parallel: test points cut the 6+ loop");
    n_par_loop_cut++;
    par_ntest = 0;
  endtask

  // ---------------- EWF slice ----------------
  task automatic ewf_round(input logic [W-1:0] v);
    ewf_ntest = 0; ewf_bus_a1 = W'($urandom); ewf_ld_r = 4'b0010; ewf_lsel = RD_L1; ewf_rsel = RD_R2; tick();
    ewf_ntest = 1; ewf_pi = v; ewf_ld_l = 2'b10; ewf_ld_r = 4'b1000; tick();
    ewf_ld_l = '0; ewf_ld_r = '0; ewf_pi = W'($urandom); ewf_lsel = RD_L2; ewf_rsel = RD_R4; #1;
    check(ewf_z === v, $sformatf("ewf: pi = %0h at Z through L2 and R4 (got %0h)", v, ewf_z));
    n_ewf_cp++;
    ewf_ntest = 0;
  endtask

  initial begin
    prev_modes = '{1'b0, 1'b0, 1'b0};
    #12 rst_n = 1;
    @(negedge clk);
    cas_test_mode_round(W'(15));
    par_justify_round(W'(11), W'(6));
    ewf_round(W'(9));
    for (int rep = 0; rep < 20; rep++) begin
      cas_test_mode_round(W'($urandom));
      cas_tu_round(W'($urandom), W'($urandom));
      par_justify_round(W'($urandom), W'($urandom));
      par_loop_round(W'(($urandom % 1000) + 1));
      ewf_round(W'($urandom));
    end

    check(n_cas_justify > 0, "mechanism cas_justify occurred");
    check(n_cas_observe > 0, "mechanism cas_observe occurred");
    check(n_cas_tu_hold > 0, "mechanism cas_tu_hold occurred");
    check(n_cas_normal > 0,  "mechanism cas_normal occurred");
    check(n_par_justify > 0, "mechanism par_justify occurred");
    check(n_par_recirc > 0,  "mechanism par_recirc occurred");
    check(n_par_loop_cut > 0, "mechanism par_loop_cut occurred");
    check(n_ewf_cp > 0,      "mechanism ewf_cp occurred");
    check(n_mode_switch > 0, "mechanism mode_switch occurred");
    $display("mechanisms: cas_justify=%0d cas_observe=%0d cas_tu_hold=%0d cas_normal=%0d par_justify=%0d par_recirc=%0d par_loop_cut=%0d ewf_cp=%0d mode_switch=%0d",
             n_cas_justify, n_cas_observe, n_cas_tu_hold, n_cas_normal, n_par_justify,
             n_par_recirc, n_par_loop_cut, n_ewf_cp, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
