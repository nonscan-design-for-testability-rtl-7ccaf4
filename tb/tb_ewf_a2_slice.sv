// tb_ewf_a2_slice: self-checking test of the EWF adder slice with register-file test
// points.
// Part 1 (directed, test mode): L2 is loaded from pi and R4 with 0 in one cycle; reading
// L2 and R4 then shows pi at the adder output Z one clock edge after the load, so Z is
// controllable from the primary input.
// Part 2 (directed, normal mode): with ntest = 0, L2 and R4 take Z, not pi and 0.
// Part 3 (random): random controls, buses and ntest against a reference model.
module tb_ewf_a2_slice;
  import ndft_pkg::*;
  localparam int W = 20;

  logic clk = 0, rst_n = 0, ntest = 0;
  logic [W-1:0] pi = '0, bus_a1 = '0, bus_a3 = '0, bus_m2 = '0, z;
  logic [1:0] l1_src = '0, ld_l = '0;
  logic       r1_src = '0;
  logic [3:0] ld_r = '0;
  lsel_e lsel = RD_L1;
  rsel_e rsel = RD_R1;
  int checks = 0, failures = 0, cycles = 0;

  ewf_a2_slice #(.WIDTH(W)) dut (.clk, .rst_n, .ntest, .pi, .bus_a1, .bus_a3, .bus_m2,
                                 .l1_src, .r1_src, .ld_l, .ld_r, .lsel, .rsel, .z);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [W-1:0] l [2], r [4];

  function automatic logic [W-1:0] model_z();
    return l[lsel] + r[rsel];
  endfunction

  task automatic model_step();
    logic [W-1:0] zz, srcs [4];
    zz = model_z();
    srcs = '{bus_a1, zz, bus_a3, bus_m2};
    if (ld_l[0]) l[0] = srcs[l1_src];
    if (ld_l[1]) l[1] = ntest ? pi : zz;
    if (ld_r[0]) r[0] = r1_src ? zz : bus_a1;
    if (ld_r[1]) r[1] = bus_a1;
    if (ld_r[2]) r[2] = zz;
    if (ld_r[3]) r[3] = ntest ? '0 : zz;
  endtask

  task automatic step();
    @(posedge clk);
    model_step();
    @(negedge clk);
  endtask

  task automatic expect_z(input logic [W-1:0] v, input string what);
    checks++;
    if (z !== v) begin failures++; $display("FAIL %s: z=%0d expected %0d", what, z, v); end
  endtask

  logic [W-1:0] v;

  initial begin
    foreach (l[i]) l[i] = '0;
    foreach (r[i]) r[i] = '0;
    #12 rst_n = 1;
    @(negedge clk);

    // part 1: Z controllable from pi through the register files
    for (int rep = 0; rep < 10; rep++) begin
      v = W'($urandom);
      // make Z non-trivial first
      ntest = 0; bus_a1 = W'($urandom); ld_r = 4'b0010; ld_l = 2'b00; lsel = RD_L1; rsel = RD_R2; step();
      ntest = 1; pi = v; ld_l = 2'b10; ld_r = 4'b1000; step();
      ld_l = '0; ld_r = '0; pi = W'($urandom); lsel = RD_L2; rsel = RD_R4; #1;
      expect_z(v, "pi justified at Z one cycle after loading L2 and R4");
    end

    // part 2: normal mode
    ntest = 0; bus_a1 = W'(7); ld_r = 4'b0010; lsel = RD_L1; rsel = RD_R2; step(); // R2 = 7
    ld_r = '0; l1_src = 2'd0; ld_l = 2'b01; step();                                   // L1 = 7
    ld_l = 2'b10; ld_r = 4'b1000; pi = W'(1000); step();                               // L2 = R4 = Z = 14
    ld_l = '0; ld_r = '0; lsel = RD_L2; rsel = RD_R4; #1;
    expect_z(W'(28), "normal mode: L2 and R4 take Z");

    // part 3: random operation
    for (int t = 0; t < 2000; t++) begin
      ntest = 1'($urandom); pi = W'($urandom);
      bus_a1 = W'($urandom); bus_a3 = W'($urandom); bus_m2 = W'($urandom);
      l1_src = 2'($urandom); r1_src = 1'($urandom);
      ld_l = 2'($urandom); ld_r = 4'($urandom);
      lsel = lsel_e'(1'($urandom)); rsel = rsel_e'(2'($urandom));
      #1;
      expect_z(model_z(), "random operation");
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
