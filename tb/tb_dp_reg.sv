// tb_dp_reg: self-checking test of the data-path register: reset clears it, ld = 1 loads
// at the rising edge (one cycle latency), ld = 0 holds the value for any number of cycles.
module tb_dp_reg;
  localparam int W = 20;
  logic clk = 0, rst_n = 1, ld = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0, cycles = 0;

  dp_reg #(.WIDTH(W)) dut (.clk, .rst_n, .ld, .d, .q);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #1 rst_n = 0;   // asynchronous reset, away from any clock edge
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %0h", q); end
    @(negedge clk) rst_n = 1;
    model = '0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      ld = ($urandom % 3) == 0;
      d  = W'($urandom);
      if (ld) model = d;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL t=%0d q=%0h expected %0h", t, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
