// tb_const_point: self-checking test of the constant test point, with the default
// constant 0 and with a non-zero constant (so both the AND and the OR gating are used).
module tb_const_point;
  localparam int W = 20;
  localparam logic [W-1:0] K2 = 20'h5_A3C1;
  logic [W-1:0] d, y0, y1;
  logic ntest;
  int checks = 0, failures = 0;

  const_point #(.WIDTH(W))          dut0 (.d, .ntest, .y(y0));
  const_point #(.WIDTH(W), .K(K2))  dut1 (.d, .ntest, .y(y1));

  initial begin
    for (int t = 0; t < 300; t++) begin
      d = W'($urandom); ntest = 1'(t % 2);
      #1;
      checks++;
      if (y0 !== (ntest ? '0 : d)) begin failures++; $display("FAIL K=0 ntest=%0b y=%0h", ntest, y0); end
      checks++;
      if (y1 !== (ntest ? K2 : d)) begin failures++; $display("FAIL K=%0h ntest=%0b y=%0h", K2, ntest, y1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
