// tb_test_mux: self-checking test of the ntest multiplexor: ntest = 0 must pass the
// functional input, ntest = 1 the test input.
module tb_test_mux;
  localparam int W = 20;
  logic [W-1:0] func, tst, y;
  logic ntest;
  int checks = 0, failures = 0;

  test_mux #(.WIDTH(W)) dut (.func, .tst, .ntest, .y);

  initial begin
    for (int t = 0; t < 300; t++) begin
      func = W'($urandom); tst = W'($urandom); ntest = 1'(t % 2);
      #1;
      checks++;
      if (y !== (ntest ? tst : func)) begin failures++; $display("FAIL ntest=%0b", ntest); end
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
