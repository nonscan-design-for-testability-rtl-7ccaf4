// tb_src_mux: self-checking test of the operand multiplexor (4 inputs, and 3 inputs to
// exercise out-of-range selects, which must pick input 0).
module tb_src_mux;
  localparam int W = 20;
  logic [W-1:0] d4 [4];
  logic [W-1:0] d3 [3];
  logic [1:0]   sel4, sel3;
  logic [W-1:0] y4, y3;
  int checks = 0, failures = 0;

  src_mux #(.WIDTH(W), .N_IN(4)) dut4 (.d(d4), .sel(sel4), .y(y4));
  src_mux #(.WIDTH(W), .N_IN(3)) dut3 (.d(d3), .sel(sel3), .y(y3));

  initial begin
    for (int t = 0; t < 200; t++) begin
      foreach (d4[i]) d4[i] = W'($urandom);
      foreach (d3[i]) d3[i] = W'($urandom);
      sel4 = 2'(t % 4);
      sel3 = 2'($urandom);
      #1;
      checks++;
      if (y4 !== d4[t % 4]) begin failures++; $display("FAIL mux4 sel=%0d", sel4); end
      checks++;
      if (y3 !== ((sel3 < 3) ? d3[sel3] : d3[0])) begin failures++; $display("FAIL mux3 sel=%0d", sel3); end
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
