// tb_exu_add: self-checking test of the adder EXU.
// Applies corner and random operands and compares the sum with a reference computed in
// a wider integer and wrapped to the word size.
module tb_exu_add;
  localparam int W = 20;
  logic signed [W-1:0] a, b, z;
  int checks = 0, failures = 0;

  exu_add #(.WIDTH(W)) dut (.a, .b, .z);

  task automatic check(input logic signed [W-1:0] x, input logic signed [W-1:0] y);
    longint ref_sum;
    a = x; b = y; #1;
    ref_sum = longint'(x) + longint'(y);
    checks++;
    if (z !== W'(ref_sum)) begin
      failures++;
      $display("FAIL add %0d + %0d = %0d, expected %0d", x, y, z, W'(ref_sum));
    end
  endtask

  initial begin
    check(0, 0);
    check(15, 0);           // identity element: 0 + x = x
    check(0, -7);
    check(W'(2**(W-1)-1), 1);  // overflow wraps
    check(-1, -1);
    for (int i = 0; i < 500; i++) check(W'($urandom), W'($urandom));
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
