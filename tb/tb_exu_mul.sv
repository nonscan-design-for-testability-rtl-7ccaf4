// tb_exu_mul: self-checking test of the fixed-point multiplier EXU.
// The reference multiplies in 64-bit integers, divides by 2**FRAC rounding toward minus
// infinity and keeps the low WIDTH bits. A coefficient of 2**FRAC (one) must pass the
// data operand unchanged.
module tb_exu_mul;
  localparam int W = 20;
  localparam int FR = 10;
  logic signed [W-1:0] a, c, z;
  int checks = 0, failures = 0;

  exu_mul #(.WIDTH(W), .FRAC(FR)) dut (.a, .c, .z);

  function automatic logic signed [W-1:0] ref_mul(longint x, longint y);
    longint p, q;
    p = x * y;
    q = (p >= 0) ? (p / (64'sd1 << FR)) : -((-p + (64'sd1 << FR) - 1) / (64'sd1 << FR));
    return W'(q);
  endfunction

  task automatic check(input logic signed [W-1:0] x, input logic signed [W-1:0] y);
    logic signed [W-1:0] e;
    a = x; c = y; #1;
    e = ref_mul(longint'(x), longint'(y));
    checks++;
    if (z !== e) begin
      failures++;
      $display("FAIL mul %0d * %0d = %0d, expected %0d", x, y, z, e);
    end
  endtask

  initial begin
    check(15, W'(1 << FR));     // multiply by one
    check(-15, W'(1 << FR));
    check(1000, W'(1 << (FR-1)));  // by one half
    check(-3, 5);
    check(0, 12345);
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
