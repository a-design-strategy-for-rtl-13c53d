// tb_gain_multiplier: self-checking test of the signed W x W -> 2W multiplier.
//
// Drives corner values (the pixel and gain ranges of the correction data
// path, the most negative word, -1) and random signed operands, and compares
// the product with one computed in 64-bit integer arithmetic.
module tb_gain_multiplier;
  localparam int W = 16;

  logic signed [W-1:0]   a, b;
  logic signed [2*W-1:0] p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  gain_multiplier #(.W(W)) dut (.a(a), .b(b), .p(p));

  task automatic check(input int ai, input int bi);
    longint expected;
    a = W'(ai);
    b = W'(bi);
    #1;
    expected = longint'(ai) * longint'(bi);
    checks++;
    if (longint'(p) != expected) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d expected %0d", ai, bi, p, expected);
    end
  endtask

  initial begin
    // pixel range 0..4095 against gain 0.5..2.0 in (+1/2/13)
    check(0, 4096);
    check(4095, 16384);
    check(4095, 4096);
    check(1234, 8192);
    // signs and extremes
    check(-1, -1);
    check(-32768, -32768);
    check(-32768, 32767);
    check(32767, -5);
    for (int n = 0; n < 2000; n++)
      check(int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
