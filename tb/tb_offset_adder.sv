// tb_offset_adder: self-checking test of the 16-bit offset adder.
//
// Adds formatted products in (+2/14/0) and offsets in (11/5/0), directed and
// random, and compares with the integer sum; also checks wrap-around on
// words outside those formats.
module tb_offset_adder;
  localparam int W = 16;

  logic [W-1:0] a, b, sum;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  offset_adder #(.W(W)) dut (.a(a), .b(b), .sum(sum));

  task automatic check(input int ai, input int bi);
    int expected;
    a = W'(ai);
    b = W'(bi);
    #1;
    expected = ai + bi;
    checks++;
    if (sum != W'(expected)) begin
      failures++;
      $display("FAIL %0d + %0d: got %0d expected %0d", ai, bi, $signed(sum), expected);
    end
  endtask

  initial begin
    check(0, -63);
    check(8190, 63);
    check(2047, -63);
    check(16383, 15);
    check(-16384, -16);
    check(32767, 1);              // wraps
    check(-1, -1);
    for (int n = 0; n < 2000; n++)
      check(int'($signed(15'($urandom))), int'($signed(6'($urandom))));
    for (int n = 0; n < 500; n++)
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
