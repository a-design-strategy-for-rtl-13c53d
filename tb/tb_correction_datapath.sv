// tb_correction_datapath: self-checking test of the combinational correction
// arithmetic y = format(format(x * A) + B) at its default formats.
//
// Drives corner and random operands in the ranges of the formats (x in
// 0..4095, A in 0.5..2.0 as gain/2^13, B in -63..63) and compares y with
// floor((A*x + B) / 8), computed in real arithmetic. Also checks that the
// headroom flag fmt_ok is high for those operands and low for operands that
// break the formats (a product or an offset without two sign bits).
module tb_correction_datapath;
  localparam int W = 16;

  logic [W-1:0] x, gain, offset, y;
  logic         fmt_ok;
  int checks = 0, failures = 0;
  int n_prod_trunc = 0, n_out_trunc = 0, n_negative = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  correction_datapath dut (.x(x), .gain(gain), .offset(offset), .y(y), .fmt_ok(fmt_ok));

  task automatic check(input int xi, input int gi, input int oi);
    int  expected;
    real z;
    x = W'(xi); gain = W'(gi); offset = W'(oi);
    #1;
    z = real'(gi) / 8192.0 * real'(xi) + real'(oi);
    expected = int'($floor(z / 8.0));
    checks++;
    if (int'($signed(y)) != expected || !fmt_ok) begin
      failures++;
      $display("FAIL x=%0d A=%0d B=%0d: got y=%0d ok=%0b expected %0d",
               xi, gi, oi, $signed(y), fmt_ok, expected);
    end
    if ((xi * gi) % 8192 != 0) n_prod_trunc++;
    if ((xi * gi) / 8192 + oi < 0) n_negative++;
    if (((xi * gi) / 8192 + oi) % 8 != 0) n_out_trunc++;
  endtask

  task automatic check_bad(input int xi, input int gi, input int oi, input string what);
    x = W'(xi); gain = W'(gi); offset = W'(oi);
    #1;
    checks++;
    if (fmt_ok) begin
      failures++;
      $display("FAIL fmt_ok high for %s", what);
    end
  endtask

  initial begin
    check(4095, 16384, 63);     // largest result
    check(0, 4096, -63);        // negative result
    check(0, 16384, 0);
    check(1000, 8192, 0);       // A = 1
    check(4095, 4096, -63);
    check(7, 8193, -1);
    for (int n = 0; n < 3000; n++)
      check(int'($urandom_range(4095)), int'($urandom_range(16384, 4096)),
            int'($urandom_range(126)) - 63);
    // operands outside the formats
    check_bad(32767, 32767, 0, "product without headroom");
    check_bad(16383, 16384, 0, "formatted product with one sign bit");
    check_bad(0, 8192, 16384, "offset with one sign bit");
    check_bad(100, 8192, -16385, "negative offset with one sign bit");
    checks++;
    if (n_prod_trunc == 0 || n_out_trunc == 0 || n_negative == 0) begin
      failures++;
      $display("FAIL a truncation or sign case never happened");
    end
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
