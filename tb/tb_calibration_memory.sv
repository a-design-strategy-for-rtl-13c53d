// tb_calibration_memory: self-checking test of the per-pixel gain/offset store.
//
// Fills a small memory with random entries, keeping a copy in the testbench,
// then reads random addresses and checks that each entry appears exactly one
// clock after its address, that outputs hold while re is low, and that a read
// of the address being written returns the old entry.
module tb_calibration_memory;
  localparam int NPIX = 64, W = 16, AW = $clog2(NPIX);

  logic          clk = 1'b0;
  logic          we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wgain = '0, woffset = '0;
  logic [W-1:0]  rgain, roffset;
  logic [W-1:0]  gain_m [NPIX], offset_m [NPIX];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  calibration_memory #(.NPIX(NPIX), .W(W)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wgain(wgain), .woffset(woffset),
    .re(re), .raddr(raddr), .rgain(rgain), .roffset(roffset));

  task automatic expect_out(input logic [W-1:0] g, input logic [W-1:0] o, input string what);
    checks++;
    if (rgain !== g || roffset !== o) begin
      failures++;
      $display("FAIL %s: got %h/%h expected %h/%h", what, rgain, roffset, g, o);
    end
  endtask

  initial begin
    // calibration: write every entry
    for (int i = 0; i < NPIX; i++) begin
      gain_m[i]   = 16'($urandom);
      offset_m[i] = 16'($urandom);
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wgain = gain_m[i]; woffset = offset_m[i];
    end
    @(negedge clk) we = 1'b0;
    // random reads, one per clock, checked with one clock latency
    for (int n = 0; n < 500; n++) begin
      int a;
      a = int'($urandom_range(NPIX - 1));
      @(negedge clk);
      re = 1'b1; raddr = AW'(a);
      @(negedge clk);
      re = 1'b0;
      expect_out(gain_m[a], offset_m[a], "read latency 1");
      // hold while re is low
      raddr = AW'(a + 1);
      @(negedge clk);
      expect_out(gain_m[a], offset_m[a], "hold");
    end
    // read during write of the same address returns the old entry
    @(negedge clk);
    re = 1'b1; raddr = 5; we = 1'b1; waddr = 5; wgain = ~gain_m[5]; woffset = ~offset_m[5];
    @(negedge clk);
    re = 1'b0; we = 1'b0;
    expect_out(gain_m[5], offset_m[5], "read-before-write");
    re = 1'b1;
    @(negedge clk);
    re = 1'b0;
    expect_out(~gain_m[5], ~offset_m[5], "after write");
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
