// tb_pixel_correction: end-to-end test of the pixel readout-correction path,
// at the design's default parameters (16-bit words, 4096 pixels).
//
// Calibration phase: writes a random gain A in [0.5, 2.0] (+1/2/13) and
// offset B in [-63, 63] (11/5/0) for every pixel, with corner pixels at the
// extremes of both ranges. Operation phase: streams a whole frame of random
// 12-bit pixels in readout order, back to back. Then recalibrates part of the
// array and streams a second frame in random order with idle gaps.
// Every output is compared with floor((A*x + B) / 8), computed in real
// arithmetic from A = gain/2^13, and must appear exactly 2 clocks after its
// input with the right pixel index. The test counts how often each mechanism
// of the data path was exercised (product truncation, output truncation,
// negative sum, gain below and above one, back-to-back and gapped pixels,
// recalibration) and fails if one never happened.
module tb_pixel_correction;
  localparam int DATA_W  = 16;
  localparam int NPIX    = 4096;
  localparam int AW      = $clog2(NPIX);
  localparam int LATENCY = 2;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              cal_we = 1'b0;
  logic [AW-1:0]     cal_addr = '0;
  logic [DATA_W-1:0] cal_gain = '0, cal_offset = '0;
  logic              in_valid = 1'b0;
  logic [AW-1:0]     in_addr = '0;
  logic [DATA_W-1:0] in_x = '0;
  logic              out_valid;
  logic [AW-1:0]     out_addr;
  logic [DATA_W-1:0] out_y;

  always #5 clk = ~clk;

  pixel_correction dut (
    .clk, .rst_n, .cal_we, .cal_addr, .cal_gain, .cal_offset,
    .in_valid, .in_addr, .in_x, .out_valid, .out_addr, .out_y);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // calibration held by the testbench
  int gain_m [NPIX];
  int offset_m [NPIX];

  typedef struct {
    int     addr;
    int     y;
    longint cycle;
  } exp_t;
  exp_t q[$];

  // mechanism counters
  int n_prod_trunc = 0, n_out_trunc = 0, n_negative = 0;
  int n_gain_lt1 = 0, n_gain_gt1 = 0, n_back_to_back = 0, n_gap = 0;
  int n_recal = 0, n_outputs = 0;
  logic prev_valid = 1'b0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  task automatic calibrate(input int i, input int g, input int o);
    gain_m[i]   = g;
    offset_m[i] = o;
    @(negedge clk);
    cal_we = 1'b1; cal_addr = AW'(i);
    cal_gain = DATA_W'(g); cal_offset = DATA_W'(o);
    @(negedge clk);
    cal_we = 1'b0;
  endtask

  // Present one pixel on the next cycle; record its expected output.
  task automatic send(input int i, input int x);
    real  a, z;
    exp_t e;
    longint prod;
    int   ypf;
    @(negedge clk);
    in_valid = 1'b1; in_addr = AW'(i); in_x = DATA_W'(x);
    a = real'(gain_m[i]) / 8192.0;
    z = a * real'(x) + real'(offset_m[i]);
    e.addr  = i;
    e.y     = int'($floor(z / 8.0));
    e.cycle = cyc + longint'(LATENCY);
    q.push_back(e);
    // bookkeeping of the mechanisms this pixel exercises
    prod = longint'(x) * longint'(gain_m[i]);
    ypf  = int'(prod / 8192) + offset_m[i];
    if (prod % 8192 != 0) n_prod_trunc++;
    if (ypf < 0) n_negative++;
    if (ypf % 8 != 0) n_out_trunc++;
    if (gain_m[i] < 8192) n_gain_lt1++;
    if (gain_m[i] > 8192) n_gain_gt1++;
    if (prev_valid) n_back_to_back++;
    prev_valid = 1'b1;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
      if (prev_valid) n_gap++;
      prev_valid = 1'b0;
    end
  endtask

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      n_outputs++;
      checks++;
      if (q.size() == 0) begin
        fail("output with no pixel pending");
      end else begin
        e = q.pop_front();
        if (int'(out_addr) != e.addr || int'($signed(out_y)) != e.y || cyc != e.cycle)
          fail($sformatf("pixel %0d: got addr %0d y %0d at cycle %0d, expected y %0d at cycle %0d",
                         e.addr, out_addr, $signed(out_y), cyc, e.y, e.cycle));
      end
    end
  end

  function automatic int rand_gain();
    return int'($urandom_range(16384, 4096));   // A in [0.5, 2.0]
  endfunction
  function automatic int rand_offset();
    return int'($urandom_range(126)) - 63;       // B in [-63, 63]
  endfunction

  int order [NPIX];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- calibration phase ----
    calibrate(0, 16384, 63);     // A = 2.0,  B = +63
    calibrate(1, 4096, -63);     // A = 0.5,  B = -63
    calibrate(2, 8192, 0);       // A = 1.0
    calibrate(3, 8193, -1);
    for (int i = 4; i < NPIX; i++) calibrate(i, rand_gain(), rand_offset());

    // ---- frame 1: readout order, back to back ----
    send(0, 4095);               // largest output
    send(1, 0);                  // negative sum
    send(2, 1000);
    send(3, 7);
    for (int i = 4; i < NPIX; i++) send(i, int'($urandom_range(4095)));
    idle(4);

    // ---- recalibrate a quarter of the array, then frame 2 in random order ----
    for (int i = 0; i < NPIX; i += 4) begin
      calibrate(i, rand_gain(), rand_offset());
      n_recal++;
    end
    for (int i = 0; i < NPIX; i++) order[i] = i;
    order.shuffle();
    foreach (order[k]) begin
      send(order[k], int'($urandom_range(4095)));
      if ($urandom_range(7) == 0) idle(int'($urandom_range(3, 1)));
    end
    idle(LATENCY + 3);

    if (q.size() != 0) fail($sformatf("%0d pixels never came out", q.size()));
    checks++;
    if (n_outputs != 2 * NPIX) fail($sformatf("%0d outputs, expected %0d", n_outputs, 2 * NPIX));

    $display("mechanisms: product truncation %0d, output truncation %0d, negative sum %0d,",
             n_prod_trunc, n_out_trunc, n_negative);
    $display("            gain<1 %0d, gain>1 %0d, back-to-back %0d, gaps %0d, recalibrated %0d",
             n_gain_lt1, n_gain_gt1, n_back_to_back, n_gap, n_recal);
    checks += 8;
    if (n_prod_trunc == 0)   fail("product truncation never happened");
    if (n_out_trunc == 0)    fail("output truncation never happened");
    if (n_negative == 0)     fail("negative sum never happened");
    if (n_gain_lt1 == 0)     fail("gain below one never happened");
    if (n_gain_gt1 == 0)     fail("gain above one never happened");
    if (n_back_to_back == 0) fail("back-to-back pixels never happened");
    if (n_gap == 0)          fail("idle gap never happened");
    if (n_recal == 0)        fail("recalibration never happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
