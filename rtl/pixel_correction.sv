// pixel_correction: fixed-point readout correction of an imaging sensor.
//
// Every pixel of a focal plane array has its own gain error and dark-current
// offset. After a calibration phase has stored a corrective gain A_i and
// offset B_i for each pixel, this data path corrects each raw pixel x_i:
//     y_i = A_i * x_i + B_i   (then scaled back to the input format)
// entirely in 16-bit fixed point. The formats, in Sign/Integer/Fraction
// notation (see sif_pkg), are
//     x   (+4/12/0)   12-bit unsigned count       A (+1/2/13)  gain 0.5..2.0
//     B   (11/5/0)    offset -63..63 counts
//     P_pf = x*A  (+5/14/13), 32 bits
//     P   (+2/14/0)  P_pf shifted left 3, lower 16 bits dropped
//     y_pf = P + B (+1/15/0)
//     y   (+4/12/0)  y_pf arithmetic-shifted right 3
// The arithmetic sits in correction_datapath, which derives the two shift
// amounts at elaboration from the formats with the SIF multiplication and
// addition rules (product shift = sign bits of P_pf minus HEADROOM; output
// shift = sign bits wanted in y minus sign bits of y_pf) and refuses formats
// that do not line up for the add. With the default formats both shifts are
// 3. The output shift drops three integer bits, so y = floor((A*x + B) / 8).
//
// Interface: calibration writes (cal_*) fill the per-pixel memory. Raw
// pixels arrive with in_valid, their index in_addr and value in_x, one per
// clock at most, in any order. Each comes out on out_valid/out_addr/out_y.
// Timing: two-stage pipeline, latency 2 clocks, throughput one pixel per
// clock. Cycle 1 reads A_i,B_i from the memory while x_i is registered;
// cycle 2 does multiply, format, add and format, and registers the result.
//
// The data path, its formats, shifts and truncations follow the SIF method.
// The pipeline registers, the memory organisation, the reset and the
// wrap-around on overflow are this design's choices; assertions check the
// overflow-headroom rules for every valid pixel.
module pixel_correction
  import sif_pkg::*;
#(
  parameter int       DATA_W   = 16,
  parameter int       NPIX     = 4096,
  parameter sif_fmt_t X_FMT    = '{s: 4, i: 12, f: 0},
  parameter sif_fmt_t A_FMT    = '{s: 1, i: 2,  f: 13},
  parameter sif_fmt_t B_FMT    = '{s: 11, i: 5, f: 0},
  parameter int       HEADROOM = 2,
  parameter sif_fmt_t Y_FMT    = X_FMT,
  localparam int      AW       = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // calibration phase: write one pixel's gain and offset
  input  logic              cal_we,
  input  logic [AW-1:0]     cal_addr,
  input  logic [DATA_W-1:0] cal_gain,
  input  logic [DATA_W-1:0] cal_offset,
  // operation phase: raw pixel in
  input  logic              in_valid,
  input  logic [AW-1:0]     in_addr,
  input  logic [DATA_W-1:0] in_x,
  // corrected pixel out
  output logic              out_valid,
  output logic [AW-1:0]     out_addr,
  output logic [DATA_W-1:0] out_y
);

  // ---------------------------------------------------------------------
  // Stage 1: look up A_i, B_i; register x_i
  // ---------------------------------------------------------------------
  logic              s1_valid;
  logic [AW-1:0]     s1_addr;
  logic [DATA_W-1:0] s1_x;
  logic [DATA_W-1:0] s1_gain, s1_offset;

  calibration_memory #(.NPIX(NPIX), .W(DATA_W)) u_cal_mem (
    .clk     (clk),
    .we      (cal_we),
    .waddr   (cal_addr),
    .wgain   (cal_gain),
    .woffset (cal_offset),
    .re      (in_valid),
    .raddr   (in_addr),
    .rgain   (s1_gain),
    .roffset (s1_offset)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_addr  <= '0;
      s1_x     <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_addr <= in_addr;
        s1_x    <= in_x;
      end
    end
  end

  // ---------------------------------------------------------------------
  // Stage 2: y = format(format(x*A) + B)
  // ---------------------------------------------------------------------
  logic [DATA_W-1:0] y;
  logic              fmt_ok;

  correction_datapath #(
    .DATA_W   (DATA_W),
    .X_FMT    (X_FMT),
    .A_FMT    (A_FMT),
    .B_FMT    (B_FMT),
    .HEADROOM (HEADROOM),
    .Y_FMT    (Y_FMT)
  ) u_dp (
    .x      (s1_x),
    .gain   (s1_gain),
    .offset (s1_offset),
    .y      (y),
    .fmt_ok (fmt_ok)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_addr  <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) begin
        out_addr <= s1_addr;
        out_y    <= y;
      end
    end
  end

  // ---------------------------------------------------------------------
  // Overflow-headroom rules, checked for every valid pixel
  // ---------------------------------------------------------------------
  a_headroom: assert property (@(posedge clk) disable iff (!rst_n)
    s1_valid |-> fmt_ok)
    else $error("pixel_correction: pixel %0d overflows the data path formats", s1_addr);

endmodule
