// correction_datapath: the fixed-point arithmetic of pixel correction,
// y = format(format(x * A) + B), in DATA_W-bit words.
//
// Formats in Sign/Integer/Fraction notation (see sif_pkg), with the defaults:
//     x    (+4/12/0)   raw 12-bit pixel count
//     A    (+1/2/13)   gain, 0.5 .. 2.0
//     B    (11/5/0)    offset, -63 .. 63 counts
//     P_pf (+5/14/13)  raw 32-bit product x*A
//     P    (+2/14/0)   P_pf shifted left PROD_LSHIFT=3, lower 16 bits dropped
//     y_pf (+1/15/0)   P + B
//     y    (+4/12/0)   y_pf arithmetic-shifted right OUT_RSHIFT=3
// The two shift amounts are derived at elaboration from the formats with the
// SIF rules: the product keeps HEADROOM sign bits for the addition, and the
// output gets as many sign bits as Y_FMT asks for. Elaboration stops with an
// error when the formats cannot line up. The two formatting steps are only
// bit selections (truncation drops bits, i.e. rounds toward minus infinity);
// the multiplier and the adder are separate modules. With the defaults the
// output shift drops three integer bits, so y = floor((A*x + B) / 8).
// fmt_ok is low when the operands break those rules and y has wrapped.
// Purely combinational: a pipeline register on each side is the enclosing
// design's business. The formats, the derivation of the shifts and the
// truncations follow the SIF method; wrap-around on a broken headroom rule
// is this design's choice.
module correction_datapath
  import sif_pkg::*;
#(
  parameter int       DATA_W   = 16,
  parameter sif_fmt_t X_FMT    = '{s: 4, i: 12, f: 0},
  parameter sif_fmt_t A_FMT    = '{s: 1, i: 2,  f: 13},
  parameter sif_fmt_t B_FMT    = '{s: 11, i: 5, f: 0},
  parameter int       HEADROOM = 2,
  parameter sif_fmt_t Y_FMT    = X_FMT
) (
  input  logic [DATA_W-1:0]   x,      // raw pixel
  input  logic [DATA_W-1:0]   gain,   // A
  input  logic [DATA_W-1:0]   offset, // B
  output logic [DATA_W-1:0]   y,      // corrected pixel
  output logic                fmt_ok  // headroom rules held for these operands
);

  // ---------------------------------------------------------------------
  // Formats along the data path, from the SIF rules
  // ---------------------------------------------------------------------
  localparam int       PROD_W      = 2 * DATA_W;
  localparam sif_fmt_t P_PF_FMT    = sif_mul(X_FMT, A_FMT);
  localparam int       PROD_LSHIFT = P_PF_FMT.s - HEADROOM;
  localparam sif_fmt_t P_FMT       = sif_drop(sif_shl(P_PF_FMT, PROD_LSHIFT),
                                              PROD_W - DATA_W);
  localparam sif_fmt_t Y_PF_FMT    = sif_add(P_FMT, B_FMT);
  localparam int       OUT_RSHIFT  = Y_FMT.s - Y_PF_FMT.s;

  if (sif_width(X_FMT) != DATA_W || sif_width(A_FMT) != DATA_W ||
      sif_width(B_FMT) != DATA_W || sif_width(Y_FMT) != DATA_W) begin : g_chk_width
    $error("correction_datapath: every format must span DATA_W bits");
  end
  if (PROD_LSHIFT < 0 || PROD_LSHIFT > DATA_W) begin : g_chk_headroom
    $error("correction_datapath: product sign bits do not allow HEADROOM");
  end
  if (P_FMT.s + P_FMT.i != B_FMT.s + B_FMT.i || P_FMT.f != B_FMT.f) begin : g_chk_align
    $error("correction_datapath: formatted product and offset are not aligned");
  end
  if (P_FMT.s < 2 || B_FMT.s < 2) begin : g_chk_sign
    $error("correction_datapath: addition needs two sign bits on each operand");
  end
  if (OUT_RSHIFT < 0 || sif_asr(Y_PF_FMT, OUT_RSHIFT) != Y_FMT) begin : g_chk_out
    $error("correction_datapath: output format is not reachable by a right shift");
  end

  logic [PROD_W-1:0] p_pf;
  logic [DATA_W-1:0] p, y_pf;

  // ---------------------------------------------------------------------
  // x * A
  // ---------------------------------------------------------------------
  gain_multiplier #(.W(DATA_W)) u_mul (
    .a (x),
    .b (gain),
    .p (p_pf)
  );

  // Product format: shift left PROD_LSHIFT, keep the upper DATA_W bits.
  always_comb p = p_pf[PROD_W-1-PROD_LSHIFT -: DATA_W];

  // ---------------------------------------------------------------------
  // P + B, then output format
  // ---------------------------------------------------------------------
  offset_adder #(.W(DATA_W)) u_add (
    .a   (p),
    .b   (offset),
    .sum (y_pf)
  );

  // Output format: arithmetic shift right OUT_RSHIFT.
  always_comb y = DATA_W'($signed(y_pf) >>> OUT_RSHIFT);

  // Headroom rules: the bits the product format shifts out are copies of the
  // sign bit, and both adder operands keep two sign bits.
  always_comb
    fmt_ok = (p_pf[PROD_W-1 -: PROD_LSHIFT+1] == '0 ||
              p_pf[PROD_W-1 -: PROD_LSHIFT+1] == '1) &&
             p[DATA_W-1] == p[DATA_W-2] &&
             offset[DATA_W-1] == offset[DATA_W-2];

endmodule
