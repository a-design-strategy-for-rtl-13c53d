// calibration_memory: per-pixel gain and offset store.
//
// One entry per pixel holds the corrective gain A_i and offset B_i, each a
// W-bit word. The calibration phase writes entries through the write port;
// the operation phase reads the entry of each incoming pixel through the
// read port. Reads are synchronous: rgain/roffset show the entry addressed
// by raddr one clock after re is high, and hold otherwise. A read of the
// address written in the same cycle returns the old entry.
// Timing: one write and one read per clock. That the design keeps the gain
// and offset of each pixel in a memory follows the method; size, the two
// ports, synchronous read and no reset of the contents are this design's
// choices.
module calibration_memory #(
  parameter int NPIX = 4096,
  parameter int W    = 16,
  localparam int AW  = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wgain,
  input  logic [W-1:0]  woffset,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rgain,
  output logic [W-1:0]  roffset
);

  logic [2*W-1:0] mem [NPIX];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= {wgain, woffset};
  end

  always_ff @(posedge clk) begin
    if (re) {rgain, roffset} <= mem[raddr];
  end

endmodule
