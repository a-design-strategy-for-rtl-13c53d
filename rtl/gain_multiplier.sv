// gain_multiplier: the multiplier of the pixel-correction data path.
//
// Multiplies the raw pixel x by its gain A, both W-bit two's-complement words,
// and returns the full 2W-bit raw product P_pf. Nothing is dropped here: with
// x in (+4/12/0) and A in (+1/2/13) the product is in (+5/14/13), and the
// product_format stage that follows decides which 16 bits to keep.
// Purely combinational. The full-width signed product follows the method;
// using a single '*' operator (leaving the multiplier architecture to
// synthesis) is this design's choice.
module gain_multiplier #(
  parameter int W = 16
) (
  input  logic signed [W-1:0]   a,   // pixel x
  input  logic signed [W-1:0]   b,   // gain A
  output logic signed [2*W-1:0] p    // raw product P_pf
);

  always_comb p = (2*W)'(a) * (2*W)'(b);

endmodule
