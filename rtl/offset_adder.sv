// offset_adder: adds the per-pixel offset to the formatted product.
//
// W-bit two's-complement addition of the formatted product P (+2/14/0) and
// the offset B (11/5/0). Both operands are aligned (S+I = 16 for each) and
// have at least two sign bits, so the sum y_pf, in (+1/15/0), cannot
// overflow for operands in their stated formats. Should that rule be broken
// the sum wraps around; the enclosing data path asserts the rule.
// Purely combinational. The addition and its formats follow the method; the
// wrap-around behaviour is this design's choice.
module offset_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,     // formatted product P
  input  logic [W-1:0] b,     // offset B
  output logic [W-1:0] sum    // pre-formatted output y_pf
);

  always_comb sum = a + b;

endmodule
