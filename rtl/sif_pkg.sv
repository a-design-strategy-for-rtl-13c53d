// sif_pkg: Sign/Integer/Fraction (SIF) number formats and the rules that
// propagate them through arithmetic.
//
// A fixed-point word of S+I+F bits is split, from the left, into S sign bits
// (copies of the most significant bit), I integer bits and F fraction bits;
// the binary point sits F bits from the right. The format describes where the
// data lies in a word, not a value. The functions below give the format of a
// result from the formats of its operands, so that a data path can work out
// at elaboration time how far to shift each intermediate value:
//   multiplication  S = Sx+Sy,          I = Ix+Iy,          F = Fx+Fy
//   addition        S = min(Sx,Sy)-1,   I = max(Ix,Iy)+1,   F = max(Fx,Fy)
// Addition needs both operands aligned (Sx+Ix = Sy+Iy) and at least two sign
// bits each, so that a carry into the sign field cannot overflow.
// The two rules above follow the SIF method; the shift/truncate helpers and
// the field types are this design's own.
package sif_pkg;

  typedef struct packed {
    int s;   // sign bits
    int i;   // integer bits
    int f;   // fraction bits
  } sif_fmt_t;

  function automatic sif_fmt_t sif(int s, int i, int f);
    sif_fmt_t r;
    r.s = s; r.i = i; r.f = f;
    return r;
  endfunction

  function automatic int sif_width(sif_fmt_t x);
    return x.s + x.i + x.f;
  endfunction

  function automatic sif_fmt_t sif_mul(sif_fmt_t x, sif_fmt_t y);
    return sif(x.s + y.s, x.i + y.i, x.f + y.f);
  endfunction

  function automatic sif_fmt_t sif_add(sif_fmt_t x, sif_fmt_t y);
    return sif(((x.s < y.s) ? x.s : y.s) - 1,
               ((x.i > y.i) ? x.i : y.i) + 1,
               (x.f > y.f) ? x.f : y.f);
  endfunction

  // Shift left by n: n redundant sign bits leave, n zero fraction bits enter.
  function automatic sif_fmt_t sif_shl(sif_fmt_t x, int n);
    return sif(x.s - n, x.i, x.f + n);
  endfunction

  // Drop the n least significant bits: fraction bits first, then integer bits.
  function automatic sif_fmt_t sif_drop(sif_fmt_t x, int n);
    if (n <= x.f) return sif(x.s, x.i, x.f - n);
    return sif(x.s, x.i - (n - x.f), 0);
  endfunction

  // Arithmetic shift right by n, keeping the word width: n sign bits enter
  // on the left, the n least significant bits leave.
  function automatic sif_fmt_t sif_asr(sif_fmt_t x, int n);
    sif_fmt_t r;
    r = sif_drop(x, n);
    r.s = r.s + n;
    return r;
  endfunction

endpackage
