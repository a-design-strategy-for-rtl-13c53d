# Pixel readout correction in 16-bit fixed point

An imaging focal plane array does not give the same reading for the same
light on every pixel. Each pixel has its own dark-current offset and its own
gain error. Once calibration has measured a corrective gain `A_i` and offset
`B_i` for every pixel, each raw reading `x_i` is corrected as

    y_i = A_i * x_i + B_i

This RTL does that correction in a pipelined 16-bit fixed-point data path.
There is no floating point. What makes it work is bookkeeping. Every word on
the data path has a known format that says how many of its bits are
redundant sign bits, integer bits and fraction bits. From those formats the
design works out how far to shift after the multiply and after the add, and
which bits to drop. The aim is to keep as much precision as possible without
ever overflowing. Those shift amounts are computed when the design is
elaborated, not typed in by hand.

## Sign/Integer/Fraction formats

A format `(S/I/F)` describes a two's-complement word of `S+I+F` bits. Read
from the left:

- `S` sign bits: copies of the most significant bit, so `S-1` of them are headroom.
- `I` integer bits.
- `F` fraction bits, with the binary point `F` bits from the right.

A leading `+` means the value is known to be non-negative. A format describes
where the data sits in a word. It is not a value. For example, a 12-bit ADC
count in a 16-bit word is `(+4/12/0)`.

Two rules carry a format through arithmetic. `sif_pkg` implements both:

| operation | S | I | F |
|---|---|---|---|
| `x * y` (2N-bit result) | `Sx + Sy` | `Ix + Iy` | `Fx + Fy` |
| `x + y` | `min(Sx,Sy) - 1` | `max(Ix,Iy) + 1` | `max(Fx,Fy)` |

An addition has two preconditions:

- The operands must be aligned: `Sx+Ix = Sy+Iy`, so that the binary points line up.
- Each operand must have at least two sign bits, so that a carry into the sign field cannot overflow.

`sif_pkg` also gives three helpers:

- `sif_shl`: shift left, which spends sign bits.
- `sif_drop`: truncate low bits, fraction bits first.
- `sif_asr`: arithmetic shift right, which gains sign bits and loses low bits.

## The data path, bit by bit

The default parameters give these value ranges and formats:

| signal | range | format | width |
|---|---|---|---|
| `x`, raw pixel | 0 … 4095 counts | `(+4/12/0)` | 16 |
| `A`, gain | 0.5 … 2.0 | `(+1/2/13)`, i.e. `A = gain_word / 2^13` | 16 |
| `B`, offset | −63 … 63 counts | `(11/5/0)` | 16 |
| `P_pf = x*A` | | `(+5/14/13)` | 32 |
| `P`, formatted product | | `(+2/14/0)` | 16 |
| `y_pf = P + B` | | `(+1/15/0)` | 16 |
| `y`, output | | `(+4/12/0)` | 16 |

The stages, in order:

1. **Multiply.** `gain_multiplier` forms the full 32-bit signed product. By
   the multiply rule it has five sign bits.
2. **Format the product.** The product must become a 16-bit operand that
   keeps two sign bits for the add. It is shifted left by
   `PROD_LSHIFT = 5 - HEADROOM = 3` and the lower 16 bits are dropped: `P` is
   bits `[28:13]` of `P_pf`. All 13 fraction bits are lost by truncation, so
   the result is rounded toward minus infinity. `P` is `A*x` in whole counts.
3. **Add the offset.** `P` is `(2/14/0)` and `B` is `(11/5/0)`. Both have
   `S+I = 16` and at least two sign bits, so the add is legal and its result
   is `(1/15/0)`. `offset_adder` is a plain 16-bit adder.
4. **Format the output.** The target format is the input's, `(+4/12/0)`,
   which needs three more sign bits. So `y_pf` is arithmetic-shifted right by
   `OUT_RSHIFT = 4 - 1 = 3`.

Step 4 drops three *integer* bits, not fraction bits. So the data path
computes

    y = floor( (A*x + B) / 8 )

The output keeps the raw pixel's format, but its scale is one eighth of
`A*x + B`. The shift of three is deliberate. The largest corrected value,
2·4095 + 63 = 8253, needs 14 bits. The input format has room for only 12, so
the result is scaled back into that format. To keep the full `y_pf` instead,
set `Y_FMT` to `(1/15/0)`: the derived output shift then becomes 0.

`correction_datapath` holds steps 1–4 and derives both shift amounts from
the format parameters. It stops elaboration with an `$error` in these cases:

- a format does not span `DATA_W` bits;
- the product cannot spare the requested headroom;
- the formatted product and the offset are not aligned;
- an adder operand has fewer than two sign bits;
- `Y_FMT` cannot be reached from `y_pf` by a right shift.

To retarget the data path to other ranges, change the format parameters.
Do not edit the shift amounts.

## Overflow: guaranteed by the formats, checked at run time

For operands inside their formats nothing can overflow:

- `|x*A| ≤ 8190 < 2^14`;
- `|P + B| ≤ 8253 < 2^15`;
- the raw product is below `2^28`, so the three bits shifted out are sign copies.

If operands break their formats anyway, the hardware wraps around and does
not saturate. `correction_datapath` sets its `fmt_ok` output low in two
cases:

- a bit shifted out of the product is not a sign copy;
- an adder operand has lost its second sign bit.

`pixel_correction` asserts `fmt_ok` for every valid pixel
(`a_headroom`), so a bad calibration entry shows up in simulation.

## Pipeline and interfaces (`pixel_correction`)

```
 in_valid/in_addr/in_x ──► calibration_memory read ──► s1 regs ──► correction_datapath ──► out regs
 cal_we/addr/gain/offset ─► calibration_memory write
```

- **Calibration phase.** Write one pixel's gain and offset per clock with
  `cal_we`, `cal_addr`, `cal_gain` and `cal_offset`. Nothing here estimates
  the gains and offsets. They come from outside, for example from a
  processor that has looked at dark and flat-field frames.
- **Operation phase.** Present a raw pixel with `in_valid`, its index
  `in_addr` and its value `in_x`. Pixels may come one per clock, in any
  order, with gaps.
  - Cycle 1: the memory reads `A_i` and `B_i` while `x_i` and the index are registered.
  - Cycle 2: the combinational data path computes `y`, which is registered.
  - `out_valid`, `out_addr` and `out_y` follow `in_valid` by exactly 2 clocks.
- **Reset.** `rst_n` is asynchronous and active low. It clears the valid
  flags and output registers, not the memory.
- **`calibration_memory`.** It holds `NPIX` entries of `{gain, offset}`.
  - It has one write port and one synchronous read port with one clock of latency.
  - Its read outputs hold while `re` is low.
  - A read of the address being written in the same cycle returns the old entry.

Parameters of `pixel_correction`:

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 16 | data path word width |
| `NPIX` | 4096 | pixels, i.e. calibration entries |
| `X_FMT`, `A_FMT`, `B_FMT` | `(4/12/0)`, `(1/2/13)`, `(11/5/0)` | operand formats |
| `HEADROOM` | 2 | sign bits kept on the formatted product |
| `Y_FMT` | `X_FMT` | output format |

## What is the method's and what is this design's own

These follow the published fixed-point method:

- the format notation and its two propagation rules;
- the data path order: multiply, format, add, format;
- the operand formats and the 16-bit widths;
- the two-sign-bit headroom before the add;
- the left shift of 3 with truncation of the low 16 bits;
- the arithmetic right shift of 3.

These are choices of this implementation:

- Deriving the shifts from the formats at elaboration, instead of fixing them.
- The two-stage pipeline, the valid/index handshake and the latency of 2.
- The calibration memory's size, its two ports and synchronous read.
  `NPIX = 4096` is arbitrary: size it to the sensor.
- Wrap-around on overflow, the `fmt_ok` flag and its assertion.
- Truncation everywhere. No rounding is applied, because none is specified.
- The "known positive" `+` in a format is documentation only. `sif_fmt_t`
  does not carry it, and it changes no rule.

Not included:

- The calibration procedure that estimates `A_i` and `B_i`.
- The sensor and its ADC.

## Files

| file | contents |
|---|---|
| `rtl/sif_pkg.sv` | format type and propagation rules |
| `rtl/gain_multiplier.sv` | signed W×W→2W multiplier |
| `rtl/offset_adder.sv` | W-bit adder |
| `rtl/correction_datapath.sv` | the arithmetic, derived shifts and headroom flag |
| `rtl/calibration_memory.sv` | per-pixel gain/offset store |
| `rtl/pixel_correction.sv` | top: memory, pipeline, data path |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_sif_pkg` |

## Verification

Every testbench compares the hardware against an independent reference and
ends by printing `TB_RESULT checks=N failures=M`.

- **`tb_pixel_correction`** runs the top at its default parameters.
  1. It calibrates all 4096 pixels with random gains in [0.5, 2.0] and
     offsets in [−63, 63]. Corner pixels sit at the ends of both ranges.
  2. It streams a full frame back to back in readout order.
  3. It recalibrates a quarter of the array.
  4. It streams a second frame in random order with idle gaps.

  Each output is checked against `floor((A*x + B)/8)`, computed in
  double-precision real arithmetic, together with its pixel index and its
  arrival exactly 2 clocks after the input. The test counts these cases and
  fails if any count is zero: product truncation, output truncation, a
  negative sum, gain below and above one, back-to-back pixels, gaps, and
  recalibration.
- **`tb_correction_datapath`** checks the same formula for random in-range
  operands. It also checks that `fmt_ok` drops for operands outside their
  formats.
- **The multiplier, adder and memory tests** check products, sums (including
  wrap-around), read latency, hold, and read-during-write.

Simulate any testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sif_pkg.sv tb/tb_pixel_correction.sv \
          --top-module tb_pixel_correction -o sim
./obj_dir/sim
```

Replace `tb_pixel_correction` with any other `tb_*` name. Every testbench
finishes in well under a second.
