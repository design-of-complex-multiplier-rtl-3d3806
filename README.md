# Vedic-multiplier complex multiplication for an 8-point FFT

Complex multiplication, `(a + jb)(c + jd) = (ac - bd) + j(ad + bc)`, is
the costly step of every FFT butterfly. This design builds the four real
products from **Vedic multipliers**. A Vedic multiplier uses the
*Urdhva Tiryagbhyam* ("vertically and crosswise") rule: it makes every
one-bit partial product at once and then adds them in columns. Wide
multipliers come from narrow ones by divide and conquer. The complex
multiplier then drives the twelve butterflies of a fully parallel,
pipelined 8-point radix-2 FFT.

The design has three parts:

| unit | module | what it is |
|---|---|---|
| 8-point FFT | `fft8` | 3 stages × 4 butterflies, a register after each stage, one frame per clock, latency 3 |
| stand-alone Vedic multiplier | `vedic_multiplier` | 8 × 8 → 16 bits, unsigned, registered operands |
| stand-alone complex multiplier | `cmplx_mul` | 8-bit signed parts → 17-bit parts, combinational |

`vedic_fft_top` puts the three units side by side. They share only the clock
and reset.

## Multipliers, bottom up

### The 2 × 2 Urdhva cell (`vedic_mul2`)

For `a = a1a0` and `b = b1b0` the product is formed column by column:

```
column 0  vertical   a0·b0                  -> p0
column 1  crosswise  a1·b0 + a0·b1          -> p1, carry c1
column 2  vertical   a1·b1 + c1             -> p2, carry -> p3
```

The cell is four AND gates and two half adders.

### Divide and conquer (`vedic_mul`, W × W, unsigned)

Split both operands into high and low halves of `H = W/2` bits. Then

```
p = ll + ((lh + hl) << H) + (hh << W)
```

where `ll = aL·bL` and `hh = aH·bH` are the vertical products, and
`lh = aL·bH` and `hl = aH·bL` are the crosswise ones. Each half product is
itself built the same way, down to the 2 × 2 cells.

The module is a non-recursive generate tree, written bottom up:

- Level 1 holds `(W/2)²` 2 × 2 cells.
- Block `(i, j)` of level `v` multiplies `a[2^v·i +: 2^v]` by
  `b[2^v·j +: 2^v]`.
- It combines four blocks of level `v-1` with the formula above.
- Level `log2 W` is the result.

`W` must be a power of two. The default is 8. The adders are word-level `+`
and are left to synthesis to map.

### Registered multiplier (`vedic_multiplier`)

The operands `x` and `y` are captured in `xreg` and `yreg` on each rising
edge. The product `p = xreg · yreg` is combinational, so it appears one
clock after its operands. Example: `00101000 × 00010100` (40 × 20) gives
`0000001100100000` (800).

### Signed multiplication (`vedic_smul`)

FFT data are signed, but the Vedic core is unsigned. `vedic_smul` works in
sign-magnitude:

1. Take the magnitudes of both operands.
2. Multiply them in `vedic_mul`.
3. Negate the product when the signs differ.

The magnitude of the most negative W-bit value (2^(W-1)) still fits in W
unsigned bits, and the largest product fits in 2W signed bits. The result is
therefore exact for every operand pair.

### Complex multiplier (`cmplx_mul`)

Four `vedic_smul` instances form `ac`, `bd`, `ad` and `bc` in parallel. A
subtractor gives `re = ac − bd` and an adder gives `im = ad + bc`. The
results have 2W+1 bits, so neither can overflow.

## Number format and butterflies

- **Samples** have 16-bit signed real and imaginary parts (`DW = 16`). An
  output line packed as a 32-bit word `{re, im}` is the format used in the
  reference results below.
- **Twiddles** are `W8^k = exp(−j2πk/8)`, k = 0..3. They are 12-bit signed
  numbers with 10 fractional bits (Q10). 1.0 is 1024 and 1/√2 is 724.
  `twiddle_rom` computes these at elaboration, so no table file is needed.
- **Products.** The twiddle is sign-extended to 16 bits and multiplied in a
  16-bit `cmplx_mul`, which uses four 16 × 16 Vedic multipliers. The 33-bit
  result is shifted right arithmetically by 10. This truncates towards minus
  infinity. The result is kept to 16 bits.
- **Sums and differences** wrap in 16 bits. No stage scales its results.
  The DC output is therefore the plain sum of the inputs, and the caller must
  leave headroom. If the magnitudes of all 16 input parts add up to less
  than 2^15/√2, nothing can wrap.

`butterfly` has two forms, chosen by the parameter `DIF`:

| | first output | second output |
|---|---|---|
| DIT (`DIF=0`) | `a + W·b` | `a − W·b` |
| DIF (`DIF=1`, default) | `a + b` | `(a − b)·W` |

Every butterfly goes through the complex multiplier, including those whose
twiddle is 1 (`W8^0`) or −j (`W8^2`). With Q10 twiddles these two products
are exact.

## The FFT and its line ordering

`fft8` is the radix-2 signal flow graph cast directly in hardware. The ports
`x_re/x_im[0..7]` are the graph's input lines, top to bottom, and
`y_re/y_im[0..7]` are its output lines. The two forms differ in which side
is bit-reversed:

| | input lines `x[0..7]` | stage s pairs line i with | twiddle of pair j | output lines `y[0..7]` |
|---|---|---|---|---|
| DIF (default) | x(0) x(1) … x(7) | i + (4 >> s) | W8^(j·2^s) | X0 X4 X2 X6 X1 X5 X3 X7 |
| DIT | x(0) x(4) x(2) x(6) x(1) x(5) x(3) x(7) | i + 2^s | W8^(j·4/2^s) | X0 X1 … X7 |

Here s = 0, 1, 2 is the stage, and j is the position of the pair within its
group of the stage. The hardware does no reordering. In the default DIF
form, output line `i` carries `X(bitrev3(i))`.

**Timing.** Each stage is combinational and ends in a register. A frame
presented with `in_valid = 1` at a rising edge comes out on `y` with
`out_valid = 1` exactly three rising edges later. A new frame can enter on
every clock, so up to three frames are in flight. `in_valid` may drop
between frames. `y` holds its last value while `out_valid` is low. There is
no back-pressure.

**Reset.** `rst` is synchronous and active high. It clears all stage
registers and the valid pipeline, so frames in flight are discarded.

### Reference frame

The input `x(n) = (n+1)(1+j)`, n = 0..7, gives these outputs in the default
configuration:

| line | X(k) | re | im | 32-bit `{re,im}` |
|---|---|---|---|---|
| 0 | X0 | 36 | 36 | 2359332 |
| 1 | X4 | −4 | −4 | −196612 |
| 2 | X2 | −8 | 0 | −524288 |
| 3 | X6 | 0 | −8 | 65528 |
| 4 | X1 | −14 | 5 | |
| 5 | X5 | −2 | −5 | |
| 6 | X3 | −5 | −2 | |
| 7 | X7 | 5 | −14 | |

The first four words match the published simulation exactly. For lines 4–7
the published results were −5800+5792j, 5784−5792j, 5792−5800j and
−5792+5784j. Those values fit twiddle products that were never scaled back
by 2^10, and X3 and X7 swapped. This design rescales the products, so its
lines 4–7 are the true DFT values to within truncation. The exact values are
−13.66+5.66j, −2.34−5.66j, −5.66−2.34j and 5.66−13.66j.

## Top level (`vedic_fft_top`)

| ports | unit |
|---|---|
| `clk`, `rst` | shared clock and synchronous active-high reset |
| `fft_in_valid`, `fft_x_re[8]`, `fft_x_im[8]`, `fft_out_valid`, `fft_y_re[8]`, `fft_y_im[8]` | `fft8` |
| `mul_x`, `mul_y` (8 bits), `mul_p` (16 bits) | `vedic_multiplier` |
| `cm_a`, `cm_b`, `cm_c`, `cm_d` (8 bits, signed), `cm_re`, `cm_im` (17 bits, signed) | `cmplx_mul` |

Parameters and their defaults:

- `DW = 16`: sample width. It must be a power of two because it sizes the
  Vedic multipliers.
- `TW = 12`, `TW_FRAC = 10`: twiddle width and fraction bits.
- `FFT_DIF = 1`: DIF (1) or DIT (0) flow graph.
- `MW = 8`: width of the stand-alone multipliers. It must be a power of two.

The shared defaults are in `vedic_fft_pkg`.

## What follows the original design and what does not

**Taken from the original design:**

- The Urdhva Tiryagbhyam multiplication with divide and conquer.
- The 8-bit registered Vedic multiplier with registers `xreg` and `yreg`.
- The complex-multiplier structure: four multipliers, one subtractor, one
  adder.
- The 8-point radix-2 FFT, with the DIF form as the one implemented and the
  DIT form as the one drawn. Both are available here.
- The 16-bit real and imaginary output parts.
- The output order and values of the reference frame, lines 0–3.

**Choices of this design:**

- The Q10 twiddle format. It is inferred from the published output
  magnitudes.
- Rescaling of twiddle products, with truncation.
- Wrap-around arithmetic with no stage scaling.
- The sign-magnitude signed wrapper.
- Operand width of the stand-alone complex multiplier (8 bits).
- The fully parallel organisation with one register per stage, and the
  `in_valid` / `out_valid` handshake.
- The synchronous active-high reset.
- The use of plain word-level adders inside the Vedic multiplier.

**Not included:**

- The Booth multiplier and the Booth complex multiplier. They are
  comparison baselines only.
- A debug signal (`dup1`) of unknown function that appears in the
  multiplier's simulation.
- Area, speed and power figures. These were measured on an FPGA flow and are
  not reproduced by this RTL.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The FFT benches import the reference
models in `tb/fft_ref_pkg.sv`:

- a bit-exact fixed-point flow graph;
- the exact DFT in `real` arithmetic.

To build and run the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vedic_fft_pkg.sv tb/fft_ref_pkg.sv tb/vedic_fft_top_tb.sv \
    --top-module vedic_fft_top_tb -o sim
./obj_dir/sim
```

Use the same command with another `*_tb` for a single unit:

| testbench | what it checks |
|---|---|
| `vedic_mul2_tb` | 2 × 2 cell, exhaustively |
| `vedic_mul_tb` | W = 2, 4 and 8 exhaustively; W = 16 with random operands |
| `vedic_multiplier_tb` | reset, one-clock latency, 40 × 20 |
| `vedic_smul_tb` | signed, exhaustively at 8 bits |
| `cmplx_mul_tb` | corner and random operands at 8 and 16 bits |
| `twiddle_rom_tb` | Q10 and Q14 tables |
| `butterfly_tb` | both forms against the model |
| `fft8_tb` | DIF and DIT side by side: latency, streaming, gaps, reset |
| `vedic_fft_top_tb` | everything, at the default parameters |

The top-level test runs in well under a second.
