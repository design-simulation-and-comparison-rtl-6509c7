# 64-point radix-4 FFT, 256 bits in, 512 bits out

This is a fully combinational 64-point fast Fourier transform. It takes 64
four-bit samples as one 256-bit word and returns all 64 frequency points as
one 512-bit word. It uses the radix-4 decimation-in-time (DIT) algorithm.
Writing the length as 64 = 4^3 gives three butterfly stages instead of the
six a radix-2 FFT needs. It also needs 144 complex twiddle multipliers where
radix-2 needs 192, i.e. 75 %. The twiddle factors come in on a second
256-bit input, so the same logic works with any table of them.

The structure, the port widths and the absence of a clock follow the
article "Design, Simulation and Comparison of 256-Bits 64-Points Radix-4
and Radix-2 Algorithms" (G. Sudha Kiran, P. Brundavani). The article does
not give the number formats, the twiddle-word layout, the internal width or
the output scaling, so this design chooses them. They are listed under
[Choices this design makes](#choices-this-design-makes).

## The algorithm as wired

The DFT `X(k) = sum_n x(n) W^(nk)`, with `W = exp(-j 2 pi / 64)`, is split
by time index modulo 4:

```
X(k) = F0(k) + W^k F1(k) + W^2k F2(k) + W^3k F3(k),   Fr = 16-point DFT of x(4n + r)
```

`Fr` repeats with period 16. So for `k = 0..15` and `q = 0..3`:

```
X(k + 16q) = sum_r (-j)^(r q) * W^(r k) * Fr(k)
```

This is exactly one radix-4 butterfly per `k`. Its inputs 1, 2 and 3 are
multiplied by `W^k`, `W^2k` and `W^3k`. Its four outputs go to
`X(k)`, `X(k+16)`, `X(k+32)` and `X(k+48)`.

Each 16-point DFT is split the same way again, into two stages of four
butterflies:

* **Stage A.** Butterfly `g` takes `x(g)`, `x(g+4)`, `x(g+8)` and
  `x(g+12)` of its sub-sequence. Every twiddle is 1. This is the digit
  reversal a DIT flow needs, and it is done purely by wiring.
* **Stage B.** Butterfly `q` takes output `q` of every stage-A butterfly.
  It uses twiddles `W16^(g q) = W^(4 g q)` and delivers `X(q)`, `X(q+4)`,
  `X(q+8)` and `X(q+12)`.

Over the whole design there are three stages of 16 butterflies each:

| stage | spans (in digit-reversed order) | twiddle exponents (of W = W64) | where in the RTL |
|---|---|---|---|
| 1 | 1  | 0 | `fft16_r4.g_stage_a`, in each of the four `fft16_r4` |
| 2 | 4  | 4·g·q, g = 1..3, q = 0..3 | `fft16_r4.g_stage_b` |
| 3 | 16 | r·k, r = 1..3, k = 0..15 (up to 45) | `fft64_r4.g_comb` |

Inputs and outputs are both in natural order.

### The butterfly

`r4_butterfly` first forms `a = x0`, `b = W1·x1`, `c = W2·x2` and
`d = W3·x3`. It then computes the 4-point DFT of them:

```
y0 = a +  b + c +  d
y1 = a - jb - c + jd
y2 = a -  b + c -  d
y3 = a + jb - c - jd
```

Multiplying by ±j only swaps the real and imaginary parts and negates one,
so it costs adders only. The article's butterfly drawing puts a twiddle on
every output (the decimation-in-frequency form). The DIT equation above
needs the twiddles on inputs 1 to 3, and that is where they are here.

## Twiddle input: 16 values for 46 exponents

The `tf` input holds `tf[k] = W^k` for `k = 0..15`: sixteen complex values
of 8 + 8 bits, which is 256 bits. The stages need exponents up to 45.
`twiddle_sel` derives them from quarter-turn symmetry:

```
W^(e + 16) = -j * W^e
```

The low four bits of the exponent select a table entry. The top two bits
turn it by 0, 1, 2 or 3 quarter turns (a swap and a negation). All
exponents are constants at elaboration, so after synthesis each selector
reduces to wiring, plus a negation where the rotation needs one.

The standard table is `tf[k].re = round(64 cos(2πk/64))` and
`tf[k].im = round(-64 sin(2πk/64))`. Every testbench computes it this way.
Entries must lie in −64..64, so that negating them cannot overflow.
Another table, for example a scaled one, gives a correspondingly weighted
transform.

## Number formats

| quantity | format |
|---|---|
| input sample `a[n]` | 4-bit two's complement, −8..7 |
| twiddle part | 8-bit two's complement, 6 fraction bits (1.0 = 64) |
| internal value, per real/imag part | 16-bit two's complement, integer |
| twiddle product (`cmul`) | `(v·w + 32) >>> 6`: rounded half up, back to 16 bits |
| output point `x[k]` | `{re[3:0], im[3:0]}`, each part `X(k)/64` rounded half up, saturated to −8..7 |

Sums are never rounded; only the twiddle products are. With 4-bit inputs,
an internal value stays below about 1450 in magnitude, so 16 bits cannot
overflow.

The output is the spectrum divided by the length (64). That is the average
amplitude per frequency, and it fits the 4-bit parts the 8-bit output point
allows. `OUT_SHIFT` (default 6) sets the divisor.

With 4-bit inputs only the positive limit can be exceeded. The only case is
`X(32) = 480` for the sequence +7, −8, +7, … : 7.5 rounds up to 8 and
saturates to 7. The most negative result, `X(0) = −512`, gives exactly −8.
Because of the coarse output, most points of a random input come out as 0
or ±1. The full-precision values exist inside, on `xf` in `fft64_r4`, if a
wider output is wanted.

## Interface and timing

```systemverilog
module fft64_r4 #(parameter int unsigned OUT_SHIFT = 6) (
  input  fft_pkg::sample_t   [63:0] a,   // a[n] = x(n), bits 4n+3:4n
  input  fft_pkg::tw_table_t        tf,  // tf[k] = W64^k, k = 0..15
  output fft_pkg::opoint_t   [63:0] x    // x[k] = {re, im} of X(k)/64
);
```

There is no clock, no reset and no state. The outputs follow the inputs
after the delay of three butterfly stages. Each butterfly stage is one
twiddle multiply and two adder levels. The article reports 1024 I/O pins
(256 + 256 + 512) for its design and no flip-flops, which this interface
reproduces. That many pins exceed a small FPGA's pad count. In a larger
system the block is meant to be embedded, or registers added around it.

Point 0 of the input is the least significant nibble of `a`. A vector
written in the article's bit order `A(0:255)`, with point 0 leftmost, must
be nibble-reversed first.

## Files

| file | content |
|---|---|
| `rtl/fft_pkg.sv` | sizes, number formats, `cplx_t`, `tw_t`, `opoint_t`, `tw_table_t` |
| `rtl/twiddle_sel.sv` | W64^e from the 16-entry table |
| `rtl/cmul.sv` | complex data × twiddle, rounded |
| `rtl/r4_butterfly.sv` | radix-4 DIT butterfly |
| `rtl/fft16_r4.sv` | 16-point DFT, two radix-4 stages |
| `rtl/fft64_r4.sv` | top: four 16-point DFTs, combining stage, output scaling |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_fft64_ramp.sv` | the ramp workload: prints all 64 outputs |

## Verification

Every testbench checks its results against values it computes itself and
ends with a line `TB_RESULT checks=N failures=M`:

* **`tb_twiddle_sel`** checks all 64 exponents against rounded cos/sin, for
  two table amplitudes.
* **`tb_cmul`** checks corner and 2000 random operands against the exact
  product, rounded half up.
* **`tb_r4_butterfly`** compares against a real-valued 4-point DFT. With
  unit twiddles the result must be exact. Otherwise it must be within 1.5
  per part, since three products are each rounded.
* **`tb_fft16_r4`** compares against a direct 16-point DFT. Outputs that
  use only unit twiddles must be exact. The others must stay within a
  computed error budget for rounding and twiddle quantisation.
* **`tb_fft64_r4`** tests the top at its default parameters with 162
  vectors: impulses, constants, tones, the alternating sequence, the ramp,
  a square wave and random data. Each output is checked in two ways:
  * bit for bit against an independent in-place iterative radix-4 model
    (digit-reversed load, passes of span 1, 4 and 16);
  * within 0.75 of the exact DFT/64.

  The testbench also requires that output saturation and the rotated
  twiddles each occurred at least once.
* **`tb_fft64_ramp`** runs the ramp 0, 1, …, 15 repeated four times.

For each module, a copy with one deliberate error was run against its
testbench, and every one of those testbenches failed.

To run a testbench with Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_fft64_r4 \
    rtl/fft_pkg.sv rtl/twiddle_sel.sv rtl/cmul.sv rtl/r4_butterfly.sv \
    rtl/fft16_r4.sv rtl/fft64_r4.sv tb/tb_fft64_r4.sv
./obj_dir/Vtb_fft64_r4
```

Building the top takes about a minute. Simulating takes well under a second.

## Choices this design makes

These are decisions of this RTL, not of the article:

* **Twiddle word.** The article gives a 256-bit twiddle input but not its
  layout. Here it is 16 complex values of 8 + 8 bits (Q1.6), extended to
  all 64 exponents by rotation.
* **Output point.** The article gives an 8-bit output point made of two
  parts. Here it is read as 4-bit real and 4-bit imaginary, scaled by
  1/64, rounded and saturated.
* **Input samples** are taken as two's complement.
* **Internal width** (16 bits per part) and **rounding** (half up, after
  each twiddle product only) are chosen here.
* **Twiddle placement.** Twiddles sit on the butterfly inputs (DIT
  equation), not on the outputs as in the article's butterfly drawing.
* **Combinational.** The article's conclusion calls its design pipelined.
  Its implementation table lists no flip-flops and counts exactly the data
  and twiddle pins, so this RTL is combinational, with no registers.
* **Unit twiddles.** The stage-1 butterflies and the exponent-0 positions
  of the later stages still go through a multiplier, fed by `tf[0]`. A
  size-optimised version would bypass these 63 multipliers.
* **Reference waveforms.** The article's waveform values are not
  reproduced. Its twiddle encoding and scaling are not stated, so the
  outputs of this design for the same ramp input differ from them.
* **No radix-2 design.** The 64-point radix-2 FFT, which the article only
  uses for comparison, is not part of this RTL.
