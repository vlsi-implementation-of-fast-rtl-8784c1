# 1024-point pipelined FFT for an OFDM receiver

An OFDM receiver has to turn every block of N time samples into N
sub-carrier values, continuously, one sample per clock. This design does it
with a single-path delay-feedback (SDF) pipeline: ten radix-2 butterfly
stages in a row, each with a feedback memory, so that one complex sample
enters and one transform result leaves every clock, with no gap between
frames and only ten butterflies and four complex multipliers in total.

Most of the area of such a pipeline is its feedback memory, and three
quarters of that memory sits in the first two stages (512 + 256 of 1023
words). The design exploits the fact that the receiver FFT sees a small
input alphabet (64 different complex values): the first stages store short
integer words and only widen as the butterflies need, instead of carrying
the full datapath word from the first stage on.

## The delay-feedback stage

Everything rests on one kind of stage (`sdf_stage`): a butterfly and a
memory of D words that feeds back into it. The input stream is cut into
blocks of 2D samples.

```
 position in block      0 .. D-1                    D .. 2D-1
 butterfly select       0 (pass)                    1 (compute)
 memory receives        the input x[p]              x[p-D] - x[p]
 stage output           memory (last block's diff.) x[p-D] + x[p]
```

In the first half the new samples are parked in the memory while the
differences left there by the previous block drain to the output. In the
second half each arriving sample meets its partner stored D samples
earlier: the sum leaves at once, the difference goes back into the memory.
The stage output is therefore the input delayed by D, with every pair
(p, p+D) replaced by (sum, difference). Stage s of an N-point pipeline uses
D = N/2^s: 512, 256, ..., 2, 1 for N = 1024.

The butterfly comes in two types that alternate:

* `bf1` (odd stages): four multiplexers, an adder for the sum, and an adder
  fed through `map_subtractor` (a two's-complement negation) for the
  difference.
* `bf2` (even stages): the same butterfly with a -j rotator on its input,
  (re, im) -> (im, -re). The rotation is switched on for the odd-numbered
  differences coming from the preceding `bf1`, which turns each bf1/bf2
  pair into a 4-point DFT without any multiplier.

Both butterflies are combinational; the memory is a circular buffer with one
pointer and a combinational read (`fb_memory`), a plain register at depth 1.

## The chain of stages and multipliers

```
 x -> S1 -> S2 -> [W16] -> S3 -> S4 -> [W1] -> S5 -> S6 -> [W16] -> S7 -> S8 -> [W2] -> S9 -> S10 -> X
      512   256             128   64           32    16            8     4            2     1
      bf1   bf2             bf1   bf2          bf1   bf2           bf1   bf2          bf1   bf2
```

Stages 1-4 compute 16-point transforms over inputs 64 apart, stages 5-8
16-point transforms over inputs 4 apart, stages 9-10 the final 4-point
transforms. Inside a group of four stages the two bf1/bf2 pairs are joined by
a multiplication by W_16^e (`const_mult`); between groups a full twiddle
multiplication (`twiddle_mult`) is needed. With `pos` the frame position of
the word (0..1023, natural order) the factors are:

| multiplier | after stage | factor | exponent |
|---|---|---|---|
| W16 constant | 2, 6 | W_16^(a2*c1) | a2 = (pos/P) mod 4, c1 = bitrev2((pos/4P) mod 4) |
| W1 | 4 | W_1024^(n2*k1) | n2 = pos mod 64, k1 = bitrev4((pos/64) mod 16) |
| W2 | 8 | W_64^(n2*k1) | n2 = pos mod 4, k1 = bitrev4((pos/4) mod 16) |

where W_L = exp(-j*2*pi/L) and P = 64 after stage 2, 4 after stage 6. Only
seven constants, W_16^{0,1,2,3,4,6,9}, occur in the W16 multipliers, so they
need a ten-entry table and no coefficient memory. The W1 and W2 tables
(`twiddle_rom`, 1024 and 64 entries) are computed at elaboration:
`c_re = round(cos(2*pi*e/L) * 2^14)`, `c_im = round(-sin(2*pi*e/L) * 2^14)`.

Every stage keeps the stream in input order, so the stage that handled
position bit b leaves the corresponding frequency bit in that position: the
results leave in bit-reversed order, X[bitrev10(p)] at output position p.

The same rules build any N = 4^k with k >= 2 (groups of four stages, a last
group of four or two): N = 16, 64, 256, 1024 and 4096 have been simulated.

## Word lengths and the saved registers

Input samples are IN_W-bit signed integers per component (default 3 bits,
-4..3, i.e. 64 different complex values). Every butterfly adds one bit, so
nothing can overflow and no scaling is needed:

| point | width per component (IN_W = 3, FRAC = 6) |
|---|---|
| input of S1 / S2 | 3 / 4 (integers) |
| after S2 | 5 bits, then widened to 12: one guard bit and FRAC = 6 fractional bits |
| input of S3 ... S10 | 12 ... 19 |
| output | 20 (14 integer, 6 fractional) |

The multipliers keep the width of their input and round to nearest. The
guard bit covers the sqrt(2) by which a rotation can enlarge one component:
the largest output, |X[k]| <= 1024 * 4 * sqrt(2) ≈ 5793, fits the 14
integer bits with room to spare.

The feedback memories then hold 13,780 bits in all. Stage 1 stores
4-bit and stage 2 5-bit components (6,656 bits together); had they carried
the 13- and 14-bit words of the fractional datapath they would need 20,480
bits, and the whole pipeline about twice its present memory.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | clock, synchronous active-high reset |
| in_valid | in | 1 | accept in_re/in_im this clock; low holds the whole pipeline |
| in_re, in_im | in | IN_W | input sample, signed integer |
| out_valid | out | 1 | out_re/out_im carry a result |
| out_index | out | log2 N | frequency index k of that result |
| out_re, out_im | out | IN_W + log2 N + 1 + FRAC | X[k], FRAC fractional bits |

The transform is the unscaled forward DFT, X[k] = sum x[n] exp(-j 2 pi n k / N).
Samples of consecutive frames are streamed back to back. All timing counts
accepted samples, not clocks: the first result appears when sample number
1027 is accepted (1023 for the memories plus one for each of the four
registered multipliers), and from then on a result accompanies every
accepted sample. When in_valid is low nothing moves and out_valid is low.

The `controller` is one sample counter. Each stage and multiplier sees
words that entered a fixed number of accepted samples earlier
(`fft_pkg::stage_offset`), so its frame position is the counter minus a
constant; stage s uses bit 10-s of it as butterfly select, and a bf2 stage
rotates by -j when that bit and the next higher one are both set.

## What follows the source architecture and what is this design's own

Taken from the architecture this design implements: the SDF principle; ten
stages alternating butterfly types 1 and 2 with memories 512 ... 1; the
butterfly datapaths (multiplexers, two adders, negation in front of the
lower adder, -j rotator in front of the type-2 butterfly); multipliers after
stages 2 and 6 without coefficient stores and after stages 4 and 8 with the
stores W1 and W2; one shared controller; reduced word lengths in the first
two stages because of the small input alphabet; bit-reversed output order.

Chosen here: every word length (IN_W = 3, one bit of growth per stage, the
guard bit, FRAC = 6, 16-bit coefficients with 14 fractional bits); the
reading of the multipliers after stages 2 and 6 as W_16 constant
multipliers; the exponent rules above; rounding and the register after each
multiplier; the circular-buffer memories; the counter-based controller; the
in_valid/out_valid/out_index interface and the reset.

Departures and omissions:

* The negation in the butterfly is a true two's-complement negation. A
  one's-complement inversion without carry (which would make a - b come out
  one too small) is not used.
* The type-2 butterfly of the source carries a block called "Mapper" at its
  output whose function is not described. It is not built. The only
  re-formatting in this design is the widening after stage 2.
* The receiver around the FFT (sample capture, one- or two-tap equalizer,
  the symbol source) is not part of this RTL; the input port takes the
  symbols directly.
* Reported FPGA pin counts and power figures are not reproduced; they
  depend on a device and its tools.
* The butterflies are given with 2-bit operands and 3-bit results by
  default (their stand-alone configuration); the pipeline sets each
  stage's width itself.

## Files

`rtl/` holds one module or package per file:

| file | content |
|---|---|
| `fft_pkg.sv` | widths per stage, latency offsets, bit reversal, twiddle formulas |
| `sdf_fft.sv` | top level: stage chain, multipliers, controller |
| `sdf_stage.sv` | butterfly + feedback memory |
| `bf1.sv`, `bf2.sv` | butterflies type 1 and 2 |
| `map_subtractor.sv` | operand negation |
| `fb_memory.sv` | feedback delay memory |
| `cmult.sv` | registered complex multiplier with rounding |
| `const_mult.sv` | W_16 constant multiplier |
| `twiddle_mult.sv`, `twiddle_rom.sv` | twiddle multiplier and its table |
| `controller.sv` | sample counter and stage control bits |

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=<n> failures=<m>`. The reference values are computed in
the testbenches themselves (floating-point DFT for the pipeline, integer or
floating-point arithmetic for the units). With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/fft_pkg.sv tb/tb_sdf_fft.sv --top tb_sdf_fft -Mdir obj
./obj/Vtb_sdf_fft
```

and likewise for any other testbench (replace both `tb_sdf_fft`).

* `tb_sdf_fft` runs the default 1024-point pipeline on four back-to-back
  frames (impulse, largest-magnitude constant frame, two random frames from
  the 64-value alphabet) with random holds, checks every result against a
  direct DFT (tolerance 1.0 per component; the observed error is about
  0.25 on results up to ~5800), the latency of 1027 samples, the output
  index order, and that holds, both butterfly modes, -j rotations and frame
  changes all occurred. It takes well under a second.
* `tb_sdf_fft_sizes` does the same for N = 16, 64 and 256 at once.
* The unit testbenches check the butterflies exhaustively, the memory
  against a software delay line, the multipliers against exact integer or
  floating-point products, the twiddle table entry by entry and the
  controller's bits sample by sample.

## Changing it

* `N` (top parameter): any 4^k with k >= 2. Latency and widths follow.
* `IN_W`: input bits per component; set it to the symbol width of the
  receiver. The output grows with it.
* `FRAC`: fractional bits after stage 2; more bits lower the rounding
  error of the four multipliers (about 0.25 at FRAC = 6, N = 1024).
* `CW`: coefficient width (CW-2 fractional bits).

The multipliers are the only registers in the data path; the ten butterflies
with their adders form combinational paths between them (up to two stages
and a multiplier input), which sets the clock rate. Registering a stage
output would add one sample to the latency and needs the matching change in
`fft_pkg::stage_offset`.
