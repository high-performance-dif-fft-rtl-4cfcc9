# Multiplier-less 16-point radix-4 DIF-FFT with partitioned-LUT distributed arithmetic

A 16-point FFT needs twiddle multiplications between its two radix-4 layers.
Here those multiplications use no multiplier. Every twiddle factor is a known
constant, so the products "operand × constant" are stored in small look-up
tables, and an adder combines what they return. This is distributed
arithmetic (DA). A table addressed by the full 9-bit operand would need 512
words. Instead, the operand is cut unevenly: its 4 low bits address a
16-word table (LUT-1) and its 5 high bits a 32-word table (LUT-2). The two
words are brought to the same binary point and added. That takes 48 words
instead of 512, at the cost of one adder.

The whole transform is combinational and fully parallel: 16 complex samples in
and 16 complex bins out on every clock. The same RTL builds three variants
that differ only in the adder used everywhere: ripple carry, carry lookahead
or Sklansky parallel prefix.

Beside the FFT, the top level also holds the classic bit-serial DA
sum-of-products unit (ROM, add/subtract, accumulator, 1/2 shifter). It
illustrates the same idea one bit at a time.

## Dataflow

```
x(0..15) -> in regs -> stage 1 -> stage 2 -> DA block -> stage 3 -> stage 4 -> reorder -> out regs -> X(0..15)
             8 bit      9 bit     10 bit     19 bit      20 bit     21 bit
                                    |
                       partition: sign | 5 MSBs -> LUT-2 | 4 LSBs -> LUT-1
```

| step | module | what it does |
|---|---|---|
| stage 1 | `bfly_stage` (LAYER 0, S = 4) | pairs lanes at distance 8: a+c, a−c, b+d, −j(b−d) |
| stage 2 | `bfly_stage` (LAYER 1, S = 4) | pairs at distance 4; lanes 4g+n now hold radix-4 output group g |
| DA block | `da_block` | lane 4g+n × W16^(g·n) |
| stage 3 | `bfly_stage` (LAYER 0, S = 1) | distance 2, −j on lanes 3, 7, 11, 15 |
| stage 4 | `bfly_stage` (LAYER 1, S = 1) | distance 1; lane 4g+q holds X(4q+g) |
| reorder | `digit_reverse` | swaps the two base-4 digits: natural order out |

Stages 1 and 2 together form four radix-4 butterflies over
x(n), x(n+4), x(n+8), x(n+12). Each butterfly gives
y0 = a+b+c+d, y1 = a−jb−c+jd, y2 = a−b+c−d and y3 = a+jb−c−jd.
The second layer places these outputs in natural order, so lanes 4..7 carry
group 1, the group that needs W16^n. The −j rotations inside the butterflies
are swaps of the real and imaginary parts with one sign change, so they cost
no multiplier.

### Twiddles per lane

| lanes | 0–3 | 4–7 | 8–11 | 12–15 |
|---|---|---|---|---|
| exponent k of W16^k | 0 0 0 0 | 0 1 2 3 | 0 2 4 6 | 0 3 6 9 |

W16^0 only rescales the word to 8 fractional bits. W16^4 = −j is another
swap. The remaining eight lanes (k = 1, 2, 3, 6, 9) go through
`da_twiddle_mul`.

### Output order

After stage 4, lane 4g+q holds X(4q+g), so the lanes read
X0, X4, X8, X12, X1, X5, …: base-4 digit reversal, not binary bit
reversal. `digit_reverse` maps `out[k] = in[4·(k mod 4) + k div 4]`.
The twiddle placement above only gives a correct DFT with this order.

## The partitioned-LUT multiplier (`da_const_mul`)

This is the core of the design. It forms `x · c` for a signed 10-bit
stage-2 word x and a constant c, with |c| < 1 held in 8 fractional bits.

1. **Partition** (`da_partition`): sign and 9-bit magnitude |x|. Bits 3..0
   go to LUT-1 and bits 8..4 to LUT-2.
2. **Tables** (`da_lut`): both store `address × C`, where C = round-down of
   |c|·256.
   - LUT-1 words are 12 bits, read as Q4.8: the address has weight 1.
   - LUT-2 words are 13 bits, read as Q9.4: the address has weight 16, so
     the same integer simply has its binary point four places further left.
3. **Alignment**: four zero bits are appended to the LUT-2 word (Q9.4 →
   Q9.8).
4. **Adder**: a 17-bit magnitude sum gives |x|·C in Q9.8. This is exact:
   no bit is dropped.
5. **Sign selector**: an add/subtract stage gives ±|x|·C, negated when
   sign(x) ≠ sign(c). The tables therefore hold only non-negative words.

Worked example, with stage-2 value 80 and W16^1 = 0.923 − j0.382:

```
80 = 0 0101 0000          LUT-2 address 00101, LUT-1 address 0000
real:  C = 236 (0.11101100)  LUT-2[5] = 5*236 = 1180 (Q9.4 = 73.75)  LUT-1[0] = 0
       sum = 73.75
imag:  C = 97  (0.01100001)  LUT-2[5] = 485 (Q9.4 = 30.3125), sign negative
       -> -30.3125
```

`da_twiddle_mul` uses four such products for one complex twiddle
wr + j·wi:

- Re = a·wr − b·wi
- Im = a·wi + b·wr

The LUT pair of |wr| is read with both a and b, and so is the pair of |wi|.
The coefficient signs are fixed when the design is elaborated.

Coefficients used (8-bit, truncated):

| value | word |
|---|---|
| cos(π/8) = 0.9239 | 236 = 0.11101100 |
| sin(π/8) = 0.3827 | 97 = 0.01100001 |
| cos(π/4) = 0.7071 | 181 = 0.10110101 |

Every table is computed from C when the design is elaborated, so there are
no data files.

**Range.** The tables cover magnitudes up to 511. A lane that needs a table
twiddle (g ≠ 0 and n ≠ 0) always mixes its four inputs with at least one
sign change. Its stage-2 words therefore stay within ±510 for 8-bit inputs,
and 9 bits always suffice. `da_partition` would clip −512 to 511 and flag
`sat`, but inside the FFT that cannot happen. An assertion in
`fft16_da_top` checks it.

## Number formats

| signal | width | format |
|---|---|---|
| `x_re`, `x_im` | 8 | signed integer |
| after stage 1 / 2 | 9 / 10 | signed integer |
| LUT-1 / LUT-2 word | 12 / 13 | unsigned Q4.8 / Q9.4 |
| one real product | 18 | signed, 8 fractional bits |
| after the DA block | 19 | signed, 8 fractional bits |
| `X_re`, `X_im` | 21 | signed, 8 fractional bits |

No scaling is applied anywhere: X = Σ x(n)·W16^(nk), computed with the
truncated coefficients. Compared with the exact DFT, the error per bin stays
below 20, against full-scale bins of about ±2048.

## Adder variants

The `ADDER` parameter of `fft16_da_top` (type `fft_da_pkg::adder_kind_e`)
selects the adder for every addition. All of them go through `addsub`,
which subtracts as a + ~b + 1.

- `ADDER_RCA` (default): `rca_adder`, cascaded full adders.
- `ADDER_CLA`: `cla_adder`. Carries are looked ahead inside 4-bit groups,
  and across groups from the group generate/propagate signals.
- `ADDER_SKLANSKY`: `sklansky_adder`, a log2(W)-level divide-and-conquer
  prefix tree. It has the least depth and the largest fan-out.

All three give bit-identical results. They differ only in area and delay.

## Bit-serial DA unit (`da_serial_mac`)

This unit computes y = T1·X1 + T2·X2 + T3·X3 + T4·X4. The coefficients
0.72, −0.30, 0.95 and 0.11 are held as 184, −77, 243 and 28 (units of
2^-8). The four 8-bit inputs are shifted out least significant bit first.
Each clock:

1. The four current bits address a 16-word ROM of all coefficient partial
   sums.
2. The accumulator is halved, by the 2^-1 feedback shift.
3. The ROM word, aligned to the top, is added. On the sign bit it is
   subtracted instead.

The accumulator carries 8 extra low bits, so the result is exact. `done`
pulses 8 clocks after `start`, and a `start` while busy is ignored. The unit
is independent of the FFT and has its own `mac_*` ports on the top.

## Interface and timing of `fft16_da_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` | in | 1 | sample `x_re`/`x_im` this clock |
| `x_re`, `x_im` | in | 16 × 8 | x(0..15) |
| `out_valid` | out | 1 | `X_*` hold the frame given two clocks earlier |
| `X_re`, `X_im` | out | 16 × 21 | X(0..15), natural order, 8 fractional bits |
| `mac_start`, `mac_x` | in | 1, 4 × 8 | bit-serial DA unit |
| `mac_busy`, `mac_done`, `mac_y` | out | 1, 1, 20 | bit-serial DA unit |

The latency is 2 clocks and the throughput one transform per clock. Frames
may come back to back. The input and output registers only frame the
combinational datapath; remove them to get the purely combinational core.

## Where this RTL departs from, or fills in, the original description

- **Output order.** The original prose calls the order "bit reversal"
  (X0, X8, X4, X12, …). Its butterfly diagram labels and its twiddle
  placement imply base-4 digit reversal, and only the latter is
  consistent. The RTL follows the diagram.
- **Transform direction.** The prose speaks of a frequency-to-time
  transform. The RTL computes the forward DFT of its defining equation,
  with kernel e^(−j2πnk/N).
- **LUT contents.** The published LUT-1 for 0.923 is rounded entry by entry
  from 0.923 itself; for example, entry 4 holds 945 where 4 × 236 = 944.
  All other published tables are address × 8-bit coefficient, and the RTL
  uses that rule for every table.
- **−j twiddles.** W16^4 = −j is handled as a swap, like the −j rotations
  inside the butterflies, instead of by a table.
- **Complex inputs.** The worked example multiplies a real word.
  Extending it to complex words (four products, two combining adders) is
  this design's completion.
- **Filled in by this design.** The registers, valid flags and reset, and
  the word widths after the DA block. Also the CLA group size, the bit
  order and handshake of the bit-serial unit, and the coefficient rounding
  of that unit.
- **Bit-serial ROM.** Its published figure shows 8 words for three
  coefficients. The RTL follows the four-coefficient, 16-word table.
- **Not built.** The array-multiplier FFT used only as a comparison
  baseline, and the 45 nm physical implementation.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself on a watchdog.
`tb/fft_ref_pkg.sv` holds the reference models, written independently of the
RTL:

- coefficients from `$cos`/`$sin`;
- products with `*`;
- a direct radix-4 decomposition for the bit-exact model;
- a floating-point DFT.

| testbench | covers |
|---|---|
| `tb_fft16_da_full` | default top. An impulse, a tone in each of the 16 bins, and 40 random frames. Checks bit-exact results, a bound against the exact DFT, latency 2, and one bit-serial DA operation. |
| `tb_fft16_da_top` | all three adder variants side by side. 300 frames, back to back and with gaps, including full-scale frames. Counts LUT-2 use, LUT-1-only words, negative operands, −j lanes and near-full-scale words. Runs 30 bit-serial DA operations alongside. |
| `tb_da_block`, `tb_da_twiddle_mul` | every nontrivial twiddle against the reference products |
| `tb_da_const_mul`, `tb_da_partition` | exhaustive over all 1024 input words; the worked example 80 × W16^1 |
| `tb_da_lut` | every entry, plus the published table words that follow the address × coefficient rule |
| `tb_bfly_stage` | all four layer configurations, and stage 1 → 2 as a radix-4 butterfly |
| `tb_digit_reverse` | the lane-to-frequency labels |
| `tb_rca_adder`, `tb_cla_adder`, `tb_sklansky_adder`, `tb_addsub` | widths 5 (exhaustive), 16, 17 and 10/18, all adder kinds |
| `tb_da_serial_mac` | all 16 ROM sums against the coefficient table, 500 products, and the 8-clock timing |

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/fft_da_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft16_da_full.sv \
    --top-module tb_fft16_da_full
./obj_dir/Vtb_fft16_da_full
```

Replace the testbench name to run another. Every testbench finishes in
seconds.

## Changing the design

- **Adder:** set `ADDER` on `fft16_da_top`.
- **Word widths:** these live in `rtl/fft_da_pkg.sv`. `LO_W` sets the
  LUT-1/LUT-2 split (4/5). `FRAC` sets the coefficient precision; the
  constants `C_PI8`, `S_PI8` and `C_PI4` must then be recomputed as
  floor(value·2^FRAC).
- **Input width:** `IN_W` can change. The DA block assumes the stage-2
  magnitude fits `MAG_W = IN_W + 1` bits, which holds for the reason given
  under Range.
- **Transform length:** the structure is written for N = 16 (two radix-4
  layers). A longer transform needs more layers and a twiddle table per
  layer.
