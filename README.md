# 16-point radix-4 FFT for complex data

This core computes a 16-point discrete Fourier transform of complex
fixed-point samples. It accepts a full set of 16 samples on every clock and
returns its spectrum two clocks later. A direct 16-point DFT needs 256 complex
multiplications. The core uses the radix-4 decimation-in-time (DIT) split
instead: two stages of four 4-point DFTs, with one twiddle multiplication
between the stages. A 4-point DFT needs no multiplier, because its only
factors are 1, -1, j and -j. Only nine general complex multipliers are left,
which is 36 real multipliers.

The architecture follows a published 16-point radix-4 DIT FFT design: its
block diagram, its processing-element structure (butterfly adder, twiddle
multiplier fed from a twiddle memory, shift register), and its
digit-reversed output order. That source does not give word lengths,
rounding, overflow handling, timing or an interface. Those are this
implementation's own choices, and each one is marked as such below.

## The index split

Write the time index as `n = 4*n1 + n2` and the frequency index as
`k = k1 + 4*k2`, with every digit in 0..3. Then

```
X(k1 + 4*k2) = sum_n2 (-j)^(n2*k2) * [ W16^(n2*k1) * sum_n1 x(4*n1 + n2) * (-j)^(n1*k1) ]
                \_____ stage 2 ____/   \_ twiddle _/   \__________ stage 1 __________/
```

where `W16 = exp(-j*2*pi/16)`.

* **Stage 1** has four butterflies, indexed by `n2`. Butterfly `n2` takes
  the samples `x(n2), x(n2+4), x(n2+8), x(n2+12)`.
* **Twiddles.** Output `k1` of stage-1 butterfly `n2` is multiplied by
  `W16^(n2*k1)`. Seen from stage 2, stage-2 butterfly `r = k1` gets the
  factors `W^0, W^r, W^2r, W^3r` on its four inputs. This is the usual
  picture of a DIT radix-4 butterfly. The hardware applies each factor at
  the output of the stage-1 element, after its adder and before its
  register. That puts every multiplier in stage 1 and none in stage 2.
* **Stage 2** has four butterflies, indexed by `k1`. Butterfly `k1` takes
  output `k1` of each stage-1 butterfly, and its output `k2` is bin
  `k1 + 4*k2`.

The exponents `n2*k1` take the values 0, 1, 2, 3, 4, 6 and 9.
* Exponent 0 is an exact factor of 1. The core leaves the multiplier out
  there.
* The other nine positions each get a general complex multiplier. This
  includes `W16^4 = -j`, which the table holds exactly.

### Output order

The outputs are wired in the order the butterflies produce them. Output
position `p = 4*a + b` is output `b` of stage-2 butterfly `a`, so it holds
bin `4*b + a`. In other words, the two base-4 digits of the index are
swapped (digit-reversed order):

| position | 0 | 1 | 2 | 3  | 4 | 5 | 6 | 7  | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|----------|---|---|---|----|---|---|---|----|---|---|----|----|----|----|----|----|
| bin      | 0 | 4 | 8 | 12 | 1 | 5 | 9 | 13 | 2 | 6 | 10 | 14 | 3  | 7  | 11 | 15 |

`fft16_pkg::digit_rev(p)` returns the bin for a position. The mapping is its
own inverse. If you need natural order, it costs only wiring outside the core.

## The processing element

Both stages use the same element, `r4_pe`:

```
 x[0..3] --> r4_butterfly --> (cmult with twiddle_rom) --> scale_reg --> y[0..3]
             4-point DFT       W16^(k*STEP), or bypass      >>, clip, register
```

* **r4_butterfly** computes the 4-point DFT in two layers of adders. It
  forms `t0 = a0+a2`, `t1 = a0-a2`, `t2 = a1+a3` and `t3 = a1-a3`. Then
  `Y0 = t0+t2` and `Y2 = t0-t2`. For `Y1 = t1 - j*t3` and `Y3 = t1 + j*t3`,
  the multiplication by `-j` or `j` swaps the real and imaginary parts of
  `t3` and flips one sign. The outputs are 2 bits wider than the inputs, so
  no sum can overflow.
* **twiddle_rom** returns `W16^k` as two signed Q1.15 words
  (`1.0 = 32768`).
  * The table is not typed in. `fft16_pkg` computes it at elaboration from
    four constants, `round(32768*cos(q*pi/8))` for q = 0..3, using the
    symmetry of cosine and sine.
  * A value of +1.0 saturates to 32767. The core never sends such a factor
    through a multiplier.
* **cmult** uses four real multipliers and keeps the full product:
  `W + TW + 1` bits per part, about twice the input width.
* **scale_reg** shifts the product right by `15 + SHIFT` and clips it to
  `W` bits. The 15 undoes the Q1.15 twiddle and the `SHIFT` scales the
  stage. The result is stored in the stage register. The register loads
  only on `in_valid` and holds otherwise.

The `STEP` parameter selects the twiddle set: output `k` uses
`W16^(k*STEP)`. In the top level, stage-1 element `n2` has `STEP = n2`, and
every stage-2 element has `STEP = 0`, so stage 2 has no multipliers.

## Fixed-point behaviour

These choices are this implementation's own:

* **Word length.** `W = 16` bits per real and imaginary part, at the input,
  between the stages and at the output. Twiddles are 16 bits, Q1.15.
* **Scaling.** Each stage shifts right by 2 bits (`S1_SHIFT`, `S2_SHIFT`), so
  the output is `DFT/16`. The shift rounds toward minus infinity (it simply
  drops bits). The end-to-end test compares every unclipped output with a
  floating-point `DFT/16`, and all of them agree within 4 LSB.
* **Overflow.** Dividing by 4 matches the growth of a 4-point DFT. The
  twiddle rotation can still grow a real or imaginary part by up to
  `sqrt(2)`, so full-scale inputs can exceed the range after stage 1.
  * A word that does not fit is clipped to the largest or smallest value.
  * `ovf` is raised together with the output set that contains the clipped
    word, from either stage.
  * Inputs whose complex magnitude is at most `2^15/sqrt(2)` never clip.
    Random full-scale data with signs of ±1 clips often.

To trade headroom for precision, change `S1_SHIFT`/`S2_SHIFT`, or widen `W`.
Everything is parameterised from these values.

## Interface and timing

`fft16_r4` (top), with parameters `W = 16`, `S1_SHIFT = 2` and `S2_SHIFT = 2`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst` | in | 1 | synchronous reset, active high; clears every register |
| `in_valid` | in | 1 | `x_re`/`x_im` hold a new set of 16 samples |
| `x_re[16]`, `x_im[16]` | in | W each | samples `x(0)..x(15)`, natural order, two's complement |
| `out_valid` | out | 1 | `in_valid` delayed by exactly two clocks |
| `xf_re[16]`, `xf_im[16]` | out | W each | `X/16`, in digit-reversed order (table above) |
| `ovf` | out | 1 | some word of the current output set was clipped |

* **Throughput.** One transform per clock. Transforms can follow each other
  with no gap.
* **Latency.** Two clocks, one register per stage.
* **Idle clocks.** While `in_valid` is low, the inputs are ignored and the
  outputs keep the last transform. `out_valid` is low during those clocks.
* **Critical path.** One stage: two adder layers, one 18x16 multiply and an
  add, then the shift and clip.

### Size

Yosys coarse synthesis of the top gives 1059 flip-flop bits:
* 2 stages x 16 complex words x 32 bits = 1024 data bits;
* 35 bits of valid flags and clip flags.

It also gives 36 multipliers (18 x 16 bits each, which fits one DSP slice
on most FPGAs) and about 1075 word-level cells.

The core has 1029 I/O pins at `W = 16`. That is too many for a 960-pin FPGA
package. At `W = 8` it needs 517 pins.

## Files

| file | contents |
|------|----------|
| `rtl/fft16_pkg.sv` | N, twiddle width, twiddle table function, `digit_rev()` |
| `rtl/r4_butterfly.sv` | multiplier-free 4-point DFT |
| `rtl/twiddle_rom.sv` | `W16^k` table, combinational read |
| `rtl/cmult.sv` | full-width complex multiplier |
| `rtl/scale_reg.sv` | shift, clip and stage register |
| `rtl/r4_pe.sv` | processing element: butterfly, twiddles, shift registers |
| `rtl/fft16_r4.sv` | top: two stages of four elements |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench computes its expected values independently of the RTL:
* the 4-point DFTs are evaluated directly in integer arithmetic;
* the twiddles are built from `$cos` and `$sin`;
* the floating-point DFT is evaluated directly.

Each testbench prints `TB_RESULT checks=N failures=M`. It also has a
watchdog.

* `tb_fft16_r4` runs the top at its default parameters. It sends 4000
  transforms: impulses at every position, a tone on every bin, DC, random
  data and random full-scale data. About one clock in eight is left idle,
  and there is a reset in the middle of the stream.
  * Every output set is checked bit-exactly against a fixed-point model of
    both stages, through the digit-reversed order.
  * Unclipped output sets are also checked against a floating-point DFT.
  * It also checks the two-clock latency, `out_valid`, `ovf`, holding
    during idle clocks, and the reset.
  * It counts back-to-back transforms, idle holds, clipped transforms and
    resets. It fails if any of these never happens.
* `tb_r4_pe` runs elements with `STEP` 0..3 in parallel, with the same
  checks at element level.
* `tb_r4_butterfly`, `tb_cmult`, `tb_twiddle_rom` and `tb_scale_reg` test
  each module exhaustively or with random stimulus, corner values included.

To run one with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fft16_r4 \
    rtl/fft16_pkg.sv rtl/*.sv tb/tb_fft16_r4.sv -o sim
./obj_dir/sim
```

Put `rtl/fft16_pkg.sv` first. For another testbench, change the module name
and the testbench file. Every testbench finishes in well under a second.

## Where this departs from, or goes beyond, the source design

* The source says that all twiddle factors of a 16-point radix-4 FFT are 1,
  -1, j or -j. That is true inside the 4-point butterflies, and the core
  builds those without multipliers. It is not true between the stages: a
  correct 16-point DFT needs `W16^1`, `W16^2`, `W16^3`, `W16^6` and `W16^9`
  there, and the core uses general multipliers for them. The resulting 36
  real multipliers match the DSP count the source reports.
* The source also describes the butterfly as part of a memory-based FFT that
  writes its results back in place. This core is the fully parallel
  16-input version drawn in the source's block diagram. It has no data
  memory and no address sequencing.
* The output stays in digit-reversed order, as in the source. The core has
  no reorder buffer.
* The source leaves open, and this core chooses: word lengths, Q1.15
  twiddles, divide-by-4 scaling per stage with floor rounding, clipping,
  the `ovf` flag, the valid handshake, the reset, and the register
  placement (one register per stage).
* The source's own test vectors are not available. The testbenches generate
  their own stimulus.
