# Twiddle-free serial FFTs of 6, 15 and 30 points

5G allows FFT sizes of the form 2^a · 3^b · 5^c. Hardware FFTs are usually
built for powers of two. This RTL implements three streaming FFTs of sizes
that are not powers of two. Each takes one complex sample per clock cycle,
keeps every adder and multiplier busy in every cycle, and has **no rotator
(twiddle multiplier) between its stages**:

| FFT   | chain of units                                                        | latency |
|-------|-----------------------------------------------------------------------|---------|
| fft30 | radix-5 → permutation (6 circuits) → radix-3 → permutation (2) → radix-2 | 37 cycles |
| fft15 | radix-5 → permutation (3 circuits) → radix-3                          | 21 cycles |
| fft6  | radix-3 → permutation (2 circuits) → radix-2                          | 8 cycles  |

The 30-point FFT is the main design. The 6- and 15-point FFTs are smaller
members of the same family; the 30-point design reuses the 6-point structure
inside it. The top level `np2_fft_top` holds all three side by side. Beside
them is a serial radix-4 butterfly (`bf_r4`) from the same butterfly family,
which none of the three FFTs uses.

The design has three parts:

1. **Serial butterflies** compute a radix-r DFT on r consecutive samples. They
   use r-fold fewer arithmetic units than a butterfly with r parallel inputs.
2. **Serial permutation circuits** reorder a stream with a handful of
   registers.
3. **Input and output orders** are chosen so that the twiddle factors between
   the stages cancel.

## Why no rotators are needed

Split N = N1 · N2 with N1 and N2 coprime (5 · 3, 3 · 2, 5 · 6). Feed each
first-stage butterfly a suitably chosen subset of the input samples; this is a
circular shift of the usual Cooley-Tukey assignment. Then the phase factors
such a shift produces at the butterfly outputs cancel the Cooley-Tukey twiddle
factors exactly. The same holds for the shifts at the second-stage outputs.
This gives a prime-factor FFT: stage 2 only needs the outputs of stage 1
regrouped, never rotated. For 30 points the split is 5 × 6, and the 6-point
stage is again split into 3 × 2 in the same way.

The price is that input and output samples are not in natural order. This is
the most important thing to know when using the cores.

### Sample orders

Position q is the q-th sample of a frame, counted from the `in_sync` /
`out_sync` cycle. `<a>_N` is a mod N.

**fft6**
- input: `x0 x2 x4 x3 x5 x1` (position 3j+m holds x[<2m+3j>_6])
- output: `X0 X3 X4 X1 X2 X5`

**fft15**
- input: `x0 x3 x6 x9 x12 | x10 x13 x1 x4 x7 | x5 x8 x11 x14 x2`
  (position 5j+m holds x[<3m+10j>_15])
- output: `X0 X5 X10 X6 X11 X1 X12 X2 X7 X3 X8 X13 X9 X14 X4`
  (position 3k+l holds X[K] with K ≡ k mod 5 and K ≡ 2l mod 3)

**fft30**
- input: `x0 x6 x12 x18 x24 | x10 x16 x22 x28 x4 | x20 x26 x2 x8 x14 | x15 x21 x27 x3 x9 | x25 x1 x7 x13 x19 | x5 x11 x17 x23 x29`
  (position 5j+m holds x[<6m + 5·g(j)>_30], g = 0,2,4,3,5,1)
- output: `X0 X15 X10 X25 X20 X5 | X6 X21 X16 X1 X26 X11 | X12 X27 X22 X7 X2 X17 | X18 X3 X28 X13 X8 X23 | X24 X9 X4 X19 X14 X29`
  (position 6k+q holds X[K] with K ≡ k mod 5 and K ≡ h(q) mod 6, h = 0,3,4,1,2,5)

The 30-point orders are this design's own derivation. They use the 6-point
orders (g is the 6-point input order, h its output order) inside a 5 × 6 prime
factor split. They give exactly the radix-5 → radix-3 regrouping that the
permutation network of the published architecture implements (see below).
Another valid order pair exists for the same hardware: a different assignment
g changes only which input sample goes where. Before connecting the 30-point
core to other logic, check the orders above against what that logic expects.

## Serial butterflies

A complex sample arrives as a real word and an imaginary word in the same
cycle. The butterflies run two rails and move words between them with pairs
of 2:1 multiplexers and single registers, called *exchanges*. One adder then
handles a real sum in one cycle and the matching imaginary sum in the next. In
steady state, every adder does useful work in every cycle. Each butterfly
has a phase counter that restarts at `in_sync`. The counter drives the
multiplexer selects, which repeat with period r.

**`bf_r2`** (2 adders, 4 multiplexers, 4 registers). The input exchange lines
up a.re with b.re in the second cycle of a pair and a.im with b.im in the
third. The sum and difference are then reassembled into a+b and a−b.
Latency: 2.

**`bf_r3`** (6 adders, 1 multiplier by √3/2, 12 multiplexers, 8 registers,
4 operand gates). Three add/subtract stages in a chain:

1. u = x1 + x2 and v = x1 − x2; x0 passes through.
2. X0 = x0 + u and y = x0 − u/2 (the half is an arithmetic shift); v passes
   through.
3. y ± (√3/2)·v through the single multiplier. The factor −j is applied by
   pairing y.re with v.im and y.im with v.re; X0 passes through.

An output exchange then puts X0, X1, X2 back together. Gates force an adder
operand to zero in the cycles where a word only passes through. Latency: 4.
Select sequences per phase 0,1,2: S0=001, S1=S2=S3=101, S4=110, S5=011,
S6=S7=001.

**`bf_r5`** computes the Winograd-style 5-point flow graph with constants
K1 = −1/4, K2 = 0.559, K3 = −j0.363, K4 = −j0.588 and K5 = j1.539 (see
`bf_r5.sv` for the equations). **This butterfly does not reproduce the
published resource-shared radix-5 circuit (10 adders, 2 multipliers).** That
circuit is not described in enough detail to rebuild. This version has the
same two real multipliers, one for the real word and one for the imaginary
word, but its own schedule. A 4-sample shift register and a frame register
collect a frame. While the next frame arrives, the multipliers form K2·c2,
K4·e, K3·b1 and K5·b2 in phases 0 to 3, one real-by-complex product per cycle.
In phase 3, d1, d2 and the two rotated sums h4 and h5 are latched into four hold
registers, and X0 leaves. One output adder path then forms X1, X2, X3 and X4
in the next four cycles. The column adders are not shared, so it uses about 26
real adders and 34 registers where the published circuit uses 10 and 23. Its
latency is 9 cycles. That is the butterfly
latency the published 15- and 30-point latencies imply, so both FFTs have the
published latencies: 21 = 9 + 8 + 4 and 37 = 9 + 20 + 4 + 2 + 2.

**`bf_r4`** (4 adders, 10 multiplexers, 8 registers, no multiplier).
- Its first stage can only combine consecutive samples, so it takes its input
  as x0, x2, x1, x3.
- It produces X0, X2, X1, X3 after 4 cycles.
- The −j rotation is done by pairing real with imaginary words in the second
  stage.

## Serial permutation circuits

A **`perm_cell`** is a buffer of L registers between two multiplexers that
share one select:
- **select 0:** the input enters the buffer and reappears L cycles later.
- **select 1:** the input goes straight to the output, and the word leaving
  the buffer is fed back into it.

So one select pulse in the cycle when frame sample t arrives swaps the
samples at positions t−L and t. The output is otherwise the input delayed
by L. A modulo-N counter, restarted by `in_sync`, indexes an N-bit constant
pattern that says in which cycles to swap.

A **`perm_net`** chains such cells. It moves each sample from its position in
the first butterfly's output to its position in the next butterfly's input.
For 15 and 30 points, output k of radix-5 butterfly j (position 5j+k) goes to
input j of second-stage block k (position (N/5)·k + j). The buffer lengths and
the swaps come from the published data-movement tables:

| network          | buffer lengths       | latency | swaps (bit t of each stage pattern) |
|------------------|----------------------|---------|-------------------------------------|
| 6-point (r3→r2)  | 1, 1                 | 2       | {3}, {2,4} |
| 15-point (r5→r3) | 2, 2, 4              | 8       | {5,6,10,11}, {3,8,13}, {6,9,12} |
| 30-point (r5→r3) | 1, 2, 7, 7, 2, 1     | 20      | see `P30_PAT` in `np2_fft_pkg.sv` |

Each latency equals the largest distance any sample has to travel, so it is
the least possible. The 30-point network includes swaps that first move a
sample away from its target before later stages bring it back. A swap between positions p and p+L
in a stage sets bit p+L of that stage's pattern. Pattern bits below L are
never set. As a result, a frame that follows after a gap never disturbs the
tail of the previous frame inside a cell.

The 30-point FFT uses the 6-point network a second time, between its radix-3
and radix-2 butterflies. It runs with period 6 inside the 30-sample frame.

## Interface and timing

All cores share one stream interface: `clk`, `rst` (synchronous, active
high), `in_sync`, `in_re`, `in_im`, `out_sync`, `out_re`, `out_im`.

- Drive one sample per cycle in the input order above. Raise `in_sync` with
  the first sample of each frame.
- Frames may follow back to back without a break. Every unit keeps its phase
  from the last `in_sync`, so one pulse is enough for an unbroken stream.
- `out_sync` is `in_sync` delayed by the latency (37 / 21 / 8, and 4 for
  `bf_r4`). It marks the first output sample of the frame. The following N−1
  cycles carry the rest of it in the output order above.
- There is no valid signal and no back-pressure. The pipeline never stalls.
- If the stream pauses and restarts at a new frame phase, the new `in_sync`
  must come at least one latency after the last sample of the previous
  frame. Otherwise the butterflies re-phase while that frame is still inside.
  Between frames, the outputs carry meaningless values. `fft6`, `fft15` and
  `fft30` hold an assertion (`a_frame_rhythm`) that flags a violation in
  simulation.

## Number format and accuracy

Samples are 16-bit two's complement per component (`W`, default 16). As in
the published FPGA results, **words do not grow**: sums wrap at W bits. The
user must scale the input so that |X[k]| fits. That is roughly
|x| < 2^15 / (N·√2) for full-scale random data, about 770 for 30 points.

Constant products use 16-bit coefficients with 14 fractional bits and are
truncated. The halving in `bf_r3` and the quartering (K1) in `bf_r5` are
arithmetic shifts.

Measured against a double-precision DFT on random frames:

| core   | input amplitude | max error |
|--------|-----------------|-----------|
| fft6   | ±2000           | 3 LSB     |
| fft15  | ±800            | 8 LSB     |
| fft30  | ±450            | 14 LSB    |
| bf_r2  | any             | exact     |
| bf_r4  | any             | exact     |

The coefficient format and the truncation are this design's choices.

## How this RTL relates to the published design

Taken from the published design:
- the block chains;
- the radix-2, radix-3 and radix-4 butterfly datapaths: signal names,
  multiplexer, register and operator placement, and unit counts (2/4/4,
  6/1/12/8/4 and 4/10/8 match the published tables);
- the permutation-cell structure;
- all permutation buffer lengths and swaps;
- the 6- and 15-point sample orders;
- the latencies 8, 21 and 37.

Chosen here:
- **Multiplexer select sequences and control counters.** They are not
  published. They were derived from the datapaths and confirmed by
  simulation.
- **Radix-5 butterfly internals.** See above; this is the largest departure.
  The multiplier totals match the published ones (3 in `fft15` and `fft30`,
  with the one in `bf_r3`). The adder and register totals are above the
  published minimum counts (47 and 79 registers, 16 and 18 adders), because
  of the unshared column adders and the frame and hold registers of `bf_r5`.
- **30-point input and output orders.** See above.
- **Control of the two circuits after the radix-3 butterfly in the 30-point
  design.** The published drawing reuses the names S0 and S1 of the first two
  circuits. Here they are driven by their own period-6 control, because the
  first network's selects have period 30.
- **Pipelining.** The published 500 MHz FPGA results come from butterflies
  with extra pipeline registers. This RTL keeps the minimum-register
  butterflies of the latency figures. Its combinational paths, for example
  through a chain of permutation cells with select 1 and into a butterfly's
  adders, are longer than in that implementation.
- **Interface, reset and number format** (see above).

Not included:
- rotators and power-of-two SDF FFTs, which appear only as the starting point
  and as the comparison baseline;
- larger 5G sizes such as 1200 points, which the design family targets but
  which would need rotators in some stages.

## Files

`rtl/`:
- `np2_fft_pkg.sv`: widths, coefficients, latencies, permutation lengths and
  patterns.
- `bf_r2.sv`, `bf_r3.sv`, `bf_r4.sv`, `bf_r5.sv`: serial butterflies.
- `perm_cell.sv`, `perm_net.sv`: serial permutation circuit and network.
- `fft6.sv`, `fft15.sv`, `fft30.sv`: the three FFTs.
- `np2_fft_top.sv`: all of them side by side.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. They drive
random frames in the core's input order, back to back and again after an idle
gap. The reference is a DFT computed in the testbench with `real` arithmetic,
and the latency of every frame is checked. `tb_perm_cell` and `tb_perm_net`
check exact reordering of tagged samples. `tb_np2_fft_top` runs everything at
default parameters and also counts swaps in every permutation circuit. Each
testbench prints `TB_RESULT checks=… failures=…`.

Simulate with Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal --top-module tb_fft30 \
    -y rtl -y tb +libext+.sv rtl/np2_fft_pkg.sv tb/tb_fft30.sv
./obj_dir/Vtb_fft30
```

The testbenches need no input files. Each one finishes in under a second.

To change the word length, set `W` on any core. To add another size built
from coprime radices, work out the regrouping between the butterflies and
find a swap schedule for a chain of cells. A new `perm_net` instance then
takes its lengths and patterns as parameters.
