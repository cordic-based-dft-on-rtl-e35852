# CORDIC-rotation 16-point DFT / IDFT

Every multiplication in a radix-2 FFT multiplies a complex sample by a
twiddle factor W^k = e^(-j 2 pi k / N), which is a plane rotation by a
known angle. For N = 16 there are only eight such angles, 0 to 157.5 degrees
in steps of 22.5 degrees. A CORDIC rotator can turn a vector by any angle
with nothing but shifts and additions. Normally it also tracks the remaining
angle to decide, stage by stage, which way to turn. Here the angles are
fixed, so the turn direction of every stage can be worked out in advance and
stored in a small ROM. What is left is a pipeline of shift-add stages driven
by ROM bits, with no multipliers and no angle datapath. One such pipeline
does every twiddle rotation of the transform. A final set of shift-add
stages removes the CORDIC gain.

This RTL implements that idea as a 16-point DFT/IDFT core (`cordic_dft16`).
It also contains three companion CORDIC units from the same design study:

- an 8-bit sine/cosine generator (`cordic_sincos`), built on a conventional
  angle-driven circular-rotation CORDIC (`cordic_circ_rot`);
- a hyperbolic-rotation CORDIC (`cordic_hyp_rot`);
- a multiplier-based butterfly processor (`bfly_proc`), the non-CORDIC way
  to compute one butterfly.

`cordic_dft_top` places all four units side by side.

The design follows the article "CORDIC Based DFT on FPGA for DSP
Applications": its direction table, its pipelined CORDIC structure, its
gain-compensation product, its use of one CORDIC pipeline, its 1/N scaling
convention, its sine/cosine generator ports and its butterfly-processor
structure. The transform schedule, widths, interfaces and timing were
chosen here. Section "Where this RTL departs from the article" lists the
differences.

## The direction table

A CORDIC rotation by angle a is a sequence of fixed steps. This design uses
one +-90-degree step, then 17 micro-rotations by +-atan(2^-i), i = 0..16.
Only the signs are free, so one rotation is described by 18 bits.
`dir_encoder` holds these bits for the eight twiddle angles:

| k | angle  | 90 | 2^0 ... 2^-16       |
|---|--------|----|---------------------|
| 0 | 0      | 1  | 00001011000011001   |
| 1 | 22.5   | 1  | 00100100110100001   |
| 2 | 45     | 1  | 00111110000010101   |
| 3 | 67.5   | 1  | 01011011001011110   |
| 4 | 90     | 1  | 01110100111100110   |
| 5 | 112.5  | 1  | 10100100110100001   |
| 6 | 135    | 1  | 10111110000010101   |
| 7 | 157.5  | 1  | 11011011001011110   |

A 1 turns the vector counter-clockwise, adding the step's angle; a 0 turns
it clockwise. Each row's signed angles add up to 22.5*k degrees within
0.001 degree. For example, row 0 goes +90, -45, -26.6, -14.0, -7.1, +3.6,
and so on, and settles at 0. The rows for 45, 90 and 135 degrees are not
what a greedy "turn toward the target" rule would give, but they are equally
exact. Every row starts with +90, so output bit `t[0]` is constant.

The forward DFT needs e^(-j theta), a clockwise turn. Inverting every bit of
a row mirrors every step, so the same ROM gives both directions. The DFT
core XORs the row with the transform direction.

## The rotation pipeline (`cordic_pipe`)

Stage 0 applies the exact quarter turn: (x, y) becomes (-y, x) or (y, -x).
Stage s, for s = 1..17, applies

    x' = x -/+ (y >>> (s-1)),   y' = y +/- (x >>> (s-1))

with the sign taken from direction bit s. The 18-bit direction word moves
down the pipeline with the data. This is the same as delaying direction bit
j by j cycles.

The micro-rotations stretch the vector by K = prod sqrt(1 + 2^-2i) =
1.6467603. Five more shift-add stages multiply by

    1/2 * (1 + 2^-2) * (1 - 2^-5) * (1 + 2^-8) * (1 - 2^-10) = 0.607240

This is 1/K to within 2.2e-5, so results come out about 2e-5 small. On a
20-bit value that is up to about 20 LSB, which matters when judging
accuracy. The testbenches account for it.

Details:

- Inside the pipeline, x and y carry 2 extra integer bits and GUARD = 4
  extra fraction bits. The last stage rounds the guard bits away.
- The output is one bit wider than the input, because a full-scale vector
  turned by 45 degrees needs it.
- A side-band tag (`in_tag`/`out_tag`) travels with each operand. The DFT
  uses it to carry the butterfly's other operand and the write-back
  addresses.
- Latency is exactly NITER + 6 = 23 cycles. A new rotation can enter every
  cycle, and there is no back-pressure.

## The transform schedule (`cordic_dft16`)

The core computes an in-place radix-2 decimation-in-time FFT over a 16-word
complex register file. The 16 words are 2 x 21-bit registers each. There
are four stages of eight butterflies. In stage s, butterfly j uses these
words and twiddle:

    top = (j >> s) * 2^(s+1) + (j mod 2^s)
    bot = top + 2^s
    k   = (j mod 2^s) * 2^(3-s)         (twiddle W^k, 22.5*k degrees)

One butterfly is issued per cycle:

1. B = mem[bot] goes into the CORDIC, with direction bits from the ROM.
2. A = mem[top] and both addresses ride along as the tag.
3. 23 cycles later, `butterfly` forms A + WB and A - WB.
4. The two results are written back over A and B.

The butterflies of one stage touch disjoint words. A stage may only read
what the previous stage wrote, so the next stage starts once the pipeline
has drained. Each stage therefore costs 8 + 23 = 31 cycles.

| phase   | cycles | what happens                                              |
|---------|--------|-----------------------------------------------------------|
| load    | 16     | `in_ready` = 1; sample n is written to bit-reversed address rev(n) |
| compute | 124    | 4 x (8 issue + 23 drain); `busy` = 1, `in_ready` = 0      |
| unload  | 16     | `out_valid` = 1; bins 0..15 in natural order, `out_last` on the 16th |

The first result appears 125 clock edges after the edge that took the last
sample. At the 16-bit default a transform takes 156 cycles when inputs are
back to back. Input stalls (`in_valid` low) only lengthen the load phase.
The output has no back-pressure.

**Scaling.**

- Forward (`inverse` = 0): each stage halves its results with rounding, so
  the output is F(k) = 1/16 sum f(n) e^(-j 2 pi kn/16). The output stays
  within the input range.
- Inverse (`inverse` = 1): rotations go counter-clockwise and nothing is
  halved, so the output is f(n) = sum F(k) e^(+j 2 pi kn/16).
- The working width MW = DW + 5 = 21 bits holds the up to 16*sqrt(2)-fold
  growth of the inverse. The CORDIC inside is configured for MW-bit
  operands.
- `inverse` is sampled with the first input sample of a block.

**Real input.** Set `in_im` = 0. All 16 bins are computed, and they satisfy
F(16-k) = conj F(k).

**Accuracy** (16-bit samples, as measured by the testbenches): forward
bins are within 3 LSB of a floating-point DFT/16. Inverse results are
within 12 LSB of the exact sum. A forward/inverse round trip returns the
input within 40 LSB.

## Companion units

### Sine/cosine generator (`cordic_sincos`)

Ports: `clk`, `rst_n`, `ena`, `phase_in[7:0]`, `sin_out[7:0]`,
`cos_out[7:0]`, `eps[7:0]`, plus `out_valid`.

- `phase_in` is a fraction of a turn, with 256 = 360 degrees.
- The top two bits select the quadrant. The remaining six bits, an angle in
  [0, 90) degrees, drive an eight-stage rotation-mode CORDIC.
- The CORDIC starts from (127/K, 0), so it ends on (127 cos, 127 sin)
  without a separate gain stage.
- A 2-bit register per stage carries the quadrant alongside the data. A
  last register stage maps the first-quadrant pair onto the full circle,
  rounds and clamps to +-127.
- `eps` is the angle the CORDIC left unturned, in units of 1/4096 turn.
- `ena` freezes the whole pipeline. Latency is 9 enabled cycles.
- Accuracy is +-2 LSB at every one of the 256 phases.
- The datapath is 10 bits wide (two guard bits) and the angle path 12 bits.

### Circular rotation (`cordic_circ_rot`)

A generic rotation-mode CORDIC:

    x_out = k_m (x cos z - y sin z)
    y_out = k_m (y cos z + x sin z)
    z_out -> 0

- The gain k_m is left in the result.
- Angles are two's-complement words where 2^ZW is one turn.
- |z| must stay below 99 degrees.
- Width, angle width and stage count are parameters. It has the same
  `ena`/valid conventions as the generator.

### Hyperbolic rotation (`cordic_hyp_rot`)

Computes x cosh z + y sinh z and y cosh z + x sinh z. With x = y = a, both
outputs equal a e^z.

- It has 18 stages with shifts 1, 2, 3, 4, 4, 5, ..., 13, 13, 14, 15, 16.
  The repeated shifts are needed for convergence, which holds for
  |z| <= 1.118.
- One constant multiplication by 1/K_h = 1.2075 removes the gain. The
  constant is computed at elaboration from the shift list.
- z has ZF = 13 fraction bits. Latency is 19 cycles.

### Butterfly processor (`bfly_proc`)

This is the multiplier version of one butterfly. Inputs:

- u = R1, the upper real part, through a delay;
- v = I1, the upper imaginary part, through a multiplier by 1 or 1/sqrt(2)
  (`g_sel`);
- x = R2 and y = I2, the lower input, into four multipliers with
  c = cos theta and s = sin theta.

Two adder columns follow:

    p  = u + c1*v        q  = v - c1*u
    r  = x*c + y*s       i  = y*c - x*s
    ar = p + s2*r        br = p - s2*r
    ai = q + s1*i        bi = q - s1*i

- With c1 = 0, s1 = s2 = 1 and g_sel = 0 this is the butterfly
  A' = A + e^(-j theta) B, B' = A - e^(-j theta) B.
- c1 = 1 folds the two upper inputs, as the real-data algorithm's
  a(n) + a(N-n) pre-additions require.
- g_sel = 1 serves the 45-degree butterflies.
- Coefficients are Q2.14. Outputs are 19 bits, and latency is 3 cycles.
- The control semantics are this design's reading of the published block
  diagram. Only the parts (delay, four multipliers, the
  1-or-1/sqrt(2) multiplier, two adder columns, controls c1, s1, s2) are
  taken from it.

## Top level (`cordic_dft_top`)

The four units share `clk` and `rst_n` and nothing else. Their ports are
brought out with the prefixes `dft_`, `sc_`, `hyp_` and `bp_`. Every unit
uses an asynchronous, active-low reset. The reset clears control and valid
flags. Data registers are not reset, because the valid flags qualify them.

Size after coarse synthesis at the defaults:

- about 4,600 flip-flop bits, about 2,700 of them in the DFT unit;
- 672 bits of register-file memory (16 x 2 x 21);
- about 700 word-level cells.

The DFT unit uses no multipliers. The butterfly processor has five, and the
hyperbolic rotator has two constant multipliers.

## Where this RTL departs from the article

- **Transform algorithm.** The article derives its own real-data recursion.
  It splits the cosine and sine sums in halves, which needs fewer rotations
  than an FFT, and it sketches it for 64 points. This RTL uses the ordinary
  radix-2 FFT schedule at 16 points instead, with the article's twiddle
  direction table. It computes complex transforms and all 16 bins. It does
  not reach the article's operation counts.
- **IDFT.** The article's real-data IDFT ends with an extra step
  f(n) = A(n) - B(n), f(N-n) = A(n) + B(n). With a complex FFT that step does
  not exist: the inverse just rotates the other way.
- **64-point machine.** The article counts the parts of a 64-point processor
  array: 16 butterfly processors, serial multipliers and adders, 31-bit
  shift registers and a 64x64 crossbar. It does not describe how they are
  scheduled or routed, so the array is not built. Its butterfly processor
  is built, as `bfly_proc`.
- **Gain constant.** The article's compensation product is implemented as
  given. It is 0.607240, not exactly 1/1.6467603, hence the 2e-5 gain
  error.
- **Hyperbolic mode.** The article says the DFT can be realised with
  hyperbolic rotations, but its twiddles are circular rotations. The
  hyperbolic unit is therefore provided on its own, not used by the DFT.
- **Sine/cosine generator.** The article's generator keeps 8-bit registers
  in all eight stages. This one carries two guard bits (10-bit x, y) and a
  12-bit angle, which it needs for +-2 LSB accuracy. The phase coding
  (256 = one turn) and the output scale (127) are choices made here. For
  phase 82 (115.3 degrees) it gives sin 115, cos -53. The article's
  waveform shows sin 116 and cos -50 for the same phase.
- **Widths, interfaces, reset, latencies.** All are this design's. The
  article gives no data width for the DFT datapath and no timing beyond
  "one pipeline step per adder delay".

## Simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each prints `TB_RESULT checks=N failures=M` and stops. A watchdog counts a
failure if it hangs. Files are found through `-y`; the package is listed
first. For example:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/cordic_pkg.sv tb/tb_cordic_dft16.sv --top-module tb_cordic_dft16
    ./obj_dir/Vtb_cordic_dft16

What the testbenches cover:

- `tb_cordic_dft16` compares against a direct floating-point DFT. It uses
  random complex data, real data (and checks the conjugate symmetry), an
  impulse, a full-scale tone, inverse transforms and a round trip. It checks
  the ready/valid sequence and the 125-cycle compute time.
- `tb_cordic_pipe` checks random direction words and every ROM row against
  floating-point rotations, and the 23-cycle latency.
- `tb_cordic_dft_top` runs all four units at once at their default sizes.
  It counts that each mechanism occurred at least once: forward and inverse
  transforms, input refused while busy, pipeline drain between stages,
  clock-enable stall, all four sine quadrants, and each butterfly-processor
  mode.

All testbenches finish in well under a second.

## Changing the design

- **Transform precision.** Change `DW` (sample width) of `cordic_dft16`;
  `MW` follows.
- **CORDIC accuracy.** `NITER` sets the number of micro-rotations in
  `cordic_pipe`. The direction ROM has 17, so `cordic_dft16` uses at most 17.
- **Sine/cosine sizes.** `cordic_sincos` takes `PHASE_W`, `OUT_W` and
  `STAGES`.
- **Other transform sizes.** A different N needs a new direction table
  (N/2 rows) and wider address counters. The pipeline itself does not
  change.
