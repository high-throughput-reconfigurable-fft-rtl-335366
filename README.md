# Approximate block-floating-point FFT with conflict-free memory, and a generalized scaling-free CORDIC

The FFT engine is memory-based. It transforms 4096 or 2048 complex samples and
takes and returns eight samples per clock, in natural order. No reorder buffer
is needed. Three ideas make this work:

- **Conflict-free banking.** Each of the two working memories is split into
  eight single-port banks. Samples are placed so that the eight words needed in
  any one cycle are always in eight different banks. This holds for an input
  beat, for a radix-8 butterfly of any stage, and for an output beat. A pair of
  rotators (the *commutators*) moves data between the eight lanes and the eight
  banks.
- **One reconfigurable butterfly.** A radix-8 butterfly is built from two
  radix-4 cores. It can also run as two independent radix-4 butterflies. So
  4096 = 8^4 and 2048 = 8^3 x 4 run on the same hardware, and each stage takes
  the same number of cycles.
- **Cheap arithmetic, kept accurate.** Twiddle products and the sqrt(2)/2
  constant use truncated (approximate) multipliers. Block floating point
  recovers the accuracy: each stage is shifted right only as far as the data
  actually needs, and the shifts add up to one exponent per frame.

Next to the FFT there is a second, independent design: a **generalized
reconfigurable CORDIC**. It computes rotation or vectoring on the circular or
hyperbolic trajectory, chosen by two 1-bit controls, T and M. It uses
scaling-free third-order micro-rotations, so no gain correction is needed. It
comes in a pipelined version (15 micro-rotators, one result per cycle) and a
recursive version (one micro-rotator used 15 times).

The top module `fft_cordic_top` places `fft_core`, `cordic_pipelined` and
`cordic_recursive` side by side. They share only `clk` and `rst`. Their ports
carry the prefixes `fft_`, `cp_` and `cr_`.

---

## FFT engine

### Data format and frame protocol

- A sample is `cplx_t` (`rtl/fft_pkg.sv`): 16-bit signed real and 16-bit
  signed imaginary parts. In memory they form one 32-bit word, with the real
  part in bits [31:16].
- Input: one beat per cycle while `in_valid && in_ready`. Beat t carries
  samples 8t..8t+7, with sample 8t+j on lane j.
- `m2k` is sampled on the first beat of a frame: 1 means 2048 points, 0 means
  4096.
- Output: `out_valid` beats carry bins 8t+j on lane j. There is no
  back-pressure.
- The true spectrum is `out_data * 2^out_exp`, where `out_exp` is the sum of
  the block-floating-point shifts of the frame. No 1/N scaling is applied
  beyond that. The exponent depends on the data. Random full-scale input
  gives 9 for 4096 points and 8 for 2048. A full-scale single tone, where all
  the energy ends in one bin, gives 12 = log2(4096).
- `frame_done` pulses on the last output beat. `in_ready` rises again for the
  next frame.

### Ping-pong schedule

There are two memory groups, A and B (`mem_group`). Each has eight
512 x 32 banks (`sram_bank`), each with a registered output, so a read takes
two cycles. Each frame has a *home* group H, and the other group is O. The
home group alternates from frame to frame. A frame runs through these phases:

| phase   | reads | writes | beats |
|---------|-------|--------|-------|
| load    | input | H      | N/8   |
| stage 0 | H     | O      | N/8   |
| stage 1 | O     | H      | N/8   |
| stage 2 | H     | O      | N/8   |
| stage 3 | O     | H      | N/8   |
| output  | H     | output | N/8   |

Four stages bring the result back to the home group. So while frame k is
output from its home group, frame k+1 can be loaded into the other group,
which is frame k+1's home. Single-port banks are enough for this, because a
group is never read and written in the same cycle. An assertion in
`fft_core` checks that.

`fft_ctrl` has two sequencers:

- the **load sequencer** raises `in_ready` whenever the compute side is idle
  or in its output phase and no loaded frame is waiting;
- the **compute sequencer** starts a frame's stages once its load is complete
  and the previous output has finished.

Each load and each stage is followed by a 5-cycle drain. The drain lets the
last results reach memory, and reach the headroom detector, before they are
read.

The timing that results:

- A frame loaded into an idle processor takes **6·N/8 + 27 cycles** from its
  first input beat to its last output beat: 3099 for 4096 points, 1563 for
  2048.
- A continuous stream finishes one frame every **5·N/8 + 27 cycles**: 2587
  for 4096 points, 1307 for 2048. At 4096 points this is 1.58 samples per
  cycle.
- The block exponent travels down the read pipeline with each output beat.
  The next frame's stages may therefore start before the last beats of the
  previous frame have left.

### Labels, banks and addresses (the conflict-free mapping)

This is the part to understand before changing anything. Every sample carries
a *label*: its position in an in-place decimation-in-frequency schedule.

**4096 points.** The label is the sample index written as four octal digits,
D3 D2 D1 D0. Stage s combines the eight samples that differ only in digit
D(3−s). After the last stage, the bin whose index has octal digits k3 k2 k1 k0
sits at the label with those digits reversed (k0 k1 k2 k3).

- **Bank:** (D3 + D2 + D1 + D0) mod 8. Changing any single digit through all
  eight values visits all eight banks. So any eight labels that differ in one
  digit land in eight different banks. That covers:
  - an input beat (differs in D0),
  - a butterfly of any stage,
  - an output beat (differs in the digit that holds k0).
- **Address within a bank:** the label with one digit removed. The removed
  digit is the one the *next reader* of that memory selects on. The reader then
  finds its eight samples at the same address in all banks. The writer's eight
  samples differ in some other digit, so it uses eight different addresses,
  one per bank.

**2048 points.** The label is e3 e2 e1 (octal) plus e0 (0..3), with
n = 256·e3 + 32·e2 + 4·e1 + e0.

- Stages 0..2 are radix-8 on e3, e2 and e1.
- Stage 3 runs two radix-4 butterflies on e0 in the same cycle. The two are
  paired so that they differ in the low bit of e1.
- **Bank:** (e3 + e2 + e1 + 2·e0) mod 8. Weighting e0 by two gives the two
  radix-4 groups, and the input and output beats, disjoint bank sets.

**Lanes and banks.** In every access, lane v sits in bank (P(v) + state)
mod 8. `state` is a 3-bit rotation that `fft_agu` computes for each beat or
butterfly. P is the identity, except for the 2048-point load and radix-4
stage, where P(v) = {v[1:0], v[2]}.

**Commutators.** The forward commutator (lanes to banks) and the reverse
commutator (banks to lanes) apply exactly this rotation and shuffle
(`commutator`, parameter `REVERSE`). Addresses pass through a forward
commutator too. The digit reversal of the output is absorbed into the output
addressing. Nothing is moved explicitly.

**Testing.** `fft_agu` is combinational. `tb_fft_agu` checks it against a
label-tracking memory model: every access, in both modes and all phases, must
hit eight distinct banks and find exactly the labels it expects.

### Butterfly multiplication unit

`bmu` is a 2-stage pipeline: `bf8`, then a register, then the twiddle
multipliers, then the shift.

- **`bf8`.** Radix-8 mode runs a radix-4 core on x0, x2, x4, x6 and another on
  x1, x3, x5, x7. The odd outputs are then rotated by W8^k and combined.
  - W8^2 = −j is a swap and a negation.
  - W8^1 and W8^3 use a single shared constant, 23170 ≈ (√2/2)·2^15, fed to
    approximate multipliers.
  - Radix-4 mode outputs DFT4(x0..x3) on lanes 0..3 and DFT4(x4..x7) on lanes
    4..7. The constant multipliers get zero inputs in this mode, so they do not
    toggle.
  - Outputs are 4 bits wider than the inputs (20 bits), so they cannot
    overflow.
- **Twiddles.** `twiddle_rom` holds a quarter-wave cosine table of N/4+1
  entries in Q1.15. The table is computed at elaboration with `$cos`, and the
  quadrant of the exponent selects the sign and the sin/cos swap. For lane v of
  a butterfly whose label residue is r (label mod stride), the exponent is
  v·r·4096/(8·stride). The 2048-point stages use the even exponents of the same
  table. Lane 0, and any lane whose exponent is 0, bypasses its multiplier.
- **`cmult` / `approx_mult`.** A complex product uses four signed 20 x 16
  multipliers. Each multiplier drops every partial-product bit below column
  `TRUNC` (12 by default) before summing the rows. The error is small and
  biased negative. `TRUNC = 0` gives exact products.
- **Shift.** Each lane is shifted right by the stage's `sh`, rounded to
  nearest and saturated to 16 bits.

### Block floating point

- `bfp_unit` watches every word written during a phase. It ORs v ^ (v >>> 15)
  over the real and imaginary parts. The leading zeros of that value, minus
  one, give the *headroom*: the number of redundant sign bits common to the
  whole block.
- When a stage starts, `fft_ctrl` sets sh = max(0, G − headroom). G is the
  worst-case growth of the butterfly: 4 bits for radix-8, 3 for radix-4.
- `out_exp` is the sum of the four shifts.
- Small-signal frames are shifted less and keep their precision. In the
  end-to-end test, several stages take a zero shift.

### Measured accuracy

SQNR is measured against a double-precision DFT. Unless noted otherwise, the
input is random, with real and imaginary parts uniform in ±16000:

| case            | SQNR    |
|-----------------|---------|
| 4096 points     | 63.6 dB |
| 2048 points     | 65.8 dB |
| input at about 1/50 of full scale | 53.3 dB |
| full-scale single tone, 4096 points | 80.8 dB |

For the small input, the block exponent is smaller and the relative error
grows only as expected from 16-bit input quantization.

---

## Generalized reconfigurable CORDIC

### Micro-rotation

Each step of `rccu` rotates (x, y) by about α = 2^-s using a third-order
Taylor expansion whose gain is 1 to working precision:

    cos α ≈ 1 ∓ 2^-(2s+1)            (− circular, + hyperbolic)
    sin α ≈ 2^-s ∓ 2^-(3s+2+T)        (third-order term: shift 3s+3 circular, 3s+2 hyperbolic)

Only shifts and add/subtract are used. T selects the trajectory by flipping
the signs of the adders: T = 1 is circular, T = 0 is hyperbolic. M selects
the mode:

- **Rotation (M = 0).** The step is taken when the decision bit from the
  sequence generator is set. The rotation is counter-clockwise.
- **Vectoring (M = 1).** A clockwise step is tried. It is kept when the
  rotated y stays non-negative. The `acc` output then tells the angle
  accumulator to add 2^-s.

### Micro-rotation sequence

`mrsg` produces the shift sequence s = 2, 2, 2, 3, 4, …, 14. That is
15 steps, with basic shift 2.

- **Rotation mode.** The reduced angle φ in [0, π/4] is decomposed directly.
  The first three steps (each 1/4 rad) are taken floor(4φ) times. After that,
  step i is taken when bit i of the fraction of φ is set. This works because
  2^-s is used as the angle of a step: the third-order formulas make the
  rotation angle equal 2^-s to within the precision of the datapath.
- **Vectoring mode.** The sequence generator adds 2^-s to the angle whenever
  a step is accepted.

### Range extension

`cordic_pre` maps every request into the range the chain can handle.
`cordic_post` undoes the mapping.

- **Circular rotation.** θ in [−π, π] is reduced by quarter turns. Above π/4
  it is reflected (φ = π/2 − φ, with y negated before and after). The
  post-processor then applies the quarter turns to the result.
- **Circular vectoring.** The vector is folded into the first octant using the
  signs of x and y and a swap when |y| > |x|. The angle is then mapped back to
  [−π, π].
- **Hyperbolic.** Only sign symmetry is used, because hyperbolic functions have
  no octant symmetry:
  - rotation accepts |θ| up to about 1 rad;
  - vectoring needs x > 0 and |y| < about 0.65·x.

### Formats, versions and timing

- Data in and out is Q2.13 in 16 bits (range ±4). Internally it is 21 bits,
  with 4 extra fraction bits and 1 extra integer bit.
- Angles are 18-bit signed with 15 fraction bits.
- Rotation returns the rotated vector. Vectoring returns the angle in
  `theta_o`, and in `x_o` the magnitude: sqrt(x²+y²) for circular, sqrt(x²−y²)
  for hyperbolic.

| version            | interface                                   | latency                         | throughput            |
|--------------------|---------------------------------------------|---------------------------------|-----------------------|
| `cordic_pipelined` | `valid_i` → `valid_o`                       | 10 cycles (`PER` = 2)           | one request per cycle |
| `cordic_recursive` | `start`, `busy`, one-cycle `done` pulse     | `done` 16 cycles after `start` is taken | one request per 17 cycles |

A `start` while the recursive version is busy is ignored.

In `cordic_pipelined`, a pipeline register follows every `PER`-th
micro-rotator and the last one. The default `PER = 2` gives eight register
stages in the chain. `PER = 1` registers every micro-rotator and gives a
latency of 17 cycles, with bit-identical results. Raising `PER` shortens the
latency and lengthens the critical path.

Measured worst-case errors over random tests, in Q2.13 units converted to
real values:

| configuration        | max error |
|----------------------|-----------|
| circular rotation    | 0.0018    |
| hyperbolic rotation  | 0.0049    |
| circular vectoring   | 0.002 rad |
| hyperbolic vectoring | 0.003     |

---

## Module map

| file | role |
|------|------|
| `fft_pkg.sv`, `cordic_pkg.sv` | shared widths, `cplx_t`, phase enum, CORDIC constants and octant flags |
| `fft_cordic_top.sv` | top: FFT and both CORDICs side by side |
| `fft_core.sv` | FFT datapath: memories, commutators, BMU, pipeline bookkeeping |
| `fft_ctrl.sv` | phase sequencer, drain, block-exponent bookkeeping |
| `fft_agu.sv` | labels → banks, addresses, rotation state, twiddle exponents |
| `commutator.sv` | lane ↔ bank rotation (forward / reverse) |
| `mem_group.sv`, `sram_bank.sv` | 8-bank group; 512 x 32 bank with output register |
| `bmu.sv`, `bf8.sv` | butterfly multiplication unit; radix-8 / dual radix-4 butterfly |
| `cmult.sv`, `approx_mult.sv` | complex twiddle multiplier; truncated multiplier |
| `twiddle_rom.sv` | quarter-wave twiddle table, 8 lanes |
| `bfp_unit.sv` | block headroom detector |
| `rccu.sv`, `mrsg.sv` | micro-rotator; micro-rotation sequence generator |
| `cordic_pre.sv`, `cordic_post.sv` | range reduction and its inverse |
| `cordic_pipelined.sv`, `cordic_recursive.sv` | the two CORDIC versions |

Every file opens with a comment on its function, interface and timing.

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if the design
hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/fft_pkg.sv rtl/cordic_pkg.sv tb/tb_fft_cordic_top.sv \
        --top-module tb_fft_cordic_top -Mdir obj && obj/Vtb_fft_cordic_top

Replace the testbench name to run any other block test; each is named
`tb_<module>`.

`tb_fft_cordic_top` is the end-to-end test. It runs at the default parameters
and takes about a second. In that time it:

- streams four frames back to back through the FFT: 4096 points, 2048
  points, a small-signal 4096-point frame, and 4096 points again;
- streams mixed requests through both CORDICs;
- counts how often each mechanism occurs: stage shifts applied and skipped,
  radix-4 issues, 2048-point lane shuffles, commutator rotations, input
  beats accepted during output, CORDIC
  quadrant reduction, reflection, swap and negative-input folding, hyperbolic
  and vectoring requests.

`tb_fft_core` also measures SQNR. It checks the latency of isolated frames and
the period of a back-to-back stream of mixed-size frames.

## Departures, limits and choices

- **Throughput.** The original architecture reports 1073.82 MS/s at
  671.14 MHz for 4096 points, which is 1.6 samples per cycle, or 2560 cycles
  per frame. Overlapping load and output gives 2587 cycles per frame here,
  which is 1062.6 MS/s at that clock. The 27 extra cycles are the drains and
  the read latency. Removing them would need the stages to overlap each other,
  with forwarding or bank-level tracking of which words are ready. That is not
  done.
- **Own rules.** These are choices of this design:
  - the bank address rule (label minus the next reader's digit);
  - the 2048-point bank function and radix-4 pairing;
  - the lane shuffle P.

  The 4096-point bank assignment (octal digit sum) is the classic one. The
  per-bank address layout differs from the tables published with the original
  architecture. It is conflict-free by construction, and the address-generator
  testbench checks this exhaustively.
- **Other choices.** The approximation scheme (column truncation, `TRUNC=12`),
  the word widths and the block-floating-point rule are choices of this
  design. `TRUNC`, and the widths in `fft_pkg`, can be changed.
- **Memories.** They are plain arrays, so a synthesis flow will infer them or
  map them to SRAM macros. Reset clears control state only, not memory
  contents.
- **CORDIC variants.** Only the generalized CORDIC with basic shift 2 is
  built. The rotation-only and vectoring-only variants are special cases of
  it, with M held constant. The original architecture gives eight iterations
  for its rotation-only recursive unit, although its rotation-only pipeline
  has 15 micro-rotators. Here rotation takes the 15 iterations of vectoring,
  because both share one counter. The
  rotation-only pipeline of the original architecture orders its shifts
  differently (2, 2, 2, 14, 3, 13, …). Rotation-mode steps commute, so this
  changes timing but not results. Here the vectoring order is used for both
  modes. A basic-shift-3 variant would need another
  sequence generator, with longer sequences of 11 and 17 steps, and is not
  provided.
- **Hyperbolic ranges.** These are limited as described under Range extension.
