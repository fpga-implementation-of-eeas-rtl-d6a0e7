# EEAS CORDIC sine and cosine generator

This is an iterative CORDIC that computes sine and cosine of an angle with only
shifts and adds in its rotation loop. Plain CORDIC rotates the vector (1, 0)
through the fixed angles atan(1), atan(1/2), atan(1/4), … and picks only the
direction of each one. This design uses a larger set of angles instead: the
*extended elementary angle set* (EEAS). The tangent of each micro-rotation may
be made of **two** signed powers of two:

    t = 2^-s0            or   t = 2^-s0 + 2^-s1   or   t = 2^-s0 - 2^-s1     (s0 < s1)

A rotation by atan(t) still needs only two shifts and one add per cross term.
Every step can pick any element of the set, not just the next one in a fixed
order. Each step may also be skipped. As a result a small, **fixed** number of
micro-rotations, Rm, leaves a very small residual angle. The iteration count is
the same for every input, so the latency is constant.

With the default sizes (24-bit words, Rm = 15):

* sine and cosine are within 26 LSB (about 6·10⁻⁶) of the exact values over the
  whole input range, in the tests run;
* for 30° the residual angle after 15 iterations is 1.4·10⁻⁵ degrees, one LSB
  of the angle register;
* a result is ready 17 clock cycles after `start`.

## Number format

All words are two's complement fixed point with 22 fraction bits (Q2.22 at the
ports: 24 bits, range about ±2).

* `angle` is in radians. The usable range is the whole format, about ±114.6°.
  No quadrant folding is needed, because the largest element, atan(1.5) = 56.3°,
  may be used several times.
* `sin` and `cos` use the same format. 1.0 is `0x400000`, and 0.5 is `0x200000`.
* Internally x, y, z and the scale product carry `GUARD` = 2 more integer bits
  (26 bits). The vector is not normalised while it rotates, and its length grows
  to about 2.

## Choosing the micro-rotations (`eeas_recoder`)

The algorithm asks for this: given θ and Rm, choose at most Rm elements of the
set so that the residual angle θ − Σ ±atan(tⱼ) is as small as possible. It does
not say how to solve that. This design solves it **greedily, one step at a
time, in hardware**:

* The recoder sees the current residual z.
* It compares |z| with the angle of every element of the set, all in parallel,
  and takes the closest one. On a tie the element with the lower index wins.
* The rotation goes towards z, that is clockwise when z < 0.

The set has 1 + N + N(N−1) elements, 485 for N = `NSHIFT` = 22:

* the zero element (no rotation);
* N single terms 2^-s;
* both the sum and the difference for every pair s0 < s1.

The zero element matters. Once nothing in the set brings z closer to zero, the
step is skipped, so the residual never grows. For most inputs the residual
reaches a single LSB in well under 15 steps, and the remaining steps are skips.

For each chosen element the recoder outputs:

* the element (s0, s1 and the kind of term);
* the direction;
* the signed angle ±atan(t) to subtract from z;
* cos(atan(t)) = 1/√(1+t²), which the gain correction needs.

Two constant tables are computed from these formulas with real arithmetic at
elaboration: atan(t) and 1/√(1+t²), both rounded to 22 fraction bits. No table
file is involved (see `eeas_pkg`).

The parallel search is the largest part of the design: about 485 magnitude
comparisons of 26 bits in one combinational path. The tables also need about
33 kbit of ROM. That buys one micro-rotation per clock, at the price of a long
critical path.

## Datapath and gain correction (`eeas_cordic`)

The top follows the classic iterative CORDIC organisation:

* registers X, Y and Z with load multiplexers;
* an iteration counter;
* shifters and adder/subtractors for x and y;
* an angle table and direction control for z.

Each clock performs one micro-rotation (`eeas_microrotation`), with d = ±1:

    x ← x − d·t·y        y ← y + d·t·x        z ← z − d·atan(t)

Here t·v = (v >>> s0) ± (v >>> s1), so each cross term needs two shifters.
Shifted-out bits are truncated.

Each micro-rotation also stretches the vector by √(1+t²). In plain CORDIC that
stretch is the same for every angle, so 1/K = 0.60725 can be preloaded into x.
Here the stretch depends on which elements were chosen, and so on the angle.
The design therefore:

1. starts with x = 1.0, y = 0 and P = 1.0;
2. multiplies the running product P by cos(atan(tⱼ)) at every step;
3. after the last step, spends one more cycle computing cos = x·P and sin = y·P.

Two rounded fractional multipliers (`eeas_scale_mult`) do this work. P shares
one multiplier with x.

## Control and timing (`eeas_ctrl`)

| state  | cycles | what happens |
|--------|--------|--------------|
| IDLE   | –      | waits for `start`; the edge that accepts `start` loads x = 1, y = 0, z = `angle`, P = 1 |
| ROTATE | Rm     | one micro-rotation per clock, `iter` = 0 … Rm−1 |
| SCALE  | 1      | x, y ← x·P, y·P |
| DONE   | –      | `done` high, `sin`/`cos` valid and held; a new `start` is accepted here too |

* `done` rises Rm + 2 clock edges after the edge that accepted `start`
  (17 cycles by default). It stays high until the next `start` is accepted.
* `busy` is high in ROTATE and SCALE, and `start` is ignored while it is high.
* `angle` is sampled only when `start` is accepted.
* `reset` is synchronous and active high.

Ports of `eeas_cordic`: `clk`, `reset`, `start`, `angle[23:0]`, `sin[23:0]`,
`cos[23:0]`, `done`, `busy`.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `W`       | 24 | width of `angle`, `sin`, `cos` |
| `FRAC`    | 22 | fraction bits |
| `NSHIFT`  | 22 | shifts s = 0 … NSHIFT−1 available to the elements (at most 32) |
| `RM`      | 15 | fixed number of micro-rotations |
| `GUARD`   | 2  | extra integer bits inside |

The defaults live in `eeas_pkg`.

* Making `NSHIFT` smaller shrinks the set quadratically, and the recoder with
  it, at some cost in accuracy.
* A smaller `RM` shortens the latency. Check the accuracy with the testbenches
  before relying on it.

## How far this follows the algorithm, and where it departs

These parts follow the EEAS description:

* the two-term angle set;
* the three-valued direction (+, −, skip);
* the fixed iteration count Rm = 15;
* the 24-bit ports;
* the iterative X/Y/Z register organisation;
* the port names and the 22-fraction-bit scaling.

The scaling can be read off the reference waveform: it shows the initial cosine
value 0x26DD3B = 0.607253·2²².

These are this design's own choices:

* **Greedy recoding by a parallel search.** An offline or optimal search could
  find shorter sequences for some angles. The greedy one is simple and never
  makes the residual worse.
* **Gain correction by multiplication at the end.** This adds two multipliers
  and one cycle. The alternative would be a shift-add scaling phase, which is
  not specified here.
* **Handshake and reset.** The `start`/`done` protocol, `busy` and the reset
  polarity.
* **Angle range and wrapper.** There is no angle wrapper. The input range is
  simply the Q2.22 range.

The reference simulation of the original implementation shows a different
gain approach. Its intermediate x/y values follow the conventional shift
sequence 0, 1, 2, … with 1/K preloaded into x. This RTL follows the EEAS
algorithm instead, so its intermediate register values differ from that
waveform. The final sine and cosine agree.

The original design also sent its results to the character LCD of an FPGA
evaluation board. That display path is not included. `sin` and `cos` are plain
output ports for whatever display or consumer is attached.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_eeas_recoder` | chosen element against a real-valued exhaustive search of the set; delta, direction and cos factor of the element |
| `tb_eeas_microrotation` | x', y' against the exact real recurrence (≤ 2 LSB); all term kinds, both directions, skip |
| `tb_eeas_scale_mult` | exact rounded product against real arithmetic |
| `tb_eeas_ctrl` | Rm rotate cycles with `iter` in order, one scale cycle, `done`/`busy`, ignored and back-to-back starts, reset |
| `tb_eeas_cordic` | end to end at the default sizes, described below |
| `tb_eeas_cordic_30deg` | 30° on an Rm = 15 and an Rm = 20 instance: values, latency Rm+2, residual below 0.014° |

`tb_eeas_cordic` runs the generator at the default sizes on 307 angles:

* 0, ±90°, 45° and 30°;
* both ends of the format;
* 300 random angles.

It compares `sin` and `cos` with `$sin` and `$cos` (tolerance 64 LSB; the
observed maximum is 26). It also checks the latency, back-to-back starts and a
reset in the middle of a computation. Finally it counts how often each
recoding case occurs: skipped step, single term, two-term sum, two-term
difference, clockwise and counter-clockwise. A case that never occurs is a
failure.

Assertions in the RTL check two things:

* the iteration counter stays in range, and scaling follows exactly Rm
  rotations;
* the final results fit the output width.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl rtl/eeas_pkg.sv \
        tb/tb_eeas_cordic.sv --top-module tb_eeas_cordic -o sim
    ./obj_dir/sim

Replace the testbench name to run any other one. `eeas_pkg.sv` must come
first, because the other files import it. The tables are computed with
`$atan` and `$sqrt` in constant functions, so the elaborating tool must
support real math in constant expressions. Verilator and slang both do.

## Files

| file | content |
|------|---------|
| `rtl/eeas_pkg.sv` | default sizes, element type, element numbering, table functions |
| `rtl/eeas_recoder.sv` | greedy choice of the next element |
| `rtl/eeas_microrotation.sv` | one two-term shift-add rotation |
| `rtl/eeas_scale_mult.sv` | rounded fractional multiply |
| `rtl/eeas_ctrl.sv` | state machine and iteration counter |
| `rtl/eeas_cordic.sv` | top: registers, datapath, gain correction |
