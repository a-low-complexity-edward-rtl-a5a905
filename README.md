# Binary Edwards curve point multiplier over GF(2^233)

This RTL computes a scalar point multiplication Q = k·P on a binary Edwards
curve (BEC) over GF(2^233). It follows the low-complexity architecture of
"A Low-Complexity Edward-Curve Point Multiplication Architecture" (Sajid,
Rashid, Imran, Jafri). It is meant for designs that need small area and still
good throughput.

The main idea is to reduce the curve arithmetic to instructions that each do
**exactly one field operation**: one addition, one multiplication, or one
multiplication followed by a squaring. One such instruction runs per clock
cycle on a small, fixed datapath:

* a 10-cell register file (the *memory unit*);
* two 6-to-1 operand multiplexers;
* an ALU with a XOR adder, a single-cycle 32-bit **digit-parallel** multiplier,
  and a squarer placed after the multiplier;
* a 3-to-1 result multiplexer that writes back into the register file.

A finite-state machine (the *control unit*) sequences these instructions. It
runs a Montgomery ladder in w-coordinates, and then one field inversion that
returns the affine result.

## Arithmetic model

Points are kept in projective w-coordinates (W : Z), where w = W/Z. For a point
(x, y) on the curve, w = (x + y) / (d1 (x + y + 1)). The curve enters the
hardware only through two constants:

* e1 = e^(1/4);
* e2 = e^(1/2);

where e = d1^4 + d1^3 + d1^2·d2. The ladder keeps two points, P1 = (W1 : Z1)
and P2 = (W2 : Z2). Their difference is always the base point P, whose affine
w-coordinate `w` is an input.

Each ladder step doubles one point and adds the two:

```
doubling:  Wd = (W1·Z1)^2          Zd = (e1·W1 + Z1)^4
addition:  Za = (e2·W1·W2 + Z1·Z2)^2
           Wa = W1·W2·Z1·Z2 + w·Za
```

Both formulas are homogeneous, so every point may carry its own projective
scale. The affine result does not depend on how the base point is scaled, and
the testbench checks this.

Key bits are processed most significant first:

* k_i = 0: P1 ← 2·P1 and P2 ← P1 + P2;
* k_i = 1: the same step with the roles of P1 and P2 swapped.

The ladder starts at (P1, P2) = (neutral point, P). At the end,
(W1 : Z1) = k·P and (W2 : Z2) = (k+1)·P.

## The ladder step: 13 single-operation instructions

This part is the hardest to follow. The two formulas above become 13
instructions. Each one reads at most two register cells or constants, and
writes one cell. Shown here for k_i = 0 (p = 1, q = 2); for k_i = 1 swap the
indices. State numbers 37..49 (k_i = 0) and 50..62 (k_i = 1) are the FSM
states that issue each instruction.

| # | operation            | ALU path  | meaning                     |
|---|----------------------|-----------|-----------------------------|
| 1 | T1 ← Wp · Zp         | multiply  | A                           |
| 2 | T2 ← Wp · Wq         | multiply  | B                           |
| 3 | T3 ← Zp · Zq         | multiply  | C                           |
| 4 | W0 ← e1 · Wp         | multiply  |                             |
| 5 | **Wp** ← T1 · T1     | multiply  | Wd = A^2                    |
| 6 | Z0 ← W0 + Zp         | add       | e1·Wp + Zp                  |
| 7 | **Zp** ← (Z0 · Z0)^2 | mul + sqr | Zd, a fourth power in 1 cycle |
| 8 | W0 ← e2 · T2         | multiply  | e2·B                        |
| 9 | Z0 ← W0 + T3         | add       | e2·B + C                    |
|10 | **Zq** ← Z0 · Z0     | multiply  | Za                          |
|11 | Z0 ← T2 · T3         | multiply  | B·C                         |
|12 | T2 ← w · Zq          | multiply  | w·Za                        |
|13 | **Wq** ← Z0 + T2     | add       | Wa                          |

Key points:

* Squarings are done as a·a on the multiplier. A fourth power uses the
  multiplier and squarer together, so it still takes one cycle. This is how
  the published 14-instruction list shrinks to 13.
* Each new coordinate (bold) goes straight into the cell of the old one, once
  nothing reads that cell any more. No copy cycles are needed, and the next
  step finds its points in W1, Z1, W2, Z2 again.
* Instructions 4 and 5 are in the opposite order to the published list. That
  way Wp is read (instruction 4) before it is overwritten (instruction 5).
* The ladder uses nine cells. T4 is used only during the inversion.

Each step also spends one cycle in the conditional state 36. That state counts
the step and tests the next key bit. So a step takes **14 cycles**.

## Field arithmetic (GF(2^233), f = x^233 + x^74 + 1)

* **Multiplier** (`gf_mul_dp`), combinational, one multiplication per cycle:
  * the splitter cuts B into eight digits, B1 = B[31:0] … B7 = B[223:192] and
    B8 = B[232:224] (9 bits, zero-extended);
  * eight `gf_digit_mul` instances form A·Bi in parallel, 264 bits each;
  * `gf_concat` shifts each partial product by 32·(i−1) bits and XORs it in,
    giving the 465-bit product;
  * `gf_reduce` reduces it modulo f.
* **Reduction** (`gf_reduce`): the reduction is two folds. First,
  H = c[464:233] is folded back as H + H·x^74, using x^233 = x^74 + 1. This
  reaches degree 305, so the bits above 232 are folded once more. The method
  works for any trinomial with 2K < M.
* **Squarer** (`gf_sqr`): it puts a zero between the input bits and then uses
  its own instance of the reduction block.
* **Adder** (`gf_add`): bitwise XOR.

## Inversion and affine output

After the last ladder step, the FSM inverts Z1 with an Itoh–Tsujii
"quad-block" chain. Let β_i = a^(2^i − 1). The chain runs along
1, 2, 3, 6, 7, 14, 28, 29, 58, 116, 232 using β_(i+j) = β_i^(2^j) · β_j:

* a single squaring is a·a;
* each further pair of squarings is one (a·a)^2 cycle;
* the final step computes β_232 · β_116 and squares it in the same cycle,
  giving a^(2^233 − 2) = a^(−1).

The chain runs in states 4..29. A repeat counter covers the runs of fourth
powers (3, 6, 14, 28 and 57 cycles). It takes 129 cycles. State 30 then
computes q = W1 · Z1^(−1) = w(k·P) and loads it into the output register.

## Control unit and timing

The state codes follow the published numbering:

| state  | action                                                                  |
|--------|-------------------------------------------------------------------------|
| 0      | idle; `start` clears the register file and latches k                    |
| 1..3   | W2 ← x, Z2 ← y, Z1 ← y (W1 = 0 from the clear): (P1, P2) = (O, P)       |
| 36     | next key bit: 0 goes to 37, 1 goes to 50; counts steps                  |
| 37..49 / 50..62 | the 13 instructions; after the last step go to 4, otherwise to 36 |
| 4..30  | inversion and affine conversion                                         |
| 63     | `done` for one cycle, then back to 0                                    |

Latency from the `start` cycle to `done` is 3 + 14·KEY_BITS + 131 cycles,
which is **3396 cycles** for a 233-bit key. The published figure is 3244
cycles. The difference has two causes:

* this design spends a separate cycle in state 36 on every step;
* its inversion schedule is different.

## Interface (`bec_pm_top`)

| port            | dir | width | meaning |
|-----------------|-----|-------|---------|
| clk, rst        | in  | 1     | clock, synchronous active-high reset |
| start           | in  | 1     | one-cycle pulse, accepted only when idle |
| k               | in  | KEY_BITS (233) | scalar |
| e1, e2          | in  | 233   | e^(1/4), e^(1/2) |
| w               | in  | 233   | affine w-coordinate of P |
| x, y            | in  | 233   | P in projective w-coordinates, x/y = w, y ≠ 0 (plainly x = w, y = 1) |
| busy, done      | out | 1     | running; one-cycle completion pulse |
| q               | out | 233   | affine w(k·P), held until the next result |
| w1, z1, w2, z2  | out | 233   | projective k·P and (k+1)·P |

Keep the inputs stable from `start` until `done`. For k = 0 the result is the
neutral point: q = 0 and W1 = 0.

## Departures from the published architecture

* **Inversion placement.** The published state diagram places the inversion
  states between initialisation and the ladder. Here they run after the
  ladder, because the value to invert (Z1 of the result) only exists then.
  States 31..35 are unused.
* **Inversion schedule.** The published architecture names the quad-block
  Itoh–Tsujii method, reports 225 cycles, and gives no schedule. The chain
  here is this design's own and takes 129 + 1 cycles.
* **Number of ladder steps.** The ladder processes all 233 key bits, one
  step per bit, starting from the neutral point. The published cycle equation
  counts 232 steps (13·(m−1)). KEY_BITS can be set to 232 to match that.
* **Ladder start point.** The published ladder initialisation lists
  Z2 = w(P). That would not start the second point at P, so (W2 : Z2) = (x : y)
  is used instead.
* **Conditional state.** The conditional state takes one cycle per step
  (14 instead of 13 cycles).
* **Basepoint inputs.** The meaning of the `x`, `y` inputs is this design's
  own: the projective w-coordinates of P.
* **Register-file clear.** The clear at `start` is this design's own; it
  provides W1 = 0 and T4 = 0 without extra cycles.
* **Operand width.** The 233-bit operand width of the multiplier follows the
  published block diagram. A sentence in the published text mentions 232-bit
  operands.
* **Not modelled.** FPGA-specific results (slices, LUTs, clock rate, power)
  are outside the RTL.

## Files

`rtl/`:

* `bec_pkg.sv`: constants, register addresses, select encodings, control word;
* `bec_pm_top.sv`: the top level;
* `bec_ctrl.sv`: the FSM;
* `bec_regfile.sv`: the memory unit;
* `bec_datapath.sv`, `bec_opmux.sv` (MUX1/MUX2), `bec_resmux.sv` (MUX3) and
  `bec_alu.sv`: the datapath;
* `gf_add.sv`, `gf_mul_dp.sv`, `gf_digit_mul.sv`, `gf_concat.sv`,
  `gf_reduce.sv` and `gf_sqr.sv`: the field arithmetic.

`tb/`:

* one self-checking testbench `tb_<module>.sv` per module;
* `bec_ref_pkg.sv`, a bit-serial reference model. It provides carry-less
  multiplication, bit-at-a-time reduction, shift-and-add multiplication,
  Fermat inversion and the reference ladder.

`tb_bec_pm_top` runs seven complete multiplications at the default size, about
24k cycles and a few seconds. It checks:

* k = 1 returns w;
* k = 2 matches the closed-form doubling;
* k = 0 returns the neutral point;
* random keys match the reference ladder;
* a rescaled base point gives the same result;
* a `start` pulse during a run is ignored;
* every run takes exactly 3396 cycles.

`tb_bec_ctrl` drives a behavioural datapath from the control words with
KEY_BITS = 16.

`tb_bec_workloads` runs the two curve settings for which results are
published, d = 59 and d = 26, with d1 = d2 = d. In that case e = d^4, so
e1 = d and e2 = d^2. The test does not rely on the reference ladder: it
checks that w(k2·(k1·P)), obtained by feeding the first result back in as the
base point, equals w((k1·k2)·P) from a single run. This passes, which shows
that the single-operation formulas act as a group. In fact 1/w behaves as the
x-coordinate of a Weierstrass curve y^2 + xy = x^3 + ax^2 + e under the
López–Dahab x-only ladder.

## Simulating

Any testbench builds with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/bec_pkg.sv tb/bec_ref_pkg.sv tb/tb_bec_pm_top.sv --top-module tb_bec_pm_top
./obj_dir/Vtb_bec_pm_top
```

Each testbench ends with `TB_RESULT checks=N failures=F`.

To change the field, adjust `M` and `TRI_K` in `bec_pkg`. The reduction needs
a trinomial with 2·TRI_K < M. The inversion chain in `bec_ctrl` is written for
m = 233 and must be redone for another field. The key length is the
`KEY_BITS` parameter of `bec_pm_top`.
