# Canary flip-flops: timing-error prediction for typical-case design

A chip designed for the worst-case corner carries a large timing margin
that it almost never needs. The canary flip-flop lets a circuit run at
typical-case timing and still see its margin running out. It samples the
same data twice: once directly in the **main** flip-flop, and once through a
short **delay buffer** in a **shadow** flip-flop on the same clock edge. The
shadow therefore has a longer effective setup time. When the two samples
differ, the data arrived late enough to miss the shadow but in time for the
main flip-flop. The result is still correct, but the margin is gone. That
is the signal to stop lowering the supply voltage, or to raise it, before a
real timing error happens.

This repository holds:

* the canary flip-flop in two forms: a soft cell built from standard cells,
  and the area-optimised hard cell whose shadow is a single latch;
* the delay buffer, as a behavioural model;
* the circuit used to evaluate it. Registered operands feed a 32-bit
  Kogge-Stone adder, and canary flip-flops capture its 33 outputs;
* testbenches that push this circuit through all three timing regions.

## The three timing regions

Take a path from a launching flip-flop *i* to a canary flip-flop *j*, with
clock period *P*, clock-to-Q delay *Tcq* and combinational delay *Dij*. The
main flip-flop's setup time is *Tsu,main*. The shadow's is *Tsu,shadow*,
which is *Tsu,main* plus the buffer delay.

| arrival `Tcq + Dij`                      | main FF | shadow FF | `err` | outcome |
|------------------------------------------|---------|-----------|-------|---------|
| `<= P - Tsu,shadow`                      | new     | new       | 0     | correct, margin left |
| between `P - Tsu,shadow` and `P - Tsu,main` | new  | old       | 1     | correct, **error predicted** |
| `> P - Tsu,main`                         | old     | old       | 0 (usually) | **wrong**, often unreported |

The prediction window is `Tsu,shadow - Tsu,main`, which is the buffer delay.
A wider window gives more warning before a failure. It also raises the
first-notification point, and so leaves less room for scaling the voltage
down. The third row is the danger: once both flip-flops miss, they agree
again, and `err` falls silent. A controller should therefore never go past
the first error notification.

## The canary flip-flop

### Soft cell (`canary_ff`)

This is the cell exactly as it would be assembled from library cells: two
D flip-flops on one clock, two inverters per unit delay in front of the
shadow, and an XOR of the two Q outputs. `canary_ff` is a bank of `WIDTH`
such cells. Its `err[i]` is valid for the whole cycle after the sampling
edge. No flip-flop has a reset, like the plain D flip-flop the cell replaces.

When the two flip-flops of a soft cell are placed apart, clock skew between
them shifts the window. Place them close together.

### Hard cell (`canary_ff_hard`)

To save area, the hard cell drops the shadow's slave latch. The main
flip-flop is written as a master and a slave latch. The shadow is a single
master latch behind the delay buffer. During the high clock phase, both
master latches hold what they sampled at the rising edge, and the cell
compares them. While the clock is low, the shadow latch is transparent, so
its value is not a sample. This model therefore forces `err` to 0 in the low
phase, which makes the hard cell's `err` **a pulse during the high phase**.
Read it while `clk` is high, or capture it on the falling edge. In the cell
library this cell is about 2.5 times the area and power of a plain D
flip-flop (129.0 µm² and 0.063 mW, against 51.6 µm² and 0.025 mW, in a
0.18 µm process). That figure is why canary flip-flops are used only at
the ends of critical paths.

### The delay buffer (`delay_buffer`)

This is a behavioural model. It chains `N_UNITS` units of two inverters,
each inverter with an inertial delay of `INV_DELAY_PS`. The default is three
units of 2 × 25 ps, which makes a 150 ps prediction window. Three units
matches the evaluated design. The 25 ps inverter delay is this model's own
choice.

## The evaluation circuit (`canary_adder_top`)

```
 a_in ──►[A reg]──┐
 b_in ──►[B reg]──┼──► ks_adder (32 bit) ──► sum[31:0], cout ──► canary FFs ──► sum, cout
cin_in──►[CIN reg]┘                                                  │
                                                          err_bits[32:0] ──OR──► err
```

* The operand registers are plain flip-flops. Operands sampled at edge *k*
  are added during cycle *k*. At edge *k+1* the canary flip-flops capture
  the result and make their prediction. From the input pins, the latency is
  two clock edges.
* `HARD_CELLS` picks the soft (0, the default) or the hard (1) canary cell.
* `err` is the OR of the 33 per-flip-flop predictions. This design chose
  OR, meaning that any prediction counts.

### `ks_adder`

This is a radix-2 Kogge-Stone adder. It forms bitwise generate and propagate
terms, folds the carry-in into bit 0's generate, and then runs log2(32) = 5
prefix levels. A black cell combines each position with the one 2^(l-1)
places below it. Positions with nothing below them pass their group on as
wires.

## How timing is modelled in simulation

A timing-error predictor needs real delays, so the adder and the delay buffer
carry `#` delays. Synthesis ignores them. The logic is unchanged.

* Every adder gate has delay `LEVEL_DELAY_PS`, 343 ps by default. The
  longest path is seven gates: generate/propagate, five prefix levels and
  the sum XOR. That gives 7 × 343 = 2401 ps, which is the 2.40 ns
  typical-corner maximum delay of the evaluated adder. The carry-in fold
  adds no level on this path, because column 0 is wires from level 1 on.
* The worst-case operands are A = 0xFFFFFFFF, B = 0 and CIN = 1, arriving
  after an all-zero vector. They settle exactly 2401 ps after launch.
* The two reference clocks are Clock_high = 2398 ps (417 MHz, sized to the
  typical 2.40 ns delay) and Clock_lo = 3030 ps (330 MHz, sized to the
  worst-case 3.03 ns delay). They are in `canary_pkg`.
* In the model, the main flip-flop has zero setup time and zero
  clock-to-Q. The shadow's setup time is the buffer delay.
* `VARIATION_PCT` and `VARIATION_SEED` stand in for local process variation.
  Each gate's delay is scaled by a fixed pseudo-random factor within
  ±`VARIATION_PCT` %. An integer hash of the gate's position and the seed
  chooses the factor at elaboration. The default of 0 gives identical gates.

The simulator cannot vary a supply voltage. A lower voltage means slower
gates against a fixed clock, so the testbenches instead either shorten the
clock period or instantiate copies of the circuit with larger gate delays.

With identical gates, random operands nearly always settle at the full seven
levels. Every prefix level toggles some node for almost any change of
operands. Measured over 100 random vectors, the minimum, average and maximum
settling times are all 2401 ps. A transistor-level adder shows a broad
spread of delays instead. With identical gates, the notification rate
therefore jumps from 0 to 100 %. Local variation spreads the arrival times
and gives a gradual rise, as the sweep below shows.

## What the testbenches show

All of them are self-checking and end with a `TB_RESULT` line.

| testbench | what it checks |
|-----------|----------------|
| `tb_delay_buffer` | output follows the input exactly 150 ps (three units) or 50 ps (one unit) later, never earlier |
| `tb_ks_adder` | 8-bit exhaustive and 32-bit random/corner sums; the timed worst case settles in exactly 7 gate delays |
| `tb_canary_ff` | data 400/151 ps before the edge: no error; 149/10 ps: `q` new, `err` = old ^ new; 10 ps after: `q` old, `err` 0 |
| `tb_canary_ff_hard` | same, plus `err` is 0 in the low clock phase, also while the two latches differ |
| `tb_canary_adder_top` | default parameters, end to end: see below |
| `tb_canary_adder_top_hard` | the same with `HARD_CELLS = 1` |
| `tb_canary_fen_sweep` | error-notification rate against gate slowdown at both clocks |

`tb_canary_adder_top` drives the clock itself, so that each cycle can have
its own period. It compares the captured outputs with snapshots of the adder
output taken just before the edge and just before the window. It also
compares them with `a + b + cin`. It then counts every cycle as no error,
error predicted, or error occurred, and requires each kind at least once. It
checks the worst-case vector:

| period | worst path 2401 ps | outcome |
|--------|--------------------|---------|
| 3030 ps (Clock_lo) | before `P - 150` | no error |
| 2500 ps | inside the window (2350 – 2500) | `err` = 1, sum correct |
| 2398 ps (Clock_high) | after the edge | sum wrong, `err` = 0 |

`tb_canary_fen_sweep` has twelve copies of the circuit, with gate delays from
80 % to 135 % of nominal in 5 % steps. All copies share one ±10 % variation
sample. It runs 100 random vectors at each clock. At Clock_lo, the first
notifications appear at 115 % gate delay, and the first wrong sum at 120 %.
At Clock_high, both come earlier: notifications at 90 % and wrong sums at
95 %. The testbench checks that the first notification comes at a smaller
slowdown than the first wrong sum, and that it comes at a smaller slowdown
at the faster clock. The typical-corner clock leaves less margin, which is
the same ordering the first-error-notification voltages follow.

At Clock_lo the sweep also prints a histogram of the nominal copy's settling
times over the 100 vectors. With the ±10 % variation sample, one vector
settles between 2300 and 2399 ps, 84 between 2400 and 2499 ps, and 15
between 2500 and 2599 ps. The average is 2468 ps and the maximum 2536 ps.

## Synthesis notes

* The delay buffer is two inverters per unit. Logic synthesis removes the
  pair, and it then merges the shadow flip-flop with the main one and
  reduces `err` to a constant 0. A generic synthesis run of `canary_ff`
  shows exactly that. In a real flow, the buffer cells and the shadow
  flip-flop must be instantiated from the library and protected from
  optimisation, or the hard cell must be used as a library cell.
* `canary_ff_hard` contains latches on purpose. Its `err` is gated by the
  clock on purpose too.
* Only the flip-flops at the ends of paths that would fail under worst-case
  timing need to become canary flip-flops. Choosing them is a netlist-level
  step, done after synthesis against typical and worst-case libraries. It
  is not part of this RTL. Applied to two 32-bit RISC cores, it replaced
  1.6 % and 11.6 % of the flip-flops.

## Not included

* The processors that the selective-replacement method was applied to.
* The replacement flow itself.
* The supply-voltage controller that would act on `err`. Only its policy is
  known: lower the voltage while no error is predicted, and stop at the
  first notification.

## Files and parameters

| file | contents |
|------|----------|
| `rtl/canary_pkg.sv` | shared constants: adder width, delay units, inverter and gate delays, reference clock periods |
| `rtl/delay_buffer.sv` | behavioural delay element |
| `rtl/canary_ff.sv` | soft canary flip-flop bank |
| `rtl/canary_ff_hard.sv` | hard-cell canary flip-flop bank |
| `rtl/ks_adder.sv` | Kogge-Stone adder with simulation delays |
| `rtl/canary_adder_top.sv` | evaluation circuit (top) |
| `tb/*.sv` | testbenches listed above |

Top-level parameters: `WIDTH` (32), `HARD_CELLS` (0), `DELAY_UNITS` (3),
`INV_DELAY_PS` (25), `LEVEL_DELAY_PS` (343), `VARIATION_PCT` (0),
`VARIATION_SEED` (1).

## Simulating

The testbenches need Verilator 5 with timing support. From the repository
root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/canary_pkg.sv tb/tb_canary_adder_top.sv --top-module tb_canary_adder_top
./obj_dir/Vtb_canary_adder_top
```

Replace the testbench name to run another. Every file sets
`` `timescale 1ps/1ps ``. The sweep testbench takes about a minute to
compile, and every other testbench takes seconds. To lint the design,
run `verilator --lint-only -Wall -Wno-fatal --timing -y rtl +libext+.sv
rtl/canary_pkg.sv rtl/canary_adder_top.sv`. It reports only unused package
constants, which the testbenches use, and the final-level propagate terms
of the adder, which a Kogge-Stone adder computes but does not need.
