# Piggyback self-test for controller/datapath pairs

A controller drives its datapath through mux select lines (MS) and register
load lines (RL). Testing the controller on its own means routing every one of
those lines into a signature register, which costs area and still leaves the
long wires into the datapath untested. This design tests the controller
*through* the datapath instead. A one-flop state machine, the **piggyback
FSM**, sits on the MS/RL bundle. In test mode it makes any change of a
control line in any control step change the value written into some datapath
register. Watching one bit of each datapath register is then enough to see
controller faults. That also covers faults that do not change the system's
function, such as a spurious register load that only wastes power.

The RTL contains:

* the piggyback FSM (generic in the number of select and load lines);
* a pattern generator (TPGR, an LFSR) and a signature register (MISR);
* two example controller/datapath pairs, each fitted with the scheme:
  * a polynomial evaluator, y = a·x³ + b·x² + c·x + d;
  * the classic "diffeq" differential-equation solver loop.

Both datapaths are 8 bits wide.

## How the piggyback FSM works

In normal mode (`test_mode = 0`) MS and RL pass through unchanged and the
controller steps every clock.

In test mode every controller step S_i takes two clocks:

| clock | Q | selects seen by datapath | loads seen by datapath | controller |
|-------|---|--------------------------|------------------------|------------|
| first | 0 | ~MS_i (all complemented) | all 1                  | held       |
| second| 1 | MS_i                     | RL_i                   | advances at the end |

The logic is tiny. Define `mask = test_mode & ~q`. Then:

* `MS* = MS ^ {m{mask}}` (m XOR gates);
* `RL* = RL | {r{mask}}` (r OR gates);
* `q <= mask`;
* `ctl_en = ~mask`.

Why this exposes every control-line fault in step i, for a register R:

* **R should load in step i.** In the first clock R is loaded with the value
  the complemented selects produce. In the second clock the correct value
  overwrites it. Suppose a fault holds R's load line at 0 in step i. Then R
  keeps the "complemented" value, which differs from the correct one.
* **R should not load in step i.** R still gets the complemented value in the
  first clock and must keep it through the second. Suppose a fault sets the
  load line to 1. Then R picks up the normal-path value instead.
* **A select line is wrong.** Then either the first or the second write goes
  through the wrong mux input.

A fault is seen only when the two values differ. That happens only if every
mux input carries live, differing data. So every mux in both datapaths has all
of its inputs in use: a complemented select never lands on an unused input.

There is a subtler trap. In the forced-load clock *every* register is
written. Two registers fed only by the same unit then end up holding the same
value. If those two registers are the two inputs of one mux, a fault on that
mux's select cannot change anything.

The solver first had exactly this case. Its subtractor picks between T1 and
T2, and both were fed only by the multiplier. The fault experiment below
showed that both stuck-at faults on that select escaped. T1 now has a second
source, the adder. The schedule never selects it, but in the complemented
clock it gives T1 a value different from T2's. When binding a datapath for
this scheme, check that the inputs of each mux are not all loaded from one
source.

Costs: in test mode the schedule runs at half speed. Registers also hold test
values rather than the function's results. A test-mode run of the solver with
operands held constant therefore follows a different loop. For example, X is
reloaded from `x_in` in the extra steps, so the loop exits only when
`a <= x_in`. With pattern-generator inputs the operands change every clock and
runs end quickly.

### Clocking: enable instead of a gated clock

The scheme as originally drawn freezes the controller by gating its clock. Here
everything runs on one clock. The controllers take `ctl_en` as a synchronous
advance enable, and the controller moves on at the end of the second (normal)
clock of each pair.

The original drawing's truth table can be read as gating the controller in the
*second* clock instead. That reading contradicts its own state diagram and
description, which both have the controller leave S_i after the normal step.
This design follows the state diagram.

## Test resources and modes

Each system (`poly_system`, `diffeq_system`) has:

* **TPGR**: width d_in + 1 = 41. It covers the five 8-bit data inputs and the
  controller's `start`. When `bist = 1` it drives them through input muxes in
  place of the ports. The feedback polynomial is x⁴¹ + x³⁸ + 1 and the seed
  is 1.
* **MISR**: width max(r + 1, d_out).
  * With `test_mode = 1` it compacts bit `OBS_BIT` (default 0, the LSB) of
    each of the r datapath registers plus `done`.
  * With `test_mode = 0` it compacts the data outputs.
  * It runs while `bist = 1`. `misr_clr` clears it synchronously.

| system | r | m (select lines) | s (status) | d_out | MISR width | MISR polynomial |
|--------|---|------------------|------------|-------|-----------|-----------------|
| poly   | 3 (R1, R2, RO) | 7 | 0 | 8  | 8  | x⁸+x⁶+x⁵+x⁴+1 |
| diffeq | 7 (X, Y, U, T1, T2, T3, C) | 12 | 1 | 24 | 24 | x²⁴+x²³+x²²+x¹⁷+1 |

Modes:

| bist | test_mode | operation |
|------|-----------|-----------|
| 0 | 0 | normal: inputs from ports |
| 1 | 1 | piggyback controller test: TPGR inputs, one bit per register into the MISR |
| 1 | 0 | pattern-driven run, MISR on the data outputs |
| 0 | 1 | piggyback stepping with port inputs (for debugging) |

No test-session sequencer is included. The mode pins are top-level inputs.

## The example systems

Both use 8-bit arithmetic, modulo 256: products keep the low byte. They read
`a..x` (or `dx`, `a`) directly from the ports during a run, so hold those
inputs steady until `done`. Unused select lines are driven 0 in each step.
Registers load on the clock edge when their RL bit is set.

### Polynomial evaluator (`poly_ctrl`, `poly_dp`)

There is one multiplier, with left operand {a, c, R1, R2} and right operand x.
There is one adder, with operands {R1, R2} + {b, d, R2, x}. The five control
steps are:

```
S1: R1 <= a*x
S2: R1 <= R1 + b     R2 <= c*x
S3: R1 <= R1 * x     R2 <= R2 + d
S4: R1 <= R1 * x
S5: RO <= R1 + R2          -> y = RO
```

Timing: the controller leaves IDLE on the clock where `start` is seen. It
spends 5 clocks in S1..S5, or 10 in test mode. `done` rises as it returns to
IDLE and stays high until the next start.

### Differential-equation solver (`diffeq_ctrl`, `diffeq_dp`)

One iteration computes:

```
x1 = x + dx
y1 = y + u*dx
u1 = u - 3*x*u*dx - 3*y*dx
c  = x1 < a
```

The loop repeats while c is 1, and the body always runs at least once. The
datapath has:

* one multiplier, with 8-way and 4-way operand muxes (one input is the
  constant 3);
* T1 fed by the multiplier or the adder (see above; the schedule always picks
  the multiplier);
* an adder, a subtractor and an unsigned comparator;
* the one-bit register C, which is the status line back to the controller.

The schedule is a LOAD step (X, Y, U from the ports) followed by six steps per
iteration:

```
S1: T1 <= 3*X        X <= X + DX
S2: T2 <= 3*Y        C <= X < A
S3: T2 <= T2*DX
S4: T3 <= U*DX       U <= U - T2
S5: T1 <= T1*T3      Y <= Y + T3
S6:                  U <= U - T1      ; back to S1 if C, else done
```

A run takes 1 + 6·iterations clocks outside IDLE, or twice that in test mode.

The schedules, bindings and mux encodings of both examples are this design's
own. Only the function, the 8-bit width and the poly's five steps are fixed by
the scheme's description. The diffeq equations are the well-known
high-level-synthesis benchmark. The field encodings are listed in `pb_pkg.sv`.

## Files

| file | content |
|------|---------|
| `rtl/pb_pkg.sv` | widths, control-word structs, state enums, TPGR polynomial |
| `rtl/piggyback_fsm.sv` | the piggyback FSM (parameters `M`, `R`) |
| `rtl/tpgr.sv`, `rtl/misr.sv` | LFSR pattern generator and signature register |
| `rtl/poly_ctrl.sv`, `rtl/poly_dp.sv`, `rtl/poly_system.sv` | polynomial example |
| `rtl/diffeq_ctrl.sv`, `rtl/diffeq_dp.sv`, `rtl/diffeq_system.sv` | solver example |
| `rtl/pb_top.sv` | top: both systems side by side (`p_*` and `d_*` ports) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog fails the run if it hangs. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pb_pkg.sv tb/tb_pb_top.sv --top-module tb_pb_top -o sim
./obj_dir/sim
```

Replace `tb_pb_top` with any other testbench name.

* The system testbenches (`tb_poly_system`, `tb_diffeq_system`) run a cycle
  model of controller, piggyback FSM, datapath, TPGR and MISR written
  independently from the tables above. They compare every output and the
  signature on every clock.
* `tb_pb_top` runs both systems end to end at their default sizes:
  * normal runs checked against the arithmetic;
  * test-mode runs that must take exactly twice the clocks;
  * repeated BIST sessions that must reproduce their signatures.

  It also counts each mechanism: extra complemented steps, controller holds,
  loop-backs and exits on the status line, both MISR settings, and
  TPGR-started runs. A mechanism that never occurs fails the test.
* `tb_fault_coverage` is the fault experiment. It injects stuck-at-0 and
  stuck-at-1 on every select and load line leaving each controller, using
  `force` on the piggyback FSM's inputs. It then runs a 1500-clock BIST
  session per fault in two settings:
  * piggyback mode;
  * plain mode, where the MISR watches only the data outputs.

  A fault counts as detected when the final signature differs from the
  fault-free one. The piggyback session must detect every fault that changes
  a controller output. Faults on a line stuck at the only value the schedule
  ever gives it are reported apart. Current results:

  | system | faults | invisible at controller outputs | piggyback detects | outputs-only detects |
  |--------|--------|---------------------------------|-------------------|----------------------|
  | poly   | 20 | 0 | 20 | 19 |
  | diffeq | 38 | 1 | 37 | 35 |

  A second copy of each system watches the most significant bit of each
  register instead of the least significant one. It detects the same faults.

  Faults take longer to show in piggyback mode, because of the half-speed
  schedule. The latest first detection is about 860 clocks, against about 470
  in plain mode.

## Limits and departures

* Only two of the four benchmark circuits the scheme was evaluated on are
  here. The FACET example and the fifth-order elliptic wave filter are not
  included because their data-flow graphs and schedules are not available.
* A single clock with a controller enable replaces the gated controller clock
  (see above).
* TPGR and MISR polynomials, the seed, the observed bit (LSB), reset values
  (all zero, synchronous active-low reset), `done` timing and the MISR clear
  input are this design's choices.
* The MISR's extra bit beyond the r register bits is taken to be `done`.
* The fault experiment covers only faults on the controller's output lines.
  It does not cover gate-level faults inside the controller logic, for which
  a gate-level fault simulator is needed.
* The piggyback FSM touches only select and load lines. Status lines and
  `done` go around it, as in the original scheme.
