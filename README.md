# Controllers for scheduled data paths with conditional branches

A high-level synthesis flow first schedules a computation into time steps and binds its
operations to functional units and its values to registers. After that, someone still has to
build the control path: the finite state machine that, in every clock cycle, raises the register
write signals, multiplexer selects and tri-state enables that the data path needs in that step.
This RTL implements the control-path architecture of the CSG control signal generator from the
ADAM synthesis system. It covers both unpipelined and pipelined schedules, and schedules in which
some operations only run when an earlier comparison came out a certain way.

The main point of this architecture is how a controller *remembers a condition value*.
Branching code produces a condition value, such as `p > q`, in one step, and later steps depend
on it. There are two ways to keep it:

* **With status registers.** The controller copies the condition value into a dedicated
  flip-flop, a *status register*. The state diagram stays a plain ring with one state per time
  step, and the PLA's terms read the status register to choose the conditional control signals.
* **Without status registers.** The condition value is folded into the state itself. A time
  step during which the value must be remembered is represented by two states, one for each
  outcome. This gives fewer state bits but a larger state diagram.

Both styles issue exactly the same control signals in every cycle. The published area results
favour the status-register style, because the status bits give the state encoder don't-care
freedom. This repository builds both styles, for both kinds of schedule, around one small
example computation. The controller modules (`ctrl_sr`, `ctrl_nsr`, `pla`, `status_regs`) are
generic: any scheduled design's controller can be loaded into them as a PLA personality.

## The example computation

```
if (p > q)  y = ((a + b) + c) * d * e;
else        y = (a + b) * e;
```

The schedule has four time steps. The `Join` is where the two branches meet.

| step | operations              | condition value `p > q`            |
|------|-------------------------|------------------------------------|
| 1    | `p > q`, `a + b`        | born (written into register RC)    |
| 2    | `+ c` (branch 1 only)   | alive: read from RC in the data path |
| 3    | `* d` (branch 1), Join  | reserved: must be remembered       |
| 4    | `* e`                   | dead                               |

**Folded (pipelined) schedule.** With an initiation interval of 2, a new set of operands starts
every 2 cycles. Steps 1 and 3 then execute together in one state, and steps 2 and 4 together in
the other. While one iteration does its step 3, the next one does its step 1.

All units are 16 bits wide: a comparator (`>`), an adder, a subtractor and a multiplier. The
example does not use the subtractor, and the multiplier keeps the low 16 bits of the product.

## Condition values: alive and reserved

This is the part that decides how big a controller is, so the rules are spelled out here.

* A condition value is **born** in step B, the step that writes it into a data-path register.
  The clocking scheme only allows it to steer control signals from step B+1 on.
* It is **dead** after step D, the last step whose control signals depend on it.
* It is **alive** from B+1 to D. In step B+1 the controller can read it directly from the data
  path's condition register; the PLA has that register as an input.
* It is **reserved** from B+2 to D. During this span the controller must remember the value
  itself, so the data path is free to reuse the register that produced it. The number of status
  registers needed is the largest number of values reserved in any one cycle.

In the example, B = 1 and D = 3, so one value is reserved, in step 3.

| controller     | states                                   | where `p > q` is kept in step 3                          |
|----------------|------------------------------------------|----------------------------------------------------------|
| unpipelined, status register | ring S1→S2→S3→S4 (codes 0–3) | status register, loaded when step 2 is issued            |
| unpipelined, no status register | S1, S2, S3₀, S3₁, S4 (codes 0–4) | S2 moves to S3₀ or S3₁ according to RC                |
| pipelined, status register | ring P1→P2 (codes 0–1)           | status register, loaded when P2 is issued                |
| pipelined, no status register | P1₀, P1₁, P2 (codes 0–2)       | P2 moves to P1₀ or P1₁; folded step 1 is {step 1} × {step 3, two outcomes} |

The split happens where the reserved period begins. The state of step B+1 reads the value from
the data path and moves to one of the two copies of step B+2. One sentence of the method's
description places the split one step earlier. This design follows the definition of the
reserved period, because that definition is also what the status-register count is based on.

**Pipelined schedules.** Several iterations are in flight at once, so one condition value can
have several live *instances*, one per iteration. For the style without status registers, the
states of a folded time step are the Cartesian product of the state sets of the steps folded
onto it. For the status-register style, an instance may need to move from one status register
to another as the pipeline advances; `status_regs` can load any register from another for that
purpose. The II = 2 example never has more than one instance reserved, so it needs one register
and no moves.

## Timing: two clocks, issue then execute

The architecture assumes two non-overlapping clocks, and all flip-flops are positive-edge
triggered:

* `clk_cp`, the control-path clock, updates the state register, the status registers and the
  output registers;
* `clk_dp`, the data-path clock, updates every data-path register.

Every rising edge of `clk_cp` is followed by a rising edge of `clk_dp` before the next `clk_cp`
edge. One cycle works like this:

```
clk_cp  _/‾\_______/‾\_______/‾\______      edge k: PLA evaluates the state to issue, using RC as
clk_dp  _____/‾\_______/‾\_______/‾\__              written at the previous clk_dp edge; the
           |   |                                    output registers capture the control word
           |   +-- the data path executes step k    and the state register advances
           +------ step k is issued
```

The **state register** holds the step to be issued next. The **output registers** hold the
control word of the step being executed, so the data path never sees the PLA outputs change
while it works. The controller is a Mealy machine: a state's control word can depend on the
condition inputs and status registers as well as on the state.

After reset, the first `clk_cp` edge issues step 1. Counting cycles from 0 at that edge:

* iteration *j* reads its operands at cycle *j·II + (step − 1)*: `p q a b` in step 1, `c` in
  step 2, `d` in step 3, `e` in step 4;
* its result is in `result` after the `clk_dp` edge of cycle *j·II + 3*;
* II is 4 for the unpipelined systems and 2 for the pipelined ones.

Each primary input is read only in its own step. There is no separate input-latch cycle.

## Data path binding

The published method takes the binding as given and states none for this example. The binding
below is this design's own. Every value lives for at most two steps, so one data path serves
both schedules:

| register | written in | value                                                        |
|----------|-----------|--------------------------------------------------------------|
| RC (1 bit) | step 1  | `p > q`                                                      |
| R1       | step 1    | `a + b`                                                      |
| R2       | step 2    | `R1 + c` (branch 1) or `R1` (branch 0), chosen by a multiplexer |
| R3       | step 3    | join bus: driven by the multiplier `R2 * d` (branch 1) or by R2 (branch 0) |
| ROUT     | step 4    | `R3 * e`                                                     |

The 12-bit control word `csg_pkg::ctrl_t` contains all three kinds of control signal the
method produces:

* register write signals: `rc_we`, `r1_we`, `r2_we`, `r3_we`, `rout_we`;
* multiplexer port selects: `add_a_sel`, `add_b_sel`, `mul_a_sel`, `mul_b_sel`, `r2_sel`;
* tri-state-driver enables: `r3_en_pass`, `r3_en_mul`.

A condition affects only control signals, never the operations themselves. The adder computes
`R1 + c` in step 2 on both branches; branch 0 simply does not select it.

## PLA personalities

In the published flow the controller is realised as a PLA plus D flip-flops. Here `pla` is a
generic AND/OR array whose personality is a parameter of type `csg_pkg::pla_pers_t`. For each
product term the personality gives:

* `care`: which inputs the term looks at;
* `val`: the value each of those inputs must have;
* `orp`: which outputs the term drives.

`csg_pkg` writes each example controller as a short list of symbolic terms, built with `mk()`.
Each term gives a state code, optional literals on the condition input and the status register,
a next state, a status-register load, and a control word. `build_pers()` expands that list into
the planes. A state needs one term for its unconditional part, plus one term per conditional
group of signals; these correspond to the "if-then-else" and "case" forms of a state.

Input and output layout:

| controller | PLA inputs (LSB first)                    | PLA outputs (LSB first)                                            |
|------------|-------------------------------------------|--------------------------------------------------------------------|
| `ctrl_sr`  | state, condition inputs, status registers | control word; per status register: load, then source select; next state |
| `ctrl_nsr` | state, condition inputs                   | control word, next state                                           |

The terms are not logic-minimised, and state codes follow time-step order. A PLA minimiser and
a state encoder would give a smaller array; the published area comparison depends on those
steps. The personality type holds up to 64 terms × 16 inputs × 64 outputs. That is enough for
the largest controller PLAs reported for the method's robot-arm test cases: 48 rows,
11 inputs and 52 outputs.

**To put another controller into the modules:**

1. Write its term list in a package function, following `np_sr_pers()`.
2. Instantiate `ctrl_sr` or `ctrl_nsr` with the matching `SW`, `N_COND`, `N_SR`, `CW`,
   `N_TERMS` and `PERS`.

`build_pers()` handles up to 4 condition inputs and 4 status registers. `with_src()` sets the
source a status register loads from: a condition input, or another status register when an
instance has to move. For anything larger, fill `pla_pers_t` directly.

## Modules

```
csg_top                 four example systems side by side
└─ fig2_system          data path + one controller   (PIPELINED, USE_SR)
   ├─ fig2_datapath     RC R1 R2 R3 ROUT, muxes, join bus
   │  ├─ fu             16-bit comparator / adder / subtractor / multiplier
   │  ├─ dp_reg         register with write signal, on clk_dp
   │  ├─ dp_mux         multiplexer with binary port select
   │  └─ dp_bus         tri-state bus (two-valued AND-OR model)
   └─ ctrl_sr | ctrl_nsr    controller with / without status registers, on clk_cp
      ├─ pla            AND/OR planes with a parameter personality
      └─ status_regs    (ctrl_sr only)
csg_pkg                 widths, ctrl_t, operands_t, PLA personality type and the four example personalities
```

`csg_top` contains all four forms of the example:

* `np_sr` and `np_nsr` are unpipelined and share the operand port `np_in`;
* `pl_sr` and `pl_nsr` are pipelined and share `pl_in`.

Each pair shows the two controller styles computing the same results from the same inputs. Each
system's controller state and condition register are brought out for observation. The upper
bits of the zero-extended `state` outputs are constant for the smaller controllers.

## Simulating

Each testbench in `tb/` checks its own results and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/csg_pkg.sv tb/csg_top_tb.sv \
          --top-module csg_top_tb -o sim && ./obj_dir/sim
```

Substitute any other `tb/*_tb.sv` and its module name to run another testbench.

* `csg_top_tb` runs all four systems with their default settings: 60 unpipelined and 120
  pipelined iterations with random operands.
  * Operands that are not due in a cycle are randomised, to show that they are not used.
  * Every result is checked in the exact cycle it is due.
  * In every cycle the two controller styles must issue identical control words.
  * It counts these mechanisms and fails if one never occurs: both branch outcomes, both join
    drivers, status-register loads, both split states, and overlapped iterations.
* `fig2_system_tb` does the same for one unpipelined status-register system and one pipelined
  system without status registers.
* `ctrl_sr_tb` and `ctrl_nsr_tb` compare each controller, cycle by cycle, with a hand-written
  specification. This covers the control word, the state, the status register and the ring
  period.
  * Each also loads a personality with two condition inputs.
  * For `ctrl_sr` that personality has a case state over two status registers, and moves a
    value from one status register to the other.
  * For `ctrl_nsr` it has a step that fans out into 2² = 4 states.
* `fig2_datapath_tb` plays the controller by hand and checks every register after every step.
* `fu_tb`, `dp_reg_tb`, `dp_mux_tb`, `dp_bus_tb`, `pla_tb` and `status_regs_tb` test the leaf
  blocks.

The simulator used has two states only, so every register has a reset.

## What follows the method and what is this design's own

**Follows the published method:**

* the split into data path and control path;
* the three classes of control-path memory (state, output and status registers);
* the two-phase clocking with positive-edge flip-flops and the Mealy controller model;
* ring state diagrams with one state per time step, or per step of the initiation interval;
* the born / alive / reserved / dead rules, and the status-register count derived from them;
* splitting states by condition value, with a Cartesian product when folding;
* first state = time step 1;
* the example's operations, branch structure, schedule and II = 2 folding;
* 16-bit library units;
* no ALU-function control signals: each unit does one fixed operation, as in the method.

**This design's own choices:**

* the register and multiplexer binding of the example, and a tri-state bus for the join;
* the control-word layout;
* the state codes, and PLA terms that are not minimised;
* the personality format;
* reading each operand in its own step;
* asynchronous active-low reset to zero or to the first state;
* unsigned comparison and a low-half product;
* the AND-OR model of the tri-state bus, and zero from a multiplexer select past its last port;
* unused state codes falling back to state 0;
* the one-edge offset between issuing a step on `clk_cp` and executing it on `clk_dp`.

**Not built:** the method's robot-arm test cases (9 unpipelined and 14 pipelined designs). Only
their operation graph and size statistics are published, not their bindings or control
signals, so neither their data paths nor their controllers can be reconstructed. The generic
controller modules are sized to hold PLAs of their dimensions.
