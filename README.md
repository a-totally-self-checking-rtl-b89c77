# Totally self-checking dynamic asynchronous divider

An 8-bit unsigned divider built as a *latch-free dynamic asynchronous
datapath* (LFDAD): a line of dual-rail DCVSL (differential cascode voltage
switch logic) stages, each clocked by its own handshake cell. The design's point
is error detection at low cost. In this kind of pipeline a fault either gives
a non-code value at the output or stops the pipeline, and a stopped pipeline
leaves the stages behind the fault precharged. So a single dual-rail code
checker on the last stage is enough to make the datapath totally self-checking.
There is no per-stage time-out counter and no checker between stages.

The RTL here models that asynchronous circuit at gate level, with a unit
delay per gate (see *How the model handles time*). It can be simulated and
synthesised with ordinary tools, and it has ports for fault-injection
experiments.

## Dual-rail data and the three phases of a stage

Every datapath bit is a pair of wires `(t, f)`:

| t f | meaning |
|-----|---------|
| 0 0 | spacer: the precharged, "no data" state |
| 1 0 | logic 1 |
| 0 1 | logic 0 |
| 1 1 | never produced by a fault-free gate; a detected error |

A DCVSL stage (`div_stage`) is a dynamic gate with a local clock `cp`:

* **Precharge** (`cp = 0`). All output pairs go to 00, whatever the inputs.
* **Enable & Evaluation** (`cp = 1`). While any input pair is still 00, nothing
  happens. Once all the inputs are valid, the outputs take the dual-rail code
  of the result.
* **Evaluation Hold** (still `cp = 1`). A discharged dynamic node stays
  discharged, so the result is held even after the inputs return to 00.
  Output rails can only rise until the next precharge. If a second, different
  input value arrives in the same phase, the result therefore becomes 11, not
  a new valid value.

A `completion_detector` watches each stage's outputs. It has an XOR per pair
and a C-element over all the XORs. Its output `C` rises once every pair is
valid and falls once every pair is back at 00.

## The handshake cell and the ring (the part to understand first)

Each stage `i` gets its `cp` from a `handshake_cell` fed by three completion
signals: its own `C(i)`, the next stage's `C(i+1)`, and the inverted
`C(i+2)` of the stage after that:

| condition | cp | meaning |
|-----------|----|---------|
| `C(i) & C(i+1)` | 0 | the next stage has taken the data: precharge |
| `!C(i) & C(i+2)` | 1 | precharged, and the stage after next has evaluated: enable |
| otherwise | unchanged | hold the result, or wait in precharge |

After reset every `cp` is 1, so every stage is enabled. As a result, each
stage runs a step behind the stage before it: Evaluate, Hold, Precharge,
Evaluate, and so on. Data needs no latches, because a stage holds its result
until the next stage has evaluated it.

`lfdad_control` instantiates one cell per stage, with indices taken modulo the
number of stages. The last two cells therefore close a **ring**:

* stage 7 is re-enabled by `C1`;
* stage 8 precharges on `C8 & C1` and is re-enabled by `C2`.

Three things follow from this ring, and all three show up in simulation:

1. **The last stage holds its result until stage 1 has taken the next
   operands.** There is no back-pressure from the output side. The result
   must be taken while `out_valid` is high, and it stays there until new
   operands enter.
2. **Results can stay inside the pipeline until later operands push them
   out.** When operands arrive irregularly, tokens can end up two stages
   apart. Stages 7 and 8 move on only when stage 1 and stage 2 evaluate new
   data. When the source goes idle, the last one or two results can then sit
   in stages 4 to 6. Sending a few dummy operands (two were enough in the
   tests) drains them. With a source that always answers within one step,
   every result comes out without help.
3. **The ring relies on one race.** Stage `i` is re-enabled only while
   `C(i+2)` is high. If stage `i` precharged more slowly than stage `i+2`
   evaluated, held and precharged, the enable would be missed and the ring
   would stop. With unit delays per gate there is a margin of one to two
   steps. The `stall` inputs therefore delay only evaluation, never
   precharge. This is a property of the cell as modelled here. A transistor
   implementation has the same ordering requirement.

## Error detection

`ddcc` is the dynamic dual-rail code checker. It is a W-input dynamic
dual-rail XOR: a chain of W-1 two-input dual-rail XOR networks (`dr_xor2`,
seven for 8 bits) feeding one dynamic output pair. The last stage's `cp`
clocks it.

| inputs (quotient pairs) | `(z, z_n)` |
|-------------------------|------------|
| checker precharged, or last stage still evaluating | 00 |
| all pairs valid | `(parity, !parity)`: 10 for odd, 01 for even |
| any pair 00 | 00 |
| no pair 00, any pair 11 | 11 |

Read it as follows: **01 or 10 means the quotient on the outputs is correct.
00 or 11 held longer than one operand time means an error.** Faults act in
one of two ways:

* **Data faults.** A flipped rail gives a 00 or 11 pair. A 00 pair stops the
  stage that reads it. A 11 pair is passed on as 11 on every output pair of
  that stage, which is a conservative model of a dynamic gate with a
  conducting faulty input.
* **Control faults.** A stuck completion signal or local clock stops the ring.
  The stages behind the fault end up precharged, so the checker shows 00.

One case is less clean than that summary. When the ring stops, the last stage
can be left in *Hold*, still holding the last correct result. The checker
then keeps showing a valid code, and the stop shows only as the missing next
`out_valid`. Across runs of the end-to-end test, a permanent fault that
stopped the ring left the checker at 00, at 11 (when a 11 pair had already
spread to the last stage), or at the valid code of an earlier, correct
result. In no run did a wrong quotient appear under a valid code.

The checker must itself be self-checking. `tb/ddcc_selfcheck_tb.sv` applies
each of the 28 single stuck-at faults on the rails of its seven-gate XOR
chain, with all 256 valid input words:

* no fault turns a word into a code word of the wrong parity;
* every fault shows up as 00 or 11 for some valid word.

Only the quotient is checked, with an 8-input checker for the 8-bit result.
An error confined to the remainder rails of the last stage is not detected.

## The divider datapath

Each stage carries a dual-rail word of four W-pair fields, whose positions are
set in `lfdad_pkg`:

| field | content |
|-------|---------|
| `rem` | partial remainder |
| `dvd` | dividend bits not yet used; the next one is in the MSB |
| `dvs` | divisor, passed on unchanged |
| `quo` | quotient bits so far; the newest is in bit 0 |

Every stage performs one restoring-division step and so produces one quotient
bit, MSB first:

```
t    = {rem, dvd[W-1]}
q    = (t >= dvs)
rem' = q ? t - dvs : t
dvd' = dvd << 1      quo' = {quo[W-2:0], q}
```

After W stages, `quo` holds `a / b` and `rem` holds `a % b`. Dividing by zero
gives a quotient of all ones and an undefined remainder. The first stage
(`FIRST = 1`) treats its remainder and quotient inputs as the constant 0. The
operand source therefore only drives the dividend and the divisor.

## Top level: `tsc_divider`

Parameter `W` (default 8) sets both the operand width and the number of
stages. A ring needs at least 3 stages.

**Operands.** The operand port uses a four-phase, return-to-zero protocol
with `in_ack`, which is the completion signal of stage 1:

1. Wait for `in_ack = 0`.
2. Drive `in_dvd_t/f` and `in_dvs_t/f` with valid pairs.
3. Wait for `in_ack = 1`.
4. Return every pair to 00.

**Results.** `out_valid` is the completion signal of the last stage. While it
is high, `out_quo_t/f` and `out_rem_t/f` hold the result. `z`/`z_n` are the
checker outputs. `cp_mon` and `c_mon` show every stage's local clock and
completion signal.

**Fault experiments.** Tie all of these inputs low in normal use. Each one
acts through an XOR insertion point (`error_insert`):

* `err_c[i]` flips the completion signal of stage `i`.
* `err_cp[i]` flips the local clock of stage `i`.
* `err_dat_sel[i]` with `err_dat_t`/`err_dat_f` flips output rails of stage
  `i`. `err_dat_after` picks where: 0 inserts the error before the completion
  detector, 1 after it, so that only the next stage or the checker sees it.
* `stall[i]` postpones the evaluation of stage `i`, which models a slow
  block.

**Timing in model steps.** The latency is `W + 2` steps from operands to
`out_valid`. With a source that answers in one step, the operand period is 7
steps, limited by the stage-1 round trip:

1. evaluate;
2. completion;
3. the next stage completes;
4. the handshake cell reacts;
5. precharge;
6. completion falls;
7. the source answers.

The end-to-end testbench checks both numbers. A transistor implementation of
this structure was reported to run at about an 8.5 ns period and 19 ns
latency in a 0.6 µm CMOS process. The step counts here are not calibrated to
that process.

## How the model handles time

The real circuit has no clock. Here every dynamic node, C-element and
handshake-cell output is a flip-flop updated once per step of `clk`, which is
a unit-delay gate model. The DCVSL logic inside a stage is combinational, and
its dynamic output is the register. `rst_n` sets every cell to "enabled" and
every node to precharged. The behaviour between steps therefore does not
depend on the length of the `clk` period. It does depend on the step counts,
and in particular on the ordering margin described in point 3 of the ring
section. The RTL is fine for studying the protocol, the fault behaviour and
the function, or for mapping onto a clocked fabric. It is not a netlist for a
self-timed chip.

## Files

| module | role |
|--------|------|
| `lfdad_pkg` | pair codes, default width, stage-word field positions |
| `handshake_cell` | the HS cell |
| `lfdad_control` | ring of N handshake cells |
| `completion_detector` | per-pair XOR plus C-element |
| `div_stage` | DCVSL division stage |
| `dr_xor2` | two-input dual-rail XOR network |
| `ddcc` | dynamic dual-rail code checker |
| `error_insert` | XOR error insertion point |
| `tsc_divider` | top level |

Each module has a self-checking testbench, `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M`. `tsc_divider_tb` runs the default
8-bit design end to end through seven phases:

1. 200 fault-free divisions, with the latency and period checked;
2. 150 divisions with random stalls and random source timing, then a
   deterministic case where a result stays inside the ring until dummy
   operands flush it out;
3. a quotient-rail error after completion generation;
4. a data error before completion generation;
5. a stuck completion signal;
6. a stuck local clock;
7. 40 runs with short transient errors.

It counts precharges, holds, ring holds, stalls, 11 detections, pipeline
stops and flushes, and fails if any of them never happened. Its standing
check is that whenever the checker shows a code word, the quotient it saw is
the correct quotient of an operand actually sent.

`tsc_divider_faultsim_tb` runs a transient-error campaign on a fixed
sequence of 12 divisions. Each error is a 2-step pulse on one signal:

* a completion signal, a local clock or a data rail of one stage;
* driving the signal to 0 or to 1;
* applied while the stage evaluates an operand or while it holds the result.

Each run is compared with a fault-free run and sorted into one of four
outcomes:

* **no effect**: the control traces are unchanged;
* **tolerated**: the traces differ, but the results and their timing do not;
* **delayed**: the same results arrive later;
* **detected**: the checker showed 11, or a result is missing because the ring
  stopped.

One run gave 17 / 12 / 7 / 73 over 112 experiments, with no
undetected quotient error. Three more runs changed only the unchecked
remainder of the last stage.

To simulate, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/lfdad_pkg.sv \
    tb/tsc_divider_tb.sv --top-module tsc_divider_tb -o sim
./obj_dir/sim
```

Every testbench runs in a few seconds.

## Choices not fixed by the source design

* The division algorithm: restoring, one bit per stage. The stage word and
  the remainder output follow from it.
* The four-phase operand protocol and the use of stage 1's completion as the
  acknowledge.
* The unit-delay timing model.
* Modelling a faulty 11 input as 11 on all outputs.
* Which checker rail means odd parity.
* Checking only the quotient.
* The fault-experiment ports and the `stall` inputs.

The handshake rule, the ring wiring, the completion detector, the checker
function and its construction from seven two-input gates, and the XOR error
insertion points follow the published design.
