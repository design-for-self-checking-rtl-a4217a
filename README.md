# Self-checking, self-timed 8-bit divider in dual-rail dynamic logic

This is an asynchronous 8-bit radix-2 divider. Its pipeline detects its own
faults without any checker hardware added to the datapath. The pipeline has no
latches or registers between stages. Each stage is a block of precharged
dual-rail logic, differential cascode voltage switch logic (DCVSL), paired
with a small handshake cell. The handshake cell decides when the stage
precharges and when it evaluates, and it does so by looking at the
*completion signals* of nearby stages.

Self-checking comes from the way completion is detected. A stage reports
"done" only when every one of its output pairs is a valid dual-rail code
word. It reports "empty" only when every pair has returned to the spacer
00. A single stuck-at fault on a data rail, a completion line or a local
clock line has one of two effects:

- the value stays correct, or
- some pair loses its complementarity, so the stage's completion signal
  sticks at 0 or at 1.

A stuck completion signal blocks the handshake of its own stage and of its
neighbours, and the whole ring of stages stops. The circuit therefore
either gives correct results or halts. It never delivers a wrong result
made only of code words. The checker pair of the last stage (`data_err`,
`data_err_n`) shows the difference. In fault-free operation it alternates
between 00 and a code word. Once the divider has halted it stays constant.

The RTL here is a synthesizable, cycle-based model of that circuit. It
includes fault insertion points so the self-checking behaviour can be
shown in simulation.

## Dual-rail code and DCVSL gates

Every bit travels on two rails, `t` and `f` (`dcvsl_pkg::dr_t`):

| t f | meaning |
|-----|---------|
| 0 0 | spacer: stage precharged, no data |
| 0 1 | valid 0 |
| 1 0 | valid 1 |
| 1 1 | non-code word, only produced by a fault |

A DCVSL gate computes each output rail with a monotone pull-down network
made only of AND and OR of input rails. `dcvsl_pkg` holds these gate
functions (`dr_and`, `dr_or`, `dr_xor`, `dr_maj`, `dr_mux`). Inversion
costs nothing, because it is a swap of the rails. Monotonicity is what the
fault argument needs:

- a 00 at an input keeps the outputs that depend on it at 00;
- a 11 at an input can make an output 11;
- valid inputs always give valid outputs.

## One stage

```
        din ──► div_function ──► dcvsl_node ──► (fault XOR) ──► dout ──► next stage
                (pull-down         (dynamic          │
                 logic)             nodes)            ▼
                                      ▲             ddcc ──► cd_xor ──► C ──► handshakes
                                      │                                  (own, N-1, N+1, N+2)
        CN-1, CN, CN+1, CN+2 ──► hs_cell ──► (fault XOR) ──► cp
```

- **`dcvsl_node`**: the precharged output nodes. When `cp` = 0 (precharge)
  all rails are low. When `cp` = 1 (evaluate) a rail goes high as soon as
  its pull-down conducts, and it stays high until the next precharge, even
  if the stage's input returns to the spacer. This is the *Evaluation-Hold*
  step. It is what lets the pipeline work without latches: a stage keeps
  its result until the next stage has used it.
- **`ddcc`**, the dynamic dual-rail code checker: a tree of `ddcc4`
  cells. Each cell is a 4-input dual-rail XOR. The merged pair follows
  these rules:
  - it is a code word, carrying the parity of the inputs, when all inputs
    are code words;
  - it is 00 if any input pair is 00;
  - otherwise it is 11 if any input pair is 11.
- **`cd_xor`**: C = Z xor Z_N, so C = 1 exactly when the checker pair is
  a code word.
- **`hs_cell`**: the handshake cell, a generalised C-element:

  ```
  cp falls (precharge) when  CN-1 = 0  and  CN = 1  and  CN+1 = 1
  cp rises (evaluate)  when  CN-1 = 1  and  CN = 0  and  CN+2 = 1
  otherwise cp holds
  ```

  Put into words: a stage precharges once its predecessor has precharged
  and its successor has taken its result. It evaluates again once its
  predecessor has new data, it is itself empty, and the stage two places
  downstream has evaluated. The cell receives CN-1 and CN+2 inverted
  (`_N`); `div_stage` makes the inversions.

A stage in fault-free operation cycles through these phases:

1. Enable & Evaluation: C rises.
2. Evaluation-Hold: the input may already be the spacer.
3. Precharge: C falls.

## The ring of handshakes, and its timing assumptions

`sc_divider` chains eight stages for data. The handshake connections form
a ring: the last stage uses stages 1 and 2 as its N+1 and N+2, and stage 7
uses stage 1 as its N+2. Stage 1's N-1 completion is the completion of the
operands, found by a dual-rail checker over the 16 operand pairs. Reset
puts every stage into evaluation (`cp` = 1) with all outputs at the spacer.
The first operands then flow straight through.

**This is the part to understand before changing anything. The handshake
rules above are not delay-insensitive.** Stage N can re-evaluate only
while stage N+2 still holds the previous token. Stage N+2, however, is
free to precharge once N+1 has precharged and N+3 holds the token. If new
data reaches stage N too late, the precharge wave runs ahead and every
downstream stage drains. Each stage then waits for its N+2 stage to hold
data, and the ring deadlocks. The model behaves correctly under two
conditions:

- **The operand source reacts within about 3 steps.** It must return the
  operands to the spacer promptly after `in_ack` rises, and present the
  next operands promptly after `in_ack` falls. With slower sources the
  ring deadlocks.
- **A stage's checker precharges together with its data nodes.**
  `comp_block` gates the checker with the nodes' own registered view of
  `cp` (`dcvsl_node.ev`), not with `cp` directly. If C falls in the same
  step as `cp`, one step before the nodes, the ring deadlocks after a few
  tokens.

A related consequence: a result leaves the last stage only when later
operands follow it. At the end of a stream, send two or three dummy
divisions to flush the real ones out.

With the operands following each other without delay, the model behaves
as follows:

- the first result appears 8 steps after the first operands;
- afterwards one result appears every 8 steps;
- about three divisions are in flight at once, for a latency of 24 steps.

## How time is modelled

The real circuit has no clock. This model advances in unit-delay steps of
the input `clk`. The dynamic output nodes and the handshake cells are the
only state. Each is updated once per step from values of the previous
step. Everything else is combinational. The resulting delays are:

- a handshake decision reaches `cp` one step after its inputs;
- a stage's outputs and its completion follow `cp` or its inputs one step
  later.

The transistor-level timing of the original circuit is not represented.
Its figures were an 8.5 ns local-clock period and 19 ns latency in a
0.6 µm process.

## The division step

Each stage performs one step of radix-2 SRT division with a carry-save
residual (`div_function`, in the order of the original stage diagram):

1. **Arithmetic shift left** of the carry vector `wc` and the sum vector
   `ws` (wiring only).
2. **q SEL** (`qsel`): a 4-bit dual-rail adder sums the top four bits of
   both vectors. These bits have weights −4, 2, 1 and ½, and their sum is
   an estimate y of 2w with one fraction bit. The digit is chosen as:
   - q = +1 if y ≥ 0;
   - q = 0 if y = −½;
   - q = −1 if y ≤ −1.

   The digit is encoded as sign `q_s` and magnitude `q_m`.
3. **Divisor multiple** (`qd_gen`): produces −q·d. For q = +1 it is the
   bitwise complement of d plus a carry-in; for q = −1 it is d; for q = 0
   it is 0.
4. **CSA** (`csa`): computes w[j+1] = 2w[j] − q·d in carry-save form. The
   carry-in fills the free low bit of the carry vector.
5. **On-the-fly converter** (`otf_conv`): keeps Q and QM = Q − 1 in
   binary with these updates:

   | digit | Q update | QM update |
   |-------|----------|-----------|
   | q = +1 | Q ← 2Q+1 | QM ← 2Q |
   | q = 0 | Q ← 2Q | QM ← 2QM+1 |
   | q = −1 | Q ← 2QM+1 | QM ← 2QM |

Widths: the operands are 8-bit fractions. The residual has 11 bits: 3
integer bits (weights −4, 2, 1) above 8 fraction bits. Each stage passes
one 46-pair word (layout in `dcvsl_pkg`):

```
  [10:0] wc   [21:11] ws   [29:22] d   [37:30] Q   [45:38] QM
```

The first stage receives wc = 0, ws = x, and Q = QM = 0. Their start
values are shifted out after 8 digits.

**Operands and result.** The operands must satisfy 1/2 ≤ d < 1 (top bit
of `d_in` set) and 0 ≤ x < d. After the last stage the following hold,
where w = wc + ws is read as an 11-bit two's complement number on the
scale of x and d:

- x·2⁸ = Q·d + w, with |w| ≤ d;
- the truncated quotient ⌊256·x/d⌋ is Q when w ≥ 0 and QM when w < 0.

That final selection needs a carry-propagate sign test. It is not part of
the design, and the user makes it.

## Interface of `sc_divider`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | model step; reset (all stages evaluate, outputs spacer) |
| `x_in`, `d_in` | in | dividend and divisor, 8 dual-rail pairs each |
| `in_ack` | out | stage 1 holds the operands (its completion) |
| `q_out`, `qm_out` | out | Q and Q − 1, dual-rail |
| `wc_out`, `ws_out` | out | final carry-save residual, dual-rail |
| `done` | out | completion of the last stage: results valid while high |
| `data_err`, `data_err_n` | out | checker pair of the last stage |
| `c`, `cp` | out | completion and local clock of every stage |
| `flt_data`, `flt_z`, `flt_c`, `flt_cp` | in | fault controls, tie to 0 in use |

The protocol is four-phase with dual-rail operands:

1. Drive valid operands.
2. Wait for `in_ack` = 1.
3. Drive the spacer (all zero).
4. Wait for `in_ack` = 0.
5. Repeat.

Sample the results when `done` rises. `done` falls when the last stage
precharges.

## Fault insertion

Every stage has XOR insertion points (`fault_xor`):

- on its completion line, after the XOR, so that its own handshake cell
  and its neighbours see the faulty value;
- on its local clock between handshake cell and computation block;
- on every rail of its output word;
- on both rails of its checker pair, between the checker and the XOR.

With the control at 0 a line is unchanged. To make a line stuck at v,
drive the control with `line ^ v`. The test bench does this through
hierarchical references to the pre-fault signals (`c_raw`, `cp_raw`,
`u_comp.node`, `u_comp.z_raw`).

The expected outcomes are:

| fault | effect |
|-------|--------|
| completion stuck at 1 | the stage never re-evaluates |
| completion stuck at 0 | the stage never precharges |
| local clock stuck | the stage never leaves its phase |
| data rail stuck | either the value stays correct, or a 00/11 pair keeps completion at 0 in evaluation |
| checker rail stuck | completion stays at 0 whenever the pair should carry the stuck rail |

In every case the ring stops within a few steps. Results delivered before
the stop are correct, with one exception that needs care from the
receiver. Suppose a checker rail of the last stage sticks while that stage
holds a result. The stage then looks empty to its neighbours and cannot
precharge. Its dynamic nodes can then also take in the next operation's
word, which makes 11 pairs. The checker's 11 then passes the stuck rail as
a code word, so `done` rises once more on the merged word. That word holds
11 pairs in every field, so it is never a wrong result made of code words.
But `done` and the checker pair alone do not flag it. A receiver that must
catch every fault should therefore also check the result pairs for
complementarity. The same applies in principle to any stage whose checker
pair is faulty, but only the last stage's word reaches the outputs
unchecked by a later stage.

## Where this RTL departs from, or adds to, the original design

Taken from the original design:

- the stage structure: DCVSL function block → checker → XOR, plus the
  handshake cell;
- the handshake rules and the ring closure of the last two stages;
- the 4-pair checker;
- the 8-stage radix-2 divider organisation and its block names;
- XOR fault insertion.

This implementation's own choices:

- the step-based timing model, and gating the checker by the nodes' view
  of `cp`;
- the operand completion detector feeding stage 1;
- the N-pair checker as a tree of 4-pair cells;
- the SRT selection rule, the digit encoding, the on-the-fly update rule
  and the 11-bit residual. The original adder is labelled 8 bits; here it
  also covers the three integer bits;
- carrying the divisor along in the data word;
- reading the last stage's checker pair as `data_err`.

Pairs whose value is fixed by constants are valid as soon as a stage
evaluates, even with a spacer at its input. An example is the second
carry bit, which is the majority of two constant zeros. This does not
affect completion, which needs every pair.

## Simulating

Each block has a self-checking test bench in `tb/`. Each bench prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dcvsl_pkg.sv tb/tb_pkg.sv tb/tb_sc_divider.sv --top-module tb_sc_divider
./obj_dir/Vtb_sc_divider
```

`tb_sc_divider` runs the full-size divider:

- about 400 divisions, including corner operands, each checked against integer
  arithmetic;
- the step counts: 8 steps to the first result, then 8 steps per result;
- that each mechanism occurred: precharge and Evaluation-Hold in every
  stage, all three digit values, and both residual signs;
- 24 single stuck-at fault runs, each confirming that the ring stops,
  that the checker pair freezes and that no result appears afterwards.

Two further benches drive the full-size divider as workloads:

- `tb_div_exhaustive` divides every legal 8-bit operand pair: all
  24512 pairs with d in [128, 255] and x < d. It checks each quotient and
  remainder against integer arithmetic. The operands are streamed back to
  back.
- `tb_fault_campaign` applies every single stuck-at fault at the insertion
  points. That is the completion line, the local clock line and the two
  checker rails of each stage, plus each of the 92 output rails of each
  stage, each stuck at 0 and at 1: 1536 faults in all. In every run three divisions complete
  first, then the fault is applied and twenty more divisions are offered.
  The bench checks that every wrong result contains a non-code pair. It
  also checks that every completion, clock or checker fault stops the
  ring, with every local clock and the checker pair frozen. A data-rail
  fault must either stop the ring or leave every result correct. In this
  design all 1536 faults stopped the ring within the run. Two runs
  delivered a final merged word with non-code pairs, from the checker-rail
  case described under fault insertion.

The block benches cover the following:

- `qsel`, `qd_gen` and `ddcc4`: exhaustive;
- `csa`, `otf_conv`, `div_function` and `ddcc`: random, against integer
  references;
- `dcvsl_node`, `comp_block` and `div_stage`: walked through every phase
  and non-transition;
- `hs_cell`: random, against an independent model of its rules.

## Files

- `rtl/dcvsl_pkg.sv`: dual-rail type, gate functions, word layout.
- `rtl/sc_divider.sv`: top level, eight stages in the handshake ring.
- `rtl/div_stage.sv`: one stage: `hs_cell` plus `comp_block` plus fault points.
- `rtl/comp_block.sv`: `div_function` → `dcvsl_node` → `ddcc` → `cd_xor`.
- `rtl/div_function.sv`: one SRT step: `qsel`, `qd_gen`, `csa`, `otf_conv`.
- `rtl/ddcc.sv`, `rtl/ddcc4.sv`: dual-rail code checkers.
- `rtl/hs_cell.sv`, `rtl/cd_xor.sv`, `rtl/dcvsl_node.sv`, `rtl/fault_xor.sv`.
- `tb/tb_*.sv`: test benches; `tb/tb_pkg.sv` holds the shared encoders and
  the integer reference of one division step.
