# An asynchronous domino multiplier with a constructed critical data path

This is a clockless, latch-free 8×8 array multiplier. Each gate level is one pipeline stage
built from domino logic. The gates themselves hold the data, so there are no latches or
registers between stages. A stage precharges and evaluates under control of a local
handshake with its neighbours.

Classic dual-rail domino pipelines such as PS0 make every bit dual-rail, so that a completion
detector can see when every bit is valid. That doubles the logic, and the detector grows with
the width of the data path. This design makes only **one bit per stage** dual-rail: the
*critical bit*. The logic is arranged so that this bit is always the last to evaluate. A
single NOR gate on its two rails is then the whole completion detector, however wide the
stage is. All other bits use single-rail domino gates, which need roughly half the
transistors of dual-rail ones.

The module and file names use the prefix `apcdp`, short for *asynchronous pipeline with a
constructed critical data path*.

The RTL models each gate's logic function, its precharge/evaluate behaviour and its delay.
You can simulate it with Verilator as an event-driven asynchronous circuit.

## How a stage works

```
            pc (from the next stage's done)
             |
 in_dr ──►┌──┴───────────────────────────┐── out_sr (single-rail word)
 in_link ─►│ SLG (dual-rail) ─── out_crit ├──► out_crit ──► link of the next SLG
           │ single-rail domino gates     │
           │ encoding splitters ──────────├──► out_dr (dual-rail where needed)
           └──────────────┬───────────────┘
                          NOR + drive buffers ──► done (to the previous stage's pc)
```

- **Precharge/evaluate.** `pc = 0` precharges every gate of the stage: single-rail outputs go
  to 0 and dual-rail pairs go to spacer (both rails 0). `pc = 1` lets gates evaluate. Once a
  gate has evaluated, a keeper holds its value even after its inputs return to spacer. That is
  how a stage stores its token without a latch.
- **Handshake (PS0 protocol).** A stage's `pc` is the `done` of the stage after it. `done`
  falls when that stage has evaluated, so this stage may precharge. `done` rises when that
  stage has precharged, so this stage may take its next token.
- **SLG, the critical-bit gate** (`slg_gate`). This is a dual-rail domino gate that starts
  evaluating only after every operand pair *and* the `link` input are valid. The link is the
  critical bit of the previous stage. An ordinary dual-rail gate can fire early, for example
  an AND gate with one input already 0. The SLG cannot, so its delay does not depend on the
  data. Chaining the SLGs stage to stage makes each SLG the last gate of its stage to fire.
- **Single-rail gates** (`sr_domino_gate`). These have one output rail. The output rises as
  soon as the input rails that are already high force the function to 1. If the function is
  0, the output never moves. A single rail therefore does not show *when* it is valid; the
  critical bit shows that for the whole stage.
- **Encoding splitters** (`encoding_splitter`). A single-rail 0 cannot be told from
  "not yet evaluated". A bit that the next stage needs in dual-rail form therefore goes
  through a splitter. Such bits are the inputs of the next SLG and the inputs of non-monotonic
  (XOR-type) gates. The splitter waits until the stage's critical bit is valid. At that point
  every single-rail bit is final. The splitter then raises `t` or `f`. Monotonic gates (BUF,
  AND, majority) read only true rails, so their inputs need no splitter.
- **Completion detector** (`completion_detector`). A static NOR of the critical bit's two
  rails, followed by a chain of drive buffers to the previous stage's `pc`.

### The timing assumption

This design trades the delay-insensitivity of a full dual-rail pipeline for a simple local
assumption. In each stage, no bit may finish evaluating later than the critical bit by more
than the delay of the NOR gate plus the drive buffers. The previous stage starts to precharge
only that long after the critical bit. A bit that is still evaluating then would lose its
inputs.

This implementation adds a tighter condition for the bits that feed an encoding splitter.
The splitter samples its bit when the critical bit becomes valid, so those bits must be final
by then, with no margin. Both conditions hold here because:

- every single-rail gate sees its inputs no later than the SLG does;
- `T_SR <= T_SLG`.

This works like a clock tree or a matched delay line: it must be met by layout, and it is
only as robust as the delay matching. If you change the delay parameters, keep
`T_SR <= T_SLG`.

## The multiplier on this pipeline

`N` = 8 gives 2N = 16 stages. Every stage carries one word of `6N+1` = 49 single-rail bits,
laid out as `a | b | s | c | p | r`:

- `a`, `b`: the operands;
- `s`, `c`: the carry-save sum and carry vectors;
- `p`: the product bits already final;
- `r`: the carry of the final adder.

| stage k | what it computes | critical bit |
|---|---|---|
| 0 | first partial-product row: `p0 = a0·b0`, `s_j = a_j·b0` | `p0` |
| 1 … N−1 | one carry-save row: `s_j, c_j = FA(a_j·b_k, s_{j+1}, c_j)` | `p_k` (the j = 0 sum) |
| N … 2N−1 | one bit of the ripple-carry adder: `p_{N+m} = s_{m+1} + c_m + r` | `p_{N+m}` |

Each full-adder sum or carry, with its partial-product AND, is one complex domino gate. Every
other live bit is copied forward by a domino buffer, because nothing else stores data
between stages. A bit that is no longer needed has no gate and stays 0. The tables in
`apcdp_pkg` give each gate's kind and input positions. They also say which bits need a
splitter. `apcdp_stage` builds its gates from those tables with `generate`.

## Timing with the default delays

The default delays, in ps, are: `T_SR` = 40, `T_SLG` = 50, `T_SPL` = 30, `T_NOR` = 20, and
`T_BUF` = 15 for each of `N_BUF` = 2 buffers. From these:

- **Forward latency** = `T_SLG + (2N−1)(T_SPL + T_SLG)` = 1250 ps, from request to product.
- **Cycle time** = three evaluations + two completion detections + one precharge.
  - The three evaluations are the stage itself (`T_SLG`, since its data is already waiting)
    and its two successors (`T_SPL + T_SLG` each).
  - Each completion detection is `T_NOR + N_BUF·T_BUF`.
  - The precharge is `T_SLG`.
  - Total: 50 + 160 + 100 + 50 = 360 ps.
- **Capacity:** at most N = 8 tokens in flight, one in every other stage.

The end-to-end testbench checks all three figures exactly.

## Switching activity and data patterns

A domino gate spends energy only when its node discharges. A single-rail gate discharges only
when its output is 1, so its share of the activity depends on the data. Each dual-rail part
(the SLG and the splitters) always discharges exactly one rail per token.
`tb_apcdp_patterns` counts every rising rail in the default-size multiplier. It checks that
the single-rail count equals the number of 1 bits in the stage words. It computes those words
with its own carry-save model.

| operands | single-rail | dual-rail (16 SLG + 191 splitters) | total |
|---|---|---|---|
| 0 × 0 (best case) | 0 | 207 | 207 |
| random (mean) | about 141 | 207 | about 348 |
| 255 × 255 (worst case) | 253 | 207 | 460 |

If every one of the 388 live gates were dual-rail, each token would discharge 388 rails,
whatever the data. Here the splitters dominate the fixed part. Almost every full-adder sum is
an XOR, which needs both polarities of its inputs. A stage partition with fewer
non-monotonic gates on the boundaries would need fewer splitters.

## Pipeline failure when the assumption is broken

`tb_apcdp_failure` runs two multipliers side by side.

- **Edge case:** the single-rail gates are exactly as slow as the SLG. All products are
  correct.
- **Late case:** the single-rail gates are slower than the SLG by more than the completion
  detector delay. The critical bit then no longer stands for its stage: splitters capture
  values that are not yet final, and previous stages precharge too early. Wrong products
  appear; in practice every product is wrong.

## Interface of `apcdp_multiplier`

| port | dir | type | meaning |
|---|---|---|---|
| `rst` | in | logic | forces every stage to precharge |
| `in_a`, `in_b` | in | `dr_t [N-1:0]` | operands, dual-rail (`{t,f}`: 10 = 1, 01 = 0, 00 = spacer) |
| `in_req` | in | `dr_t` | request; the link into stage 0's SLG |
| `in_ack` | out | logic | stage 0 done: 1 = ready for an operand pair, 0 = taken |
| `out_p` | out | `logic [2N-1:0]` | product, valid while `out_req` is valid |
| `out_req` | out | `dr_t` | critical bit of the last stage |
| `out_ack` | in | logic | sink's done: 0 makes the last stage precharge, 1 lets it evaluate |

Source protocol (four-phase, return to zero):

1. Wait for `in_ack = 1`.
2. Drive `in_a`, `in_b` and `in_req` valid.
3. Wait for `in_ack = 0`.
4. Return all three to spacer.

The source must reach spacer before stage 0 is allowed to evaluate again, about one cycle
later.

The sink behaves like one more stage:

1. When `out_req` becomes valid, read `out_p`.
2. Drop `out_ack`.
3. After `out_req` returns to spacer, raise `out_ack` again.

## Files

- `rtl/apcdp_pkg.sv`: the dual-rail type `dr_t`, the gate kinds, the gate functions, and the
  per-stage netlist tables (`gate_spec`, `crit_pos`, `needs_split`).
- `rtl/slg_gate.sv`, `rtl/sr_domino_gate.sv`, `rtl/encoding_splitter.sv`,
  `rtl/completion_detector.sv`: the cells.
- `rtl/apcdp_stage.sv`: one stage. `rtl/apcdp_multiplier.sv`: the pipeline (top).
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/tb_apcdp_patterns.sv`: the switching-activity test.
- `tb/tb_apcdp_failure.sv`: the timing-assumption test.
- `tb/mult_env.sv`: the source/sink helper used by the timing-assumption test.

## Simulating

```
verilator --binary --timing --top-module tb_apcdp_multiplier -y rtl -y tb +libext+.sv \
          -Irtl -Itb rtl/apcdp_pkg.sv tb/tb_apcdp_multiplier.sv
./obj_dir/Vtb_apcdp_multiplier
```

Use the same command for the other testbenches. The end-to-end test has four phases:

1. one token through the empty pipeline (checks latency);
2. a fast stream (checks cycle time);
3. a stalled sink, which fills the pipeline to 8 tokens and blocks the source;
4. 300 random operand pairs with random source and sink delays.

Every product is checked against `a*b`. The test runs the top at its default parameters and
takes a few seconds.

## Modelling notes and limits

- **Keepers are latches.** Each domino gate's dynamic node is an `always_latch`. Its output
  follows after the gate delay through a delayed assignment in an `always @(node)` process.
  Synthesis ignores the delays and reports the latches. It also reports combinational loops:
  the handshake ring (gate → NOR → previous stage's precharge port → gate) is the nature of a
  clockless pipeline. This is a behavioural-level model of a custom domino circuit, not a
  netlist for a standard-cell flow.
- **Power-up state.** Outputs are initialised to the precharged state, and `rst` forces
  precharge. Neither mechanism is specified for the original circuit.
- **Early firing.** A single-rail gate fires as soon as the known inputs decide its output
  is 1. An SLG never fires early.
- **Choices made in this implementation:**
  - the stage partition of the multiplier;
  - the word layout;
  - which bit is critical;
  - where the splitters sit, and their use of the critical bit as the validity reference;
  - the environment interfaces;
  - all delay values.
- **What follows the original design:**
  - one dual-rail critical bit per stage, built from linked gates that wait for all their
    inputs;
  - single-rail logic elsewhere;
  - a single-NOR completion detector with drive buffers feeding the previous stage's
    precharge port;
  - the PS0 handshake;
  - the 8×8 array multiplier as the data path.
- **Not modelled:** energy and area. The design's advantage over a bundled-data domino
  pipeline (LP2/2-SR) is a power and area claim, which a logic simulation cannot show. The
  logic saving can be seen in the structure: one dual-rail gate and a few splitters per
  stage, against a dual-rail gate for every bit.
