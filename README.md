# Permanent stuck-at faults in a QDI pipeline: a fault-injection testbed

A quasi-delay-insensitive (QDI) circuit has no clock. Each signal transition
must be acknowledged before the next one can happen. So when a gate is
permanently damaged, the circuit usually just stops: some handshake never
completes and the pipeline deadlocks. That would be the ideal fail-stop
behaviour for self-repair: fix the defect and operation resumes where it
stopped. It does not always hold. A stuck-at fault can also make a gate fire
early. Then the pipeline captures a wrong value or loses a token before it
stops, and it stays wrong after the repair.

This RTL is a gate-level model of a small QDI pipeline in which any single
gate pin of the middle stage can be stuck at 0 or 1, switched on and off at
run time. Next to it runs an identical fault-free twin, along with the
monitors that sort each injected fault into one of these outcomes:

| effect (what the pipeline does)       | outcome (what the user sees)                          |
|----------------------------------------|-------------------------------------------------------|
| **IF** immediate freeze: no further phase | **FS** fail-stop: correct results after the repair |
| **LD** late detection: a transition is held back, tokens still move, then halt | **SDC** silent data corruption: wrong data reached the output before the halt |
| **PF** premature firing: an extra, early transition, tokens still move, then halt | **LSC** latent state corruption: output was clean until the halt, wrong after the repair |

The design follows the target circuit and the experiment described in R. El
Shehaby and A. Steininger, *On the Effects of Permanent Faults in QDI Circuits
– A Quantitative Perspective*. The structure of the circuit and the fault
space are theirs. The time model, the pin numbering, the classification logic
and all the numbers quoted below belong to this implementation.

## The pipeline

```
 source ──D1,D2──► S1 (latch) ──► S2 (DIMS half adder + latch) ──► S3 (latch) ──sum,carry──► sink
        ◄──ack────            ◄──ack──                         ◄──ack──           ◄──ack──
```

* **Encoding.** Each bit is a dual-rail pair `{t,f}`: `10` is DATA 1, `01` is
  DATA 0, `00` is NULL (the spacer), and `11` is illegal. The datapath has two
  such signals (`qdi_pkg::dr_t [1:0]`).
* **Protocol.** Four-phase return-to-zero: a DATA wave, its acknowledge, a
  NULL wave, and the acknowledge going back to 0.
* **Function.** Only the middle stage computes. It adds its two inputs
  (half adder), so the sink receives `{carry, sum}` of `{D2, D1}`. S1 and S3
  are plain latches that act as the upstream and downstream environment of the
  victim stage S2.

### The latch (`qdi_latch`)

The latch is the part that needs the most care. It has four pieces:

1. **LCD**, a completion detector on the register input. It has an OR per
   signal (the signal holds DATA) and a C-element that joins the two ORs. Its
   output rises when a full DATA word waits at the input and falls when a full
   NULL word does.
2. **CTRL**, a C-element. It combines the LCD with the *inverted* acknowledge
   of the next stage, and rises only when both of these hold:
   * DATA is waiting at the input;
   * the next stage has taken the previous NULL (its acknowledge is 0).

   It falls under the mirror conditions.
3. **REG**, one C-element per rail. Each combines its rail with CTRL. With
   CTRL = 1, a rail at 1 is copied; with CTRL = 0, a rail at 0 is copied.
   Otherwise the rail holds. The register is therefore closed by default and
   only opens for the phase that CTRL has armed.
4. **RCD**, a second completion detector, on the register output. Its output
   is the acknowledge sent upstream: 1 means DATA was captured, 0 means NULL
   was captured.

A C-element (`qdi_celem`) drives its output to 1 when both inputs are 1 and
to 0 when both are 0. Otherwise it keeps its value.

Each stage holds either a DATA token or a NULL spacer. The three stages
therefore carry at most two DATA tokens at a time, which the pipeline
testbench checks.

### The half adder (`qdi_dims_ha`)

The half adder uses delay-insensitive minterm synthesis (DIMS). Four
C-elements detect the four input combinations: `m00`, `m01`, `m10` and `m11`.
A minterm fires only when both inputs carry DATA, and resets only when both
inputs have returned to NULL. The outputs are ORs of minterms:

```
sum.t   = m01 | m10      sum.f   = m00 | m11
carry.t = m11            carry.f = m00 | m01 | m10
```

## Fault locations

Every gate of S2 has numbered pins. The number sits in `fault.loc`; `fault.sa`
is the stuck value and `fault.en` switches the fault on. A stuck **input**
pin is seen only by that gate, not by the other loads of the net. A stuck
**output** pin forces the value that all loads see. It leaves the C-element's
internal state untouched, so removing the fault restores the true state.

| pins  | gate                                  | pins  | gate                                     |
|-------|---------------------------------------|-------|------------------------------------------|
| 0–2   | minterm m00 C-element (a, b, out)     | 22–30 | LCD: OR sig0, OR sig1, join C-element    |
| 3–5   | m01                                   | 31–42 | REG: C-element per rail (in, ctrl, out); rails sum.t, sum.f, carry.t, carry.f |
| 6–8   | m10                                   | 43–51 | RCD: OR sig0, OR sig1, join C-element    |
| 9–11  | m11                                   | 52–54 | CTRL C-element (LCD, ack from S3, out)   |
| 12–14 | OR sum.t                              |       |                                          |
| 15–17 | OR sum.f                              |       |                                          |
| 18–21 | OR3 carry.f                           |       |                                          |

That is 22 pins in the half adder and 33 in the latch: 55 locations, 110
faults. The constants are in `qdi_pkg`. The inversion at the CTRL input is a
bubble on the C-element and is not a pin of its own.

## Time model

A QDI circuit is clockless, but whether a fault fires early depends on gate
delays. Every gate is therefore modelled with a delay counted in ticks of an
emulation clock `clk`:

| gate      | delay (ticks) |
|-----------|---------------|
| OR2       | 2             |
| OR3       | 3             |
| C-element | 3             |

A C-element is slower because of its keeper and higher logical effort. The
gate netlist itself is unchanged by this: `clk` only advances time. The
design is synthesizable, for example to run faults on an FPGA. Injection
times can be stepped by one tick, which is below the smallest gate delay.

Resulting latencies at these delays:

| path                                                     | ticks |
|----------------------------------------------------------|-------|
| one latch, DATA at input to acknowledge                  | 16    |
| DATA at S2 input to valid half-adder outputs             | ≤ 6   |
| token period, fast source and sink                       | 54    |
| token period, T_src = 40                                 | 112   |
| token period, T_snk = 40                                 | 92    |

To change the delays, edit `D_OR2`, `D_OR3` and `D_CELEM` in `qdi_pkg`
(each must be ≥ 1).

## Source and sink

`qdi_source` and `qdi_sink` are ideal: they have no gates that can fail, and
their only timing is a delay.

* **Source.** It drives the next DATA word `t_src` ticks after it sees the
  acknowledge fall, and NULL `t_src` ticks after it sees the acknowledge rise.
  Token k carries `(k + k/4) mod 4`. Every four tokens therefore use all four
  input values, and a lost or duplicated token shows up as wrong values later.
* **Sink.** It acknowledges complete DATA and complete NULL after `t_snk`
  ticks, records each token, and flags any `11` code word as illegal.

The delays `t_src` and `t_snk` are run-time inputs (1–255), so one build can
sweep them. When `t_snk > t_src` the pipeline is bubble-limited: the output
side is the bottleneck. When `t_src > t_snk` it is token-limited.

## Classifying a fault (`qdi_effect_monitor`, `qdi_trace_checker`, `qdi_trace_compare`)

The faulty and the fault-free pipeline start from the same reset and have
identical sources. Until the fault acts, their 18 S2 gate outputs agree on
every tick. The monitor records how the first disagreement arose:

* **Stimulated:** a faulty output changed where the fault-free one did not.
  This is an extra, early transition.
* **Inhibited:** the fault-free output changed and the faulty one did not.

The monitor also counts transitions of S2's CTRL after injection; each one is
S2 moving into its next DATA or NULL phase. Once S2's outputs have been
still for `DL_TICKS` (256) ticks, the pipeline counts as deadlocked, and the
effect is fixed in this order:

1. **NONE** if S2 never deviated at all;
2. **IF** if CTRL never moved after injection. S2 is frozen in its current
   phase, but extra transitions may still have corrupted that phase;
3. **PF** if S2 kept changing phase and the first deviation was a
   stimulated transition;
4. **LD** if S2 kept changing phase and the first deviation was inhibited.

The trace checkers compare every token at each sink with
`half_add(src_value(k))`. Errors seen while the fault is present count in
`f_err_pre`; errors seen after its removal count in `f_err_post`. Together
with the sink's `illegal` flag and its token count, these give the outcome:

| outcome | condition |
|---------|-----------|
| **FS**  | all tokens arrive and are correct |
| **SDC** | a wrong or illegal word reached the sink before the repair |
| **LSC** | any other failure: wrong data only after the repair, or the pipeline does not finish |

`qdi_trace_compare` works at a finer grain than the token checkers. It
records every change of the four output rails of each pipeline, in order, in
its own 512-entry trace memory, then compares the two traces event by event.
The faulty run lags the golden one, so events are matched by position, not by
time. The comparator catches:

* extra rail pulses, even ones that never form a complete word;
* missing transitions;
* wrong values.

`tr_mismatch_pre` says whether the first differing faulty event came before
the repair.

### One experiment on `qdi_fi_testbed`

1. Hold `rst`. Set `n_tokens`, `t_src` and `t_snk`. Release `rst` and raise
   `en`.
2. Set `fault = '{en:1, sa:<0|1>, loc:<0..54>}` at the chosen time.
3. Wait for `deadlock`, then read `effect`, `phases` and `stimulated`.
4. Clear `fault.en` (the repair). Wait until `f_src_done` and
   `f_tokens == n_tokens`, or time out.
5. Wait for the last NULL spacer to reach the sink.
6. Read `f_err_pre`, `f_err_post`, `f_illegal` and the `tr_*` trace outputs.
   The golden counters (`g_tokens`, `g_errors`) must always be clean.

## Results of the included sweep

`tb_qdi_fi_campaign` injects all 110 faults at every tick of one steady-state
token period (from the fourth token on), for T_src, T_snk ∈ {2, 40} ticks.
That is 40,700 experiments in about one minute of simulation. Its output:

| T_src | T_snk | period | IF    | LD    | PF    | incorrect after repair (SDC + LSC) |
|-------|-------|--------|-------|-------|-------|------------------------------------|
| 2     | 2     | 54     | 19.7% | 48.2% | 32.1% | 14.1% (14.1 + 0.0)                 |
| 2     | 40    | 92     | 17.4% | 52.5% | 30.1% | 19.9% (18.3 + 1.6)                 |
| 40    | 2     | 112    | 21.3% | 46.4% | 32.2% | 13.0% (12.5 + 0.5)                 |
| 40    | 40    | 112    | 21.3% | 46.4% | 32.2% | 13.0% (12.5 + 0.5)                 |

Findings:

* Every fault that made S2 deviate ended in a deadlock.
* LD is the most common effect, and is more common when the pipeline is
  bubble-limited.
* IF is more common when the pipeline is token-limited.
* 13–20% of experiments (15.0% on average) leave the pipeline giving wrong
  results after the repair. Most show up as an illegal `11` word at the
  output.
* About three quarters of these incorrect cases are PF (72–75% across the
  settings). The other quarter are IF (25–28%): the extra transition
  corrupted the frozen phase. No LD case gave a wrong result in this sweep:
  the first effect of an LD fault is a transition held back.
* Within each effect, 35% of PF cases and 20% of IF cases end incorrect.
* The output transition trace differs from the golden one in 6,287 of the
  40,700 experiments. In about 220 of these, every token still arrives with
  the right value: the difference is a stray rail pulse.

Three of these trends agree with the original study:

* LD is the dominant effect and rises when the pipeline is bubble-limited.
* IF rises when it is token-limited.
* The share of incorrect results is of the same order (13–30% there).
* Wrong results come from both frozen (IF) and premature-firing (PF) cases.
  The original study attributes a share to LD as well (about an eighth on
  average). Here no LD case left a wrong result.

The original also sees PF rise in the token-limited case; here PF changes
little with the setting (30–32%).

The absolute shares differ. In the original study PF is rare (about 1–10%)
and LD larger (65–93%). Here PF counts *any* extra gate-output transition at
the first deviation. That includes a stuck output forced to the opposite of
its current value, which happens for about half of all output-pin faults. A
stricter PF test would move many of these cases to LD. The gate delays, the
token values and the injection window also shape the numbers.

## Departures from the original work and known limits

* **Time model.** Time is discrete ticks with fixed transport delays. The
  original used a timed behavioural gate model with delays from logical effort
  and no stated values. Glitch filtering (inertial delay) is not modelled.
* **Output comparison.** The outcome classes (FS, SDC, LSC) are judged on
  tokens compared with the computed correct values. The transition-trace
  comparison is reported alongside, matched by event order rather than time.
  Traces longer than 512 events per run set `tr_overflow`.
* **Deadlock.** A deadlock is declared after 256 quiet ticks on S2's gate
  outputs. This is safe for source and sink delays up to 255 ticks.
* **Assumptions.** Placing the half adder only in S2 is this design's
  reading. So are the pin order, the reset state (all NULL), and the source
  and sink applying the same delay to both phases.
* **Fault model.** Only single stuck-at faults in S2 are modelled, as in the
  original. The source and sink are ideal.

## Files

| file | contents |
|------|----------|
| `rtl/qdi_pkg.sv` | types (`dr_t`, `fault_t`, `effect_t`), pin map, gate delays, `src_value`, `half_add` |
| `rtl/qdi_celem.sv`, `rtl/qdi_or.sv` | gate primitives with fault pins and tick delay |
| `rtl/qdi_dims_ha.sv`, `rtl/qdi_cd.sv`, `rtl/qdi_register.sv`, `rtl/qdi_latch.sv` | stage building blocks |
| `rtl/qdi_stage.sv`, `rtl/qdi_pipeline.sv` | stage and three-stage pipeline |
| `rtl/qdi_source.sv`, `rtl/qdi_sink.sv` | ideal environment |
| `rtl/qdi_effect_monitor.sv`, `rtl/qdi_trace_checker.sv`, `rtl/qdi_trace_compare.sv` | classification |
| `rtl/qdi_fi_testbed.sv` | top: faulty and golden pipelines with monitors |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_qdi_fi_testbed.sv` | end-to-end test at default parameters: 110 faults, bubble- and token-limited |
| `tb/tb_qdi_fi_campaign.sv` | the full sweep above |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```sh
verilator --binary --timing --assert -Irtl rtl/qdi_pkg.sv tb/tb_qdi_fi_campaign.sv \
          --top-module tb_qdi_fi_campaign -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. `-Irtl` lets Verilator find
the modules by file name. `verilator --lint-only -Wall -Irtl rtl/qdi_pkg.sv
rtl/qdi_fi_testbed.sv` lints the top. The remaining lint warnings are about
monitoring outputs left unconnected in the top and unused package constants.
