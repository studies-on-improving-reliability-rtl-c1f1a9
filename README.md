# RazorProtector: an execution cluster that buys its own timing margin back

Razor flip-flops let a processor run its supply voltage down to the edge of
failure. A shadow flip-flop catches any result that arrives too late, and the
pipeline recovers. The weak point is the recovery. A flush costs a whole
pipeline depth of cycles. If the error rate jumps, for example after a sudden
IR-drop, throughput collapses until the voltage regulator has climbed back up,
and that takes microseconds.

RazorProtector adds two redundant pipelines next to the primary one. When an
operation is likely to fail, it runs on the primary pipeline in one cycle
**and** on a redundant pipeline that is given two cycles, so the redundant
result cannot fail. If the primary result turns out to be wrong, the redundant
result replaces it one cycle later: a one-cycle bubble instead of a flush.
Redundancy costs issue width, so the cluster chooses per instruction group,
with a rule that adapts at run time:

* every operation type has a **Delay Criticality Factor** (DCF), its relative
  sensitivity to setup errors;
* the cluster measures the current setup-error rate **ERR_setup**;
* from an allowed risk **RISK_th** it derives a threshold
  **DCF_th = RISK_th / ERR_setup**;
* a group whose DCF exceeds DCF_th runs redundantly (R_mode); any other group
  runs in parallel on all three pipelines (P_mode);
* RISK_th itself is tuned per interval (ideally one hot-loop body) by
  comparing what each mode would have cost.

A simple DVS controller closes the outer loop. It lowers the voltage while no
errors are seen, holds it while the error rate is tolerable, and raises it when
the rate is too high.

This repository holds synthesizable SystemVerilog for that cluster (top module
`razor_protector`) and a self-checking testbench for every module.

## The three lanes

| lane | name          | P_mode                        | R_mode                                      |
|------|---------------|-------------------------------|---------------------------------------------|
| 0    | P-PIPE        | slot 0, 1 cycle, Razor-checked | every operation, 1 cycle, Razor-checked     |
| 1    | R-PIPE even   | slot 1, 1 cycle, Razor-checked | operations 0, 2, 4, ...: 2 cycles, error-free |
| 2    | R-PIPE odd    | slot 2, 1 cycle, Razor-checked | operations 1, 3, 5, ...: 2 cycles, error-free |

Each lane has the same execution unit (`rp_alu`). In P_mode a lane executes in
one cycle into a Razor register (`p_pipe_ex`, and `r_pipe_ex` with `par_en`).
In R_mode the R-PIPE latches its operands at the end of the first cycle and
captures its result at the end of the second (`r_pipe_ex` with `r_start`).
That register-to-register path is a two-cycle multicycle path. Because the two
R-PIPEs take turns, an R_mode stream still retires one operation per cycle.

An R_mode group is issued one operation per cycle. An R-PIPE is still busy
in the cycle after it starts, so a P_mode group that follows an R_mode
operation directly cannot use that lane:

* if the group leaves the busy lane empty, it issues at once;
* if the other R-PIPE's slot is empty, the operation moves over to it and the
  group issues at once;
* only a full three-operation group waits one cycle.

A switch from P_mode to R_mode is always free.

### Pipeline and timing (`rp_core`)

```
IS  issue register: the mode of a group is fixed when it is accepted;
    operands are read from the register file (write-through)
EX  P-PIPE / R-PIPEs; operands forwarded from this cycle's write-back
WB  Razor error check, register write, recovery decision
```

The following figures are measured by `tb_rp_core`. Span is the number of
cycles from the first register write to the last.

| situation                                   | cost                                  |
|---------------------------------------------|---------------------------------------|
| P_mode, 30 groups of 3                      | 30 cycles (span 29)                   |
| R_mode, 30 operations                       | 30 cycles (span 29)                   |
| R_mode, dependent chain of 10               | back to back (span 9)                 |
| one P-PIPE error inside R_mode              | +1 cycle (span 12 for 12 operations)  |
| one error inside P_mode                     | +N_DEPTH = 5 cycles                   |
| R_mode → P_mode switch, 3-operation group   | +1 cycle                              |
| R_mode → P_mode switch, 1–2 operations      | free (remapped to the idle R-PIPE)    |

Dependent operations run back to back: both the P-PIPE and the R-PIPE of an
R_mode operation take forwarded operands. This is also how one R-PIPE obtains
the result of the operation the other R-PIPE is still finishing. Operations
within one group must be independent, as in any VLIW group; an assertion
checks this.

## Razor registers and how setup errors are stimulated (`razor_ff`)

`razor_ff` has a main flip-flop and a shadow flip-flop. They are compared in
the following cycle, and `err` is raised when they differ.

IR-drop is a physical effect, so the RTL represents it with one input per lane.
When `late[l]` is high, lane *l*'s result settles after the main clock edge.
The main flip-flop then keeps its previous value and the shadow takes the new
one. If the stale value happens to equal the new value, no error is seen, just
as in silicon. A testbench, or an environment model, drives `late` to emulate
an unreliable supply. In a chip this input goes away, and the comparison
remains.

## Recovery (`recovery_ctrl`)

Errors are evaluated when a packet reaches write-back.

* **R_mode, P-PIPE error** (`fix`): nothing is written in that cycle (the
  bubble). In the next cycle (`fix_q`) the R-PIPE result is written in place of
  the P-PIPE result. It is also forwarded to the operation waiting in EX, which
  executes again with the corrected operand. Only lane 0 is checked in R_mode.
  The R-PIPE is taken to be correct by construction.
* **P_mode, any lane error** (`flush`): the packets in write-back and EX are
  discarded and put into a two-entry replay buffer. Issue is blocked until they
  can re-enter EX exactly `N_DEPTH` cycles after their first attempt. This is
  the flush penalty of a conventional Razor pipeline of depth `N_DEPTH`
  (default 5). Nothing is written for a failed packet, so architectural state
  stays exact.

## Choosing the mode

### DCF table (`dcf_lut`)

There are 256 entries, indexed by the 8-bit operation type, with one write
port and three read ports (one per slot). The host writes the table at program
start through `lut_we/lut_waddr/lut_wdata`. The reset contents hold the four
characterised operations:

| operation | DCF    | code   |
|-----------|--------|--------|
| MUL_ADD   | 30.4 % | 304    |
| MUL       | 22.8 % | 228    |
| ADD       | 17.4 % | 174    |
| ASR       | 16.4 % | 164    |

All other entries are 0 until written, so those operations never force R_mode.
The DCF of an operation comes from circuit-level delay analysis of its
execution path (delay-critical paths weighted by their probability). That is
why it is a table rather than logic.

### Mapper (`rp_mapper`)

A group's DCF is the largest DCF among its valid operations. Its IPC is the
number of valid operations. The group goes to R_mode when its DCF is greater
than DCF_th (strictly).

### Threshold division (`dcf_th_calc`)

DCF_th = 1000 · RISK_th / ERR_setup, computed by a restoring shift-and-subtract
divider. It takes 17 cycles, one per quotient bit. A new request during a
division is served afterwards. When ERR_setup = 0 the threshold becomes all
ones, so no operation needs redundancy. The division runs only when ERR_setup
or RISK_th changes, which happens at most once per interval, so its latency is
harmless.

## The adaptive loop

### Error-rate sampler (`error_rate_sampler`)

The sampler counts checked operations and Razor errors. After every window of
`WINDOW_OPS` = 10000 checked operations, it publishes the error count as
ERR_setup (`upd` pulses). With this window, ERR_setup is in 0.01 % units, the
same unit as RISK_th.

### RISK_th tuner (`risk_th_tuner`)

The tuner keeps two scores over an interval. Each write-back evaluation of a
packet adds to them as follows:

| event                                    | xscore[P]                  | xscore[R]  |
|------------------------------------------|----------------------------|------------|
| error (any lane in P_mode, lane 0 in R_mode) | N_DEPTH · IPC · weight | + 1        |
| error-free R_mode group completed        | –                          | + IPC − 1  |

xscore[P] estimates what a flush would have cost. xscore[R] counts the bubble,
plus the parallel issue slots that R_mode gave up.

An interval ends when its cycle count passes `sample_interval`, or when
`loop_end` arrives. `loop_end` is the backward branch that closes a hot loop,
reported by the host's decoder. At the end of an interval:

* if xscore[P] > xscore[R], RISK_th steps **down**, which favours redundancy;
* otherwise RISK_th steps **up**;
* both scores are then cleared.

RISK_th runs from 0.01 % to 1 %. The step is 0.01 % below 0.1 % and 0.1 % from
0.1 % up. Exactly at 0.1 %, a step down is 0.01 % and a step up is 0.1 %. With
`cfg_tune_en` low, RISK_th simply follows `cfg_risk_init`; this is the static
scheme with a fixed risk. After reset, RISK_th is 0.1 %.

### Supply control (`dvs_controller`)

At each ERR_setup update, the controller decides as follows:

* 0 errors: it lowers the voltage by `cfg_down_step` mV;
* at most `cfg_err_tol` errors: it holds the voltage;
* more errors: it raises the voltage by `cfg_up_step` mV.

The code `vdd_mv` stays within 800–1300 mV and starts at 1300 mV. After each
change the controller ignores updates for `cfg_settle_cycles` cycles, the time
the regulator needs for the step. `vdd_settling` is high during that wait. The
regulator itself is analog and not part of this RTL.

## Number formats (`rp_pkg`)

| quantity  | unit         | range / width                    |
|-----------|--------------|----------------------------------|
| DCF       | 0.1 %        | 0..1000, 10 bits                 |
| RISK_th   | 0.01 %       | 1..100, 7 bits                   |
| ERR_setup | errors / 10000 ops = 0.01 % | 16 bits           |
| DCF_th    | 0.1 %        | 1000·RISK/ERR, 17 bits, all ones = never |
| vdd_mv    | mV           | 800..1300, 11 bits               |

Instruction slots (`slot_t`) carry valid, an 8-bit operation type, `rd`, `rs1`,
`rs2` and a 16-bit immediate. Operation types are NOP, ADD, SUB, AND, OR, XOR,
LSL, LSR, ASR, CMPLT, MOV, SETI, ADDI, MUL and MUL_ADD (rd ← rd + rs1·rs2).
Data is 32 bits wide, and there are 32 general registers.

## Top-level interface (`razor_protector`)

* **Instruction groups:** `bundle_valid`, `bundle[3]` (`slot_t`) and
  `bundle_ready`. A group is accepted when both valid and ready are high.
* **Host signals:** `loop_end` comes from the host's branch decoder. `late[2:0]`
  is the per-lane setup-violation stimulus.
* **DCF table writes:** `lut_we`, `lut_waddr` and `lut_wdata`.
* **Quasi-static settings:** `cfg_tune_en`, `cfg_risk_init`,
  `cfg_sample_interval`, `cfg_weight`, `cfg_err_tol`, `cfg_down_step`,
  `cfg_up_step` and `cfg_settle_cycles`.
* **Results:** `wb_we/wb_waddr/wb_wdata` report every register write, one per
  lane. `dbg_raddr/dbg_rdata` read any register.
* **Control state:** `err_setup`, `risk_th`, `dcf_th`, `vdd_mv` and
  `vdd_settling`. `idle` means nothing is in flight.
* **Event counters:** `stat_ops`, `stat_r_ops`, `stat_flush`, `stat_fix`,
  `stat_mode_switch`, `stat_switch_wait`, `stat_fwd`, `stat_intervals`,
  `stat_v_up` and `stat_v_down`.

All flops reset asynchronously with `rst_n` (active low). Everything runs on
one clock `clk`.

## What is outside the RTL, and where it departs from the source

* **The host VLIW processor is not included.** This covers fetch, decode of its
  ISA, caches, media registers, loads/stores and branches. Groups arrive
  already decoded, and memory operations are not executed here.
* **The voltage regulator is not included.** It is analog; only the code it
  receives and a settle wait are modelled.
* **Issue width is 3.** The source names three pipelines and a maximal issue
  width of 3, although its simulator table lists 4 per cycle. This design
  follows the three pipelines.
* **Choices made by this design** where the source is silent:
  * the fixed-point units;
  * the 10000-operation sampling window;
  * the group DCF taken as the maximum over the group;
  * one operation per cycle in R_mode;
  * the one-cycle R→P wait for full groups. The source assumes mode switches
    cost nothing; here an R-PIPE is really occupied for two cycles.
  * the replay buffer;
  * the operation set beyond MUL_ADD/MUL/ADD/ASR and its encoding;
  * all reset values;
  * the DVS settle wait.
* **DCF is static per operation type.** It does not depend on operand values.

## Verification

Each module has a testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`, uses `$urandom` stimulus, and has a watchdog.
They check against independent models: a reference ALU, a register-file
model, cycle models of the recovery rules, the tuner and the DVS rule, and
quotient checks for the divider, including its 17-cycle latency.

`tb_razor_protector` runs the whole cluster at its default parameters in three
phases of random independent groups:

1. no violations;
2. about 1 % of lane results late, with a static RISK_th of 0.1 %;
3. the same with RISK_th tuning, hot-loop intervals and `loop_end`.

Every register write is compared with a reference execution. Whenever RISK_th
and ERR_setup have been stable for a while, DCF_th is checked against
1000·RISK_th/ERR_setup. The testbench fails if any mechanism never happened:
P_mode flush, R_mode bubble, both mode switches, R→P wait, R→P lane remap,
forwarding, ERR_setup
and DCF_th updates, RISK_th steps up and down, intervals, and voltage steps up
and down.

`tb_rp_kernels` runs the inner loops of four image-processing kernels through
the top, at default parameters:

| kernel   | what the loop computes                         | operations used                   |
|----------|------------------------------------------------|-----------------------------------|
| FI       | sum of absolute differences                    | SUB, ASR, XOR, ADD                |
| unsharp  | sharpening with a weighted sum and a sign count | SUB, MUL, ASR, ADD, MUL_ADD, CMPLT |
| blur     | a 1-2-1 filter and its energy                  | ADD, LSL, LSR, MUL_ADD            |
| FI-a     | minimum search over candidate SADs             | CMPLT, SUB, MUL, ADD              |

Pixel values enter through set-immediate operations, which stand in for the
host's loads. Each kernel's operation list is packed in order into groups of
independent operations, so the group size follows from its data dependences.
That gives about 1.3 to 1.8 operations per cycle including recovery. Each
iteration ends with `loop_end`. Each kernel runs three phases: nominal, an
IR-drop, and recovery. Its results are compared with the same kernel computed
directly in integers, and the per-kernel operation counts, cycles, R_mode
operations, flushes and bubbles are printed.

unsharp is then run four more times from reset: with RISK_th fixed at
0.01 %, 0.1 % and 1 % (tuning off), and with tuning on. This is the static
versus adaptive comparison. A lower fixed RISK_th gives a lower DCF_th during
the IR-drop, so the testbench checks that the number of R_mode operations does
not rise as RISK_th goes up, and that it is strictly lower at 1 % than at
0.01 %. With 1.5 % of lane results late, a typical run puts about 7350, 5800
and 0 operations in R_mode. The tuner then settles at 1 %. With this
kernel's IPC of about 1.45 and a flush cost of five cycles, it scores Parallel
mode as the cheaper one.

To simulate with Verilator 5, run from the repository root (replace the
testbench name to run another one):

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  -y rtl -y tb rtl/rp_pkg.sv tb/tb_rp_model_pkg.sv tb/tb_razor_protector.sv \
  --top-module tb_razor_protector -o sim
./obj_dir/sim +verilator+rand+reset+2
```

`tb_rp_model_pkg` holds the reference operation model and the random-group
generator shared by the testbenches.
