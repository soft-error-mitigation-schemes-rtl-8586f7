# SEM and STEM: pipeline registers that catch soft errors and timing errors

A particle strike can flip a flip-flop (a *soft error*, SE) or put a short
glitch on a logic net that a flip-flop then captures (a *single-event
transient*). A pipeline that is clocked faster than its worst-case path
delay also captures wrong data, a *timing error* (TE). Both kinds of error
can be caught the same way: sample each pipeline register's input three
times, a little apart in time, and compare the samples.

This repository holds SystemVerilog for two register cells built on that
idea, plus the control around them:

* **SEM** (Soft Error Mitigation). Three samples of every bit. A mismatch
  between the first two shows an error; the third sample decides whether
  it matters, and repairs the first one if so. It protects against soft
  errors at the normal, worst-case clock period. A repair costs one cycle.
* **STEM** (Soft and Timing Error Mitigation). Three samples again, but the
  third one is a checkpoint that only takes data once the cycle is known
  to be clean. On a mismatch the whole pipeline rolls back to the
  checkpoint and recomputes. This tolerates timing errors, so the clock
  may run faster than the worst-case path allows. A controller watches the
  error rate and moves the clock period between 9 ns and 7 ns to keep
  recoveries below 1 % of cycles.

Both cells protect the same small datapath: a 64-bit adder, followed by a
32 x 32-bit multiplier of the two halves of the sum. The top module
`sem_stem_top` puts the STEM pipeline (with recovery control and the
overclocking controller) next to the SEM pipeline (with its own recovery
control).

## Three clocks and the timing rules they need

Each pipeline gets three copies of its clock with the same period T:

```
CLK1  _|~~~~~~~~|________|~~~~    R1 samples at 0
CLK2  ___|~~~~~~~~|________|~~    R2 samples at Phi1
CLK3  _____|~~~~~~~~|________|    R3 samples at Phi1 + Phi2
```

R1 drives the next stage at once (speculatively). R2 and R3 only check it.
For that to work, the delays of the logic in front of a register have to
satisfy these rules:

* **Phi1 and Phi2 each at least as long as a transient pulse.** A
  glitch can then be caught by at most one of the three registers. The
  transients this design assumes last 0.5 to 0.9 ns, so both are at least
  1 ns.
* **SEM only: T at least the worst-case path delay.** This is ordinary
  timing closure. The SEM pipeline runs at 9 ns.
* **Short-path (contamination) delay at least Phi1 + Phi2.** The next
  cycle's data must not reach R2 or R3 before they have sampled the
  current cycle. This is the rule that costs area in a real layout (delay
  buffers on short paths).
* **STEM only: T + Phi1 at least the worst-case path delay.** Then R2
  always holds correct data, even when R1 was too early. With T_Min = 7 ns
  and a 9 ns worst-case path, this gives Phi1 = 2 ns. The STEM side uses
  Phi1 = 2 ns and Phi2 = 1 ns. The SEM side runs at 9 ns with Phi1 = Phi2
  = 1 ns.
* **This implementation also needs Phi1 + Phi2 < T/2** (3 ns < 3.5 ns at
  7 ns). The recovery controllers decide at the falling edge of CLK1, and
  by then all three samples must be in.

The short-path rule cannot be seen in a zero-delay RTL simulation: there,
R2 and R3 would simply catch the next cycle's value. Each stage output
therefore passes through `hold_delay`, a transport delay of `HOLD_NS`
(3.5 ns for STEM, 2.5 ns for SEM). It stands for the padding a layout
would add. Synthesis ignores it. If you change Phi1 or Phi2, change
`HOLD_NS` in the pipeline modules too.

## The SEM cell (`sem_cell`)

R1, R2 and R3 sample `data_in` on CLK1, CLK2 and CLK3. R1 is the output.
There are two outputs for checking:

* `error = Q1 != Q2`
* `benign = Q2 != Q3`

A multiplexer in front of R1 selects Q3 when `load_backup` (LBkup) is high.

| case | what happened                     | error | benign | action            |
|------|-----------------------------------|-------|--------|-------------------|
| I    | nothing                           | 0     | 0      | none              |
| II   | R1 wrong (flip, or glitch at CLK1) | 1     | 0      | reload R1 from R3 |
| III  | R2 wrong                          | 1     | 1      | none (R1 is good) |
| IV   | R3 wrong                          | 0     | 1      | none              |

So a cell needs repair only when `error & ~benign`. Case III is a *false
positive*: an error is seen, but R1 was right. `sem_reg` counts it but
does not repair.

## The STEM cell (`stem_cell`)

The cell has the same three registers, with different multiplexers:

* R1 and R2 take Q3 when `load_backup` is high. This is the rollback.
* R3 takes Q2 when `load_panic` is high. This refreshes the checkpoint.

It has two outputs:

* `error = Q1 != Q2`. R1 was late (a timing error) or was hit.
* `panic = (Q2 != Q3) & ~error`. R1 and R2 agree, but the checkpoint R3
  disagrees with them.

R3 is trusted to hold the last *verified* value. Its clock is switched off
in any cycle in which some cell of the pipeline reports an error. This is
called shielding, and `stem_clock_control` does it. When R2 or R3 itself
is hit, the result depends on where:

* R2 hit: the cell reports `error`. The rollback is harmless.
* R3 hit with R1 and R2 agreeing: the cell reports `panic`, and R3 is
  reloaded from R2.

**Limitation (a single cell).** Suppose R1 misses its data (a timing error)
and, in the same cycle, R2 is hit by a flip of that same bit. Then R1 and
R2 can hold the same wrong value, which differs from R3. The cell sees a
panic, not an error. It would then copy the wrong R2 into R3.

At a pipeline stage this is caught in a different way. A timing error
seldom affects only one bit, so other cells of the same stage report an
error. Error outranks panic, so the stage rolls back. `tb_stem_reg` checks
this case with a multi-bit late value. A timing error that really changes
one bit only, together with a flip in R2 of that same bit, goes
undetected.

**Limitation (a flipped checkpoint).** An upset can flip the *stored*
value of R3 rather than arrive at its input. If, in the same cycle,
another cell reports an error, R3 is shielded and the rollback loads the
corrupted checkpoint. This is silent data corruption. It needs two
independent upsets in one cycle, so it is rare. In every other case a
flipped R3 is either caught by its comparison with R2 or overwritten at
the next CLK3 edge.

## Register stages and the global signals

`sem_reg` and `stem_reg` are W-bit rows of cells with per-stage outputs:

* STEM: `stage_error` is the OR of every bit's error; `stage_panic` is the
  OR of every bit's panic.
* SEM: `stage_recover` is the OR of `error & ~benign` over the bits. Raw
  `stage_error` and `stage_benign` are also provided, for logging.

`error_combine` ORs the stage signals into the single global signal that
the clock control acts on.

## Recovery control

Both controllers are clocked on the **falling edge of CLK1**. By then the
current cycle's error, panic and recover signals are settled. The
controllers stop the pipeline clocks with latch-based clock gates
(`clock_gate`): an enable is latched while the clock is low. The
controllers also produce `commit`. When `commit` is high at a falling edge
of CLK1, the captures of the current cycle are final. The data source then
moves to its next operand, and the write buffer takes a result.

### STEM (`stem_clock_control`)

| cycle | state  | clocks that run | controls    | what happens |
|-------|--------|-----------------|-------------|--------------|
| k     | RUN    | CLK1, CLK2; CLK3 **suppressed** because global error went high after the CLK2 edge | | R3 keeps the checkpoint. commit = 0 |
| k+1   | BACKUP | CLK1, CLK2      | load_backup | R1 and R2 of every cell are reloaded from R3 |
| k+2, k+3 | STALL | none        |             | the logic recomputes from the restored R1 |
| k+4   | RUN    | all             |             | cycle k is repeated |

A timing error therefore costs 3 extra cycles: 4 uncommitted cycles,
counting the faulty one. A panic costs one cycle, a PANIC state in which
only CLK3 runs, with `load_panic` high. Error has priority over panic.
`recovery` pulses once per recovery of either kind. The two stall cycles
are a parameter (`RECOMP_CYCLES`, from `sem_pkg`).

Reset (`rst_n`, asynchronous, active low) keeps every clock running, so
the registers fill from their inputs while in reset.

### SEM (`sem_clock_control`)

When global recover is seen in cycle k, cycle k+1 becomes a repair cycle:

* CLK2 and CLK3 are held.
* CLK1 runs with `load_backup` high, so every R1 reloads from its R3.
  Cells that were not hit reload the value they already hold.

The recovery costs one cycle. The captures of cycle k become final at the
end of the repair cycle, when `commit` is high.

## Overclocking controller (`overclock_controller`)

This block decides the STEM side's clock period. It counts `recovery`
pulses over a sampling interval of `INTERVAL_CYCLES` = 10000 cycles.

At the end of each interval it compares the count with the target, which
is `TARGET_PERCENT` = 1 %, i.e. 100 recoveries:

* Fewer recoveries than the target: `step` goes up by one (faster clock).
* Otherwise: `step` goes down by one (slower clock).

`step` runs from 0 to `STEPS` = 32. The external clock generator turns it
into a period:

```
T = 9 ns - step * (9 ns - 7 ns) / 32
```

The controller has three modes (`oc_mode`):

* `OC_NOOC`: `step` is held at 0, so T = 9 ns.
* `OC_MAXOC`: `step` is held at 32, so T = 7 ns.
* `OC_DYNOC`: the step moves up and down as described above.

`last_errors` and `interval_done` show the count of the interval that has
just ended.

## The arithmetic pipelines and the top

`stem_arith_pipeline` and `sem_arith_pipeline` contain:

```
{valid, a, b} -> in_reg -> 64-bit add -> s1_reg {valid, sum}
             -> sum[63:32] * sum[31:0] -> s2_reg {valid, product} -> write_buffer
```

All three registers are protected cells, including the operand register.
`write_buffer` is a plain register. It takes a result only when `commit`
is high, so a value that might still be rolled back never leaves the
pipeline.

The source must hold its operand until `commit` is high at a falling edge
of CLK1. After a rollback it is asked for the same operand again. A
product appears three committed cycles after its operands.

`sem_stem_top` brings out both sides with separate ports:

* Inputs: the three generator clocks (`stem_clk*_g`, `sem_clk*_g`) and the
  operands.
* Outputs: results, commit strobes, `oc_step` for the STEM clock
  generator, and the recovery and state signals for monitoring.

The clock generator is not part of the RTL. It is an analog PLL or DLL
with phase taps. `tb/clock_generator_model.sv` is a behavioural
stand-in. It reads `step` at every cycle and produces the three phases
from `PHI1_PS` and `PHI2_PS`.

## Simulating

Verilator 5 with `--timing` is needed, because of `hold_delay` and the
clock model. The RTL has no `timescale`; pass one. For example, for the
end-to-end test:

```
verilator --binary --timing --timescale 1ns/1ps --top-module tb_sem_stem_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/sem_pkg.sv tb/tb_sem_stem_top.sv
./obj_dir/Vtb_sem_stem_top
```

Every testbench:

* prints `TB_RESULT checks=N failures=M`;
* has a watchdog;
* checks outputs against models written independently of the RTL.

Faults are injected by forcing the hold-padded stage outputs around a
clock edge:

* Soft error: a flipped value at one edge.
* Timing error: the previous cycle's value held until 0.5 ns after CLK1.

| testbench | what it checks |
|---|---|
| `tb_sem_cell`, `tb_stem_cell` | every case of the tables above, at random data |
| `tb_sem_reg`, `tb_stem_reg` | stage OR signals, multi-bit faults, the single-cell limitation above |
| `tb_sem_clock_control`, `tb_stem_clock_control` | clock pulses per cycle, state sequence, Load_Backup and Load_Panic timing, commit, penalties |
| `tb_error_combine` | OR of N inputs |
| `tb_write_buffer` | commit gating |
| `tb_overclock_controller` | step up and down, limits, NOOC and MAXOC, interval counts (interval shortened to 200) |
| `tb_stem_arith_pipeline`, `tb_sem_arith_pipeline` | 400 products (STEM at 7 ns, SEM at 9 ns) under injected faults; penalty exactly 4 cycles per error, 1 per panic or SEM repair |
| `tb_sem_stem_top` | whole design at default parameters (see below) |
| `tb_fault_injection` | 9 ms fault-injection campaign at default parameters (see below) |

`tb_sem_stem_top` runs the STEM side through NOOC, then DYNOC at a low
fault rate, then DYNOC at a high fault rate, then MAXOC. At the same time,
the SEM side runs with injected faults. About 105 000 products are
checked. The test fails if any mechanism never happens:

* error rollback, panic and detected timing error;
* clock step up and step down;
* SEM repair, false positive and benign error.

Measured time per result: 9.07 ns in NOOC and 7.06 ns in MAXOC. The extra
0.07 ns is the recovery cycles. The test takes about 20 s with Verilator.

## Fault-injection campaign (`tb_fault_injection`)

This test runs the whole design for 3 ms in each STEM mode: NOOC, then
DYNOC, then MAXOC. The SEM side runs alongside at 9 ns for all 9 ms.

Transient pulses hit each side at about one per 1.5 us:

* width uniform from 500 to 900 ps;
* start time uniform within the cycle;
* one random bit of one random register input (operand, sum or product).

Most pulses miss every sampling edge and do nothing.

Timing errors on the STEM side come from a simple long-path model:

* 1 cycle in 20000 has a path delay drawn from 7.0 to 8.9 ns.
* If that delay exceeds the current period, the register input shows the
  previous result until delay - T after CLK1.

Every product is checked, and every late value must raise Error. The run
takes about 20 s. One run (random seed) gave:

| STEM mode | timing errors (all caught) | pulses | recoveries from pulses | time per result |
|-----------|----------------------------|--------|------------------------|-----------------|
| NOOC      | 0                          | 1987   | 466                    | 9.04 ns         |
| DYNOC     | 7                          | 1989   | 546                    | 7.88 ns         |
| MAXOC     | 27                         | 1978   | 593                    | 7.03 ns         |

SEM over 9 ms: 6115 pulses caused 529 one-cycle repairs. Another 451 were
false positives (R2 hit) and 478 were benign (R3 hit). Neither kind costs
a cycle.

In every mode the results were all correct. DYNOC starts at 9 ns and
reaches 7 ns about 2.5 ms into its run (32 intervals of 10000 cycles). Its average time per result is
above MAXOC's only because of the climb.

About a quarter of the pulses are caught:

* three sampling edges per cycle;
* a 0.7 ns average pulse width;
* a 7 to 9 ns period.

This matches what a pulse that must straddle an edge should give.

## How this design departs from the original scheme

* **Only the arithmetic pipeline is built.** The scheme was also applied
  to a five-stage DLX processor (its IF/ID, ID/EXE, EXE/MEM and MEM/WB
  registers replaced by STEM cells, plus a write buffer). That processor's
  logic is not described, so it is not here. The cells, stage ORs, clock
  control and write buffer are the parts it would use.
* **The clock generator is a model only** (see above).
* **A single STEM cell cannot flag a timing error that coincides with a
  flip in R2 of the same bit.** It reports a panic instead. Detection
  relies on other bits of the stage (see the STEM cell section).
* **The panic cycle holds CLK1 and CLK2.** The original scheme only speaks
  of a one-cycle stall with a local correction.
* **How the controllers are timed is this design's own choice:** the
  falling-edge state machines, the latch clock gates, `commit` and the
  Phi1 + Phi2 < T/2 limit that follows from them.
* **The short-path rule is modelled by simulation delays** (`hold_delay`),
  not by real padding.
* **The SEM pipeline also has a commit-gated output register.** The
  original puts the write buffer only in the STEM pipeline. Here it keeps
  a product whose R1 is about to be repaired from escaping.
* **Which half of the sum is the multiplicand is this design's choice.**
  The operand register is protected too, and valid bits travel with the
  data.
* **Errors counted for the error rate** are all recoveries, both rollbacks
  and panics.
* **Phases come from the timing rules above.** Phi1 = 2 ns and Phi2 = 1 ns
  for STEM, and 1 ns and 1 ns for SEM, were worked out from those rules.
  They are not published settings.
* **Fault injection forces values at register inputs.** It does not
  simulate analog pulses through gates. A timing error is modelled as the
  old value arriving late at R1.
* **Only the arithmetic-pipeline experiments are reproduced** (see the
  campaign above). There is no DLX, so its benchmark programs cannot run.
  There is no TMR baseline, and no area or power figures.
* **The measured detection rates are higher than the original ones.**
  Originally about 16 % (NOOC) and 21 % (MAXOC) of pulses were caught;
  here it is 23 % and 30 %. Here every pulse lands directly on a register
  input, while in a real circuit some pulses are masked by the logic on
  their way there.
