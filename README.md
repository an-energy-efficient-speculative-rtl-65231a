# Contrail: a speculative chip-multiprocessor that saves energy with trace-level value prediction

A low supply voltage saves energy, but it also makes a processor slower. Contrail uses a low
voltage only on work that is not on the critical path. A **trace-level value predictor** guesses
the register values that a whole region of the program (a *trace*) will leave behind. The
processor can then jump over that trace and carry on from the predicted values. The instructions
that were jumped over still have to run, but only to confirm the guess. Nothing waits for them,
so they can run slowly at a low voltage.

The program is therefore split into two kinds of instruction streams:

- The **speculation stream** runs ahead, skipping predicted traces. It stays on the critical path
  and runs in high-speed mode: **800 MHz, 1.3 V**.
- Each skipped trace becomes a **verification stream**. It executes the trace and compares the
  register values it produces with the predicted ones. It runs in low-speed mode:
  **400 MHz, 1.0 V**.

The name comes from the picture this gives: the speculation stream races ahead like a jet, and
verification streams are left behind it like a contrail.

This repository holds synthesizable SystemVerilog for the control part of such a machine:

- a ring of four processing elements (PEs), each with its own trace-level value predictor,
  verification logic and voltage/frequency controller;
- the ring controller that creates, releases and squashes streams;
- the single-core form of the same idea: an ALU cluster with fast and slow ALUs, where
  instructions whose results were predicted go to the slow, low-voltage ALUs.

The instruction datapath, the caches and the analog supply regulator are not part of this code
(see "What is not here").

## The ring of processing elements

`contrail_top` connects `N_PE = 4` PEs in a ring. Each PE sends to the next one over a one-cycle
register link. At any time exactly one PE is the **head** (state `PE_SPEC`, running the
speculation stream). The other PEs are either verifying a trace (`PE_VERIFY`) or free
(`PE_FREE`). The ring controller (`ring_thread_ctrl`) enforces these rules:

- **Spawn.** At each trace start, the head looks the trace up in its predictor. If the trace is
  predicted, the head asks to spawn. If the next PE on the ring is free, the spawn is granted.
  The head then sends a packet over the ring with:
  - the address after the trace (the trace's *nextPC*);
  - the identifiers and predicted values of the trace's live-out registers.

  The next PE becomes the head and continues from there. The old head switches to low-speed mode
  and executes the skipped trace as a verification stream.
- **Refused spawn.** If the next PE is still busy, the spawn is refused (`spawn_stall_o`). The
  head simply executes the trace itself.
- **Release.** A verification stream lives until every instruction of its trace has executed. Its
  PE is freed only if every predicted register was then confirmed.
- **Misprediction.** A wrong value, or a trace that ends without producing a predicted register,
  is a misprediction. The controller then:
  1. squashes every stream younger than the failing one, including the head;
  2. makes the PE that detected the error the new head;
  3. switches that PE to high-speed mode, so it continues with correct state.

  "Younger" means closer behind the head along the ring. If two PEs report in the same cycle, the
  older one wins.
- **End of program.** When the head reaches the end of the program (`finish_i`), it stops. It
  waits for the remaining verification streams. `all_done_o` rises once none are left.

The controller sets each PE's speed mode from its state: the head is high-speed, and all other
PEs are low-speed. An assertion checks that exactly one PE is the head.

## The decoupled trace-level value predictor

A plain trace-level predictor would need a row wide enough for every register value of a trace.
This design instead keeps **trace information** and **value information** in separate tables.
`decoupled_tlvp` combines the two.

**Trace table (`trace_table`).** Each entry describes one trace:

- a tag;
- a 2-bit saturating counter that decides whether the trace is predicted at all (value 2 or
  more);
- nextPC;
- up to `MAX_REGS = 4` register identifiers;
- for each register, the address (PC) of the instruction that produces it.

The table has 1024 direct-mapped entries, indexed by PC[12:3]. A new trace is installed with its
counter at 1.

**Instruction-level hybrid value predictor (`value_predictor`).** This predicts the result of a
single instruction from its PC.

- The value history table (VHT) has 4096 entries. Each entry holds:
  - a tag;
  - LRU information over four recent values;
  - the four values themselves;
  - a stride and a 2-bit stride state;
  - a history of the last `HIST_P = 6` outcomes, each a 2-bit code naming which of the four
    values occurred.
- The 12-bit history indexes a 4096-entry pattern history table (PHT). Each PHT entry holds one
  3-bit saturating counter per value slot. When the real value arrives, the counter of the
  correct slot is incremented and the other three are decremented.
- The prediction is made as follows:
  - If the largest counter has reached 5, the predictor returns that slot's value (a
    context-based prediction).
  - Otherwise, if the stride state is 2 or more, it returns the last value plus the stride.
  - Otherwise there is no confident prediction.

**Sequencing.** After a trace-table hit, the value predictor is queried once per register of the
trace, one register per cycle. Each query uses the producer PC from the trace table. A single
value port is therefore enough, however many registers a trace has, at the price of several
cycles per trace. For a lookup accepted in cycle 0 of a trace with *n* registers:

| cycle | event |
|---|---|
| 1 | trace-table result; on a miss the lookup ends here |
| 2 .. n+1 | value predictor queried for registers 0 .. n-1 |
| 3 .. n+2 | one predicted register per cycle (`reg_pred_t`: register, producer PC, value) |
| n+2 | done, with the counter's predict/no-predict decision and nextPC |

The predictor is trained by every retired instruction of its PE. The trace table's counter is
trained by the verification result (see below).

## Checking predictions, and the shadow check

`verify_unit` holds the predicted registers of the current trace. It watches the PE's retired
instructions. When the instruction at a register's producer PC retires, it compares that
register's value with the prediction:

- Any mismatch is a misprediction.
- Completion (`done_o`) requires that every register has been confirmed **and** that the last
  instruction of the trace has retired.
- A retirement in the same cycle as the unit is armed is already checked.

Every outcome also trains the trace's 2-bit counter.

**Shadow check (this design's own addition).** A trace whose counter is below 2 is not
predicted, and neither is one whose spawn was refused. Such a trace is executed normally, but its
predictions are still compared with the real values. The comparison only trains the counter: it
raises no misprediction and releases nothing. Without it, a trace whose counter is below the
threshold would never be checked again, and so could never become predicted.

**PE timing (`contrail_pe`).** The datapath waits at a trace start until the predictor has
answered. It is then told one of two things:

- `dp_skip_o`: this PE becomes a verification stream for the trace. This comes in cycle n+3,
  one cycle after the spawn grant and the ring packet.
- `dp_noskip_o`: execute the trace normally. This comes in cycle n+3 after a hit, or in cycle 1
  after a miss.

A new lookup is accepted only after the previous check has ended.

## Vdd/Clk control

Each PE has its own controller (`dvfs_ctrl`). It requests the supply voltage in millivolts and
gates the PE's clock from the 800 MHz base clock:

- In high-speed mode the clock enable is high every cycle.
- In low-speed mode it is high every other cycle (400 MHz).

The controller changes voltage and frequency in a safe order:

- **Going up:** the voltage rises first. The frequency follows `VSETTLE + 1 = 5` cycles later.
- **Going down:** both change at once.

An assertion checks that the frequency never runs ahead of the voltage. The order and the
settling time are choices of this implementation.

## Fast and slow ALUs

`alu_cluster` is the execution cluster of the single-core version of the idea: an out-of-order
core whose ALUs come in two kinds.

- **Fast ALUs:** 3 units of `int_alu` with a 1-cycle latency. These are the power-hungry units.
- **Slow ALUs:** 3 units with a 2-cycle latency, standing for the same ALU at half the clock and
  a low voltage. A slow unit accepts a new operation every other cycle.

The steering rule is the core of the scheme:

- An instruction whose result was value-predicted is off the critical path, because its consumers
  already have the predicted value. It goes to a slow ALU.
- Every other instruction goes to a fast ALU.

There is no fallback to the other kind of ALU: an instruction waits for a unit of its own kind.
Up to `ISSUE_W = 4` instructions are offered per cycle and accepted in order. The result of a
predicted instruction is compared with its prediction, and a mismatch is flagged. Counters of
operations and busy unit-cycles per kind give the activity from which ALU energy is estimated.
The operation set is MIPS-like: add, sub, and, or, xor, nor, slt, sltu, sll, srl, sra, lui.

## Energy arithmetic

Dynamic power scales with f·V². Consider a simple case where half of the instructions are
skipped by the speculation stream:

- The speculation stream executes half the instructions, so it spends half the original energy.
- The verification streams execute the other half at half the clock. They therefore take as long
  as the whole program did.
- Their energy is (f_low/f_high)·(V_low/V_high)² of the original: (400/800)·(1.0/1.3)² ≈ 0.30.

So the total is 0.5 + 0.30 ≈ 0.80 of the original, about 20% saved. In the ideal case, where the
voltage also halves, the second term is 1/8, leaving 0.5 + 0.125 and saving 37.5%. For the
single-core ALU cluster, the published evaluation reports an average reduction in ALU energy of
28%. In that evaluation, 32% of instructions were verified as correctly predicted. None of these
figures is reproduced here, because the datapath needed to run real programs is not in this
code.

## What is not here, and other departures

- **Not built:**
  - the instruction datapath of each PE (an out-of-order MIPS-like core);
  - its trace cache and data cache;
  - the mechanism that builds traces and chooses which registers they carry;
  - the selective instruction-reissue logic of the out-of-order core;
  - the analog voltage regulator and clock generator.
- **Ports instead of those parts.** `contrail_top` brings the per-PE datapath connections out as
  arrays indexed by PE:
  - lookups and their skip/noskip answers;
  - retired instructions and the end-of-trace signal;
  - trace-table installs;
  - the start packet of a new head.
- **Own choices where the design leaves freedom:**
  - the trace table's size and counter start value;
  - `MAX_REGS = 4`;
  - the hybrid predictor's selection rule, counter width and threshold;
  - all handshakes and cycle counts;
  - the ring link format;
  - the oldest-wins rule for simultaneous mispredictions;
  - parking free PEs in low-speed mode;
  - the shadow check.
- **The ALU cluster is a separate unit.** It sits beside the ring with its own `ex_*` ports. It is
  the single-core evaluation model of the same principle, not a part of a PE.

## Files

| file | contents |
|---|---|
| `rtl/contrail_pkg.sv` | widths, operating points, PE states, ALU operations, trace and packet structs |
| `rtl/contrail_top.sv` | ring of PEs, ring links, ring controller, event counters, ALU cluster |
| `rtl/ring_thread_ctrl.sv` | stream states, spawn / release / squash rules, speed modes |
| `rtl/contrail_pe.sv` | one PE: predictor, verification, spawn, ring packet, Vdd/Clk |
| `rtl/decoupled_tlvp.sv` | trace table + value predictor sequencing |
| `rtl/trace_table.sv` | trace table with 2-bit counters |
| `rtl/value_predictor.sv` | hybrid context/stride value predictor (VHT + PHT) |
| `rtl/verify_unit.sv` | comparison of predicted and real register values |
| `rtl/dvfs_ctrl.sv` | voltage/frequency controller |
| `rtl/alu_cluster.sv` | fast/slow ALU cluster with predictability steering |
| `rtl/int_alu.sv` | integer ALU, latency 1 or 2 |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by itself. A watchdog ends a
testbench that hangs. With Verilator 5, list the package first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_contrail_top \
    rtl/contrail_pkg.sv $(ls rtl/*.sv | grep -v contrail_pkg) tb/tb_contrail_top.sv
./obj_dir/Vtb_contrail_top
```

Replace the top module and the testbench file to run any other testbench.

`tb_contrail_top` runs the whole design at its default sizes:

- 4 PEs, 1024-entry trace tables and 4096-entry value predictors;
- 3 fast and 3 slow ALUs.

It models each PE's datapath at trace level. The program is a loop of eight traces of ten
instructions, run 24 times, with two live-out registers per trace:

- Most values are constant.
- One register of trace 6 follows a stride, and one register of trace 7 is random.
- One constant value of trace 0 changes halfway through the run.

This makes every mechanism happen: spawns, refused spawns, releases, mispredictions with
squashes, shadow-only execution, mode switches and ring starts. The testbench counts each of them
and fails if any never occurs. It checks:

- that exactly one PE is the head at all times;
- the operating point of every PE;
- that each release or recovery agrees with the values carried in the ring packet;
- that the program completes.

It also drives the ALU cluster with random instruction groups and checks:

- the results;
- the steering;
- the stalls;
- the misprediction flags.

The simulation takes well under a second.
