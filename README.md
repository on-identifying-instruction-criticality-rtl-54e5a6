# Criticality-steered dual-speed integer cluster

A program's run time is set by its critical path: the longest chain of
dependent instructions. Instructions off that chain can be slowed down without
making the program any slower. This design uses that to save energy. The
integer execution cluster of an out-of-order core has two kinds of functional
units: **fast** units on a high supply voltage (1.1 V in the reference
configuration) that finish an operation in one cycle, and **slow** units on a
low supply voltage (0.7 V) that take two cycles but use far less energy. A
**critical path predictor** guesses for each instruction, at issue, whether it
is on the critical path. Predicted-critical instructions go to fast units and
the others to slow units.

The RTL follows the GCPH-type correlation-based critical path predictor and
the dual-speed integer units described by A. Chiyonobu and T. Sato, "On
Identifying Instruction Criticality for Energy-Aware Applications". That work
sets the predictor's size and training rule, the unit counts and the unit
latencies. The interfaces, the steering policy when a unit class is full,
reset, and the ALU operation set are choices made for this RTL. They are
listed under [Departures and choices](#departures-and-choices).

```
                 lane_pc ──► ┌──────────────────────────────── critical_path_predictor ┐
                             │  PC ─►(⊕)◄─ GCPH register (8 b)  ◄── verdicts of issued │
                             │        ▲ ◄─ BHR (8 b)           ◄── br_valid/br_taken  │
                             │        ▼ index                                         │
                             │  CPHT: 2048 × 6-bit saturating counters (+8 / −1)      │
                             └───────────────┬─── prediction: counter ≥ 8 ────────────┘
                                             ▼
 lane_valid, lane_op ──────────────────► fu_steer ──► 3 × fast_int_unit (1 cycle)
 lane_heur_crit (training verdict)           │   └──► 3 × slow_int_unit (2 cycles)
                                             └──► lane_ready / lane_on_fast / lane_fallback
```

## The critical path predictor

### Critical path history table (CPHT)

The CPHT is a direct-mapped table of saturating up-down counters. It has 2048
entries of 6 bits each, 12,288 bits in total. The counter an instruction maps
to is its criticality history:

* A **critical** verdict adds 8, saturating at 63.
* A **non-critical** verdict subtracts 1, saturating at 0.
* The instruction is **predicted critical** when its counter is **at least 8**.

The steps are lopsided. From a cleared table, one critical verdict is
enough to predict critical next time (0 → 8). A counter that has seen a run
of critical verdicts saturates at 63, and it then takes 56 non-critical
verdicts before the instruction is predicted non-critical again. A single
critical verdict among many non-critical ones lifts the counter back to the
threshold. The predictor therefore leans towards calling an instruction
critical. For performance that is the safe side, because a wrong "critical"
only costs energy.

All six lookup ports read the table as it stood at the start of the cycle.
Training happens at the clock edge. When several ports train the same counter
in one cycle, their steps are applied in port order and add up, as if the
instructions had trained one after another. Only the last of those ports
writes the table. Reset clears every counter.

### Index: four predictor types

`cpp_index` forms the CPHT index. It takes the PC, drops the byte offset
(instructions are 8 bytes apart, `PC_SHIFT = 3`), and keeps the low 11 bits.
The parameter `MODE` then selects what that value is combined with, by
bitwise exclusive-or:

| `MODE`     | index                          | idea                                                         |
|------------|--------------------------------|--------------------------------------------------------------|
| `IDX_PC`   | PC                             | per-address predictor: local criticality history only        |
| `IDX_GCPH` | PC ⊕ GCPH **(default)**        | criticality of an instruction correlates with that of its recent predecessors |
| `IDX_GBH`  | PC ⊕ BHR                       | criticality correlates with the recent branch path           |
| `IDX_BOTH` | PC ⊕ GCPH ⊕ BHR                | both correlations                                            |

The 8-bit histories line up with the low index bits.

### Global critical path history (GCPH) register

The GCPH register is an 8-bit shift register that holds the verdicts of the
8 most recently issued instructions. The newest verdict is in bit 0. Up to six
instructions issue in a cycle. Their verdicts enter in lane order, lane 0
first, so the highest issued lane ends up in bit 0. All lookups in a cycle see
the register as it was before that cycle's verdicts.

### Branch history register (BHR)

The BHR is an 8-bit shift register of branch outcomes (1 = taken). It takes one
outcome per cycle, from `br_valid`/`br_taken`. The core decides whether to feed
it predicted or resolved outcomes. Only `IDX_GBH` and `IDX_BOTH` use it. In the
default GCPH mode it is kept but does not affect the index.

### Training at issue

The cluster trains the predictor **speculatively at issue**, not at commit. An
issued instruction's verdict (`lane_heur_crit`) trains the counter at the
index its prediction was read from. The same verdict shifts into the GCPH
register.

The verdict comes from outside the cluster. In the reference work it is a
criticality heuristic evaluated by the core. QOLD ("the instruction was the
oldest in the instruction queue") is the default. ALOLD, QCONS and FREED3 are
the alternatives. An exact critical-path analysis can also supply it. The
cluster does not care where the verdict comes from.

How good the predictions are depends entirely on that training stream. In
the reference study, the heuristic verdicts disagreed with an exact
critical-path analysis for roughly 40 % of instructions. Read off its
results chart, relative to a core without steering:

| verdict source | performance | energy-delay product |
|----------------|-------------|----------------------|
| heuristic-trained predictor | about 0.83 | about 0.83 |
| exact critical path used directly | about 0.95 | about 0.81 |
| predictor trained with the exact path | about 0.95 | about 0.89 |

So a predictor trained by heuristics saves energy but loses performance.
Training it on exact information recovers the performance, but sends more
work to the fast units. The RTL reproduces the mechanism, not these numbers,
which come from simulating the whole core on SPEC2000 integer programs.

## Steering and the two kinds of units

`fu_steer` assigns the up to six offered lanes to units in one combinational
step. It serves lane 0 first.

1. A predicted-critical lane takes the lowest free fast unit. A non-critical
   lane takes the lowest free slow unit.
2. A lane whose preferred kind is used up takes any unit still free, fast
   units first. This is a **fallback**, reported on `lane_fallback`.
3. A lane with no unit left is **not issued** (`lane_ready` low) and must be
   offered again. Lanes that are not issued do not train the predictor.

Fast units are always free. A slow unit is the same ALU circuit run at the
lower voltage, so it needs two cycles. It is not pipelined: it keeps its
operands for a second cycle and cannot take a new operation in the cycle after
it accepts one. That is the only cause of a stall. With six lanes and six units,
a lane waits only when a slow unit is still busy.

| unit            | accepts            | result (`*_res_valid`, `*_res`) |
|-----------------|--------------------|---------------------------------|
| `fast_int_unit` | every cycle        | cycle after issue               |
| `slow_int_unit` | every other cycle  | two cycles after issue          |

Each result carries the instruction's tag. `int_alu` is shared by both unit
types. It implements add, sub, and, or, xor, nor, slt, sltu, sll, srl, sra and
lui on 32-bit data. Shifts use `b[4:0]`. `lui` places `b[15:0]` in the upper
half.

## Interface of `crit_int_cluster`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `lane_valid` | in | 6 | instruction offered on the lane |
| `lane_pc` | in | 6 × 32 | its PC |
| `lane_op` | in | 6 × `int_op_t` | opcode, operands `a`, `b`, 8-bit tag |
| `lane_heur_crit` | in | 6 | training verdict for that instruction |
| `lane_ready` | out | 6 | issued this cycle (combinational) |
| `lane_pred_crit` | out | 6 | predicted critical (combinational) |
| `lane_on_fast` | out | 6 | issued to a fast unit |
| `lane_fallback` | out | 6 | issued to the kind of unit it was not predicted for |
| `br_valid`, `br_taken` | in | 1 | branch outcome for the BHR |
| `fast_res_valid`, `fast_res` | out | 3, 3 × `int_res_t` | fast-unit results `{tag, data}` |
| `slow_res_valid`, `slow_res` | out | 3, 3 × `int_res_t` | slow-unit results |
| `gcph`, `bhist` | out | 8, 8 | the two history registers |

`lane_ready` depends on `lane_valid` and on the predictions in the same cycle.
The core must treat an offered lane that is not ready as still waiting.

Parameters (the defaults are the reference configuration unless marked):
`MODE = IDX_GCPH`, `LANES = 6` (one per integer unit; own choice),
`N_FAST = 3`, `N_SLOW = 3`, `ENTRIES = 2048`, `CTR_W = 6`, `INC = 8`,
`DEC = 1`, `THRESH = 8`, `GCPH_LEN = 8`, `BHR_LEN = 8` (own choice: the length
of the core's gshare branch history). Shared types and constants are in
`cpp_pkg`.

Synthesized with default parameters, the cluster is about 1,300 word-level
cells and 493 flip-flop bits, plus the 12,288-bit table.

## What is outside the RTL

* **The out-of-order core** is not part of this RTL. In the reference
  configuration it is 8-wide, with a 32-entry instruction queue, 32-entry
  load/store queue, 64 KB L1 caches, 1 MB L2 and gshare branch prediction.
  It supplies the lanes, the verdicts and the branch outcomes, and consumes
  the results. Integer multiply and divide are separate units of that core
  and are not in this cluster.
* **The criticality heuristics** that produce `lane_heur_crit` are outside the
  cluster.
* **The two supply rails** (1.1 V and 0.7 V) and the transistor-level tuning of
  the two unit types are physical properties. In RTL they show up only as the
  one- and two-cycle latencies.

## Departures and choices

These points are not fixed by the reference work. They were chosen for this RTL:

* **Threshold comparison.** The reference describes the threshold both as
  "larger than" and as the value "at which" an instruction becomes critical.
  The RTL uses `counter >= THRESH`.
* **Index combination.** The combining function (exclusive-or) and the
  alignment of the histories on the low index bits are choices of this RTL.
  So is the use of PC bits [13:3].
* **Training.** The RTL trains at issue with the index from the lookup.
  Same-cycle updates of one counter accumulate in lane order.
* **Steering when a class is full.** The RTL falls back to the other class,
  and stalls only when no unit is free.
* **Slow unit.** It is unpipelined, with one operation per two cycles. It
  holds its operands, and its ALU result is taken at the end of the second
  cycle. Treat that as a two-cycle path in timing analysis.
* **Reset** clears the table and both histories. The table is written as a
  register array with a reset loop. A dense implementation would replace it
  with an SRAM macro and a clearing sequence.
* **Interface details.** The lane interface, the tags and the operation set
  are choices of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against an independent reference model and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_crit_int_cluster` | End-to-end at default parameters, 4,000 cycles of random traffic with all-critical and all-non-critical phases. It checks every prediction, lane assignment, result value, unit and result cycle against a reference model. It also requires that each mechanism happen: critical→fast, non-critical→slow, fallbacks both ways, stalls, counter saturation at both ends, same-counter updates in one cycle, and branch history shifts. |
| `tb_fig1_dfg_loop` | An 8-instruction data-flow graph (critical path I0→I3→I4→I6→I7) runs as a loop, trained with its exact criticality. From a cleared table, an iteration takes 10 cycles, I0 issue to I7 result. After training, exactly the five critical instructions are predicted critical and run on fast units, and an iteration takes 5 cycles. The three slow-unit instructions cost no time. |
| `tb_critical_path_predictor` | All four predictor types (PC, GCPH, GBH, BOTH) side by side, checking the index and prediction on all ports every cycle. |
| `tb_cpht`, `tb_gcph_reg`, `tb_bhr`, `tb_cpp_index` | Counter arithmetic and saturation, same-entry merging, threshold, history order, and all four index types. |
| `tb_fu_steer`, `tb_int_alu`, `tb_fast_int_unit`, `tb_slow_int_unit` | Steering rules, the ALU, and unit latency and handshake. |

`tb_ref_pkg` holds the bench-side reference ALU.

To simulate one testbench with Verilator 5, run this from the folder that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cpp_pkg.sv tb/tb_ref_pkg.sv -y rtl -y tb +libext+.sv \
    tb/tb_crit_int_cluster.sv --top-module tb_crit_int_cluster -o sim
./obj_dir/sim
```

Substitute any other testbench name. A full run of the end-to-end bench takes
well under a second after the build. To try another predictor type, override
`MODE` on `crit_int_cluster`, for example `#(.MODE(cpp_pkg::IDX_BOTH))`.
`tb_crit_int_cluster`'s reference model assumes GCPH indexing.
