# Lazy Pipelines: an execution core that lets approximate units keep computing

Voltage over-scaling saves power by running arithmetic units below the supply
voltage their timing was closed at. The price is timing errors: some signal
paths have not settled when the result is sampled at the end of the unit's
nominal latency. In a real program, though, a unit's result is often not
needed straight away. Its consumer may be waiting for another operand, or
no other operation of the same type may be ready to use the unit. During
those *vacant cycles* the unit's inputs are still stable, so its output
keeps settling and the number of wrong bits falls.

A Lazy Pipeline uses those cycles without ever delaying an instruction:

* **Lazy Writeback (LWB).** An over-scaled unit does not write its result
  at the nominal end. It masks its write enable and keeps working until
  it is *evicted*. Eviction happens when the next operation is issued to
  the same unit, or when the operation has used as many extra cycles
  (*slack*) as can still improve it. Only then is the result written to
  the register file.
* **Lazy Forwarding (LFW).** A consumer that needs the result before the
  eviction takes the unit's output through the forwarding path. It gets
  whatever the unit shows in that cycle, which is usually better than the
  value at the nominal end.

The core here has a **precise** and an **imprecise** copy of every
functional unit. The imprecise copy is meant to run from a lower supply.
Marking instructions in the instruction stream switch following code
between the two copies. Only the imprecise copies are lazy; the precise
ones behave like conventional units.

Everything is written in synthesizable SystemVerilog (IEEE 1800-2017). In
simulation the units are exact, since timing errors are a physical effect.
What the RTL implements and exposes is the control: when each result is
forwarded and written back, and how much slack it had at that moment.

## Block diagram

```
 decoded      +-------------------+   tagged    +-------------------------+
 instruction->| precision_tracker |--instr----->| issue_logic             |
 (valid/      | precision register|  (+level)   |  - steer by level       |
  ready)      | (decode stage)    |             |  - operand read / LFW   |
              +-------------------+             |  - scoreboard           |
                                                +---+------------+--------+
                                                    | issue      ^ result, state,
                                                    v strobes,   | slack, wb_en
               +------------------------------------+ buses      |
               |  fu_slot x 10 (5 types x {precise, imprecise})  |
               |  operand_buffer -> datapath -> result ----------+
               |  lazy_fu_ctrl (free / occupied / freeOnDemand)  |
               +----------------------+--------------------------+
                                      | one write port per unit,
                                      v filtered by the scoreboard
                               +-------------+
                               |  regfile    | 16 x 32
                               +-------------+
```

| Unit index | Type | Set | Datapath | Latency | Slack limit |
|---|---|---|---|---|---|
| 0 / 1 | integer ALU | precise / imprecise | `int_alu` | 1 | 1 for logic and move, 4 otherwise |
| 2 / 3 | integer multiplier | precise / imprecise | `int_mul` | 3 | 7 |
| 4 / 5 | FP adder | precise / imprecise | `fp_add` (4-stage pipeline) | 4 | 9 |
| 6 / 7 | FP multiplier | precise / imprecise | `fp_mul` | 4 | 6 |
| 8 / 9 | FP divider | precise / imprecise | `fp_div` | 8 | 6 |

The slack limit applies only to the imprecise units. Precise units always
write back at the nominal end.

## Precision marking in decode (`precision_tracker`)

Precision is not encoded in each opcode. Two marking instructions do the
job instead:

* `startImprecise` carries a level in its `prec` field. In the reference
  marking example, `0b111` stands for 0.5 V.
* `startPrecise` returns the core to level `0b000` (precise, nominal
  supply).

The decode stage keeps the current level in a 3-bit register, which resets
to precise. It copies the level into the decode-to-issue register beside
every arithmetic instruction. Non-arithmetic instructions always carry
level 0. Marking instructions are consumed here and never reach issue.

The stage is a single register with a valid/ready handshake and costs one
cycle of latency. Only two sets of units exist, so any non-zero level
selects the imprecise set. The full level still travels with each
instruction; a design with more supply levels could add unit sets and
steer on it.

## The lazy unit: status, slack and eviction (`lazy_fu_ctrl`)

This is the heart of the design. Each unit has a two-bit status register
with three states:

| State | Meaning | Result forwardable? | Write enable |
|---|---|---|---|
| `FU_FREE` | holds nothing | no | – |
| `FU_OCCUPIED` | operation before or at its nominal end | only in the nominal-end cycle | only in the nominal-end cycle, and only if not lazy |
| `FU_FREE_ON_DEMAND` | nominal end has passed; still settling, but gives way to any new operation | yes | masked until eviction |

**Counters.** When an operation is issued (rising edge, `issue` = 1), the
unit enters `FU_OCCUPIED` with a cycle counter at 1. It also latches the
operation's slack limit, or 0 for a precise unit. The counter advances
once per cycle. The cycle in which it equals `LAT` is the **nominal-end
cycle**. In that cycle `result_valid` is high with `slack` = 0, just as in
a conventional unit.

**What happens at the nominal end:**

* A precise unit (`LAZY = 0`), or an operation with limit 0, raises
  `wb_en`. The result is written at the closing edge and the unit becomes
  free.
* If a new operation is issued in this same cycle, the result is also
  written now. The unit goes straight to `FU_OCCUPIED` for the newcomer.
  Being lazy never costs an issue slot.
* Otherwise the unit moves to `FU_FREE_ON_DEMAND` with slack 1. Its
  write enable is masked, and `wb_masked` shows this.

**In `FU_FREE_ON_DEMAND`:** each cycle, the output has had `slack` more
cycles than a conventional unit would have given it. The operation is
evicted, which raises `wb_en` for that cycle, in either of two cases:

* **by issue:** a new operation is issued to this unit. The lingering
  result is written back in that same cycle, and the new operands are
  captured at the same edge.
* **by limit:** `slack` has reached the operation's limit. More cycles
  would not improve the result, so the unit writes back and becomes free.

Otherwise slack goes up by one. The written value is therefore the unit's
output after `slack` extra cycles, and `slack` ≤ limit always holds.

**Example.** An imprecise integer multiply (`LAT` = 3, limit 7) that
nobody needs and that no other multiply follows:

| Cycle after issue edge | 1 | 2 | 3 | 4 | 5 | … | 10 |
|---|---|---|---|---|---|---|---|
| state | OCC | OCC | OCC (nominal end) | FOD | FOD | … | FOD |
| `result_valid` | 0 | 0 | 1 | 1 | 1 | … | 1 |
| `slack` | – | – | 0 | 1 | 2 | … | 7 |
| `wb_en` | 0 | 0 | 0 (masked) | 0 | 0 | … | 1 (limit) |

If a second multiply arrives in cycle 5, the first one is written back in
cycle 5 with slack 2, and the second one starts at the next edge. A read of
the first result in cycle 4 is a Lazy Forward with slack 1. A read in
cycle 3 is an ordinary forward.

The limit depends on the operation. Logic and move operations settle
after one extra cycle and get `LOGIC_SLACK` = 1. Every other operation gets
its unit type's limit, which is the largest slack at which the published
error curves of that unit type still show improvement.

**One operation per unit.** A unit holds one operation at a time. The
next one can issue in the current operation's nominal-end cycle or later,
so its initiation interval equals its latency. This is what makes eviction
well defined: the operands stay frozen in the operand buffer for the whole
life of the operation. The FP adder's internal registers advance every
cycle, but with frozen inputs every stage settles to the same value.

Two assertions guard the controller:

* an issue is only accepted when `issue_ready` is high;
* a write-back that is not followed by a new issue always leaves the unit
  free, so no result is written twice.

## Issue, forwarding and the stale write-back filter (`issue_logic`)

The issue stage takes one tagged instruction per cycle, in order. It picks
the unit from the instruction type and the precision bit: unit index =
`{type, level != 0}`. It issues when that unit can accept
(`issue_ready`) and both source operands are available. Otherwise it
stalls. The two reasons are reported separately as `ev_stall_fu` and
`ev_stall_raw`.

Source operands come from one of two places:

* If no write is pending for the register, the operand is read from the
  register file.
* If a write is pending, the operand comes from the output of the unit that
  will produce it, as soon as that unit shows `result_valid`. In the
  producer's nominal-end cycle this is an ordinary forward. Later, while
  the producer is in `FU_FREE_ON_DEMAND`, it is a **Lazy Forward**, and the
  issue stage reports the slack it carried (`ev_fwd_lazy`,
  `ev_fwd_slack`).

A per-register scoreboard records whether a write is pending and which
unit is the register's newest producer. Lazy Writeback creates a hazard
that a conventional pipeline does not have. Suppose an imprecise ALU op
writes `r5` and lingers; then a precise ALU op also writes `r5` and
finishes first. The late lazy write-back would overwrite the younger value.
The filter therefore lets a unit's `wb_en` reach the register file only if
that unit is still the newest producer of its destination. Otherwise the
write is dropped and counted in `ev_stale_wb`. Consumers have already
received the old value by forwarding, because an instruction only issues
once its operands are available.

Several units may write back in the same cycle, so the register file has
one write port per unit. The filter guarantees that at most one of them
writes any given register; an assertion in `regfile` checks this.

## Functional units

* **`operand_buffer`**: input registers loaded only on issue. They keep the
  operands stable through the slack.
* **`int_alu`**: single-cycle combinational ALU with `add`, `sub`, `rsb`,
  `and`, `orr`, `eor`, `mov`, `lsl` and `lsr` on 32 bits. This is the most
  favourable kind of unit: all of the slack goes to the whole circuit.
* **`int_mul`**: the low 32 bits of a 32 × 32 product, as one
  combinational block.
* **`fp_mul`**: a binary32 multiply, as one combinational block.
* **`fp_div`**: a binary32 divide, as one combinational block. It
  normalises the significands, does one wide division, and turns the
  remainder into a sticky bit.

  Multipliers and dividers are usually built with feedback: iterative, or
  pipelined with state. Their output is only correct in the cycle it is
  due, so they could not use slack. The core therefore uses feedback-free
  versions run as multi-cycle paths (clock division). The controller gives
  each one `LAT` cycles plus slack.
* **`fp_add`**: a binary32 add/subtract pipeline with four stages and
  three registers, and no feedback:
  1. align, with guard, round and sticky bits;
  2. add;
  3. normalise, including subnormal results;
  4. round to nearest even and pack.

  With stable inputs its output is final three edges later, so its unit
  latency is 4.
* **`fp_pkg::round_pack`**: the rounding step that `fp_mul` and `fp_div`
  share.

All floating-point units handle subnormals, signed zeros and infinities.
Every NaN result is the quiet NaN `0x7FC00000`. No exception flags are
produced.

## Instruction format (`lp_pkg::instr_t`)

The core receives instructions already decoded:

* `kind`: one of `K_NOP`, `K_ALU`, `K_MUL`, `K_FADD`, `K_FMUL`, `K_FDIV`,
  `K_START_IMP`, `K_START_PRE`;
* `op`: the ALU operation (`OP_SUB` selects subtraction on the FP adder);
* `rd`, `rs1`, `rs2`: register numbers;
* `use_imm` and `imm`: a 32-bit immediate replaces `rs2` when `use_imm`
  is set;
* `prec`: the level.

`mov` ignores `rs1`. Loads, stores, branches and flags are not part of the
core.

## Parameters (`lazy_pipeline_top`)

| Parameter | Default | Origin |
|---|---|---|
| `ALU_LAT` | 1 | from the source: the integer ALU is single-cycle combinational |
| `LOGIC_SLACK` | 1 | from the source: logic operations gain nothing after one extra cycle |
| `ALU_SLACK` | 4 | largest slack plotted for the integer add |
| `MUL_LAT` / `MUL_SLACK` | 3 / 7 | latency chosen here / largest slack plotted for the integer multiplier |
| `FADD_LAT` / `FADD_SLACK` | 4 / 9 | set by the adder's three registers / largest slack plotted for the FP add |
| `FMUL_LAT` / `FMUL_SLACK` | 4 / 6 | latency chosen here / largest slack plotted for the FP multiplier |
| `FDIV_LAT` / `FDIV_SLACK` | 8 / 6 | chosen here; no divider curve is published, so the FP multiplier's limit is reused |

Setting every `*_SLACK` to 0 turns the core into the conventional baseline
(no lazy units). The end-to-end testbench uses this to compare the two
versions.

Other fixed sizes are set in `lp_pkg`:

* `XLEN` = 32;
* 16 registers;
* `PREC_W` = 3;
* `SLACK_W` = 4, so limits up to 15.

## Departures from the source and limits

* **Host processor.** The source assumes an out-of-order core: fetch,
  decode and rename width 3, issue and commit width 8, a 32-entry issue
  queue and a 40-entry ROB. It relies on that machinery for multiple
  write-backs per cycle. None of it is built here. An in-order,
  single-issue stage with a scoreboard stands in for it. Because of this,
  the *amount* of slack seen here is not the amount an out-of-order core
  would see. The *rules* are the same: when a unit may be forwarded from,
  when it writes back, and that issue is never delayed.
* **Supply voltages and errors.** The reduced supply and the timing errors
  it causes are physical effects, so they do not appear in the RTL.
  Nothing here shows a lower error rate; the `slack` on every forward and
  write-back is what would determine it.
* **Slack limits** are design-time parameters for each operation class. In
  the source, the limit depends on the supply level the application
  selects.
* **Latencies** of the multipliers and the divider, and the
  floating-point format (binary32 rather than double precision), are
  choices made here.
* **Write ports.** The register file has one write port per unit. The
  newest-producer filter is this design's answer to the ordering hazard
  that lazy write-back creates.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_lazy_fu_ctrl`: a cycle-by-cycle table for a lazy 3-cycle unit and
  a precise 1-cycle unit. It covers masking, eviction by limit, eviction
  by issue, and back-to-back issue in the nominal-end cycle.
* `tb_fu_slot`: ALU, multiplier and FP-adder slots. It checks the exact
  write-back cycle for each slack limit and the value written on an
  eviction.
* `tb_issue_logic`: steering by precision, both stall reasons, lazy and
  ordinary forwarding, and the stale write-back filter.
* `tb_precision_tracker`, `tb_operand_buffer`, `tb_regfile`,
  `tb_int_alu` and `tb_int_mul`: these are checked against simple
  reference models.
* `tb_fp_add`, `tb_fp_mul` and `tb_fp_div`: random and corner-case
  operands are compared with a binary64 computation rounded to binary32
  (`tb/fp32_ref_pkg.sv`). Binary64 is precise enough that this double
  rounding gives the correctly rounded result. The adder test also checks
  the three-edge latency with back-to-back operands.
* `tb_lazy_pipeline_top`: six random programs of 400 instructions each.
  They mix precise and imprecise regions of all five operation types and
  add random bubbles in the instruction supply. Each program runs on the
  lazy core and on the baseline (all limits 0). Both must end with the
  registers of a sequential interpreter, and every instruction must issue
  in the same cycle on both. The test counts how often each mechanism
  happened and fails if one never did. The mechanisms are:
  * precise and imprecise issue;
  * precision switches;
  * both stall kinds;
  * ordinary and lazy forwards;
  * lazy write-back by eviction and by limit;
  * masked write enables;
  * dropped stale write-backs.
* `tb_lazy_pipeline_full`: the top with all defaults. It runs three pieces
  of code, all checked against an interpreter:
  * a marked code fragment with `mul`, `add`, `lsl` and `rsb` across
    region changes;
  * the even part of a JPEG-style integer IDCT in an imprecise region;
  * an SOR-style relaxation step in binary32 that uses the FP adder,
    multiplier and divider.

* `tb_lazy_pipeline_workloads`: three kernels that represent the
  applications the technique targets, run on the top with all defaults:
  * a JPEG islow 8-point row IDCT, on two rows;
  * the IMA ADPCM encoder, on 24 samples;
  * two SOR sweeps over a 5 × 5 binary32 grid.

  The testbench acts as the front end. Loads become moves after a
  two-cycle gap. Branches are resolved from the reference register values,
  and stores update the testbench's memory. The test checks that:
  * the operands of every issued instruction match the interpreter;
  * all registers match the interpreter at checkpoints;
  * the emitted trace computes the same results as plain models of the
    three algorithms.

  It also reports, per kernel, how imprecise results were consumed. In a
  typical run:

  | Kernel | Lazy forwards | Lazy write-backs | Write-backs at the nominal end |
  |---|---|---|---|
  | ADPCM | 34 | 111 | 41 |
  | IDCT | 0 | 6 | 76 |
  | SOR | 0 | 36 | 54 |

  Dense dependence chains leave little slack. Loads and precision changes
  create most of it.

To run a testbench with plain Verilator (5.x), from the repository root:

```
verilator --binary --assert -Wno-fatal --top-module tb_lazy_pipeline_top \
    rtl/lp_pkg.sv rtl/fp_pkg.sv $(ls rtl/*.sv | grep -v _pkg.sv) \
    tb/fp32_ref_pkg.sv tb/tb_lazy_pipeline_top.sv
./obj_dir/Vtb_lazy_pipeline_top
```

Replace the top-module name and the last file to run another testbench.
The packages must come first.

## Files

* `rtl/lp_pkg.sv`: shared types and constants.
* `rtl/fp_pkg.sv`: the shared floating-point rounding step.
* `rtl/lazy_pipeline_top.sv`: the top level.
* Decode and issue: `rtl/precision_tracker.sv`, `rtl/issue_logic.sv`.
* One functional unit: `rtl/fu_slot.sv`, `rtl/lazy_fu_ctrl.sv`,
  `rtl/operand_buffer.sv`.
* Datapaths: `rtl/int_alu.sv`, `rtl/int_mul.sv`, `rtl/fp_add.sv`,
  `rtl/fp_mul.sv`, `rtl/fp_div.sv`.
* Register file: `rtl/regfile.sv`.
* `tb/`: one testbench per module, plus the binary32 reference package
  `tb/fp32_ref_pkg.sv`.
