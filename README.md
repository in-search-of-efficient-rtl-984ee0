# A transient-fault-tolerant superscalar core built on instruction reissue

This is a 4-way out-of-order superscalar integer core. It detects and repairs
transient faults in its execution logic, such as a particle strike that flips
a latch in an ALU or an address adder for one cycle. It does this without a
second copy of the datapath.

The idea is **time redundancy inside the instruction window**. Every
instruction is executed twice on the ordinary functional units, and it may
commit only when the two outcomes agree.

The second execution does not need new hardware. It reuses the selective
*instruction reissue* machinery that a core built for data speculation
already has:
- When the check disagrees, the instruction is executed again.
- Its dependents that already consumed the bad value are invalidated and
  re-executed, level by level.
- Nothing is flushed.

The window is a Register Update Unit (RUU): a unified reservation-station
and reorder buffer of 64 entries. Each entry is extended by a few status
bits. All of the fault tolerance lives in the RUU and in one comparator per
result bus.

The design follows the configuration that works best among the options this
approach offers:
- **Branch predictor trained at decode.** It is trained speculatively with
  the predicted direction. Training at commit would come too late, because
  every instruction now stays in the window roughly twice as long.
- **Single memory access for check loads.** The check of a load repeats only
  the address calculation and compares addresses. It does not read the data
  cache a second time, so the cache ports are not burdened twice.

## Pipeline

```
 fetch_unit ──> decode_unit (x W) ──> ruu ──> func_unit (x W) ──> result bus
  │ gshare_bp, btb, ras      │         │  ^            │                │
  │ icache                   │   rename_logic          └─> dcache (loads)
  │                          │   int_regfile (operands at allocation)
  └──<── redirect, BTB update, history restore ──<── ruu (branch resolution)
        commit: int_regfile writes, dcache store writes (at most DPORTS)
```

| file | role |
|---|---|
| `rtl/ft_pkg.sv` | shared types: instruction encoding, micro-op, outcome, FU request/response |
| `rtl/ft_core.sv` | top level: wires the blocks below |
| `rtl/fetch_unit.sv` | PC, fetch groups, prediction with `gshare_bp`, `btb`, `ras`, decode-time training |
| `rtl/gshare_bp.sv` | 4K-entry gshare direction predictor with a speculative global history |
| `rtl/btb.sv` | 1K-entry 4-way branch target buffer |
| `rtl/ras.sv` | 8-entry return address stack |
| `rtl/icache.sv` | instruction store (128 KB, always hits), W words per cycle |
| `rtl/decode_unit.sv` | instruction → micro-op |
| `rtl/rename_logic.sv` | finds the youngest RUU entry that writes each source register |
| `rtl/ruu.sv` | the window: allocation, wakeup, dispatch, double execution, comparison, recovery, commit |
| `rtl/result_comparator.sv` | compares the first and the check outcome of one instruction |
| `rtl/func_unit.sv` | universal functional unit (any operation; latency 1, MUL 4, DIV 12, load 1+1) |
| `rtl/int_regfile.sv` | 32 architectural integer registers, written at commit |
| `rtl/dcache.sv` | data store (128 KB, always hits), one read port per FU, DPORTS write ports |

## The RUU entry and its life

Each entry holds the following fields:
- two source operands, each with a ready bit, a producer tag and a content
  field;
- the destination register and the *first* outcome of the instruction;
- a dispatched bit and the number of the functional unit used;
- an executed bit;
- **to-reissue**: the instruction still owes its check execution;
- **reissued**: the instruction or its inputs were found wrong and it is
  being re-executed;
- the program counter.

This design adds three bookkeeping fields:
- `checking`: the next execution is the check;
- `retry`: a faulty instruction is being retried;
- a 4-bit generation count. It lets a result that returns from a
  functional unit after its entry was invalidated or squashed be recognised
  and dropped.

Normal flow for one instruction:

1. **Allocate.** The instruction is renamed:
   - Each source either gets its value from the register file or from a
     completed producer, or it waits on the producer's tag.
   - Renaming has no map table. `rename_logic` searches the destination
     fields of the live entries in age order. A branch squash therefore only
     has to drop entries.
2. **First execution.**
   - Ready entries are dispatched oldest first to any free unit.
   - The to-reissue bit is set when the instruction is dispatched.
   - When it finishes, the outcome is stored in the entry and broadcast on
     the result bus, exactly as in an ordinary core. Consumers proceed
     speculatively on it.
   - Branches resolve here: a wrong prediction squashes the younger entries
     and redirects fetch at once.
3. **Reissue at the head.**
   - An executed entry among the W oldest with to-reissue set is reissued:
     to-reissue is cleared, `checking` is set, and the entry goes back to
     the dispatcher.
   - Reissuing only at the head has three benefits:
     - all its dependences are resolved, so the check dispatches at once;
     - the two executions are separated in time, so one transient event
       cannot corrupt both;
     - only instructions that will really commit are checked.
4. **Check execution.**
   - The check does not broadcast.
   - `result_comparator` compares its outcome with the stored one. What is
     compared depends on the class:
     - value-producing operations: the result;
     - loads: the address;
     - stores: the address and the data;
     - branches: the direction and the target;
     - jumps: the link value and the target.
   - On a match the entry is marked executed again and commits in order:
     - a register write goes to the register file;
     - a store writes the data cache through one of DPORTS store ports.

When the comparison fails (a fault):

- The entry's dispatched and executed bits are cleared and reissued is set.
  Its generation is advanced. The instruction then executes again (the
  *retry*).
- Faults are assumed to be transient, so the retry is trusted. Its outcome
  replaces the stored one without a further check.
- Because the entry is marked reissued, the retry's broadcast carries the
  **mispredicted signal**. Every entry that takes that tag, and that was
  already dispatched, executed or waiting for its check, is handled like this:
  - it takes the corrected operand;
  - its dispatched/executed bits are cleared and reissued is set;
  - it executes again.
  Its own finish then carries the mispredicted signal to the next level of
  dependents. Entries that had not yet been dispatched simply pick up the
  new value.
- A re-executed dependent sets to-reissue again, so its new value is also
  checked before it commits.
- When a corrected instruction is a store, loads younger than it that already
  ran are reissued too, since they may have read around the store.

A faulty branch is repaired the same way. If its retry finds a different
target than the one fetch followed, the ordinary misprediction recovery
squashes and redirects.

## Loads, stores and the data cache

- No memory operation executes after an older store whose address is
  unknown. In this design a load also waits while an older uncommitted store
  has the same address, because stores write the cache only at commit and
  there is no store-to-load forwarding.
- At most DPORTS (2 in the 4-way model) loads read the cache per cycle.
- The first execution of a load computes the address and reads the cache one
  cycle later (2 cycles in total).
- The check execution of a load takes 1 cycle: it repeats only the address
  calculation and never touches the cache.

## Branch prediction

- Each cycle a fetch group of up to W sequential instructions is read. The
  group ends after its first control instruction, so one prediction is made
  per cycle.
- Each kind of control instruction is predicted as follows:
  - conditional branches: the gshare direction, combined with a BTB hit;
  - calls (JAL): the BTB target, and the return address is pushed;
  - returns (JR): the top of the return address stack.
- When the decode stage accepts a group, the gshare counter of its
  conditional branch is trained with the *predicted* direction. This is the
  decode-time update.
- The global history is updated speculatively at fetch. Each instruction
  carries the history it was predicted with, so a misprediction restores it
  exactly.
- The BTB is written when a taken branch or call resolves.

## Instruction set

The core runs its own small 32-bit, word-addressed integer instruction set.
Fields are `opcode[31:26] rd[25:21] rs1[20:16] rs2[15:11] imm[15:0]`, with
the immediate sign-extended. Register r0 reads as zero. Instruction and data
addresses count 32-bit words.

| opcode | instruction | meaning |
|---|---|---|
| 0..7 | ADD SUB AND OR XOR SLT SLL SRL | `rd = rs1 op rs2` (SLT signed) |
| 8, 9 | MUL DIV | multiply (4 cycles), signed divide (12 cycles; x/0 gives all ones) |
| 10 | ADDI | `rd = rs1 + imm` |
| 11 | LW | `rd = mem[rs1 + imm]` |
| 12 | SW | `mem[rs1 + imm] = r[rd]` |
| 13..15 | BEQ BNE BLT | compare `r[rs1]` with `r[rd]`; taken: `pc + 1 + imm` |
| 16 | JAL | `rd = pc + 1`, jump to `pc + 1 + imm` |
| 17 | JR | jump to `r[rs1]` |
| 18 | HALT | stops the core when it commits |

## Top-level interface (`ft_core`)

- **Loading.** `imem_we/imem_addr/imem_wdata` and `dmem_we/dmem_addr/dmem_wdata`
  load the program and data before the core runs, typically while `rst_n` is
  low.
- **Running.** Execution starts at address 0. `halted` rises when HALT
  commits.
- **Inspection.** `dbg_reg → dbg_reg_data` and `dbg_maddr → dbg_mdata` read
  the architectural state.
- **Fault injection.** `fu_fault_mask[i]` is XORed into everything functional
  unit `i` produces: result, address, branch direction and target. It is a
  test input for injecting transient faults. Tie it to zero in normal use.
  It does not reach load data read from the cache, because the caches are
  meant to be protected by parity or ECC.
- **Event counts.** The `ev_*` outputs count events per cycle: commits,
  reissues, dispatches, detected faults, mispredicted signals, invalidated
  dependents, check loads, loads held by stores, a full window, branch
  mispredictions and decode-time predictor updates.

Parameters, whose defaults form the 4-way model:

| parameter | default | meaning |
|---|---|---|
| `W` | 4 | fetch, allocate, dispatch and commit width, and number of functional units |
| `RUU_SIZE` | 64 | RUU entries |
| `DPORTS` | 2 | data-cache ports: loads per cycle, and stores committed per cycle |
| `MUL_LAT`, `DIV_LAT` | 4, 12 | multiply and divide latency |
| `BP_ENTRIES` | 4096 | gshare counters (12-bit history) |
| `BTB_ENTRIES`, `BTB_WAYS` | 1024, 4 | BTB |
| `RAS_DEPTH` | 8 | return address stack |
| `IWORDS`, `DWORDS` | 32768 | instruction and data store size in words (128 KB each) |

The 8-way model is `W=8, DPORTS=4` with the same 64-entry RUU.

## What follows the source design and what is this design's own

The following come from the source design:
- the overall method;
- the RUU entry fields and their meaning;
- reissue at commit time;
- comparison of the two executions;
- recovery by re-executing the faulty instruction and, through the
  mispredicted signal, its dispatched dependents;
- trust in the retry;
- the decode-time predictor update;
- address-only check loads;
- the memory ordering rule for unknown store addresses;
- all the sizes and latencies listed above.

The following are this design's own choices:
- **Instruction set.** Own integer ISA. The original evaluation runs Alpha
  binaries.
- **Caches.** Both caches are always-hit stores of the L1 capacity. There
  are no tags, ways, 6-cycle misses or 8 MB L2, and no non-blocking miss
  handling.
- **Missing parts.** No floating-point register file or units, and no parity
  or ECC on the caches, register file or RUU.
- **Comparator.** Plain equality logic. The hardening of the comparator, by
  strong cells or triple modular redundancy, is a circuit matter outside
  this RTL.
- **Stale results.** Generation counts drop results of invalidated or
  squashed executions.
- **Checking of re-executed dependents.** They are checked again. The
  retry of the faulty instruction itself is not.
- **Store-to-load ordering.** Loads wait for older stores to the same
  address, and a corrected store reissues younger loads.
- **Fetch groups.** A group ends at the first control instruction. The RAS
  is not repaired after a misprediction. The BTB uses round-robin
  replacement.
- **Functional units.** Multiply and divide are not pipelined: they hold
  their unit until they finish. There are W universal units.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. `tb/ft_asm_pkg.sv`
provides instruction encoders and an in-order reference model (`iss`) for
the core-level tests.

To run the end-to-end test at the default, full size:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/ft_pkg.sv tb/ft_asm_pkg.sv rtl/*.sv tb/tb_ft_core.sv --top-module tb_ft_core
./obj_dir/Vtb_ft_core +verilator+seed+3
```

The other testbenches are built the same way with their own top module.

`tb_ft_core` runs a 48-iteration loop on the core and injects single-bit
faults at random into functional-unit outputs. The loop contains loads,
multiplies, stores read back at once, a data-dependent branch, a divide
chain, and a call and return. It then checks:
- that the final registers, the memory written and the number of committed
  instructions match the reference model;
- that every mechanism happened at least once: check reissue, check loads,
  fault detection, the mispredicted signal, dependent invalidation, branch
  recovery, decode-time training, a load held by a store, and a full window.

A typical run takes about 1600 cycles, with about 670 instructions committed
and about 20 faults detected and repaired. `tb_ft_core_8way` runs the same
program on the 8-way model in about 900 cycles. The plusarg `+noinject`
turns injection off. The fault checks then fail, as they should.

The fault model of the tests is one transient error per execution. A fault
is never injected into a retry, or into the check of an instruction whose
first execution was already hit. Two identical errors in both executions
would compare equal, which no duplicate-execution scheme can detect.

## Limits to keep in mind

- Timing and area have not been evaluated.
- The RUU is written for clarity:
  - wakeup compares every entry against every result bus;
  - the load ordering check compares every load with every older store;
  - dispatch is a W-deep age-ordered priority chain.

  A real implementation would pipeline or partition these.
- The checked region is the execution path: functional units, address
  calculation, and branch resolution. Errors in the RUU storage, the
  register file or the caches are not detected. They are assumed to be
  covered by parity or ECC.
