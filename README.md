# Bit-partitioned register file (BPRF) core

Most 64-bit integer results have an upper half that is all zero. A 64-bit
physical register file still spends a full 64-bit entry on each of them.
A bit-partitioned register file splits the file into two 32-bit banks.
A narrow value then occupies one 32-bit entry and a wide value occupies two.
The same number of in-flight values therefore fits in fewer storage bits,
or a smaller file (with shorter access time and lower energy per access) holds
as many values as a larger conventional one.

This repository holds synthesizable SystemVerilog for the out-of-order back end
that makes this work:

- register renaming with two physical IDs per operand;
- the Least Significant Bank Pointer (LSBP);
- a 0-detect unit on the ALU result;
- early release of the unused upper entry.

It also holds self-checking testbenches for every module.

## How a value lives in two banks

Each renamed operand has the tag `{PRegID1, PRegID0, LSBP}` (type `rmap_t` in
`rtl/bprf_pkg.sv`):

- `PRegID0` is an entry in bank 0 and `PRegID1` is an entry in bank 1.
- `LSBP` names the bank that holds the least significant 32 bits. The other
  bank holds the upper 32 bits, if there are any.

Reading an operand means reading bank 0 at `PRegID0` and bank 1 at `PRegID1`
in parallel. With `LSBP = 1` the two words are swapped
(`rtl/operand_assemble.sv`). Without the pointer, every low half would live
in bank 0, and bank 0 would run out of entries long before bank 1.

The lifetime of a destination register:

1. **Rename.** The destination takes one free ID from each bank's free-pool.
   The bank with more free entries becomes the LSBP bank; on a tie, even
   lanes choose bank 0 and odd lanes bank 1. The state table marks the
   value as "not ready" and "has an upper entry". These records are keyed
   by the LSBP bank and the low entry's ID.
2. **Write back.** `zero_detect` examines the 64-bit result.
   - *Wide result:* both halves are written.
   - *Narrow result* (upper 32 bits all zero): only the low half is written
     into the LSBP bank. The upper entry's ID goes straight back to the
     other bank's free-pool in the same cycle. This is early register
     deallocation (ERD). The state table records that the value no longer
     has an upper entry.
3. **Read by consumers.** The operand's "has an upper entry" flag comes from
   the state table during register read. If the flag is clear, the upper half
   is zero and the other bank's word is ignored. This is safe because that
   entry may already belong to another instruction.
4. **Commit of the next writer of the same architectural register.** The old
   mapping is released: its low entry always, its upper entry only if ERD did
   not release it already.

Why the state is keyed by the low entry: the upper entry can be reused long
before the value dies, but the low entry cannot. It is freed only at the
usual commit-time point, after every reader of the value has read it.
Readiness tracking and issue-queue wake-up use the same `{LSBP, low ID}` key.

Only all-zero upper halves are treated as narrow. A negative 32-bit value
sign-extended to 64 bits (upper half all ones) is stored in full.

## Pipeline and timing

`rtl/bprf_core.sv` is the top level. It is `WIDTH` lanes wide (default 8):
up to `WIDTH` instructions per cycle pass through each stage.

| stage | what happens |
|---|---|
| rename | read the source mappings and their ready bits; allocate in both free-pools; write the map table, the reorder buffer and the instruction queue |
| issue | the queue picks up to `WIDTH` of the lowest-numbered slots whose two sources are ready |
| register read | each bank is read with its own ID; operands are assembled by LSBP and upper-valid |
| execute | one 64-bit ALU per lane |
| write back | 0-detect; bank writes; ready bit and upper-valid flag in the state table; queue wake-up; ROB done; ERD release |
| commit | in order, up to `WIDTH` per cycle (the run of finished entries at the ROB head); the replaced mappings go back to the free-pools |

### Rename of a group

Instructions arrive as a group in lanes 0..n-1, with lane 0 the oldest and
no gaps. The group is accepted whole.

- Lane *k* takes the *k*-th free ID from each free-pool.
- A source written by an earlier lane of the same group takes that lane's
  new mapping, and it is marked not ready.
- If two lanes write the same register, the later lane's mapping is the one
  left in the map table.
- The reorder buffer records the earlier lane's mapping as the "old"
  mapping of the later lane, so it is released when the later lane commits.

A lone instruction commits 5 cycles after the cycle in which it was accepted.
There is no bypass network, so a dependent instruction issues the cycle after
its producer's write back. A chain of dependent instructions therefore runs
at one instruction per 4 cycles.

Rename stalls (`in_ready` low) when any of these holds fewer than `WIDTH`
free places:

- either free-pool,
- the instruction queue,
- the reorder buffer.

### Top-level interface

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid[W]`, `in_ready`, `in_instr[W]` | in/out/in | a group of decoded instructions (`instr_t`: `op`, `rd`, `rs1`, `rs2`, 16-bit `imm`) in lanes 0..n-1; the whole group is accepted in a cycle with `in_ready` high |
| `commit_valid[W]`, `commit_rd[W]` | out | retirements this cycle, lane 0 oldest, and their destination registers |
| `dbg_areg`, `dbg_data` | in/out | combinational read of an architectural register through the map table and an extra read port on each bank; correct once the pipeline is idle |
| `free0_count`, `free1_count` | out | free entries in each bank |
| `events` | out | `core_events_t`: one bit per mechanism, set if it happens in any lane (stalls, LSBP = 1 allocation, dependence inside a group, multiple issue, swapped read, narrow read, ERD, commit releasing two entries) |

After reset every architectural register is zero. Register *i* maps to bank-0
entry *i* with no upper entry, so bank 0 starts with 48 free entries and
bank 1 with 80.

### Parameters of `bprf_core`

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 8 | rename, issue and commit width; number of ALUs |
| `ENTRIES` | 80 | entries per bank (each bank is 80 x 32 bits) |
| `IQ_SIZE` | 64 | instruction queue slots |
| `ROB_SIZE` | 192 | reorder buffer entries |

These are the sizes of the 8-issue reference configuration:

- width 8,
- an 80-entry 2-bank file,
- a 64-entry integer queue,
- a 192-entry reorder buffer.

The 4-issue configuration with a 50-entry file is `WIDTH=4, ENTRIES=50,
IQ_SIZE=32, ROB_SIZE=96`.

At width 8 each bank has 17 read ports (two per lane plus one for
observation) and 8 write ports. This is the multi-ported structure whose
size the bit-partitioning is meant to shrink.

`ENTRIES` and `ROB_SIZE` may each be up to 256. That limit comes from the
fixed ID and index widths in `bprf_pkg`.

## Modules

| file | role |
|---|---|
| `bprf_pkg.sv` | widths, `rmap_t`, `lo_id`/`hi_id`, instruction, queue and ROB entry types, event bundle |
| `bprf_core.sv` | top level, rename logic, pipeline registers, release routing |
| `register_bank.sv` | one 32-bit bank, N asynchronous reads, M synchronous writes, cleared by reset |
| `free_pool.sv` | circular FIFO of free IDs of one bank; up to `WIDTH` allocations and `2*WIDTH` releases per cycle |
| `map_table.sv` | architectural to `rmap_t` mapping |
| `state_table.sv` | ready and upper-valid flags per `{bank, ID}` |
| `instruction_queue.sv` | wake-up by `{bank, ID}` broadcast, selects the lowest ready slots |
| `reorder_buffer.sv` | in-order retirement holding new and old mappings |
| `operand_assemble.sv` | LSBP swap and zero upper half |
| `zero_detect.sv` | all-zero test per sub-word; also usable with 4 banks of 16 bits |
| `alu.sv` | add, sub, and, or, xor, sll, srl, addi, slli, srli |

## What follows the reference design and what does not

These parts follow the bit-partitioned register file scheme:

- two 32-bit banks with separate ID and data paths;
- one free-pool per bank;
- twofold register IDs plus LSBP in the map table, ROB and queue;
- 0-detect on every ALU result;
- ERD of all-zero upper halves, with the freed ID invalidated in the state
  table;
- the width and sizes listed above.

These are this implementation's own choices:

- One ALU per lane. The reference processor also has load/store and
  floating-point issue slots, which are not built.
- Accepting a rename group only as a whole.
- The LSBP rule ("more free entries wins"; on a tie, lanes alternate).
- Selection of the lowest-numbered ready queue slots rather than the
  oldest instructions.
- Keeping upper-valid beside the low entry's ready bit.
- No operand bypass.
- The reset mapping.
- The ALU operation set (ALU-only; there are no loads, stores or branches).
- The observation read port.

Not included:

- Fetch, decode, branch prediction, caches, memory.
- A 4-bank (16 bits x 4) core. Only `zero_detect` is parameterised for it.
- Any model of access time or energy. The register banks are flip-flop
  arrays, not a custom multi-ported SRAM.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. Build one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bprf_pkg.sv rtl/*.sv \
  tb/tb_core_runner.sv tb/tb_bprf_core.sv --top-module tb_bprf_core -o sim
./obj_dir/sim
```

For unit testbenches, leave out `tb/tb_core_runner.sv` and name the unit's
testbench instead.

- `tb_bprf_core`: four cores with 600-instruction random programs.
  - A 4-wide core with 40 entries per bank, so the free-pools run short.
  - A 2-wide core with an 8-slot queue.
  - A 4-wide core with a 16-entry ROB.
  - The 4-issue configuration (`WIDTH=4, ENTRIES=50, IQ_SIZE=32,
    ROB_SIZE=96`).

  It checks results, commit order, latency and entry accounting. It also
  requires every mechanism to occur: each kind of stall, LSBP = 1,
  dependences inside a group, multiple issue, swapped and narrow operand
  reads, ERD, and commits.
- `tb_bprf_core_full`: the core at default size (8 wide) with a
  3000-instruction program.
- `tb_core_runner`: the shared driver and checker. It has a reference model
  of the architectural registers. At the end it checks that
  `free0 + free1 = 2*ENTRIES - 32 - (number of registers holding a wide
  value)`, which catches any lost or doubly released entry.
- `tb_<module>`: one per module, each checking against an independent model.
