# A two-mode chip multiprocessor: four 4-issue cores that can act as one 16-issue core

This is a chip multiprocessor of four 4-issue out-of-order processing
elements (PEs) that runs in one of two modes:

- **Integrated superscalar mode.** One global fetch and dispatch unit takes
  16 consecutive instructions of a single dynamic instruction stream each
  cycle. It renames them and gives four to each PE. The four PEs then behave
  like one 16-issue superscalar processor.
- **Multithreaded mode.** Each PE fetches its own thread (one loop iteration)
  through a local fetch and dispatch unit. It keeps its results to itself,
  like an ordinary chip multiprocessor running speculative threads.

The machine starts in the integrated mode. It moves to the multithreaded
mode at a loop-entry mark, and back at a loop-exit mark. Sequential code
therefore gets the 16-wide machine, and loops get four threads.

Two ideas make the integrated mode cheap:

1. **A bank-based register file in every PE.** All results are broadcast to
   all four PEs, so the four register files hold the same values. Renaming is
   done with three banks per logical register instead of a physical register
   pool.
2. **Four local reorder buffers chained into one.** Ordering links make the
   four buffers commit in program order as a single logical reorder buffer.

## Block diagram

```
                  g_fetch (16 instr/cycle)
                          |
                  +-------v--------+     IBIT/RBIT copies
                  |     gifdu      |--------------------------+
                  | rename, 16-wide|                          |
                  +--+---+---+---+-+                          |
          4 uops     |   |   |   |    (one ROB block / cycle) |
        +------------+   |   |   +-------------+              |
        v                v   v                 v              v
   +---------+    +---------+ +---------+ +---------+   t_fetch[p] (4/cycle)
   |  pe 0   |--->|  pe 1   |>|  pe 2   |>|  pe 3   |   into each pe's lifdu
   | lifdu   | ordering links PE0->PE1->PE2->PE3->PE0 (next slice)
   | window  |    +---------+ +---------+ +---------+
   | 4 x alu |         ^          ^           ^
   | rob     |         |          |           |
   | bank RF |   result_bus: 16 results -> all PEs (integrated)
   +---------+              or own 4 -> own PE (multithreaded)
                       mode_ctrl: mode, nonspeculative PE, flush/sync
```

| Module | Role |
|---|---|
| `cmp_pkg` | Shared types (instruction, micro-op, tag, result, commit) and sizes. |
| `cmp_top` | The whole CMP. |
| `gifdu` | Global fetch/dispatch: 16-wide renaming, partitioning, ROB block allocation, global IBIT/RBIT. |
| `lifdu` | Local fetch/dispatch of one PE (4-wide) with its own IBIT/RBIT. |
| `rename_unit` | IBIT, RBIT, register mapping table and group renaming; used by both fetch units. |
| `pe` | One processing element. |
| `instr_window` | Per-PE window with tag-matching wakeup and 4-wide select. |
| `alu` | Integer functional unit (four per PE). |
| `local_rob` | Sliced reorder buffer with ordering links. |
| `bank_regfile` | Three-bank register file. |
| `result_bus` | Broadcast network, gated by mode. |
| `mode_ctrl` | Mode state machine and the nonspeculative-PE status. |

## Instruction format

The machine needs an instruction set to be testable. This one is deliberately
small: integer ALU operations and three marks that stand for the annotations
a binary annotator places on loops. The word layout is:

```
 31   28 27    23 22    18 17    13 12            0
 [ op   ][  rd   ][  rs1  ][  rs2  ][     imm13    ]
```

| op | mnemonic | meaning |
|---|---|---|
| 0 | NOP | nothing |
| 1–8 | ADD SUB AND OR XOR SLT SLL SRL | `rd = rs1 op rs2` |
| 9 | ADDI | `rd = rs1 + sext(imm)` |
| C | LOOPB | loop entry: switch to the multithreaded mode |
| D | ITEREND | end of one iteration of the thread |
| E | LOOPX | loop exit: switch back to the integrated mode |

Register r0 is an ordinary register. There are 32 registers of 32 bits. There
are no loads, stores or branches: the instruction stream arrives already in
dynamic order, the way a trace cache would deliver it.

## Renaming with a bank-based register file

Each PE's register file has **three banks**. Each bank holds all 32 logical
registers. Two small tables say which bank is meant for each register:

- **IBIT** (in-order bank index table) gives the bank holding the committed
  value. It is advanced when an instruction writing the register commits.
- **RBIT** (recently-updated bank index table) gives the bank that the
  youngest renamed writer will write. It is advanced, modulo 3, when such an
  instruction is renamed and dispatched.

A writer of `rd` gets destination bank `RBIT[rd]+1`. A reader of `rs`
reads bank `RBIT[rs]`. So a later writer never overwrites a value an
earlier reader still needs: output and anti dependences disappear without
any free list.

While a result is outstanding, a **register mapping table** holds the tag of
the instruction that will produce it. A source whose mapping entry is valid
enters the window waiting for that tag. Otherwise the value is read from the
register file at dispatch. The entry clears when the result appears on the
result network.

Consequences of this scheme:

- **Three banks allow at most two uncommitted writers per register.** One
  bank holds the committed value, and up to two more can be in flight. A
  group that contains the third in-flight writer of some register is cut
  before that instruction, and the instruction waits until the oldest writer
  commits. In the top-level test this *bank stall* is the most frequent stall.
- **Interrupt recovery is a table copy.** On an interrupt every uncommitted
  instruction is dropped, RBIT is set to IBIT and the mapping table is
  cleared. The committed values are already in the IBIT banks.
- **Same-group dependences.** Inside one group of 16 (or 4), a source
  produced by an earlier instruction of the same group takes that
  instruction's tag and bank. Renaming is a prefix scan across the group.

The register file has 16 write ports (every result of every PE) and 8 read
ports (two per dispatched instruction). `arch` is the committed view: for
each register, the bank named by IBIT.

## Tags

A tag is `{PE number (2 bits), ROB slice, entry in slice (2 bits)}`, which is
6 bits with four slices. The PE number makes tags unique across the chip, so
one PE's window can wait on a result made in another PE. The global unit
builds the tag of slot `j` of a 16-wide group as
`{j/4, global tail, j%4}`. Each local unit uses its own PE number.

## The logical reorder buffer and its ordering links

This is the least obvious part of the design.

Each PE has a reorder buffer of `ROB_SLICES` **slices** of four entries. The
slices with the same index in the four PEs form a **block** of 16 entries.
Every cycle the global unit fills one whole block, the block at the global
tail. Instructions 0–3 of the group go to PE 0's slice, 4–7 to PE 1's, and
so on. Missing instructions are filled with no-ops that are complete from
the start. The entries hold no result value, only a *complete* bit and what
commit needs (destination register and write flag).

Each PE commits from its own local head, in order, up to four entries a
cycle. The four buffers must still commit in global program order. That
order is PE0 slice s, PE1 slice s, PE2 slice s, PE3 slice s, then PE0 slice
s+1. It is enforced by an **ordering link** in front of every slice:

- The first entry of a slice may commit only if the link into that slice is
  ON. The later entries of the slice follow it in order.
- When the fourth entry of a slice commits, the link into the next slice in
  program order is turned ON.
- After reset or a flush, only the link into slice 0 of PE 0 is ON.
- A link is turned OFF when the slice it opened commits its first entry.

Together the links form a ring: PE0→PE1→PE2→PE3→PE0 (next slice). Each
slice's link is also stored in a register.

A link set in a cycle can be used by PEs 1–3 in that same cycle. A completed
block of 16 therefore retires in one cycle: in the top-level test, 48 groups
of 16 independent instructions retire at 16 per cycle. The link from PE 3
back to PE 0 is seen only once it is stored. This keeps the ring free of a
combinational loop, and the next block's PE 0 slice commits one cycle later.

The global unit keeps a global head and a global tail counted in blocks.
The tail names the block that the next group allocates. The head advances
when PE 3 finishes its slice of the oldest block: only then are all four
slices of that block free. The unit dispatches only when the block at the
tail is free and every PE's window has room for four more instructions.

## Modes

`mode_ctrl` holds the mode and the number of the nonspeculative PE.

**Integrated → multithreaded.** A LOOPB mark ends the global unit's group,
and the unit stops fetching. When the logical reorder buffer is empty, the
controller enters the multithreaded mode with PE 0 nonspeculative. Every PE
starts from identical register files and identical renaming tables. In the
integrated mode each local unit keeps a copy of the global IBIT and RBIT.
In the multithreaded mode each PE then fetches from its own port
`t_fetch_*`, renames locally, uses its reorder buffer privately (links
ignored), and sees only its own results.

**Handing on the nonspeculative status.** Only the nonspeculative PE may
commit the marks ITEREND and LOOPX. A speculative PE stalls at its mark.
When the nonspeculative PE commits ITEREND, the next PE (round robin)
becomes nonspeculative.

**Multithreaded → integrated.** When the nonspeculative PE commits LOOPX,
the controller spends one cycle in SYNC:

- every PE is squashed, including the speculative ones running iterations
  past the exit;
- every register file is loaded with the nonspeculative PE's committed
  registers, into bank 0;
- all IBIT, RBIT and mapping tables are reset to bank 0.

The next cycle the machine is back in the integrated mode. The environment
resumes the global stream after the loop.

**Interrupts.** `irq` is taken in the integrated mode. In the cycle it is
high, all uncommitted work in all PEs is dropped and RBIT is restored from
IBIT. The state is then precise: `retired` tells the environment how many
instructions committed, and fetch resumes after the last of them. In the
multithreaded mode the request is held off.

## Timing

| Event | Cycle |
|---|---|
| Dispatch (rename + window + ROB allocation) | edge *t* |
| Earliest issue | cycle *t* (operands read at dispatch) |
| Result on the broadcast network | *t+1* |
| Dependent instruction issues | *t+2* |
| Commit | no earlier than *t+2* |

All ALUs have one cycle of latency. The throughput of the integrated mode
is 16 instructions per cycle in dispatch, issue and retirement.

## Parameters

| Name | Default | Meaning |
|---|---|---|
| `NPE` | 4 | processing elements |
| `PE_W` | 4 | issue width of a PE (also slice size) |
| `GW` | 16 | global fetch/dispatch width |
| `NBANK` | 3 | register banks |
| `NREG` | 32 | logical registers (own choice) |
| `XLEN` | 32 | data width (own choice) |
| `ROB_SLICES` | 4 | slices per local reorder buffer (own choice) |
| `WIN_DEPTH` | 16 | instruction window entries per PE (own choice) |

`NPE`, `PE_W`, `GW` and `NBANK` are structural. The tag layout and the
partitioning depend on them, so change them together.

## Where this design departs from, or adds to, the architecture it implements

- The fetch side is a port. The trace cache and its core fetch unit
  (multiple branch predictor, branch target buffer, return address stack,
  interleaved instruction cache) are not included, and neither are the
  thread instruction caches.
- The multithreaded mode has no cross-thread communication. The synchronizing
  scoreboard that forwards registers between threads and the memory
  disambiguation table are not included, so threads run on private register
  state. The values left after the loop are those of the nonspeculative PE,
  which is the PE that commits the exit mark.
- There is no memory system and there are no load/store instructions.
- Ordering links are turned OFF when used rather than when the preceding
  slice is reallocated. With one whole block allocated per cycle, turning
  off at reallocation could drop a link before its slice had committed.
- The global head advances on PE 3's completion of a block rather than
  following PE 0's buffer alone, so that a block is not reused while its
  last slices are still occupied.
- The limit of two outstanding writers per register, and the stall it
  causes, is this design's choice.
- The drain before entering the multithreaded mode, the one-cycle SYNC
  state, squashing the speculative PEs at the exit, and holding off
  interrupts in the multithreaded mode are also this design's choices.

## Verification

Every module has a self-checking testbench in `tb/` that compares its
outputs with an independent model. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_alu` | random operands against a reference for every operation |
| `tb_result_bus` | visibility of each result in both modes, and the enable |
| `tb_bank_regfile` | random writes/reads per bank, committed view, bulk load priority |
| `tb_rename_unit` | bank assignment, same-group dependences, bank stall, commit, flush, table reset and load |
| `tb_local_rob` | in-order commit, link gating, same-cycle link use, marks, flush |
| `tb_instr_window` | wakeup by tag, capture at insertion, 4-wide select, full |
| `tb_mode_ctrl` | entry, handoff round robin, exit SYNC, irq only in the integrated mode |
| `tb_gifdu` | partitioning, tags, renaming across partitions, block allocation/retire, loop-entry stop |
| `tb_lifdu` | local tags, following the global tables, loop-exit stop |
| `tb_pe` | 400 random instructions in the multithreaded mode against a reference model, with a flush |
| `tb_cmp_top` | the whole chip at default parameters (below) |

`tb_cmp_top` runs the top with its default parameters. The program has
these parts:

1. 300 random ALU instructions, with an interrupt in the middle. The
   environment refetches from the precise point.
2. A loop entry.
3. Six iterations, one per thread round robin. Speculative threads also get
   extra iterations past the exit, which must be squashed.
4. The loop exit.
5. 48 groups of 16 independent instructions.
6. 300 more random instructions, with a second interrupt.

A reference model in the testbench computes the register state at entry,
at exit and at the end, and all three are compared. The test checks that
the independent section retires at 16 per cycle. It also counts, and
requires at least once:

- bank stalls, ROB-full stalls and same-group dependences;
- operand capture at insertion and link hand-offs;
- full-width dispatch, issue and retirement;
- the mode switches, the nonspeculative hand-off, the squash and both
  interrupts.

It runs in about 600 cycles.

To simulate with Verilator, for example the top:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_cmp_top \
    rtl/cmp_pkg.sv $(ls rtl/*.sv | grep -v cmp_pkg) tb/tb_cmp_top.sv
./obj_dir/Vtb_cmp_top
```

The package goes first so that the modules importing it compile after it.
Other testbenches are built the same way with their own top module.
