# Two-stage built-in self-repair for a group of embedded memories

An SoC holds many embedded SRAMs, and a single faulty cell in any of them
spoils the chip unless it can be mapped onto a spare row or a spare column.
Built-in self-repair (BISR) finds the faults with a built-in self-test (BIST)
and works out which spare lines to use with a built-in redundancy analyser
(BIRA).

There are three usual ways to do this for many memories:

- Give every memory its own BIST and BIRA. This is fast but large.
- Share one BIST and one BIRA and handle the memories one after another. This
  is small but slow.
- Test in parallel, then repair serially. This still needs fault storage for
  every memory.

This design takes a path between them and works in two stages:

1. **Parallel test.** One small shared March X BIST tests all memories of the
   group at once. Each memory's wrapper counts its faults. At the end, every
   memory is known to be fault-free, faulty, or beyond repair. The faults of
   the largest memory also go straight to the shared BIRA, so that memory is
   analysed and repaired right after this stage.
2. **Serial test and repair.** Only the faulty memories are tested again, one
   at a time in descending size order. The shared BIRA collects each one's
   faults and finds its repair. Fault-free memories are never tested twice.

Because there is only one BIRA, the design needs only one fault store. Because
the BIRA is exact, it finds a repair whenever the spares can cover the faults.
The spare lines are used with must-repair first, then an exhaustive search over
every order of the remaining spares.

One `bisr_top` serves one group of memories. Memories are grouped by
placement, timing and power, and a chip with several groups uses one instance
per group.

## Structure

```
bisr_top
├── bisr_ctrl          two-stage sequencer
├── bist               shared March X BIST
│   ├── bist_ctr       element / operation sequencer (stall, abort, flush)
│   ├── tag            test address generator (up/down counter)
│   └── tpg            test pattern generator (March X table)
├── mem_wrapper  x N   one per memory
│   ├── cmp            comparator -> fault information
│   └── fnr            fault number register
└── bira               shared redundancy analyser
    ├── multi_fault_det  faulty word -> single-cell faults
    ├── mr_counter       must-repair condition
    ├── fault_store      stored faults
    ├── bira_ctr         collection policy + exhaustive search
    └── repair_regs      repair solution of every memory
```

The memories are not part of the RTL. Each has its own port on `bisr_top`. A
repair solution is given as outputs: the row address taken by each spare row
and the column taken by each spare column. The memories' spare-line
reconfiguration, which applies that solution, is outside this design.

## Memory model and naming of faults

Memory *i* has `2^MEM_ROW_W[i]` rows. Each row holds `2^COL_W` words of
`DATA_W` bits. A word address is `{row, column address}`. Memory 0 must be the
largest. The index order is the stage-2 test order, so memories must be
numbered by descending size. An elaboration check rejects a memory larger than
memory 0.

A **cell fault** is named by its row and its **column**. The column is
`{column address, bit index}`, `COL_W + log2(DATA_W)` bits wide. A spare column
replaces one such bit column. So one faulty word can hold faults on several
columns, and the BIRA must split it into cell faults.

The memory port is synchronous with one cycle of read latency. On a clock edge
with `mem_en` high, the memory writes `mem_wdata` if `mem_we` is high.
Otherwise it returns the word on `mem_rdata` in the next cycle.

## The test: March X on a shared address sequence

The BIST runs March X:

| element | order | operations |
|---------|-------|------------|
| M0 | up (either order allowed) | w0 |
| M1 | up | r0, w1 |
| M2 | down | r1, w0 |
| M3 | up (either order allowed) | r0 |

"0" and "1" are solid all-zero and all-one words. The BIST issues one
operation per cycle, so a memory of W words takes 6·W operations.

In stage 1, the TAG counts over the largest memory's address range. Every
wrapper passes an operation on to its memory only if the address lies inside
that memory. A smaller memory therefore sees the same March X, with the same
address order in each element, only with gaps. In stage 2, the range is set to
the memory under test, and only that memory's wrapper is selected.

The compare side of each read is delayed by one register in `bist`. This gives
the compare enable, the expected word and the address. They arrive together
with the memory's read data.

After the last operation, `bist_ctr` waits 3 cycles for the
read → compare → report pipeline to drain, then pulses `test_finish`. Without
stalls, a test of W words takes **6·W + 4 cycles** from start to
`test_finish`. The BIRA can also stop a test early (`test_abort`).

## The wrapper: comparator and fault number register

`cmp` XORs the read word with the expected word. A non-zero result is reported
one cycle later as fault information: `fault_valid`, the word address, and the
syndrome, which has a 1 on each failing bit.

`fnr` adds the number of failing bits of each report, during stage 1 only. The
count saturates. It drives two flags:

- `faulty`: the count is not zero.
- `irreparable`: the count is above `IRREP_LIMIT`.

`IRREP_LIMIT` is `3 · (SPARE_ROWS · cells per row + SPARE_COLS · cells per
column)`. Each spare line covers at most that many cells, and March X reads
each cell three times. A repairable memory therefore cannot go over this limit,
and a memory whose count exceeds it is rejected without a second test.

For a stuck-at fault, the count is exact. A cell stuck at 1 fails two reads
(r0 in M1 and r0 in M3). A cell stuck at 0 fails one read (r1 in M2).

## The analyser

This is the part that takes the most care. Its job is to find spare rows and
spare columns that cover every faulty cell, whenever such a set exists. It must
do this with storage for only a handful of faults.

### 1. Splitting faulty words — `multi_fault_det`

Faulty words go into an 8-entry FIFO. The head word gives up one cell fault per
cycle, lowest failing bit first. Each cell fault has `row = address >> COL_W`
and `column = {address[COL_W-1:0], bit}`.

A word with k failing bits takes k cycles, while the BIST can report a word
every cycle. The detector therefore raises `stall` once 4 words are queued.
The BIST then holds. The other 4 entries cover the reads already on their way
through the memory and the comparator. An assertion guards against overflow.

### 2. Collecting faults — `mr_counter`, `fault_store`, `bira_ctr`

Each cell fault is handled in one cycle, by the first rule that applies:

1. **Drop it** if its row or column already has a spare. Also drop it if the
   same cell is already stored: March X reports a cell more than once.
2. **Must-repair.** `mr_counter` counts the stored faults on the same row and
   on the same column, comparing against all entries in parallel. Suppose the
   row would then hold more faults than there are free spare columns. Then only
   a spare row can repair it, so the row takes a spare row at once, and
   `fault_store` invalidates every stored fault on that row. The same rule
   applies to columns, with the roles of rows and columns swapped. If the spare
   kind needed is used up, the memory is unrepairable.
3. **Store it.** If the store is full, the memory is unrepairable.

The store holds `2 · SPARE_ROWS · SPARE_COLS` entries, which makes rule 3 exact.
After must-repair, no row holds more faults than there are spare columns, and
no column holds more faults than there are spare rows. So r spare rows and
c spare columns can cover at most `r·SPARE_COLS + c·SPARE_ROWS ≤
2·SPARE_ROWS·SPARE_COLS` stored faults. One more fault than that can never be
repaired.

When the BIRA finds the memory unrepairable, `unrepair` rises, the running test
is aborted, and the whole procedure ends.

### 3. Exhaustive search — `bira_ctr`

The search starts once `test_finish` has been seen and the fault queue is
empty. Let F be the number of free spares: free rows plus free columns. An
**order** is an F-bit mask with exactly as many ones as there are free rows,
where bit k = 1 means "the k-th spare used is a row". For each order, the
stored faults are walked one per cycle. The first fault not yet covered takes
the next spare of the order: its own row if that spare is a row, its own column
otherwise.

If every fault ends up covered, the order is a solution. If a fault is still
uncovered when the spares run out, the search tries the next order. Masks of
the wrong weight cost one cycle each.

The search is exhaustive. Any valid repair must cover the first uncovered fault
with either its row or its column. Following those choices spells out one of
the orders, so if any repair exists, some order finds it. The search is tested
against a brute-force reference on thousands of random fault sets.

The worst case is `2^(SPARE_ROWS+SPARE_COLS) · (DEPTH + 1)` cycles, which is
144 cycles at the defaults. This is small next to the 6·W cycles of a test.

On success, the solution (must-repair spares plus search spares) is written
into the `repair_regs` entry of the memory and `repair_done` pulses. On
failure, `unrepair` goes high.

## The two-stage sequence — `bisr_ctrl`

```
test_start ─► clear the FNRs and repair registers,
              start the BIST over memory 0's range with all memories selected,
              start the BIRA on memory 0
stage 1     ─► BIST runs; every FNR counts; the BIRA collects memory 0's faults
            ─► test_finish ─► BIRA analyses memory 0 ─► repair_done | unrepair
stage 2     ─► for i = 1 .. N_MEM-1:
                 FNR irreparable  → end, unrepair
                 FNR zero         → skip (one cycle)
                 otherwise        → BIST over memory i only, BIRA on memory i,
                                    then repair_done | unrepair
            ─► bisr_done (unrepair = 0), or bisr_done with unrepair = 1
```

`bisr_done` and `unrepair` stay valid until the next `test_start`.

At the defaults (256, 128, 128 and 64 words), a fault-free group finishes in
about 1,550 cycles: one parallel test of 1,540 cycles plus a few cycles of
analysis and skipping. Each faulty memory i ≥ 1 adds a serial test of
6·W_i + 4 cycles, plus its analysis and any stall cycles.

## Interface of `bisr_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `test_start` | in | 1 | start a test-and-repair run (one-cycle pulse) |
| `mem_en`, `mem_we` | out | N_MEM | memory port enables |
| `mem_addr` | out | N_MEM × AW | word address; memory i uses its low MEM_ROW_W[i]+COL_W bits |
| `mem_wdata` | out | N_MEM × DATA_W | write data |
| `mem_rdata` | in | N_MEM × DATA_W | read data, one cycle after the read |
| `bisr_done` | out | 1 | run finished |
| `unrepair` | out | 1 | some memory cannot be repaired (the chip is faulty) |
| `busy` | out | 1 | BIST or BIRA active |
| `events` | out | `bisr_events_t` | one-cycle strobes: stall, multi-bit word, must-repair row / column, skipped memory, serial test, irreparable fault count, abort |
| `fault_count`, `faulty` | out | N_MEM × FNR_W, N_MEM | FNR contents after stage 1 |
| `repaired` | out | N_MEM | a repair solution is stored for the memory |
| `rep_row`, `rep_row_v` | out | N_MEM × SPARE_ROWS × ROW_W, N_MEM × SPARE_ROWS | row taken by each spare row |
| `rep_col`, `rep_col_v` | out | N_MEM × SPARE_COLS × CID_W, N_MEM × SPARE_COLS | column `{col addr, bit}` taken by each spare column |

Parameters, with their defaults:

| parameter | default | notes |
|-----------|---------|-------|
| `N_MEM` | 4 | memories in the group |
| `MEM_ROW_W` | `'{6, 5, 5, 4}` | 256, 128, 128 and 64 words |
| `COL_W` | 2 | |
| `DATA_W` | 8 | |
| `SPARE_ROWS` | 2 | |
| `SPARE_COLS` | 2 | |
| `FNR_W` | 10 | must hold `IRREP_LIMIT` of memory 0 |

## What follows the method and what is this design's own

These parts follow the method:

- the two-stage procedure (parallel test, then serial test and repair of faulty
  memories only, in descending size order);
- one shared BIST and one shared BIRA;
- the largest memory's faults going to the BIRA during the parallel test;
- a comparator and a fault number register per memory;
- March X;
- the BIST split into CTR, TAG and TPG;
- the BIRA split into multi fault detector, counter, fault storing, controller
  and repair registers;
- the must-repair check;
- the exhaustive search over spare-row and spare-column combinations;
- `Repair done`, `Unrepair` and `Test finish`.

These are choices of this design:

- **Sizes.** The memory count, the memory sizes, the word width, the
  rows-by-words layout and the numbers of spares are all choices of this
  design; none are prescribed.
- **March X details.** M0 and M3 run upwards, with solid data backgrounds.
- **Columns.** A spare column replaces a single bit column.
- **Fault information.** It is a word address plus a failing-bit mask.
- **FNR.** It counts failing bit reads, and its irreparability bound is the one
  given above.
- **Must-repair.** The rule used is the standard "more faults than free spares
  of the other kind" condition.
- **Fault store size.** It holds 2·R·C entries, and a full store means the
  memory is unrepairable.
- **Search.** It enumerates the orders in which the spares are used, walking
  the stored faults serially, one per cycle.
- **Stall.** The BIST/BIRA stall handshake and the 3-cycle flush are this
  design's own.
- **Early abort.** A running test is stopped as soon as the memory is known to
  be unrepairable.
- **Repair registers.** There is one set per memory.
- **Timing details.** The one-cycle synchronous memory read and the
  asynchronous active-low reset are chosen here.

## Limits

- The memories and their spare-line reconfiguration are not included. A repair
  is only reported, on the `rep_*` ports, not applied.
- The test and the fault model target cell faults that March X detects, such as
  stuck-at and transition faults. `IRREP_LIMIT` assumes a faulty cell fails at
  most three reads. That holds for March X, which reads each cell three times.
- Each faulty memory is tested twice: once in parallel, once on its own. Memory 0
  is the exception, because it is analysed from the parallel test.
  Faults that show up only in one of the two runs are not merged.
- The analyser's search time grows as 2^(SPARE_ROWS+SPARE_COLS). That is fine
  for a few spares but not for dozens.
- `multi_fault_det` needs a power-of-two `DEPTH`.

## Verification

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. The main checks are:

- **`tb_bisr_top`** runs the complete design at its default parameters. Four
  behavioural SRAMs (`tb/sram_model.sv`) carry injected stuck-at cells. The
  testbench checks that:
  - `unrepair` is set exactly when a brute-force reference (`tb/bisr_tb_pkg.sv`)
    says some memory cannot be covered;
  - every memory before the first unrepairable one gets a solution that covers
    all its faults;
  - only faulty memories are tested serially;
  - the fault counts match March X;
  - the fault-free run time is 6·256 + 4 cycles plus at most 30;
  - after a repairable run, applying the reported spare rows and columns to
    the memory models (`repair_row` / `repair_col`) and testing again finds
    every memory fault-free;
  - every mechanism occurs at least once: stall, multi-bit word, must-repair
    row and column, skip, serial test, irreparable count, and abort.
- **`tb_bira_ctr` and `tb_bira`** compare the analyser with the brute-force
  reference on about 1,900 random fault sets. `tb_bira_ctr_r1c3` repeats the
  analyser check with 1 spare row and 3 spare columns, so the must-repair
  thresholds and store size are also tested with unequal spare counts.
- **`tb_bist` and `tb_bist_ctr`** check the exact March X operation stream, the
  compare alignment, stalls, abort and the 6·W + 4 test time.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bisr_pkg.sv tb/bisr_tb_pkg.sv tb/tb_bisr_top.sv --top-module tb_bisr_top
./obj_dir/Vtb_bisr_top
```

Replace `tb_bisr_top` with any other `tb_<block>` to run that block's
testbench. All of them finish in well under a second.
