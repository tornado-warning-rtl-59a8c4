# Zephyr: a tornado-resistant speculative scheduler for SMT cores

A speculative instruction scheduler decides when an instruction should issue
before its operands exist: it predicts when every producer will finish and
sends the consumer to execution at that moment. A wrong guess, usually a load
that misses the cache, is repaired by *selective replay*: the consumer
reaches the issue point, finds an operand missing and goes round again. In a
Cyclone-style scheduler, replayed instructions travel through the same
shift-register queues as everything else, so they collide with other
instructions and delay them. Those delays cause further misschedules and more
replays. In a simultaneously multithreaded (SMT) core, one thread's replays
can grow into a storm (a *tornado*) that fills the queues and starves the
other threads.

This repository holds SystemVerilog RTL for **Zephyr**, a scheduler built to
keep tornadoes from forming, together with the **Sliding Window**, a
per-thread throttle that catches the ones that form anyway. The idea is to
do most of the waiting *before* the replay-prone queues:

1. predict each instruction's wait (including load latency);
2. park it in a cheap FIFO whose length is that wait rounded down;
3. release it to a per-thread buffer close to its issue time;
4. let a Cyclone queue absorb only the last few cycles of the wait and any
   mistakes.

The replay queues then stay lightly loaded, and a thread that still replays
too much gets its share of them capped.

```
 renamed      +-------------------+     +-------------------+     +-----+ per thread
 instructions | latency prediction| --> | coarse sorting    | --> | PIB | x THREADS
 ------------>| timing table      |     | 16 FIFOs, lengths |     +-----+
   (dispatch) | load latency pred.|     | 1,5,10,20,150     |        |
              +-------------------+     +-------------------+        v
                                                          ICOUNT + Sliding Window
                                                                     |
      execution <-- ready-bit check <-- Cyclone switchback queues <--+
                         |      replay (wait re-evaluated)    ^
                         +------------------------------------+
```

All of it is synthesizable SystemVerilog (packages, structs, `always_ff` and
`always_comb`, and concurrent assertions on internal invariants). The
front end, rename, reorder buffer, caches and functional units lie outside
the scheduler. The top level exposes them as ports, and the end-to-end
testbench models them.

## Files

| File | Contents |
|---|---|
| `rtl/zephyr_pkg.sv` | widths, unit latencies, the `uop_t` instruction record, time-stamp helpers |
| `rtl/zephyr_top.sv` | the whole scheduler |
| `rtl/timing_table.sv` | register ready-time prediction (wait of every instruction) |
| `rtl/load_latency_predictor.sv` | hybrid load latency predictor |
| `rtl/sort_fifo.sv` | one coarse sorting FIFO |
| `rtl/coarse_sort_engine.sv` | the 16 FIFOs, placement and release |
| `rtl/pib.sv` | per-thread PreIssue Buffer |
| `rtl/icount_select.sv` | ICOUNT thread selection with the WIN cap |
| `rtl/sliding_window.sv` | per-thread tornado detector that sets WIN |
| `rtl/cyclone_queue.sv` | Cyclone countdown/main queues with selective replay |
| `rtl/ready_table.sv` | physical register ready bits |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## The instruction record

Everything between dispatch and issue moves one `uop_t` (in `zephyr_pkg`)
per instruction. It holds the following fields:

- the thread id and the PC;
- an operation class `op_e` (ALU, MUL, DIV, LOAD, STORE, FADD, FMUL, FDIV);
- valid bits and logical and physical numbers for two sources and one
  destination;
- an 8-bit tag for the outside world (the reorder-buffer slot);
- `ready_ts`, the cycle at which the timing table expects its operands.

The design keeps a free-running 16-bit cycle counter, `now`. Delays are
stored as absolute time stamps and compared with `ts_reached`. Stamps work
modulo 2^16, which is ample because no wait exceeds 1023 cycles.

## Latency prediction

**Timing table** (`timing_table`). There is one entry per (thread, logical
register), holding the number of cycles until that register is expected to
be ready. Each entry counts down by one per cycle and stops at zero.

- A dispatching instruction's wait is the MAX of its two source entries.
- Its destination entry is written with wait + predicted latency (minus
  one, because the table counts down before the next reader sees it).
- Up to 8 instructions dispatch per cycle. A source produced by an older
  instruction of the same group and thread is therefore taken from that
  instruction instead of the table.
- Eight more read ports, one per Cyclone lane, give replayed instructions a
  fresh wait.

**Load latency predictor** (`load_latency_predictor`). Loads get their
latency from a hybrid predictor. At most two loads per dispatch group are
predicted, the first two; later loads are assumed to hit in the L1.

- **LHT**: a PC-indexed last-value table with a 2-bit confidence counter.
  It is used when the confidence is at least 2.
- Otherwise **cache latency propagation** is tried. A per-PC stride address
  predictor guesses the address; if it is confident, the guessed block is
  looked up in two places:
  - the **SILO**, 16 in-flight misses with their return cycle. A hit
    predicts the time remaining until that miss returns.
  - the **miss detection engine**, 1024 three-bit counters of resident L1
    blocks per hashed block address. Zero is a *definite miss* and
    predicts the L2 latency (12).
- Anything else predicts an L1 hit (2 cycles).

The predictor is trained from four port groups: load completions (PC,
address, latency), L1 fills and evictions, and newly started misses.

## Coarse-grain sorting

`coarse_sort_engine` holds sixteen `sort_fifo`s: six of buffering length 1,
four of 5, two of 10, two of 20 and two of 150. A queue of length L holds up
to L instructions and releases each one L cycles after it entered.

On the way in, instructions are taken in program order:

- The wait is rounded **down** to the longest length not above it (waits of
  0 use a length-1 queue). An instruction is therefore never held past its
  predicted time.
- If every queue of that length is full, or was already written this cycle,
  a shorter length is used.
- The first instruction that finds no queue ends the group. `in_count`, the
  accepted prefix, is the dispatch acknowledgement.

On the way out, every queue head whose time has come moves to its thread's
PreIssue Buffer while that buffer has room, longer queues first. Instructions
thus leave the FIFOs out of program order, roughly in predicted issue order.

## PreIssue Buffers, ICOUNT and the Sliding Window

Each thread has a 64-entry in-order **PIB** (`pib`), which takes up to 16
arrivals per cycle and offers its 8 oldest entries.

`icount_select` picks one thread per cycle: the one with the fewest
instructions in the Cyclone queues among those whose PIB is not empty. Ties
rotate. The chosen thread sends as many instructions as there are free
Cyclone lanes, no more than its PIB holds. An empty PIB means that thread
has nothing near issue, so ICOUNT naturally favours threads with instructions
ready to run.

**Sliding Window** (`sliding_window`, one per thread). It watches the
thread's replays per cycle (R_Counter) with two run-length counters:

- `OF_Counter` counts consecutive cycles with more than OF_th = 6 replays.
  At Decr_th = 10 the Decrement flag fires.
- `UF_Counter` counts consecutive cycles with at most UF_th = 2 replays.
  At Incr_th = 5 the Increment flag fires.

A flag clears the counter that raised it. WIN moves as follows:

- It starts *unlimited*.
- The first decrement sets it to 24; later decrements subtract 4, down to
  a floor of 4.
- Increments add 4, and an increment from 24 returns it to unlimited.
- A free-running counter returns every window to unlimited every 10,000
  cycles.

While WIN is finite, ICOUNT skips a thread that already has WIN or more
instructions in Cyclone. It also trims the batch the thread sends to
WIN − count. The `capped` output flags both cases.

## Cyclone switchback queues

This is the part with the most invented detail, because the published
scheduler is described by behaviour rather than by structure.

`cyclone_queue` has **8 lanes**, one per issue slot. Each lane has **100
columns** and two shift registers over them:

- the **countdown queue** moves one column per cycle *away* from execution
  (column 0 → 99);
- the **main queue** moves one column per cycle *toward* execution
  (99 → 0).

Column 0 of the main queue is the head. The head leaves every cycle.

**Entering.** An instruction enters a lane at countdown column 0 with a turn
column `k` taken from its remaining wait (`ready_ts − now` for a new
instruction, the timing table's fresh wait for a replay):

```
k = 0                 if wait <= 2
k = (wait - 2) / 2    otherwise, at most 99
```

**Switching back.** At any column `c >= k` the instruction asks to switch
into the main queue at column `c`. That slot is also where the main-queue
instruction now at `c+1` is heading, and that instruction wins. A refused
request is a **switchback hazard**: the instruction keeps moving out and
tries again one column later, which costs it two cycles at the head. At
column 99 the switch always succeeds, since nothing is further out.

Without hazards, an instruction that enters in cycle t reaches the head in
cycle t + 2k + 2. That is the predicted wait or one cycle earlier, never
later.

**At the head.** The physical-register ready bits (`ready_table`) are read
for both sources:

- If both are ready, the instruction issues.
- If not, it is **replayed**: it re-enters the countdown queue of the *same
  lane* in the same cycle, with a turn column from its re-evaluated wait.

A replay therefore occupies that lane's entry slot. New instructions go only
to lanes whose head is not replaying (`free_lanes`), and they are spread
over those lanes round-robin.

**Occupancy.** Per-thread occupancy (new instructions in, issued ones out)
feeds ICOUNT and the Sliding Window.

The hazard count per cycle is an output. It is the quantity a tornado drives
up.

## Top-level interface and timing (`zephyr_top`)

| Port group | Direction | Meaning |
|---|---|---|
| `disp_valid[8]`, `disp_uop[8]` | in | renamed instructions, a contiguous prefix in program order (may mix threads, but normally one) |
| `disp_count` | out | how many were accepted this cycle (combinational); re-offer the rest |
| `iss_valid[8]`, `iss_uop[8]` | out | instructions issuing this cycle, one per lane |
| `wb_valid[16]`, `wb_preg[16]` | in | physical registers becoming readable; a write-back in cycle t lets a consumer issue in t+1 |
| `ld_upd_*`, `fill_*`, `evict_*`, `miss_*` | in | predictor training from the memory system |
| `now`, `st_*` | out | cycle counter and statistics: replays, hazards, occupancies, PIB fill, WIN, flags, caps, queue chosen per dispatched instruction, predictor source |

An accepted destination register is marked not-ready at the next clock edge.

The shortest path takes 4 cycles. Dispatch is in cycle t. The length-1
FIFO releases in t+1, the PIB offers the instruction in t+2, and it reaches
the Cyclone head in t+4 if its wait is zero and it meets no hazard.

Parameters, with defaults from the published machine: `THREADS` 4,
`ISSUE_W` 8, `CYC_LEN` 100, `PIB_DEPTH` 64. Our own choices are `DISP_W` 8,
`WB_PORTS` 16 and `SLIDING_WINDOW` 1 (0 gives plain Zephyr).

Other sizes:

- 512 physical registers and 64 logical registers per thread;
- timing-table waits of 10 bits, saturating;
- functional-unit latencies 1/5/25 (integer add/mul/div) and 2/10/30 (FP);
- cache latencies 2 (L1), 12 (L2) and 164 (memory).

## Where this RTL departs from, or adds to, the published design

- **Cyclone geometry.** The lane/column layout, the turn-column formula,
  the priority rule for switchback conflicts and the rule that a replay
  takes its lane's entry slot are our reading. The published text gives the
  behaviour (counter-flowing countdown and main queues, conflicts, a ready
  check at the head, replay with timing-table re-evaluation, round-robin
  placement) but not this structure.
- **Shortest FIFOs.** They have length 1, following the machine parameter
  table and the "buffering length of 1" description. The same text also
  calls them "0-slot" queues.
- **FIFO capacity.** It equals the buffering length. When the queues of the
  right length are busy, an instruction falls back to a shorter queue.
  Neither point is specified.
- **Load predictor insides.** The table sizes, the confidence rules, the
  stride address predictor, the counter-based miss detection engine and
  "definite miss → L2 latency" are our choices. Only the structure and
  order (LHT, then SILO and miss detection, else hit) are given.
- **Sliding Window details.** WIN counts the thread's instructions in the
  Cyclone queues (ICOUNT's own count). The 10,000-cycle reset is
  simultaneous for all threads.
- **Known behaviour under a cap.** When a thread's PIB is full and WIN caps
  it, its consumers already in Cyclone can keep replaying while their
  producers wait in the PIB. Throughput then recovers only through WIN
  increments or the periodic reset. In simulation this appeared when the
  stimulus allowed 96 instructions per thread in flight. With a 64-entry
  window per thread it did not.
- **Not built.** Fetch, branch prediction, rename, the ROB and LSQ, the
  caches and the functional units are outside the scheduler. So are the
  Cyclone+ and FLUSH/Replay12 alternatives that the design is compared
  against.

## Verification

Each module has a self-checking testbench that compares the module against
a reference written independently in the testbench. Each one:

- drives random stimulus with `$urandom`;
- counts checks and failures;
- stops with a watchdog;
- prints `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_sliding_window` | counter runs, flags, every WIN transition, the 10,000-cycle reset |
| `tb_timing_table` | waits against a reference ready-time model, group bypass, replay reads |
| `tb_sort_fifo` | exact release cycle, capacity, order |
| `tb_coarse_sort_engine` | queue choice (round-down rule), accepted prefix, never released early, PIB room honoured |
| `tb_pib` | multi-push/multi-pop order, free and count |
| `tb_icount_select` | thread choice, ties, empty PIBs, WIN caps and trims |
| `tb_ready_table` | alloc/writeback priority and read results |
| `tb_cyclone_queue` | exact head-arrival delay for every wait, no loss or duplication, replay and hazard accounting |
| `tb_load_latency_predictor` | each prediction source in turn, then 3,000 random cycles against a reference model of all four parts |
| `tb_zephyr_top` | the whole scheduler at its default size (see below) |

`tb_zephyr_top` runs the full-size scheduler with every parameter at its
default. The testbench models the rest of the core:

- renaming onto 512 physical registers;
- unit latencies;
- direct-mapped L1/L2 models;
- predictor training.

Four synthetic threads run for 11,900 cycles. Thread 0 is a tornado source:
its loads miss unpredictably and all its other instructions depend on them.
It runs alone for the first 2,000 cycles. The testbench checks two things:

- no instruction issues before its operands exist, as tracked from
  completion times in the testbench rather than from the design's ready
  bits;
- every dispatched instruction issues exactly once.

It also requires each mechanism to happen at least once: dispatch stalls,
every FIFO length, replays, switchback hazards, WIN decrements, increments
and caps, the periodic reset, all three predictor sources, and issue from
every thread.

A typical run:

- 24,321 instructions issued (IPC about 2), 2.1 replays per issued
  instruction;
- 65 WIN decrements and 1,251 capped cycles;
- 1,667 LHT, 526 SILO and 173 definite-miss predictions.

To run a testbench with plain Verilator:

```
verilator --binary --assert -Wno-fatal -Irtl -y rtl rtl/zephyr_pkg.sv \
    tb/tb_zephyr_top.sv --top-module tb_zephyr_top --Mdir obj_tb -o sim
./obj_tb/sim
```

Replace `tb_zephyr_top` with any other testbench name. The full-size run
takes a few seconds.

## Workloads of the published evaluation

The published evaluation runs 2- and 4-thread mixes of SPEC 2000 programs on
an 8-issue machine with a 100-column Cyclone and 64-entry PIBs. The mixes are
grouped by how strongly their programs form tornadoes. At its default
parameters the RTL matches those structure sizes and supports up to four
threads, so every mix fits. The programs themselves need a full core and
memory system, which is outside this RTL. The end-to-end testbench uses
synthetic threads instead.
