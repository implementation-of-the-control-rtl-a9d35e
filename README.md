# GT — the global control tile of a block-atomic tiled processor core

A tiled ("TRIPS-style") processor core is built from many small tiles:
execution tiles (ETs), register tiles (RTs), data-cache tiles (DTs) and
instruction-cache tiles (ITs). No tile sees the whole machine, and there
are no global wires. One tile is different: the **global control tile
(GT)** is the single master that decides what the core does next. It fetches
blocks of instructions, allocates the execution resources for them, watches
them complete, commits or flushes them, and frees their resources. It does
all of this by sending short commands on point-to-point control networks.
The other tiles act on those commands independently and report back on a
status network.

This repository holds synthesizable SystemVerilog for the GT: its fetch
unit, ITLB, I-cache directory, refill unit, retirement table and exit
predictor, joined in the top module `gt`. The slave tiles are not part of the
RTL. Behavioural models of them are in the end-to-end testbench.

## Blocks, frames and threads

The unit of work is a **block** of up to 128 instructions. It is stored as
five 128-byte chunks: one header chunk and four instruction chunks. A block
is 640 bytes, and the next block in memory starts 640 bytes later. A block
executes atomically. It is fetched, executed and committed as a whole.
Exceptions are taken at block boundaries.

The execution resources are split into eight **frames**, each holding one
block in flight. The GT keeps the free list of frames and sends the frame
number with every fetch, so no other tile needs to track frames.

There are two modes, chosen by the `smt` input:

| mode | threads | frames per thread | frames used |
|---|---|---|---|
| single-threaded (`smt=0`) | thread 0 only | up to 8 (7 speculative) | 0..7, as a ring |
| SMT (`smt=1`) | 4 | up to 2 (1 speculative) | thread t owns 2t and 2t+1 |

Inside a thread, frames are allocated in ring order. A thread's blocks are
therefore ordered by ring position, counted from the thread's oldest frame.
Changing the mode needs an idle core.

## The networks

All networks are one message per cycle, with no flow control, so nothing
ever stalls on a network. The GT registers every message it sends. Formats
are in `rtl/gt_pkg.sv`:

| network | direction | message | used for |
|---|---|---|---|
| GRN | GT → ITs | `grn_msg_t`: thread, physical block address | start the *fill* step of a refill |
| GDN | GT → ITs | `gdn_msg_t`: frame, thread, virtual and physical address, I-cache set/way, `update`, `from_fill`, header bits | fetch and dispatch a block; sent in fetch slot 0 |
| GCN | GT → RTs/DTs/ETs | `gcn_msg_t`: commit frame, flush frame mask | commit and flush |
| GSN | tiles → GT | `gsn_msg_t`: register/store completion (with exception flag), register/store commit acknowledgements, refill completion (thread, header bits) | status |
| OPN | ETs → GT | `opn_br_t`: frame, next-block address | branch result of a block |

The GT does not contain the network routers, and it does not contain the
operand-network router that sits inside the real tile. The ports of `gt` are
the messages at the GT's end of each network.

## Fetch: from a predicted address to eight dispatch slots

Fetch is the most intricate part of the design, because it overlaps three
activities for consecutive blocks: predicting the next block,
translating and looking it up, and streaming the current block out.

A block fetch takes eight cycles on the GDN, called slots 0 to 7. Each slot
carries one 128-bit share of each instruction chunk. The GDN command goes
out in slot 0. A new block can begin only after slot 7, so the peak rate is
one 128-instruction block every 8 cycles, or 16 instructions per cycle.

The pipeline for two consecutive blocks A and B of one thread, counted from
A's first prediction cycle, is:

```
cycle   0   1   2   3   4   5   6   7   8   9  10  11  12  13
A     pred pred pred
               asel tlb  h/m  s0  s1  s2  s3  s4  s5  s6  s7
B                         pred pred pred  -   -  asel tlb h/m  s0
```

- **pred** — the exit predictor takes 3 cycles.
- **asel** (address select) — picks a thread and its address.
  - When the fetch engine is idle, asel shares the last prediction cycle.
  - Otherwise it waits until the engine is in slot 5 or later. That places
    the next slot 0 right after slot 7.
- **tlb** — the ITLB translation and the I-cache directory read (the set
  index comes from the virtual address).
- **h/m** (hit/miss) — compares the tag. On a hit, it allocates the thread's
  next frame and sends the GDN command.

After a block is allocated, its thread asks the predictor for the block that
follows it. The prediction thus runs during the current block's fetch slots,
and the next block is usually ready when slot 7 ends.

Per-thread state lives in the fetch unit: the PC and a small state machine
(off, ready, front end, waiting for prediction, waiting for refill,
faulted). Threads take turns round robin at address select.

**Stalls and bubbles.**

- An update of the exit predictor takes priority over a prediction. An
  update that starts in a block's slot 0 pushes the next prediction back by
  up to three cycles, and the next slot 0 comes one cycle late.
- A block that finds no free frame for its thread holds the hit/miss stage
  until a frame is deallocated.

**Redirects.**

- A misprediction is resolved in the retire unit. In that same cycle the
  fetch unit drops everything the thread had in flight:
  - the pending prediction;
  - the blocks in the front end;
  - the fetch slots of a flushed frame.
- It also selects the corrected address in that cycle, so the new slot 0
  comes three cycles after the flush.

**Faults.**

- An ITLB miss, or a segment without execute permission, stops the thread.
- The fault is reported on `fault_*` once all older blocks of the thread
  have left the machine.

## Refills and the fill buffer

A directory miss in the hit/miss cycle allocates the thread's refill entry.
The GRN command leaves in the next cycle. Each IT then fetches its chunk from
secondary memory into a **fill buffer**, and the ITs report completion with
one GSN message. That message returns the header bits as well. In the cycle
after the completion arrives, the block is allocated and fetched. The GDN
command tells the ITs to take the instructions from the fill buffer and to
write them into the I-cache (`update`). In the same cycle the directory entry
is installed in the way picked at miss time. A finished refill has priority
over new blocks for the hit/miss stage.

Two more behaviours:

- **Uncacheable segments.** A block in an uncacheable segment is fetched from
  the fill buffer without the update step, and it is never entered in the
  directory.
- **Cancelled refills.** A refill whose thread is redirected is cancelled. The
  entry stays busy until its completion arrives, and is then dropped without
  an update. This way a late completion can never be mistaken for a newer
  refill.

The refill unit holds one entry per thread, so four refills can be
outstanding at most.

## The retirement table: completion, commit, flush, deallocation

The retirement table has one entry per frame, not per instruction. Each entry
holds:

- the block and predicted-next addresses;
- the resolved next address;
- completion flags for registers, stores and the branch;
- commit-acknowledgement flags for registers and stores;
- exception and flushed flags;
- the thread, and the predictor history used for the block's prediction.

"Oldest" and "youngest" are not stored. They follow from two pointers per
thread: its oldest frame and its next frame to allocate.

- **Completion.** The RTs send one GSN message when all of a block's
  register outputs exist, and the DTs send one for its stores. The branch
  result arrives on the OPN.
- **Misprediction.** When the branch result differs from the predicted next
  address:
  - every younger block of the thread is flushed in the same cycle;
  - fetch is redirected;
  - a predictor repair is queued;
  - the block's own predicted address is corrected, so that it can commit.
- **Exception.** A completion message with the exception flag is acted on
  once the block is the oldest in its thread. It and all younger blocks are
  flushed, and `exc_*` reports it.
- **Commit.** The pipeline runs as follows.

  | cycle | event |
  |---|---|
  | 0 | last completion arrives |
  | 1 | commit detected |
  | 2 | GCN commit and predictor update sent |
  | X | both acknowledgements have arrived |
  | X+1 | frame deallocated |

  A block may commit once it is complete, correctly predicted and free of
  exceptions, and once every older block of its thread has had its commit
  sent. One commit goes out per cycle. Commit pauses while the predictor's
  update queue is nearly full.

  When a thread is stopped, its blocks that never received a prediction are
  marked "no successor". They commit without the prediction check, because
  no next block will be fetched to compare against.
- **Flush.** The GCN flush message carries a frame mask and leaves one cycle
  after the flush decision. Flushed entries are cleared in the next cycle.
  One flush is taken per cycle: the lowest thread first, then its oldest
  candidate.

## Exit predictor

The exit predictor predicts the address of the next block of a thread. It is
a tournament predictor:

- a **local** table of 1024 next-block targets, indexed by block address;
- a **global** table of 1024 targets, indexed by block address XOR the
  thread's global history;
- 2048 two-bit **chooser** counters, indexed by the history.

Every entry has a valid bit. A block with no entry is predicted to fall
through to the next 640-byte block. The total state is 75,776 bits, which is
74 Kbit.

It performs three operations. They never overlap.

| operation | cycles | what it does |
|---|---|---|
| predict | 3 | read the tables, choose, advance the thread's history speculatively |
| update | 3 | train with a committed block's real successor (updates queue in an 8-deep FIFO) |
| repair | 2 | rebuild a thread's history after a misprediction |

When idle, the predictor serves a repair first, then an update, then a
prediction.

## ITLB and I-cache directory

**ITLB.** Sixteen segment registers, written through `tlb_wr_*`. Each
register holds:

- a valid bit;
- the segment size as a power of two, from 64 KB to 1 TB;
- virtual and physical bases aligned to that size;
- read and execute permissions;
- an L1-cacheable bit.

A lookup is combinational, and the lowest matching register wins.
Addresses are 40 bits.

**I-cache directory.** 64 sets × 2 ways, which is 128 entries. Each entry
holds a valid bit, a physical tag and header bits, and each set has one LRU
bit. The directory is indexed with the virtual address and tagged with the
whole physical block address. The read is registered: it happens in the TLB
cycle, and the tag comparison happens in the hit/miss cycle. Replacement
picks an invalid way first, otherwise the LRU way.

## Where this RTL goes beyond or departs from its source

The overall structure, the sizes and the cycle numbers of the fetch, refill
and commit pipelines follow the published description of this control unit.
The following are this design's own choices, where the description says
nothing or too little:

- **Formats and sizes.** All message formats, the 40-bit address width, the
  8-bit header field and reset behaviour.
- **Predictor organisation.** The description gives only the tournament
  structure, the operation latencies and the 74-Kbit size.
  - The table organisation and history length (11 bits, two bits shifted in
    per block) are this design's.
  - So are the FIFO for updates and the repair rule.
- **Commit ordering.** The description says a block commits when all
  previous blocks "have been committed". Here it is enough that their commit
  has been sent, which lets commits pipeline one per cycle.
- **Misprediction detection.** The retire unit compares a block's branch
  result with its predicted successor. Flush and redirect happen in the
  cycle the result arrives.
- **Exceptions** are taken only at the oldest block of a thread.
- **Stopping a thread.** Blocks of a stopped thread that have no predicted
  successor commit without the prediction check.
- **Fault reporting.** ITLB faults wait until the thread has no blocks in
  flight, and are reported as thread faults.
- **Frame mapping.** The frame-to-thread mapping in SMT mode
  (frames 2t, 2t+1) and round-robin thread selection.
- **Cancelled refills** stay busy until their completion arrives.
- **Not built.** These appear in the top's ports or only as testbench
  models:
  - the network routers;
  - the operand-network router inside the tile;
  - the slave tiles;
  - secondary memory.

  The end-to-end latencies of a block (dispatch, execution, commit in the
  slave tiles) therefore depend on the tile models. The GT's own share is
  what the RTL fixes:
  - fetch slot 0 five cycles after the first prediction cycle;
  - the commit command two cycles after the last completion;
  - deallocation one cycle after the last acknowledgement;
  - a new fetch three cycles after a flush.

## Files

| file | contents |
|---|---|
| `rtl/gt_pkg.sv` | sizes, types, message structs, frame-ring helpers |
| `rtl/gt.sv` | top: the four sub-units wired together |
| `rtl/fetch_unit.sv` | PCs, thread states, fetch pipeline; instantiates `itlb` and `icache_dir` |
| `rtl/itlb.sv` | segment-register ITLB |
| `rtl/icache_dir.sv` | 2-way LRU I-cache directory |
| `rtl/refill_unit.sv` | pending refills, GRN |
| `rtl/retire_unit.sv` | retirement table, commit, flush, deallocation, GCN |
| `rtl/exit_predictor.sv` | tournament next-block predictor |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`, has a watchdog and
runs with all parameters at their defaults. The simulator is two-state, and
state that is not reset may start random. For example:

```
verilator --binary --timing --assert -Irtl rtl/gt_pkg.sv rtl/gt.sv rtl/fetch_unit.sv \
  rtl/itlb.sv rtl/icache_dir.sv rtl/refill_unit.sv rtl/retire_unit.sv \
  rtl/exit_predictor.sv tb/gt_tb.sv --top-module gt_tb -o sim
obj_dir/sim +verilator+rand+reset+2
```

`gt_tb` is the end-to-end test. It models the slave tiles, runs a looping
program on thread 0 in single-threaded mode, then runs an exception and an
ITLB fault, then runs four threads in SMT mode. The tile models draw their
branch, completion, acknowledgement and refill latencies at random, and one
block of the loop takes much longer than the rest, so that all eight frames
fill up.

- **What it checks.**
  - Every committed block must be the architectural successor of the
    previous committed block of its thread, so no wrong-path block can ever
    commit.
  - Commit and deallocation timing.
- **What it requires.** Each of these must occur at least once:
  - refill, update fetch, uncached fetch and hit fetch;
  - commit and deallocation;
  - misprediction redirect and GCN flush;
  - predictor update, repair, and a prediction delayed by an update;
  - all eight frames full;
  - back-to-back fetches, and a fetch bubble behind a predictor update;
  - exception and ITLB fault.

The unit testbenches check the cycle numbers of each pipeline directly:

- `fetch_unit_tb`: refill command timing, fetch after refill,
  flush-to-fetch, 8-cycle spacing, and the one-cycle bubble;
- `retire_unit_tb`: commit pipeline, flush and redirect;
- `exit_predictor_tb`: operation latencies and priority.
