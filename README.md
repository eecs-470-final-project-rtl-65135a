# Two-thread out-of-order RISC-V core

`cpu` is a simultaneous-multithreading (SMT) processor for RV32IM. It runs two hardware
threads at once and follows the R10K style: registers are renamed onto physical
registers, instructions issue out of order from a reservation station, and they retire in
order from a reorder buffer. Per clock it fetches up to four instructions (two per
thread), dispatches two, and retires up to four (two per thread).

Each thread has its own program counter, return address stack, instruction queue, rename
tables, free list, physical register file, reorder buffer and store queue. The threads
share these parts:

- the instruction cache and the branch predictors;
- the reservation station, two ALUs, a pipelined multiplier and the result buses;
- the load buffer, the data cache and the single memory port.

Both threads start at the reset PC. A program tells them apart with `csrr mhartid`, which
gives 0 or 1. A thread stops when it retires `wfi`, and `halted_o` shows which threads
have stopped.

| Structure | Size |
|---|---|
| Instruction cache | 32 lines x 8 B, direct-mapped (256 B) |
| Victim cache | 4 lines, fully associative (32 B) |
| Prefetch | up to 4 lines (8 instructions) per thread |
| Tournament predictor | 256-entry local (8-bit histories), 256-entry gshare (8-bit history), 32 selectors |
| Branch target buffer | 64 entries, 2-way |
| Return address stack | 8 entries per thread |
| Instruction queue | 16 per thread |
| Rename table, retirement table | 32 per thread |
| Physical registers | 96 per thread |
| Reorder buffer | 64 per thread |
| Reservation station | 16, shared |
| Load buffer | 8, shared |
| Store queue | 8 per thread |
| Data cache | 8 sets x 4 ways x 8 B (256 B), 4 MSHRs |
| Functional units | 2 ALUs, one 4-stage multiplier |
| Result buses | 3 |

The package `cpu_pkg` holds the sizes, the shared types and the structs that travel
between blocks. A physical register tag is `{thread, register number}`. Each thread
numbers its own registers 0 to 95.

## Front end

**Fetch** (`fetch`, one per thread) reads one aligned 8-byte block, which holds two
instructions, from the instruction cache. It picks the next PC by looking at each
instruction as it arrives:

- a conditional branch follows the tournament predictor;
- `jal` jumps to its target straight away;
- `jalr` with `rd = x0` counts as a return and pops the return address stack;
- any other `jalr` counts as a call and uses the branch target buffer;
- calls also push their return address.

Fetch stops after a predicted-taken instruction or a `wfi`. Otherwise the next PC is the
next block.

**Instruction cache** (`icache`) serves both fetch units in the same cycle. A line pushed
out of the main array goes to the victim cache. On a miss the cache requests the line.
It then keeps prefetching the following lines for that thread, up to four lines ahead of
the line being fetched. It skips lines already present and stops before a line that would
land in the slot that thread is fetching from. When
both threads need memory, their turns alternate. Each thread's own misses go ahead of its
prefetches.

**Prediction.** In the `tournament_bp`:

- the local side has a table of 8-bit histories, indexed by PC, which selects a 2-bit counter;
- the global side is gshare: the PC XORed with an 8-bit history, one history per thread;
- a selector table picks between the two;
- counters start weakly not-taken (local) and weakly taken (gshare), and the selectors start weakly global;
- all three train when a branch retires, and a selector only moves when the two sides disagree.

The `btb` trains on retired `jalr` instructions. The `ras` is a circular stack.

**Instruction queue** (`inst_queue`) is a 16-entry FIFO per thread. It takes two
instructions per cycle and gives up to two.

## Decode and dispatch

Four `decoder`s look at the two oldest instructions of each queue.

- `csrr mhartid` becomes `addi rd, x0, <thread>`.
- `lr.w` decodes as a load, and `sc.w` as a store that also writes a result.
- Divide instructions are not supported; they decode as no-ops.

The `dispatch_arbiter` picks up to two of the four candidates. It tries each thread's
oldest first, then each thread's second. Within a thread it stays in order: it stops at
the first instruction that lacks space in the reorder buffer, reservation station, load
buffer, store queue or free list. When both threads have work, the first pick alternates
between them every cycle.

## Rename and registers

Each thread has:

- a `rat` that renames two instructions per cycle, with the second seeing the first's new destination;
- a `rrat` that records the retired mapping;
- a bit-vector `freelist`;
- a 96-entry `prf` with a ready bit per register.

Results are written into the register file of the thread named in their tag.

## Issue and execute

The reservation station (`rs`) holds ALU, multiply and load instructions. Stores never
enter it. Entries wake up when a result bus carries their source tag. They also wake on
the tags of ALU instructions issued in the same cycle (early tag broadcast), so dependent
ALU instructions issue in back-to-back cycles. Two selectors each pick the lowest ready
entry for an ALU: one takes the lowest, the other the next. A third selector feeds the
multiplier. Operands come from the register files, with a bypass from the result buses.

- `alu` (two of them) does RV32I arithmetic and resolves branches and jumps. It flags a
  misprediction when the real next PC differs from the one fetch predicted. Loads use an
  ALU to form their address, which goes to the load buffer.
- `mult` is a 4-stage pipeline for `mul`, `mulh`, `mulhsu` and `mulhu`. It stalls when
  its result cannot get onto a bus.
- `cdb` drives three result buses. Buses 0 and 1 belong to the ALUs. Bus 2 is shared, with
  rotating priority, by the multiplier, the load buffer and the two threads' `sc.w` results.

## Loads, stores and locks

The **load buffer** (`lb`) holds eight loads from either thread. Each load records the
store-queue tail of its thread at dispatch, so it knows which stores are older. Once its
address arrives, the load asks the store queue. The store queue answers in one of three
ways:

- **wait**: an older store still lacks its address, or an older store overlaps the load but cannot supply all its bytes;
- **forward**: the youngest older store that covers the load supplies the data;
- **no match**: the load reads the data cache.

A miss joins or opens an MSHR, and the load completes when the line is broadcast.

The **store queue** (`sq`) keeps one queue per thread. It takes a store's address and
data from the register file or the result buses. A store writes the data cache only when
it has retired and reached the head, so stores drain in program order.

The **data cache** (`dcache`) is 4-way set associative, write-back and write-allocate,
with tree pseudo-LRU replacement.

- A store miss records its bytes in the MSHR.
- When the line returns, the pending stores are merged into it, it is broadcast to waiting loads, and it is written into the array.
- Dirty lines that are pushed out wait in a small write-back queue, which uses the memory port first.

The **lock** (`lock`) has one reservation per thread.

- `lr.w` reserves its word when it reads the cache.
- A store by the other thread to that word cancels the reservation. So does the thread's own `sc.w`, and so does a pipeline flush of the thread.
- `sc.w` runs when it is the oldest instruction of its thread. It writes 0 and stores only if the reservation still holds; otherwise it writes 1.
- To keep the lock sequence correct, an `lr.w` waits for all older stores of its thread, and loads never pass an older `sc.w`.

## Retire and recovery

Each reorder buffer (`rob`) retires up to two finished instructions per cycle. It stops
after a control-flow instruction, a store or `wfi`. Retirement:

- updates the retirement table;
- returns the replaced physical register to the free list;
- trains the predictors;
- marks stores as committed.

When a mispredicted instruction retires, only its own thread recovers:

- the rename table and free list are rebuilt from the retirement table;
- all of the thread's remaining instructions are removed from the instruction queue, reservation station, load buffer, store queue (uncommitted part), ALU inputs and multiplier;
- fetch restarts at the correct PC.

The other thread keeps running.

## Memory port

The `mem_arbiter` gives the single memory port to the data cache first and to the
instruction cache otherwise. The memory answers each request in the same cycle with a tag
from 1 to 15, or with 0 if it refuses. The data arrives later under that tag. The
testbench model answers after 13 cycles.

## Verification

Every block has its own self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The larger ones:

- `tb_dcache` does 600 random loads and stores over 48 lines against the memory model and compares with a reference copy of memory.
- `tb_icache` runs two fetch streams whose lines collide and compares every hit with memory. It also checks that the first miss takes at least the 13-cycle memory latency.
- `tb_sq` drives the store queue directly: forwarding, waiting on unknown or partly covering stores, in-order draining after commit, flush, and both outcomes of `sc.w`.
- `tb_rob` runs the reorder buffer against a queue model with random dispatch, out-of-order completion and mispredictions. It checks every retirement and flush, and that two instructions retire in one cycle.
- `tb_fetch` plays the cache and predictors around one fetch unit. It steps it through branches, calls, returns, stalls, `wfi` and a redirect.
- `tb_rs` checks wake-up, back-to-back issue through early tag broadcast, dual ALU issue, the multiplier stall and a one-thread flush.
- `tb_lb` plays the ALUs, store queue and data cache around the load buffer. It covers hits, byte extension, wait and forward answers, two misses served by one fill, the `lr.w` reservation and a flush.

`tb_cpu` builds the core with its default sizes and loads a two-thread program into the
memory model:

- thread 0 writes and sums an array, multiplies, reloads a value that is still waiting in the store queue, and makes calls through `jal` and `jalr`;
- thread 1 sums bytes spread over many cache lines;
- both threads then increment a shared counter 20 times each under an `lr.w`/`sc.w` spin lock.

The test checks 51 memory values, including a final counter of 40. It also counts each
mechanism and fails if one never happened: mispredictions, RAS pops, BTB hits,
store-to-load forwarding, load misses, MSHR merges, write-backs, prefetches, victim hits,
successful `sc.w`, dual-thread dispatch, dispatch stalls, back-to-back issue and
multiplies. The run takes about a thousand cycles at a CPI near 1.05.

`tb/rv_asm.sv` holds small instruction encoders, and `tb/mem_model.sv` is the memory model.

## Simulating

All RTL is in `rtl/` (`cpu_pkg.sv` first, it holds the package). The testbenches need
`tb/rv_asm.sv` (a package) and, for the full core and the two caches, `tb/mem_model.sv`.
With Verilator 5, for example:

    verilator --binary --timing -Irtl -Itb rtl/cpu_pkg.sv tb/rv_asm.sv tb/tb_cpu.sv --top-module tb_cpu
    ./obj_dir/Vtb_cpu

Each testbench ends with one line `TB_RESULT checks=N failures=M`. Nothing in the RTL
depends on the simulator; the memory model is the only part that is not synthesizable.

Verilator reports "circular combinational logic" (UNOPTFLAT) on a few signals of `cpu`.
These are requests and answers between blocks that are computed in one `always_comb`
block each, for example load buffer to store queue and back. No bit depends on itself.
The comment at the top of `rtl/cpu.sv` lists them.

## Where this design goes beyond or differs from the original description

- The original draws a single store queue. Here each thread has its own 8-entry queue, because
  stores drain in order per thread and recovery flushes one thread.
- Only the main block sizes, the predictor organisation and the cache organisation were
  specified. The following are this design's own choices:
  - return-stack depth, multiplier stages, number of MSHRs, write-back queue, result-bus count and sharing;
  - retire-time recovery;
  - all encodings.
- Branch recovery happens when the mispredicted instruction retires, not when it executes.
- The original's memory block is 8 bytes and its latency is 13 cycles; the memory model
  assumes 64 KiB, as a course-style memory.
- The lock rules at a flush and after `sc.w` (both end the reservation) are added for
  correctness.

## Not implemented

- Division and remainder instructions.
- CSRs other than `mhartid`, exceptions and interrupts.
- A separate prefetch-buffer storage: prefetched lines go straight into the instruction cache.
- The exact entry layout of the branch target buffer is this design's own, so its storage
  is larger than a minimal one.
