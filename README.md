# Two-wide out-of-order RV32IM core with early branch recovery

This is a synthesizable SystemVerilog model of a superscalar, out-of-order
RISC-V processor for the RV32IM instruction set. Up to two instructions per
cycle are fetched, renamed, dispatched and committed. In between, they
execute out of order in four functional units: ALU, branch, multiply/divide
and load/store.

Two ideas shape most of the design:

- **Early branch resolution.** A mispredicted branch is repaired as soon as
  the branch unit executes it, not when it reaches the head of the reorder
  buffer. Every unresolved branch owns one bit of a 4-bit *branch mask*.
  At dispatch the core takes a checkpoint of all speculative state under
  that bit. When the branch resolves, the bit is either cleared everywhere
  or used to kill exactly the wrong-path instructions and to restore the
  checkpoint.
- **A split load/store queue with byte-level forwarding.** Loads and stores
  get queue entries at dispatch and compute their addresses out of order.
  A load reads the bytes it needs from older stores in the store queue,
  fully or partly, and goes to the data cache for the rest. Stores change
  memory only after they commit.

Around the core are a 2-way instruction cache with a next-line prefetcher,
a 4-way write-back data cache, and a line adapter. The adapter moves
256-bit cache lines to and from an external DRAM port as four 64-bit beats.

## Pipeline at a glance

```
 fetch stage 1 (PC)  ->  I-cache  ->  fetch stage 2 (bundle, GShare, RAS, jal)
        ^  redirect                                   |
        |                                     instruction queue (8 bundles)
        |                                             |
        |                         decode x2, rename (RAT, free list), branch mask
        |                                             |
        |            +-------------+-------------+----+--------+
        |         ALU queue     BRU queue     MDU queue     MEM queue   (8 each)
        |            |             |             |             |
        |         register read (64-entry PRF) + bypass from the result buses
        |            |             |             |             |
        |           ALU           BRU          MUL/DIV      AGU -> LDQ/STQ -> D-cache
        |            |             |             |             |
        +------------+---- branch resolution broadcast       |
                     |             |             |             |
                 result bus 0  result bus 1  result bus 2  result bus 3
                     +-------------+------+------+-------------+
                                          |
                         reorder buffer (32) -> commit x2, RRAT, free list
```

The table below gives each file's role. One module per file:

| File | Role |
|---|---|
| `ooo_pkg.sv` | sizes, shared structs (`uop_t`, `iss_t`, `cdb_t`, `br_t`), mask helper functions |
| `ooo_cpu.sv` | top level: wires everything, register read and bypass, commit trace |
| `fetch.sv`, `gshare.sv`, `ras.sv`, `icache.sv`, `instr_queue.sv` | front end |
| `dispatch.sv`, `decoder.sv`, `rat.sv`, `free_list.sv`, `br_mask_alloc.sv`, `ready_table.sv` | decode, rename, dispatch |
| `issue_queue.sv`, `prf.sv`, `alu.sv`, `bru.sv`, `mdu.sv` | scheduling and execution |
| `lsu.sv`, `dcache.sv`, `cacheline_adapter.sv` | memory system |
| `rob.sv`, `rrat.sv` | in-order commit |

## Front end

Fetch has two stages:

1. **Stage 1** holds the PC and asks the I-cache for it. It assumes the next
   PC is sequential: PC+8, or PC+4 if the second word would fall in the next
   cache line.
2. **Stage 2** gets the I-cache's answer a cycle later: one or two words, and
   a flag saying whether the second word is valid. From these it builds a
   bundle and makes the prediction:
   - conditional branches use the GShare predictor;
   - `jal` targets are computed on the spot;
   - a return (`jalr x0, 0(ra|t0)`) pops the 2-entry return address stack;
   - a call (`jal`/`jalr` with rd = ra or t0) pushes it.

   If the predicted next PC differs from what stage 1 assumed, stage 1 is
   redirected, which costs one bubble.

Only one direction prediction is made per cycle. Conditional branches and
`jalr` are therefore *serializing*: in slot 0 they end the bundle, and in
slot 1 they are held back to start the next bundle. A `jal` may sit in
either slot.

The exception is AUIPC-`jalr` fusion. Suppose slot 0 is `auipc rd, imm20`
and slot 1 is a `jalr` whose base register is that same `rd`. This is the
usual far call or far jump. The target is then known exactly in fetch:
`pc0 + (imm20 << 12) + imm12`. So the `jalr` stays in slot 1 and is
predicted taken to that address, and it pushes the RAS if it is a call.
The pair fuses only when both halves arrive in the same bundle. A `jalr`
that is neither fused nor a return is predicted not-taken and resolved by
the branch unit.

GShare works as follows:

- 9 bits of global history XOR PC[10:2] index 512 two-bit counters.
- Each counter has a valid bit, so an entry never trained predicts
  not-taken.
- The first training sets an entry to weakly taken or weakly not-taken.
- History is updated speculatively in stage 2 and trained by the branch
  unit.

Every fetched slot carries the history it saw and the RAS pointer and top
after its own push or pop. That is what dispatch checkpoints for a branch.

A backend redirect does four things:

- sets the PC;
- restores the history and RAS from the branch's checkpoint;
- flushes the instruction queue;
- sets an epoch bit to the opposite of the tag of the last I-cache request,
  so that an answer still in flight is thrown away. Because the I-cache
  holds at most one request, this stays correct even after two redirects
  in consecutive cycles.

## Rename and dispatch

The 32 architectural registers map onto 64 physical registers:

- **RAT:** 4 read ports and 2 write ports. Reset maps x*i* to p*i*, and x0
  is never renamed.
- **Free list:** a circular FIFO holding the other 32 registers.
- **RRAT:** the retirement map. At commit, each destination's previous
  physical register goes back to the free list.
- **Ready table:** one bit per physical register, cleared at rename and set
  by wakeups.

Slot 1 of a bundle reads slot 0's new register when it depends on slot 0.

Dispatch is *all-or-nothing per bundle*. Both instructions go in one cycle,
or the bundle waits. To go, there must be room for the whole bundle in each
of these:

- the ROB and the free list;
- each issue queue the bundle needs;
- the LDQ and STQ;
- for a branch or `jalr`, a free branch-mask bit.

When the mask bits run out, this is the structural hazard the design
accepts: the bundle waits until a branch resolves. Nothing is dispatched in
the cycle a misprediction is broadcast.

## Branch masks and recovery

This is the part of the core that touches everything else.

**Allocation.** A branch or `jalr` takes the lowest free bit of the 4-bit
mask as its *tag*. In the same cycle the following are checkpointed under
that tag:

| State | Where it is saved |
|---|---|
| RAT (a full copy) | `rat.sv` |
| free-list read pointer | `free_list.sv` |
| ROB tail | `rob.sv` |
| STQ tail | `lsu.sv` |
| global history, RAS pointer and top | `br_mask_alloc.sv` |

Every instruction dispatched after the branch carries the set of live tags
(its *branch mask*). This covers ROB entries, issue-queue entries, the
functional-unit pipeline registers, and LDQ/STQ entries.

**Resolution.** The branch unit executes a branch one cycle after it
issues. It then drives a `br_t` broadcast for that cycle, combinationally:
valid, mispredict, the one-hot bit and the tag. Every structure applies two
helper functions from the package:

- `bm_upd(mask, br)` clears the resolved bit. It is applied on a correct
  prediction and on a misprediction alike.
- `bm_killed(mask, br)` is true for an entry whose mask holds the bit of a
  mispredicted branch. Such an entry is dropped in the same cycle. This
  covers issue queues, functional-unit input registers, LDQ/STQ entries, and
  a load whose cache answer is still on its way.

On a misprediction:

- the RAT, free-list head, ROB tail and STQ tail snap back to the tag's
  checkpoint;
- fetch restarts at the correct target with the saved history and RAS state;
- the branch's own tag and the tags of all younger branches become free
  again.

Checkpoints of younger branches must not keep the resolved bit, so the
allocator also clears it from every stored checkpoint mask. Branches may
resolve in any order. An older branch's misprediction removes younger
branches without waiting for them.

**What stays simple.** Registers freed by commits after a checkpoint stay
free when it is restored, since only the free-list read pointer is saved.
The entry below the RAS top is not restored.

## Scheduling, wakeup and bypass

Each functional unit has its own 8-entry issue queue:

- Each cycle, the queue picks the lowest-numbered entry whose two operands
  are ready.
- Register values are read from the physical register file. That file has
  ten read ports: two per queue, plus two for the commit trace.
- Values are also bypassed from the four result buses in the same cycle.
- Fast producers wake up their dependants early:
  - ALU and branch-unit results wake dependants *when the producer is
    selected*, so a dependant can issue in the very next cycle and catch the
    value on the bypass.
  - Multiply/divide and load results wake dependants when they appear on
    their result bus.

Latencies:

| Unit | Latency |
|---|---|
| ALU | 1 cycle |
| Branch unit | 1 cycle |
| Multiply | 2 cycles |
| Divide | 34 cycles (radix-2, not pipelined; RISC-V divide-by-zero and overflow results) |
| Load | AGU cycle, plus the cache or forwarding time |

## Load/store unit

There are two 8-entry queues:

- **Load queue (LDQ):** a load takes any free slot.
- **Store queue (STQ):** a circular buffer in program order.

At dispatch, a load records which STQ entries are older than itself. That
includes a store in slot 0 of the same bundle.

The AGU stage computes the address and a byte mask (byte, half or word),
and fills the queue entry. For a store it also tells the ROB the store is
done.

Loads are conservative. A load may go only when *every* older store knows
its address. The LSU then looks at the older stores to the same word. For
each byte the load needs, it takes the byte from the youngest older store
that writes it. After that:

- If all bytes are covered, the load completes without the cache (*full
  forwarding*).
- Otherwise the cache is read, and the forwarded bytes are merged into the
  answer (*partial forwarding*).

Stores are written only after commit:

1. When the ROB head is a store, the ROB raises `store_commit_req`.
2. The LSU writes the STQ head to the D-cache.
3. The LSU returns `store_commit_ack` once the cache has answered.
4. Only then does the store retire.

The LSU keeps one cache request outstanding, with stores first. Each request
carries an ID: the LDQ index, or a store flag. A squashed load's answer is
discarded.

## Caches and the memory port

**I-cache.**

- 2-way, 16 sets of 256-bit lines.
- One bit per set names the way to replace next.
- A hit answers the next cycle with the word at the PC, the following word,
  and a flag saying whether the second word is in the same line.
- After a demand miss, the next line becomes a prefetch target. It is
  fetched into a one-line buffer when the memory port is free. A later
  miss that hits the buffer installs the line from there.

**D-cache.**

- 4-way, 16 sets of 256-bit lines, write-back.
- Valid and dirty bit per line; 3-bit tree pseudo-LRU per set.
- Byte-masked writes.
- A hit answers the cycle after the request, returning the request's ID.
- On a miss, a dirty victim is copied to a one-line writeback buffer and
  written out, then the new line is read.
- The cache serves **one miss at a time**. See the departures below.

**Cacheline adapter.** It connects both caches to a DRAM port with 64-bit
beats:

- The I-side has one read outstanding.
- The D-side pushes tagged reads and writebacks into a small queue. Its
  reads wait in a 4-entry table keyed by line address.
- The two sides are granted in round-robin order.

DRAM port protocol (this design's own choice):

- **Read:** one cycle with `dram_read` and `dram_ready` high. The data comes
  back later as four consecutive `dram_rvalid` beats, tagged with the line
  address on `dram_raddr`.
- **Write:** four beats on `dram_write`. A beat advances when `dram_ready`
  is high.

## Commit

The ROB has 32 entries. It allocates two per cycle and commits up to two per
cycle, in order, when they are done. A store commits alone, after its
acknowledgement.

The top brings out a commit trace for each slot:

- `commit_valid`, `commit_pc`, `commit_rd`, `commit_we`;
- `commit_data`, the value written to rd.

It also brings out one-cycle event pulses (`ev_*`) for performance counting:

- branches and mispredictions;
- two-wide dispatch and two-wide commit;
- full and partial forwarding;
- I-cache misses and prefetch hits;
- D-cache misses and writebacks;
- branch-mask stalls;
- early wakeups.

## Parameters

Sizes live in `ooo_pkg.sv`. Module-local sizes are parameters with the
defaults shown.

| Name | Default | Where |
|---|---|---|
| `NUM_PREGS` | 64 | package |
| `ROB_DEPTH` | 32 | package |
| `BR_MASK_W` | 4 | package |
| `LDQ_DEPTH`, `STQ_DEPTH` | 8, 8 | package |
| `GHR_W` | 9 | package |
| `RAS_DEPTH` | 2 | package |
| `LINE_BITS` | 256 | package |
| I-cache `SETS`/`WAYS` | 16 / 2 | `icache` |
| D-cache `SETS`/`WAYS` | 16 / 4 | `dcache` |
| issue queue `DEPTH` | 8 | `issue_queue` |
| instruction queue `DEPTH` | 8 bundles | `instr_queue` |
| `RESET_PC` | 0 | `ooo_cpu` |

The following are given by the original design:

- 64 physical registers and a 32-entry ROB;
- a 4-bit mask;
- 8-entry LDQ and STQ;
- 9-bit history and a 2-entry RAS;
- 256-bit lines with 2-way and 4-way associativity;
- two-wide fetch, dispatch and commit.

The numbers of sets, the queue depths, the latencies and all handshakes are
this design's own choices.

## Departures from the original design

- **D-cache:** the original data cache is non-blocking. Its miss-status
  registers merge requests to a line that is already missing, and it answers
  waiting requests by ID. Here the cache handles one miss at a time. The LSU
  issues one request at a time to match, so memory-level parallelism is
  lower.
- **LSU request tracking:** the original has a table of outstanding requests.
  Here there is a single outstanding request, identified by the LDQ index or
  a store flag.
- **`jalr` targets:** the original fuses AUIPC-`jalr` "in some cases"
  without saying which. Here only a pair in the same fetch bundle fuses.
  Any other non-return `jalr` is predicted not-taken.
- **Multiply/divide:** one multiply/divide unit with one issue queue. Earlier
  versions of the original had separate multiply and divide units.
- **PHT storage:** a flip-flop array. The original uses an SRAM with a
  flip-flop valid array.
- **Not supported:** CSRs, exceptions and interrupts. `fence`, `ecall` and
  `ebreak` execute as no-ops. Misaligned loads and stores are not
  supported.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- compares against values computed independently, such as a reference
  model, a golden memory or an instruction-set simulator;
- has a watchdog;
- ends by printing `TB_RESULT checks=<n> failures=<n>`.

Shared testbench code:

| File | Contents |
|---|---|
| `tb/rv_asm.sv` | instruction encoders |
| `tb/rv_ref.sv` | a small RV32IM instruction-set simulator |
| `tb/dram_model.sv` | a behavioural DRAM (fixed latency, random stalls) |

The end-to-end test `tb_ooo_cpu` runs the core at its default sizes on a
generated program. The program covers:

- loops with data-dependent branches;
- calls and returns, including a far call through a fused `auipc`/`jalr`
  pair;
- byte, half and word loads and stores that overlap;
- multiplies and divides;
- enough data to force D-cache evictions.

Every retired instruction is compared with the instruction-set simulator,
in PC, destination and value. The test fails if any of the counted
mechanisms never happens. Those are mispredictions, two-wide dispatch and
commit, full and partial forwarding, I- and D-cache misses, prefetch hits,
writebacks, branch-mask stalls, early wakeups and fused `auipc`/`jalr`
pairs. A typical run retires 561 instructions in about 1390 cycles.

A second whole-core test, `tb_mergesort`, is a workload rather than a
coverage test. It runs a bottom-up merge sort of 64 words at the default
sizes, in six passes between two buffers. It checks every retired
instruction against the simulator and checks that the final array is sorted
and holds the same words. It retires 6512 instructions in about 7370 cycles,
an IPC of about 0.88. It builds like `tb_ooo_cpu`.

With verilator 5:

```sh
# one block, e.g. the load/store unit
verilator --binary --timing --assert -Wno-fatal rtl/ooo_pkg.sv rtl/lsu.sv tb/tb_lsu.sv \
  --top-module tb_lsu -Mdir obj_lsu -o sim && obj_lsu/sim

# the whole core; -y lets verilator find the other modules in rtl/
verilator --binary --timing --assert -Wno-fatal -y rtl \
  rtl/ooo_pkg.sv tb/rv_asm.sv tb/rv_ref.sv tb/dram_model.sv tb/tb_ooo_cpu.sv \
  --top-module tb_ooo_cpu -Mdir obj_top -o sim && obj_top/sim
```

Blocks with sub-modules find them through `-y rtl`. A few testbenches need a
shared testbench file listed before them:

| Testbench | Also needs |
|---|---|
| `tb_decoder`, `tb_fetch`, `tb_dispatch` | `tb/rv_asm.sv` |
| `tb_cacheline_adapter` | `tb/dram_model.sv` |
