# Rollback chip: hardware state saving for Time Warp

An optimistic parallel simulator (Time Warp) runs each logical process ahead
of the others, and undoes its work when an event arrives "in the past". To
undo, every process has to save its state after every event and restore an
older state on demand. In software this copying often costs more than the
events themselves.

The rollback chip removes the copying. The program's state lives in a
*version controlled memory* (VCM). Rather than copying the state on every
save, the chip keeps every version that was written:

* **MARK** (state save) only increments a frame counter.
* **WRITE** stores the new version of a line in the *current* frame.
* **READ** finds the newest version that was written at or before the
  current frame.
* **ROLLBACK** moves the frame counter back. What was written after the
  destination becomes invisible without touching memory.
* **ADVANCE** frees frames that can no longer be rolled back to, in the
  background, once the simulator knows they are safe (fossil collection).

This repository holds synthesizable SystemVerilog for one node of such a
simulation engine: the rollback chip with its memory controller. It also
holds self-checking testbenches that drive the node the way a CPU would.

## Versions, frames and written bits

The VCM of a process is an array of *lines*: 4096 lines of four 32-bit
words at the default sizes. Storage is a stack of *mark frames*, each as
large as the VCM:

* **CMF** (current mark frame) is the frame that writes go to.
* **OMF** (oldest mark frame) is the oldest frame still needed.
* A third area, the **archive frame**, holds each line's value as of the
  oldest frame that has been collected.

For every (line, frame) pair, a *written bit* records whether that frame
holds a version of that line. The version a READ must return is in the
newest frame at or below CMF whose bit is set. That frame is the line's
**MRV** (most recent version). If no bit is set, the version is in the
archive frame.

Frame numbers are 8 bits, so a process has 256 frames in a circular stack.
The upper 4 bits name one of 16 *working areas* and the lower 4 bits a frame
within it. The written bits of one line in one working area form one 16-bit
*block*, which the written-bit memory reads or writes in one access. A miss
therefore scans 16 frames per memory reference. It starts at CMF's working
area and walks down towards OMF's.

Because the stack wraps around, every frame comparison ("is a newer than
b?") is made modulo. Internally, frames carry two extra high bits (10 bits
in all). "Newer" means that the difference, taken as a signed number, is
positive.

## Rollback without clearing bits: the rollback history

After ROLLBACK to frame `dst`, the written bits of frames above `dst` are
wrong. A later MARK re-enters those frames, and the old bits would then
look live. Clearing the bits at rollback time would cost a memory pass.
Instead, the bits are cleared *lazily*, when a block is next read.

* Each process has a *rollback index* (CRBI). It counts rollbacks modulo
  256 (8-bit tags).
* Every written-bit block is stored with the tag that was current when the
  block was written.
* The *rollback history* RBH[tag] holds the deepest rollback destination
  since that tag was current, or INFINITY if there has been no rollback
  since then.
* When a block is read, every bit of a frame newer than RBH[tag] is ignored.
  Bits of frames above CMF are ignored as well.

A rollback to `dst` does two things:

* It sets to `dst` every RBH entry, from the top down, that holds INFINITY
  or a newer frame.
* It then pushes a new INFINITY entry and increments CRBI.

The entries are ordered, so the update stops at the first entry that is
already at least as deep as `dst`. Short rollbacks therefore touch few
entries.

`rbc_rb_history` updates the top 16 entries in the same clock cycle as the
rollback, each with its own comparator. Only a rollback deeper than that
goes on to walk the older entries, one per cycle. While it walks, `busy` is
high and no new rollback is accepted.

Each working area records **TAGBOUND**, the CRBI at the time a MARK first
created it. No block in that area is older than that tag. TAGBOUND of the
oldest working area is therefore the oldest tag still in use. It is the
floor for rollback-history updates. A rollback is refused if pushing a new
tag would reach that floor, that is, if all 256 tags are live.

## The RB cache

`rbc_rb_cache` is a 256-entry, 2-way set-associative, LRU, write-through
cache of *most recent versions*.

* Each entry holds Valid, Line, Data, the frame its data came from (MRV),
  and the process id (PID).
* A READ hit answers without consulting any written bits.
* A rollback of process p to `dst` clears, in one cycle, every entry whose
  PID is p and whose MRV is newer than `dst`. Every other entry still holds
  the right version.

On a miss, the control unit searches the written bits, reads the line from
bulk memory and fills the cache: an invalid way first, otherwise the LRU
way.

A line read from the archive is cached with an MRV just below OMF, so no
later rollback can invalidate it.

## WRITE path

A write always goes through to memory.

1. The cache supplies the line, or the miss search fetches the MRV line.
2. The new word is merged into it.
3. The MMU translates the page of (CMF, line). A page is allocated on the
   first write into it.
4. The cache entry takes the merged line, with MRV = CMF.
5. The written-bit block of CMF's working area is read and corrected by the
   rollback history. The CMF bit is set, and the block is written back with
   the current tag.
6. The whole line is written to CMF's frame in bulk memory.

The first write to a line in a new frame therefore copies the old version
forward. This is what lets a MARK copy nothing.

## ADVANCE: background fossil collection

ADVANCE(k) only records the new OMF target and returns. A collection engine
inside `rbc_control` then works between CPU references, one line per idle
slot. It collects a *whole working area* at a time. For every line of the
area:

1. Read the area's written-bit block. If no bit is live, there is nothing
   to keep.
2. Read the block of the *next* working area. If a live bit there lies at
   or below the new OMF, a newer version survives, so the copy is skipped.
3. Otherwise, copy the newest version in the area to the archive frame.
4. Clear the block.

Then the MMU returns all pages of the area's 16 frames to the free list.
Only after that does OMF move. Moving it last means a READ never sees a
half-copied archive.

If the target lies inside a working area, OMF simply moves within it.

## Demand paging (MMU)

Allocating 256 full frames per process would waste memory, because most
frames hold only a few lines. Instead, frames are paged.

* `rbc_mmu` keeps one page-table entry `{present, physical page}` for every
  (process, frame, virtual page).
* A page is 64 lines.
* A page is allocated from a free list on the first write into it.
* A read of a page that is not present is answered from the archive.
* ADVANCE frees a working area's pages.

Pages never used are handed out by a counter, so reset does not have to
build a free list. The page table sits in synchronous SRAM; at the defaults
it has 64 × 256 × 64 entries.

## The node (`rbc_node`)

`rbc_node` is the top module. It wires together:

| Instance | Module | Role |
|---|---|---|
| `u_ctrl` | `rbc_control` | sequencer; CMF / OMF / TAGBOUND per process; ADVANCE engine |
| `u_cache` | `rbc_rb_cache` | RB cache with rollback invalidation |
| `u_rbh` | `rbc_rb_history` | rollback-history stacks, parallel window of 16 |
| `u_wb` | `rbc_wb_mem` | written-bit memory: 16 bits + 8-bit tag per block, in SRAM |
| `u_mmu` | `rbc_mmu` | page table and free-page list, in SRAM |
| `u_memc` | `rbc_mem_ctrl` | shares bulk memory between the chip (line port) and the CPU bypass (word port), with the address mux |

All types and default sizes are in `rbc_pkg`. `rbc_sram` is the
single-port SRAM used by the written-bit memory and the MMU.

The CPU, its ordinary cache and the bulk DRAM are outside the node; their
buses are the node's ports.

### Interface and timing

All ports share one clock. Reset `rst_n` is active low and asynchronous.
After reset, the node clears the written-bit memory and the page table,
one word per cycle; `ready` rises when both are done. At the default sizes
this takes 2^22 cycles.

| Port group | Use |
|---|---|
| `vcm_valid/we/addr/wdata` → `vcm_done/err/rdata` | READ/WRITE of word `{line, word}` in the VCM of the current process. Hold `vcm_valid` until the one-cycle `vcm_done`. `vcm_err` means the write was refused because no physical page was free; nothing was changed. |
| `cmd_valid/op/arg` → `cmd_done/err` | Commands `CMD_RESET`, `CMD_MARK`, `CMD_ROLLBACK` (arg = k frames), `CMD_ADVANCE` (arg = k frames), `CMD_SETPID` (arg = process). Same handshake. `cmd_err` means refused; the state is unchanged. |
| `cpu_req/we/addr/wdata` → `cpu_ack/rdata` | Ordinary CPU memory traffic that bypasses the chip (word address). |
| `mem_*` | Bulk memory, one line per transfer. `mem_req` is held until a one-cycle `mem_ack`. `mem_wstrb` enables individual words. The top address bit selects the CPU half (1) or the chip's half (0). |
| status | `cur_pid`, `cur_cmf`, `cur_omf`, `cur_crbi`, `advance_busy`, `pages_used`, `last_invalidated`, `last_rbh_updates`, `rbh_walking`, and `events`: one-cycle pulses for hit, miss, search step, lazy clear, archive read, archive copy, copy skipped, area collected, page fault, and refused MARK/ROLLBACK. |

Latencies, in cycles from `valid` to `done`, with one idle cycle after each
`done`:

* READ hit: 2.
* MARK, ROLLBACK, ADVANCE and SETPID: 1. The deeper part of a long
  rollback-history update and the collection of ADVANCE continue in the
  background.
* READ miss: 2 cycles per written-bit block searched, plus translation and
  one bulk-memory read.
* WRITE: translation, a written-bit read and write, and one bulk-memory
  write. The reference completes when memory acknowledges; there is no
  write buffer.

A command is refused when:

* **MARK:** the 256-frame stack is full (CMF would reach the first frame of
  OMF's working area again). If a collection of the same process is
  running, MARK waits for it instead.
* **ROLLBACK:** k = 0, the destination is older than OMF (or than a pending
  ADVANCE target), or all rollback-history tags are in use.
* **ADVANCE:** the target is beyond CMF. A second ADVANCE waits until the
  first has finished.

## Default sizes

| Parameter | Default | Meaning | Origin |
|---|---|---|---|
| `PID_BITS` | 6 | 64 processes (VCMs) | original design |
| `LINE_BITS` | 12 | 4096 lines per VCM | original evaluation |
| `WOFF_BITS`, `WORD_W` | 2, 32 | 4 words of 32 bits per line | 32-bit paths original; 4 words chosen here |
| `FRAME_BITS`, `WAF_BITS` | 8, 4 | 256 frames, 16 working areas of 16 | original design |
| `FX_BITS` | 10 | frame numbers with 2 extra bits for modulo compare | chosen here |
| `TAG_BITS` | 8 | rollback-history tags | original evaluation |
| `CACHE_ENTRIES`, `CACHE_WAYS` | 256, 2 | RB cache, LRU | original evaluation |
| `RBH_BUF` | 16 | rollback-history entries updated in parallel | original design |
| `PAGE_BITS`, `PPN_BITS` | 6, 12 | 64-line pages, 4096 physical pages | chosen here |

At these sizes:

* The written-bit memory is 2^22 blocks of 24 bits.
* The page table has 2^20 entries.
* The rollback-history stacks are 64 × 256 registers. This is the largest
  logic in the design.

## What follows the original design and what is chosen here

These parts follow the original design:

* the six operations and their meaning;
* mark frames, written bits and 16-frame working areas;
* the archive frame;
* the write-through RB cache and its invalidation rule;
* lazy clearing through the rollback history, with its 16-entry parallel
  update and TAGBOUND;
* ADVANCE that raises OMF only after copying, and its copy-skipping rule;
* demand paging with a presence bit and a free list.

These are this design's own choices:

* **The control unit is a state machine.** The original suggests a
  microcode sequencer and ROM.
* **The search is not pipelined.** It reads one 16-bit block every two
  cycles.
* **The "last working area" shortcut is not built.** It would store, per
  line, where the search should start. The original's own measurements
  found the plain search adequate, and often better, for short stacks.
* **Commands come in on their own port.** They are not memory-mapped
  registers.
* **The active process is chosen by a SETPID command.** All per-process
  registers (CMF, OMF, CRBI, TAGBOUND, the whole rollback history) are
  kept on chip. The original allows this or swapping them through the CPU.
* **Operations that cannot proceed are refused.** They do not wait (see
  above).
* **The CPU's VCM write waits for memory.** There is no write buffer.
* **Memory-side choices are this design's.** These are the page size, the
  number of physical pages, the line size, the memory-controller
  arbitration (alternating when both sides wait) and the address map.
* **Modulo frame comparison uses two extra bits and a signed difference.**
  The original sketches one extra bit that is set relative to OMF and
  cleared when OMF wraps around. Both order the live frames correctly.
* **The whole rollback history is held in registers.** The original places
  the stack below the 16-entry window in ordinary RAM. Here it is held in
  registers but updated one entry per cycle, with the timing of a RAM.
* **The stack does not grow.** The original sketches a way to let the
  frame stack grow beyond 256 frames; it is not built. MARK is refused
  when the stack is full.
* **The VCM is 4096 lines.** The original allows VCMs of up to 4 MB; the
  default here is 64 KB per process. Widen `LINE_BITS` to 18 for 4 MB.

## Verification

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_rbc_sram` | random reads and writes against an array model |
| `tb_rbc_wb_mem` | clearing walk length, blocks zero after init, random read/write |
| `tb_rbc_rb_history` | against a reference model of the stack: the update rule, the parallel count, the length of the walk below the window, the floor |
| `tb_rbc_rb_cache` | against a reference model: hits, fills, LRU, per-PID invalidation counts |
| `tb_rbc_mmu` | translation, allocation on first write, faults when out of pages, freeing of a working area |
| `tb_rbc_mem_ctrl` | both ports, write strobes, alternation under contention |
| `tb_rbc_control` | hand-worked sequences: hit latency, a 3-block miss search, lazy clearing after rollback, isolation between processes, refused MARK/ROLLBACK, ADVANCE with one archive copy and one skipped copy |
| `tb_rbc_node` | random end-to-end run of 20000 operations at small sizes (2 processes, 64 lines, 16 frames, 16 tags, 64 physical pages), against a model that snapshots the memory at every MARK, with CPU bypass traffic in parallel. It counts every mechanism and fails if one never happened: hits, misses, multi-block searches, lazy clears, archive reads and copies, skipped copies, collected areas, page exhaustion, full stack, full rollback history, walks below the parallel window, cache invalidation, MARK waiting for ADVANCE, context switches, bypass traffic and memory contention. |
| `tb_rbc_node_full` | the same kind of run on `rbc_node` with every parameter at its default, including the 2^22-cycle reset; it checks every value read but does not require each mechanism (256 frames and 4096 pages are not exhausted in 20000 operations) |

`rbc_bulk_mem_model` (tb/) is a behavioural DRAM with a random latency.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert --top-module tb_rbc_node \
  -y rtl -y tb +libext+.sv rtl/rbc_pkg.sv tb/tb_rbc_node.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

`tb_rbc_node_full` builds in a few minutes and runs in a few seconds.

Lint notes:

* `hit_mrv` of the cache is not used by the control unit.
* Reset is also used in the assertions' `disable iff`. Verilator reports
  this as a net that is both synchronous and asynchronous.
* Neither affects the circuit.
