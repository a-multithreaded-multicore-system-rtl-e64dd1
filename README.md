# Subset-static-interleaved multithreaded multicore for media processing

A video decoder that has been split into many small tasks (for example, one per
macroblock of an H.264 frame) keeps the multiplier units of a VLIW core busy only
if the core always has an instruction ready. Two things get in the way. Long
operation latencies leave issue slots empty inside a thread. Cache misses stop
a thread for tens of cycles. This design attacks both at once:

* **Each core runs several hardware threads in *subset static interleaving*
  (SSI).** Of the N threads of a core, M are in the *foreground*. They take
  turns in a fixed order, one issue per cycle, so each sees only every M-th
  cycle. Their operation latencies, counted in their own cycles, therefore
  shrink by a factor of M. The other N−M threads wait in the *background*. When
  a foreground thread stalls (a cache miss), or a background thread has higher
  priority, the two are exchanged. M=1 is classic blocked (switch-on-miss)
  multithreading. M=N is pure static interleaving. M is a run-time mode.
* **A hardware task scheduling unit (TSU) feeds all cores from per-core task
  queues.** It steals work between cores and wakes blocked threads on the
  least-loaded core first, so that no core has all its threads busy while
  another sits idle.
* **Locks and coherent caches sit underneath.** A lock unit provides atomic
  read-modify-write sequences in software. Per-core MESI caches on a snooping
  bus keep shared data (such as the macroblock reference counters) consistent.

The default configuration is the largest one: 16 cores × 4 threads, 64 KB 4-way
data caches with 64-byte lines, and a 16-entry task queue per core.

## Files

| file | what it is |
|---|---|
| `rtl/mmsys_pkg.sv` | shared widths, the task type, operation/status/MESI/bus enums |
| `rtl/ssi_scheduler.sv` | foreground/background thread selection and swaps |
| `rtl/latency_pad.sv` | write-back timing, operation latency padded to a multiple of M |
| `rtl/mt_regfile.sv` | register file with N copies per register, one writing and one reading thread per cycle |
| `rtl/mt_core.sv` | the multithreading part of one core: scheduler + PCs + write-back line + register file |
| `rtl/task_deque.sv` | one double-ended task queue |
| `rtl/tsu.sv` | task scheduling unit: queues, stealing, blocking, most-blocked-first wake-up, spill interrupts |
| `rtl/sync_unit.sv` | lock unit for atomic sequences |
| `rtl/dcache.sv` | per-core L1 data cache, write-back, MESI snooping |
| `rtl/coh_bus.sv` | snooping bus between the caches and the shared memory port |
| `rtl/rr_arbiter.sv` | round-robin arbiter used by the TSU, lock unit and bus |
| `rtl/mmsys_top.sv` | the whole system |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_mmsys_top` (end to end) |
| `tb/shared_mem_model.sv` | behavioural shared memory with a fixed 40-cycle line latency |

## Subset static interleaving (`ssi_scheduler`)

The scheduler holds a table `slot_tid[0..M-1]`: which thread owns each
foreground slot. A counter walks the slots, so slot *s* gets the issue cycle
whenever `cycle mod M == s`. This is fixed, and that is the whole point: the
thread that issues an operation is known M cycles later, and a write-back can
be scheduled without any arbitration.

Each cycle the scheduler looks at the thread in the current slot:

* **Ready, and no background thread has a higher priority:** it issues
  (`issue_valid`, `issue_tid`, `issue_slot`).
* **Not ready (stalled or blocked) with a ready background thread available,
  or a ready background thread has higher priority:** the two are exchanged
  (`swap_valid`, `swap_out_tid`, `swap_in_tid`). The slot's turn is lost, which
  is the switch penalty: only one slot's worth of pipeline is flushed, not the
  whole pipeline as in blocked multithreading. Among background threads, the
  highest priority wins, and on a tie the lowest number.
* **Not ready, with nothing to swap in:** the turn is a bubble. With M>1 the
  other slots keep issuing.

Priorities (`thread_prio`) let software lower a thread that is only idling, so
that it gives way to useful work even when it is not stalled.

`fg_count` (1..N) is sampled every cycle. When it changes, `mode_switch` pulses
for one cycle. Nothing issues in that cycle, and the foreground is reloaded with
threads 0..M−1. Software should switch modes only between program phases,
because code must be scheduled for the latency that goes with M (next section).

## Padded latencies and the register file (`latency_pad`, `mt_regfile`)

With M foreground threads, an operation of `OP_LAT` cycles is given a latency of
`ceil(OP_LAT/M)·M` cycles. Results are then always written back in a cycle that
belongs to the same slot as the issuing instruction. Two consequences follow:

* In any cycle only **one thread reads** operands (the issuing one) and **one
  thread writes** results (the one whose slot came round again).
* The register file can keep a single set of write multiplexers (one per
  register, choosing among the write ports) and a single set of read
  multiplexers (one per read port, choosing among the registers), shared by
  all threads. Each register simply becomes N copies, with a de-multiplexer
  driven by the *writing* thread's ID and a multiplexer driven by the *reading*
  thread's ID. Port count does not grow with N; only the storage does.

`latency_pad` is a shift line of `OP_LAT+N−1` stages carrying the issuing
thread's ID. The tap it reads depends on the current M. Its output
(`wb_valid`, `wb_tid`) selects the register set written that cycle. When a
thread is swapped out, its entries still in the line are cancelled, because
its instructions are flushed. With `OP_LAT ≤ M` (the default `OP_LAT=1`) a
result is always written before its thread can be swapped, so nothing is
cancelled.

`mt_regfile` defaults: 128 registers × 32 bits, 15 read ports and 5 write
ports (a 5-issue VLIW with three operands per slot), 4 threads. Registers have
no reset. If two write ports target the same register, the higher port wins.

## One core (`mt_core`)

`mt_core` joins the scheduler, a PC per thread, the write-back line and the
register file.

* **Readiness.** A thread is ready unless `thread_stall` (from outside, for
  example its pending cache miss) or `tsu_blocked` is set.
* **PCs.** On issue, the thread's PC takes `next_pc` from the datapath.
  `pc_load` overwrites a PC, for example when the thread starts a new task.
* **Register file.** It is read with `issue_tid` and written with `wb_tid`. The
  write enables are gated by `wb_valid`.

The instruction fetch and the functional units are not part of this RTL. The
core's ports carry the operand register numbers, read data, write-back data
and next PC to and from whatever datapath is attached.

## The task scheduling unit (`tsu`, `task_deque`)

Software submits tasks (a 32-bit function pointer and a 32-bit argument) and
asks for them with four operations:

| op | effect |
|---|---|
| `TSU_SUBMIT` | push at the *newest* end of the own core's queue, or, if any thread is blocked, hand the task directly to one |
| `TSU_GET` | pop the *newest* task of the own queue (LIFO: good cache locality); if empty, steal the *oldest* task of a randomly chosen queue; if all are empty, block the thread |
| `TSU_SPILL` | pop the oldest task of the own queue so that an interrupt handler can move it to memory |
| `TSU_RESTORE` | put a task back at the oldest end, or hand it to a blocked thread |

**Arbitration and timing.** Each core presents one request at a time. A
round-robin arbiter accepts one request per cycle (`req_ready`). Answers
(`resp_valid/tid/task/status`) come one cycle after acceptance. A blocked
thread is answered with status `TSU_R_WOKEN` one cycle after the submit that
wakes it. The per-core `blocked` bits go to the cores, which stop scheduling
those threads.

**Most-blocked-first.** When a task arrives and threads are blocked, it goes to
the core with the most blocked threads, that is, the least loaded core. Ties go
to the lowest core number and, within the core, the lowest thread. This keeps
cores from ending up with all four threads busy while others idle.

**Stealing.** The victim queue is found by starting at a 16-bit LFSR value
mod the core count and taking the first non-empty queue.

**Overflow.** The queues are finite (16 entries by default). `irq_full[c]` is
high while queue *c* holds at least 14 tasks. `irq_empty[c]` is high while it
holds at most 2 tasks and spilled tasks are still outstanding. The handler
spills with `TSU_SPILL` and brings tasks back with `TSU_RESTORE`. The unit
counts spills minus restores per core. A submit or restore into a full queue
waits until there is room, unless a blocked thread can take the task.

## Locks (`sync_unit`)

There are 64 locks, each free or held by a (core, thread) pair.

* `SYNC_ACQUIRE` on a free lock grants it. On a held lock it is refused, and
  software retries.
* `SYNC_RELEASE` by the owner frees the lock. A release by anyone else is
  refused and changes nothing.

One request is accepted per cycle (round robin), and the answer comes the next
cycle. The wavefront decoder uses a lock around each "load counter, decrement,
store" sequence.

## Coherent data caches (`dcache`, `coh_bus`)

Each core has a 64 KB, 4-way, 64-byte-line, write-back, write-allocate cache
with MESI states (256 sets, 18-bit tags of a 26-bit line address). Every access
is looked up in one cycle:

* **Hits are served immediately.** A load needs S, E or M. A store needs E or M,
  and E silently becomes M.
* **A miss starts the miss engine.** It writes back a Modified victim
  (`BUS_WB`), then fetches with `BUS_RD` for a load, `BUS_RDX` for a store, or
  `BUS_UPGR` for a store to a line held Shared.
* **Only the missing thread stalls.** The cache reports it on
  `miss_valid/miss_tid`, and the top feeds that bit into the core's stall mask,
  so the scheduler swaps the thread out. Other threads of the core keep hitting
  (hit under miss), except in the missing set and in cycles when a snoop or
  fill writes the arrays. One miss is outstanding per cache.
* **The missed access completes at fill time.** A store is merged into the
  arriving line. A load's word is kept in a per-thread result register. The
  thread later *replays* the same access, and the replay is answered from that
  register at once. Because of this, a thread makes progress even if another
  core takes the line away between the fill and the replay. Any other access by
  that thread discards the register. A kept load value is also discarded when
  another cache takes ownership of the line, or when another thread stores to
  the word.
* **Replacement** takes an invalid way first, otherwise round robin per set.

`coh_bus` is an atomic snooping bus:

* **Arbitration.** It grants one cache at a time (round robin) and broadcasts
  the transaction to all other caches in the grant cycle.
* **Snoop effects.** A snooped cache moves the line to S on a read, and to I on
  a read-for-ownership or upgrade. If it held the line Modified, it supplies the
  data. The bus passes that line to the requester and writes it to memory in
  the same step (cache-to-cache transfer).
* **Shared memory.** Other fills go to the shared memory port
  (`mem_req/we/addr/wdata`, answered by `mem_ack/mem_rdata`).
* **Completion.** The requester gets `bus_done` with the line and `bus_shared`.
* **Idle cycle.** After each transaction the bus stays idle for one cycle so
  the requester can install its line.

With the 40-cycle memory model, a clean miss costs 46 cycles from request to
replay.

## The system (`mmsys_top`)

`mmsys_top` instantiates:
* 16 `mt_core`s and 16 `dcache`s;
* one `tsu`, one `sync_unit` and one `coh_bus`.

Its ports are per-core arrays of:
* the core's datapath interface (PC load, issue, operand reads, write-backs);
* the TSU request/response interface, the blocked bits and the interrupts;
* the lock interface;
* the data-cache CPU interface.

It also has a single shared-memory line port. The per-core stall mask is the
external `thread_stall` plus the thread with an outstanding cache miss. The
TSU's blocked bits go straight to the cores.

Not part of the RTL:
* the VLIW functional units and instruction fetch;
* the hard-wired entropy decoder that turns the bitstream into macroblock data;
* the shared memory itself (a behavioural model in `tb/`).

## The wavefront workload (end-to-end test)

H.264 macroblock (x,y) can be decoded once (x−1,y) and (x+1,y−1) are done. Each
macroblock has a reference counter holding its number of unfinished
predecessors (0–2). After decoding a macroblock, a thread atomically
decrements the counters of (x+1,y) and (x−1,y+1), and any counter that reaches
zero becomes a new task. A full 3840×2160 frame has 240×135 macroblocks, and at
most about 120 are ready at once, so 64 hardware threads are well fed.

`tb_mmsys_top` runs exactly this scheme on the full-size system, with the
testbench acting as the software on all 64 threads:
* tasks come from the TSU and set the thread's PC;
* the "decode" is a run of instructions issued by the core, whose register
  write-backs are checked;
* the neighbours' results are read, and the thread's own result written,
  through the caches;
* the reference counters live in shared memory and are decremented under
  locks.

It decodes two 8×6-macroblock frames:
1. The first frame uses M=2 and the tail-submit form: a task continues directly
   with one ready successor and submits only the second.
2. The second frame uses M=4, so it also exercises the mode switch, and the
   plain form that submits every ready successor.

Before the first frame, core 0's queue is overfilled so the near-full and
near-empty interrupts and their spill/restore handler run.

The test checks that every macroblock is decoded exactly once and after its
predecessors, that the values read through the caches are correct, and that
all counters end at zero. It also counts, and requires at least one of:
* thread swaps and priority swaps, and mode switches;
* steals, blocks and most-blocked-first wake-ups;
* both interrupts;
* cache misses, dirty write-backs, cache-to-cache transfers and upgrades;
* hits under a miss;
* refused lock requests.

It finishes in about 20,000 cycles at the default parameters.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Files are
named after their modules, so verilator can find them by name:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/mmsys_pkg.sv tb/tb_mmsys_top.sv -o sim
./obj_dir/sim
```

Replace `tb_mmsys_top` with any other `tb_<block>`. The block testbenches use
smaller parameters where that makes a mechanism visible: `tb_mt_core` and
`tb_latency_pad` use `OP_LAT=3` so that swaps cancel write-backs. The random
tests use `$urandom`, and `+verilator+seed+<n>` changes the run.

## Where this design fills in details

These numbers and mechanisms are this design's own choices. Change them with
care.

**The core.**
* The TM3270 datapath is not modelled.
* The register file is 128 × 32 bits with 15 read and 5 write ports (a
  5-issue TM3270-like core).
* One `OP_LAT` is used per instance, rather than a latency per operation
  class.

**Swaps and mode switches.**
* A swap costs exactly the slot's turn.
* The foreground set is reloaded to threads 0..M−1 on a mode switch.
* Priority ties go to the lowest thread number.

**The TSU.**
* Queue depth 16, watermarks 14 and 2, LFSR victim choice.
* One request per cycle with a one-cycle answer.
* Ties in most-blocked-first go to the lowest core and thread.
* The exact interrupt/handler interface (level interrupts, SPILL/RESTORE
  operations) is this design's own.

**The lock unit.** Try-lock semantics, 64 locks, and owner checking on
release.

**The caches.**
* One outstanding miss per cache, completed at fill time and returned on
  replay.
* Hit under miss, round-robin replacement.
* The atomic snooping bus with one idle cycle after each transaction.
* Dirty data written to memory during a cache-to-cache transfer.
* The 40-cycle line latency lives in the memory model, not in the RTL.

The cache size, line size, associativity, write policy, MESI states,
16 cores × 4 threads, and the SSI, most-blocked-first, stealing and overflow
mechanisms follow the system as it was described and evaluated.
