# A reconfigurable two-cluster fetch unit for a multithreaded processor

Several threads fetching from one instruction cache get in each other's way.
Their working sets collide in the cache and in the branch target buffer.
On top of that, a single fetch path delivers at most one fetch block per cycle.
Whether sharing or partitioning the cache works better depends on the mix of
threads. A large, shared cache suits a few threads with big footprints. Private
halves suit threads that would otherwise evict each other.

This design takes the instruction cache of a wide superscalar processor and
makes that choice available at run time:

* 64 KB, in 4096 fetch blocks of four 32-bit instructions.
* A next-block predictor field is stored with every block, so the cache is also
  the BTB.
* The storage is two *cluster arrays* of 2048 blocks, each with its own
  512-entry tag table.

The arrays work in one of two modes:

* **Unified mode.** One 64 KB, 2-way cache/BTB is shared by all threads. The
  two arrays are the two ways. A block can be fetched only from the way its
  index points to. If the block turns out to be in the other way, the thread
  loses a cycle and retries there. This is a *way miss*.
* **Split mode.** There are two independent 32 KB, 2-way caches, one per
  cluster. Each cluster serves its own group of threads, and each can deliver a
  fetch block every cycle, so fetch bandwidth doubles.

Up to eight threads are supported.

* Thread slots 0, 2, 4 and 6 belong to cluster 0.
* Thread slots 1, 3, 5 and 7 belong to cluster 1.
* System software picks the mode and places threads by writing their program
  counters into the slots of the cluster it wants. Performance counters and a
  trap help it decide.

## Block indices and tags: the two modes

A fetch block is 16 bytes, and a cache line is 64 bytes (four blocks).
The next-block predictor is a 12-bit *block index*, not a full address:

| mode    | bit 11            | bits 10:2       | bits 1:0  |
|---------|-------------------|-----------------|-----------|
| unified | way = cluster     | pc[14:6]        | pc[5:4]   |
| split   | 0 (unused)        | {way, pc[13:6]} | pc[5:4]   |

* **Unified mode.** The top bit picks the array. Bits 10:2 pick the tag entry
  (512 sets). Both tag tables are compared in the same cycle: a match in the
  other table is a way miss, and no match is a miss.
* **Split mode.** The thread's slot fixes the array. The 11-bit index contains
  the logical way. The 512-entry tag table is read as two 256-entry ways.

The stored tag is pc[31:14] in both modes. Only its interpretation changes, so
a mode switch is cheap in hardware. The cost is that all cached contents
become meaningless. The unit waits until no access or line fill is in flight,
then clears every tag valid bit (`tag_table.flush`). The next-block fields are
left as they are; they are just stale predictions.

A next-block field gives the block index only. The full address of the next
block takes the field for bits 14:4 (unified) or 13:4 (split), and the bits
above them from the current block. A prediction therefore stays within the
current block's 32 KB region (unified) or 16 KB region (split). A target
outside it is a misprediction, and the redirect from decode repairs it.

## The fetch pipeline and the three-input next-block multiplexer

Each cluster runs the same two-stage loop, shown in `rtl/scsmt_fetch_unit.sv`.

1. **Select.** `thread_select` picks, round-robin, a thread that:
   * is active;
   * will access this cluster next: its home cluster in split mode, or in
     unified mode the way its PC register or its access in flight points to;
   * has no line fill pending and is not waiting for a busy miss handler;
   * is not held by a stalled fetch-block register.

   The array index comes from a three-input multiplexer:
   * the thread's PC register, used after a redirect, a miss or a thread
     switch;
   * the next-block field the own array produced in the previous cycle;
   * the field the *other* array produced, in unified mode only.

   The third input is the only addition to the original single-cluster loop.
   With it, a thread can follow its predicted path from cycle to cycle, even
   when consecutive blocks live in different ways.
2. **Access.** The block, its next-block field and the tags are read from
   synchronous RAM. The outcome is one of three cases:
   * **Hit.** The block goes into the cluster's fetch-block register, and the
     thread's PC register takes the predicted next address.
   * **Way miss (unified mode).** The thread retries in the other array. The
     next-block field that predicted the wrong way is trained to point at the
     correct one.
   * **Miss.** A victim way is chosen: an invalid way if there is one,
     otherwise the choice alternates. The cluster's miss handler fetches the
     line. The thread is not selected again until the fill completes. If the
     miss handler is busy, the thread waits and retries later.

Selection does **not** wait for the hit/miss result of the access before it.
It would be too late to affect the next cycle's choice. As a result, a thread
may be selected again, along its predicted path, while its previous access
turns out to be a miss, a way miss or a redirect target. That second access is
squashed when it completes (`kill_q`). This keeps the tag compare off the
selection path, at the cost of an occasional wasted access.

Selection is plain round-robin among eligible threads. A thread's PC register
holds its predicted next address, unless decode has redirected it since. So
when several threads take turns in one cluster, a thread that comes back
after a gap starts from the next PC decode computed for it, if decode has
corrected it in the meantime, rather than from a stale next-block guess. Richer policies, for example favouring threads with few
instructions waiting in the execution core, need information from outside the
fetch unit and are not built in.

Timing: a thread selected in cycle *n* has its block in the fetch-block
register at the end of cycle *n+1*. The block is offered to decode in cycle
*n+2*. A thread that hits continuously along its next-block chain gets one
block per cycle in one cluster. In split mode, two threads get one block each
per cycle.

## Instruction selection

Decode takes four instructions per cycle, and the two fetch-block registers
can hold eight. `insn_select` works on aligned two-instruction *sub-blocks*:

* Each cycle it sends two sub-blocks to the four decode slots.
* A block whose thread jumps into the middle of it starts at the sub-block
  holding the target. Instructions before the target are marked invalid.
* If both registers hold blocks of the **same** thread, the older block goes
  first, to keep program order.
* Otherwise, the cluster served first alternates.

A register that is not fully drained holds its block, and its cluster stalls
(no new access is issued into it). The decode ports carry, per slot, a valid
bit, the thread number, the instruction's address and the instruction word.
`dec_ready` low holds everything.

## Line fills (`miss_handler`)

Each cluster has one miss handler and so at most one outstanding line fill.
The L2 side is a plain request and response pair:

* `l2_req_v`/`l2_req_ready` hand over a 64-byte line address.
* Four beats of 128 bits (`l2_rsp_v`, `l2_rsp_data`) follow, in block order.

The fill proceeds like this:

1. When the fill starts, the victim tag is invalidated.
2. Each beat is written into the array.
3. The new tag is written with the last beat.
4. The handler releases the waiting thread.

A filled block's next-block field points at the sequential block in the same
way: with no history, fall-through is the best guess. Its hysteresis counter
starts at 0.

## Next-block training and hysteresis

Every next-block field carries a 2-bit hysteresis counter (`nb_hysteresis`),
so that one stray target does not overwrite a good prediction:

* correct prediction: the counter counts up, saturating;
* wrong prediction with the counter above 0: the counter counts down and the
  target is kept;
* wrong prediction with the counter at 0: the target is replaced and the
  counter set to 1.

Training comes from outside, through the `trn_*` port. The block is identified
by the `fb_bidx` that came out with it, and the port carries:

* the address that really followed (`trn_target`);
* whether the prediction was right (`trn_correct`).

The way bit of the stored field is kept; only the set and block bits are
trained. The array has one read-modify-write training port per cluster, which
has these priorities:

1. line fills;
2. internal way-miss training;
3. external training.

An external request that loses is reported on `trn_drop`.

## Conditional branches and returns

* **Conditional branch predictor (`cond_bpred`).** Each cluster has its own
  tournament predictor, which the prediction of its fetched block comes from:
  * a local part: 512 histories of 9 bits, indexing 512 2-bit counters;
  * a global part: 2048 counters indexed by the thread's own 11-bit global
    history;
  * 2048 choice counters.

  These are the tables of a single-thread predictor of this kind split in half.
  After reset a sweep clears the tables over 2048 cycles (`bp_ready` low).
  Updates come from branch resolution, one per cluster per cycle.
* **Return address stacks (`ras`).** Each thread has a 16-entry circular stack.
  Push, pop, or both at once (replace the top) are driven by decode. The top
  and an empty flag are brought out.

## Thread allocation support (`alloc_ctrl`)

The mode and the placement of threads are decided by supervisor software, not
by hardware. This block gives that software what it needs.

| address      | register | contents |
|--------------|----------|----------|
| 0x00         | CTRL     | [0] unified mode, [15:8] active-thread mask |
| 0x01         | THRESH   | signed trap threshold |
| 0x02         | AGE      | aging period in cycles, 0 = off |
| 0x03         | STATUS   | [0] trap pending (write 1 to clear), [1] trap enable |
| 0x04 / 0x05  | POS / NEG | counters added to / subtracted from the trap sum |
| 0x06         | CLEAR    | write: clear all counters |
| 0x07         | SUM      | current sum, read only |
| 0x08         | CYCLES   | cycles counted alongside the event counters (aged and cleared with them), read only |
| 0x10 + 8e + t | counter | event e of thread t: 0 instructions delivered, 1 cache misses, 2 next-block mispredictions |

Instructions delivered divided by CYCLES gives a thread's IPC, and the miss
counters divided by instructions give its miss rates. A trap is raised when
the selected sum of counters reaches the threshold.
Aging halves every counter each AGE cycles, so old behaviour fades and threads
do not ping-pong between clusters. Writing CTRL with a new mode starts the
flush-and-switch described above. `mode_unified` shows the mode in force.

## Files

| file | contents |
|------|----------|
| `rtl/scsmt_pkg.sv` | constants, types, index and address functions for both modes |
| `rtl/scsmt_fetch_unit.sv` | top: PC registers, the multiplexers, lookup, squash, fills, training, mode switch |
| `rtl/cache_array.sv` | one cluster array: 2048 × 128-bit blocks plus next-block fields, with fill and training ports |
| `rtl/tag_table.sv` | 512 tags with two compare ports, invalidate, write and flush |
| `rtl/thread_select.sv` | round-robin thread selection |
| `rtl/insn_select.sv` | sub-block selection into four decode slots |
| `rtl/miss_handler.sv` | one line fill at a time |
| `rtl/nb_hysteresis.sv` | the next-block counter rule |
| `rtl/cond_bpred.sv` | tournament predictor of one cluster |
| `rtl/ras.sv` | return address stack |
| `rtl/alloc_ctrl.sv` | mode/active registers, event counters, trap |

Each RTL file has a self-checking testbench, `tb/tb_<module>.sv`, which checks
the module against a small model written in the testbench.

`tb/tb_scsmt_fetch_unit.sv` runs the whole unit at full size. It includes:

* an L2 model per cluster, with random latencies;
* a decode model that checks every delivered instruction against the program
  each thread runs (loops of 24 blocks, with jumps into the middle of blocks);
* training, and redirects for mispredictions.

It goes through unified mode with one and two threads, split mode with four
and eight threads, and back to unified mode. It counts each mechanism and
fails if one never happens: hits, misses, fills, busy miss handlers, way
misses, the own- and other-array next-block paths, squashes, stalls,
redirects, mode switches, training, predicted-taken branches, dual-cluster
delivery, RAS use and the allocation trap. With a single thread in
unified mode it also checks that the steady-state rate is four instructions
per cycle.

`tb/tb_workload_mix.sv` repeats, in miniature, the comparison the
shared/split choice rests on. It runs two thread mixes, in unified mode and
then in split mode, and measures one steady-state iteration of each.

| mix | unified | split |
|-----|---------|-------|
| a 40 KB loop with a 1 KB loop | 0 misses | 0.5% of instructions miss; the large loop takes 28% longer |
| three 4 KB loops, 32 KB apart (same sets) | 7% miss; 3.0 instructions per cycle | 0 misses; 4.0 instructions per cycle |

In the first mix the footprints fit only when the cache is shared. In the
second, three lines compete for two ways in every set of the shared cache,
while split mode gives each cluster at most two of them.

Every testbench prints `TB_RESULT checks=N failures=M` and stops. To run one
with Verilator 5:

```
verilator --binary --timing -Irtl rtl/scsmt_pkg.sv rtl/*.sv tb/tb_scsmt_fetch_unit.sv \
          --top-module tb_scsmt_fetch_unit -Mdir obj && ./obj/Vtb_scsmt_fetch_unit
```

Replace the testbench name to run another one. The full-size run takes a few
seconds.

## What is original to this implementation

The geometry, the two modes and their index layouts, and the tag
reinterpretation with a flush on reconfiguration follow the published
organisation. So do:

* the three-input next-block multiplexer;
* speculative thread selection with a second access on a way miss;
* two-instruction sub-block selection;
* the halved tournament predictors;
* the per-thread 16-entry stacks;
* the counters and trap for software allocation.

The following are choices made here:

* 32-bit addresses and 32-bit instructions.
* Pipeline timing (two cycles from selection to decode).
* The L2, redirect and training interfaces.
* The squash rule.
* Replacement: invalid way first, else alternating.
* One outstanding fill per cluster.
* Fall-through initialisation of filled next-block fields.
* The predictor's index bits and history lengths, and a per-thread global
  history.
* The counter widths, the trap sum and the register map.
* A fixed even/odd thread-to-cluster mapping. Migrating a thread means
  restarting it in a slot of the other cluster.

The following are not included, and the unit exposes ports where they would
connect:

* The decode stage and the execution core. They drive redirects, training,
  predictor updates and the stacks.
* The L2 cache.
* The trap handler's allocation policy.

One conditional prediction is made per fetched block, at the block's address.
Per-branch prediction within a block, and use of the prediction or of the
return stack to steer fetch, is left to the decode stage, which redirects the
thread. Some address bits are constant by construction: the low bits of the
block and line addresses, and the low two bits of instruction addresses.
Synthesis reports these outputs as constant.
