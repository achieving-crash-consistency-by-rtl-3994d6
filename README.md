# Persistent L1 data cache for crash-consistent transactions (NVC)

When a program updates data that lives in persistent memory (PM), a power
failure in the middle of a group of updates can leave the data half-changed.
Software usually guards against this by writing an undo log to PM and fencing
before every in-place update, which costs a great deal of time. NVC does the
same job in hardware, mostly inside the L1 data cache. Every bit of the L1 data
array is a non-volatile SRAM cell: an ordinary 6T SRAM bit with two
ferroelectric transistors (FeFETs) stacked on top of it. So each cache block has
two copies:

* a **volatile** copy (the SRAM), read and written as usual, and
* a **non-volatile** copy (the FeFETs), written only by explicit backup
  operations and surviving power loss.

A failure-atomic region is delimited by two new instructions, `FAR_BEGIN` and
`FAR_END`. Before the first store of a region to a PM block, the cache backs up
the block's old value into the FeFETs. Stores then change only the SRAM. At
`FAR_END` the cache backs up every block the region modified, all in the same
cycle (**Cache-Commit**), so after a crash either every update of the region
is there or none is. Logging to PM is needed only when a block of an
uncommitted region has to leave the cache.

The RTL here implements the persistent part of a four-core system: one NVC L1
data cache per core, each with its persistent queue to the PM controller, its
per-thread transaction counters, its log allocator and its power-up recovery.
Cores, L2/LLC, DRAM and the PM controller are outside and connect through ports.

## The non-volatile SRAM cell and its three line settings

Each cell has a backup line `BkpL` (ground, Vdd or a standby level) and a
restore line `RsL`. The FeFET `N0` sits on the Q side, `N1` on the QB side.
"Conducting" is stored as 1 in the model.

| Step | BkpL | RsL | Effect per bit |
|---|---|---|---|
| backup step 1 | Vdd | gnd | the FeFET whose node is low becomes conducting: `N1 \|= Q`, `N0 \|= ~Q` |
| backup step 2 | gnd | gnd | the FeFET whose node is high turns off: `N0 &= ~Q`, `N1 &= Q` |
| restore | standby | Vdd | the conducting FeFET pulls its node low: `Q = N1` where `N0 != N1` |
| rest | standby | gnd | nothing |

After both backup steps `N1 = Q` and `N0 = ~Q`. A restore then brings Q back.
A bit whose FeFETs agree (never backed up) keeps its SRAM value. Three
operations are built from these steps:

* **Block-Backup (BB)**: both backup steps on one row.
* **Block-Restore (BR)**: the restore step on one row.
* **Cache-Commit (CC)**: both backup steps on every row selected by the commit
  mask, in the same cycles.

`nvsram_cell` is a behavioural, delay-based model of a single cell with its
real terminals (WL, BL, BLB, BkpL, RsL). `nvsram_array` is the synthesizable
array that the cache uses. It keeps three planes (Q, N0, N1) per row. The line
levels act on every row whose bit in `op_sel` is set, and a masked write port
updates the SRAM plane. `nvc_bkp_seq` drives the two lines. A backup holds
step 1 and then step 2 for `BKP_STEP_CYC` cycles each. A restore holds its
setting for `RST_CYC` cycles.

## Block metadata and the block state machine

Each row of the array holds `{tag, BV, data}`:

* **BV** (backup valid) says the FeFET copy of the block is meaningful.
* BV is stored in the non-volatile row, so it survives power loss. Changing it
  takes a Block-Backup.
* **Tid** (owning thread, 1 bit for two threads per core), its valid flag,
  **C** (modified in the open region, so commit it) and dirty are volatile
  flops. After a power failure they are rebuilt or cleared.

For blocks in PM (`addr >= PM_BASE`), `nvc_block_fsm` gives the next state and
the operations. "Tid" below means "Tid valid", i.e. the block belongs to an
open region.

| State | Event | Operation | Next |
|---|---|---|---|
| !Tid, !BV | Wr (in a region) | BB | Tid, BV |
| !Tid, BV | Wr (in a region) | none (old copy is already in the FeFETs) | Tid, BV |
| Tid, BV | Commit | CC | !Tid, BV |
| Tid, BV | Evict | BR then BB | !Tid, !BV |
| !Tid, BV | Evict | BB | !Tid, !BV |
| any | Rd | none | same |

Blocks in volatile memory are handled like an ordinary write-back cache. They
are written back to L2 on replacement. A PM store outside any region is also
treated as a plain dirty write.

## Eviction and undo logging

This is the subtle part. A PM block can leave the cache on replacement or on a
coherence invalidation.

* **!Tid, !BV**: nothing persistent in the row. It is dropped, or written back
  if dirty.
* **!Tid, BV** (committed): the row holds the newest persistent value. Its
  data goes into the persistent queue as a *home write*. Then BV is cleared and
  the clear is made persistent with a Block-Backup.
* **Tid, BV** (open region): the SRAM holds the new, uncommitted value and the
  FeFETs hold the value from before the region. Both must reach PM. The steps
  are:
  1. Push the new data home through the queue.
  2. Block-Restore, which brings the old value back into the SRAM.
  3. Push an undo-log record through the queue: `{old data, block address,
     Tid, TCNT_Log, order}`.
  4. Clear BV.
  5. Block-Backup.

A record goes to the next free slot of a per-core log region in PM. `TCNT_Log`
is the thread's current transaction counter. `order` numbers the records of
the region. `nvc_log_unit` keeps the slot pointer, which is persistent. It
also keeps the per-thread order counters, which are volatile. The pointer
returns to 0 once no open region of any thread on the core has records in the
log. If the region is full, the eviction waits.

## Commit and the transaction counters

`nvc_tcnt` holds one persistent counter per thread. At `FAR_END` the cache runs
a Cache-Commit on every row whose C bit is set and whose Tid is the committing
thread. It then advances that thread's counter. Advancing the counter is what
retires the region's log records. A record is still meaningful only while
`TCNT_Log >= TCNT[Tid]`.

## The persistent queue

`nvc_pq` is a FIFO of `DEPTH` records (home writes and log records) between the
L1 and the PM controller. It is persistent: its contents and pointers survive
a failure.

* The head record is offered (`pm_valid`) once it has waited `LINK_DLY`
  cycles.
* It is removed only on `pm_ack`, i.e. once the PM controller reports it
  persistent.
* A full queue makes the cache stall.
* The queue also answers a snoop. A fill of a block whose home write is still
  queued waits until the write has left, so L2 never returns a stale copy.

## Recovery

`rst_n` models power coming back after a failure. Only volatile state is reset.
The array's FeFET planes, the queue, the counters and the log pointer keep
their values; they are cleared only by `nv_init` (first power-on). After every
power-up `nvc_recovery` runs this sequence before the cache accepts requests:

1. Drain the persistent queue to PM, which finishes home writes and log records
   that were in flight.
2. Block-Restore every row, and rebuild valid bits and tags from the rows whose
   BV is set. This brings back the last committed value of each block.
3. Scan the log region from the newest slot to the oldest. A record with
   `TCNT_Log < TCNT[Tid]` belongs to a committed region and is skipped. Every
   other record rolls its block back:
   * any cached copy is dropped (BV cleared and backed up);
   * the old data is written home through the queue.

   Because the scan runs newest to oldest, when a block has several records the
   oldest one is written last and wins. This is the result a comparison of the
   `order` fields would give.
4. Advance every thread's counter, which retires all records, and clear the log
   pointer.

Step 3 also covers a block that was evicted during an open region and then
fetched again. Its log record overrides whatever the cache holds.

## Module map

| File | Role |
|---|---|
| `rtl/nvc_pkg.sv` | widths, enums (line levels, operations, block states, events, core ops), request/record/event structs |
| `rtl/nvc_top.sv` | `NUM_CORES` NVC L1 data caches with per-core port arrays |
| `rtl/nvc_l1dcache.sv` | cache controller: lookup, fills, write-backs, state machine use, eviction/logging, commit, recovery |
| `rtl/nvc_block_fsm.sv` | block state machine (combinational) |
| `rtl/nvc_bkp_seq.sv` | BkpL/RsL sequencer |
| `rtl/nvsram_array.sv` | non-volatile SRAM block array |
| `rtl/nvsram_cell.sv` | behavioural model of one cell |
| `rtl/nvc_pq.sv` | persistent queue |
| `rtl/nvc_tcnt.sv` | persistent per-thread counters |
| `rtl/nvc_log_unit.sv` | log-slot pointer and order counters |
| `rtl/nvc_recovery.sv` | recovery sequencer |
| `tb/tb_mem_sys.sv` | behavioural L2/LLC/DRAM/PM model used by the cache-level testbenches |

### Interfaces of `nvc_l1dcache` (per core in `nvc_top`)

* **Core**: `req_valid/req_ready` and `req = {op, tid, addr, wdata}`, where
  `op` is RD, WR, FAR_BEGIN or FAR_END. The answer is a one-cycle `resp_valid`
  pulse with `resp_rdata`; FAR_BEGIN/FAR_END also answer when done. The cache
  is blocking: one request at a time.
* **Coherence**: `inv_valid/inv_addr` is held until `inv_done`. An
  invalidation is served as an eviction.
* **L2 fill**: `fill_req_valid/fill_req_addr` is held until a one-cycle
  `fill_resp_valid` with a 64-byte block.
* **L2 write-back**: `wb_valid/wb_ready/wb_addr/wb_data`.
* **PM controller**: `pm_valid/pm_rec/pm_ack` from the persistent queue.
  `pm_rec.is_log` selects a log record (stored at slot `log_idx`) or a home
  write.
* **Log read (recovery only)**: `logrd_valid/logrd_idx`, answered by
  `logrd_resp_valid/logrd_rec`.
* **Status**: `ready` (recovery finished), `tcnt` and `evt`. `evt` holds
  one-cycle event flags (hit, miss, BB, BR, CC, write without backup, home
  write, log write, write-back, queue stall, log stall, invalidation, fill
  wait, record applied) for counting.

## Parameters and timing

The clock is taken as 2 GHz, so 1 cycle = 0.5 ns.

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_CORES` | 4 | cores (top only) |
| `SIZE_BYTES`, `WAYS` | 65536, 4 | 64 KiB, 4-way, 64-byte blocks (1024 rows, 256 sets) |
| `HIT_LAT` | 4 | 2 ns load hit |
| `BKP_STEP_CYC` | 3 | cycles per backup step (2 steps = 3 ns) |
| `RST_CYC` | 3 | restore, 1.5 ns |
| `PQ_DEPTH` | 16 | persistent-queue entries |
| `PQ_LINK_DLY` | 40 | 20 ns from queue to PM controller |
| `LOG_ENTRIES` | 256 | log slots per core (this design's choice) |
| `PM_BASE` | `0x8000_0000` | addresses at or above it are persistent (this design's choice) |

Measured latencies, from request to response:

| Access | Cycles |
|---|---|
| load hit | `HIT_LAT` |
| store hit without backup | `HIT_LAT+1` |
| first store of a region to a block | `HIT_LAT + 2 + 2*BKP_STEP_CYC` (the Block-Backup is in series) |

A Cache-Commit takes `2*BKP_STEP_CYC` cycles plus a few control cycles,
whatever the number of blocks.

## Where this design departs from, or adds to, the published scheme

* **Queue depth.** The published configuration table gives a 16-entry queue,
  but the evaluation text mentions 8 entries. 16 is used.
* **Conflicting eviction example.** A worked example in the description says
  an evicted "!Tid, BV" block goes to "Tid, BV" after a backup. This disagrees
  with the state diagram and the eviction rules. The state diagram is followed.
* **Own choices where the scheme is silent:**
  * the order of the eviction steps for open-region blocks;
  * the rest bias of the lines;
  * how the 3 ns backup is split into two steps;
  * round-robin replacement;
  * the log-region size and pointer reuse;
  * the fill-versus-queue snoop;
  * the first-power-on state;
  * recovery by newest-to-oldest scan;
  * counters starting at 1.
* **Not built:**
  * the out-of-order core;
  * the MSHRs (the cache is blocking where the reference configuration lists
    8 MSHRs);
  * the L1 instruction cache, L2, LLC, DRAM and PM controller;
  * the coherence-protocol extension that would let cores pass persistent
    copies between them. The C bit only marks blocks to commit. A coherence
    request is served as an eviction, which is correct but slower.
  * the power-supply hold-up capacitance. Backup and restore are modelled as
    always completing.
* **Modelled as flops.** The non-volatile array is logic, with each bit held as
  three flops. A real implementation is a custom macro. Synthesis of
  `nvc_top` at full size is therefore very large and slow. Coarse synthesis of
  the array alone takes under a minute at 128 x 256 bits and grows roughly in
  proportion to the bit count, to about half an hour at 1024 x 531.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`:

| Testbench | What it checks |
|---|---|
| `tb_nvc_block_fsm` | every state/event pair |
| `tb_nvc_bkp_seq` | line levels and cycle counts of backup and restore |
| `tb_nvsram_array` | bit-level backup/restore of selected rows in the same cycles, untouched unselected rows, a backup cut after step 1, masked writes, first-power-on state |
| `tb_nvsram_cell` | the cell model |
| `tb_nvc_pq` | against a reference queue, with random traffic, the link delay and persistence through reset |
| `tb_nvc_tcnt`, `tb_nvc_log_unit` | counters and slot allocation |
| `tb_nvc_recovery` | validity rule, oldest-wins ordering and the sequence |
| `tb_nvc_l1dcache` | at reduced size (1 KiB, 2-way, 4-entry queue, 16 log slots): hit and backup latencies, the two examples (two blocks in one region; one block written twice), commit, eviction of committed and open blocks, queue stalls, fill waits, write-backs, invalidation, and power failures: open region in the cache, open region with an evicted block, a block evicted and fetched again in the same region, and two threads where one commits while the other has a log record |
| `tb_nvc_txn_sizes` | one cache at default size, regions of 1, 4, 16, 64 and 256 stores: one committed and one cut by a power failure per size; backups, undo-log records (32 per region at 64 stores, where 8 blocks share a set; 224 at 256 stores) and rollback; `FAR_END` takes 8 cycles at every size |
| `tb_nvc_top` | every parameter at its default: four cores at once run a committed region, a 16-block region in one set that fills the persistent queue, an open region whose block is evicted, a volatile write-back, a power failure of the whole system, and checks after recovery; it fails if any mechanism never occurred |

Run one with plain Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl --top-module tb_nvc_top \
    rtl/nvc_pkg.sv rtl/*.sv tb/tb_mem_sys.sv tb/tb_nvc_top.sv
./obj_dir/Vtb_nvc_top
```

List `nvc_pkg.sv` first. The package is listed twice by that command line, which Verilator accepts.
Testbenches below the cache need only their module and the package.

The cache-level tests cover the scheme end to end. However, they drive the
cache with hand-written sequences, not with real multi-threaded programs. The
behavioural memory model acknowledges PM writes in order after a fixed delay.
