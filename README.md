# Dynamic resizing of the instruction window in a two-thread SMT core

Out-of-order window structures are sized for the worst case, but most programs use only part of
them most of the time. This RTL splits each window structure of a simultaneous multi-threaded
(SMT) core into four equal partitions. It switches off the partitions a workload does not need
and switches them back on as soon as the workload runs short of room. The structures are the
reorder buffer (ROB), the load/store queue (LSQ), the issue queue (IQ) and the integer and
floating-point physical register files (INT-PRF, FP-PRF). A switched-off partition holds nothing
and can be power-gated, which saves energy.

The resizing scheme follows Küçük and Mesta, "Energy savings in simultaneous multi-threaded
processors through dynamic resizing of datapath resources" (Turk J Elec Eng & Comp Sci, 2012).
The section "Design choices" below lists what this implementation decides for itself.

## The machine it is sized for

| structure | entries | partitions | partition size | kind | shared? |
|---|---|---|---|---|---|
| ROB | 96 per thread | 4 | 24 | circular FIFO | no, one per thread |
| LSQ | 48 per thread | 4 | 12 | circular FIFO | no, one per thread |
| IQ | 64 | 4 | 16 | buffer | yes |
| INT-PRF | 192 | 4 | 48 | buffer | yes |
| FP-PRF | 192 | 4 | 48 | buffer | yes |

The machine has two threads and is 8 wide: up to 8 allocations, 8 retirements, 8 reads and 8
writes per cycle on each structure. The controllers use a 32768-cycle sampling period, a
threshold of 32768 stalls, and take 300 cycles to switch a partition. Seven controllers run
independently, one per structure instance. There is no central controller.

## Two decisions per structure

Each structure makes two decisions, and each is taken differently.

**Shrinking is slow and periodic.** `occupancy_sampler` adds the structure's occupancy to an
accumulator every cycle. At the end of each 32K-cycle period it asks one question: would the
period's average occupancy have fitted in one partition fewer? If so, it issues a downsize
decision. The test compares totals, `sum <= (K-1) * partition_size * 2^15`, so no divider is
needed and fractional averages are handled exactly.

**Growing is fast and event-driven.** `stall_counter` counts the cycles in which the pipeline
asked for more entries than the active partitions had free. When the count reaches 32768, it
issues an upsize decision at once, not at a period boundary, and clears itself. Reacting quickly
to a shortage is what keeps resizing from costing performance.

Both decisions change the size by exactly one partition. Only the highest active partition is
ever switched, so the live partitions are always 0 to K-1 and the count K describes the state
completely.

## Why the ROB and LSQ need to wait, and the IQ and PRFs do not

This is the subtle part of the design.

**Queues (ROB, LSQ).** These hold instructions in program order between a head and a tail, and
they wrap around at the end of the active region, `limit = K * partition_size`. Suppose the live
entries wrap: they run from the head up to the limit and continue from entry 0 to the tail.
Adding a partition at the end would then open a gap in the middle of the program order. Removing
the last partition would lose live entries. So a queue may only change size at a moment when its
live entries do not wrap:

* `can_grow`: `head + count <= limit` (no wrap). A new partition can be attached after the last
  one.
* `can_shrink`: `head + count <= limit - partition_size`. Nothing wraps and nothing lives in the
  last partition, so it can be detached.

`partitioned_queue` stores `head` and `count` and computes the tail as
`(head + count) mod limit`. Because of this, changing `limit` never needs a pointer fix-up. An
empty queue parks its head at entry 0, so an idle queue can always be resized. In the one cycle
in which the size changes (`resize`), the queue takes no new allocations. This keeps each tail
computation under a single limit.

`queue_resize_fsm` waits in a phase until the queue reports the condition:

```
Q_STABLE --up_dec--> Q_UP_POWER --power done--> Q_UP_PHASE --can_grow: K+1--> Q_STABLE
Q_STABLE --down_dec--> Q_DOWN_PHASE --can_shrink: K-1, power off--> Q_DOWN_POWER --done--> Q_STABLE
Q_DOWN_PHASE --up_dec--> Q_UP_POWER   (upsize has priority; at K = 4 back to Q_STABLE)
```

Worked example: a 96-entry ROB with K = 4 (limit 96), head = 80 and count = 30. The live entries
are 80..95 and then 0..13, so they wrap. A downsize decision has to wait. Once the head has moved
past 95 and wrapped to a low slot, and head + count <= 72, the last partition is empty and
unwrapped. It is detached and the limit becomes 72.

**Buffers (IQ, PRFs).** Their entries sit anywhere and are freed in any order, so position does
not matter:

* An upsize needs no phase. The partition is powered up and is usable as soon as the 300 cycles
  are over.
* A downsize still needs a phase. `buffer_resize_fsm` first closes the last partition to new
  allocations (`alloc_parts = K-1`). It then waits until `partitioned_buffer` reports that the
  partition is empty (`part_empty`), and only then detaches it and powers it down.
* An upsize decision during this drain reopens the partition.

**Rules common to both controllers:**

* An upsize decision always wins over a pending downsize, for performance.
* A downsize decision is ignored while an upsize is in progress.
* An upsize decision that arrives during a power-down is held and served when the power-down
  ends.
* An upsize decision that arrives during an upsize is dropped, because the upsize already in
  progress answers the same shortage.

## Power switching

`partition_power_seq` holds one enable per partition, `pwr_en`, which drives the sleep
transistors. It stretches each transition over `DELAY` = 300 cycles to limit di/dt, and it
switches one partition at a time.

* **Switching on:** the enable rises immediately. The partition is attached only when `done`
  arrives, exactly `DELAY` cycles after the request was accepted.
* **Switching off:** the partition is detached first, then its enable falls. `done` marks the
  point from which it may be switched again.

A partition in use is always powered; an assertion in each wrapper checks this. The sleep
transistors themselves are a physical circuit and are not part of this RTL.

## Module map

```
smt_resize_top
├── g_thread[t].u_rob, g_thread[t].u_lsq : resizable_queue   (t = 0, 1)
│     ├── partitioned_queue      circular FIFO with a variable wrap point
│     ├── occupancy_sampler      average over the period, downsize decision
│     ├── stall_counter          stall count, upsize decision
│     ├── queue_resize_fsm       phases waiting for head/tail positions
│     └── partition_power_seq    300-cycle partition switching
├── u_iq, g_prf[0].u_prf (INT), g_prf[1].u_prf (FP) : resizable_buffer
│     ├── partitioned_buffer     valid-bit buffer, lowest-free allocation
│     ├── occupancy_sampler, stall_counter, partition_power_seq
│     └── buffer_resize_fsm      immediate upsize, drain-then-detach downsize
resize_pkg                        default sizes and timing, FSM state and power-direction types
```

## Interfaces and timing

All logic runs on one clock `clk`. Reset `rst_n` is synchronous and active low. After reset every
partition is on and in use, which is the full-size machine.

**Queues: `rob_*` and `lsq_*`, one array element per thread.**

* The pipeline presents `alloc_cnt` (0..8) entries with `alloc_data` and receives `alloc_grant`
  in the same cycle. The accepted entries are the first `alloc_grant` of the request, and they
  land at `tail_idx` onwards.
* `stall` is high when the request did not fit in the active partitions. This is the event the
  upsize counter counts.
* `commit_cnt` entries leave at the head at the clock edge. `head_data` shows the 8 oldest
  entries combinationally.
* An entry freed by a commit can be allocated from the next cycle on.

**Buffers: `iq_*`, and `prf_*[0]` (INT) and `prf_*[1]` (FP).**

* `alloc_cnt` requests entries. `alloc_grant` and `alloc_idx` say which slots were given, in the
  same cycle, always the lowest free ones.
* The payload is written through `wr_en`/`wr_idx`/`wr_data`. The IQ writes the instruction into
  the slot it was just given. A register file writes at writeback.
* `rd_idx`/`rd_data` is a combinational read. `rel_valid`/`rel_idx` frees entries at the clock
  edge.
* The shared buffers have a single 8-wide allocation port. Deciding which thread gets it is the
  pipeline's job.

**Status outputs.**

* `*_parts` is the number of partitions in use.
* `*_pwr_en` is the per-partition power enable.
* `*_occupancy` is the number of live entries.

Decisions are registered one-cycle pulses, issued in the cycle after the period's last cycle or
after the threshold stall.

## Parameters

The top's defaults are the sizes above.

* `NTHREADS`, `W`, `NPART`: threads, port width, partitions per structure.
* `ROB_ENTRIES`, `LSQ_ENTRIES`, `IQ_ENTRIES`, `PRF_ENTRIES`: structure sizes.
* `PERIOD_LOG2` (15), `THRESHOLD` (32768), `DELAY` (300): controller timing.
* `ROB_DW` (32), `LSQ_DW`, `IQ_DW`, `PRF_DW` (64): payload widths. These are placeholders: the
  scheme does not depend on what the entries hold.

Each structure size must divide by `NPART`, and `W` must not exceed a queue partition. Initial
assertions check both.

## Design choices

The following are decisions of this implementation where the scheme leaves room:

* **Four partitions per structure**, taken from the scheme's worked example of partitions 0–3.
* **Register file sizes.** The INT and FP register files are each taken as 192 entries. The
  configuration gives one 192-entry figure but treats the two files separately.
* **Upsize threshold.** The upsize fires on the 32768th counted stall. Firing one stall later,
  once the count exceeds 32768, would be an equally valid reading. A stall is one cycle
  in which a request did not fully fit, however many entries were refused. The stall counter is
  cleared only by its own decision, not at period ends.
* **Order of an upsize in a queue.** For a queue upsize, the 300-cycle power-up comes before the
  wait for an unwrapped queue, so the two overlap. For a downsize the order is wait, detach, then
  power down.
* **Draining a buffer.** During a buffer downsize phase, allocation is kept out of the last
  partition so that it can drain.
* **Resize cycle.** A one-cycle allocation bubble occurs when a queue changes size.
* **Buffer insides.** Buffers allocate lowest-free-first from a valid-bit array. The IQ's wakeup
  and select logic is not modelled: the IQ here only stores and frees entries.
* **Same-cycle reuse.** An entry retired in a cycle cannot be allocated again in the same cycle.
  As a result, a structure whose average occupancy is exactly K full partitions stalls at size K
  and bounces between K and K+1.

## Not included

The core pipeline that drives these ports is not part of this RTL: fetch, rename, dispatch,
wakeup/select, the functional units and commit logic. Nor are the caches, the TLBs or the power
gates' transistors. The top's ports are where a pipeline connects.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a `TB_RESULT` line.

| testbench | what it checks |
|---|---|
| `tb_occupancy_sampler` | period pulses, average and downsize decision against a testbench-side sum, over random traces |
| `tb_stall_counter` | exact cycle of each upsize decision and the running count |
| `tb_partition_power_seq` | enables, busy, and `done` exactly `DELAY` cycles after each accepted request |
| `tb_queue_resize_fsm` | all phases, limits at 1 and 4 partitions, upsize priority, held upsize |
| `tb_buffer_resize_fsm` | the same for the buffer FSM, including closing allocation during a drain |
| `tb_partitioned_queue` | FIFO order, grants, stalls, tail inside the limit, `can_grow`/`can_shrink`, with random resizing |
| `tb_partitioned_buffer` | lowest-free allocation under a moving limit, payload, occupancy, `part_empty` |
| `tb_resizable_queue`, `tb_resizable_buffer` | both decisions against independent monitors, power-up time before attach, shrinking to 1 and growing to 4 |
| `tb_smt_resize_top` | the whole design at default sizes, about 300K cycles; see below |
| `tb_workload_mixes` | the twelve two-thread application mixes, each reduced to its average occupancies |

**`tb_smt_resize_top`.** This runs every structure at full default size:

1. Light traffic must shrink all seven structures to one partition.
2. Heavy traffic with slow retirement must grow them back to four.
3. Random traffic follows.

Throughout, the ROB and LSQ contents are checked for program order against reference FIFOs, and
IQ and PRF payloads are checked on read-back. The testbench also sets up two special cases:

* Thread 1's ROB parks its head in the last partition before a period ends.
* An IQ entry is pinned in the IQ's last partition.

In both cases the downsize phase has to wait, and the following stalls make the upsize decision
override it. The testbench counts each mechanism and fails if any of them never occurs: both
decisions, the head/tail waits of both queue phases, the buffer drain wait, upsize priority,
power-up and power-down, and stalls.

**`tb_workload_mixes`.** This holds each structure at the average occupancy measured for each
mix (for example mgrid + mcf: ROB 18.75 % and 98.96 %, IQ 98.44 %). It then checks that each
controller settles at the smallest size the average fits in, max(1, ceil(occupancy / partition
size)). An average that exactly fills K partitions may also settle at K+1. The IQ is given a
figure in seven mixes (1, 3, 5, 7, 8, 9, 10). In the other five it is left empty and must shrink
to one partition. Over the twelve mixes this leaves on average about 33 % of the ROB partitions
off, 43 % of the LSQ, 14 % of the INT-PRF and 35 % of the FP-PRF, and 21 % of the IQ over its
seven mixes. These are steady-state figures for constant occupancy; they are not measurements of
real program behaviour. To keep it short, this testbench uses a 1K-cycle period and a 256-stall
threshold.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/resize_pkg.sv tb/tb_smt_resize_top.sv \
          --top tb_smt_resize_top -Mdir obj_top
./obj_top/Vtb_smt_resize_top
```

Replace the testbench name to run any other. Every testbench needs only `rtl/resize_pkg.sv` and
the include paths. The full-size run takes a few seconds.
