# Process prefetching for the SEMPRES fetch stage

SEMPRES is a simultaneous multithreaded (SMT) processor that runs
independent *processes* instead of threads of one program. Its fetch
stage has several *slots*, each fetching for one process, and a queue of
processes waiting for a slot. The weak point of such a machine is the
L1 instruction cache. Many processes share it and evict each other, so
when a slot switches to a new process, that process' code is usually not
in L1 and the slot stalls.

*Process prefetching* works round this. The hardware already knows which
processes will run next, because scheduling is done in the processor and
not by software. So a prefetch unit walks the waiting queue and copies
the line at each waiting process' program counter from L2 into L1
**before** the process is given a slot. Each waiting process has a
**miss-status** bit. Only processes whose line has arrived (miss-status 1)
are switched into a slot. A process that misses in L1 while it runs is
not stalled: it goes back to the queue with miss-status 0 and waits for
the prefetch unit, and the slot takes another, already prefetched,
process.

This repository holds synthesizable SystemVerilog for that fetch/prefetch
stage, with one self-checking testbench per block, an end-to-end
testbench and a sweep over the configurations the architecture was
evaluated at.

## Block diagram

```
             L2 (outside)                       decode / dispatch (outside)
               ^     |                                   ^  FI heads, dequeue counts
   request     |     |  response                         |
           +---+-----v-----+    fill    +-----------+    |
           | prefetch_unit |----------->| l1_icache |    |
           +---+-------^---+            +-----+-----+    |
   oldest  |   |       |  set                 | read     |
   miss=0  |   |       |  miss-status         v          |
           v   |       |            +-------------+    +-+------------+
        +------+-------+-+  oldest  | fetch_unit  |--->| fetch_slot 0 |
        | process_queue  |--------->| token ring, |--->| fetch_slot 1 |
        |  (FP)          |  miss=1  | one slot    |--->|     ...      |
        |                |<---------| per cycle   |--->| fetch_slot 7 |
        +----------------+ switched +-------------+    +--------------+
               ^             -out process
               | create (new process)
```

| module | role |
|---|---|
| `sempres_fetch_top` | the stage; wires the blocks together |
| `process_queue` | FP: the waiting processes, oldest first, each with miss-status |
| `prefetch_unit` | L2 to L1 prefetch for waiting processes with miss-status 0 |
| `l1_icache` | L1 i-cache: one read port for fetch, one fill port for prefetch |
| `fetch_unit` | round-robin fetch logic: decides what happens to the slot holding the token |
| `fetch_slot` | RDP register (the running process' descriptor) and FI queue (fetched instructions) |
| `sempres_pkg` | descriptor and FI entry types, widths, event codes |

## The life of a process

A process descriptor (`proc_desc_t`) holds a process id, a PC (a real,
already translated, word address), a time-slice counter and miss-status.

1. **Created.** It enters FP with miss-status 0.
2. **Prefetched.** The prefetch unit takes the oldest FP entry that has
   miss-status 0 and no request in flight. It requests line `pc / FETCH_W`
   from L2, tagged with the process id. When the line returns it is
   written into L1, and in the same cycle the entry's miss-status becomes 1.
3. **Scheduled.** When the token reaches an idle slot, the slot takes the
   oldest FP entry with miss-status 1 and fetches for it in the same cycle.
4. **Running.** On each token visit the slot looks up L1 at its PC.
   - On a hit, the instructions from the PC to the end of the line go into
     FI. The PC moves to the start of the next line and the time-slice
     counts down by one.
   - On a miss, the process goes back to FP with miss-status 0 and the
     slot becomes idle. Nothing is requested from L2 at this point; the
     prefetch unit takes care of the line when the process reaches it.
5. **Switched out for other reasons.** If the time-slice has run out, or
   decode has asked for a switch (`switch_req`), the process goes back to
   FP with its miss-status unchanged. Its time-slice is refilled either way.

Only one line of each process is prefetched. A process that has just been
switched in therefore hits on its first line, and then hits again only on
lines that are still in L1 from earlier runs.

## The token ring and what one cycle does

`fetch_unit` keeps a token that moves to the next slot every cycle, so
each slot is visited once every `NSLOTS` cycles, whatever happens. For
the slot holding the token, the decision is combinational and takes
effect at the next rising edge:

| slot state | condition | action | `ev` |
|---|---|---|---|
| busy | time-slice 0 or switch pending | back to FP, miss-status kept | `EV_SWITCH` |
| busy | FI has no room for the line | nothing | `EV_STALL` |
| busy | L1 hit | line into FI, PC and time-slice advance | `EV_HIT` |
| busy | L1 miss | back to FP with miss-status 0, slot idle | `EV_MISS` |
| idle | FP has a prefetched process, FI has room | load it and fetch: hit or miss as above | `EV_HIT` / `EV_MISS` |
| idle | FP has a prefetched process, FI full | load only | `EV_FILL` |
| idle | nothing prefetched in FP | nothing, token moves on | `EV_PASS` |

If FP cannot take a process back, the visit becomes a stall. With
`FP_DEPTH` at least the number of processes this cannot happen.
`ev_loaded` marks the cycles in which a process was taken from FP.

At most one line enters the whole stage per cycle. The fetch bandwidth is
therefore `FETCH_W` instructions per cycle, shared by all slots.

## Timing

- **L1 lookup:** combinational. A fetch completes in the cycle its slot
  holds the token, and the instructions are in FI from the next cycle.
- **Prefetch delay:** `1 + L2 delay`. Say the prefetch unit takes a
  process from FP in cycle *t*. Its request is on the L2 port from *t+1*.
  An L2 with delay *D* answers in *t+1+D*, and in that cycle the line is
  written into L1 and miss-status is set. The process can be scheduled
  from *t+2+D*. With an L2 delay of 3 this is the 4-cycle prefetch delay
  of the base configuration.
- **L2 port:** valid/ready on requests, which are held until accepted.
  Responses carry the line address and the process id, may come in any
  order, and any number may be outstanding. `l2_resp_valid` cannot be
  back-pressured.
- **FP:** all three users (enqueue, schedule, prefetch) are served in the
  same cycle. A process taken for a slot and sent back after an immediate
  miss is handled in one cycle.
- **Reset:** synchronous and active low. It empties FP and every FI,
  clears every slot's busy bit and invalidates L1.

## Interfaces of `sempres_fetch_top`

| port group | direction | meaning |
|---|---|---|
| `create_valid/create_desc/create_ready` | in/in/out | New process into FP. A process coming back from a slot wins, so `create_ready` is low in those cycles. |
| `switch_req[s]` | in | Decode asks slot *s* to switch out its process: a process-control instruction or an I/O stall. The request is held until the next token visit. |
| `redirect_valid/redirect_pc/redirect_ack[s]` | in/in/out | The running process of slot *s* continues at a new PC (taken branch or mispredict). See below. |
| `disp_head[s][k]`, `disp_count[s]`, `disp_deq[s]` | out/out/in | The oldest `FETCH_W` FI entries (`{pid, addr, instr}`) and how many are valid. Decode removes `disp_deq` of them per cycle, in order. |
| `l2_req_*`, `l2_resp_*` | | L2 port, as above. |
| `ev`, `ev_slot`, `ev_loaded`, `pf_issue`, `fp_count`, `fp_prefetched`, `slot_busy`, `slot_pid` | out | Statistics and status. |

**Redirects.** A redirect is accepted only while the slot holds a
process that is not being switched out in the same cycle
(`redirect_ack`). When accepted:
- FI drops, at once, the youngest run of entries that belong to the
  running process, and any line being pushed in that cycle.
- The new PC is held in the slot and used at the next token visit.

The flush removes everything younger than the branch only when nothing
from another process lies between the branch and the tail of FI. Decode
has to respect that; the end-to-end testbench shows one way to do so. A
branch whose process has already left the slot cannot be redirected
through this port.

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `NSLOTS` | 8 | Fetch slots (the base configuration). |
| `FETCH_W` | 8 | Instructions per L1 line, and so per fetch (the base configuration). Need not be a power of two. |
| `FP_DEPTH` | 16 | FP entries. The base configuration has 16 processes. |
| `FI_DEPTH` | 16 | FI entries per slot. This design's choice: two lines. |
| `L1_LINES` | 512 | L1 size in lines (4096 instructions). This design's choice. |
| `L1_WAYS` | 2 | L1 associativity, LRU replacement. `L1_LINES` must be a multiple of it. This design's choice. |
| `TSLICE` | 256 | Time-slice, in successful fetches, given to a process that goes back to FP. This design's choice. |

The widths are in `sempres_pkg`: pid 8 bits, PC 32 bits, time-slice
16 bits, instruction 32 bits. All four are this design's choice.

## What follows the source architecture and what does not

The following come from the published proposal:
- the slots, each with an RDP register and an FI queue;
- the FP queue with one miss-status bit per entry;
- round-robin fetch, one slot and one line per cycle;
- switching out on an L1 miss (miss-status to 0) and on a time-slice end
  or I/O stall (miss-status unchanged);
- taking only prefetched processes into idle slots, loading and fetching
  in the same cycle;
- no demand refill from L1 to L2;
- a prefetch delay of L2 delay plus one cycle;
- the default sizes: 8 slots, 8-wide fetch, 16 processes.

The following are this design's own choices:
- FP is a compacting array; scheduling and prefetch both pick the oldest
  qualifying entry;
- one line, the one at the PC, is prefetched per process, and several
  prefetches may be in flight;
- L1 is 2-way set-associative with LRU replacement and 512 lines;
- a fetch takes the instructions from the PC to the end of its line;
- the time-slice counts fetches and is refilled on every switch;
- a visit stalls when FI has no room for the line;
- the create, switch-request and redirect ports and their semantics;
- all widths.

Three departures:
- **Old descriptors.** In the full architecture, a switched-out process'
  descriptor waits in further queues until its last instruction retires,
  and only then returns to FP. Here, as in the architecture's analytical
  model, the process returns to FP at once. Its older instructions may
  still be waiting in an FI when it is fetched again in another slot, so
  program order across slots is decode's responsibility.
- **Switch reasons.** Only misses, time-slice ends and external requests
  switch a process out. The process-control instructions (create, kill,
  suspend, resume, run-now) are not decoded here. They reach the stage
  only through the create port and `switch_req`.
- **Address translation** is not modelled. PCs are real addresses.

Not built, because no design for them is given: decode and renaming,
the issue buffers, the functional units, the reorder buffers, the finish
and conclusion stages, the register frames, the D-cache, L2 and
address translation. The top brings out the signals where they would
connect.

## A behaviour worth knowing: prefetched lines can be evicted

The miss-status bit says that a line *was* brought into L1, not that it
is still there. Between a process' prefetch and its scheduling, other
prefetches and other processes can evict that line from L1. The process
then misses as soon as it is switched in, and goes straight back to FP
(`ev_loaded` together with `EV_MISS`). The design stays correct, but
throughput drops, and the effect feeds itself: every such miss causes one
more prefetch, which can evict another waiting process' line.

The L1 size and organisation were chosen with this in mind. With
`L1_LINES=128` and `L1_WAYS=1` (direct-mapped), on the end-to-end workload
2441 of 2953 process loads missed at once, and the L1 hit rate was 84%.
With 512 lines, 2-way LRU (the default), 14 of 586 loads miss at once and
the hit rate is 98%. A check of L1 just before scheduling would also
help, but it is not part of the proposal.

## Verification

Each block has a self-checking testbench in `tb/`, and each prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_process_queue` | Random traffic on all ports against a queue model: oldest-first selection, order kept across removals, miss-status only from completed prefetches, full queue. |
| `tb_fetch_slot` | Loads, releases, pushes, random dequeues, switch requests and redirects against an FI/RDP model, including the redirect flush. |
| `tb_l1_icache` | Random fills, lookups and used hits on a 4-way instance against an LRU model: hits, misses, evictions, LRU order, no hits after reset. |
| `tb_prefetch_unit` | Line address and tag on L2, requests held under back-pressure, exactly one completion per process, fill data, and a 4-cycle prefetch delay with an L2 delay of 3. |
| `tb_fetch_unit` | Random slot, FP and L1 states every cycle against the expected action: token order, every event type, pushed entries, descriptors sent back. |
| `tb_sempres_fetch_top` | End to end at the default parameters with an L2 of delay 3 (see below). |
| `tb_workloads` | The same workload at nine configurations, and at four more L1 hit rates (see below). |

`tb/l2_model.sv` is a behavioural L2 with a fixed delay; every request is
accepted at once. It holds no memory: word *a* is `instr_at(a) =
(a * 0x9E3779B1) ^ 0x5A5A0F0F` (in `tb/sempres_tb_pkg.sv`), so every
fetched instruction can be checked against its address.

**The end-to-end workload.** Sixteen processes run chains of 37-instruction
loops, each process in its own code region. Decode is emulated: it
dequeues a random number of instructions per slot, and the last
instruction of a loop acts as a taken branch back to near the loop start.
The branch is redirected only when the flush is known to be exact;
otherwise it waits at the FI head, or, if its process has left the slot,
it is treated as not taken. There are also phases of slow decode (FI
fills up), random switch requests, and a short first time-slice for four
processes.

The test checks:
- every delivered instruction word;
- program order within each slot;
- that every process makes progress;
- the 4-cycle prefetch delay of every prefetch;
- that every mechanism happens at least once: hit, miss, token pass,
  time-slice and requested switch, FI stall, load without fetch,
  prefetch, redirect with flush.

At the defaults it measures an L1 hit rate of about 98% and delivers
about 5.6 instructions per cycle to decode, out of a bound of 8. The
bound is not reached because a fetch stops at the end of a line, and a
fetch into a full FI stalls.

**The sweep.** `tb_workloads` runs the base configuration and variants
with 4 and 6 slots, fetch widths 12 and 16, and prefetch delays of 2, 9,
12 and 16 cycles. It also checks the one-line-per-cycle bound.

To sweep the L1 hit rate, the base configuration is also run with a
share of the loop-closing branches (`JUMP_PCT` of `fetch_workload`)
jumping to a random loop of the process' code region. Those loops are
probably not in L1. The testbench checks that hit rate and throughput
fall together:

| far jumps | 0% | 10% | 25% | 50% | 100% |
|---|---|---|---|---|---|
| L1 hit rate | 98% | 88% | 84% | 73% | 60% |
| instructions per cycle | 5.59 | 5.04 | 4.78 | 4.21 | 3.46 |

The hit rate here is a result, not an input. It depends on how the
synthetic code maps onto L1, and on how long processes stay in a slot
(a branch can only be taken while its process is resident). The rates it
prints (60% to 99% hits, 3.5 to 8.9 instructions per cycle) describe
this workload on this RTL. They are not comparable with throughput curves computed for a fixed
hit rate.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sempres_pkg.sv tb/sempres_tb_pkg.sv tb/tb_sempres_fetch_top.sv \
    --top-module tb_sempres_fetch_top
./obj_dir/Vtb_sempres_fetch_top
```

Replace `tb_sempres_fetch_top` with any other testbench name to run that
one. Each run takes seconds. The testbenches reset or initialise
everything they read, and use only `$urandom`, so they run on a
two-state simulator. The RTL contains immediate assertions for the
handshake rules: no take from an empty FP selection, no enqueue into a
full FP, no FI overflow or over-dequeue, and no change to a pending L2
request.

To change a size, override the top's parameters. `NSLOTS` must be at
least 2 and `FI_DEPTH` at least `FETCH_W`; the other sizes are free.
Non-power-of-two values work, at the cost of divide and modulo logic for
the line address and cache index.
