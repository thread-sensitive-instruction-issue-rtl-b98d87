# Thread-sensitive instruction issue for a partitioned SMT queue

A simultaneous-multithreading (SMT) core runs several hardware threads at once
and lets them share the functional units. When every thread's instructions
sit in one common instruction queue, a single central scheduler has to pick
from all of them. That scheduler grows with the whole queue, and it does not
know which thread each instruction belongs to. This RTL builds the other
arrangement. The queue is split into one sub-queue per thread, and each
sub-queue has its own small scheduler. A simple per-thread rule then divides
the issue bandwidth between the threads.

The rule rests on one number per thread, its **ready instruction count (RIC)**:
the number of instructions in its sub-queue whose operands are available. In
every cycle, each thread may issue at most

    G = RIC * ISSUE_RATE / n          (n = NUM_THREADS * SUBQ_SIZE, the whole queue)

of its oldest ready instructions. The count is rounded down, and a thread with
any ready work gets at least 1. A thread with a lot of ready work gets a large
share, and a thread with little ready work still makes progress. Because n is
a power of two, the division is a right shift. Because the RICs of all threads
together can never exceed n, using n instead of the actual sum of the RICs
means no adder has to span the threads. Each thread's scheduler therefore
stays local.

The RTL covers the issue stage only: the sub-queues, the per-thread schedulers
and the packing of issued instructions into issue slots. The rest of the core
is left outside the ports: fetch, decode, register renaming, the functional
units and the caches.

## The grant rule in numbers

| configuration | threads k | entries per thread m | n | issue rate | largest G | RIC needed for G from the shift |
|---|---|---|---|---|---|---|
| default (8 contexts) | 8 | 16 | 128 | 12 | 1 | 11 (11*12/128 = 1.03) |
| 4 contexts | 4 | 16 | 64 | 8 | 2 | G=1 at 8, G=2 at 16 |

Consequences worth knowing before using the default build:

* In the default machine G is never above 1. Each thread issues at most one
  instruction per cycle, and at most 8 of the 12 issue slots are ever used.
  For 1 <= RIC <= 10 the grant of 1 comes from the starvation rule, and only
  from RIC = 11 on from the shift itself. This follows directly from the
  formula and the sizes above.
* The limits never add up to more than the issue rate. Each G is at most
  max(1, floor(m*R/n)) = max(1, floor(R/k)), so their sum is at most R as long
  as k <= R. `smt_issue_top` refuses to elaborate with more threads than issue
  slots. `issue_merge` asserts that every offered instruction finds a slot.
* G is registered. The RIC a sub-queue shows in cycle t sets the limit its
  selector uses in cycle t+1. The RIC of cycle t still counts the
  instructions that issue in cycle t.

## One cycle, block by block

```
             dispatch (<= 4/thread)        wake mask
                    |                         |
        +-----------v-------------------------v-----+   one per thread
        | iq_subqueue  (16-entry ring, head = oldest)|
        +----+-----------+-------------+-----^------+
          req|head    ric|             |     |iss lanes -> payload
             |           |             |     |
        +----v-----------v----+        |     |
        | partition_scheduler |        |     |
        |  tss: ric -> G (reg)|        |     |
        |  oldest_select(G)   +--------------+
        +---------------------+  lanes (slot, payload)
                    |
        +-----------v--------------+
        | issue_merge: pack k x L  |  --> ISSUE_RATE issue slots (tid, slot, payload)
        +--------------------------+
```

All of the issue path is combinational from registered state. In each cycle:

1. Each sub-queue presents its ready mask `req`, its `head` (the oldest slot)
   and `ric = popcount(req)`.
2. `oldest_select` walks the ring from `head` and grants the first
   `min(G, LANES)` ready slots. The k-th grant goes on lane k, so lane 0
   carries the oldest. `LANES` is the largest possible G: 1 by default.
3. The sub-queue reads the granted instructions out on the same lanes.
   `issue_merge` packs all partitions' lanes into the issue slots in thread
   order and tags each one with its thread ID.
4. At the clock edge the issued slots are freed, woken slots become ready,
   dispatched instructions are written, and `tss` registers the new G from
   this cycle's RIC.

Latency: an instruction dispatched as ready in cycle t sits in its sub-queue
from t+1. If its thread already had G >= 1, it can issue in t+1 (provided it
is the oldest ready instruction). If the thread's queue held no ready work
before, the RIC it raises in t+1 sets G = 1 only for t+2.

## The sub-queue

`iq_subqueue` is a circular buffer of `SUBQ_SIZE` entries. Each entry holds a
valid bit, a ready bit and a 32-bit instruction. Age order is ring order from
`head`.

* **Dispatch.** Up to `DISPATCH_W` instructions per cycle arrive on lanes
  filled from lane 0 upward; an assertion checks this. Lane j is accepted when
  j < `free`. Accepted instructions take consecutive slots after the
  youngest one, reported on `disp_slot`. `disp_rdy` marks an instruction
  whose operands are already available.
* **Wakeup.** `wake[i]` sets the ready bit of slot i. A producer that knows
  which slot its consumer got (from `disp_slot`) can wake it.
* **Issue and holes.** Issue is out of order within a thread: a younger ready
  instruction may leave while an older one waits. Its slot becomes a hole. The
  ring does not compact: `head` moves past every freed slot at the front in
  one step, and a hole further back is reused only once `head` has passed it.
  `free` therefore counts the span from head to tail as occupied, holes
  included. This keeps age order trivial (ring order) at the cost of some
  capacity when old instructions wait long.

## Modules

| file | role |
|---|---|
| `rtl/smt_issue_pkg.sv` | default sizes, entry/lane/issue-slot structs, `g_max()` |
| `rtl/iq_subqueue.sv` | one thread's sub-queue: ring, dispatch, wakeup, RIC, read-out |
| `rtl/oldest_select.sv` | OLDEST(G) selector over one sub-queue |
| `rtl/tss.sv` | thread-sensitive scheduler: RIC -> G, shift and starvation rule, registered |
| `rtl/partition_scheduler.sv` | `tss` + `oldest_select` for one partition |
| `rtl/issue_merge.sv` | packs all partitions' grants into the issue slots |
| `rtl/smt_issue_top.sv` | k sub-queues with their schedulers, and the merge |

Parameters of `smt_issue_top` (defaults are those of the 8-context machine):

| parameter | default | meaning |
|---|---|---|
| `NUM_THREADS` | 8 | thread contexts = partitions (k) |
| `SUBQ_SIZE` | 16 | entries per sub-queue (m); k*m must be a power of two |
| `ISSUE_RATE` | 12 | issue slots per cycle; must be >= k |
| `DISPATCH_W` | 4 | dispatch lanes per thread |

The struct field widths in the package are sized for the default 8 threads
and 16 entries. To go beyond either, raise the `DEF_*` constants in the
package. An elaboration check catches a mismatch. Reset is asynchronous and
active low; it empties every queue and clears every G.

## Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/smt_issue_pkg.sv \
          tb/tb_smt_issue_top.sv --top-module tb_smt_issue_top
./obj_dir/Vtb_smt_issue_top
```

Replace `tb_smt_issue_top` with any of the testbenches:

* `tb_tss`: every RIC value on the 8- and 4-context machines; G is checked
  against integer division plus the starvation rule, including the one-cycle
  delay.
* `tb_oldest_select`: random masks, heads and limits against an age-count
  reference.
* `tb_iq_subqueue`: random dispatch, wakeup and out-of-order issue against a
  list model. It requires a full queue, refused dispatch and holes to occur.
* `tb_partition_scheduler`: the 4-context machine (G up to 2), with lanes and
  timing checked.
* `tb_issue_merge`: packing order and slot count.
* `tb_smt_issue_top`: the whole stage at its default size for 4000 cycles.
  `tb/issue_env.sv` drives it and compares every output each cycle with a
  behavioural model. The test demands that each mechanism occurs: the
  starvation rule, a grant from the shift, a thread held to its limit,
  dispatch back-pressure, out-of-order issue, head skipping, wakeup and an
  idle thread.
* `tb_workloads`: two 4-thread mixes on the 4-context machine and two
  8-thread mixes on the default one, all checked by the same model. It prints
  the instructions per cycle of each thread and mix.

The threads in these tests are synthetic instruction streams with different
dispatch and readiness rates. They are not program traces, so the printed
throughput says how the rule shares the slots, not how a real core would
perform.

## What follows the original proposal and what is added here

Taken from the proposal:

* one sub-queue and one scheduler per thread;
* OLDEST selection within a thread, limited to G;
* RIC as the thread metric;
* G from RIC * issue rate / n with the division done as a shift, the minimum
  of 1 for a thread with ready work, and G registered for the next cycle;
* the sizes: 16 entries per thread, issue rate 12 for 8 contexts and 8 for 4
  contexts, and a per-thread bandwidth of 4.

Choices made here, where the proposal gives no circuit:

* the non-compacting ring organisation and the point where entries are freed
  (at issue);
* the wakeup interface by slot mask;
* the dispatch handshake;
* the 32-bit payload;
* the lane numbering;
* packing the issue slots in thread order;
* asynchronous reset.

The RIC register width is log2(m+1), so that a full queue of ready
instructions is representable.

Not included:

* The general form of the scheduler, with an adder that sums all threads'
  metrics so that metrics other than RIC (such as IPC) can be used. With RIC
  the adder is not needed.
* The single shared queue with a central oldest-first scheduler that the
  scheme is meant to replace.
* The rest of the core: fetch with its thread-selection policy, branch
  prediction, caches, load/store queue, register files and renaming, and the
  functional units. Issue slots are not matched to functional-unit types
  (integer, multiply, memory, floating point); they stand for "an
  instruction goes to some free unit this cycle".
