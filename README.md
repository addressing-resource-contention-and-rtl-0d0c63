# Bluetree memory tree with a root queue

Eight clients share one memory through a tree of pipelined 2-to-1
multiplexers (a "Bluetree"). Each multiplexer arbitrates locally, and there is
no global schedule. This gives good average latency and scales well. But when
the memory is busy, pending requests pile up inside the tree. The local
arbiters then let newer requests overtake older ones. The result is that
latency depends on where a client sits in the tree and on what its neighbours
are doing, not only on how loaded the system is.

The fix is small. A FIFO, the **root queue**, goes between the tree root and
the memory. If the queue is deep enough to hold every outstanding request,
requests stop waiting inside the tree. The memory then serves them strictly
in the order they reached the root. In the evaluated eight-client
configuration, this makes the latencies of all clients the same under steady
load (259 cycles for the workload below) where without the queue they spread
from 159 to 322 cycles.

This repository holds synthesizable SystemVerilog for the whole system:
the tree, the queue, a fixed-latency shared memory, and synthetic traffic
generators that stand in for the processors and measure latency.

```
 tg0 tg1  tg2 tg3  tg4 tg5  tg6 tg7        traffic_generator (clients 0..7)
   \ /      \ /      \ /      \ /
   mux      mux      mux      mux          level 2 (leaf stage)
      \    /            \    /
       mux                mux              level 1
            \          /
               mux                         level 0 (root stage)
                |
          root_queue  (bypass FIFO, Q entries)
                |
          shared_memory (one request at a time, t_D cycles each)
```

Path 0 of every multiplexer (the left input in the drawing) is its local
high-priority input.

## The multiplexer and its blocking factor (`bluetree_mux`, `bluetree_arbiter`)

Each stage has one request buffer on its memory side and one response buffer
for each client side. A request or response therefore takes exactly one cycle
per stage when nothing blocks it. In the 8-client tree that is 3 cycles up and
3 cycles down.

The arbiter gives **path 0** priority, with a starvation limit set by the
blocking factor `ALPHA`:

* If both inputs request, path 0 wins. The exception is when path 0 has
  already been granted `ALPHA` times while the current path-1 request waited.
  In that case path 1 wins.
* A path-1 request with no competition is granted at once.
* The count only changes when a grant is actually taken. When the stage is
  stalled because the root is blocked, the arbiter state is frozen.

With `ALPHA = 1` (the default) this is a two-way round robin under load. A
client's **priority path** lists, from leaf to root, whether it enters each
stage on the high (H) or low (L) input. Client 1, for example, has
{L, H, H}. Even clients enter their leaf multiplexer on path 0, and a left
subtree enters its parent on path 0.

Responses never block. A stage steers each response using one bit of the
client index that every request carries. The root uses the most significant
bit and the leaf stage the least significant.

Requests use a valid/ready handshake. A stage's request buffer accepts a new
request in the same cycle it hands its current one on. Responses have a valid
signal only, because clients must always accept them.

## The root queue and "queued service" (`root_queue`)

The queue is a **bypass FIFO**:

* When it is empty, an arriving request goes straight to the memory in the
  same cycle. An idle system pays nothing for the queue.
* Otherwise the request is stored, and the memory takes stored requests in
  arrival order.
* A full queue does not accept a request, even in a cycle when it is also
  sending one on.
* `Q = 0` removes the queue, which gives the original tree.

The sizing rule counts every place along the shared path where a request can
wait without blocking others:

| where                                      | requests |
|--------------------------------------------|----------|
| in service in the memory                   | 1        |
| root queue                                 | Q        |
| root multiplexer's request buffer          | 1        |
| one of the two level-1 request buffers     | 1        |

Only one level-1 buffer is counted. Counting both could put two requests in
competition for the root again.

If N_RQ(B) is the total number of requests that all clients may have
outstanding, no request waits in a contended part of the tree as long as
**Q >= N_RQ(B) - 3**. Every request then queues behind at most
N_RQ(B) - 1 others, each taking t_D cycles. Its latency is therefore below
**N_RQ(B) x t_D**.

This bound holds only once the system is loaded. The first requests of a run
find the memory idle, so their 3 + 3 cycles in the tree are not hidden behind
other requests' service time. Those requests can exceed the bound by up to 6
cycles. The testbenches check the bound for requests released in the loaded
steady state. For all requests they check the bound plus 6.

The default is `ROOT_Q = 20`, which covers every workload listed below. For
example, workload group c has N_RQ(B) = 13 and needs Q >= 10.

## Shared memory (`shared_memory`)

The memory is a 1024 x 32-bit array with a fixed service time `T_D = 20`. It
holds one request at a time. It accepts a request when idle, or in the same
cycle it delivers the previous response. Back-to-back requests are therefore
served exactly every 20 cycles. The response appears T_D cycles after
acceptance. A write returns an acknowledge.

## Clients and measurements (`traffic_generator`)

Each generator runs a workload described by two numbers:

* **N_RQ(P_j)**: the most requests it may have outstanding. At that limit it
  stalls. A returning response lets it issue again in the next cycle.
* **T_RQ(P_j)**: the minimum spacing between two issues. It is computed as
  `1 + (LFSR & cfg_t_mask)`, freshly for each request. A mask of 0 gives a
  fixed interval of 1. Masks of 63 and 255 give the ranges [1, 64] and
  [1, 256].

Requests alternate between writing a word and reading it back, so read data
is checked end to end (`data_err`). For each response the generator reports:

* the **release time**: the global cycle counter in the first cycle the
  request was offered;
* the **latency**: the cycles from release until the response reaches the
  client.

Each generator also keeps its minimum and maximum latency. Responses to one
client come back in order because every path through the tree and the queue
is first in, first out.

## Top level (`bluetree_system`)

The top level contains the eight generators, the tree, the queue, the memory
and a free-running cycle counter. Its parameters are `N_CLIENTS = 8`,
`ALPHA = 1`, `ROOT_Q = 20`, `T_D = 20` and `MAX_OUT = 8`. `MAX_OUT` is the
largest outstanding limit a generator supports.

Each client's workload is set by its own `cfg_*` inputs. A `start` pulse
begins a run on all clients at once. `all_done` goes high when every client
with a non-zero request count has finished.

Shared types (`mem_req_t`, `mem_rsp_t`) and defaults live in `bt_pkg`. The
package also holds `wc_blocking`, which computes the worst-case blocking
number of a priority path under flooding. It walks from the leaf to the root.
At a stage where the path is H it adds ceil((n+1)/alpha) + 1, and where it is
L it adds (n+1) x alpha + 1. Here n is the blocking accumulated so far. The
worst-case latency is then (n + 1) x t_D + depth.

## Measured behaviour

`tb/tb_workloads.sv` runs each workload on four copies of the system with
Q = 0, 5, 10 and 20. All runs use t_D = 20, 8 clients and alpha = 1.

| workload (N_RQ per client P0..P7, interval, requests) | Q = 0 | Q = 5 | Q = 10 | Q = 20 |
|---|---|---|---|---|
| group c: 2,1,1,3,3,1,1,1, T = 1, 36 | highest 322; steady 159 to 322 depending on client | P2, P3 at 319, others 239 | all 259 | all 259 |
| group b: 1,0,1,2,2,0,0,1, T = 1, 36 | steady 119 to 199 | all 139 | all 139 | all 139 |
| balanced: 2 each, T in [1,256], 100 | highest 322 | highest 399 | highest 359 | highest 319 |

With queued service, the steady-state latency for group c is
13 x 20 - 1 = 259. The "- 1" appears because a client reissues one cycle
after its response arrives, while the memory has already started on the next
request.

The analytical worst case for a fully flooded tree with alpha = 1 is 14
blockings, or 303 cycles, on every path. The Q = 0 runs of group c exceed it
(322 on client 3). The bound's assumptions therefore do not cover this
pipeline exactly. It is reported for reference and is not used as a check.

## Where this design makes its own choices

* The handshakes, the field widths (3-bit client index, 10-bit word address,
  32-bit data) and the response format.
* The arbiter counts only path-0 grants made while path 1 waits.
* The request buffer sits once at each multiplexer output. The response
  buffers sit once per client side.
* The root queue's full-queue rule and the default Q of 20. The evaluation
  used 0, 5, 10 and 20.
* The traffic generator's LFSR intervals. These allow only ranges of the form
  [1, 2^k]. The original workload contents are unknown.
* The write/read-back request pattern.
* The latency bound needs up to 6 extra cycles at the start of a run, as
  explained above.

The processor that would normally be a client is not included. A client is
anything that drives the generator's request and response port. The TDM-based
globally arbitrated tree, which serves only as a point of comparison, is not
built.

## Files

| file | content |
|---|---|
| `rtl/bt_pkg.sv` | types, default sizes, worst-case blocking function |
| `rtl/bluetree_arbiter.sv` | blocking-factor arbiter |
| `rtl/bluetree_mux.sv` | one tree stage |
| `rtl/bluetree_tree.sv` | the tree, built with generate loops for any power-of-two client count up to 8 |
| `rtl/root_queue.sv` | bypass FIFO |
| `rtl/shared_memory.sv` | fixed-latency memory |
| `rtl/traffic_generator.sv` | synthetic client |
| `rtl/bluetree_system.sv` | top level |
| `tb/tb_<block>.sv` | self-checking unit test per block |
| `tb/tb_bluetree_system.sv` | end-to-end test at default size |
| `tb/tb_workloads.sv` | evaluated workloads across queue sizes |

Going past 8 clients means widening `ID_W` in `bt_pkg`.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog. Example, run from
the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bluetree_system \
    -y rtl -y tb +libext+.sv -Irtl rtl/bt_pkg.sv tb/tb_bluetree_system.sv
./obj_dir/Vtb_bluetree_system
```

Replace the top module and file to run another test. `tb_bluetree_system`
runs the system at its default size through three phases:

1. Group c with interval 1.
2. Group c with random intervals.
3. An overload with 64 outstanding requests, which fills the root queue and
   stalls the tree.

Across the phases it checks completions, data, FIFO service order at the
memory, the latency bound, and identical steady-state latencies. It also
fails if any of the mechanisms (contention, forced low-priority grant, tree
stall, bypass, queueing, full queue, outstanding limit, interval wait) never
occurred. Each test takes well under a second.

The assertions in the RTL use `disable iff (!rst_n)` on an asynchronous
reset, so Verilator lint reports SYNCASYNCNET. The warning is harmless.
