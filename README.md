# Dynamically scheduled task accelerator for graph methods

Graph queries, such as SPARQL queries over an RDF triple store translated into
graph pattern matching, are nested loops. Their outer-loop iterations are
independent, so they parallelise well. Their run times, however, depend on the
data: one iteration may touch three edges and the next three thousand. An
array of accelerator kernels that is started in groups (fork-join) wastes most
of its time when this happens. Every group waits for its slowest member while
the other kernels sit idle.

This RTL implements the alternative: **dynamic task scheduling**. Every
outer-loop iteration is a *task* that goes into a queue. A task is started on
any kernel the moment that kernel becomes free. A small piece of termination
logic decides when all the work is done by counting tasks in and tasks out.
The kernels share a multi-bank memory through a memory interface controller
(MIC). The MIC routes each access to its bank at run time, lets different
banks work in parallel, and provides an atomic fetch-and-add so kernels can
merge results without locks.

The architecture follows the dynamically scheduled template for high-level
synthesis of graph methods by Minutoli, Castellana, Tumeo, Lattuada and
Ferrandi (ICCAD 2016). Its main configuration, 4 kernels and 4 memory
channels, is the default here.

```
            +------------------- dynamic_task_scheduler -------------------+
 task_* --->| task_queue ---> task_dispatcher <---avail--- status_register |
    |       |     |               | issue (one-hot) -------->     ^        |
    |       +-----|---------------|-------------------------------|--------+
    |             | queue_empty   | start + task                  | kernel done
    v             v               v                               |
 +-- termination_logic --+    +------+ +------+     +------+      |
 | spawn_counter         |    | K0   | | K1   | ... | KN-1 |------+
 | complete_counter <----|----|      | |      |     |      |
 | termination_checker --|--> done   +------+ +------+     +------+
 +-----------------------+       |        |            |
                                 +--------+----- mic --+----- host port
                                          |   |   |   |
                                        bank0 ... bankM-1 (memory_bank)
```

## How a task moves through the design

1. **Task Queue** (`task_queue`). The producer offers a task on
   `task_valid/task_ready/task_data`. The queue holds 16 entries (FIFO) and
   lowers `task_ready` when it is full. A task pushed at the clock edge that
   ends cycle *t* is at the head in cycle *t+1*.
2. **Status Register** (`status_register`). One bit per kernel says "free".
   All bits are set after reset. A kernel sets its bit with its one-cycle
   `done` pulse; the dispatcher clears it when it starts a task there. Both
   take effect at the next edge, and a start wins if both come in one cycle.
3. **Task Dispatcher** (`task_dispatcher`). It acts in any cycle where the
   queue is not empty and at least one bit of the status register is set. In
   that same cycle it pops the head and starts the task on one free kernel
   (`issue`, one-hot, together with the task word). Free kernels are taken in
   round-robin order (`rr_arbiter`). At most one task starts per cycle.
4. **Kernel** (`query_kernel`). It runs the task, making its own memory
   accesses through the MIC. When it finishes it pulses `done` for one cycle.
   It is free again in the cycle after that pulse, and the next task can
   start in that cycle.

The fastest task turnaround on one kernel is therefore: `done` pulse, one
cycle with the kernel free and started, then the new task's first memory
request.

## Termination

The producer does not know when the last task will end, because tasks finish
out of order. Two counters keep track:

* `spawn_counter`: tasks accepted by the queue (one per push).
* `complete_counter`: tasks finished by the kernels. It adds the number of
  `done` pulses in each cycle, since several kernels can finish together.

`termination_checker` raises `done` while both counts are equal **and** the
queue is empty. Every task that entered has then been executed. A task that
has been popped but not finished still counts as spawned and not completed,
so the count, not the queue, covers running tasks. `done` is combinational on
registered signals:

* it falls in the cycle right after a push;
* it rises in the cycle right after the last completion is counted.

`done` only means "finished" once the producer has stopped pushing. Between
two pushes of a slow producer it can be high, and after reset, with no tasks,
it is high as well. A controller that launches a loop of tasks should push
them all and then wait for `done`.

## Memory interface controller (`mic`)

The MIC has `NUM_PORTS` requester ports (inputs-k/results-k) and `NUM_BANKS`
bank ports (inputs-m/results-m). In the top level the ports are the kernels
plus one host port.

* **Address resolution.** Addresses are word addresses and are
  word-interleaved. The bank is `addr mod NUM_BANKS` and the word inside the
  bank is `addr / NUM_BANKS`. `NUM_BANKS` must be a power of two; an assertion
  checks this. Consecutive words, such as the edges of one vertex, therefore
  spread over all banks.
* **Arbitration.** Each bank has its own round-robin arbiter over the
  requesters that address it. Up to `NUM_BANKS` requests are granted per
  cycle, one per bank. `req_ready` is the grant.
* **Responses.** Every request gets exactly one response (`rsp_valid` for one
  cycle) in the cycle after its grant. Reads and fetch-and-adds return the
  old word; writes return 0. A requester must wait for its response before it
  issues the next request. An assertion checks this rule; it is what keeps
  responses from colliding.
* **Atomic fetch-and-add** (`MEM_FADD`). It is granted like a read. In the
  next cycle the MIC returns the old word and writes `old + wdata` back, and
  that bank grants nobody else in that cycle. No other requester can get
  between the read and the write.

Each bank (`memory_bank`) is a single-port synchronous RAM of 16384 32-bit
words with one-cycle read latency. The contents are not reset.

## The kernel in this implementation

In the original template, each kernel is generated from the query being
accelerated, so its datapath changes from query to query. `query_kernel` is a
compact, hand-written kernel of the same kind. The graph is held in
compressed sparse rows:

* `rowptr[v]` .. `rowptr[v+1]-1` index the out-edges of vertex `v`;
* each edge word holds the predicate in `[31:24]` and the object in `[23:0]`.

A task is a subject vertex `v`. The kernel reads the two row pointers, reads
each edge, and counts the edges equal to the pattern `(cfg.pat_pred,
cfg.pat_obj)`, i.e. the triple pattern `?v <pred> <obj>`. If it found any
matches, it atomically adds the count to `cfg.result_addr`. With no memory
stalls, `done` comes `2*(2 + degree + (matches>0))` cycles after the cycle in
which `start` is high (two cycles per memory access), so a task's length
follows the vertex degree: a high-degree vertex makes the kind of long task
that dynamic scheduling is meant to absorb.

To use a different computation, replace `query_kernel` and keep its
interface:

* `start`/`task_in` is accepted only while `busy` is low;
* `done` is a one-cycle pulse per finished task;
* memory uses the `mreq`/`mrsp` handshake with one request outstanding.

## Parameters (top level `dts_accel`)

| parameter     | default | meaning                                      | origin |
|---------------|---------|----------------------------------------------|--------|
| `NUM_KERNELS` | 4       | kernels in the pool (T)                      | architecture's main configuration |
| `NUM_BANKS`   | 4       | memory banks / channels (CH), power of two   | architecture's main configuration |
| `QUEUE_DEPTH` | 16      | task queue entries                           | this design |
| `BANK_WORDS`  | 16384   | 32-bit words per bank (256 KiB in total)     | this design |

Widths live in `dts_pkg`: 32-bit data, addresses and tasks. The package also
holds the memory request struct (`mem_req_t`, operations `MEM_READ`,
`MEM_WRITE`, `MEM_FADD`) and the query configuration (`query_cfg_t`).

## Top-level ports

| port | direction | meaning |
|------|-----------|---------|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `task_valid`, `task_ready`, `task_data` | in/out/in | tasks into the queue |
| `done` | out | termination condition |
| `cfg` | in | `query_cfg_t`: graph layout, pattern, result address; hold it stable during a run |
| `host_req_valid`, `host_req_ready`, `host_req` | in/out/in | host access to the shared memory (last MIC port) |
| `host_rsp_valid`, `host_rsp_data` | out | host response, one cycle after the grant |
| `bank_busy` | out | banks accessed this cycle (for memory profiling) |
| `kernel_busy`, `kernel_avail` | out | kernel state and the status register |
| `queue_full`, `tasks_spawned`, `tasks_completed` | out | queue and termination counters |

A run goes like this:

1. Load the graph through the host port.
2. Write 0 to the result word.
3. Push one task per vertex.
4. Wait for `done`.
5. Read the result word back through the host port.

## Simulating

Every file in `rtl/` holds one module or package. Each testbench in `tb/` is
self-checking, ends with a `TB_RESULT checks=N failures=M` line, and has a
cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dts_pkg.sv \
    tb/tb_dts_accel.sv --top-module tb_dts_accel
./obj_dir/Vtb_dts_accel
```

Change the testbench name to run the others:

* `tb_<module>`: one per block: the queue, the status register, the
  dispatcher, the scheduler, the three termination blocks, the kernel, the
  MIC and the memory bank.
* `tb_dts_accel`: the full design at its default parameters. It generates a
  160-vertex graph with strongly unequal degrees and loads it. It runs every
  vertex as a task and checks the result, the counters and that `done` does
  not come early. It also requires each mechanism to occur at least once:
  queue back-pressure, tasks waiting for a free kernel, a task starting
  beside a busy kernel, parallel bank use, a bank conflict and a
  fetch-and-add.
* `tb_dts_accel_scaling`: one 300-vertex workload on 4, 6 and 8 kernels
  (4 banks). It prints the run time, the speedup over one kernel running the
  tasks in sequence, and how much of the run time 0..4 banks were busy. It
  also checks each run against an estimate of fork-join group scheduling
  computed from the tasks' uncontended lengths.

With the default random seed, these runs gave:

| kernels | cycles | speedup vs. one kernel | fork-join estimate |
|---------|--------|------------------------|--------------------|
| 4       | 2992   | 3.40                   | 7024               |
| 6       | 2268   | 4.48                   | 6322               |
| 8       | 1936   | 5.25                   | 5778               |

With 8 kernels, 3 or 4 banks were busy in 63 % of the cycles. The returns
diminish as the 4 banks fill up.

Testbenches drive inputs just after the falling clock edge and sample
combinational outputs a few time units later. The simulator is two-state;
memories start at random values and the testbenches initialise all they read.

## What comes from the architecture, and what is this design's own

Taken from the architecture:

* the block structure: task queue, dispatcher, status register, a kernel pool
  with completion notification, spawn and complete counters, and a checker
  with the "counts equal and queue empty" condition;
* dispatch as soon as any kernel is free;
* a shared memory with several banks behind a controller that resolves
  addresses at run time and supports atomic operations;
* 4 kernels and 4 memory channels.

Chosen here:

* all widths, the queue depth and the bank size;
* the valid/ready handshakes and the one-request-outstanding memory protocol;
* round-robin choice of kernel and of requester per bank;
* word interleaving across banks;
* fetch-and-add as the atomic operation;
* the combinational `done`;
* the host port;
* the kernel's computation.

Not provided:

* **Query-specific kernels.** The kernels that would execute a real
  multi-pattern SPARQL query, such as the LUBM benchmark queries, are not
  here. The example kernel matches a single triple pattern.
* **A multi-level memory controller.** The memory controller is a single
  level. Larger systems might place several levels of controllers between
  kernels and banks.
* **Capacity for benchmark datasets.** The default memory holds 65,536 words.
  That is far less than benchmark graphs of 100 thousand to 5 million triples
  need: at least one word per triple in this layout.
