# Nexus: hardware task management for task-based parallel programs

In a task-based programming model such as StarSS, the programmer marks
functions as *tasks* and says for each argument whether the task reads it,
writes it, or both. A runtime system then runs the sequential program,
turns every call into a task, finds out which earlier tasks each new task
has to wait for, and hands tasks that are ready to the worker cores. Done in
software, this bookkeeping costs several microseconds per task. On a
16-core machine that limits the useful task size to tens of microseconds,
and finer-grained parallelism is lost.

Nexus moves the bookkeeping into hardware. It has two kinds of unit:

* **Task Pool Unit (TPU).** One per system. The control core passes it a
  pointer to each task's *descriptor* (the function plus the address and
  direction of every operand), in program order. The TPU loads the
  descriptor and works out the task's dependencies by table lookups. When a
  task can run, the TPU puts it into a hardware *ready queue*. When the
  task's id comes back through the *finish buffer*, the TPU releases the
  tasks that were waiting for it.
* **Task Controller (TC).** One next to each worker core. It reads a task
  from the ready queue and copies the descriptor. It moves the input
  operands into the core's local store by DMA and starts the core. When the
  core is done, it writes the outputs back and reports the task finished.
  It is double buffered: while the core runs one task, the TC already loads
  the next.

The design targets a Cell-like machine: one control core, 16 worker cores
with local stores and DMA engines, and an on-chip bus. The cores, their DMA
engines, main memory and the bus are not part of this RTL. Their signals are
ports of the top module `nexus_system`.

## The life of a task

```
control core --(ptr,size)--> in buffer --> descriptor loader --> task storage
                                                |  claims an id in the task table
                                                v
                                        descriptor handler --ADD_IN/ADD_OUT/RELEASE--> producers + consumers tables
                                                                                           | inc / dec #deps
                                                                                           v
  core <-- TC <------------------- ready queue (id, descriptor pointer) <---- task table (#deps == 0)
   |        ^ reads the descriptor from the task storage
   v
  TC --(id)--> finish buffer --> finish handler --FIN_IN/FIN_OUT--> tables --> waiting tasks released
                                        '--> task-table entry and storage slot freed
```

1. The control core writes `(pointer, size)` into the **in buffer**.
2. The **descriptor loader** claims the lowest free entry of the **task
   table**. That entry's index is the task id, and it also selects a slot of
   the **task storage**. The loader reads the descriptor from main memory
   into that slot.
3. The **descriptor handler** reads the operands back from the storage and
   sends one command per operand to the dependency tables: `ADD_IN` for an
   input, `ADD_OUT` for an output or inout. Then it sends `RELEASE`. The
   tables raise the task's dependency count `#deps` for every earlier task
   it must wait for.
4. A task whose `#deps` reaches zero is pushed into the **ready queue** as
   `{id, descriptor pointer}`.
5. A TC pops it and runs it on its core. When the outputs are written back,
   the TC pushes the id into the **finish buffer**.
6. The **finish handler** reads the task's operands once more and sends
   `FIN_IN` or `FIN_OUT` per operand. The tables walk their lists and
   decrement `#deps` of every task that waited on this one. Then the
   task-table entry and the storage slot are freed.

All stages run at the same time on different tasks, decoupled by the queues.
The loader, the descriptor handler and the finish handler each handle one
word or one command per cycle.

## Descriptor format

A descriptor is up to `DESC_WORDS` (8) 32-bit words in main memory.

| word | bits | meaning |
|------|------|---------|
| 0 | [31:24] | number of operands n (at most `DESC_WORDS-1`) |
| 0 | [23:0] | function to run (passed to the core unchanged) |
| 1..n | [31:2] | word address of the operand in main memory |
| 1..n | [1:0] | direction: 1 input, 2 output, 3 inout, 0 unused |

The `size` written with the pointer is the number of words to load (n+1).
The encoding is this design's own; the source only says that a descriptor
holds the function and the operand locations.

## Dependency resolution: the producers and consumers tables

This is the heart of the design and the least obvious part. It lives in
`nexus_dep_tables`.

### What must be enforced

Two tasks that touch the same address must keep their program order when at
least one of them writes it:

* **read after write (RAW):** a reader waits for the last earlier writer;
* **write after read (WAR):** a writer waits for all earlier readers that
  have not finished;
* **write after write (WAW):** a writer waits for the earlier writer.

An inout operand is treated as a write. It then waits for the previous
writer and for the previous readers, which also covers its own read.

### The two tables

Both tables are indexed by a hash of the operand address, so a lookup never
searches.

* **Producers table.** There is one entry per address that a pending task
  will write. The entry holds the address, the producer's id and a
  *kick-off list*. A later reader of the address subscribes to the list,
  and its `#deps` grows by one. When the producer finishes (`FIN_OUT`), the
  list is walked: each subscriber loses one dependency, one per cycle.
  This handles RAW.
* **Consumers table.** There is one entry per address that pending tasks
  will read. The entry holds the address, the number of pending readers
  (`#deps` of the entry) and a kick-off list. A later writer of the address
  subscribes to that list, and its `#deps` grows by one. Each `FIN_IN`
  lowers the reader count. When the count reaches zero, the writers on the
  list are kicked off. This handles WAR.
* **WAW marker.** A writer of an address that already has a producer entry
  is appended to the *producers* kick-off list with a marker bit. When the
  walk reaches a marked entry, it kicks that writer, makes it the entry's
  new producer, and stops. Readers queued behind the marker stay in the list
  and wait for the new writer.

### A worked example

Tasks A to E, entered in this order, all touch address `x`:

| task | op | producers entry of x | consumers entry of x | `#deps` (incl. guard) |
|------|----|----------------------|----------------------|-----------------------|
| A | write x | created, producer A | - | A: 1 → released → 0, ready |
| B | read x | list: [B] | created, readers 1 | B: 1+1 → after release 1 |
| C | read x | list: [B, C] | readers 2 | C: 1 |
| D | write x | list: [B, C, D*] | list: [D] | D: 1+2 → after release 2 |
| E | read x | (held back, see below) | | |

* A finishes (`FIN_OUT x`). The walk kicks B and C, which become ready.
  Then it reaches the marker D*: D loses one dependency (now 1), becomes
  the producer of x, and the walk stops.
* B and C finish (`FIN_IN x` twice). The reader count drops to 0, so the
  consumers list is walked: D loses its last dependency and becomes ready.
  The consumers entry is freed.
* E could not be entered while D waited in the consumers list of x. It
  would have been counted as a reader that D waits for, while E itself
  waits for D, and neither could run. So the descriptor handler is held
  back until D is kicked off. E then subscribes to the producers entry,
  whose producer is now D.

### The guard count

A new task-table entry starts with `#deps = 1`. Without it, a producer that
finishes while the handler is still entering the new task's operands could
bring the count to zero too early. `RELEASE`, sent after the last operand,
removes the guard.

### Hashing, sets and table size

The index is the top bits of `(address >> 2) * 0x9E3779B1`, a
multiplicative hash. It spreads regular block layouts evenly; an XOR fold
collided badly on them. Each index selects a *set* of `WAYS` entries that
are compared at once. An address that finds neither its own entry nor a
free one in its set stalls the handler until an older task frees an entry.

`WAYS` must be at least the number of operands one descriptor can hold.
Otherwise two operands of the same task could hash to a full set and wait
for each other.

### Why the unit cannot deadlock

Tasks are entered strictly in program order. Anything the descriptor
handler waits for is held by an older task: a full set, a full kick-off
list, a saturated reader count, or a writer waiting in a consumers list.
An older task never waits for a younger one, and the oldest pending task
can always run, so every stall ends. The conditions for this are:

* the ready queue and finish buffer always drain;
* `WAYS >= DESC_WORDS-1`.

### Command timing

* The finish handler's port has priority over the descriptor handler's.
* `ADD_IN`, `ADD_OUT` and `RELEASE` complete in the cycle they are
  accepted.
* A `FIN_*` is accepted at once. It then keeps the tables busy for one
  cycle per task it kicks off.
* Every decrement waits until the ready queue can take a push, because it
  may make a task ready in that cycle.

## Task table

The table keeps, per task id:

* the status (`FREE, LOADING, WAITING, READY, RUNNING, FINISHING`);
* the fixed descriptor pointer (`id * DESC_WORDS`);
* `#deps`.

The status column is reset and scanned as a whole, to find the lowest free
id and the number of tasks in use. The `#deps` column is not reset, and
neither are the bodies of the producers and consumers entries (only their
valid bits are), so they can map to RAM.

`NUM_TASKS` = 1024 is the size of the window of tasks that can be in flight.
In the wavefront benchmark (CD, below), 16 rows of 64 tasks must be in the
graph before 16 independent tasks exist. With a smaller window, a 16-core
machine would be starved.

## Task Controller and double buffering

`nexus_task_ctrl` has two task buffers in the core's local store. Each
buffer is in one of four states: `EMPTY`, `LOADED`, `EXEC` or `DONE`.

The main state machine does one thing at a time:

* Write-back has priority: it puts every output of a `DONE` buffer, waits
  for the DMA completions, and then pushes the id into the finish buffer.
* Otherwise, if a buffer is empty, it fetches the next task from the ready
  queue. It reads the descriptor through the shared task-storage port,
  issues a get for every input, and marks the buffer `LOADED` when all gets
  have completed.

A separate rule starts the core on the oldest `LOADED` buffer whenever the
core is idle. So the next task's inputs arrive while the current task runs.
Tasks start and retire in the order they were fetched.

Local-store address of operand k (1-based) in buffer b:

    b * (DESC_WORDS-1) * OP_BYTES + (k-1) * OP_BYTES

Every operand moves `OP_BYTES` = 1024 bytes: a 16×16 block of 32-bit
integers.

## Full structures and stalls

Every table and queue has a fixed size. A full one stalls the stage in front
of it:

* **Full task table:** the loader stops taking pointers, and the in buffer
  fills.
* **Full in buffer:** `ib_ready` drops, so the control core waits.
* **Full ready queue:** decrements, and therefore kick-off walks, pause.
* **Full finish buffer:** the TCs wait.

### Status word

The status word (`status`, one cycle behind) reports:

| bits | meaning |
|------|---------|
| [7:0] | in-buffer fill |
| [15:8] | ready-queue fill |
| [23:16] | tasks in the table (each of these three saturates at 255) |
| 24 | in buffer full |
| 25 | task table full |
| 26 | finish buffer full |
| 27 | kick-off walk in progress |
| 28 | pool empty |

## Top-level interface (`nexus_system`)

| group | direction | meaning |
|-------|-----------|---------|
| `ib_valid/ib_ready/ib_ptr/ib_size` | in | control core pushes a descriptor pointer and its size in words |
| `status` | out | status word above |
| `mem_req/mem_addr/mem_gnt` | out/in | descriptor reads; address held until granted |
| `mem_rvalid/mem_rdata` | in | read data, in request order, any latency |
| `dma_valid[s]/dma_ready[s]/dma_get[s]/dma_ea[s]/dma_ls[s]/dma_size[s]` | out/in | DMA command of core s (get = into local store) |
| `dma_done[s]` | in | one pulse per completed command |
| `exec_start[s]/exec_func[s]/exec_id[s]/exec_buf[s]` | out | start core s on a task in buffer `exec_buf` |
| `exec_done[s]` | in | core s has finished its task |
| `ev_*` | out | one-cycle pulses: RAW/WAR subscription, WAW marker inserted, marker reached, table stall, task table full, ready queue full |

Every signal acts at the rising edge of `clk`. `rst_n` is an asynchronous,
active-low reset.

Inside, the TCs share the TPU's ready queue, finish buffer and task-storage
read port through round-robin arbiters (`nexus_rr_arb`). The arbiters stand
in for the on-chip bus.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_SPE` | 16 | worker cores / task controllers |
| `NUM_TASKS` | 1024 | task-table entries = tasks in flight |
| `DESC_WORDS` | 8 | words per descriptor slot (7 operands) |
| `IB_DEPTH`, `RQ_DEPTH`, `FB_DEPTH` | 16 | in buffer, ready queue and finish buffer depth |
| `P_ENTRIES`, `C_ENTRIES` | 2048 | producers / consumers table entries |
| `WAYS` | 8 | entries per hash index; must be ≥ `DESC_WORDS-1` |
| `KO_LEN` | 4 | kick-off list length per entry |
| `OP_BYTES` | 1024 | bytes moved per operand |
| `LS_AW` | 18 | local-store address width (256 KB) |

Only the 16 worker cores and the 16×16-block operand size come from the
source. Every other size is this design's choice.

## How far to trust it, and where it departs from the source

The source describes the following. The RTL builds all of it:

* the units and their connections;
* the columns of every table and queue;
* hashed lookups;
* kick-off lists;
* the WAW marker;
* stalling on full structures;
* the TC's job and its double buffering.

This design supplies its own versions of the following:

* the descriptor encoding;
* the hash function and set-associative tables;
* the guard count;
* the reader stall;
* the status word;
* all handshakes and sizes;
* the arbiters that replace the bus.

Specific deviations:

* **Table roles.** The source's prose names the roles of the two tables the
  other way round from its own subscription rule. This RTL follows the
  subscription rule: readers wait in the producers table, writers in the
  consumers table.
* **Wait counting.** `#deps` counts list entries, not distinct tasks. A
  task that depends on the same earlier task through two operands waits
  for it twice and is released twice, which is harmless.
* **Memory-mapped access.** The source's ports are memory mapped on the
  bus. Here each is a separate valid/ready port.
* **TCs are mandatory.** The source calls TCs optional, and says software
  on the core could fetch tasks instead. Here every core has a TC, and the
  TPU's ready-queue, finish-buffer and task-storage ports are used only by
  the TCs.
* **One TPU only.** For larger systems, the source suggests clusters of
  TPUs with task stealing. That is not built.
* **Read-only task storage port.** The cores can only read the task storage
  through their port; they cannot write it.
* **Operand size.** The descriptor has no operand size, so every transfer is
  `OP_BYTES`.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`, has a cycle watchdog, and compares the
DUT against values worked out independently. Build a testbench with plain
Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl +libext+.sv rtl/nexus_pkg.sv \
              tb/tb_nexus_system.sv --top-module tb_nexus_system -o sim && ./obj_dir/sim

`-y rtl` lets Verilator find the modules by name. The full-size system test
takes a few seconds (about 400 000 cycles).

`tb_nexus_system` runs the whole design at its default parameters: 16
cores, 1024-entry table. The testbench acts as control core, memory, DMA
engines and cores, and submits four task graphs:

* **CD:** 64×64 blocks, each reading its left and upper-right neighbour and
  updating itself (a wavefront, as in video decoding).
* **SD:** each block reads only its left neighbour.
* **ND:** independent blocks.
* **MIX:** random tasks over six addresses, with all three hazard kinds.

At every task start it checks:

* that every predecessor has finished, where predecessors are derived from
  program order on their own;
* that the DMA gets were exactly the task's inputs.

It also checks:

* that every task runs once;
* the "pool empty" status between graphs;
* that the TPU takes in tasks faster than 1.3 µs per task at an assumed
  3.2 GHz, which is the rate needed to keep 16 cores busy with ~20 µs
  tasks. It achieves about 14 cycles per task for CD;
* that a core gets its next task within 1 µs of finishing one, while
  independent tasks are waiting. Thanks to double buffering, the longest
  gap seen in ND is 2 cycles.

It counts every mechanism and fails if one never occurred. The mechanisms
are RAW, WAR, WAW marker, marker reached, table stall, full task table, full
ready queue, full in buffer and double buffering.

| testbench | checks | result |
|-----------|-------:|--------|
| tb_nexus_system (defaults, 12 488 tasks) | 70 242 | pass |
| tb_nexus_tpu (small tables, 400 random tasks) | 3 852 | pass |
| tb_nexus_dep_tables (directed RAW/WAR/WAW + 400 random tasks) | 2 428 | pass |
| tb_nexus_task_table | 23 404 | pass |
| tb_nexus_task_ctrl (random DMA/core timing) | 5 572 | pass |
| tb_nexus_desc_loader | 13 435 | pass |
| tb_nexus_desc_handler | 9 440 | pass |
| tb_nexus_finish_handler | 6 927 | pass |
| tb_nexus_fifo | 16 002 | pass |
| tb_nexus_task_storage | 1 509 | pass |
| tb_nexus_status_reg | 2 402 | pass |

Each testbench also fails when a single relevant line of its module is
broken. Examples:

* a reader entered while a writer waits on its address, which deadlocks;
* an input DMA not awaited before start;
* a wrong descriptor pointer in the ready queue.

## Files

| file | content |
|------|---------|
| `rtl/nexus_pkg.sv` | shared types: descriptor fields, commands, status codes, address hash |
| `rtl/nexus_system.sv` | top: TPU, task controllers, arbiters |
| `rtl/nexus_tpu.sv` | Task Pool Unit |
| `rtl/nexus_fifo.sv` | in buffer, ready queue, finish buffer |
| `rtl/nexus_task_storage.sv` | descriptor storage |
| `rtl/nexus_desc_loader.sv` | descriptor loader |
| `rtl/nexus_desc_handler.sv` | descriptor handler |
| `rtl/nexus_task_table.sv` | task table |
| `rtl/nexus_dep_tables.sv` | producers and consumers tables |
| `rtl/nexus_finish_handler.sv` | finish handler |
| `rtl/nexus_status_reg.sv` | status register |
| `rtl/nexus_task_ctrl.sv` | task controller |
| `rtl/nexus_rr_arb.sv` | round-robin arbiter |
| `tb/tb_*.sv` | one self-checking testbench per module |
