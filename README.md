# A microthreaded DRISC core: thread and family management in hardware

A conventional core hides memory latency with large caches and speculation.
This core hides it with concurrency. Programs are written as *families* of
small threads. Every register is a synchronising variable: reading one that
has not been written yet does not stall the pipeline. Instead, the reading
thread is stored in the register and leaves the pipeline. The write that fills
the register puts the thread back. With hundreds of threads per core, some
thread is almost always ready to run. The caches can then be small, and the
area goes to the register file and the thread tables instead.

This repository holds the SystemVerilog for one such core's management
hardware, plus the core's node of the network used to hand work to other
cores:

- the synchronising register file;
- the register allocator;
- the thread table and its lists;
- the family table and the engine that creates and retires threads;
- an I-cache that schedules threads;
- a D-cache whose read buffer is the register file itself;
- a tagged memory port;
- the delegation-network router.

The instruction pipeline is *not* included. No instruction set is defined for
it. The core brings out the interface a single-issue in-order pipeline would
use, and the end-to-end testbench plays that pipeline.

## The programming model in brief

- **Family.** A family is a set of threads running the same code, one per index
  `start, start+step, ...`, `count` of them. `count = 0` means unbounded.
- **Create.** The creating thread allocates a family entry, sets the
  parameters it needs (defaults cover the rest) and issues a create. It names
  one of its own registers as the *return-code register*. The create empties
  that register at once. The core writes it when the family has terminated.
  A creator that reads the register therefore sleeps until its children are
  done.
- **Register classes.** Every thread sees four classes of registers:
  - *locals*: private to the thread. The first local receives the thread's
    index.
  - *globals*: read-only and shared by the whole family.
  - *shareds*: written by this thread.
  - *dependents*: read by this thread. They are the shareds of the thread's
    predecessor in index order.

  So values flow along the index sequence, like a loop-carried dependency.
- **Termination.** A family has terminated when all its threads have ended and
  all of the core's memory writes have been acknowledged.

## Synchronising registers (`sync_regfile`)

Each of the 1024 registers has two state bits: **full**, **empty** or
**waiting**.

| Operation | Register state | Effect |
|---|---|---|
| Read | full | Returns the data. |
| Read | empty | The reading thread's number is stored in the data field. The state becomes waiting. The read reports `rd_suspend`. |
| Write | any | Stores the data and sets the state to full. |
| Write | waiting | Also raises `wake_*_valid` one cycle later, with the stored thread number. |

Only one thread may wait on a register. An assertion checks this.

There are three write ports. The pipeline writes through port a. The D-cache
writes through port b. The core's engine uses port c to write thread indices
and return codes. An `init` port sets a whole range of registers empty in one
cycle; it is used when a thread is (re)allocated.

**Parked reads.** The D-cache borrows the data field of an empty target
register. Bit positions are given in `drisc_pkg`:

| Field | Meaning |
|---|---|
| Size | Bytes to load. |
| Offset | Byte offset in the cache line. |
| Next | A link to the next parked register of the same line, with a valid bit. |
| Thread | The thread waiting on the register, if any. |

With these fields the empty register itself is the entry of the miss buffer.
No separate load queue exists.

## Thread table and its lists (`thread_table`)

Each entry holds the following:

- PC, index and family;
- the bases of the thread's locals, shareds and dependents;
- the state, one of six: empty, waiting, ready, running, suspended, unused;
- two link fields.

Three states are kept as linked lists:

| List | Scope | Purpose |
|---|---|---|
| Empty | Core-wide | Entries free for new threads. |
| Ready | Core-wide | Threads the pipeline may take. |
| Waiting | One per I-cache line | Threads waiting for that line's fetch. The line holds head and tail; the thread table holds the links. |

The other three states are not on a list:

- A *running* thread is in the pipeline.
- A *suspended* thread is referenced only by the register it is waiting on.
- An *unused* thread has ended and is known only to its family.

The second link field chains each family's **membership list**. When a
family is released, its whole membership list is walked back onto the empty
list, whatever state each thread is in.

The table can do the following:

- Append a whole list (head..tail) to the ready list in one cycle.
- Pop the ready head for the pipeline.
- Allocate from the empty list.
- Answer three combinational queries per cycle.

## I-cache as a scheduler (`icache`)

A thread that becomes runnable checks the I-cache line of its next PC first.
This happens when it is created, woken by a register write, or switched to a
new PC. There are three cases:

- **Hit on a present line.** The thread goes straight onto the ready list.
- **Hit on a line still being fetched.** The thread is linked onto that
  line's waiting list.
- **Miss.** A victim line is cleared and given the thread as its list. A
  tagged line read is sent.

When the line arrives, its whole waiting list is appended to the ready list
in one cycle.

Each line also counts the threads that still need it: those on the ready list
and those waiting. The pipeline's pop decrements the count. Only lines whose
count is zero, and which are not being fetched, can be replaced, so a thread
never reaches the pipeline to find its code evicted. The replacement choice
among them is least-recently-used.

The cache is 1 KB in 16 fully associative lines of 64 bytes. The
organisation is a choice of this design.

## Decoupled loads (`dcache`)

| Load case | What happens |
|---|---|
| Hits a present line | Writes the target register at once. |
| Misses, or hits a line being fetched | The read is *parked* in the target register (see above). The register joins the line's list of registers. |

When a fetched line arrives, it joins the **processing list**, a list of
lines with reads to serve. Each cycle, one parked read is served: the
register's payload is read, the bytes are extracted and zero-extended, and
the register is written. That write wakes any thread that had read the
register in the meantime.

Stores are write-through without allocation. Each write is tagged. The core
counts unacknowledged writes so that a family is not reported terminated
before its writes have landed.

Loads and stores wait (`ld_ready`, `st_ready`) in these cases:

- a load that would hit a line on the processing list, so it cannot overtake
  older parked reads of that line;
- a store to a line being fetched.

The cache is 1 KB, fully associative, with 64-byte lines. The organisation is
this design's choice.

## Tagged memory port (`mem_arbiter`)

Every request carries a tag: a 2-bit type and the index of the cache line it
belongs to. The types are I-line read, D-line read and data write. The memory
may answer in any order, echoing the tag. The arbiter alternates between the
two caches and routes each answer back by its type.

## Register allocation (`reg_allocator`)

A create allocates one contiguous block of registers for the whole family.
The block is laid out in this order:

1. remote shareds (reserved, not initialised);
2. globals;
3. one slot per thread: its shareds, then its locals.

The family's *block size* is the number of threads that may run at once on
this core. It is lowered until the block fits in the free space.

The allocator keeps a bitmap of 8-register granules:

1. It scans one granule per cycle and keeps the largest free run.
2. It then lowers the block size one step per cycle until the block fits.
3. If even one thread does not fit, the request fails. The creator retries
   later.

The top eight registers are never allocated. They belong to the root context
that issues the first creates.

## Creating, reusing and retiring threads (`drisc_node`)

This is the hardest part of the design.

**Create.** After the register block is granted, a *creator* state machine
does the following:

1. Sets up the family.
2. Creates one thread per cycle until one of these holds: the block is full,
   the thread table is empty, or every index exists.
3. For each new thread:
   - takes an entry from the empty list and adds it to the family's
     membership list;
   - sets the thread's registers empty;
   - writes its index into its first local;
   - sends it to the I-cache check.

Thread *k*'s dependents point at the shareds of thread *k−1*. The first
thread's dependents point at the family's remote shareds.

**End and retire.** When the pipeline reports that a thread has ended, the
thread becomes unused. Its slot (table entry plus registers) is *retired*:
either reused for the next index or dropped. A retire queue takes one thread
per cycle. If indices remain, the slot is reused: new context, registers
emptied, new index written, dependents pointed at the last created thread.
Otherwise the family's live count is decremented.

*The ordering hazard.* Reusing a slot empties its shareds. If the thread's
successor has not read them yet, the value is lost and the successor sleeps
forever. The core therefore retires a thread of a family with shareds only
when one of these holds:

- its successor has ended too;
- no more indices remain.

Families without shareds reuse slots as soon as a thread ends.

**Terminate.** When the live count reaches zero and all indices exist, the
family is done. A *terminator* state machine waits until no write is
outstanding. It then does the following:

1. Writes return code 0 into the creator's return-code register. This wakes
   the creator if it is waiting.
2. Walks the membership list back to the empty list.
3. Frees the register block.
4. Frees the family entry.

**Sharing the engine.** The creator, the retire path and the terminator share
the register file's port c and the family table's write port. End and retire
events have priority. The creator and the terminator wait for them.

## The delegation router (`deleg_router`)

Delegation messages, which hand a family to another group of cores, are 90
bits long. They travel as ten 9-bit flits over a 2-D grid:

- Routing is dimension-ordered, X first, then Y.
- Switching is virtual cut-through: a message is accepted only into a free
  message slot, and it may leave before it has fully arrived.
- The node has 180 bits of buffering, which is two message slots shared by
  all five inputs.

The first flit carries the destination, with x in bits 3:0 and y in bits 7:4.
Ports are numbered 0 local, 1 north (+y), 2 east (+x), 3 south and 4 west.
The flit format and port numbering are this design's own. The message
contents are not interpreted.

## Interface of the core (`drisc_node`)

| Group | Direction | Purpose |
|---|---|---|
| `fc_*` | in | Family commands: allocate (returns a family id), set a parameter (`fparam_e`), create. |
| `iss_*` | out/in | Head of the ready list: thread, PC, family, index, register bases. `iss_en` pops it. |
| `if_*` | in/out | Instruction fetch from the I-cache. |
| `rr_*` | in/out | Register read. A read that does not find the register full (`rr_full` low) suspends the thread. |
| `rw_*` | in | Register write; wakes a waiting thread. |
| `ld_*`, `st_*` | in/out | Loads into a target register, and stores. |
| `ev_*` | in | Thread end (`EV_END`) or context switch to a new PC (`EV_SWITCH`). |
| `m_*` | out/in | Tagged memory requests and out-of-order responses. |
| `fdone_*` | out | A family has terminated. |
| `rt_*` | both | The five router links and this node's coordinates. |
| `n_*` | out | Event counters for each mechanism. |

`FP_REGS` packs the register counts: globals in bits 15:10, shareds in 9:5
and locals in 4:0.

The allocate defaults are these:

| Parameter | Default |
|---|---|
| start | 0 |
| step | 1 |
| count | 1 |
| block | 0 (as many threads as fit) |
| locals | 1 |
| shareds | 0 |
| globals | 0 |

All storage uses a synchronous, active-low reset.

### Default parameters

| Parameter | Default |
|---|---|
| `NREGS` | 1024 |
| `NTHREADS` | 256 |
| `NFAMILIES` | 64 |
| `ICACHE_BYTES` | 1024 |
| `DCACHE_BYTES` | 1024 |
| `LINE_BYTES` | 64 |

These are the sizes of the evaluated configuration. A smaller-area variant
would use 16 families and a 4 KB D-cache.

## Where this departs from the original design, and what is missing

- **Not built:**
  - the pipeline and instruction set;
  - the break, squeeze and kill actions, and return codes other than normal
    termination;
  - delegation of creates over the network (only the router exists);
  - the cluster ring that spreads a family over several cores, and register
    sharing between neighbouring cores;
  - the shared FPU;
  - the COMA L2 memory system.
- **Choices of this design:**
  - Only one family is being created at a time.
  - Outstanding writes are counted per core, not per family.
  - Slot reuse waits for the successor's end in families with shareds.
  - Globals are not copied by the core. The creator writes them; the core
    exposes their base in `iss_glob`.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

`tb/tb_drisc_node.sv` runs the whole core at its default sizes:

- **Family A:** 64 independent threads of 28 locals each. Only 36 fit, so the
  block shrinks and slots are reused.
- **Family B:** a 24-thread reduction through shared registers.
- **Memory:** a behavioural model with random latency and out-of-order
  answers, in `tb/tagged_mem_model.sv`.

The testbench checks all results and that every mechanism happened at least
once:

- shrink, reuse, suspend and wake;
- I-cache join, miss and switch;
- D-cache miss, parked read and reordered answers;
- routing and termination.

For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/drisc_pkg.sv rtl/*.sv \
    tb/tagged_mem_model.sv tb/tb_drisc_node.sv --top-module tb_drisc_node
./obj_dir/Vtb_drisc_node +verilator+rand+reset+2
```

The other testbenches build the same way, with their block's files and
`--top-module tb_<block>`.
