# Hardware semaphores for hybrid CPU/FPGA multithreading

On a chip that holds both a processor and FPGA fabric, an application can be
written as a set of threads. Some of them run as software on the CPU and
some are built as hardware in the fabric. For that model to work, both kinds
of thread need the same synchronization primitives. They also need them
without processor-specific atomic instructions (test-and-set,
load-linked/store-conditional) and without hooks into the cache-coherence
logic. A hardware thread has neither.

This RTL moves the atomic decision into small memory-mapped cores in the
fabric. Every primitive is used in the same way:

1. The thread writes its thread id, or a number of resources, into a request
   register. This is an ordinary bus write.
2. Control logic in the core decides in the following clock cycle. It is the
   only place where the decision is made, so two threads cannot both win.
3. The thread reads a status register (the owner, or a grant flag) to learn
   the outcome.

The same access routine serves a C program on the CPU and a state machine in
the fabric. On this basis the design provides binary spin locks, counting
spin locks, and blocking versions of both. A blocking semaphore suspends the
threads it cannot serve and, when the semaphore is released, hands their ids
to a central scheduling block. That block sorts the ids into a CPU ready
queue, which raises an interrupt, and a hardware thread ready queue.

## Bus access and timing

Each core is a slave with a one-cycle access. The core sees a
`sem_pkg::bus_req_t` holding the select, the write strobe, a 4-bit register
offset and 32 bits of write data. Read data is combinational in the same
cycle. Thread ids are 8 bits wide:

- id 0 means "no owner".
- Ids with bit 7 set belong to hardware threads.
- Ids with bit 7 clear belong to software threads.

The timing rule is the same in every core. A write is latched at the end of
its bus cycle, and the control logic acts on it one cycle later. With writes
on edge *n*:

| event | edge |
|---|---|
| Rqst / Rqst_num / Rel_num / THREAD_ID latched | n |
| owner updated, grant decided, count changed, waiter queued | n+1 |
| owner / grant readable | from the cycle after n+1 |
| blocking counting semaphore starts its wake-up scan (after Rel_num) | n+2 |
| first wake event offered by the blocking counting semaphore | n+3 |

At most one write reaches a core per cycle, so at most one latched operation
waits at any time. Requests that follow each other back to back are handled
in order, one per cycle. Nothing can race: two requests can never be decided
in the same cycle.

## Register map

All offsets are word offsets inside one core (`sem_pkg`):

| off | name | spin_lock | count_sem | blocking_bin_sem | blocking_cnt_sem | sys_sched |
|---|---|---|---|---|---|---|
| 0 | RQST | W id | W id (spin lock) | W id | W id (spin lock) | R: pop CPU ready queue (bit 31 valid, bits 7:0 id) |
| 1 | LOCK_OWN | R owner | R owner | R owner | R owner | R: levels (CPU 15:0, HW 31:16) |
| 2 | RELEASE | W id | W id | W id | W id | R: pop hardware thread ready queue (same format) |
| 3 | MAX_COUNT | | W load count / R count | | W load / R count | |
| 4 | RQST_NUM | | W number | | W number | |
| 5 | GRANT | | R flag, read clears | | R flag, read clears | |
| 6 | REL_NUM | | W number | | W number | |
| 7 | THREAD_ID | | | | W id to suspend | |
| 8 | STATUS | | | R bit 31 overflow, low bits level | same | |

## The primitives

**Binary spin lock (`spin_lock`).** A request on a free lock makes the
requester the owner. A request on a held lock changes nothing, and the thread
reads back a different owner and tries again. A release counts only when it
carries the owner's id.

**Counting spin lock (`count_sem`).** This is a count register with an
embedded spin lock. The spin lock guards the two-step request:

1. The thread takes the spin lock.
2. It writes `Rqst_num`.
3. It reads `GRANT`.
4. It releases the spin lock.

If the request fits, the count is reduced and the grant flag is set to 1.
Otherwise the count is kept and the flag is 0. Reading the flag clears it.
Holding the spin lock means no other thread can replace the pending result
before it is read. Resources come back through `REL_NUM` without taking the
spin lock. The operating system loads the count through `MAX_COUNT` at start
and may reload it at any time. A release saturates at 0xFFFF.

## Blocking semaphores and the wake-up path

This is the part that takes the most care to read.

**Blocking binary semaphore (`blocking_bin_sem`).** A request on a held lock
is not refused. The requester's id goes into a FIFO request queue in the
cycle after the request. The access routine sees that it is not the owner
and puts the thread to sleep.

A release frees the lock and starts the *ready thread scheduler*. That logic
takes ids from the queue and offers them, one per cycle, on a valid/ready
wake port. `WAKE_ALL = 0`, the default, wakes one waiter per release, which
gives a classic queuing semaphore. `WAKE_ALL = 1` wakes every thread queued
at the moment of the release.

The lock is not handed to the woken thread. The woken thread asks again, and
if another thread got in first, it is queued again.

If a request arrives while the queue is full, it is dropped and a sticky
overflow flag is set. The flag shows in STATUS bit 31 and on the `overflow`
port, and reading STATUS clears it. Size `QDEPTH` to cover the number of
threads that can wait on one semaphore.

**Blocking counting semaphore (`blocking_cnt_sem`).** This core contains a
`count_sem` and adds a suspend queue. A denied thread writes its own id into
`THREAD_ID` before it releases the spin lock. The core stores that id together
with the last `Rqst_num`, which it kept latched. (The request-number
register is the one drawn as `req_reg` in block diagrams of this core.)

Only a `REL_NUM` write makes the resume scheduler look at the queue, and the
scan starts two cycles after that write. What it does depends on `POLICY`:

- `POL_FIT` (default): it walks the queue oldest first. It wakes every
  thread whose request fits in a running budget. The budget starts at the
  count after the release and drops by each woken thread's request. The
  budget is also never allowed above the live count. Threads that do not fit
  stay queued, in order. This policy prefers small requests and avoids
  waking threads that would fail again.
- `POL_ALL`: it wakes every queued thread. The requested-number storage is
  not generated.

The queue is a shift register in arrival order. An entry leaving from the
middle closes the gap in the same cycle, and one entry can be added while
another leaves. As with the binary semaphore, woken threads receive no
resources directly: they take the spin lock and ask again.

The protocol has one window to know about. Releases do not take the spin
lock. If another thread releases resources after a thread's grant was denied
but before that thread's `THREAD_ID` write, the scan misses it. The thread then
sleeps until the next release. An operating system that suspends threads with
a timeout, as the system testbench does, covers this case.

**Ready-queue framework (`sys_sched`).** All blocking semaphores connect to
this block. Each cycle it takes one wake event, choosing among the
semaphores in round-robin order. It sends software ids to the CPU ready queue
and hardware ids to the hardware thread ready queue.

- A non-empty CPU queue holds `cpu_irq` high. The interrupt handler reads
  one register instead of polling every semaphore.
- Hardware threads see the head of their queue directly
  (`hw_rdy_valid`/`hw_rdy_tid`, popped with `hw_rdy_pop`). A hardware
  thread that is a bus master can instead read the queue at offset 2.
  Waking a hardware thread costs the CPU no interrupt and no context switch.
- The queues carry thread ids only. A system that identifies hardware
  threads by the address of a command register would store that address
  instead, widening the ids.
- When a queue is full, the semaphore offering the event is held back until
  there is room. Its event stays valid, so no event is lost.

## The subsystem (`hthread_sync_top`)

The top instantiates:

- `NUM_SPIN` = 4 spin locks
- `NUM_CSEM` = 2 counting semaphores
- `NUM_BBIN` = 4 blocking binary semaphores
- `NUM_BCNT` = 2 blocking counting semaphores
- the framework

Word address bits 11:4 select the core, in that order, with the framework
last (core 12 at the defaults). Bits 3:0 select the register.

Two bus masters share the port through `bus_arb`, a round-robin arbiter: the
CPU port (`bus_cs` … `bus_rdata`, held until `bus_gnt`) and a built-in
`hw_test_thread`. The test thread repeats request / one-cycle wait / owner
check / release on spin lock `HWT_UNIT`. Before every request it counts down
a programmable delay loop (`hwt_delay`). It reports `hwt_acquired` and
`hwt_retries`, and it is idle while `hwt_run` is low. On its own, one
sequence takes 4 cycles plus the delay.

## Hardware versus software threads on one lock

`tb/tb_hw_sw_contention.sv` lets the test thread and a software-thread model
compete for spin lock 0. On its own, the software model is about 7 times
slower than the test thread, which is the speed ratio measured on real
hardware (PowerPC plus vendor bus: 153 against 22 cycles). Its gaps vary at
random. Over 6000-cycle windows:

| hw delay | hw/sw acquisitions | (hw+sw) / hw alone |
|---|---|---|
| 0 | ≈14 | ≈0.75 |
| 2 | ≈4.2 | ≈0.45 |
| 4 | ≈2.1 | ≈0.34 |
| 8 | ≈1.2 | ≈0.26 |
| 16 | ≈0.6 | ≈0.20 |

The shape is the one reported for the prototype system. At zero delay the
hardware thread wins far more often than its raw 7:1 speed advantage
suggests, so a fast hardware thread can starve software threads. The
prototype reported 23:1 and 85 % at zero delay. The delay loop restores a
balance. The exact numbers depend on the bus, which is not modelled here.

## What is this design's own

The following were chosen here. The register names and the behaviour come
from the design's description, and the rest fills the gaps:

- the one-cycle slave bus with combinational read data
- the register offsets, 32-bit data, 8-bit ids, 16-bit counts and id 0 as
  "free"
- bit 7 of the id as the hardware/software marker
- a release counts only when it comes from the owner
- count saturation on release
- the overflow flag and dropped requests
- the FIFO order of waiters, the `POL_FIT` budget rule and the two-cycle scan
  start
- the valid/ready wake ports, round-robin collection and level-high
  interrupt
- 16-entry queues
- the number of cores and the address map
- the two-master arbiter
- the test thread's delay before retries as well as before new sequences

The system bus and the processor are outside the design.

## Files

`rtl/`:

- `sem_pkg.sv`: widths, offsets, `bus_req_t`, `resume_policy_e`
- `tid_fifo.sv`: id FIFO used for the request queue and the ready queues
- `spin_lock.sv`, `count_sem.sv`, `blocking_bin_sem.sv`,
  `blocking_cnt_sem.sv`: the semaphore cores
- `sys_sched.sv`: the ready-queue framework
- `hw_test_thread.sv`, `bus_arb.sv`: the test thread and the two-master
  arbiter
- `hthread_sync_top.sv`: the subsystem

`tb/` holds one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`:

- `tb_hthread_sync_top` runs the whole subsystem at its default size. It
  forces a request-queue overflow and ready-queue back-pressure (32 wake
  events into a 16-entry queue). It then runs four software and four
  hardware threads on all four kinds of semaphore, with the interrupt
  handler and the hardware dispatcher waking sleepers. It checks mutual
  exclusion and resource bounds, and counts every mechanism.
- `tb_hthread_sync_top_alt` runs the same test with the other
  configuration of the blocking semaphores (`BB_WAKE_ALL = 1`,
  `BC_POLICY = POL_ALL`).
- `tb_hw_sw_contention` runs the experiment above.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl rtl/sem_pkg.sv \
    tb/tb_hthread_sync_top.sv --top-module tb_hthread_sync_top
./obj_dir/Vtb_hthread_sync_top
```

Use the same command with another testbench name for any other testbench.
`rtl/sem_pkg.sv` must come first, and `-y rtl` finds the rest. All
testbenches finish in well under a second. Every testbench has been shown to
fail against a copy of its module with one deliberate bug. The RTL passes
Verilator lint and a Yosys/slang elaboration and synthesis. The remaining
lint warnings concern unused package constants and unused high bits of the
bus data.
