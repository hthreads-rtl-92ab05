# hthreads hardware: an operating system in state machines, and hardware threads that use it

In hthreads, a circuit inside an FPGA is a thread like any software thread.
It gets a thread id, it can be scheduled, and it can lock and unlock
semaphores. To make this work, every kind of computation follows one thread
interface: it asks the operating system for a service, and it carries out
whatever the answer tells it to do. The OS never stops a computation. When a
lock is taken, the OS only tells the requester to halt, and the requester
halts itself. So the OS never needs to know how a computation is built.

Two ideas carry the whole design:

* **The OS is hardware.** Thread management, scheduling and synchronization
  are three separate state machines. They run in parallel with each other and
  with the application.
* **A service request is one bus read.** The operation and its operands are
  packed into the *address* of the read. The OS core works out the answer and
  returns it as the read data. These addresses are called *virtual
  registers*: nothing is stored at them. Locking a semaphore is therefore a
  single read. It needs no atomic instruction sequence, no cache and no
  coherency protocol.

A hardware thread pairs a computation with its own **hardware thread
interface (HWTI)**. The HWTI builds the requests for the computation and
decodes the answers. The computation included here is the
multiply-accumulate example, `r = x*y + a` on a struct in memory. It is
written in the form a C-to-hardware flow would produce: one state per
intermediate-form statement.

## Block diagram

```
 host processor (not included: host_* port)
        |                                   +--> shared_mem          (slave 0)
 hwti 0 <--> multi_acc 0                    +--> thread_manager      (slave 1) --enq--+
        |                                   +--> thread_scheduler    (slave 2) <------+
 hwti 1 <--> multi_acc 1                    +--> sync_manager        (slave 3) --enq--+
        |                                   +--> hwti 0 registers    (slave 4)
        +---- hbus_interconnect ------------+--> hwti 1 registers    (slave 5)
              (3 masters, round robin)

 thread_scheduler --hw_wake[n]--> hwti n
```

| File | Block |
|---|---|
| `rtl/hthreads_pkg.sv` | Shared types: bus structs, address layout, opcodes, answer flags |
| `rtl/hthreads_top.sv` | Top level. Default size: 2 hardware threads, 256 thread ids, 64 semaphores, 1024 words of memory |
| `rtl/hbus_interconnect.sv` | Round-robin arbiter and address decoder |
| `rtl/shared_mem.sv` | Shared memory; acknowledges one cycle after the request |
| `rtl/thread_manager.sv` | Thread ids and thread states |
| `rtl/thread_scheduler.sv` | Ready-to-run queue, hardware-thread binding, wake pulses |
| `rtl/sync_manager.sv` | Mutexes with FIFO waiting queues |
| `rtl/hwti.sv` | Hardware thread interface, with its local memory |
| `rtl/multi_acc.sv` | The multiply-accumulate hardware thread |

## The bus

All traffic uses one request/acknowledge bus (`bus_req_t` and `bus_rsp_t` in
the package):

* A master raises `req` with `we`, `addr` and `wdata`.
* It holds all four unchanged until the slave returns `ack` for one cycle.
  For a read, `rdata` comes with the `ack`.
* Masters are synchronous. A master takes the ack at the clock edge where it
  is high, and changes its request only after that edge.

The interconnect checks the hold rule with an assertion. It grants one master
at a time, round robin, with one idle cycle before each grant. A transfer to
an unmapped address is answered with data 0 and counted in `bus_errors`, so
that no master hangs.

Address map, decoded from `addr[31:28]`:

| Region | Target |
|---|---|
| `0` | shared memory (byte address; bits [1:0] are ignored) |
| `6` | thread manager |
| `7` | scheduler |
| `8` | synchronization manager |
| `1` | local memory of the HWTI that issues the access. Only a hardware thread's own loads and stores use it; it never reaches the bus |
| `9` | HWTI n, with n in `addr[15:8]`. If `addr[27]` is 0: the register file, register number in `addr[4:2]`. If `addr[27]` is 1: word `addr[26:16]` of that HWTI's local memory |

## Virtual registers: how a service request is encoded

A request to an OS core is a **read**. Writes are acknowledged and ignored.
The address is laid out as follows (`os_addr_t`, built with the `os_addr()`
function):

```
 31    28 27  24 23    18 17        10 9          2 1  0
[region ][ op  ][ zero   ][ thread id ][ operand   ][ 00 ]
```

The read data is the answer:

* bit 31 (`ANS_FAIL`): the request was refused. Nothing changed.
* bit 30 (`ANS_BLOCK`): the requester must halt itself.
* low bits: the data (a tid, a state or a length).

| Core | Op | Operands | Effect and answer |
|---|---|---|---|
| thread manager | `TM_CREATE` | – | Gives out the lowest unused tid and marks it CREATED. Answer: the tid, or FAIL if all are in use |
| | `TM_ADD` | tid | CREATED → READY. The tid goes to the scheduler |
| | `TM_EXIT` | tid | READY → EXITED |
| | `TM_STATUS` | tid | Answer: the state (UNUSED 0, CREATED 1, READY 2, EXITED 3) |
| | `TM_FREE` | tid | EXITED → UNUSED, so the tid can be given out again |
| scheduler | `SC_ENQUEUE` | tid | Makes the tid ready. FAIL if it is already queued |
| | `SC_DEQUEUE` | – | Answer: the oldest ready tid, or FAIL if the queue is empty |
| | `SC_LENGTH` | – | Answer: the queue length |
| | `SC_BIND_HW` | tid, n | The tid now runs on HWTI n |
| | `SC_UNBIND` | tid | The tid is a software thread again |
| sync manager | `SY_LOCK` | tid, s | Answer 0 if s was free (tid now owns it). BLOCK if s is held (tid is queued). FAIL if tid already owns s |
| | `SY_TRYLOCK` | tid, s | Answer 0, or FAIL if s is held. Never queues |
| | `SY_UNLOCK` | tid, s | Answer 0. FAIL if tid is not the owner |
| | `SY_OWNER` | s | Answer: the owner tid. FAIL is set if s is free |

Each core takes a request at the first clock edge that sees it and
acknowledges in the next cycle. Two requests can add a wait: an `TM_ADD`, and
an unlock that hands the lock on. Each waits until the scheduler takes the
tid.

## How the three OS cores cooperate

* **Thread manager.** Owns the thread table (2 bits of state per tid). On
  `TM_ADD` it passes the tid to the scheduler over a direct valid/ack port.
* **Scheduler.** Keeps a FIFO ready-to-run queue with one on-queue bit per
  tid, and a binding table from tid to HWTI. A ready tid is handled in one
  of two ways:
  * Not bound to an HWTI: it is pushed on the queue. The processor picks it
    up later with `SC_DEQUEUE`.
  * Bound to HWTI n: it is not queued. Instead the scheduler sends a
    one-cycle pulse on `hw_wake[n]`, and the hardware thread starts or
    resumes at once.

  The two internal ports (thread manager, sync manager) go before the bus,
  and only one enqueue happens per cycle.
* **Synchronization manager.** Keeps, for each semaphore, a locked bit, an
  owner and a FIFO waiting queue. The queues are linked lists through one
  `next` entry per tid, so a thread can wait on only one semaphore at a
  time. When the owner unlocks a semaphore that has waiters:
  * the oldest waiter becomes the owner at once;
  * its tid is sent to the scheduler.

  So a blocked hardware thread is woken with the lock already in hand. A
  blocked software thread lands on the ready queue.

## The hardware thread interface

The HWTI has two faces.

**System interface.** Five registers on the bus (word offsets):

| Offset | Register | Access | Meaning |
|---|---|---|---|
| 0 | identifier | R/W | Thread id. Written by the system when it spawns the thread |
| 1 | status | R | HWTI state: IDLE 0, RUN 1, BUSY 2, BLOCKED 3, EXITED 4 |
| 2 | command | R/W | `CMD_GO` (1) starts the thread, or wakes it after a block. `CMD_RESET` (2) abandons the run |
| 3 | argument | R/W | The argument passed to the thread, normally a pointer |
| 4 | result | R | The value the thread returned |

A pulse on `wake` from the scheduler has the same effect as writing
`CMD_GO`.

**Computation interface.** Five registers, seen only by the computation:
status (`run`, `reset`, `busy`, and a one-cycle `done`), opcode, argument 1,
argument 2 and result. The computation works like this:

1. Wait until `run && !busy && !done`.
2. Present arguments 1 and 2 and the opcode, and pulse `c_op_we` (this loads
   the opcode register).
3. Wait for `done`. The answer is then in `c_result`.

An assertion checks the rule in step 1.

| Opcode | What the HWTI does |
|---|---|
| `OP_GETARG`, `OP_GETID` | Returns the argument or identifier register. `done` comes two clock edges after the opcode load |
| `OP_LOAD a1` | Read at `a1`: local memory if `a1` is in region 1, otherwise a bus read |
| `OP_STORE a1, a2` | Write of `a2` to `a1`: local memory if `a1` is in region 1, otherwise a bus write |
| `OP_LOCK s` | Sends `SY_LOCK` with its own tid. On a BLOCK answer the HWTI goes to BLOCKED and does not answer until a wake or GO arrives. The result is then 0: the lock is owned |
| `OP_TRYLOCK s`, `OP_UNLOCK s` | Sends the request. The result is the manager's answer |
| `OP_EXIT v` | Writes `v` to the result register and sends `TM_EXIT`. The state becomes EXITED and `run` drops |

**Local memory.** Each HWTI holds `LOCAL_WORDS` (default 256) words of its
own memory. A hardware thread uses the same `OP_LOAD` and `OP_STORE` for it as
for shared memory: the HWTI looks at the address, and serves region `1`
itself instead of going to the bus. Such a load or store answers (`done`) two
clock edges after the opcode load, and other masters never see it. The
address in region 1 is a byte address; bits [1:0] are ignored and the word
index wraps at `LOCAL_WORDS`. The processor fills and reads the local memory
through the HWTI's bus window (region 9 with `addr[27]` set), typically before
it starts the thread. If both sides write in the same cycle, the bus write
wins.

A reset command that arrives during a bus transfer is held until the transfer
ends, so that the bus rule is never broken. The computation gets a one-cycle
`reset` and returns to its first state.

## The multiply-accumulate thread

`multi_acc` runs this C function:

```c
typedef struct { int x, y, a, r; } mac_t;
void *multi_acc(void *arg) { mac_t *m = arg; m->r = m->x * m->y + m->a; return arg; }
```

Each statement of its intermediate form is one state:

getarg → copy the pointer → load x (+0) → load y (+4) → multiply → load a
(+8) → add → store r (+12) → exit with the argument.

The multiply keeps the low 32 bits, as C `int` does. After exiting, the
thread waits for `run` to drop, so one start gives exactly one run.

## Starting a hardware thread from the processor

1. `TM_CREATE`. The answer is the new tid.
2. Write the tid to the HWTI's identifier register, and the struct pointer to
   its argument register.
3. `SC_BIND_HW tid, n`.
4. `TM_ADD tid`. The scheduler pulses `hw_wake[n]` and the thread runs.
5. Poll `TM_STATUS tid` until it reads EXITED. Then read the HWTI result
   register.

Writing `CMD_GO` to the command register also starts the thread, without
going through the OS. Before a freed tid is reused, send `SC_UNBIND` for it.
Otherwise adding it again would wake the HWTI it was bound to.

## What comes from hthreads and what was chosen here

These parts come from the hthreads design:

* the three independent OS state machines and what each is responsible for;
* service requests as memory reads to virtual registers, with the answer as
  the read data;
* a lock on a held semaphore makes the requester halt itself;
* one HWTI per hardware thread, with its two sets of five registers as named
  above;
* the statement sequence of the multiply-accumulate thread.

These parts were chosen for this implementation:

* the bus and the address map;
* the virtual-register layout, the opcode values and the answer flags;
* the thread states, the scheduler operations and the FIFO policy;
* the binding of tids to HWTIs, and the wake pulse;
* the mutex semantics (no recursive locks; ownership passes to the oldest
  waiter);
* the HWTI states, opcodes and handshake;
* all sizes: 2 hardware threads, 256 tids, 64 semaphores, 1024 memory words,
  256 local words per HWTI.

Known simplifications:

* The local memory is a plain array inside each HWTI, with one fixed
  region number. Its size and the way the processor reaches it are this
  design's own choices.
* There are no thread priorities, and no join or detach beyond `TM_FREE`.
* A wake that reaches an HWTI in IDLE or EXITED starts it, just like
  `CMD_GO`.
* The processor that runs software threads is not included. Its master port
  is the `host_*` port of `hthreads_top`.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

* `tb_hthreads_top` runs the top at its default size, end to end:
  * two hardware threads spawned through the OS, running at the same time
    (their HWTIs compete for the bus);
  * a restart by command, with new data;
  * lock blocking and handoff between software threads, with the ready
    queue;
  * filling the thread table;
  * a bus error;
  * an HWTI reset;
  * a hardware thread whose data struct sits in its HWTI's local memory.

  It counts each of these mechanisms and fails if one never happens. A full
  run takes well under a second.
* `tb_hwti` stands in for the system, the computation and the OS.
* `tb_multi_acc` stands in for the HWTI.
* The OS core testbenches compare every answer with a reference model.

To run one with Verilator 5:

```sh
verilator --binary --timing --assert --top-module tb_hthreads_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/hthreads_pkg.sv tb/tb_hthreads_top.sv
./obj_dir/Vtb_hthreads_top
```

Replace the top-module name and testbench file to run the other testbenches.
The package must come first on the command line.
