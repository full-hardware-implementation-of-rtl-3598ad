# A FreeRTOS system with the kernel in hardware

In an ordinary FreeRTOS system one CPU runs the tasks one at a time and the
kernel decides, on every tick and service call, which task gets the CPU. Here
there is no CPU. Every task, every software-timer callback and every interrupt
handler is a hardware module of its own. They all run at the same time. The
kernel shrinks to a **manager**. The manager keeps the task control blocks in
registers and controls each module with two wires: *stall* (freeze while 1) and
*reset* (start again from the beginning). Scheduling costs nothing. A task that
becomes Ready is Running in the next clock cycle, and service calls take a few
cycles.

This only works because every kernel object is created before the scheduler
starts. FreeRTOS normally allows dynamic creation. With a fixed set of objects,
the FreeRTOS linked lists of task control blocks (TCBs) become one array indexed
by object number. Moving a task from the Ready list to the Blocked list becomes a
write to its state field.

The RTL in `rtl/` is the kernel side of such a system: the manager, the memory
arbiter, two hardware locks, a data queue, the memories, and one service-call
engine per object. The application bodies (the task code, the timer callbacks
and the interrupt handler) are application-specific. They connect at the ports
of the top module `freertos_hw_top`. The end-to-end testbench plays them.

## System structure

```
            svc_cmd/svc_rsp   obj_stall  obj_reset  obj_end      irq
                  |               ^          ^         |          |
  application ----+---------------+----------+---------+          |
  bodies (ports)  |                                               |
           +------v------+  per object                            |
           | svc_engine  |  (service-call hardware)               |
           +------+------+                                        |
                  | one bus port per object                       |
           +------v---------------------------------------------v--+
           |  manager: TCB register array, global status,          |
           |  tick timers, stall/reset generation, dispatch_ctl,   |
           |  address decoding                                     |
           +--+-----------+-------------+-------------+------------+
              | memory    | lock0       | lock1       | data queue
           +--v-------+ +-v-------+ +---v-----+ +-----v------+
           | arbiter  | | hw_lock | | hw_lock | | data_queue |
           +--+----+--+ +---------+ +---------+ +------------+
              |    |
   local banks (one per object)   global bank (shared)
```

Objects are numbered tasks first, then software timers, then interrupt
handlers. The defaults describe a small demonstration system:

| id | role         | kind |
|----|--------------|------|
| 0  | LIM_INC      | task: increments a shared counter once, then suspends itself |
| 1  | CNT_INC      | task: increments a shared counter continuously |
| 2  | C_CTRL       | task: suspends, resumes and re-prioritises the two counters |
| 3  | TMR_TST      | task: starts, stops and resets the software timers |
| 4  | SUSP_SEND    | task: disables dispatch, sends to the queue |
| 5  | SUSP_RECV    | task: receives from the queue |
| 6  | AR_TMR1      | software timer, auto-reload |
| 7  | AR_TMR2      | software timer, auto-reload |
| 8  | OS_TMR1      | software timer, one-shot |
| 9  | ISR_OS_TMR1  | software timer, one-shot, started by the interrupt handler |
| 10 | ISR_OS       | interrupt handler |

## The kernel bus

Each object reaches everything through one word-addressed bus port (`bus_req_t`
/ `bus_rsp_t` in `rtos_pkg`). A transfer completes in the cycle where `req` and
`gnt` are both 1. `rdata` is valid in that same cycle for reads and for writes.
Memories are read asynchronously, so an uncontended access always takes one
cycle. An object never makes a request while it is stalled, and an assertion
checks this.

| address `[15:14]` | target | detail |
|---|---|---|
| `00` | own local memory | `LM_WORDS` words |
| `01` | global memory | `GM_WORDS` words, arbitrated by priority |
| `10` | kernel registers | `[13:8]` object id (63 = global status), `[3:0]` field |
| `11` | peripherals | `[13:12]`: `00` lock0, `01` lock1, `10` data queue |

Kernel register fields, per object:

| field | name | access | meaning |
|---|---|---|---|
| 0 | STATE | rw | xState: 0 Running, 1 Ready, 2 Blocked, 3 Suspended |
| 1 | PRIO | rw | uxPriority (tasks only; timers are fixed at `DAEMON_PRIO`) |
| 2 | BASE_PRIO | rw | uxBasePriority |
| 3 | TIMER | rw | per-object timer in ticks |
| 4, 5 | NOTIFY_VAL, NOTIFY_ST | rw | ulNotifiedValue, ucNotifyState |
| 6 | DELAY | wo | timer := data and state := Blocked, in one write |
| 7 | PERIOD | rw | software-timer period |
| 8 | TMR_CMD | wo | 1: start or reset (Running, timer := period); 0: stop (Blocked) |
| 9 | AUTO_RELOAD | rw | software-timer mode |
| 10 | TIMER_ID | rw | software-timer ID word |
| 11 | ACTIVE | ro | software timer is active |
| 12–15 | NAME | ro | object name, 16 characters; field 12 holds the first four, first character in bits `[7:0]` |

Global status (object 63): field 0 holds the dispatch register, with bit 8 the
disabled flag and `[7:0]` the owner. Field 1 holds the tick count. Field 2 holds
the number of objects. Field 3 is the assertion register: bit 8 says that a
`configASSERT` failed and `[7:0]` holds the id of the first object it failed in.
The register keeps the first failure and drives the top's `assert_failed` and
`assert_id` outputs.

Only the registers that affect stalling are kept in the manager as flip-flops.
The held-mutex flags and the critical-nesting count stay with the object; the
nesting count lives in its service engine. Names never change, because every
object is static. They are therefore constants: the `OBJ_NAME` parameter,
answered read-only in fields 12–15, which costs no flip-flops.

## How the manager controls the objects

* **Tasks.** `stall = (state != Running)`, gated by dispatch disabling. On every
  clock edge a Ready task becomes Running. All tasks start Ready, so they start
  running one cycle after reset. Priority does not choose which task runs,
  because all Running tasks run in parallel. It decides who wins the global
  memory and which waiter the data queue wakes.
* **Ticks and timers.** Every `TICK_CYCLES` cycles all non-zero task timers count
  down. A Blocked task whose timer reaches zero becomes Ready. A Blocked task
  with timer 0 waits with no timeout. The same timers serve `vTaskDelay` and
  the queue timeouts, so there is no central timer list.
* **Software timers.** A timer is dormant in Blocked and active in Running. While
  it is active and its callback is not executing, it counts down once per tick.
  At zero the callback module is unstalled. When the module raises `obj_end`:
  * a one-shot timer goes back to Blocked;
  * an auto-reload timer reloads its period and counts again;
  * in both cases the module gets a one-cycle reset.

  Callbacks have the daemon task's priority. While dispatching is disabled they
  are held stalled, because FreeRTOS runs them in the timer daemon task.
* **Interrupt handlers.** A rising edge on `irq[k]` unstalls handler `k` in the
  next cycle. Its `obj_end` stalls and resets it again. Dispatch disabling does
  not affect handlers.

## Dispatch disabling (`dispatch_ctl`)

In a software RTOS, `vTaskSuspendAll` stops the scheduler. Here tasks do not wait
for a scheduler, so stopping one has no effect. Instead the dispatch register
records a flag and the id of the task that set it. While the flag is set,
`dispatch_ctl` forces the stall of every other task and timer to 1. A decoder
turns the owner id into a one-hot vector, and one multiplexer per object,
selected by the flag, chooses the output stall. `vTaskSuspendAll`/`xTaskResumeAll`
and `taskENTER_CRITICAL`/`taskEXIT_CRITICAL` share this mechanism and one
nesting counter.

## Service calls (`svc_engine`)

Each object has a service engine that turns a FreeRTOS call into kernel-bus
accesses. The application logic hands it a `svc_cmd_t` when `ready` is 1 and
waits for the one-cycle `done` pulse, which carries the result. Calls that
change shared kernel state are framed by a hardware lock. lock0 serializes
task-control calls and lock1 serializes timer calls. A lock is acquired by
reading it, which returns 1 on success, and the read is retried every cycle
until it succeeds. Writing the lock releases it.

| call | accesses | cycles, uncontended | reference HLS cycles |
|---|---|---|---|
| xTaskResume | R state; LOCK; R state; W Ready if Suspended; UNLOCK | 6 | 20 |
| vTaskSuspend | LOCK; W Suspended; UNLOCK (self: one write) | 4 | 11 |
| vTaskDelay | W DELAY | 2 | 9 |
| vTaskSuspendAll | LOCK; W dispatch; UNLOCK (outermost level only) | 4 | 15 |
| xTaskResumeAll | LOCK; W dispatch = 0; UNLOCK (outermost level only) | 4 | 16 |
| vTaskPrioritySet | LOCK; W PRIO; W BASE_PRIO; UNLOCK | 5 | 20 |
| xTimerStart / Reset / Stop | LOCK1; W TMR_CMD; UNLOCK1 | 4 | 14 / 15 / 15 |
| xTimerChangePeriod | LOCK1; W PERIOD; W TMR_CMD; UNLOCK1 | 5 | – |
| uxTaskPriorityGet, eTaskGetState, xTimerIsTimerActive, pvTimerGetTimerID | one read | 2 | – |
| vTimerSetTimerID | LOCK1; W TIMER_ID; UNLOCK1 | 4 | – |
| pcTaskGetName, pcTimerGetName | one read of name word `val[1:0]` | 2 | – |
| configASSERT(v) | nothing if `v != 0`; else W assertion register, then halt | 1 / – | – |
| xQueueSend / xQueueReceive | one queue operation (+ one retry after blocking) | 2 | 43 / 46 |
| interrupt start | – | 1 | 1 |

The "reference HLS cycles" column gives the counts measured when the service
bodies are compiled from C by high-level synthesis. This RTL does not try to
match them. The testbenches only check that it stays below them.

The `FromISR` timer variants use the same commands. The hardware has no pointer
to hand back, so a name query returns one 4-character word of the name per call,
and the caller asks for up to four words. A failed `configASSERT` records the
caller in the assertion register. The caller's engine then halts: it accepts no
further call until the object is reset. This matches the usual FreeRTOS
definition, which disables interrupts and loops forever.

## The data queue

The queue holds `QLEN` bytes in a ring buffer. FreeRTOS keeps a list of the
tasks waiting on a queue. Here that list is two bit vectors, `send_wait` and
`recv_wait`, where bit *i* is set iff object *i* is blocked sending or blocked
receiving.

A call goes like this:

1. The engine writes one operation word: the byte, the timeout in ticks, and a
   "may block" bit. The unit serves one operation per cycle, to the lowest
   requesting index. It first clears the caller's own wait bits, which may be
   left over from an earlier timeout.
2. **Success.** The byte goes in or out. If a waiter of the opposite kind is
   Blocked, the highest-priority one (ties to the lowest id) has its bit
   cleared, and the unit sends `wake` to the manager, which makes it Ready.
3. **Failure with may-block.** The queue is full for a send or empty for a
   receive. The caller's bit is set, and in the same cycle the unit sends
   `blk` to the manager with the timeout. The manager writes Blocked and the
   timer at that clock edge. The caller is stalled from the next cycle, and
   no window exists in which a wake-up could be lost.
4. When the caller runs again, because it was woken or its timer expired, the
   engine retries once without blocking. Success means it was woken. Failure
   means the timeout expired, and the call returns failure.

Blocking and the queue update happen in one cycle, so queue calls need no lock.
A lock would deadlock anyway, since the caller would be stalled while holding
it. A timeout of 0 means "do not block", and `val[31]` means "wait forever"
(`portMAX_DELAY`).

## Memory arbitration and locks

Each object's local memory is private, so a local access is granted at once.
When several objects want the global memory in the same cycle, the one with the
highest current priority wins, and ties go to the lowest id. The others keep
`req` high and are granted later. A lock answers every request in the cycle it
is made. Of several simultaneous try-acquires of a free lock, the lowest index
wins. Only the owner can release a lock.

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `N_TASK`, `N_TMR`, `N_ISR` | 6, 4, 1 | number of tasks, software timers, interrupt handlers |
| `PRIO_W` | 4 | priority width (larger = more urgent) |
| `TMR_W` | 16 | tick-timer width |
| `TICK_CYCLES` | 1000 | clock cycles per tick |
| `LM_WORDS`, `GM_WORDS` | 256, 1024 | local and global memory words (32-bit) |
| `QLEN` | 8 | data queue length in bytes |
| `DAEMON_PRIO` | 2 | priority of all software timers |
| `TASK_PRIO` | all 1 | initial task priorities |
| `TMR_AUTO` | `4'b0011` | auto-reload mask of the timers |
| `TMR_PERIOD` | 10 | initial timer periods in ticks |
| `OBJ_NAME` | the names in the object table | one 128-bit string value per object |

The object counts, the names and the timer modes come from the demonstration system. The
other values are choices of this implementation.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rtos_pkg.sv tb/tb_freertos_hw_top.sv \
          --top-module tb_freertos_hw_top -o sim
./obj_dir/sim
```

Replace the testbench name to run the others: `tb_manager`, `tb_svc_engine`,
`tb_data_queue`, `tb_dispatch_ctl`, `tb_arbiter`, `tb_hw_lock` or `tb_mem_bank`.
`-Irtl` lets Verilator find every module by its file name.

`tb_freertos_hw_top` runs the whole system at its default parameters, about 50
ticks or 50,000 cycles, in well under a second. It plays all eleven application
roles. It checks shared counters, timer run counts, the order of the queue data
and the call latencies. It also counts each mechanism and fails if one never
happened:

* suspension
* dispatch disabling
* deferral of a timer callback
* delay wake-up
* auto-reload and one-shot expiry
* the interrupt
* queue-full blocking, queue-empty blocking, wake-up and timeout
* lock contention
* memory arbitration conflicts
* a failed assertion, which must halt the calling object

It also reads names back and checks them.

The unit testbenches compare each block with an independent model written into
the testbench, using random traffic (arbiter, locks, queue, memory, dispatch
control) or directed sequences (manager, service engine).

## Trust and departures

* The kernel-side behaviour is checked block by block and end to end. It
  follows the known FreeRTOS-on-hardware scheme: TCB array, stall control,
  one-cycle Ready-to-Running, per-object timers, the timer flow with `end`,
  dispatch disabling by owner id, and a queue with bit-vector waiting lists.
* The bus protocol, the address map, the register encodings, the tick source,
  irq edge triggering, the reset pulse after `end`, and all sizes and priorities
  are choices of this implementation.
* The queue procedure (try, block, wake, retry once) is done by one dedicated
  unit, not by code compiled into every task, so queue calls take 2 cycles
  instead of dozens.
* Service calls are produced by a small sequencer per object. Code compiled
  into each task by high-level synthesis would take more cycles and area.
* The application bodies are not part of the RTL.
* Names are constants in the kernel register space, not copies in each object's
  local memory. Name queries return one word per call.
* Not provided: task notification calls (the registers exist but no call uses
  them), mutexes beyond the two service locks, and priority inheritance.
* Simultaneous register writes by two objects to the same field resolve to the
  higher object id. Service calls that share a lock never collide this way.
* If a timer is started again while its callback is still running, the restart
  is lost for a one-shot timer at `end`. Auto-reload timers reload on `end` as
  usual.
