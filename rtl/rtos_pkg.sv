// rtos_pkg: types and constants shared by the hardware FreeRTOS kernel.
//
// Every kernel object (task, software timer, interrupt handler) is a hardware
// module of its own. It reaches memories, kernel registers, the hardware locks
// and the data queue through one word-addressed bus port (bus_req_t out,
// bus_rsp_t back). A transfer completes in the cycle where req and gnt are both
// 1; rdata is valid in that same cycle, for writes as well as reads (the data
// queue returns a status word on a write).
//
// Address map (word addresses, ADDR_W = 16), a choice of this design:
//   [15:14] = 00  local memory of the calling object
//   [15:14] = 01  global (shared) memory
//   [15:14] = 10  kernel registers: [13:8] object id (63 = global status),
//                 [3:0] field
//   [15:14] = 11  peripherals: [13:12] = 00 lock0, 01 lock1, 10 data queue
//
// Task states follow FreeRTOS (Running, Ready, Blocked, Suspended). A software
// timer uses Blocked for "dormant" and Running for "active", as the
// FreeRTOS-on-hardware timer flow does.
package rtos_pkg;

  localparam int ADDR_W = 16;
  localparam int DATA_W = 32;

  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic              gnt;
    logic [DATA_W-1:0] rdata;
  } bus_rsp_t;

  typedef enum logic [1:0] {
    ST_RUNNING   = 2'd0,
    ST_READY     = 2'd1,
    ST_BLOCKED   = 2'd2,
    ST_SUSPENDED = 2'd3
  } task_state_e;

  // address regions
  typedef enum logic [1:0] {
    RG_LOCAL  = 2'b00,
    RG_GLOBAL = 2'b01,
    RG_KERNEL = 2'b10,
    RG_PERIPH = 2'b11
  } region_e;

  localparam logic [1:0] PER_LOCK0 = 2'b00;
  localparam logic [1:0] PER_LOCK1 = 2'b01;
  localparam logic [1:0] PER_QUEUE = 2'b10;

  localparam logic [5:0] GLOBAL_OBJ = 6'd63;

  // per-object kernel register fields
  localparam logic [3:0] F_STATE       = 4'd0;   // rw  xState
  localparam logic [3:0] F_PRIO        = 4'd1;   // rw  uxPriority
  localparam logic [3:0] F_BASE_PRIO   = 4'd2;   // rw  uxBasePriority
  localparam logic [3:0] F_TIMER       = 4'd3;   // rw  uxTimer
  localparam logic [3:0] F_NOTIFY_VAL  = 4'd4;   // rw  ulNotifiedValue
  localparam logic [3:0] F_NOTIFY_ST   = 4'd5;   // rw  ucNotifyState
  localparam logic [3:0] F_DELAY       = 4'd6;   // wo  timer := wdata, state := Blocked
  localparam logic [3:0] F_PERIOD      = 4'd7;   // rw  software timer period
  localparam logic [3:0] F_TMR_CMD     = 4'd8;   // wo  1: start/reset, 0: stop
  localparam logic [3:0] F_AUTO_RELOAD = 4'd9;   // rw  software timer auto-reload
  localparam logic [3:0] F_TIMER_ID    = 4'd10;  // rw  software timer ID word
  localparam logic [3:0] F_ACTIVE      = 4'd11;  // ro  timer active (state == Running)
  localparam logic [3:0] F_NAME        = 4'd12;  // ro  name, 4 words (fields 12..15), first
                                                 //     character in bits [7:0] of field 12

  // global status fields (object id 63)
  localparam logic [3:0] G_DISPATCH    = 4'd0;   // rw  {bit 8: disabled, [7:0]: owner id}
  localparam logic [3:0] G_TICK        = 4'd1;   // ro  tick count
  localparam logic [3:0] G_NOBJ        = 4'd2;   // ro  number of kernel objects
  localparam logic [3:0] G_ASSERT      = 4'd3;   // rw  {bit 8: an assertion failed, [7:0]: id of
                                                 //     the first object whose assertion failed}

  // data queue operations ([1:0] of the peripheral address)
  localparam logic [1:0] Q_SEND  = 2'd0;  // w: {31: may block, [23:8] timeout, [7:0] byte}
  localparam logic [1:0] Q_RECV  = 2'd1;  // w: {31: may block, [23:8] timeout}
  localparam logic [1:0] Q_COUNT = 2'd2;  // r: number of bytes held

  // status bits returned by a data queue operation
  localparam int QB_OK      = 8;   // operation done (data in [7:0] for receive)
  localparam int QB_BLOCKED = 9;   // caller has been blocked by the kernel

  function automatic logic [ADDR_W-1:0] kaddr(input logic [5:0] obj, input logic [3:0] fld);
    return {RG_KERNEL, obj, 4'd0, fld};
  endfunction

  function automatic logic [ADDR_W-1:0] paddr(input logic [1:0] per, input logic [1:0] sub);
    return {RG_PERIPH, per, 10'd0, sub};
  endfunction

  // service calls offered by the service hardware of each object (svc_engine)
  typedef enum logic [4:0] {
    SVC_TASK_RESUME     = 5'd0,   // xTaskResume(arg)
    SVC_TASK_SUSPEND    = 5'd1,   // vTaskSuspend(arg)
    SVC_TASK_DELAY      = 5'd2,   // vTaskDelay(val)
    SVC_SUSPEND_ALL     = 5'd3,   // vTaskSuspendAll()
    SVC_RESUME_ALL      = 5'd4,   // xTaskResumeAll()
    SVC_PRIO_GET        = 5'd5,   // uxTaskPriorityGet(arg)
    SVC_PRIO_SET        = 5'd6,   // vTaskPrioritySet(arg, val)
    SVC_GET_STATE       = 5'd7,   // eTaskGetState(arg)
    SVC_ENTER_CRITICAL  = 5'd8,   // taskENTER_CRITICAL()
    SVC_EXIT_CRITICAL   = 5'd9,   // taskEXIT_CRITICAL()
    SVC_TIMER_START     = 5'd10,  // xTimerStart(arg) / FromISR
    SVC_TIMER_STOP      = 5'd11,  // xTimerStop(arg) / FromISR
    SVC_TIMER_RESET     = 5'd12,  // xTimerReset(arg) / FromISR
    SVC_TIMER_CHPERIOD  = 5'd13,  // xTimerChangePeriod(arg, val)
    SVC_TIMER_ACTIVE    = 5'd14,  // xTimerIsTimerActive(arg)
    SVC_TIMER_SET_ID    = 5'd15,  // vTimerSetTimerID(arg, val)
    SVC_TIMER_GET_ID    = 5'd16,  // pvTimerGetTimerID(arg)
    SVC_QUEUE_SEND      = 5'd17,  // xQueueSend(byte val[7:0], ticks val[23:8], forever val[31])
    SVC_QUEUE_RECV      = 5'd18,  // xQueueReceive(ticks val[23:8], forever val[31])
    SVC_MEM_READ        = 5'd19,  // plain load from address arg
    SVC_MEM_WRITE       = 5'd20,  // plain store of val to address arg
    SVC_TASK_NAME       = 5'd21,  // pcTaskGetName(arg): name word val[1:0]
    SVC_TIMER_NAME      = 5'd22,  // pcTimerGetName(arg): name word val[1:0]
    SVC_ASSERT          = 5'd23   // configASSERT(val): halt the caller if val == 0
  } svc_op_e;

  typedef struct packed {
    logic              valid;
    svc_op_e           op;
    logic [ADDR_W-1:0] arg;   // object id or memory address
    logic [DATA_W-1:0] val;   // value argument
  } svc_cmd_t;

  typedef struct packed {
    logic              ready;   // engine idle and not stalled: a command is taken
    logic              done;    // one-cycle pulse: call finished
    logic [DATA_W-1:0] result;  // return value, valid with done
  } svc_rsp_t;

endpackage
