// svc_engine: the service-call hardware of one kernel object (task, software
// timer callback or interrupt handler).
//
// In the hardware FreeRTOS scheme the bodies of the service calls a task uses
// are turned into hardware together with the task, rewritten for TCBs held in
// a register array: a call becomes a short sequence of bus accesses to the
// kernel registers, framed by acquiring and releasing a hardware lock that
// serializes service calls. This module is that sequence generator. The
// object's own logic hands it one call at a time (svc_cmd_t) and waits for the
// done pulse (svc_rsp_t), which carries the return value.
//
// Sequences (R = read, W = write; LOCK/UNLOCK = lock0, or lock1 for timer calls):
//   xTaskResume(t)        R state(t); if not Running: LOCK, R state(t),
//                         if Suspended W state(t)=Ready, UNLOCK
//   vTaskSuspend(t)       LOCK, W state(t)=Suspended, UNLOCK; t = self: W own state
//   vTaskDelay(n)         W delay(self)=n (timer and Blocked in one write)
//   vTaskSuspendAll / taskENTER_CRITICAL   on the first level of nesting:
//                         LOCK, W dispatch={1,self}, UNLOCK
//   xTaskResumeAll / taskEXIT_CRITICAL     on the last level: LOCK, W dispatch=0, UNLOCK
//   vTaskPrioritySet(t,p) LOCK, W prio(t), W base prio(t), UNLOCK
//   uxTaskPriorityGet, eTaskGetState, xTimerIsTimerActive, pvTimerGetTimerID: one R
//   xTimerStart/Reset     LOCK, W command(t)=1, UNLOCK; xTimerStop: command 0
//   xTimerChangePeriod    LOCK, W period(t), W command(t)=1, UNLOCK
//   vTimerSetTimerID      LOCK, W timer id(t), UNLOCK
//   xQueueSend/Receive    W queue op; if the kernel blocked the caller, retry
//                         once (non-blocking) after it runs again; result bit 8
//                         = success, [7:0] = received byte
//   pcTaskGetName / pcTimerGetName  one R of name word val[1:0] of object arg
//   configASSERT(v)       nothing if v != 0; else W assert={1,self} and halt:
//                         the engine accepts no further call until it is reset
// The state machine freezes while stall is 1, and drives no bus request then.
// A lock is retried every cycle until it is granted. Each access takes one
// cycle when uncontended, so every call is far below the cycle counts measured
// for high-level-synthesized service hardware (20 cycles for xTaskResume, 43
// and 46 for the queue calls).
//
// From the original scheme: the call list, the lock framing, the resume check
// and the queue-receive outline. This design's choices: the command interface, the
// shared nesting counter for suspend-all and critical sections, lock1 for timer
// calls, the direct write of the caller's own state when it suspends itself,
// names read word by word, and halting the caller on a failed assertion.
module svc_engine
  import rtos_pkg::*;
#(
  parameter int SELF = 0,
  parameter int ID_W = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     srst,     // synchronous restart from the manager
  input  logic     stall,
  input  svc_cmd_t cmd,
  output svc_rsp_t rsp,
  output bus_req_t bus_req,
  input  bus_rsp_t bus_rsp
);
  typedef enum logic [3:0] {
    S_IDLE, S_PRECHK, S_LOCK, S_ACC1, S_ACC2, S_UNLOCK, S_SELF, S_QRETRY, S_DONE, S_HALT
  } st_e;

  st_e               st;
  svc_op_e           op;
  logic [ADDR_W-1:0] arg;
  logic [DATA_W-1:0] val, result;
  logic [7:0]        nest;
  logic [5:0]        tgt;

  assign tgt = arg[5:0];

  function automatic logic is_timer_op(input svc_op_e o);
    return o inside {SVC_TIMER_START, SVC_TIMER_STOP, SVC_TIMER_RESET,
                     SVC_TIMER_CHPERIOD, SVC_TIMER_SET_ID};
  endfunction

  // queue operation word: {may block, timeout, byte}
  function automatic logic [DATA_W-1:0] qword(input logic [DATA_W-1:0] v, input logic blk);
    logic forever_w = v[31];
    logic [15:0] ticks = v[23:8];
    logic [DATA_W-1:0] w = '0;
    w[7:0]  = v[7:0];
    w[23:8] = forever_w ? 16'd0 : ticks;
    w[31]   = blk && (forever_w || ticks != 16'd0);
    return w;
  endfunction

  // ------------------------------------------------------------ bus driver
  always_comb begin
    bus_req = '0;
    unique case (st)
      S_PRECHK: bus_req.addr = kaddr(tgt, F_STATE);
      S_LOCK, S_UNLOCK: begin
        bus_req.addr = paddr(is_timer_op(op) ? PER_LOCK1 : PER_LOCK0, 2'd0);
        bus_req.we   = (st == S_UNLOCK);
      end
      S_SELF: begin
        bus_req.addr  = kaddr(6'(SELF), F_STATE);
        bus_req.we    = 1'b1;
        bus_req.wdata = 32'(ST_SUSPENDED);
      end
      S_QRETRY: begin
        bus_req.addr  = paddr(PER_QUEUE, (op == SVC_QUEUE_SEND) ? Q_SEND : Q_RECV);
        bus_req.we    = 1'b1;
        bus_req.wdata = qword(val, 1'b0);
      end
      S_ACC1: begin
        bus_req.we = 1'b1;
        unique case (op)
          SVC_TASK_RESUME:    begin bus_req.addr = kaddr(tgt, F_STATE); bus_req.we = 1'b0; end
          SVC_TASK_SUSPEND:   begin bus_req.addr = kaddr(tgt, F_STATE); bus_req.wdata = 32'(ST_SUSPENDED); end
          SVC_TASK_DELAY:     begin bus_req.addr = kaddr(6'(SELF), F_DELAY); bus_req.wdata = val; end
          SVC_SUSPEND_ALL, SVC_ENTER_CRITICAL:
                              begin bus_req.addr = kaddr(GLOBAL_OBJ, G_DISPATCH); bus_req.wdata = 32'h100 | 32'(SELF); end
          SVC_RESUME_ALL, SVC_EXIT_CRITICAL:
                              begin bus_req.addr = kaddr(GLOBAL_OBJ, G_DISPATCH); bus_req.wdata = '0; end
          SVC_PRIO_GET:       begin bus_req.addr = kaddr(tgt, F_PRIO); bus_req.we = 1'b0; end
          SVC_PRIO_SET:       begin bus_req.addr = kaddr(tgt, F_PRIO); bus_req.wdata = val; end
          SVC_GET_STATE:      begin bus_req.addr = kaddr(tgt, F_STATE); bus_req.we = 1'b0; end
          SVC_TIMER_START, SVC_TIMER_RESET:
                              begin bus_req.addr = kaddr(tgt, F_TMR_CMD); bus_req.wdata = 32'd1; end
          SVC_TIMER_STOP:     begin bus_req.addr = kaddr(tgt, F_TMR_CMD); bus_req.wdata = 32'd0; end
          SVC_TIMER_CHPERIOD: begin bus_req.addr = kaddr(tgt, F_PERIOD); bus_req.wdata = val; end
          SVC_TIMER_ACTIVE:   begin bus_req.addr = kaddr(tgt, F_ACTIVE); bus_req.we = 1'b0; end
          SVC_TIMER_SET_ID:   begin bus_req.addr = kaddr(tgt, F_TIMER_ID); bus_req.wdata = val; end
          SVC_TIMER_GET_ID:   begin bus_req.addr = kaddr(tgt, F_TIMER_ID); bus_req.we = 1'b0; end
          SVC_QUEUE_SEND:     begin bus_req.addr = paddr(PER_QUEUE, Q_SEND); bus_req.wdata = qword(val, 1'b1); end
          SVC_QUEUE_RECV:     begin bus_req.addr = paddr(PER_QUEUE, Q_RECV); bus_req.wdata = qword(val, 1'b1); end
          SVC_MEM_READ:       begin bus_req.addr = arg; bus_req.we = 1'b0; end
          SVC_MEM_WRITE:      begin bus_req.addr = arg; bus_req.wdata = val; end
          SVC_TASK_NAME, SVC_TIMER_NAME:
                              begin bus_req.addr = kaddr(tgt, F_NAME + {2'b00, val[1:0]}); bus_req.we = 1'b0; end
          SVC_ASSERT:         begin bus_req.addr = kaddr(GLOBAL_OBJ, G_ASSERT); bus_req.wdata = 32'h100 | 32'(SELF); end
          default: ;
        endcase
      end
      S_ACC2: begin
        bus_req.we = 1'b1;
        unique case (op)
          SVC_TASK_RESUME:    begin bus_req.addr = kaddr(tgt, F_STATE); bus_req.wdata = 32'(ST_READY); end
          SVC_PRIO_SET:       begin bus_req.addr = kaddr(tgt, F_BASE_PRIO); bus_req.wdata = val; end
          SVC_TIMER_CHPERIOD: begin bus_req.addr = kaddr(tgt, F_TMR_CMD); bus_req.wdata = 32'd1; end
          default: ;
        endcase
      end
      default: ;
    endcase
    bus_req.req = !stall && (st inside {S_PRECHK, S_LOCK, S_ACC1, S_ACC2, S_UNLOCK, S_SELF, S_QRETRY});
  end

  logic xfer;
  assign xfer = bus_req.req && bus_rsp.gnt;

  assign rsp.ready  = (st == S_IDLE) && !stall;
  assign rsp.done   = (st == S_DONE) && !stall;
  assign rsp.result = result;

  // first state of a call, and whether it needs the lock
  function automatic st_e first_state(input svc_op_e o, input logic [ADDR_W-1:0] a,
                                      input logic [DATA_W-1:0] v, input logic [7:0] n);
    unique case (o)
      SVC_TASK_RESUME:  return (a[5:0] == 6'(SELF)) ? S_DONE : S_PRECHK;
      SVC_TASK_SUSPEND: return (a[5:0] == 6'(SELF)) ? S_SELF : S_LOCK;
      SVC_TASK_DELAY:   return (v == '0) ? S_DONE : S_ACC1;
      SVC_ASSERT:       return (v == '0) ? S_ACC1 : S_DONE;
      SVC_SUSPEND_ALL, SVC_ENTER_CRITICAL: return (n == 8'd0) ? S_LOCK : S_DONE;
      SVC_RESUME_ALL, SVC_EXIT_CRITICAL:   return (n == 8'd1) ? S_LOCK : S_DONE;
      SVC_PRIO_SET, SVC_TIMER_START, SVC_TIMER_STOP, SVC_TIMER_RESET,
      SVC_TIMER_CHPERIOD, SVC_TIMER_SET_ID: return S_LOCK;
      default:          return S_ACC1;
    endcase
  endfunction

  function automatic logic locked_op(input svc_op_e o);
    return o inside {SVC_TASK_RESUME, SVC_TASK_SUSPEND, SVC_SUSPEND_ALL, SVC_ENTER_CRITICAL,
                     SVC_RESUME_ALL, SVC_EXIT_CRITICAL, SVC_PRIO_SET} || is_timer_op(o);
  endfunction

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      op     <= SVC_MEM_READ;
      arg    <= '0;
      val    <= '0;
      result <= '0;
      nest   <= '0;
    end else if (srst) begin
      st   <= S_IDLE;
      nest <= '0;
    end else if (!stall) begin
      unique case (st)
        S_IDLE:
          if (cmd.valid) begin
            op     <= cmd.op;
            arg    <= cmd.arg;
            val    <= cmd.val;
            result <= '0;
            st     <= first_state(cmd.op, cmd.arg, cmd.val, nest);
            if (cmd.op inside {SVC_SUSPEND_ALL, SVC_ENTER_CRITICAL}) nest <= nest + 1'b1;
            if (cmd.op inside {SVC_RESUME_ALL, SVC_EXIT_CRITICAL} && nest != 8'd0) nest <= nest - 1'b1;
          end
        S_PRECHK:
          if (xfer) st <= (task_state_e'(bus_rsp.rdata[1:0]) == ST_RUNNING) ? S_DONE : S_LOCK;
        S_LOCK:
          if (xfer && bus_rsp.rdata[0]) st <= S_ACC1;
        S_ACC1:
          if (xfer) begin
            result <= bus_rsp.rdata;
            unique case (op)
              SVC_TASK_RESUME:
                st <= (task_state_e'(bus_rsp.rdata[1:0]) == ST_SUSPENDED) ? S_ACC2 : S_UNLOCK;
              SVC_PRIO_SET, SVC_TIMER_CHPERIOD: st <= S_ACC2;
              SVC_QUEUE_SEND, SVC_QUEUE_RECV:
                st <= bus_rsp.rdata[QB_BLOCKED] ? S_QRETRY : S_DONE;
              SVC_ASSERT: st <= S_HALT;
              default: st <= locked_op(op) ? S_UNLOCK : S_DONE;
            endcase
          end
        S_ACC2:   if (xfer) st <= S_UNLOCK;
        S_UNLOCK: if (xfer) st <= S_DONE;
        S_SELF:   if (xfer) st <= S_DONE;
        S_QRETRY: if (xfer) begin
          result <= bus_rsp.rdata;
          st     <= S_DONE;
        end
        S_DONE: st <= S_IDLE;
        S_HALT: st <= S_HALT;
        default: st <= S_IDLE;
      endcase
    end
  end

  // bus rule: a request is never made while the object is stalled
  a_no_req_stalled: assert property (@(posedge clk) disable iff (!rst_n) !(stall && bus_req.req))
    else $error("bus request while stalled");
endmodule
