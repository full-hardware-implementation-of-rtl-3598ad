// manager: the hardware FreeRTOS kernel. It replaces the scheduler, the TCB
// lists and the timer daemon task by registers and a little control logic.
//
// Kernel objects are numbered 0..N-1: tasks first (N_TASK), then software
// timers (N_TMR), then interrupt handlers (N_ISR). Every object is a hardware
// module that runs in parallel with the others and is controlled only by its
// stall and reset inputs.
//
// Status registers ("task status", one array entry per object instead of
// FreeRTOS linked lists): xState, uxPriority, uxBasePriority, uxTimer,
// ulNotifiedValue, ucNotifyState; for software timers also the period, the
// auto-reload flag, the timer ID word and an "executing" flag; for interrupt
// handlers the executing flag; a read-only name (pcTaskGetName,
// pcTimerGetName). Global status: the dispatch-disable flag with the owner id,
// the tick count, and the first failed assertion (configASSERT).
//
// Behaviour:
//  * A task is stalled unless its state is Running; a Ready task is made
//    Running at the next clock edge, so it starts one cycle after it became
//    Ready.
//  * Every TICK_CYCLES cycles all non-zero task timers count down; a Blocked
//    task whose timer reaches zero becomes Ready. A Blocked task with timer 0
//    waits without a timeout.
//  * A software timer in state Running (active) counts down while its callback
//    is not executing; at zero the callback module is unstalled. When the
//    module raises end, a one-shot timer returns to Blocked (dormant) and an
//    auto-reload timer is reloaded with its period; the module gets a one-cycle
//    reset so that its next run starts from the beginning. Timer callbacks are
//    deferred while dispatching is disabled; their priority is DAEMON_PRIO.
//  * A rising edge on irq[k] unstalls interrupt handler k in the next cycle;
//    its end stalls and resets it again. Handlers are never stalled by
//    dispatch disabling.
//  * Dispatch disabling stalls every task and timer except the owner
//    (dispatch_ctl).
//  * The data queue may block the caller of a failed call (blk_*) or wake a
//    Blocked waiter (wake_*), each in one cycle.
//
// Bus: each object's port is decoded here. Kernel registers are answered in
// the same cycle (all ports in parallel; in a same-cycle write conflict the
// higher port index wins); other regions are passed to the arbiter (memories),
// the two locks and the data queue. Register fields are listed in rtos_pkg.
//
// From the original scheme: the register set (the six TCB members that affect
// stalling), stall generation,
// Ready-to-Running in one cycle, per-task timers decremented by the manager,
// the software-timer flow with end signal, daemon priority and deferral, and
// the dispatch register. This design's choices: the address map, the field
// encodings, tick generation from a cycle counter, irq edge triggering, the
// atomic "delay" field, and the reset pulse after end.
module manager
  import rtos_pkg::*;
#(
  parameter int N_TASK       = 6,
  parameter int N_TMR        = 4,
  parameter int N_ISR        = 1,
  parameter int N            = N_TASK + N_TMR + N_ISR,
  parameter int PRIO_W       = 4,
  parameter int TMR_W        = 16,
  parameter int ID_W         = 8,
  parameter int TICK_CYCLES  = 1000,
  parameter logic [PRIO_W-1:0] DAEMON_PRIO = PRIO_W'(2),
  parameter logic [N_TASK-1:0][PRIO_W-1:0] TASK_PRIO = '{default: PRIO_W'(1)},
  parameter logic [N_TMR-1:0]  TMR_AUTO    = N_TMR'(2'b11),
  parameter logic [TMR_W-1:0]  TMR_PERIOD  = TMR_W'(10),
  // object names, up to 16 characters each, as string values ("LIM_INC");
  // element i is object i
  parameter logic [N-1:0][127:0] OBJ_NAME  = '0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic     [N_ISR-1:0]          irq,
  // object side
  input  bus_req_t [N-1:0]              obj_req,
  output bus_rsp_t [N-1:0]              obj_rsp,
  output logic     [N-1:0]              obj_stall,
  output logic     [N-1:0]              obj_reset,
  input  logic     [N-1:0]              obj_end,
  // to the arbiter (local and global memory)
  output bus_req_t [N-1:0]              mem_req,
  input  bus_rsp_t [N-1:0]              mem_rsp,
  // to the locks and the data queue
  output bus_req_t [N-1:0]              lk0_req,
  input  bus_rsp_t [N-1:0]              lk0_rsp,
  output bus_req_t [N-1:0]              lk1_req,
  input  bus_rsp_t [N-1:0]              lk1_rsp,
  output bus_req_t [N-1:0]              q_req,
  input  bus_rsp_t [N-1:0]              q_rsp,
  input  logic                          q_blk_valid,
  input  logic     [ID_W-1:0]           q_blk_id,
  input  logic     [TMR_W-1:0]          q_blk_timeout,
  input  logic                          q_wake_valid,
  input  logic     [ID_W-1:0]           q_wake_id,
  // status seen by the arbiter, the queue and the outside
  output logic     [N-1:0][PRIO_W-1:0]  prio,
  output logic     [N-1:0]              is_blocked,
  output logic     [N-1:0][1:0]         state_o,
  output logic                          dispatch_dis,
  output logic     [ID_W-1:0]           dispatch_owner,
  output logic     [31:0]               tick_count,
  output logic                          tick,
  output logic                          assert_failed,
  output logic     [ID_W-1:0]           assert_id
);
  localparam int TB = N_TASK;          // first timer index
  localparam int IB = N_TASK + N_TMR;  // first handler index
  localparam int TCW = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;

  task_state_e       state [N];
  logic [PRIO_W-1:0] pri   [N];
  logic [PRIO_W-1:0] bpri  [N];
  logic [TMR_W-1:0]  tmr   [N];
  logic [31:0]       nval  [N];
  logic [7:0]        nst   [N];
  logic [N-1:0]      exec;
  logic [N-1:0]      rst_pulse;
  logic [TMR_W-1:0]  period [N_TMR];
  logic [N_TMR-1:0]  autor;
  logic [31:0]       tid    [N_TMR];
  logic [N_ISR-1:0]  irq_q;
  logic [TCW-1:0]    tick_div;

  function automatic logic is_task(input int i);  return i < TB;              endfunction
  function automatic logic is_tmr(input int i);   return i >= TB && i < IB;   endfunction

  // ---------------------------------------------------------------- tick
  assign tick = (tick_div == TCW'(TICK_CYCLES - 1));

  // ---------------------------------------------------------------- decode
  logic [N-1:0]      kreg;
  logic [N-1:0][5:0] wobj;
  logic [N-1:0][3:0] wfld;
  always_comb begin
    for (int p = 0; p < N; p++) begin
      region_e rg;
      rg      = region_e'(obj_req[p].addr[15:14]);
      kreg[p] = obj_req[p].req && rg == RG_KERNEL;
      wobj[p] = obj_req[p].addr[13:8];
      wfld[p] = obj_req[p].addr[3:0];
      mem_req[p] = obj_req[p];
      mem_req[p].req = obj_req[p].req && (rg == RG_LOCAL || rg == RG_GLOBAL);
      lk0_req[p] = obj_req[p];
      lk0_req[p].req = obj_req[p].req && rg == RG_PERIPH && obj_req[p].addr[13:12] == PER_LOCK0;
      lk1_req[p] = obj_req[p];
      lk1_req[p].req = obj_req[p].req && rg == RG_PERIPH && obj_req[p].addr[13:12] == PER_LOCK1;
      q_req[p] = obj_req[p];
      q_req[p].req = obj_req[p].req && rg == RG_PERIPH && obj_req[p].addr[13:12] == PER_QUEUE;
    end
  end

  // word k of a name: a string value holds its last character in bits [7:0];
  // the words put the first character first, as a C string in memory
  function automatic logic [31:0] name_word(input logic [127:0] s, input int k);
    logic [31:0] w = '0;
    for (int n = 0; n < 16 && s != '0 && s[127:120] == 8'd0; n++) s = s << 8;
    for (int b = 0; b < 4; b++) w[8*b +: 8] = s[127 - 8*(4*k + b) -: 8];
    return w;
  endfunction

  // kernel register read: every object's fields, then a multiplexer per port
  logic [N-1:0][15:0][31:0] ofld;
  always_comb
    for (int i = 0; i < N; i++) begin
      ofld[i] = '0;
      ofld[i][F_STATE]      = 32'(state[i]);
      ofld[i][F_PRIO]       = 32'(pri[i]);
      ofld[i][F_BASE_PRIO]  = 32'(bpri[i]);
      ofld[i][F_TIMER]      = 32'(tmr[i]);
      ofld[i][F_NOTIFY_VAL] = nval[i];
      ofld[i][F_NOTIFY_ST]  = 32'(nst[i]);
      for (int k = 0; k < 4; k++) ofld[i][F_NAME + 4'(k)] = name_word(OBJ_NAME[i], k);
      if (is_tmr(i)) begin
        ofld[i][F_PERIOD]      = 32'(period[i - TB]);
        ofld[i][F_AUTO_RELOAD] = 32'(autor[i - TB]);
        ofld[i][F_TIMER_ID]    = tid[i - TB];
        ofld[i][F_ACTIVE]      = 32'(state[i] == ST_RUNNING);
      end
    end

  function automatic logic [31:0] kread(input logic [5:0] o, input logic [3:0] f);
    logic [31:0] d = '0;
    if (o == GLOBAL_OBJ) begin
      case (f)
        G_DISPATCH: begin d = 32'(dispatch_owner); d[8] = dispatch_dis; end
        G_TICK:     d = tick_count;
        G_NOBJ:     d = 32'(N);
        G_ASSERT:   begin d = 32'(assert_id); d[8] = assert_failed; end
        default:    d = '0;
      endcase
    end else
      for (int i = 0; i < N; i++)
        if (o == 6'(i)) d = ofld[i][f];
    return d;
  endfunction

  always_comb begin
    for (int p = 0; p < N; p++) begin
      region_e rg;
      rg = region_e'(obj_req[p].addr[15:14]);
      obj_rsp[p] = '0;
      if (kreg[p]) begin
        obj_rsp[p].gnt   = 1'b1;
        obj_rsp[p].rdata = kread(obj_req[p].addr[13:8], obj_req[p].addr[3:0]);
      end else if (rg == RG_LOCAL || rg == RG_GLOBAL)
        obj_rsp[p] = mem_rsp[p];
      else if (obj_req[p].addr[13:12] == PER_LOCK0)
        obj_rsp[p] = lk0_rsp[p];
      else if (obj_req[p].addr[13:12] == PER_LOCK1)
        obj_rsp[p] = lk1_rsp[p];
      else if (obj_req[p].addr[13:12] == PER_QUEUE)
        obj_rsp[p] = q_rsp[p];
    end
  end

  // ---------------------------------------------------------------- state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        // all objects are created before the scheduler starts: tasks Ready,
        // timers dormant (Blocked), handlers idle
        state[i] <= is_task(i) ? ST_READY : ST_BLOCKED;
        pri[i]   <= is_task(i) ? TASK_PRIO[i] : (is_tmr(i) ? DAEMON_PRIO : '1);
        bpri[i]  <= is_task(i) ? TASK_PRIO[i] : (is_tmr(i) ? DAEMON_PRIO : '1);
        tmr[i]   <= '0;
        nval[i]  <= '0;
        nst[i]   <= '0;
      end
      for (int j = 0; j < N_TMR; j++) begin
        period[j] <= TMR_PERIOD;
        tid[j]    <= '0;
      end
      autor          <= TMR_AUTO;
      exec           <= '0;
      rst_pulse      <= '1;
      irq_q          <= '0;
      tick_div       <= '0;
      tick_count     <= '0;
      dispatch_dis   <= 1'b0;
      dispatch_owner <= '0;
      assert_failed  <= 1'b0;
      assert_id      <= '0;
    end else begin
      rst_pulse <= '0;
      irq_q     <= irq;
      for (int i = 0; i < TB; i++) exec[i] <= 1'b0;   // tasks have no executing flag
      tick_div  <= tick ? '0 : tick_div + 1'b1;
      if (tick) tick_count <= tick_count + 1;

      // 1. a Ready task runs in the next cycle
      for (int i = 0; i < TB; i++)
        if (state[i] == ST_READY) state[i] <= ST_RUNNING;

      // 2. tick: per-object timers
      if (tick) begin
        for (int i = 0; i < TB; i++)
          if (tmr[i] != '0) begin
            tmr[i] <= tmr[i] - 1'b1;
            if (tmr[i] == TMR_W'(1) && state[i] == ST_BLOCKED) state[i] <= ST_READY;
          end
        for (int i = TB; i < IB; i++)
          if (state[i] == ST_RUNNING && !exec[i]) begin
            if (tmr[i] <= TMR_W'(1)) begin
              tmr[i]  <= '0;
              exec[i] <= 1'b1;
            end else
              tmr[i] <= tmr[i] - 1'b1;
          end
      end

      // 3. end of a timer callback or handler
      for (int i = TB; i < N; i++)
        if (exec[i] && obj_end[i] && !obj_stall[i]) begin
          exec[i]      <= 1'b0;
          rst_pulse[i] <= 1'b1;
          if (is_tmr(i)) begin
            if (autor[i - TB]) tmr[i]   <= period[i - TB];
            else               state[i] <= ST_BLOCKED;
          end
        end

      // 4. interrupt request edge starts the handler
      for (int k = 0; k < N_ISR; k++)
        if (irq[k] && !irq_q[k]) exec[IB + k] <= 1'b1;

      // 5. data queue wake-up and blocking
      for (int i = 0; i < N; i++) begin
        if (q_wake_valid && q_wake_id == ID_W'(i) && state[i] == ST_BLOCKED) begin
          state[i] <= ST_READY;
          tmr[i]   <= '0;
        end
        if (q_blk_valid && q_blk_id == ID_W'(i)) begin
          state[i] <= ST_BLOCKED;
          tmr[i]   <= q_blk_timeout;
        end
      end

      // 6. register writes from the objects, object by object
      for (int p = 0; p < N; p++)
        if (kreg[p] && obj_req[p].we && wobj[p] == GLOBAL_OBJ && wfld[p] == G_DISPATCH) begin
          dispatch_dis   <= obj_req[p].wdata[8];
          dispatch_owner <= obj_req[p].wdata[ID_W-1:0];
        end
      // the first failed assertion is kept (lowest port first in one cycle)
      for (int p = N - 1; p >= 0; p--)
        if (kreg[p] && obj_req[p].we && wobj[p] == GLOBAL_OBJ && wfld[p] == G_ASSERT &&
            obj_req[p].wdata[8] && !assert_failed) begin
          assert_failed <= 1'b1;
          assert_id     <= obj_req[p].wdata[ID_W-1:0];
        end
      for (int i = 0; i < N; i++)
        for (int p = 0; p < N; p++)
          if (kreg[p] && obj_req[p].we && wobj[p] == 6'(i)) begin
            logic [31:0] w;
            w = obj_req[p].wdata;
            case (wfld[p])
              F_STATE:      state[i] <= task_state_e'(w[1:0]);
              F_PRIO:       if (is_task(i)) pri[i]  <= w[PRIO_W-1:0];
              F_BASE_PRIO:  if (is_task(i)) bpri[i] <= w[PRIO_W-1:0];
              F_TIMER:      tmr[i]  <= w[TMR_W-1:0];
              F_NOTIFY_VAL: nval[i] <= w;
              F_NOTIFY_ST:  nst[i]  <= w[7:0];
              F_DELAY: begin
                tmr[i]   <= w[TMR_W-1:0];
                state[i] <= ST_BLOCKED;
              end
              default: ;
            endcase
            if (is_tmr(i))
              case (wfld[p])
                F_PERIOD:      period[i - TB] <= w[TMR_W-1:0];
                F_AUTO_RELOAD: autor[i - TB]  <= w[0];
                F_TIMER_ID:    tid[i - TB]    <= w;
                F_TMR_CMD: begin
                  state[i] <= w[0] ? ST_RUNNING : ST_BLOCKED;
                  tmr[i]   <= w[0] ? period[i - TB] : '0;
                end
                default: ;
              endcase
          end
    end
  end

  // ---------------------------------------------------------------- stall / reset
  logic [N-1:0] stall_raw;
  always_comb
    for (int i = 0; i < N; i++) begin
      stall_raw[i]  = is_task(i) ? (state[i] != ST_RUNNING) : !exec[i];
      prio[i]       = pri[i];
      is_blocked[i] = (state[i] == ST_BLOCKED);
      state_o[i]    = state[i];
    end

  dispatch_ctl #(.N(N), .ID_W(ID_W), .AFFECT({{N_ISR{1'b0}}, {IB{1'b1}}})) u_dispatch (
    .stall_in (stall_raw),
    .dis      (dispatch_dis),
    .owner    (dispatch_owner),
    .stall_out(obj_stall)
  );

  assign obj_reset = rst_pulse;
endmodule
