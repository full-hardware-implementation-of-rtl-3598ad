// tb_svc_engine: drives one service-call engine (object 1) through every call
// it offers. The test bench answers the bus itself: kernel registers from a
// small array, a lock that can be held busy for some cycles, a data queue
// whose answer is chosen per test. Every completed transfer is logged and
// compared with the access sequence expected for the call; the return value
// and the number of cycles from command to done are checked, the latter
// against the cycle counts of the high-level-synthesized service hardware
// (xTaskResume 20, vTaskSuspend 11, vTaskDelay 9, vTaskSuspendAll 15,
// xTaskResumeAll 16, vTaskPrioritySet 20, xTimerStart 14, xTimerStop 15,
// xTimerReset 15, xQueueSend 43, xQueueReceive 46) as upper bounds. Also
// checked: no bus request while stalled, lock retry, blocked queue call retried
// after the stall is lifted, name reads, and a failed assertion that records
// the caller and halts the engine until it is restarted.
module tb_svc_engine;
  import rtos_pkg::*;
  localparam int SELF = 1;
  logic clk = 0, rst_n = 0, srst = 0, stall, qblk = 0, unblock = 0;
  assign stall = qblk;
  svc_cmd_t cmd;
  svc_rsp_t rsp;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  logic [31:0] kreg [64][16];
  int lock_busy = 0;
  logic [31:0] q_answer, q_answer2;
  int q_calls = 0;
  bus_req_t log_q[$];
  int checks = 0, failures = 0, lock_retries = 0;

  svc_engine #(.SELF(SELF), .ID_W(8)) dut (.*);
  always #5 clk = ~clk;

  // bus responder
  always_comb begin
    bus_rsp.gnt = bus_req.req;
    bus_rsp.rdata = '0;
    if (bus_req.addr[15:14] == RG_KERNEL)
      bus_rsp.rdata = kreg[bus_req.addr[13:8]][bus_req.addr[3:0]];
    else if (bus_req.addr[15:14] == RG_PERIPH && bus_req.addr[13:12] != PER_QUEUE)
      bus_rsp.rdata = (lock_busy > 0) ? 32'd0 : 32'd1;
    else if (bus_req.addr[15:14] == RG_PERIPH)
      bus_rsp.rdata = (q_calls == 0) ? q_answer : q_answer2;
    else
      bus_rsp.rdata = 32'hC0DE_0000 | 32'(bus_req.addr);
  end

  always_ff @(posedge clk) begin
    if (bus_req.req && bus_rsp.gnt) begin
      log_q.push_back(bus_req);
      if (bus_req.addr[15:14] == RG_KERNEL && bus_req.we)
        kreg[bus_req.addr[13:8]][bus_req.addr[3:0]] <= bus_req.wdata;
      if (bus_req.addr[15:14] == RG_PERIPH && bus_req.addr[13:12] == PER_QUEUE) begin
        q_calls <= q_calls + 1;
        if (bus_rsp.rdata[QB_BLOCKED]) qblk <= 1'b1;  // the kernel blocks the caller
      end
      if (bus_req.addr[15:14] == RG_PERIPH && bus_req.addr[13:12] != PER_QUEUE && !bus_req.we && lock_busy > 0)
        lock_retries <= lock_retries + 1;
    end
    if (lock_busy > 0) lock_busy <= lock_busy - 1;
    if (unblock) qblk <= 1'b0;
    if (rst_n) begin
      checks++;
      if (stall && bus_req.req) begin failures++; $display("FAIL request while stalled"); end
    end
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bus_req_t W(input logic [15:0] a, input logic [31:0] d);
    return '{req: 1'b1, we: 1'b1, addr: a, wdata: d};
  endfunction
  function automatic bus_req_t R(input logic [15:0] a);
    return '{req: 1'b1, we: 1'b0, addr: a, wdata: '0};
  endfunction

  localparam logic [15:0] L0 = {RG_PERIPH, PER_LOCK0, 12'd0};
  localparam logic [15:0] L1 = {RG_PERIPH, PER_LOCK1, 12'd0};

  // issue a call, wait for done, compare log and cycles
  task automatic call(input svc_op_e op, input logic [15:0] arg, input logic [31:0] val,
                      input bus_req_t exp[$], input int max_cyc, output logic [31:0] res,
                      input string name);
    int cyc;
    log_q.delete();
    @(negedge clk);
    while (!rsp.ready) @(negedge clk);
    cmd = '{valid: 1'b1, op: op, arg: arg, val: val};
    @(posedge clk); #1;
    cmd.valid = 1'b0;
    cyc = 1;
    while (!rsp.done) begin @(posedge clk); #1; cyc++; end
    res = rsp.result;
    // extra try-acquire reads of a busy lock are not part of the sequence
    while (log_q.size() > 1 && exp.size() > 1 && !log_q[0].we && log_q[0].addr[15:14] == RG_PERIPH &&
           log_q[1] == log_q[0] && !(exp[1] == exp[0])) void'(log_q.pop_front());
    @(posedge clk); #1;
    chk(cyc <= max_cyc, {name, " cycles"});
    $display("%-20s %0d cycles (bound %0d)", name, cyc, max_cyc);
    chk(log_q.size() == exp.size(), {name, " number of accesses"});
    for (int i = 0; i < exp.size() && i < log_q.size(); i++)
      chk(log_q[i].we == exp[i].we && log_q[i].addr == exp[i].addr &&
          (!exp[i].we || log_q[i].wdata == exp[i].wdata), {name, " access"});
  endtask

  initial begin
    logic [31:0] r;
    bus_req_t e[$];
    cmd = '0;
    for (int o = 0; o < 64; o++) for (int f = 0; f < 16; f++) kreg[o][f] = '0;
    kreg[3][F_STATE] = 32'(ST_SUSPENDED);
    kreg[4][F_STATE] = 32'(ST_RUNNING);
    kreg[5][F_STATE] = 32'(ST_BLOCKED);
    kreg[2][F_PRIO]  = 32'd5;
    kreg[7][F_TIMER_ID] = 32'h1234;
    kreg[7][F_ACTIVE] = 32'd1;
    repeat (2) @(posedge clk);
    rst_n = 1;

    e = '{R(kaddr(3, F_STATE)), R(L0), R(kaddr(3, F_STATE)), W(kaddr(3, F_STATE), ST_READY), W(L0, 0)};
    call(SVC_TASK_RESUME, 16'd3, 0, e, 20, r, "xTaskResume");
    chk(kreg[3][F_STATE] == ST_READY, "resume wrote Ready");
    e = '{R(kaddr(4, F_STATE))};
    call(SVC_TASK_RESUME, 16'd4, 0, e, 20, r, "xTaskResume(running)");
    e = '{R(kaddr(5, F_STATE)), R(L0), R(kaddr(5, F_STATE)), W(L0, 0)};
    call(SVC_TASK_RESUME, 16'd5, 0, e, 20, r, "xTaskResume(blocked)");
    chk(kreg[5][F_STATE] == ST_BLOCKED, "resume leaves a Blocked task alone");
    e = '{R(L0), W(kaddr(3, F_STATE), ST_SUSPENDED), W(L0, 0)};
    call(SVC_TASK_SUSPEND, 16'd3, 0, e, 11, r, "vTaskSuspend");
    // lock held by someone else for 4 cycles
    lock_busy = 4;
    e = '{R(L0), W(kaddr(2, F_PRIO), 7), W(kaddr(2, F_BASE_PRIO), 7), W(L0, 0)};
    call(SVC_PRIO_SET, 16'd2, 7, e, 30, r, "vTaskPrioritySet(busy)");
    chk(lock_retries >= 3, "lock retried");
    e = '{R(L0), W(kaddr(2, F_PRIO), 6), W(kaddr(2, F_BASE_PRIO), 6), W(L0, 0)};
    call(SVC_PRIO_SET, 16'd2, 6, e, 20, r, "vTaskPrioritySet");
    e = '{R(kaddr(2, F_PRIO))};
    call(SVC_PRIO_GET, 16'd2, 0, e, 20, r, "uxTaskPriorityGet"); chk(r == 6, "prio get value");
    e = '{R(kaddr(3, F_STATE))};
    call(SVC_GET_STATE, 16'd3, 0, e, 20, r, "eTaskGetState"); chk(r == ST_SUSPENDED, "state value");
    e = '{W(kaddr(SELF, F_DELAY), 9)};
    call(SVC_TASK_DELAY, 0, 9, e, 9, r, "vTaskDelay");
    e = '{};
    call(SVC_TASK_DELAY, 0, 0, e, 9, r, "vTaskDelay(0)");
    // suspend-all nests with critical sections
    e = '{R(L0), W(kaddr(GLOBAL_OBJ, G_DISPATCH), 32'h100 | SELF), W(L0, 0)};
    call(SVC_SUSPEND_ALL, 0, 0, e, 15, r, "vTaskSuspendAll");
    e = '{};
    call(SVC_ENTER_CRITICAL, 0, 0, e, 15, r, "ENTER_CRITICAL(nested)");
    call(SVC_EXIT_CRITICAL, 0, 0, e, 16, r, "EXIT_CRITICAL(nested)");
    e = '{R(L0), W(kaddr(GLOBAL_OBJ, G_DISPATCH), 0), W(L0, 0)};
    call(SVC_RESUME_ALL, 0, 0, e, 16, r, "xTaskResumeAll");
    // timers use lock1
    e = '{R(L1), W(kaddr(7, F_TMR_CMD), 1), W(L1, 0)};
    call(SVC_TIMER_START, 16'd7, 0, e, 14, r, "xTimerStart");
    call(SVC_TIMER_RESET, 16'd7, 0, e, 15, r, "xTimerReset");
    e = '{R(L1), W(kaddr(7, F_TMR_CMD), 0), W(L1, 0)};
    call(SVC_TIMER_STOP, 16'd7, 0, e, 15, r, "xTimerStop");
    e = '{R(L1), W(kaddr(7, F_PERIOD), 33), W(kaddr(7, F_TMR_CMD), 1), W(L1, 0)};
    call(SVC_TIMER_CHPERIOD, 16'd7, 33, e, 20, r, "xTimerChangePeriod");
    e = '{R(kaddr(7, F_ACTIVE))};
    call(SVC_TIMER_ACTIVE, 16'd7, 0, e, 20, r, "xTimerIsTimerActive"); chk(r == 1, "active value");
    e = '{R(L1), W(kaddr(7, F_TIMER_ID), 32'h55), W(L1, 0)};
    call(SVC_TIMER_SET_ID, 16'd7, 32'h55, e, 20, r, "vTimerSetTimerID");
    e = '{R(kaddr(7, F_TIMER_ID))};
    call(SVC_TIMER_GET_ID, 16'd7, 0, e, 20, r, "pvTimerGetTimerID"); chk(r == 32'h55, "timer id");
    // memory
    e = '{W({RG_GLOBAL, 14'd9}, 32'hBEEF)};
    call(SVC_MEM_WRITE, {RG_GLOBAL, 14'd9}, 32'hBEEF, e, 5, r, "store");
    e = '{R({RG_LOCAL, 14'd4})};
    call(SVC_MEM_READ, {RG_LOCAL, 14'd4}, 0, e, 5, r, "load"); chk(r == 32'hC0DE_0004, "load value");
    // queue send succeeds at once (timeout 5 ticks)
    q_calls = 0; q_answer = 32'h100;
    e = '{W(paddr(PER_QUEUE, Q_SEND), {1'b1, 7'd0, 16'd5, 8'h3C})};
    call(SVC_QUEUE_SEND, 0, {8'd0, 16'd5, 8'h3C}, e, 43, r, "xQueueSend");
    chk(r[QB_OK] == 1, "send ok");
    // non-blocking receive on empty queue
    q_calls = 0; q_answer = 32'h0;
    e = '{W(paddr(PER_QUEUE, Q_RECV), 0)};
    call(SVC_QUEUE_RECV, 0, 0, e, 46, r, "xQueueReceive(0)");
    chk(r[QB_OK] == 0, "receive fails");
    // blocking receive: blocked, stalled for a while, then retried
    q_calls = 0; q_answer = 32'h200; q_answer2 = 32'h1A5;
    fork
      begin
        e = '{W(paddr(PER_QUEUE, Q_RECV), {1'b1, 7'd0, 16'd0, 8'd0}),
              W(paddr(PER_QUEUE, Q_RECV), 0)};
        call(SVC_QUEUE_RECV, 0, 32'h8000_0000, e, 100, r, "xQueueReceive(block)");
        chk(log_q.size() == 2, "one retry after wake");
        chk(r[QB_OK] == 1 && r[7:0] == 8'hA5, "blocked receive gets data");
      end
      begin
        wait (qblk);
        repeat (20) @(posedge clk);
        #1 unblock = 1;
        @(posedge clk); #1 unblock = 0;
      end
    join
    // names: one read of the chosen word
    kreg[3][4'd13] = 32'h3241_4D45;
    kreg[7][4'd12] = 32'h5F52_4D54;
    e = '{R(kaddr(3, 4'd13))};
    call(SVC_TASK_NAME, 16'd3, 1, e, 5, r, "pcTaskGetName"); chk(r == 32'h3241_4D45, "task name word");
    e = '{R(kaddr(7, 4'd12))};
    call(SVC_TIMER_NAME, 16'd7, 0, e, 5, r, "pcTimerGetName"); chk(r == 32'h5F52_4D54, "timer name word");
    // configASSERT: a true condition does nothing, a false one records and halts
    e = '{};
    call(SVC_ASSERT, 0, 1, e, 3, r, "configASSERT(1)");
    log_q.delete();
    @(negedge clk);
    cmd = '{valid: 1'b1, op: SVC_ASSERT, arg: 16'd0, val: 32'd0};
    @(posedge clk); #1;
    cmd.valid = 1'b0;
    begin
      int dones = 0;
      repeat (20) begin @(posedge clk); #1; if (rsp.done) dones++; end
      chk(dones == 0, "failed assertion never completes");
    end
    chk(rsp.ready == 0, "halted engine takes no call");
    chk(log_q.size() == 1 && log_q[0].we && log_q[0].addr == kaddr(GLOBAL_OBJ, G_ASSERT) &&
        log_q[0].wdata == (32'h100 | SELF), "assertion recorded with caller id");
    // synchronous restart
    @(negedge clk); srst = 1; @(negedge clk); srst = 0;
    chk(rsp.ready == 1, "ready after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
