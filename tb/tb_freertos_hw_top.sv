// tb_freertos_hw_top: end-to-end run of the whole system at its default
// parameters (6 tasks, 4 software timers, 1 interrupt handler, 1000-cycle
// tick). The test bench plays the application side of each object, in the
// roles of a reduced FreeRTOS demonstration system; every body only issues
// service calls and obeys its stall signal:
//   0 LIM_INC     increments G[1] once, then suspends itself (forever)
//   1 CNT_INC     increments G[0] continuously
//   2 C_CTRL      suspends/resumes CNT_INC and checks that it really stopped,
//                 disables dispatch and checks the same, resumes LIM_INC three
//                 times, changes CNT_INC's priority
//   3 TMR_TST     starts, stops, resets and re-periods the software timers and
//                 checks how often their callbacks ran
//   4 SUSP_SEND   disables dispatch around a shared write, sends 0..11 to the queue
//   5 SUSP_RECV   waits first so the queue fills, then receives and checks
//                 0..11 in order, then sees a receive time out
//   6 AR_TMR1, 7 AR_TMR2 (auto-reload), 8 OS_TMR1, 9 ISR_OS_TMR1 (one-shot):
//                 callbacks that count their runs in G[16+j]
//   10 ISR_OS     interrupt handler that starts ISR_OS_TMR1
// Mechanisms counted (each must occur): task suspension, dispatch disabling,
// deferral of an expired timer callback, delay wake-up, auto-reload and
// one-shot expiry, interrupt start, queue full block, queue empty block, queue
// wake-up, queue timeout, lock contention, global-memory arbitration conflict,
// and at the end a failed assertion that halts CNT_INC. Names are read back.
// Latencies checked: interrupt to handler start 1 cycle; xTaskResume at most
// 20 cycles, xQueueSend 43 and xQueueReceive 46 when uncontended.
module tb_freertos_hw_top;
  import rtos_pkg::*;
  localparam int N = 11;
  localparam int TICK = 1000;
  logic clk = 0, rst_n = 0;
  logic [0:0] irq = '0;
  svc_cmd_t [N-1:0] svc_cmd;
  svc_rsp_t [N-1:0] svc_rsp;
  logic [N-1:0] obj_stall, obj_reset, obj_end;
  logic [N-1:0][1:0] obj_state;
  logic dispatch_dis;
  logic [7:0] dispatch_owner;
  logic [31:0] tick_count;
  logic [3:0] queue_count;
  logic assert_failed;
  logic [7:0] assert_id;
  int checks = 0, failures = 0;
  logic stop_cnt = 0;
  int tasks_done = 0;

  freertos_hw_top dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at tick %0d", what, tick_count); end
  endtask

  function automatic logic [15:0] G(input int k);
    return {RG_GLOBAL, 14'(k)};
  endfunction

  // one service call from object i; returns result and cycles to done
  task automatic svc(input int i, input svc_op_e op, input logic [15:0] arg,
                     input logic [31:0] val, output logic [31:0] res, output int cyc);
    @(negedge clk);
    while (!svc_rsp[i].ready) @(negedge clk);
    svc_cmd[i] = '{valid: 1'b1, op: op, arg: arg, val: val};
    @(posedge clk); #1;
    svc_cmd[i].valid = 1'b0;
    cyc = 1;
    while (!svc_rsp[i].done) begin @(posedge clk); #1; cyc++; end
    res = svc_rsp[i].result;
  endtask

  // plain computation time of a task body: n cycles in which it is not stalled
  task automatic work(input int i, input int n);
    for (int k = 0; k < n; k++) begin
      @(posedge clk);
      while (obj_stall[i]) @(posedge clk);
    end
  endtask

  // -------------------------------------------------------------- mechanism counters
  int n_susp = 0, n_disp = 0, n_defer = 0, n_ar = 0, n_os = 0, n_irq = 0;
  int n_qfull = 0, n_qempty = 0, n_wake = 0, n_tmo = 0, n_lock = 0, n_gconf = 0, n_delay = 0;
  int max_resume = 0, min_send = 1000, min_recv = 1000;
  always @(posedge clk) if (rst_n) begin
    int g;
    for (int i = 0; i < 6; i++) if (obj_state[i] == ST_SUSPENDED) n_susp++;
    if (dispatch_dis) n_disp++;
    for (int i = 6; i < 10; i++) if (dut.u_manager.exec[i] && obj_stall[i]) n_defer++;
    for (int i = 6; i < 10; i++) if (obj_end[i] && !obj_stall[i]) begin
      if (i < 8) n_ar++; else n_os++;
    end
    if (dut.u_queue.blk_valid && dut.u_queue.is_send) n_qfull++;
    if (dut.u_queue.blk_valid && dut.u_queue.is_recv) n_qempty++;
    if (dut.u_queue.wake_valid) n_wake++;
    for (int i = 0; i < N; i++)
      if (dut.lk0_req[i].req && !dut.lk0_req[i].we && dut.lk0_rsp[i].rdata == 0) n_lock++;
    g = 0;
    for (int i = 0; i < N; i++) if (dut.mem_req[i].req && dut.mem_req[i].addr[15:14] == RG_GLOBAL) g++;
    if (g > 1) n_gconf++;
  end

  // -------------------------------------------------------------- object bodies
  // 0 LIM_INC
  initial begin
    logic [31:0] r; int c;
    @(posedge rst_n);
    forever begin
      svc(0, SVC_MEM_READ, G(1), 0, r, c);
      svc(0, SVC_MEM_WRITE, G(1), r + 1, r, c);
      svc(0, SVC_TASK_SUSPEND, 16'd0, 0, r, c);
    end
  end

  // 1 CNT_INC
  initial begin
    logic [31:0] r; int c;
    @(posedge rst_n);
    while (!stop_cnt) begin
      svc(1, SVC_MEM_READ, G(0), 0, r, c);
      svc(1, SVC_MEM_WRITE, G(0), r + 1, r, c);
    end
  end

  // 2 C_CTRL
  initial begin
    logic [31:0] r, a, b; int c, t0;
    @(posedge rst_n);
    svc(2, SVC_PRIO_SET, 16'd2, 2, r, c);        // meets SUSP_SEND at lock0
    svc(2, SVC_TASK_DELAY, 0, 1, r, c);
    // suspension
    svc(2, SVC_TASK_SUSPEND, 16'd1, 0, r, c);
    svc(2, SVC_MEM_READ, G(0), 0, a, c);
    t0 = tick_count;
    svc(2, SVC_TASK_DELAY, 0, 2, r, c);
    if (tick_count - t0 == 2) n_delay++;
    svc(2, SVC_MEM_READ, G(0), 0, b, c);
    chk(a == b && a > 0, "suspended CNT_INC did not count");
    svc(2, SVC_TASK_RESUME, 16'd1, 0, r, c);
    if (c > max_resume) max_resume = c;
    svc(2, SVC_TASK_DELAY, 0, 1, r, c);
    svc(2, SVC_MEM_READ, G(0), 0, a, c);
    chk(a > b, "resumed CNT_INC counts again");
    // dispatch disabling
    svc(2, SVC_SUSPEND_ALL, 0, 0, r, c);
    svc(2, SVC_MEM_READ, G(0), 0, a, c);
    work(2, 300);
    svc(2, SVC_MEM_READ, G(0), 0, b, c);
    chk(a == b, "dispatch disabled: CNT_INC stalled");
    svc(2, SVC_RESUME_ALL, 0, 0, r, c);
    // limited increment task
    for (int k = 0; k < 3; k++) begin
      svc(2, SVC_GET_STATE, 16'd0, 0, r, c);
      chk(r == ST_SUSPENDED, "LIM_INC suspended itself");
      svc(2, SVC_MEM_READ, G(1), 0, a, c);
      svc(2, SVC_TASK_RESUME, 16'd0, 0, r, c);
      if (c > max_resume) max_resume = c;
      svc(2, SVC_TASK_DELAY, 0, 1, r, c);
      svc(2, SVC_MEM_READ, G(1), 0, b, c);
      chk(b == a + 1, "LIM_INC incremented once per resume");
    end
    // priority change
    svc(2, SVC_PRIO_SET, 16'd1, 3, r, c);
    svc(2, SVC_PRIO_GET, 16'd1, 0, r, c);
    chk(r == 3, "priority set/get");
    tasks_done++;
  end

  // 3 TMR_TST
  initial begin
    logic [31:0] r, c6, c7, c8, x; int c;
    @(posedge rst_n);
    svc(3, SVC_TIMER_CHPERIOD, 16'd6, 3, r, c);   // AR_TMR1: period 3 ticks
    svc(3, SVC_TIMER_START, 16'd7, 0, r, c);      // AR_TMR2: default period 10
    svc(3, SVC_TIMER_START, 16'd8, 0, r, c);      // OS_TMR1: one-shot, 10
    // disable dispatch long enough for AR_TMR1 to expire: its callback waits
    svc(3, SVC_SUSPEND_ALL, 0, 0, r, c);
    work(3, 5 * TICK);
    svc(3, SVC_RESUME_ALL, 0, 0, r, c);
    svc(3, SVC_TASK_DELAY, 0, 30, r, c);
    svc(3, SVC_MEM_READ, G(16), 0, c6, c);
    svc(3, SVC_MEM_READ, G(17), 0, c7, c);
    svc(3, SVC_MEM_READ, G(18), 0, c8, c);
    $display("timer runs after 35 ticks: AR_TMR1 %0d AR_TMR2 %0d OS_TMR1 %0d", c6, c7, c8);
    chk(c6 >= 9 && c6 <= 12, "AR_TMR1 run count");
    chk(c7 >= 3 && c7 <= 4, "AR_TMR2 run count");
    chk(c8 == 1, "OS_TMR1 ran once");
    svc(3, SVC_TIMER_ACTIVE, 16'd6, 0, r, c);  chk(r == 1, "AR_TMR1 active");
    svc(3, SVC_TIMER_STOP, 16'd6, 0, r, c);
    svc(3, SVC_TIMER_ACTIVE, 16'd6, 0, r, c);  chk(r == 0, "AR_TMR1 stopped");
    svc(3, SVC_TIMER_ACTIVE, 16'd8, 0, r, c);  chk(r == 0, "OS_TMR1 dormant");
    svc(3, SVC_TASK_DELAY, 0, 1, r, c);
    svc(3, SVC_MEM_READ, G(16), 0, c6, c);
    svc(3, SVC_TIMER_RESET, 16'd8, 0, r, c);
    svc(3, SVC_TASK_DELAY, 0, 12, r, c);
    svc(3, SVC_MEM_READ, G(16), 0, x, c);     chk(x == c6, "stopped timer stays still");
    svc(3, SVC_MEM_READ, G(18), 0, x, c);     chk(x == 2, "reset one-shot ran again");
    svc(3, SVC_TIMER_SET_ID, 16'd7, 32'h77, r, c);
    svc(3, SVC_TIMER_GET_ID, 16'd7, 0, r, c); chk(r == 32'h77, "timer id");
    svc(3, SVC_TIMER_STOP, 16'd7, 0, r, c);
    svc(3, SVC_TASK_NAME, 16'd0, 0, r, c);    chk(r == 32'h5F4D_494C, "task name LIM_");
    svc(3, SVC_TASK_NAME, 16'd0, 1, r, c);    chk(r == 32'h0043_4E49, "task name INC");
    svc(3, SVC_TIMER_NAME, 16'd8, 1, r, c);   chk(r == 32'h0031_524D, "timer name MR1");
    svc(3, SVC_ASSERT, 0, 1, r, c);           chk(!assert_failed, "true assertion passes");
    tasks_done++;
  end

  // 4 SUSP_SEND
  initial begin
    logic [31:0] r; int c;
    @(posedge rst_n);
    for (int k = 0; k < 12; k++) begin
      svc(4, SVC_SUSPEND_ALL, 0, 0, r, c);
      svc(4, SVC_MEM_WRITE, G(8), k, r, c);
      svc(4, SVC_RESUME_ALL, 0, 0, r, c);
      svc(4, SVC_QUEUE_SEND, 0, 32'h8000_0000 | 32'(k), r, c);
      chk(r[QB_OK] == 1, "send succeeded");
      if (c < min_send) min_send = c;
    end
    tasks_done++;
  end

  // 5 SUSP_RECV
  initial begin
    logic [31:0] r; int c, t0;
    @(posedge rst_n);
    svc(5, SVC_TASK_DELAY, 0, 10, r, c);
    chk(queue_count == 8, "queue filled while receiver waited");
    for (int k = 0; k < 12; k++) begin
      svc(5, SVC_QUEUE_RECV, 0, 32'(100) << 8, r, c);
      chk(r[QB_OK] == 1 && r[7:0] == 8'(k), "received in order");
      if (c < min_recv) min_recv = c;
      if (k == 9) work(5, 200);   // let the sender get ahead again
    end
    t0 = tick_count;
    svc(5, SVC_QUEUE_RECV, 0, 32'(3) << 8, r, c);
    chk(r[QB_OK] == 0, "receive times out");
    if (r[QB_OK] == 0 && tick_count - t0 >= 3) n_tmo++;
    tasks_done++;
  end

  // 6..9 timer callbacks: count own runs in G[16+j]
  for (genvar j = 0; j < 4; j++) begin : g_cb
    initial begin
      logic [31:0] r; int c;
      obj_end[6 + j] = 1'b0;
      @(posedge rst_n);
      forever begin
        @(negedge clk);
        while (obj_stall[6 + j]) @(negedge clk);
        svc(6 + j, SVC_MEM_READ, G(16 + j), 0, r, c);
        svc(6 + j, SVC_MEM_WRITE, G(16 + j), r + 1, r, c);
        @(negedge clk);
        while (obj_stall[6 + j]) @(negedge clk);
        obj_end[6 + j] = 1'b1;
        @(posedge clk); #1;
        obj_end[6 + j] = 1'b0;
      end
    end
  end

  // 10 ISR_OS
  initial begin
    logic [31:0] r; int c;
    obj_end[10] = 1'b0;
    for (int i = 0; i < 6; i++) obj_end[i] = 1'b0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      while (obj_stall[10]) @(negedge clk);
      svc(10, SVC_TIMER_START, 16'd9, 0, r, c);
      obj_end[10] = 1'b1;
      @(posedge clk); #1;
      obj_end[10] = 1'b0;
    end
  end

  // -------------------------------------------------------------- main
  initial begin
    logic [31:0] r; int c;
    svc_cmd = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // interrupts at ticks 5 and 25
    for (int k = 0; k < 2; k++) begin
      while (tick_count < 32'(5 + 20 * k)) @(posedge clk);
      @(negedge clk) irq = 1'b1;
      @(posedge clk); #1;
      chk(obj_stall[10] == 1'b0, "handler runs one cycle after irq");
      n_irq++;
      @(negedge clk) irq = 1'b0;
    end
    wait (tasks_done == 4);
    stop_cnt = 1;
    repeat (20) @(posedge clk);
    // ISR_OS_TMR1 ran once per interrupt
    chk(dut.u_gmem.mem[19] == 2, "ISR-started one-shot timer ran twice");
    chk(max_resume > 0 && max_resume <= 20, "xTaskResume within 20 cycles");
    chk(min_send <= 43, "xQueueSend within 43 cycles");
    chk(min_recv <= 46, "xQueueReceive within 46 cycles");
    // configASSERT(0) in CNT_INC: recorded, and CNT_INC's service hardware halts
    begin
      int w = 0;
      while (!svc_rsp[1].ready && w < 100) begin @(negedge clk); w++; end
      @(negedge clk);
      svc_cmd[1] = '{valid: 1'b1, op: SVC_ASSERT, arg: 16'd0, val: 32'd0};
      @(posedge clk); #1;
      svc_cmd[1].valid = 1'b0;
      repeat (10) @(posedge clk); #1;
      chk(assert_failed && assert_id == 8'd1 && !svc_rsp[1].ready, "failed assertion halts CNT_INC");
    end
    $display("resume max %0d cycles, send min %0d, receive min %0d", max_resume, min_send, min_recv);
    $display("mechanisms: suspend %0d dispatch %0d defer %0d delay %0d autoreload %0d oneshot %0d irq %0d",
             n_susp, n_disp, n_defer, n_delay, n_ar, n_os, n_irq);
    $display("            qfull %0d qempty %0d wake %0d timeout %0d lock-busy %0d gmem-conflict %0d",
             n_qfull, n_qempty, n_wake, n_tmo, n_lock, n_gconf);
    chk(n_susp > 0, "suspension happened");
    chk(n_disp > 0, "dispatch disabling happened");
    chk(n_defer > 0, "timer deferral happened");
    chk(n_delay > 0, "delay wake-up happened");
    chk(n_ar > 0, "auto-reload expiry happened");
    chk(n_os > 0, "one-shot expiry happened");
    chk(n_irq > 0, "interrupt happened");
    chk(n_qfull > 0, "queue-full block happened");
    chk(n_qempty > 0, "queue-empty block happened");
    chk(n_wake > 0, "queue wake-up happened");
    chk(n_tmo > 0, "queue timeout happened");
    chk(n_lock > 0, "lock contention happened");
    chk(n_gconf > 0, "memory arbitration conflict happened");
    chk(assert_failed, "assertion failure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400 * TICK) @(posedge clk);
    failures++;
    $display("watchdog: tasks done %0d", tasks_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
