// freertos_hw_top: a FreeRTOS-based real-time system built entirely in
// hardware, with every task, software timer and interrupt handler a module of
// its own that runs in parallel with the others.
//
// Inside: the manager (kernel registers, tick timers, stall/reset generation,
// dispatch disabling), the memory arbiter, the two hardware locks lock0 and
// lock1, the data queue, one local memory bank per object plus the global
// bank, and one service-call engine per object. The behaviour of the objects
// themselves (the application's task bodies, timer callbacks and interrupt
// handler) is application code; its connection points are brought out as
// ports: each object issues service calls on svc_cmd[i] and receives svc_rsp[i],
// obeys obj_stall[i] (freeze while 1) and obj_reset[i] (restart), and a timer
// callback or handler raises obj_end[i] for one cycle when it has finished.
//
// Object numbering: 0..N_TASK-1 tasks, then N_TMR software timers, then N_ISR
// interrupt handlers. The default counts and names follow the original
// demonstration system (six tasks, four software timers, one handler);
// priorities, tick length and memory and queue sizes are this design's choices.
module freertos_hw_top
  import rtos_pkg::*;
#(
  parameter int N_TASK      = 6,
  parameter int N_TMR       = 4,
  parameter int N_ISR       = 1,
  parameter int N           = N_TASK + N_TMR + N_ISR,
  parameter int PRIO_W      = 4,
  parameter int TMR_W       = 16,
  parameter int ID_W        = 8,
  parameter int TICK_CYCLES = 1000,
  parameter int LM_WORDS    = 256,
  parameter int GM_WORDS    = 1024,
  parameter int QLEN        = 8,
  parameter logic [PRIO_W-1:0] DAEMON_PRIO = PRIO_W'(2),
  parameter logic [N_TASK-1:0][PRIO_W-1:0] TASK_PRIO = '{default: PRIO_W'(1)},
  parameter logic [N_TMR-1:0]  TMR_AUTO   = N_TMR'(2'b11),
  parameter logic [TMR_W-1:0]  TMR_PERIOD = TMR_W'(10),
  // object names (element i is object i): those of the demonstration system
  parameter logic [N-1:0][127:0] OBJ_NAME = {
    128'("ISR_OS"), 128'("ISR_OS_TMR1"), 128'("OS_TMR1"), 128'("AR_TMR2"), 128'("AR_TMR1"),
    128'("SUSP_RECV"), 128'("SUSP_SEND"), 128'("TMR_TST"), 128'("C_CTRL"), 128'("CNT_INC"),
    128'("LIM_INC")}
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic     [N_ISR-1:0]         irq,
  input  svc_cmd_t [N-1:0]             svc_cmd,
  output svc_rsp_t [N-1:0]             svc_rsp,
  output logic     [N-1:0]             obj_stall,
  output logic     [N-1:0]             obj_reset,
  input  logic     [N-1:0]             obj_end,
  output logic     [N-1:0][1:0]        obj_state,
  output logic                         dispatch_dis,
  output logic     [ID_W-1:0]          dispatch_owner,
  output logic     [31:0]              tick_count,
  output logic     [$clog2(QLEN+1)-1:0] queue_count,
  output logic                         assert_failed,
  output logic     [ID_W-1:0]          assert_id
);
  localparam int LM_AW = $clog2(LM_WORDS);
  localparam int GM_AW = $clog2(GM_WORDS);

  bus_req_t [N-1:0] obj_req, mem_req, lk0_req, lk1_req, q_req;
  bus_rsp_t [N-1:0] obj_rsp, mem_rsp, lk0_rsp, lk1_rsp, q_rsp;
  logic     [N-1:0][PRIO_W-1:0] prio;
  logic     [N-1:0] is_blocked;
  logic             q_blk_valid, q_wake_valid;
  logic [ID_W-1:0]  q_blk_id, q_wake_id;
  logic [TMR_W-1:0] q_blk_timeout;
  logic             tick;

  // service-call hardware of each object
  for (genvar i = 0; i < N; i++) begin : g_obj
    svc_engine #(.SELF(i), .ID_W(ID_W)) u_svc (
      .clk, .rst_n,
      .srst   (obj_reset[i]),
      .stall  (obj_stall[i]),
      .cmd    (svc_cmd[i]),
      .rsp    (svc_rsp[i]),
      .bus_req(obj_req[i]),
      .bus_rsp(obj_rsp[i])
    );
  end

  manager #(
    .N_TASK(N_TASK), .N_TMR(N_TMR), .N_ISR(N_ISR), .PRIO_W(PRIO_W), .TMR_W(TMR_W),
    .ID_W(ID_W), .TICK_CYCLES(TICK_CYCLES), .DAEMON_PRIO(DAEMON_PRIO),
    .TASK_PRIO(TASK_PRIO), .TMR_AUTO(TMR_AUTO), .TMR_PERIOD(TMR_PERIOD),
    .OBJ_NAME(OBJ_NAME)
  ) u_manager (
    .clk, .rst_n, .irq,
    .obj_req, .obj_rsp, .obj_stall, .obj_reset, .obj_end,
    .mem_req, .mem_rsp, .lk0_req, .lk0_rsp, .lk1_req, .lk1_rsp, .q_req, .q_rsp,
    .q_blk_valid, .q_blk_id, .q_blk_timeout, .q_wake_valid, .q_wake_id,
    .prio, .is_blocked, .state_o(obj_state), .dispatch_dis, .dispatch_owner,
    .tick_count, .tick, .assert_failed, .assert_id
  );

  hw_lock #(.N(N), .ID_W(ID_W)) u_lock0 (
    .clk, .rst_n, .req(lk0_req), .rsp(lk0_rsp), .locked(), .owner()
  );
  hw_lock #(.N(N), .ID_W(ID_W)) u_lock1 (
    .clk, .rst_n, .req(lk1_req), .rsp(lk1_rsp), .locked(), .owner()
  );

  data_queue #(.N(N), .PRIO_W(PRIO_W), .QLEN(QLEN), .ID_W(ID_W), .TMR_W(TMR_W)) u_queue (
    .clk, .rst_n, .req(q_req), .rsp(q_rsp), .prio, .is_blocked,
    .blk_valid(q_blk_valid), .blk_id(q_blk_id), .blk_timeout(q_blk_timeout),
    .wake_valid(q_wake_valid), .wake_id(q_wake_id), .count(queue_count)
  );

  // memories
  logic [N-1:0]             lm_we;
  logic [N-1:0][LM_AW-1:0]  lm_addr;
  logic [N-1:0][DATA_W-1:0] lm_wdata, lm_rdata;
  logic                     gm_we;
  logic [GM_AW-1:0]         gm_addr;
  logic [DATA_W-1:0]        gm_wdata, gm_rdata;

  arbiter #(.N(N), .PRIO_W(PRIO_W), .LM_WORDS(LM_WORDS), .GM_WORDS(GM_WORDS)) u_arbiter (
    .req(mem_req), .rsp(mem_rsp), .prio,
    .lm_we, .lm_addr, .lm_wdata, .lm_rdata,
    .gm_we, .gm_addr, .gm_wdata, .gm_rdata, .gm_grant()
  );

  for (genvar i = 0; i < N; i++) begin : g_lmem
    mem_bank #(.WORDS(LM_WORDS), .DATA_W(DATA_W)) u_lmem (
      .clk, .we(lm_we[i]), .addr(lm_addr[i]), .wdata(lm_wdata[i]), .rdata(lm_rdata[i])
    );
  end

  mem_bank #(.WORDS(GM_WORDS), .DATA_W(DATA_W)) u_gmem (
    .clk, .we(gm_we), .addr(gm_addr), .wdata(gm_wdata), .rdata(gm_rdata)
  );
endmodule
