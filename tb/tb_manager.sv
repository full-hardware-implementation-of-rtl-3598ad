// tb_manager: directed test of the kernel manager with 3 tasks, 2 software
// timers (first auto-reload, second one-shot), 1 interrupt handler and a
// 4-cycle tick. The test bench drives the object bus ports itself and checks,
// against values worked out by hand:
//  - tasks start Ready and run one cycle later; timers and handler are stalled
//  - state writes stall/unstall a task; Ready becomes Running in one cycle
//  - vTaskDelay-style delay wakes the task after exactly N ticks
//  - dispatch disabling stalls every task and timer except the owner, not the
//    handler, and defers an expired timer callback
//  - auto-reload and one-shot timers: expiry after the period, end, reset pulse,
//    reload or return to dormant
//  - an irq edge unstalls the handler one cycle later
//  - data-queue block and wake requests
//  - routing of non-kernel addresses to the memory, lock and queue ports
//  - name words (first character first) and the first-failed-assertion register
module tb_manager;
  import rtos_pkg::*;
  localparam int NT = 3, NM = 2, NI = 1, N = 6, TC = 4;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] irq = '0;
  bus_req_t [N-1:0] obj_req, mem_req, lk0_req, lk1_req, q_req;
  bus_rsp_t [N-1:0] obj_rsp, mem_rsp, lk0_rsp, lk1_rsp, q_rsp;
  logic [N-1:0] obj_stall, obj_reset, obj_end, is_blocked;
  logic [N-1:0][3:0] prio;
  logic [N-1:0][1:0] state_o;
  logic q_blk_valid = 0, q_wake_valid = 0;
  logic [7:0] q_blk_id = 0, q_wake_id = 0;
  logic [15:0] q_blk_timeout = 0;
  logic dispatch_dis, tick;
  logic [7:0] dispatch_owner;
  logic [31:0] tick_count;
  logic assert_failed;
  logic [7:0] assert_id;
  int checks = 0, failures = 0;

  manager #(.N_TASK(NT), .N_TMR(NM), .N_ISR(NI), .TICK_CYCLES(TC),
            .TASK_PRIO({4'd1, 4'd2, 4'd3}), .TMR_AUTO(2'b01), .TMR_PERIOD(16'd5),
            .OBJ_NAME({128'("ISR"), 128'("T2"), 128'("TIMER_ONE"), 128'("C"), 128'("B_TASK"),
                       128'("LIMIT_INCREMENT1")}))
    dut (.*, .state_o(state_o));

  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one bus write from port p (completes in one cycle)
  task automatic wr(input int p, input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    obj_req[p] = '{req: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(posedge clk); #1;
    obj_req[p] = '0;
  endtask

  task automatic rd(input int p, input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    obj_req[p] = '{req: 1'b1, we: 1'b0, addr: a, wdata: '0};
    #1;
    d = obj_rsp[p].rdata;
    chk(obj_rsp[p].gnt === 1'b1, "kernel read granted");
    @(posedge clk); #1;
    obj_req[p] = '0;
  endtask

  function automatic logic [15:0] K(input int o, input logic [3:0] f);
    return kaddr(6'(o), f);
  endfunction

  initial begin
    logic [31:0] d;
    int t0, c0;
    obj_req = '0; obj_end = '0;
    mem_rsp = '0; lk0_rsp = '0; lk1_rsp = '0; q_rsp = '0;
    repeat (2) @(posedge clk);
    #1 chk(obj_reset === '1, "reset pulse to all objects");
    rst_n = 1;
    // first cycle: tasks Ready (stalled), then Running
    #1 chk(obj_stall === 6'b111_111, "all stalled at start");
    @(posedge clk); #1;
    chk(obj_stall === 6'b111_000, "tasks run one cycle after Ready");
    chk(prio[0] == 3 && prio[1] == 2 && prio[2] == 1 && prio[3] == 2 && prio[5] == 15, "priorities");
    rd(0, K(1, F_PRIO), d);            chk(d == 2, "read prio");
    rd(0, K(GLOBAL_OBJ, G_NOBJ), d);   chk(d == 6, "read object count");
    // names: 4 characters per word, first character in bits [7:0]
    rd(0, K(0, F_NAME), d);            chk(d == 32'h494D_494C, "name word 0 (LIMI)");
    rd(0, K(0, 4'd15), d);             chk(d == 32'h3154_4E45, "name word 3 (ENT1)");
    rd(0, K(1, F_NAME), d);            chk(d == 32'h4154_5F42, "name word 0 (B_TA)");
    rd(0, K(4, F_NAME), d);            chk(d == 32'h0000_3254, "short name");
    rd(0, K(4, 4'd13), d);             chk(d == 32'h0, "short name padding");
    rd(0, K(3, 4'd14), d);             chk(d == 32'h45, "name word 2 (E)");
    rd(0, K(3, 4'd13), d);             chk(d == 32'h4E4F_5F52, "name word 1 (R_ON)");
    // assertions: two in one cycle, the lower port is kept, later ones ignored
    chk(assert_failed == 0, "no assertion failed yet");
    @(negedge clk);
    obj_req[2] = '{req: 1'b1, we: 1'b1, addr: K(GLOBAL_OBJ, G_ASSERT), wdata: 32'h102};
    obj_req[1] = '{req: 1'b1, we: 1'b1, addr: K(GLOBAL_OBJ, G_ASSERT), wdata: 32'h101};
    @(posedge clk); #1;
    obj_req[2] = '0; obj_req[1] = '0;
    chk(assert_failed == 1 && assert_id == 1, "first failed assertion recorded");
    wr(4, K(GLOBAL_OBJ, G_ASSERT), 32'h104);
    rd(0, K(GLOBAL_OBJ, G_ASSERT), d); chk(d == 32'h101, "assertion register kept");

    // suspend task 1, then resume
    wr(0, K(1, F_STATE), 32'(ST_SUSPENDED));
    chk(obj_stall[1] === 1'b1 && state_o[1] == ST_SUSPENDED, "suspend stalls");
    wr(0, K(1, F_STATE), 32'(ST_READY));
    chk(obj_stall[1] === 1'b1 && state_o[1] == ST_READY, "Ready is still stalled");
    @(posedge clk); #1;
    chk(obj_stall[1] === 1'b0 && state_o[1] == ST_RUNNING, "Running one cycle later");

    // delay task 2 by 3 ticks
    @(posedge tick); #1;
    wr(2, K(2, F_DELAY), 32'd3);
    t0 = tick_count;
    chk(obj_stall[2] === 1'b1 && is_blocked[2], "delay blocks");
    while (obj_stall[2]) @(posedge clk);
    #1 chk(tick_count - t0 == 3, "delay wakes after 3 ticks");
    $display("delay: woke after %0d ticks", tick_count - t0);

    // dispatch disable by task 0
    wr(0, K(GLOBAL_OBJ, G_DISPATCH), 32'h100);
    chk(obj_stall[0] === 0 && obj_stall[1] === 1 && obj_stall[2] === 1, "dispatch disabled");
    rd(0, K(GLOBAL_OBJ, G_DISPATCH), d); chk(d == 32'h100, "dispatch register");
    // start the auto-reload timer (object 3) with period 2 while dispatch is disabled
    wr(0, K(3, F_PERIOD), 32'd2);
    wr(0, K(3, F_TMR_CMD), 32'd1);
    rd(0, K(3, F_ACTIVE), d); chk(d == 1, "timer active");
    repeat (3 * TC) @(posedge clk); #1;
    chk(dut.exec[3] === 1'b1 && obj_stall[3] === 1'b1, "expired callback deferred");
    // irq while dispatch disabled: handler not affected
    @(negedge clk); irq = 1'b1;
    @(posedge clk); #1;
    chk(obj_stall[5] === 1'b0, "handler runs one cycle after irq");
    @(negedge clk); irq = 1'b0; obj_end[5] = 1'b1;
    @(posedge clk); #1; obj_end[5] = 1'b0;
    chk(obj_stall[5] === 1'b1 && obj_reset[5] === 1'b1, "handler end: stall and reset");
    wr(0, K(GLOBAL_OBJ, G_DISPATCH), 32'h000);
    chk(obj_stall[1] === 0 && obj_stall[2] === 0 && obj_stall[3] === 0, "dispatch enabled, callback runs");
    // callback end: auto-reload
    @(negedge clk); obj_end[3] = 1'b1;
    @(posedge clk); #1; obj_end[3] = 1'b0;
    chk(obj_stall[3] === 1 && obj_reset[3] === 1 && state_o[3] == ST_RUNNING, "auto-reload after end");
    c0 = tick_count;
    rd(0, K(3, F_TIMER), d); chk(d == 2 || (d == 1 && tick_count != c0), "period reloaded");
    while (obj_stall[3]) @(posedge clk);
    #1 chk(tick_count - c0 == 2, "auto-reload period 2 ticks");
    @(negedge clk); obj_end[3] = 1'b1;
    @(posedge clk); #1; obj_end[3] = 1'b0;
    wr(0, K(3, F_TMR_CMD), 32'd0);
    rd(0, K(3, F_ACTIVE), d); chk(d == 0, "timer stopped");

    // one-shot timer (object 4), default period 5
    rd(1, K(4, F_PERIOD), d); chk(d == 5, "default period");
    wr(1, K(4, F_TMR_CMD), 32'd1);
    c0 = tick_count;
    while (obj_stall[4]) @(posedge clk);
    #1 chk(tick_count - c0 == 5, "one-shot expires after 5 ticks");
    @(negedge clk); obj_end[4] = 1'b1;
    @(posedge clk); #1; obj_end[4] = 1'b0;
    chk(state_o[4] == ST_BLOCKED && obj_stall[4] === 1, "one-shot dormant after end");
    repeat (8 * TC) @(posedge clk); #1;
    chk(obj_stall[4] === 1 && state_o[4] == ST_BLOCKED, "one-shot does not rerun");
    chk(obj_stall[3] === 1, "stopped timer does not run");

    // data queue block with timeout 2, then wake; second block times out
    @(negedge clk); q_blk_valid = 1; q_blk_id = 8'd1; q_blk_timeout = 16'd50;
    @(posedge clk); #1; q_blk_valid = 0;
    chk(state_o[1] == ST_BLOCKED && obj_stall[1], "queue block");
    @(negedge clk); q_wake_valid = 1; q_wake_id = 8'd1;
    @(posedge clk); #1; q_wake_valid = 0;
    chk(state_o[1] == ST_READY, "queue wake");
    @(negedge clk); q_blk_valid = 1; q_blk_id = 8'd2; q_blk_timeout = 16'd2;
    @(posedge clk); #1; q_blk_valid = 0;
    c0 = tick_count;
    while (obj_stall[2]) @(posedge clk);
    #1 chk(tick_count - c0 == 2, "queue timeout after 2 ticks");

    // routing of other regions
    @(negedge clk);
    obj_req[0] = '{req: 1, we: 0, addr: {RG_GLOBAL, 14'd5}, wdata: 0};
    obj_req[1] = '{req: 1, we: 0, addr: paddr(PER_LOCK1, 0), wdata: 0};
    obj_req[2] = '{req: 1, we: 1, addr: paddr(PER_QUEUE, Q_SEND), wdata: 7};
    mem_rsp[0] = '{gnt: 1, rdata: 32'hAAAA};
    lk1_rsp[1] = '{gnt: 1, rdata: 32'h1};
    q_rsp[2]   = '{gnt: 1, rdata: 32'h100};
    #1;
    chk(mem_req[0].req && !lk0_req[0].req && !q_req[0].req && obj_rsp[0].rdata == 32'hAAAA, "route memory");
    chk(lk1_req[1].req && !lk0_req[1].req && !mem_req[1].req && obj_rsp[1].rdata == 1, "route lock1");
    chk(q_req[2].req && !mem_req[2].req && obj_rsp[2].rdata == 32'h100, "route queue");
    @(posedge clk); #1; obj_req = '0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
