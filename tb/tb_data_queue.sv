// tb_data_queue: random send/receive/count traffic from 4 ports on a 4-byte
// queue, against a reference model (queue contents as a SystemVerilog queue,
// wait sets as bit vectors). Checks: one operation per cycle to the lowest
// requesting port, FIFO order of the bytes, full and empty handling, blocking
// requests (blk_*) with the caller's timeout, and that a successful operation
// wakes the highest-priority Blocked waiter of the other kind. Counts how often
// full, empty, block and wake happened; each must occur.
module tb_data_queue;
  import rtos_pkg::*;
  localparam int N = 4, QL = 4;
  logic clk = 0, rst_n = 0;
  bus_req_t [N-1:0]      req;
  bus_rsp_t [N-1:0]      rsp;
  logic [N-1:0][3:0]     prio;
  logic [N-1:0]          is_blocked;
  logic                  blk_valid, wake_valid;
  logic [7:0]            blk_id, wake_id;
  logic [15:0]           blk_timeout;
  logic [2:0]            count;
  logic [7:0]            mq[$];
  logic [N-1:0]          m_sw, m_rw;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_blk = 0, n_wake = 0;

  data_queue #(.N(N), .PRIO_W(4), .QLEN(QL), .ID_W(8), .TMR_W(16)) dut (.*);
  always #5 clk = ~clk;

  function automatic int pick(input logic [N-1:0] w, input logic [N-1:0] b,
                              input logic [N-1:0][3:0] p);
    int r = -1;
    for (int i = 0; i < N; i++)
      if (w[i] && b[i] && (r < 0 || p[i] > p[r])) r = i;
    return r;
  endfunction

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    req = '0; prio = '0; is_blocked = '0;
    m_sw = '0; m_rw = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      int s, w;
      logic [N-1:0] sw, rw;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        int k;
        k = $urandom_range(0, 9);
        req[i].req   = $urandom_range(0, 2) == 0;
        req[i].we    = 1'b1;
        req[i].addr  = paddr(PER_QUEUE, (k < 5) ? Q_SEND : (k < 9) ? Q_RECV : Q_COUNT);
        req[i].wdata = {($urandom_range(0, 1) == 1), 7'd0, 16'($urandom), 8'($urandom)};
        prio[i]      = 4'($urandom_range(0, 3));
        is_blocked[i] = $urandom_range(0, 1) == 1;
      end
      #1;
      s = -1;
      for (int i = N - 1; i >= 0; i--) if (req[i].req) s = i;
      for (int i = 0; i < N; i++) chk(rsp[i].gnt === (i == s), "grant");
      sw = m_sw; rw = m_rw;
      if (s >= 0) begin
        logic mb;
        sw[s] = 0; rw[s] = 0;
        mb = req[s].wdata[31];
        case (req[s].addr[1:0])
          Q_SEND: begin
            if (mq.size() < QL) begin
              w = pick(rw, is_blocked, prio);
              chk(rsp[s].rdata[QB_OK] === 1'b1 && blk_valid === 1'b0, "send ok");
              chk(wake_valid === (w >= 0) && (w < 0 || wake_id === 8'(w)), "send wake");
              if (w >= 0) begin rw[w] = 0; n_wake++; end
              mq.push_back(req[s].wdata[7:0]);
            end else begin
              n_full++;
              chk(rsp[s].rdata[QB_OK] === 1'b0 && wake_valid === 1'b0, "send full");
              chk(blk_valid === mb && rsp[s].rdata[QB_BLOCKED] === mb, "send block");
              if (mb) begin
                sw[s] = 1; n_blk++;
                chk(blk_id === 8'(s) && blk_timeout === req[s].wdata[23:8], "block args");
              end
            end
          end
          Q_RECV: begin
            if (mq.size() > 0) begin
              w = pick(sw, is_blocked, prio);
              chk(rsp[s].rdata[QB_OK] === 1'b1 && rsp[s].rdata[7:0] === mq[0], "recv data");
              chk(wake_valid === (w >= 0) && (w < 0 || wake_id === 8'(w)), "recv wake");
              if (w >= 0) begin sw[w] = 0; n_wake++; end
              void'(mq.pop_front());
            end else begin
              n_empty++;
              chk(rsp[s].rdata[QB_OK] === 1'b0 && wake_valid === 1'b0, "recv empty");
              chk(blk_valid === mb, "recv block");
              if (mb) begin rw[s] = 1; n_blk++; end
            end
          end
          default: chk(rsp[s].rdata === 32'(mq.size()) && !blk_valid && !wake_valid, "count");
        endcase
      end else
        chk(!blk_valid && !wake_valid, "idle");
      @(posedge clk);
      m_sw = sw; m_rw = rw;
    end
    chk(n_full > 0 && n_empty > 0 && n_blk > 0 && n_wake > 0, "coverage");
    $display("full=%0d empty=%0d block=%0d wake=%0d", n_full, n_empty, n_blk, n_wake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
