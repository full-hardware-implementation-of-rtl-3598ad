// data_queue: FreeRTOS data queue of bytes for asynchronous communication
// between kernel objects.
//
// The queue is a ring of QLEN bytes: a send puts a byte at the tail, a receive
// takes one from the head. The FreeRTOS list of tasks waiting on the queue is
// replaced by two bit arrays, send_wait and recv_wait, where bit i is set iff
// object i is blocked on a full (empty) queue. The outline of xQueueReceive is
// followed: a successful receive (send) wakes the highest-priority object
// blocked in send (receive); a failed call that may block marks the caller in
// its bit array and asks the manager to block it with its timeout (blk_*). The
// caller retries once after it runs again; if the queue is still empty (full)
// its timer expired and the call fails.
//
// Interface: one bus port per object in the peripheral region; one operation
// is served per cycle (lowest requesting index), the others wait with req high.
// Operation words are defined in rtos_pkg (Q_SEND, Q_RECV, Q_COUNT). An
// operation clears the caller's own wait bits before it acts, so a stale bit
// left by a timeout disappears on the retry. Only objects the manager reports
// as Blocked are woken.
//
// From the original scheme: byte array, head/tail, bit arrays, wake highest priority, per-task
// timers for the timeout. This design's choice: the procedure is done by this
// dedicated unit in one cycle instead of by software in each task, which also
// makes queue calls atomic without a lock; QLEN = 8 is assumed.
module data_queue
  import rtos_pkg::*;
#(
  parameter int N      = 11,
  parameter int PRIO_W = 4,
  parameter int QLEN   = 8,
  parameter int ID_W   = 8,
  parameter int TMR_W  = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  bus_req_t [N-1:0]             req,
  output bus_rsp_t [N-1:0]             rsp,
  input  logic     [N-1:0][PRIO_W-1:0] prio,
  input  logic     [N-1:0]             is_blocked,
  // to the manager: block the caller / wake a waiter
  output logic                         blk_valid,
  output logic     [ID_W-1:0]          blk_id,
  output logic     [TMR_W-1:0]         blk_timeout,
  output logic                         wake_valid,
  output logic     [ID_W-1:0]          wake_id,
  output logic     [$clog2(QLEN+1)-1:0] count
);
  localparam int PW = (QLEN > 1) ? $clog2(QLEN) : 1;

  logic [7:0]    buf_q [QLEN];
  logic [PW-1:0] head, tail;
  logic [N-1:0]  send_wait, recv_wait;

  // selected operation: the lowest requesting index, one-hot in sel_oh
  logic            sel_v;
  logic [N-1:0]    sel_oh;
  logic [ID_W-1:0] sel;
  bus_req_t        r;

  always_comb begin
    sel_v  = 1'b0;
    sel_oh = '0;
    sel    = '0;
    r      = '0;
    for (int i = 0; i < N; i++)
      if (req[i].req && !sel_v) begin
        sel_v     = 1'b1;
        sel_oh[i] = 1'b1;
        sel       = ID_W'(i);
        r         = req[i];
      end
  end

  logic full, empty;
  assign full  = (count == ($clog2(QLEN+1))'(QLEN));
  assign empty = (count == '0);

  // highest-priority Blocked object of a wait array, one-hot (zero if none)
  function automatic logic [N-1:0] pick(input logic [N-1:0] w, input logic [N-1:0] blk,
                                        input logic [N-1:0][PRIO_W-1:0] pr);
    logic              f = 1'b0;
    logic [PRIO_W-1:0] b = '0;
    logic [N-1:0]      oh = '0;
    for (int i = 0; i < N; i++)
      if (w[i] && blk[i] && (!f || pr[i] > b)) begin
        f = 1'b1; b = pr[i]; oh = '0; oh[i] = 1'b1;
      end
    return oh;
  endfunction

  function automatic logic [ID_W-1:0] enc(input logic [N-1:0] oh);
    logic [ID_W-1:0] id = '0;
    for (int i = 0; i < N; i++)
      if (oh[i]) id = ID_W'(i);
    return id;
  endfunction

  logic         is_send, is_recv, may_block;
  logic [N-1:0] sw_c, rw_c;       // wait arrays with the caller's bits cleared
  logic [N-1:0] pk_s, pk_r;       // waiter to wake for a receive / for a send

  always_comb begin
    is_send   = sel_v && r.addr[1:0] == Q_SEND;
    is_recv   = sel_v && r.addr[1:0] == Q_RECV;
    may_block = r.wdata[31];
    sw_c = send_wait & ~sel_oh;
    rw_c = recv_wait & ~sel_oh;
    pk_s = pick(sw_c, is_blocked, prio);
    pk_r = pick(rw_c, is_blocked, prio);
  end

  logic [N-1:0] gnt_vec;
  always_comb
    for (int i = 0; i < N; i++) gnt_vec[i] = rsp[i].gnt;

  // result word of the selected operation and the requests to the manager
  logic [DATA_W-1:0] rdata_sel;
  logic [N-1:0]      wake_oh;
  always_comb begin
    rdata_sel   = '0;
    blk_valid   = 1'b0;
    blk_id      = sel;
    blk_timeout = r.wdata[8 +: TMR_W];
    wake_oh     = '0;
    if (is_send) begin
      if (!full) begin
        rdata_sel[QB_OK] = 1'b1;
        wake_oh = pk_r;
      end else if (may_block) begin
        rdata_sel[QB_BLOCKED] = 1'b1;
        blk_valid = 1'b1;
      end
    end else if (is_recv) begin
      if (!empty) begin
        rdata_sel[7:0]   = buf_q[head];
        rdata_sel[QB_OK] = 1'b1;
        wake_oh = pk_s;
      end else if (may_block) begin
        rdata_sel[QB_BLOCKED] = 1'b1;
        blk_valid = 1'b1;
      end
    end else if (sel_v) begin
      rdata_sel = DATA_W'(count);
    end
    wake_valid = |wake_oh;
    wake_id    = enc(wake_oh);
    for (int i = 0; i < N; i++) begin
      rsp[i].gnt   = sel_oh[i];
      rsp[i].rdata = sel_oh[i] ? rdata_sel : '0;
    end
  end

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(QLEN - 1)) ? '0 : p + 1'b1;
  endfunction

  // next wait arrays: the woken waiter leaves, a newly blocked caller enters
  logic [N-1:0] sw_n, rw_n;
  always_comb begin
    sw_n = sw_c;
    rw_n = rw_c;
    if (is_send) begin
      rw_n = rw_c & ~wake_oh;
      if (full && may_block) sw_n = sw_c | sel_oh;
    end else if (is_recv) begin
      sw_n = sw_c & ~wake_oh;
      if (empty && may_block) rw_n = rw_c | sel_oh;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      head      <= '0;
      tail      <= '0;
      count     <= '0;
      send_wait <= '0;
      recv_wait <= '0;
    end else begin
      if (is_send && !full) begin
        tail  <= inc(tail);
        count <= count + 1'b1;
      end else if (is_recv && !empty) begin
        head  <= inc(head);
        count <= count - 1'b1;
      end
      send_wait <= sw_n;
      recv_wait <= rw_n;
    end

  always_ff @(posedge clk)
    if (is_send && !full) buf_q[tail] <= r.wdata[7:0];

  // a full queue never grows, an empty one never shrinks
  a_count: assert property (@(posedge clk) disable iff (!rst_n) count <= ($clog2(QLEN+1))'(QLEN))
    else $error("queue count overflow");
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt_vec))
    else $error("more than one queue operation granted");
endmodule
