// hw_lock: hardware lock used to serialize service calls.
//
// A read of the lock address is an atomic try-acquire: it returns 1 when the
// caller now owns the lock (it was free, or the caller already owned it) and 0
// otherwise. A write by the owner releases it; a write by anyone else is
// ignored. Every request is answered in the cycle it is made (gnt = req). When
// several ports try to acquire a free lock in the same cycle the lowest port
// index wins. The lock keeps a valid bit and the owner id.
//
// The service-call serialization itself (_loc_service_call /
// _unl_service_call) follows the original scheme; the read/write encoding, the
// same-cycle answer and the lowest-index tie break are this design's choices.
module hw_lock
  import rtos_pkg::*;
#(
  parameter int N    = 11,
  parameter int ID_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bus_req_t [N-1:0]  req,
  output bus_rsp_t [N-1:0]  rsp,
  output logic              locked,
  output logic [ID_W-1:0]   owner
);
  logic            nxt_locked;
  logic [ID_W-1:0] nxt_owner;

  always_comb begin
    nxt_locked = locked;
    nxt_owner  = owner;
    for (int i = 0; i < N; i++) begin
      rsp[i].gnt   = req[i].req;
      rsp[i].rdata = '0;
    end
    // releases first: only the owner may release
    for (int i = 0; i < N; i++)
      if (req[i].req && req[i].we && locked && owner == ID_W'(i))
        nxt_locked = 1'b0;
    // then acquisitions, lowest index first
    for (int i = 0; i < N; i++) begin
      if (req[i].req && !req[i].we) begin
        if (locked && owner == ID_W'(i) && nxt_locked)
          rsp[i].rdata = 32'd1;
        else if (!nxt_locked) begin
          nxt_locked   = 1'b1;
          nxt_owner    = ID_W'(i);
          rsp[i].rdata = 32'd1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
    end else begin
      locked <= nxt_locked;
      owner  <= nxt_owner;
    end

  // a lock is only handed to a port that asked for it
  logic [N-1:0] won;
  always_comb
    for (int i = 0; i < N; i++) won[i] = rsp[i].rdata[0] && !req[i].req;
  a_no_spurious: assert property (@(posedge clk) disable iff (!rst_n) won == '0)
    else $error("lock granted without request");
endmodule
