// arbiter: memory arbiter between the kernel objects and the memory banks.
//
// Each object has its own local memory bank and all objects share one global
// bank. A local-memory access goes straight to the caller's bank and is granted
// at once. Global-memory accesses that meet in the same cycle are arbitrated by
// the current priority of each object as held by the manager (larger number =
// higher priority, as in FreeRTOS); equal priorities go to the lowest object
// index. A losing request simply keeps req high and is granted in a later cycle.
//
// Priority-driven arbitration follows the original hardware-RTOS scheme (the
// manager feeds priorities to the arbiter); the one-cycle protocol and the tie break are this design's.
// Only requests in the local and global regions reach this block.
module arbiter
  import rtos_pkg::*;
#(
  parameter int N        = 11,
  parameter int PRIO_W   = 4,
  parameter int LM_WORDS = 256,
  parameter int GM_WORDS = 1024,
  parameter int LM_AW    = $clog2(LM_WORDS),
  parameter int GM_AW    = $clog2(GM_WORDS)
) (
  input  bus_req_t [N-1:0]              req,
  output bus_rsp_t [N-1:0]              rsp,
  input  logic     [N-1:0][PRIO_W-1:0]  prio,
  // local banks, one per object
  output logic     [N-1:0]              lm_we,
  output logic     [N-1:0][LM_AW-1:0]   lm_addr,
  output logic     [N-1:0][DATA_W-1:0]  lm_wdata,
  input  logic     [N-1:0][DATA_W-1:0]  lm_rdata,
  // global bank
  output logic                          gm_we,
  output logic     [GM_AW-1:0]          gm_addr,
  output logic     [DATA_W-1:0]         gm_wdata,
  input  logic     [DATA_W-1:0]         gm_rdata,
  output logic     [N-1:0]              gm_grant   // one-hot winner of the global bank
);
  logic              found;
  logic [PRIO_W-1:0] best;

  always_comb begin
    found    = 1'b0;
    best     = '0;
    gm_grant = '0;
    for (int i = 0; i < N; i++)
      if (req[i].req && region_e'(req[i].addr[15:14]) == RG_GLOBAL)
        if (!found || prio[i] > best) begin
          found    = 1'b1;
          best     = prio[i];
          gm_grant = '0;
          gm_grant[i] = 1'b1;
        end
  end

  always_comb begin
    gm_we    = 1'b0;
    gm_addr  = '0;
    gm_wdata = '0;
    for (int i = 0; i < N; i++) begin
      lm_we[i]    = req[i].req && req[i].we && region_e'(req[i].addr[15:14]) == RG_LOCAL;
      lm_addr[i]  = req[i].addr[LM_AW-1:0];
      lm_wdata[i] = req[i].wdata;
      rsp[i]      = '0;
      if (req[i].req && region_e'(req[i].addr[15:14]) == RG_LOCAL) begin
        rsp[i].gnt   = 1'b1;
        rsp[i].rdata = lm_rdata[i];
      end
      if (gm_grant[i]) begin
        gm_we        = req[i].we;
        gm_addr      = req[i].addr[GM_AW-1:0];
        gm_wdata     = req[i].wdata;
        rsp[i].gnt   = 1'b1;
        rsp[i].rdata = gm_rdata;
      end
    end
  end
endmodule
