// tb_arbiter: random local/global requests from 5 ports with random
// priorities. Expected, worked out here: every local request is granted with
// its own bank's data and write strobe; of the global requests exactly the
// highest-priority one (lowest index on a tie) is granted and drives the
// global bank; no other request is granted.
module tb_arbiter;
  import rtos_pkg::*;
  localparam int N = 5;
  bus_req_t [N-1:0]         req;
  bus_rsp_t [N-1:0]         rsp;
  logic [N-1:0][3:0]        prio;
  logic [N-1:0]             lm_we;
  logic [N-1:0][7:0]        lm_addr;
  logic [N-1:0][31:0]       lm_wdata, lm_rdata;
  logic                     gm_we;
  logic [9:0]               gm_addr;
  logic [31:0]              gm_wdata, gm_rdata;
  logic [N-1:0]             gm_grant;
  int checks = 0, failures = 0, conflicts = 0, prio_wins = 0;

  arbiter #(.N(N), .PRIO_W(4), .LM_WORDS(256), .GM_WORDS(1024)) dut (.*);

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int win, nglob;
      gm_rdata = $urandom;
      for (int i = 0; i < N; i++) begin
        int r;
        r = $urandom_range(0, 2);
        req[i].req   = r != 0;
        req[i].we    = $urandom_range(0, 1) == 1;
        req[i].addr  = {(r == 2) ? RG_GLOBAL : RG_LOCAL, 14'($urandom)};
        req[i].wdata = $urandom;
        prio[i]      = 4'($urandom_range(0, 3));
        lm_rdata[i]  = $urandom;
      end
      #1;
      win = -1; nglob = 0;
      for (int i = 0; i < N; i++)
        if (req[i].req && req[i].addr[15:14] == RG_GLOBAL) begin
          nglob++;
          if (win < 0 || prio[i] > prio[win]) win = i;
        end
      if (nglob > 1) conflicts++;
      if (nglob > 1 && win != 0) prio_wins++;
      for (int i = 0; i < N; i++) begin
        logic is_loc, exp_g;
        logic [31:0] exp_d;
        is_loc = req[i].req && req[i].addr[15:14] == RG_LOCAL;
        exp_g  = is_loc || (i == win);
        exp_d  = is_loc ? lm_rdata[i] : gm_rdata;
        checks++;
        if (rsp[i].gnt !== exp_g || (exp_g && rsp[i].rdata !== exp_d) ||
            lm_we[i] !== (is_loc && req[i].we) ||
            (is_loc && (lm_addr[i] !== req[i].addr[7:0] || lm_wdata[i] !== req[i].wdata))) begin
          failures++;
          $display("FAIL t=%0d port %0d gnt %0d exp %0d", t, i, rsp[i].gnt, exp_g);
        end
      end
      checks++;
      if (win >= 0) begin
        if (gm_we !== req[win].we || gm_addr !== req[win].addr[9:0] ||
            gm_wdata !== req[win].wdata || gm_grant !== N'(1) << win) failures++;
      end else if (gm_we !== 1'b0 || gm_grant !== '0) failures++;
    end
    checks++;
    if (conflicts == 0 || prio_wins == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
