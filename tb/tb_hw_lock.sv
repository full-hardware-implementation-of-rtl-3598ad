// tb_hw_lock: random acquire (read) and release (write) traffic from 4 ports
// against a reference lock model: at most one owner, try-acquire answers,
// lowest-index tie break, only the owner can release, gnt = req.
module tb_hw_lock;
  import rtos_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  bus_req_t [N-1:0] req;
  bus_rsp_t [N-1:0] rsp;
  logic       locked;
  logic [7:0] owner;
  logic       m_locked;
  int         m_owner;
  int checks = 0, failures = 0, contended = 0;

  hw_lock #(.N(N), .ID_W(8)) dut (.clk, .rst_n, .req, .rsp, .locked, .owner);
  always #5 clk = ~clk;

  initial begin
    req = '0;
    m_locked = 0; m_owner = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      logic nl; int no; int nacq;
      @(negedge clk);
      nacq = 0;
      for (int i = 0; i < N; i++) begin
        req[i].req = $urandom_range(0, 2) == 0;
        req[i].we  = $urandom_range(0, 1) == 1;
        req[i].addr = paddr(PER_LOCK0, 2'd0);
        req[i].wdata = '0;
        if (req[i].req && !req[i].we) nacq++;
      end
      if (nacq > 1) contended++;
      #1;
      // model
      nl = m_locked; no = m_owner;
      for (int i = 0; i < N; i++)
        if (req[i].req && req[i].we && m_locked && m_owner == i) nl = 0;
      for (int i = 0; i < N; i++) begin
        logic exp;
        exp = 0;
        if (req[i].req && !req[i].we) begin
          if (m_locked && m_owner == i && nl) exp = 1;
          else if (!nl) begin nl = 1; no = i; exp = 1; end
        end
        checks++;
        if (rsp[i].gnt !== req[i].req || rsp[i].rdata[0] !== exp) begin
          failures++;
          $display("FAIL t=%0d port %0d gnt %0d got %0d exp %0d", t, i, rsp[i].gnt, rsp[i].rdata[0], exp);
        end
      end
      @(posedge clk);
      m_locked = nl; m_owner = no;
      #1;
      checks++;
      if (locked !== m_locked || (m_locked && owner !== 8'(m_owner))) begin
        failures++;
        $display("FAIL state locked %0d owner %0d", locked, owner);
      end
    end
    checks++;
    if (contended == 0) failures++;
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
