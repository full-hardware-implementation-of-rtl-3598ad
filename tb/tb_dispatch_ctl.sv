// tb_dispatch_ctl: checks dispatch disabling against a reference model.
// Random stall vectors, flag values and owner ids are applied to an instance
// with every object affected and to one whose top two objects (interrupt
// handlers) are exempt. Expected: flag clear -> unchanged; flag set -> owner
// unchanged, other affected objects stalled, exempt objects unchanged.
module tb_dispatch_ctl;
  localparam int N = 11;
  localparam logic [N-1:0] AFF2 = 11'b001_1111_1111;
  logic [N-1:0] stall_in, out1, out2;
  logic         dis;
  logic [7:0]   owner;
  int checks = 0, failures = 0;

  dispatch_ctl #(.N(N), .ID_W(8)) dut1 (.stall_in, .dis, .owner, .stall_out(out1));
  dispatch_ctl #(.N(N), .ID_W(8), .AFFECT(AFF2)) dut2 (.stall_in, .dis, .owner, .stall_out(out2));

  function automatic logic [N-1:0] model(input logic [N-1:0] s, input logic d,
                                         input logic [7:0] o, input logic [N-1:0] aff);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++)
      r[i] = (d && aff[i] && o != 8'(i)) ? 1'b1 : s[i];
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      stall_in = N'($urandom);
      dis      = $urandom_range(0, 1) == 1;
      owner    = 8'($urandom_range(0, 12));
      #1;
      checks++;
      if (out1 !== model(stall_in, dis, owner, '1)) begin
        failures++;
        $display("FAIL dut1 s=%b d=%0d o=%0d got %b", stall_in, dis, owner, out1);
      end
      checks++;
      if (out2 !== model(stall_in, dis, owner, AFF2)) begin
        failures++;
        $display("FAIL dut2 s=%b d=%0d o=%0d got %b", stall_in, dis, owner, out2);
      end
    end
    // the owner itself keeps running when it was running
    stall_in = '0; dis = 1'b1; owner = 8'd3; #1;
    checks++;
    if (out1 !== ~(N'(1) << 3)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
