// tb_mem_bank: writes random words to random addresses and compares every
// read (asynchronous, same cycle) with a shadow array. Checks zero start.
module tb_mem_bank;
  localparam int W = 64;
  logic clk = 0, we;
  logic [5:0]  addr;
  logic [31:0] wdata, rdata;
  logic [31:0] shadow [W];
  int checks = 0, failures = 0;

  mem_bank #(.WORDS(W), .DATA_W(32)) dut (.clk, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < W; i++) shadow[i] = '0;
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < W; i++) begin
      addr = 6'(i); #1;
      checks++; if (rdata !== 32'd0) failures++;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1;
      addr = 6'($urandom);
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== shadow[addr]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", addr, rdata, shadow[addr]);
      end
      @(posedge clk);
      if (we) shadow[addr] = wdata;
    end
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
