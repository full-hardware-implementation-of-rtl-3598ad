// mem_bank: one memory bank (a local memory of a kernel object, or the global
// memory shared by all of them).
//
// Word-addressed, DATA_W wide, WORDS deep. Reads are asynchronous (data in the
// same cycle as the address) so that every bus transfer of the kernel bus
// completes in one cycle; writes happen at the clock edge when we is 1.
// Contents start at zero. Sizes are choices of this design.
module mem_bank #(
  parameter int WORDS  = 256,
  parameter int DATA_W = 32,
  parameter int AW     = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [WORDS];

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
