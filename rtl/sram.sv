// sram: synchronous-write, asynchronous-read static RAM, the memory under
// test of both BIST engines.
//
// 2**ADDR_W words of DATA_W bits. On a rising clock edge with cs = 1 and
// rwbar = 0 the word din is written at addr. dout always shows the word at
// addr, so a read returns data in the same cycle its address is applied; the
// BIST engines compare it in that cycle. The contents are not reset.
// The memory's pins (address, data in and out, rwbar, cs) follow the source
// architecture; its read timing is this design's choice.
module sram #(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              cs,
  input  logic              rwbar,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (cs && !rwbar) mem[addr] <= din;
  end

  assign dout = mem[addr];

endmodule
