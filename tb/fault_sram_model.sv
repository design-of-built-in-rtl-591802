// fault_sram_model: behavioural memory for testbenches, the same pins and
// timing as sram (synchronous write, asynchronous read), with one injectable
// memory fault from the classic fault models:
//   kind 0 none
//   kind 1 stuck-at-0      cell (f_addr, f_bit) always reads 0
//   kind 2 stuck-at-1      cell always reads 1
//   kind 3 up transition   cell cannot go 0 -> 1
//   kind 4 down transition cell cannot go 1 -> 0
//   kind 5 inversion coupling: a 0 -> 1 write to cell (a_addr, a_bit)
//          inverts the victim cell (f_addr, f_bit)
//   kind 6 idempotent coupling <up;1>: a 0 -> 1 write to the aggressor sets
//          the victim to 1
//   kind 7 address decoder: address a_addr reaches the word at f_addr
//          instead of its own
// Contents start random. Not synthesizable (fault selection at run time).
module fault_sram_model #(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              cs,
  input  logic              rwbar,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout,
  input  int                kind,
  input  logic [ADDR_W-1:0] f_addr,
  input  int                f_bit,
  input  logic [ADDR_W-1:0] a_addr,
  input  int                a_bit
);

  logic [DATA_W-1:0] mem [2**ADDR_W];
  logic [ADDR_W-1:0] eff;

  initial for (int i = 0; i < 2**ADDR_W; i++) mem[i] = DATA_W'($urandom);

  assign eff = (kind == 7 && addr == a_addr) ? f_addr : addr;

  always_comb begin
    dout = mem[eff];
    if (eff == f_addr && kind == 1) dout[f_bit] = 1'b0;
    if (eff == f_addr && kind == 2) dout[f_bit] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (cs && !rwbar) begin
      logic [DATA_W-1:0] nw;
      nw = din;
      if (eff == f_addr && kind == 3 && !mem[eff][f_bit]) nw[f_bit] = 1'b0;
      if (eff == f_addr && kind == 4 &&  mem[eff][f_bit]) nw[f_bit] = 1'b1;
      mem[eff] <= nw;
      if ((kind == 5 || kind == 6) && eff == a_addr && !mem[eff][a_bit] && din[a_bit]) begin
        if (kind == 5) mem[f_addr][f_bit] <= ~mem[f_addr][f_bit];
        else           mem[f_addr][f_bit] <= 1'b1;
      end
    end
  end

endmodule
