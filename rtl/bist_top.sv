// bist_top: two March C- built-in self-test engines for SRAM, side by side.
//
// 1. Word-oriented MBIST (ports without prefix): a 2**ADDR_W x DATA_W memory
//    (64 x 8 by default) with its BIST circuitry (mbist_core). In normal
//    mode (NbarT = 0) the memory is used through address, datain, rwbarin,
//    csin and dataout. A start pulse runs March C- over every bit of every
//    word, 10 * 64 * 8 = 5120 cycles; NbarT is high meanwhile, cout marks the
//    last test cycle, and eq reports the comparison in every cycle where
//    rd_chk is high.
// 2. Bit-oriented March C- BIST (ports prefixed bo_): a 2**BO_ADDR_W x
//    BO_DATA_W memory (16 x 1 by default), an up/down address counter and the
//    March C- state machine. It starts when bo_reset is released and takes
//    10 * 16 = 160 cycles after its init cycle; bo_done then goes high and
//    bo_fail tells whether any read mismatched.
// Both share clk; all resets are synchronous and active high.
//
// The two engines and their memories follow the two architectures of the
// source design; their side-by-side placement in one top, the bo_fail flag,
// rd_chk, and the mapping of the bit-oriented engine's write/output enables
// onto the memory's cs/rwbar pins are this design's choices.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned ADDR_W     = 6,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned BO_ADDR_W  = 4,
  parameter int unsigned BO_DATA_W  = 1,
  parameter logic        WEN_ACTIVE = 1'b1,
  parameter logic        OEN_ACTIVE = 1'b0,
  parameter logic        DONE_LEVEL = 1'b1
) (
  input  logic                 clk,
  // word-oriented MBIST
  input  logic                 rst,
  input  logic                 start,
  input  logic [ADDR_W-1:0]    address,
  input  logic [DATA_W-1:0]    datain,
  input  logic                 rwbarin,
  input  logic                 csin,
  output logic [DATA_W-1:0]    dataout,
  output logic                 NbarT,
  output logic                 cout,
  output logic                 eq,
  output logic                 rd_chk,
  // bit-oriented March C- BIST
  input  logic                 bo_reset,
  output logic                 bo_done,
  output logic                 bo_fail,
  output logic [BO_ADDR_W-1:0] bo_address,
  output logic                 bo_wen,
  output logic                 bo_oen,
  output logic [BO_DATA_W-1:0] bo_data,
  output logic [2:0]           bo_phase,
  output logic                 bo_element
);

  // ---- word-oriented MBIST ----------------------------------------------
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_din;
  logic              mem_rwbar, mem_cs;

  mbist_core #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mbist (
    .clk, .rst, .start, .address, .datain, .rwbarin, .csin,
    .mem_addr, .mem_din, .mem_rwbar, .mem_cs, .ramout(dataout),
    .NbarT, .cout, .eq, .rd_chk
  );

  sram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mem (
    .clk, .cs(mem_cs), .rwbar(mem_rwbar), .addr(mem_addr),
    .din(mem_din), .dout(dataout)
  );

  // ---- bit-oriented March C- BIST ----------------------------------------
  logic                 bo_u_d, bo_cnt_en;
  logic [BO_DATA_W-1:0] bo_ramout;
  phase_t               phase;
  element_t             element;

  updown_counter #(.W(BO_ADDR_W)) u_bo_cnt (
    .clk, .reset(bo_reset), .en(bo_cnt_en), .u_d(bo_u_d), .count(bo_address)
  );

  march_fsm #(
    .ADDR_W(BO_ADDR_W), .DATA_W(BO_DATA_W),
    .WEN_ACTIVE(WEN_ACTIVE), .OEN_ACTIVE(OEN_ACTIVE), .DONE_LEVEL(DONE_LEVEL)
  ) u_bo_fsm (
    .clk, .reset(bo_reset), .address(bo_address), .data_out(bo_ramout),
    .wen(bo_wen), .oen(bo_oen), .data(bo_data), .u_d(bo_u_d),
    .cnt_en(bo_cnt_en), .done(bo_done), .fail(bo_fail),
    .phase, .element
  );

  sram #(.ADDR_W(BO_ADDR_W), .DATA_W(BO_DATA_W)) u_bo_mem (
    .clk,
    .cs((bo_wen == WEN_ACTIVE) || (bo_oen == OEN_ACTIVE)),
    .rwbar(bo_wen != WEN_ACTIVE),
    .addr(bo_address), .din(bo_data), .dout(bo_ramout)
  );

  assign bo_phase   = phase;
  assign bo_element = element;

endmodule
