// mbist_core: word-oriented March C- memory BIST, all of the test circuitry
// around the memory under test.
//
// The controller waits for start, then puts the memory in test mode
// (NbarT = 1) and lets the counter-sequencer run. The counter-sequencer
// steps through March C- once for every bit of the word
//   M0 dn(w0); M1 up(r0,w1); M2 up(r1,w0); M3 dn(r0,w1); M4 dn(r1,w0); M5 up(r0)
// and the decoder turns its upper bits into the word to write and the word to
// expect. The multiplexers route either these or the system's normal-mode
// signals to the memory, and the comparator checks every word read back.
//
// Timing: one memory operation per clock, 10 * 2**ADDR_W operations per bit,
// 10 * 2**ADDR_W * DATA_W cycles for the whole test (5120 with the defaults),
// counted from the first test cycle after start. cout is high in the last
// test cycle; NbarT drops on the next edge. eq is valid in test cycles where
// rd_chk is high (a test-mode read); the memory must return read data in the
// same cycle (see sram).
//
// Follows the source architecture block for block; cen is driven by NbarT and
// rd_chk is brought out for the user, both this design's choices.
module mbist_core
  import bist_pkg::*;
#(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  // normal-mode memory inputs
  input  logic [ADDR_W-1:0] address,
  input  logic [DATA_W-1:0] datain,
  input  logic              rwbarin,
  input  logic              csin,
  // memory port
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_din,
  output logic              mem_rwbar,
  output logic              mem_cs,
  input  logic [DATA_W-1:0] ramout,
  // status
  output logic              NbarT,
  output logic              cout,
  output logic              eq,
  output logic              rd_chk
);

  localparam int unsigned BIT_W = (DATA_W > 1) ? $clog2(DATA_W) : 1;
  localparam int unsigned Q_W   = ADDR_W + OP_W + BIT_W;

  logic           ld, cen;
  logic [Q_W-1:0] q;
  logic [DATA_W-1:0] data_t, compare_val;

  assign cen    = NbarT;
  assign rd_chk = NbarT && q[ADDR_W];

  mbist_controller u_ctrl (
    .clk, .rst, .start, .cout, .NbarT, .ld
  );

  mbist_counter_seq #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_cnt (
    .clk, .cen, .ld, .q, .u_d(), .cout
  );

  mbist_decoder #(.DATA_W(DATA_W)) u_dec (
    .sel(q[Q_W-1:ADDR_W]), .data_t, .compare_val
  );

  mbist_mux #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mux (
    .NbarT, .cen, .address, .datain, .rwbarin, .csin,
    .q_addr(q[ADDR_W-1:0]), .q_op0(q[ADDR_W]), .data_t,
    .mem_addr, .mem_din, .mem_rwbar, .mem_cs
  );

  mbist_comparator #(.DATA_W(DATA_W)) u_cmp (
    .ramout, .compare_val, .eq
  );

endmodule
