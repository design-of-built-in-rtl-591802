// mbist_mux: the memory-input multiplexers of the word-oriented MBIST.
//
// NbarT = 0 (normal mode) passes the system's address, data, rwbar and cs to
// the memory; NbarT = 1 (test mode) passes the BIST values instead: the
// counter-sequencer address, the decoder's test data, and cs forced to 1.
// The BIST read/not-write is itself a multiplexer: with cen high it is q[6],
// bit 0 of the operation field (odd operations read), with cen low it is 1
// (read, so nothing is written). Purely combinational.
// All four multiplexers and their select signals follow the source
// architecture.
module mbist_mux #(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 8
) (
  input  logic              NbarT,
  input  logic              cen,
  // normal-mode inputs
  input  logic [ADDR_W-1:0] address,
  input  logic [DATA_W-1:0] datain,
  input  logic              rwbarin,
  input  logic              csin,
  // BIST inputs
  input  logic [ADDR_W-1:0] q_addr,
  input  logic              q_op0,       // q[6]
  input  logic [DATA_W-1:0] data_t,
  // to the memory
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_din,
  output logic              mem_rwbar,
  output logic              mem_cs
);

  logic rwbar_t;

  assign rwbar_t   = cen ? q_op0 : 1'b1;
  assign mem_addr  = NbarT ? q_addr  : address;
  assign mem_din   = NbarT ? data_t  : datain;
  assign mem_rwbar = NbarT ? rwbar_t : rwbarin;
  assign mem_cs    = NbarT ? 1'b1    : csin;

endmodule
