// mbist_decoder: test data decoder of the word-oriented March C- MBIST.
//
// Input is the upper part of the counter-sequencer, {bit, op}: 7 bits with
// the defaults (q[12:6]). The operation field selects the March C- value
// (w0/r0 -> 0, w1/r1 -> 1) and the bit field selects the bit of the word that
// carries it. data_t is the word written to memory in test mode and
// compare_val the word a read must return; both come from the same decode,
// so they are equal. Purely combinational.
//
// That the decoder turns the seven upper counter bits into both the write
// pattern and the compare value, with the three top bits choosing the bit of
// the word under test, follows the source architecture. The exact pattern,
// with all other bits of the word held at 0, is this design's choice.
module mbist_decoder
  import bist_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned BIT_W  = (DATA_W > 1) ? $clog2(DATA_W) : 1
) (
  input  logic [BIT_W+OP_W-1:0] sel,          // {bit, op}
  output logic [DATA_W-1:0]     data_t,
  output logic [DATA_W-1:0]     compare_val
);

  logic [BIT_W-1:0] bsel;
  op_t              op;
  logic [DATA_W-1:0] pattern;

  assign {bsel, op} = sel;

  always_comb begin
    pattern = '0;
    if (op < op_t'(NUM_OPS) && int'(bsel) < int'(DATA_W))
      pattern[bsel] = op_value(op);
  end

  assign data_t      = pattern;
  assign compare_val = pattern;

endmodule
