// mbist_comparator: response comparator of the word-oriented MBIST.
//
// eq is high when the word read from memory equals the decoder's compare
// value. It is combinational and meaningful only in test-mode read cycles;
// in write cycles it compares the old contents with the value being written.
// The comparator and its eq output follow the source architecture.
module mbist_comparator #(
  parameter int unsigned DATA_W = 8
) (
  input  logic [DATA_W-1:0] ramout,
  input  logic [DATA_W-1:0] compare_val,
  output logic              eq
);

  assign eq = (ramout == compare_val);

endmodule
