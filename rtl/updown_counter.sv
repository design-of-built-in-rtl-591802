// updown_counter: address counter of the bit-oriented March C- BIST.
//
// W-bit binary counter. With en high it counts up when u_d = 1 and down when
// u_d = 0, wrapping at both ends; with en low it holds. reset (synchronous,
// active high) sets it to all ones, the top address, where the first March
// element starts its descending sweep.
// The up/down counting by u_d follows the source design; the enable, the
// wrap-around and the reset value are this design's choices.
module updown_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         en,
  input  logic         u_d,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (reset)   count <= '1;
    else if (en) count <= u_d ? count + 1'b1 : count - 1'b1;
  end

endmodule
