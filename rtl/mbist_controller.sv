// mbist_controller: BIST controller of the word-oriented March C- MBIST.
//
// Two states. In IDLE the memory is in normal mode (NbarT = 0) and ld holds
// the counter-sequencer at its initial value. A start pulse moves it to TEST:
// NbarT = 1 switches the memory multiplexers to the BIST side and releases
// the counter-sequencer, and the controller waits for cout, on which it
// returns to IDLE. rst is synchronous and active high.
//
// Its job (start the counter on start, wait for cout) and its pins follow the
// source architecture; the two-state encoding and the synchronous reset are
// this design's choices.
module mbist_controller (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic cout,
  output logic NbarT,
  output logic ld
);

  typedef enum logic {IDLE = 1'b0, TEST = 1'b1} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (rst)                        state <= IDLE;
    else if (state == IDLE && start) state <= TEST;
    else if (state == TEST && cout)  state <= IDLE;
  end

  assign NbarT = (state == TEST);
  assign ld    = (state == IDLE);

endmodule
