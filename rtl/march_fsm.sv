// march_fsm: test controller of the bit-oriented March C- BIST.
//
// A state machine over phase (init, phase1..phase6 = March elements M0..M5,
// final) and element (ele1 = first operation of the element, ele2 = second):
//   phase1 dn(w0)  phase2 up(r0,w1)  phase3 up(r1,w0)
//   phase4 dn(r0,w1)  phase5 dn(r1,w0)  phase6 up(r0)
// It drives the memory's write and output enables, the test data and the
// up/down address counter (u_d, cnt_en), and reads the counter's address back
// to see when an element has reached its last address.
//
// One memory operation per clock: an address is visited for one cycle in
// phase1 and phase6 and for two (ele1 read, ele2 write) in phase2..phase5,
// so the test takes 10 * 2**ADDR_W cycles after init. At the end of an
// element the counter counts on (wrapping) when the next element runs in the
// same direction and holds when it reverses, so the next element starts at
// its first address without a load. done goes to DONE_LEVEL in the final
// state. fail is set, and stays set until reset, when a word read in test
// does not hold the expected value.
//
// Outputs are combinational from the state. wen and oen are driven at the
// levels WEN_ACTIVE and OEN_ACTIVE when active (defaults 1 and 0: active-high
// write enable, active-low output enable) and at the other level otherwise.
// reset is synchronous, active high; init is left on the first clock after
// reset is released.
//
// The phases, elements, parameter values, address and data widths follow the
// source design and its simulation; the fail flag, the counter enable and the
// wrap-or-hold rule at element boundaries are this design's choices.
module march_fsm
  import bist_pkg::*;
#(
  parameter int unsigned ADDR_W     = 4,
  parameter int unsigned DATA_W     = 1,
  parameter logic        WEN_ACTIVE = 1'b1,
  parameter logic        OEN_ACTIVE = 1'b0,
  parameter logic        DONE_LEVEL = 1'b1
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [ADDR_W-1:0] address,     // from the up/down counter
  input  logic [DATA_W-1:0] data_out,    // from the memory
  output logic              wen,
  output logic              oen,
  output logic [DATA_W-1:0] data,        // test data to the memory
  output logic              u_d,
  output logic              cnt_en,
  output logic              done,
  output logic              fail,
  output phase_t            phase,
  output element_t          element
);

  phase_t   phase_n;
  element_t element_n;
  logic     in_test, two_op, is_read, value, last_op, at_end, up, next_up;

  // Direction of the March element run in phase p (phase1 = M0).
  function automatic logic phase_up(phase_t p);
    return (p == PH_2 || p == PH_3 || p == PH_6);
  endfunction

  always_comb begin
    in_test = (phase != PH_INIT) && (phase != PH_FINAL);
    two_op  = (phase inside {PH_2, PH_3, PH_4, PH_5});
    is_read = in_test && (phase != PH_1) && (element == ELE1);
    // Written/expected value: phase2 and phase4 read 0 and write 1, phase3
    // and phase5 read 1 and write 0, phase1 writes 0, phase6 reads 0.
    case (phase)
      PH_2, PH_4: value = (element == ELE2);
      PH_3, PH_5: value = (element == ELE1);
      default:    value = 1'b0;
    endcase
    up      = phase_up(phase);
    next_up = phase_up(phase_t'(phase + 1'b1));
    at_end  = up ? (address == '1) : (address == '0);
    last_op = in_test && (!two_op || element == ELE2);

    phase_n   = phase;
    element_n = element;
    cnt_en    = 1'b0;
    if (phase == PH_INIT) begin
      phase_n = PH_1;
    end else if (in_test) begin
      if (two_op) element_n = (element == ELE1) ? ELE2 : ELE1;
      if (last_op) begin
        if (at_end) begin
          phase_n = phase_t'(phase + 1'b1);
          cnt_en  = (phase != PH_6) && (next_up == up);
        end else begin
          cnt_en  = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      phase   <= PH_INIT;
      element <= ELE1;
      fail    <= 1'b0;
    end else begin
      phase   <= phase_n;
      element <= element_n;
      if (is_read && data_out != {DATA_W{value}}) fail <= 1'b1;
    end
  end

  assign u_d  = up;
  assign data = {DATA_W{value}};
  assign wen  = (in_test && !is_read) ? WEN_ACTIVE : ~WEN_ACTIVE;
  assign oen  = is_read ? OEN_ACTIVE : ~OEN_ACTIVE;
  assign done = (phase == PH_FINAL) ? DONE_LEVEL : ~DONE_LEVEL;

endmodule
