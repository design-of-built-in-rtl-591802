// mbist_counter_seq: the counter-sequencer of the word-oriented March C- MBIST.
//
// A single register q = {bit, op, addr} walks through the whole test:
//   q[ADDR_W-1:0]          memory address
//   q[ADDR_W+3:ADDR_W]     March C- operation 0..9 (see bist_pkg)
//   q[Q_W-1:ADDR_W+4]      bit of the memory word under test
// With the defaults (64 words of 8 bits) q is 13 bits wide: q[5:0] address,
// q[9:6] operation, q[12:10] bit, as in the architecture this follows.
//
// Sequencing, one step per clock while cen is high:
//  * In the single-operation elements M0 and M5 the operation field stays put
//    and the address moves by one every cycle.
//  * In the two-operation elements M1..M4 the address is held for two cycles
//    while the operation field counts up by one (read) and then back down
//    (the write), after which the address moves on.
//  * At the last address of an element the operation field advances to the
//    next element and the address is loaded with that element's first
//    address (0 going up, the top address going down). After M5 the bit field
//    advances and M0 starts again at the top address.
//  * cout is high, combinationally, during the final step of the test (last
//    bit, M5, top address) while cen is high; the register then returns to
//    its initial value.
// ld (synchronous, priority over cen) loads the initial value: bit 0, op 0
// (M0), top address. There is no separate reset: the controller keeps ld
// high while it is idle.
//
// u_d is the direction of the current element (1 = ascending). The
// architecture drawing gives the counter-sequencer a u_d pin, while its
// description has the counter-sequencer itself provide the direction; here
// the direction is decoded from the operation field and brought out.
// The bit-per-word sweep, the 13-bit layout and the hold-for-two-cycles rule
// follow the source architecture; the reload of the start address at element
// boundaries is this design's choice.
module mbist_counter_seq
  import bist_pkg::*;
#(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned BIT_W  = (DATA_W > 1) ? $clog2(DATA_W) : 1,
  parameter int unsigned Q_W    = ADDR_W + OP_W + BIT_W
) (
  input  logic           clk,
  input  logic           cen,
  input  logic           ld,
  output logic [Q_W-1:0] q,
  output logic           u_d,
  output logic           cout
);

  localparam logic [ADDR_W-1:0] ADDR_MAX = '1;
  localparam logic [BIT_W-1:0]  BIT_LAST = BIT_W'(DATA_W - 1);

  logic [ADDR_W-1:0] addr, addr_n;
  op_t               op,   op_n;
  logic [BIT_W-1:0]  bsel, bsel_n;

  logic at_end;     // current address is the last one of the element
  logic terminal;   // final step of the whole test

  assign q   = {bsel, op, addr};
  assign u_d = elem_up(op_element(op));

  always_comb begin
    at_end   = u_d ? (addr == ADDR_MAX) : (addr == '0);
    terminal = (bsel == BIT_LAST) && (op == op_t'(NUM_OPS - 1)) && at_end;
    cout     = cen && terminal;

    addr_n = addr;
    op_n   = op;
    bsel_n = bsel;
    if (!op_is_last(op)) begin
      op_n = op + 1'b1;                       // read -> write at same address
    end else if (!at_end) begin
      addr_n = u_d ? addr + 1'b1 : addr - 1'b1;
      if (op_element(op) inside {1, 2, 3, 4})
        op_n = op - 1'b1;                     // back to the read of the pair
    end else if (op == op_t'(NUM_OPS - 1)) begin
      op_n   = '0;                            // next bit, M0 from the top
      bsel_n = terminal ? '0 : bsel + 1'b1;
      addr_n = ADDR_MAX;
    end else begin
      op_n   = op + 1'b1;                     // first op of the next element
      addr_n = elem_up(op_element(op + 1'b1)) ? '0 : ADDR_MAX;
    end
  end

  always_ff @(posedge clk) begin
    if (ld) begin
      addr <= ADDR_MAX;
      op   <= '0;
      bsel <= '0;
    end else if (cen) begin
      addr <= addr_n;
      op   <= op_n;
      bsel <= bsel_n;
    end
  end

endmodule
