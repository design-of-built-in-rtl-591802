// bist_pkg: constants and helper functions shared by the two March C- BIST
// engines of this design.
//
// March C- is the six-element March test
//   M0 dn(w0); M1 up(r0,w1); M2 up(r1,w0); M3 dn(r0,w1); M4 dn(r1,w0); M5 up(r0)
// which has ten read/write operations in all. The word-oriented engine numbers
// these operations 0..9 in a 4-bit field of its counter-sequencer; the
// functions below give, for each operation number, the data value it writes or
// expects, whether it reads, which March element it belongs to, and that
// element's address direction. The element list and its directions follow the
// March C- definition; the 0..9 numbering of the operations is this design's.
package bist_pkg;

  localparam int unsigned NUM_OPS   = 10;  // read/write operations of March C-
  localparam int unsigned OP_W      = 4;   // width of the operation field

  typedef logic [OP_W-1:0] op_t;

  // Phases of the bit-oriented controller: reset state, the six March
  // elements (phase1 = M0 ... phase6 = M5) and the final state.
  typedef enum logic [2:0] {
    PH_INIT   = 3'd0,
    PH_1      = 3'd1,
    PH_2      = 3'd2,
    PH_3      = 3'd3,
    PH_4      = 3'd4,
    PH_5      = 3'd5,
    PH_6      = 3'd6,
    PH_FINAL  = 3'd7
  } phase_t;

  // Operation slot inside a March element: ele1 is the first operation
  // (the only one in M0 and M5), ele2 the second.
  typedef enum logic {ELE1 = 1'b0, ELE2 = 1'b1} element_t;

  // Operation number -> March element index (0..5).
  function automatic int unsigned op_element(op_t op);
    case (op)
      4'd0:        return 0;
      4'd1, 4'd2:  return 1;
      4'd3, 4'd4:  return 2;
      4'd5, 4'd6:  return 3;
      4'd7, 4'd8:  return 4;
      default:     return 5;
    endcase
  endfunction

  // Address direction of a March element: 1 = ascending, 0 = descending.
  function automatic logic elem_up(int unsigned elem);
    case (elem)
      1, 2, 5: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // Data value written (w0/w1) or expected (r0/r1) by an operation.
  function automatic logic op_value(op_t op);
    case (op)
      4'd2, 4'd3, 4'd6, 4'd7: return 1'b1;
      default:                return 1'b0;
    endcase
  endfunction

  // Last operation of its March element.
  function automatic logic op_is_last(op_t op);
    case (op)
      4'd0, 4'd2, 4'd4, 4'd6, 4'd8, 4'd9: return 1'b1;
      default:                            return 1'b0;
    endcase
  endfunction

endpackage
