// rpa_pkg: shared types of the reconfigurable 1-bit processor array (RPA).
//
// The RPA computes on bit-serial words (least significant bit first) in an
// array of 1-bit processor elements (PEs). Each PE is configured with an
// operation, the two inputs it reads, programmable delays on those inputs
// and on its output (to line up words that took paths of different length),
// the bit position at which its words start, and which long wires it drives.
package rpa_pkg;

  // Operations of a PE. The document lists addition, subtraction and shift,
  // and the use of a PE as a bridge between wires; the encoding is this
  // design's choice.
  typedef enum logic [2:0] {
    OP_NOP  = 3'd0,   // output 0
    OP_PASS = 3'd1,   // bridge: forward operand a
    OP_ADD  = 3'd2,   // a + b
    OP_SUB  = 3'd3,   // a - b
    OP_SHL  = 3'd4    // a << 1 (times two)
  } pe_op_t;

  // Longest delay a PE buffer can insert, in clock cycles (document: 32).
  localparam int unsigned DMAX  = 32;
  localparam int unsigned DLY_W = $clog2(DMAX + 1);

endpackage
