// muldiv_pkg: types shared by the multicycle unsigned multiplier/divider.
//
// alu_op_t is the 2-bit operation select of the adder/subtractor. Only
// addition (used by multiply) and subtraction (used by divide) are needed by
// this design; the code values are this design's own choice, with the
// all-zero code meaning "add" so that the controller's default output is an
// addition. The two remaining codes are reserved and behave as "add".
package muldiv_pkg;

  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01
  } alu_op_t;

  // Controller states. LOAD is folded into IDLE/DONE: the operands are
  // captured on the cycle en is seen in either of those states.
  typedef enum logic [2:0] {
    S_IDLE      = 3'd0,  // after reset, no result yet
    S_MUL_ADD   = 3'd1,  // multiply: hi <= hi + B when lo[0] is 1
    S_MUL_SHIFT = 3'd2,  // multiply: shift {hi,lo} right, carry in at top
    S_DIV_PRE   = 3'd3,  // divide: initial left shift of {hi,lo}
    S_DIV_SUB   = 3'd4,  // divide: trial subtraction hi - B
    S_DIV_SHIFT = 3'd5,  // divide: shift {hi,lo} left, quotient bit in
    S_DIV_FIX   = 3'd6,  // divide: shift hi right once to align remainder
    S_DONE      = 3'd7   // result on hi/lo, valid high
  } state_t;

endpackage
