// alu: the adder/subtractor of the multiplier/divider datapath.
//
// Computes result = a + b (ALU_ADD) or result = a - b (ALU_SUB) on W-bit
// unsigned operands and brings the carry out of the most significant bit out
// as a port. Subtraction is done as a + ~b + 1, so for ALU_SUB the carry out
// is 1 exactly when a >= b (no borrow); the divider uses that as its compare.
// Purely combinational.
//
// The role of the block (an ALU used only for its adder/subtractor, with an
// extra carry-out output) follows the lab description; the operation
// encoding and the absence of logic operations are this design's choices.
module alu
  import muldiv_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_t      alu_op,
  output logic [W-1:0] result,
  output logic         carryout
);

  logic         sub;
  logic [W-1:0] b_eff;

  always_comb begin
    sub   = (alu_op == ALU_SUB);
    b_eff = sub ? ~b : b;
    {carryout, result} = {1'b0, a} + {1'b0, b_eff} + {{W{1'b0}}, sub};
  end

endmodule
