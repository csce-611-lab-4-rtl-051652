// muldiv_controller: state machine that sequences the multiplier/divider.
//
// It owns the operand register B_reg and drives the adder/subtractor, the
// hi/lo shift register and the iteration counter.
//
// Start: in IDLE or DONE, a cycle with en high captures B into B_reg and the
// mode muldiv, loads {hi,lo} <= {0, A} and leaves the counter cleared
// (rst_out is high in IDLE and DONE and feeds the counter's reset).
//
// Multiply (muldiv = 0), shift-and-add, two cycles per iteration:
//   MUL_ADD    if lo[0] = 1: hi <= hi + B_reg; the adder's carry out is kept
//              in bit_q (0 when lo[0] = 0)
//   MUL_SHIFT  {hi,lo} >>= 1 with bit_q shifted in at the top; count + 1
// After W iterations {hi,lo} holds the 2W-bit product.
//
// Divide (muldiv = 1), restoring division on the same register:
//   DIV_PRE    {hi,lo} <<= 1 (0 in)
//   DIV_SUB    trial hi - B_reg; the subtractor's carry out is 1 when
//              hi >= B_reg, and then hi <= hi - B_reg. The outcome (the
//              quotient bit) is kept in bit_q
//   DIV_SHIFT  {hi,lo} <<= 1 with bit_q shifted in at lo[0]; the bit leaving
//              hi goes to msb_q; count + 1
//   DIV_FIX    after W iterations the remainder sits one place too far left:
//              hi >>= 1 with msb_q shifted back in at the top
// lo then holds the quotient and hi the remainder. Division by zero gives
// quotient all ones and remainder A.
// In iteration k the partial remainder tested in DIV_SUB is at most the top
// k bits of A, so it always fits in hi and no 33rd bit is needed there; only
// the final shift can push a remainder bit out of hi, which is why msb_q is
// kept for DIV_FIX.
//
// valid is high in DONE. Timing from the en cycle to valid: a multiply takes
// 2W+1 clock edges, a divide 2W+3 (65 and 67 for W = 32). en during an
// operation is ignored. Outputs are combinational decodes of the state.
//
// Following the lab: the resources (ALU as adder/subtractor, 64-bit hi/lo
// shifter, 6-bit counter), the shift-add multiply with the adder's carry out
// shifted in at the top, and the control signal set (shift_left, shift_right,
// en_hi, en_lo, shift_right_hi, shift_bit_in, B_reg, ALUop, en_out, rst_out).
// This design's own choices: the state sequence, holding the carry in bit_q
// for the shift cycle that follows the add, the restoring division sequence
// (the shifter's shift_right_hi input used to re-align the remainder), and
// ignoring en while busy.
//
// The two assertions at the end are disabled during reset, so rst is also
// sampled synchronously there and a linter may report rst as used both
// asynchronously and synchronously. That use is confined to the assertions
// and produces no logic.
module muldiv_controller
  import muldiv_pkg::*;
#(
  parameter int unsigned W  = 32,
  parameter int unsigned CW = $clog2(W) + 1
) (
  input  logic          clk,
  input  logic          rst,
  // top-level command
  input  logic [W-1:0]  A,
  input  logic [W-1:0]  B,
  input  logic          muldiv,
  input  logic          en,
  output logic          valid,
  // hi/lo shift register
  input  logic          hi_msb,   // hi[W-1], the bit a left shift moves out
  input  logic          lo0,      // lo[0], the multiplier bit under test
  output logic [W-1:0]  hi_data,
  output logic [W-1:0]  lo_data,
  output logic          shift_left,
  output logic          shift_right,
  output logic          shift_right_hi,
  output logic          en_hi,
  output logic          en_lo,
  output logic          shift_bit_in,
  // adder/subtractor
  output logic [W-1:0]  B_reg,
  output alu_op_t       alu_op,
  input  logic [W-1:0]  alu_out,
  input  logic          carryout,
  // iteration counter
  input  logic [CW-1:0] count,
  output logic          en_out,
  output logic          rst_out
);

  state_t state, state_next;
  logic   bit_q, bit_next;
  logic   msb_q, msb_next;
  logic   last_iter;

  assign last_iter = (count == CW'(W - 1));

  always_comb begin
    state_next     = state;
    bit_next       = bit_q;
    msb_next       = msb_q;
    valid          = 1'b0;
    hi_data        = alu_out;
    lo_data        = A;
    shift_left     = 1'b0;
    shift_right    = 1'b0;
    shift_right_hi = 1'b0;
    en_hi          = 1'b0;
    en_lo          = 1'b0;
    shift_bit_in   = 1'b0;
    alu_op         = ALU_ADD;
    en_out         = 1'b0;
    rst_out        = 1'b0;

    unique case (state)
      S_IDLE, S_DONE: begin
        valid   = (state == S_DONE);
        rst_out = 1'b1;
        if (en) begin
          hi_data    = '0;
          lo_data    = A;
          en_hi      = 1'b1;
          en_lo      = 1'b1;
          state_next = muldiv ? S_DIV_PRE : S_MUL_ADD;
        end
      end

      S_MUL_ADD: begin
        alu_op     = ALU_ADD;
        en_hi      = lo0;
        bit_next   = lo0 & carryout;
        state_next = S_MUL_SHIFT;
      end

      S_MUL_SHIFT: begin
        shift_right  = 1'b1;
        shift_bit_in = bit_q;
        en_out       = 1'b1;
        state_next   = last_iter ? S_DONE : S_MUL_ADD;
      end

      S_DIV_PRE: begin
        shift_left = 1'b1;
        state_next = S_DIV_SUB;
      end

      S_DIV_SUB: begin
        alu_op     = ALU_SUB;
        en_hi      = carryout;
        bit_next   = carryout;
        state_next = S_DIV_SHIFT;
      end

      S_DIV_SHIFT: begin
        shift_left   = 1'b1;
        shift_bit_in = bit_q;
        msb_next     = hi_msb;
        en_out       = 1'b1;
        state_next   = last_iter ? S_DIV_FIX : S_DIV_SUB;
      end

      S_DIV_FIX: begin
        shift_right_hi = 1'b1;
        shift_bit_in   = msb_q;
        state_next     = S_DONE;
      end

      default: state_next = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE;
      B_reg <= '0;
      bit_q <= 1'b0;
      msb_q <= 1'b0;
    end else begin
      state <= state_next;
      bit_q <= bit_next;
      msb_q <= msb_next;
      if ((state == S_IDLE || state == S_DONE) && en) B_reg <= B;
    end
  end

  // At most one shift command per cycle.
  a_one_shift: assert property (@(posedge clk) disable iff (rst)
    $onehot0({shift_left, shift_right, shift_right_hi}))
    else $error("muldiv_controller: more than one shift command");

  // A load writes both halves of the register together.
  a_load_pair: assert property (@(posedge clk) disable iff (rst)
    en_lo |-> en_hi)
    else $error("muldiv_controller: lo written without hi");

endmodule
