// muldiv_unit: multicycle unsigned W x W multiplier and W / W divider (W = 32).
//
// Pulse en for one cycle with A, B and muldiv set up; the operands and mode
// are captured at that rising edge. muldiv = 0 multiplies (A is the
// multiplier, B the multiplicand): hi:lo becomes the 2W-bit product.
// muldiv = 1 divides (A is the dividend, B the divisor): lo becomes the
// quotient and hi the remainder. valid rises when the result is ready, 2W+1
// clock edges after the en edge for a multiply and 2W+3 for a divide, and
// stays high, with hi/lo holding the result, until the next en. hi and lo
// show the working register while an operation runs. rst is asynchronous and
// active high.
//
// The datapath is one W-bit adder/subtractor (alu), one 2W-bit shift register
// (hilo_shifter) that holds the partial product or the partial remainder and
// quotient, and an iteration counter (count6), all sequenced by
// muldiv_controller. The top-level ports and this block structure follow the
// lab description; how the blocks are sequenced is described in
// muldiv_controller.
//
// The counter is cleared through its asynchronous reset by rst or the
// controller's rst_out, as the lab's signal list implies. rst_out is a decode
// of the controller's state register and only changes right after a clock
// edge, when the counter is not being enabled.
module muldiv_unit
  import muldiv_pkg::*;
#(
  parameter int unsigned W  = 32,
  parameter int unsigned CW = $clog2(W) + 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] A,
  input  logic [W-1:0] B,
  input  logic         muldiv,
  input  logic         en,
  output logic [W-1:0] hi,
  output logic [W-1:0] lo,
  output logic         valid
);

  logic [W-1:0]  hi_data, lo_data, B_reg, alu_out;
  logic          shift_left, shift_right, shift_right_hi;
  logic          en_hi, en_lo, shift_bit_in, carryout;
  logic          en_out, rst_out, cnt_rst;
  logic [CW-1:0] count;
  alu_op_t       alu_op;

  assign cnt_rst = rst | rst_out;

  muldiv_controller #(.W(W), .CW(CW)) u_ctrl (
    .clk, .rst, .A, .B, .muldiv, .en, .valid,
    .hi_msb(hi[W-1]), .lo0(lo[0]), .hi_data, .lo_data,
    .shift_left, .shift_right, .shift_right_hi, .en_hi, .en_lo, .shift_bit_in,
    .B_reg, .alu_op, .alu_out, .carryout,
    .count, .en_out, .rst_out
  );

  alu #(.W(W)) u_alu (
    .a(hi), .b(B_reg), .alu_op, .result(alu_out), .carryout
  );

  hilo_shifter #(.W(W)) u_hilo (
    .clk, .rst, .hi_data_in(hi_data), .lo_data_in(lo_data),
    .shift_left, .shift_right, .en_hi, .en_lo, .shift_right_hi, .shift_bit_in,
    .hi, .lo
  );

  count6 #(.N(CW)) u_count (
    .clk, .rst(cnt_rst), .en(en_out), .count
  );

endmodule
