// hilo_shifter: the 2W-bit (64-bit by default) product/remainder register.
//
// Holds {hi, lo}. Each rising clock edge applies at most one shift:
//   shift_left      {hi,lo} <= {hi,lo} << 1, shift_bit_in enters at lo[0]
//   shift_right     {hi,lo} <= {hi,lo} >> 1, shift_bit_in enters at hi[W-1]
//   shift_right_hi  hi <= hi >> 1, shift_bit_in enters at hi[W-1]; lo kept
// and then en_hi / en_lo write hi_data_in / lo_data_in into their half,
// overriding the shifted value of that half. If several shift inputs are high
// together, shift_left wins over shift_right, which wins over shift_right_hi.
// rst clears both halves asynchronously (active high). hi and lo are the
// register outputs, so they change one clock after a command.
//
// The ports and the three shift operations follow the component description
// in the lab; the priority between simultaneous commands is this design's own
// choice (the controller never asserts two shifts at once).
module hilo_shifter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] hi_data_in,
  input  logic [W-1:0] lo_data_in,
  input  logic         shift_left,
  input  logic         shift_right,
  input  logic         en_hi,
  input  logic         en_lo,
  input  logic         shift_right_hi,
  input  logic         shift_bit_in,
  output logic [W-1:0] hi,
  output logic [W-1:0] lo
);

  logic [W-1:0] hi_next, lo_next;

  always_comb begin
    hi_next = hi;
    lo_next = lo;
    if (shift_left) begin
      {hi_next, lo_next} = {hi[W-2:0], lo, shift_bit_in};
    end else if (shift_right) begin
      {hi_next, lo_next} = {shift_bit_in, hi, lo[W-1:1]};
    end else if (shift_right_hi) begin
      hi_next = {shift_bit_in, hi[W-1:1]};
    end
    if (en_hi) hi_next = hi_data_in;
    if (en_lo) lo_next = lo_data_in;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      hi <= '0;
      lo <= '0;
    end else begin
      hi <= hi_next;
      lo <= lo_next;
    end
  end

endmodule
