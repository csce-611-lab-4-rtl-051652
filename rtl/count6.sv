// count6: iteration counter of the multiplier/divider.
//
// An N-bit up counter (6 bits by default, enough to count the 32 iterations
// of a 32-bit multiply or divide). While en is high it adds one per rising
// clock edge; it wraps from all ones to zero. rst clears it asynchronously
// (active high). The ports follow the component description of the lab; the
// wrap-around behaviour is this design's choice.
module count6 #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [N-1:0] count
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     count <= '0;
    else if (en) count <= count + 1'b1;
  end

endmodule
