// tb_muldiv_4bit: the worked 4-bit shift-and-add example, 15 x 15 = 225.
//
// Builds the multiplier/divider at W = 4 and multiplies 1111 by 1111. After
// every add step and every shift step it compares the 8-bit product register
// {hi, lo} with the expected trace of that example: the add steps give
// 1111 1111, 1 0110 1111, 1 1010 0111, 1 1100 0011 (the leading 1 is the
// adder's carry out, held for the following shift) and the shift steps give
// 0111 1111, 1011 0111, 1101 0011, 1110 0001 = 225. It then divides 225 by 15
// and 15 by 6 at the same width as a further check of the divide sequence.
module tb_muldiv_4bit;
  logic       clk = 1'b0, rst = 1'b1;
  logic [3:0] A, B, hi, lo;
  logic       muldiv, en, valid;
  int         checks = 0, failures = 0;

  // expected {carry, hi, lo} after each add step and {hi, lo} after each shift
  localparam logic [8:0] ADD_TRACE [4] = '{9'b0_1111_1111, 9'b1_0110_1111,
                                           9'b1_1010_0111, 9'b1_1100_0011};
  localparam logic [7:0] SHIFT_TRACE [4] = '{8'b0111_1111, 8'b1011_0111,
                                             8'b1101_0011, 8'b1110_0001};

  muldiv_unit #(.W(4)) dut (.clk, .rst, .A, .B, .muldiv, .en, .hi, .lo, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic divide(input logic [3:0] a, input logic [3:0] b);
    int cycles = 0;
    @(negedge clk);
    A = a; B = b; muldiv = 1'b1; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    while (!valid && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    expect_true(lo == a / b && hi == a % b,
                $sformatf("%0d / %0d: got q=%0d r=%0d", a, b, lo, hi));
    expect_true(cycles == 2 * 4 + 2, $sformatf("divide latency %0d", cycles + 1));
  endtask

  initial begin
    A = '0; B = '0; muldiv = 1'b0; en = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    A = 4'b1111; B = 4'b1111; muldiv = 1'b0; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    expect_true({hi, lo} == 8'b0000_1111, "initial product register 0000 1111");
    for (int it = 0; it < 4; it++) begin
      @(negedge clk);   // after the add step
      expect_true({dut.u_ctrl.bit_q, hi, lo} == ADD_TRACE[it],
                  $sformatf("iteration %0d add: got %b %b_%b", it + 1, dut.u_ctrl.bit_q, hi, lo));
      @(negedge clk);   // after the shift step
      expect_true({hi, lo} == SHIFT_TRACE[it],
                  $sformatf("iteration %0d shift: got %b_%b", it + 1, hi, lo));
    end
    expect_true(valid, "valid after four iterations");
    expect_true({hi, lo} == 8'd225, "15 x 15 = 225");
    divide(4'd15, 4'd6);
    divide(4'd13, 4'd15);
    divide(4'd15, 4'd1);
    divide(4'd14, 4'd9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
