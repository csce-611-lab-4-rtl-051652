// tb_muldiv_unit: end-to-end test of the multiplier/divider at its default
// size (W = 32), with the real adder/subtractor, shift register and counter.
//
// It replays the two operations of the reference timing diagram (8 x 5 = 40,
// and 15 / 6 = 2 remainder 3), then corner cases and random operations, and
// compares hi/lo with A * B, or A / B and A % B, computed here in 64-bit
// arithmetic. For every operation it checks the latency from the en edge to
// valid (65 cycles for multiply, 67 for divide), that valid drops after en and
// that the result is held until the next en. It counts how often each
// mechanism of the design occurred and fails if one never did: a multiply
// add that produced a carry out (a 1 shifted in at the top), a multiply step
// with multiplier bit 0 (no add), a divide step whose trial subtraction was
// taken and one where it was not, the final remainder re-alignment, one
// where the remainder's top bit had been shifted out of hi and comes back, division by zero,
// an en ignored while busy, a new operation started straight from a finished
// one, and a reset in the middle of an operation.
module tb_muldiv_unit;
  logic        clk = 1'b0, rst = 1'b1;
  logic [31:0] A, B, hi, lo;
  logic        muldiv, en, valid;
  int          checks = 0, failures = 0;

  // mechanism counters
  int n_mul = 0, n_div = 0, n_carry_in = 0, n_skip_add = 0, n_sub_taken = 0;
  int n_sub_not = 0, n_msb = 0, n_fix = 0, n_div0 = 0, n_busy_en = 0;
  int n_restart = 0, n_reset_mid = 0;

  muldiv_unit dut (.clk, .rst, .A, .B, .muldiv, .en, .hi, .lo, .valid);

  always #5 clk = ~clk;

  // observe internal events
  always @(posedge clk) if (!rst) begin
    if (dut.u_ctrl.shift_right && dut.u_ctrl.shift_bit_in) n_carry_in++;
    if (dut.u_ctrl.state == muldiv_pkg::S_MUL_ADD && !dut.u_ctrl.en_hi) n_skip_add++;
    if (dut.u_ctrl.state == muldiv_pkg::S_DIV_SUB) begin
      if (dut.u_ctrl.en_hi) n_sub_taken++; else n_sub_not++;
    end
    if (dut.u_ctrl.shift_right_hi) begin
      n_fix++;
      if (dut.u_ctrl.shift_bit_in) n_msb++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic run(input logic [31:0] a, input logic [31:0] b, input logic md,
                     input bit poke_busy);
    logic [63:0] exp;
    int cycles;
    @(negedge clk);
    if (valid) n_restart++;
    A = a; B = b; muldiv = md; en = 1'b1;
    @(negedge clk);
    en = 1'b0; A = $urandom; B = $urandom; muldiv = 1'($urandom);
    expect_true(!valid, "valid drops after en");
    cycles = 1;
    while (!valid && cycles < 200) begin
      if (poke_busy && cycles == 20) begin
        en = 1'b1;
        n_busy_en++;
      end
      @(negedge clk);
      en = 1'b0;
      cycles++;
    end
    if (md == 1'b0) begin
      exp = 64'(a) * 64'(b);
      n_mul++;
    end else if (b == '0) begin
      exp = {a, 32'hFFFF_FFFF};
      n_div0++;
      n_div++;
    end else begin
      exp = {a % b, a / b};
      n_div++;
    end
    expect_true({hi, lo} === exp,
                $sformatf("%s a=%h b=%h got %h_%h exp %h", md ? "div" : "mul", a, b, hi, lo, exp));
    expect_true(cycles == (md ? 67 : 65),
                $sformatf("%s latency %0d cycles", md ? "div" : "mul", cycles));
    repeat (4) @(negedge clk);
    expect_true(valid && {hi, lo} === exp, "result held while idle");
  endtask

  initial begin
    A = '0; B = '0; muldiv = 1'b0; en = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    expect_true(!valid, "valid low after reset");
    // the two operations of the timing diagram
    run(32'd8, 32'd5, 1'b0, 1'b0);
    expect_true(hi == 32'd0 && lo == 32'd40, "8 x 5: hi 0, lo 40");
    run(32'd15, 32'd6, 1'b1, 1'b0);
    expect_true(hi == 32'd3 && lo == 32'd2, "15 / 6: hi 3, lo 2");
    // corner cases
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b0, 1'b1);
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1, 1'b1);
    run(32'hFFFF_FFFF, 32'h8000_0001, 1'b1, 1'b0);
    run(32'hFFFF_FFFE, 32'hFFFF_FFFF, 1'b1, 1'b0);
    run(32'h0, 32'h1234_5678, 1'b1, 1'b0);
    run(32'h1234_5678, 32'h0, 1'b1, 1'b0);
    run(32'h1234_5678, 32'h0, 1'b0, 1'b0);
    run(32'h1234_5678, 32'h1, 1'b1, 1'b0);
    // reset in the middle of a multiply, then carry on
    @(negedge clk);
    A = 32'hDEAD_BEEF; B = 32'h1234_5678; muldiv = 1'b0; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    repeat (30) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    expect_true(!valid && hi == '0 && lo == '0, "reset in mid-operation clears");
    rst = 1'b0;
    n_reset_mid++;
    for (int i = 0; i < 200; i++) run($urandom, $urandom, 1'(i), 1'b0);
    for (int i = 0; i < 100; i++) run($urandom, $urandom >> ($urandom % 32), 1'b1, 1'b0);

    expect_true(n_mul > 0, "no multiply");
    expect_true(n_div > 0, "no divide");
    expect_true(n_carry_in > 0, "no carry shifted in");
    expect_true(n_skip_add > 0, "no skipped add");
    expect_true(n_sub_taken > 0, "no divide subtraction taken");
    expect_true(n_sub_not > 0, "no divide subtraction refused");
    expect_true(n_msb > 0, "no remainder top bit restored");
    expect_true(n_fix > 0, "no remainder re-alignment");
    expect_true(n_div0 > 0, "no division by zero");
    expect_true(n_busy_en > 0, "no en while busy");
    expect_true(n_restart > 0, "no start from a finished operation");
    expect_true(n_reset_mid > 0, "no reset during an operation");
    $display("events: mul=%0d div=%0d carry_in=%0d skip_add=%0d sub_taken=%0d sub_not=%0d msb=%0d fix=%0d div0=%0d busy_en=%0d restart=%0d reset_mid=%0d",
             n_mul, n_div, n_carry_in, n_skip_add, n_sub_taken, n_sub_not, n_msb,
             n_fix, n_div0, n_busy_en, n_restart, n_reset_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
