// tb_muldiv_controller: self-checking test of the multiply/divide sequencer.
//
// The controller is run against a datapath model written here: a 64-bit
// register that obeys the load and shift commands, an adder/subtractor on
// hi and B_reg, and a counter cleared by rst_out and advanced by en_out.
// Random and corner-case multiplies and divides are started and the final
// hi/lo are compared with A * B, A / B and A % B computed in 64-bit
// arithmetic. The test also checks the number of cycles from en to valid
// (2W+1 for multiply, 2W+3 for divide), that valid stays high with the result
// until the next en, and that en is ignored while an operation runs.
module tb_muldiv_controller;
  import muldiv_pkg::*;

  localparam int W = 32;
  localparam int CW = 6;

  logic          clk = 1'b0, rst = 1'b1;
  logic [W-1:0]  A, B, hi_data, lo_data, B_reg, alu_out;
  logic          muldiv, en, valid;
  logic          shift_left, shift_right, shift_right_hi, en_hi, en_lo, shift_bit_in;
  logic          carryout, en_out, rst_out;
  alu_op_t       alu_op;
  logic [CW-1:0] count;
  logic [63:0]   r;               // model of {hi, lo}
  logic [32:0]   sum;
  int            checks = 0, failures = 0;

  muldiv_controller #(.W(W), .CW(CW)) dut (
    .clk, .rst, .A, .B, .muldiv, .en, .valid,
    .hi_msb(r[63]), .lo0(r[0]), .hi_data, .lo_data,
    .shift_left, .shift_right, .shift_right_hi, .en_hi, .en_lo, .shift_bit_in,
    .B_reg, .alu_op, .alu_out, .carryout, .count, .en_out, .rst_out
  );

  // adder/subtractor model
  always_comb begin
    if (alu_op == ALU_SUB) sum = {1'b0, r[63:32]} + {1'b0, ~B_reg} + 33'd1;
    else                   sum = {1'b0, r[63:32]} + {1'b0, B_reg};
    alu_out  = sum[31:0];
    carryout = sum[32];
  end

  // register and counter models
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      r     <= '0;
      count <= '0;
    end else begin
      logic [63:0] n;
      n = r;
      if (shift_left)          n = {r[62:0], shift_bit_in};
      else if (shift_right)    n = {shift_bit_in, r[63:1]};
      else if (shift_right_hi) n = {shift_bit_in, r[63:33], r[31:0]};
      if (en_hi) n[63:32] = hi_data;
      if (en_lo) n[31:0]  = lo_data;
      r <= n;
      if (rst_out)     count <= '0;
      else if (en_out) count <= count + 1'b1;
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] a, input logic [31:0] b, input logic md,
                     input bit poke_busy);
    logic [63:0] exp;
    int cycles;
    @(negedge clk);
    A = a; B = b; muldiv = md; en = 1'b1;
    @(negedge clk);
    en = 1'b0; A = $urandom; B = $urandom; muldiv = 1'($urandom);
    checks++;
    if (valid) begin
      failures++;
      $display("FAIL valid still high after en");
    end
    cycles = 1;
    while (!valid) begin
      if (poke_busy && cycles == 10) en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      cycles++;
    end
    if (md == 1'b0)    exp = 64'(a) * 64'(b);
    else if (b == '0)  exp = {a, 32'hFFFF_FFFF};
    else               exp = {a % b, a / b};
    checks++;
    if (r !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %h exp %h", md ? "div" : "mul", a, b, r, exp);
    end
    checks++;
    if (cycles != (md ? 2 * W + 3 : 2 * W + 1)) begin
      failures++;
      $display("FAIL %s latency %0d", md ? "div" : "mul", cycles);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (!valid || r !== exp) begin
      failures++;
      $display("FAIL result not held");
    end
  endtask

  initial begin
    A = '0; B = '0; muldiv = 1'b0; en = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    checks++;
    if (valid) begin
      failures++;
      $display("FAIL valid high after reset");
    end
    run(32'd8, 32'd5, 1'b0, 1'b0);
    run(32'd15, 32'd6, 1'b1, 1'b0);
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b0, 1'b1);
    run(32'hFFFF_FFFF, 32'h8000_0001, 1'b1, 1'b1);
    run(32'h1234_5678, 32'h0, 1'b1, 1'b0);
    run(32'h1234_5678, 32'h0, 1'b0, 1'b0);
    for (int i = 0; i < 100; i++) run($urandom, $urandom, 1'(i), 1'b0);
    for (int i = 0; i < 100; i++) run($urandom, $urandom >> ($urandom % 32), 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
