// tb_alu: self-checking test of the adder/subtractor.
//
// Applies corner cases and random operand pairs for both operations and
// compares result and carry out with a reference computed here in 64-bit
// arithmetic: for addition the carry is bit 32 of a + b, for subtraction it
// is 1 exactly when a >= b.
module tb_alu;
  import muldiv_pkg::*;

  logic [31:0] a, b, result;
  logic        carryout;
  alu_op_t     op;
  int          checks = 0, failures = 0;

  alu #(.W(32)) dut (.a, .b, .alu_op(op), .result, .carryout);

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input alu_op_t top);
    logic [63:0] wide;
    logic [31:0] exp_r;
    logic        exp_c;
    a = ta; b = tb_; op = top;
    #1;
    if (top == ALU_ADD) begin
      wide  = 64'(ta) + 64'(tb_);
      exp_r = wide[31:0];
      exp_c = wide[32];
    end else begin
      exp_r = 32'(64'(ta) - 64'(tb_));
      exp_c = (ta >= tb_);
    end
    checks++;
    if (result !== exp_r || carryout !== exp_c) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got %h/%b exp %h/%b", top.name(), ta, tb_,
               result, carryout, exp_r, exp_c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0, 32'h0, ALU_ADD);
    check(32'hFFFF_FFFF, 32'h1, ALU_ADD);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, ALU_ADD);
    check(32'h8000_0000, 32'h8000_0000, ALU_ADD);
    check(32'h0, 32'h0, ALU_SUB);
    check(32'h5, 32'h6, ALU_SUB);
    check(32'h6, 32'h6, ALU_SUB);
    check(32'h0, 32'hFFFF_FFFF, ALU_SUB);
    check(32'hFFFF_FFFF, 32'h0, ALU_SUB);
    check(32'h8000_0000, 32'h7FFF_FFFF, ALU_SUB);
    for (int i = 0; i < 2000; i++) begin
      check($urandom, $urandom, ((i % 2) != 0) ? ALU_SUB : ALU_ADD);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
