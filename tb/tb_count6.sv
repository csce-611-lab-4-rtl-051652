// tb_count6: self-checking test of the iteration counter.
//
// Drives a random enable pattern for several hundred cycles, so the counter
// wraps more than once, and compares its value every cycle with a model kept
// here as (number of enabled cycles since reset) mod 64. Also checks that the
// reset clears the counter asynchronously, between clock edges.
module tb_count6;
  logic       clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [5:0] count;
  int         checks = 0, failures = 0;
  int         enabled = 0;

  count6 #(.N(6)) dut (.clk, .rst, .en, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks++;
      if (count !== 6'(enabled % 64)) begin
        failures++;
        $display("FAIL cycle %0d: count=%0d exp %0d", i, count, enabled % 64);
      end
      en = ($urandom % 4) != 0;
      @(posedge clk);
      if (en) enabled++;
    end
    // asynchronous clear in the middle of a clock period
    @(negedge clk);
    #2 rst = 1'b1;
    #1;
    checks++;
    if (count !== 6'd0) begin
      failures++;
      $display("FAIL async reset: count=%0d", count);
    end
    en = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (count !== 6'd0) begin
      failures++;
      $display("FAIL count moved while in reset: %0d", count);
    end
    rst = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (count !== 6'd3) begin
      failures++;
      $display("FAIL after reset: count=%0d exp 3", count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
