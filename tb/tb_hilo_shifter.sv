// tb_hilo_shifter: self-checking test of the 64-bit hi/lo shift register.
//
// Issues random single commands (load hi, load lo, load both, shift left,
// shift right, shift hi right, idle) with random data and shift-in bits and
// compares hi/lo after every clock edge with a 64-bit model kept here, in
// which a shift is a multiply or divide by two of the whole value. Also
// checks the documented priority when a shift and a load are given together
// and the asynchronous reset.
module tb_hilo_shifter;
  logic        clk = 1'b0, rst = 1'b1;
  logic [31:0] hi_data_in, lo_data_in, hi, lo;
  logic        shift_left, shift_right, en_hi, en_lo, shift_right_hi, shift_bit_in;
  logic [63:0] model;
  int          checks = 0, failures = 0;
  int          n_cmd[7];

  hilo_shifter #(.W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if ({hi, lo} !== model) begin
      failures++;
      $display("FAIL %s: got %h_%h exp %h", what, hi, lo, model);
    end
  endtask

  initial begin
    {shift_left, shift_right, en_hi, en_lo, shift_right_hi, shift_bit_in} = '0;
    hi_data_in = '0; lo_data_in = '0;
    model = '0;
    repeat (2) @(posedge clk);
    #1 compare("reset");
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      int cmd;
      @(negedge clk);
      cmd = $urandom % 7;
      n_cmd[cmd]++;
      {shift_left, shift_right, en_hi, en_lo, shift_right_hi} = '0;
      hi_data_in   = $urandom;
      lo_data_in   = $urandom;
      shift_bit_in = $urandom;
      case (cmd)
        0: begin en_hi = 1'b1; model[63:32] = hi_data_in; end
        1: begin en_lo = 1'b1; model[31:0] = lo_data_in; end
        2: begin en_hi = 1'b1; en_lo = 1'b1; model = {hi_data_in, lo_data_in}; end
        3: begin shift_left = 1'b1; model = model * 2 + 64'(shift_bit_in); end
        4: begin shift_right = 1'b1; model = (model / 2) + (64'(shift_bit_in) << 63); end
        5: begin
             shift_right_hi = 1'b1;
             model[63:32] = (model[63:32] / 2) + (32'(shift_bit_in) << 31);
           end
        default: ;
      endcase
      @(posedge clk);
      #1 compare($sformatf("cmd %0d step %0d", cmd, i));
    end
    // load of hi together with a right shift: hi takes the loaded value, lo
    // is shifted (bit 32 of the old value enters lo[31])
    @(negedge clk);
    {shift_left, shift_right, en_hi, en_lo, shift_right_hi} = '0;
    model = {hi, lo};
    hi_data_in = 32'h1234_5678; shift_right = 1'b1; en_hi = 1'b1; shift_bit_in = 1'b0;
    model = {32'h1234_5678, model[32:1]};
    @(posedge clk);
    #1 compare("load hi + shift right");
    // asynchronous reset between edges
    @(negedge clk);
    {shift_left, shift_right, en_hi, en_lo, shift_right_hi} = '0;
    #2 rst = 1'b1;
    #1 model = '0;
    compare("async reset");
    for (int c = 0; c < 6; c++) begin
      checks++;
      if (n_cmd[c] == 0) begin
        failures++;
        $display("FAIL command %0d never issued", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
