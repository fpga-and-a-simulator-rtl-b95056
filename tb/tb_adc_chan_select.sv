// tb_adc_chan_select: self-checking test of the channel selection block.
//
// Drives random 12-bit values on the four test inputs, waits one clock for
// the channel registers, then walks the channel address through all four
// values and compares sel_data with the value driven on that channel and
// ch_active with the expected one-hot code. Also checks that the registers
// are cleared by reset and that a new input is not seen before the clock.
module tb_adc_chan_select;
  import adc_sim_pkg::*;

  logic                          clk = 1'b0;
  logic                          rst;
  logic [NUM_CH-1:0][DATA_W-1:0] test_data;
  logic [CH_W-1:0]               chn;
  logic [DATA_W-1:0]             sel_data;
  logic [NUM_CH-1:0]             ch_active;
  int checks = 0, failures = 0;

  adc_chan_select dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NUM_CH-1:0][DATA_W-1:0] prev;
    rst = 1'b1;
    chn = '0;
    for (int i = 0; i < NUM_CH; i++) test_data[i] = DATA_W'($urandom);
    @(posedge clk); #1;
    for (int c = 0; c < NUM_CH; c++) begin
      chn = CH_W'(c); #1;
      check(sel_data == '0, $sformatf("reset value on channel %0d", c));
    end
    rst = 1'b0;
    for (int round = 0; round < 50; round++) begin
      prev = dut.ch_reg;
      for (int i = 0; i < NUM_CH; i++) test_data[i] = DATA_W'($urandom);
      #1;
      chn = CH_W'($urandom_range(0, NUM_CH - 1)); #1;
      check(sel_data == prev[chn], "value changed before the clock");
      @(posedge clk); #1;
      for (int c = 0; c < NUM_CH; c++) begin
        chn = CH_W'(c); #1;
        check(sel_data == test_data[c],
              $sformatf("round %0d chn %0d: got %h want %h", round, c, sel_data, test_data[c]));
        check(ch_active == NUM_CH'(1) << c,
              $sformatf("round %0d chn %0d: ch_active %b", round, c, ch_active));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
