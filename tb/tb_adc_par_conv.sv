// tb_adc_par_conv: self-checking test of the parallel output module.
//
// For many random 12-bit inputs: pulses start, changes the input during the
// conversion (the module must keep the value sampled at start), checks that
// busy lasts DELAY clocks with the bus disabled, then reads the result with
// byte_sel low (expects bits 11..4) and high (expects bits 3..0 followed by
// four zeros). Also checks that the bus is zero and disabled when rd_en is low.
module tb_adc_par_conv;
  import adc_sim_pkg::*;
  localparam int unsigned DELAY = 8;

  logic               clk = 1'b0;
  logic               rst, start, rd_en, byte_sel;
  logic [DATA_W-1:0]  data_in;
  logic [BUS_W-1:0]   data_bus;
  logic               data_oe, busy;
  int checks = 0, failures = 0;

  adc_par_conv #(.DELAY(DELAY)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] v;
    int len;
    rst = 1'b1; start = 1'b0; rd_en = 1'b0; byte_sel = 1'b0; data_in = '0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    for (int n = 0; n < 100; n++) begin
      v = DATA_W'($urandom);
      if (n == 0) v = 12'hABC;
      data_in = v;
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      data_in = ~v;
      rd_en = 1'b1;
      len = 0;
      while (busy && len < 100) begin
        len++;
        check(!data_oe && data_bus == '0, "bus enabled during conversion");
        @(posedge clk); #1;
      end
      check(len == DELAY, $sformatf("conversion took %0d clocks, want %0d", len, DELAY));
      byte_sel = 1'b0; #1;
      check(data_oe, "bus not enabled for read");
      check(data_bus == v[11:4], $sformatf("high byte %h want %h", data_bus, v[11:4]));
      byte_sel = 1'b1; #1;
      check(data_bus == {v[3:0], 4'b0000}, $sformatf("low byte %h want %h", data_bus, {v[3:0], 4'b0}));
      rd_en = 1'b0; #1;
      check(!data_oe && data_bus == '0, "bus enabled without read");
      byte_sel = 1'b0;
      repeat ($urandom_range(0, 2)) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
