// tb_adc_ser_conv: self-checking test of the serial output module.
//
// Runs the module with HALF = 1 and HALF = 3. For random 12-bit values it
// pulses start, then samples sdata at every rising edge of dataclk, as a
// receiving shift register would, and rebuilds the word MSB first. Checks
// the rebuilt word, the number of dataclk edges (12), that sdata never
// changes while dataclk is high, and that busy lasts 12*2*HALF clocks.
module tb_adc_ser_conv;
  import adc_sim_pkg::*;

  logic              clk = 1'b0;
  logic              rst;
  logic              start1, start3;
  logic [DATA_W-1:0] data_in;
  logic              sdata1, dataclk1, busy1, sdata3, dataclk3, busy3;
  int checks = 0, failures = 0;

  adc_ser_conv #(.HALF(1)) dut1 (.clk, .rst, .start(start1), .data_in,
                                 .sdata(sdata1), .dataclk(dataclk1), .busy(busy1));
  adc_ser_conv #(.HALF(3)) dut3 (.clk, .rst, .start(start3), .data_in,
                                 .sdata(sdata3), .dataclk(dataclk3), .busy(busy3));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit slow, input logic [DATA_W-1:0] v);
    logic [DATA_W-1:0] got;
    int len, edges;
    logic dck_q, sd_q;
    int half;
    half = slow ? 3 : 1;
    data_in = v;
    if (slow) start3 = 1'b1; else start1 = 1'b1;
    @(posedge clk); #1;
    start1 = 1'b0; start3 = 1'b0;
    data_in = DATA_W'($urandom);
    got = '0; len = 0; edges = 0;
    dck_q = 1'b0; sd_q = slow ? sdata3 : sdata1;
    while ((slow ? busy3 : busy1) && len < 1000) begin
      len++;
      if ((slow ? dataclk3 : dataclk1) && !dck_q) begin
        edges++;
        got = {got[DATA_W-2:0], slow ? sdata3 : sdata1};
      end
      if (dck_q && (slow ? dataclk3 : dataclk1))
        check((slow ? sdata3 : sdata1) == sd_q, "sdata changed while dataclk high");
      dck_q = slow ? dataclk3 : dataclk1;
      sd_q  = slow ? sdata3 : sdata1;
      @(posedge clk); #1;
    end
    check(len == DATA_W * 2 * half, $sformatf("busy %0d clocks, want %0d", len, DATA_W * 2 * half));
    check(edges == DATA_W, $sformatf("%0d dataclk edges", edges));
    check(got == v, $sformatf("received %h want %h", got, v));
    check(!(slow ? dataclk3 : dataclk1), "dataclk high when idle");
  endtask

  initial begin
    rst = 1'b1; start1 = 1'b0; start3 = 1'b0; data_in = '0;
    repeat (2) @(posedge clk); #1;
    check(!busy1 && !busy3 && !dataclk1, "state after reset");
    rst = 1'b0;
    for (int n = 0; n < 40; n++) begin
      run(1'b0, (n == 0) ? 12'hABC : DATA_W'($urandom));
      run(1'b1, (n == 0) ? 12'hDEF : DATA_W'($urandom));
      repeat ($urandom_range(0, 2)) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
