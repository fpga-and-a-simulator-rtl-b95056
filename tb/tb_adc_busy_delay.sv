// tb_adc_busy_delay: self-checking test of the conversion-time delay helper.
//
// Runs the helper at DELAY = 5 and at the default, pulses start, and counts
// the clocks busy stays high, which must equal DELAY; done must pulse once,
// on the last busy clock. A second start while busy must be ignored (the
// busy time does not stretch), and busy must be low after reset.
module tb_adc_busy_delay;
  logic clk = 1'b0;
  logic rst;
  logic start5, startd;
  logic busy5, done5, busyd, doned;
  int checks = 0, failures = 0;

  adc_busy_delay #(.DELAY(5)) dut5 (.clk, .rst, .start(start5), .busy(busy5), .done(done5));
  adc_busy_delay              dutd (.clk, .rst, .start(startd), .busy(busyd), .done(doned));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pulse start, optionally pulse it again `again` clocks later, and measure.
  task automatic run(input bit which, input int expect_len, input int again);
    int len, dones;
    len = 0; dones = 0;
    if (which) startd = 1'b1; else start5 = 1'b1;
    @(posedge clk); #1;
    startd = 1'b0; start5 = 1'b0;
    for (int t = 0; t < 100; t++) begin
      if (t == again) begin
        if (which) startd = 1'b1; else start5 = 1'b1;
      end
      if (!(which ? busyd : busy5)) break;
      len++;
      if (which ? doned : done5) begin
        dones++;
        check(len == expect_len, $sformatf("done on busy clock %0d", len));
      end
      @(posedge clk); #1;
      startd = 1'b0; start5 = 1'b0;
    end
    check(len == expect_len, $sformatf("busy lasted %0d clocks, want %0d", len, expect_len));
    check(dones == 1, $sformatf("done pulsed %0d times", dones));
    check(!(which ? doned : done5), "done high while idle");
  endtask

  initial begin
    rst = 1'b1; start5 = 1'b0; startd = 1'b0;
    repeat (2) @(posedge clk); #1;
    check(!busy5 && !busyd, "busy after reset");
    rst = 1'b0;
    @(posedge clk); #1;
    for (int k = 0; k < 10; k++) begin
      run(1'b0, 5, (k % 2) ? 2 : -1);
      repeat ($urandom_range(0, 3)) @(posedge clk); #1;
      run(1'b1, 8, (k % 2) ? 3 : -1);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
