// tb_adc_ic_sim_1: end-to-end test of the ADS7824 simulator core.
//
// Plays the part of the FPGA design that reads the converter. The four test
// inputs carry 0xABC, 0xBCD, 0xCDE and 0xDEF (channels A to D) and later
// random values. For every channel the host:
//   - in parallel mode starts a conversion (with CS falling while RC is low,
//     or with RC falling while CS is low), times busy_n, then reads the bus
//     with BYTE low and high and rebuilds the 12-bit result;
//   - in serial mode starts a conversion and shifts sdata in on each rising
//     dataclk edge, timing busy_n.
// Results are compared with the value on the addressed test input at the
// start of the conversion; the input is changed during conversions to prove
// it is sampled. A repeated start during a busy period must be ignored. The
// core runs with its default parameters. Each mechanism (parallel and
// serial transfers, both bytes, start by CS and by RC, ignored start,
// channel switch) is counted and must occur at least once.
module tb_adc_ic_sim_1;
  import adc_sim_pkg::*;
  localparam int unsigned CONV_DELAY = 8;   // core defaults
  localparam int unsigned SER_HALF   = 1;

  logic              clk = 1'b0;
  logic              rst;
  logic [DATA_W-1:0] test_data_in_a, test_data_in_b, test_data_in_c, test_data_in_d;
  logic [CH_W-1:0]   chn;
  logic              par_ser, cs_n, rc_n, byte_sel;
  logic [BUS_W-1:0]  data_out;
  logic              data_oe, sdata, dataclk, busy_n;
  logic [NUM_CH-1:0] ch_active;
  int checks = 0, failures = 0;
  int n_par = 0, n_ser = 0, n_hi = 0, n_lo = 0, n_cs = 0, n_rc = 0, n_ignored = 0, n_chsw = 0;

  adc_ic_sim_1 dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] input_of(input int ch);
    case (ch)
      0:       return test_data_in_a;
      1:       return test_data_in_b;
      2:       return test_data_in_c;
      default: return test_data_in_d;
    endcase
  endfunction

  // Select a channel and let the channel registers settle.
  task automatic select(input int ch);
    if (chn != CH_W'(ch)) n_chsw++;
    chn = CH_W'(ch);
    @(posedge clk); #1;
    check(ch_active == NUM_CH'(1) << ch, $sformatf("ch_active %b for channel %0d", ch_active, ch));
    @(posedge clk); #1;
  endtask

  // Bring CS and RC low (one of them last), for one clock.
  task automatic start_conv(input bit by_cs);
    if (by_cs) begin rc_n = 1'b0; n_cs++; end
    else       begin cs_n = 1'b0; n_rc++; end
    @(posedge clk); #1;
    cs_n = 1'b0; rc_n = 1'b0;
    check(busy_n, "busy before start");
  endtask

  // Count busy_n low clocks; optionally retrigger a start during the busy time.
  task automatic wait_busy(input int want, input bit retrigger, input int ch);
    int len;
    len = 0;
    @(posedge clk); #1;
    cs_n = 1'b1; rc_n = 1'b1;
    // The input changes during conversion; the sampled value must be kept.
    case (ch)
      0: test_data_in_a = ~test_data_in_a;
      1: test_data_in_b = ~test_data_in_b;
      2: test_data_in_c = ~test_data_in_c;
      default: test_data_in_d = ~test_data_in_d;
    endcase
    while (!busy_n && len < 1000) begin
      len++;
      if (retrigger && len == 2) begin cs_n = 1'b0; rc_n = 1'b0; n_ignored++; end
      if (retrigger && len == 3) begin cs_n = 1'b1; rc_n = 1'b1; end
      @(posedge clk); #1;
    end
    cs_n = 1'b1; rc_n = 1'b1;
    check(len == want, $sformatf("busy_n low for %0d clocks, want %0d", len, want));
  endtask

  task automatic parallel_read(input int ch, input bit by_cs, input bit retrigger);
    logic [DATA_W-1:0] want, got;
    par_ser = 1'b1;
    select(ch);
    want = input_of(ch);
    start_conv(by_cs);
    wait_busy(CONV_DELAY, retrigger, ch);
    cs_n = 1'b0; byte_sel = 1'b0; #1;
    check(data_oe, "bus not enabled on read");
    got[11:4] = data_out; n_hi++;
    @(posedge clk); #1;
    byte_sel = 1'b1; #1;
    check(data_out[3:0] == 4'b0000, "low byte padding");
    got[3:0] = data_out[7:4]; n_lo++;
    @(posedge clk); #1;
    cs_n = 1'b1; byte_sel = 1'b0; #1;
    check(!data_oe, "bus enabled without CS");
    check(got == want, $sformatf("parallel ch %0d: got %h want %h", ch, got, want));
    n_par++;
  endtask

  task automatic serial_read(input int ch, input bit by_cs, input bit retrigger);
    logic [DATA_W-1:0] want, got;
    int len, edges;
    logic dck_q;
    par_ser = 1'b0;
    select(ch);
    want = input_of(ch);
    start_conv(by_cs);
    @(posedge clk); #1;
    cs_n = 1'b1; rc_n = 1'b1;
    got = '0; len = 0; edges = 0; dck_q = 1'b0;
    while (!busy_n && len < 1000) begin
      len++;
      if (dataclk && !dck_q) begin
        edges++;
        got = {got[DATA_W-2:0], sdata};
      end
      if (retrigger && len == 4) begin cs_n = 1'b0; rc_n = 1'b0; n_ignored++; end
      if (retrigger && len == 5) begin cs_n = 1'b1; rc_n = 1'b1; end
      dck_q = dataclk;
      @(posedge clk); #1;
    end
    check(len == DATA_W * 2 * SER_HALF, $sformatf("serial busy %0d clocks", len));
    check(edges == DATA_W, $sformatf("%0d dataclk edges", edges));
    check(got == want, $sformatf("serial ch %0d: got %h want %h", ch, got, want));
    n_ser++;
  endtask

  initial begin
    rst = 1'b1; chn = '0; par_ser = 1'b1; cs_n = 1'b1; rc_n = 1'b1; byte_sel = 1'b0;
    test_data_in_a = 12'hABC; test_data_in_b = 12'hBCD;
    test_data_in_c = 12'hCDE; test_data_in_d = 12'hDEF;
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;
    check(busy_n, "busy after reset");
    // The demonstration values on all four channels, both output modes.
    for (int ch = 0; ch < NUM_CH; ch++) begin
      test_data_in_a = 12'hABC; test_data_in_b = 12'hBCD;
      test_data_in_c = 12'hCDE; test_data_in_d = 12'hDEF;
      parallel_read(ch, ch[0], 1'b0);
      test_data_in_a = 12'hABC; test_data_in_b = 12'hBCD;
      test_data_in_c = 12'hCDE; test_data_in_d = 12'hDEF;
      serial_read(ch, !ch[0], 1'b0);
    end
    // Random values, random channels and modes, some retriggered starts.
    for (int n = 0; n < 60; n++) begin
      test_data_in_a = DATA_W'($urandom); test_data_in_b = DATA_W'($urandom);
      test_data_in_c = DATA_W'($urandom); test_data_in_d = DATA_W'($urandom);
      if ($urandom_range(0, 1))
        parallel_read($urandom_range(0, NUM_CH - 1), 1'($urandom), (n % 3) == 0);
      else
        serial_read($urandom_range(0, NUM_CH - 1), 1'($urandom), (n % 3) == 0);
    end
    $display("mechanisms: parallel=%0d serial=%0d high_byte=%0d low_byte=%0d start_cs=%0d start_rc=%0d ignored_start=%0d channel_switch=%0d",
             n_par, n_ser, n_hi, n_lo, n_cs, n_rc, n_ignored, n_chsw);
    check(n_par > 0 && n_ser > 0 && n_hi > 0 && n_lo > 0 && n_cs > 0 && n_rc > 0
          && n_ignored > 0 && n_chsw > 0, "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
