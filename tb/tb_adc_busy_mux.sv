// tb_adc_busy_mux: self-checking test of the BUSY multiplexer.
//
// Applies all eight combinations of mode and the two busy inputs and checks
// that busy_n is the inverse of the busy flag of the selected path.
module tb_adc_busy_mux;
  import adc_sim_pkg::*;

  out_mode_e mode;
  logic      busy_par, busy_ser, busy_n;
  int checks = 0, failures = 0;

  adc_busy_mux dut (.*);

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic want;
    for (int i = 0; i < 8; i++) begin
      mode     = out_mode_e'(i[2]);
      busy_par = i[1];
      busy_ser = i[0];
      #1;
      want = (mode == MODE_PARALLEL) ? !busy_par : !busy_ser;
      checks++;
      if (busy_n !== want) begin
        failures++;
        $display("FAIL: mode %0d par %0d ser %0d -> busy_n %0d", mode, busy_par, busy_ser, busy_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
