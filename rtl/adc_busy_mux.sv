// adc_busy_mux: BUSY output multiplexer of the ADS7824 simulator core.
//
// The core has one BUSY pin but two output paths that each know when their
// transfer is running. This multiplexer passes the busy flag of the path
// chosen by the PAR/SER mode and drives it out with the converter's pin
// polarity: busy_n is low while the selected path is busy.
//
// Interface: mode (MODE_PARALLEL or MODE_SERIAL), busy_par, busy_ser; busy_n.
// Timing: purely combinational.
//
// Selecting the busy signal with a multiplexer is the design's; the
// active-low output (as on the ADS7824 BUSY pin) is this implementation's
// choice.
module adc_busy_mux
  import adc_sim_pkg::*;
(
  input  out_mode_e mode,
  input  logic      busy_par,
  input  logic      busy_ser,
  output logic      busy_n
);
  always_comb begin
    unique case (mode)
      MODE_PARALLEL: busy_n = !busy_par;
      default:       busy_n = !busy_ser;
    endcase
  end
endmodule
