// adc_sim_pkg: constants shared by the ADS7824 simulator core.
//
// The simulated converter has four input channels, a 12-bit result and an
// 8-bit parallel data bus; these three numbers are those of the ADS7824 part
// the core imitates. The channel address width follows from the channel count.
package adc_sim_pkg;
  localparam int unsigned DATA_W = 12;              // conversion result width
  localparam int unsigned BUS_W  = 8;               // parallel data bus width
  localparam int unsigned NUM_CH = 4;               // number of input channels
  localparam int unsigned CH_W   = $clog2(NUM_CH);  // channel address width

  // Output mode, as set by the PAR/SER pin.
  typedef enum logic {
    MODE_SERIAL   = 1'b0,
    MODE_PARALLEL = 1'b1
  } out_mode_e;
endpackage
