// adc_ic_sim_1: ADS7824 analog-to-digital converter simulator core (top).
//
// Lets an FPGA design that talks to an ADS7824 be tested with no converter
// present. The four analog inputs are replaced by four 12-bit test-data
// inputs (channels A to D); every other pin behaves like the converter's
// control and data pins, so the design under test can later be wired to the
// real part's pins unchanged.
//
// Structure: adc_chan_select registers the four test inputs and picks the
// channel addressed by `chn`. adc_conv_start turns cs_n/rc_n both low into a
// start pulse, which goes to the parallel module (adc_par_conv) when
// par_ser is high or to the serial module (adc_ser_conv) when it is low.
// adc_busy_mux drives busy_n from the busy flag of the selected module.
//
// Interface (all synchronous to clk, synchronous active-high rst):
//   test_data_in_a..d  12-bit stand-ins for the analog inputs
//   chn                channel address (0 = A .. 3 = D)
//   par_ser            1 = parallel output, 0 = serial output
//   cs_n, rc_n         chip select and read/convert; both low starts a
//                      conversion, cs_n low with rc_n high reads the bus
//   byte_sel           0 = bus carries bits 11..4, 1 = bits 3..0 (upper nibble)
//   data_out, data_oe  8-bit parallel bus and its enable (bus is 0 when off)
//   sdata, dataclk     serial data, MSB first, stable at rising dataclk
//   busy_n             low during a conversion (parallel) or transfer (serial)
//   ch_active          one-hot flag of the addressed channel
// Timing: the selected input is sampled at the start pulse, which comes one
// clock after the test data was registered. Parallel: busy_n is low for
// CONV_DELAY clocks. Serial: busy_n is low for 12*2*SER_HALF clocks while
// the 12 bits are shifted out.
//
// The split into channel selection, parallel and serial modules and a busy
// multiplexer, the four 12-bit test inputs, the 8-bit two-byte bus and the
// BYTE, PAR/SER, CS and RC pins follow the design. Pin polarities follow the
// ADS7824; clock counts are this implementation's choice.
module adc_ic_sim_1
  import adc_sim_pkg::*;
#(
  parameter int unsigned CONV_DELAY = 8,
  parameter int unsigned SER_HALF   = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] test_data_in_a,
  input  logic [DATA_W-1:0] test_data_in_b,
  input  logic [DATA_W-1:0] test_data_in_c,
  input  logic [DATA_W-1:0] test_data_in_d,
  input  logic [CH_W-1:0]   chn,
  input  logic              par_ser,
  input  logic              cs_n,
  input  logic              rc_n,
  input  logic              byte_sel,
  output logic [BUS_W-1:0]  data_out,
  output logic              data_oe,
  output logic              sdata,
  output logic              dataclk,
  output logic              busy_n,
  output logic [NUM_CH-1:0] ch_active
);
  out_mode_e                     mode;
  logic [NUM_CH-1:0][DATA_W-1:0] test_data;
  logic [DATA_W-1:0]             sel_data;
  logic                          start, busy_par, busy_ser;

  assign mode      = out_mode_e'(par_ser);
  assign test_data = {test_data_in_d, test_data_in_c, test_data_in_b, test_data_in_a};

  adc_chan_select u_chan (
    .clk      (clk),
    .rst      (rst),
    .test_data(test_data),
    .chn      (chn),
    .sel_data (sel_data),
    .ch_active(ch_active)
  );

  adc_conv_start u_start (
    .clk  (clk),
    .rst  (rst),
    .cs_n (cs_n),
    .rc_n (rc_n),
    .start(start)
  );

  adc_par_conv #(.DELAY(CONV_DELAY)) u_par (
    .clk     (clk),
    .rst     (rst),
    .start   (start && mode == MODE_PARALLEL),
    .data_in (sel_data),
    .rd_en   (mode == MODE_PARALLEL && !cs_n && rc_n),
    .byte_sel(byte_sel),
    .data_bus(data_out),
    .data_oe (data_oe),
    .busy    (busy_par)
  );

  adc_ser_conv #(.HALF(SER_HALF)) u_ser (
    .clk    (clk),
    .rst    (rst),
    .start  (start && mode == MODE_SERIAL),
    .data_in(sel_data),
    .sdata  (sdata),
    .dataclk(dataclk),
    .busy   (busy_ser)
  );

  adc_busy_mux u_busy (
    .mode    (mode),
    .busy_par(busy_par),
    .busy_ser(busy_ser),
    .busy_n  (busy_n)
  );
endmodule
