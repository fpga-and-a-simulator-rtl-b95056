// adc_par_conv: parallel output module of the ADS7824 simulator core.
//
// Imitates how the converter hands its 12-bit result to a host over an 8-bit
// bus in two reads. A `start` pulse (accepted while idle) samples `data_in`,
// the selected channel, and starts a conversion-time delay in adc_busy_delay;
// `busy` is high meanwhile. When the delay ends the sample becomes the
// result. While `rd_en` is high and no conversion is running, the result is
// driven on `data_bus` and `data_oe` is high: with `byte_sel` low the bus
// carries result bits 11..4, with `byte_sel` high it carries bits 3..0.
//
// Interface: clk, synchronous active-high rst, start (pulse), data_in,
// rd_en (read strobe, level), byte_sel; data_bus, data_oe, busy.
// Timing: busy is high for DELAY clocks starting the clock after start; the
// new result is readable from the first clock with busy low. byte_sel acts
// combinationally on data_bus.
//
// The two-byte transfer (bits 11-4 with BYTE low, bits 3-0 with BYTE high)
// and the delay helper follow the design. Placing bits 3..0 in the upper
// nibble of the bus with zeros below (the ADS7824 arrangement), sampling the
// input at the start of the conversion, and a bus that reads as zero when
// not enabled (there is no tri-state in this core) are this implementation's
// choices.
module adc_par_conv
  import adc_sim_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned BW    = BUS_W,
  parameter int unsigned DELAY = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [W-1:0]  data_in,
  input  logic          rd_en,
  input  logic          byte_sel,
  output logic [BW-1:0] data_bus,
  output logic          data_oe,
  output logic          busy
);
  localparam int unsigned LOW_W = W - BW;   // bits sent in the second byte

  logic [W-1:0] sample;
  logic [W-1:0] result;
  logic         done;

  adc_busy_delay #(.DELAY(DELAY)) u_delay (
    .clk  (clk),
    .rst  (rst),
    .start(start),
    .busy (busy),
    .done (done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sample <= '0;
      result <= '0;
    end else begin
      if (start && !busy) sample <= data_in;
      if (done)           result <= sample;
    end
  end

  assign data_oe = rd_en && !busy;

  always_comb begin
    data_bus = '0;
    if (data_oe) begin
      if (!byte_sel) data_bus = result[W-1 -: BW];
      else           data_bus = {result[LOW_W-1:0], {(BW-LOW_W){1'b0}}};
    end
  end

  // The bus is never driven while a conversion runs.
  a_no_read_while_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !data_oe);

  initial assert (W > BW && W <= 2*BW)
    else $error("adc_par_conv: the result must fit in two bus transfers");
endmodule
