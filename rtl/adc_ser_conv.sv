// adc_ser_conv: serial output module of the ADS7824 simulator core.
//
// Sends the 12-bit result most significant bit first on `sdata`, with a
// data clock `dataclk` generated here. A `start` pulse (accepted while idle)
// loads `data_in` into a shift register, raises `busy` and starts the data
// clock. Each dataclk period is 2*HALF clocks, low first and then high;
// `sdata` changes only as dataclk falls, so it is stable at every rising
// dataclk edge. A bit counter ends the transfer after W dataclk periods;
// busy then falls and dataclk stays low.
//
// Interface: clk, synchronous active-high rst, start (pulse), data_in;
// sdata, dataclk, busy.
// Timing: busy is high for exactly W*2*HALF clocks, starting the clock after
// start. sdata carries bit W-1 from the first busy clock; bit k is sampled
// at the (W-k)-th rising edge of dataclk.
//
// The shift register and counter structure follows the design. Its helper
// blocks are not specified; the clock divider, the bit counter and the edge
// alignment of sdata are this implementation's choices, as are the default
// HALF of 1 clock.
module adc_ser_conv
  import adc_sim_pkg::*;
#(
  parameter int unsigned W    = DATA_W,
  parameter int unsigned HALF = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] data_in,
  output logic         sdata,
  output logic         dataclk,
  output logic         busy
);
  localparam int unsigned HW = (HALF < 2) ? 1 : $clog2(HALF);
  localparam int unsigned BCW = $clog2(W);

  logic [W-1:0]   shreg;
  logic [HW-1:0]  div_cnt;
  logic [BCW-1:0] bit_cnt;
  logic           half_end;

  assign half_end = (div_cnt == HW'(HALF - 1));
  assign sdata    = shreg[W-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg   <= '0;
      div_cnt <= '0;
      bit_cnt <= '0;
      dataclk <= 1'b0;
      busy    <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        shreg   <= data_in;
        div_cnt <= '0;
        bit_cnt <= '0;
        dataclk <= 1'b0;
        busy    <= 1'b1;
      end
    end else if (half_end) begin
      div_cnt <= '0;
      dataclk <= !dataclk;
      if (dataclk) begin
        // Falling data-clock edge: move to the next bit or finish.
        if (bit_cnt == BCW'(W - 1)) begin
          busy <= 1'b0;
        end else begin
          bit_cnt <= bit_cnt + 1'b1;
          shreg   <= {shreg[W-2:0], 1'b0};
        end
      end
    end else begin
      div_cnt <= div_cnt + 1'b1;
    end
  end

  // The data clock runs only during a transfer.
  a_idle_clock_low: assert property (@(posedge clk) disable iff (rst) !busy |-> !dataclk);

  initial assert (HALF >= 1 && W >= 2) else $error("adc_ser_conv: bad parameters");
endmodule
