// adc_busy_delay: conversion-time delay generator of the parallel path.
//
// Produces the BUSY_PAR signal that marks a simulated conversion. A one-clock
// `start` pulse, accepted only while idle, raises `busy` on the next clock and
// holds it for exactly DELAY clocks; `done` pulses for one clock together
// with the last busy clock. Starts that arrive while busy are ignored.
//
// Interface: clk, synchronous active-high rst, start (pulse), busy, done.
// Timing: busy is high for the DELAY clocks following the start clock.
//
// That a helper module generates BUSY_PAR by delaying is the design's; the
// down-counter and the default DELAY of 8 clocks are this implementation's
// choice, as the conversion time in clocks is not specified.
module adc_busy_delay #(
  parameter int unsigned DELAY = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic busy,
  output logic done
);
  localparam int unsigned CW = (DELAY < 2) ? 1 : $clog2(DELAY);

  logic [CW-1:0] remain;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      remain <= '0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        remain <= CW'(DELAY - 1);
      end
    end else if (remain == '0) begin
      busy <= 1'b0;
    end else begin
      remain <= remain - 1'b1;
    end
  end

  assign done = busy && (remain == '0);

  initial assert (DELAY >= 1) else $error("adc_busy_delay: DELAY must be at least 1");
endmodule
