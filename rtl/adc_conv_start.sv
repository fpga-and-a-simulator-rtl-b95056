// adc_conv_start: conversion-start detector of the ADS7824 simulator core.
//
// A conversion is requested while chip select (cs_n) and read/convert
// (rc_n) are both low, so either signal may be the one that starts it. The
// detector registers that request and emits a one-clock `start` pulse on the
// clock where it becomes true.
//
// Interface: clk, synchronous active-high rst, cs_n, rc_n; start.
// Timing: start is combinational from the inputs and the registered request:
// it is high in the first clock cycle in which both inputs are low.
//
// That CS or RC starts the operation is the design's; the pulse form and the
// assumption that both inputs are synchronous to clk are this
// implementation's choices.
module adc_conv_start (
  input  logic clk,
  input  logic rst,
  input  logic cs_n,
  input  logic rc_n,
  output logic start
);
  logic req, req_q;

  assign req = !cs_n && !rc_n;

  always_ff @(posedge clk) begin
    if (rst) req_q <= 1'b0;
    else     req_q <= req;
  end

  assign start = req && !req_q;
endmodule
