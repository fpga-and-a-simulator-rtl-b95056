// adc_chan_select: data channel selection of the ADS7824 simulator core.
//
// Stands in for the analog input multiplexer of the converter. Each of the
// NUM_CH test-data inputs is captured in a DATA_W-bit register on every clock.
// A multiplexer driven by the channel address `chn` passes the register of the
// addressed channel to `sel_data`, and a decoder working in parallel with it
// raises the one bit of `ch_active` that belongs to that channel.
//
// Interface: clk, synchronous active-high rst (clears the registers);
// test_data[i] is channel i (A=0 .. D=3); chn selects the channel.
// Timing: sel_data follows a test-data input one clock later (register
// stage); chn acts combinationally on sel_data and ch_active.
//
// The four registers, the multiplexer and the decoder are the structure the
// design calls for. Using a binary 2-bit channel address (like the A1/A0
// address pins of the ADS7824) and a synchronous reset are choices of this
// implementation.
module adc_chan_select
  import adc_sim_pkg::*;
#(
  parameter int unsigned N_CH = NUM_CH,
  parameter int unsigned W    = DATA_W
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [N_CH-1:0][W-1:0]      test_data,
  input  logic [$clog2(N_CH)-1:0]     chn,
  output logic [W-1:0]                sel_data,
  output logic [N_CH-1:0]             ch_active
);
  logic [N_CH-1:0][W-1:0] ch_reg;

  // Channel registers.
  always_ff @(posedge clk) begin
    if (rst) ch_reg <= '0;
    else     ch_reg <= test_data;
  end

  // Multiplexer.
  assign sel_data = ch_reg[chn];

  // Decoder.
  always_comb begin
    ch_active      = '0;
    ch_active[chn] = 1'b1;
  end
endmodule
