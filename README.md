# ADS7824 simulator core

An FPGA design that reads an analog-to-digital converter is hard to test
without the converter: the analog side cannot be simulated, and a bench setup
hides the bus timing. This core takes the converter's place. It has the
control and data pins of the TI/Burr-Brown ADS7824 (a 12-bit, four-channel
converter with an 8-bit parallel bus and a serial output) and four 12-bit
digital inputs, `test_data_in_a` to `test_data_in_d`, that stand for the four
analog channels. A design under test is wired to the core, exercised in
simulation or on the FPGA, and afterwards wired to the pins of the real
converter without change.

The core is a teaching example: each part is small and shows one idea of
digital design (a register bank with multiplexer and decoder, a delay counter,
byte-wise bus transfer, parallel-to-serial conversion with a shift register).

## Structure

```
 test_data_in_a..d ──► adc_chan_select ──sel_data──┬──► adc_par_conv ──► data_out, data_oe
 chn ───────────────►  (4 regs, mux, decoder)      │     └ adc_busy_delay (busy_par)
                         └► ch_active              └──► adc_ser_conv ──► sdata, dataclk
 cs_n, rc_n ──► adc_conv_start ──start──(par_ser selects which module gets it)
 par_ser ─────► adc_busy_mux (busy_par / busy_ser) ──► busy_n
```

| file | role |
|---|---|
| `rtl/adc_sim_pkg.sv` | widths (12-bit data, 8-bit bus, 4 channels) and the output-mode type |
| `rtl/adc_chan_select.sv` | channel registers, channel multiplexer, address decoder |
| `rtl/adc_conv_start.sv` | turns "cs_n and rc_n both low" into a one-clock start pulse |
| `rtl/adc_busy_delay.sv` | conversion-time counter that produces the parallel busy flag |
| `rtl/adc_par_conv.sv` | holds the result and hands it out in two bytes |
| `rtl/adc_ser_conv.sv` | shift register, bit counter and data-clock generator |
| `rtl/adc_busy_mux.sv` | drives the single BUSY pin from the active output path |
| `rtl/adc_ic_sim_1.sv` | top level |

Everything runs on one clock `clk` with a synchronous, active-high `rst`. The
control inputs are taken to be synchronous to `clk` (in the intended use they
come from logic in the same FPGA); add synchronisers if they do not.

## Pins of the top, `adc_ic_sim_1`

| pin | dir | width | meaning |
|---|---|---|---|
| `test_data_in_a..d` | in | 12 | digital stand-ins for analog channels A to D |
| `chn` | in | 2 | channel address, 0 = A … 3 = D |
| `par_ser` | in | 1 | 1 = parallel output, 0 = serial output |
| `cs_n` | in | 1 | chip select, active low |
| `rc_n` | in | 1 | read/convert: low (with `cs_n` low) converts, high (with `cs_n` low) reads |
| `byte_sel` | in | 1 | which half of the result is on the bus |
| `data_out` | out | 8 | parallel bus; reads as zero when not enabled |
| `data_oe` | out | 1 | high when `data_out` carries data (there is no tri-state) |
| `sdata`, `dataclk` | out | 1, 1 | serial result and its clock |
| `busy_n` | out | 1 | low while a conversion (parallel) or transfer (serial) runs |
| `ch_active` | out | 4 | one-hot flag of the addressed channel |

Parameters: `CONV_DELAY` (default 8) is the simulated conversion time in
clocks; `SER_HALF` (default 1) is half a `dataclk` period in clocks.

## Channel selection

`adc_chan_select` registers all four test inputs on every clock. A 4-to-1
multiplexer driven by `chn` passes the addressed register on as `sel_data`,
and a 2-to-4 decoder driven by the same address raises one bit of
`ch_active`. Changing a test input therefore reaches the converter one clock
later; changing `chn` acts at once. Allow two clocks between changing `chn`
and starting a conversion if the test inputs change at the same time.

## Starting a conversion

A conversion starts in the first clock in which `cs_n` and `rc_n` are both
low, whichever of the two went low last; `adc_conv_start` makes a one-clock
pulse of that moment. The pulse goes only to the output path chosen by
`par_ser`. At the pulse the selected channel value is sampled, so the test
input may change freely during the conversion. A start that arrives while the
chosen path is still busy is ignored; to start again, raise `cs_n` or `rc_n`
and lower it once `busy_n` is high.

## Parallel output: two bytes on an 8-bit bus

With `par_ser` high the start pulse goes to `adc_par_conv`. Its helper
`adc_busy_delay` is a down-counter that holds the parallel busy flag high for
exactly `CONV_DELAY` clocks, starting the clock after the start pulse; on the
last of them the sampled value becomes the new result. `busy_n` is low for
those clocks.

The 12-bit result does not fit the 8-bit bus, so it is read in two parts.
With `cs_n` low and `rc_n` high (a read) and no conversion running,
`data_oe` is high and:

| `byte_sel` | `data_out[7:4]` | `data_out[3:0]` |
|---|---|---|
| 0 | result[11:8] | result[7:4] |
| 1 | result[3:0] | 0000 |

`byte_sel` acts combinationally, so both bytes can be read in consecutive
clocks of one read. The result stays until the next parallel conversion ends.
Reading during a conversion gives `data_oe` low and a zero bus.

Example: channel C holds 0xCDE; the reads return 0xCD and 0xE0.

## Serial output

With `par_ser` low the start pulse goes to `adc_ser_conv`, which loads the
sampled value into a 12-bit shift register and runs a data clock:

```
clk      _|‾|_|‾|_|‾|_|‾|_|‾|_ ...
busy_n   ‾‾‾\_______________________ ... (12 × 2 × SER_HALF clocks) ‾‾
dataclk  ________|‾‾‾|___|‾‾‾|___ ...   (SER_HALF clocks low, then high)
sdata    ====[ bit 11  ][ bit 10 ]= ...
```

Each `dataclk` period is low first, then high. `sdata` changes only as
`dataclk` falls, so a receiver samples it on the rising edge; the first
rising edge carries bit 11 (MSB first). A 4-bit counter stops the transfer
after the twelfth period: `busy_n` returns high and `dataclk` stays low. With
the defaults a transfer takes 24 clocks. In serial mode the parallel bus
stays disabled.

## BUSY

`adc_busy_mux` is a 2-to-1 multiplexer: `busy_n` is the inverted busy flag of
the parallel path when `par_ser` is high and of the serial path when it is
low. Switching `par_ser` during a transfer therefore switches which flag
`busy_n` shows.

## How closely this follows the ADS7824

The module split, the four 12-bit test inputs, the two-read 8-bit bus (bits
11..4 with BYTE low, bits 3..0 with BYTE high), the start by CS or R/C, the
delay counter for the parallel busy flag, the shift-register-and-counter
serial path and the busy multiplexer are the design's. The following are
this implementation's own choices, made where the design leaves the detail
open:

- Pin polarities follow the ADS7824: CS and R/C active low, BUSY low while
  busy, PAR/SER high for parallel.
- The channel address is 2 bits wide, like the ADS7824's A1/A0 pins.
- The conversion time (`CONV_DELAY` = 8 clocks) and the data-clock rate
  (`SER_HALF` = 1) are arbitrary; the real part takes microseconds.
- Bits 3..0 appear in the upper nibble of the bus with zeros below, as on
  the ADS7824.
- The serial path sends MSB first with its own data clock and sends the value
  of the conversion just started. The real part's serial timing (external
  clock option, output of the previous result during conversion, the
  CONTC and EXT/INT pins) is not modelled.
- There is no tri-state: `data_out` is zero with `data_oe` low when not read.
- Resets are synchronous and clear all registers.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/adc_sim_pkg.sv \
    tb/tb_adc_ic_sim_1.sv --top-module tb_adc_ic_sim_1 -Mdir obj -o sim
./obj/sim
```

`tb_adc_ic_sim_1` runs the core at its default parameters. It loads 0xABC,
0xBCD, 0xCDE and 0xDEF on channels A to D, reads every channel in parallel
mode (both bytes) and in serial mode, then runs 60 random conversions on
random channels and modes. It checks the values, the `busy_n` length (8
clocks parallel, 24 serial), the number of `dataclk` edges and `ch_active`,
changes the input during each conversion to check that the sampled value is
kept, and retriggers some starts to check that they are ignored. It prints how
often each mechanism occurred: parallel and serial transfers, high and low
bytes, start by CS and by RC, ignored starts and channel switches. The unit
testbenches `tb_adc_chan_select`, `tb_adc_busy_delay`, `tb_adc_par_conv`,
`tb_adc_ser_conv` and `tb_adc_busy_mux` test each part alone, at the default
sizes and, where a delay is a parameter, at one other value.

The RTL uses only `logic`, `always_ff`/`always_comb`, a package and an enum,
and synthesises to about 100 flip-flops.
