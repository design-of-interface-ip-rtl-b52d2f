# Automotive I/O interface IPs for a Zynq-class SoC FPGA

A car's body controller has to read analog sensors, drive analog outputs
(audio, motor set-points, climate indicators) and watch buttons. This RTL
puts those jobs in the programmable logic next to an ARM processor. Each job
is a small IP with its own AXI4-Lite register map. The processor only starts
work, reads results and services interrupts. The serial converter traffic,
the sample buffering and the edge detection all run in the fabric.

There are four IPs:

| IP | What it does | External parts |
|----|--------------|----------------|
| **ADC IP** (`adc_ip`) | Runs two 16-bit SAR ADCs. Each run takes one sample or 1,000 samples, stored in a dual-port BRAM. Raises an interrupt at the end. | 2 x LTC2328-16 (±10.24 V) |
| **DAC IP** (`dac_ip`) | Drives twelve analog outputs: three quad DACs of four channels each. Outputs sine waveforms with set phase and amplitude from a table, a self-test constant, or fixed TEMP / GAS / AIR QUALITY levels. | 3 x LTC2664 (±10 V span) |
| **DI/O IP** (`dio_ip`) | Handles eight buttons with interrupts on both edges and two buttons whose press time is measured. Drives an 8-bit output register. | switches, LEDs |
| **Self-test IP** (`selftest_ip`) | Has its own two ADC and two DAC interfaces, plus 20 lines that steer four analog muxes on the board. With them, each converter IP can be checked end to end through the real chips. | 2 x ADC, 2 x DAC, 4 x 4:1 analog mux |

`automotive_io_top` joins them. Several parts stay outside this RTL: the
processor, its AXI BRAM controller and its interrupt controllers. The top
brings out their connections as ports:

- four AXI4-Lite slave ports (`*_axi_req` / `*_axi_rsp`, packed structs
  from `aio_pkg`);
- BRAM port B (`bram_b_*`), for the processor to read the samples;
- the two interrupt lines, `adc_irq` and `dio_irq`;
- every converter, button and mux pin.

Everything runs on one clock `clk`, with an active-low asynchronous reset
`rst_n`. The SPI timing and the DAC update rate are sized for a **100 MHz**
clock.

```
               +-------------------- automotive_io_top ---------------------+
 AXI (ADC) --->| adc_ip --2x adc_spi_if--> CNV/BUSY/SCK/SDO  (2 ADC chips)  |
 adc_irq  <----|   |port A                                                  |
 BRAM B   <--->| dp_bram (1024 x 32)                                        |
 AXI (DAC) --->| dac_ip --3x dac_spi_if--> CS_n/SCK/SDI      (3 DAC chips)  |
               |   |ROM port                                                |
               | wave_rom (1000 x 16, one sine period)                      |
 AXI (DI/O)--->| dio_ip <-- din[9:0]   --> dout[7:0]                        |
 dio_irq  <----|                                                            |
 AXI (ST)  --->| selftest_ip --2x adc_spi_if, 2x dac_spi_if, mux_sel[19:0]  |
               +------------------------------------------------------------+
```

## Register maps

Each IP decodes the word index, AXI byte address bits `[11:2]`. So register
1 is at byte offset 0x4, register 2 at 0x8, and so on. All registers are 32
bits wide. Writes honour `WSTRB`. Unused bits read as 0. Each slave handles
one read and one write at a time (`axil_slave`). A write is accepted in the
clock where AWVALID and WVALID are both high. BVALID follows one clock
later. RDATA is registered one clock after the read address is accepted.

**ADC IP**

| Word | Bits | Field |
|------|------|-------|
| 0 | 9 / 8 | ADC1 / ADC0 COMPLETE. Write 0 to clear, write 1 to keep. |
| 0 | 3:2 / 1:0 | ADC1 / ADC0 RUN MODE. 1 = SAMPLES reads, 2 = one read. Reads back 0 when idle. |

**DAC IP**

| Word | Bits | Field |
|------|------|-------|
| 0 | 31:16 | self-test data |
| 0 | 15:11 | mode: 0 = off, 1 and 2 = waveform modes, 31 = self-test |
| 0 | 10:0 | output setup: bit n enables DAC chip n (n = 0..2), bits 10:3 unused |
| 1 / 2 / 3 | 16 | TEMP / GAS / AIR QUALITY enable ("write" bit) |
| 1 / 2 / 3 | 15:0 | TEMP / GAS / AIR QUALITY code |

**DI/O IP**

| Word | Bits | Field |
|------|------|-------|
| 0 | 25:16 | interrupt flags. Bits 16..23 = inputs 1..8 (either edge), bits 24/25 = inputs 9/10 (release). Write 1 to clear. |
| 0 | 15:8 | digital output, drives `dout` |
| 0 | 7:0 | live state of inputs 1..8 (read only) |
| 1 | 31:0 | press time of input 9, in clocks |
| 2 | 31:0 | press time of input 10, in clocks |

**Self-test IP**

| Word | Bits | Field |
|------|------|-------|
| 0 | 19:0 | mux lines (see "Self-test loop-back") |
| 1 / 2 | 17 | ADC0 / ADC1 COMPLETE (write 0 to clear) |
| 1 / 2 | 16 | RUN: write 1 to convert once. Self-clears. |
| 1 / 2 | 15:0 | last result (read only) |
| 3 / 4 | 16 | DAC0 / DAC1 RUN: write 1 to send the data. Self-clears. |
| 3 / 4 | 15:0 | data |

## ADC acquisition

To start a channel, write run mode 1 or 2 into its field. Modes 0 and 3 do
nothing. A write to a channel that is already running is ignored. The
channel then loops through convert → store:

- `adc_spi_if` pulses CNV and waits for the chip's BUSY to rise and fall.
  BUSY passes a two-flop synchroniser. The interface then clocks 16 bits in,
  MSB first.
- The sample goes to BRAM port A at the channel's sample index. ADC0 uses
  bits 15:0 of the word and ADC1 uses bits 31:16, each written with byte
  enables. So word *n* holds sample *n* of both channels, and the processor
  reads pairs with 32-bit accesses.
- Mode 2 stores one sample at address 0 and overwrites it on every run.
  Mode 1 stores `SAMPLES` (default 1000) samples at addresses 0..999.

At the end of a run, the channel's COMPLETE bit is set and its run mode goes
back to 0. `irq` is the OR of both COMPLETE bits, so it stays high until
software has written 0 to each COMPLETE bit that is set.

Both channels share one BRAM write port. If both have a sample ready in the
same clock, ADC0 writes first and ADC1 one clock later. A channel starts its
next conversion only after its last sample is stored, so no sample is lost.

**Timing, at the defaults and with a 50-clock (500 ns) BUSY:** one
conversion takes BUSY + 3 + 31·`SCK_HALF` = 115 clocks. SCK runs at
clk/4 = 25 MHz. A 1000-sample run therefore takes about 117,000 clocks, or
1.17 ms at 100 MHz. Results are two's complement, at 3200 LSB per volt
(±10.24 V full scale). Inputs above +10.24 V saturate at 32767.

## DAC waveform generation

This is the most involved block. Every `SAMPLE_DIV` clocks (default 1000)
the DAC IP runs one **update round**:

1. **Fill.** For each channel c = 0..3, read the waveform ROM at that
   channel's address `acc[c]`. This takes four clocks plus one of ROM
   latency. Each entry is scaled to an offset-binary code:

   `code = 32768 + (entry × amp[c]) >>> 8`

   Here `entry` is a signed sine sample (±32767), `amp` is a Q8 fraction of
   the DAC's 20 V peak-to-peak span, and 32768 is 0 V.
2. **Send.** All three `dac_spi_if` instances start together. Each one sends
   its chip's channels 0, 1, 2, 3 in turn. Every frame is a 24-bit SPI
   frame `{command[3:0], channel[3:0], code[15:0]}`, using the
   write-and-update command (0011).
3. **Advance.** Each `acc[c]` moves forward by the mode's step, wrapping at
   the table length (1000).

`aio_pkg::wave_cfg` holds the **mode table**. For each channel it gives the
start address (the phase), the step (the frequency) and `amp` (the
amplitude). Writing a new mode reloads the start addresses, so the channels'
phase relations always hold from the first round:

| Mode | Ch 0 / 2 | Ch 1 / 3 |
|------|----------|----------|
| 1 | 7.2 Vpp (`amp` 92), 0° | 18.0 Vpp (`amp` 230), −68° (start 811) |
| 2 | 3.0 Vpp (`amp` 38), 0° | 7.2 Vpp (`amp` 92), +90° (start 250) |

Both modes use step 1. The frequency is f_clk / (`SAMPLE_DIV` × 1000 / step)
= 100 Hz at 100 MHz. To get another frequency, change the step. To get
another shape, phase or amplitude, add a row to `wave_cfg`. All three chips
get the same four channel waveforms.

Two other sources can replace the waveform:

- **Self-test mode (31)** sends the self-test data (bits 31:16) on every
  channel of every enabled chip.
- **TEMP, GAS and AIR QUALITY** levels go out on channels 0, 1 and 2 of chip
  2 whenever their enable bit is set. They override the mode and are sent
  even if chip 2 is disabled. In mode 0, only these channels are sent.

Send time at the defaults: a frame takes 48·`SCK_HALF` + `CS_GAP` + 1 = 101
clocks, so four frames take 404 clocks. That is well inside the 1000-clock
round. If a round falls due while the interfaces are still sending, that
round is skipped.

`wave_rom` stores one sine period of 1000 entries. It is computed at
elaboration with Bhaskara's integer rational approximation (see the file
header) and lies within 53 LSB (0.16 %) of an exact sine.

## DI/O interrupts and press-time counters

All ten inputs pass a two-flop synchroniser; there is no debouncing. Inputs
1..8 set their flag on every rising and falling edge. Inputs 9 and 10 count
clocks while they are high. On release, the count is latched into register 1
or 2 and the flag is set in that same clock. The count saturates at
2^32 − 1, which is 42.9 s at 100 MHz.

Flags stay set until written with 1. A new event in the same clock wins over
the clear. `irq` is the OR of all ten flags. So if software clears at once,
the line gives one short pulse per event.

## Self-test loop-back

The 20 mux lines form four 5-bit groups. Bits [3:0] of a group are the
one-hot select for mux inputs 0..3, and bit [4] is the mux enable:

| Bits | Mux routes |
|------|------------|
| 4:0 | DAC IP chip 0 channel → self-test ADC0 |
| 9:5 | DAC IP chip 1 channel → self-test ADC1 |
| 14:10 | self-test DAC0 channel → ADC IP ADC0 |
| 19:15 | self-test DAC1 channel → ADC IP ADC1 |

**Checking the DAC IP:**

1. Put it in self-test mode with known data D.
2. Select a channel on mux 0 or 1.
3. Write RUN to self-test ADC register 1 or 2.
4. Wait for COMPLETE, then compare the result with the expected code for D.

**Checking the ADC IP:**

1. Write data and RUN to self-test DAC register 3 or 4. The self-test DAC
   writes the data to all four channels of its chip, so any select works.
2. Route the DAC to the ADC IP through mux 2 or 3.
3. Run the ADC IP in mode 2 and read BRAM word 0.

The expected ADC code for a DAC code D is
`round((D − 32768) / 32768 × 10 V × 3200 LSB/V)`.

## What this RTL fills in

The original design description gives the block structure, the register
fields, the flowcharts, the SPI frame layout and the measured DAC outputs. It
leaves out a number of details, and this RTL chooses them as follows:

- **Not described, chosen here:** the clock frequency, the reset, the SPI
  timing values, the AXI variant (AXI4-Lite here) and word-index addressing.
- **LTC2664 command codes:** only the names are given. The data-sheet codes
  are used: 0000 write, 0001 update, 0011 write and update, 0100 power down.
- **ADC run modes:** taken from the flowchart. Mode 1 is the 1,000-read
  mode, mode 2 the single read.
- **BRAM packing:** the word layout ("two samples combined into one word")
  is read as one 16-bit lane per ADC at the same address.
- **Clearing flags:** COMPLETE bits are cleared by writing 0. DI/O flags are
  cleared by writing 1.
- **DAC output-setup field (bits 10:0):** undefined in the description. Here
  bits 2:0 are per-chip enables.
- **Mode numbers:** 0 = off and 31 = self-test are this design's choice.
- **Mode table:** the description says only that a mode sets start point,
  frequency and amplitude. The two modes reproduce the reference amplitudes
  and phases of the measured outputs. The assignment to channels (0/2 and
  1/3), the 1000-entry sine table and the scaling formula are this design's
  choice.
- **Waveform table:** in the description the table can also be read as
  processor-loadable BRAM. Here it is a fixed ROM with no AXI write path.
  Changing the output shape needs new table contents or a new mode row.
- **TEMP / GAS / AIR QUALITY:** the description does not say which DAC
  channel carries them. Chip 2 channels 0..2 is a choice.
- **DI/O output:** the description mentions "one output" but shows an 8-bit
  output field. This RTL gives one 8-bit output port. Press time is counted
  in clock cycles.
- **Self-test mux lines:** the order of the four groups and the one-hot
  select encoding are taken from the labels "SELECT 0~3, EN".

## Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| `automotive_io_top`, `adc_ip` | `SAMPLES` | 1000 | samples per mode-1 run (at most 1024) |
| `automotive_io_top`, `dac_ip` | `SAMPLE_DIV` | 1000 | clocks per DAC update round |
| `adc_spi_if`, `adc_ip`, `selftest_ip` | `CNV_CYCLES`, `SCK_HALF` | 4, 2 | CNV pulse length, SCK half-period |
| `dac_spi_if`, `dac_ip`, `selftest_ip` | `SCK_HALF`, `CS_GAP` | 2, 4 | SCK half-period, CS_n high time between frames |
| `dp_bram` | `DEPTH` | 1024 | sample buffer words |
| `wave_rom` | `DEPTH` | 1000 | sine table entries (must match `aio_pkg::WAVE_DEPTH`) |

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog. The external chips are
behavioural models:

- `ltc2328_model`: CNV/BUSY/SDO behaviour, with the input given as an ideal
  code;
- `ltc2664_model`: 24-bit frame decoding into input and DAC registers;
- `axil_bfm`: an AXI4-Lite master that stands in for the processor.

| Testbench | What it shows |
|-----------|---------------|
| `tb_adc_spi_if` | 40 conversions are bit-exact, and conversion latency = BUSY + 3 + 31·SCK_HALF |
| `tb_adc_ip` | Mode 2 and mode 1 (20 samples) on both channels, BRAM contents per lane, COMPLETE/irq clearing, contention for the BRAM port, run time |
| `tb_dp_bram` | Random dual-port traffic with byte enables against a model |
| `tb_dac_spi_if` | Frame contents, channel order, skipped channels, power-down, 101 clocks per frame |
| `tb_wave_rom` | All 1000 entries against `$sin` |
| `tb_dac_ip` | One full 100 Hz period of mode 1 against a real-valued sine reference (±60 LSB). Also mode 2, self-test mode, TEMP/GAS/AIR QUALITY, mode 0, and the round period. Measures 7.19 Vpp and 17.97 Vpp for mode 1 (reference 7.2 / 18.0) |
| `tb_dio_ip` | The input sequence of the interrupt-timing example, exact press time, write-1-to-clear, 60 random input changes |
| `tb_selftest_ip` | Mux lines, ADC RUN/COMPLETE, DAC RUN sending to four channels |
| `tb_automotive_io_top` | The whole design at default parameters with a modelled board (see below) |

The end-to-end testbench, `tb_automotive_io_top`, runs at the default
parameters. It models the board: four muxes driven by the self-test IP, plus
a bench supply on the ADC inputs. The test covers:

- an ADC voltage sweep from 0 to 10 V and at 10.5 V, landing on 0, 3200, …,
  32000 and 32767 codes;
- a 1000-sample run on both ADCs at once;
- DAC modes 1 and 2;
- loop-back in both directions through the self-test IP;
- the TEMP / GAS / AIR QUALITY levels;
- DI/O events.

It counts each mechanism and fails if one never happens. It simulates in
seconds.

To simulate a testbench with plain Verilator from the repository root (here
the end-to-end one):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_automotive_io_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/aio_pkg.sv tb/tb_automotive_io_top.sv -o sim
./obj_dir/sim
```

For a lint of the RTL alone, use
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/aio_pkg.sv rtl/automotive_io_top.sv`.

### Limits of the verification

- The converter models are ideal. They take codes rather than voltages and
  model no analog error.
- Chip timing is checked only against the models' behaviour. It is not
  checked against the data-sheet minimum and maximum times.
- Nothing here has been run on hardware.
- The SPI rates assume a 100 MHz clock. At another clock, scale `SCK_HALF`,
  `CNV_CYCLES`, `CS_GAP` and `SAMPLE_DIV` to match.
