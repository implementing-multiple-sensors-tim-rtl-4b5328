# Multi-sensor transducer interface module (TIM) for an FPGA

Three analog sensors (a temperature sensor, a pressure sensor and a
potentiometer) share one ADC0808/0809 converter. The FPGA logic scans the
converter, turns every raw 8-bit code into a value in the sensor's own unit
with a conversion ROM, and reports all three readings at once. The readings go
two ways. They go to a PC over a serial line as ASCII text, preceded after
reset by a short data sheet (TEDS, Transducer Electronic Data Sheet) for each
sensor. They also go to a four-digit seven-segment display. A serial receiver
with its own buffer takes bytes from the PC, so that an actuator such as a
relay can be driven from the host.

The idea follows the IEEE 1451 smart-transducer model: the sensor-side module
carries its own description (the TEDS) and presents readings in engineering
units, so the host needs no knowledge of the sensor or the converter.

## Data flow

```
 T1 T2 T3 ──> ADC0808/0809 (external)
                 │ ADD, ALE, START, OE, CLK ^      │ EOC, D[7:0]
                 v                                  v
            adc0809_if ── sample ──> sample_regs ── code[3], all_fresh
                                                      │
      teds_rom <── teds_addr ── tim_controller <──────┘
      map_rom  <── ch, code  ──      │  (uses value_decoder)
                                     │ bytes            │ reading[3]
                                     v                  v
                          sync_fifo (Tx buffer)    seg7_display ──> seg, an
                                     │
                                  uart_tx ──> uart_txd ──> PC
   PC ──> uart_rxd ──> uart_rx ──> sync_fifo (Rx buffer) ──> rx_data / rx_avail / rx_pop
```

All logic runs on one clock (`clk`, 50 MHz by default) with a synchronous,
active-high reset (`rst`).

## What the PC sees

After reset the controller sends the three TEDS records, 24 characters each,
ending in CR LF:

```
T1 TEMPERATURE 0-500 C
T2 PRESSURE  0-250 kPa
T3 POSITION    0-100 %
```

Then it sends one report per complete scan of the sensors: one line per
sensor, `Tn=dddd` (four decimal digits) followed by CR LF, in sensor order:

```
T1=0247
T2=0123
T3=0049
```

The serial format is 8 data bits, no parity, 1 stop bit, LSB first, at 9600
baud. A report is 27 bytes, about 28 ms at 9600 baud. The sensors are sampled
every 10 ms (one scan of three channels takes about 0.37 ms of that), so the
UART sets the report rate: reports follow each other back to back, some scans
are never reported, and each report holds samples taken after the previous
report was queued. The conversion ROM holds
`round(code * FS / 255)` with FS = 500 (degrees C, an LM35-type sensor at
10 mV/°C with a 5 V reference), 250 (kPa) and 100 (percent of potentiometer
travel). These full-scale values and the TEDS text live in `rtl/tim_pkg.sv`.
To use other sensors, edit `FS_T1..FS_T3`, `full_scale_of` and the `TEDS_T1..3`
strings. The records must stay exactly `TEDS_LEN` characters long.

## The ADC handshake (`adc0809_if`)

This is the part with real timing constraints. A scan starts every `SCAN_CYC`
clocks (10 ms). If a scan ever takes longer than that, the next one starts
as soon as it ends. Within a scan, for each channel the block:

1. drives the channel number on ADD C..A;
2. raises ALE and START together for `PULSE_CYC` clocks. ALE latches the
   address, and the falling edge of START begins the conversion;
3. waits `EOC_WAIT_CYC` clocks. The ADC0809 only pulls EOC low up to
   8 ADC clocks + 2 µs after START. Looking at EOC any earlier would see the
   previous conversion's high EOC and read stale data;
4. waits for EOC (through a two-flip-flop synchroniser) to go high again;
5. raises OE, waits `OE_CYC` clocks for the data to settle, captures D[7:0]
   and emits `sample_valid` with `sample = {ch, code}`;
6. moves on to the next channel, `0..NUM_CH-1`, then waits for the next scan.

The block also makes the converter's clock. `adc_clk` is the system clock
divided by `ADC_CLK_DIV` (78, which gives 641 kHz from 50 MHz; the ADC0809 accepts
10 kHz to 1.28 MHz). One conversion takes about 64 ADC clocks plus the
overheads above, roughly 6,100 system clocks at the defaults. If you change
the clock or the divider, keep `EOC_WAIT_CYC` above 8 ADC clocks + 2 µs.

## Controller (`tim_controller`)

The controller is a small state machine:

- **TEDS** (once after reset): read a byte from `teds_rom` (one clock of
  latency) and push it into the Tx buffer. Repeat for all
  `NUM_CH * TEDS_LEN` bytes, then raise `teds_done`.
- **Scan**: wait until `sample_regs` reports a fresh sample on every channel
  (`all_fresh`). Take a snapshot of the codes and clear the fresh flags in
  the same clock. A sample that lands in that clock keeps its flag.
- **Map and send**: for each sensor, read `map_rom` (one clock). Store the
  value in `reading[ch]` for the display. Push the nine bytes of its line,
  with the digits taken from `value_decoder`.

Every push waits while the Tx buffer is full, so no byte is lost. The
buffer is full most of the time, because the controller fills it faster than
the UART drains it. `reading_valid` rises after the first complete report.

## Display (`seg7_display`)

Four digits cannot show three readings at once. The display shows one sensor at a
time and moves to the next every `SHOW_CYC` clocks (1 s). The leftmost digit
is the sensor number (1–3), and the other three are hundreds, tens and units of
its reading. Readings above 999 cannot occur with the default scales; such a
reading would show only its last three digits. Before the first report every
digit shows a dash. The digits are multiplexed, each lit for `DIGIT_CYC`
clocks (1 ms). `seg = {g,f,e,d,c,b,a}` and `an` (`an[0]` is the rightmost
digit) are active low, as on common-anode boards.

## Receive path

`uart_rx` samples each bit in its middle. A new frame starts only on a
falling edge, so a line held low after a bad stop bit does not start a
false frame. A frame with a low stop bit is dropped and pulses
`rx_frame_err`. Good bytes go into a 16-byte Rx buffer. Its oldest byte is
on `rx_data` while `rx_avail` is high, and `rx_pop` removes it. A byte that
arrives when the buffer is full is dropped and pulses `rx_overflow`. The
design does not interpret the received bytes. That is left to whatever
actuator logic is connected.

## Files

| file | module | role |
|---|---|---|
| `rtl/tim_pkg.sv` | package | widths, sample struct, TEDS text, conversion rule |
| `rtl/tim_top.sv` | `tim_top` | top level, wiring of everything below |
| `rtl/adc0809_if.sv` | `adc0809_if` | ADC scan and handshake, ADC clock |
| `rtl/sample_regs.sv` | `sample_regs` | latest code per sensor, fresh flags |
| `rtl/map_rom.sv` | `map_rom` | code → engineering units, 3 × 256 × 10 bit |
| `rtl/teds_rom.sv` | `teds_rom` | TEDS records, 3 × 24 bytes |
| `rtl/value_decoder.sv` | `value_decoder` | binary → BCD → ASCII (double dabble) |
| `rtl/tim_controller.sv` | `tim_controller` | main sequencer |
| `rtl/sync_fifo.sv` | `sync_fifo` | Tx and Rx buffers |
| `rtl/uart_tx.sv`, `rtl/uart_rx.sv` | | 8N1 serial transmitter and receiver |
| `rtl/seg7_display.sv` | `seg7_display` | four-digit multiplexed display |
| `tb/adc0809_model.sv` | `adc0809_model` | behavioural ADC0808/0809 (simulation only) |

### Top-level parameters

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | system clock frequency |
| `BAUD` | 9600 | serial rate (`CLK_HZ / BAUD` clocks per bit) |
| `NUM_CH` | 3 | sensors on ADC inputs IN0.. (1 to 8) |
| `ADC_CLK_DIV` | 78 | system clocks per ADC clock |
| `SCAN_CYC` | `CLK_HZ/100` | clocks between sensor scans (10 ms) |
| `PULSE_CYC`, `EOC_WAIT_CYC`, `OE_CYC` | 16, 1000, 16 | ADC handshake timing, in clocks |
| `TX_DEPTH`, `RX_DEPTH` | 16, 16 | buffer depths (powers of two) |
| `DIGIT_CYC`, `SHOW_CYC` | `CLK_HZ/1000`, `CLK_HZ` | display digit time, time per sensor |

## Simulation

Every module in `rtl/` has a self-checking testbench in `tb/` named
`<module>_tb`. Each one prints `TB_RESULT checks=N failures=M` and has a
watchdog. Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/tim_pkg.sv tb/tim_top_tb.sv --top-module tim_top_tb
./obj_dir/Vtim_top_tb
```

Verilator finds the other modules through `-Irtl -Itb` by file name; only
the package has to be named, ahead of the testbench.

- `tb/tim_top_tb.sv` runs the whole design with short timings (16 clocks
  per bit, ADC clock = clk/4, short display periods). It plays the PC and the
  sensors. It checks the TEDS text and every reading line against its own
  conversion of the model's inputs, and changes the inputs (including full
  scale and zero) to check that new values arrive. It reads the display
  digits, sends bytes into the Rx buffer, overruns that buffer and sends a
  frame with a bad stop bit. It counts each of these mechanisms and fails if
  any of them never happened: TEDS dump, report lines, ADC conversions,
  Tx-buffer back-pressure, received bytes, Rx overflow, frame error and
  display rotation.
- `tb/tim_top_full_tb.sv` runs the top with every parameter at its default
  (50 MHz, 9600 baud). It covers the TEDS dump, the first report, the
  display of sensor 1 and two bytes from the PC: about 5.6 million clocks,
  a few seconds in Verilator.
- The block testbenches check each unit on its own: every ROM address, every
  decoder input, random FIFO traffic against a queue model, serial frames
  with bit-time skew, the ADC handshake against the model's protocol checks,
  and conversion, frame and display timing.

The simulator is two-state, so every register that is read is reset.

## How far this follows the source design

The design it is built from gives the block set and the order of the
processing steps. It names the parts: the ADC0808/0809, data registers, a
ROM for user-defined conversions and TEDS, an ASCII decoder, a main
controller, a UART with Tx and Rx buffers, and at least four seven-segment
digits. It says what each part does but not how. The following are choices
made here:

- clock (50 MHz), baud rate (9600), serial format (8N1) and reset style;
- the sampling interval (10 ms). The source only says the inputs are
  sampled at predefined intervals;
- the ADC handshake timing, taken from the converter's usual data-sheet
  behaviour;
- the conversion rule and full-scale values, and the TEDS content. The TEDS
  here is readable text for a terminal, not the binary layout of IEEE 1451.2;
- the message format, sending the TEDS once after reset, and reporting the
  newest complete scan whenever the previous report has been queued;
- splitting the single ROM of the block diagram into a conversion ROM and a
  TEDS ROM;
- showing the sensors one at a time on the display, although the source
  speaks of the values being displayed simultaneously;
- leaving received bytes uninterpreted. The source mentions that a relay can
  be connected for duplex operation but not how it is driven.

The source reports a synthesis result of 125 flip-flops and 22 I/O pins on a
Xilinx device. This design uses 306 flip-flops, mostly for counters and the
receive path. It brings out 43 I/O bits: the display alone needs 11, and
the Rx-buffer ports add more. So it is not a pin-for-pin copy of that build.
The ADC, the sensors, the RS-232 level shifter and the PC are outside the
FPGA and are not part of the RTL.
