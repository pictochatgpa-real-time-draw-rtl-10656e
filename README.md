# PictoChatGPA: shared drawing between two FPGA boards

Two people each have an FPGA board with a 2.8" capacitive-touch TFT display.
Whatever one of them draws shows up on their own screen at once and, at the
press of a button, on the other person's screen as well, in the same colour.
No processor is involved: the board reads the touch panel over I2C, paints
squares on the display over SPI, and exchanges short messages with the other
board through its Bluetooth Low Energy module, which looks to the FPGA like a
plain UART. A laptop relays the messages between the two Bluetooth modules.

This repository holds the SystemVerilog for one board (`pictochat_top`) and
testbenches that run two boards against behavioural models of the touch
controller, the display and the Bluetooth link. It follows the PictoChatGPA
project report (a student project built on a Spartan-7 XC7S50 board with an
nRF52832 BLE module); where the report is silent the choices made here are
listed below.

## How a stroke travels

```
 touch panel --I2C--> i2c_controller <--> touch --+--> display_inputs --> display --SPI--> TFT
                                                  |          ^
 button 3 --> debounce --> color_select ----------+          |
 switch 15 --> brush size (2x2 / 4x4) ------------------------------> display
 button 1 --> debounce --> bt_tx (baud_gen, uart_tx) --UART--> BLE module --> host
 host --> BLE module --UART--> synchronizer --> bt_rx (uart_rx) --> display_inputs
 button 0 --> debounce --> reset of everything
```

1. A finger on the panel pulls the touch interrupt low. `touch` then reads four
   registers of the touch controller, 8'h03 to 8'h06 (X[11:8], X[7:0],
   Y[11:8], Y[7:0]), each through one `i2c_controller` transaction, and
   reports a 12-bit X and Y. While the finger stays down this repeats, about
   every 1.6 ms.
2. `display_inputs` turns the position and the current colour into a draw
   request, and `display` paints a square there: 2x2 pixels when switch 15 is
   high, 4x4 when it is low.
3. `bt_tx` remembers the last touched position. When button 1 is pressed it
   sends the four-byte message *colour, y, x, 8'h0A* to the Bluetooth module.
4. On the other board the bytes come back out of its Bluetooth module,
   through `synchronizer` into `bt_rx`, which rebuilds the request and hands
   it to that board's `display_inputs`; the square is painted with that
   board's brush size.

Everything runs on one 100 MHz clock; the slow interfaces are produced by
counters, so there are no clock-domain crossings except the asynchronous
inputs (buttons, touch interrupt, UART receive), which each pass through two
flip-flops.

## Reading the touch panel: one register = 41 I2C bit times

The I2C master is the most involved part. Reading one register of the touch
controller takes two transfers, because the register address must be
written first:

| step | SCL periods | what happens |
|------|-------------|--------------|
| START | 1 | SDA falls while SCL is high, then SCL falls |
| SEND_ADDRESS | 9 | 7-bit device address + write bit (0), then the device's ACK |
| SET_DATA_ADDRESS | 9 | register address, then ACK |
| END | 1 | SCL rises, then SDA rises (STOP) |
| BUFFER | 1 | bus idle |
| START2 | 1 | second START |
| SEND_ADDRESS2 | 9 | device address + read bit (1), then ACK |
| RECEIVE_DATA | 9 | eight bits from the device, then an ACK (low) driven by the master |
| END2 | 1 | STOP; `valid_out` pulses with the byte |

At 100 kHz that is 41 x 1000 = 41,000 clock cycles per register and about
164,000 cycles (1.64 ms) per position. Each SCL period is cut into four
quarters: SCL is low for the first two and high for the last two, SDA is
changed at the start of the period (SCL low) and sampled at the end of the
third quarter (SCL high). SDA is open drain: the top exposes `i2c_sda_oe`
(1 = pull the line low) and `i2c_sda_in` (line level) for a bidirectional pad
with a pull-up.

If an acknowledge slot reads high, the master ends the transfer with a STOP
and pulses `ack_err`; `touch` then gives up the position and waits for the
next interrupt. The master acknowledges the data byte even though it is the
last one, as the original project does; a strict I2C master would send a
NACK there before the STOP.

The device address is a parameter, `DEV_ADDR`, defaulting to 7'h38, the
address of the FT6206-family controller on this display board. The upper
bits of registers 03 and 05 hold status flags and are masked off.

## Painting on the display

`display` sits on top of `spi_tx`, which sends one byte per request: chip
select low, the data/command line set (0 for a command, 1 for a parameter),
eight bits most significant first at 1 MHz, each bit put on MOSI as SCLK
falls and taken by the display as SCLK rises, then chip select high. A byte
costs 801 cycles.

After reset the controller pulses the display's reset line low for 10 us,
waits 5 ms, then sends its start-up table of 18 commands (49 bytes: display
off, power and driver timing, VCOM, 16-bit pixel format, frame rate, gamma,
brightness, entry mode, display function, display on). It then waits in IDLE.

A draw request paints a square of side `space`+1 whose top-left corner is
(x, y):

```
2A  x_first[15:8] x_first[7:0] x_last[15:8] x_last[7:0]     column window
2B  y_first[15:8] y_first[7:0] y_last[15:8] y_last[7:0]     row window
2C  then (space+1)^2 pixels, each RGB565 high byte first
```

The display fills its window left to right, top to bottom, so only the colour
is sent per pixel. A single pixel would take 13 bytes; the 2x2 brush takes
19 bytes (15,200 cycles) and the 4x4 brush 43 bytes (34,400 cycles). The
colours are black 16'h0000, white 16'hFFFF, red 16'hF800 and blue 16'h001F.

`display_inputs` decides what is drawn next. It keeps one waiting request from
the local touch and one from the other board; a newer request from the same
source replaces a waiting one (the display always catches up with the latest
finger position), and a local request goes before a remote one.

## The Bluetooth message

The BLE module is a UART at 115,200 baud; `baud_gen` makes a one-cycle tick
every 868 cycles for the transmitter. The two directions use different frames,
as in the original project:

* **Sent** (`uart_tx`): start bit, 8 data bits LSB first, stop bit, and then
  10 more baud periods of idle line before the next byte may start. There is
  no parity bit. One byte occupies 20 baud periods (17,360 cycles); a
  message of four bytes takes 69,440 cycles.
* **Received** (`uart_rx`): start bit, 8 data bits, **a parity bit**, stop bit,
  because the relaying host sends one. The parity is not checked. The receiver
  has its own counter: it checks the start bit half a baud period after the
  falling edge and then samples every bit in its middle. A byte with a low
  stop bit is dropped. Set `HAS_PARITY` to 0 if the far side sends no parity.

A message is `{colour index, y[7:0], x[7:0], 8'h0A}`. `bt_rx` counts positions
rather than searching for the newline, so an x or y of 10 is received
correctly; if the fourth byte is not 8'h0A it skips to the next 8'h0A and
starts again (output `resync`). Because a message carries 8-bit coordinates,
a square below row 255 or right of column 255 cannot be shared; it is still
drawn locally.

Flow control uses the module's RTS/CTS lines as a ready signal: `bt_tx` starts
a byte only while `ble_uart_rts` is low, and `ble_uart_cts` is held low
(ready) except during reset. The polarity is an assumption; invert it at the
top if the module signals the other way.

## Controls

* Button 0: reset (debounced).
* Button 1: send the last touched position and the current colour.
* Button 3: next colour, black -> white -> red -> blue -> black; black after
  reset. The colour index is shown as a hex byte (`00` to `03`) on two
  seven-segment digits (`ss_an`, `ss_seg`, both active low, `ss_seg[0]` is
  segment a).
* Switch 15: brush 2x2 when high, 4x4 when low.

Buttons are debounced with a 10 ms window (`DEBOUNCE_CYCLES`).

## Timing budget

From a finger landing on board A to the square appearing on board B, with the
2x2 brush and not counting the person pressing button 1 or the host:

| stage | cycles at 100 MHz |
|-------|------------------|
| read X and Y (4 registers) | 164,000 |
| draw locally (19 bytes) | 15,200 |
| send 4 bytes | 69,440 |
| receive 4 bytes (11-bit frames) | 38,200 |
| draw on B (19 bytes) | 15,200 |
| total | about 302,000 (3.0 ms) |

The original report arrives at about 323,000 cycles by a similar sum, with a
display start-up of 88 bytes and 3 message bytes; this implementation's
start-up table has 49 bytes (39,250 cycles) and its message has 4 bytes.

## Modules

| file | role |
|------|------|
| `rtl/pictochat_pkg.sv` | colour enum, draw-request struct, RGB565 table, message terminator |
| `rtl/pictochat_top.sv` | one board: wiring, power-on reset, brush switch |
| `rtl/debounce.sv` | button filter |
| `rtl/color_select.sv` | colour index stepped by button 3 |
| `rtl/seven_seg.sv` | two-digit hex display driver |
| `rtl/i2c_controller.sv` | I2C register read |
| `rtl/touch.sv` | reads the four position registers on an interrupt |
| `rtl/spi_tx.sv` | one SPI byte to the display |
| `rtl/display.sv` | display reset, start-up table, square painting |
| `rtl/display_inputs.sv` | chooses local or remote request |
| `rtl/baud_gen.sv` | 115,200 baud tick |
| `rtl/uart_tx.sv`, `rtl/bt_tx.sv` | byte transmitter, four-byte message sender |
| `rtl/synchronizer.sv` | two-flop synchroniser for the UART input |
| `rtl/uart_rx.sv`, `rtl/bt_rx.sv` | byte receiver, message decoder |

Board connections as wired in the original project (the display board's
interface-mode straps IM0-IM3 are tied to 0, 1, 1, 1 to select its SPI
interface):

| top port | board pin | display-board pin |
|----------|-----------|-------------------|
| `i2c_scl` | pmoda[7] | SCL |
| `i2c_sda_in` / `i2c_sda_oe` | pmodb[7] (open drain) | SDA |
| `touch_irq_n` | pmodb[6] | IRQ |
| `spi_sclk` | pmoda[0] | CLK |
| `spi_mosi` | pmoda[1] | serial data in |
| `spi_cs_n` | pmoda[2] | CS |
| `spi_dc` | pmoda[3] | DC |
| `lcd_rst_n` | pmoda[4] | RST |

The display's serial data output is not used.

Top-level parameters (defaults in brackets): `DEBOUNCE_CYCLES` [1,000,000],
`CLKS_PER_BAUD` [868], `I2C_FREQ` [100,000], `SPI_CLKS_PER_BIT` [100],
`RESET_CYCLES` [1,000], `POST_RESET_CYCLES` [500,000], `REFRESH_CYCLES`
[100,000]. All assume a 100 MHz clock.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles. Behavioural models used by the testbenches:

* `tb/touch_panel_model.sv` - I2C slave with the touch position registers;
* `tb/lcd_model.sv` - decodes the SPI bytes, follows the window commands and
  keeps a frame buffer;
* `tb/ble_host_model.sv` - the two Bluetooth modules plus the relaying host:
  takes bytes from one board and re-sends them, with parity, to the other.

`tb/tb_pictochat_top.sv` runs two complete boards at their default
parameters (about 16 million clock cycles, 0.16 s of board time, most of
it in 10 ms button debouncing; roughly 20 s of run time): start-up of both displays, three colour changes, a touch and a
2x2 square on board A, the message to board B and the 4x4 square there, the
same in the other direction, and a reset by button 0. It counts each of these
and fails if one never happens, and it checks two latencies: interrupt to
position (164,000 cycles) and send press to message decoded on the other
board (about 80.5 baud periods, 69,800 cycles).

With Verilator 5, for example:

```
verilator --binary --timing --top-module tb_pictochat_top -Irtl -Itb \
  rtl/pictochat_pkg.sv rtl/*.sv tb/touch_panel_model.sv tb/lcd_model.sv \
  tb/ble_host_model.sv tb/tb_pictochat_top.sv -o sim
./obj_dir/sim
```

(list `rtl/pictochat_pkg.sv` first; the duplicate from `rtl/*.sv` is
harmless). Unit testbenches need only their module, its sub-modules and the
package, e.g. `tb_touch` needs `touch.sv`, `i2c_controller.sv` and
`touch_panel_model.sv`. Most unit testbenches shorten the timing with
parameters; `tb_i2c_controller`, `tb_touch`, `tb_spi_tx` and `tb_baud_gen`
run at the real rates and check the 41,000-cycle register read, the
801-cycle SPI byte and the 868-cycle baud tick.

## Where this departs from the original project, and what to trust

Taken from the report: the module partitioning and wiring, all state
machines and their order, the touch registers, the start-up command table,
the window/fill command sequence, the 1 MHz SPI and 100 kHz I2C rates, the
UART frame formats in both directions including the 10-period gap, the
115,200 baud divisor, the message layout and terminator, the button and
switch assignments, the colour order and the brush sizes.

Chosen here: the I2C device address (7'h38), the length of the pause between
the two I2C transfers (one SCL period), NACK handling, the display reset pulse
and 5 ms wait, the RGB565 codes, the debounce window, the seven-segment
polarity and refresh, the RTS/CTS polarity, the queueing in
`display_inputs`, the receiver's framing-error and resynchronisation rules,
and the power-on reset.

Known differences and limits:

* The report counts 88 start-up bytes but lists only 49; this design sends the
  49 listed. In particular no Sleep Out command (8'h11) is sent. Check the
  table against the display controller's datasheet before using it on real
  hardware.
* The report calls the 8'h2A bounds "rows" and the 8'h2B bounds "columns";
  here 8'h2A carries x and 8'h2B carries y, matching the display controller.
* Squares are not clipped at the screen edge.
* Messages carry only 8-bit coordinates (see above).
* The testbenches use models written from the interface descriptions, not
  from the real parts; the design has not been run on hardware here.
