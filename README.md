# Serial links for a 27 MHz FPGA board: UART, SPI, I2C, IR remote, DMX512 and a USB FIFO bridge

A serial link moves a word one bit at a time over a few wires. The receiver
must know when each bit is valid, and the links here answer that in two
ways:

* **Agreed timing (asynchronous links).** No clock travels with the data. The
  receiver knows the bit time in advance, finds the start of a character from
  an edge, and samples each bit at a counted moment. The UART, the infrared
  remote receiver and the DMX512 lighting transmitter work like this.
* **A clock wire (synchronous links).** The master sends a clock next to the
  data. One clock edge launches a bit and the other samples it. SPI and I2C
  work like this.

A sixth block handles a link that is not serial at the FPGA pins: a USB-to-FIFO
bridge module. The bridge does the USB work itself and offers the FPGA a byte
bus with a read/write handshake.

Each link is a separate piece of synthesizable SystemVerilog. `serial_demo_top`
puts all of them side by side. They share only the clock and the reset. Every
default timing constant assumes a **27 MHz** system clock.

| Module | What it is |
|---|---|
| `serial_pkg` | Shared types: UART parity and I2C command codes |
| `baud_gen` | 16x-baud tick generator for the UART |
| `uart_tx`, `uart_rx` | RS232 transmitter and 16x-oversampling receiver |
| `spi_master`, `spi_slave` | SPI master with several selects; slave that oversamples SCLK |
| `i2c_master`, `i2c_slave` | Byte-level open-drain I2C master; register-file slave |
| `ir_receiver` | Pulse-width decoder for 12-bit IR remote frames |
| `dmx512_tx`, `dmx_channel_ram` | DMX512 packet transmitter and its 512-byte channel memory |
| `usb_fifo_if` | Handshake controller for an FT245-type USB-to-FIFO bridge (UM245R) |
| `serial_demo_top` | All of the above, wired together |

## UART: finding the middle of each bit

The line idles at 1 (mark). A character is sent as follows:

1. one start bit of 0;
2. 5 to 8 data bits, LSB first;
3. an optional parity bit, even or odd;
4. 1, 1.5 or 2 stop bits of 1.

The default format is 8-N-1: eight data bits, no parity and one stop bit.
`uart_tx` and `uart_rx` take the format as parameters: `DATA_BITS`, `PARITY`
and `STOP_HALVES`. `STOP_HALVES` counts half bits: 2 means
one stop bit, 3 means 1.5, and 4 means 2.

Both ends run from one `tick16` strobe made by `baud_gen`. There are 16 ticks
per bit. The divider is `round(CLK_HZ / (16*BAUD))`. At 9600 baud (the
default) that is 176 clocks, with a 0.13 % rate error. Errors for the other
standard rates at 27 MHz:

| Rate | 1200 | 2400 | 4800 | 9600 | 19.2K | 38.4K | 57.6K | 115.2K |
|---|---|---|---|---|---|---|---|---|
| Divider | 1406 | 703 | 352 | 176 | 88 | 44 | 29 | 15 |
| Rate error | 0.02 % | 0.02 % | 0.12 % | 0.13 % | 0.13 % | 0.13 % | 1.0 % | 2.4 % |

The receiver is the part that needs care. On every tick, `uart_rx` looks at
the line after a two-flop synchroniser:

1. **Idle.** A 1 followed by a 0 marks the leading edge of a start bit.
2. **Start.** Eight ticks later the receiver is in the middle of the start
   bit. If the line is 1 again, the edge was a glitch and the receiver returns
   to idle.
3. **Data, parity, stop.** From there the receiver counts 16 ticks per bit
   and samples each data bit, the parity bit and the stop bit (both stop
   bits when there are two) in its middle.
4. **Accept.** The byte is accepted only if the frame is well formed:
   * a 0 stop bit gives a `frame_err` pulse instead of `valid`;
   * a wrong parity bit gives a `parity_err` pulse.

The edge is found up to one tick late, so each sample is 8 to 9 ticks into
its bit. A transmitter that runs a few percent fast or slow is still sampled
inside the right bit. The testbench checks ±3 %.

With `STOP_HALVES` = 4 the receiver also samples the second stop bit. For 1
and 1.5 stop bits it checks one, and it is ready for the next start edge half
a bit before the stop period ends.

Byte-side handshakes:

* **Transmitter:** `ready` is high in idle. A cycle with `valid` high latches
  `data`, and the start bit begins on the next clock. That clock usually falls
  between two ticks, so a frame sent from idle has a start bit up to one tick
  (1/16 bit) short. Frames sent back to back keep exact 16-tick bits.
* **Receiver:** `valid`, `frame_err` and `parity_err` are one-cycle pulses.
  They come in the clock after the last checked stop bit is sampled.

## IR remote receiver: bits coded as pulse lengths

`ir_receiver` decodes frames from a demodulating IR detector. Its input is 1
while a burst is being received. A frame has 13 pulses:

1. a start pulse of 2.4 ms;
2. twelve data pulses, each 1.2 ms for a 1 or 0.6 ms for a 0, sent LSB first:
   the 7-bit command, then the 5-bit address.

A free-running divider makes a sample strobe every `SAMPLE_CYCLES` clocks.
The default is 2025 clocks, which is 75 µs. In samples, a start pulse is 32
long, a 1 is 16 and a 0 is 8. A saturating 5-bit counter counts the strobes
while the input is high, and each falling edge judges the pulse:

| Pulse | Rule |
|---|---|
| Start | count > 28 (i.e. `START_MIN` = 29 or more) |
| Data 1 | `ONE_MIN` = 12 samples or more |
| Data 0 | 4 to 11 samples |
| Glitch, frame dropped | under `PULSE_MIN` = 4 samples |

A low gap of more than `GAP_MAX` samples (about 2 ms) also drops the frame.
When an accepted start pulse ends, `start` pulses for one cycle. After the
twelfth pulse, `command`, `address` and a one-cycle `valid` appear a few
clocks after the falling edge.

The time-out and thresholds are this design's choices. They place the
decision points halfway between the nominal lengths, so timing errors of
about ±25 % still decode. The testbench checks ±10 %.

## DMX512 transmitter: a packet as a timed state sequence

DMX512 runs at 250 kbit/s, so a bit is 4 µs or 108 clocks. Each frame is 11
bits: a low start bit, eight data bits LSB first, and two high stop bits.
`dmx512_tx` sends a packet as this sequence of states:

```
MTBP (mark) -> BREAK (low) -> MAB (mark) -> start-code frame (value 0)
            -> [ MTBF (mark) -> channel frame ] x NUM_CHANNELS -> MTBP ...
```

| Interval | Default | Clocks | Allowed |
|---|---|---|---|
| Break | 100 µs | 2700 | ≥ 88 µs |
| Mark after break (MAB) | 10 µs | 270 | ≥ 8 µs |
| Bit | 4 µs | 108 | 4 µs |
| Frame | 44 µs | 11 bits | 44 µs |
| Mark between frames (MTBF) | 10 µs | 270 | 0 – 1 s |
| Mark between packets (MTBP) | 10 µs | 270 | 0 – 1 s |

A full 512-channel packet lasts 27.81 ms. Every interval is exact to the
clock.

Channel data come from outside the transmitter through a request port:

1. In the first cycle of each MTBF, the transmitter pulses `request_pulse` and
   puts the channel number on `request_addr`.
2. Two cycles later it latches `chan_data`.
3. It sends that value in the frame after the mark.

In the top level, `request_pulse` and `request_addr` drive the read port of
`dmx_channel_ram`, which has one cycle of read latency. The host writes
channel levels through the RAM's other port at any time. A value written
during a packet is sent if its channel has not been read yet.

When the last channel has been sent, `packet_done` pulses and the transmitter
enters MTBP. It starts the next packet only while `enable` is high, so the
line rests at mark otherwise.

The 100 µs break and 10 µs MAB and MTBF follow a known working lab
implementation. The minimum MAB is 8 µs (two bit times), so 10 µs is inside
the standard. The MTBP length, the `enable` input and the LSB-first data
order are this design's choices.

## SPI: the four clock modes

`spi_master` has one shift register and follows these steps for a transfer:

1. **Select.** On `start` it pulls `ss_n[ss_sel]` low.
2. **Wait.** It waits `SS_SETUP` cycles so the slave can get ready.
3. **Shift.** It toggles SCLK 16 times, with a half period of `HALF_PERIOD`
   clocks. MOSI leaves the register from the top (MSB first), and MISO enters
   at the bottom.
4. **Release.** After one more half period it releases the select and pulses
   `done`, with the slave's word in `rx_data`.

A transfer takes `1 + SS_SETUP + 17*HALF_PERIOD` clocks from `start` to
`done`. With the defaults (13 and 8) that is 229 clocks, and SCLK runs at
1.04 MHz.

`cpol` and `cpha` are sampled at `start`:

| cpol | cpha | SCLK idles | MOSI/MISO change | Sampled on |
|---|---|---|---|---|
| 0 | 0 | low | falling edge (first bit at select) | rising edge |
| 0 | 1 | low | rising edge | falling edge |
| 1 | 0 | high | rising edge (first bit at select) | falling edge |
| 1 | 1 | high | falling edge | rising edge |

Mode 0 is the classic synchronous link: the sender changes data on the
falling clock edge and the receiver reads on the rising edge. The testbench
checks it with the byte 61H.

`spi_slave` runs on the system clock, not on SCLK:

* SCLK, MOSI and SS_n pass through two-flop synchronisers, and SCLK edges are
  found by comparing with the previous sample.
* The slave's MISO therefore changes about 3 clocks after an SCLK edge.
* The master samples MISO a half period later, so **`HALF_PERIOD` must be at
  least 4**.
* For the same reason, `SS_SETUP` must cover the slave loading `tx_data` at
  select (3 clocks or more).
* `miso_oe` is high while the slave is selected. It lets several slaves share
  one MISO wire.

## I2C: open-drain lines, clock stretching and arbitration

Both I2C blocks only ever pull a line low (`scl_low`, `sda_low`). A released
line is pulled high by the bus resistor. In `serial_demo_top`, this wired AND
is written out as `!(a_low || b_low || ...)`. On a chip, each `*_low` would
drive the enable of an open-drain pad.

`i2c_master` takes byte-level commands when `cmd_ready` is high:

| Command | What happens |
|---|---|
| `I2C_START` | START condition (also a repeated START) |
| `I2C_WRITE` | Send `wdata`; the receiver's ACK bit returns in `ack_in` (0 = ACK) |
| `I2C_READ` | Receive `rdata`, then send `ack_out` (0 = ACK, 1 = NACK to end a read) |
| `I2C_STOP` | STOP condition |

Every bit is cut into four quarters of `QUARTER` clocks. The default is 68
clocks, giving 100 kHz.

| Quarter | START | Data/ACK bit | STOP |
|---|---|---|---|
| 0 | release SDA | set SDA (SCL low) | pull SDA low |
| 1 | release SCL, wait for it high | release SCL, wait for it high | release SCL, wait for it high |
| 2 | pull SDA low (START) | sample SDA | release SDA (STOP) |
| 3 | pull SCL low | pull SCL low | — |

The master handles two bus situations:

* **Clock stretching.** In quarter 1 the quarter counter does not run until
  SCL is actually high. A slave that holds SCL low therefore stretches the bit.
* **Arbitration.** Suppose the master sends a 1 (releases SDA) but samples a
  0. Another master then owns the bus. The master releases both lines, pulses
  `arb_lost` and returns to idle.

The wait in quarter 1 also synchronises two masters' clocks. Each one pulls
SCL low on its own timer, and SCL stays low until the slower one lets go.
Both then see SCL rise on the same clock and count the high time from there.
From the first data bit on, they pull SCL low on the same clock, so they can
compare SDA bit by bit. Two masters that issue START up to about a quarter
bit apart arbitrate correctly. A START issued while another master already
holds the bus is not detected.

`i2c_slave` is a register file of `NUM_REGS` bytes at the 7-bit address
`ADDR`. It oversamples SCL and SDA through synchronisers:

* SDA falling while SCL is high is a START. SDA rising while SCL is high is a
  STOP.
* Bits are taken on SCL rising edges. The slave changes its own SDA only after
  SCL falls.
* After an address match it ACKs. The first written byte sets the register
  pointer, and further bytes are stored with auto-increment.
* A read returns registers from the pointer for as long as the master ACKs.
* With `STRETCH` > 0 the slave holds SCL low for that many clocks after each
  of its ACK bits.
* The slave reacts about 3 clocks after a line edge, so `QUARTER` should be
  above 4.

## USB FIFO bridge: a byte bus with two flags

A UM245R module carries an FT245-type chip. It turns USB traffic into two
FIFOs, one for bytes from the PC and one for bytes toward it. The FPGA sees
them through an 8-bit bus `DB0-DB7` and four handshake pins:

| Pin | Driven by | Meaning |
|---|---|---|
| `RXF#` | bridge | low: a byte from the PC is waiting |
| `TXE#` | bridge | low: there is room for a byte toward the PC |
| `RD#` | FPGA | low: the bridge drives the next byte onto the bus |
| `WR` | FPGA | the bridge takes the bus byte on the falling edge |

`usb_fifo_if` runs both directions over the one bus:

1. `RXF#` and `TXE#` are asynchronous to the FPGA clock, so each passes a
   two-flop synchroniser.
2. **Read.** The controller pulls `rd_n` low for `RD_PULSE` clocks and latches
   `d_i` on the clock where `rd_n` rises. The byte leaves as a one-clock
   `rx_valid` pulse. A read starts only while the user holds `rx_ready` high.
3. **Write.** The controller drives `d_o` with `d_oe` high and raises `wr` for
   `WR_PULSE` clocks. It then lowers `wr` and keeps driving the bus for one
   more clock as hold time. The user side is a valid/ready handshake, and
   `tx_ready` does not depend on `tx_valid`.
4. **Recovery.** After every access the controller waits `RECOVER` clocks
   before it looks at the flags again. After each byte the bridge raises its
   flag for a short while, and the synchroniser adds 2 clocks before the
   controller can see the new level. Without the wait, the controller would
   see the stale flag and start a second access the bridge cannot serve.
5. **Fairness.** When both directions are possible, reads and writes take
   turns.

`d_i`, `d_o` and `d_oe` are the two halves of the bidirectional bus and its
enable. The tri-state pad sits outside the module, for example
`assign DB = d_oe ? d_o : 'z;`.

The default timing at 27 MHz, next to the FT245R data sheet's limits:

| Item | Default | Data sheet |
|---|---|---|
| `RD#` low, `WR` high | 3 clocks, 111 ns | ≥ 50 ns |
| read data valid after `RD#` falls | sampled at 111 ns | ≤ 50 ns |
| wait after an access | 4 clocks, 148 ns | flag inactive ≥ 80 ns |
| one byte | ≥ 8 clocks (read), ≥ 9 (write) | |

The bridge keeps its flag inactive for 80 ns after each byte, and the
synchroniser adds 2 clocks. So a steady stream takes about 10 to 11 clocks a
byte, still over 2.4 Mbyte/s. That is more than the 1.5 Mbyte/s a 12 Mbit/s
USB link can carry. The bridge's "bit-bang" mode is not supported.

## Top level

`serial_demo_top` instantiates every block and connects them as follows:

* **UART.** One `baud_gen` feeds `uart_tx` and `uart_rx`. `uart_txd` and
  `uart_rxd` are the two pins. They are not connected together, so a loopback
  is made outside. RS232's ±12 V levels need an external driver chip.
* **SPI.** `spi_master` has `SPI_NUM_SS` = 3 selects:
  * select 0 goes to an on-chip `spi_slave`, whose word appears on `spis_*`;
  * selects 1 and 2 leave the chip, and their slaves answer on `spi_miso_ext`;
  * MISO comes from the on-chip slave while it is selected.
* **I2C.** `i2c_master` and one `i2c_slave` (address 0x42, 16 registers)
  share a wired-AND bus. `i2c_scl_ext_low` and `i2c_sda_ext_low` add the
  pull-downs of off-chip devices. `i2c_scl` and `i2c_sda` show the line
  levels, and `i2c_regs` shows the slave's registers.
* **IR.** `ir_receiver` decodes frames from `ir_in`.
* **DMX512.** `dmx512_tx` reads from `dmx_channel_ram`, which the host fills
  through `dmx_wr_*`.
* **USB.** `usb_fifo_if` connects to the bridge pins `usb_d_i`, `usb_d_o`,
  `usb_d_oe`, `usb_rxf_n`, `usb_txe_n`, `usb_rd_n` and `usb_wr`. Its user
  side is brought out as `usb_rx_*` and `usb_tx_*`.

The top-level parameters (`UART_BAUD`, `SPI_HALF`, `I2C_QUARTER`,
`IR_SAMPLE`, `DMX_BIT`, `DMX_BREAK`, `DMX_MARK`, `DMX_CHANNELS` and others)
pass the timing down to the blocks. Their defaults give the rates above at
27 MHz. The testbenches shrink them to simulate faster.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

* **Block testbenches.** Each drives its block from a model or decoder of its
  own and checks data, error pulses and cycle counts:
  `baud_gen_tb`, `uart_tx_tb`, `uart_rx_tb`, `spi_master_tb`, `spi_slave_tb`,
  `i2c_master_tb`, `i2c_slave_tb`, `ir_receiver_tb`, `dmx512_tx_tb`,
  `dmx_channel_ram_tb` and `usb_fifo_if_tb`.
  `usb_fifo_if_tb` uses a bridge model. The model checks every handshake
  rule, drives garbage on the bus until read data would be valid, and fills
  and drains its FIFOs at random.
* **Further testbenches.**
  `uart_formats_tb` loops `uart_tx` into `uart_rx` in 5-N-1, 6-O-1.5, 7-E-2
  and 8-N-2. It decodes the line on its own and checks the frame period.
  `i2c_multi_master_tb` puts two `i2c_master`s and a stretching slave on
  one bus. The masters start writes up to 7 clocks apart. The testbench
  checks that they pull SCL low on the same clock, that the right one loses
  arbitration and that only the winner's byte is written.
  `spi_master_fast_tb` runs the SPI master at its top speed, with
  `HALF_PERIOD` = 1 (SCLK 13.5 MHz at 27 MHz), in all four modes. Its slave
  model runs on the SCLK edges themselves.
* **`serial_demo_top_tb`** runs every link end to end at shortened timing,
  with the UART in 8-E-1 and a stretching I2C slave. It counts each mechanism
  and fails if any never occurred. The mechanisms are: UART byte, frame error
  and parity error; SPI on-chip and off-chip transfers in all four modes; I2C
  write, read, NACK, clock stretch and arbitration loss; IR frame and rejected
  start; DMX packet; and USB bytes read from and written to a bridge model,
  which the testbench echoes back.
* **`serial_demo_top_full_tb`** runs the same test once with every parameter
  at its default: a 9600-baud byte, full-speed SPI and I2C, a real-time IR
  frame, a whole 512-channel DMX packet and eight USB bytes echoed. That is
  about 1.1 million clocks, and takes a second.

With Verilator 5:

```sh
verilator --binary --timing --top-module serial_demo_top_full_tb \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/serial_pkg.sv tb/serial_demo_top_full_tb.sv
./obj_dir/Vserial_demo_top_full_tb
```

Replace the testbench name to run any other. The package file must come
first, because modules import it.

## How far this follows the source material, and where it does not

The lecture material these blocks are built from describes the protocols and
gives two partial lab designs: the IR start-bit detector and the DMX512
transmitter state machine. The following are taken from that material:

* **Protocol rules.** The RS232 frame format and its 16x receive scheme; the
  SPI signal roles and the active-low selects; the I2C START/STOP/ACK rules,
  MSB-first order, open-drain lines, clock stretching and arbitration; the
  2.4/1.2/0.6 ms IR pulse lengths with the 7+5 bit frame; and the DMX512
  frame and packet structure.
* **Numbers.** 27 MHz, the 4 µs DMX bit, the 100 µs break and 10 µs marks,
  the start-pulse threshold of more than 28 samples, 3 SPI selects and 8-bit
  SPI registers.

Everything else is this design's choice. The main ones are:

* all byte-side handshakes and command interfaces;
* 9600 baud as the UART default;
* SPI bit order (MSB first), mode encoding, 1.04 MHz SCLK and setup wait;
* I2C speed (100 kHz), the slave's address, register map and pointer
  protocol, and when it stretches the clock;
* the IR sample period, thresholds and time-out;
* the DMX MTBP length, `enable` input, LSB-first data and the channel RAM;
* the USB bridge controller as a whole. The source names only the module, its
  pins and its handshake, so the timing comes from the FT245R data sheet;
* synchronisers on every asynchronous input.

Known limits:

* With 1.5 stop bits the UART receiver checks only the first one.
* The baud rate, data format and DMX/IR timing are fixed when the design is
  built, not set at run time.
* SPI SCLK can go no faster than half the system clock, 13.5 MHz at 27 MHz.
  The on-chip slave oversamples SCLK and needs `HALF_PERIOD` ≥ 4, about
  3.4 MHz. The upper part of the usual 1–70 MHz SPI range needs a faster
  clock, or a slave clocked by SCLK.
* The I2C master does not check whether the bus is busy before a START, and
  it does not keep clocking after losing arbitration.
* Some parts are outside this RTL: the USB side of the bridge module (a
  bought part), the analog drivers of high-speed links, the RS232 level
  shifters and the IR demodulator.
