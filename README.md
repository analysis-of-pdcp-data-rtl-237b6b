# CAN bus-load monitor for a PDCP network

A prosthetic hand whose sensors and motor controllers talk over a CAN bus
(1 Mbit/s) runs the Prosthetic Device Communication Protocol (PDCP) on top of
it. The bus runs close to its bandwidth limit, so engineers need to know, second
by second, how much of the bus each node uses. This RTL is the FPGA half of such
an analyser. It listens to the bus without ever driving it and decodes every
frame. It counts the bus bit times each frame occupies, once for the whole bus
and once for the node that sent it. Once a second it sends all 33 numbers over a
UART line to a microcontroller, which builds statistics, logs them and
interprets the PDCP messages. A two-line character LCD on the FPGA board shows
one node's load at a time, and two push buttons pick the node.

The microcontroller, its firmware and the other boards are not part of this
RTL. The testbenches use simple models in their place: a UART receiver, an
HD44780 display and a CAN frame generator.

```
CAN_RX ─► can_bit_sampler ─► can_frame_rx ─► load_calc ─► load_reporter ─► uart_tx ─► TxDWire
                                 │ (can_crc15)      │
KEY[1:0] ─► module_select ───────┴──────────────► lcd_display ─► LCD_DATA/EN/RS/RW/POWER
```

Top module: `can_load_monitor` (`rtl/can_load_monitor.sv`).

## How a node is identified

PDCP does not use the 11-bit CAN identifier as a plain message id. It splits the
identifier into three fields:

| identifier bits | field | values |
|---|---|---|
| 10:9 | message priority | 00 high, 01 normal, 10 low, 11 bind request |
| 8 | message mode | 1 for the bus arbitrator, 0 for every other node |
| 7:0 | node id | assigned by the bus arbitrator at bind time |

The monitor has 32 load counters, called modules. Module n counts the frames
whose node id is `MODULE_NODES[n]`. This is a top-level parameter, and by default
module n watches node id n. A frame from a node id that no module watches counts
only in the overall load. If two modules watch the same node, both count it.
`can_mon_pkg::pdcp_split()` does the split. For an extended (29-bit) frame, it
is applied to the 11-bit base identifier.

Two nodes can also agree on a data channel link: the sender then puts the
link's id in bits 7:0 instead of its own node id. The monitor cannot tell the
two apart. Such a frame counts for the module that watches the link id, or
only in the overall load if no module does.

## What "load" means

Load is counted in **bus bit times per sample period**. Each frame adds its
length from the start-of-frame bit to the last end-of-frame bit. That length
includes the stuff bits, the CRC, the ACK field and the end of frame. The 3-bit
intermission between frames is not counted. The sample period is one second at
the default clock. At 1 Mbit/s the overall number is therefore the bus
occupancy in bits per second: 1,000,000 means a saturated bus.

A frame that ends in an error still counts the bit times it used, up to and
including the bit that showed the error. Such errors are a stuff error, a
malformed delimiter or end of frame, or a CRC mismatch. A frame is counted to a
module only if its whole 11-bit base identifier was received. Counters are 24
bits wide and saturate. A frame is counted in the period in which its last bit
is sampled.

## The CAN receiver

`can_bit_sampler` brings the RX line into the clock domain through two
flip-flops and runs a bit-time counter of `CLKS_PER_BIT` clocks (50 at
50 MHz / 1 Mbit/s). Every recessive-to-dominant edge restarts the counter. Each
bit is sampled at 70 % of the bit time after its edge. This is hard
synchronisation on every edge, with no phase segments or jump-width limit. It is
a simplification that works for a listener driven by a crystal oscillator. The
testbench checks it with a transmitter 0.4 % fast or slow.

`can_frame_rx` follows the frame field by field:

1. It starts in a *wait-for-idle* state and needs 11 recessive bits before it
   accepts a start of frame. This lets it join a bus that is already running.
2. From start of frame to the end of the CRC sequence it removes stuff bits.
   After five equal bits, the next bit must differ and is dropped. If it does
   not differ, that is a stuff error.
3. It decodes the identifier (standard or extended), RTR, DLC (values above 8
   mean 8 bytes) and up to 8 data bytes. The first data byte is reported in
   `frame.data[63:56]`.
4. The destuffed bits from start of frame to the end of the data field go
   through `can_crc15`. This is the serial CRC-15-CAN register with polynomial
   0x4599: shift left, and XOR the polynomial when the incoming bit differs
   from the old bit 14. The result must equal the received CRC when the CRC
   delimiter arrives.
5. The CRC delimiter, the ACK delimiter and all seven end-of-frame bits must be
   recessive. The ACK slot is not checked, because this node does not
   acknowledge.

After the last end-of-frame bit, `frame_done` pulses with a `can_frame_t`
holding all the fields, the PDCP split, the error flag and `bit_len`. After an
error the receiver also waits for bus idle again. It never sends an error frame.

## The report on the UART line

The line runs at 115200 baud (434 clocks per bit at 50 MHz), with 8 data bits
sent LSB first, no parity and **two** stop bits. When a sample period ends,
`load_calc` copies its counters into snapshot registers and sets `data_ready`.
`load_reporter` then sends 140 bytes:

| bytes | content |
|---|---|
| 0–3 | start signal `00 10 00 01` |
| 4 + 4n … 7 + 4n (n = 0…31) | the node id module n watches (n itself by default), then its load as three bytes, most significant first |
| 132–135 | overall-load signal `00 20 00 02` |
| 136–139 | `20` (32), then the overall load as three bytes, most significant first |

Once the last byte has been accepted, `data_ack` clears `data_ready`. At
115200 baud, 140 bytes take 13.4 ms, far inside the one-second period. An
assertion in `load_calc` fires if a period ends before the previous report has
gone out. That can only happen if `SAMPLE_CYCLES` is set shorter than one report.

The receiver on the other end takes the data in four-byte packets. The start
signal and the "module number, then load" packets are the reference format. The
byte order of the load, the overall-load signal and the overall packet are this
design's choices (see *Departures*).

## Display and buttons

`module_select` holds a counter from 0 to 32. Values 0–31 mean a module and 32
means the overall load. A press of KEY[1] adds one and a press of KEY[0]
subtracts one, both wrapping around. Holding a key moves the counter once,
because a flag blocks further steps until both keys are released. Pressing both
keys does nothing. The board keys are active low, and the top inverts them. The
inputs are synchronised but not debounced.

`lcd_display` drives an HD44780-compatible 2×16 LCD, write only. After a 50 ms
power-up wait it sends `38 0C 01 06`. It then rewrites the screen continuously,
latching the selection, its node id and its load at the start of each rewrite.
The node id is shown in hex:

```
MODULE 05 ID 05         OVERALL LOAD
LOAD 0x0F4240           LOAD 0x00ABCD
```

Each write sets RS and the data, waits 100 ns, raises EN for 500 ns, then waits
50 µs (2 ms after the clear command). A full rewrite takes about 1.8 ms.
`LCD_RW` is tied low and `LCD_POWER` high: the display module takes its supply
from that pin.

### Frame view

With the top parameter `LCD_SHOW_FRAMES = 1`, the display shows the last CAN
frame received instead of a load. This is a bring-up mode: send known frames
and compare them with the screen to check the receiver. The buttons and the
UART report work as usual. The layout is:

```
ID 00000123 D3          IDX1ABCDEF0 R2  
AABBCC----------        ----------------
```

Line 1 starts with `ID`. Then comes `X` for an extended frame, the identifier
in eight hex digits, and `D` (data) or `R` (remote) with the DLC in hex. A
final `E` marks a frame that ended in an error. Line 2 holds the data bytes in
hex, first byte on the left, with `--` for bytes the frame did not carry.
Before the first frame, line 1 reads `NO CAN FRAME`. The frame is copied to the
screen at the start of each rewrite, so a busy bus shows one frame in roughly
every 1.8 ms. Frames in between are not shown.

## Clock, reset and parameters

There is no reset pin. A 5-bit power-on counter, relying on the FPGA's register
initial values, holds everything in reset for the first 16 clocks. Verilator's
lint warns about the procedural assignment to this initialised variable
(PROCASSINIT), and that is intended. All other modules use a synchronous
active-high `rst`.

Top-level parameters (defaults in brackets): `CLK_HZ` [50,000,000],
`CAN_BITRATE` [1,000,000], `BAUD` [115,200], `SAMPLE_CYCLES` [= `CLK_HZ`, one
second], `N_MODULES` [32], `MODULE_NODES` [module n watches node id n],
`LOAD_W` [24], `LCD_SHOW_FRAMES` [0, load view]. The CAN and UART dividers
and all LCD timings are derived from `CLK_HZ`. `CLK_HZ / CAN_BITRATE` should
be an integer of about 10 or more.

Coarse synthesis of the whole top gives about 1,170 flip-flops. Most of them are
the 33 live counters plus the 33 snapshot registers, 24 bits each.

## Departures and assumptions

What follows the reference system:
- 50 MHz clock, 1 Mbit/s CAN, 115200 baud with two stop bits and no parity.
- One-second sample period and 32 modules.
- The report sequence (start signal, module packets, overall signal, overall
  load, clear data-ready).
- The PDCP identifier split and the CRC-15 polynomial and register.
- The button behaviour, the pin names and the HD44780-type display.

This design's own choices:
- **Load unit and extent.** Bit times from start of frame to end of frame, stuff
  bits included. Aborted frames count up to the error.
- **Module mapping.** The reference system can be configured to watch chosen
  nodes, but how is not described. Here the choice is the compile-time parameter
  `MODULE_NODES`, with node id n for module n by default. The report carries the
  watched node id in each module packet.
- **Report details.** Load bytes are sent MSB first, the overall signal is
  `00 20 00 02`, and the overall packet starts with byte 32.
- **Button direction.** KEY[1] is up and KEY[0] is down. One written form of the
  reference state machine has the opposite assignment; the stated intent is
  followed. Counter value 32 shows the overall load.
- **Receiver simplifications.** Hard resynchronisation on every falling edge and
  a fixed 70 % sample point. No ACK, no error frames, no overload-frame
  handling: a dominant bit in the intermission is taken as a new start of frame.
- **LCD.** The screen text of both views, the choice of the frame view by a
  parameter, and all HD44780 timing values.
- **Reset.** The 16-clock power-on reset and the key synchronisers.

The reference board could show every received CAN message on its display. The
frame view here shows only the latest frame at each screen rewrite. It cannot
keep up with every frame on a busy bus, because the display takes about 1.8 ms
per screen.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. The packages must come first. For example, the
end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/can_mon_pkg.sv tb/can_tb_pkg.sv rtl/*.sv \
  tb/hd44780_model.sv tb/uart_rx_model.sv tb/tb_can_load_monitor.sv \
  --top-module tb_can_load_monitor -o sim
./obj_dir/sim
```

| testbench | what it covers | run time |
|---|---|---|
| `tb_can_load_monitor` | whole design at reduced rates (2 MHz clock, 200 kbit/s, 250 kbaud, 30,000-clock periods): three periods of random PDCP traffic (valid, extended, remote, CRC-error and out-of-range-node frames), then six periods of fixed traffic. All 140 bytes of every report are checked against the testbench's own count. It then steps through the buttons (both wrap-arounds) and reads the load back from the LCD. A second monitor in the frame view is checked after standard, extended, remote and errored frames, and a tenth report covers that traffic. Each mechanism is counted and must occur. | < 1 s |
| `tb_can_load_monitor_full` | all defaults: one real second of start-up bind requests, a beacon from every node every 500 ms and two electrodes sending every 10 ms, then the 115200-baud report (content and timing) and the LCD | ~40 s |
| `tb_can_frame_rx` | frame decoder against the reference frame generator: every DLC, remote and extended frames, stuff/CRC/form errors and recovery | < 1 s |
| `tb_can_bit_sampler` | sampling with ±0.4 % transmitter drift, first-sample latency | < 1 s |
| `tb_can_crc15` | CRC register against polynomial long division | < 1 s |
| `tb_load_calc` | per-module and overall counts, period length, boundary frame, data-ready handshake, saturation | < 1 s |
| `tb_load_reporter` | byte sequence of two reports with a slow, random UART side | < 1 s |
| `tb_uart_tx` | serial format, two stop bits, back-to-back byte timing | < 1 s |
| `tb_module_select` | stepping, wrap-around, held and both-key cases | < 1 s |
| `tb_lcd_display` | init commands, screen text of the load view and the frame view, power-up and bus timing | < 1 s |

The frame generator in `tb/can_tb_pkg.sv` computes its CRC by polynomial long
division, not with a shift register, so it is independent of `can_crc15`.

## Files

- `rtl/can_mon_pkg.sv`: shared constants, `pdcp_id_t`, `can_frame_t`,
  `pdcp_split()`
- `rtl/can_bit_sampler.sv`, `rtl/can_frame_rx.sv`, `rtl/can_crc15.sv`: CAN
  reception
- `rtl/load_calc.sv`: counters and sample period
- `rtl/load_reporter.sv`, `rtl/uart_tx.sv`: the UART report
- `rtl/module_select.sv`, `rtl/lcd_display.sv`: buttons and display
- `rtl/can_load_monitor.sv`: top
- `tb/`: the testbenches above, plus `can_tb_pkg.sv` (frame generator),
  `uart_rx_model.sv` and `hd44780_model.sv`
