# Remote-lab I/O circuit: an FPGA board's switches and LEDs on a cheap desk board

In a remote FPGA lab, each student's design runs on an FPGA board in a server
room. This lets students use real hardware from home, but most remote labs give
them the switches and LEDs only as widgets in a web page. The platform this RTL
belongs to gives each student a small, cheap controller board instead. It has
8 slide switches, 3 tactile switches, 8 LEDs and a 4-digit seven-segment display.
The controller board and the FPGA exchange short ASCII messages over a serial
link, and software on the PC and the server relays them. Flipping a switch on
the desk flips the switch the student's design sees. An LED that the design
lights on the remote FPGA lights on the desk.

This repository holds the FPGA side of that link, the **I/O circuit**. It is
placed next to the student's design (the *user circuit*) in the same FPGA. It
turns incoming messages into switch values for the user circuit. It also watches
the user circuit's LED and display outputs and sends a message whenever what
the desk board should show has changed. The controller board's firmware, the
relay software and the user circuit are not part of this RTL.

## The command language

Every message is two ASCII characters: a *select* character followed by an
*action* character.

| Character | Meaning |
|-----------|---------|
| `0`–`3`   | select seven-segment digit 0–3 |
| `4`       | select the LED array |
| `A`–`H` / `a`–`h` | turn segment/LED 0–7 of the selection on / off |
| `I`–`P`   | select slide switch 0–7 |
| `Q`–`S`   | select tactile switch 0–2 |
| `U` / `u` | turn the selected switch on / off |
| `VX`      | request a board-specific response (identifies the board) |
| `VZ`      | request that every LED value be sent again |

Switch messages travel from the desk to the FPGA. LED and segment messages
travel from the FPGA to the desk. In this RTL, letter `A` is segment a (or LED 0),
and so on up to `G` (segment g) and `H` (the decimal point, or LED 7). Digit `0`
is the digit driven by anode 0. These index assignments are choices made here.
The character set itself is the platform's.

Example: `2C` lights segment c of digit 2, `4h` turns LED 7 off, and `KU` turns
slide switch 2 on.

## Structure

```
                     user circuit
          user_sw/user_btn ^     | user_an, user_seg, user_led
                           |     +------------------------------> an, seg, led (board)
board_sw/board_btn --> [mux]     |
                           |     v
                 +---------+-----------+
                 |    io_translator    |        switcher
                 | sw_checker generator|<---- (steers every mux,
                 +----^-----------+----+       answers "VX")
              rx mux  |           |  tx mux
                 +----+-----------v----+
                 |   uart_controller   |
                 | uart_receiver       |
                 |          uart_sender|
                 +----^-----------+----+
                     rxd         txd
```

| Module | Role |
|--------|------|
| `io_circuit` | top: the three parts and the multiplexers between them |
| `uart_controller` | `uart_receiver` + `uart_sender`, FIFO interface each way |
| `uart_receiver` | 8N1 decoder feeding a receive FIFO (Data / Read / Empty) |
| `uart_sender` | send FIFO (Data / Write / Full) feeding an 8N1 encoder |
| `switcher` | pass or translate mode; detects and answers `VX` |
| `io_translator` | `sw_checker` + `generator` |
| `sw_checker` | applies switch messages, detects `VZ` |
| `generator` | compares the desk board's presumed state with the user outputs and emits messages |
| `seg_sampler` | turns the multiplexed display into a steady 4 × 8 picture, 100 times a second |
| `led_sampler` | duty-cycle-thresholded LED sampling, 500 times a second |
| `sync_fifo` | first-word-fall-through FIFO used by both UART paths |
| `io_pkg` | I/O counts, command characters, mode type, character helpers |

The user circuit's display and LED outputs always drive the FPGA board's own
display and LEDs as well, so someone at the server still sees them.

## Two modes and the hand-over

The I/O circuit must not get in the way when no controller board is connected.
So after reset it is in **pass mode**:

* `user_sw`/`user_btn` come straight from the FPGA board's switches.
* The switcher reads every character from the receive FIFO itself, and looks
  only for a `V` followed by an `X`.

When `VX` arrives, the relay software has found the board. The switcher then
writes its two-character answer (`RESPONSE`, `"VN"` by default) into the sender
and switches to **translate mode**:

* `user_sw`/`user_btn` come from the checker's registers.
* The checker reads the receive FIFO.
* The generator writes the sender.

The circuit stays in translate mode until reset. This design answers every later
`VX` too. While in translate mode the switcher may not cut into a message the
generator is halfway through. So it raises `hold`, which stops the generator
from starting a new message. It then waits for `gen_idle` and owns the sender
(`own_tx`) until both answer characters are written. Assertions in
`io_circuit` check that the two writers never overlap, that nothing writes a
full sender and that nothing reads an empty receiver.

## From a scanned display and PWM LEDs to a short message stream

This is the least obvious part of the design. A user circuit drives its outputs
at the FPGA clock rate. The display is time-multiplexed: one anode is active at
a time, typically for about a millisecond. LEDs may be PWM-dimmed. A naive
"send on every output change" would flood a 115,200 bps link, which carries
11,520 characters per second. It would also make the desk display flicker with
scan artefacts. The generator therefore works on *sampled* outputs.

**`seg_sampler` (100 Hz by default).** For each digit it remembers the segment
pattern seen the last time that digit's anode was active, and whether the anode
was active at all during the current 10 ms period. At the end of the period the
*picture* is updated. A scanned digit shows its last pattern, and a digit never
scanned shows blank. As long as the user circuit keeps scanning the same
characters, the picture does not change, and so no messages are sent. Anodes and
segments are taken as active low, as on the Nexys A7 (`SEG_ACTIVE_LOW`).

**`led_sampler` (500 Hz by default).** A counter per LED counts the clocks the
LED is on during each 2 ms period. The sampled value is 1 when that count is at
least `LED_THRESHOLD_PCT` (50 %) of the period. A 25 % PWM LED therefore shows
off on the desk and a 75 % one shows on, instead of a random level picked by
the sampling instant. There is a known side effect. When one LED turns off and
another turns on in the middle of a period, both can stay under the threshold
for one period. The desk then shows both off for 2 ms.

**`generator`.** The generator holds `known`, its copy of the 40 bits the desk
board is believed to show (32 segments + 8 LEDs). It also holds `known_ok`, a
flag per bit saying the copy can be trusted. It picks the lowest bit where the
sampled value differs from `known` or is not trusted. It writes that bit's
select and action characters, then updates the copy, one message at a time.
All flags are cleared while in pass mode and on `VZ`. So entering translate
mode, and every `VZ`, sends the complete state (40 messages, 80 characters).
After that, each changed output bit costs exactly one two-character message.

## Timing

* UART: 8N1, `CLK_HZ/BAUD` clocks per bit (868 at 100 MHz and 115,200 bps).
  Back-to-back frames have no gap.
* The receiver samples the middle of each bit. A byte can be read from the FIFO
  about 9.5 bit times after its start edge. Frames with a low stop bit are
  dropped (`rx_frame_error`). Bytes arriving at a full FIFO are dropped
  (`rx_overrun`).
* `sw_checker`: a `U`/`u` changes the switch on the clock edge that reads it.
* Output to message: one display sampling period (≤ 10 ms) or one to two LED
  periods (≤ 4 ms), plus about 174 µs per message already queued. In the
  full-size stopwatch run (random start phase), LED changes reached the
  desk-board model after 2.8 to 3.5 ms, about 3 ms on average.
* Full state (80 characters) takes about 7 ms on the wire.

## Parameters

| Parameter | Default | Origin |
|-----------|---------|--------|
| `CLK_HZ` | 100,000,000 | Nexys A7 board clock (the platform's boards) |
| `BAUD` | 115,200 | platform |
| `SEG_SAMPLE_HZ` | 100 | platform |
| `LED_SAMPLE_HZ` | 500 | platform |
| `LED_THRESHOLD_PCT` | 50 | chosen here |
| `FIFO_DEPTH` | 16 | chosen here |
| `SEG_ACTIVE_LOW` | 1 | chosen here (Nexys A7 polarity) |
| `RESPONSE` | `"VN"` | chosen here; the contents of the board-specific answer are not specified |

The I/O counts (4 digits, 8 segments, 8 LEDs, 8 slide and 3 tactile switches)
are the controller board's, fixed in `io_pkg`.

## How faithful this is

These parts follow the original platform description: the three-part structure
(UART controller, switcher, I/O translator with checker and generator), the
pass-through before `VX`, the command characters, the baud rate, the two
sampling rates, the appearance-tracking display sampler, the duty-threshold LED
sampler, and "pick one differing segment, send it, update the copy".

These parts were decided here because the description does not give them:

* the 8N1 frame and the FIFO depth;
* the contents of the `VX` answer, and answering repeated `VX`;
* never going back to pass mode;
* the `hold`/`gen_idle` arbitration of the sender;
* lowest-index-first order, and always sending both characters of a message
  (the protocol would also allow omitting a repeated select);
* sending the full state on entry and on `VZ`;
* the 50 % threshold;
* the "last pattern while the anode was active" rule of the display sampler;
* active-low display polarity;
* all reset values (switches 0, nothing selected);
* a synchronous active-high reset.

The anode input is 4 bits wide, for the desk board's 4 digits, although the
Nexys A7 has 8 digits. Wiring the student's chosen digits to these four is left
to the wrapper that instantiates the user circuit.

The I/O circuit never sends `VZ` itself. It does not ask the desk board for the
switch state on entering translate mode, so the user circuit sees all switches
at 0 until the desk reports changes or the relay forwards a `VZ` to the desk
board.

## Simulation

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl -Itb \
    --top-module tb_io_circuit rtl/io_pkg.sv tb/tb_io_circuit.sv -o sim
./obj_dir/sim
```

| Testbench | What it covers |
|-----------|----------------|
| `tb_uart_receiver`, `tb_uart_sender`, `tb_uart_controller` | bytes both ways against an independent line model, bit timing, back-to-back frames, frame error, overrun, Full |
| `tb_switcher` | pass-mode draining, `VX` answer with a randomly full sender, hand-over, waiting for an idle generator |
| `tb_sw_checker` | 3,000 random characters against a reference model |
| `tb_seg_sampler`, `tb_led_sampler` | scanned display with random patterns; random duty cycles at and around the threshold |
| `tb_generator`, `tb_io_translator` | message stream decoded by a desk-board model: full state, one message per change, `VZ`, `hold` |
| `tb_io_circuit` | end to end at a 1.6 MHz clock and 100 kbaud with a stopwatch user circuit. Pass mode, `VX`, full state, Full back-pressure, switch messages, mirroring, no messages for a steady display, PWM thresholding, `VZ`, a second `VX` while messages flow. Each of these is counted and must happen |
| `tb_io_circuit_full` | all defaults (100 MHz, 115,200 bps). The stopwatch latency experiment: 140 ms of counting, with the latency measured from each stopwatch LED change to the desk-board model (about 13 s of simulation) |

`tb/stopwatch_model.sv` is the user circuit used by the system tests. It counts
hundredths, shows 100 s…0.1 s on the display, and shows Gray-coded tenths and
hundredths on LEDs 7–4 and 3–0. `tb/board_model.sv` and `tb/uart_line.sv` play
the desk board and its serial link.
