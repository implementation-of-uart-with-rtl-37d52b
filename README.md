# 8-bit UART with built-in self test and status register

A UART turns bytes into a single-wire asynchronous serial stream and back.
Since transmitter and receiver share no clock, each frame starts with a start
bit that the receiver uses to line itself up, and every bit is sampled near
its middle. This design does that with a 16x oversampling tick. On top of the
plain UART it adds two things for testability and data integrity:

- a **built-in self test (BIST)** that loops the transmitter back into the
  receiver, sends LFSR-generated bytes and checks every one of them. No
  external tester is needed to tell whether both halves of the UART work.
- a **status register** that reports receive-ready, parity error, framing
  error, overrun, transmitter busy and the self-test result to the host.

The defaults are a 32 MHz system clock and 9600 baud. Frames have 1 start
bit, 8 data bits sent LSB first, 1 even-parity bit and 1 stop bit.

## Block diagram

```
 clk32mhz --> baud_gen --bclk (1 cycle every 208 clocks = 16 x baud)--+--> uart_tx
                                                                      +--> uart_rx

 xmit_cmd --> cmd_pulse --xmit_cmd_p--+
                                      +--[sel]--> uart_tx --txd--+--[sel]--> txd_out
 bist_ctrl --tx_cmd, tx_data (LFSR)---+             |            |   (held 1 in test)
   ^  ^                                            busy          |
   |  +------------------------------------------------+         | loopback in test
   |                                                    |         v
   +-- rbuf, rec_ready, parity_err, frame_err <-- uart_rx <--[sel]<-- rxd

 status_reg <-- rec_ready, errors, busy, BIST result, rd_ack --> status[7:0]
```

`uart_top` wires these together. A single `baud_gen` serves both directions.

## Timing: the 16x tick

`baud_gen` divides the system clock by `DIV = SYS_CLK_HZ / (16 * BAUD)`. That
is 32e6 / 153600 = 208 after the fraction is dropped. It emits a one-cycle
enable `bclk` every 208 clocks, at 153.85 kHz. The tick is an enable, not a
derived clock: every flip-flop runs on `clk32mhz`. One bit therefore lasts
16 ticks = 3328 clocks, which is 9615 baud, 0.16 % fast. A frame lasts
11 x 3328 = 36608 clocks.

## Receiver (`uart_rx`)

The receiver is where the timing matters most. RXD first passes through a
two-flip-flop synchroniser (`rxd_sync`). A five-state machine then advances
only on ticks:

| State | What happens on a tick |
|---|---|
| `R_START` | idle; if `rxd_sync` is low, count this as low tick 1 and go to `R_CENTER` |
| `R_CENTER` | if the line went high again, it was a glitch: back to `R_START`. After 8 consecutive low ticks (half a bit) the start bit is valid. The machine is now at its middle and goes to `R_WAIT` |
| `R_WAIT` | count ticks 0..14. On the next tick go to `R_SAMPLE`, or to `R_STOP` once the 8 data bits and the parity bit are in |
| `R_SAMPLE` | the 16th tick after the previous middle: shift `rxd_sync` into the shift register (LSB first), back to `R_WAIT` |
| `R_STOP` | middle of the stop bit: load `rbuf`, set `parity_err` and `frame_err`, pulse `rec_ready`, back to `R_START` |

The receiver waits 8 ticks in `R_CENTER`, then 16 ticks per bit. So every
sample falls within one tick of the middle of its bit. A sender whose bit time
is 3 % longer or shorter is still received correctly (tested).
`R_STOP` returns to `R_START` at the middle of the stop bit, so a start bit
that follows the stop bit at once is still caught. A low stop bit sets
`frame_err`. That low level also looks like a new start bit, so a break or a
badly framed byte is followed by one more (bad) frame.

`rec_ready` comes 10.5 bits after the falling edge of the start bit, plus a
few clocks for the synchroniser and the tick phase. Because the receiver is
back in `R_START` from the middle of the stop bit, it accepts senders that
use 1, 1.5 or 2 stop bits. `rbuf` and the error flags hold
until the next frame ends.

## Transmitter (`uart_tx`)

| State | Leaves when | TXD |
|---|---|---|
| `X_IDLE` | a latched command and a tick: load the start bit | 1 |
| `X_START` | `XCNT16 = 15` (16th tick) | 0 |
| `X_WAIT` | `XCNT16 = 14`: to `X_SHIFT`, or to `X_STOP` if the bit on the line is the last (the parity bit, `XBITCNT = FRAMELEN`) | current bit |
| `X_SHIFT` | next tick: next bit onto the line, back to `X_WAIT` | next bit |
| `X_STOP` | `XCNT16 = 15` and no new command: pulse `txd_done`, to `X_IDLE` | 1 from its first tick |

TXD comes from a flip-flop and changes only on ticks, every 16 ticks exactly.
The frame layout is `{stop=1, parity, data[7:0], start=0}`, sent right to
left. With even parity the parity bit is `^data`.

A command pulse is latched and acted on at the next tick, so a one-cycle pulse
between ticks is not lost. `txdbuf` is sampled in the same cycle. `busy` is
high from the command until `txd_done`, and a command while `busy` is ignored.
After `txd_done` the next start bit can follow on the next tick. Back-to-back
frames thus have a stop bit of exactly 16 ticks.

## Transmit command (`cmd_pulse`)

`xmit_cmd` comes from off-chip and may stay high for any length of time. If it
were used as a level, a command still high when a frame ends would start a
second frame. `cmd_pulse` synchronises it and emits a single-cycle
`xmit_cmd_p` on its rising edge. That pulse appears 3 clock edges after the
rise. So one command sends one frame, however long it is held.

## Built-in self test (`bist_ctrl`, `lfsr`)

A rising edge on `bist_start` starts a run:

1. `bist_mode` goes high. The top level feeds the transmitter's TXD into the
   receiver, holds `txd_out` at 1 and ignores `rxd`, `xmit_cmd` and
   `txdbuf_in`. It also keeps `rec_ready` and `txd_done_out` low.
2. For each of `BIST_PATTERNS` (255) bytes, the controller waits for the
   transmitter to be free and sends the current LFSR value. It then waits for
   the receiver's `rec_ready`. A byte is an error if `rbuf` differs from the
   pattern, or if the receiver reports a parity or framing error. The LFSR
   then steps.
3. If no frame comes back within two frame times, the run counts one error
   and stops.
4. `done` and `pass` (`err_cnt == 0`) are shown in `status`. The error count
   is on `bist_errors`.

The LFSR is an 8-bit Galois register with the maximal-length polynomial
x^8 + x^6 + x^5 + x^4 + 1 (mask `8'hB8`), seeded with 1. A full run therefore
sends each of the 255 non-zero bytes once. Each data bit is sent as both 0
and 1, and both parity values occur. The run takes 255 back-to-back frames:
(254 x 11 + 10.5) bits = 9.33 M clocks, or 0.29 s at 32 MHz.

Start the test while the link is idle. A frame that is in flight on `rxd` or
`txd_out` when the test starts is cut off.

## Status register (`status_reg`)

`status` is a packed `uart_pkg::status_t`:

| Bit | Name | Meaning |
|---|---|---|
| 7 | `bist_pass` | last self test found no error |
| 6 | `bist_done` | a self test has finished since reset or the last start |
| 5 | `bist_mode` | self test running |
| 4 | `tx_busy` | transmitter has a frame pending or in progress |
| 3 | `overrun` | a frame arrived while `rx_ready` was still set; cleared by `rd_ack` |
| 2 | `frame_err` | last frame had a low stop bit |
| 1 | `parity_err` | last frame failed the parity check |
| 0 | `rx_ready` | `rbuf` holds a byte not yet acknowledged; cleared by `rd_ack` |

The host reads `rbuf` and pulses `rd_ack`. If a frame arrives in the same
cycle as `rd_ack`, the frame wins: `rx_ready` stays set and no overrun is
flagged. `status` is registered and shows an event one cycle later.

## Top-level ports (`uart_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk32mhz`, `reset` | in | system clock; asynchronous active-high reset |
| `rxd` / `txd_out` | in / out | serial lines, idle high |
| `xmit_cmd`, `txdbuf_in[7:0]` | in | send a byte (rising edge of `xmit_cmd`) |
| `txd_done_out` | out | one cycle at the end of each transmitted stop bit |
| `rec_ready`, `rbuf[7:0]` | out | one-cycle pulse with a received byte |
| `rd_ack` | in | host has taken `rbuf` |
| `bist_start` | in | rising edge starts the self test |
| `status[7:0]`, `bist_errors[7:0]` | out | status word; error count of the last self test |

Parameters: `SYS_CLK_HZ` (32 000 000) and `BAUD` (9600) set the divider.
`FRAMELEN` (8) sets the data bits, and `BIST_PATTERNS` (255) the self-test
length. `uart_rx` and `uart_tx` also have `PARITY_EN` and `ODD_PARITY`. Both
ends must use the same values.

## What comes from the reference design and what is this design's own

Taken from the reference design:

- the 16x oversampling baud generator with M = 208 at 32 MHz / 9600 baud
- the receiver's five states, the RXD synchroniser, the half-bit start check,
  the 15-then-sample counting and `FRAMELEN = 8`
- the transmitter's five states and their `XCNT16` / `XBITCNT` conditions
- the 11-bit frame with a parity bit
- the conditioning of the transmit command into a short pulse
- the top-level split into baud generator, receiver and transmitter
- the presence of a BIST based on an LFSR and of a status register

This design's own choices:

- **Start-bit check.** The reference gives two thresholds: at least 8 ticks
  (half a bit) and, elsewhere, more than a quarter bit. This design uses
  8 ticks, the rule that puts the samples mid-bit.
- **Even parity.** The reference only says the parity bit depends on the
  number of ones. Its receive example (four ones, parity bit 0) implies even
  parity.
- **Stop bit checked.** The receiver's state machine does not depend on the
  stop bit, as in the reference. It does sample the stop bit, to report
  framing errors. The parity bit is checked as well.
- **Clock enable.** The tick is a clock enable, not a divided clock.
- **Command handling.** The transmitter latches a command until the next tick
  and ignores commands while busy.
- **Self test and status register.** Their whole structure is new: the
  loopback, the per-byte compare, the timeout, the LFSR polynomial, the status
  bit layout and the set/clear rules. The reference names both features but
  does not describe them.
- **Area.** No attempt was made to match the resource counts reported for the
  reference implementation.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | Checks |
|---|---|
| `tb_baud_gen` | first tick after 208 clocks, exact 208-clock spacing, one-cycle width |
| `tb_cmd_pulse` | one pulse per command of 1 to 1000 cycles, 3-edge latency |
| `tb_uart_rx` | the example frame `0 01101100 0 1` gives `rbuf = 8'h36`; random bytes; bad parity; low stop bit; glitches up to 5 ticks rejected; senders 3 % slow and fast; back-to-back frames; `rec_ready` time |
| `tb_uart_frame_cfg` | transmitter into receiver with 7 data bits and no parity, and with 8 data bits and odd parity: data, error flags, frame length on the line |
| `tb_uart_tx` | independent decode of every frame, TXD edges only on bit boundaries, `txd_done` time, back-to-back spacing, command ignored while busy |
| `tb_lfsr` | first values by hand, period 255 with no repeats, hold and reload |
| `tb_status_reg` | every status bit's set and clear rules |
| `tb_bist_ctrl` | against a loopback model: clean run passes; three injected faults give 3 errors; a dead link times out |
| `tb_uart_top` | end to end at a 4-clock tick, with a full 255-pattern self test. It counts host transmit, long command, receive, full duplex, parity error, framing error, overrun, glitch rejection, acknowledge and self-test pass, and fails if any never happened |
| `tb_uart_top_full` | default parameters (32 MHz, 9600 baud): one transmitted frame decoded and timed, the example frame received, a full self test. About 10 M clocks |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/uart_pkg.sv tb/tb_uart_top.sv --top-module tb_uart_top
./obj_dir/Vtb_uart_top
```

`uart_pkg.sv` has to come first on the command line. The other modules are
found through `-Irtl`. The block testbenches use a 4-clock tick, so a bit
lasts 64 clocks and each run finishes in well under a second.
`tb_uart_top_full` takes a few seconds. Assertions in the RTL check that
`rec_ready` and `txd_done` last one cycle, that TXD is high when the
transmitter is idle, that the LFSR never reaches zero and that the self test
drives the transmitter only while it runs.
