# A 16x-oversampling UART in SystemVerilog

A UART turns bytes into an asynchronous serial stream and back: the line idles
at 1, each byte goes out as a frame of a start bit (0), eight data bits, least
significant first, and a stop bit (1). There is no shared clock, so the receiver
has to find each frame's start on its own and sample every bit near its middle.
This design does that the classic way. It times the line with a baud clock that
ticks 16 times per bit. It re-aligns that clock on every start bit and samples
each bit on the 8th tick. The baud rate is set at run time by one divisor,
`clks_per_bit`. An optional even parity bit can be enabled at elaboration.

The architecture follows the paper "High Speed UART Implementation Using VHDL"
(Satyavathi, Sowjanya, Akula): a baud rate generator, a transmitter built from a
prescaled counter, a nine-bit shift register and a four-state controller, and a
receiver with a four-state controller counting 16 baud ticks per bit. The paper
gives state diagrams and prose, not code. Where it is silent, this RTL makes
its own choices. They are listed under "Choices and departures" below.

## Blocks

```
                 clks_per_bit
                      |
   tx_dv, tx_byte --> uart_tx --------------------------------> tx_serial
                      (baud_gen x1 prescaler, 9-bit shifter, FSM)
                      |--> tx_active, tx_done

   rx_serial -------> uart_rx --------------------------------> rx_dv, rx_byte,
                      ^    | baud_sync                           rx_parity_err
              os_tick |    v
                      baud_gen x16 <-- clks_per_bit
```

| file | contents |
|---|---|
| `rtl/uart_pkg.sv` | default sizes, state enums of both controllers |
| `rtl/baud_gen.sv` | fractional clock-enable generator, OVERSAMPLE ticks per `clks_per_bit` clocks |
| `rtl/uart_tx.sv` | transmitter |
| `rtl/uart_rx.sv` | receiver |
| `rtl/uart_top.sv` | transmitter, receiver and the receiver's baud generator |

The transmit and receive lines are independent. Tie `tx_serial` to `rx_serial`
for a loopback.

## The baud generator: exact bit time from any divisor

`baud_gen` is a phase accumulator. Every clock it adds `OVERSAMPLE` to an
accumulator. When the sum reaches `clks_per_bit`, it raises `tick` for one cycle
and subtracts `clks_per_bit`. So there are exactly `OVERSAMPLE` ticks in every
`clks_per_bit` clocks, even when the divisor is not a multiple of 16. The usual
115200 baud from 10 MHz needs 86.8 clocks per bit. With `clks_per_bit = 87`,
the 16 ticks are spaced 5 or 6 clocks apart and a bit lasts exactly 87 clocks.
A plain divide-by-5 would instead give a 25% error in the bit time when
followed by a divide-by-16.

`tick` is combinational from the accumulator: it is high in the cycle whose
closing edge completes a count. A `sync` input clears the accumulator, which
restarts the phase. After `sync`, tick *k* is acted on at clock edge *n* exactly
when floor(n·OVERSAMPLE/clks_per_bit) steps up. The testbench checks this edge
by edge. `tick` does not depend on `sync`, so a user may derive `sync` from
`tick` without forming a loop.

The same module serves twice:

* With `OVERSAMPLE = 1` it is the transmitter's prescaled counter. The
  transmitter restarts it when it accepts a byte, so every transmitted bit is
  exactly `clks_per_bit` clocks.
* With `OVERSAMPLE = 16` it is the receiver's baud clock. The receiver restarts
  it at every detected start bit.

`clks_per_bit` must be at least `OVERSAMPLE` (an assertion checks this). It
should be changed only while both sides are idle. A change in mid-frame is
clamped safely, but that frame's timing is undefined.

## Transmitter

The nine-bit shift register holds `{data[7:0], start bit}`. Its bit 0 *is* the
line, so `tx_serial` comes straight from a flip-flop and cannot glitch. Each bit
enable shifts it right. Ones are shifted in, which become the stop bit and the
idle level. With parity enabled, the first bit shifted in is the even parity
bit, so it follows D7 out of the register.

The controller has four states:

| state | line | leaves on | to |
|---|---|---|---|
| IDLE | 1 | `tx_dv` | START (loads the shift register, restarts the prescaler) |
| START | 0 | bit enable | DATA |
| DATA | D0..D7 (then parity) | bit enable after 8 (9) bits | STOP |
| STOP | 1 | bit enable | IDLE, `tx_done` pulse |

Timing: `tx_dv` is sampled only in IDLE; a request while busy is ignored. The
start bit is on the line from the edge that takes `tx_dv`. `tx_done` is high for
the one cycle in which the controller is back in IDLE, exactly
(10 + PARITY_EN) · `clks_per_bit` clocks after that edge. A `tx_dv` in the
`tx_done` cycle is accepted, so frames can be sent back to back with no gap.
`tx_active` is high from the accepting edge until `tx_done`.

## Receiver

The receiver is the hard part. It must decide from the line alone where each
bit is. Its controller runs on the 16x tick and counts ticks within a bit in
`state_count` (0..15):

1. **RX_IDLE.** `rx_serial` first passes a two-flop synchronizer. A 0 on the
   synchronized line is a start bit. The line is 1 whenever the receiver enters
   this state after a good frame, so a 0 here means a falling edge. On
   detection the receiver pulses `baud_sync`. That restarts the baud
   generator, so tick *k* falls *k*/16 of a bit after the detected edge.
2. **RX_START.** Waits 16 ticks, one bit time, to the start of D0.
3. **RX_DATA.** On the 8th tick of each bit, the bit's centre, it shifts the
   line into a shift register. After 16 ticks it moves to the next bit. After 8
   bits (9 with parity) it goes to RX_STOP.
4. **RX_STOP.** Samples the stop bit at its centre. After 16 ticks it presents
   the byte with a one-cycle `rx_dv` and returns to RX_IDLE. If the line is
   already 0 by then, it goes straight to RX_START and restarts the baud phase.

Two timing effects need care here. First, the synchronizer makes the receiver
see the start-bit edge 2 to 3 clocks late, so every sample is 2 to 3 clocks
after the true centre. That is negligible against the ±8-tick window.

The second is a sender slightly *faster* than the receiver, sending frames
back to back. Its next start bit arrives before the receiver has counted 16
ticks of stop bit. If the receiver simply finished its stop bit first, it would
start the next frame late by the rate difference. It would lose that much again
on every frame and soon sample the wrong bits. So RX_STOP also ends early
when the line falls after a stop bit that was sampled at 1. The byte is then
presented at once and the new frame is timed from its own edge. With this, a
continuous stream 2% fast or 2% slow is received without error. The testbench
checks both.

Timing: at matched rates `rx_dv` comes 3 to 4 clocks after the end of the
stop bit. For a fast sender it comes just after the next start bit. `rx_byte`
and `rx_parity_err` hold until the next byte. The stop bit's value is not
reported: there is no framing-error output. A line held low (a break) is read
as a sequence of 0x00 bytes.

## Parameters and ports

| parameter | default | meaning |
|---|---|---|
| `DATA_BITS` | 8 | data bits per frame |
| `OVERSAMPLE` | 16 | receiver ticks per bit (even, at least 2) |
| `PARITY_EN` | 0 | 1 adds an even parity bit after the data |
| `CPB_W` | 16 | width of `clks_per_bit` |

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `clks_per_bit` | in | divisor: baud = f_clk / clks_per_bit; 87 = 115200 baud at 10 MHz |
| `tx_dv`, `tx_byte` | in | send request (one cycle) and its byte |
| `tx_serial` | out | serial output, idles at 1 |
| `tx_active`, `tx_done` | out | busy; end-of-frame pulse |
| `rx_serial` | in | serial input (asynchronous) |
| `rx_dv`, `rx_byte`, `rx_parity_err` | out | byte-valid pulse, byte, parity mismatch (0 without parity) |

The highest bit rate is f_clk / 16. At a 100 MHz FPGA clock that is
6.25 Mbit/s. The paper's headline figure of 250 Mbit/s would need a 4 GHz clock
with 16x oversampling, so this design does not reach it.

## Choices and departures

These follow the paper: the three-block partition, the four states of each
controller and their order, the nine-bit transmit shift register, the
prescaled transmit counter, 16 baud ticks per receiver state, sampling at the
bit centre, and the 8-data-bit frame with an optional parity bit.
The port names follow the paper's simulation signals (TX_DV, TX_BYTE,
TX_SERIAL, TX_DONE, RX_DV, RX_BYTE, RX_SERIAL), as do 87 clocks per bit and
115200 baud.

These are this design's own choices:

* The fractional divider. The paper only asks for a clock divider and
  configurable baud rates.
* The run-time divisor shared by transmitter and receiver.
* Restarting the receiver's baud phase on every start bit.
* The input synchronizer.
* Level rather than edge start detection in RX_IDLE.
* The early end of RX_STOP for a sender that is slightly fast. It departs from
  a strict reading of the paper's receiver diagram, in which the stop state
  always lasts 16 ticks.
* The tx_dv / tx_done / rx_dv handshake.
* Even parity and its error flag.
* No framing-error output.
* The asynchronous active-low reset.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_baud_gen`: tick positions edge by edge for divisors 16, 17, 87, 160
  and 1000, at 1x and 16x.
* `tb_uart_tx`: every clock of every frame compared with an independently built
  bit sequence, with and without parity. Also exact `tx_done` timing and
  requests ignored while busy.
* `tb_uart_rx`: the testbench is the sender. It checks single frames, streams of
  30 back-to-back frames at the nominal rate and with the sender 2% fast and
  2% slow, divisors 16, 23 and 200, good and bad parity, and `rx_dv` latency.
* `tb_uart_top`: two loopback UARTs, one with parity. It covers baud switches
  across 87, 16, 40 and 1000 clocks per bit, back-to-back frames, ignored
  requests, injected parity errors, bursts from a sender 2.5% fast and exact
  frame lengths. It counts each of these events and fails if any never
  happened.
* `tb_uart_top_full`: the default configuration at 10 MHz / 115200 baud. It
  sends 0xAB in loopback and checks each bit, `tx_done` at 870 clocks and the
  received byte.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_uart_top \
    -y rtl -y tb +libext+.sv rtl/uart_pkg.sv tb/tb_uart_top.sv
./obj_dir/Vtb_uart_top
```

Replace the top module and file name for the other testbenches. All of them
finish in well under a second.
