# Micro UART: an 8-bit asynchronous serial port with selectable baud rate

A UART turns bytes into a bit stream on one wire and back, with no clock sent
along. Sender and receiver each have their own clock. They agree only on the
bit rate. This UART works with one frame format:

```
 idle 1 | start 0 | D0 D1 D2 D3 D4 D5 D6 D7 | parity | stop 1 | idle 1 ...
          1 bit     8 bits, LSB first         1 bit    1 bit
```

A frame is eleven bit cells. Parity is even by default. Setting the parameter
`PARITY_ODD = 1` makes it odd. The receiver reports three errors:

- a wrong parity bit,
- a stop bit that reads 0 (framing error),
- a new byte that arrives before the host has read the previous one (overrun).

A host CPU talks to the UART through an 8-bit bidirectional data bus with two
active-low strobes, `read` and `write`.

## Block structure

```
              +-----------+  tx_tick (32 x baud)   +---------+
 baud_sel --->| baud_gen  |----------------------->| uart_tx |---> tx
              |  divider  |  rx_tick (16 x baud)   +---------+
              +-----------+----------+                  ^ xmit, byte
                                     v                  |
 rx ------> sync2 ---> uart_rx (bit-cell ctr, bit ctr,  |
                       de-serializer, state machine)    |
                                     |                  |
              read/write edge detect + bus driver  <----+
                      data[7:0]  read  write
```

| module       | file               | role |
|--------------|--------------------|------|
| `micro_uart` | `rtl/micro_uart.sv` | top: CPU bus, strobes, wiring |
| `baud_gen`   | `rtl/baud_gen.sv`   | divider and the two baud ticks |
| `uart_rx`    | `rtl/uart_rx.sv`    | receiver and error flags |
| `sync2`      | `rtl/sync2.sv`      | two-flip-flop input synchronizer |
| `uart_tx`    | `rtl/uart_tx.sv`    | transmitter |
| `uart_pkg`   | `rtl/uart_pkg.sv`   | widths, state enums, divisor and parity functions |

The whole UART runs on one clock, `mclkx16`. The baud generator does not make
new clocks. It makes single-cycle clock enables ("ticks"). Every flip-flop in
the design is clocked by `mclkx16`.

## Two baud clocks at different rates

The transmitter and the receiver use different tick rates:

- the transmitter gets a tick at 32 x the baud rate and holds each bit for
  32 ticks, counted by a 5-bit bit-cell counter;
- the receiver gets a tick at 16 x the baud rate and uses a 4-bit bit-cell
  counter.

The receiver tick is the transmitter tick divided by two. So both sides run at
the same baud rate:

```
baud rate = f(mclkx16) / (32 * 2**baud_sel)        baud_sel = 0 .. 7
```

The divider is 8 bits wide. The divisor for each `baud_sel` value is
`2**baud_sel`, so the rates go 1, 1/2, 1/4 ... 1/128 of the top rate. This
divisor table is a choice of this design. Change `baud_div()` in `uart_pkg` to
set other rates, for example to reach standard rates from a given crystal.
Divisors up to 255 fit. A new `baud_sel` takes effect at once. If the divider
count is already past the new divisor, it restarts from 0.

Example: with a 39.3216 MHz clock, `baud_sel` 0 to 7 gives 1 228 800,
614 400, ... , 9 600 baud.

## How the receiver finds the bit centres

This is the subtle part of the design. The receiver has no clock from the
sender, so it must find the middle of each bit itself:

1. The line first passes through `sync2`, two flip-flops in series. This
   guards against metastability and costs two clock cycles.
2. In `RX_IDLE`, on each receive tick, the state machine looks for a 0 on the
   line. The first tick that sees a 0 starts the bit-cell counter.
3. In `RX_START` it counts 8 ticks to the middle of the start bit. There it
   checks the line again. If the line is back at 1, the low pulse was
   shorter than half a bit: it is taken as noise, and the state machine goes
   back to idle.
4. In `RX_DATA` it samples every 16 ticks. The first data bit is sampled
   8 + 16 = 24 ticks after the start was seen. The eight data bits shift into
   the de-serializer LSB first. A 4-bit received-bit counter counts them and
   the parity bit, from 0 up to 9.
5. In `RX_STOP`, 16 ticks later, it samples the stop bit. On that tick the
   byte goes to `rec_data`, `rec_ready` is set, and all three error flags are
   written. The state machine returns to idle in the middle of the stop bit,
   ready for the next start edge.

The start edge can be seen up to one tick late, plus the two synchronizer
cycles. With 16 ticks per bit, every sample still lands within about 1/16 of a
bit from the true centre. In simulation the receiver reads frames sent 3 %
fast or 3 % slow without error.

Latency: `rec_ready` rises 168 receive ticks after the tick that first saw the
start bit, which is 10.5 bit times.

### Error flags

The three flags are rewritten at the end of every frame. They describe the
last frame received:

| flag | set when |
|------|----------|
| `parityerr`  | XOR of the data bits and the parity bit is not `PARITY_ODD` |
| `framingerr` | the stop bit sampled as 0 |
| `overrun`    | `rxrdy` was still set when this frame ended |

A frame with an error is still delivered: `rxrdy` is set and the byte can be
read. On an overrun, the new byte replaces the unread one. A good frame clears
all three flags.

## Transmitter

A write while the transmitter is idle does three things:

- it loads `{parity, data}` into a 9-bit serializer;
- it clears the bit counters;
- it sets the output select to "0" for the start bit.

The line comes from a three-way multiplexer, steered by a 2-bit select:

- constant 0 during the start bit;
- the serializer's LSB during the eight data bits and the parity bit. The
  serializer shifts once per bit;
- constant 1 during the stop bit, while idle and during reset.

Every input of the multiplexer comes from a register, so the pin does not
glitch. The start bit begins on the clock after the write. The frame takes
11 x 32 = 352 transmit ticks. `xmit_done` (the `txrdy` pin) goes low for
exactly that long.

## CPU interface

All strobes are taken to be synchronous to `mclkx16`.

- **write**: on the falling edge of `write`, the byte on `data` goes to the
  transmitter. If `txrdy` is low, the byte is dropped.
- **read**: while `read` is low, the UART drives the last received byte onto
  `data`. The falling edge of `read` clears `rxrdy`. While `read` is high, the
  UART leaves `data` at high impedance.
- **status pins**: `txrdy`, `rxrdy`, `parityerr`, `framingerr` and `overrun`
  can be read at any time.
- **reset**: `reset` is active high and synchronous. During reset `tx` is held
  high.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `mclkx16` | in | 1 | master clock |
| `reset` | in | 1 | active-high synchronous reset |
| `baud_sel` | in | 3 | baud-rate select |
| `read`, `write` | in | 1 | active-low strobes |
| `data` | inout | 8 | CPU data bus |
| `rx` | in | 1 | serial input (idle 1) |
| `tx` | out | 1 | serial output (idle 1) |
| `rxrdy`, `txrdy` | out | 1 | byte waiting / transmitter free |
| `parityerr`, `framingerr`, `overrun` | out | 1 | status of the last received frame |

## Where this design makes its own choices

The block structure follows a published micro-UART description:

- the synchronizer;
- the bit-cell and bit counters, with their widths;
- the de-serializer, the serializer and the output multiplexer;
- the x32/x16 baud clocks and the 8-bit divider;
- the pin list.

The following points were not specified there and were chosen here:

- the divisor table `2**baud_sel` (only "divisor 1 at select 0" was given);
- ticks as clock enables in one clock domain, instead of divided clocks;
- synchronous, active-high reset;
- strobes acted on at their falling edge. A write while busy is dropped;
- the parity mode as a parameter, not a pin;
- the parity bit sent as a ninth serializer stage;
- the false-start check at the middle of the start bit;
- the error flags describing the last frame, and an overrun replacing the
  unread byte;
- the state encodings.

Not built:

- a programmable number of data bits (6 to 8) or stop bits, and switching
  parity off. The frame is fixed at 8 data bits, parity and 1 stop bit;
- address decoding on the CPU bus;
- FIFOs, interrupts, retransmission on error and a synchronous mode. These
  are possible extensions, not part of this design.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_sync2` | reset value 1, two-cycle delay on a random sequence |
| `tb_baud_gen` | tick spacing `2**sel` (tx) and `2**(sel+1)` (rx) for all 8 selects |
| `tb_uart_rx` | 20 random bytes, latency of 168 ticks, parity, framing and overrun errors, glitch rejection, +-3 % baud error, odd-parity instance |
| `tb_uart_tx` | bit-centre decoding of every frame, edges on 32-tick boundaries, 352-tick frame time, write while busy, odd-parity instance |
| `tb_micro_uart` | two UARTs wired TX-to-RX both ways, full-duplex transfer at all 8 baud rates (0x45 at the fastest), then injected frames for each error, a glitch and a write while busy. Every one of these mechanisms must occur at least once. Top at default parameters. |

Run one of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/uart_pkg.sv rtl/sync2.sv rtl/baud_gen.sv \
    rtl/uart_rx.sv rtl/uart_tx.sv rtl/micro_uart.sv tb/tb_micro_uart.sv \
    --top-module tb_micro_uart -o sim
./obj_dir/sim
```

For a block testbench, list the package, the block's file (and `sync2.sv` for
the receiver) and the testbench. All of them finish in well under a second.
The end-to-end test covers about 100 000 clock cycles, about half of them at
`baud_sel` 7.

`uart_rx` and `uart_tx` contain concurrent assertions. These check that the
bit counter stays within the nine data and parity bits, and that `xmit_done`
matches the idle state.

Lint with Verilator `-Wall` gives only unused-parameter warnings on package
constants that some modules do not use.
