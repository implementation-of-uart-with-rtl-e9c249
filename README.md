# UART with an error status register in a multi-bit flip-flop

This is a complete UART (universal asynchronous receiver/transmitter) in synthesizable
SystemVerilog. It turns bytes into a serial line and back, with a programmable frame format
and baud rate. Each direction has 16 bytes of buffering. The receiver has an error status
register that reports parity, framing, overrun and break errors.

The design's particular feature is how that status register is built. Its four flag bits
are stored in one four-bit *multi-bit flip-flop* instead of four single-bit flip-flops.

- A single-bit flip-flop cell is a master latch and a slave latch plus two inverters that
  make the inverted and re-buffered clock.
- A multi-bit cell lets all its bits share one pair of those clock inverters.
- That means fewer clock loads, less clock-network power and less area.

At register-transfer level the merged cell is simply a register of several bits on one
clock (`mbff`). A synthesis flow with a multi-bit cell library maps it onto such a cell.

Everything runs on one clock with an asynchronous active-low reset. The reference
configuration is a 100 MHz clock with 16-byte FIFOs.

## Block diagram

```
                 lcr_wr/lcr_din
                       |
                    +-----+   cfg (frame format, rate)
                    | lcr |---------------------------+---------------------+
                    +-----+                           |                     |
                       | baud_sel                     |                     |
 clk --------------> +----------+  bit_tick           v                     |
                     | baud_gen |-----------> +------------------------+    |
                     +----------+             | uart_tx                |    |
                       |   | sample_tick      |  sync_fifo -> hold_reg |--> txout
                baud_out   |           wr --->|  (16 B)      (THR)     |
                           |         txin --->|        -> tx_shift_reg |--> txe, ff
                           |                  +------------------------+    |
                           |                                                v
                           |    +-------------------------------------------------+
                 rxin ---->+--->| uart_rx                                         |
                                |  rx_sampler -> rx_ctrl -> rx_shift_reg (RSR)    |
                                |        rx_error_logic -> hold_reg (RHR)         |--> rxout
                           rd ->|                        -> sync_fifo (16 B)      |--> rx_empty
                                |  status_register (one 4-bit mbff)               |--> be oe pe fe
                                +-------------------------------------------------+
```

For loop-back, connect `txout` to `rxin` outside the top.

## Line format and the line control register

A frame on the line has these parts, in order:
- a low start bit;
- 5 to 8 data bits, least significant first;
- an optional parity bit;
- one or two high stop bits.

The line is high between frames. The longest frame has 1 + 8 + 1 + 2 = 12 bits, which is
why both shift registers are 12 bits wide.

The line control register (LCR) is one byte (`lcr.sv`, type `uart_pkg::lcr_t`):

| bits | field          | encoding in this design                                   |
|------|----------------|-----------------------------------------------------------|
| 7    | stop bits      | 0: one, 1: two                                            |
| 6:5  | word length    | 00/01/10/11: 5/6/7/8 data bits                            |
| 4    | parity enable  | 1: a parity bit follows the data                          |
| 3    | parity mode    | 1: even (data + parity have an even number of ones), 0: odd |
| 2:0  | baud rate      | 1200, 2400, 4800, 9600, 19200, 38400, 57600, 115200       |

The field positions belong to the original register format. The encodings inside each
field and the rate table are choices made here. The reset value `8'h7F` means 8 data bits,
even parity, one stop bit, 115200 baud. Rewrite the LCR only while both directions are idle:
a frame on the line while it changes is corrupted.

## Baud generation and 16-fold oversampling

`baud_gen` divides the clock by `round(CLK_HZ / (16 × rate))` to make `sample_tick`. It
divides that by 16 to make `bit_tick`.
- The receiver samples on `sample_tick`; the transmitter shifts on `bit_tick`.
- The eight divisors are worked out when the design is elaborated. The hardware has no
  divider.
- At 100 MHz, 115200 baud gives 54 clocks per tick and 864 clocks per bit, which is 0.47 %
  fast. 1200 baud needs a 13-bit counter.
- `baud_out` is a square wave at the bit rate.

## Transmit path

On every clock with `wr` high, `txin` is pushed into the 16-byte transmit FIFO (`sync_fifo`).
A write while `ff` (FIFO full) is high is lost. Bytes then move down the chain:

1. **FIFO to THR.** When the FIFO holds a byte and the transmitter hold register (THR,
   `hold_reg`) is empty, the byte moves into the THR.
2. **THR to TSR.** When the THR is full and the transmitter shift register (TSR,
   `tx_shift_reg`) is empty, the byte moves into the TSR.
3. **Framing.** The TSR loads the complete frame at once: start bit, the low data bits,
   parity, and stop bits.
4. **Shifting out.** It sends one bit per `bit_tick`. `txout` is a register, so the line
   changes only on a bit tick and every bit lasts exactly one bit period.

The TSR reports empty at the tick that drives the last stop bit. The next frame's start bit
therefore follows after exactly one stop-bit period: a burst goes out back to back, with no
idle gap. `txe` is the FIFO-empty flag.

## Receive path

This is the part that needs the most care.

### Finding the start bit and voting on every bit

`rx_sampler` first passes `rxin` through a two-flip-flop synchroniser. It then watches the
line on every `sample_tick`, 16 ticks per bit.

- **Start edge.** While `rx_ctrl` is hunting, the first tick that sees the line low is taken
  as the falling edge of a start bit. It starts a phase counter at 0.
- **Sample window.** Every bit from then on is 16 ticks long. Ticks 6, 7, 8 and 9 are the
  four samples of that bit, so they sit at its centre.
- **Result.** After tick 9 the sampler reports the bit value (the last sample). It also
  reports whether all four samples agreed.
- **False starts.** If the four samples of the start bit are not all low, the candidate is
  dropped and hunting resumes. A low glitch shorter than about half a bit is therefore
  never taken for a start bit.
- **Next frame.** When the controller returns to hunting, the phase counter stops and waits
  for the next falling edge. Each frame is therefore timed afresh from its own start bit.

**Clock tolerance.** The edge is found to within one tick, so the four samples fall between
6/16 and 10/16 of each bit. That leaves 3/8 of a bit of margin to either bit edge. Two ends
whose clocks differ can drift by that much over a frame, about 3.4 % over 11 bits.

Two UARTs on separate clocks joined by a crossover cable receive everything correctly with
one clock 1 % or 3 % slow. At 4 % most frames fail.

Sampling only four times per bit would spread the four samples over the whole bit and leave
no margin. Such a receiver loses about half its frames at 1 % mismatch.

### Assembling the frame

`rx_ctrl` is a three-state controller: IDLE (hunting), FRAME, and WAIT_HIGH.
- The start group clears the receive shift register (RSR, `rx_shift_reg`) and loads the
  start bit into it.
- Each further group is shifted in.
- After the frame length set by the LCR, `frame_done` pulses together with a flag that any
  group had disagreeing samples.
- If the last sample was low, the controller waits in WAIT_HIGH for the line to return high
  before it hunts again. A line stuck low is therefore not taken for a string of start bits.

The RSR re-aligns the 12 bits by the frame length and presents the data bits (unused upper
bits are zero), the parity bit and a stop-bits-good flag.

### Errors and the hold register

`rx_error_logic` is combinational and evaluated in the `frame_done` clock:

| flag | pin | condition |
|------|-----|-----------|
| PL   | `pe` | parity enabled and the received parity bit differs from the parity of the received data |
| SL   | `fe` | a stop bit was low, **or** the four samples of any bit of the frame disagreed |
| OL   | `oe` | the frame is complete but the receiver hold register (RHR) cannot take it |
| BL   | `be` | the line has been low for longer than one frame time |

A frame with a parity or framing error is still delivered.

**Overrun.** The RHR passes its byte to the 16-byte receive FIFO whenever the FIFO has room.
It therefore stays occupied only while the FIFO is full. The receiver holds 17 bytes
(16 in the FIFO plus 1 in the RHR) before the 18th frame is dropped and overrun is flagged.

**Break.** `rx_ctrl` counts consecutive sample ticks with the line low. It raises break once, when the count
reaches (frame bits × 16) + 1. The all-zero frame received during a break also carries a
framing error (its stop bit was low) and is delivered as one `0x00` byte.

### Reading

A clock with `rd` high and `rx_empty` low pops the oldest byte into the `rxout` register.
It stays there until the next read. A received byte reaches the FIFO three clocks after the
last sample of its stop bit.

## The status register and the multi-bit flip-flop

`status_register` keeps the four flags, ordered break, parity, frame, overrun (`err_t`).
- **One shared flip-flop.** All four flags live in a single `mbff #(.WIDTH(4))` and share
  one clock, which is the point of the design.
- **Sticky flags.** A flag is set by a one-clock error event and stays set.
- **Clearing.** Every `rd` clears the flags. A new error in the same clock wins over the
  clear.

`mbff` defaults to two bits, the size of the basic two-into-one merge. Its testbench compares
it with a latch-level model of that cell (`tb/mbff_cell_model.sv`). The model has shared
CLK → CLK' → CLK inverters, and per bit a master latch open on CLK' and a slave latch open on
the buffered CLK.

## Top-level pins (`uart_top`)

| pin | dir | meaning |
|-----|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `lcr_wr`, `lcr_din[7:0]` | in | write the LCR |
| `wr`, `txin[7:0]` | in | push a byte into the transmit FIFO |
| `txe`, `ff` | out | transmit FIFO empty / full |
| `txout` | out | serial output, idle high |
| `baud_out` | out | square wave at the bit rate |
| `rxin` | in | serial input |
| `rd` | in | read one received byte |
| `rxout[7:0]` | out | last byte read |
| `rx_empty` | out | receive FIFO empty |
| `be`, `oe`, `pe`, `fe` | out | break, overrun, parity, framing error flags |

Parameters: `CLK_HZ` (default 100 000 000) and `FIFO_DEPTH` (default 16).

## Choices made in this RTL

The original description gives the block structure, the register widths, the LCR field
layout, the four-sample rule and the four error conditions. The following are this RTL's
own choices:
- **Clock and reset.** One clock for both directions. Asynchronous active-low reset.
- **LCR.** A separate `lcr_wr`/`lcr_din` write port; the field encodings, the rate table
  and the reset value.
- **Added signals.** The `rx_empty` pin and the receive synchroniser.
- **Flags.** They are sticky and cleared by `rd`.
- **Overrun handling.** On overrun, the new frame is dropped rather than the stored data
  being overwritten.
- **After an error.** Frames with parity or framing errors are still delivered. The receiver
  waits for a high line after a frame whose last sample was low.
- **Baud Out.** It is a bit-rate square wave.
- **Oversampling.** 16 ticks per bit, with the four samples at the bit centre.
- **Timing limit.** `sample_tick` must come no more often than every third clock, which holds
  for any realistic `CLK_HZ`.

Things not reproduced:
- The original implementation's vendor results: clock power, flip-flop count and
  clock-buffer count.
- The transistor-level multi-bit cell itself; only the behavioural model exists.

## Files

`rtl/`:
- `uart_pkg.sv`: types `lcr_t` and `err_t`, frame-length and parity helpers, the rate table
  and the divisor formula.
- `uart_top.sv`: the top level.
- `lcr.sv`, `baud_gen.sv`.
- `uart_tx.sv`, with `sync_fifo.sv`, `hold_reg.sv` and `tx_shift_reg.sv`.
- `uart_rx.sv`, with `rx_sampler.sv`, `rx_ctrl.sv`, `rx_shift_reg.sv`, `rx_error_logic.sv`,
  `hold_reg.sv`, `sync_fifo.sv` and `status_register.sv`.
- `mbff.sv`.

`tb/`:
- One self-checking testbench per module, `tb_<module>.sv`.
- `uart_tb_pkg.sv`: a reference frame builder written independently of the RTL.
- `mbff_cell_model.sv`: the latch-level cell model.
- `tb_uart_top_full.sv`: runs the top at its default parameters.
- `tb_uart_crossover.sv`: two UARTs on separate clocks.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/uart_pkg.sv tb/uart_tb_pkg.sv \
    tb/tb_uart_top.sv --top-module tb_uart_top -o sim -Mdir obj && obj/sim
```

Replace `tb_uart_top` with any other testbench name. Each testbench prints one line,
`TB_RESULT checks=N failures=M`, and has a watchdog.

- **`tb_uart_top`** runs the whole UART at a 5.5296 MHz clock (48 clocks per bit at
  115200 baud), so it stays short. It loops the line back and sends bytes in all word
  lengths, parity modes and stop settings at several rates. It fills the transmit FIFO,
  overruns the receiver, and injects a parity error, a framing error and a break. It
  counts each of these mechanisms and fails if one never happened.
- **`tb_uart_top_full`** uses the default 100 MHz and 16-byte FIFOs. It checks the
  864-clock bit period on the line and on `baud_out`, then sends a burst of 8 bytes back to
  back and reads them back.
- **`tb_uart_crossover`** joins two UARTs on separate clocks with a crossover cable. It
  exchanges 20 bytes each way with equal clocks at an arbitrary phase, then again with one
  clock 1 % slow.
- The per-block testbenches compare against reference models or hand-worked values. In
  particular, `tb_uart_rx` uses a line driver with a random phase against the sample tick,
  and inverts two centre ticks of a bit to trigger the disagreeing-sample framing error.

All modules pass Verilator's `--lint-only -Wall` with only unused-signal warnings (the
unused FIFO `count` outputs, the unused raw LCR value and the transmitter idle flag in the
top).
