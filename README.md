# FPGA timing system for a medical linear accelerator

A linear accelerator makes its X-ray beam in pulses, and several subsystems
have to fire in a fixed order within each pulse: the electron gun, the RF
drive and the magnetron modulator. This design generates their trigger
signals. A 200 Hz master reference defines the pulse period. Four outputs
each produce one rectangular pulse per period:

| output        | channel | typical use                |
|---------------|---------|----------------------------|
| `pulse_out[0]`| SYN     | synchronisation pulse      |
| `pulse_out[1]`| GUN     | electron gun trigger       |
| `pulse_out[2]`| RF      | RF trigger                 |
| `pulse_out[3]`| MAG     | magnetron trigger          |

Each output has its own **delay** (from the reference) and **width**. Both
are counted in cycles of the 50 MHz system clock, so the resolution is
20 ns. A PC sets them over an RS-232 link at 19,200 baud. The outputs are
meant to drive an external board of high-speed opto-isolators, which isolates
the FPGA and sets the output voltage. That board is not part of this RTL.

The logic is meant for a Spartan-3 class FPGA with a 50 MHz oscillator, but
it uses no vendor primitives.

## How a pulse is timed

This is the part to understand before changing anything.

`master_clock` counts from 0 to `period-1` and wraps. In the cycle in which
the count is 0 it raises `tick` for one clock, and `ref_out` goes high for
the first half of the period. The tick is the reference instant: call its
cycle *t*.

`pulse_delay_gen` has one shared counter that the tick clears. Channel *i*
is high while `delay_i <= count < delay_i + width_i`. The outputs are
registered, and the register looks at the next-cycle count. The result:

```
 cycle:        t     t+1   ...  t+1+d      ...  t+d+w    t+d+w+1
 tick          1     0          0               0        0
 ref_out       1     1          1               1        1   (until period/2)
 pulse_out[i]  0     0          1  ... ... ...  1        0
                                <------ w cycles ------->
```

- A channel with delay `d` rises `d+1` clocks after `ref_out` rises. The
  extra clock (20 ns) is the output register, and it is the same on every
  channel. Relative timing between channels is exactly `d_i - d_j` steps.
- Width `w` gives exactly `w` clocks high. Width 0 turns the channel off.
- A pulse that has not ended by the next tick is cut off there. The counter
  saturates, so a delay past the period simply never fires.
- **Settings change only at a tick.** The data splitter's registers are
  copied into working registers in the tick cycle. A command that arrives
  mid-period therefore never cuts or stretches a pulse that is already
  running. It takes effect in the next period.

A change of master period takes effect at once. If the counter is already
past the new period, it wraps on the next clock. Periods below 2 are treated
as 2. The period register resets to 250,000 clocks (200 Hz).

## Command protocol

The PC sends 7-byte frames at 19,200 baud, 8 data bits, no parity, 1 stop
bit:

| byte | content                                                         |
|------|-----------------------------------------------------------------|
| 0    | header `0xA0 \| addr`                                           |
| 1-3  | value A, 24 bits, most significant byte first                   |
| 4-6  | value B, 24 bits, most significant byte first                   |

| addr | value A                  | value B              |
|------|--------------------------|----------------------|
| 0-3  | width of channel `addr`  | delay of channel `addr` |
| 4    | master period (clocks)   | ignored              |

All values are counts of 20 ns clocks. The PC converts from nanoseconds.
For example, channel 2 with a 300 ns width and a 100 ns delay is
`A2 00 00 0F 00 00 05`. Setting 200 Hz is `A4 03 D0 90 00 00 00`.

When a frame has been applied, the system sends its header byte back as an
acknowledgement. If the transmit buffer is full, the acknowledgement is
skipped rather than blocking.

While waiting for a header, the splitter drops any byte that is not a valid
header. A byte with a bad tag or an address above 4 is such a byte. This
lets a stream that has lost a byte realign at the next header. A byte
received with a bad stop bit never reaches the splitter. There is no
timeout inside a frame. If a byte is lost in the middle of a frame, the
next frame's header is taken as the missing payload byte, so the damaged
frame is applied with a wrong value. The rest of the next frame is then
dropped as bad headers, and its acknowledgement never comes. A PC that
resends on a missing acknowledgement should also resend the frame before
it.

At reset every width and delay is 0, so all outputs are low, and the period
is 250,000 clocks.

## Serial link

`uart_transceiver` has four parts:

- **`baud_gen`**: a modulo-163 counter that gives one tick every 163
  clocks. That is 306.7 kHz, or 16 ticks per bit at 19,200 baud. Dividing
  50 MHz / 307.2 kHz gives 162.76, so the divider rounds it and the bit rate
  is 0.15 % slow.
- **`uart_rx`**: a 16x oversampling receiver with a two-flop synchronizer.
  It sees the falling edge of the start bit and counts 8 ticks to the middle
  of the start bit. If the line is high again there, it was a glitch and the
  receiver goes back to idle. Otherwise it samples each data bit, least
  significant first, every 16 ticks, then the optional parity bit and the
  stop bits. If a stop bit is low, the byte is flagged `frame_err`, and the
  receiver waits for the line to go high before looking for a new start
  bit.
- **`uart_tx`**: the mirror image of the receiver, 16 ticks per bit. The
  start bit begins on the clock after `tx_start` rather than on a tick, so
  it is 15 to 16 ticks long.
- **`byte_fifo`**: 16-entry show-ahead buffers, one per direction. A write
  into a full buffer is dropped, and an `overflow` strobe reports it.

Bytes with a framing or parity error are not buffered. Parity and two stop
bits are available as parameters of `uart_rx`, `uart_tx` and
`uart_transceiver`, but the top uses 8N1.

## Files

| file | contents |
|------|----------|
| `rtl/timing_pkg.sv` | clock and baud constants, channel numbers, frame format, `chan_cfg_t` (width, delay), `uart_err_t` |
| `rtl/timing_system.sv` | top: transceiver, splitter, master clock, pulse generator |
| `rtl/uart_transceiver.sv` | serial link: `baud_gen`, `uart_rx`, `uart_tx`, two `byte_fifo` |
| `rtl/data_splitter.sv` | frame parser and settings registers |
| `rtl/master_clock.sv` | programmable reference, tick and `ref_out` |
| `rtl/pulse_delay_gen.sv` | shared counter, per-channel window comparators, output registers |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

Top-level ports of `timing_system`: `clk` (50 MHz), `rst_n` (synchronous,
active low), `rxd`, `txd` (logic level, after the RS-232 transceiver chip),
`pulse_out[3:0]` and `ref_out`. Parameters: `BAUD_DIV` (163) and `NUM_CH` (4).
The value width (24 bits) is fixed in `timing_pkg`. Changing it changes the
frame length, because a frame carries `2*VAL_W/8` payload bytes.

## Where this departs from, or adds to, the original design

The original design gives the structure of the system: UART transceiver,
data splitter, and pulse width and delay generator. It also gives the
50 MHz clock, the 20 ns resolution, the four channels, the 200 Hz master
clock, 19,200 baud with 16x oversampling and the mod-163 divider, and the
receiver's sampling procedure. The following are choices of this RTL:

- the frame format, the acknowledgement and the 24-bit values;
- buffers on both sides of the UART and their depth of 16;
- taking over settings only at the tick, and the fixed one-clock output
  offset;
- `ref_out` as a 50 % square wave;
- reset values, glitch rejection, and dropping bytes that have errors.

Table 1 of the original design asks for 50 ns and 150 ns delays. Those are
not multiples of the 20 ns step. The tests use 3 and 8 steps, which are
60 ns and 160 ns.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps --top-module timing_system_tb \
    -Irtl -Itb -y rtl -y tb rtl/timing_pkg.sv tb/timing_system_tb.sv
./obj_dir/Vtiming_system_tb
```

- `timing_system_tb` runs the whole design at its default parameters. It
  simulates 50 MHz, 163-clock divider and the 200 Hz reference for about
  2 million clocks (40 ms), which takes a few seconds. A behavioural PC sends a
  stray byte, a byte with a bad stop bit, the four Table 1 frames and a
  period change. The test decodes the acknowledgements. It checks that the
  last setting waits for the next tick. It measures the 250,000-clock
  reference and, on every channel, the rising edge (`delay+1` after the
  reference) and the width. It then measures again at a 1,000-clock period.
  Each of these mechanisms is counted, and the test fails if one never
  happened.
- The unit testbenches of the UART parts use a divider of 4 to run faster.
  `pulse_delay_gen_tb` compares all four outputs with a cycle-by-cycle
  model while it changes settings in the middle of periods.
  `byte_fifo_tb` runs random traffic against a queue model.

The testbenches are written for a two-state simulator. They reset
everything they read and use `$urandom` for stimulus.
