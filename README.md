# PS/2 keyboard receiver

A PS/2 keyboard talks to its host over two open-collector wires, a clock
and a data line, both driven by the keyboard. This design receives those
frames in an FPGA, checks them, and shows the scan codes on LEDs and on a
four-digit seven-segment display together with a count of the protocol
errors seen so far. It also tells key presses from key releases.

Two receivers sit side by side behind one sampler:

* a **simple receiver**, an 11-bit shift register whose data bits drive LEDs
  directly. It works, but the LEDs flicker while each new frame shifts
  through, and a release (the break code `F0` followed by the key's code)
  never shows, because `F0` is overwritten a frame later;
* an **improved receiver**, a frame automaton that follows each frame bit by
  bit, checks the start, parity and stop bits, counts errors and updates its
  outputs only once a frame has ended without error.

## The PS/2 frame

Idle, both lines are high. A frame is 11 bits, least significant data bit
first, each valid at a falling edge of the clock:

| edge | bit |
|------|-----|
| 1 | start, 0 |
| 2..9 | data D0..D7 |
| 10 | parity, odd: `P = ~(D0 ^ ... ^ D7)` |
| 11 | stop, 1 |

The keyboard first pulls data low (start bit), then after a set-up time
T_SU of 5..25 us starts the clock, whose period T_CK is 30..50 us. A held key
repeats its code about every 100 ms; releasing it sends `F0` and the code.

## Sampling

Everything runs on the board clock (`CLK_HZ`, 50 MHz by default). The PS/2
lines are asynchronous to it, so each goes through a two-flip-flop
synchronizer, and a clock enable from `tick_gen` then stores a sample of both
lines every 10 us (`SAMPLE_HZ` = 100 kHz) in `ps2_sampler`. The sampler hands
on a small record, `ps2_pkg::ps2_sample_t`: the current and previous sample
of each line and a `valid` pulse one cycle after each tick. An edge of a
sampled line is simply (previous, current) = (1, 0) on a `valid` cycle.

At 100 kHz the shortest clock phase (15 us) always contains at least one
sample, so no clock edge is lost. The data line, however, may fall only 5 us
before the clock does, so both falls can land in the same sample; the
automaton handles that case explicitly (below).

## The frame automaton (`ps2_frame_fsm`)

Twelve states, S0 to S11, one per bit plus idle. It acts only on `valid`
cycles:

| state | waits for | does | counts an error if |
|-------|-----------|------|--------------------|
| S0 | falling data edge (start) | go to S1 | the clock was not 1 when data fell |
| S1 | falling clock edge 1 | go to S2 | data is not 0 |
| S2..S9 | falling clock edges 2..9 | shift the data bit in, next state | |
| S10 | falling clock edge 10 | store the parity bit, go to S11 | the parity is not odd |
| S11 | falling clock edge 11 | go to S0; if the frame had no error, load the code output | data (stop bit) is not 1 |

Points that are easy to miss:

* **Errors do not abort a frame.** An error raises `err` for one cycle (the
  8-bit `error_counter` adds one) and marks the frame as bad, but the
  automaton keeps counting clock edges to S11, so it stays in step with the
  keyboard. A bad frame leaves the code output as it was.
* **One-sample start.** If the data and clock falls appear in the same
  sample, S0 takes both: the clock check uses the sample *before* the data
  edge, and the automaton goes straight to S2 instead of waiting in S1 for an
  edge that has already passed.
* **Error LED.** `err_flag` is set by any error and cleared by the next
  good frame.
* **No time-out.** A frame that stops half way leaves the automaton waiting
  for more clock edges; the next frame's edges then realign it within a frame
  or two, with errors counted.
* The received parity bit is also brought out (`parity`).

Latency: the code output and `code_valid` change one system-clock cycle
after the first sample that shows the 11th falling clock edge, so at most
10 us plus three board-clock cycles after that edge.

## Press and release (`key_event_detector`)

Watches the good codes: `F0` arms a release flag; the next code is a
release, any other code a press. `led_key` is 1 after a press and 0 after a
release. Extended keys (prefix `E0`) are not decoded separately: `E0` counts
as a press, and `E0 F0 code` still ends with the LED off.

## Display (`seg7_display`, `hex_to_7seg`)

A 16-bit value shown as four hex digits, one digit lit at a time, stepping
at `REFRESH_HZ` (1 kHz). The top shows the scan code on the two left digits
(`an[3:2]`) and the error count on the two right ones. Segments are
`{g,f,e,d,c,b,a}`; segments and digit enables are active low by default
(`ACTIVE_LOW`).

## Top level (`ps2_keyboard_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | board clock, synchronous active-high reset |
| `ps2_clk`, `ps2_data` | in | 1 | PS/2 lines |
| `led_raw` | out | 8 | simple receiver's data bits (flicker) |
| `led_code` | out | 8 | last good scan code |
| `led_error` | out | 1 | last frame had an error |
| `led_key` | out | 1 | key down |
| `seg`, `an` | out | 7, 4 | seven-segment display |
| `la_clk`, `la_data` | out | 1 | copies of the PS/2 lines for a logic analyzer |

Parameters: `CLK_HZ` (50 MHz), `SAMPLE_HZ` (100 kHz), `REFRESH_HZ` (1 kHz).
On a board, the two PS/2 pins need pull-ups; the design only listens and
never drives them (host-to-keyboard commands are not implemented).

## What is given and what is chosen

Taken from the exercise this design implements: the frame format and
parity, the 100 kHz sampling, the 11-bit shift-register receiver, the
automaton's states and its four error conditions, the 8-bit error counter,
updating the outputs only after an error-free frame, the scan code and error
count on the seven-segment display, the press/release LED and the
logic-analyzer outputs.

Choices of this design: the 50 MHz clock, the synchronous reset, the input
synchronizer, the one-sample start handling, when the error LED goes off,
the counter wrapping from 255 to 0, the press/release logic as a separate
block fed by good codes, the display multiplexing, digit order, refresh
rate and polarities, and the simple receiver shifting at the falling clock
edge with bits 8..1 on its LEDs.

## Files

`rtl/` holds one module or package per file: `ps2_pkg` (types and
constants), `tick_gen`, `ps2_sampler`, `ps2_shift_receiver`,
`ps2_frame_fsm`, `error_counter`, `key_event_detector`, `hex_to_7seg`,
`seg7_display`, `ps2_keyboard_top`.

`tb/` holds a self-checking testbench `tb_<module>` for each, and
`ps2_device_model`, a behavioural keyboard transmitter whose `send` task
sends a good frame or one with a bad parity, stop bit, start bit or start
condition, with T_CK and T_SU adjustable. `tb_ps2_keyboard_top` runs the
whole design at its default parameters: it types keys with repeats and
releases, sends damaged frames of every kind, reads the display back, and
fails if any mechanism (good update, each error kind, press, release, raw
LED flicker, one-sample start, display) never occurred.
`tb_typing_workload` types five keys as a keyboard would: each pressed,
repeated twice about 100 ms apart, then released, each at one corner of the
allowed T_CK and T_SU range, with the board clock lowered to 1 MHz to keep
the 1.5 s of simulated time short.

## Simulating

With Verilator 5, from the folder holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb rtl/ps2_pkg.sv \
        tb/tb_ps2_keyboard_top.sv --top-module tb_ps2_keyboard_top -Mdir obj
    ./obj/Vtb_ps2_keyboard_top

Each testbench prints `TB_RESULT checks=N failures=M` at the end. Replace
the module name to run another testbench. The full-design test simulates
about 30 ms of board time in a few seconds.
