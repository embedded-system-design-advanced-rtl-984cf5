# PWM music player and VGA visual effect

This is the custom hardware of a small FPGA music player for a 50 MHz board.
A soft processor plays a melody note by note. For every note it sends one
number, the *tune value*, to a **PWM tone generator**. The generator turns
that number into a pulse train. An external low-pass filter and amplifier turn
the pulse train into an audible sine-like tone. At the same time the processor
draws a visual effect into a **VGA controller**: a purple square with a "V" cut
out of it, on a dark green background, whose size jumps with the tune. The
picture is only 160x120 one-bit pixels, shown four times enlarged on a 640x480
screen.

The processor, its bus, timers and the software are not part of this RTL. The
top module `pwm_vga_top` holds the two hardware blocks and brings out the
ports through which a processor reaches them.

## How a tone is made

The generator does not synthesise a sine sample by sample. It replays one
fixed pulse pattern that encodes a single sine period, and it stretches that
pattern in time to set the pitch.

**The pattern.** One sine period is divided into 200 *steps*. The pattern
was obtained by comparing a sine with a triangle carrier at 40 times its
frequency, then reducing the result to 10 pulses. The output is set at the
set points and cleared at the reset points, both in steps:

| pulse | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 |
|---|---|---|---|---|---|---|---|---|---|---|
| set   | 0  | 21 | 44 | 68 | 90 | 110 | 128 | 146 | 163 | 181 |
| reset | 19 | 37 | 54 | 72 | 91 | 111 | 132 | 156 | 179 | 200 |

The pulse widths are 19, 16, 10, 4, 1, 1, 4, 10, 16 and 19 steps. Wide pulses
sit at the start and end of the period, where the sine is high; narrow ones
sit in the middle. A reset point of 200 is the end of the period. The last
pulse therefore runs straight into the first pulse of the next period, which
gives one 38-step pulse around the sine peak. The output is high for 100 of
the 200 steps, and it rises 9 times per period.

**The pitch.** Each step lasts `DIV` clock cycles, so

    f = 50 MHz / (200 * DIV)

The processor does not send `DIV` itself but `value = 947 - DIV`. Value 0 is
the lowest note, 264 Hz. The 21-note scale from 264 Hz to 1980 Hz then needs:

| note | 264 | 297 | 330 | 352 | 396 | 440 | 495 |
|---|---|---|---|---|---|---|---|
| DIV   | 947 | 842 | 758 | 710 | 631 | 568 | 505 |
| value | 0   | 105 | 189 | 237 | 316 | 379 | 442 |
| f (Hz) | 263.99 | 296.91 | 329.82 | 352.11 | 396.20 | 440.14 | 495.05 |

| note | 528 | 594 | 660 | 704 | 792 | 880 | 990 |
|---|---|---|---|---|---|---|---|
| DIV   | 473 | 421 | 379 | 355 | 316 | 284 | 253 |
| value | 474 | 526 | 568 | 592 | 631 | 663 | 694 |
| f (Hz) | 528.54 | 593.82 | 659.63 | 704.23 | 791.14 | 880.28 | 988.14 |

| note | 1056 | 1188 | 1320 | 1408 | 1584 | 1760 | 1980 |
|---|---|---|---|---|---|---|---|
| DIV   | 237 | 210 | 189 | 178 | 158 | 142 | 126 |
| value | 710 | 737 | 758 | 769 | 789 | 805 | 821 |
| f (Hz) | 1054.85 | 1190.48 | 1322.75 | 1404.49 | 1582.28 | 1760.56 | 1984.13 |

The worst error against the musical scale is about 0.25 %.

**The datapath** (`pwm_gen`) is a chain of three small blocks:

* `pwm_divider` holds the divider. It converts the value, drops values of 947
  or more (they would give no divider of at least 1), and counts the clock
  down from the active divider to 1. At 1 it gives a one-clock `tick` and
  reloads.
* `pwm_counter` counts ticks from 0 to 199 and wraps. `cycle_end` marks the
  tick that ends step 199.
* `pwm_setreset` compares the step with the two point tables. It sets the
  pulse register on a set point and clears it on a reset point.

**Changing the note.** A new value is saved in `div` in the clock after it
arrives. The counter keeps using `div_act`, the divider of the period being
played. `div_act` takes the new value only at `cycle_end`. A note change
therefore always starts a fresh sine period at step 0, and the pattern is
never cut in the middle. Around the change, the 38-step pulse at the period
boundary has 19 steps at the old rate and 19 at the new rate.

**The state machine** has two states. In `reset` the output is low and the
counters are idle, with `div` at 947. The first value in range loads the
divider straight into the counter and moves to `working`. Every later note
change happens inside `working`. Only `fsl_rst` leaves it. A too large value
is acknowledged and ignored in both states. In `reset` it does not start the
generator.

**The processor link** is a Fast Simplex Link (FSL), a one-way FIFO. The
slave side shows `fsl_s_exists` while a word waits in `fsl_s_data`. The
generator raises `fsl_s_read` in the same clock, so it pops every word at
once; it never stalls the link. Only the low 32 bits matter, and only values
below 947 change anything.

**Timing from a word to sound:** the word is accepted in clock 0. `div` and
the state change at clock 1; on the first start the first step also begins
there, and `pulseout` rises at clock 2. `pulseout` always follows the step
count by one clock.

## The picture

`vga_ctrl` is made of a one-bit frame buffer and a sync generator.

**Frame buffer** (`vga_framebuf`): 19200 bits, pixel (x, y) at address
`x + 160*y`. It has one write port for the processor and one read port for the
display, on the same clock. The read is registered, so it maps onto block
RAM. It starts cleared. Writes past the last pixel are ignored.

**Sync generator** (`vga_sync`): the standard 640x480, 60 Hz mode with 25 MHz
pixels. The 50 MHz clock is halved by a phase bit.

| | visible | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| horizontal (pixels) | 640 | 16 | 96 | 48 | 800 |
| vertical (lines)    | 480 | 10 | 2  | 33 | 525 |

Both syncs are active low. One line is 1600 clocks and one frame is 840,000
clocks (16.8 ms).

**Scan path.** The screen position (h, v) selects image pixel (h/4, v/4). The
address is `(v/4)*128 + (v/4)*32 + h/4`, made with shifts and adds. The memory
answers one clock later, and the colour is registered one clock after that.
The syncs go through the same two registers. Colour and sync therefore stay
aligned, one pixel (two clocks) behind the counters, and every pin comes
straight from a flip-flop.

**Colours** are 8-bit RGB, 3 bits red, 3 green and 2 blue, as on the board's
resistor DAC. Stored 0 shows dark green (R0 G3 B0), stored 1 shows purple
(R7 G0 B3), and the blanking intervals are black.

## Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 50 MHz clock; synchronous active-high reset for both blocks |
| `fsl_s_data`, `fsl_s_exists` | in | 32, 1 | tune value from the processor's FSL FIFO |
| `fsl_s_read` | out | 1 | pops the word; equals `fsl_s_exists` |
| `vga_wr_en`, `vga_wr_addr`, `vga_wr_data` | in | 1, 15, 1 | write one pixel at `x + 160*y` |
| `pulseout` | out | 1 | pulse train to the audio filter/amplifier |
| `Red`, `Green`, `Blue` | out | 3, 3, 2 | VGA colour, MSB at the top index |
| `Hsyn`, `Vsyn` | out | 1 | VGA syncs, active low |

Parameters and shared constants live in `rtl/pwm_pkg.sv` (clock, 200 steps,
base divider 947, the point tables) and `rtl/vga_pkg.sv` (mode timing, image
size, colours).

## What the processor side does

The testbench of the top plays the processor's part, so the intended use is
visible there:

* For each note it sends the tune value over FSL. In the full system a timer
  then holds the note for its length, and the push buttons choose where in
  the melody to start.
* It draws the effect. With `jitter = tune % 64` and a running value `w` that
  grows by 7 per pixel, pixel (x, y) is set when
  `70 - jitter + w%25 < x < 90 + jitter - w%25`, `80 - jitter < y < 80`,
  and `x != y` and `x != 160 - y`.
  The `w%25` terms fray the left and right edges of the square. The two
  excluded diagonals cut the "V".

## Choices made in this implementation

These points are not fixed by the original design. They are worth checking
before reuse:

* Too large values are taken as 947 and above. Values 768 and below are known
  to be accepted and 3072 to be rejected; the exact limit between is a
  choice.
* `fsl_s_read` is combinational, one pop per clock while words wait. The
  original design may have registered the acknowledge.
* A new note waits for the end of the running period. This needs the second
  register `div_act`, next to `div`.
* The VGA porch and sync numbers, the black blanking, the colour codes and the
  registered pins are this design's own. The original drove the colour pins
  through about 12 levels of logic from the address register.
* The processor-bus attachment of the VGA controller is replaced by the
  plain pixel write port. A bus wrapper has to turn a bus write of pixel
  `x + 160*y` into one `vga_wr_en` pulse.
* A single synchronous reset serves both blocks.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_pwm_setreset`, `tb_pwm_counter`, `tb_pwm_divider` test the three PWM
  stages against independent models: the window table, modulo-200 counting,
  tick spacing and the deferred divider load.
* `tb_pwm_gen` drives the FSL port and measures every high and low stretch of
  `pulseout` against the pattern times the divider. This includes the mixed
  stretch at a note change. It also turns the period of every one of the 21
  notes into a frequency and compares it with the table above, to 0.01 Hz.
* `tb_vga_sync` checks the counters and syncs clock by clock over two frames.
* `tb_vga_framebuf` checks initial contents, random writes and read-back,
  out-of-range writes and overwrites.
* `tb_vga_ctrl` and `tb_pwm_vga_top` use `tb/vga_frame_checker.sv`. This
  monitor finds the picture from the sync pins alone and compares every
  sample of whole frames with the image that was written.
* `tb_pwm_vga_top` runs the complete design at its default sizes. It plays six
  tune values, 0, 640, 32, 3072 (ignored), 768 and 474. For each it draws the
  effect, checks one full frame and measures the tone period. It counts the
  start from reset, the ignored value, the deferred note changes, the pixel
  writes and the checked frames, and fails if any of them never happened.
  It takes about 20 s with Verilator.

Running a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/pwm_pkg.sv rtl/vga_pkg.sv tb/tb_pwm_vga_top.sv \
        --top-module tb_pwm_vga_top -o sim
    ./obj_dir/sim

Replace `tb_pwm_vga_top` with any other testbench name. Lint the design with
`verilator --lint-only -Wall -Irtl rtl/pwm_pkg.sv rtl/vga_pkg.sv rtl/pwm_vga_top.sv`.
The only remaining warnings are for package constants some modules do not
use, and for the internal divider state that `pwm_gen` keeps for
observation.

Post-synthesis size at the defaults: about 74 flip-flops, 131 word-level cells
and one 19200-bit memory for the whole top.
