# Random hourly alarm for a watch crystal and a piezo speaker

A wearable prompt: once in every hour, at a moment nobody can predict, a small
piezo speaker beeps so that the wearer writes down what they are doing at that
moment. Sampling a day at random instants this way gives a truer picture of
how people spend their time than asking for a complete diary.

The circuit is a handful of counters and one pseudo-random shift register,
small enough for a 64-macrocell CPLD, clocked directly from a 32768 Hz watch
crystal. The speaker is driven straight from two logic pins in antiphase.

Two variants are provided:

* **`timer_sol2`, the main timer.** It cuts the hour into 512 equal quanta of
  7.03125 s. Every value of a 9-bit maximal-length sequence is a valid
  quantum, so nothing is ever rejected.
* **`timer_sol1`, the alternative.** It counts 450 ticks of 8 s. Random values
  that fall past the end of the hour are rejected and replaced.

`random_alarm_top` instantiates both side by side on one clock so they can be
compared. A real product would use `timer_sol2` alone.

## The central trick: make the random range match the hour

A 9-bit linear-feedback shift register (LFSR) with feedback from stages 9 and
4 steps through all 511 non-zero values before it repeats. To turn such a
value into "a random moment in the hour", the hour has to be divided into
slots. There are two ways to do this:

1. **Binary divider, then reject values that are too large.** Dividing the
   crystal by 2^18 gives exactly 8 s. An hour then has 450 ticks, but the
   LFSR produces values up to 510, so the values 450..510 must be detected and
   replaced. This is `timer_sol1`.
2. **Pick the slot length so 512 slots fill the hour exactly.**
   3600 s / 512 = 7.03125 s, which is 230400 crystal cycles = 256 x 900.
   So an 8-bit binary prescaler (down to 128 Hz) followed by a divide-by-900
   counter produces the slot clock. A 9-bit counter of slots then wraps once
   per hour. This is `timer_sol2`.

   The LFSR never takes the value 0, so slot 0 is never chosen and the alarm
   never sounds in the first 7 s of an hour. Every other slot is possible.

Both variants give more than the five random "check points" per minute that
the application asks for: 8.5 per minute for the main timer and 7.5 for the
alternative.

## Main timer (`timer_sol2`)

```
 clk 32768 Hz
   |
 Count1  binary_prescaler, 8 bit  --wrap--> 128 Hz tick ----+---------------+
   |  bit 4 = 1024 Hz tone                                  |               |
   v                                                        v               |
 Count7  mod_counter /900        --wrap--> 7.03125 s tick   sample          |
   |  bit 7 = 2 s gate (1 s on, 1 s off)      |                             |
   v                                          v                             |
 CountH  mod_counter /512   count 0..511 ---> alarm_compare ---> alarm      |
   |  wrap = hourly pulse                     ^                   |         |
   v                                          |                   v         |
 PRSeq   prs_gen_zero  (step once per hour) --+        piezo_driver <- tone, gate
                                                          |   |
                                                     piezo_p piezo_n
```

* **Hourly step.** When CountH wraps from 511 to 0, the generator takes its
  next value. That value is never 0, so it always lies ahead in the hour that
  has just started. The result is exactly one alarm per hour, and the random
  value stays constant for the whole hour it is compared against.
* **Zero check.** If the register ever holds 0 (at power-up, or after an
  upset), it is loaded with `010101010` on the very next crystal cycle. It
  does not wait for the hourly step. Reset deliberately leaves the register at
  0, so this check is also what initialises the generator.
* **Alarm window.** On every 128 Hz tick the comparison `CountH == PRSeq` is
  registered. The alarm therefore opens 1/128 s after the chosen slot begins
  and closes one slot (7.03125 s) later.
* **Sound.** The window is ANDed with Count7 bit 7, a 2 s square wave, and
  with Count1 bit 4, a 1024 Hz tone. Within one slot this gives three 1 s
  beeps and a final 31 ms blip.

Timing from reset: the generator holds 170 (`010101010`) after the first
clock. The first alarm opens at 170 x 230400 + 256 cycles (1195.3 s). The
first hourly step happens at 3600 s and moves the value to 341.

## Alternative timer (`timer_sol1`)

* **Tick and hour count.** An 18-bit binary divider wraps every 8 s. Its bit
  15 is the 2 s beep gate and its bit 4 the 1024 Hz tone. A modulo-450
  counter of ticks spans the hour.
* **Hourly pulse.** The pulse is taken from the rising edge of the hour
  count's MSB, i.e. one clock after the count reaches 256. It is not taken at
  the count's wrap.
* **Feedback and lock-up.** The generator uses XNOR feedback, so its lock-up
  state is all ones rather than zero. In the step where it holds all ones, it
  is loaded with zero instead.
* **Range check.** While the value is 450 or more (`max_seq`), the generator
  steps on every 8 s tick instead of waiting for the hourly pulse. All ones
  is also out of range, so the lock-up state is always left within one tick.
* **Weakness: missed hours.** A value found by these fast steps may already
  be behind the current count. Its alarm then never comes, because the next
  hourly pulse replaces it first. The reduced-size end-to-end test shows 13
  alarms in 14 hours for this reason. The main timer has no such gap.

Reset loads all ones, so the lock-up recovery runs at the first tick. After
it, the value is 0 until the first hourly pulse (2048 s). The first alarm
therefore opens at 3616 s.

## Driving the piezo

`piezo_driver` registers two outputs:

* `piezo_p = alarm & gate & tone`
* `piezo_n = alarm & gate & ~tone`

During a beep the pins toggle in antiphase, so the element sees twice the
supply swing. When silent, both pins are low, so no DC sits across the
element. An assertion checks that both pins are never high together. In the
intended package the crystal enters on pin 11 and the main timer's pair
leaves on pins 28 and 29.

## Clocking, and how this differs from the original scheme

The scheme this RTL implements was first drawn as a ripple of clocks: each
counter was clocked by a bit of the previous one, and the generator's clock
was gated between the crystal and the hourly pulse. Here every register runs
on the crystal clock, and the stages are linked by one-cycle enables (the
`wrap` outputs). Rates, ordering and bit choices are unchanged. Only the
sub-cycle phase relationships differ: the alarm opens one 128 Hz tick (or one
8 s tick) after the chosen slot starts, and the pins follow one crystal cycle
later.

Other choices made here:

* An active-low asynchronous reset `rst_n` was added. The original relied on
  the zero/lock-up checks to start up.
* `timer_sol1` counts 0..449 cleanly. The original's registered "449 or
  larger" reload flag would make the hour 451 ticks long.
* `timer_sol1` rejects values of 450 or more, not 449 or more.
* The lock-up check in `timer_sol1` acts in the same step instead of one step
  late.
* The second (antiphase) piezo output and the output registers.
* The hour length is fixed at 60 minutes. Selectable 30/90/120-minute
  periods were considered as a possible extension and are not implemented.

## Files

| file | content |
|---|---|
| `rtl/rtimer_pkg.sv` | ratios, LFSR width/tap/seed, one-step LFSR function |
| `rtl/binary_prescaler.sv` | free-running binary divider with wrap pulse (8 and 18 bit) |
| `rtl/mod_counter.sv` | enabled modulo-N counter with wrap pulse (/900, /512, /450) |
| `rtl/prs_gen_zero.sv` | XOR LFSR with zero check and reload (main timer) |
| `rtl/prs_gen_range.sv` | XNOR LFSR with range and lock-up checks (alternative) |
| `rtl/alarm_compare.sv` | registered equality = alarm window |
| `rtl/piezo_driver.sv` | tone gating and differential pin drive |
| `rtl/timer_sol2.sv`, `rtl/timer_sol1.sv` | the two timers |
| `rtl/random_alarm_top.sv` | both timers side by side |

The parameters default to the real sizes:

* `timer_sol2`: `PRESCALE_BITS=8`, `DIV7=900`, `SEED=9'b010101010`,
  `TONE_BIT=4`, `GATE_BIT=7`.
* `timer_sol1`: `PRESCALE_BITS=18`, `HOUR_STEPS=450`, `TONE_BIT=4`,
  `GATE_BIT=15`.
* The top passes the divider and tap parameters through.

Smaller values exist only to make simulations shorter. The tone and gate bit
must then stay inside their counters, which an elaboration-time assertion
checks.

Synthesis (generic, yosys) gives 39 flip-flops for the main timer and 40 for
the alternative. That places the main timer within a 64-macrocell device.
Vendor fitting has not been done.

## Simulation

Every testbench is self-checking. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with Verilator
5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rtimer_pkg.sv \
          tb/tb_timer_sol2.sv --top-module tb_timer_sol2 -o sim
./obj_dir/sim
```

The testbenches are:

* **Unit tests:** `tb_binary_prescaler`, `tb_mod_counter`, `tb_prs_gen_zero`
  (which also checks all 511 values are visited), `tb_prs_gen_range`,
  `tb_alarm_compare`, `tb_piezo_driver`.
* **`tb_timer_sol2`:** 16-cycle slots. Checks every output on every cycle
  against closed-form expressions of the cycle number, and checks for one
  alarm per hour at the right position.
* **`tb_timer_sol1`:** 16-cycle ticks, full 450-tick hour. Checks every cycle
  against a model written from the description.
* **`tb_random_alarm_top`:** both timers, shortened dividers, 14 hours.
  Checks from the outputs only, and counts each mechanism: zero reload,
  hourly steps, alarms, beeps, lock-up recovery and range rejection. Each
  must occur.
* **`tb_random_alarm_full`:** the top at its real sizes, about 119 million
  cycles (3616 s of simulated time), under a minute of run time. Checks the
  exact cycle of both first alarms, the number of tone cycles in each, and
  the hourly step.

## How far to trust it

* Both timers pass cycle-exact checks at reduced divider sizes.
* At full size, the first hour of both timers is checked.
* Not simulated: many full-size hours in a row, and behaviour after an upset
  in mid-operation other than the reset paths.
* Not done: fitting into a real CPLD.
