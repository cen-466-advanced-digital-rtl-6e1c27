# Digital clock HH:MM:SS for a 50 MHz FPGA board

This design keeps time on an FPGA and shows it as hours, minutes and seconds on six
seven-segment displays. It is built as a chain of small, identical digit stages. Each stage
is a 4-bit counter, a comparator that sees when the digit is on its last value, and a
seven-segment decoder. When a stage wraps, it advances the next stage. A clock divider turns
the 50 MHz board clock into a one-second tick. For bench testing, the clock can also run from
the divider's 100 Hz or 10 kHz outputs, or advance one second per push-button press.

## Block diagram

```
 clk 50 MHz ──> clk_div ──tick_1hz────┐
                        ──tick_100hz──┤ timebase_select ──second tick──┐
                        ──tick_10khz──┤   (tick_sel,                  │
 step_btn ────────────────────────────┘    step_btn)                  │
                                                                       v
  ┌──────────┐ carry ┌──────────┐ carry ┌──────────┐ carry ┌──────────┐ carry ┌──────────┐ carry ┌──────────┐
  │ sec units│──────>│ sec tens │──────>│ min units│──────>│ min tens │──────>│ hr units │──────>│ hr tens  │
  │ mod 10   │       │ mod 6    │       │ mod 10   │       │ mod 6    │       │ mod 10   │       │ mod 2    │
  └────┬─────┘       └────┬─────┘       └────┬─────┘       └────┬─────┘       └────┬─────┘       └────┬─────┘
    second0            second1            minute0            minute1             hour0              hour1
```

Every box in the bottom row is a `clock_digit`:

```
 count_in ──┬──────────────> digit_counter (count) ──q──┬──> seven_seg_decoder ──> seg
            │                      ^ clear               │
            │                      │                     └──> comparator (q == LIMIT-1) ──equal
            └──────── AND ─────────┴──────────────────────────────────────────────────────┘
                       │
                       └──> carry_out  (to the next digit's count_in)
```

## How a second propagates

Everything runs on the one board clock `clk`. The divider and the time-base selector make
a strobe, one `clk` cycle wide, once per second. That strobe is the `count_in` of the seconds
units digit. In that same cycle, each digit checks whether it is on its last value
(`LIMIT-1`). If it is and its `count_in` is high, it raises `carry_out` at once. That carry is
combinational, so the carry from 19:59:59 reaches the hours tens digit in the cycle of the
tick. On the next edge, each digit with a high `count_in` changes. A digit on its last value
goes back to 0; any other digit adds 1. All digits change together on that edge, so the
display never shows a half-updated time.

The outputs change one `clk` cycle after the cycle of the tick. After `reset` is released:

* `tick_1mhz` is first high after `IN_HZ/1e6` edges;
* each slower strobe follows at ten times the period of the one before it;
* the first 1 Hz step comes `IN_HZ` cycles after reset.

### The hours run 00..19

The hours units digit wraps at 10 and the hours tens digit wraps at 2, and the two are
independent. After 19:59:59 the clock goes to 00:00:00, not to 20:00:00. This is the
described structure, kept as it is. A 24-hour clock needs a wrap condition that spans both
hour digits (tens = 2 and units = 3). This chain of independent stages cannot express that.
The moduli are parameters of `digital_clock`, but changing them alone cannot give 24 hours.

## Modules

| file | what it is |
|---|---|
| `rtl/clock_pkg.sv` | types: `bcd_t` (4-bit digit), `seg7_t` (segments g..a), `timebase_e` (time-base choice) |
| `rtl/seven_seg_decoder.sv` | 4-bit value to an active-low 7-segment pattern; 0-9 and A b C d E F |
| `rtl/comparator.sv` | `less` / `equal` / `greater` of two unsigned values, WIDTH = 4 |
| `rtl/digit_counter.sv` | 4-bit up counter; synchronous `clear` wins over `count` |
| `rtl/clk_div.sv` | 50 MHz to 1 MHz, 100 kHz, 10 kHz, 1 kHz, 100 Hz, 10 Hz and 1 Hz; each rate as a square wave (`clock_*`) and as a one-cycle strobe (`tick_*`) |
| `rtl/timebase_select.sv` | picks the second tick: 1 Hz, 100 Hz, 10 kHz or one per button press; the button has a 2-FF synchroniser and a rising-edge detector |
| `rtl/clock_digit.sv` | counter + comparator + decoder of one digit, parameter `LIMIT` |
| `rtl/digital_clock.sv` | top level |

### Top-level interface (`digital_clock`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | board clock, `IN_HZ` (default 50 MHz) |
| `reset` | in | 1 | synchronous, active high: time 00:00:00 and the divider restarts |
| `tick_sel` | in | 2 | 0 = 1 Hz (normal), 1 = 100 Hz, 2 = 10 kHz, 3 = push button |
| `step_btn` | in | 1 | push button, active high; with `tick_sel = 3`, each press adds one second |
| `second0`, `second1` | out | 7 | units and tens of the seconds |
| `minute0`, `minute1` | out | 7 | units and tens of the minutes |
| `hour0`, `hour1` | out | 7 | units and tens of the hours |

The segment outputs are active low, with bit 6..0 = segments g f e d c b a. For example, the
digit 1 is `7'b1111001`. That is what the display digits on common Altera/Intel teaching
boards expect. The pin assignment decides which physical display shows which field.

Parameters: `IN_HZ` (50 000 000) must be a multiple of 1 MHz and at least 2 MHz. The digit
moduli are `SEC0_LIMIT` 10, `SEC1_LIMIT` 6, `MIN0_LIMIT` 10, `MIN1_LIMIT` 6, `HOUR0_LIMIT` 10
and `HOUR1_LIMIT` 2.

## Where this differs from the original description

The original circuit, as described, was asynchronous:

* the 1 Hz divider output clocked the seconds counter;
* each counter was cleared the moment its comparator saw it reach 10 (or 6, or 2);
* that clear pulse was used as the clock of the next counter.

This RTL keeps the same parts, connections and moduli, but makes the circuit synchronous:

* **One clock domain.** Counters run on `clk` and use `count` as an enable. The divider gives
  one-cycle strobes as well as square waves.
* **The comparator looks for LIMIT-1, not LIMIT.** The digit wraps on the clock edge instead
  of briefly reaching 10 and clearing at once. The digits run through the same values; the
  old circuit's short glitch value, and its clears and ripple clocks that depend on timing,
  are gone.
* **Added inputs.** The `reset` input is new. The original top level had only the clock and
  the six displays. The `tick_sel` / `step_btn` selector is also new. It puts the test set-ups
  of the original (the 100 Hz or 10 kHz output, or a push button, used instead of 1 Hz) behind
  one run-time select instead of a rewire.
* **Own choices.** The decoder's glyphs for 10-15, the divider's insides (a /`IN_HZ/1e6`
  prescaler, then six /10 stages, 50 % duty cycle) and the lack of button debouncing are
  choices of this design. A bouncing button may advance the clock by more than one second.

An alarm function is named in the original material but is not specified there, and it is
not built.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_seven_seg_decoder`: all 16 inputs, against patterns built from lists of lit segments
  (`tb/seg_ref_pkg.sv`).
* `tb_comparator`: all 256 operand pairs.
* `tb_digit_counter`: random clear/count against a reference count. It covers wrap past 15
  and clear together with count.
* `tb_clk_div` (2 MHz input): every output, every cycle, for two 1 Hz periods, against the
  closed form. For a rate of period P, the strobe is high when n mod P = P-1 and the square
  wave is high when n mod P < P/2.
* `tb_timebase_select`: that the output follows the selected strobe. That each button press,
  however long it is held, gives exactly one tick, two edges after the press.
* `tb_clock_digit`: digits with LIMIT 10, 6 and 2, against a reference count modulo LIMIT. It
  checks the value, the segments and the carry in the same cycle.
* `tb_digital_clock` (2 MHz input) and `tb_digital_clock_full` (all defaults, 50 MHz):
  * reset, then a full 72 000-press cycle in button mode, back through 00:00:00;
  * 4000 steps at 10 kHz, 5 at 100 Hz and 2 at 1 Hz;
  * a reset while counting.

  A monitor decodes the displays every cycle. It checks that the time only moves to its
  successor, and that steps are exactly one period of the chosen rate apart (500 000 cycles
  at 100 Hz and 50 000 000 at 1 Hz at full size). It also counts each digit's wrap, each time
  base and each reset, and fails if one never happened. The full-size run takes about two
  minutes; the reduced one takes a few seconds.

`clock_digit` also carries an assertion that a digit never goes past `LIMIT-1` except while
it is being cleared.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/clock_pkg.sv tb/seg_ref_pkg.sv rtl/*.sv tb/tb_digital_clock.sv \
    --top-module tb_digital_clock -o sim
./obj_dir/sim
```

Replace `tb_digital_clock` with the name of any other testbench. Lint the RTL with
`verilator --lint-only -Wall -Irtl rtl/clock_pkg.sv rtl/digital_clock.sv`. The remaining
warnings are deliberate: unused divider outputs and comparator outputs, and the top carry,
are left open.

## Size

By construction, the clock holds 57 register bits:

* the divider's 6-bit prescaler and its six 4-bit decade counters;
* the three flip-flops of the button synchroniser and edge detector;
* the six 4-bit digits.

Coarse synthesis gives about 140 word-level cells. Each seven-segment decoder becomes a
16 x 7 ROM.
