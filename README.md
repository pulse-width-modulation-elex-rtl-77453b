# Constant-brightness 7-segment display by anode PWM

A 7-segment LED display driven without a resistor per segment shares one
current path among the lit segments, so a digit that lights two segments
(`1`) glows far brighter per segment than one that lights seven (`8`). This
design evens that out: it powers the display's common anode only for
*n*/7 of every period, where *n* is the number of segments the current
digit lights. A pushbutton steps the digit 0, 1, ..., 9, 0, ... so the
effect can be seen.

| digit        | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|--------------|---|---|---|---|---|---|---|---|---|---|
| segments lit | 6 | 2 | 5 | 5 | 4 | 5 | 6 | 3 | 7 | 6 |
| anode duty   |6/7|2/7|5/7|5/7|4/7|5/7|6/7|3/7|7/7|6/7|

The target is a small CPLD (an Altera MAX II EPM240 on a 50 MHz board); the
RTL itself is generic SystemVerilog.

## Structure

```
clk50 ─► clock_divider ─► clk (7 × PWM_HZ, 1169 Hz) ──► test pin
                             │ clocks everything below
up_in ─► sync_pulse ─► one pulse per press ─► decimal_counter ─► digit (0..9)
                                                                  │
                              seg7_decoder ◄──────────────────────┤
                              a..g, dp (cathodes, active low)     │
                              pwm_gen ◄───────────────────────────┘
                              com (common anode, active high)
```

| file | role |
|------|------|
| `rtl/pwm_pkg.sv` | types; the segments-lit table and the glyph table |
| `rtl/clock_divider.sv` | 50 MHz → `clk` = 7 × PWM frequency |
| `rtl/sync_pulse.sv` | button synchronizer, debouncer, one-cycle pulse |
| `rtl/decimal_counter.sv` | digit register 0..9 with wrap |
| `rtl/pwm_gen.sv` | 7-slot PWM with duty from the segments-lit table |
| `rtl/seg7_decoder.sv` | digit → cathode pattern by table lookup |
| `rtl/lab6.sv` | top level, pins and power-on reset |

## How the PWM works

The PWM period is split into seven equal slots, one per segment. `pwm_gen`
runs a slot counter 0..6 on `clk` and compares it with the segment count
*n* of the digit being shown: the anode is on while `slot < n`. So `1`
gives on-on-off-off-off-off-off and `8` keeps the anode on permanently.
The anode's on-time grows in step with the number of segments sharing its
current, which is what keeps the light per segment roughly the same for
every digit.

The compare result is registered before it leaves the chip, so the anode
pin never sees the glitches of the comparator; the output therefore lags
the slot counter by one `clk` cycle. A digit change takes effect at the
next slot.

Because a period is seven slots, the slot clock must be seven times the
PWM frequency. The PWM frequency is set by `PWM_HZ`. It is meant to be chosen per board as
100 Hz plus a two-digit number, so 100..199 Hz; the default is 167 Hz;
anything well above 100 Hz is above the flicker-fusion threshold, while a
slot of ~0.86 ms is long compared with the LED driver's rise and fall
times.

## Clock and timing

`clock_divider` toggles `clk` every `HALF_PERIOD` board cycles:

    HALF_PERIOD = round(CLK_IN_HZ / (2 × 7 × PWM_HZ)) = round(21385.8) = 21386
    clk  = 50 MHz / 42772  = 1168.99 Hz   (test pin)
    PWM  = clk / 7         = 166.998 Hz

The counter width follows from the parameters, so any `PWM_HZ` from 100 to
199 only needs the parameter changed. `clk` is a fabric-generated clock; on
the target it is routed on a global clock net.

Everything except the divider runs on `clk`, including the button logic.

## Button handling

`sync_pulse` takes the raw, bouncing, asynchronous `up_in`:

1. two flip-flops synchronize it to `clk`;
2. a 4-sample history (`STABLE`) must be all ones before the debounced
   level rises, and all zeros before it falls — at 1169 Hz that is about
   3.4 ms of agreement, longer than typical contact bounce;
3. the rising edge of the debounced level gives `pulse` for exactly one
   cycle, so a held button steps the digit once.

From press to pulse is `STABLE + 3` = 7 `clk` edges (~6 ms). The counter
steps on the edge that samples the pulse.

## Reset

The board has no reset input. The divider's registers and a two-stage
power-on shift register in `lab6` start from their declared value of 0
(the CPLD's power-up state). The power-on register holds the `clk`-domain
blocks in synchronous reset for the first two `clk` edges: digit 0, slot 0,
anode off.

## Pins and polarities

| port | dir | meaning |
|------|-----|---------|
| `clk50` | in | 50 MHz board clock |
| `up_in` | in | pushbutton, active high (weak pull-up on the pin) |
| `a`..`g` | out | segment cathodes, active low |
| `dp` | out | decimal point cathode, held high (dark) |
| `com` | out | common anode, high = powered, carries the PWM |
| `test` | out | the divided clock `clk`, for measuring its frequency |

## Choices made here

These are not fixed by the circuit's description and can be changed:

* Structure of the clock divider (toggle counter) and the rounding of its
  divisor.
* The button logic: synchronizer depth 2, debounce window `STABLE = 4`
  samples, edge-detect pulse. Any debouncer giving one pulse per press fits.
* Glyphs: the standard ones, with `6` drawn with its top bar, `7` as a-b-c
  and `9` with its bottom bar — exactly the shapes whose counts give the
  table above. Codes 10..15 (never produced) blank the display.
* Polarities: cathodes active low, anode active high. If the anode is
  driven through an inverting transistor, invert `com`.
* What `test` carries (the divided clock).
* The power-on reset.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/pwm_pkg.sv rtl/lab6.sv tb/tb_lab6.sv --top-module tb_lab6
    ./obj_dir/Vtb_lab6

(replace `lab6` by `clock_divider`, `sync_pulse`, `decimal_counter`,
`pwm_gen` or `seg7_decoder` for the unit tests).

`tb_lab6` runs the full design at its default parameters (50 MHz, 167 Hz):
about 0.7 s of simulated time, under 20 s of wall time. It steps the digit
through 0..9 and back to 0 using clean presses, bouncing presses, a held
press and a too-short glitch, and for each digit checks the cathode
pattern, the number of anode-on slots, the `clk` period (42772 board
cycles), the PWM period (299404 board cycles) and the anode pulse width.
It also requires that each of those button cases, the 9→0 wrap, a 100 %
duty digit and a partial-duty digit actually occurred.

The unit tests check, among other things, the divider's exact half
period at 167 Hz and at both ends of the 100..199 Hz range, the
debouncer against a cycle-accurate reference model under
random bouncing input, the counter against a modulo-10 reference, and the
PWM slot-by-slot pattern for all ten digits.

## Size

Synthesized generically, the design has 34 flip-flops (15-bit divider
count, divided clock, 2 power-on, 2 synchronizer, 4 debounce history,
debounced level, pulse, 4-bit digit, 3-bit slot, anode) and two 10-entry
lookup tables; on a 240-LE MAX II this uses a small fraction of the device
and 12 of its user pins.
