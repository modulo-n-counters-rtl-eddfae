# Four-digit modulo-n up/down counter

A modulo-n counter counts 0, 1, ..., n-1 and then wraps back to 0; counting
down, 0 wraps to n-1. This design builds one such counter digit with two extra
outputs, **carry** and **borrow**, that let identical digits be chained into a
multi-digit counter with no extra logic: digit *i*'s carry and borrow become
digit *i+1*'s up and down requests. Four digits make a counter of n^4 values
(2401 for the default n = 7). Around the counter sits a small test circuit for
a CPLD board. Two pushbuttons step the count up (1 kHz while held) or down
(100 Hz while held), or clear it when both are held. A multiplexed four-digit
seven-segment LED display shows the count.

```
 up_n ──┐   ┌─────────────┐ up_in   ┌────────────────────────────────────┐ count[0..3] ┌─────────────┐ en[3:0]
        ├──►│ button_ctrl ├────────►│ modncount4                         ├────────────►│ display_mux ├────────►
down_n ─┘   │ sync + rate ├────────►│ 4 digits, carry→up, borrow→down    │            │ scan+decode ├────────► a..g
            └─────────────┘ down_in └────────────────────────────────────┘             └─────────────┘   dp (off)
```

All logic runs on the one 50 MHz clock. There is no reset pin. Holding both
buttons is the reset.

## The counting digit (`modncount`)

The digit has a 4-bit `count` and two level inputs, `up` and `down`. These are
requests sampled at the rising clock edge, not clocks. At each edge:

| up | down | next count |
|----|------|------------|
| 0  | 0    | unchanged |
| 1  | 0    | count + 1, or 0 if count is n-1 |
| 0  | 1    | count - 1, or n-1 if count is 0 |
| 1  | 1    | 0 |

`carry` and `borrow` are combinational functions of the current count and the
current requests. They are not registered:

| count | up | down | carry | borrow |
|-------|----|------|-------|--------|
| n-1   | 1  | 0    | 1     | 0      |
| 0     | 0  | 1    | 0     | 1      |
| any   | 1  | 1    | 1     | 1      |
| otherwise |  |    | 0     | 0      |

So `carry = up & (down | count == n-1)` and `borrow = down & (up | count == 0)`.

Two points in this table are easy to miss:

* **carry/borrow say "this digit wraps on this edge", not "this digit is at
  its limit".** A digit at n-1 with no up request raises no carry. The next
  digit therefore sees exactly one up request, in the same cycle in which the
  lower digit goes from n-1 to 0. Both digits update on the same edge, so the
  whole multi-digit counter is synchronous even though the requests ripple.
* **Up and down together drive both carry and borrow high.** The next digit
  then also sees up and down together and clears too. One clock with both
  requests high clears every digit of the chain at once.

A 4-bit count allows n from 2 to 16. Any other N stops elaboration with an
error. The count has no reset and may come up with any value. A value of n or
above, which only power-up can produce, is treated like n-1: the next
increment gives 0 and raises carry.

## Chaining four digits (`modncount4`)

`up_in` and `down_in` go to digit 0, the least significant. Digit *i*'s carry
and borrow drive digit *i+1*'s up and down. The outputs are the four digits as
an array, `count[0]` (least significant) to `count[3]`, plus the carry and
borrow out of digit 3. Those two flag a wrap of the whole counter (n^4-1 to 0,
or 0 to n^4-1) in the cycle it happens.

Timing: a request has to ripple through the combinational carry (or borrow)
logic of up to three digits, a 4-bit compare and an AND gate each, before the
clock edge. For n = 7, an increment at 0666 (base 7) carries through all
three upper digits and the display reads 1000 on the next edge. A decrement
at 0000 borrows through all of them and gives 6666.

## From pushbuttons to count requests (`button_ctrl`, `rate_div`)

The buttons are active low: pressed pulls the pin to ground, and a pull-up
holds it high otherwise. They change at any time, so each first passes
through a two-flop synchronizer. Next:

* **up only held:** a `rate_div` divider counts clocks and gives a one-clock
  `up` pulse every CLK_HZ/UP_HZ = 50,000 clocks (1 kHz).
* **down only held:** a second divider gives a one-clock `down` pulse every
  CLK_HZ/DOWN_HZ = 500,000 clocks (100 Hz).
* **both held:** `up` and `down` are high on every clock, so the counter
  clears and stays at 0000 for as long as both are held.
* **neither held:** both outputs are low, and the count holds.

A divider is held at zero while its button is not the only one held. So its
count restarts on every press, and the first step comes one full period after
the press (50,001 clocks for up at 50 MHz, counting the synchronizer). A tap
shorter than one period does nothing. Holding for k periods gives exactly k
steps. The buttons are not debounced. A bounce at the press only restarts the
divider, because a step needs a whole uninterrupted period.

An assertion checks that `up` and `down` are only high together while both
buttons are held.

## Showing the count (`display_mux`, `seg7_decode`)

The four LED digits share the seven segment lines a..g, and `en[3:0]` selects
which digit is lit. A free-running divider moves the scan to the next digit
every SCAN_DIV = 50,000 clocks (1 ms). Each digit is lit a quarter of the time
and the display is refreshed at 250 Hz. `en[i]` shows `count[i]`, so `en[3]`
drives the leftmost digit (D1, most significant) and `en[0]` the rightmost
(D4). `seg7_decode` turns a 4-bit value into the usual patterns. A modulo-n
digit with n up to 9 only shows 0-9; the hex letters A b C d E F are there for
n up to 16. The enable and the pattern are registered together, so both
change on the same edge. The decimal point `dp` is never lit.

The segment and enable polarity depend on the display type and wiring. The
defaults are active-low enables (`EN_ACTIVE_LOW = 1`) and active-high segments
(`SEG_ACTIVE_LOW = 0`), which suits a common-cathode display whose digit
commons are pulled low by the enable pins. For a common-anode part, flip both
parameters. Check this against your display before use.

## Top level and pins (`lab5`)

| port | dir | meaning | pin |
|------|-----|---------|-----|
| clock | in | 50 MHz clock | PIN_12 |
| up_n | in | up button, active low, weak pull-up on | PIN_99 |
| down_n | in | down button, active low, weak pull-up on | PIN_97 |
| en[3] en[2] en[1] en[0] | out | digit enables, en[3] most significant | PIN_35, PIN_50, PIN_48, PIN_42 |
| a b c d e f g | out | segments | PIN_33, PIN_44, PIN_38, PIN_34, PIN_30, PIN_52, PIN_40 |
| dp | out | decimal point, always off | PIN_36 |

Each segment line needs a series current-limiting resistor (200 Ω) to the
display. The buttons connect between their pin and ground.

Parameters of `lab5`, with defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| N | 7 | modulus of every digit (2..16); the lab assigns 5, 6, 7 or 9 |
| CLK_RATE | 50,000,000 | clock frequency in Hz |
| UP_RATE | 1,000 | step rate while up is held, Hz |
| DOWN_RATE | 100 | step rate while down is held, Hz |
| SCAN_DIV | 50,000 | clocks each display digit stays lit |
| EN_ACTIVE_LOW | 1 | polarity of en |
| SEG_ACTIVE_LOW | 0 | polarity of a..g and dp |

Shared constants (digit count, rates) and the types `digit_t` (4-bit digit)
and `seg_t` (packed struct a..g) are in `rtl/lab5_pkg.sv`.

## What is specified and what is chosen here

These parts follow the counter specification exactly: the digit's ports,
width, next-state rules and carry/borrow table; the four-digit cascade; the
50 MHz clock; the 1 kHz and 100 Hz step rates; clear when both buttons are
held; active-low buttons with pull-ups; the pin names and locations.

These are this design's own choices:

* the default modulus 7, one of the four assigned values;
* no reset, and how an out-of-range count at power-up behaves;
* the synchronizer, and dividers that restart on each press;
* holding both buttons forces a clear on every clock;
* the display's scan rate, digit order, polarity, hex letters and dark
  decimal point;
* carry and borrow out of the top digit as ports.

Not covered: no timing analysis has been done for a CPLD at 50 MHz. The longest
path is the three-digit carry/borrow ripple plus the next-state logic, and it
is short. The LED display, resistors and buttons are board parts, not logic.

## Testbenches

Each testbench in `tb/` checks its outputs itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each also has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| tb_modncount | digits with n = 5, 6, 7, 9, 16 on random requests, against an integer model. It checks the count and both flags every cycle, and requires up wraps, down wraps and clears. |
| tb_modncount4 | n = 7 and n = 5 four-digit counters. Long up and down runs wrap the whole counter, then random requests. Each digit and the top carry/borrow are checked every cycle. |
| tb_button_ctrl | scaled rates. It checks k pulses for k held periods, the first pulse DIV+1 clocks after the press, exact spacing, both-held behaviour, release, and short taps. |
| tb_seg7_decode | all 16 values against segment lists written out by hand, and that all patterns differ. |
| tb_display_mux | both polarities. It checks one-hot enables, the right pattern for the lit digit, SCAN_DIV clocks per digit and scan order. |
| tb_lab5 | the whole circuit at scaled rates, driven only through the buttons and read only from the LED pins. It clears, wraps the count up past the top digit, holds, wraps down, and makes random presses. Every mechanism must occur. |
| tb_lab5_full | the whole circuit with all defaults: about 125 million clocks, about a minute. It checks 1 kHz and 100 Hz step spacing to the clock, the 2401-step wrap, and 0000 to 6666. |

`tb/seg7_ref_pkg.sv` holds the reference segment patterns the testbenches use.

To run one with Verilator, list the packages first and let `-y` find the
modules:

```
verilator --binary --timing --assert rtl/lab5_pkg.sv tb/seg7_ref_pkg.sv \
    -y rtl -y tb tb/tb_lab5.sv --top-module tb_lab5
./obj_dir/Vtb_lab5
```

Nothing is reset by the testbenches except through the design's own clear
(both buttons, or up and down together). They pass with registers starting at
random values (`+verilator+rand+reset+2`).

To lint the synthesizable design on its own:

```
verilator --lint-only -Wall rtl/lab5_pkg.sv -y rtl rtl/lab5.sv
```

It reports two unused-signal warnings: the top digit's carry and borrow,
which have no destination on the board.
