# Pushbutton-stepped ID digit display

A small sequential circuit for a CPLD board: every time a pushbutton is
released, a seven-segment LED shows the next of the eight digits of a student
ID number. A second button takes the display back to the first digit. After
the eighth digit the display starts again from the first digit if the ID ends
in an even digit, and stays on the last digit if it ends in an odd one.

The circuit is three parts around one 3-bit register, plus a debouncer:

```
             +----------------------------------------+
             |                                        |
             v                                        |
 reset_n -> [ next_position ] --3--> [ position_register ] --3--> [ digit_segments ] --7--> a..g
                                            ^ clock
 clock_in -> [ debounce ] ------------------+
 clock50  ->      ^
```

| Block | File | What it does |
|---|---|---|
| next position logic | `rtl/next_position.sv` | 0 while `reset_n` is low, else position + 1, with the end-of-ID rule at position 7 |
| position register | `rtl/position_register.sv` | 3-bit register, clocked by the debounced button |
| digit → segments | `rtl/digit_segments.sv` | picks the ID digit at the position and maps it to active-low segments |
| debouncer | `rtl/debounce.sv` | turns the bouncing `clock_in` button into one clean edge per press |
| top | `rtl/lab2.sv` | wires the above together |
| shared types | `rtl/lab2_pkg.sv` | position, digit and segment types; the segment table |

## How the display advances

The register's clock is the button itself, after debouncing. There is no
system clock in the counting path: the 50 MHz board clock (`clock50`) is used
only to sample and filter the button. The buttons have pull-ups, so a pressed
button reads 0 and **releasing** `clock_in` is the rising edge that loads the
register.

At that edge the register loads whatever the next-position logic presents:

| `reset_n` at the edge | position now | next position |
|---|---|---|
| low | any | 0 |
| high | 0–6 | position + 1 |
| high | 7, ID ends in an even digit | 0 |
| high | 7, ID ends in an odd digit | 7 |

Reset is therefore synchronous to the button: holding `reset_n` does nothing
by itself; it takes effect at the next release of `clock_in`. `reset_n` is not
debounced, because it is only sampled at that edge, never used as an edge.
The register has no reset pin and powers up holding an arbitrary position
(all eight values are legal), so the first reset press puts it in a known
state.

The even/odd rule is fixed when the design is built, since the ID is: the top
computes `WRAP_TO_FIRST = (ID[0] == 0)` and passes it to `next_position`.

Two example runs, with `reset_n` held low across releases 1, 2 and 6 (digit
shown after each release):

```
release         1 2 3 4 5 6 7 8 9 10 11 12 13 14 15 16 17 18
reset_n         L L H H H L H H H H  H  H  H  H  H  H  H  H
ID A00123456    0 0 0 1 2 0 0 1 2 3  4  5  6  0  0  1  2  3   (restarts)
ID A01234567    0 0 1 2 3 0 1 2 3 4  5  6  7  7  7  7  7  7   (stays on 7)
```

## The segment lookup

`ID` is a 32-bit parameter of eight BCD digits, first digit in the top
nibble: ID A00123456 is `32'h0012_3456`. Position 0 takes bits [31:28],
position 7 bits [3:0]. The digit goes through a fixed active-low table; bit 6
of the pattern drives segment `a` and bit 0 drives `g`, and a 0 lights the
segment:

| digit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| a..g | 01 | 4f | 12 | 06 | 4c | 24 | 20 | 0f | 00 | 04 |

BCD codes 10–15 cannot occur in an ID; they blank the display (`7'h7f`), a
choice of this design. A synthesis tool folds both steps into one 8-entry,
7-bit constant table (a small ROM addressed by the position). The lookup is
combinational, so the segments change as soon as the register does.

## Debouncing

A mechanical button makes and breaks contact several times in the first
milliseconds after it moves, which would step the display several times per
press. The debouncer is this design's own (the original circuit used a
separately supplied module of which only the purpose and port order are
known):

* `sw_in` passes through two flip-flops on `clk` (`clock50`) to bring it into
  that clock domain;
* a counter runs while the synchronized input differs from the output `sw`,
  and is cleared whenever the input returns to the output's level;
* when the input has differed for `STABLE_CYCLES` consecutive cycles, `sw`
  takes the new level.

A clean change of `sw_in` appears on `sw` at the `STABLE_CYCLES + 2`-th rising
edge of `clk`; any pulse or gap shorter than `STABLE_CYCLES` cycles is ignored.
The default, 1,000,000 cycles, is a 20 ms window at 50 MHz, which is a common
choice for pushbuttons but not a measured figure. The counter is 20 bits. The
debouncer has no reset; from any power-up state its output follows a steady
button within `STABLE_CYCLES + 2` cycles.

## Interface and parameters of the top (`lab2`)

| Port | Dir | Meaning |
|---|---|---|
| `clock50` | in | 50 MHz board clock (samples the button only) |
| `clock_in` | in | advance button, pulled up; release advances |
| `reset_n` | in | reset button, pulled up; low at a release shows the first digit |
| `a` … `g` | out | segment drives, active low |

| Parameter | Default | Meaning |
|---|---|---|
| `ID` | `32'h0012_3456` | the eight ID digits, BCD, first digit in bits [31:28] |
| `STABLE_CYCLES` | `1_000_000` | debounce window in `clock50` cycles (20 ms) |

Both defaults are choices: the ID is meant to be replaced by the user's own
(A00123456 is one of the two example IDs the display was specified with), and
the debounce window was never specified.

On the board these ports go to a MAX II EPM240T100C3 CPLD: segments a–g on
pins 44, 42, 36, 34, 30, 48, 50; `clock50` on pin 12; `reset_n` on pin 99 and
`clock_in` on pin 97, both with the weak pull-up enabled. Those are
constraints for the vendor tool and are not in the RTL. The design needs 10
pins and 26 flip-flops (3 position, 2 synchronizer, 20 counter, 1 output),
well within the device's 240 logic elements.

## Where this departs from, or goes beyond, the original circuit

* The debouncer's insides, window and latency are this design's own (see
  above).
* The original netlist shows the segment table as an inferred ROM block; here
  it is written as a combinational function, which synthesizes to the same
  table.
* The even/odd end-of-ID rule is a build-time parameter derived from `ID`
  rather than hand-written for one ID.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog:

| Testbench | What it checks |
|---|---|
| `tb_next_position` | all 16 input combinations, for both end-of-ID rules |
| `tb_position_register` | loads on rising edges only, ignores changes between edges |
| `tb_digit_segments` | all 8 positions for IDs A00123456 and A01234567, against a table of lit segments |
| `tb_debounce` | exact `STABLE_CYCLES + 2` latency both ways, bouncing press, 15-cycle pulse swallowed, 16-cycle pulse passed (window of 16) |
| `tb_lab2` | both example IDs side by side, 18 bouncing presses, the example runs above, no early change and exact latency after each release; counts resets, steps, restarts, stays-on-last and injected bounces, failing if any never happens (window of 8) |
| `tb_lab2_full` | the top at its defaults, driven like a real button (about 1 ms of bounce, 25 ms holds): reset + 3 presses, reset + 11 presses running through all digits and restarting; about 42 million clock cycles |

To run one with Verilator (from the directory above `rtl/` and `tb/`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl rtl/lab2_pkg.sv tb/tb_lab2.sv --top-module tb_lab2 -o sim
./obj_dir/sim +verilator+rand+reset+2
```

`+verilator+rand+reset+2` starts every uninitialised flip-flop at a random
value, which exercises the register's and debouncer's undefined power-up
state. `tb_lab2_full` takes roughly 20 seconds; the others well under one.
