# Storage-scope point display interface

A direct-view storage tube keeps whatever the beam writes until the tube is
erased, so a small computer can build a picture one point at a time and walk
away. This design is the logic between such a computer and a storage scope: the
program writes an X word, a Y word and a control word into three registers.
The interface then positions the beam, waits for it to arrive, and stores the point
with a chosen brightness. It tells the program, through a single ready level,
when the next point may be sent. Plotting a point therefore costs the program
only a few output instructions, and the wait for the beam overlaps with the
program working out the next point. The same words can also drive an X-Y point
plotter for paper copies.

The original is TTL built around one-shot monostables. This RTL keeps that
structure: every monostable is a counter, and all timing is counted in cycles
of one clock.

## The pieces

| Module | Role |
|---|---|
| `scope_interface` | Top level: wires everything below; two's complement to offset binary for the DACs |
| `strobe_select` | Chooses whether the X or the Y register's strobe plots a point |
| `point_store_sequencer` | Settle delay (24 us) or short delay (6 us) before each store, chosen by a 100 us window |
| `intensity_modulator` | One-of-four decoder and four pulse-width monostables: the store-Z pulse |
| `busy_ready` | The ready level to the computer, with the busy-disable override |
| `scope_mode_control` | Write-thru, non-store and erase lines, with the erase-disable switch |
| `switch_debounce` | Set/reset latch on the plotter-enable push button's two contacts |
| `plotter_control` | Plotter enable, seek pulses, plot-busy, pen-lift delay, stop reset |
| `indicator_panel` | Eleven front-panel LEDs, short signals stretched to 2 ms |
| `mono` | The counter monostable used everywhere (one-shot or retriggerable) |
| `dac_bipolar` | Behavioural model of a 12-bit bipolar DAC (real-valued output; not synthesizable) |
| `scope_pkg` | Control-word struct, LED indices, default time base |

## Control word

| Bit | Name | Effect |
|---|---|---|
| 0 | settle delay always | every point gets the full 24 us settle delay |
| 1 | write thru | points are written but not stored (e.g. a moving cursor) |
| 2 | non store | the tube runs as an ordinary refreshed oscilloscope |
| 3 | strobe address | the X strobe plots instead of the Y strobe |
| 4 | erase | erases the stored display |
| 5 | end plot | stops the plotter at the end of a display |
| 6, 7 | intensity address 0, 1 | selects one of four store-pulse widths |

`scope_pkg::ctrl_t` is a packed struct with these fields in this bit order.
Bit numbering is by position in the byte: bit 0 is the least significant bit.

## Storing a point: settle delay or short delay

This is the heart of the design. After a DAC word changes, the beam needs time
to reach the new position before the point may be stored. How much time it
needs depends on how far it has to move, and the interface infers the distance
from the time between points:

* A retriggerable window monostable (M14, 100 us) is restarted by every
  accepted point strobe.
* If a strobe arrives while the window is closed, the point may be anywhere on
  the screen. The settle monostable (M15) then runs for 24 us.
* If the strobe arrives while the window is still open, the program is drawing a
  line or character, so the point is close to the last one. The short
  monostable (M16) then runs for only 6 us. This is also the minimum time
  between point stores.
* Control bit 0 forces the settle delay whatever the window says.
* After reset the window is closed, so the first point of a new picture
  always gets the settle delay.

When either delay ends, the addressed intensity monostable fires. Its pulse
is the store-Z pulse:

| Intensity address (bits 7:6) | Width | Effect on a storage tube |
|---|---|---|
| 0 | 1 us | too short to store (use with write thru) |
| 1 | 5 us | stores, faint |
| 2 | 10 us | stores, between faint and bright |
| 3 | 25 us | stores, bright |

Timing at the module boundary, counted in clock cycles after the clock edge
that first sees the strobe low (W = delay, S = store width):

```
strobe   ‾‾‾‾‾\_____________________________________________
delay    ______/‾‾‾‾‾‾‾‾‾‾‾‾ W cycles ‾‾‾‾‾‾\_______________
fire     _____________________________________/‾\___________   (1 cycle)
store_z  _______________________________________/‾‾ S ‾‾\___
ready    ‾‾‾‾‾\_______________________________________/‾‾‾‾   (if nothing else is busy)
```

The sequencer starts on the strobe's trailing edge, because that edge marks the
data as stable. A strobe that ends while a delay is still running is ignored,
so two stores can never overlap. The `fire` cycle between delay and store is
counted as busy, so the ready level has no gap.

## The ready level

The computer must not change the DACs while a point is in progress. Ready is
low (busy) while any of these is active:

1. the settle or short delay (and the fire cycle),
2. the store-Z pulse,
3. the scope's own erase interval (input `scope_erasing`),
4. the plotter plotting a point (plot-busy).

The single `ready` output is meant to be wired to all three of the computer's
registers (X, Y and control), so that none of them changes while the interface is busy.

The front-panel **busy disable** switch forces ready high. It is a bail-out for
a hung computer or interface. The RTL uses positive logic (`ready` = 1 means
ready); the original drives an active-low busy.

## Plotter hard copy

A point plotter with a null detector draws a point on its own. It is sent a
"+seek" pulse, moves the pen to the DAC voltages, drops and lifts the pen,
and answers with a "complete" pulse. `plotter_control` sequences this:

* **Enable flip-flop (F1).** Each press of the plotter-enable button toggles it
  (the button goes through `switch_debounce` first). The end-plot bit clears
  it. It is held clear while the null detector's `nd_ready` input is low,
  i.e. the plotter is switched off. F1 drives `nd_enable` and `binary_sense`.
  The program reads `binary_sense` to know that a plot is running and that it
  should send end plot.
* **Seek and plot-busy.** While F1 is set, each point strobe is passed to
  `nd_seek` and sets plot-busy, which holds the ready level low.
* **Pen lift.** The complete pulse starts a 5 us monostable (M12), whose end
  starts a second 5 us one (M13). Plot-busy is cleared when M13 ends, about
  10 us after complete.
* **Stop reset.** When F1 clears, a 5 us pulse (M11) clears plot-busy, so
  stopping the plotter never leaves the interface busy.

## Front panel

`leds[10:0]`, in order: settle delay, write thru, non store, X-point store,
end plot pulse, erase, intensity 1, intensity 2, X strobe, Y strobe, ready.
The short signals (write thru, non store, end plot, erase, both strobes) light
their LED while high and for 2 ms after they fall. The others show levels.
`plotter_lamp`, `busy_disable_lamp` and `erase_disable_lamp` mirror the
plotter enable flip-flop and the two switches.

## DACs

`x_word` and `y_word` are 12-bit two's complement, so the program can send
negative values and use the full width of a rectangular tube. The top inverts
the sign bit to give the offset-binary codes `x_dac_code` and `y_dac_code`,
which are the real outputs for a physical DAC. `dac_bipolar` models an ideal
DAC with a +/-10 V range: code 2048 is 0 V. That model uses `real` and is for
simulation only. A synthesis flow should take the codes and leave the two
`dac_bipolar` instances (and the `x_volts`/`y_volts` ports) out.

## Parameters

All times are in microseconds and are converted with `TICKS_PER_US` (default
10, i.e. a 10 MHz clock).

| Parameter | Default | Meaning |
|---|---|---|
| `TICKS_PER_US` | 10 | clock cycles per microsecond |
| `SETTLE_US` | 24 | settle delay (M15) |
| `SHORT_US` | 6 | short delay (M16) |
| `WINDOW_US` | 100 | retriggerable window (M14) |
| `INT0_US`..`INT3_US` | 1, 5, 10, 25 | store-Z widths (M7-M10) |
| `LED_US` | 2000 | LED stretch (M1-M6) |
| `STOP_US` | 5 | stop reset pulse (M11) |
| `PENLIFT1_US`, `PENLIFT2_US` | 5, 5 | pen-lift delays (M12, M13) |
| `DAC_BITS` | 12 | DAC word width |

At 10 cycles per microsecond, a 5 x 7 character (35 dots) takes about 450 us
and a line takes about 12 us per point. The program's own arithmetic comes
on top of that.

## What is this design's own, and what is not modelled

The block structure, the monostable roles, the 24/6/100 us timing rule, the
1/5/25 us intensities, the four busy sources, the switches and the plotter
sequence are those of the original interface. The following are choices made here:

* Synchronous logic with one clock and synchronous active-low reset, instead
  of asynchronous TTL and RC-timed monostables. All inputs are assumed to be
  synchronous to `clk`; add synchronisers in front of real switches and
  external pulses.
* The third intensity width (10 us), and the order in which the intensity
  addresses map to the monostables.
* Sequencing starts on the trailing edge of the strobe.
* Plot-busy clears at the end of the M12 + M13 pen-lift time. F1 toggles on
  the button's press edge, and end plot acts on its rising edge.
* The 5 us widths of M11 and M13 come from labels that are only partly
  legible.
* LED stretching means "lit while high and 2 ms after".
* The scan converter's separate store-Z gate and its read-only/write-only
  lines are not built, because their logic is not known. Connect the scan
  converter to `store_z` directly.
* Level shifting (resistors, zeners, lamp drivers) is analog and is left to
  the board.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb_scope_interface` runs the whole interface
at its default parameters. It uses a model of the computer's output registers
(`sdom_model`) and of the plotter's null detector (`null_detector_model`).
It predicts every delay and store width on its own and checks them to the
cycle. It goes through erase, erase disable, all four intensities, settle and
short delays, window expiry, settle-always, X-strobe lines, a full 5 x 7
character, write thru, non store, busy disable and a plotter session stopped
both ways.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/scope_pkg.sv tb/tb_scope_interface.sv --top-module tb_scope_interface
./obj_dir/Vtb_scope_interface
```

Use the same command with another `tb_<module>` for a single block.
`rtl/scope_pkg.sv` must come first, since several modules import it.
