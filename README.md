# Sailboat regatta starting aid

A small synchronous controller that helps a race committee start sailboat
races. Races are started with a five-minute sequence of flag signals, each
marked by a horn blast: class flag up at 5:00, preparatory flag up at 4:00,
preparatory flag down at 1:00, class flag down at 0:00 (the start). With
several fleets the starts roll: the start of one fleet is the 5:00 signal of
the next. This design counts that sequence for one to nine fleets, shows it on
four seven-segment digits, sounds the horn at the right seconds, and warns the
committee with an intermittent alert in the five seconds before each signal.
A postponement or general recall resets the clock to 6:05 and sounds two
blasts; the committee lowers that flag with one blast at 6:00, and the
sequence restarts one minute later.

Everything runs on one slow clock: one clock cycle is one second (1 Hz; a
2 Hz clock runs the sequence at double speed for bench tests). The whole
design is about 28 flip-flops.

## Operator's view

| Input | Effect |
|---|---|
| `add_fleet` | One more fleet waiting. From 0 fleets the display jumps to 1 fleet at 5:05. From 9 it wraps to 0. Works at any time, also while counting. |
| `start_n` (active low) | Start counting down from the time shown. Ignored when everything shows zero (no fleet entered). |
| `pp` (postpone / general recall) | Time to 6:05, counting stops, two horn blasts. If no fleet is waiting (a recall after the last start), the fleet count becomes 1. |
| `manual_horn` | Horn on for as long as it is held (individual recall, abandonment, come within hail). |

Outputs: four digits, active-low segments `a..g` (bit 6 = a, bit 0 = g):
fleets waiting, minutes, tens of seconds, seconds. `alert` and `horn` are
active high.

A typical run with two fleets, one clock per second:

```
add, add     2 5:05
start        2 5:04 ... 5:05..5:00 alert, 5:00 horn   class flag fleet 1
             2 4:00 horn                                preparatory up
             2 1:00 horn                                preparatory down
             2 0:00 horn                                start fleet 1 = 5:00 of fleet 2
             1 4:59 ... 4:00 horn, 1:00 horn
             0 0:00 horn, counting stops                start fleet 2
```

## Blocks

```
 add_fleet ──► srsa_one_pulse ──load──►┌────────────┐──item──► srsa_bcd7seg ─► seg_fleet_n
 start_n ─►(inv)─st─►┌──────────────┐  │ srsa_timer │──min───► srsa_bcd7seg ─► seg_min_n
 pp ────────────pp──►│ srsa_seq_ctrl│en►│            │──tens──► srsa_bcd7seg ─► seg_tens_n
               ┌stop►│              │rst►│ (contains  │──sec───► srsa_bcd7seg ─► seg_sec_n
               │     └──────┬───────┘  │ srsa_event │──alert─────────────────► alert
               │            │reset     │ _decode)   │──horn──┐
               └────────────┼─── zero ─└────────────┘        ├─OR─► horn
                            └──► srsa_horn_driver ──────────┤
 manual_horn ───────────────────────────────────────────────┘
```

| File | Role |
|---|---|
| `rtl/srsa_pkg.sv` | BCD digit, time struct, segment type, the time constants 5:05, 6:05, 4:59 |
| `rtl/srsa_one_pulse.sv` | Add Fleet button to one pulse per press |
| `rtl/srsa_seq_ctrl.sv` | Three-state controller: stopped, reset, counting |
| `rtl/srsa_timer.sv` | Fleet counter and BCD countdown |
| `rtl/srsa_event_decode.sv` | Time-to-alert/horn decode (part of the timer) |
| `rtl/srsa_horn_driver.sv` | Two-blast generator for postponement / recall |
| `rtl/srsa_bcd7seg.sv` | Active-low seven-segment decoder (0-9, A-F) |
| `rtl/srsa_top.sv` | Structure above, start inverter, three-input horn OR |

### Sequence controller

| State | Meaning | Leaves on |
|---|---|---|
| S0 stopped (00) | nothing sent | `pp` → S1 with `reset`; `st` and not `stop` → S2 with `en`; `st` with `stop` does nothing |
| S1 reset (01) | `reset` was sent for one cycle | stays while `pp` is held, then S0 |
| S2 counting (10) | `en` held | `pp` → S1 with `reset`, `en` dropped; `stop` → S0 |

One corner case: in S2 with `pp`, `st` and `stop` all high, the controller
goes to S0 and sends no reset. `stop` is the timer's `zero`. The module
asserts that `en` and `reset` are never high together.

### Timer

The timer holds four BCD digits: fleets waiting, then minutes : tens : seconds.
Three rules are applied at each edge, in this order, and each one sees the
fleet count the previous rule left:

1. **Count** (when `en` is high and not all digits are zero). One second down
   in BCD. If the time goes below 0:00 with fleets waiting, it wraps to 4:59
   and one fleet is taken off. With one fleet left, the step from 0:01 goes to
   0:00 and sets the fleets to 0. That raises `zero`, and counting stops.
2. **Load** (Add Fleet). Adds a fleet; from 9 it wraps to 0 and the time is
   left alone; from 0 it becomes 1 fleet at 5:05.
3. **Reset** (postponement / recall). Sets the time to 6:05 and turns a fleet
   count of 0 into 1.

`zero` = all four digits 0.

### Alert and horn decode

A flag signal falls at x:00 of minutes 6, 5, 4, 1 and 0. The decode tests the
minute as `!min[1] | min[2]`. Over the reachable minutes 0..6 that picks out
exactly 0, 1, 4, 5 and 6. The tens digit must be zero. The timer's horn is
then `en & seconds == 0`: one clock long, because the count moves on at the
next edge. The alert is `en & seconds <= 5 & clk`. That gives six clock cycles,
from m:05 through m:00, each high for the clock's high half. So the clock is
deliberately used as a data signal here.

### Horn driver

A four-state Gray-coded machine (00, 01, 11, 10) that answers a pulse with
the pattern `1 0 1 0`: two one-clock blasts separated by one clock of
silence. If its input stays high in the last state, it waits there for the
input to drop. In the system its input is the controller's one-cycle
`reset`. So every postponement/recall reset sounds two blasts, including a
repeated press while already stopped at 6:05.

## Cycle timing

This is the part that is easiest to get wrong when the design is changed.

- All three state machines (one-pulse, controller, horn driver) compute
  Mealy outputs from their state and inputs, and those outputs are
  **registered**. A button seen at clock edge k changes `load`, `en` or
  `reset` during cycle k, and the timer digits change at edge k+1.
- A postponement seen at edge k: `reset` is high and `en` is low for cycle k.
  At edge k+1 the display shows 6:05, and the first blast sounds in that same
  cycle. The second blast sounds two cycles later.
- Start seen at edge k: `en` rises in cycle k, and the first count happens at
  edge k+1. From 5:05, the horns fall 5, 65, 245 and 305 cycles after counting
  begins. Each further fleet adds 300 cycles.
- **Last start.** The horn decode requires `en`. The controller drops `en`
  one cycle after `zero` rises, because its outputs are registered. That is
  why the final 0:00 still gets its horn. If the controller's outputs are
  made combinational, `en` falls in the very cycle 0:00 appears, and the
  start of the last fleet is silent.
- `horn` and `alert` are combinational. The manual horn follows the button
  directly, and `alert` is gated by the clock. For a real horn or buzzer,
  drive a relay or a register from these outputs.

## Where this RTL departs from its source design, or fills gaps

- **Registered outputs.** The source design's state tables and logic diagrams
  draw the one-pulse, controller and horn-driver outputs as plain gates
  (Mealy, no output register). Its prototype implementation registers them.
  This RTL registers them, for the last-start horn reason above. As a result,
  the one-pulse output and the first recall blast come one clock later than
  the unregistered gates would give.
- **Alert window.** The alert covers seconds 0..5 of each signal minute, as
  the source's decoder diagram and its "last five seconds" wording both have
  it.
- **Same-cycle inputs.** When a count, a load and a reset coincide, the
  source does not say how they combine; the order is this RTL's choice. The
  effect is that a fleet added in the cycle a fleet is taken off is kept.
- **Reset pin.** `rst_n` (asynchronous, active low) is added. It gives the
  power-up state of the original device, in which all digits are zero.
- **Unused items.** The decimal points are not driven. State code 11 of the
  controller is treated as S0.
- **Debouncing** is only the sampling at the slow clock. There is no extra
  filter.
- **Not in the RTL.** The displays, buttons, LEDs or horn and buzzer, and the
  clock oscillator are external parts. Their signals are the top-level ports.
- Not built: non-rolling starts (holding at 0:00 until Start is pressed
  again) and a selectable interval between the preparatory and one-minute
  signals. Both appear in the source only as ideas for later versions.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The block testbenches compare against
independent reference models:

- the controller against its state table, written out as text;
- the timer against a model that counts whole seconds;
- the decoder exhaustively over every reachable time.

`tb_srsa_top` runs the full design at its default configuration through a
whole regatta, comparing every digit and output in both clock phases against
a cycle-level system model. The regatta:

- start with no fleets;
- two fleets, with a third added while counting;
- a postponement in the middle of a sequence;
- a restart and a run to the end;
- a general recall after the last start;
- the manual horn;
- a fleet rollover from 9 to 0.

It also counts each of these mechanisms and fails if one never happened.

```
verilator --binary --timing --assert rtl/srsa_pkg.sv rtl/srsa_*.sv \
    tb/tb_srsa_top.sv --top-module tb_srsa_top -Mdir obj -o sim
./obj/sim
```

For a block testbench, list the package, the block's file and its testbench
(for the timer, also `rtl/srsa_event_decode.sv`). Every testbench finishes
in well under a second.

## Changing it

- The fixed times (5:05, 6:05 and the 4:59 wrap) are in `srsa_pkg`. The
  wrap value sets the spacing between rolling starts.
- The signal minutes are chosen by the decode in `srsa_event_decode`. If the
  time constants change, this decode must be changed to match.
- `srsa_timer` has a `MAX_FLEETS` parameter (default 9). The fleet digit is
  one BCD digit, so the parameter cannot exceed 9.
