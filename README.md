# Bat population counter

This is a counter for the animals in a roost with a single opening, such as a
cave. Two infrared beams cross the opening one behind the other. An animal
passing through breaks them in an order that gives its direction. A small state
machine watches the two beams, and a decade up/down counter takes one step for
each complete passage: up for a passage inward, down for one outward. An animal
that enters the beams and turns back is not counted. A 4-bit register catches
the counter each time it stands at 0 or at 9. A processor adds every 9 it
receives to a two-digit decimal total and displays it. Once the total would
pass 99 it shows `EE`, sounds an alarm and waits for a reset.

The RTL here covers everything digital in that chain. The analog front end is
not included: the LEDs, the photodiodes and the comparators that turn
photodiode voltages into logic levels. The design starts at the two comparator
outputs. The processor board is not included either. The part of its program
that matters to the counter is built as logic instead.

```
beam_a ─┐   signal_conditioning    direction_fsm       updown_counter     max_count_buffer    count_accumulator
beam_b ─┴─► sync, A=¬a, B=¬b,  ──► A,B → x,y rows  ──► 74LS168 function ─► 74LS169 as a    ──► BCD total, EE,
            CP = a∧b, CP edge       U/D', CEP'          (decade up/down)    register, loads     alarm_tone
                     │                                      ▲               only 0000 / 1001
                     └──────────── cp_rise (count clock enable) ───────────┘
```

## Reading a passage: the two-beam state machine

This is the heart of the design and the part most worth understanding.

The machine was designed as a *fundamental-mode* asynchronous circuit. At any
moment only one beam changes, and the state is kept in two feedback
variables, `x` and `y`. The inputs are `A` and `B`, each 1 while its beam is
broken. Beam B is the outer one. A passage inward breaks B, then both, then A
alone, and then clears both. A passage outward does the same starting from A.

The seven stable states merge into three rows of the flow table. A row is
named by its `{x,y}` code (`fsm_row_e` in `popcount_pkg`):

| `{x,y}` | row | states in it | meaning |
|---|---|---|---|
| `01` | idle | S0 | both beams clear |
| `11` | B first | S1 (B), S3 (A and B), S5 (A only) | inward passage under way |
| `00` | A first | S2 (A), S4 (A and B), S6 (B only) | outward passage under way |
| `10` | unused | – | leaves at once to idle or to the B-first row |

Inside a row, the inputs decide which state the machine is in. Backing out of
a beam is simply a change back to the previous input column, so a bat that
turns round walks the same states backwards and reaches idle uncounted. Any
input "both clear" leads to idle. The next-state equations are:

```
X = A'·B·y + A·x + B·x
Y = A'·B'  + A'·y + x
```

The counter controls depend only on the current row and inputs. They are
active in the last step of a passage, when one beam is still broken:

```
CEP' = 0  when  {x,y}=00, B=1, A=0   (outward, last step: count)
          or    x=1,      A=1, B=0   (inward,  last step: count)
U/D' = 1  when  x=1, A=1, B=0        (inward: count up; otherwise down)
```

The step itself happens when the last beam clears (see the next section). A
complete inward passage therefore adds one and an outward passage takes one
away. These equations give the following outputs for one passage in each
direction (the `X Y` columns are the next row):

| B | A | X Y | U/D' | CEP' |
|---|---|---|---|---|
| 0 | 0 | 0 1 | 0 | 1 |
| 1 | 0 | 1 1 | 0 | 1 |
| 1 | 1 | 1 1 | 0 | 1 |
| 0 | 1 | 1 1 | 1 | 0 |
| 0 | 0 | 0 1 | 0 | 1 |
| 0 | 1 | 0 0 | 0 | 1 |
| 1 | 1 | 0 0 | 0 | 1 |
| 1 | 0 | 0 0 | 0 | 0 |

Which beam is called A and which B is what fixes the direction. With B as
the outer beam, an inward passage counts up. If your sensors are mounted the
other way round, swap `beam_a` and `beam_b`.

**Synchronous realization.** Here `x` and `y` are flip-flops on `clk` instead
of gate feedback, and `U/D'` and `CEP'` are registered. The registers matter:
the count enable reaches the counter in the cycle after both beams have
cleared. By then the machine is already back in idle, so only the registered
outputs still carry the counting values. In the original circuit, gate delay
played that role at the clock edge.

## From beams to a count clock (`signal_conditioning`)

Each comparator output is high while its photodiode sees the beam. The
original gate network is kept as it was. A NAND with its inputs tied inverts
each detector into `A` or `B` (1 = broken). An AND of the two detectors gives
the count clock `CP`, which is high only while both beams are clear. `CP`
rises exactly once per visit of an animal to the beams: when it leaves them,
in either direction, counted or not.

This design adds a two-flop synchronizer per beam and turns the rising edge
of `CP` into a one-cycle enable, `cp_rise`. The counter and the buffer use
that enable on the single clock `clk`, instead of using `CP` as a clock.

## Decade counter and the 0/9 buffer

`updown_counter` has the control pins of the 74LS168 (decade, `MODULUS=10`)
and of the 74LS169 (binary, `MODULUS=16`):

- `PE'` low loads `P`.
- Otherwise, if `CEP'` and `CET'` are both low, it counts. `U/D'` = 1 counts
  up and 0 counts down, wrapping at the modulus.
- Otherwise it holds.

`TC'` is low at the last count in the current direction while `CET'` is low.
In the top module the decade counter has `P` = 0, `PE'` high and `CET'` low,
so `CEP'` from the state machine alone decides whether a `CP` edge counts.

`max_count_buffer` is a second counter of the same kind, with counting turned
off (`U/D'`, `CEP'` and `CET'` all high). It works as a 4-bit register fed by
the decade counter. Its load input comes from three gates on the counter's
outputs:

```
PE' = (Q0 xor Q3) or (Q1 or Q2)        low only for 0000 and 1001
```

On every `CP` edge the buffer takes the counter's value from before that edge
if the value was 0 or 9, and otherwise keeps its contents. So the buffer only
ever holds 0 or 9. It changes from 0 to 9 each time the counter has run
through a full decade. That happens in either direction, since counting down
from 0 also passes 9.

## The processor's part: decimal total, `EE` and the alarm

`count_accumulator` does what the processor program does:

- It reads the buffer on port A.
- Each new non-zero value is added to the stored total in two-digit packed
  BCD, as with decimal-mode `ADC` on a 6502 (`bcd_add` in `popcount_pkg`).
- The result goes to port B, the displayed value, and back to the store.

"New" means that port A differs from its value one cycle earlier. A 0 on the
port adds nothing; it only re-arms the next addition. With the buffer
delivering 9s, the display runs 09, 18, 27, … 90, 99.

The next addition carries out of the two digits. The block then shows `EE`
and starts `alarm_tone`: 255 pulses, each high for 255 cycles and low for 255
cycles. These numbers come from the program's two `0xFF` loop counts, with one
delay-loop pass per `clk` cycle. When the alarm ends the store is cleared. The
display keeps `EE` and nothing more is added until `rst_n`.

Note what the total means. It advances by 9 once per decade of the counter,
not by one per animal. The single-animal count is `count_q`, modulo 10. This
is how the original system was built, and the RTL keeps it.

## Timing

All registers run on `clk`, with an asynchronous active-low `rst_n`. The
cycle counts below are measured from the clock edge that first samples the
last beam clearing.

| event | cycles |
|---|---|
| beam change → `A`, `B`, `CP` | 2 |
| last beam clears → decade counter and buffer step | 3 |
| last beam clears → `port_b` shows the new total | 4 |
| `EE` shown → alarm finished, store cleared | 2·255·255 + 2 = 130,052 |

A beam state must last at least one `clk` cycle to be seen. In
practice `clk` is many orders of magnitude faster than a bat.

## Where this RTL departs from the original circuit, and its own choices

- **One clock.** The original is asynchronous, with feedback through gates
  and `CP` as the clock of the two counter chips. Here everything is
  synchronous to `clk`: the state variables are registered, `CP` is an
  enable, and the beam inputs are synchronized. There is a reset, which the
  counter chips lack. The hazards and races of an asynchronous gate-level
  machine therefore do not arise here, and are not modelled.
- **Buffer load logic.** One XOR and two ORs, as in the original drawing.
  They give the "0000 or 1001" behaviour.
- **`CET'` of the decade counter** is tied low (always enabled), as drawn.
- **The processor** is replaced by logic with the same observable behaviour
  on its ports. Not modelled: its memory addresses, the keypad display
  routine, and the instruction timing of the delay loops.
- **The limit test** is the carry out of the BCD sum, so 99 is shown and the
  next 9 gives `EE`.

## Files

| file | content |
|---|---|
| `rtl/popcount_pkg.sv` | row encoding, `EE` and limit constants, `bcd_add` |
| `rtl/signal_conditioning.sv` | synchronizers, NAND/AND gates, `CP` edge |
| `rtl/direction_fsm.sv` | the two-beam state machine |
| `rtl/updown_counter.sv` | 74LS168/169-style up/down counter |
| `rtl/max_count_buffer.sv` | 74LS169 as a 0/9 capture register |
| `rtl/alarm_tone.sv` | alarm pulse burst |
| `rtl/count_accumulator.sv` | decimal total, `EE`, halt, alarm start |
| `rtl/population_counter_top.sv` | the whole chain |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_detector_front_end` |
| `tb/ir_detector_model.sv` | behavioural (real-valued) model of a photodiode and comparator channel |

Parameters: `updown_counter` has `WIDTH` = 4 and `MODULUS` = 10. The top and
`count_accumulator` have `ALARM_PULSES` = 255 and `WAIT_STEPS` = 255.
`alarm_tone` has `PULSES` = 255 and `HALF_PERIOD` = 255.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and exits. With
Verilator 5:

```
verilator --binary --timing --assert -y rtl --top-module tb_population_counter_top \
          rtl/popcount_pkg.sv tb/tb_population_counter_top.sv
./obj_dir/Vtb_population_counter_top
```

Replace the testbench name to run another one. The package must come first
on the command line; `-y rtl` finds the modules. `tb_detector_front_end`
also needs `-y tb` for the detector model.

What the testbenches establish:

- `tb_direction_fsm` compares the machine with a reference written state by
  state (S0…S6) over 6,000 random one-beam-at-a-time changes. It also replays
  the eight-row output table above.
- `tb_updown_counter` checks load, count, hold, wrap and `TC'` for both
  moduli against an integer model.
- `tb_max_count_buffer` checks all 16 inputs and random clocking.
- `tb_signal_conditioning` checks the gates, the delay and the `CP` edge on
  random beam patterns.
- `tb_alarm_tone` checks the burst waveform cycle by cycle, and a full
  255 × 255 burst.
- `tb_count_accumulator` checks the 09…99, `EE` sequence, repeated values,
  the halt, and random BCD sums against decimal arithmetic.
- `tb_population_counter_top` runs the whole design at its default
  parameters. It simulates mixed traffic in both directions, including
  animals that turn back at three depths, then steady inward traffic until
  `EE`. It lets the full alarm play, then resets and counts again.
  - It checks every counter step, including the three-cycle latency after
    the last beam clears, plus the buffer, display and halt.
  - It counts each mechanism and fails if one never occurs: up and down
    counts, turn-backs, wraps in both directions, buffer loads of 0 and 9,
    BCD digit carries, overflow to `EE`, the alarm burst, traffic ignored
    while halted, and restart after reset.

- `tb_detector_front_end` drives the top through two detector channel
  models. The photodiode levels are 0.24 V and 0.28 V while a beam is seen,
  against divider references of 0.22 V and 0.26 V; a blocked beam is taken
  as 0.05 V. It checks the resulting count after mixed traffic.

All testbenches finish in well under a second.
