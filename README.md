# Traffic light controller with time-of-day control

A single-chip controller for the lights at a road junction. It replaces the
usual microcontroller-plus-peripherals approach with dedicated logic. The same
chip drives four kinds of junction:

* a basic four-way crossing;
* a "class-2" four-way crossing, where turning and straight traffic move in separate phases;
* a Y-shaped three-way junction;
* a T-shaped three-way junction.

The `traffic_sel` pins choose which one drives the outputs. Each road has seven
lights and two down-count displays:

* green, yellow and red;
* cross (turning) green, yellow and red;
* a pedestrian walk light;
* a display counting down the green time;
* a display counting down the red time.

A real time clock on the chip switches the junction to night mode (all dark,
yellow blinking) during a set hour window. It can also raise a rush-hour signal
that, through the *clock distributor*, gives chosen roads a longer or shorter
green time.

Everything is synchronous to one 4 Hz clock (`clk`). `clr` is an asynchronous
active-high reset.

## How green time is chosen: clock codes

The design expresses a green time as a choice of *clock*. The clock divider
(`rtl/clk_divider.sv`) makes five clocks from the 4 Hz input:

| `mux_2x1_ip` | `clk_div_sel_ip` | divide ratio P | nominal green |
|---|---|---|---|
| 0 | 00 | 1 | 15 s |
| 1 | 00 | 2 | 30 s (default) |
| x | 01 | 3 (1.5 of the /2 stage) | 45 s |
| x | 10 | 4 (2 of the /2 stage) | 60 s |
| x | 11 | 6 (3 of the /2 stage) | 90 s |

The 3-bit code `{mux_2x1, div_sel}` is the currency of the design (`clk_code_t`
in `rtl/tlc_pkg.sv`). The junction controllers turn a code into seconds: every
green time is a fixed multiple of P. Yellow times are fixed.

| junction | phase | green | yellow | at default (P = 2) |
|---|---|---|---|---|
| basic, Y | each road in turn | 15P | 2 s | 30 + 2 s |
| class-2 normal | roads 1+3 cross, 1+3 straight, 2+4 cross, 2+4 straight | 5P / 9P | 2 s | 10 + 2 s / 18 + 2 s |
| class-2 special | roads 1+3 straight, 2+4 straight | 14P + 2 | 2 s | 30 + 2 s |
| T-shape | roads 1+2 (main road) | 30P | 4 s | 60 + 4 s |
| T-shape | road 1 turning into road 3 (road 1 cross lights) | 15P | 2 s | 30 + 2 s |
| T-shape | road 3 | 15P | 2 s | 30 + 2 s |

The times at the default code are the published ones. Scaling them with P is
this implementation's reading of how the selected clock sets the green time.

The divider builds its outputs as one-cycle enable pulses, not as derived
clocks. There is therefore one clock domain. `timer_clk` pulses every 4th
cycle (1 Hz) and drives all sequencing and the real time clock. `clk_main_out`,
the selected clock, is brought out at a pin for observation.

## The feedback loop: clock distributor

`rtl/clk_distributor.sv` decides which code is in force. With timing variation
off, the code on the pins (`mux_2x1_ip`, `clk_div_sel_ip`) passes straight
through. This code is called the *nominal* code. Variation is on when
`variable_time_enable` is high or the real time clock signals rush hour.

When variation is on, the distributor keeps a code per road. It outputs the
code of the road whose red light is off. It learns which road that is from the
chip's red outputs, fed back from the output multiplexer. This is the loop in
the chip's block diagram. When every road shows red it uses the nominal code.
This happens in class-2 and T-shape turning phases. The `timing` pin gives the
new code: 00 = 15 s, 01 = 45 s, 10 = 60 s, 11 = 90 s. `no_of_roads_time_var`
selects which roads receive it:

| mode | roads written |
|---|---|
| 00 | one road, number `road_timing_combination[1:0]`+1; others nominal |
| 01 | a pair from `road_timing_combination`: 000 1&2, 001 1&3, 010 1&4, 011 3&2, 100 3&4, 101 4&2. With `tworoad_timing_same_diff` = 0 both roads get `timing`; with 1 the first gets `timing` and the second keeps the nominal code. Others nominal. |
| 10 | the road numbered `road_timing_combination[1:0]`+1; the other roads keep earlier settings, so roads are programmed one after another |
| 11 | all roads nominal: all four roads change together through the clock pins |

The per-road table and the output are registered. This breaks the
combinational path red → code → green time, and it settles within two clocks,
well inside the four clocks between 1 Hz steps. The road-select reading of
modes 00 and 10, and the meaning of "different" in mode 01, are this
implementation's choices. The published description lists the modes but not
these details.

## Junction sequencing and the down-count displays

The four junction modules (`basic_4way`, `class2_4way`, `y_shape_3way`,
`t_shape_3way`) each describe their cycle as a table of up to four phases. A
phase lists:

* the roads with straight right of way;
* the roads with turning right of way;
* a green time under the code in force;
* a green time under the nominal code;
* a yellow time.

All four share one sequencer, `rtl/phase_engine.sv`. It steps once a second and
drives the following outputs.

* **Lights.** Roads in the phase see green, then yellow. An installed light that
  is not moving shows red. Cross lights exist on every road of the class-2
  junction and on road 1 of the T-shape. Road 4 of the three-way junctions stays
  dark.
* **Walk.** The walk light is on with the straight green. It blinks over the
  last 4 s of the green: on at 4 and 2 s left, off at 3 and 1 s left.
  `walk_enable` = 0 turns walk lights off.
* **Green display (8 bit).** A road with right of way shows the seconds left in
  its phase, green plus yellow. Any other road shows the length of its next
  phase.
* **Red display (9 bit).** While a road's straight red is lit, the display
  shows the seconds until its straight green. While the road moves, it shows the
  length of the red time ahead. At the default timing the basic junction starts
  with road 1 showing 32 on its green display. The red displays read 96, 32, 64
  and 96 for roads 1 to 4.

The green time of the *running* phase follows the code in force. Later phases
are predicted with the nominal code. The displays are therefore exact unless
roads that lie ahead have been given special timing. When a road given special
timing turns green, its green display shows the nominal value for the two
clocks the distributor needs to answer, then jumps.

### Mode inputs

* **Night mode.** Every light is dark except the straight yellows of the present
  roads. These blink 1 s on, 1 s off, starting on. The displays read 0. The
  cycle restarts from its first phase when night ends.
* **Emergency (`emrgncy`).** The sequence freezes and every light holds its
  state. No pin says which road an emergency vehicle uses, so the whole
  junction is held as it stands.
* **Power (`ic_power_on_off` = 0).** All light and display outputs are 0 and
  the cycle restarts. The real time clock keeps running.

The 1 Hz enable runs free. The first second after power-on, or after night
mode, can therefore be up to three clocks (0.75 s) short.

## Real time clock

`rtl/rtc.sv` is a 24-hour clock running on the 1 Hz enable. To set it, hold
`man_auto_mod_sel` = 1 and `time_set_enable` = 1. It then loads `hour_in`,
`min_in` and `sec_in`. Out-of-range values load 0, and the clock does not
advance while it is being set.

* `night_mod_enable` is high while the hour is in [night begin, night end).
* `rush_mod_enable` is high in the morning or evening [begin, end) window.

A window whose begin is later than its end wraps past midnight. Equal hours
mean an empty window.

## Output multiplexer

`rtl/output_mux_bank.sv` holds the 36 4:1 multiplexers that connect the
selected junction to the pins:

* 28 one-bit multiplexers for the lights;
* four 8-bit multiplexers for the green counts;
* four 9-bit multiplexers for the red counts.

Their select input is `traffic_sel`. All four junction controllers run all the
time, so switching `traffic_sel` shows another junction's state right away.

## Files

| file | content |
|---|---|
| `rtl/tlc_pkg.sv` | types (`clk_code_t`, `road_lights_t`, `junction_out_t`, `phase_t`), widths, code-to-seconds functions |
| `rtl/tlc_top.sv` | the chip: pins, wiring, red feedback |
| `rtl/clk_divider.sv` | clock enables |
| `rtl/clk_distributor.sv` | per-road timing |
| `rtl/rtc.sv` | time of day, night and rush windows |
| `rtl/phase_engine.sv` | shared sequencer and display logic |
| `rtl/basic_4way.sv`, `class2_4way.sv`, `y_shape_3way.sv`, `t_shape_3way.sv` | phase tables of the four junctions |
| `rtl/output_mux_bank.sv`, `rtl/mux4.sv` | output selection |
| `tb/tb_ref_pkg.sv` | reference model of the junctions used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_tlc_top` for the chip |
| `tb/tb_rush_timing.sv` | rush-hour scenario: per-road green times set while the chip runs |

The top has no parameters, and its testbench runs the chip at its real size.
It checks all 36 outputs every clock against the reference model through a
whole cycle of every junction type, including class-2 special mode. It also
exercises an emergency pause, a night window reached by the running clock, a
90 s green during rush hour, 15 s greens set with `variable_time_enable`, a
nominal 15 s clock, and power off.

`tb_rush_timing` runs a second chip-level scenario:

* during the morning rush the four roads are set to 15, 45, 60 and 90 s, one
  after another;
* in the evening rush one road of a pair is given 90 s;
* the T-junction's side road is given 45 s.

It measures every green time in clocks. `tb_phase_engine` drives the sequencer
with a phase table that no junction uses. Each testbench prints
`TB_RESULT checks=N failures=M`.

`phase_engine` also carries two concurrent assertions. Each road's green,
yellow and red are never lit together, and the same holds for its cross lights.
They run in every simulation of a junction or of the chip.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/tlc_pkg.sv tb/tb_ref_pkg.sv tb/tb_tlc_top.sv --top-module tb_tlc_top
./obj_dir/Vtb_tlc_top
```

Change the testbench name to run another. Every testbench finishes within a
few seconds of run time.

## Where this implementation departs from the published design, or fills gaps

* The traffic blocks time everything in seconds from the 1 Hz enable. They
  convert the selected clock code to a green time, rather than being clocked
  by the selected main clock. The result is the same green times without a
  second clock domain. `clk_main_out` is still generated, and its rate is
  tested.
* Divided clocks are enable pulses. Divide-by-1.5 is a pulse every 3 input
  clocks.
* The third phase of the T-junction (road 3's own green) is inferred from the
  display values of its published pictures (96/64/32 s). It is not described in
  words.
* Yellow times stay fixed (2 s, or 4 s on the T-shape main road) whatever code
  is in force. Only the green time follows the code.
* Sub_Mod_Sel polarity (0 normal, 1 special) is chosen here.
* The chip has walk lights only on straight movements (`walk_1`..`walk_4`),
  matching its 36-output pin list. Separate cross walk lights are not built.
* The display rules for roads not currently moving, night behaviour of the
  displays, the emergency freeze of the whole junction, the RTC window rule
  and the distributor details above are this implementation's choices.
* Extra observation outputs: `clk_main_out`, `rtc_sec`, `rtc_min`, `rtc_hour`.
