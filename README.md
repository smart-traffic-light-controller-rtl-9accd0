# Sensor-assisted traffic light controller for a T-junction

A fixed-time traffic light controller stretched with a few presence
sensors. The junction has five controlled movements:

| Light | Road | Sensor |
|---|---|---|
| L2, L3 | main road, one movement each | none: always served |
| L1 | minor road | `s1`, one IR presence sensor |
| L4 | minor road | `s2`, one IR presence sensor |
| L5 | exit road, prone to queues at peak hours | three IR sensors placed one behind the other along the road |

The main road always gets its green. A minor road whose sensor sees no
vehicle is skipped, and its main-road partner gets the whole 40 s on its own.
The exit road L5 gets a green time that grows with the queue: the
further back the queue reaches along its three sensors, the longer L5 stays
green (10, 20 or 30 s). If L5 is empty it is skipped. Everything is timed by
one 6-bit countdown counter clocked at 1 Hz. The counter loads one of five
fixed intervals: 40, 30, 20, 10 and 3 s.

## The signal cycle

One cycle has three phases. Each phase begins with a 3 s all-red *check*
state. The phase's sensor is sampled in the last second of that state, and
the value decides the branch. Every green is preceded by a 1 s all-red
*safety delay*.

```
Phase A (S3 check s1)
  s1=1:  1 s all red | L1+L2 green 20 s | L1 yellow 3 s, L2 green | L2 green 20 s | L2 yellow 3 s
  s1=0:  1 s all red | L2 green 40 s | L2 yellow 3 s
Phase B (S13 check s2)
  s2=1:  1 s all red | L3+L4 green 20 s | L4 yellow 3 s, L3 green | L3 green 20 s | L3 yellow 3 s
  s2=0:  1 s all red | L3 green 40 s | L3 yellow 3 s
Phase C (S23 check s3)
  s3=00: back to phase A
  s3=01/10/11: 1 s all red | L5 green 10/20/30 s | L5 yellow 3 s | back to phase A
```

All lights not named are red. L1 is only ever open together with L2, L4 only
together with L3, and L5 only when all four others are red. With every sensor
quiet, a cycle lasts 3+1+40+3 + 3+1+40+3 + 3 = 97 s. With all sensors active
and L5 at level 3, it lasts 3+1+20+3+20+3 + 3+1+20+3+20+3 + 3+1+30+3 = 137 s.

A sensor is sampled only at the end of its check state. A vehicle that
arrives later in the cycle waits for the next one. A minor road that is
skipped gets no green until its next check.

## Lamp and sensor codes

Each light output is a one-hot 3-bit code, `lamp_t` in `tlc_pkg`:

| Code | Lamp |
|---|---|
| `100` | green |
| `010` | yellow |
| `001` | red |

The three L5 sensors enter the chip as `s3_raw[2:0]`, with bit 0 nearest the
stop line. `tlc_s3_encoder` turns them into the 2-bit level `s3`:

| `s3` | Meaning |
|---|---|
| `00` | no vehicle |
| `01` | level 1 (normal) |
| `10` | level 2 (medium) |
| `11` | level 3 (congested) |

The level is set by the farthest sensor that is active. So if the queue has
a gap, it still counts as the longer queue.

## Timing: how one counter times every state

This part is the least obvious. The controller is a Moore machine. Besides
the lights, it drives two timer signals, `tEn` and `tsel`. The counter
(`tlc_counter`) does the following:

* while `tEn = 0`, it loads `tval`. This is the interval that
  `tlc_timer_sel` selects from `tsel` (0 = 40 s, 1 = 30 s, 2 = 20 s,
  3 = 10 s, 4 = 3 s; codes 5 to 7 give 3 s);
* while `tEn = 1`, it counts down by one per clock;
* `t_out` is high in the last second of an interval, when the count is 1.
  In that same cycle the counter reloads `tval`.

There are two kinds of state:

* **Load states** (`tEn = 0`) last exactly one clock. They are the start
  state after reset and the 1 s all-red safety delays before each green.
  During the delay, the counter loads the green time that follows. So the
  required 1 s gap before a green costs no extra cycle.
* **Timed states** (`tEn = 1`) wait for `t_out`. In a timed state, `tsel`
  does not name the current interval, which is already running. It names the
  interval of the **next** state. The counter reloads that interval when
  `t_out` ends the current one. For example, a green drives `tsel = 4`, so
  its yellow starts with 3 s already loaded. The yellow of L1 drives
  `tsel = 2`, so L2's remaining 20 s alone are loaded in time.

Every branch leads into a load state. So the sensor-dependent choice of the
next interval is made in the load state, never by a timed state. The one
exception is "L5 empty": that branch goes straight into the 3 s check state
of phase A, and the phase C check state already drives 3 s.

As a result, a timed state of N seconds lasts exactly N clocks, and a load
state lasts 1 clock. The state leaves on the clock edge that ends its
`t_out` cycle.

## State encoding

There are 29 states, in a 5-bit `state_t` with codes 0 to 30. The
codes are chosen so that the check states and the named greens have fixed
numbers:

| Code | State | Lights | `tEn` | `tsel` |
|---|---|---|---|---|
| 0 | `ST_START` (after reset) | all red | 0 | 3 s |
| 3 | `ST_A_CLR`, check `s1` | all red, 3 s | 1 | 3 s |
| 4 / 9 | `ST_A_DLY_S` / `ST_A_DLY_N` | all red, 1 s | 0 | 20 s / 40 s |
| 5 | `ST_A_G12` | L1, L2 green 20 s | 1 | 3 s |
| 6, 7, 8 | `ST_A_Y1`, `ST_A_G2`, `ST_A_Y2` | L1 yellow + L2 green; L2 green; L2 yellow | 1 | 20 s, 3 s, 3 s |
| 10, 11 | `ST_A_G2L`, `ST_A_Y2L` | L2 green 40 s; L2 yellow | 1 | 3 s |
| 13 | `ST_B_CLR`, check `s2` | all red, 3 s | 1 | 3 s |
| 12 / 18 | `ST_B_DLY_S` / `ST_B_DLY_N` | all red, 1 s | 0 | 20 s / 40 s |
| 14 | `ST_B_G34` | L3, L4 green 20 s | 1 | 3 s |
| 15, 16, 17 | `ST_B_Y4`, `ST_B_G3`, `ST_B_Y3` | as phase A | 1 | 20 s, 3 s, 3 s |
| 19, 20 | `ST_B_G3L`, `ST_B_Y3L` | L3 green 40 s; L3 yellow | 1 | 3 s |
| 23 | `ST_C_CLR`, check `s3` | all red, 3 s | 1 | 3 s |
| 24 / 21 / 22 | `ST_C_DLY1/2/3` | all red, 1 s | 0 | 10 / 20 / 30 s |
| 25, 27, 29 | `ST_C_G10/20/30` | L5 green | 1 | 3 s |
| 26, 28, 30 | `ST_C_Y10/20/30` | L5 yellow | 1 | 3 s |

Codes 1, 2 and 31 are unused. They lead to `ST_START`.

## Files

| File | Contents |
|---|---|
| `rtl/tlc_pkg.sv` | lamp, timer-select, level and state types; counter width `TW = 6` |
| `rtl/tlc_top.sv` | the whole controller; ports `clk`, `rst`, `s1`, `s2`, `s3_raw[2:0]`, `L1`..`L5[2:0]`, and the observation outputs `state[4:0]` and `timer[5:0]` (seconds left) |
| `rtl/tlc_controller.sv` | state register, next-state logic, output logic, safety assertions |
| `rtl/tlc_timer_sel.sv` | interval multiplexer; parameters `T40`, `T30`, `T20`, `T10`, `T3` |
| `rtl/tlc_counter.sv` | 6-bit load/countdown timer |
| `rtl/tlc_s3_encoder.sv` | three L5 sensors to a 2-bit level |
| `tb/tb_*.sv` | one self-checking testbench per module |

The clock is 1 Hz. A board clock needs a divider or a 1 Hz enable in front
of the controller; this RTL does not include one. Reset is synchronous and
active high, and it turns every light red.

The controller carries concurrent assertions for the safety rules:

* L5 is open only when all other lights are red;
* L2 and L3 are never open together;
* L1 is open only while L2 is green, and L4 only while L3 is green;
* every new green comes out of an all-red second.

The counter asserts that it counts down by exactly one per clock.

## Where this design makes its own choices

The behaviour above comes from a written description of the controller.
These parts are this implementation's own:

* **The state machine is rebuilt from the prose.** The original controller
  has 31 states; this one has 29. Their order follows the described sequence.
  Only the states the description numbers keep their numbers.
* **3 s all-red check states.** The description says the sensors are checked
  when a countdown ends. This design makes that countdown a 3 s all-red
  clearance at the start of each phase. All-red between phases is therefore
  4 s, or 7 s when L5 is skipped.
* **3 s yellow.** The 3 s interval is used for every yellow.
* **L2 after L1.** When L1 is served, L2 stays green through L1's yellow and
  then 20 s alone, 43 s in all. When L1 is skipped, L2 gets 40 s. L3 and L4
  work the same way.
* **Lamp code.** The code is one-hot, with red = `001`. One description of the
  code gives red as `000`; the one-hot form is used instead so that a dark
  lamp cannot be mistaken for red.
* **Sensor levels.** The description defines the level codes but not the
  encoder, and it assumes the queue fills the sensors in order. Here the
  farthest active sensor decides.
* **Timer chaining.** The reload at `t_out` and the meaning of `tsel` in
  timed states, as described above.
* **Observation ports.** `state` and `timer` are extra outputs.

The IR sensors themselves are outside the RTL. Their digital outputs are
the top's inputs. They are expected to be clean, synchronised levels. If
they come straight from a detector, add a synchroniser and debouncing in
front.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

* `tb_tlc_timer_sel` and `tb_tlc_s3_encoder` check every input code.
* `tb_tlc_counter` checks, for random lengths, that an interval of N
  seconds lasts exactly N clocks. It covers both intervals after a load and
  intervals chained through the reload at expiry.
* `tb_tlc_controller` runs the machine alone, with `t_out` raised at random
  moments. It covers all 16 combinations of `s1`, `s2` and the L5 level,
  for two cycles each. In every clock it compares `{L1..L5, tEn, tsel}` with
  the sequence expected from the rules above. The sensors hold the case
  value only in the cycle where a check ends, and are random at all other
  times. This catches a sensor that is sampled at the wrong moment.
* `tb_tlc_top` runs the full design at real timing (1 clock = 1 s, default
  parameters). It covers the eight traffic cases below, two cycles each. It
  cuts the light pattern into segments and compares each segment's pattern
  and length in seconds with the expected list. It then runs 20,000 s of
  random sensor activity and checks these rules:
  * no conflicting greens;
  * every green comes out of all red;
  * only legal green lengths occur;
  * the named greens show their state codes.

  It counts each mechanism (minor road served or skipped, L5 skipped or
  served at each level, safety delay, green-to-yellow chaining) and fails if
  one never occurs.

| Case | `s1` | `s2` | `s3` | Expected |
|---|---|---|---|---|
| 1 | 0 | 0 | 00 | L2 green 40 s, L3 green 40 s, L5 skipped |
| 2 | 1 | 0 | 00 | L1+L2 green 20 s |
| 3 | 0 | 1 | 00 | L3+L4 green 20 s |
| 4 | 1 | 1 | 00 | L1+L2 and L3+L4 green 20 s each |
| 5 | 0 | 0 | 01 | L5 green 10 s |
| 6 | 0 | 0 | 10 | L5 green 20 s |
| 7 | 0 | 0 | 11 | L5 green 30 s |
| 8 | 1 | 1 | 01 | L1+L2 20 s, L3+L4 20 s, L5 10 s |

Running a testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/tlc_pkg.sv \
    tb/tb_tlc_top.sv --top-module tb_tlc_top -o sim
./obj_dir/sim
```

Replace `tb_tlc_top` with any other testbench name. The whole top-level run
takes well under a second.

## Changing it

* **Interval lengths:** change the `tlc_timer_sel` parameters. Values above
  63 s need a wider `TW` in `tlc_pkg`.
* **Which interval a state uses:** change the `tsel` assignments in the
  controller's output logic. Remember that a timed state names the *next*
  state's interval.
* **Check-state length:** change the `tsel` that the preceding yellow (or
  `ST_START`) drives.
* **Faster simulation or a board clock:** keep the RTL at 1 Hz and gate
  `clk` through a clock enable in a wrapper, or shorten the parameters in a
  testbench.
