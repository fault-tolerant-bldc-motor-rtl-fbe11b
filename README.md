# Hall sensor check and repair for BLDC drives

A brushless DC motor drive commutates from three hall sensors mounted 120 electrical degrees
apart. If one sensor sticks high or low, or a burst of interference puts a short pulse on its
line, the drive switches the wrong transistors and the phase current rises. This logic sits
between the sensors and the drive (or inside the drive's FPGA). It uses nothing but the three
hall signals to do three things:

* **find the faulty sensor** by checking that the signals change in the order rotation allows;
* **rebuild the missing signal** from the edge timing of the two healthy ones, and switch it in
  for the faulty one;
* **pause the drive** with the all-low hall code, which the drive treats as "all transistors
  off", during the short time when the sequence is broken and the faulty sensor is not yet
  known. Such a pause (a "leave-out") lasts at most about 180 electrical degrees, and the rotor
  coasts through it.

Once the faulty sensor is found, the motor keeps running on the substitute. A sensor that
recovers is switched back in at its first edge that the checks accept. The scheme needs a
rotating motor: it does not cover start-up or standstill, because no edge timing exists then.

All of `rtl/` is synthesizable SystemVerilog-2017. The top level, `bldc_fpga_top`, is a bench
drive: fault injection, then check and repair, then a six-step commutation table. The
check-and-repair block, `hall_repair`, can also be used on its own between sensors and drive.

## Signal chain

```
hall_sensor ─► fault_sim ─► hall_repair ──────────────┐ safe_mode
   {A,B,C}     (test faults)  │                       ▼
                              └───── bypass ─────► mux ─► commutation_table ─► gates[5:0]

hall_repair:
  hall_in ─┬─► signal_check ─── fault[A,B,C] ───┐ (select)
           ├─► hall_generate ×3 ─ substitutes ─► mux ─► repaired ─┬─► all_signals_check ─ error
           └──────────────── raw ──────────────► mux              │                       │
                                                                  └────► force 000 ◄──────┘
                                                                          │
                                                                       hall_out
```

The signal check looks at the **raw** inputs. The all-signals check looks at the **repaired**
signals, after the substitution. The leave-out therefore ends as soon as the substitute gives a
correct sequence.

## Hall states and the direction of rotation

Bits are written `{A,B,C}`. In the positive direction the six states follow each other every
60 electrical degrees:

| state | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|
| A B C | 010 | 011 | 001 | 101 | 100 | 110 |

The edges therefore come in the cyclic order C↑, B↓, A↑, C↓, B↑, A↓. Every check in this design
accepts the positive direction only: in the other direction each step looks like a fault. The
codes 000 and 111 never occur on healthy sensors. The package `hall_pkg` holds this table as
the functions `hall_state()` and `state_hall()`.

## Rebuilding a signal from the other two (`hall_generate`)

For each signal Z there are two signals X and Y whose edges come 60° and 120° before Z's edges:
X falls, Y rises, Z falls, and 180° later X rises, Y falls, Z rises. The generator measures the
X-to-Y interval in clock cycles and repeats it after the Y edge:

* X falling restarts counter `cnt_xf`. Y rising stores `cnt_xf` in `len_lo` and restarts
  `cnt_yr`. When `cnt_yr == len_lo`, z is cleared.
* X rising, Y falling, `cnt_xr`, `len_hi` and `cnt_yf` do the same in the other half, and set z.

The output register is written when either comparison matches, with the inverted low-half match
as its data. Only the latest interval is used, with no averaging, so the substitute follows
acceleration with one 60° interval of lag. Averaging over several periods would be steadier at
constant speed but poorer in transients. Rebuilding two signals from one would put edges too far
from the true commutation points, because the sensors are not mounted exactly 120° apart.

Wiring for the positive direction: A from (X=C, Y=B), B from (X=A, Y=C), C from (X=B, Y=A).

**Timing.** Say the X edge is first sampled in cycle t0 and the Y edge in cycle t1. Then z
changes at the clock edge that ends cycle `2·t1 − t0`. At constant speed the substitute is the
true signal delayed by exactly one cycle. The counters are `CNT_W` = 24 bits wide and saturate.
At 100 MHz they cover up to 168 ms per 60°, which is about 15 rpm for a motor with 4 pole pairs.

A side effect worth knowing: at constant speed, swapping X and Y also yields the right edges.
For A, the swapped generator measures 300° from B↓ (120°) to the next C↑ (420°), and lays 300°
after it. That lands on 720° ≡ 0°, exactly where A falls. Only under acceleration does the correct wiring
make a difference. The tests therefore include acceleration.

## Finding the faulty sensor (`pair_check`, `signal_check`)

This is the subtle part of the design.

**Pair check.** Take a pair (X, Y) where X leads Y by 120°: (A,B), (B,C) and (C,A). In the
positive direction the pair steps through 00 → 10 → 11 → 01 (written XY). Invert X while Y is
high and put Y on top: the code `{Y, X^Y}` then counts 0, 1, 2, 3, 0, … Each cycle the previous
code is subtracted from the current one, in 2 bits. A result of 0 (no change) or 1 (one step
forward, including 3 → 0) is fine. A result of 2 (a skipped state) or 3 (a step back) sets bit 1
of the difference. That bit is the pair's fault indicator: a pulse that lasts one cycle.

**Which signal.** A single faulty signal disturbs only the two pairs it belongs to. The faulty
signal is therefore the one shared by two reporting pairs:
`fault_A = AB ∧ CA`, `fault_B = AB ∧ BC`, `fault_C = BC ∧ CA`.

**Why the indicators are kept.** With a stuck signal the two pairs never report in the same
cycle. Take A stuck high:

| observed change | pair AB | pair CA |
|---|---|---|
| C↑ (110 → 111) | no change | **fault** (code 3 → 2) |
| B↓ (111 → 101) | **fault** (2 → 1) | no change |
| C↓ (101 → 100) | no change | ok (2 → 3) |
| B↑ (100 → 110) | ok (1 → 2) | no change |

Each pair's indicator is therefore kept in a register until that pair changes again. The AND is
taken on the kept values. For A stuck high, both kept indicators are true from B↓ until C↓.

**Holding the result.** The per-signal flag is set as soon as its AND is true. It is rewritten
only at an edge of that signal itself. A stuck signal has no edges, so its flag stays up for as
long as the fault lasts. When the signal recovers, its first edge rewrites both of its pairs; if
both accept that edge, the flag drops and the raw signal is used again. A short pulse that the
checks caught is released this way at its trailing edge, or at the signal's next real edge.

**Detection time.** Up to one electrical revolution plus one 60° state after the fault starts.
The two revealing edges come once per revolution. A fault that starts with a wrong edge of the
signal itself is flagged in the cycle after that edge if both of the signal's pairs reject it.

**Not detectable.** A pulse that turns the true code into the *next* state's code is a legal
forward step, so no sequence check can see it. The drive then commutates one state early until
the pulse ends.

## The leave-out (`all_signals_check`)

The repaired code `{A,B,C}` addresses a registered ROM that returns the state number 1–6.
Subtracting the previous ROM output from the current one, in 4 bits, must give less than 2, or
11 (which is 1 − 6 mod 16, the wrap from state 6 to state 1). Otherwise the sequence is broken.
The verdict is written to the `error` register only in the cycle after a change of the code
(delayed one cycle to match the ROM). The verdict therefore stays until the next change: a
leave-out ends at the first correct step of the repaired signals. While `error` is high,
`hall_out` is forced to 000.

The codes 000 and 111 read 8 from the ROM. Every step from a valid state into them is then
rejected (8 − s is 2…7). No 4-bit value can also reject every step *out* of them: with 8, the
step to state 3 passes.

**Latency.** A change in cycle t is judged in cycle t+1 and forced low from cycle t+2. A wrong
code can therefore reach the output for two cycles before the leave-out starts.

## Bench top level (`bldc_fpga_top`)

* `fault_sim` places a fault on the signal chosen by `fault_sel` (0 = A, 1 = B, 2 = C).
  `fault_mode` is `FAULT_NONE`, `FAULT_LOW`, `FAULT_HIGH` or `FAULT_PULSE`. A pulse inverts the
  signal for `pulse_len` cycles at the start of every `pulse_period` cycles. These are run-time
  inputs, 24 bits wide; 3 ms / 40 ms at 100 MHz is 300,000 / 4,000,000 cycles. The pulse timer
  restarts whenever the mode or the selection changes.
* `safe_mode = 1` feeds the commutation table from `hall_repair`. `safe_mode = 0` bypasses it.
  The repair logic runs in both modes, so its substitutes are ready at the moment safe mode is
  switched on.
* `commutation_table` maps each state to one high-side and one low-side switch:
  state 1 A+B−, 2 A+C−, 3 B+C−, 4 B+A−, 5 C+A−, 6 C+B−. The codes 000 and 111 switch everything
  off. `gates = {AH, AL, BH, BL, CH, CL}`. Matching states to phases depends on how the sensors
  sit in a given motor: adjust this table for yours.

All inputs are expected to be synchronous to `clk`. There are no input synchronisers; add a
two-flop synchroniser per hall line when the sensors are wired straight to the FPGA. Reset is
synchronous and active high.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `CNT_W` | 24 | `hall_generate`, `hall_repair`, `bldc_fpga_top` | generator counter width (cycles per 60°) |
| `TIME_W` | 24 | `fault_sim`, `bldc_fpga_top` | pulse timer width |

The state-number width (4 bits) and the accepted differences (below 2, or 11) are constants in
`hall_pkg`. Changing the ROM values requires recomputing them.

## How far it follows the original method, and where it departs

These parts follow the published method closely: the generator structure (edge detectors, four
counters, two stored lengths, two equality comparators, one output register written on either
match); the pair check's encoding and its use of bit 1; the registered ROM with the constants 2
and 11, and the error register written one cycle after a change; the overall topology.

These are choices of this design:

* **Direction.** The state table and both checks define the positive direction as the state
  order above. The generator edge order is applied in that same direction.
* **Keeping the pair indicators, and the set/refresh rule of the per-signal flags.** The method
  says only that the pair indicators are ANDed and then held in registers "until a new edge".
  Holding the one-cycle pulses alone would never flag a stuck sensor.
* **ROM value 8 for the codes 000 and 111.**
* **Saturating counters, the widths, and the reset values.**
* **The fault simulator's pulse = inversion, and the commutation table's contents.**
* **The leave-out is always present.** The method calls it optional.
* **The clock.** A 100 MHz clock is assumed wherever a time is converted to cycles.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_hall_generate` | each substitute edge against `2·t1 − t0` at random speeds; equality with the delayed true signal at constant speed |
| `tb_pair_check` | random forward, hold, back and skip moves against a position-on-the-circle reference |
| `tb_signal_check` | no flag when healthy; each signal stuck low/high is flagged within 7 states, stays flagged, no other signal is flagged, all clear after recovery |
| `tb_all_signals_check` | random codes, including unused ones, against a state-order reference, with the two-cycle latency |
| `tb_hall_repair` | all stuck faults; output follows the true pattern; leave-outs ≤ 180°; no wrong code held longer than two cycles; acceleration; pulses release their flags |
| `tb_fault_sim`, `tb_commutation_table` | the modes and pulse timing; the table, leg exclusivity, one-switch change per step |
| `tb_bldc_fpga_top` | end to end at default sizes: normal mode going wrong with a stuck sensor, the switch to safe mode, stuck faults on all signals, a fault during acceleration, pulse trains; counts each mechanism |
| `tb_workload_bench` | real time scales at 100 MHz: A stuck high from 55 ms at 3102 rpm (flagged after 4.6 ms); 3 ms pulses every 40 ms; B stuck low while accelerating from 1000 to 3700 rpm. About 52 M cycles, roughly 30 s |

`tb/hall_motor_model.sv` is a behavioural hall-pattern source: one state every `seg_len` cycles.

Run one test with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/hall_pkg.sv \
    tb/tb_bldc_fpga_top.sv --top-module tb_bldc_fpga_top -o sim
./obj_dir/sim
```

The same command works for every testbench: name its file and its module. `-y` lets Verilator
find the other modules by file name. The package goes first.

**Not covered.** Reverse rotation; start-up; hall inputs asynchronous to the clock; behaviour
when two sensors fail at once.
