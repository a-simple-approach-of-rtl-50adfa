# Five-segment discontinuous space-vector PWM

This RTL turns a rotating voltage reference into the six gate signals of a
three-phase, two-level inverter. It uses space-vector modulation (SVM) with a
*discontinuous*, five-segment pattern. In every carrier period one inverter leg
does not switch at all: it is held at the positive or the negative DC rail.
Each period therefore has only four switching edges instead of the six of
conventional seven-segment SVM, which lowers switching losses.

The design avoids the two costly steps of a textbook SVM implementation:

* **No angle and no trigonometry at run time.** Three sign tests find the sector.
* **No explicit switching-time sequencer.** Two levels per sector are compared
  with a triangle carrier, the same way sine-triangle PWM works. The
  comparisons produce the five-segment sequence directly.

Everything runs from one 33.33 MHz clock. The default settings give a 50 Hz
fundamental, a 20 kHz carrier and a 2 µs dead time.

```
            cksin (18 kHz strobe)                     cktri (640 kHz strobe)
 clk ──► ajust_freq ─────────────┐            ┌────────────────────┐
                                 ▼            ▼                    │
                          vbeta_valfa   svm_generator ──────────────┘
                      (360-entry sin/cos)  ├ triangle        (carrier, 32 samples)
                        V_alpha, V_beta ──►├ duration_ta     (level A = T_a)
                               │           ├ duration_tatb   (level B = T_a + T_b)
                               ▼           └ svm_pattern     (five-segment rule)
                          find_sector ───────► sector               │ sa, sb, sc
                               │                                    ▼
                     sector2..sector0                        deadtime_system
                                                          (3 x deadtime_leg)
                                                     sa_up sa_lw sb_up sb_lw sc_up sc_lw
```

## Number format

Every analog-like quantity is a 9-bit unsigned word in offset binary. A value
`x` in [-1, 1] is coded as `224 + 128·x`:

| quantity | range of codes |
|---|---|
| V_alpha, V_beta (table outputs) | 96 … 352, zero at 224 |
| triangle carrier | 224 … 352 |
| levels A and B | 224 … 352 (224 + a count from 0 to 128) |

The carrier and both levels share one scale, so the comparators compare raw
words. Internally the signed value `v = word − 224` is used, with
|v| ≤ 128. The constants are in `svm_pkg.sv`.

## Reference vector (`vbeta_valfa`)

A modulo-360 counter steps one degree per `cksin` strobe. It addresses two
360-entry tables:

* `V_beta = 224 + round(128·sin θ)`
* `V_alpha = 224 + round(128·cos θ)`

The tables are computed during elaboration by a constant function. The function
uses an integer Taylor series in Q28 fixed point. So there is no data file, and
changing `N_ADDR` regenerates the tables. The outputs are registered. A new
angle appears two clocks after its strobe.

## Sector finder (`find_sector`)

The sector follows from three comparisons:

```
c0 = V_beta > 0      c1 = V_beta > √3·V_alpha      c2 = V_beta > −√3·V_alpha

 c0 c1 c2 : 1 0 1 → I     1 1 1 → II    1 1 0 → III
            0 1 0 → IV    0 0 0 → V     0 0 1 → VI
```

The other two codes cannot occur and are mapped to sector I. `√3` is the
constant 7094/4096. The sector number 1…6 appears in binary on
`sector2..sector0`. The tests are strict, so a vector that lies exactly on a
border goes to one of the two neighbouring sectors. For example, θ = 0°
(V_beta = 0) gives sector VI and θ = 60° gives sector II. On a border both
neighbours produce the same line-to-line voltages and differ only in the null
vector, so the border case does no harm.

## Switching levels (`duration_ta`, `duration_tatb`): the core of the design

Each sector is bounded by two active vectors. The time spent on those vectors
is expressed as two comparison levels: A = T_a and B = T_a + T_b. Both levels
are measured in carrier counts. The carrier's peak height (128 counts) stands
for half a PWM period T/2. This makes time and carrier height interchangeable.

Every level is one of three linear terms, with sign:

```
t1 = ¾(va − vb/√3)      t2 = ¾(va + vb/√3)      t3 = ¾·2vb/√3

 sector   A (duration_ta)   B (duration_tatb)
   I          t1                t2
   II         t2                t3
   III        t3               −t1
   IV        −t1               −t2
   V         −t2               −t3
   VI        −t3                t1
```

The factor ¾ is the table's `3T/(4·V_dc)` with T = 256 and V_dc = 256 counts
(twice the table amplitude). Each entry is a line-to-line voltage divided by
V_dc: the voltage between the clamped leg and the leg driven by that level.
B is therefore never below A. The levels are computed as integers over 4096
(3072, 1774 and 3548 stand for ¾, √3/4 and √3/2). They are rounded to the
nearest count and clamped to 0…128.

At full table amplitude the largest level is 0.75 · 1.155 · 128 ≈ 111 counts.
That stays below the carrier peak, so the modulator never overmodulates. The
table's peak phase amplitude is 128 counts against V_dc/2 = 128 counts. This is
a modulation index of 1 in sine-PWM terms, or 0.866 of the linear SVM limit.

## Five-segment pattern (`svm_pattern`, `svm_generator`)

In odd sectors the leg with the highest phase voltage is held at 1, and the
centre of the period is the null vector 111. In even sectors the leg with the
lowest phase voltage is held at 0, and the centre is 000. The other two legs
compare the carrier with A and B:

| sector | held leg | leg on level A | leg on level B | a switching leg is 1 while |
|---|---|---|---|---|
| I   | sa = 1 | sb | sc | carrier > level |
| II  | sc = 0 | sa | sb | carrier < level |
| III | sb = 1 | sc | sa | carrier > level |
| IV  | sa = 0 | sb | sc | carrier < level |
| V   | sc = 1 | sa | sb | carrier > level |
| VI  | sb = 0 | sc | sa | carrier < level |

In sector I, for example, one carrier period runs through
100 → 110 → 111 → 110 → 100. That is the X‑Y‑Z‑Y‑X sequence with Z = V7.

The carrier (`triangle`) has 32 samples per period:
224, 232, …, 352, …, 232, in steps of 8. `svm_generator` latches the sector
and both levels with the strobe that returns the carrier to 224. All 32
samples of a period then use the same levels, and the period is symmetrical
about the carrier peak. The three leg states are registered. They change on
the clock edge after the one that samples the carrier strobe. An assertion
checks that the latched B is never below A.

The carrier takes only 17 distinct values, so each level has a resolution of
8 counts in time. The pulse widths move in steps of one carrier sample: 52
clocks, or 1.56 µs at 20 kHz.

## Dead time (`deadtime_leg`, `deadtime_system`)

Each leg has a 16-bit counter and a 16-bit comparator. The counter counts the
clocks since the leg state last changed and saturates at its maximum. A gate
is released only once the count has reached `DEADTIME`:

```
up = s && count >= DEADTIME        lw = !s && count >= DEADTIME
```

After every edge of a leg state both switches of that leg are off for 67 clocks
(2.01 µs). Then the new switch turns on, so the two gates of a leg are never on
together. An assertion checks this. A consequence: a leg state that lasts
fewer than 67 clocks never reaches its gate. A single carrier sample at 20 kHz
lasts 52 clocks, so pulses one sample wide are swallowed. Gates are active high.

## Clocks and rates (`ajust_freq`)

| parameter | default | result at 33.33 MHz |
|---|---|---|
| `TRI_DIV` | 52 | carrier step every 52 clocks → 33.33 MHz / (52·32) = 20.03 kHz |
| `TRI_DIV` | 26 | 40.06 kHz, the second carrier setting |
| `SIN_DIV` | 1852 | table step every 1852 clocks → 33.33 MHz / (1852·360) = 49.99 Hz |
| `DEADTIME` | 67 | 2.01 µs |

`cksin` and `cktri` are one-clock enable strobes. They are not divided clocks,
so the whole design is a single clock domain. `clrn` is an asynchronous,
active-low reset. After reset the table is at 0°, the carrier is at its
minimum, the generator uses sector I with both levels at zero, and all six
gates stay off for the first 67 clocks.

## Where this implementation makes its own choices

The five blocks, their names and pins, the 360-entry table, the 96/224/352
coding, the 32-sample carrier, the sector truth table, the switching-time
table, the odd/even comparison rule and the 16-bit dead-time counter all come
from the design description. The following are choices of this
implementation:

* **Carrier divisor.** The description divides the clock by 13 and uses a
  32-sample carrier for a 20 kHz carrier. Those two numbers give 80 kHz. The
  default `TRI_DIV = 52` (= 4·13) produces the intended 20 kHz.
* **Fundamental divisor.** The description does not give one. `SIN_DIV = 1852`
  is chosen to produce 50 Hz from 360 table steps.
* **Scale of the levels.** V_dc = 256 counts, and the fixed-point constants,
  rounding and clamping, are this implementation's.
* **Leg assignment outside sector I.** Only sector I is spelled out in the
  description. The other rows of the pattern table are derived from which
  line-to-line voltage each switching-time entry equals.
* **One table entry.** In the description's switching-time table, sector VI
  lists a T_b equal to its T_a + T_b. This implementation uses the
  T_a + T_b entry, ¾(va − vb/√3), which is consistent with the other sectors.
* **Sector encoding.** The sector appears in binary on the three sector pins.
* **Level latching.** Levels are latched once per carrier period.
* **Clocking.** Strobes replace divided clocks.
* **Dead-time scheme.** The dead time is a turn-on delay, and the gates are
  active high.
* **Reset values.** All reset values are this implementation's.

## Files

| file | contents |
|---|---|
| `rtl/svm_pkg.sv` | coding constants, sector enum, level arithmetic |
| `rtl/ajust_freq.sv` | clock-enable dividers |
| `rtl/vbeta_valfa.sv` | angle counter and sin/cos tables |
| `rtl/find_sector.sv` | sector finder |
| `rtl/triangle.sv` | 32-sample triangle carrier |
| `rtl/duration_ta.sv`, `rtl/duration_tatb.sv` | levels A and B |
| `rtl/svm_pattern.sv` | five-segment comparison rule |
| `rtl/svm_generator.sv` | carrier + levels + pattern, per-period latching |
| `rtl/deadtime_leg.sv`, `rtl/deadtime_system.sv` | dead time, one leg / three legs |
| `rtl/svm_top.sv` | the complete modulator |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/svm_top_monitor.sv` | cycle-accurate reference model of the whole modulator |
| `tb/tb_svm_top.sv` | full-size run: one 20 ms fundamental period at 20 kHz |
| `tb/tb_svm_top_40k.sv` | the same at a 40 kHz carrier |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. Each one compares the design with values worked out independently in
real arithmetic:

* **Tables:** all 360 angles, exactly.
* **Sector finder:** 20,000 random vectors against `atan2`.
* **Level units:** 30,000 random vectors each, against the switching-time
  table.
* **Pattern unit:** random sectors, carrier samples and levels.
* **Generator:** 240 vectors. For each vector it checks the sample counts per
  leg, the symmetry and the centre null state.
* **Dead-time units:** random command streams against a turn-on-delay model.

`tb_svm_top` runs the top at its default parameters for one complete
fundamental period (666,720 clocks, about 400 carrier periods). `svm_top_monitor`
predicts every sector pin and gate on every clock. It also checks that the six
sectors follow in order, that no leg ever has both gates on, and that every
dead-time gap lasts at least 67 clocks. It counts each mechanism: sectors,
odd and even periods, dead-time gaps, swallowed pulses and table wraps. A
mechanism that never occurs counts as a failure. Carrier periods whose level
lies within 0.02 of a rounding half are not compared, because either rounding
is correct. That is 18 of 402 periods at 20 kHz.

Each block testbench was also run against a deliberately broken copy of its
module, and it reported failures each time.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/svm_pkg.sv tb/tb_svm_top.sv \
          --top-module tb_svm_top -Mdir obj_top
./obj_top/Vtb_svm_top
```

Replace `tb_svm_top` with any other testbench name to run it. The full-size
run takes a few seconds.

## Limits

* The design produces gate signals only. It has no model of the inverter or
  the motor, so current and voltage harmonic distortion cannot be checked in
  simulation.
* The reference amplitude and frequency are fixed by the table and `SIN_DIV`.
  The design has no input for a speed or voltage command.
* At 20 kHz with a 2 µs dead time, pulses one carrier sample wide are
  swallowed, as described above. Changing `DEADTIME` or `TRI_DIV` changes
  where that happens.
