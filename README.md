# Bus-clamping space-vector PWM generator for a three-phase inverter

This design makes the six gate signals of a two-level three-phase inverter. It uses
**5-segment bus-clamping space-vector PWM (SV-PWM)**. The aim is a small circuit: no
trigonometry at run time, no divider and no general multiplier. Three ideas make that
possible:

* **Sector from three comparisons.** The sector of the reference vector comes from
  comparing V_beta with 0, with sqrt(3)·V_alpha and with −sqrt(3)·V_alpha. A small truth
  table turns the three results into the sector number. No angle is ever computed.
* **Dwell times as sums of two terms.** In every sector, both switching instants are a
  signed sum of P = (3/4)·V_alpha and Q = (sqrt(3)/4)·V_beta. Only two constant
  multiplications are needed.
* **Bus clamping.** In each 60° sector one phase stays at a DC rail for the whole carrier
  period. In odd sectors it is held at the positive rail, in even sectors at the negative
  rail. Only two phases switch, and each of them needs one comparison against a triangle
  carrier. A phase with no switching has no switching losses.

The reference is a 50 Hz sine/cosine pair read from tables. The carrier is a 40 kHz
triangle sampled 32 times per period.

## Structure

```
            cksin                 V_beta, V_alpha (9 bit)
 ajust_freq ─────▶ vbeta_valfa ─────────┬────────────────▶ find_sector ──▶ sector2..0
     │ cktri                            │                        │ S2 S1 S0
     └────────────────────────────────▶ svm_generator ◀──────────┘
                                          ├ triangle        (carrier)
                                          ├ duration_ta     (Ta level)
                                          ├ duration_tatb   (Ta+Tb level)
                                          └ svm_pattern     (clamp + compare)
                                                 │ sa sb sc
                                          deadtime_system ──▶ sa_up sa_lw sb_up sb_lw sc_up sc_lw
```

| file | role |
|---|---|
| `rtl/svpwm_pkg.sv` | shared types (`sample_t`, `sector_t`), constants, and the P/Q and level arithmetic |
| `rtl/svpwm_top.sv` | top level: the five stages wired together |
| `rtl/ajust_freq.sv` | clock-enable dividers for the table step and the triangle step |
| `rtl/vbeta_valfa.sv` | two 360-entry ROMs: sin → V_beta, cos → V_alpha |
| `rtl/find_sector.sv`, `rtl/csector.sv` | three comparators and the comparison-to-sector table |
| `rtl/svm_generator.sv` | carrier, dwell-time levels and pattern, registered phase outputs |
| `rtl/triangle.sv`, `rtl/duration_ta.sv`, `rtl/duration_tatb.sv`, `rtl/svm_pattern.sv` | the four parts of `svm_generator` |
| `rtl/deadtime_system.sv` | upper and lower gates with dead time |

## Number representation and scaling

Everything analogue is a 9-bit unsigned number centred on a **base of 224**:

* The reference tables hold `224 + round(128·sin k°)` and `224 + round(128·cos k°)` for
  k = 0…359. Their range is 96…352.
* The triangle runs from 224 to 352 and back in steps of 8:
  `224, 232, …, 352, 344, …, 232`. That is 32 samples per carrier period.

Inside the arithmetic, the base is subtracted to give signed values (`to_signed`).

**Scaling, which is the key to the whole design.** The carrier's rise from 224 to 352
(128 units) stands for half a carrier period, T/2. The DC-link voltage is chosen so that
Vdc equals T in the same units: Vdc = T = 256. With that choice, the standard dwell-time
expressions lose all their T and Vdc factors. Each switching instant, measured from the
start of the period, becomes a plain number on the carrier's own scale, and it can be
compared with the triangle directly:

```
P = (3/4)·V_alpha          Q = (sqrt3/4)·V_beta        (table units)

sector   Ta (first active vector)   Ta+Tb (end of second active vector)
  I         P − Q                      P + Q
  II        P + Q                      2Q
  III       2Q                         −P + Q
  IV        −P + Q                     −P − Q
  V         −P − Q                     −2Q
  VI        −2Q                        P − Q
```

Ta is the dwell time of the first active vector in one half of the carrier period. Tb is
the dwell time of the second active vector. P is computed exactly, as 768/1024. Q uses
443/1024 ≈ 0.4326 for sqrt(3)/4. The result is rounded, clamped to 0…128 and offset by
224 (`to_level`).

The reference amplitude of 128 with Vdc = 256 gives a modulation index of
128 / (256/sqrt 3) ≈ 0.87. The largest Ta+Tb is 0.866·128 ≈ 111, which stays below the
carrier peak. The design therefore never runs into overmodulation.

## Sector identification

```
cmp = { V_beta > 0,  V_beta > sqrt3·V_alpha,  V_beta > −sqrt3·V_alpha }

cmp   101  111  110  010  000  001
sector  I   II  III   IV    V   VI
```

The sqrt(3) products are never formed as fractions. The block compares
`1024·V_beta` with `1774·V_alpha` exactly, in 24-bit integers. Codes 011 and 100 cannot
occur for any vector; they map to sector I. A vector lying exactly on a border
(for example V_beta = 0 with V_alpha > 0) goes to one of the two neighbouring sectors. At
a border, both sectors produce almost the same outputs.

## Switching pattern (the bus clamping)

Let `cta = triangle > Ta` and `ctt = triangle > Ta+Tb`. A phase output of 1 means its
upper switch conducts.

| sector | clamped phase | phase on `cta` | phase on `ctt` |
|---|---|---|---|
| I   | a = 1 | b | c |
| II  | c = 0 | a, inverted | b, inverted |
| III | b = 1 | c | a |
| IV  | a = 0 | b, inverted | c, inverted |
| V   | c = 1 | a | b |
| VI  | b = 0 | c, inverted | a, inverted |

Odd sectors clamp the phase with the highest voltage to 1. The switching phases are then
on around the carrier peak. Even sectors clamp the phase with the lowest voltage to 0.
Their switching phases use the complemented comparison, so they are on around the
carrier valley.

The assignment is chosen so that each line-to-line duty equals the reference line
voltage. Two examples:

* In sector I, (duty_a − duty_b) = 2·Ta/T = (V_a − V_b)/Vdc.
* In sector II, duty_a = 2·Ta/T = (V_a − V_c)/Vdc.

The pattern rotates by one phase every two sectors. In odd sector k, the clamped phase is
(k−1)/2. In even sector k, it is (k/2+1) mod 3. In both cases, the next phase (mod 3)
takes the Ta comparison and the one after takes Ta+Tb.

Within one carrier period, the sequence in sector I is 100 → 110 → 111 → 110 → 100. That
is five segments, using only the zero vector 111. In sector II, with c held at 0, the
sequence is 110 → 010 → 000 → 010 → 110, using only the zero vector 000.

## Timing and rates

* The whole design runs on one clock, `clk`, with the default `CLK_HZ` of 33.333 MHz.
  `ajust_freq` produces two one-cycle enables:
  * `cksin` steps the table once every `round(CLK_HZ / (50·360))` = 1852 clocks. One
    reference period is 666,720 clocks, i.e. 49.996 Hz.
  * `cktri` steps the triangle once every `round(CLK_HZ / (40000·32))` = 26 clocks. One
    carrier period is 832 clocks, i.e. 40.064 kHz.
* The table read is registered, so V_alpha and V_beta change one clock after the address
  steps. `find_sector`, `duration_ta`, `duration_tatb` and `svm_pattern` are
  combinational. `svm_generator` registers `sa/sb/sc` once.
* The reference steps about every 2.2 carrier periods. It is not re-sampled at the
  carrier peak or valley. When it steps in the middle of a period, a switching level can
  move past the current carrier sample, and that period gets one extra, short edge pair.
* `deadtime_system` turns both gates of a leg off one clock after its phase signal
  changes. The new gate turns on only after the phase signal has been stable for
  `DEAD_CYCLES` clocks: 33 clocks, about 1 µs. At every change, both gates are off for
  `DEAD_CYCLES` clocks. A pulse shorter than the dead time is swallowed. An assertion checks that the two gates of a leg are never on together.
* `clrn` is an active-low asynchronous clear. After it:
  * the table is at angle 0 and the triangle is at 224, rising;
  * all gates stay off for the first dead time.

## Resources

Generic synthesis of `svpwm_top` gives 171 word-level cells, 67 flip-flop bits and two
360×9 ROMs (6,480 bits). On an FPGA whose memory blocks come in powers of two, the two
tables occupy 2 × 512 × 9 = 9,216 bits. The original implementation reported that
figure, together with about 520 logic elements on an APEX20KE device.

## Where this RTL makes its own choices

The published design fixes the block structure, the table and carrier numbers, the
sector truth table, the dwell-time table and the odd/even clamping rule. The following
are this implementation's own choices:

* **Clock enables instead of derived clocks.** The original drives the table and the
  carrier from divided clocks. Here they run on `clk` with enables; the rates are the
  same.
* **Clock frequency.** The 33.333 MHz board clock is assumed. Change `CLK_HZ` to match
  your board; the divisors follow.
* **Dead time.** The dead-time method and its value (33 cycles) are this design's own.
  Set `DEAD_CYCLES` for your power devices.
* **Sector II–VI phase assignment.** The assignment in the table above is derived from
  the dwell-time equations and the line-voltage condition. Only sector I's waveform is
  fixed by the original.
* **Sector VI of the dwell-time table.** The Tb entry is taken as P + Q, so that
  Ta + Tb = P − Q holds, in the same way as in the other five sectors.
* **Fixed-point constants.** sqrt(3) is 1774/1024 and sqrt(3)/4 is 443/1024. Levels are
  rounded and clamped to the carrier range.
* **Table contents.** Entries are rounded to the nearest integer. The read is registered.
* **Reference sampling.** The reference is not sampled at carrier extremes (see
  *Timing and rates*).
* **Unreachable sector codes.** Codes 011 and 100 map to sector I.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Every testbench checks against values it computes
itself in real arithmetic: angles from `atan2`, dwell times from the unscaled equations,
and table entries from `$sin`/`$cos`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/svpwm_pkg.sv \
          tb/tb_svpwm_top.sv --top-module tb_svpwm_top
./obj_dir/Vtb_svpwm_top
```

`tb_svpwm_top` runs the complete design at its default parameters for two reference
periods (about 1.33 million clocks, about a second of simulation time). It checks:

* the sector sequence and the 50 Hz period;
* the 40 kHz carrier period;
* in every carrier period, that the clamped phase holds and that the a−b duty matches the
  reference line voltage within the carrier's resolution of 1/16 per phase;
* the dead time, and that no leg ever has both gates on.

It also counts each mechanism: all six sectors, clamp-high periods, clamp-low periods,
dead-time insertions and table wrap-around. It fails if any of them never occurs.

`tb_svpwm_spectrum` also runs the complete design at its default parameters. It records
the a−b switching function (before dead time) over exactly one 50 Hz period and takes its
Fourier series. The results:

* the fundamental is 0.863·Vdc, against 0.866·Vdc expected (sqrt 3 · 128/256);
* the fundamental leads the cosine reference by about 29°, against 30° expected;
* every harmonic from the 2nd to the 25th is below 1 % of the fundamental;
* the total harmonic distortion up to the 25th is 1.9 %.

The testbench fails if the fundamental is off by more than 2 %, if any of these
harmonics exceeds 3 %, or if the THD exceeds 5 %.

The other testbenches exercise one block each:

* `tb_csector` — the full comparison-to-sector table;
* `tb_find_sector` — table points and random vectors;
* `tb_duration_ta` and `tb_duration_tatb` — random inputs in every sector, with a
  tolerance of ±1 unit;
* `tb_svm_pattern` — the rotation rule;
* `tb_svm_generator` — clock-accurate outputs and per-period duty;
* `tb_triangle`, `tb_vbeta_valfa`, `tb_ajust_freq`, `tb_deadtime_system`.

## Limits

* The carrier has only 17 distinct levels, so each switching instant is quantised to
  1/16 of a carrier period. This resolution follows from the 32-sample triangle and is
  part of the design as published. Raising it would mean a finer triangle together with
  a faster `cktri`.
* The modulation index is fixed by the table amplitude. There is no amplitude input and
  no frequency input: the 50 Hz reference is set by parameters. V/f control of a motor
  would need a variable `cksin` rate and scaled table outputs.
* The inverter and the motor are outside this design.
