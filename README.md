# Fuzzy-scheduled PID controller core

A digital PID controller for slow industrial loops (the reference application is
the level of a water tank, sampled every 100 ms) whose three gains are not fixed
but re-chosen at every sample by a small fuzzy inference engine. The engine looks
at the control error `e` and its change `de` and applies the Zhao–Tomizuka–Isaka
gain-scheduling rules:

    Kp = Kp,min + (Kp,max - Kp,min) * K'p
    Kd = Kd,min + (Kd,max - Kd,min) * K'd
    Ki = Kp^2 / (alpha * Kd)

where `K'p`, `K'd` and `alpha` come out of three 7×7 rule tables. Far from the set
point the controller is stiff (large Kp, small Kd, large Ki); close to it, it
softens. Everything is integer arithmetic on a handful of shared operators — one
small multiplier, one adder, one 14-bit serial divider for the whole fuzzy part —
so one control action takes **85 clock cycles** (2.8 µs at 30 MHz), which is
negligible against a 100 ms sampling period but keeps the logic small.

The A/D converter (10 bits), the D/A converter (12 bits), the valve driver and the
plant are outside this RTL: the top takes the 10-bit process value as a word and
delivers the 12-bit valve command as a word.

## One control action

```
 sample ─► error_unit ─► fuzzy_processor ───────────────────────► pid_processor ─► vo
 SP, PV    e = SP-PV      fuzzifier ×2 ─► inference ─► defuzzifier   Vo += ...
           de = e - e'    (mf_lut shared)  (max-min)   (COG, Ki)
```

| clocks | stage | what happens |
|---|---|---|
| 1 | `error_unit` | SP and PV captured; `e`, `de` formed and saturated to 10-bit signed |
| 1 | `fuzzifier` ×2 | each of `e`, `de` → two active labels and their 4-bit degrees |
| 1 | `inference_engine` | four rules fire: strengths by min, 6-bit rule numbers |
| 1 | `defuzzifier` | start |
| 3 × 19 | `defuzzifier` | for Kp, Kd, alpha: 4 multiply, 1 add, 14 divide clocks |
| 18 | `defuzzifier` | Ki = Kp²/(alpha·Kd): 4 multiply, 14 divide clocks |
| 1 | `defuzzifier` | close, `done` |
| 5 | `pid_processor` | velocity-form PID update with the new gains |

In total 16 multiply, 3 add, 56 divide, 5 PID and 5 other clocks. `done` is high
84 clocks after the clock in which `sample` was taken. A `sample` strobe that
arrives while an action is running is ignored; SP and PV are held from the strobe
to the end of the action.

## Fuzzification

Both inputs use seven identical triangular labels NB, NM, NS, ZO, PS, PM, PB whose
centres lie 128 counts apart, at −384, −256, …, +384 (the spacing is
`2^SEG_SHIFT_E` / `2^SEG_SHIFT_DE`). Neighbouring triangles overlap so that at most
two labels are active, and their degrees always add up to 15 (4-bit scale). A
crisp value is therefore fully described by

* `MF0`, `MF1` — the lower and upper label of the segment it falls in (3 bits each),
* `mu0`, `mu1` — their degrees.

The three bits below the segment index address a 8-entry membership table
(`mf_lut`) holding one rising triangle edge, `round(15·a/8)` = 0, 2, 4, 6, 8, 9,
11, 13; `mu1` is the table value and `mu0` its complement. Values at or beyond
±384 give full membership of NB or PB. One table serves both fuzzifiers (two read
ports).

## Inference

With two labels active per input exactly four rules fire, pairing the error labels
(`MF0`, `MF1`) with the change labels (`MF2`, `MF3`). Rule `j`'s strength `muOj` is
the minimum of its two antecedent degrees (the max of max-min composition is over a
single term, since the four rules are always distinct). Each rule is identified by
its number `7·e_label + de_label` (0…48), which addresses the consequent table.

## Rule tables and output centres

Rows are the error label, columns the error-change label (NB NM NS ZO PS PM PB).

```
      Kp                      Kd                      alpha
NB  VB VB VB VB VB VB VB    Z  Z  Z  Z  Z  Z  Z      2 2 2 2 2 2 2
NM  Z  B  S  VB S  B  Z     VB VB VS Z  VS VB VB     3 3 2 2 2 3 3
NS  Z  VS VS VB VS VS Z     VB B  B  Z  B  B  VB     4 3 3 2 3 3 4
ZO  Z  Z  VS VB VS Z  Z     VB VB VB VB VB VB VB     5 4 3 3 3 4 5
PS  Z  VS VS VB VS VS Z     VB B  B  Z  B  B  VB     4 3 3 2 3 3 4
PM  Z  B  S  VB S  B  Z     VB VB VS Z  VS VB VB     3 3 2 2 2 3 3
PB  VB VB VB VB VB VB VB    Z  Z  Z  Z  Z  Z  Z      2 2 2 2 2 2 2
```

The output labels Z, VS, S, M, B, VB sit at K' = 0, 0.2, …, 1.0. The scaling to
the gain range is folded into the consequent table (`crisp_lut`), which is exact
because the centre-of-gravity average is linear:

| label | Z | VS | S | M | B | VB |
|---|---|---|---|---|---|---|
| Kp (24…45) | 24 | 28 | 32 | 37 | 41 | 45 |
| Kd (20…38) | 20 | 24 | 27 | 31 | 34 | 38 |

The Kp limits are 0.32·Ku and 0.6·Ku for the tank's ultimate gain Ku = 75. The Kd
limits 20 and 38 are the values the controller was tuned with; note that the usual
rule of thumb 0.08·Ku·Tu and 0.15·Ku·Tu with Tu = 5 s would give 30 and 56. The
limits are parameters of every block from `crisp_lut` up. M is defined but no rule
uses it. alpha's consequents are the integers 2…5.

## Defuzzification and Ki — the shared datapath

This is the part that takes most of the clocks. Each output is the centre of
gravity of the four fired rules,

    out = (sum_j muOj * zj + sum_j muOj / 2) / sum_j muOj        (rounded to nearest)

computed by one set of operators:

* a multiplexer feeds `muOj` (4 bits) and the rule's centre `zj` (8 bits, from
  `crisp_lut`) to a **4×8 multiplier**, one rule per clock; a demultiplexer stores
  the four 12-bit products;
* a **four-input adder** forms both sums in one clock (≤ 15300 and ≤ 60, so 14
  bits suffice);
* the **14-bit restoring divider** (`seq_divider`) takes 14 clocks;
* an output demultiplexer stores the quotient, saturated to 8 bits, as Kp, Kd or
  alpha.

After the three passes the same units compute `Ki = Kp² / (alpha·Kd)`: each 8×8
product is built from two 4×8 products, the upper one shifted left by four bits,
and the quotient is truncated. With the default ranges Ki lies between about 3
(Kp 24, alpha 5, Kd 38) and 50 (Kp 45, alpha 2, Kd 20). Operands beyond 14 bits
and quotients beyond 8 bits saturate; neither happens with the default ranges.

## PID update

The PID processor implements the velocity (incremental) form

    Vo[n] = Vo[n-1] + (Kp+Ki+Kd)·e[n] − (Kp+2Kd)·e[n-1] + Kd·e[n-2]

in three register-to-register steps over one three-input adder, one two-input
adder and two multipliers:

1. `Kp+Ki+Kd`, `Kp+2Kd`, `Kd·e[n-2]`
2. `(Kp+Ki+Kd)·e[n]`, `(Kp+2Kd)·e[n-1]`, `Kd·e[n-2] + Vo[n-1]`
3. the final three-term sum, clamped; the error history shifts.

Here `e = SP − PV` at full 11-bit signed precision. The gains are integers that
carry `GAIN_SHIFT` (default 4) fractional bits: `Vo[n-1]` is kept with those
extra bits and the 12-bit output is its integer part. The internal value is
clamped to the 12-bit output range, so the integral cannot wind up while the valve
is at an end stop. Error history and output start at zero after reset.

## Top-level interface (`fuzzy_pid_controller`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `sample` | in | 1 | one-cycle strobe, once per sampling period |
| `sp` | in | 10 | set point (0…1023 = 0…100 %) |
| `pv` | in | 10 | process value from the A/D converter |
| `vo` | out | 12 | valve command to the D/A converter, updated with `done` |
| `kp`, `ki`, `kd`, `alpha` | out | 8 | gains scheduled in the current action |
| `busy` | out | 1 | an action is in progress |
| `done` | out | 1 | one-cycle pulse: `vo` is new |

Parameters: `SEG_SHIFT_E`, `SEG_SHIFT_DE` (label spacing, default 7, range 3…7),
`KP_MIN`, `KP_MAX`, `KD_MIN`, `KD_MAX` (24, 45, 20, 38), `GAIN_SHIFT` (4). The rule
tables themselves are in `fpid_pkg`.

## What is this implementation's own choice

The block structure, the widths of the buses between blocks (10-bit crisp inputs,
4-bit degrees, 3-bit labels, 6-bit rule numbers, 8-bit crisp outputs, 4×8
multiplier, 14-bit divider), the rule tables, the gain ranges, the Ki formula and
the clock budget follow the original design. The following were not specified
and were chosen here:

* label spacing (128 counts, ±384 universe) and the membership table contents;
* rule numbering `7·e + de`;
* rounding of the centre-of-gravity quotient, truncation of Ki, saturation;
* the exact cycle-by-cycle schedule that realises the 16/3/56/5/5 clock budget;
* the operator widths in the PID processor (the original quotes 10-bit
  multipliers and a 20-bit adder; a signed 11-bit error and 32-bit internal sums
  are used here), the `GAIN_SHIFT` fixed-point scaling and the output clamp;
* `de` as the first difference of the error, saturated to 10 bits;
* the `sample`/`busy`/`done` handshake and the reset.

The same label spacing is used for `e` and `de` by default. In a slow loop the
error changes by only a few counts per sample, so `de` then stays inside ZO and its
neighbours; `SEG_SHIFT_DE` can be lowered to spread the change over more labels.

Seven input labels are used, as in the label diagrams; six output labels (with M)
are defined for Kp and Kd, although only five appear in the tables.

## Verification

Each block has a self-checking testbench in `tb/` that compares the block with an
independent reference model (`tb/fpid_ref_pkg.sv`, which holds its own copies of
the rule tables, centres and membership table) and checks cycle counts:

| testbench | what it covers |
|---|---|
| `tb_mf_lut` | all 8 entries, both ports |
| `tb_fuzzifier` | every 10-bit crisp value, one-clock latency, hold |
| `tb_inference_engine` | 2000 random label/degree sets |
| `tb_crisp_lut` | all 49 rules × 3 outputs, unused numbers |
| `tb_seq_divider` | corners, divide by zero, 1000 random, 14-edge timing |
| `tb_error_unit` | random and full-scale SP/PV, saturation of `de` |
| `tb_pid_processor` | step responses (P, PI, PD, PID, unit step) against the closed form; 3000 random actions, clamping at both ends, 5-cycle action |
| `tb_defuzzifier` | 2000 random rule sets, 77-cycle run |
| `tb_fuzzy_processor` | grid over the e/de plane plus 500 random points, 79-cycle run |
| `tb_fuzzy_pid_controller` | closed loop, default parameters, 2900 actions |

The closed-loop testbench replaces the tank with a first-order model
(`dL = 0.004·Vo − 0.01·L` per 100 ms sample), runs start-up to 50 %, a step up to
75 %, a step down to 50 %, a 5-second outflow shut-off at 75 %, and a drop to 5 %,
checks every action bit-exactly against the reference and its 85-cycle length,
requires the level to settle within ±16 counts at the end of each phase, and
counts that input saturation (both inputs, both signs), output clamping (both
ends), ignored strobes and gain rescheduling all occur. With this toy plant the
50 → 75 % step overshoots by about 95 counts; the plant is not a model of the
original rig, so this says nothing about the overshoot of the real loop.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/fpid_pkg.sv tb/fpid_ref_pkg.sv tb/tb_fuzzy_pid_controller.sv \
    --top-module tb_fuzzy_pid_controller -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. The reference
model in `fpid_ref_pkg` is written for the default parameters; if you change the
label spacing, gain ranges or `GAIN_SHIFT`, update it too.

## Files

* `rtl/fpid_pkg.sv` — widths, label enums, rule tables, centre formula
* `rtl/fuzzy_pid_controller.sv` — top
* `rtl/error_unit.sv`, `rtl/pid_processor.sv`
* `rtl/fuzzy_processor.sv` — the scheduler, built from `rtl/fuzzifier.sv`,
  `rtl/mf_lut.sv`, `rtl/inference_engine.sv` and `rtl/defuzzifier.sv`; the last
  uses `rtl/crisp_lut.sv` and `rtl/seq_divider.sv`
* `tb/tb_<module>.sv` — one testbench per module; `tb/fpid_ref_pkg.sv` — the
  reference model they share
