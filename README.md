# Multi-round fractional clock divider

A plain integer counter can divide a clock only by whole numbers. To get
220.805 kHz from a 40 MHz crystal the ratio is K = 40 000 000 / 220 805 =
181.1553…, so every output period has to be either 181 or 182 input cycles,
and the mix of the two decides how close the average frequency comes to the
target. This design chooses that mix with a small stack of counters, called
*rounds*. Each round corrects the leftover error of the round below it. With
the default four rounds of 1024 the repeating pattern is 1024⁴ output
periods long and is off by less than one input cycle. That is a relative
frequency error of about 4·10⁻¹⁵. The hardware is a handful of counters and
comparators (about 140 flip-flops at the defaults): no PLL, no DDS, no
multiplier, no divider. All the arithmetic is done at elaboration.

```
              +----------------------------+
 i_clk ------>| dual_modulus_divider (N/N+1)|----> o_clk
        |     +----------------------------+
        |          ^ long_sel     | period_end
        |          |              v
        |     +----------------------------+
        +---->| division_controller         |
              |  round 1 <- round 2 <- ... <- round ROUNDS (always "short")
              +----------------------------+
```

## Short and long units, round by round

Call an N-cycle output period a *short* unit of round 0 and an N+1-cycle
period a *long* one. Round *i* builds its units out of M units of round *i−1*:

| unit of round *i* | short sub-units | long sub-units |
|---|---|---|
| short | C_i | M − C_i |
| long  | C_i − 1 | M − C_i + 1 |

A long unit therefore lasts exactly one input cycle more than a short one,
in every round. The coefficient C_i is chosen so that a short unit of round
*i* is never longer than M^i ideal output periods. A long unit is then never
shorter, so each round's two units bracket the target. Round *i*+1 can mix
them to bracket it more tightly still.

The errors are kept as exact integers. The unit is 1/(F_CLK·F_OUT) seconds,
so one input cycle is F_OUT units:

```
E0_short = F_CLK − N·F_OUT                E0_long = E0_short − F_OUT
C_i      = ceil( M·(−E(i−1)_long) / F_OUT )
Ei_short = M·E(i−1)_long + C_i·F_OUT       Ei_long = Ei_short − F_OUT
```

Here E is (ideal time − actual time), so E_short ≥ 0 and E_long < 0. For
40 MHz → 220 805 Hz with M = 1024 this gives:

| round | C_i (short) | M − C_i (long) | short unit error | long unit error |
|---|---|---|---|---|
| 1 | 865 | 159 | +1.14 ns | −23.9 ns |
| 2 | 978 | 46  | +19.2 ns | −5.75 ns |
| 3 | 236 | 788 | +10.9 ns | −14.1 ns |
| 4 | 580 | 444 | +18.6 ns | −6.41 ns |

A round-1 short unit is 865 × 181 + 159 × 182 = 185 503 input cycles for
1024 output periods. The 4-round pattern is 1024⁴ periods, about 58 days of
input clock, and is 18.6 ns short of ideal. The rounding must be the
ceiling. Rounding to nearest would give 977 in round 2, and those units no
longer bracket the target.

These coefficients are not typed in anywhere. `frac_div_pkg::coeff_short`
computes them from the `F_CLK_HZ` and `F_OUT_HZ` parameters when the design
is elaborated. Changing the two frequencies re-derives N and every C_i.

## Spreading the two kinds inside a unit

If a unit issued all its short sub-units first and then all its long ones,
the output phase would drift by up to hundreds of input cycles inside each
unit. Instead the two kinds are interleaved evenly. Let *major* be the more
numerous kind in the unit and *minor* the other. Let y = ⌊major / minor⌋ and
R = major mod minor. The unit is then:

```
minor times: [ y majors, 1 minor ]   followed by   R majors
```

For example, a round-1 short unit (865 short, 159 long) has y = 5 and R = 70.
It is 159 groups of five 181-cycle periods and one 182-cycle period, then
seventy 181-cycle periods. In round 3 the long sub-units are the majority
(788 against 236). There every group is three long units and one short unit,
so the first round-2 unit of the whole pattern is a long one. y, the minor
count and which kind is major depend on whether the current unit is short or
long. They are computed at elaboration for both cases, so each round holds
only three counters: sub-units done, groups done, and majors issued in the
current group.

The R left-over majors are placed at the end of the unit. Spreading them out
as well would lower the phase wander further, but it is not done here.

## Hardware and timing

* `dual_modulus_divider` is one counter that wraps after N or N+1 cycles,
  depending on `long_sel`. `period_end` is high in the last cycle of each
  period. `o_clk` is a register. It is high for the first (N+1)/2 = 91 cycles
  of each period and low for the remaining 90 or 91, so rising edges are
  4525 ns or 4550 ns apart on a 40 MHz clock.
* `round_sequencer` is one round. It advances on `child_done` (the end of
  the current sub-unit), outputs `child_kind` for the sub-unit now running,
  and raises `done` combinationally with the M-th `child_done`.
* `division_controller` chains ROUNDS sequencers. Round 1's `child_done` is
  `period_end`, and each round's `done` is the next round's `child_done`.
  Each round's unit kind is the `child_kind` of the round above. The
  highest round always builds short units. All rounds update on the same
  clock edge that ends an output period. The ripple of `done` upward and
  of the kind downward is combinational, about ROUNDS comparator levels,
  and easy at 40 MHz.
* `frac_divider_top` joins the two and brings out status signals:
  `o_period_end`, `o_long`, and per round `o_unit_end` and `o_unit_long`.

Reset is synchronous and active low (`i_rst_n`). It restarts the period and
every round at the beginning of the pattern. Everything runs on `i_clk`;
`o_clk` is a divided copy for use as a clock elsewhere.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `F_CLK_HZ` | 40 000 000 | input clock frequency |
| `F_OUT_HZ` | 220 805 | target average output frequency |
| `M` | 1024 | sub-units per unit, in every round |
| `ROUNDS` | 4 | number of rounds |

Requirements: F_CLK_HZ / F_OUT_HZ ≥ 2, and the ratio must not be a whole
number. The error arithmetic needs M·F_OUT and F_CLK to fit in 63 bits.
The counters grow as log2(N+1) bits for the divider and 3·log2(M+1) bits
per round.

## Verification

The testbenches check themselves: each prints `TB_RESULT checks=… failures=…`.
Each has a watchdog. Their reference models are written independently of the
RTL. The coefficients are recomputed in floating point. The kind of every
sub-unit is worked out from its position k alone: it is the minor kind
exactly when ⌊k/(y+1)⌋ < minor and k mod (y+1) = y.

| testbench | what it runs |
|---|---|
| `tb_dual_modulus_divider` | 3000 periods with a random N/N+1 choice, plus a reset in mid-period; checks period ends, o_clk edge spacing and high time |
| `tb_round_sequencer` | the four default coefficients with M = 1024, plus M = 8 / C = 6 (R = 0) and M = 5 / C = 5 (no minor); random unit kinds and random strobe spacing |
| `tb_division_controller` | 3 full patterns of a 1000 Hz → 73 Hz, M = 8, 3-round controller, and the first 5000 periods of the default one; checks that the default coefficients are 865/978/236/580 |
| `tb_frac_divider_top` | end to end, cycle by cycle: 40 MHz → 220.805 kHz with M = 8 and 3 rounds, the default first round alone (M = 1024), and 1000 Hz → 73 Hz with M = 16 and 2 rounds. Each runs 3 complete patterns with a mid-pattern reset. It checks the exact length and the within-one-cycle accuracy of every pattern, and counts that short and long periods, every round's unit end and long units all occurred |
| `tb_frac_divider_full` | the default design, unchanged, through its first complete round-2 unit: 1 048 576 periods, 189 955 119 input cycles, about 2.5 minutes. Every period and every round-1 unit is checked. The unit is the expected long one (977 short and 47 long round-1 units), 5.75 ns longer than ideal over 4.75 s |

A complete round-3 or round-4 unit at the default size (about 2·10¹¹
cycles and more) has not been simulated. Those rounds are covered by the
smaller configurations, which run their complete patterns.

Running one with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/frac_div_pkg.sv \
  tb/tb_frac_divider_top.sv --top-module tb_frac_divider_top -o sim
./obj_dir/sim
```

The modules carry concurrent assertions: the counter range in the divider,
and in each round that all groups have been issued when a unit ends. Keep
`--assert` on to use them.

## Choices made in this implementation

These points are not fixed by the algorithm; this implementation settles
them as follows:

* The N divider and the N+1 divider are one counter with a movable terminal
  count, not two counters with an output multiplexer. Switching between them
  cannot produce a runt pulse.
* The coefficients use the ceiling rule described above. It is the rule
  that reproduces the 865 / 978 / 236 / 580 table for this ratio. The ratio
  is F_CLK/F_OUT = 181.15532…, not exactly 181.155: with exactly 181.155,
  round 1 would need 866.
* The repeating pattern is the highest round's short unit (580 short and
  444 long round-3 units).
* The remainder R of each interleave comes at the end of the unit.
* o_clk's duty cycle is 91 cycles high and 90 or 91 low, and the output is
  registered.
* Synchronous active-low reset, and the status outputs on the top.

## Not included

* The crystal oscillator that makes the input clock: it is analog, and it is
  simply the `i_clk` input here.
* A direct digital synthesis (DDS) divider was used as a point of comparison
  for this design: a 32-bit phase accumulator whose MSB gives the output
  clock. It is not part of the divider and is not included.
