# GA-selected SHE PWM controller for a 15-level asymmetric inverter

This is the digital controller for a single-phase multilevel inverter. The inverter
stacks three DC sources of 1, 2 and 4 units (10 V, 20 V and 40 V), and any subset
of them can be switched into a chain that feeds an H-bridge. That gives 15 output
levels, from −70 V to +70 V, using only seven switches. The output is a stepped
approximation of a 50 Hz sine wave. Its harmonic quality depends only on *when*
the staircase steps up and down, which is set by seven switching angles θ1 < θ2 <
… < θ7 < 90° in the first quarter period.

Selective harmonic elimination (SHE) solves for angles that cancel low-order
harmonics. These equations are too costly to solve on the controller. Instead, an
offline solver has already narrowed each angle to a band of eight candidate values.
The hardware then runs a small genetic search over these bands:

* three 7-bit LFSRs pick one candidate for each angle;
* the harmonic content of the resulting staircase is computed;
* the set with the lowest total harmonic distortion (THD) is kept.

The winning set then drives the inverter gates every 50 Hz cycle.

Everything below is synthesizable SystemVerilog on one 50 MHz clock, except the
power stage, which is a behavioural model used for simulation.

## The 15-level staircase

| level | S1 | S2 | S3 | bridge | output |
|---|---|---|---|---|---|
| +1 … +7 | bit 0 | bit 1 | bit 2 of the level | H1, H3 on | +10 … +70 V |
| 0 | 0 | 0 | 0 | H1, H3 on (positive half) / H2, H4 on (negative half) | 0 V |
| −1 … −7 | bit 0 | bit 1 | bit 2 of \|level\| | H2, H4 on | −10 … −70 V |

Sn puts source n (1, 2 or 4 units) into the chain. An open Sn is bypassed by its
diode. H1 sits above H4 in the left leg and H2 above H3 in the right leg, with the
load between the legs. H1+H3 give positive output and H2+H4 negative. Both
switches of one leg on at the same time is a shoot-through, which the model flags
and an assertion forbids.

Over a half cycle the level climbs 0→7 and falls back 7→0. As a result S1 changes
state 14 times, S2 6 times and S3 twice, while each H switch changes once. This low
switching rate is the point of a fundamental-frequency staircase.

## From angles to gate timing (`she_pwm_gen`)

The waveform has quarter-wave and half-wave symmetry:

* steps up at θ1…θ7;
* steps down at 180°−θ7 … 180°−θ1;
* the same shape, negated, in the second half cycle.

Time inside a cycle is counted in 1 MHz pulses, 20,000 per 50 Hz cycle. So one
pulse is 0.018°. At each cycle start the seven angles are latched and turned into
pulse counts, t_k = round(θ_k · 20000 / 36000). The division uses a multiplication
by ⌈2^48/36000⌉ and a shift, which is exact over the whole range. With q the
position inside the current half cycle, the level is

    L(q) = #{ k : t_k ≤ q < 10000 − t_k }

This single comparison covers both the rising and the falling quarter. S1..S3 are
the bits of L, and the H pair is chosen by the half cycle. The gates are registered
one clock after the pulse index.

The angles change only at a cycle boundary, so a new winner never produces a torn
cycle. All switches stay off until the first winner exists. No dead time is
inserted between bridge switches; add it here if real devices need it.

## Choosing the angles: the genetic search (`ga_algorithms`)

### Population and chromosomes

A *chromosome* is one full angle set θ1..θ7, and each angle has eight possible
*genes* G1..G8. These are the offline bands, in degrees:

| | G1 | G2 | G3 | G4 | G5 | G6 | G7 | G8 |
|---|---|---|---|---|---|---|---|---|
| θ1 | 10.49 | 11.00 | 11.70 | 12.01 | 12.06 | 12.24 | 12.49 | 13.00 |
| θ2 | 17.50 | 17.73 | 18.00 | 18.27 | 18.50 | 18.63 | 18.81 | 19.01 |
| θ3 | 24.75 | 24.84 | 24.93 | 25.11 | 25.29 | 25.51 | 26.37 | 26.50 |
| θ4 | 42.50 | 42.66 | 42.84 | 43.00 | 43.11 | 43.20 | 44.10 | 44.50 |
| θ5 | 49.86 | 50.00 | 50.22 | 50.85 | 50.99 | 51.12 | 54.50 | 54.63 |
| θ6 | 67.32 | 67.50 | 68.51 | 68.99 | 69.12 | 69.21 | 69.39 | 69.57 |
| θ7 | 75.42 | 75.49 | 75.89 | 76.00 | 76.68 | 77.00 | 81.72 | 82.01 |

The table is stored in `she_pkg` as centidegrees (0.01° units, 14 bits). The bands
do not overlap, so every chromosome drawn from them automatically keeps the angles
in increasing order below 90°. `ga_algorithms` asserts this.

### Random selection (`random7`, `gene_select`)

There are three LFSRs: R1..R7, S1..S7 and T1..T7 (these S1..S7 are register stages,
not the inverter switches). Each is a 7-stage Fibonacci register with feedback
R6 ⊕ R7 into R1 (x⁷+x⁶+1, period 127). The multiplexer for angle k takes bit k of
each register: `select = {R_k, S_k, T_k}`, and value v picks gene G(v+1). Stepping
all three LFSRs therefore changes every angle's gene pseudo-randomly at once. This
is the crossover/mutation step. No other crossover datapath exists.

The seeds are 01, 2A and 5C (hex). The three registers share one polynomial and
step together, so the search visits one fixed sequence of at most 127 distinct
chromosomes. It is a small, repeatable sample of the 8⁷ ≈ 2.1 M combinations.

### Fitness: THD in hardware (`thd_fitness`, `cordic_cos`)

For a unit-step quarter-wave staircase, only odd harmonics exist, with amplitude
proportional to

    V_h = (1/h) · Σ_k cos(h·θ_k)

The fitness is THD² = Σ_{h=3,5..39} V_h² / V_1². The unit reports the two sums
separately, `fund_pow` = V_1² and `harm_pow` = Σ V_h², both in Q30. No division is
needed: a candidate replaces the best one when

    harm_new · fund_best < harm_best · fund_new       (96-bit products, strict)

Per harmonic h and angle k, the steps are:

1. **Phase.** h·θ_k (centidegrees) is multiplied by round(2^40/36000). Bits
   [39:20] of the product are the phase as a 20-bit fraction of a turn. Dropping
   the upper bits does the "mod 360°" for free.
2. **Cosine.** An 18-iteration rotation-mode CORDIC runs one iteration per clock.
   Quadrants 2 and 3 are folded by half a turn and the result is negated. The
   output is Q1.15, good to a few LSB.
3. **Sum and scale.** The cosines are summed over k and multiplied by a constant
   table round(2^16/h). The result is squared and accumulated.

One evaluation takes NH·(7·(ITER+3)+1)+2 clocks, where NH = (MAX_ORDER+1)/2. At
the defaults that is 2,962 clocks, about 59 µs at 50 MHz. The testbench measures
this exactly. Against a floating-point reference, the fundamental power agrees to
0.1 % and the harmonic power to 10⁻³ + 0.2 %.

### Search schedule

After reset the controller runs `GENERATIONS` (127) evaluations back to back at
full clock rate, one per LFSR state. It replaces the best set whenever a candidate
is strictly better, then raises `search_done`. With the defaults this takes
376,303 clocks (7.5 ms), well inside the first 20 ms cycle. From the next cycle
start the gates follow the winner. The search runs once per reset.

With the default seeds, the full-size simulation finds

    θ = 10.49, 18.00, 24.75, 43.20, 49.86, 67.32, 81.72 degrees
        (genes G1, G3, G1, G6, G1, G1, G7)

This gives a fundamental of 60.42 V peak and a THD of 11.3 % over odd harmonics up
to 39, or 12.3 % over all harmonics. A DFT of the simulated inverter output gives
the same THD to within 0.1 %.

## Clocking (`clock50hz_gen`, `clock1mhz_gen`)

Both dividers run from the 50 MHz board clock:

* `clock50hz_gen` counts to 1,000,000 and pulses `cycle_tick` on the last clock of
  each period.
* `clock1mhz_gen` pulses every 50 clocks and counts the pulses into `pos` (0..19999).
  `cycle_tick` restarts it, so the two dividers cannot drift apart.

The divided square waves are brought out for observation only. All logic uses the
one clock with enables. Reset is synchronous and active-high throughout.

## Hierarchy

    she_mli15_top            whole scheme (not synthesizable: contains the model)
      level15     u_ctrl     FPGA controller, synthesizable
        clock50hz_gen  X50
        clock1mhz_gen  X
        random7        X2_0, X2_1, X2_2     LFSR1..3
        ga_algorithms  X3
          gene_select     band ROM + seven 8x1 muxes
          thd_fitness     fitness unit (uses cordic_cos)
          she_pwm_gen     gate generator
      mli15_inverter u_inv   behavioural power stage (real-valued v_load, i_load)
    she_pkg                  shared types, band table, gates_t struct

`level15` is the part to put on an FPGA. After generic synthesis it has about 450
word-level cells, 604 flip-flop bits and 2.5 kbit of constant tables.

Main ports of `level15`:

* inputs: `clk_50mhz`, `rst`;
* `gates` (packed struct s1,s2,s3,h1,h2,h3,h4);
* `level` (0..7);
* `search_done`, `pwm_active`, `improved`, `generation`;
* `winner[7]` (centidegrees), `winner_gene[7]` (0..7 = G1..G8);
* `best_fund_pow`, `best_harm_pow`. THD of the winner = sqrt(best_harm_pow / best_fund_pow).

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| CLK_HZ | 50,000,000 | level15, top | board clock |
| FOUT_HZ | 50 | level15, top | output fundamental |
| TICK_HZ | 1,000,000 | level15, top | switching time base |
| GENERATIONS | 127 | level15, ga_algorithms | chromosomes evaluated |
| MAX_ORDER | 39 | level15, thd_fitness | highest odd harmonic in the THD |
| ITER | 18 | thd_fitness, cordic_cos | CORDIC iterations |
| SEED_R/S/T | 01, 2A, 5C | level15 | LFSR seeds |
| VDC, R_LOAD | 10.0 V, 100 Ω | mli15_inverter | source step, load |

The band table is in `she_pkg::BAND`. To use other bands, replace those 56 numbers
and keep neighbouring bands from overlapping.

## Simulating

Each testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. The shared reference models are in
`tb/she_ref_pkg.sv`: LFSR, band in degrees, and floating-point THD. To build and
run one with Verilator 5:

    verilator --binary --timing --assert -y rtl -Irtl \
        rtl/she_pkg.sv tb/she_ref_pkg.sv tb/she_mli15_top_tb.sv \
        --top-module she_mli15_top_tb
    ./obj_dir/Vshe_mli15_top_tb

`she_mli15_top_tb` is the end-to-end test at the default parameters. It runs the
full search and two complete 50 Hz cycles (about 3 M clocks, a few seconds). It
checks:

* the winner against a floating-point search over the same LFSR sequence;
* every output sample against the expected staircase;
* all 15 levels, the 14/6/2 transition counts and the 50 Hz period;
* fundamental and THD by DFT;
* that every mechanism actually occurs: LFSR stepping, improvement of the best,
  termination, gate hold-off during the search, and bridge polarity reversal.

The per-block testbenches are `clock50hz_gen_tb`, `clock1mhz_gen_tb`, `random7_tb`,
`gene_select_tb`, `thd_fitness_tb`, `she_pwm_gen_tb`, `ga_algorithms_tb`,
`level15_tb` and `mli15_inverter_tb`. `level15_tb` and `ga_algorithms_tb` use fewer
generations, and `level15_tb` uses a 5 MHz clock, to stay short.
`reported_angles_tb` runs the published final angle set through the gate
generator, the inverter model and the THD unit.

## How far to trust it, and where it departs from the published scheme

These parts follow the published design:

* the switching table;
* the 1/2/4 source ratio;
* the angle symmetry;
* the angle bands;
* three 7-stage LFSRs feeding seven 8x1 multiplexers with one select bit each;
* the 50 MHz / 50 Hz / 1 MHz clocking;
* THD as the fitness.

The following are this design's own choices, because the source gives no detail:

* **THD hardware.** The source names THD as the fitness but does not say how it is
  computed on the FPGA. The analytic Fourier sum, the CORDIC, the harmonic range
  (odd harmonics to 39) and the fixed-point formats are all this design's.
* **Search length and pacing.** The number of generations (127, one LFSR period),
  running the search at full clock rate once after reset, and strict-improvement
  survivor selection are choices.
* **LFSR details.** The tap positions, the seeds and the bit order of each
  multiplexer select (R is the most significant bit) are choices.
* **Zero level.** The bridge stays in the polarity of its half cycle through the
  zero level. The switching table lists H1/H3 for the 0 V row, but the negative
  half is described with H2/H4 on throughout; this design follows the latter.
* **Transition counts.** The 14/6/2 transition counts of S1/S2/S3 are quoted in the
  source "per cycle". They hold per *half* cycle of the staircase, which is what
  this design produces and tests.
* **Final angles.** The source reports final angles of 3.9, 12, 20.2, 29.0, 38.5,
  49.6 and 64.2 degrees with a THD of 5.65 %. Those angles lie outside the bands the
  search is given (θ1 band 10.49–13.00°, θ7 band 75.42–82.01°). So this search
  cannot return them, and its best band chromosome has a THD of about 11 % (odd
  harmonics to 39). The reported set can still be run directly through the gate
  generator and the inverter model (`tb/reported_angles_tb.sv`). That gives a
  fundamental of 72.0 V (published: 70.85 V) and a THD over all harmonics of
  5.31 % (published: 5.65 %). Over odd harmonics up to 39 only, it scores 3.3 %,
  and the THD unit agrees. The small gaps are expected, because the published
  numbers come from a circuit simulation rather than ideal switches.
* **No dead time.** The bridge switches change in the same clock, with no dead time.
* **Ideal power stage.** The inverter model has ideal switches and a 100 Ω
  resistor.

Not built: the offline SHE solver. It is a PC program whose only product is the
band table above.
