# 3-D space vector modulator for a three-phase four-leg inverter

A three-phase inverter with a fourth leg on the load neutral can give an
unbalanced load, or one that draws zero-sequence current, any set of three
phase voltages, balanced or not. The price is that the voltage reference no
longer lies in the two-dimensional alpha-beta plane of ordinary space vector
modulation. It has a third, zero-sequence component, gamma. Three-dimensional
space vector modulation (3DSVM) works in that alpha-beta-gamma space. It
finds the four switching states nearest the reference. It then applies them
for times whose weighted average equals the reference.

This RTL is a complete 3DSVM controller on a single 100 MHz clock. It
generates its own 50 Hz three-phase reference, either balanced or with
phase a at half amplitude. It drives the eight gates of a two-level four-leg
inverter at a switching frequency of 1, 2 or 5 kHz, chosen by two switches.
Each leg has a 4 µs dead time. The chain of blocks, the port list, the
600-sample reference table, the three frequencies and the dead time follow
the thesis *Design and implementation of three-dimensional space vector
modulation for three-phase four-leg inverter based on FPGA*. That design was
written in VHDL for a Zynq-7000 board. The number formats, pipelining and
handshakes are this implementation's own.

## Switching states and the geometry behind them

Each leg x ∈ {a, b, c, n} has a switching function S_x. When S_x = 1 its
upper switch is on. A state is written S_a S_b S_c S_n, so `1000` has only
leg a on. The phase-to-neutral voltages are v_x = v_dc (S_x − S_n). They map
to alpha-beta-gamma through the power-invariant transformation

    alpha = sqrt(2/3) (va − vb/2 − vc/2)
    beta  = (vb − vc) / sqrt(2)
    gamma = (va + vb + vc) / sqrt(3)

The 16 states give 14 distinct non-zero vectors plus the zero vector. `0000`
and `1111` both give the zero vector. The vectors cut the space into
**six prisms**, which are the 60° sectors of the alpha-beta plane. Each
prism is cut into **four tetrahedrons**. The reference vector lies in
exactly one tetrahedron. Its four corners (three active states and the zero
states) are the states used.

This geometry is hard to picture, but it has a simple meaning:

* **Prism = ranking of the three phase voltages.** Prism 1 (0°–60°) is
  va > vb > vc. Going counterclockwise, the rankings are b>a>c, b>c>a,
  c>b>a, c>a>b and a>c>b.
* **Tetrahedron = where the neutral leg (voltage 0) falls in that
  ranking.** Tetrahedron 1 means all three phases are positive. Tetrahedron
  2 means only the lowest is not positive. Tetrahedron 3 means only the
  highest is positive. Tetrahedron 4 means none is positive. The bounding
  planes are va = 0 (gamma = −√2·alpha), vb = 0
  (gamma = alpha/√2 − √(3/2)·beta) and vc = 0
  (gamma = alpha/√2 + √(3/2)·beta).
* **The legs switch on in the order of that ranking** with the neutral
  leg inserted. For prism 1, tetrahedron 2 the ranking is a > b > n > c, so
  the states are `0000 → 1000 → 1100 → 1101 → 1111`. Only one leg changes
  at each step.
* **Durations = voltage steps between neighbours in that order.** If
  u1 ≥ u2 ≥ u3 ≥ u4 are the four leg voltages in switch-on order (the
  neutral counts as 0), then t1 = (u1−u2)·Ts, t2 = (u2−u3)·Ts,
  t3 = (u3−u4)·Ts, and the zero states get t4 = Ts − t1 − t2 − t3. This is
  the solution of v1·t1 + v2·t2 + v3·t3 = v*·Ts with t1+t2+t3+t4 = Ts.

`svm_pkg` encodes these rules once, in `prism_leg`, `on_order`,
`vector_k` and `dur_coef`. The prism tests, tetrahedron tests, the 24
duration matrices and the switch-on positions are all derived from them at
elaboration. No table is typed in by hand. The duration matrix of a
tetrahedron holds the differences between rows of the inverse
transformation. Hardware evaluates it in alpha-beta-gamma, as the method
prescribes.

The reference stays inside the **linear range** when max(va, vb, vc, 0) −
min(va, vb, vc, 0) ≤ v_dc. The built-in reference has 0.5 v_dc per phase,
and its spread peaks at 0.87 v_dc. Over-modulation is not handled. If the
active times exceed Ts, t4 is clamped to 0 and the pulses are no longer
meaningful.

## The symmetrical switching period

Each switching period has ten segments, mirrored about its centre:

    0000 | v1 | v2 | v3 | 1111 || 1111 | v3 | v2 | v1 | 0000
    t4/4  t1/2 t2/2 t3/2  t4/4    t4/4   t3/2 t2/2 t1/2 t4/4

Every leg switches on once and off once per period. The leg at position p
of the switch-on order turns on at

    t_on(p) = t4/4 + (t1 + … + t_p)/2         t_off = Ts − t_on

A counter runs from 0 to Ts−1. S_x = 1 while t_on ≤ count < t_off. Each
pulse is therefore centred in the period. The leg's duty is
d_x = 1 − 2·t_on/Ts, and d_x − d_n = v_x*/v_dc.

## Datapath and timing

```
clock_divider ─tick─▶ reference_generation ─abc─▶ coordinate_transformation ─αβγ─▶
prism_determination ─prism,αβγ─▶ tetrahedron_identification ─prism,tet,αβγ─▶
switching_time_calculation ─t1..t4,prism,tet,Ts─▶ on_off_times ─t_on,t_off,Ts─▶
pulses_generation ─S_x─▶ dead_time ×4 ─▶ sa, sa_bar … sn, sn_bar
switching_frequency_select ─Ts─▶ (into switching_time_calculation)
```

| block | what it does | latency |
|---|---|---|
| `clock_divider` | one-cycle `tick` every `CLK_DIV` = 3333 cycles (30 kHz = 600 × 50 Hz) | — |
| `reference_generation` | 600-sample sine ROM, index 0…599 stepped by `tick`; b and c read 200 and 400 samples behind a; `mode`=1 halves phase a | 1 |
| `coordinate_transformation` | abc → alpha, beta, gamma | 1 |
| `prism_determination` | the six sector tests, in order, first match wins | 1 |
| `tetrahedron_identification` | gamma against the three zero-voltage planes, chosen by prism | 1 |
| `switching_time_calculation` | 3×3 constant matrix per (prism, tet), times Ts, rounded; t4 = Ts − Σ | 1 |
| `on_off_times` | switch-on/off instant per leg from the segment layout | 1 |
| `pulses_generation` | period counter, compare, dead time | 2 + dead time to a gate |
| `switching_frequency_select` | `Choice` 00 → 100000, 01 → 50000, else 20000 cycles; 2-FF synchroniser | 3 |

The datapath from the reference sample to the instants is a free-running
pipeline, registered at every block. Prism, tetrahedron and Ts travel
alongside the data, so each stage sees one consistent set. A new sample
reaches `on_off_times` five cycles after it leaves the table.
`pulses_generation` reads the newest instants and the period length only at
the last count of a period. A change of reference, frequency or mode
therefore takes effect at the next period boundary, and a period is never
cut short.

**Gate timing.** Take cycle 0 as the cycle in which the period counter is
0. Leg x's upper gate is on for `t_on + DT + 2 ≤ c < t_off + 2`. Its lower
gate is on for `c < t_on + 2` or `c ≥ t_off + DT + 2`. Both gates are off
for exactly DT = `DEAD_TIME` cycles around every transition. A switching
pulse shorter than DT never reaches its gate. The dead time is not
compensated. Each upper pulse is DT cycles shorter than S_x, and each lower
pulse is DT cycles shorter than its complement. `dead_time` asserts that
the two gates of a leg are never on together.

**Number format.** Voltages are signed Q2.14 fractions of v_dc in 16 bits,
so 16384 means v_dc. Times are unsigned 17-bit cycle counts, enough for
the 100000-cycle period at 1 kHz. Comparisons in the prism and tetrahedron
tests use full-precision products. Rounding error therefore affects only
points on a boundary, where either side gives the same result.

## Top-level ports (`svm_top_level`)

| port | dir | meaning |
|---|---|---|
| `clk_p` | in | 100 MHz clock |
| `reset` | in | synchronous, active high; all eight gates 0 |
| `Choice[1:0]` | in | 00: 1 kHz, 01: 2 kHz, 10/11: 5 kHz |
| `Mode` | in | 0 balanced, 1 unbalanced (phase a at half amplitude) |
| `sa`, `sb`, `sc`, `sn` | out | upper gates of legs a, b, c and neutral |
| `sa_bar` … `sn_bar` | out | lower gates |

Parameters: `CLK_HZ` (100 000 000), `CLK_DIV` (3333), `N_SAMPLES` (600,
must be a multiple of 3), `AMP` (8192 = 0.5 v_dc, i.e. 30 V references on
a 60 V link) and `DEAD_TIME` (400 cycles = 4 µs). If the clock changes,
change `CLK_HZ`, `CLK_DIV` and `DEAD_TIME` together. `svm_pkg::TIME_W`
must hold `CLK_HZ/1000`.

## Where this implementation departs from the source description

* **Tables re-derived, not transcribed.** The source lists the
  state-to-alpha-beta-gamma table, the order of states per tetrahedron and
  the 24 duration matrices with their plane conditions. Here all of them
  are computed from the transformation and the "one leg changes at a time"
  rule. The source prints a few entries that break that rule. Examples are
  alpha of states `0110` and `0111`, whose sign disagrees with the
  transformation, and a few state sequences that change two legs at once.
  The derived values are used in their place.
* **Clock enable instead of a divided clock.** The sample rate comes from
  a strobe, and the design has one clock domain. 100 MHz / 3333 gives a
  50.005 Hz reference.
* **Outer bounds not tested.** The localisation conditions also bound
  gamma by ±√3·v_dc planes, which is the edge of the linear range. They
  are not tested.
* **Choices the source leaves open:** the polarity of `Mode`, reset
  details, word widths, the pipeline registers, updating only at the period
  boundary, and the synchroniser on `Choice`.
* **Outside the RTL:** the IGBT power stage and its 60 V supply, the optocoupler gate drivers,
  their 15 V supplies and the R-L load have no logic function. They are not
  part of the RTL. The testbenches include a behavioural model of the
  inverter with its load (see below).

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the
block with a model written independently in floating point.

* `tb_reference_generation`: all 600 samples of all phases, both modes,
  within 1 LSB.
* `tb_coordinate_transformation`: the 16 switching states and 2000 random
  vectors.
* `tb_prism_determination`: random angles against `atan2` sectors.
* `tb_tetrahedron_identification`: random phase voltages with a
  zero-sequence part, covering all four tetrahedrons.
* `tb_switching_time_calculation`: durations from sorting the four leg
  voltages, for all 24 (prism, tetrahedron) pairs and all three periods.
* `tb_on_off_times`: instants from an explicit list of the switching-state
  sequences.
* `tb_pulses_generation`: every gate, every cycle, against the timing
  formulas above, with random periods.
* `tb_switching_frequency_select` and `tb_clock_divider`.

`tb_svm_top_level` runs the whole design at its default parameters. It
covers one full 50 Hz period at each of the six operating points (1, 2 and
5 kHz, each balanced and unbalanced), then a short run with `Choice` = 10.
That is about 13 M cycles, about 12 s in Verilator. For each of the roughly
340 switching periods it checks:

* the period length;
* that every pulse is centred;
* that (d_x − d_n) matches the reference within 0.012 v_dc;
* that every dead time is exactly 400 cycles.

It also counts the prisms, tetrahedrons, frequencies, modes and dead times
seen. A sine reference whose phases sum to almost zero only ever enters
tetrahedrons 2 and 3. Tetrahedrons 1 and 4 are covered by the block
testbenches.

`tb_load_current` closes the loop through the power stage. It uses
`four_leg_inverter_rl_model`, a behavioural model of the inverter with a
60 V link and a star-connected 500 Ω / 0.4 H load whose star point is on
the fourth leg. The model includes freewheeling-diode conduction during
the dead time. At each operating point the test takes the fundamental and
the THD of the load currents over one reference period. The expected
fundamental is 30 V / |500 + j·2π·50·0.4| = 58.2 mA. Results:

| operating point | ia / ib / ic fundamental (mA) | THD of ib |
|---|---|---|
| balanced, 1 kHz | 57.4 / 57.4 / 57.4 | 16.5 % |
| balanced, 2 kHz | 57.0 / 57.0 / 57.0 | 8.3 % |
| balanced, 5 kHz | 55.3 / 55.3 / 55.3 | 3.7 % |
| unbalanced, 1 kHz | 28.7 / 57.3 / 57.2 | 14.9 % |
| unbalanced, 2 kHz | 28.9 / 56.6 / 56.3 | 7.5 % |
| unbalanced, 5 kHz | 29.0 / 54.3 / 53.5 | 3.3 % |

In unbalanced mode phase a carries half the current of phase b, and the
distortion falls as the switching frequency rises. The fundamental also
shrinks with frequency because the dead time is not compensated: the
4 µs takes a larger share of a shorter period.

Run a testbench with plain Verilator from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert --top-module tb_svm_top_level \
  -y rtl -y tb +libext+.sv -Irtl rtl/svm_pkg.sv tb/tb_svm_top_level.sv -o sim
./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.
