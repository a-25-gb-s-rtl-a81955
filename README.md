# Burst-mode receiver back end: lock to a new optical burst in 31 ns

In a network with fast photonic switches, a receiver sees a new transmitter
every time the switches reconfigure. Each burst arrives from a different
laser, over a different path, with its own power, extinction ratio and clock
phase. The receiver must lock to it in a few tens of nanoseconds. The front
end is dc-coupled so that messages of any length and content pass, which
means the photodiode's dc current must be cancelled explicitly for each burst.

This RTL is the digital control of such a receiver, for 25 Gb/s and below.
It locks in three steps. Each burst begins with a `1010...` preamble:

1. **I_DC calibration**: a successive-approximation search sets a
   cancelling current at the TIA input (a gain code and a 6-bit DAC code).
   It takes at most 39 word-clock cycles (12.5 ns at 25 Gb/s).
2. **Burst-mode CDR (BM-CDR)**: a second successive-approximation search.
   It uses three phase interpolators (PIs) as a coarse time-to-digital
   converter and moves the edge-sampling clock onto the data transitions.
   It takes at most 56 cycles (17.9 ns).
3. **Bang-bang CDR**: the normal tracking loop takes over. The data clock
   sits in mid-eye.

From START to lock, the worst case is 95 cycles (30.4 ns at 25 Gb/s). The
receiver this follows was specified at 12.5 + 18.5 = 31 ns. All timing is
counted in cycles of the word clock C8 (bit rate / 8), so lock time scales
with the bit rate.

## Signals and clocks at a glance

| Item | Meaning |
|---|---|
| `clk_hr` | Half-rate sampling clock (12.5 GHz at 25 Gb/s). Each sampler takes one bit per cycle. |
| `c8` | Word clock, `clk_hr / 4`. All control logic runs on it. One cycle = 8 UI = 320 ps at 25 Gb/s. |
| PI code | 6 bits. 64 codes span one half-rate period, i.e. 2 UI, so **32 codes = 1 UI** (1.25 ps per code at 25 Gb/s). A larger code means a later clock. |
| Samplers | Six, in the order `D, E, A, D#, E#, A#` (index 0..5, `latch_e` in `bmrx_pkg`). The three PIs drive D (data), E (edge) and A (amplitude). Each PI feeds a true-phase sampler and a complementary one, which samples 32 codes (1 UI) later. |
| `start` | Asynchronous. Rising edge = new burst. Falling edge = end of burst, which resets every state machine. |

## Step 1: cancelling the dc current (`idc_cal`)

The photodiode current has an ac part (the data) and a dc part. Cancelling
the dc part at the TIA input centres the signal on the decision threshold.
The cancelling current is

    I_DC = code x LSB,   LSB = 2, 4, 8 or 16 uA for gain 000, 001, 011, 111

so the range is 0 to 1008 uA. The gain is set by a current mirror whose
ratio is switched with a thermometer code. Because extinction ratios are
bounded, a large dc current comes with a large ac swing. A coarse LSB is
then good enough, and a 6-bit DAC with four gain steps does the work of a
9-bit one.

A single comparator latch reports whether the low-pass-filtered input is
above (`cmp = 1`) or below the present I_DC. The engine works in **steps of
4 C8 cycles**:

- cycle 1: the latch result is valid. At its end a new setting is registered.
- cycles 2 to 4: the analog loop settles.
- The latch is clocked again at the start of the next cycle 1. The latch
  clock is `cal_latch_en`, high in cycle 4.

The search:

- **Gain**: start at gain 111 with the DAC at code 26 (41 % of full scale).
  If the input is below that point, step the gain down (111, 011, 001) and
  compare again. Stop at the first gain where it is not below. If 001 still
  fails, use 000 without a further comparison. This takes 1 to 3 steps.
- **Code**: a 6-step binary search from the MSB. A trial bit is kept when
  `cmp = 1`. The result is the largest code whose current is below the input.

START passes through three synchronising flip-flops first. So `cal_done`
rises 3 + 4 x (gain steps + 6) cycles after START: 31, 35 or 39 cycles.
While START is low, the engine holds gain 111 and code 26. This way the first
comparison can be made right after synchronisation. The result stays in
registers for the whole burst. Nothing in the front end leaks it away.

Because the result is digital, the system can store it and offer it again
when the same transmitter and switch path come back. Set `idc_preset_en` and
put the stored values on `idc_preset_gain` / `idc_preset_code` before START.
They are applied while START is low, so they have settled when START
arrives. `cal_done` then rises 4 cycles after START, without any search. The
three preset inputs must stay stable until START falls.

## Step 2: finding the data edge (`bm_cdr` + `aggr`)

This is the unusual part of the design.

### Six sampling points on a 2 UI circle

During the search, PI_E sits at the current estimate of a data edge. PI_D
and PI_A act as guard bands `Delta` codes before and after it. With their
complementary phases this gives six points on the 2 UI phase circle:

    D = E - Delta,  E,  A = E + Delta,  D# = E + 32 - Delta,  E# = E + 32,  A# = E + 32 + Delta

The search starts with `Delta = 11`, which spreads the six points roughly
evenly over 2 UI. The PIs are set to that spread as soon as START is seen,
while the dc calibration is still running. PI_E keeps whatever position it
had.

### Sensing: polarity and saturation (`aggr`)

For each measurement, the aggregator adds up 15 consecutive samples of every
sampler. It reports two bits per sampler:

- `P` = 1 if more than 7 of the 15 samples are 1 (which side of the edge the
  point is on);
- `S` = 1 if all 15 agree (the point is clear of the jittery transition
  region). `S` = 0 means the point sits on a transition.

The samples arrive deserialised, 4 per sampler per C8 cycle. A measurement
therefore takes the four words after the command `cmt` (the last sample of
the fourth word is dropped), plus one output register stage. `valid` comes 5
cycles after the command.

### Deciding: the convergence rules

On the preamble the six `P` bits around the circle show one `0 -> 1` step:
the rising data edge lies between those two neighbouring points. The new
edge estimate E* is placed inside that sector. The `S` bits of the sector's
two ends decide where:

| S (left, right) | Where E* goes | Delta next |
|---|---|---|
| 1, 1 | midpoint (1:1) | two rows down the table |
| 0, 0 | midpoint (1:1) | unchanged |
| 0, 1 | 1/3 from the left end (1:2) | one row down |
| 1, 0 | 2/3 from the left end (2:1) | one row down |

The idea: an end with `S = 0` is close to the edge, so E* moves towards it.
Two saturated ends mean the edge is well inside, and the window can be
halved. The allowed Delta values and the rounded offsets form a fixed table
(`delta_of_row`, `conv_step` in `bmrx_pkg`):

| Row | Delta | Delta/3 | Delta/2 | 2Delta/3 |
|---|---|---|---|---|
| 0 | 11 | 3 | 5 | 7 |
| 1 | 8 | 2 | 4 | 5 |
| 2 | 6 | 2 | 3 | 4 |
| 3 | 4 | 1 | 2 | 3 |
| 4 | 3 | 1 | 1 | 2 |
| 5 | 2 | 1 | 1 | 1 |

The table describes sectors that are `Delta` wide (D..E, E..A, D#..E#,
E#..A#). The two outer sectors, A..D# and A#..D, are `32 - 2*Delta` wide. In
them this RTL keeps the table's distance from the favoured end:

- `left + Delta/3` for S = 0,1;
- `right - (Delta - 2Delta/3)` for S = 1,0;
- the midpoint of the actual width when both S bits are equal.

In a `Delta`-wide sector these formulas give exactly the table. Scaling the
outer sector by 1/3, 1/2 and 2/3 of its full width instead would lose lock in
a few percent of jittered cases. That happens when a point on the edge reads
P = 0 by chance and E* is pushed deep into the wide sector. The
favoured-end rule locks in every case of an exhaustive model sweep (all
64 x 64 start and edge phases, jitter up to +-3 codes).

Worked example (E = 0, rising edge at code 16, no jitter): the points are at
53, 0, 11, 21, 32 and 43, so P = `0 0 0 1 1 1` and all S = 1. The `0 -> 1`
sector is A..D# (11..21). Midpoint rule: E* = 11 + 5 = 16, right on the edge.
Delta drops two rows to 6.

### Actuating and stopping

The state machine sends the PI control an **increment** for PI_E (`pi_e_inc`,
modulo 64) and the new `delta`, then waits for the PIs to settle. One
iteration is 11 C8 cycles (88 UI):

| Phase | C8 cycles |
|---|---|
| Command | 1 |
| Count until the result is valid | 6 |
| Update and settle | 4 (`SETTLE_CYCLES`) |

The search stops after the update that brings Delta to 2, or after
`MAX_ITERS` = 5 iterations (timeout). If no `0 -> 1` sector is seen, for
example when there is no light, nothing moves. The iteration still counts
towards the timeout. When it stops, `done` rises and `bm_active` falls.

## Step 3: tracking (`bb_cdr`, `bbpd`)

When `bm_active` falls, the PI control keeps PI_E where the search left it.
It moves PI_D 16 codes (half a UI) earlier, into the middle of the eye, and
holds PI_A 16 codes after PI_E. From then on it is a first-order bang-bang
loop:

- The phase detector `bbpd` uses the Alexander rule. For each data
  transition in the 8-bit data word, the edge sample between the two bits
  votes early (it equals the earlier bit) or late (it equals the later bit).
- Every C8 cycle, PI_E moves one code later if early votes win, one code
  earlier if late votes win, and stays on a tie.

There is no integrator. A 100 ppm offset drifts only 0.026 codes per C8
cycle, far below the loop's 1 code per cycle. Much larger offsets, such as
spread-spectrum clocking, would need a frequency integrator added to this
loop.

## Clocking and word format (`clk_div4`, `deser_2to8`)

The deserialisers and the divider run on `clk_hr`; everything else runs on
`c8`:

- `clk_div4` makes `c8` from the MSB of a 2-bit counter.
- Each `deser_2to8` shifts in the true/complementary sample pair of one PI
  every half-rate cycle. It loads an 8-bit word on the edge where the counter
  wraps. Bit 0 is the oldest sample. Even bits come from the true phase, odd
  bits from the complementary one.
- The word is then stable for two `clk_hr` cycles before `c8` rises, so the
  C8 domain never samples it while it changes.
- In tracking, edge word bit k lies between data bits k and k+1.

## Module map

| File | Role |
|---|---|
| `rtl/bmrx_pkg.sv` | Widths, sampler order, gain constants, the Delta/offset table |
| `rtl/bm_rx.sv` | Top: wires everything below. Analog controls and sampler outputs are ports |
| `rtl/idc_cal.sv` (+ `start_sync.sv`) | Step 1 |
| `rtl/aggr.sv` (+ `aggr_ctr.sv`) | 15-sample P/S aggregator |
| `rtl/bm_cdr.sv` | Step 2 state machine |
| `rtl/bb_cdr.sv` | PI code registers, burst-mode pass-through and bang-bang loop |
| `rtl/bbpd.sv` | Early/late vote counter |
| `rtl/deser_2to8.sv`, `rtl/clk_div4.sv` | Deserialisers and C8 generation |

Top-level parameters of `bm_rx`:

| Parameter | Default | Meaning |
|---|---|---|
| `CAL_STEP_CYCLES` | 4 | C8 cycles per I_DC search step |
| `AGGR_SAMPLES` | 15 | Samples per P/S measurement |
| `MAX_ITERS` | 5 | BM-CDR timeout, in iterations |
| `SETTLE_CYCLES` | 4 | C8 cycles from a PI update to the next measurement |

The top's inputs are `clk_hr`, `rst_n`, `start`, the six sampler outputs
`latch_q`, the calibration latch `cal_cmp` and the optional stored I_DC
setting (`idc_preset_en`, `idc_preset_gain`, `idc_preset_code`; tie
`idc_preset_en` low to always calibrate).

The top's outputs:

- `idc_gain` and `idc_code` for the current mirror and I_DC DAC;
- `cal_latch_en` for the calibration latch;
- `pi_e`, `pi_d` and `pi_a` for the interpolators;
- `data_word`, the recovered data, plus `edge_word` and `amp_word` from the edge and amplitude samplers;
- status: `cal_done`, `bm_active`, `cmt`, `done` and `bm_timeout`.

## What is not here

The analog front end is not RTL:

- the TIA and its replica, and the variable-gain amplifier;
- the summers with their offset and amplitude DACs;
- the StrongARM samplers and the calibration low-pass filter;
- the current mirror and I_DC DAC;
- the phase interpolators and the quadrature clock divider.

The testbenches model these ideally: samplers with uniform jitter, and an
I_DC loop that settles instantly.

Also missing, because the source design gives no procedure or interface for
them:

- the settings of the TIA feedback resistor, the VGA gain, the replica
  offset and the per-sampler offset DACs;
- the serial readout of the calibration result.

## Choices made in this RTL

These go beyond, or differ from, the receiver as published:

- The gain search stops early. So calibration takes 31 to 39 cycles, not
  always 39.
- The preset interface for reusing a stored I_DC result. The original only
  says the result can be stored and re-applied.
- The rule for the two wide outer sectors, the lowest-index tie-break when
  more than one `0 -> 1` sector shows, and holding still when none shows.
- The timeout of 5 iterations and the 4-cycle settle time. Both were chosen
  to fit the 18.5 ns budget and the 80 to 100 UI iteration.
- The PIs jump to a new code in one step. There is no multi-step PI control
  sequence.
- The bang-bang loop (proportional only, one code per C8 cycle), the
  Alexander phase detector, and PI_A at E + 16 in tracking. The published
  receiver reuses an earlier CDR design and does not spell these out.
- C8 is derived from the sampling clock by a counter. The aggregator reads
  the deserialised words instead of having its own demultiplexers.
- An asynchronous active-low reset `rst_n` in both clock domains.

## Simulating

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5, from the project root:

    verilator --binary --timing --assert -Irtl -Itb rtl/bmrx_pkg.sv tb/tb_bm_rx.sv \
        --top-module tb_bm_rx -o sim && ./obj_dir/sim

Replace `tb_bm_rx` with any testbench in `tb/`. Each one simulates in well
under a second.

| Testbench | What it checks |
|---|---|
| `tb_bm_rx` | 13 bursts end to end at default parameters: I_DC result against closed form (and one burst reusing a stored result); `cal_done` <= 39 and `done` <= 97 cycles; after lock, edge clock within 5 codes of the data edge and an error-free PRBS7 payload; +-100 ppm tracking; the no-light timeout; reset on START falling; every mechanism counted |
| `tb_idc_cal` | 75 input currents (0 to 1200 uA), exact gain/code and cycle count, each followed by a burst reusing the stored result |
| `tb_aggr` | 200 measurements with biased random samples, P/S and `valid` timing |
| `tb_bm_cdr` | 300 random start/edge phases with jitter, every update against an independent model of the rules, the worked example, 11-cycle iterations, timeout |
| `tb_bb_cdr` | PI codes cycle by cycle in both modes and at hand-off |
| `tb_bbpd` | Vote counts against a bit-serial model |
| `tb_deser_2to8` | Word contents and load timing |

Each testbench was also run against a copy of its block with one deliberate
bug, and each failed it.

## How far to trust it

- The control algorithms are checked against independent models and
  closed-form results, not against silicon.
- The lock times are exact cycle counts of this RTL. Their agreement with the
  published 12.5 ns and 18.5 ns (30.4 ns against 31 ns in total) depends on
  the assumed 4-cycle settle time.
- With sampler jitter of +-3 codes (+-3.75 ps), the BM-CDR sometimes runs to
  its timeout. Lock is still good in those cases, because the last estimate
  is used.
- The analog models are ideal. Real settling, comparator offset and
  interpolator nonlinearity have not been simulated.
