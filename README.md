# Free-running ring-oscillator time-to-digital converter

A time-to-digital converter (TDC) turns the interval between two edges,
`start` and `stop`, into a number. In this design it is the back half of a
time-based ADC: a voltage-to-time converter (not part of this design) turns
each analog sample into a pulse width, and the TDC digitises that width at
250 MS/s with a 10-bit output and a resolution of about 3.4 ps.

A single gate delay is about 10 ps, so the design never waits on a chain of
gates. Instead it keeps a clock running and reads it twice:

* A **multipath ring oscillator** (32 taps, about 9.1 GHz) runs all the time.
  Its 32 taps rise one after another, 1/32 of a period (about 3.4 ps) apart,
  so a snapshot of the taps gives the phase to 5 bits.
* A **5-bit gray counter**, clocked by one chosen tap, counts whole oscillator
  periods. This gives 5 more bits of range.
* At `start` and again at `stop`, the taps and the counter are captured by
  sampling flip-flops. The code is the difference between the two readings:

      dout = 32 * (count_end - count_begin) + (phase_end - phase_begin)   (mod 1024)

Nothing is started or stopped, so one oscillator and counter could serve
several converters working in parallel. The hard part is reading a counter
that may be changing at the instant it is read. A second, slightly delayed
counter sample and a small correction step (described below) make this
reading exact.

## Block overview

```
             tune                         ctrl (one-hot tap select)
              |                              |
        +-----v------+  32 taps   +----------v-+  cnt_clk  +--------------+
        | ring osc.  |---+------->| tap mux    |---------->| gray counter |--+ 5-bit gray
        | mpro_model |   |        | phase_mux  |           | gray_counter |  |
        +------------+   |        +------------+           +--------------+  |
                         |                                                   |
  start -----+-----------|-------------------------------+                   |
             |  +--------v--------+   +---------------+  |  +-------------+  |
             +->| taps @ start    |   | count @ start |<-+->| tau_C delay |  |
             |  | taps @ stop     |   | count @ stop  |     +------+------+  |
  stop  -----+->| (saff_bank x2)  |   | (A samples)   |            |         |
             |  +--------+--------+   +-------+-------+   count @ start+tau_C|
             |           |                    |           count @ stop+tau_C |
             +-> tau_C delay ---------------------------> (B samples)        |
                         |                    |                  |           |
                   +-----v--------------------v------------------v-----+     |
          clk ---->| backend: input registers, thermometer-to-binary, |<----+
                   | gray-to-binary, counter correction, subtraction,  |
                   | output register                   (tdc_backend)  |
                   +--------------------------+------------------------+
                                              |
                                            dout[9:0]
```

| File | Module | What it is |
|---|---|---|
| `rtl/tdc_pkg.sv` | package | Default sizes: 32 phases, tap skew 3, 5 counter bits |
| `rtl/mpro_model.sv` | `mpro_model` | Behavioural model of the 32-tap oscillator with its 4-bit tune word |
| `rtl/phase_mux.sv` | `phase_mux` | One-hot selection of the tap that clocks the counter |
| `rtl/gray_carry_logic.sv` | `gray_carry_logic` | Toggle enables of the gray counter bits |
| `rtl/tspc_tff.sv` | `tspc_tff` | Toggle flip-flop with asynchronous set/reset |
| `rtl/gray_counter.sv` | `gray_counter` | 5-bit gray counter: parity divider, carry logic, toggle flip-flops |
| `rtl/saff_bank.sv` | `saff_bank` | Bank of sampling flip-flops (edge-triggered capture) |
| `rtl/saff_meta_model.sv` | `saff_meta_model` | Behavioural sampling flip-flops with the published 2.2 ps metastability window (optional) |
| `rtl/tauc_delay.sv` | `tauc_delay` | Behavioural 39.8 ps delay buffer that makes the B samples |
| `rtl/thermo2bin.sv` | `thermo2bin` | Tap snapshot to 5-bit phase |
| `rtl/gray2bin.sv` | `gray2bin` | Gray to binary |
| `rtl/counter_err_corr.sv` | `counter_err_corr` | Picks A or B per counter sample and applies the half-period correction |
| `rtl/tdc_backend.sv` | `tdc_backend` | Clocked backend: input registers, decode, correction, output register |
| `rtl/tdc_top.sv` | `tdc_top` | The whole converter |

The oscillator, the delay buffer and the optional flip-flop timing model
are behavioural models of analog circuits. Everything else is synthesizable logic. The voltage-to-time converter
and the reference that would lock the oscillator frequency are not part of
this design.

## Interface and timing of `tdc_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | Sampling clock, 250 MHz |
| `rst_n` | in | 1 | Asynchronous active-low reset of the counter and backend registers |
| `start` | in | 1 | Rising edge begins the interval |
| `stop` | in | 1 | Rising edge ends the interval |
| `tune` | in | 4 | Oscillator load trim: 0 is fastest (9.19 GHz), 15 slowest (8.86 GHz) |
| `ctrl` | in | 32 | One-hot choice of the tap that clocks the counter |
| `dout` | out | 10 | Interval in oscillator phase steps, modulo 1024 |

Parameters: `N_PHASES` (32), `CNT_BITS` (5), `SKEW` (3), `TAUC_PS` (39.8),
`F_MAX_MHZ` (9190), `F_STEP_MHZ` (22), `SAFF_META` (0), `SAFF_SETUP_PS`
(−1.7), `SAFF_HOLD_PS` (3.9). With `tune` = 3 the oscillator runs at
9.124 GHz, so one LSB is 3.425 ps.

One conversion takes one clock period:

```
clk    _|‾‾‾‾|___________________________________|‾‾‾‾|______ ...
        0   0.5 ns                              4 ns
start  ______|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|____
stop   _________________________|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|____
             |<---- interval --->|
```

* The clock is high for 0.5 ns. This is the voltage-to-time converter's
  sampling phase. `start` rises when it ends. The other 3.5 ns (87.5 %) are
  for conversion.
* `start` and `stop` must be low again before the next rising edge.
* The B counter samples are taken `TAUC_PS` after each edge. Both must land
  before the next `clk` rising edge, so the longest interval is
  3.5 ns − 39.8 ps ≈ 3.46 ns. The intended full scale is 3.07 ns.
* The input registers take the six samples on the first `clk` rising edge
  after `stop`. `dout` holds the code from the second rising edge on. A new
  code comes every clock.
* An interval longer than 1024 steps wraps around modulo 1024. The 10-bit
  width limits the oscillator to 1024 / 3.5 ns ≈ 9.14 GHz. At the default
  tune of 3 (9.124 GHz), the 3.46 ns usable window is about 1010 steps.

## Oscillator and phase steps

The real oscillator is a 32-stage ring. Each node is driven both by its
neighbour and by a node several stages back. This makes it much faster than
a simple ring and gives 32 evenly spaced taps. The model in
`mpro_model.sv` has a phase counter that advances every `T_osc/32`:

* at step `p`, tap `(3·p) mod 32` goes high;
* the tap that went high 16 steps earlier goes low.

Every tap has a 50 % duty cycle. Consecutive rising edges are 3 taps apart,
so tap `j` rises at phase step `11·j mod 32`: tap 0 at step 0, tap 3 at
step 1, and so on.

The frequency is `F_MAX_MHZ − tune·F_STEP_MHZ`. This is a straight-line fit
to the published tuning curve of the 4-bit load capacitor bank.

## Turning the tap snapshot into a phase

A snapshot of the 32 taps shows 16 high bits, scattered in tap order.
`thermo2bin.sv` decodes it in four steps:

1. **Rearrange.** Row `m` gets tap `(32 − 3·m) mod 32`. In this order the
   high taps form one unbroken circular run of 16 ones. The lower end of
   the run moves down one row per phase step.
2. **Remove bubbles.** Each row is replaced by the majority of itself and
   its two neighbours. A single tap sampled out of order cannot then break
   the run.
3. **One-hot.** Row `m` is marked if it is high and the row below it is low.
   This is the newest rising edge. Only rising edges are used.
4. **Binary.** The phase is `(32 − m) mod 32`. If there is more than one
   mark, the lowest row wins. If there is no mark, `valid` is low and the
   phase is 0.

Worked example: the snapshot `0xD24924B6` (tap 31 first) rearranges into
ones in rows 9..22 with the newest edge at row 9, so the phase is 23. This
case is a check in `tb_thermo2bin`.

The phase difference `phase_end − phase_begin` is taken modulo 32. It
wraps naturally.

## Sampling flip-flops

All six sample sets are taken by the same kind of flip-flop, clocked directly
by the `start` and `stop` edges and their `tau_C`-delayed copies:

* the 32 taps at `start`;
* the 32 taps at `stop`;
* the counter at `start`, `stop`, `start+tau_C` and `stop+tau_C`.

By default (`SAFF_META` = 0) these are ideal rising-edge flip-flops
(`saff_bank`).

With `SAFF_META` = 1 they become `saff_meta_model`. This is a timing model
of the published sense-amplifier flip-flop, which has a negative setup time:

* a data edge up to 1.7 ps after the clock edge is still captured;
* a data edge more than 3.9 ps after the clock edge is missed;
* a data edge in between resolves randomly to the old or the new value.

The window is 2.2 ps wide, less than one 3.4 ps phase step. So at most one
tap is in doubt at each edge, and that tap is the newest rising edge. A
wrong resolution moves the phase by one LSB. A counter bit caught in its
window is either the old or the new count, because the counter is
gray-coded, so the A/B correction still applies.

`tb_tdc_meta` confirms this over 3000 conversions:

* every code is within ±1 of the step count;
* the reference for the step count is taken 1.7 ps after each edge;
* the errors average to zero.

## The gray counter

`gray_counter.sv` counts rising edges of the selected tap in 5-bit gray code.
A gray counter changes exactly one bit per count. A sample caught during a
step is therefore either the old or the new value, never a mix of both.

The counter is a parity flip-flop plus one toggle flip-flop per bit:

* A parity flip-flop toggles on every edge.
* Bit 0 toggles when the parity is 0.
* Bit `k` (for `0 < k < 4`) toggles when the parity is 1, bit `k−1` is 1 and
  all lower bits are 0.
* The top bit toggles when the parity is 1 and all bits below bit 3 are 0,
  whatever bit 3 holds. Without this case the count would not wrap from
  `10000` back to `00000`.

`gray_carry_logic.sv` computes these enables. It writes each one as
"all pull-down conditions false", following the dynamic-logic form of the
original circuit. The bits are `tspc_tff` toggle flip-flops.

## Counter sampling correction

This part makes the counter reading exact.

The counter steps a short delay `T_D` after the oscillator passes phase 0.
Tap 12 clocks it by default. Tap 12 rises 4 phase steps (about 14 ps) after
tap 0. A counter sample taken just after phase 0 can therefore still show
the old count, or a count that is changing.

Each end of the interval is sampled twice:

* sample **A** at the edge;
* sample **B** `tau_C` = 39.8 ps later.

### Step 1 — choose A or B (per end)

| Phase at sample A | A | B | Used |
|---|---|---|---|
| upper half (≥ 16) | C | C | C (A) |
| upper half | C | C+1 | C (A): the counter stepped legitimately after A |
| lower half (< 16) | C | C+1 | C+1 (B): A was taken before the counter caught up |
| lower half | C+1 | C+1 | C+1 |

Written as a rule: use B only if the phase at A is below 16 and
B = A + 1 (mod 32). Otherwise use A. After this step each count is the count
"as of the last phase-0 crossing".

The rule is exact when `2·T_D < tau_C < T_D + T_osc/2`. At 9.12 GHz with
`T_D` about 11–14 ps this is 26.2 ps < `tau_C` < 66 ps. The buffer's 39.8 ps
sits inside that window. `ctrl` moves `T_D` in 3.4 ps steps:

* tap 9 gives 3 steps;
* tap 12 gives 4 steps;
* tap 6 gives 2 steps.

`tb_tdc_top` runs all three taps.

`tb_tdc_margins` sweeps all 32 taps. Every tap with `T_D < tau_C` (0 to
11 steps, up to 37.7 ps) converts without error. Every tap with a longer
`T_D` gives wrong codes. In this model the limit is `T_D < tau_C`, not
`2·T_D < tau_C`. The factor of two in the published margin covers the
counter's output glitch time `T_G`, and the model has no glitch. The
published margin is therefore a safe subset of the model's working range.

### Step 2 — half-period correction of the difference

The counter difference is then reduced by one whenever the end phase is
below the begin phase. In that case the phase subtraction borrowed one whole
period, and the counter difference already includes that period.

The published truth table has three inputs:

* the begin half-period bit;
* the end half-period bit;
* a "Diff" bit.

This design reads "Diff" as the no-borrow bit of the phase subtraction. With
that reading, every reachable row of the table equals "end phase < begin
phase". The combination "both phases in the upper half, with a borrow" is set
to decrement, by the same rule. The module looks the rows up directly from
the table. A testbench
compares it with a physical model over 40 000 random cases.

`counter_err_corr.sv` returns the corrected counter difference. It also
reports which samples used B and whether the decrement happened.

## Verification

Each testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog. A conversion is
not scored if its `start` or `stop` edge falls exactly on an oscillator
step. Such an edge is a true tie, and either code is correct.

| Testbench | What it checks |
|---|---|
| `tb_gray2bin`, `tb_gray_carry_logic` | Exhaustive truth tables |
| `tb_tspc_tff`, `tb_gray_counter` | Toggle, set/reset, full gray sequence and wrap; one bit changes per step |
| `tb_phase_mux`, `tb_saff_bank`, `tb_tauc_delay` | Tap selection, capture on the rising edge, delay value |
| `tb_thermo2bin` | Every phase, the worked example above, single bubbles |
| `tb_counter_err_corr` | Every table row, plus 40 000 cases against a physical timing model |
| `tb_mpro_model` | Tap order, duty cycle, and period at tune 0, 3 and 15 |
| `tb_tdc_backend` | 3000 conversions, two-edge latency, wrap-around |
| `tb_tdc_top` | 4000 random intervals at default parameters, with tune changed and the counter tap changed (taps 12, 9, 6) during the run |
| `tb_tdc_sine` | Two-tone run (5.37 MHz and 122.56 MHz at 250 MS/s, 512-point DFT, 3.07 ns full scale) |
| `tb_tdc_corners` | The same sine at the slow, typical and fast oscillator frequencies (5.71, 9.17, 13.83 GHz) |
| `tb_tdc_precision` | 8 DC levels × 1024 conversions with random start offset |
| `tb_saff_meta_model` | Flip-flop window swept from −6 to +8 ps in 0.1 ps steps, 40 edges each |
| `tb_tdc_meta` | 3000 conversions with the metastability model on: error within ±1 LSB, no bias |
| `tb_tdc_margins` | Counter clock tap swept over all 32 taps (T_D from 0 to 31 steps), 500 conversions each |
| `tb_tdc_linearity` | DNL and INL by the sine-histogram method: 16384 coherent samples, transition levels from the cumulative histogram |

In every testbench, each code from a system-level test must equal the count
of oscillator steps between `start` and `stop`.

`tb_tdc_top` passes all 3997 scored conversions. The run also checks that
each correction path is exercised:

* sample B used 417 times at begin and 421 times at end;
* 1922 half-period decrements;
* 1733 counter wraps.

System results:

| Test | This design | Published value |
|---|---|---|
| SNDR at 5 MHz | 57.80 dB (ENOB 9.31) | 57.10 dB (ENOB 9.19) |
| SNDR at 124 MHz | 58.14 dB (ENOB 9.36) | 57.56 dB (ENOB 9.27) |
| Range, slow / typical / fast | 9.13 / 9.82 / 10.41 bits | 9.13 / 9.82 / 10.41 bits |
| SNDR, slow / typical / fast | 53.39 / 57.39 / 61.38 dB | 54.63 / 57.10 / 63.13 dB |
| Single-shot precision, average | 0.395 LSB | close to 0.5 LSB |
| Max \|DNL\| / max \|INL\| | 0.41 / 0.26 LSB | 1.25 / 0.83 LSB |

At the fast corner (1359 steps full scale) the output wraps, as the
published design also does. The corner testbench unwraps the codes before
computing the SNDR. The model has no noise, so the single-shot precision is
pure quantization: `sqrt(f·(1−f))` LSB for an interval `f` of the way through
an LSB. The remaining DNL and INL come from the finite histogram (about 12
samples per code) and from codes fluttering between neighbours. The
oscillator steps themselves are uniform in the model.

## Building and running

Every module uses `` `timescale 1ps / 1fs ``. The package is compiled first.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/tdc_pkg.sv tb/tb_tdc_top.sv \
          --top-module tb_tdc_top -Mdir obj_tb_tdc_top
./obj_tb_tdc_top/Vtb_tdc_top
```

Use the same command for any other testbench. `-Irtl` lets Verilator find
the modules by name. The behavioural oscillator and delay need `--timing`.

## Choices and departures from the published design

Choices made where the published description is silent or unclear:

* **Tap order.** The rearrangement formula `i[n] = (N − 3n) mod 32`, read as
  the order in which taps rise, would make the decoded phase count down.
  The published worked example fixes the direction: the edge in row 9 is
  phase 23. The oscillator model and decoder follow the example. Taps rise
  in the order 0, 3, 6, ….
* **Bubble correction.** The source says only that bubble correction is
  used. The 3-input majority filter, the lowest-row priority and the
  `valid` flag are this design's choices.
* **"B higher than A"** is read as B = A + 1 modulo 32. The source does not
  say how the count wrap from 31 to 0 is treated.
* **"Diff" in the half-period table** is read as the no-borrow bit of the
  phase subtraction (see above). The decrement for "both upper, borrow" is
  this design's entry.
* **Pipeline.** The source says that all backend registers run on the
  sampling clock. It does not give the register stages. There is one input
  register stage and one output register stage. The asynchronous active-low
  reset is this design's choice.

Departures from the published design, all in the analog models:

* **Sampling flip-flops** are ideal by default. The optional timing model
  covers only the setup/hold window, resolved instantly to a random value.
  Two properties of the published sense-amplifier flip-flop are not
  modelled:
  * the clock-to-q delay and the resolution time;
  * input gating around the `start` and `stop` edges (this saves power and
    does not change the logic).
* **Oscillator**:
  * the model is noiseless and has no startup;
  * it has no unwanted oscillation modes and no mismatch between stages;
  * the frequency depends on `tune` along a straight line.
  There is no transient-noise result to compare with. Locking the frequency
  to a reference is outside the design.
* **Counter timing**:
  * the flip-flops are ordinary edge-triggered flip-flops, not dynamic
    true-single-phase-clock cells;
  * all counter bits change together, a fixed time after the chosen tap
    rises. The published bit-to-bit skew (11.3–13.1 ps) is not modelled.
* **Delay buffer.** The buffer is a fixed 39.8 ps transport delay. It does
  not vary with supply or temperature.
* **Sharing the core.** Time-interleaving is not built. It would mean
  several sampling front ends and backends sharing one oscillator and
  counter. The published design allows it but does not present it as its
  configuration.
* **Full 3.5 ns window.** Intervals longer than about 3.46 ns are not
  supported (see the timing section). The published measurements use
  3.07 ns.
