# Standard-cell fractional-N ADPLL with a 2x4 MIMO time-to-digital converter

This is a fractional-N all-digital phase-locked loop. Every block could be built
from ordinary standard cells: no varactors, no analogue charge pump, no custom
delay line. Two ideas make that possible:

* **The oscillator is tuned by drive strength, not capacitance.** It has 256 identical
  ring oscillators whose outputs are tied together through tri-state drivers.
  Coarse tuning is the number of rings driving the shared nodes. Fine tuning is a
  4-bit code per delay cell that picks one of 15 slightly different NAND
  input-to-output paths.
* **The phase detector's quantisation noise is averaged away.** Four gated-ring
  TDC channels run in parallel, each with a slightly different resolution. Each
  channel also converts a delayed copy of the same time interval again, with its
  ring switched to a faster gear. That gives eight conversions of one interval
  at eight different resolutions. Weighting each by its own resolution and adding
  them averages the quantisation error by about sqrt(8). No single gate delay
  has to be fine.

The example configuration is the default for every parameter:
- 50 MHz reference;
- N.F = 17.25, so the DCO runs at 862.5 MHz;
- multiplication range 16-30;
- about 20 ps per TDC channel and 7 ps effective;
- 100 kHz loop bandwidth;
- 13 MHz crystal clock for the start-up calibration.

## Signal flow

```
            +-----------------------------------------------------------+
 clk_ref -->| mimo_tdc: phase detector -> 4 channels (+ delayed clone) |-- tdc_err (20 b, 1/8 ps)
 fb_clk  -->|           -> weighted sum (tdc_dsp)                       |
            +-----------------------------------------------------------+
                    |  n1/n2                                    |
                    v                                           v
             tdc_res_est (weights)                      loop_filter (type 2) -- lf_out (12 b), y_fx
                                                                 |
                          fine_max/2 + y_fx (4 fraction bits)    v
                                          dco_sd_dither (1st-order SD, DCO/8)
                                                                 | fine (7 b)
                                                                 v
 clk_xtal -> dco_cal_ctrl -- rings, stages --------------> dco_fine_map -> dco_model -> clk_dco
                                                                                  |
 n_int, n_frac -> mash11 (on fb_clk) -> N[k] = N + {-1..2} -> mmd_divider <-------+
                                                                 |
                                                               fb_clk
```

`adpll_ctrl` sequences the loop:
1. **CAL.** The DCO is calibrated with the loop open.
2. **LOCKING.** The loop is closed with the TDC in SIMO mode, which uses first conversions only.
3. **LOCKED.** Once `lock_detector` has seen feedback and reference counts agree
   within 4/4096 (about 0.1 %) over a 4096-cycle window, the TDC switches to MIMO
   mode and the online resolution estimator starts. If lock is lost, the
   controller falls back to LOCKING.

## The MIMO TDC (the part that needs the most care)

**Phase detector.** `tdc_phase_detector` produces a pulse from the first to the
second rising edge of `ref_clk` and `fb_clk`. It also produces a sign, which is
positive when the reference leads.

**Delayed clone.** `tdc_delay_line` makes a copy of the pulse 6 ns later. The only
requirement is that the clone falls in the idle part of the reference period:
4 to 8 ns after the pulse at a 100 MHz reference. The exact delay and matching
between channels do not matter.

**Channel.** Each `tdc_channel` gates a seven-stage ring (`tdc_ring_osc`).
- The ring runs only while the pulse or its clone is present.
- It holds its state in between, which makes it a gated ring.
- During the clone, the channel switches the ring to its faster gear (stage delay x0.9).
- Every ring node clocks an 8-bit counter.
- A conversion is the sum over the seven nodes of each counter's advance, taken
  modulo 256 per node. It is limited to 1023 and given the sign.
- The result is one transition count per interval: `n1` for the pulse and `n2` for the clone.
  One count equals twice the stage delay.

**Channel resolutions.** The four channels have resolutions T_i = 7 ps x sqrt(8) - 2i ps,
that is 19.8, 17.8, 15.8 and 13.8 ps. Second conversions are 0.9x those. The values
only need to be distinct; they need not be exact.

**Post-processor.** `tdc_dsp` multiplies each count by a 5-bit weight in ps and adds:

```
MIMO:  err = sum_i ( n1_i * w1_i + n2_i * w2_i )      ~ 8 x (time error in ps)
SIMO:  err = 2 * sum_i n1_i * w1_i                     (same scale)
```

The divide-by-8 of a true average is left out, so `err` has 1 LSB = 1/8 ps.

**Why the weights must track the real resolutions.** A count times a wrong weight
is a gain error that differs between channels. The averaging then stops
cancelling the quantisation error.

**Online estimation.** `tdc_res_est` estimates every resolution online, using the
fact that the loop already knows how far it moved the feedback edge:
- From one reference cycle to the next, the feedback edge moves by
  dt = (N[k] - N.F) x T_dco, where N[k] - N.F is the sigma-delta output minus the
  fraction.
- The ideal estimate for each conversion path is dt / (n[k] - n[k-1]).
- A divider is avoided by nudging the estimate with a sign-sign LMS step:
  `T += mu * sign(dt - T*dn) * sign(dn)`. It uses Q5.8 fixed point and skips small dn.
- The estimates are rounded to the 5-bit weights.
- Estimation runs only in LOCKED. The divide value of the measured period is
  the modulator output from two feedback edges earlier, and the top keeps that
  history for the estimator.

**Timing.** The DSP, estimator and loop filter are clocked on the falling reference
edge, 10 ns after the rising edge. By then the pulse (a few ns) and its clone
(6 ns later) are both converted. At reference clocks above about 70 MHz, the
clone would end after that edge and MIMO results would be a cycle late. That
needs a later DSP clock, which is not provided.

## DCO and its calibration

**Model.** `dco_model` is a behavioural model of the ring array:
- Each of the 256 rings has 7 cells.
- The `skip_sel1` / `skip_sel2` multiplexers shorten every ring to 5 or 3 cells.
- A drive enable per ring gives coarse tuning.
- Seven shared 4-bit fine codes, one per cell, give fine tuning.
- Code 0 stops the oscillator.

The model's half period is

```
sum over active cells of  PVT * (T_FIX + T_RC * 128 / rings_on)  -  rank(code) * T_FINE
```

The constants are this model's choice. At the nominal corner they cover the
0.65-1.35 GHz target range with margin, up to about 1.9 GHz. `PVT` scales every delay to imitate process corners.

**Fine word.** `dco_fine_map` turns the linear fine word into the seven codes:
- It walks one cell at a time through the 14 non-zero steps, in the measured
  slow-to-fast order 8, 2, 10, 4, 14, 12, 6, 9, 11, 15, 13, 1, 7, 5, 3.
- Cells that are not yet used sit at the slowest code.
- This keeps the word monotonic, with 14 x (cells) steps.

**Calibration.** `dco_cal_ctrl` runs once, from the 13 MHz crystal. It counts DCO and
reference cycles in crystal-clock windows (`window_counter`).
1. **PVT step.** It enables half the rings with 5 cells. The target count is
   reference count x N.F. It picks the ring length s in {3, 5, 7} whose
   predicted frequency (5/s x measured) is closest to the target. A slow corner
   therefore gets short rings and a fast corner long ones.
2. **Coarse step.** An 8-bit successive-approximation search finds the number of
   active rings that brings the DCO just below the target.

In total it uses 9 windows of 32 crystal cycles, about 25 us. The fine word starts
mid-range, so the loop can correct the remaining coarse error of up to roughly 30 MHz.

## Fractional divider

`mash11` is a second-order MASH 1-1 built from two first-order cores (`sd_core`).
Each core is an 8-bit accumulator whose carry is the 1-bit output. The outputs are
combined as `y1[n-1] + y2[n] - y2[n-1]`, giving a 4-bit signed offset in -1..2.

`mmd_divider` counts DCO cycles and, at each terminal count, loads the next divide
value N + offset. Both run on the feedback clock, so the divide value changes
once per feedback period.

## Loop filter

`loop_filter` realises

```
H(z) = K1 * (1-a)/(1 - a z^-1) * ( 1/(1 - z^-1) + K2 )
```

- The `K1` gain feeds a one-pole IIR with a = 0.990478 (`ALPHA_Q16` = 64912).
- The IIR output goes to an integrator and to a proportional path scaled by
  K2 = 1591, which is b/(1-b) for the zero b = 0.999372.
- `K1` = 26 and the final shift by 32 set the loop gain. They were chosen for the
  model's DCO and TDC gains, giving a loop that locks about 80 us after calibration.
- `en = 0` clears the state and the output saturates.
- Besides the rounded 12-bit output `y`, the filter gives `y_fx`, the same
  value with 4 fraction bits. The PLL uses `y_fx`.
- An optional LFSR dither with first-difference shaping can round `y`
  (`DITHER`). The PLL turns it off because the next stage dithers instead.

## Fine-word sigma-delta

The DCO's fine step is coarser than the loop needs. `dco_sd_dither` is a
first-order sigma-delta modulator that recovers the 4 fraction bits:
- The PLL adds `y_fx` to the mid-range fine word.
- The modulator runs on a clock enable every 8 DCO cycles, about 108 MHz, so it
  oversamples the 50 MHz reference.
- At each step it adds the fraction into an accumulator and outputs the
  integer part plus the carry.
- The fine word therefore toggles between two neighbouring codes, and its
  average is the fractional word.
- The word crosses from the loop-filter clock into the DCO domain safely. It is
  written on the falling reference edge and captured one DCO cycle after a
  two-flop-synchronised rising reference edge, while it is stable.

## Files and interfaces

`rtl/` has one module per file. `adpll_pkg` holds the fine-code table and the
ring-length enum. `adpll_top` is the whole PLL. Its inputs are:
- `clk_ref`, `clk_xtal`, `rst_n`;
- `n_int[5:0]`, `n_frac[7:0]` (F in 1/256);
- `t_dco_ps[11:0]`, the nominal DCO period that the estimator uses to convert modulator steps to time.

It brings out the DCO clock, the feedback clock, lock, and the internal control
words for observation.

Three modules are behavioural and not synthesizable, because their behaviour is a
delay:
- `dco_model`;
- `tdc_ring_osc`;
- `tdc_delay_line`.

Everything else is synthesizable RTL. That includes the DSP, estimator, filter,
divider, both modulators, calibration, lock detector and controller.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_adpll_top \
    -y rtl -y tb rtl/adpll_pkg.sv tb/tb_adpll_top.sv
./obj_dir/Vtb_adpll_top
```

The end-to-end tests run the full design at its default parameters:

- **`tb_adpll_top`** uses the example configuration (50 MHz reference, N.F = 17.25).
  - It checks that calibration picks 5-cell rings.
  - It checks that the loop locks, switches to MIMO mode and runs the estimator.
  - It checks that the DCO settles at 862.5 MHz within 0.1 %.
  - It counts each mechanism and fails if one never happened: every divide
    value -1..2, TDC errors of both signs, filter activity, lock, MIMO mode,
    second conversions and estimator updates.
  - It takes about half a minute of wall-clock time to simulate 0.8 ms.
- **`tb_adpll_nf_range`** runs the two ends of the range, N.F = 16.25 and 29.75.
  - Both calibrate, reach lock and enter MIMO mode.
  - Both hold the frequency within 0.02 %.
  - At one end or the other the feedback still slips about one cycle per
    100 us, depending on the loop gain. They are frequency-locked within the
    lock criterion, but phase lock at the range ends is not shown.
  - Changing `OUT_SHIFT` from 28 to 32 does not remove the slip, so it is not
    plain loop gain. It is the first thing to investigate.

## Departures and limits

- **Fine-word modulator.** The fine-word sigma-delta works on the 7-bit cell word,
  after the 12-bit filter output has been added to the mid-range start
  point. Its divide ratio (8) and fraction width (4 bits) are this design's
  choices.
- **Modulator output range.** The MASH output range is -1..2. The structure cannot
  produce the -3 that the original description quotes as the lower limit; the
  4-bit signed width would still hold it.
- **Bandwidth.** Loop filter `K1` and the output shift are this design's choices.
  The 500 kHz-bandwidth variants would need new `K1`, `ALPHA_Q16` and `K2` values,
  which are not given.
- **TDC choices.** The channel resolution spacing (-2 ps per channel) and the
  second-gear ratio (0.9) are this design's choices, as are the estimator's
  step size and thresholds.
- **Window sizes.** The lock window (4096 reference cycles) and the calibration
  window (32 crystal cycles) are this design's choices.
- **Range-end phase lock.** Only the example configuration (N.F = 17.25) is
  shown to stay phase-locked. At the range ends, see `tb_adpll_nf_range`.
- **Behavioural blocks.** The DCO, ring and delay models are idealised. There is
  no jitter, no mismatch between rings and no non-linearity, so the tests check
  function and lock, not phase noise.
