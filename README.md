# Low-power all-digital PLL with a self-calibrating, modulator-driven DCO

This is a 1.4 GHz all-digital phase-locked loop (ADPLL) for a low-power
transceiver. It runs from a 4 MHz reference and divides by N = 350. Its
oscillator is a small three-stage ring oscillator tuned by a tiny current, so
the raw oscillator gain is very high and varies a lot with process, voltage
and temperature.

Three ideas keep such an oscillator usable:

- **Fine tuning through a delta-sigma modulator.** A 19-bit control word goes
  through a second-order MASH 1-1 modulator. The modulator drives only three
  equal current switches, and a two-pole analog filter smooths their
  switching into a tuning current. A 19-bit resolution thus costs three
  switches instead of a 19-bit current DAC.
- **Gain normalisation through the modulator's modulus.** The accumulators
  wrap at a programmable modulus K instead of 2^19. Because the output duty
  cycle is code/K, changing K rescales the oscillator gain. A calibration
  circuit measures the real tuning line at start-up. It then picks K so that
  every corner has the same 400 MHz / 2^19 ≈ 763 Hz per code step. It also
  picks an offset L so that the nominal code lands on 1.4 GHz.
- **A bang-bang loop with gain scheduling.** The phase detector is a pair of
  flip-flops that reports only "early" or "late". A proportional-integral
  filter with large gains pulls the loop in. A gain controller then steps
  the gains down to α = 1, β = 8 for low jitter, and flags lock.

```
            +------+   pdout   +-----+ dlfout +----------------------------------+
 ref_clk -->| bbpd |---------->| dlf |------->| cdco                             |
 (4 MHz)    +------+           +-----+        |  code = base + dlfout - L        |
               ^                 ^ α,β        |  -> MASH 1-1 (modulus K)         |--+--> f_out
               |              +-----+         |     at f_out/4                   |  |    (1.4 GHz)
               |              | dgc |--lock   |  -> 3 switches -> filter -> ring |  |
               |              +-----+         +----------------------------------+  |
               |                                  ^ K, L, D1/D2                      |
               |   f_fb    +--------------+  cap  +-----+                            |
               +-----------| freq_divider |------>| dcc |                            |
                           | (÷175 x2, or |       +-----+                            |
                           |  freq. det.) |<-------------------------------------------+
                           +--------------+
```

## Start-up sequence

`adpll_top` runs in two phases, shown on its `mode` output.

1. **Calibration** (`MODE_CAL`, only if `dcc_en = 1`). The loop is open.
   The calibration circuit (`dcc`) drives two fixed codes into the
   oscillator. The shared counter works as a frequency detector. After
   161 reference periods (about 40 µs), K and L are known.
2. **Tracking** (`MODE_TRACK`). The counter becomes the divide-by-175 stage
   of the divider, and the loop closes. The base code is the nominal
   1.4 GHz code 2^17. The filter output is added to it and L is subtracted.
   The gain controller walks through its four gain sets, then raises
   `locked`.

With `dcc_en = 0`, tracking starts at once with K = 2^19 and L = 0. The
starting frequency then carries the full raw error of the oscillator. At the
typical corner that is about 5 MHz (751 instead of 763 Hz per code). A
bang-bang loop acquires frequency poorly. In simulation it did not lock from
that error within 12000 reference periods. The loop relies on calibration to
start within about 1–2 MHz of the target.

## The oscillator: `cdco`, `dsm_mash11`, `dsm_clkgen`, `dco_analog`

`cdco` forms the control word, saturates it to [0, K−1] and feeds the
modulator.

`dsm_mash11` is two first-order accumulators in cascade, each with modulus
K. It has three registered outputs:

- SDMOut1: the stage-1 carry, delayed one clock.
- SDMOut2: the stage-2 carry, delayed one clock.
- SDMOut3: the inverse of SDMOut2, delayed one more clock.

Their sum minus one is code/K plus second-order shaped quantisation noise.
On average the switches carry 1 + code/K current units. Stage 2 takes the
stage-1 residue before stage 1's register. With each output a single
register stage, this keeps the cancellation of stage-1 noise exact.

The modulator clock is the oscillator output divided by four (`dsm_clkgen`).
The oversampling ratio therefore follows the output frequency. The control
words come from the 4 MHz domain without synchronisers. They change at most
once per reference period, hundreds of modulator clocks apart.

`dco_analog` is a **behavioural, non-synthesizable model** of the current
switches, the filter and the ring oscillator. Its frequency is
`F_LO + (F_HI − F_LO)·(u − 1)`, where u is the switch sum (0 to 3 units)
after two real poles at 800 kHz. A steady duty of code/K thus gives
`F_LO + (code/K)·(F_HI − F_LO)`. The filter is stepped at every half period
with the exact pole responses. Edge times are kept as real numbers, so the
mean frequency is exact far below one code step. The model has no phase
noise and its tuning line is straight. `F_LO_HZ`/`F_HI_HZ` (parameters of
`adpll_top`) select the process corner; the default is typical,
1.2965–1.6903 GHz.

## Calibration: `dcc`

The target tuning line is `f = 1.3 GHz + 400 MHz·code/2^19`, so 1.4 GHz is at
code 2^17.

1. Apply D1 = 2^17. Wait 16 periods for the filter, then sum the counter over
   64 reference periods. Call the sum S1.
2. Apply D2 = 3·2^17 and do the same to get S2.
3. Compute the modulus, using the measured gain over the target gain:
   `K = 2^19·(S2 − S1)·f_ref / (64·(D2 − D1)·763 Hz)`.
   K is clamped to [2^18, 2^20 − 1], so gains from half to double the target
   can be normalised.
4. Compute the offset from the frequency error at D1 in target code steps:
   `L = (f1' − f1)/K_DCO`.
5. Correct the offset for the gain error. With L_GAIN_CORR = 1 (the
   default), subtract `D1·(K − 2^19)/2^19`. L then becomes the offset of the
   gain-normalised line at code 0, `(F_LO − 1.3 GHz)/K_DCO`.

Summing 64 periods matters. One 4 MHz period resolves only 4 MHz, and the
sum brings the gain error to about 0.01 %. The divisions are by constants,
so each is a multiplication by a fixed-point reciprocal (16 fractional bits)
computed at elaboration. The circuit has no divider.

K and L stay at their neutral values (2^19, 0) until the end of calibration.
Their results take effect together, when `done` rises.

## Loop filter and gain control: `bbpd`, `dlf`, `dgc`

`bbpd` samples `f_fb` with `ref_clk` and re-times the result once. PDOUT = 1
means the feedback is early. `dlf` maps PDOUT to a sign s: +1 for PDOUT 0,
−1 for PDOUT 1. It accumulates Ψ += α·s and registers DLFOUT = β·s + Ψ.

The detector flop and the output register give a loop delay of D = 2. The
bang-bang stability rule α/β < 2/(2D+1) = 0.4 holds for every gain set.

`dgc` uses these sets (α, β):

| Set | α | β |
|-----|---|---|
| 1 (pull-in) | 16 | 255 |
| 2 | 4 | 64 |
| 3 | 2 | 16 |
| 4 (final) | 1 | 8 |

With the final set, one detector decision moves the output by at most
(α+β)·763 Hz ≈ 6.9 kHz. That is below the 28 kHz step that a 20 ppm
resolution allows.

The lock test counts PDOUT reversals. A run of equal PDOUT values up to
RUN_MAX = 16 periods long counts as one reversal. LOCK_CNT = 64 reversals in
a row mean "settled at this gain", and the next set is applied. After the
last set the controller waits SETTLE_CYCLES = 256 periods and raises
`locked`. Ψ is kept across gain changes, so the frequency does not jump.

## The shared counter: `fd_counter`, `freq_divider`

One 10-bit counter, clocked by `f_out`, does two jobs. It is never reset
directly. A request is captured by a flip-flop (Res_Q), and the counter
clears on the next edge.

- **Frequency detector** (calibration). The reference edge, synchronised into
  the `f_out` domain, raises the request. The count of the finished period
  is captured in `cap`. It covers up to 1023 × 4 MHz ≈ 4 GHz.
- **Divide-by-175** (tracking). The request is raised at count 173, so each
  period is 175 clocks and Res_Q is the terminal pulse. A toggle flip-flop
  turns the pulse into a 50 % clock, for ÷350 in total. It is re-timed by one
  more flip-flop to give `f_fb`.

The original counter uses 2-bit ripple sections re-synchronised by delayed
clocks. This one is a plain synchronous counter with the same count sequence.

## Where this RTL departs from the original design or fills gaps

- **Target tuning line.** The 1.3 GHz code-0 frequency of the target line is
  a choice. Only the 400 MHz range and the 1.4 GHz output are given.
- **Gain correction of L.** This is an addition. Without it, the offset
  formula leaves a start-up error of D1·(K'/K_DCO − 1) codes. That is up to
  20 MHz for 610 or 915 Hz/LSB oscillators. The bang-bang loop then slipped
  cycles for over 30000 reference periods. Set L_GAIN_CORR = 0 for the plain
  formula.
- **Calibration constants.** D1, D2, the 16-period wait, the 64-period sums,
  the fixed-point constants and the K clamp are choices.
- **Gain sets and lock test.** The first three gain sets and the run-length
  lock test are choices. Only the final set (1, 8) and the order of the steps
  are given. A smaller first set (8, 64) was tried. It made the loop slip
  cycles for thousands of periods.
- **Phase detector.** It is an ordinary flip-flop. The sense-amplifier
  flip-flop and its small dead zone are not modelled.
- **Signal widths.** The widths (19-bit code, 20-bit K, 21-bit signed filter
  words), the saturation in the filter and in `cdco`, and all reset values
  are choices.
- **Analog parts.** They are behavioural: a linear tuning line, an ideal
  two-pole filter and no noise. The output buffer and the bias and bypass
  circuits have no logic function and are not included.

## Simulating

Every file sets its own `timeunit 1ps; timeprecision 1fs`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/adpll_pkg.sv tb/tb_adpll_top.sv --top-module tb_adpll_top
./obj_dir/Vtb_adpll_top
```

Replace `tb_adpll_top` with any testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog.

| Testbench | What it shows |
|-----------|---------------|
| `tb_bbpd`, `tb_dlf`, `tb_dgc` | Two-flop detector delay; filter against an integer model, including saturation; gain steps, lock flag and restart of the count |
| `tb_dsm_mash11` | For several codes and moduli, the running sum of the output stays within 3 of n·code/K; output range −1 to 2; SDMOut3 relation |
| `tb_dco_analog`, `tb_cdco` | Tuning line, filter step response, offset, saturation and modulus scaling |
| `tb_fd_counter`, `tb_freq_divider` | Counts per period and ÷350 duty at 1.3, 1.4 and 1.7 GHz |
| `tb_dcc` | K within 0.1 % and L within 100 codes of its exact value for five oscillators from 610 to 915 Hz/LSB |
| `tb_adpll_top` | Full design at default parameters: calibration, 3 gain steps, lock at about 4100 reference periods, 70000 ± 2 output clocks in 200 periods (1.4 GHz) |
| `tb_adpll_corners` | Eight oscillators: five process corners, 610 and 915 Hz/LSB, and the measured 1.338–1.715 GHz range; each must lock at 1.4 GHz within 12000 periods |

`tb_adpll_top` takes about a second; `tb_adpll_corners` takes about 35 s.

## How far to trust it

The digital blocks are synthesizable and checked against independent
models. Loop behaviour rests on the behavioural oscillator. Lock times and
stability margins are measured with a noiseless, straight tuning line. On
silicon, the filter's extra poles and zeros, reference jitter and a curved
tuning line will change them. Phase noise and power are not modelled.
