# Duty-cycle-error-immune reference doubling for a ΔΣ-FDC fractional-N PLL

Doubling a PLL's reference frequency halves the in-band noise that the reference path contributes. It also lets the loop bandwidth be wider. The usual way to double a reference is to XOR the crystal signal with a delayed copy of itself. That makes a rising edge at every crystal edge, rising and falling alike. The catch is the crystal's duty cycle. If the crystal is high for a fraction D of its period rather than exactly half, the doubled reference's rising edges are alternately early and late by

    ΔT = (D − 0.5) · T_crystal / 2        (for example ±0.33 ns at D = 55 %)

A conventional PLL takes this alternating error for phase error and turns it into a large spur at f_ref/2. Earlier fixes measure the duty-cycle error and trim it out with a slow calibration loop. Making that loop accurate also makes it slow.

This design removes the error without measuring it. The phase detector is a delta-sigma frequency-to-digital converter (ΔΣ-FDC). Its digital loop contains a resonator: a filter with infinite gain at exactly f_ref/2. A stable loop cannot leave an f_ref/2 tone at the resonator's input. So the loop settles only when the divider's edges copy the reference's alternating edge displacement. The copy is made by modulating the divider modulus one period at a time. The charge pump and ADC then never see the error. The copy does appear in the PLL's phase-error word p[n], and a (1 + z⁻¹) notch ahead of the loop filter removes it, so the oscillator is never steered by it. Nothing is estimated, so there is no calibration to converge. What remains is the loop's own settling, a few tens of reference cycles in the simulations here.

The design example behind the default parameters:

- 76.8 MHz crystal, doubled to f_ref = 153.6 MHz;
- output (65 + α)·f_ref ≈ 9.984 GHz with α ≈ 7.85·10⁻⁴;
- 1.3 MHz loop bandwidth.

## The loop, one reference period at a time

```
 v_crystal ─► freq_doubler ─► v_ref ──┬──────────────────────────► dco (d latched on v_ref)
                                      ▼                                │
                   v_div ─────────► pfd_cp ─► vcp ─► sar_adc ─► a[n]   │ v_pll
                     ▲                                  │ done = digital clock
                     │                                  ▼              │
                    mmd ◄── v[n+1] ── fdc_digital ── r[n] ─► phase_acc ─► p[n] ─► dlf ─► d[n]
                     ▲                                                                  │
                     └──────────────────────── v_pll ◄──────────────────────────────────┘
```

Call t_n the n-th rising edge of v_ref and τ_n the n-th rising edge of the divider output v_div.

1. **PFD and charge pump** (`pfd_cp`). The pump pushes a current pulse of width |τ_n − t_n| into a 1 pF capacitor. The capacitor voltage therefore moves by I_CP·(τ_n − t_n)/C each period. It is never reset: it holds the running sum of the timing errors.
2. **ADC** (`sar_adc`). The ADC samples the capacitor 2.5 ns after t_n. After a 1.5 ns conversion it delivers a 7-bit word a[n] with 5 fractional bits. One integer step is Δ = 100 mV, one LSB Δ/32. Its `done` pulse is the clock of all the digital logic. The design assumes nothing about how this edge lines up with the DCO.
3. **FDC digital block** (`fdc_digital`). This block runs in the same clock cycle as the ADC result.
   - It scales a[n] by the gain estimate ĝ[n].
   - It adds e_qc[n−1], the quantization error of the last divider command, to cancel it. This gives c[n].
   - It runs c[n] through the resonator 1/(1 + z⁻¹)², which gives r[n].
   - It forms r_F[n+1] = 2·r[n] − r[n−2], the filter F(z) = z⁻¹(2 − z⁻²).
   - It quantizes r_F − α to an integer v[n+1] with a second-order error-feedback quantizer (`coarse_quantizer`).
   - v[n+1] is registered. The divider loads it at its next output edge, so τ_{n+2} − τ_{n+1} = N − v[n+1] DCO periods.
4. **Divider** (`mmd`). A loadable counter clocked by the DCO. Each output period is N − v DCO periods long. The output is high for the first half of the period.
5. **Phase accumulator** (`phase_acc`). r[n] is the frequency error in DCO periods per reference period. Accumulating it gives the phase error p[n] = p[n−1] + r[n], with saturation.
6. **Loop filter** (`dlf`). The transfer function is (1 + z⁻¹)·(K_P + K_I·z⁻¹/(1 − z⁻¹))·(1 − λ)/(1 − λz⁻¹). Its output is the 16-bit oscillator code d[n].
7. **DCO** (`dco`). The code is latched at the next reference edge. During t_{n+1} ≤ t < t_{n+2} the DCO runs at F_C + K_DCO·d[n], with K_DCO = 150 kHz per code.

The whole digital path from a[n] to d[n] and v[n+1] is combinational inside one cycle of the digital clock. The reference design notes that this arithmetic fits easily into a fraction of a reference period. The only hard timing constraint is loading v[n+1] before the divider's next output edge, and v[n+1] is ready a full period before that edge.

## Why the duty-cycle error cancels

Write the reference edges as t_n = nT_ref + ΔT·(−1)ⁿ. The timing error seen by the pump is τ_n − t_n. Its alternating part is an f_ref/2 tone at the input of the digital block, and the resonator's gain there is unbounded. The feedback from r through F(z) and Q_C to the divider is stable. So the only steady state is one where the alternating part of τ_n − t_n is zero, which means τ_n = t_n for the alternating part. The divider gets there with a modulus sequence N − v[n] that alternates about its mean by about ±2·ΔT·f_PLL. For example, at D = 55 % that is ±6.5 DCO periods.

The same alternating term shows up in r[n] and, after accumulation, in p[n] as ±f_PLL·ΔT·(−1)ⁿ. Here p[n] is the divider edge position in DCO periods. The loop filter's first factor, (1 + z⁻¹), has a zero at f_ref/2 and removes it exactly. The DCO code therefore carries no f_ref/2 component. The oscillator is neither modulated by the duty-cycle error nor steered away from the correct average frequency.

In the testbenches this shows up directly. Over a window after lock:

- the alternating part of a[n] is below 0.05 LSB;
- the alternating part of p[n] equals f_PLL·ΔT within a few percent;
- the alternating part of d[n] is a few hundredths of a code at most.

## Coarse quantizer and quantization-noise cancellation

`coarse_quantizer` turns the fractional r_F − α into the integer v. It uses the second-order error-feedback structure

    w[n] = x[n] − 2·e[n−1] + e[n−2],   v[n] = round(w[n]),   e[n] = v[n] − w[n]

so the error added to v is (1 − z⁻¹)²-shaped. The error e_qc = e[n] enters the pump one period later as a known timing step. The QNC adder in `fdc_digital` adds e_qc[n−1] to the scaled ADC word to remove it before the resonator. After lock the ADC therefore sees little more than one integer step of signal. It is then switched to 6 bits with the `adc_low_res` input. It needs the full 7 bits only while the loop acquires.

## Gain calibration

The cancellation of e_qc in the QNC adder is exact only if the forward gain from timing error to ADC word is unity, that is T_PLL·I_CP/(C·Δ) = 1. Real I_CP, C and Δ drift. `fdc_gain_cal` therefore adapts ĝ with a sign-LMS rule:

    ĝ[n+1] = ĝ[n] + K · sign(e_qc[n−1]) · c[n],   K = 2⁻⁶

Any part of c[n] correlated with e_qc[n−1] is uncancelled quantization error, and its sign says whether ĝ is too large or too small. The accumulator is 25 bits (Q2.23). ĝ is its top 15 bits (Q2.13) and resets to 1.0. Calibration runs only while `gcal_en` is high. The error that calibration leaves in p[n] is first-order high-pass shaped, so a modest K does not cost much phase noise. With a 10 % pump-current error, one noise-free run of `tb_rfd_pll` reaches ĝ within 1 % of 1/1.1 after about 770 cycles. It then stays there.

## Number formats

The reference design fixes the word widths. The binary points are this design's choice:

| signal | width | format | note |
|---|---|---|---|
| a[n] | 7 | Q2.5 | 6-bit mode: codes −32..31 |
| ĝ | 15 | Q2.13 | from a 25-bit Q2.23 accumulator |
| c[n] | 23 | Q5.18 | rounded to 14 fractional bits before the resonator |
| r[n] | 20 | Q6.14 | saturating |
| p[n] | 19 | Q5.14 | saturating |
| α, e_qc | 18 | Q1.17 | |
| v[n] | 7 | integer | modulus N − v, counter limited to 2..255 |
| d[n] | 16 | integer | DCO code |

The loop-filter gains are unsigned Q.10 parameters. K_P = 20 is 20480, K_I = 0.15625 is 160 and λ = 0.75 is 768. The 280 kHz setting, K_P = 5 and K_I = 0.0390625, is 5120 and 40. All of these are exact. The types and widths live in `rfd_pkg`.

## Analog parts: behavioural models

`freq_doubler`, `pfd_cp`, `sar_adc` and `dco` are behavioural models with real-valued internals. They are not synthesizable, and so neither is the top `rfd_pll`. The synthesizable core is `mmd`, `fdc_digital` (with `coarse_quantizer` and `fdc_gain_cal`), `phase_acc` and `dlf`. They carry these nonideal effects:

- **Pump leakage.** A static −85 nA. Across the alternating reference intervals it adds an alternating error, which the resonator cancels like the duty-cycle error itself.
- **Offset-current pulse.** After every reference edge the pump sources a fixed 1 mA for 400 ps. The loop absorbs this fixed charge by settling with the divider edge 400 ps ahead of the reference edge. The locked PFD therefore emits only dn pulses, of about 400 ps, and never crosses its zero-width region, which is where a PFD and pump are least linear.
- **Pump output swing.** Limited to ±0.7 V about mid-supply.
- **ADC capacitor mismatch.** The SAR model makes its decisions bit by bit against a binary-weighted capacitor DAC. Each unit capacitor is off by a Gaussian amount with σ = 2 %, drawn once from the seed parameter `SEED`.
- **Comparator metastability.** In a fraction 10⁻⁴ of conversions one comparison resolves at random.
- **White pump noise.** Once per reference period a Gaussian sample is added to the capacitor voltage. Its variance is the two-sided PSD (−148 dBV/Hz, parameter `CP_NOISE_DBV`) times f_ref, about 0.49 mV rms. That is a sixth of an ADC step.
- **Gain error.** Whatever you set through I_CP, C_CP or DELTA.
- **Initial DCO frequency error.** F_ERR0.

Time is in ps. The DCO schedules its edges from an absolute real-valued time, so no phase is lost to rounding.

## Where this design departs from the reference design

- **α is rounded to 18 bits.** The published α = 0.0007848739624 is 823·2⁻²⁰. The 18-bit fractional word here, Q1.17, holds 103·2⁻¹⁷. That shifts the output frequency by about 147 Hz.
- **Sign convention at Q_C.** The divider command is taken as a quantized version of r_F − α. Written the other way round, as −α − r_F, the loop has the wrong sign and does not settle. The convention used gives the loop whose poles all sit at the origin.
- **Pump output limit.** The charge pump clips at ±0.7 V. The published model does not state a swing. 0.7 V covers the ADC's ±0.2 V input range plus the 0.4 V in-period excursion of the offset pulse. An ideal unbounded integrator winds up during acquisition at duty-cycle errors near 10 %: the ADC sits at full scale, the capacitor reaches tens of volts, and the loop stays in a limit cycle. A real pump stops at its rails, and with the clip every tested condition locks.
- **Offset-pulse details.** The published design gives the 400 ps pulse width and says the pump's pMOS source provides it. Its amplitude (here I_CP) and its start (here the reference edge) are this design's.
- **Only the white pump noise is modelled.** The reference noise, the pump's flicker noise and the DCO noise are not, and neither is pump nonlinearity, which the published model takes from a transistor-level lookup table. The phase-noise and jitter figures therefore cannot be reproduced with these models. The cancellation, the convergence and the calibration can.
- **No lock detector.** The switch to the 6-bit ADC and the enable of gain calibration are top-level inputs.
- **Digital details of this design's own:** the binary points above, rounding of c[n] before the resonator, saturation of r and p, and reset values: all state zero, ĝ = 1.0. The DCO centre frequency is F_C = 9.984 GHz.

## Simulation

All testbenches are self-checking. Each prints `TB_RESULT checks=<n> failures=<n>` and stops, and has a watchdog. With plain Verilator 5:

```
verilator --binary --timing --assert -Wno-ZERODLY \
    rtl/rfd_pkg.sv $(ls rtl/*.sv | grep -v rfd_pkg) tb/tb_rfd_pll_full.sv \
    --top-module tb_rfd_pll_full
./obj_dir/Vtb_rfd_pll_full
```

Replace `tb_rfd_pll_full` with any other testbench name. The remaining warning, ZERODLY, is about delays computed at run time in the behavioural models, which is intended. The system-level tests finish in seconds, except `tb_rfd_pll_conv`, which takes about a minute.

| testbench | what it shows |
|---|---|
| `tb_rfd_pll_full` | Defaults, no parameter overrides. Four lock-ins at duty cycles of 58, 42, 60 and 40 %, each with convergence ≤ 412 cycles, exact average frequency, no f_ref/2 in a[n] or d[n], and no 6-bit ADC saturation. Worst case seen: 72 cycles. |
| `tb_rfd_pll` | End to end at D = 55 %, a 5 MHz DCO offset and a 10 % pump-current error, with matched ADC capacitors so that the ideal ĝ is known exactly, and without pump noise. Acquisition, then gain calibration, then the 6-bit ADC. Checks the frequency, the cancellation (a, p, d), ĝ within 1 %, dn-only PFD pulses after lock, and that each mechanism occurred: ADC overload, modulus change, quantizer error feedback, calibration steps and 6-bit mode. |
| `tb_rfd_pll_conv` | 40 PLLs side by side over duty 40–60 %, ±15 MHz and ±20 % gain error (the 8 corners plus 32 random points). Convergence ≤ 412 cycles, then lock. Worst seen: 345 cycles (40 % duty, +15 MHz, +20 % gain, where a pump-noise sample pushes one ADC code out of the 6-bit range late in acquisition), mean 56. |
| `tb_rfd_pll_bw280` | The 280 kHz loop-filter setting, locking at 58 % and 42 % duty from a 10 MHz offset. |
| `tb_<block>` | One per block, each against an independent model: the quantizer's error recursion, the LMS step, the cycle-accurate FDC digital block, saturation, the filter response and its f_ref/2 notch, divider moduli, the doubler's edge times, pump charge, offset pulse and clipping, ADC codes with and without mismatch and metastability, and DCO frequency and latching. |

Convergence in these tests is N_nonlin + 22. N_nonlin is the cycle after the last cycle in which the ADC code left the 6-bit range or p or r was saturated. The 22 cycles are the linear-region decay bound for a 20 % gain error. The published figures are a worst case of 412 and a mean of 157 over 10,000 noisy runs. The runs here are few and carry only the white pump noise, so they show the design meets the bound but are not a statistical match.

To try other conditions, change the localparams at the top of `tb_rfd_pll`: `DUTY_ERR`, `F_ERR0`, `CP_GAIN_ERR` and the phase lengths. The top's parameters cover the loop-filter gains (`K_P`, `K_I`, `LAMBDA`), the calibration step (`K_SHIFT`), the analog values (`I_CP`, `C_CP`, `DELTA`, `I_LEAK`, `K_DCO`, `F_C`), the ADC's mismatch and metastability (`SIGMA_C`, `P_META`) and the doubler delay `T_DL`.
