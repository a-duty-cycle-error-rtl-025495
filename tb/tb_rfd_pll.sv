// tb_rfd_pll: end-to-end test of the duty-cycle-error-immune fractional-N PLL.
//
// A crystal model drives the PLL with a 76.8 MHz square wave whose duty cycle is off
// 50 % by DUTY_ERR percentage points. The DCO starts F_ERR0 away from the target and the
// charge pump current is off by CP_GAIN_ERR, so the FDC forward-path gain is wrong. The
// ADC's capacitors are matched and the pump noise is off here: mismatch would shift the
// ideal g_hat, and noise would make the cycle at which one run last leaves the 1 % band
// a random quantity rather than the mean settling time. The other system-level tests
// run with the default mismatch and noise. The
// test runs through four phases:
//   1. acquisition with the 7-bit ADC, gain calibration off;
//   2. gain calibration on;
//   3. ADC switched to 6 bits (low-resolution mode after lock);
//   4. measurement window.
// Checks (reference values computed from the stimulus, not from the design):
//   - mean output frequency over the window is (N + alpha) f_ref, counted in DCO edges;
//   - the ADC output carries no alternating (f_ref/2) component, i.e. the duty-cycle
//     error was cancelled ahead of the charge pump;
//   - p[n] does carry it, with amplitude f_PLL * dT (dT = (D/100 - 0.5) T_ref), and the
//     DCO code d[n] does not (notch);
//   - g_hat converges to 1/(1 + CP_GAIN_ERR) within 1 %, and stays there for the last
//     100 cycles of the calibration phase (the cycle count to get there is printed);
//   - the 6-bit ADC never saturates after lock;
//   - with the offset-current pulse, the locked PFD emits a dn pulse every period and
//     never an up pulse;
//   - each mechanism (ADC overload, MMD modulus change, Q_C error feedback, gain
//     calibration step, low-resolution ADC mode) happened at least once.
`timescale 1ps / 1fs
module tb_rfd_pll;
  import rfd_pkg::*;

  localparam real DUTY_ERR    = 5.0;       // percentage points
  localparam real F_ERR0      = 5.0e6;     // Hz
  localparam real CP_GAIN_ERR = 0.10;
  localparam int  N_ACQ       = 800;       // reference periods per phase
  localparam int  N_CAL       = 1500;
  localparam int  N_LR        = 200;
  localparam int  N_MEAS      = 1024;

  localparam real F_XTAL = 76.8e6;
  localparam real T_XTAL = 1.0e12 / F_XTAL;       // ps
  localparam real T_REF  = T_XTAL / 2.0;
  localparam int  N_INT  = 65;

  logic   v_crystal, rst_n, gcal_en, adc_low_res;
  alpha_t alpha;
  logic   v_pll, v_ref, v_div, dig_clk, pfd_up, pfd_dn;
  adc_t   a_n;
  r_t     r_n;
  p_t     p_n;
  d_t     d_n;
  v_t     v_n;
  eqc_t   eqc_n;
  gain_t  g_hat;
  real    vcp, f_pll_hz;

  // matched ADC capacitors, so that the ideal g_hat is exactly 1/(1 + CP_GAIN_ERR)
  rfd_pll #(.I_CP(1.0e-3 * (1.0 + CP_GAIN_ERR)), .F_ERR0(F_ERR0), .SIGMA_C(0.0),
            .CP_NOISE_DBV(-400.0)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // crystal oscillator model with duty-cycle error
  initial begin
    real t_rise, t_hi;
    v_crystal = 1'b0;
    t_hi   = (0.5 + DUTY_ERR / 100.0) * T_XTAL;
    t_rise = 1234.5;
    forever begin
      #(t_rise - $realtime);
      v_crystal = 1'b1;
      #(t_rise + t_hi - $realtime);
      v_crystal = 1'b0;
      t_rise = t_rise + T_XTAL;
    end
  end

  // DCO edge counter
  longint unsigned dco_edges = 0;
  always @(posedge v_pll) dco_edges++;

  // mechanism counters
  int n_adc_ovl = 0, n_mod_chg = 0, n_eq_nz = 0, n_gcal = 0, n_lowres = 0, n_lr_sat = 0;
  int cyc = 0, n_gcal_cyc = 0, gcal_last_out = 0;
  gain_t g_prev;
  always @(posedge dig_clk) begin
    cyc++;
    if (a_n == adc_t'(63) || a_n == adc_t'(-64)) n_adc_ovl++;
    if (v_n != 0) n_mod_chg++;
    if (eqc_n != 0) n_eq_nz++;
    if (g_hat != g_prev) n_gcal++;
    g_prev = g_hat;
    if (gcal_en && !adc_low_res) begin
      n_gcal_cyc++;
      if (real'(g_hat) / 8192.0 > 1.01 / (1.0 + CP_GAIN_ERR) ||
          real'(g_hat) / 8192.0 < 0.99 / (1.0 + CP_GAIN_ERR))
        gcal_last_out = n_gcal_cyc;
    end
    if (adc_low_res) begin
      n_lowres++;
      if (a_n == adc_t'(31) || a_n == adc_t'(-32)) n_lr_sat++;
    end
  end

  // measurement accumulators
  bit  meas = 0;
  real alt_a = 0.0, alt_p = 0.0, alt_d = 0.0, sum_a2 = 0.0;
  int  n_meas = 0;
  always @(posedge dig_clk) if (meas) begin
    real s;
    s = (n_meas % 2 == 0) ? 1.0 : -1.0;
    alt_a += s * real'(a_n) / 32.0;
    alt_p += s * real'(p_n) / 16384.0;
    alt_d += s * real'(d_n);
    n_meas++;
  end

  // PFD pulse polarity after lock (offset-current linearization)
  int n_up_meas = 0, n_dn_meas = 0;
  always @(posedge pfd_up) if (meas) n_up_meas++;
  always @(posedge pfd_dn) if (meas) n_dn_meas++;

  task automatic wait_ref(input int n);
    repeat (n) @(posedge dig_clk);
  endtask

  initial begin
    longint unsigned e0, e1;
    real t0, t1, n_exp, n_got, dT, g_exp, g_got;
    rst_n       = 1'b0;
    gcal_en     = 1'b0;
    adc_low_res = 1'b0;
    alpha       = ALPHA_DEFAULT;
    g_prev      = '0;
    // release the reset on a reference edge: divider and reference start aligned
    #(20000.0);
    @(posedge v_ref);
    rst_n = 1'b1;

    wait_ref(N_ACQ);
    gcal_en = 1'b1;
    wait_ref(N_CAL);
    adc_low_res = 1'b1;
    wait_ref(N_LR);

    // measurement window: N_MEAS reference periods
    @(posedge v_ref);
    e0 = dco_edges; t0 = $realtime;
    meas = 1;
    wait_ref(N_MEAS);
    @(posedge v_ref);
    e1 = dco_edges; t1 = $realtime;
    meas = 0;

    n_exp = (real'(N_INT) + real'(alpha) / 131072.0) * (t1 - t0) / T_REF;
    n_got = real'(e1 - e0);
    $display("window: %0.3f ref periods, DCO edges %0.0f expected %0.2f", (t1 - t0) / T_REF, n_got, n_exp);
    check(n_got > n_exp - 3.0 && n_got < n_exp + 3.0, "mean output frequency is (N+alpha) f_ref");

    dT = DUTY_ERR / 100.0 * T_REF;                    // ps
    alt_a = alt_a / real'(n_meas);
    alt_p = alt_p / real'(n_meas);
    alt_d = alt_d / real'(n_meas);
    $display("alternating parts: a %0.4f steps, p %0.3f DCO periods (expected |%0.3f|), d %0.3f codes",
             alt_a, alt_p, dT * (real'(N_INT) / T_REF), alt_d);
    check(alt_a < 0.05 && alt_a > -0.05, "no f_ref/2 component at the ADC");
    check((alt_p < 0 ? -alt_p : alt_p) > 0.8 * (dT < 0 ? -dT : dT) * real'(N_INT) / T_REF &&
          (alt_p < 0 ? -alt_p : alt_p) < 1.2 * (dT < 0 ? -dT : dT) * real'(N_INT) / T_REF, "p[n] carries f_PLL * dT");
    check(alt_d < 0.5 && alt_d > -0.5, "notch keeps f_ref/2 out of d[n]");

    g_exp = 1.0 / (1.0 + CP_GAIN_ERR);
    g_got = real'(g_hat) / 8192.0;
    $display("g_hat %0.4f expected %0.4f", g_got, g_exp);
    check(g_got > 0.99 * g_exp && g_got < 1.01 * g_exp, "gain calibration converged within 1 %");
    $display("gain calibration stayed within 1 %% of its target from cycle %0d after enable", gcal_last_out + 1);
    check(gcal_last_out < N_CAL - 100, "gain calibration settled within the calibration phase");

    check(n_lr_sat == 0, "6-bit ADC does not saturate after lock");
    $display("PFD pulses in the window: up %0d, dn %0d", n_up_meas, n_dn_meas);
    check(n_up_meas == 0 && n_dn_meas >= N_MEAS - 2, "offset current keeps the locked PFD on dn pulses only");
    $display("mechanisms: adc overload %0d, modulus change %0d, e_qc nonzero %0d, gcal steps %0d, low-res cycles %0d",
             n_adc_ovl, n_mod_chg, n_eq_nz, n_gcal, n_lowres);
    check(n_adc_ovl > 0, "ADC overload during acquisition happened");
    check(n_mod_chg > 0, "MMD modulus differed from N");
    check(n_eq_nz > 0, "Q_C quantization error fed back");
    check(n_gcal > 0, "gain calibration stepped");
    check(n_lowres > 0, "low-resolution ADC mode used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(T_REF * real'(N_ACQ + N_CAL + N_LR + N_MEAS + 400));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
