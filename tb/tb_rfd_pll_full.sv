// tb_rfd_pll_full: the PLL at its default parameters (no parameter list on the top),
// taken through complete lock-in runs with large crystal duty-cycle errors.
//
// Four runs, with crystal duty cycles of 58 %, 42 %, 60 % and 40 %. The 58 % run is the
// design example's phase-noise scenario; the others are the edges of the 40-60 % range
// the convergence figure is quoted for. Each run resets the loop, releases the reset on a
// reference edge, and sometimes skips one more edge so that either half of the crystal
// period comes first. The crystal phase against the free-running DCO differs from run to
// run. Gain calibration is on from the start. In each run:
//   - N_nonlin is the cycle after the last one in which the loop left its linear range.
//     That happens when the ADC code is outside the 6-bit span the design keeps after
//     lock, or when p[n] or r[n] sits at its saturation limit.
//   - The convergence time N_nonlin + 22 (22 cycles being the linear decay bound for a
//     20 % FDC gain error) must not exceed 412 reference cycles.
//   - The ADC then switches to 6 bits. Over 512 reference periods the DCO edge count
//     must match (N + alpha) f_ref. Neither a[n] nor d[n] may carry an f_ref/2 component,
//     and the 6-bit ADC must not saturate.
//     The f_ref/2 limit on a[n] is 0.15 LSB: the pump noise gives the 512-sample mean a
//     standard error of about 0.02 LSB, while an uncancelled duty-cycle error would show
//     as hundreds of LSB.
`timescale 1ps / 1fs
module tb_rfd_pll_full;
  import rfd_pkg::*;

  localparam real F_XTAL = 76.8e6;
  localparam real T_XTAL = 1.0e12 / F_XTAL;       // ps
  localparam real T_REF  = T_XTAL / 2.0;
  localparam int  N_INT  = 65;
  localparam int  N_RUNS = 4;
  localparam int  N_ACQ  = 600;
  localparam int  N_LR   = 100;
  localparam int  N_MEAS = 512;
  localparam int  N_LIN  = 22;
  localparam int  N_CONV_MAX = 412;
  localparam real DUTY [N_RUNS] = '{58.0, 42.0, 60.0, 40.0};

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

  rfd_pll dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // crystal oscillator model; its duty cycle is set per run
  real duty = 50.0;
  initial begin
    real t_rise;
    v_crystal = 1'b0;
    t_rise = 777.7;
    forever begin
      #(t_rise - $realtime);
      v_crystal = 1'b1;
      #(t_rise + duty / 100.0 * T_XTAL - $realtime);
      v_crystal = 1'b0;
      t_rise = t_rise + T_XTAL;
    end
  end

  longint unsigned dco_edges = 0;
  always @(posedge v_pll) dco_edges++;

  // linear-range tracking and measurement accumulators
  int  cyc = 0, last_nonlin = 0;
  bit  meas = 0;
  real alt_a = 0.0, alt_d = 0.0;
  int  n_meas = 0, n_lr_sat = 0;
  always @(posedge dig_clk) if (rst_n) begin
    cyc++;
    if (a_n > adc_t'(31) || a_n < adc_t'(-32) ||
        p_n == {1'b0, {(P_W-1){1'b1}}} || p_n == {1'b1, {(P_W-1){1'b0}}} ||
        r_n == {1'b0, {(R_W-1){1'b1}}} || r_n == {1'b1, {(R_W-1){1'b0}}})
      last_nonlin = cyc;
    if (adc_low_res && (a_n == adc_t'(31) || a_n == adc_t'(-32))) n_lr_sat++;
    if (meas) begin
      real s;
      s = (n_meas % 2 == 0) ? 1.0 : -1.0;
      alt_a += s * real'(a_n) / 32.0;
      alt_d += s * real'(d_n);
      n_meas++;
    end
  end

  task automatic wait_ref(input int n);
    repeat (n) @(posedge dig_clk);
  endtask

  initial begin
    longint unsigned e0, e1;
    real t0, t1, n_exp, n_got;
    int  n_conv, worst;
    alpha = ALPHA_DEFAULT;
    worst = 0;
    for (int run = 0; run < N_RUNS; run++) begin
      rst_n       = 1'b0;
      gcal_en     = 1'b0;
      adc_low_res = 1'b0;
      duty        = DUTY[run];
      #(20000.0 + real'($urandom_range(0, 13000)));
      @(posedge v_ref);
      if (run % 2 == 1) @(posedge v_ref);
      cyc = 0; last_nonlin = 0; n_lr_sat = 0;
      rst_n   = 1'b1;
      gcal_en = 1'b1;

      wait_ref(N_ACQ);
      n_conv = last_nonlin + 1 + N_LIN;
      if (n_conv > worst) worst = n_conv;
      $display("run %0d: duty %0.1f %%, N_nonlin %0d, N_conv %0d", run, duty, last_nonlin + 1, n_conv);
      check(n_conv <= N_CONV_MAX, "convergence within 412 reference cycles");
      check(last_nonlin < N_ACQ - 100, "no clipping after acquisition");

      adc_low_res = 1'b1;
      wait_ref(N_LR);
      @(posedge v_ref);
      e0 = dco_edges; t0 = $realtime;
      alt_a = 0.0; alt_d = 0.0; n_meas = 0;
      meas = 1;
      wait_ref(N_MEAS);
      @(posedge v_ref);
      e1 = dco_edges; t1 = $realtime;
      meas = 0;

      n_exp = (real'(N_INT) + real'(alpha) / 131072.0) * (t1 - t0) / T_REF;
      n_got = real'(e1 - e0);
      alt_a = alt_a / real'(n_meas);
      alt_d = alt_d / real'(n_meas);
      $display("run %0d: DCO edges %0.0f expected %0.2f, alternating a %0.4f steps, d %0.3f codes, g_hat %0.4f",
               run, n_got, n_exp, alt_a, alt_d, real'(g_hat) / 8192.0);
      check(n_got > n_exp - 3.0 && n_got < n_exp + 3.0, "mean output frequency is (N+alpha) f_ref");
      check(alt_a < 0.15 && alt_a > -0.15, "no f_ref/2 component at the ADC");
      check(alt_d < 0.5 && alt_d > -0.5, "no f_ref/2 component in d[n]");
      check(n_lr_sat == 0, "6-bit ADC does not saturate after lock");
    end
    $display("worst-case convergence time %0d reference cycles", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(T_REF * real'(N_RUNS * (N_ACQ + N_LR + N_MEAS + 20)) + 2.0e5);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
