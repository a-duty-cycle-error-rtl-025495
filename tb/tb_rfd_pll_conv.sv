// tb_rfd_pll_conv: convergence-time study over the spread of operating conditions the
// design is specified for. The crystal duty cycle lies between 40 % and 60 %, the
// uncalibrated FDC gain error between -20 % and +20 %, and the initial DCO frequency error
// between -15 MHz and +15 MHz. The worst case allowed is 412 reference cycles.
//
// N_PLL independent PLLs run side by side, each with its own conditions fixed at
// elaboration. The first eight are the corners of the range: duty 40/60 %, DCO error
// -15/+15 MHz, gain error -20/+20 %. The rest are drawn from a small linear congruential
// generator (seeded per instance) inside the same ranges, each with its own crystal
// phase. The gain error is applied through the charge-pump current. Gain calibration is
// on from the start. For each PLL:
//   - N_nonlin is the cycle after the last one in which the ADC code left the 6-bit span
//     or p[n] or r[n] sat at a saturation limit;
//   - N_conv = N_nonlin + 22 must not exceed 412 (22 cycles bound the linear decay for a
//     20 % gain error);
//   - after the ADC drops to 6 bits, the DCO edge count over 512 reference periods must
//     match (N + alpha) f_ref, and the ADC output must carry no f_ref/2 component.
//     The f_ref/2 limit on a[n] is 0.15 LSB: the pump noise gives the 512-sample mean a
//     standard error of about 0.02 LSB, while an uncancelled duty-cycle error would show
//     as hundreds of LSB.
// The worst and mean N_conv are printed.
`timescale 1ps / 1fs
module tb_rfd_pll_conv;
  import rfd_pkg::*;

  localparam int  N_PLL  = 40;
  localparam real F_XTAL = 76.8e6;
  localparam real T_XTAL = 1.0e12 / F_XTAL;       // ps
  localparam real T_REF  = T_XTAL / 2.0;
  localparam int  N_INT  = 65;
  localparam int  N_ACQ  = 700;
  localparam int  N_LR   = 100;
  localparam int  N_MEAS = 512;
  localparam int  N_LIN  = 22;
  localparam int  N_CONV_MAX = 412;

  // uniform value in [-1, 1) from instance index i and draw k
  function automatic real urand(input int i, input int k);
    longint unsigned s;
    s = 64'(i) * 64'd2654435761 + 64'(k) * 64'd40503 + 64'd12345;
    repeat (3) s = (s * 64'd6364136223846793005 + 64'd1442695040888963407);
    return real'(s >> 40) / real'(64'd1 << 23) - 1.0;
  endfunction

  function automatic real cond(input int i, input int k);   // k: 0 duty, 1 f_err, 2 gain
    if (i < 8) return ((i >> k) & 1) != 0 ? 1.0 : -1.0;
    return urand(i, k);
  endfunction

  logic   rst_n   [N_PLL];
  logic   gcal_en [N_PLL];
  logic   low_res [N_PLL];
  bit     done    [N_PLL];
  int     n_conv  [N_PLL];
  alpha_t alpha = ALPHA_DEFAULT;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what, input int i);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: PLL %0d: %s", i, what);
    end
  endtask

  for (genvar i = 0; i < N_PLL; i++) begin : g_pll
    localparam real DUTY  = 50.0 + 10.0 * cond(i, 0);
    localparam real F_ERR = 15.0e6 * cond(i, 1);
    localparam real G_ERR = 0.2 * cond(i, 2);

    logic  v_crystal = 1'b0;
    logic  v_pll, v_ref, v_div, dig_clk, pfd_up, pfd_dn;
    adc_t  a_n;
    r_t    r_n;
    p_t    p_n;
    d_t    d_n;
    v_t    v_n;
    eqc_t  eqc_n;
    gain_t g_hat;
    real   vcp, f_pll_hz;

    rfd_pll #(.I_CP(1.0e-3 * (1.0 + G_ERR)), .F_ERR0(F_ERR)) dut (
      .v_crystal(v_crystal), .rst_n(rst_n[i]), .gcal_en(gcal_en[i]), .adc_low_res(low_res[i]),
      .alpha(alpha), .v_pll(v_pll), .v_ref(v_ref), .v_div(v_div), .dig_clk(dig_clk),
      .a_n(a_n), .r_n(r_n), .p_n(p_n), .d_n(d_n), .v_n(v_n), .eqc_n(eqc_n), .g_hat(g_hat),
      .pfd_up(pfd_up), .pfd_dn(pfd_dn), .vcp(vcp), .f_pll_hz(f_pll_hz));

    // crystal with its own phase and duty cycle
    initial begin
      real t_rise;
      t_rise = 500.0 + (urand(i, 3) + 1.0) * 0.5 * T_XTAL;
      forever begin
        #(t_rise - $realtime);
        v_crystal = 1'b1;
        #(t_rise + DUTY / 100.0 * T_XTAL - $realtime);
        v_crystal = 1'b0;
        t_rise = t_rise + T_XTAL;
      end
    end

    longint unsigned dco_edges = 0;
    always @(posedge v_pll) dco_edges++;

    int  cyc = 0, last_nonlin = 0, n_meas = 0;
    bit  meas = 0;
    real alt_a = 0.0;
    always @(posedge dig_clk) if (rst_n[i]) begin
      cyc++;
      if (a_n > adc_t'(31) || a_n < adc_t'(-32) ||
          p_n == {1'b0, {(P_W-1){1'b1}}} || p_n == {1'b1, {(P_W-1){1'b0}}} ||
          r_n == {1'b0, {(R_W-1){1'b1}}} || r_n == {1'b1, {(R_W-1){1'b0}}})
        last_nonlin = cyc;
      if (meas) begin
        alt_a += ((n_meas % 2 == 0) ? 1.0 : -1.0) * real'(a_n) / 32.0;
        n_meas++;
      end
    end

    initial begin
      longint unsigned e0, e1;
      real t0, t1, n_exp, n_got;
      rst_n[i] = 1'b0; gcal_en[i] = 1'b0; low_res[i] = 1'b0; done[i] = 1'b0;
      #(20000.0);
      @(posedge v_ref);
      if (urand(i, 4) > 0.0) @(posedge v_ref);
      rst_n[i] = 1'b1;
      gcal_en[i] = 1'b1;
      repeat (N_ACQ) @(posedge dig_clk);
      n_conv[i] = last_nonlin + 1 + N_LIN;
      check(n_conv[i] <= N_CONV_MAX, "convergence within 412 reference cycles", i);
      low_res[i] = 1'b1;
      repeat (N_LR) @(posedge dig_clk);
      @(posedge v_ref);
      e0 = dco_edges; t0 = $realtime; meas = 1;
      repeat (N_MEAS) @(posedge dig_clk);
      @(posedge v_ref);
      e1 = dco_edges; t1 = $realtime; meas = 0;
      n_exp = (real'(N_INT) + real'(alpha) / 131072.0) * (t1 - t0) / T_REF;
      n_got = real'(e1 - e0);
      alt_a = alt_a / real'(n_meas);
      $display("PLL %2d: duty %5.2f %%, f_err %6.2f MHz, gain err %6.3f: N_conv %3d, edges %0.0f/%0.1f, alt a %0.4f",
               i, DUTY, F_ERR / 1.0e6, G_ERR, n_conv[i], n_got, n_exp, alt_a);
      check(n_got > n_exp - 3.0 && n_got < n_exp + 3.0, "mean output frequency is (N+alpha) f_ref", i);
      check(alt_a < 0.15 && alt_a > -0.15, "no f_ref/2 component at the ADC", i);
      done[i] = 1'b1;
    end
  end

  initial begin
    int worst, sum;
    #(25000.0);
    for (int i = 0; i < N_PLL; i++) wait (done[i]);
    worst = 0; sum = 0;
    for (int i = 0; i < N_PLL; i++) begin
      if (n_conv[i] > worst) worst = n_conv[i];
      sum += n_conv[i];
    end
    $display("convergence time over %0d PLLs: worst %0d, mean %0.1f reference cycles", N_PLL, worst,
             real'(sum) / real'(N_PLL));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(T_REF * real'(N_ACQ + N_LR + N_MEAS + 50) + 1.0e5);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
