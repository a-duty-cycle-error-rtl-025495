// tb_pfd_cp: drives reference and divider edges with known offsets u = tau - t (both
// signs, up to several ns) and checks that each period moves the capacitor voltage by
// I_CP u / C plus the leakage I_LEAK T / C, that up/dn are exclusive and that both are
// low again after the later edge of each pair. The linear check runs on an instance with
// the output limit set out of reach; a second instance, with a 15x larger capacitor so
// that its random walk reaches the rails, is compared with a model that clips at +-V_LIM
// (V_LIM) after every period, and both rails must be reached. Both run without the
// offset current. A third instance has the offset pulse (I_OFF = 1 mA for T_OFF =
// 400 ps after every reference edge) and no leakage; just before each near-zero pair its
// voltage must equal the pump charge plus I_OFF T_OFF / C per reference edge so far.
// These three run with the pump noise off. A fourth instance equals the first but keeps
// the default white pump noise (-148 dBV/Hz at 153.6 MHz, 0.493 mV rms per reference
// edge). Its difference from the first instance is the accumulated noise, and the rms of
// that difference's steps must be within 15 % of the expected value, with a mean near 0.
`timescale 1ps / 1fs
module tb_pfd_cp;

  localparam real I_CP = 1.0e-3, C = 1.0e-12, I_LEAK = -85.0e-9, T = 6510.0;

  logic ref_c = 1'b0, div_c = 1'b0, rst_n = 1'b0, up, dn;
  real  vcp, vcp_c;
  logic up_c, dn_c;
  int   hit_hi = 0, hit_lo = 0;
  int   checks = 0, failures = 0;

  localparam real C_BIG = 15.0e-12, V_LIM = 0.7, I_OFF = 1.0e-3, T_OFF = 400.0;

  real  vcp_o;
  logic up_o, dn_o;

  localparam real SIGMA_N = 0.4929e-3;   // sqrt(10^-14.8 * 153.6e6) V

  real  vcp_n;
  logic up_n, dn_n;

  pfd_cp #(.V_LIM(1.0e6), .I_OFF(0.0)) dut_n (.v_ref(ref_c), .v_div(div_c), .rst_n(rst_n),
                                             .up(up_n), .dn(dn_n), .vcp(vcp_n));
  pfd_cp #(.V_LIM(1.0e6), .I_OFF(0.0), .NOISE_DBV(-400.0)) dut (.v_ref(ref_c), .v_div(div_c), .rst_n(rst_n), .up(up), .dn(dn),
                               .vcp(vcp));
  pfd_cp #(.V_LIM(1.0e6), .I_LEAK(0.0), .NOISE_DBV(-400.0)) dut_o (.v_ref(ref_c), .v_div(div_c), .rst_n(rst_n),
                                              .up(up_o), .dn(dn_o), .vcp(vcp_o));
  pfd_cp #(.C_CP(C_BIG), .I_OFF(0.0), .NOISE_DBV(-400.0)) dut_c (.v_ref(ref_c), .v_div(div_c), .rst_n(rst_n), .up(up_c),
                                .dn(dn_c), .vcp(vcp_c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0.1f (vcp=%0.6f)", what, $realtime, vcp);
    end
  endtask

  always @(up or dn) check(!(up && dn), "up and dn exclusive");

  initial begin
    real t0, u, v_exp, v_before, t_meas, v_c, v_o;
    real nd_prev, nd, s1, s2, sd, mn;
    int  n_n;
    nd_prev = 0.0; s1 = 0.0; s2 = 0.0; n_n = 0;
    #(1000.0);
    rst_n = 1'b1;
    t0 = 2000.0;
    v_exp = 0.0;
    v_c = 0.0;
    v_o = 0.0;
    t_meas = $realtime;
    for (int n = 0; n < 300; n++) begin
      u = (real'($urandom_range(0, 8000)) - 4000.0);   // ps
      #(t0 - $realtime);
      if (u >= 0.0) begin
        ref_c = 1'b1; #(u); div_c = 1'b1;
      end else begin
        div_c = 1'b1; #(-u); ref_c = 1'b1;
      end
      #(100.0);
      check(!up && !dn, "PFD idle after both edges");
      ref_c = 1'b0; div_c = 1'b0;
      // voltage, refreshed at the next event: compare after it
      v_exp = v_exp + I_CP * u * 1.0e-12 / C;
      v_o = v_o + (I_CP * u + I_OFF * T_OFF) * 1.0e-12 / C;
      t0 = t0 + T;
      #(t0 - 1.0 - $realtime);
      check((vcp_o - v_o) < 1.0e-6 && (vcp_o - v_o) > -1.0e-6, "offset pulse charge");
      ref_c = 1'b1; #(0.5); div_c = 1'b1; #(0.5);   // near-zero pair refreshes vcp
      ref_c = 1'b0; div_c = 1'b0;
      v_exp = v_exp + I_CP * 0.5e-12 / C;
      v_o = v_o + (I_CP * 0.5 + I_OFF * T_OFF) * 1.0e-12 / C;
      v_c = v_c + (I_CP * (u + 0.5) + I_LEAK * 2.0 * T) * 1.0e-12 / C_BIG;
      if (v_c > V_LIM) v_c = V_LIM;
      if (v_c < -V_LIM) v_c = -V_LIM;
      if (v_c == V_LIM) hit_hi++;
      if (v_c == -V_LIM) hit_lo++;
      check((vcp_c - v_c) < 1.0e-4 && (vcp_c - v_c) > -1.0e-4, "clipped charge per period");
      begin
        real leak;
        leak = I_LEAK * ($realtime - 1.0 - t_meas) * 1.0e-12 / C;
        check((vcp - (v_exp + leak)) < 1.0e-6 && (vcp - (v_exp + leak)) > -1.0e-6, "charge per period");
      end
      // noise steps: two reference edges, hence two samples, per step (the first step has one)
      nd = vcp_n - vcp;
      if (n > 0) begin
        s1 += (nd - nd_prev);
        s2 += (nd - nd_prev) * (nd - nd_prev);
        n_n++;
      end
      nd_prev = nd;
      t0 = t0 + T;
    end
    check(hit_hi > 0 && hit_lo > 0, "both output limits reached");
    mn = s1 / real'(n_n);
    sd = $sqrt(s2 / real'(n_n) - mn * mn) / $sqrt(2.0);
    $display("pump noise: %0.4f mV rms per sample (expected %0.4f), mean step %0.4f mV",
             sd * 1.0e3, SIGMA_N * 1.0e3, mn * 1.0e3);
    check(sd > 0.85 * SIGMA_N && sd < 1.15 * SIGMA_N, "pump noise rms");
    check(mn < 0.25 * SIGMA_N && mn > -0.25 * SIGMA_N, "pump noise mean");
    $display("limit hits: high %0d low %0d", hit_hi, hit_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 700.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
