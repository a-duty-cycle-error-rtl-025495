// pfd_cp: behavioural model of the phase-frequency detector, charge pump and
// integrating capacitor of the delta-sigma FDC.
//
// A tri-state PFD: a rising reference edge raises up (or ends a running dn pulse), a
// rising divider edge raises dn (or ends a running up pulse). While up is high the pump
// sources I_CP into C, while dn is high it sinks I_CP, so each reference period moves the
// capacitor voltage by I_CP (tau_n - t_n) / C, with tau_n and t_n the n-th divider and
// reference edges (eq. (35) of the reference design). A constant leakage current I_LEAK
// (-85 nA in the reference design) is integrated too.
//
// Offset-current linearization, as in the reference design: a fixed current pulse
// (I_OFF for T_OFF = 400 ps) is sourced after every reference edge. The loop absorbs
// that fixed charge by settling with the divider edge T_OFF I_OFF / I_CP ahead of the
// reference edge. Near lock the PFD therefore produces only dn pulses and never passes
// through zero pulse width. The pulse amplitude, and its start at the reference edge, are
// this design's choice. The end of the pulse is an event of its own, so vcp includes the
// offset charge by the time the ADC samples.
//
// The voltage, taken relative to mid-supply, clips at +-V_LIM as a real pump output runs
// into its supply rails. V_LIM = 0.7 V is this design's choice. It covers the ADC's
// +-0.2 V range plus the 0.4 V excursion of the offset pulse within a period. Without a
// limit the ideal integrator can wind up during acquisition. The capacitor is never reset in
// operation: the ADC reads the running integral.
//
// Pump noise: the white part of the pump's noise, e_CP[n], is added to vcp once per
// reference period, at the end of the offset pulse. It is a zero-mean Gaussian sample
// whose variance is the two-sided PSD NOISE_DBV (-148 dBV/Hz in the reference design)
// times F_REF, i.e. about 0.49 mV rms. It comes from a seeded generator (SEED); a
// NOISE_DBV of -200 or less turns it off. The flicker part of the pump noise and the
// pump nonlinearity are not modelled.
//
// Behavioural model (not synthesizable): vcp is updated at every PFD event. While rst_n is low the
// capacitor is held at 0 V and nothing is integrated. Time unit 1 ps.
`timescale 1ps / 1fs
module pfd_cp #(
  parameter real I_CP   = 1.0e-3,    // A
  parameter real C_CP   = 1.0e-12,   // F
  parameter real I_LEAK = -85.0e-9,  // A
  parameter real V_LIM  = 0.7,       // V, output swing limit around mid-supply
  parameter real I_OFF  = 1.0e-3,    // A, offset current (sourced)
  parameter real T_OFF  = 400.0,     // ps, offset current pulse width
  parameter real NOISE_DBV = -148.0, // dBV/Hz, two-sided PSD of the white pump noise
  parameter real F_REF  = 153.6e6,   // Hz, reference (sample) rate of the noise
  parameter int  SEED   = 3
) (
  input  logic v_ref,
  input  logic v_div,
  input  logic rst_n,
  output logic up,
  output logic dn,
  output real  vcp
);

  real  t_last;   // s
  logic off;      // offset current pulse running

  localparam real SIGMA_N = (NOISE_DBV > -200.0) ? $sqrt(10.0 ** (NOISE_DBV / 10.0) * F_REF) : 0.0;

  longint unsigned rng = 64'(SEED) * 64'd2862933555777941757 + 64'd3037000493;

  function automatic real urand01();
    rng = rng * 64'd6364136223846793005 + 64'd1442695040888963407;
    return real'(rng >> 11) / 9007199254740992.0;   // 2^53
  endfunction

  // zero-mean, unit-variance sample: sum of 12 uniforms minus 6
  function automatic real gauss();
    real g;
    g = -6.0;
    for (int j = 0; j < 12; j++) g += urand01();
    return g;
  endfunction

  task automatic advance();
    real t, i_net;
    t     = $realtime * 1.0e-12;
    i_net = I_LEAK + (off ? I_OFF : 0.0) + (up ? I_CP : 0.0) - (dn ? I_CP : 0.0);
    vcp   = vcp + i_net / C_CP * (t - t_last);
    if (vcp > V_LIM)  vcp = V_LIM;
    if (vcp < -V_LIM) vcp = -V_LIM;
    t_last = t;
  endtask

  initial begin
    up  = 1'b0;
    dn  = 1'b0;
    off = 1'b0;
    vcp = 0.0;
    t_last = 0.0;
  end

  always @(negedge rst_n) begin
    up     = 1'b0;
    dn     = 1'b0;
    off    = 1'b0;
    vcp    = 0.0;
    t_last = $realtime * 1.0e-12;
  end

  always @(posedge rst_n) t_last = $realtime * 1.0e-12;

  always @(posedge v_ref) if (rst_n) begin
    advance();
    if (dn) dn = 1'b0;
    else    up = 1'b1;
    off = 1'b1;
  end

  // end of the offset pulse: one more event, so vcp also holds its charge
  always @(posedge v_ref) if (rst_n) begin
    #(T_OFF);
    if (rst_n) begin
      advance();
      off = 1'b0;
      if (SIGMA_N > 0.0) vcp = vcp + SIGMA_N * gauss();
    end
  end

  always @(posedge v_div) if (rst_n) begin
    advance();
    if (up) up = 1'b0;
    else    dn = 1'b1;
  end

endmodule
