// rfd_pll: fractional-N digital PLL with a frequency-doubled reference that is immune
// to the crystal's duty-cycle error.
//
// Signal flow, one pass per reference period (f_ref = 2 x 76.8 MHz = 153.6 MHz):
//   crystal -> freq_doubler -> v_ref
//   v_ref, v_div -> pfd_cp (PFD + charge pump + C) -> vcp
//   vcp -> sar_adc (samples T_SAMP after v_ref) -> a[n], done (= digital clock)
//   a[n] -> fdc_digital (gain cal. x, QNC adder, 1/(1+z^-1)^2 resonator, F(z), Q_C)
//        -> r[n] (frequency error) and v[n+1] (MMD control word)
//   r[n] -> phase_acc -> p[n] -> dlf (1+z^-1 notch, PI, IIR) -> d[n]
//   d[n] -> dco (latched on the next v_ref edge) -> v_pll -> mmd (/ N - v) -> v_div
// The resonator inside the FDC loop forces the divider edges to follow the alternating
// duty-cycle error of v_ref, so the charge pump and ADC never see it; the alternating
// term that p[n] then carries is removed by the loop filter's 1+z^-1 notch.
//
// Interface: v_crystal is the 76.8 MHz crystal square wave; rst_n is an active-low
// asynchronous reset of all digital state; gcal_en enables the FDC gain calibration;
// adc_low_res switches the ADC to 6 bits once the loop is locked (lock detection is
// left to the system); alpha is the fractional word (Q1.17), the output frequency is
// (N_INT + alpha) f_ref. The remaining outputs expose the internal sequences.
//
// The analog parts (doubler, PFD/CP, ADC, DCO) are behavioural models, so this top is a
// simulation model; its digital core (fdc_digital, phase_acc, dlf, mmd) is
// synthesizable. Parameter defaults are the reference design's 1.3 MHz / 75 fs example
// except F_C and F_ERR0, which are this design's. The models carry the reference
// design's pump leakage, offset pulse, white pump noise, ADC capacitor mismatch and
// comparator metastability; crystal and DCO noise and pump nonlinearity are left out.
`timescale 1ps / 1fs
module rfd_pll
  import rfd_pkg::*;
#(
  parameter int          N_INT   = 65,
  parameter int unsigned K_P     = 20480,   // 20      (Q.10)
  parameter int unsigned K_I     = 160,     // 0.15625 (Q.10)
  parameter int unsigned LAMBDA  = 768,     // 0.75    (Q.10)
  parameter int          K_SHIFT = 6,       // K = 2^-6
  parameter real         T_DL    = 3250.0,  // ps
  parameter real         I_CP    = 1.0e-3,
  parameter real         C_CP    = 1.0e-12,
  parameter real         I_LEAK  = -85.0e-9,
  parameter real         CP_NOISE_DBV = -148.0,  // white pump noise, dBV/Hz
  parameter real         DELTA   = 0.1,
  parameter real         F_C     = 9.984e9,
  parameter real         K_DCO   = 150.0e3,
  parameter real         F_ERR0  = 0.0,
  parameter real         SIGMA_C = 0.02,    // ADC unit capacitor mismatch
  parameter real         P_META  = 1.0e-4   // ADC comparator metastability rate
) (
  input  logic   v_crystal,
  input  logic   rst_n,
  input  logic   gcal_en,
  input  logic   adc_low_res,
  input  alpha_t alpha,
  output logic   v_pll,
  output logic   v_ref,
  output logic   v_div,
  output logic   dig_clk,
  output adc_t   a_n,
  output r_t     r_n,
  output p_t     p_n,
  output d_t     d_n,
  output v_t     v_n,
  output eqc_t   eqc_n,
  output gain_t  g_hat,
  output logic   pfd_up,
  output logic   pfd_dn,
  output real    vcp,
  output real    f_pll_hz
);

  freq_doubler #(.T_DL(T_DL)) u_fd (
    .v_crystal(v_crystal),
    .v_ref    (v_ref)
  );

  pfd_cp #(.I_CP(I_CP), .C_CP(C_CP), .I_LEAK(I_LEAK), .NOISE_DBV(CP_NOISE_DBV)) u_pfd_cp (
    .v_ref(v_ref),
    .v_div(v_div),
    .rst_n(rst_n),
    .up   (pfd_up),
    .dn   (pfd_dn),
    .vcp  (vcp)
  );

  sar_adc #(.B(A_W), .F(A_F), .DELTA(DELTA), .SIGMA_C(SIGMA_C), .P_META(P_META)) u_adc (
    .v_ref  (v_ref),
    .vin    (vcp),
    .low_res(adc_low_res),
    .a_o    (a_n),
    .done   (dig_clk)
  );

  fdc_digital #(.K_SHIFT(K_SHIFT)) u_fdc (
    .clk    (dig_clk),
    .rst_n  (rst_n),
    .gcal_en(gcal_en),
    .a_i    (a_n),
    .alpha_i(alpha),
    .r_o    (r_n),
    .v_o    (v_n),
    .g_o    (g_hat),
    .eqc_o  (eqc_n)
  );

  phase_acc u_acc (
    .clk  (dig_clk),
    .rst_n(rst_n),
    .r_i  (r_n),
    .p_o  (p_n)
  );

  dlf #(.K_P(K_P), .K_I(K_I), .LAMBDA(LAMBDA)) u_dlf (
    .clk  (dig_clk),
    .rst_n(rst_n),
    .p_i  (p_n),
    .d_o  (d_n)
  );

  dco #(.F_C(F_C), .K_DCO(K_DCO), .F_ERR0(F_ERR0)) u_dco (
    .v_ref(v_ref),
    .d_i  (d_n),
    .clk_o(v_pll),
    .f_hz (f_pll_hz)
  );

  mmd #(.N_INT(N_INT)) u_mmd (
    .clk_dco(v_pll),
    .rst_n  (rst_n),
    .v_i    (v_n),
    .div_o  (v_div)
  );

endmodule
