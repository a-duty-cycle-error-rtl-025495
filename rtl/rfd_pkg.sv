// rfd_pkg: word widths and fixed-point formats shared by the digital core of the
// duty-cycle-error-immune fractional-N PLL.
//
// All digital words are two's complement. The widths of alpha, e_qc, r, v, p and d
// are those of the reference design (18, 18, 20, 7, 19 and 16 bits); the positions
// of their binary points are this design's choice:
//   a[n]    ADC output        Q2.5   ( 7 bits, integer step = one ADC step Delta)
//   g_hat   gain estimate     Q2.13  (15 bits, top of a 25-bit Q2.23 accumulator)
//   c[n]    QNC adder output  Q5.18  (23 bits)
//   alpha   fractional word   Q1.17  (18 bits)
//   e_qc    Q_C error         Q1.17  (18 bits, |e_qc| <= 1/2)
//   r[n]    FDC output        Q6.14  (20 bits, unit = one DCO period)
//   p[n]    phase error       Q5.14  (19 bits, unit = one DCO period)
//   v[n]    MMD control       integer (7 bits)
//   d[n]    DCO code          integer (16 bits, unit = K_DCO)
`timescale 1ps / 1fs
package rfd_pkg;

  localparam int A_W     = 7;
  localparam int A_F     = 5;
  localparam int G_W     = 15;
  localparam int G_F     = 13;
  localparam int GACC_W  = 25;
  localparam int GACC_F  = 23;
  localparam int C_W     = 23;
  localparam int C_F     = 18;
  localparam int ALPHA_W = 18;
  localparam int EQ_W    = 18;
  localparam int EQ_F    = 17;
  localparam int R_W     = 20;
  localparam int R_F     = 14;
  localparam int P_W     = 19;
  localparam int V_W     = 7;
  localparam int D_W     = 16;
  // Q_C input r_F - alpha: Q8.17
  localparam int X_W     = 25;

  typedef logic signed [A_W-1:0]     adc_t;
  typedef logic signed [G_W-1:0]     gain_t;
  typedef logic signed [C_W-1:0]     c_t;
  typedef logic signed [ALPHA_W-1:0] alpha_t;
  typedef logic signed [EQ_W-1:0]    eqc_t;
  typedef logic signed [R_W-1:0]     r_t;
  typedef logic signed [P_W-1:0]     p_t;
  typedef logic signed [V_W-1:0]     v_t;
  typedef logic signed [D_W-1:0]     d_t;
  typedef logic signed [X_W-1:0]     x_t;

  // alpha = 0.0007848739624 of the reference design, rounded to 2^-17
  localparam alpha_t ALPHA_DEFAULT = 18'sd103;

endpackage
