// fdc_digital: digital back end of the delta-sigma frequency-to-digital converter.
//
// Once per reference period (one rising edge of clk, which follows the ADC conversion)
// it takes the ADC word a[n] and
//   1. multiplies it by the gain estimate g_hat[n]            (gain calibration multiplier)
//   2. adds e_qc[n-1] to cancel the coarse quantization error (QNC adder)   -> c[n]
//   3. filters c[n] by the f_ref/2 resonator 1/(1+z^-1)^2:
//        r[n] = c[n] - 2 r[n-1] - r[n-2]                                     -> r[n]
//   4. forms r_F[n+1] = 2 r[n] - r[n-2], i.e. F(z) = z^-1 (2 - z^-2),
//   5. re-quantizes r_F[n+1] - alpha with the second-order coarse quantizer Q_C
//      to the integer MMD control word v[n+1].
// The resonator has infinite gain at f_ref/2, so the closed FDC loop settles only when
// the MMD edges carry a copy of the alternating duty-cycle error of the doubled
// reference; the charge pump then never sees that error. r[n] (FDC output, frequency
// error in DCO periods per reference period) is combinational from a[n]; v_o is
// registered and holds v[n+1], to be loaded by the MMD at its next output edge, which
// is why the FDC tolerates a full reference period of digital latency.
//
// Following the reference design: the multiplier, the QNC adder, the resonator, F(z),
// the position of alpha and Q_C, and the word widths of alpha, e_qc, r and v.
// This design's choices: the binary points (see rfd_pkg), rounding c[n] to 14
// fractional bits before the resonator, saturation of r, and the sign convention
// v = Q(r_F - alpha) (the one that gives the all-zero-pole loop of the analysis).
`timescale 1ps / 1fs
module fdc_digital
  import rfd_pkg::*;
#(
  parameter int K_SHIFT = 6
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   gcal_en,
  input  adc_t   a_i,
  input  alpha_t alpha_i,
  output r_t     r_o,
  output v_t     v_o,
  output gain_t  g_o,
  output eqc_t   eqc_o      // e_qc of the word in v_o (observation)
);

  localparam int PR_W  = A_W + G_W;           // Q4.18
  localparam int CQ_W  = C_W - (C_F - R_F);   // c rounded to Q5.14
  localparam int RS_W  = R_W + 3;
  localparam logic signed [RS_W-1:0] RMAX = RS_W'((1 <<< (R_W - 1)) - 1);
  localparam logic signed [RS_W-1:0] RMIN = -(RS_W'(1) <<< (R_W - 1));
  localparam int XS_W  = R_W + 2 + (EQ_F - R_F) + 1;

  gain_t g_hat;
  r_t    r1, r2;          // r[n-1], r[n-2]
  eqc_t  e0, em1;         // e_qc[n], e_qc[n-1]
  v_t    v_reg;

  logic signed [PR_W-1:0] prod;
  c_t                     c;
  logic signed [CQ_W-1:0] cq;
  logic signed [RS_W-1:0] rs;
  r_t                     r;
  logic signed [XS_W-1:0] xs;
  x_t                     x;
  v_t                     v_new;
  eqc_t                   e_new;

  always_comb begin
    prod = PR_W'(a_i) * PR_W'(g_hat);
    c    = C_W'(prod) + (C_W'(em1) <<< (C_F - EQ_F));
    cq   = CQ_W'((c + (C_W'(1) <<< (C_F - R_F - 1))) >>> (C_F - R_F));
    rs   = RS_W'(cq) - (RS_W'(r1) <<< 1) - RS_W'(r2);
    if (rs > RMAX) rs = RMAX;
    if (rs < RMIN) rs = RMIN;
    r    = r_t'(rs);
    xs   = ((XS_W'(r) <<< 1) - XS_W'(r2)) <<< (EQ_F - R_F);
    x    = x_t'(xs - XS_W'(alpha_i));
  end

  coarse_quantizer u_qc (
    .x_i (x),
    .e1_i(e0),
    .e2_i(em1),
    .v_o (v_new),
    .e_o (e_new)
  );

  fdc_gain_cal #(.K_SHIFT(K_SHIFT)) u_gcal (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (gcal_en),
    .c_i      (c),
    .eq_sign_i(em1[EQ_W-1]),
    .g_o      (g_hat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1    <= '0;
      r2    <= '0;
      e0    <= '0;
      em1   <= '0;
      v_reg <= '0;
    end else begin
      r1    <= r;
      r2    <= r1;
      e0    <= e_new;
      em1   <= e0;
      v_reg <= v_new;
    end
  end

  assign r_o   = r;
  assign v_o   = v_reg;
  assign g_o   = g_hat;
  assign eqc_o = e0;

endmodule
