// coarse_quantizer: Q_C, the second-order digital delta-sigma re-quantizer that turns
// the fine-resolution word r_F[n] - alpha into the integer MMD control word v[n].
//
// Structure (error feedback, this design's choice of realisation):
//   w[n]    = x[n] - 2 e_qc[n-1] + e_qc[n-2]
//   v[n]    = round(w[n])                (round half up, saturated to V_W bits)
//   e_qc[n] = v[n] - w[n]                (|e_qc| <= 1/2 unless v saturates)
// so that v[n] = x[n] + e_qc[n] - 2 e_qc[n-1] + e_qc[n-2]: the quantization error is
// shaped by (1 - z^-1)^2, as the reference design requires. The quantizer error is
// exported because the FDC cancels it again (QNC adder) and the gain calibration
// correlates against its sign.
//
// Purely combinational; the e_qc delay registers are held by the caller (fdc_digital).
// x_i is Q8.17, e1_i/e2_i/e_o are Q1.17, v_o is an integer.
`timescale 1ps / 1fs
module coarse_quantizer
  import rfd_pkg::*;
(
  input  x_t   x_i,
  input  eqc_t e1_i,
  input  eqc_t e2_i,
  output v_t   v_o,
  output eqc_t e_o
);

  localparam int W_W = X_W + 2;
  localparam logic signed [W_W-1:0] HALF = W_W'(1) <<< (EQ_F - 1);
  localparam logic signed [W_W-1:0] VMAX = W_W'((1 <<< (V_W - 1)) - 1);
  localparam logic signed [W_W-1:0] VMIN = -(W_W'(1) <<< (V_W - 1));
  localparam logic signed [W_W-1:0] EMAX = HALF;
  localparam logic signed [W_W-1:0] EMIN = -HALF;

  logic signed [W_W-1:0] w, vi, e;

  always_comb begin
    w  = W_W'(x_i) - (W_W'(e1_i) <<< 1) + W_W'(e2_i);
    vi = (w + HALF) >>> EQ_F;
    if (vi > VMAX) vi = VMAX;
    if (vi < VMIN) vi = VMIN;
    e  = (vi <<< EQ_F) - w;
    if (e > EMAX) e = EMAX;
    if (e < EMIN) e = EMIN;
    v_o = v_t'(vi);
    e_o = eqc_t'(e);
  end

endmodule
