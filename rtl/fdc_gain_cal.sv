// fdc_gain_cal: sign-LMS calibration of the delta-sigma FDC forward-path gain.
//
// Every digital clock the accumulator adds K * sgn(e_qc[n-1]) * c[n], K = 2^-K_SHIFT:
// if the gain estimate is too large, the QNC adder leaves a residue -e_qc[n-1] in c[n]
// and the estimate is pulled down, and vice versa, until the forward-path gain
// T_PLL I_CP / (C Delta) * g_hat is one. The 25-bit accumulator (Q2.23) is truncated to
// the 15-bit estimate g_hat (Q2.13) that multiplies the ADC output; the estimate is
// registered, so g_o is g_hat[n] while c_i is c[n].
//
// Reset value 1.0 (the nominal gain), accumulator saturating; both are this design's
// choices, as is taking sgn(0) = +1. With en low the estimate holds.
`timescale 1ps / 1fs
module fdc_gain_cal
  import rfd_pkg::*;
#(
  parameter int K_SHIFT = 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  c_t    c_i,
  input  logic  eq_sign_i,   // 1 when e_qc[n-1] < 0
  output gain_t g_o
);

  localparam int SUM_W = GACC_W + 1;
  // c is Q5.18; K*c expressed in the accumulator's 23 fractional bits
  localparam int SH = C_F + K_SHIFT - GACC_F;
  localparam logic signed [SUM_W-1:0] AMAX = SUM_W'((1 <<< (GACC_W - 1)) - 1);
  localparam logic signed [SUM_W-1:0] AMIN = -(SUM_W'(1) <<< (GACC_W - 1));

  logic signed [GACC_W-1:0] acc;
  logic signed [SUM_W-1:0]  step, sum;

  always_comb begin
    step = SUM_W'(c_i) >>> SH;
    if (eq_sign_i) step = -step;
    sum = SUM_W'(acc) + step;
    if (sum > AMAX) sum = AMAX;
    if (sum < AMIN) sum = AMIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= GACC_W'(1) <<< GACC_F;
    else if (en) acc <= sum[GACC_W-1:0];
  end

  assign g_o = acc[GACC_W-1 -: G_W];

endmodule
