// dlf: digital loop filter with the f_ref/2 notch, from phase error p[n] to DCO code d[n].
//
//   L(z) = (1 + z^-1) (K_P + K_I z^-1 / (1 - z^-1)) ((1 - lambda) / (1 - lambda z^-1))
//
//   q[n]  = p[n] + p[n-1]                 notch: zero at f_ref/2 removes the
//                                         alternating duty-cycle term that p[n] carries
//   I[n]  = I[n-1] + q[n-1]               integral path
//   pi[n] = K_P q[n] + K_I I[n]           proportional-integral stage
//   y[n]  = lambda y[n-1] + (1-lambda) pi[n]   single-pole IIR stage
//   d[n]  = round(y[n])                   integer DCO code
//
// d_o is registered at the end of the period in which p_i = p[n] is presented, and the
// DCO latches it on the next reference edge. The structure and the coefficient values
// (K_P = 20, K_I = 0.15625, lambda = 0.75 for the 1.3 MHz loop) follow the reference
// design; coefficients are given here in Q.10 fixed point, the state keeps 14 fractional
// bits and every stage saturates - those are this design's choices.
`timescale 1ps / 1fs
module dlf
  import rfd_pkg::*;
#(
  parameter int unsigned K_P    = 20480,  // 20        * 2^10
  parameter int unsigned K_I    = 160,    // 0.15625   * 2^10
  parameter int unsigned LAMBDA = 768     // 0.75      * 2^10
) (
  input  logic clk,
  input  logic rst_n,
  input  p_t   p_i,
  output d_t   d_o
);

  localparam int Q_W  = P_W + 1;     // Q6.14
  localparam int I_W  = 28;          // Q14.14
  localparam int Y_W  = 32;          // Q18.14
  localparam int M_W  = 48;
  localparam int CF   = 10;          // coefficient fraction bits
  localparam int SF   = 14;          // state fraction bits
  localparam logic signed [M_W-1:0] KP   = M_W'(K_P);
  localparam logic signed [M_W-1:0] KI   = M_W'(K_I);
  localparam logic signed [M_W-1:0] LAM  = M_W'(LAMBDA);
  localparam logic signed [M_W-1:0] LAMC = M_W'((1 << CF) - LAMBDA);
  localparam logic signed [M_W-1:0] IMAX = M_W'((64'sd1 <<< (I_W - 1)) - 1);
  localparam logic signed [M_W-1:0] IMIN = -(M_W'(1) <<< (I_W - 1));
  localparam logic signed [M_W-1:0] YMAX = M_W'((64'sd1 <<< (D_W - 1 + SF)) - 1);
  localparam logic signed [M_W-1:0] YMIN = -(M_W'(1) <<< (D_W - 1 + SF));
  localparam logic signed [M_W-1:0] DMAX = M_W'((1 <<< (D_W - 1)) - 1);
  localparam logic signed [M_W-1:0] DMIN = -(M_W'(1) <<< (D_W - 1));

  p_t                    p_prev;
  logic signed [I_W-1:0] integ;
  logic signed [Y_W-1:0] y;
  d_t                    d_q;

  logic signed [Q_W-1:0] q;
  logic signed [M_W-1:0] pi, i_next, y_next, d_next;

  always_comb begin
    q      = Q_W'(p_i) + Q_W'(p_prev);
    pi     = (KP * M_W'(q) + KI * M_W'(integ)) >>> CF;
    y_next = (LAM * M_W'(y) + LAMC * pi) >>> CF;
    if (y_next > YMAX) y_next = YMAX;
    if (y_next < YMIN) y_next = YMIN;
    i_next = M_W'(integ) + M_W'(q);
    if (i_next > IMAX) i_next = IMAX;
    if (i_next < IMIN) i_next = IMIN;
    d_next = (y_next + (M_W'(1) <<< (SF - 1))) >>> SF;
    if (d_next > DMAX) d_next = DMAX;
    if (d_next < DMIN) d_next = DMIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_prev <= '0;
      integ  <= '0;
      y      <= '0;
      d_q    <= '0;
    end else begin
      p_prev <= p_i;
      integ  <= I_W'(i_next);
      y      <= Y_W'(y_next);
      d_q    <= d_t'(d_next);
    end
  end

  assign d_o = d_q;

endmodule
