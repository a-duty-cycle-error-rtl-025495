// phase_acc: frequency-to-phase accumulator after the delta-sigma FDC.
//
// The FDC output r[n] measures the PLL's frequency error (plus an alternating
// duty-cycle term); accumulating it gives the phase-error sequence
//   p[n] = p[n-1] + r[n]
// which is what the loop filter acts on. p_o is combinational from r_i (the same
// reference period); the register holds p[n-1]. Widths follow the reference design
// (r 20 bits, p 19 bits, both with 14 fractional bits here); saturation on overflow
// is this design's choice.
`timescale 1ps / 1fs
module phase_acc
  import rfd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  r_t   r_i,
  output p_t   p_o
);

  localparam int S_W = R_W + 1;
  localparam logic signed [S_W-1:0] PMAX = S_W'((1 <<< (P_W - 1)) - 1);
  localparam logic signed [S_W-1:0] PMIN = -(S_W'(1) <<< (P_W - 1));

  p_t                    p_q;
  logic signed [S_W-1:0] s;

  always_comb begin
    s = S_W'(p_q) + S_W'(r_i);
    if (s > PMAX) s = PMAX;
    if (s < PMIN) s = PMIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_q <= '0;
    else        p_q <= p_t'(s);
  end

  assign p_o = p_t'(s);

endmodule
