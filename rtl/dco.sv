// dco: behavioural model of the digitally controlled oscillator.
//
// During each reference interval t_n <= t < t_(n+1) the output frequency is
//   f = F_C + F_ERR0 + K_DCO * d[n-1]
// where the code d is latched on every rising edge of v_ref (eq. (3) of the reference
// design, which gives K_DCO = 150 kHz per code). Output edges are scheduled from an
// exactly accumulated real-valued phase, so simulator time rounding causes jitter of
// at most half a time step but no frequency error. F_ERR0 is an initial frequency
// offset used to exercise acquisition. Phase noise is not modelled.
//
// Behavioural model (not synthesizable). Time unit 1 ps. F_C is this design's choice.
`timescale 1ps / 1fs
module dco
  import rfd_pkg::*;
#(
  parameter real F_C    = 9.984e9,   // Hz
  parameter real K_DCO  = 150.0e3,   // Hz per code
  parameter real F_ERR0 = 0.0        // Hz
) (
  input  logic v_ref,
  input  d_t   d_i,
  output logic clk_o,
  output real  f_hz
);

  d_t  d_lat;
  real t_edge;    // ps, absolute time of the next output edge

  always @(posedge v_ref) d_lat <= d_i;

  always_comb f_hz = F_C + F_ERR0 + K_DCO * real'(d_lat);

  initial begin
    d_lat  = '0;
    clk_o  = 1'b0;
    t_edge = 0.0;
    forever begin
      t_edge = t_edge + 0.5e12 / (F_C + F_ERR0 + K_DCO * real'(d_lat));
      #(t_edge - $realtime);
      clk_o = ~clk_o;
    end
  end

endmodule
