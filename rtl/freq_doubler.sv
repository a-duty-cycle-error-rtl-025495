// freq_doubler: behavioural model of the XOR reference frequency doubler.
//
// The crystal signal is XORed with a copy of itself delayed by T_DL (an inverter delay
// line in silicon), so every crystal edge, rising or falling, produces a rising edge of
// v_ref, a pulse T_DL wide: f_ref = 2 f_crystal. When the crystal duty cycle D is not
// 50 %, the v_ref rising edges alternate early/late by dT = (D/100 - 0.5) T_ref; this is
// the error the PLL is built to ignore.
//
// Behavioural model (not synthesizable): the delay line is one ideal transport delay.
// Structure and T_DL = 3.25 ns are from the reference design. Time unit 1 ps.
`timescale 1ps / 1fs
module freq_doubler #(
  parameter real T_DL = 3250.0   // ps
) (
  input  logic v_crystal,
  output logic v_ref
);

  logic v_dly;

  initial v_dly = 1'b0;

  always @(v_crystal) v_dly <= #(T_DL) v_crystal;

  assign v_ref = v_crystal ^ v_dly;

endmodule
