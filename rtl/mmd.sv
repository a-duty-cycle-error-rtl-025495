// mmd: multi-modulus divider clocked by the DCO.
//
// Consecutive rising edges of div_o are exactly N_INT - v DCO periods apart, where v is
// the signed control word sampled at each rising output edge (the FDC digital block
// prepares it a full reference period ahead). Internally a counter runs 1..M with
// M = N_INT - v; div_o is registered and high for the first floor(M/2) DCO periods of
// each output period, so its rising edge sits one DCO period after the counter wraps.
//
// The divide-by-(N - v[n]) function is the reference design's; the counter realisation,
// the output duty cycle and the reset behaviour (first rising edge one DCO period after
// reset release, modulus N_INT - v) are this design's. v is taken directly from the
// reference-clock domain: the FDC updates it at a point of the reference period that is
// well away from the MMD's loading edge. Moduli below 2 are clamped to 2.
`timescale 1ps / 1fs
module mmd
  import rfd_pkg::*;
#(
  parameter int N_INT = 65,
  parameter int M_W   = 8
) (
  input  logic clk_dco,
  input  logic rst_n,
  input  v_t   v_i,
  output logic div_o
);

  logic [M_W-1:0] cnt, m_cur;
  logic [M_W-1:0] m_next;
  logic           wrap;

  always_comb begin
    int mi;
    mi = N_INT - int'(v_i);
    if (mi < 2) mi = 2;
    if (mi > (1 << M_W) - 1) mi = (1 << M_W) - 1;
    m_next = M_W'(mi);
    wrap   = (cnt >= m_cur);
  end

  always_ff @(posedge clk_dco or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      m_cur <= '0;
      div_o <= 1'b0;
    end else if (wrap) begin
      cnt   <= M_W'(1);
      m_cur <= m_next;
      div_o <= 1'b1;
    end else begin
      cnt   <= cnt + 1'b1;
      div_o <= ((cnt + 1'b1) <= (m_cur >> 1));
    end
  end

endmodule
