// tb_fdc_digital: checks the delta-sigma FDC digital block against a cycle model written
// from the signal-flow equations:
//   c[n] = a[n] g[n] + e_qc[n-1];  r[n] = c[n] - 2 r[n-1] - r[n-2]
//   v[n+1] = Q_C(2 r[n] - r[n-2] - alpha),  g[n+1] = g[n] + 2^-6 sgn(e_qc[n-1]) c[n]
// with random ADC words, gain calibration off for the first half and on for the second,
// and a reset every 40 periods so that the open loop stays inside the word ranges.
`timescale 1ps / 1fs
module tb_fdc_digital;
  import rfd_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, gcal_en = 1'b0;
  adc_t   a = '0;
  alpha_t alpha = ALPHA_DEFAULT;
  r_t     r;
  v_t     v;
  gain_t  g;
  eqc_t   eq;
  int     checks = 0, failures = 0;

  fdc_digital dut (.clk(clk), .rst_n(rst_n), .gcal_en(gcal_en), .a_i(a), .alpha_i(alpha),
                   .r_o(r), .v_o(v), .g_o(g), .eqc_o(eq));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (a=%0d r=%0d v=%0d g=%0d)", what, a, r, v, g);
    end
  endtask

  // model state
  longint m_gacc, m_r1, m_r2, m_e0, m_em1, m_v;

  function automatic longint sat(longint x, int bits);
    longint hi = (64'sd1 <<< (bits - 1)) - 1, lo = -(64'sd1 <<< (bits - 1));
    return x > hi ? hi : (x < lo ? lo : x);
  endfunction

  task automatic model_reset();
    m_gacc = 64'sd1 <<< 23; m_r1 = 0; m_r2 = 0; m_e0 = 0; m_em1 = 0; m_v = 0;
  endtask

  // one period: returns expected r (combinational) and updates state
  task automatic model_step(input longint av, input bit gen, output longint r_exp);
    longint g, c, cq, rs, x, w, vv, e;
    g  = m_gacc >>> 10;
    c  = av * g + 2 * m_em1;
    cq = (c + 8) >>> 4;
    rs = sat(cq - 2 * m_r1 - m_r2, 20);
    x  = 8 * (2 * rs - m_r2) - longint'(alpha);
    w  = x - 2 * m_e0 + m_em1;
    vv = sat((w + 65536) >>> 17, 7);
    e  = vv * 131072 - w;
    e  = e > 65536 ? 65536 : (e < -65536 ? -65536 : e);
    if (gen) m_gacc = sat(m_gacc + ((m_em1 < 0) ? -(c >>> 1) : (c >>> 1)), 25);
    m_r2 = m_r1; m_r1 = rs; m_em1 = m_e0; m_e0 = e; m_v = vv;
    r_exp = rs;
  endtask

  initial begin
    longint r_exp;
    model_reset();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // random words; keep |a| small so the open loop stays inside the word ranges for a while
    for (int n = 0; n < 3000; n++) begin
      if (n % 40 == 0) begin
        rst_n = 1'b0; #1; rst_n = 1'b1; model_reset();
      end
      gcal_en = (n >= 1500);
      a = adc_t'($signed($urandom_range(0, 16)) - 8);
      #1;
      model_step(longint'(a), gcal_en, r_exp);
      check(longint'(r) == r_exp, "r[n]");
      @(posedge clk); #1;
      check(longint'(v) == m_v, "v[n+1]");
      check(longint'(g) == (m_gacc >>> 10), "g_hat");
      check(longint'(eq) == m_e0, "e_qc");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
