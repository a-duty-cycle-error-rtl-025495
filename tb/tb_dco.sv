// tb_dco: sets DCO codes and counts output edges over a long window to check
// f = F_C + K_DCO d (150 kHz per code), and checks that a new code takes effect only at
// the next rising reference edge.
`timescale 1ps / 1fs
module tb_dco;
  import rfd_pkg::*;

  logic vref = 1'b0, clk;
  d_t   d = '0;
  real  f;
  int   checks = 0, failures = 0;

  dco dut (.v_ref(vref), .d_i(d), .clk_o(clk), .f_hz(f));

  longint edges = 0;
  always @(posedge clk) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s d=%0d f=%0.1f", what, d, f);
    end
  endtask

  initial begin
    longint e0;
    real t0, f_meas, f_exp;
    automatic int codes[6] = '{0, 1, -1, 100, -300, 2000};
    foreach (codes[i]) begin
      d = d_t'(codes[i]);
      #(1000.0);
      check(f == 9.984e9 + 150.0e3 * real'(codes[i - 1 < 0 ? 0 : i - 1]) || i == 0, "code waits for v_ref");
      vref = 1'b1; #(100.0); vref = 1'b0;
      f_exp = 9.984e9 + 150.0e3 * real'(codes[i]);
      check(f == f_exp, "latched frequency");
      #(1000.0);
      @(posedge clk);
      e0 = edges; t0 = $realtime;
      #(10.0e6);            // 10 us
      @(posedge clk);
      f_meas = real'(edges - e0) / (($realtime - t0) * 1.0e-12);
      $display("d=%0d f=%0.1f Hz (expected %0.1f)", codes[i], f_meas, f_exp);
      check(f_meas > f_exp - 2.0e3 && f_meas < f_exp + 2.0e3, "measured frequency");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
