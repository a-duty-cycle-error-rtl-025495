// tb_freq_doubler: drives a 76.8 MHz square wave with a 58 % duty cycle and checks that
// every crystal edge, rising or falling, gives a rising v_ref edge at the same instant,
// that each v_ref pulse is T_DL = 3.25 ns wide, and that the rising-edge spacing
// alternates between (D/100) T_xtal and (1 - D/100) T_xtal.
`timescale 1ps / 1fs
module tb_freq_doubler;

  localparam real T_XTAL = 1.0e12 / 76.8e6;
  localparam real D      = 58.0;
  localparam real T_DL   = 3250.0;

  logic x, vref;
  int   checks = 0, failures = 0;

  freq_doubler dut (.v_crystal(x), .v_ref(vref));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0.3f", what, $realtime);
    end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  real t_xedge, t_rise, t_prev_rise = -1.0;
  int  n_rise = 0;

  always @(posedge vref) begin
    t_rise = $realtime;
    check(near(t_rise, t_xedge), "v_ref rises at a crystal edge");
    if (t_prev_rise >= 0.0)
      check(near(t_rise - t_prev_rise, (n_rise % 2 == 1) ? D / 100.0 * T_XTAL : (1.0 - D / 100.0) * T_XTAL),
            "alternating spacing");
    t_prev_rise = t_rise;
    n_rise++;
  end

  always @(negedge vref) check(near($realtime - t_rise, T_DL), "pulse width T_DL");

  initial begin
    real t0;
    x  = 1'b0;
    t0 = 10000.0;
    #(t0);
    for (int k = 0; k < 200; k++) begin
      t_xedge = $realtime;
      x = 1'b1;
      #(t0 + (real'(k) + D / 100.0) * T_XTAL - $realtime);
      t_xedge = $realtime;
      x = 1'b0;
      #(t0 + real'(k + 1) * T_XTAL - $realtime);
    end
    #(10000.0);
    checks++;
    if (n_rise != 400) begin failures++; $display("FAIL: %0d rising edges, expected 400", n_rise); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_XTAL * 300.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
