// tb_dlf: checks the loop filter against eq. (34),
//   L(z) = (1 + z^-1) (K_P + K_I z^-1/(1 - z^-1)) (1 - lambda)/(1 - lambda z^-1),
// evaluated in real arithmetic with K_P = 20, K_I = 0.15625, lambda = 0.75. The output is
// registered, so d[n] appears after the clock edge that ends period n; it must match the
// rounded real response within one code. Stimuli: an impulse, a random sequence, and an
// alternating (f_ref/2) sequence, which the notch must keep out of d entirely (once the
// start-up step has decayed, d stays constant).
`timescale 1ps / 1fs
module tb_dlf;
  import rfd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  p_t   p = '0;
  d_t   d;
  int   checks = 0, failures = 0;

  dlf dut (.clk(clk), .rst_n(rst_n), .p_i(p), .d_o(d));

  always #5 clk = ~clk;

  localparam real KP = 20.0, KI = 0.15625, LAM = 0.75;
  real pp, integ, y, pin;

  task automatic model_reset();
    pp = 0.0; integ = 0.0; y = 0.0;
  endtask

  task automatic run(input real pv, input string what, input real tol);
    real q;
    p = p_t'($rtoi(pv * 16384.0));
    pin = real'(p) / 16384.0;
    q = pin + pp;
    y = LAM * y + (1.0 - LAM) * (KP * q + KI * integ);
    integ = integ + q;
    pp = pin;
    @(posedge clk); #1;
    checks++;
    if (real'(d) > y + tol || real'(d) < y - tol) begin
      failures++;
      if (failures < 10) $display("FAIL: %s d=%0d model=%0.3f", what, d, y);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model_reset();
    // impulse of 1 DCO period
    run(1.0, "impulse", 1.0);
    for (int n = 0; n < 50; n++) run(0.0, "impulse tail", 1.0);
    // random
    rst_n = 1'b0; #1; rst_n = 1'b1; model_reset();
    for (int n = 0; n < 2000; n++) run((real'($urandom_range(0, 2000)) - 1000.0) / 2000.0, "random", 1.2);
    // alternating 6.5-period input (duty-cycle term): notch -> d stays at 0
    rst_n = 1'b0; #1; rst_n = 1'b1; model_reset();
    begin
      d_t d_prev;
      d_prev = '0;
      for (int n = 0; n < 200; n++) begin
        run((n % 2 == 0) ? 6.5 : -6.5, "f_ref/2 input", 1.0);
        if (n > 40) begin
          checks++;
          if (d != d_prev) begin
            failures++;
            $display("FAIL: notch leaks, d=%0d after %0d", d, d_prev);
          end
        end
        d_prev = d;
      end
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
