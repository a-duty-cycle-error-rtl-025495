// tb_fdc_gain_cal: checks the sign-LMS gain calibration accumulator against a model
// (acc += K sgn(e) c, K = 2^-6, saturating 25-bit Q2.23, g = top 15 bits), the enable,
// and the reset value 1.0; then closes a toy loop c = (1 - A g) e + noise and checks that
// g converges to 1/A, as eq. (33) predicts.
`timescale 1ps / 1fs
module tb_fdc_gain_cal;
  import rfd_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0, sgn = 1'b0;
  c_t    c = '0;
  gain_t g;
  int    checks = 0, failures = 0;

  fdc_gain_cal dut (.clk(clk), .rst_n(rst_n), .en(en), .c_i(c), .eq_sign_i(sgn), .g_o(g));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s g=%0d", what, g);
    end
  endtask

  longint acc_m;

  initial begin
    real e, cr, A;
    repeat (2) @(negedge clk);
    check(g == gain_t'(8192), "reset value 1.0");
    rst_n = 1'b1;
    acc_m = 64'sd1 <<< 23;
    // random steps
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      sgn = 1'($urandom_range(0, 1));
      c   = c_t'($signed($urandom) % (1 << 21));
      @(posedge clk); #1;
      if (en) begin
        acc_m = acc_m + (sgn ? -(longint'(c) >>> 1) : (longint'(c) >>> 1));
        if (acc_m > (64'sd1 <<< 24) - 1) acc_m = (64'sd1 <<< 24) - 1;
        if (acc_m < -(64'sd1 <<< 24)) acc_m = -(64'sd1 <<< 24);
      end
      check(longint'(g) == (acc_m >>> 10), "accumulator model");
    end
    // convergence: forward gain A = 1.2 -> g -> 1/1.2
    rst_n = 1'b0; #1; rst_n = 1'b1;
    en = 1'b1;
    A  = 1.2;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      e   = (real'($urandom_range(0, 65535)) / 65536.0) - 0.5;
      cr  = (1.0 - A * real'(g) / 8192.0) * (-e);
      cr  = cr + ((real'($urandom_range(0, 65535)) / 65536.0) - 0.5) * 0.05;
      c   = c_t'($rtoi(cr * 262144.0));
      sgn = (-e < 0.0);
    end
    $display("g after 3000 steps: %0.4f (1/A = %0.4f)", real'(g) / 8192.0, 1.0 / A);
    check(real'(g) / 8192.0 > 0.99 / A && real'(g) / 8192.0 < 1.01 / A, "converges to 1/A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
