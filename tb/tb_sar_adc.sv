// tb_sar_adc: applies random voltages and checks the ADC word against
// round(vin / 100 mV * 32), saturated to the 7-bit range [-64, 63] in normal mode and to
// the 6-bit range [-32, 31] in low-resolution mode; checks that the word and done appear
// T_SAMP + T_CONV = 4 ns after the reference edge and that a voltage change after the
// sampling instant does not affect the word. These exact checks run on an instance with
// matched capacitors and no metastability. A second instance has the default 2 %
// capacitor mismatch: its codes must stay within 2 LSB of the ideal ones, and some must
// differ. A third has matched capacitors and a metastability rate of 10 %: between 2 %
// and 12 % of its codes must be off, and by at most the weight of one bit.
`timescale 1ps / 1fs
module tb_sar_adc;
  import rfd_pkg::*;

  logic vref = 1'b0, low_res = 1'b0, done;
  real  vin = 0.0;
  adc_t a;
  int   checks = 0, failures = 0;

  adc_t a_m, a_p;
  logic done_m, done_p;
  int   n_diff_m = 0, n_diff_p = 0;

  sar_adc #(.SIGMA_C(0.0), .P_META(0.0)) dut (.v_ref(vref), .vin(vin), .low_res(low_res),
                                              .a_o(a), .done(done));
  sar_adc dut_m (.v_ref(vref), .vin(vin), .low_res(low_res), .a_o(a_m), .done(done_m));
  sar_adc #(.SIGMA_C(0.0), .P_META(0.1), .SEED(7)) dut_p (.v_ref(vref), .vin(vin),
                                              .low_res(low_res), .a_o(a_p), .done(done_p));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s vin=%0.4f a=%0d", what, vin, a);
    end
  endtask

  initial begin
    real t0, x, vs;
    automatic int k, n_lr_sat = 0;
    #(1000.0);
    for (int n = 0; n < 2000; n++) begin
      low_res = (n >= 1000);
      vin = (real'($urandom_range(0, 60000)) - 30000.0) / 100000.0;   // -0.3 .. 0.3 V
      vs  = vin;
      t0  = $realtime;
      vref = 1'b1;
      #(2600.0);
      vin = vin + 0.05;       // after the sampling instant
      @(posedge done);
      check(($realtime - t0) > 3999.0 && ($realtime - t0) < 4001.0, "conversion latency");
      x = $floor(vs / 0.1 * 32.0 + 0.5);
      k = $rtoi(x);
      if (low_res) begin
        if (k > 31) begin k = 31; n_lr_sat++; end
        if (k < -32) begin k = -32; n_lr_sat++; end
      end else begin
        if (k > 63) k = 63;
        if (k < -64) k = -64;
      end
      check(int'(a) == k, "code");
      check(int'(a_m) - k <= 2 && k - int'(a_m) <= 2, "mismatched code within 2 LSB");
      if (a_m != adc_t'(k)) n_diff_m++;
      if (a_p != adc_t'(k)) begin
        n_diff_p++;
        check(int'(a_p) - k <= 64 && k - int'(a_p) <= 64, "metastable code within one bit weight");
      end
      #(1000.0);
      vref = 1'b0;
      #(1000.0);
    end
    check(n_lr_sat > 0, "low-resolution saturation exercised");
    $display("codes off the ideal: mismatch %0d, metastability %0d of 2000", n_diff_m, n_diff_p);
    check(n_diff_m > 0, "capacitor mismatch changes some codes");
    check(n_diff_p >= 40 && n_diff_p <= 240, "metastability rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(7000.0 * 2100.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
