// tb_phase_acc: checks p[n] = p[n-1] + r[n] against a saturating model with random
// frequency-error words, including runs that hit both saturation limits.
`timescale 1ps / 1fs
module tb_phase_acc;
  import rfd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  r_t   r = '0;
  p_t   p;
  int   checks = 0, failures = 0, n_sat = 0;

  phase_acc dut (.clk(clk), .rst_n(rst_n), .r_i(r), .p_o(p));

  always #5 clk = ~clk;

  initial begin
    longint pm, s;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pm = 0;
    for (int n = 0; n < 5000; n++) begin
      // biased random walk so that both limits are reached
      r = r_t'($signed($urandom_range(0, 1 << 16)) - ((n / 1000) % 2 == 0 ? 24000 : 42000));
      #1;
      s = pm + longint'(r);
      if (s > 262143) begin s = 262143; n_sat++; end
      if (s < -262144) begin s = -262144; n_sat++; end
      checks++;
      if (longint'(p) != s) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d p=%0d expected %0d", n, p, s);
      end
      pm = s;
      @(negedge clk);
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
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
