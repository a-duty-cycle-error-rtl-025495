// tb_mmd: checks that consecutive rising edges of the divider output are N - v DCO
// periods apart, v being the control word present at the earlier edge, for random v
// over the full 7-bit range (moduli 2..129), and that v changing between edges does not
// disturb the running period.
`timescale 1ps / 1fs
module tb_mmd;
  import rfd_pkg::*;

  localparam int N_INT = 65;

  logic clk = 1'b0, rst_n = 1'b0, div;
  v_t   v = '0;
  int   checks = 0, failures = 0;

  mmd #(.N_INT(N_INT)) dut (.clk_dco(clk), .rst_n(rst_n), .v_i(v), .div_o(div));

  always #50 clk = ~clk;

  int cyc = 0, last_edge = -1, expect_m = 0;
  logic div_q = 1'b0;

  always @(posedge clk) begin
    cyc++;
  end

  always @(posedge div) begin
    if (last_edge >= 0) begin
      checks++;
      if (cyc - last_edge != expect_m) begin
        failures++;
        if (failures < 10) $display("FAIL: period %0d expected %0d", cyc - last_edge, expect_m);
      end
    end
    last_edge = cyc;
    expect_m = N_INT - int'(v);
    if (expect_m < 2) expect_m = 2;
    // new control word some time later, as the FDC does
    fork
      begin
        #(100 * $urandom_range(1, 2));
        v = v_t'($signed($urandom_range(0, 127)) - 64);
      end
    join_none
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (checks >= 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100 * 2 * 130 * 2100);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
