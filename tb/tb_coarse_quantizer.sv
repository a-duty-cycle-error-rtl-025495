// tb_coarse_quantizer: checks the second-order coarse quantizer Q_C against a
// behavioural model in real arithmetic: v = round(x - 2 e1 + e2), e = v - (x - 2 e1 + e2),
// including saturation of v and e, and the shaping identity
// v = x + e - 2 e1 + e2 whenever nothing saturates. Also runs the quantizer in a loop
// with a constant input and checks that the mean of v equals that input.
`timescale 1ps / 1fs
module tb_coarse_quantizer;
  import rfd_pkg::*;

  x_t   x;
  eqc_t e1, e2, e_o;
  v_t   v_o;
  int   checks = 0, failures = 0;

  coarse_quantizer dut (.x_i(x), .e1_i(e1), .e2_i(e2), .v_o(v_o), .e_o(e_o));

  localparam real S = 131072.0;   // 2^17

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s x=%0d e1=%0d e2=%0d v=%0d e=%0d", what, x, e1, e2, v_o, e_o);
    end
  endtask

  initial begin
    real w, vr, er, sum_v;
    for (int i = 0; i < 20000; i++) begin
      x  = x_t'($urandom_range(0, 1 << 25));
      if (i % 2 == 0) x = x_t'(($signed($urandom) % (40 * 131072)));
      e1 = eqc_t'($signed($urandom_range(0, 131072)) - 65536);
      e2 = eqc_t'($signed($urandom_range(0, 131072)) - 65536);
      #1;
      w  = (real'(x) - 2.0 * real'(e1) + real'(e2)) / S;
      vr = $floor(w + 0.5);
      if (vr > 63.0) vr = 63.0;
      if (vr < -64.0) vr = -64.0;
      er = vr - w;
      if (er > 0.5) er = 0.5;
      if (er < -0.5) er = -0.5;
      check(real'(v_o) == vr, "v");
      check(real'(e_o) / S == er, "e_qc");
      if (vr > -64.0 && vr < 63.0)
        check(real'(v_o) * S == real'(x) + real'(e_o) - 2.0 * real'(e1) + real'(e2), "NTF identity");
    end
    // closed loop with constant input: mean of v equals the input
    e1 = '0; e2 = '0; sum_v = 0.0;
    x = x_t'(int'(3.3125 * S));
    for (int n = 0; n < 4096; n++) begin
      #1;
      sum_v += real'(v_o);
      e2 = e1;
      e1 = e_o;
    end
    $display("mean v %0.5f", sum_v / 4096.0);
    check(sum_v / 4096.0 > 3.3115 && sum_v / 4096.0 < 3.3135, "mean of v tracks input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
