// sar_adc: behavioural model of the FDC's B-bit asynchronous SAR ADC.
//
// T_SAMP after each rising reference edge (the delayed sampling clock v_samp) it samples
// the charge-pump voltage and runs a successive-approximation search against a
// binary-weighted capacitor DAC. T_CONV after sampling it presents the result a[n] as
// a two's complement word with B-F integer and F fractional bits (integer step = DELTA
// volts), and raises done for T_DONE. done clocks the digital FDC block. With matched
// capacitors the result is round(vin / DELTA * 2^F) / 2^F, saturated at full scale.
//
// Search: offset-binary code b (a = b - 2^(B-1)). For each bit, MSB first, the bit is
// kept if vin/DELTA*2^F >= DAC(b with the bit set) - 1/2, where DAC(b) = sum of the
// weights of the set bits minus 2^(B-1). With low_res high the converter runs with one
// bit less, as after lock in the reference design: one integer bit, range
// [-1, 1 - 2^-F]. The second bit then copies the inverse of the MSB (sign extension)
// and is not compared, so the search makes B-1 decisions.
//
// Nonidealities, as in the reference design's behavioural model: each unit capacitor
// deviates from nominal by a normal random amount with standard deviation SIGMA_C (2 %).
// Bit k's weight is therefore 2^k (1 + SIGMA_C g_k / sqrt(2^k)), with g_k drawn once at
// start-up from a seeded generator (SEED). In a fraction P_META (0.01 %) of
// conversions, one comparison, chosen at random, is metastable and resolves at random.
// The Gaussian draw (sum of twelve uniforms) and the generator are this design's choice.
//
// Behavioural model (not synthesizable). B = 7, F = 5, DELTA = 100 mV, SIGMA_C and
// P_META are the reference design's; the timing values are this design's (T_SAMP +
// T_CONV + T_DONE must stay below the shortest reference interval). Time unit 1 ps.
`timescale 1ps / 1fs
module sar_adc #(
  parameter int  B      = 7,
  parameter int  F      = 5,
  parameter real DELTA  = 0.1,      // V per integer step
  parameter real T_SAMP = 2500.0,   // ps
  parameter real T_CONV = 1500.0,   // ps
  parameter real T_DONE = 500.0,    // ps
  parameter real SIGMA_C = 0.02,    // unit capacitor mismatch, standard deviation
  parameter real P_META  = 1.0e-4,  // metastable conversions per conversion
  parameter int  SEED    = 1
) (
  input  logic                v_ref,
  input  real                 vin,
  input  logic                low_res,
  output logic signed [B-1:0] a_o,
  output logic                done
);

  real             w [B];   // DAC bit weights in LSB
  longint unsigned rng;

  function automatic real urand01();
    rng = rng * 64'd6364136223846793005 + 64'd1442695040888963407;
    return real'(rng >> 11) / 9007199254740992.0;   // 2^53
  endfunction

  function automatic real dac(input int b);
    real acc;
    acc = -real'(1 << (B - 1));
    for (int k = 0; k < B; k++) if (b[k]) acc += w[k];
    return acc;
  endfunction

  initial begin
    real g;
    a_o  = '0;
    done = 1'b0;
    rng  = 64'(SEED) * 64'd2862933555777941757 + 64'd3037000493;
    for (int k = 0; k < B; k++) begin
      g = -6.0;
      for (int j = 0; j < 12; j++) g += urand01();
      w[k] = real'(1 << k) * (1.0 + SIGMA_C * g / $sqrt(real'(1 << k)));
    end
  end

  always @(posedge v_ref) begin
    real x;
    int  b, trial, meta_k;
    bit  keep;
    #(T_SAMP);
    x      = vin / DELTA * real'(1 << F);
    meta_k = (urand01() < P_META) ? $rtoi(urand01() * real'(B)) : -1;
    b      = 0;
    for (int k = B - 1; k >= 0; k--) begin
      if (low_res && k == B - 2) begin
        if (!b[B-1]) b = b | (1 << k);
      end else begin
        trial = b | (1 << k);
        keep  = x >= dac(trial) - 0.5;
        if (k == meta_k) keep = urand01() < 0.5;
        if (keep) b = trial;
      end
    end
    #(T_CONV);
    a_o  = B'(b - (1 << (B - 1)));
    done = 1'b1;
    #(T_DONE);
    done = 1'b0;
  end

endmodule
