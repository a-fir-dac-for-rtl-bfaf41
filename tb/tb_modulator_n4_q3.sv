// tb_modulator_n4_q3: closed-loop test of the sigma-delta modulator with the
// sigma-delta FIR-DAC for a 4-bit quantizer (N = 4, Q = 3).
//
// N = 4, Q = 3, the second configuration of the clock-jitter comparison.
// A sine of amplitude 0.5 of full scale is applied, held constant over each
// fast clock period, at 33/32768 of the fast clock rate (Q*fs), i.e. a
// coherent bin of a 32768-point transform of y_d. After 2000 warm-up cycles,
// 32768 samples of the three-level output y_d are collected, Hann-windowed,
// and the power of every bin of the signal band (fs/2 divided by the
// oversampling ratio 32, i.e. 170 bins at Q*fs) is found with the Goertzel
// recursion. Checks:
//   * every cycle, the FIR-DAC output equals the sinc^2-weighted sum of the
//     last 2Q-1 y_d samples, with the weights computed here from their
//     closed form;
//   * the held level changes only at period starts and then equals the
//     quantizer level of the sampled code (Q-fold up-sampling);
//   * the loop stays bounded (last integrator below 2.0 in magnitude);
//   * the in-band signal power matches the input amplitude within 0.5 dB
//     (unity signal gain), and the SNDR is at least 85 dB;
//   * mechanisms that must occur at least once: period starts, each of the
//     three output levels, a FIR-DAC output strictly between two of its
//     extreme levels.
//
// The configuration, the oversampling ratio of 32 and the 32768-point
// Hann-windowed record follow the published design; the input amplitude, the
// Goertzel evaluation and the limits are this design's choices.
module tb_modulator_n4_q3;
  import sdfd_pkg::*;

  localparam int  N    = 4;
  localparam int  Q    = 3;
  localparam int  M    = N + 7;
  localparam int  NT   = 2 * Q - 1;
  localparam int  NPTS = 32768;
  localparam int  FB   = 33;
  localparam int  BW   = NPTS / (2 * 32 * Q);
  localparam real AMP  = 0.5;
  localparam int  WARM = 2000;
  localparam real PI   = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  real x_in, dac1, x1, x2, x3, vq;
  tri_t yd;
  logic signed [M-1:0] y_up, v;
  logic [N-1:0] y_code;
  logic frame_start, sat;
  logic [$clog2(Q+1)-1:0] phase;

  sd_fir_dac_modulator #(.N(4), .Q(3)) dut (
    .clk, .rst_n, .x_in, .yd, .y_up, .y_code, .frame_start, .phase,
    .dac1, .x1, .x2, .x3, .v, .sat, .vq);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (WARM + NPTS + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real wsum(int h [NT]);
    real s = 0.0;
    for (int i = 0; i < NT; i++)
      s += ((i < Q) ? real'(i + 1) : real'(2 * Q - 1 - i)) / real'(Q * Q) * real'(h[i]);
    return s;
  endfunction

  real samples [NPTS];

  initial begin
    int hist [NT];
    int held [NT];
    int n_frames = 0, n_pos = 0, n_neg = 0, n_zero = 0, n_mid = 0, n_hold = 0;
    int exp_level, cyc, code_at_edge;
    bit bad_dac, bad_hold, last_sub, bad_sample;
    real ph, expect_dac, x3max, sig, noise, p, c, s0, s1, s2, want, sndr, gain_db;
    for (int i = 0; i < NT; i++) begin hist[i] = 0; held[i] = 0; end
    bad_dac = 0; bad_hold = 0; bad_sample = 0;
    x3max = 0.0;
    exp_level = 0;
    x_in = 0.0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (cyc = 0; cyc < WARM + NPTS; cyc++) begin
      ph = 2.0 * PI * real'(FB) * real'(cyc) / real'(NPTS);
      x_in = AMP * $sin(ph);
      #1;
      for (int i = NT - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = tri_value(yd);
      if (frame_start) for (int i = 0; i < NT; i++) held[i] = hist[i];
      expect_dac = wsum(hist);
      if (dac1 - expect_dac > 1e-12 || expect_dac - dac1 > 1e-12) bad_dac = 1;
      if (frame_start) begin
        n_frames++;
      end else begin
        if (int'(y_up) != exp_level) bad_hold = 1; else n_hold++;
      end
      exp_level = int'(y_up);
      if (x3 > x3max) x3max = x3;
      if (-x3 > x3max) x3max = -x3;
      if (hist[0] > 0) n_pos++; else if (hist[0] < 0) n_neg++; else n_zero++;
      if (dac1 > -0.99 && dac1 < 0.99 && dac1 != 0.0) n_mid++;
      
      if (cyc >= WARM) samples[cyc - WARM] = real'(hist[0]) * 0.5 * (1.0 - $cos(2.0 * PI * real'(cyc - WARM) / real'(NPTS)));
      // the code present at the edge that ends the last sub-period is the
      // level of the next period
      code_at_edge = int'(y_code);
      last_sub = (int'(phase) == Q - 1);
      @(posedge clk);
      #1;
      if (last_sub && int'(y_up) != 2 * code_at_edge - ((1 << N) - 1)) bad_sample = 1;
    end
    check(!bad_dac, "FIR-DAC output is the sinc^2 weighted sum of the taps");
    check(!bad_hold, "held level constant within a period");
    check(!bad_sample, "held level is the quantizer code sampled at the period start");
    check(x3max < 2.0, "loop bounded");
    check(!sat, "digital modulator not saturated");
    // Goertzel over the signal band
    sig = 0.0;
    noise = 0.0;
    for (int k = 1; k < BW; k++) begin
      c = 2.0 * $cos(2.0 * PI * real'(k) / real'(NPTS));
      s1 = 0.0;
      s2 = 0.0;
      for (int n = 0; n < NPTS; n++) begin
        s0 = samples[n] + c * s1 - s2;
        s2 = s1;
        s1 = s0;
      end
      p = s1 * s1 + s2 * s2 - c * s1 * s2;
      if (k >= FB - 3 && k <= FB + 3) sig += p; else noise += p;
    end
    // one-sided power of a Hann-windowed sine: 3 A^2 N^2 / 32
    want = 3.0 * AMP * AMP * real'(NPTS) * real'(NPTS) / 32.0;
    gain_db = 10.0 * $log10(sig / want);
    sndr = 10.0 * $log10(sig / noise);
    $display("SNDR %0.1f dB, signal gain %0.2f dB, max |x3| %0.3f", sndr, gain_db, x3max);
    $display("mechanisms: periods %0d, held cycles %0d, yd +1:%0d 0:%0d -1:%0d, intermediate DAC levels %0d",
             n_frames, n_hold, n_pos, n_zero, n_neg, n_mid);
    check(gain_db > -0.5 && gain_db < 0.5, "in-band signal gain is unity");
    check(sndr >= 85, "SNDR");
    check(n_frames == (WARM + NPTS + Q - 1) / Q, "one period every Q fast cycles");
    check(n_hold > 0, "up-sampling hold occurred");
    check(n_pos > 0 && n_neg > 0 && n_zero > 0, "all three y_d levels occurred");
    check(n_mid > 0, "intermediate FIR-DAC levels occurred");
    
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
