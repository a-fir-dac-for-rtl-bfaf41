// tb_modulator_jitter: clock-jitter sensitivity of the FIR-DAC feedback.
//
// Four configurations are run closed-loop: the sigma-delta FIR-DAC and the
// reduced-rate FIR-DAC, each for N = 3, q = 2 and for N = 4, q = 3. Each is
// run once without jitter and once with Gaussian edge jitter of rms JIT * Ts on
// the FIR-DAC (see ct_loop_filter); the input is a sine at 0.5 of full scale
// and the SNDR of y_d is measured as in modulator_sndr_probe.
//
// Expected result, derived here independently of the loop model's code: an
// edge displaced by beta adds an input-referred error (beta/Ts) * step of the
// DAC output, so per modulator period the error variance is
//   V = JIT^2 * q * E[step^2]
// with E[step^2] measured on the jittered run's own DAC output. For a white
// error of variance V per period, each bin of the 32768-point Hann-windowed
// transform of y_d (taken at q*fs) holds 3 V q NPTS / 8 on average, to be
// added to the in-band noise of the jitter-free run. The measured SNDR must
// match this prediction within 1.5 dB, and the jitter must cost at least 6 dB
// (so the test really sees it).
//
// For comparison, a conventional multi-bit NRZ DAC driven by the same y(n)
// would add V_mb = JIT^2 * E[(y(n) - y(n-1))^2] per period (measured on the
// same run). The FIR-DAC's jitter noise must stay within 6 dB of that: its
// three-level stream steps q times per period and carries the re-quantization
// noise, but the sinc^2 filter keeps the steps small (the runs land about
// 4 to 5 dB above the multi-bit figure). The reduced-rate DAC steps once per
// period, by the sum of q fast steps, and must land within 3 dB of the fast
// FIR-DAC.
//
// The configurations (N = 3, q = 2 and N = 4, q = 3) and the first-order
// jitter error model follow the published design. The jitter level, the
// input amplitude and the limits are this design's choices; the published
// expectation of q times less jitter noise for the reduced-rate DAC is not
// checked, since these runs show the two about equal.
module tb_modulator_jitter;

  localparam real JIT  = 0.002;
  localparam int  NPTS = 32768;
  localparam int  NCFG = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic done [NCFG][2];
  real  sndr [NCFG][2], sig [NCFG][2], noise [NCFG][2], dms [NCFG][2], yms [NCFG][2];
  logic bnd  [NCFG][2];

  // cfg: 0 = N3 q2 fast, 1 = N3 q2 reduced-rate, 2 = N4 q3 fast, 3 = N4 q3 reduced-rate
  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    for (genvar j = 0; j < 2; j++) begin : g_jit
      modulator_sndr_probe #(
        .N       ((c < 2) ? 3 : 4),
        .Q       ((c < 2) ? 2 : 3),
        .RR_MODE (c % 2 == 1),
        .JITTER  ((j == 1) ? JIT : 0.0),
        .SEED    (5 + c)
      ) probe (.clk, .rst_n, .done(done[c][j]), .sndr_db(sndr[c][j]), .sig_pow(sig[c][j]),
               .noise_pow(noise[c][j]), .dstep_ms(dms[c][j]),
               .ystep_ms(yms[c][j]), .bounded(bnd[c][j]));
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [NCFG];
    real v, q, nbins, pred_noise, pred_db, mb_noise, jit_noise [NCFG];
    int bw;
    names[0] = "N=3 q=2 FIR-DAC     ";
    names[1] = "N=3 q=2 reduced-rate";
    names[2] = "N=4 q=3 FIR-DAC     ";
    names[3] = "N=4 q=3 reduced-rate";
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int c = 0; c < NCFG; c++) begin
      wait (done[c][0]);
      wait (done[c][1]);
    end
    #1;
    for (int c = 0; c < NCFG; c++) begin
      q = (c < 2) ? 2.0 : 3.0;
      bw = NPTS / (2 * 32 * int'(q));
      nbins = real'(bw - 1 - 7);
      v = JIT * JIT * q * dms[c][1];
      jit_noise[c] = nbins * 3.0 * v * q * real'(NPTS) / 8.0;
      pred_noise = noise[c][0] + jit_noise[c];
      pred_db = 10.0 * $log10(sig[c][1] / pred_noise);
      mb_noise = nbins * 3.0 * (JIT * JIT * yms[c][1]) * q * real'(NPTS) / 8.0;
      $display("%s: no jitter %0.1f dB, jitter %0.1f dB, predicted %0.1f dB, jitter noise vs multi-bit DAC %0.1f dB",
               names[c], sndr[c][0], sndr[c][1], pred_db, 10.0 * $log10(jit_noise[c] / mb_noise));
      check(10.0 * $log10(jit_noise[c] / mb_noise) < 6.0, "jitter noise within 6 dB of a multi-bit DAC's");
      check(bnd[c][0] && bnd[c][1], "loops bounded");
      check(sndr[c][1] - pred_db < 1.5 && pred_db - sndr[c][1] < 1.5, "jitter noise as predicted");
      check(sndr[c][0] - sndr[c][1] > 6.0, "jitter visible in the SNDR");
    end
    for (int c = 1; c < NCFG; c += 2)
      check(10.0 * $log10(jit_noise[c] / jit_noise[c-1]) < 3.0 &&
            10.0 * $log10(jit_noise[c] / jit_noise[c-1]) > -3.0, "reduced-rate jitter noise near the fast FIR-DAC's");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
