// tb_modulator_amplitude_sweep: SNDR of the sigma-delta FIR-DAC modulator
// versus input amplitude.
//
// Six modulators at their default parameters run side by side, each with a
// sine of a different amplitude: 0.01, 0.0316, 0.1, 0.316, 0.5 and 0.65 of
// full scale (-40 to -3.7 dBFS). Each SNDR is measured as in
// modulator_sndr_probe (32768-point Hann-windowed record of y_d, in-band bins
// at an oversampling ratio of 32). Checks:
//   * every loop stays bounded;
//   * the in-band signal power is that of the applied sine within 0.5 dB
//     (3 A^2 NPTS^2 / 32 for a Hann window), i.e. unity signal gain at every
//     level;
//   * the in-band noise does not depend on the signal: SNDR - 20 log10(A)
//     stays within 3 dB of its value at 0.5 for every amplitude, so the SNDR
//     rises by 1 dB per dB of input up to 0.65;
//   * the SNDR rises strictly from one amplitude to the next.
// The table of SNDR against amplitude is printed.
//
// The amplitude sweep, the oversampling ratio and the record length follow the
// published design; the amplitude points and the limits are this design's
// choices, and the sweep stops below -3 dBFS, where this loop is no longer
// stable.
module tb_modulator_amplitude_sweep;

  localparam int  NA   = 6;
  localparam int  NPTS = 32768;
  localparam real AMPS [NA] = '{0.01, 0.0316, 0.1, 0.316, 0.5, 0.65};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic done [NA];
  real  sndr [NA], sig [NA];
  logic bnd  [NA];

  for (genvar a = 0; a < NA; a++) begin : g_amp
    modulator_sndr_probe #(.AMP(AMPS[a])) probe (
      .clk, .rst_n, .done(done[a]), .sndr_db(sndr[a]), .sig_pow(sig[a]), .noise_pow(),
      .dstep_ms(), .ystep_ms(), .bounded(bnd[a]));
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
    real want, gain_db, floor_ref, floor_a;
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int a = 0; a < NA; a++) wait (done[a]);
    #1;
    floor_ref = sndr[4] - 20.0 * $log10(AMPS[4]);
    for (int a = 0; a < NA; a++) begin
      want = 3.0 * AMPS[a] * AMPS[a] * real'(NPTS) * real'(NPTS) / 32.0;
      gain_db = 10.0 * $log10(sig[a] / want);
      floor_a = sndr[a] - 20.0 * $log10(AMPS[a]);
      $display("amplitude %0.4f (%0.1f dBFS): SNDR %0.1f dB, signal gain %0.2f dB",
               AMPS[a], 20.0 * $log10(AMPS[a]), sndr[a], gain_db);
      check(bnd[a], "loop bounded");
      check(gain_db > -0.5 && gain_db < 0.5, "in-band signal gain is unity");
      check(floor_a > floor_ref - 3.0 && floor_a < floor_ref + 3.0, "noise independent of the signal level");
      if (a > 0) check(sndr[a] > sndr[a-1], "SNDR rises with the amplitude");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
