// tb_modulator_mismatch_sweep: Monte-Carlo run of FIR-DAC cell mismatch.
//
// NSEED modulators with independent random weight errors are run for each of
// four cases: the sigma-delta FIR-DAC and the reduced-rate FIR-DAC, each at
// 0.1 % and 0.2 % rms relative error per weight, next to one ideal modulator
// of each kind. Every run is a closed loop with a sine at 0.5 of full scale
// and a 32768-point Hann-windowed SNDR of y_d (see modulator_sndr_probe).
// Checks: every loop stays bounded; each mismatched sigma-delta FIR-DAC run
// stays within 3 dB of the ideal modulator (mismatch only alters the FIR
// response, and the continuous-time loop filters what the altered response
// lets through); the reduced-rate DAC folds that out-of-band noise back into
// the band by its down-sampling, so it must lose more on average than the
// fast FIR-DAC at the same mismatch, yet stay within 30 dB of its own ideal.
// The mean and spread of each case are printed.
//
// The 0.1 % and 0.2 % mismatch levels and the Monte-Carlo method follow the
// published design; the number of seeds (25, kept small for run time), the
// input amplitude and the limits are this design's choices.
module tb_modulator_mismatch_sweep;

  localparam int NSEED = 25;
  localparam int NCASE = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic done   [NCASE][NSEED];
  real  sndr   [NCASE][NSEED];
  logic bnd    [NCASE][NSEED];
  logic done_ideal [2];
  real  sndr_ideal [2];
  logic bnd_ideal  [2];

  for (genvar c = 0; c < NCASE; c++) begin : g_case
    for (genvar s = 0; s < NSEED; s++) begin : g_seed
      modulator_sndr_probe #(
        .RR_MODE (c >= 2),
        .MISMATCH((c % 2 == 0) ? 0.001 : 0.002),
        .SEED    (101 + 17 * s + 1000 * c)
      ) probe (.clk, .rst_n, .done(done[c][s]), .sndr_db(sndr[c][s]),
                 .sig_pow(), .noise_pow(), .dstep_ms(), .ystep_ms(), .bounded(bnd[c][s]));
    end
  end
  for (genvar r = 0; r < 2; r++) begin : g_ideal
    modulator_sndr_probe #(.RR_MODE(r == 1)) probe (
      .clk, .rst_n, .done(done_ideal[r]), .sndr_db(sndr_ideal[r]),
      .sig_pow(), .noise_pow(), .dstep_ms(), .ystep_ms(), .bounded(bnd_ideal[r]));
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
    string names [NCASE];
    real mean, var_, ref_db;
    real means [NCASE];
    names[0] = "FIR-DAC, 0.1 %";
    names[1] = "FIR-DAC, 0.2 %";
    names[2] = "reduced-rate, 0.1 %";
    names[3] = "reduced-rate, 0.2 %";
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    wait (done_ideal[0] && done_ideal[1]);
    for (int c = 0; c < NCASE; c++)
      for (int s = 0; s < NSEED; s++) wait (done[c][s]);
    #1;
    check(bnd_ideal[0] && bnd_ideal[1], "ideal loops bounded");
    $display("ideal: FIR-DAC %0.1f dB, reduced-rate %0.1f dB", sndr_ideal[0], sndr_ideal[1]);
    for (int c = 0; c < NCASE; c++) begin
      ref_db = sndr_ideal[c / 2];
      mean = 0.0;
      for (int s = 0; s < NSEED; s++) begin
        check(bnd[c][s], "loop bounded");
        if (c < 2) check(sndr[c][s] > ref_db - 3.0, "FIR-DAC SNDR within 3 dB of the ideal modulator");
        else       check(sndr[c][s] > ref_db - 30.0, "reduced-rate SNDR within 30 dB of its ideal modulator");
        mean += sndr[c][s];
      end
      mean /= NSEED;
      var_ = 0.0;
      for (int s = 0; s < NSEED; s++) var_ += (sndr[c][s] - mean) * (sndr[c][s] - mean);
      means[c] = mean;
      $display("%s: mean %0.1f dB, std %0.2f dB over %0d runs", names[c], mean, $sqrt(var_ / NSEED), NSEED);
    end
    check(sndr_ideal[1] - means[2] > sndr_ideal[0] - means[0], "reduced-rate loses more at 0.1 %");
    check(sndr_ideal[1] - means[3] > sndr_ideal[0] - means[1], "reduced-rate loses more at 0.2 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
