// tb_modulator_jitter_dac2: clock jitter in the second feedback loop.
//
// When the second-loop DAC takes the three-level stream y_d (DAC2_YD = 1) it
// switches at q*fs, and clock jitter disturbs it as it does the FIR-DAC. Its
// error is shaped by the first integrator in front of it, so at an
// oversampling ratio of 32 it should add less in-band noise than the jitter of
// the outer loop. Four modulators (N = 3, q = 2, input 0.4 of full scale;
// with y_d in the second loop and jitter the loop is at its stability limit at
// 0.5) are run: DAC2_YD = 0 and 1, each without jitter and with Gaussian edge jitter of
// rms JIT * Ts. The jitter noise of each is the in-band noise of the jittered
// run minus that of the clean one. Checks:
//   * all loops bounded;
//   * jitter costs the DAC2_YD = 0 modulator at least 6 dB (the test sees it);
//   * with DAC2_YD = 1 the jitter noise is larger than with DAC2_YD = 0 (the
//     second DAC adds some), by at most a factor of 2 (3 dB), i.e. the second
//     loop's part stays below the first loop's.
//
// The configuration and the expectation that the second loop's jitter noise
// stays below the first loop's at this oversampling ratio follow the published
// analysis; the jitter level, the input amplitude and the limits are this
// design's choices.
module tb_modulator_jitter_dac2;

  localparam real JIT = 0.002;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic done [2][2];
  real  sndr [2][2], noise [2][2];
  logic bnd  [2][2];

  for (genvar d = 0; d < 2; d++) begin : g_dac2
    for (genvar j = 0; j < 2; j++) begin : g_jit
      modulator_sndr_probe #(.DAC2_YD(d == 1), .JITTER(j == 1 ? JIT : 0.0), .SEED(7), .AMP(0.4)) probe (
        .clk, .rst_n, .done(done[d][j]), .sndr_db(sndr[d][j]), .sig_pow(), .noise_pow(noise[d][j]),
        .dstep_ms(), .ystep_ms(), .bounded(bnd[d][j]));
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
    real jn0, jn1;
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int d = 0; d < 2; d++)
      for (int j = 0; j < 2; j++) wait (done[d][j]);
    #1;
    for (int d = 0; d < 2; d++)
      for (int j = 0; j < 2; j++) check(bnd[d][j], "loop bounded");
    jn0 = noise[0][1] - noise[0][0];
    jn1 = noise[1][1] - noise[1][0];
    $display("second DAC takes y  : no jitter %0.1f dB, jitter %0.1f dB", sndr[0][0], sndr[0][1]);
    $display("second DAC takes y_d: no jitter %0.1f dB, jitter %0.1f dB", sndr[1][0], sndr[1][1]);
    $display("jitter noise with y_d in the second loop vs y: %0.2f dB", 10.0 * $log10(jn1 / jn0));
    check(sndr[0][0] - sndr[0][1] > 6.0, "jitter costs at least 6 dB");
    check(jn1 > jn0, "second-loop DAC adds jitter noise");
    check(jn1 < 2.0 * jn0, "second-loop jitter noise below the outer loop's");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
