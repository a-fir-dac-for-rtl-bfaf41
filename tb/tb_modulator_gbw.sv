// tb_modulator_gbw: SNDR versus the gain-bandwidth of the first two
// amplifiers.
//
// The sigma-delta FIR-DAC and the reduced-rate FIR-DAC modulators are run with
// the unity-gain frequency of the first and second integrator amplifiers set
// to GBW * 2 pi fs for GBW = 0.25, 0.5, 1, 2 and 4, the third amplifier at
// 5 pi fs (GBW3 = 2.5), and once with ideal amplifiers. The input is a sine at
// 0.5 of full scale and the SNDR is measured as in modulator_sndr_probe.
// Checks:
//   * every loop stays bounded;
//   * at GBW = 1 (2 pi fs) and above, each modulator is within 3 dB of its
//     ideal-amplifier result, i.e. an amplifier bandwidth of about 2 pi fs is
//     sufficient although the FIR-DAC switches at q fs;
//   * the SNDR does not fall when the bandwidth rises from 0.25 to 4 by more
//     than 1 dB per step (noise of the runs), and at the lowest bandwidth it
//     is below the result at GBW = 4 (the sweep does reach the region where
//     bandwidth matters).
// The table is printed.
//
// The swept quantity, the 5 pi fs third amplifier and the claim that 2 pi fs
// suffices follow the published design; the single-pole amplifier model, the
// sweep points, the amplitude and the limits are this design's choices.
module tb_modulator_gbw;

  localparam int  NG = 5;
  localparam real GBWS [NG] = '{0.25, 0.5, 1.0, 2.0, 4.0};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic done [2][NG];
  real  sndr [2][NG];
  logic bnd  [2][NG];
  logic done_ideal [2];
  real  sndr_ideal [2];
  logic bnd_ideal  [2];

  for (genvar r = 0; r < 2; r++) begin : g_mode
    for (genvar g = 0; g < NG; g++) begin : g_gbw
      modulator_sndr_probe #(.RR_MODE(r == 1), .GBW1(GBWS[g]), .GBW2(GBWS[g]), .GBW3(2.5)) probe (
        .clk, .rst_n, .done(done[r][g]), .sndr_db(sndr[r][g]), .sig_pow(), .noise_pow(),
        .dstep_ms(), .ystep_ms(), .bounded(bnd[r][g]));
    end
    modulator_sndr_probe #(.RR_MODE(r == 1)) ideal (
      .clk, .rst_n, .done(done_ideal[r]), .sndr_db(sndr_ideal[r]), .sig_pow(), .noise_pow(),
      .dstep_ms(), .ystep_ms(), .bounded(bnd_ideal[r]));
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
    string names [2];
    names[0] = "FIR-DAC     ";
    names[1] = "reduced-rate";
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int r = 0; r < 2; r++) begin
      wait (done_ideal[r]);
      for (int g = 0; g < NG; g++) wait (done[r][g]);
    end
    #1;
    for (int r = 0; r < 2; r++) begin
      $display("%s: ideal %0.1f dB; GBW/(2 pi fs) 0.25: %0.1f, 0.5: %0.1f, 1: %0.1f, 2: %0.1f, 4: %0.1f dB",
               names[r], sndr_ideal[r], sndr[r][0], sndr[r][1], sndr[r][2], sndr[r][3], sndr[r][4]);
      check(bnd_ideal[r], "ideal loop bounded");
      for (int g = 0; g < NG; g++) begin
        check(bnd[r][g], "loop bounded");
        if (GBWS[g] >= 1.0) check(sndr[r][g] > sndr_ideal[r] - 3.0, "2 pi fs or more is within 3 dB of ideal");
        if (g > 0) check(sndr[r][g] > sndr[r][g-1] - 1.0, "SNDR does not fall as the bandwidth rises");
      end
      check(sndr[r][0] < sndr[r][NG-1], "lowest bandwidth below the highest");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
