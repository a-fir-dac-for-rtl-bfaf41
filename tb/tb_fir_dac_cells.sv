// tb_fir_dac_cells: self-checking test of the FIR-DAC cell model.
//
// An ideal instance (Q = 2 and Q = 3) must output sum_i f_i v_i with the
// sinc^2 weights f_i computed here from their closed form, for random tap
// vectors; all +1 taps give exactly +1 (unity DC gain). An instance with 0.2 %
// mismatch must deviate from the ideal sum by no more than a few standard
// deviations of the weights, must still be odd-symmetric (inverting every tap
// inverts the output: the three-level cells are linear) and must give 0 for
// all-zero taps.
//
// The sinc^2 weights follow the published design; the mismatch model and
// the tolerances are this design's choices.
module tb_fir_dac_cells;
  import sdfd_pkg::*;

  int checks = 0, failures = 0;

  tri_t t2 [3], t3 [5];
  real o2, o3, om;

  fir_dac_cells #(.Q(2)) dut2 (.taps(t2), .i_out(o2));
  fir_dac_cells #(.Q(3)) dut3 (.taps(t3), .i_out(o3));
  fir_dac_cells #(.Q(2), .MISMATCH(0.002), .SEED(7)) dutm (.taps(t2), .i_out(om));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tri_t to_tri(int v);
    return (v > 0) ? TRI_POS : (v < 0) ? TRI_NEG : TRI_ZERO;
  endfunction

  // f_i of a q-tap sinc^2: (i+1)/q^2 rising, (2q-1-i)/q^2 falling
  function automatic real f(int q, int i);
    return (i <= q - 1) ? real'(i + 1) / real'(q * q) : real'(2 * q - 1 - i) / real'(q * q);
  endfunction

  initial begin
    int a2 [3], a3 [5];
    real e2, e3, pos, dev, maxdev;
    maxdev = 0.0;
    #1;
    for (int n = 0; n < 500; n++) begin
      e2 = 0.0;
      e3 = 0.0;
      for (int i = 0; i < 3; i++) begin
        a2[i] = $urandom_range(0, 2) - 1;
        t2[i] = to_tri(a2[i]);
        e2 += f(2, i) * a2[i];
      end
      for (int i = 0; i < 5; i++) begin
        a3[i] = $urandom_range(0, 2) - 1;
        t3[i] = to_tri(a3[i]);
        e3 += f(3, i) * a3[i];
      end
      #1;
      check(o2 > e2 - 1e-12 && o2 < e2 + 1e-12, "Q=2 ideal weighted sum");
      check(o3 > e3 - 1e-12 && o3 < e3 + 1e-12, "Q=3 ideal weighted sum");
      dev = om - e2;
      if (dev < 0) dev = -dev;
      if (dev > maxdev) maxdev = dev;
      check(dev < 0.02, "mismatch error within bounds");
      pos = om;
      for (int i = 0; i < 3; i++) t2[i] = to_tri(-a2[i]);
      #1;
      check(om + pos < 1e-12 && om + pos > -1e-12, "mismatched cells stay odd-symmetric");
    end
    for (int i = 0; i < 3; i++) t2[i] = TRI_POS;
    for (int i = 0; i < 5; i++) t3[i] = TRI_POS;
    #1;
    check(o2 > 1.0 - 1e-12 && o2 < 1.0 + 1e-12, "Q=2 DC gain 1");
    check(o3 > 1.0 - 1e-12 && o3 < 1.0 + 1e-12, "Q=3 DC gain 1");
    check(om != o2, "mismatch changes the weights");
    for (int i = 0; i < 3; i++) t2[i] = TRI_ZERO;
    #1;
    check(om == 0.0 && o2 == 0.0, "zero taps give zero");
    $display("largest mismatch error %g", maxdev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
