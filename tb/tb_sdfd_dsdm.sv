// tb_sdfd_dsdm: self-checking test of the error-feedback digital modulator.
//
// A second-order (default) and a first-order instance are driven with random
// multi-bit levels, each held for two cycles as the up-sampler would. An
// independent integer model of v = u + S(z)e, y_d = round-and-clip(v),
// e = v - y_d is run alongside and every output is compared. Two properties
// of the shaping are checked on top: for the second-order instance the double
// running sum of (u - y_d) equals the stored error e, i.e. the error is shaped
// by (1-z^-1)^2,
// and a constant input gives a y_d average equal to that input. Each output
// level must occur.
//
// The error-feedback structure and S(z) = 2z^-1 - z^-2 follow the published
// design; the rounding thresholds, the saturation and the stimulus are this
// design's choices.
module tb_sdfd_dsdm;
  import sdfd_pkg::*;

  localparam int M = 10;
  localparam int F = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic signed [M-1:0] u;
  tri_t yd2, yd1;
  logic signed [M-1:0] v2, v1;
  logic sat2, sat1;

  sdfd_dsdm #(.M(M), .F(F), .LD(2)) dut2 (.clk, .rst_n, .u, .yd(yd2), .v(v2), .sat(sat2));
  sdfd_dsdm #(.M(M), .F(F), .LD(1)) dut1 (.clk, .rst_n, .u, .yd(yd1), .v(v1), .sat(sat1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int r2e1 = 0, r2e2 = 0, r1e1 = 0;

  function automatic int qlevel(int v);
    if (v >= (1 << (F - 1))) return 1;
    if (v < -(1 << (F - 1))) return -1;
    return 0;
  endfunction

  initial begin
    int rv2, rv1, q2, q1;
    longint s1 = 0, s2 = 0, smax = 0;
    int npos = 0, nneg = 0, nzero = 0;
    longint acc;
    u = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      if (n % 2 == 0) u = M'(2 * ($urandom_range(0, 7)) - 7);
      #1;
      rv2 = int'(u) + 2 * r2e1 - r2e2;
      rv1 = int'(u) + r1e1;
      q2 = qlevel(rv2);
      q1 = qlevel(rv1);
      check(int'(v2) == rv2 && tri_value(yd2) == q2, "second-order output");
      check(int'(v1) == rv1 && tri_value(yd1) == q1, "first-order output");
      check(!sat2 && !sat1, "no saturation within full scale");
      if (q2 > 0) npos++; else if (q2 < 0) nneg++; else nzero++;
      s1 += longint'(int'(u) - q2 * (1 << F));
      if (s1 + s2 != longint'(rv2 - q2 * (1 << F))) check(1'b0, "double sum of (u - yd) equals e");
      s2 += s1;
      if (s2 > smax) smax = s2;
      if (-s2 > smax) smax = -s2;
      @(posedge clk);
      #1;
      r2e2 = r2e1;
      r2e1 = rv2 - q2 * (1 << F);
      r1e1 = rv1 - q1 * (1 << F);
    end
    check(npos > 0 && nneg > 0 && nzero > 0, "all three output levels used");
    // DC input 3/8: average of yd over 800 cycles must be 3/8
    u = M'(3);
    acc = 0;
    repeat (800) begin
      #1 acc += longint'(tri_value(yd2));
      @(posedge clk);
    end
    #1;
    check(acc >= 297 && acc <= 303, "DC average of yd equals the input");
    // overload: beyond the word range the sum saturates
    u = M'(-(1 << (M - 1)));
    repeat (3) @(posedge clk);
    #1 check(sat2 == 1'b1 && yd2 == TRI_NEG, "saturation at the word range");
    $display("levels +%0d 0:%0d -%0d, max double sum %0d", npos, nzero, nneg, smax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
