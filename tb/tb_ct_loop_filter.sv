// tb_ct_loop_filter: self-checking test of the continuous-time loop filter
// model.
//
// Random piecewise-constant inputs (x_in, dac1 and the held multi-bit level)
// are applied for one fast period each. A reference integrates the same three
// differential equations here with 2000 small Euler steps per period and the
// states of model and reference must agree to 1e-3; x3_next must equal the
// state the model holds after the next edge. A second instance with the
// second-loop DAC driven by y_d is compared the same way.
//
// The loop equations and the coefficients follow the published design; the
// Euler reference, its step count and the tolerance are this design's
// choices.
module tb_ct_loop_filter;
  import sdfd_pkg::*;

  localparam int N = 3, Q = 2, M = 10;
  localparam real K1 = 0.3, K2 = 0.8, K3 = 1.0, B1 = 0.3;
  localparam real GBA = 0.5, GBB = 1.0, GBC = 2.5;
  localparam real TWO_PI = 6.283185307179586;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  real x_in, dac1;
  logic signed [M-1:0] y_held;
  tri_t yd;
  real x1, x2, x3, x3n, z1, z2, z3, z3n, g1, g2, g3, g3n;

  ct_loop_filter #(.N(N), .Q(Q), .M(M)) dut (
    .clk, .rst_n, .x_in, .dac1, .y_held, .yd, .x1, .x2, .x3, .x3_next(x3n));
  ct_loop_filter #(.N(N), .Q(Q), .M(M), .DAC2_YD(1'b1)) dut_yd (
    .clk, .rst_n, .x_in, .dac1, .y_held, .yd, .x1(z1), .x2(z2), .x3(z3), .x3_next(z3n));
  ct_loop_filter #(.N(N), .Q(Q), .M(M), .GBW1(GBA), .GBW2(GBB), .GBW3(GBC)) dut_gbw (
    .clk, .rst_n, .x_in, .dac1, .y_held, .yd, .x1(g1), .x2(g2), .x3(g3), .x3_next(g3n));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // relative tolerance for the finite-bandwidth instance, whose reference is
  // not re-aligned to the model (its amplifier nodes are internal)
  function automatic bit rclose(real a, real b);
    real m;
    m = (a < 0.0) ? -a : a;
    return (a - b < 1e-3 * (1.0 + m)) && (b - a < 1e-3 * (1.0 + m));
  endfunction

  function automatic bit close(real a, real b);
    return (a - b < 1e-3) && (b - a < 1e-3);
  endfunction

  initial begin
    real r1, r2, r3, s1, s2, s3, yv, ydv, h, pred;
    real q1, q2, q3, n1, n2, n3, dq1, dq2, dq3, dn1, dn2, dn3;
    int steps;
    r1 = 0; r2 = 0; r3 = 0; s1 = 0; s2 = 0; s3 = 0;
    q1 = 0; q2 = 0; q3 = 0; n1 = 0; n2 = 0; n3 = 0;
    steps = 2000;
    h = 1.0 / (real'(Q) * real'(steps));   // fs * dt
    x_in = 0.0; dac1 = 0.0; y_held = '0; yd = TRI_ZERO;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(x1 == 0.0 && x2 == 0.0 && x3 == 0.0, "reset clears the integrators");
    for (int n = 0; n < 300; n++) begin
      x_in = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
      dac1 = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
      y_held = M'(2 * $urandom_range(0, 7) - 7);
      yd = ($urandom_range(0, 1) == 1) ? TRI_POS : TRI_NEG;
      yv = real'(y_held) / 8.0;
      ydv = real'(tri_value(yd));
      #1;
      pred = x3n;
      for (int k = 0; k < steps; k++) begin
        r3 += h * (r2 - K3 * yv);
        r2 += h * (r1 - K2 * yv);
        r1 += h * (B1 * x_in - K1 * dac1);
        s3 += h * (s2 - K3 * yv);
        s2 += h * (s1 - K2 * ydv);
        s1 += h * (B1 * x_in - K1 * dac1);
        // finite bandwidth: amplifier output q, inverting node n, amplifier
        // wt/s: q' = wt n, (n + q)' = wu (input - n), wu = fs
        dq1 = TWO_PI * GBA * n1;
        dq2 = TWO_PI * GBB * n2;
        dq3 = TWO_PI * GBC * n3;
        dn1 = (B1 * x_in - K1 * dac1 - n1) - dq1;
        dn2 = (q1 - K2 * yv - n2) - dq2;
        dn3 = (q2 - K3 * yv - n3) - dq3;
        q1 += h * dq1; q2 += h * dq2; q3 += h * dq3;
        n1 += h * dn1; n2 += h * dn2; n3 += h * dn3;
      end
      @(posedge clk);
      #1;
      check(close(x1, r1) && close(x2, r2) && close(x3, r3), "integrator states");
      check(close(z1, s1) && close(z2, s2) && close(z3, s3), "states with y_d in the second loop");
      check(x3 == pred, "x3_next is the state at the coming edge");
      if (!(rclose(g1, q1) && rclose(g2, q2) && rclose(g3, q3)) && failures < 3)
        $display("gbw: model %f %f %f reference %f %f %f", g1, g2, g3, q1, q2, q3);
      check(rclose(g1, q1) && rclose(g2, q2) && rclose(g3, q3), "states with finite amplifier bandwidth");
      // keep the reference on the model's exact values so errors do not add up
      r1 = x1; r2 = x2; r3 = x3;
      s1 = z1; s2 = z2; s3 = z3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
