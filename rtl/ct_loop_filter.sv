// ct_loop_filter: behavioural model of the third-order continuous-time loop
// filter of the main modulator (not synthesizable; the real part is three
// active integrators with current-steering feedback DACs).
//
// Feedback topology, integrator unity-gain frequency fs:
//   dx1/dt = fs (B1 x_in - K1 dac1)
//   dx2/dt = fs (x1 - K2 d2)
//   dx3/dt = fs (x2 - K3 y)
// dac1 is the FIR-DAC output, y the multi-bit feedback (the held quantizer
// level) and d2 the second-loop DAC input: y, or y_d when DAC2_YD = 1. With
// d = y everywhere this gives NTF(s) = s^3 / (s^3 + K3 fs s^2 + K2 fs^2 s +
// K1 fs^3). All DACs are non-return-to-zero with no excess delay.
//
// Timing: clk is the q*fs clock. Between two edges every input is constant, so
// the chain is integrated exactly over h = Ts/Q (a = fs h = 1/Q):
//   x1' = x1 + a A1,  x2' = x2 + a A2 + a^2/2 A1,
//   x3' = x3 + a A3 + a^2/2 A2 + a^3/6 A1
// with A1 = B1 x_in - K1 dac1, A2 = x1 - K2 d2, A3 = x2 - K3 y. x*_next are
// these values (the state at the coming edge) and are registered at it;
// x3_next feeds the quantizer so that the code sampled at an edge is the
// integrator value at that instant. Reset clears the integrators.
//
// Clock jitter (JITTER > 0): the edge that starts each interval is displaced
// by beta, Gaussian with rms JITTER * Ts, drawn per edge from a generator
// seeded by SEED. The outer DAC then holds its previous value for beta longer,
// which moves the charge K1 * (beta/Ts) * (dac1_prev - dac1) into the first
// integrator at the start of the interval (the usual first-order NRZ jitter
// model, error = (beta/Ts) times the step of the DAC output). The pulse is
// carried exactly through the chain (x1 += p, x2 += a p, x3 += a^2/2 p). The
// third DAC, and the second when it takes y, are taken as jitter-free: they
// change once per Ts and their error is shaped by the integrators in front of
// them. When the second DAC takes the three-level y_d (DAC2_YD = 1) it
// switches at q*fs like the FIR-DAC, and the same edge adds
// -K2 * beta * (d2_prev - d2) to the second integrator (x2 += p2, x3 += a p2).
//
// Finite amplifier gain-bandwidth (GBW1..GBW3 > 0, each the amplifier's
// unity-gain frequency divided by 2 pi fs; 0 means ideal): an active-RC
// integrator of unity-gain frequency wu around an amplifier A(s) = wt/s is
//   (wu/s) * G / (1 + s tau),  G = wt / (wt + wu),  tau = 1 / (wt + wu),
// i.e. a lower gain and an extra pole. Each such stage gets a second state w
// (the ideal-integrator part, w' = fs G A) whose lagged copy is the output
// (tau x' = w - x). Then the whole chain is integrated numerically over each
// interval with NSUB fourth-order Runge-Kutta steps instead of the closed
// form; the jitter pulse enters w1.
//
// Topology, NTF and K1..K3 follow the published design's no-delay loop; the
// input gain B1 = K1 and the exact piecewise-constant integration are this
// design's choices.
module ct_loop_filter
  import sdfd_pkg::*;
#(
  parameter int  N       = 3,
  parameter int  Q       = 2,
  parameter int  M       = N + 7,
  parameter real K1      = 0.3,
  parameter real K2      = 0.8,
  parameter real K3      = 1.0,
  parameter real B1      = 0.3,
  parameter bit  DAC2_YD = 1'b0,
  parameter real JITTER  = 0.0,     // rms edge displacement of the outer DAC, in Ts
  parameter int  SEED    = 1,
  parameter real GBW1    = 0.0,     // amplifier unity-gain frequency / (2 pi fs), 0: ideal
  parameter real GBW2    = 0.0,
  parameter real GBW3    = 0.0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  real                 x_in,
  input  real                 dac1,
  input  logic signed [M-1:0] y_held,
  input  tri_t                yd,
  output real                 x1,
  output real                 x2,
  output real                 x3,
  output real                 x3_next
);

  localparam real A = 1.0 / real'(Q);
  localparam real TWO_PI = 6.283185307179586;
  localparam bit  FINITE = (GBW1 > 0.0) || (GBW2 > 0.0) || (GBW3 > 0.0);
  localparam int  NSUB = 16;
  // gain and time constant (in Ts) of each finite-GBW integrator
  localparam real G1 = (GBW1 > 0.0) ? TWO_PI * GBW1 / (TWO_PI * GBW1 + 1.0) : 1.0;
  localparam real G2 = (GBW2 > 0.0) ? TWO_PI * GBW2 / (TWO_PI * GBW2 + 1.0) : 1.0;
  localparam real G3 = (GBW3 > 0.0) ? TWO_PI * GBW3 / (TWO_PI * GBW3 + 1.0) : 1.0;
  localparam real T1 = (GBW1 > 0.0) ? 1.0 / (TWO_PI * GBW1 + 1.0) : 1.0;
  localparam real T2 = (GBW2 > 0.0) ? 1.0 / (TWO_PI * GBW2 + 1.0) : 1.0;
  localparam real T3 = (GBW3 > 0.0) ? 1.0 / (TWO_PI * GBW3 + 1.0) : 1.0;

  real w1, w2, w3, w1_next, w2_next, w3_next;
  real sv [6];

  // time derivative of {w1, w2, w3, x1, x2, x3}; an ideal stage has x = w
  function automatic void deriv(input real s [6], input real u1, input real d2v, input real yvv,
                                output real ds [6]);
    ds[0] = G1 * u1;
    ds[1] = G2 * (s[3] - K2 * d2v);
    ds[2] = G3 * (s[4] - K3 * yvv);
    ds[3] = (GBW1 > 0.0) ? (s[0] - s[3]) / T1 : ds[0];
    ds[4] = (GBW2 > 0.0) ? (s[1] - s[4]) / T2 : ds[1];
    ds[5] = (GBW3 > 0.0) ? (s[2] - s[5]) / T3 : ds[2];
  endfunction

  // NSUB Runge-Kutta steps over one interval Ts/Q with constant inputs
  function automatic void integrate(inout real s [6], input real u1, input real d2v, input real yvv);
    real k1 [6], k2 [6], k3 [6], k4 [6], t [6];
    real h;
    h = A / real'(NSUB);
    for (int n = 0; n < NSUB; n++) begin
      deriv(s, u1, d2v, yvv, k1);
      for (int i = 0; i < 6; i++) t[i] = s[i] + h / 2.0 * k1[i];
      deriv(t, u1, d2v, yvv, k2);
      for (int i = 0; i < 6; i++) t[i] = s[i] + h / 2.0 * k2[i];
      deriv(t, u1, d2v, yvv, k3);
      for (int i = 0; i < 6; i++) t[i] = s[i] + h * k3[i];
      deriv(t, u1, d2v, yvv, k4);
      for (int i = 0; i < 6; i++) s[i] = s[i] + h / 6.0 * (k1[i] + 2.0 * k2[i] + 2.0 * k3[i] + k4[i]);
    end
  endfunction

  real yv, d2, a1, a2, a3, x1_next, x2_next, pj;
  real dac1_prev, d2_prev, beta, pj2;
  longint unsigned rng;

  // Park-Miller generator and Box-Muller transform for the edge displacement
  function automatic longint unsigned next_state(longint unsigned st);
    return (st * 64'd48271) % 64'd2147483647;
  endfunction

  function automatic real gauss(longint unsigned s1, longint unsigned s2);
    real u1, u2;
    u1 = (real'(s1) + 0.5) / 2147483647.0;
    u2 = (real'(s2) + 0.5) / 2147483647.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  always_comb begin
    yv = real'(y_held) / real'(1 << N);
    d2 = DAC2_YD ? real'(tri_value(yd)) : yv;
    a1 = B1 * x_in - K1 * dac1;
    pj = -K1 * beta * (dac1_prev - dac1);
    pj2 = DAC2_YD ? -K2 * beta * (d2_prev - d2) : 0.0;
    a2 = x1 - K2 * d2;
    a3 = x2 - K3 * yv;
    x1_next = x1 + pj + A * a1;
    x2_next = x2 + A * pj + pj2 + A * a2 + A * A / 2.0 * a1;
    x3_next = x3 + A * A / 2.0 * pj + A * pj2 + A * a3 + A * A / 2.0 * a2 + A * A * A / 6.0 * a1;
    w1_next = x1_next;
    w2_next = x2_next;
    w3_next = x3_next;
    sv[0] = w1 + pj;
    sv[1] = w2 + pj2;
    sv[2] = w3;
    sv[3] = (GBW1 > 0.0) ? x1 : sv[0];
    sv[4] = (GBW2 > 0.0) ? x2 : sv[1];
    sv[5] = (GBW3 > 0.0) ? x3 : sv[2];
    if (FINITE) begin
      integrate(sv, a1, d2, yv);
      w1_next = sv[0];
      w2_next = sv[1];
      w3_next = sv[2];
      x1_next = sv[3];
      x2_next = sv[4];
      x3_next = sv[5];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= 0.0;
      x2 <= 0.0;
      x3 <= 0.0;
      w1 <= 0.0;
      w2 <= 0.0;
      w3 <= 0.0;
      dac1_prev <= 0.0;
      d2_prev <= 0.0;
      beta <= 0.0;
      rng <= (SEED <= 0) ? 64'd1 : 64'(SEED);
    end else begin
      x1 <= x1_next;
      x2 <= x2_next;
      x3 <= x3_next;
      w1 <= w1_next;
      w2 <= w2_next;
      w3 <= w3_next;
      dac1_prev <= dac1;
      d2_prev <= d2;
      if (JITTER > 0.0) begin
        rng  <= next_state(next_state(rng));
        beta <= JITTER * gauss(next_state(rng), next_state(next_state(rng)));
      end
    end
  end

endmodule
