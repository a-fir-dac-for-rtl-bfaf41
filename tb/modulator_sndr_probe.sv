// modulator_sndr_probe: test helper that runs one closed-loop modulator and
// measures its in-band SNDR.
//
// It instantiates sd_fir_dac_modulator with the given RR_MODE, MISMATCH,
// SEED, JITTER, DAC2_YD and amplifier bandwidths GBW1..GBW3, drives it with a
// sine of amplitude AMP at bin FB of an NPTS-point transform taken at the fast
// clock rate, skips WARM cycles, then records NPTS Hann-windowed samples of
// y_d. When the record is full it computes the
// power of every bin below the signal band edge (fs/2 divided by the
// oversampling ratio OSR) with the Goertzel recursion, and raises `done` with
// `sndr_db` = signal bins (FB +- 3) over the other in-band bins, and both
// powers (`sig_pow`, `noise_pow`, squared Goertzel magnitudes summed over
// the bins). `dstep_ms` is the mean square of the FIR-DAC output step at the
// fast edges of the record, the quantity clock jitter multiplies; `ystep_ms`
// is the mean square of the step of the held multi-bit level per period, which
// a conventional multi-bit feedback DAC would see. `bounded`
// stays high while the last integrator stays below 2 in magnitude.
//
// The oversampling ratio of 32 and the 32768-point record follow the
// published design; the Hann window, the Goertzel evaluation, the signal-bin
// width and the warm-up length are this design's choices.
module modulator_sndr_probe
  import sdfd_pkg::*;
#(
  parameter int  N        = 3,
  parameter int  Q        = 2,
  parameter bit  RR_MODE  = 1'b0,
  parameter real MISMATCH = 0.0,
  parameter int  SEED     = 1,
  parameter real JITTER   = 0.0,
  parameter real AMP      = 0.5,
  parameter bit  DAC2_YD  = 1'b0,
  parameter real GBW1     = 0.0,
  parameter real GBW2     = 0.0,
  parameter real GBW3     = 0.0,
  parameter int  NPTS     = 32768,
  parameter int  FB       = 33,
  parameter int  OSR      = 32,
  parameter int  WARM     = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output real  sndr_db,
  output real  sig_pow,
  output real  noise_pow,
  output real  dstep_ms,
  output real  ystep_ms,
  output logic bounded
);

  localparam int  M  = N + 7;
  localparam real PI = 3.14159265358979323846;
  localparam int  BW = NPTS / (2 * OSR * Q);

  real x_in, dac1, x1, x2, x3;
  tri_t yd;
  logic signed [M-1:0] y_up, v;
  logic [N-1:0] y_code;
  logic frame_start, sat;
  logic [$clog2(Q+1)-1:0] phase;

  sd_fir_dac_modulator #(.N(N), .Q(Q), .RR_MODE(RR_MODE), .MISMATCH(MISMATCH), .SEED(SEED),
                         .JITTER(JITTER), .DAC2_YD(DAC2_YD), .GBW1(GBW1), .GBW2(GBW2), .GBW3(GBW3)) dut (
    .clk, .rst_n, .x_in, .yd, .y_up, .y_code, .frame_start, .phase,
    .dac1, .x1, .x2, .x3, .v, .sat, .vq());

  real samples [NPTS];

  initial begin
    real sig, noise, p, c, s0, s1, s2, dprev, dsum, yprev, ysum, ynow;
    int nper;
    dprev = 0.0;
    dsum = 0.0;
    yprev = 0.0;
    ysum = 0.0;
    nper = 0;
    done = 1'b0;
    sndr_db = 0.0;
    sig_pow = 0.0;
    noise_pow = 0.0;
    dstep_ms = 0.0;
    ystep_ms = 0.0;
    bounded = 1'b1;
    x_in = 0.0;
    @(posedge rst_n);
    for (int cyc = 0; cyc < WARM + NPTS; cyc++) begin
      x_in = AMP * $sin(2.0 * PI * real'(FB) * real'(cyc) / real'(NPTS));
      #1;
      if (x3 > 2.0 || x3 < -2.0) bounded = 1'b0;
      if (cyc >= WARM) dsum += (dac1 - dprev) * (dac1 - dprev);
      dprev = dac1;
      if (frame_start) begin
        ynow = real'(y_up) / real'(1 << N);
        if (cyc >= WARM) begin
          ysum += (ynow - yprev) * (ynow - yprev);
          nper++;
        end
        yprev = ynow;
      end
      if (cyc >= WARM)
        samples[cyc - WARM] = real'(tri_value(yd)) * 0.5 *
                              (1.0 - $cos(2.0 * PI * real'(cyc - WARM) / real'(NPTS)));
      @(posedge clk);
      #1;
    end
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
    sndr_db = 10.0 * $log10(sig / noise);
    sig_pow = sig;
    noise_pow = noise;
    dstep_ms = dsum / real'(NPTS);
    ystep_ms = ysum / real'(nper);
    done = 1'b1;
  end

endmodule
