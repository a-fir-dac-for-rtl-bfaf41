// sd_fir_dac: digital core of the sigma-delta FIR-DAC.
//
// Replaces the multi-bit feedback DAC of a sigma-delta modulator: the N-bit
// quantizer code is up-sampled by q (held for q fast cycles), re-quantized to
// three levels by a second-order error-feedback digital modulator, and passed
// down a 2q-2 stage delay line whose 2q-1 taps switch the weighted cells of
// the FIR-DAC (sinc^2 weights, see sdfd_pkg). Three-level differential cells
// are linear by construction, so the mismatch of the cells only alters the
// FIR response instead of adding distortion.
//
// Two tap vectors are produced: `taps`, changing at q*fs (the plain
// sigma-delta FIR-DAC), and `taps_rr`, sampled once per Ts (the reduced-rate
// variant that can also feed a discrete-time loop). `yd` is the modulator
// output stream at q*fs; `v` (digital quantizer input) and `sat` (its
// saturation) are for observation.
//
// Timing: clk is the q*fs clock. y_code is taken at the edge that starts
// sub-period 0 (frame_start high after it); yd and taps[0] respond in the same
// cycle (no added delay), the FIR-DAC itself delays by (q-1)Ts/q.
//
// The composition follows the published sigma-delta FIR-DAC and its
// reduced-rate variant; the interface is this design's.
module sd_fir_dac
  import sdfd_pkg::*;
#(
  parameter int N  = 3,         // main quantizer bits
  parameter int Q  = 2,         // oversampling ratio of the digital modulator
  parameter int M  = N + 7,     // digital modulator word length
  parameter int LD = 2          // digital modulator order
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N-1:0]              y_code,
  output tri_t                      yd,
  output tri_t                      taps    [2*Q-1],
  output tri_t                      taps_rr [2*Q-1],
  output logic signed [M-1:0]       y_up,
  output logic [$clog2(Q+1)-1:0]    phase,
  output logic                      frame_start,
  output logic signed [M-1:0]       v,
  output logic                      sat
);

  sdfd_upsampler #(.N(N), .Q(Q), .M(M)) u_up (
    .clk, .rst_n, .y_code, .y_up, .phase, .frame_start
  );

  sdfd_dsdm #(.M(M), .F(N), .LD(LD)) u_dsdm (
    .clk, .rst_n, .u(y_up), .yd, .v, .sat
  );

  sdfd_delay_line #(.Q(Q)) u_line (
    .clk, .rst_n, .d(yd), .taps
  );

  sdfd_rr_sampler #(.Q(Q)) u_rr (
    .clk, .rst_n, .frame_start, .taps_in(taps), .taps_out(taps_rr)
  );

endmodule
