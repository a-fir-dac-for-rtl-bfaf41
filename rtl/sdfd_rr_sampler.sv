// sdfd_rr_sampler: down-sampler of the reduced-rate FIR-DAC.
//
// In the reduced-rate variant the down-sampling by q is moved in front of the
// weighted cells: the cells see the delay-line taps only once per modulator
// period Ts and keep them for the whole period, so the FIR-DAC switches at fs
// while the digital modulator and the delay line still run at q*fs. The FIR
// taps then also act as the decimation (anti-alias) filter of y_d.
//
// Timing (a choice of this design): the taps of sub-period 0, v_i(nq), are
// passed straight through during sub-period 0 and captured at its end, and
// the captured copy is output for sub-periods 1..q-1. This adds no delay to
// the q*fs path; the cells see v_i(nq) for exactly one Ts. Reset clears the
// held copy.
//
// Moving the down-sampler in front of the weights follows the published
// reduced-rate FIR-DAC; the sampling phase is this design's choice.
module sdfd_rr_sampler
  import sdfd_pkg::*;
#(
  parameter int Q = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  frame_start,
  input  tri_t  taps_in  [2*Q-1],
  output tri_t  taps_out [2*Q-1]
);

  localparam int NT = 2 * Q - 1;

  tri_t held [NT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NT; i++) held[i] <= TRI_ZERO;
    end else if (frame_start) begin
      for (int i = 0; i < NT; i++) held[i] <= taps_in[i];
    end
  end

  always_comb begin
    for (int i = 0; i < NT; i++) taps_out[i] = frame_start ? taps_in[i] : held[i];
  end

endmodule
