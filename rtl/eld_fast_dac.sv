// eld_fast_dac: excess-loop-delay model and fast compensation DAC around the
// quantizer (behavioural model).
//
// In a real modulator the quantizer and the feedback DACs take time, so the
// feedback of the code decided at the start of period n only reaches the loop
// filter one period later. This block models that delay as one full period Ts
// and adds the usual remedy, a fast DAC of gain KSTAR whose output is taken off
// the quantizer input:
//   code_out(n) = code_in(n-1)          (what every loop DAC applies in period n)
//   vq          = x - KSTAR * level(code_out)
// where level(c) = (2c - (2^N - 1)) / 2^N is the mid-rise level of code c, in
// units of full scale. x is the last integrator output at the sampling edge
// and vq is the quantizer input. Together with the raised inner-loop gains
// (K2 = 1.25, K3 = 2 instead of 0.8 and 1) this restores the impulse response
// of the delay-free loop.
//
// Interface and timing: clk is the Q*fs clock. The delay register takes
// code_in at the edge that ends sub-period Q-1 (capture high in the cycle
// before), the same edge at which the up-sampler takes code_out, so code_out
// reaches the up-sampler exactly one period late. vq is combinational in x and
// in the register, and the quantizer's decision only enters the register, so
// there is no combinational loop. Reset sets the register to code 2^(N-1),
// the smallest positive level.
//
// The one-period delay and KSTAR = 1.45 follow the published delay-compensated
// loop. Placing the whole delay in one register on the code, and the reset
// code, are this design's choices.
module eld_fast_dac #(
  parameter int  N     = 3,
  parameter real KSTAR = 1.45
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         capture,
  input  real          x,
  input  logic [N-1:0] code_in,
  output real          vq,
  output logic [N-1:0] code_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code_out <= N'(1 << (N - 1));
    else if (capture) code_out <= code_in;
  end

  always_comb begin
    vq = x - KSTAR * real'(2 * int'(code_out) - ((1 << N) - 1)) / real'(1 << N);
  end

endmodule
