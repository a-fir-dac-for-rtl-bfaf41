// sdfd_delay_line: digital delay line of the FIR-DAC.
//
// The FIR-DAC realises F(z) = ((1 - z^-q) / (q (1 - z^-1)))^2 with 2q-1
// weighted DAC cells. Cell i is switched by v_i, the modulator output delayed
// by i samples of the q*fs clock: v_0 = y_d and v_i(r) = v_{i-1}(r-1). This
// block is the 2q-2 storage stages that make v_1..v_{2q-2}; tap 0 is the
// input itself. The stages are flip-flops on the fast clock (one sample of
// delay each); a latch-based line clocked on alternate phases would give the
// same delays.
//
// Interface: d is the three-level stream, taps[i] = v_i. Reset sets every
// stage to the zero level.
//
// The 2q-2 stages and the tap definition follow the published design,
// which names latches for the stages; flip-flops are this design's choice.
module sdfd_delay_line
  import sdfd_pkg::*;
#(
  parameter int Q = 2           // taps per sinc; the line has 2Q-1 taps
) (
  input  logic  clk,
  input  logic  rst_n,
  input  tri_t  d,
  output tri_t  taps [2*Q-1]
);

  localparam int NT = 2 * Q - 1;

  tri_t stage [1:NT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < NT; i++) stage[i] <= TRI_ZERO;
    end else begin
      stage[1] <= d;
      for (int i = 2; i < NT; i++) stage[i] <= stage[i-1];
    end
  end

  always_comb begin
    taps[0] = d;
    for (int i = 1; i < NT; i++) taps[i] = stage[i];
  end

endmodule
