// sdfd_dsdm: error-feedback digital sigma-delta modulator with a three-level
// (1.5-bit) output, run at q*fs.
//
// Structure: v = u + S(z)*e, y_d = Q3(v), e = v - y_d. The quantizer keeps
// only the sign and the most significant bits of v (the integer part after
// rounding) and the truncated remainder e is stored. With
// S(z) = 2z^-1 - z^-2 (LD = 2) this gives Yd = U - (1 - z^-1)^2 E, a unity,
// delay-free signal transfer and second-order shaping of the re-quantization
// error; LD = 1 selects S(z) = z^-1. The hardware is two adders and two
// error registers, as the structure needs.
//
// Number format: u, v and e are M-bit two's complement with F fractional bits,
// so the output levels -1, 0, +1 are -2^F, 0, +2^F. The quantizer rounds to
// the nearest level (thresholds at +-1/2) and clips to +-1. With F equal to
// the quantizer resolution N the arithmetic is exact. v saturates at the
// M-bit range instead of wrapping (a choice of this design: the sum cannot
// reach it for inputs within full scale, `sat` flags it).
//
// Timing: y_d and v are combinational in u and the registers (delay-free
// path); the error registers update on every rising clk edge. Reset clears
// them.
//
// The error-feedback structure, S(z), the three-level output and the word
// length M = N+7 (N+3 when y_d also drives the second loop DAC) follow the
// published design. Rounding with thresholds at +-1/2 is the same as adding
// half an output step and keeping the sign and integer bits; saturation and
// the reset values are this design's choices.
module sdfd_dsdm
  import sdfd_pkg::*;
#(
  parameter int M  = 10,        // word length (N + 7)
  parameter int F  = 3,         // fractional bits of u
  parameter int LD = 2          // noise-shaping order of the error feedback, 1 or 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [M-1:0]  u,
  output tri_t                 yd,
  output logic signed [M-1:0]  v,
  output logic                 sat
);

  localparam int W = M + 3;     // headroom for the feedback sum
  localparam logic signed [W-1:0] VMAX  = W'((1 << (M - 1)) - 1);
  localparam logic signed [W-1:0] VMIN  = -W'(1 << (M - 1));
  localparam logic signed [W-1:0] HALF  = W'(1 << (F - 1));
  localparam logic signed [M-1:0] ONE   = M'(1 << F);

  logic signed [M-1:0] e1, e2, e_now;
  logic signed [W-1:0] sum;

  initial assert (LD == 1 || LD == 2) else $error("sdfd_dsdm: LD must be 1 or 2");

  always_comb begin
    if (LD == 2) sum = W'(u) + (W'(e1) <<< 1) - W'(e2);
    else         sum = W'(u) + W'(e1);
    sat = (sum > VMAX) || (sum < VMIN);
    if (sum > VMAX)      v = VMAX[M-1:0];
    else if (sum < VMIN) v = VMIN[M-1:0];
    else                 v = sum[M-1:0];
    if (W'(v) >= HALF)       yd = TRI_POS;
    else if (W'(v) < -HALF)  yd = TRI_NEG;
    else                     yd = TRI_ZERO;
    case (yd)
      TRI_POS: e_now = v - ONE;
      TRI_NEG: e_now = v + ONE;
      default: e_now = v;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1 <= '0;
      e2 <= '0;
    end else begin
      e1 <= e_now;
      e2 <= e1;
    end
  end

endmodule
