// sdfd_upsampler: sample-and-repeat up-sampler of the sigma-delta FIR-DAC.
//
// The main modulator's N-bit quantizer delivers one code c per period Ts.
// This block runs on the fast clock (q*fs). A divide-by-Q phase counter marks
// the Q sub-periods k = 0..Q-1 of each Ts; at the clock edge that starts
// sub-period 0 the code is captured and converted to a signed fixed-point
// word, which is then held for all Q sub-periods: y_up(nq+k) = y(n). Holding
// instead of zero-stuffing is a sinc interpolation filter, (1-z^-q)/(1-z^-1).
//
// Level mapping (a choice of this design): code c stands for the mid-rise level
// (2c - (2^N-1)) / 2^N of full scale, i.e. +-1/8 .. +-7/8 for N = 3. The
// output word y_up holds the odd integer 2c - (2^N-1) and has N fractional
// bits, so +-1.0 (the three-level DAC's full scale) is +-2^N.
//
// Interface and timing: y_code must be stable at the edge where phase goes
// from Q-1 to 0 (frame_start then rises with y_up updated). Reset clears the
// held value to 0 and the phase to 0; the first capture is at the Q-th edge.
//
// Up-sampling by repetition follows the published design; the binary code
// input, the level mapping and the reset values are this design's choices.
module sdfd_upsampler #(
  parameter int N = 3,          // quantizer bits
  parameter int Q = 2,          // up-sampling ratio q
  parameter int M = N + 7       // word length of the digital modulator
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 y_code,
  output logic signed [M-1:0]          y_up,
  output logic [$clog2(Q+1)-1:0]       phase,
  output logic                         frame_start
);

  localparam int PW = $clog2(Q + 1);
  localparam logic [PW-1:0] LAST = PW'(Q - 1);

  logic signed [M-1:0] level;

  // 2c - (2^N - 1), an odd integer in units of 2^-N
  always_comb level = M'(signed'({1'b0, y_code, 1'b0})) - M'((1 << N) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      y_up  <= '0;
    end else begin
      if (phase == LAST) begin
        phase <= '0;
        y_up  <= level;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

  assign frame_start = (phase == '0);

endmodule
