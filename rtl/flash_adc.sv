// flash_adc: behavioural model of the main modulator's N-bit quantizer (not
// synthesizable; the real part is a flash ADC of 2^N - 1 comparators).
//
// The input is the last integrator output, in units of full scale. The
// 2^N - 1 thresholds are uniform at multiples of 2^-(N-1) between -1 and +1,
// and the output is the number of thresholds exceeded, the binary count of the
// thermometer code: code = clamp(floor((vin + 1) * 2^(N-1)), 0, 2^N - 1).
// Code c stands for the level (2c - (2^N-1)) / 2^N, so levels and thresholds
// have the same spacing (quantizer gain of one). Threshold spacing and level
// mapping are choices of this design. Sampling is done by the register that
// takes the code (the up-sampler), the model itself is combinational.
//
// The published design fixes only the resolution N; thresholds and level
// mapping are this design's choices.
module flash_adc #(
  parameter int N = 3
) (
  input  real          vin,
  output logic [N-1:0] code
);

  always_comb begin
    real s;
    s = (vin + 1.0) * real'(1 << (N - 1));
    if (s <= 0.0)                         code = '0;
    else if (s >= real'((1 << N) - 1))    code = '1;
    else                                  code = N'(int'($floor(s)));
  end

endmodule
