// fir_dac_cells: behavioural model of the analog half of the FIR-DAC (not
// synthesizable; the real part is a set of weighted current cells injected
// into the virtual ground of the first integrator).
//
// Cell i is a differential three-level element of nominal weight
// f_i = w_i / q^2, w_i = i+1 (i < q) or 2q-1-i (i >= q), switched by tap v_i.
// The summed output is i_out = sum_i f_i (1 + eps_i) v_i in units of the DAC
// full scale; with all eps_i = 0 it is the sinc^2 filter
// F(z) = ((1 - z^-q)/(q(1 - z^-1)))^2 applied to the tap stream. eps_i is a
// relative weight error drawn once, at time zero, from a Gaussian of standard
// deviation MISMATCH (a fraction, e.g. 0.001 for 0.1 %) using a generator
// seeded by SEED; mismatch only changes the filter coefficients, so it cannot
// distort the signal. The output follows the taps with no delay.
//
// The weights follow the published design; the Gaussian mismatch model and
// its generator are this design's choices.
module fir_dac_cells
  import sdfd_pkg::*;
#(
  parameter int  Q        = 2,
  parameter real MISMATCH = 0.0,
  parameter int  SEED     = 1
) (
  input  tri_t taps [2*Q-1],
  output real  i_out
);

  localparam int NT = 2 * Q - 1;

  real weight [NT];

  // Park-Miller generator, so the drawn errors depend on SEED only.
  function automatic longint unsigned next_state(longint unsigned state);
    return (state * 64'd48271) % 64'd2147483647;
  endfunction

  initial begin
    longint unsigned st;
    real u1, u2, g;
    st = (SEED <= 0) ? 64'd1 : 64'(SEED);
    for (int i = 0; i < NT; i++) begin
      st = next_state(st);
      u1 = (real'(st) + 0.5) / 2147483647.0;
      st = next_state(st);
      u2 = (real'(st) + 0.5) / 2147483647.0;
      g  = $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
      weight[i] = real'(fir_weight(Q, i)) / real'(Q * Q) * (1.0 + MISMATCH * g);
    end
  end

  always_comb begin
    real acc;
    acc = 0.0;
    for (int i = 0; i < NT; i++) acc += weight[i] * real'(tri_value(taps[i]));
    i_out = acc;
  end

endmodule
