// sdfd_pkg: types and helpers shared by the sigma-delta FIR-DAC blocks.
//
// The digital sigma-delta modulator produces a 1.5-bit (three-level) stream
// y_d in {-1, 0, +1}. A differential three-level DAC cell is switched by two
// enables, one steering its current to the positive side and one to the
// negative side; tri_t encodes exactly those two enables, so a tap value can
// drive a cell with no decoding. Both enables high is never produced.
//
// Weights of the FIR-DAC follow a sinc^2 filter of q taps per sinc:
//   w_i = i+1 for 0 <= i <= q-1,  w_i = 2q-1-i for q <= i <= 2q-2,
// with f_i = w_i / q^2, so the weights sum to 1 (unity gain at DC).
//
// The sinc^2 weights and the three-level output follow the published
// sigma-delta FIR-DAC; the two-enable encoding is this design's choice.
package sdfd_pkg;

  // {neg_enable, pos_enable}
  typedef enum logic [1:0] {
    TRI_ZERO = 2'b00,
    TRI_POS  = 2'b01,
    TRI_NEG  = 2'b10
  } tri_t;

  // Signed value of a three-level sample.
  function automatic int tri_value(tri_t t);
    case (t)
      TRI_POS: return 1;
      TRI_NEG: return -1;
      default: return 0;
    endcase
  endfunction

  // Integer weight w_i of FIR-DAC tap i for q taps per sinc (f_i = w_i/q^2).
  function automatic int fir_weight(int q, int i);
    return (i < q) ? (i + 1) : (2 * q - 1 - i);
  endfunction

endpackage
