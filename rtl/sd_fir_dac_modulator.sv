// sd_fir_dac_modulator: third-order continuous-time sigma-delta modulator
// whose outer feedback DAC is a sigma-delta FIR-DAC.
//
// A multi-bit modulator needs a multi-bit feedback DAC whose element mismatch
// goes straight to the output. Here the outer DAC is replaced: the N-bit code
// y(n) is up-sampled by Q, re-quantized to three levels at Q*fs by a digital
// second-order modulator (sd_fir_dac), and fed back through 2Q-1 weighted
// three-level cells forming a sinc^2 FIR filter (fir_dac_cells). Three-level
// cells are linear, and the FIR smooths the stream so the clock-jitter error
// stays near that of a multi-bit DAC. The inner two feedback DACs are still
// driven by y(n). The modulator output is the three-level stream yd at Q*fs.
//
// RR_MODE = 0: the cells switch at Q*fs (sigma-delta FIR-DAC).
// RR_MODE = 1: the taps are sampled once per Ts before the weights
//              (reduced-rate FIR-DAC), so the cells switch at fs.
// MISMATCH / SEED: random relative error of the cell weights.
// JITTER: rms clock-edge displacement of the FIR-DAC, in units of Ts.
// GBW1..GBW3: unity-gain frequency of each integrator's amplifier over
//          2 pi fs (0: ideal amplifier).
// ELD = 1: one period of excess loop delay on every feedback path, with the
//          fast compensation DAC KSTAR around the quantizer (eld_fast_dac)
//          and the inner-loop gains raised to K2 = 1.25, K3 = 2.
//
// The loop filter, the quantizer and the cells are behavioural models in real
// arithmetic; the digital core is synthesizable. Loop coefficients are the
// no-delay set K1 = 0.3, K2 = 0.8, K3 = 1 with input gain B1 = K1 (unity
// signal gain at DC, a choice of this design). Full scale is +-1 for both
// x_in and yd.
//
// Timing: clk is the Q*fs clock; x_in is held constant between edges. The
// quantizer samples the last integrator (ELD = 1: minus the fast DAC output,
// seen at port vq) at the edge that starts each Ts (frame_start high after
// it); y_up then holds that level for Ts (ELD = 1: one period later). y_code
// is the code the up-sampler takes at that edge.
//
// The loop structure, N = 3, Q = 2 and the coefficients follow the published
// design; RR_MODE as a parameter of one top, B1 and the level mapping are
// this design's choices.
module sd_fir_dac_modulator
  import sdfd_pkg::*;
#(
  parameter int  N        = 3,
  parameter int  Q        = 2,
  parameter int  M        = N + 7,
  parameter int  LD       = 2,
  parameter bit  RR_MODE  = 1'b0,
  parameter bit  DAC2_YD  = 1'b0,
  parameter real MISMATCH = 0.0,
  parameter int  SEED     = 1,
  parameter real JITTER   = 0.0,
  parameter bit  ELD      = 1'b0,
  parameter real KSTAR    = 1.45,
  parameter real GBW1     = 0.0,
  parameter real GBW2     = 0.0,
  parameter real GBW3     = 0.0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  real                       x_in,
  output tri_t                      yd,
  output logic signed [M-1:0]       y_up,
  output logic [N-1:0]              y_code,
  output logic                      frame_start,
  output logic [$clog2(Q+1)-1:0]    phase,
  output real                       dac1,
  output real                       x1,
  output real                       x2,
  output real                       x3,
  output logic signed [M-1:0]       v,
  output logic                      sat,
  output real                       vq
);

  tri_t taps    [2*Q-1];
  tri_t taps_rr [2*Q-1];
  tri_t cell_in [2*Q-1];
  real  x3_next;
  logic [N-1:0] q_code;

  // inner-loop gains: the delay-free set, or the set that goes with the fast DAC
  localparam real K2 = ELD ? 1.25 : 0.8;
  localparam real K3 = ELD ? 2.0 : 1.0;

  ct_loop_filter #(.N(N), .Q(Q), .M(M), .K2(K2), .K3(K3), .DAC2_YD(DAC2_YD), .JITTER(JITTER), .SEED(SEED),
                   .GBW1(GBW1), .GBW2(GBW2), .GBW3(GBW3)) u_loop (
    .clk, .rst_n, .x_in, .dac1, .y_held(y_up), .yd, .x1, .x2, .x3, .x3_next
  );

  flash_adc #(.N(N)) u_adc (
    .vin(vq), .code(q_code)
  );

  if (ELD) begin : g_eld
    // the delay register takes the code at the edge where the up-sampler does
    logic last_sub;
    assign last_sub = (int'(phase) == Q - 1);
    eld_fast_dac #(.N(N), .KSTAR(KSTAR)) u_eld (
      .clk, .rst_n, .capture(last_sub), .x(x3_next), .code_in(q_code), .vq, .code_out(y_code)
    );
  end else begin : g_no_eld
    assign vq = x3_next;
    assign y_code = q_code;
  end

  sd_fir_dac #(.N(N), .Q(Q), .M(M), .LD(LD)) u_core (
    .clk, .rst_n, .y_code, .yd, .taps, .taps_rr, .y_up, .phase, .frame_start, .v, .sat
  );

  always_comb begin
    for (int i = 0; i < 2 * Q - 1; i++) cell_in[i] = RR_MODE ? taps_rr[i] : taps[i];
  end

  fir_dac_cells #(.Q(Q), .MISMATCH(MISMATCH), .SEED(SEED)) u_cells (
    .taps(cell_in), .i_out(dac1)
  );

endmodule
