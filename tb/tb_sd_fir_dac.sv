// tb_sd_fir_dac: self-checking test of the digital core of the sigma-delta
// FIR-DAC (up-sampler, digital modulator, delay line, reduced-rate sampler).
//
// A random quantizer code is offered every fast cycle; the core must take it
// only at period starts. A cycle-accurate reference written here from the
// defining equations (y_up(nq+k) = y(n); v = u + 2e1 - e2, three-level
// rounding; v_i(r) = y_d(r-i); reduced-rate taps = taps of sub-period 0)
// predicts yd, every tap and every reduced-rate tap each cycle. Then a
// constant code must give a y_d average, and a sinc^2-weighted tap average,
// equal to the code's level, and a code step must reach y_d in the cycle it
// is sampled (no added latency).
//
// The chain up-sampler, digital modulator, delay line and reduced-rate
// sampler follows the published design; the reference model's cycle
// alignment and the stimulus are this design's choices.
module tb_sd_fir_dac;
  import sdfd_pkg::*;

  localparam int N = 3, Q = 2, M = 10, NT = 2 * Q - 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [N-1:0] y_code;
  tri_t yd;
  tri_t taps [NT], taps_rr [NT];
  logic signed [M-1:0] y_up, v;
  logic [$clog2(Q+1)-1:0] phase;
  logic frame_start, sat;

  sd_fir_dac dut (
    .clk, .rst_n, .y_code, .yd, .taps, .taps_rr, .y_up, .phase, .frame_start, .v, .sat);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int r_ph = 0, r_u = 0, r_e1 = 0, r_e2 = 0;
  int r_hist [NT];
  int r_rr [NT];

  // one cycle of the reference: returns y_d of the current cycle
  function automatic int ref_yd(output int e_new);
    int vv, q;
    vv = r_u + 2 * r_e1 - r_e2;
    q = (vv >= (1 << (N - 1))) ? 1 : (vv < -(1 << (N - 1))) ? -1 : 0;
    e_new = vv - q * (1 << N);
    return q;
  endfunction

  task automatic step_and_check(input logic [N-1:0] code, output int q);
    int e_new;
    y_code = code;
    #1;
    q = ref_yd(e_new);
    r_hist[0] = q;
    if (r_ph == 0) for (int i = 0; i < NT; i++) r_rr[i] = r_hist[i];
    check(tri_value(yd) == q, "yd");
    for (int i = 0; i < NT; i++) check(tri_value(taps[i]) == r_hist[i], "tap");
    for (int i = 0; i < NT; i++) check(tri_value(taps_rr[i]) == r_rr[i], "reduced-rate tap");
    check(frame_start == (r_ph == 0), "frame_start");
    @(posedge clk);
    #1;
    // advance reference to the new edge
    r_e2 = r_e1;
    r_e1 = e_new;
    for (int i = NT - 1; i > 0; i--) r_hist[i] = r_hist[i-1];
    if (r_ph == Q - 1) r_u = 2 * int'(code) - ((1 << N) - 1);
    r_ph = (r_ph + 1) % Q;
  endtask

  initial begin
    int q, acc, facc;
    for (int i = 0; i < NT; i++) begin r_hist[i] = 0; r_rr[i] = 0; end
    y_code = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // random codes
    for (int n = 0; n < 4000; n++) step_and_check(N'($urandom), q);
    // constant code 6: level 5/8, average over 1600 cycles = 1000
    acc = 0;
    facc = 0;
    for (int n = 0; n < 1600; n++) begin
      step_and_check(N'(6), q);
      if (n >= 16) begin
        acc += q;
        for (int i = 0; i < NT; i++) facc += fir_weight(Q, i) * r_hist[i];
      end
    end
    // 1584 cycles * 5/8 = 990 ; weighted sum carries a factor Q^2
    check(acc >= 987 && acc <= 993, "DC average of yd");
    check(facc >= 4 * 987 && facc <= 4 * 993, "DC average of the sinc^2 weighted taps");
    // latency: align to the last sub-period, then step the code to full scale
    while (r_ph != Q - 1) step_and_check(N'(0), q);
    for (int n = 0; n < 20; n++) step_and_check(N'(0), q);
    while (r_ph != Q - 1) step_and_check(N'(0), q);
    step_and_check(N'(7), q);       // code taken at this edge
    #0 check(frame_start && y_up == 10'sd7, "code sampled at the period start");
    check(tri_value(yd) == ref_yd(q) && tri_value(yd) >= 0, "y_d reacts in the same cycle");
    check(!sat, "no saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
