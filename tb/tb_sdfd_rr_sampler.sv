// tb_sdfd_rr_sampler: self-checking test of the reduced-rate tap sampler.
//
// The sampler (Q = 2 and Q = 3) gets random tap vectors every fast cycle and a
// frame_start that is high one cycle in Q. Expected: in the frame_start cycle
// the output equals the input; in the other Q-1 cycles it equals the input
// seen in the last frame_start cycle. The output may therefore change at most
// once per period, which is counted as the rate check.
//
// Sampling the taps once per period follows the published design; the
// sampling phase checked (sub-period 0) is this design's choice.
module tb_sdfd_rr_sampler;
  import sdfd_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic fs2, fs3;
  tri_t in2 [3], out2 [3];
  tri_t in3 [5], out3 [5];

  sdfd_rr_sampler #(.Q(2)) dut2 (.clk, .rst_n, .frame_start(fs2), .taps_in(in2), .taps_out(out2));
  sdfd_rr_sampler #(.Q(3)) dut3 (.clk, .rst_n, .frame_start(fs3), .taps_in(in3), .taps_out(out3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tri_t rand_tri();
    case ($urandom_range(0, 2))
      0: return TRI_NEG;
      1: return TRI_ZERO;
      default: return TRI_POS;
    endcase
  endfunction

  initial begin
    tri_t exp2 [3], exp3 [5];
    tri_t prev2 [3];
    int changes2 = 0, frames2 = 0;
    for (int i = 0; i < 3; i++) begin exp2[i] = TRI_ZERO; prev2[i] = TRI_ZERO; end
    for (int i = 0; i < 5; i++) exp3[i] = TRI_ZERO;
    fs2 = 1'b0;
    fs3 = 1'b0;
    for (int i = 0; i < 3; i++) in2[i] = TRI_POS;
    for (int i = 0; i < 5; i++) in3[i] = TRI_POS;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < 3; i++) check(out2[i] == TRI_ZERO, "reset clears Q=2 hold");
    rst_n = 1'b1;
    for (int n = 0; n < 1200; n++) begin
      fs2 = (n % 2 == 0);
      fs3 = (n % 3 == 0);
      for (int i = 0; i < 3; i++) in2[i] = rand_tri();
      for (int i = 0; i < 5; i++) in3[i] = rand_tri();
      if (fs2) for (int i = 0; i < 3; i++) exp2[i] = in2[i];
      if (fs3) for (int i = 0; i < 5; i++) exp3[i] = in3[i];
      #1;
      for (int i = 0; i < 3; i++) check(out2[i] == exp2[i], "Q=2 output");
      for (int i = 0; i < 5; i++) check(out3[i] == exp3[i], "Q=3 output");
      if (!fs2) for (int i = 0; i < 3; i++) if (out2[i] != prev2[i]) changes2++;
      if (fs2) frames2++;
      for (int i = 0; i < 3; i++) prev2[i] = out2[i];
      @(posedge clk);
      #1;
    end
    check(changes2 == 0 && frames2 == 600, "Q=2 output changes only once per period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
