// tb_sdfd_upsampler: self-checking test of the sample-and-repeat up-sampler.
//
// Two instances (Q = 2, the default, and Q = 3, N = 4) get a new random code
// every fast cycle. The test checks that the phase counts 0..Q-1, that
// frame_start is high exactly once every Q cycles (the output rate is the
// input rate times Q), and that y_up changes only at the start of a period,
// to 2c - (2^N - 1) of the code present at that edge, and is then held for Q
// cycles. The expected values are computed here from the codes.
//
// The Q-fold sample-and-repeat follows the published design; the random
// codes, the Q = 3 instance and the level mapping checked are this design's
// choices.
module tb_sdfd_upsampler;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [2:0] code_a;
  logic signed [9:0] up_a;
  logic [1:0] ph_a;
  logic fs_a;

  logic [3:0] code_b;
  logic signed [10:0] up_b;
  logic [1:0] ph_b;
  logic fs_b;

  sdfd_upsampler #(.N(3), .Q(2), .M(10)) dut_a (
    .clk, .rst_n, .y_code(code_a), .y_up(up_a), .phase(ph_a), .frame_start(fs_a));
  sdfd_upsampler #(.N(4), .Q(3), .M(11)) dut_b (
    .clk, .rst_n, .y_code(code_b), .y_up(up_b), .phase(ph_b), .frame_start(fs_b));

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

  initial begin
    int exp_ph_a = 0, exp_ph_b = 0;
    int exp_a = 0, exp_b = 0;
    int frames_a = 0, frames_b = 0;
    code_a = '0;
    code_b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(up_a == 0 && up_b == 0 && ph_a == 0 && ph_b == 0, "reset state");
    for (int cyc = 0; cyc < 600; cyc++) begin
      code_a = 3'($urandom);
      code_b = 4'($urandom);
      @(posedge clk);
      // reference: capture on the edge that ends sub-period Q-1
      if (exp_ph_a == 1) exp_a = 2 * int'(code_a) - 7;
      if (exp_ph_b == 2) exp_b = 2 * int'(code_b) - 15;
      exp_ph_a = (exp_ph_a + 1) % 2;
      exp_ph_b = (exp_ph_b + 1) % 3;
      #1;
      check(int'(ph_a) == exp_ph_a, "phase a");
      check(int'(ph_b) == exp_ph_b, "phase b");
      check(fs_a == (exp_ph_a == 0), "frame_start a");
      check(fs_b == (exp_ph_b == 0), "frame_start b");
      check(int'(up_a) == exp_a, "y_up a");
      check(int'(up_b) == exp_b, "y_up b");
      if (fs_a) frames_a++;
      if (fs_b) frames_b++;
    end
    check(frames_a == 300, "rate a: one frame per 2 cycles");
    check(frames_b == 200, "rate b: one frame per 3 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
