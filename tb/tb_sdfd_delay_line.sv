// tb_sdfd_delay_line: self-checking test of the FIR-DAC delay line.
//
// Instances with Q = 2 (3 taps, the default) and Q = 4 (7 taps) get a random
// three-level stream. A history kept here gives the expected tap values
// v_i(r) = d(r - i); every tap is compared every cycle, which also checks the
// one-sample delay per stage. Reset must clear the line to the zero level.
//
// The 2Q-2 stage delay line follows the published design; the random
// stimulus is this design's choice.
module tb_sdfd_delay_line;
  import sdfd_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tri_t d;
  tri_t taps2 [3];
  tri_t taps4 [7];

  sdfd_delay_line #(.Q(2)) dut2 (.clk, .rst_n, .d, .taps(taps2));
  sdfd_delay_line #(.Q(4)) dut4 (.clk, .rst_n, .d, .taps(taps4));

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
    tri_t hist [7];
    for (int i = 0; i < 7; i++) hist[i] = TRI_ZERO;
    d = TRI_POS;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 1; i < 3; i++) check(taps2[i] == TRI_ZERO, "reset clears Q=2 line");
    for (int i = 1; i < 7; i++) check(taps4[i] == TRI_ZERO, "reset clears Q=4 line");
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      d = rand_tri();
      hist[0] = d;
      #1;
      for (int i = 0; i < 3; i++) check(taps2[i] == hist[i], "tap of Q=2 line");
      for (int i = 0; i < 7; i++) check(taps4[i] == hist[i], "tap of Q=4 line");
      @(posedge clk);
      #1;
      for (int i = 6; i > 0; i--) hist[i] = hist[i-1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
