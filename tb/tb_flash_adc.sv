// tb_flash_adc: self-checking test of the N-bit quantizer model.
//
// The input is swept from -1.5 to +1.5 in fine steps for N = 3 and N = 4. The
// expected code is found here by counting how many of the 2^N - 1 thresholds
// -1 + k 2^-(N-1), k = 1..2^N-1, the input reaches; over-range inputs must
// clip to 0 and 2^N - 1, and every code must be produced.
//
// The N-bit quantizer follows the published design; its thresholds and the
// sweep are this design's choices.
module tb_flash_adc;

  int checks = 0, failures = 0;

  real vin;
  logic [2:0] c3;
  logic [3:0] c4;

  flash_adc #(.N(3)) dut3 (.vin, .code(c3));
  flash_adc #(.N(4)) dut4 (.vin, .code(c4));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at vin=%f", what, vin);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int count_thresholds(real x, int n);
    int c = 0;
    for (int k = 1; k < (1 << n); k++)
      if (x >= -1.0 + real'(k) / real'(1 << (n - 1))) c++;
    return c;
  endfunction

  initial begin
    bit seen3 [8];
    bit seen4 [16];
    int all;
    for (int i = 0; i < 8; i++) seen3[i] = 0;
    for (int i = 0; i < 16; i++) seen4[i] = 0;
    for (int s = 0; s <= 3000; s++) begin
      vin = -1.5 + real'(s) * 0.001 + 0.0003;
      #1;
      check(int'(c3) == count_thresholds(vin, 3), "N=3 code");
      check(int'(c4) == count_thresholds(vin, 4), "N=4 code");
      seen3[c3] = 1;
      seen4[c4] = 1;
    end
    all = 1;
    for (int i = 0; i < 8; i++) if (!seen3[i]) all = 0;
    for (int i = 0; i < 16; i++) if (!seen4[i]) all = 0;
    check(all == 1, "every code produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
