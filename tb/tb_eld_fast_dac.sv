// tb_eld_fast_dac: self-checking test of the excess-loop-delay register and
// the fast compensation DAC.
//
// Two instances (N = 3 with KSTAR = 1.45, the default, and N = 4 with
// KSTAR = 0.7) get a random code, a random integrator value and a capture
// strobe that is high every second cycle, as with Q = 2, plus random extra
// strobes and gaps. A reference register kept here follows the rule "take the
// code at a capturing edge, hold it otherwise". After reset the delayed code
// must be 2^(N-1); afterwards, in every cycle, code_out must equal the
// reference (the code of the last capturing edge, one period late) and vq must
// equal x - KSTAR * (2 code_out - (2^N - 1)) / 2^N within 1e-12.
//
// The one-period delay and KSTAR = 1.45 follow the published
// delay-compensated loop; the reset code and the random strobes are this
// design's choices.
module tb_eld_fast_dac;

  localparam int  CYCLES = 4000;
  localparam real KA = 1.45;
  localparam real KB = 0.7;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic       cap;
  real        x;
  logic [2:0] ca_in, ca_out;
  logic [3:0] cb_in, cb_out;
  real        vqa, vqb;

  eld_fast_dac u_a (
    .clk, .rst_n, .capture(cap), .x, .code_in(ca_in), .vq(vqa), .code_out(ca_out)
  );

  eld_fast_dac #(.N(4), .KSTAR(KB)) u_b (
    .clk, .rst_n, .capture(cap), .x, .code_in(cb_in), .vq(vqb), .code_out(cb_out)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic real level(int c, int n);
    return real'(2 * c - ((1 << n) - 1)) / real'(1 << n);
  endfunction

  function automatic bit near(real a, real b);
    return (a - b < 1e-12) && (b - a < 1e-12);
  endfunction

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ra, rb, n_cap, n_hold;
    cap = 1'b0;
    x = 0.0;
    ca_in = '0;
    cb_in = '0;
    n_cap = 0;
    n_hold = 0;
    repeat (2) @(posedge clk);
    #1;
    check(int'(ca_out) == 4 && int'(cb_out) == 8, "reset code 2^(N-1)");
    check(near(vqa, x - KA * level(4, 3)), "vq after reset, N = 3");
    rst_n = 1'b1;
    ra = 4;
    rb = 8;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      // drive the inputs for this cycle
      cap = (cyc % 2 == 1) ^ ($urandom_range(0, 9) == 0);
      x = (real'($urandom_range(0, 20000)) - 10000.0) / 4000.0;
      ca_in = 3'($urandom);
      cb_in = 4'($urandom);
      #1;
      check(near(vqa, x - KA * level(ra, 3)), "vq = x - KSTAR level(code_out), N = 3");
      check(near(vqb, x - KB * level(rb, 4)), "vq = x - KSTAR level(code_out), N = 4");
      if (cap) begin
        ra = int'(ca_in);
        rb = int'(cb_in);
        n_cap++;
      end else begin
        n_hold++;
      end
      @(posedge clk);
      #1;
      check(int'(ca_out) == ra, "code_out is the code of the last capturing edge, N = 3");
      check(int'(cb_out) == rb, "code_out is the code of the last capturing edge, N = 4");
    end
    check(n_cap > 0 && n_hold > 0, "captures and holds occurred");
    $display("captures %0d, holds %0d", n_cap, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
