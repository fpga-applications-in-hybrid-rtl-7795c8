// tb_pi_ctrl: random reference/feedback sequences, with clear pulses and
// long one-signed errors that drive the output into its limit; the
// expected output comes from a step-by-step model of
// I += KI*e >> SHIFT (clamped), out = KP*e >> SHIFT + I (clamped). Checks
// the output, the saturated flag, that the integrator does not wind up
// (output leaves the limit on the first sample after the error reverses
// far enough), and the one-clock latency.
// The document names the PI loops only; gains, limits and anti-windup are
// this design's choices.
module tb_pi_ctrl;
  import foc_pkg::*;

  localparam int KP = 2048, KI = 256, SH = 12, LIM = 29491;
  logic clk = 0, rst = 1, clear = 0, in_valid = 0, out_valid, saturated;
  q15_t ref_in, fb, out;
  int checks = 0, failures = 0, sat_seen = 0;
  longint integ = 0;

  always #5 clk = ~clk;

  pi_ctrl #(.KP(KP), .KI(KI), .GAIN_SHIFT(SH), .OUT_LIM(LIM)) dut (.*);

  function automatic longint clampl(longint v);
    return (v > LIM) ? LIM : (v < -LIM) ? -LIM : v;
  endfunction

  task automatic step(int r, int f);
    longint e, o, eo;
    bit es;
    @(negedge clk);
    ref_in = 16'(r); fb = 16'(f); in_valid = 1;
    e = longint'(r) - longint'(f);
    integ = clampl(integ + ((e * KI) >>> SH));
    o = ((e * KP) >>> SH) + integ;
    eo = clampl(o);
    es = (o > LIM) || (o < -LIM);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || longint'(out) != eo || saturated != es) begin
      failures++;
      $display("FAIL r=%0d f=%0d out=%0d sat=%0d exp %0d %0d", r, f, out, saturated, eo, es);
    end
    if (es) sat_seen++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 60; n++) step(20000, 0);      // wind into the limit
    step(-20000, 0);                                  // must come straight out
    checks++;
    if (saturated || int'(out) >= LIM) begin failures++; $display("FAIL wound up: %0d", out); end
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(50) == 0) begin
        @(negedge clk); clear = 1; @(negedge clk); clear = 0; integ = 0;
      end
      step(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768);
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL never saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
