// tb_park: random alpha/beta vectors at random angles (sin/cos computed in
// the testbench); checks d = a*cos + b*sin and q = b*cos - a*sin within
// 2 LSB, including saturation, and the one-clock latency. A vector at the
// rotor angle must land on the d axis.
// The rotation follows the document's Park equation; the tolerance and
// stimulus are this testbench's choice.
module tb_park;
  import foc_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  q15_t alpha, beta, sin_t, cos_t, d, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  park dut (.*);

  function automatic int sat(real v);
    if (v > 32767.0) return 32767;
    if (v < -32768.0) return -32768;
    return $rtoi(v < 0 ? v - 0.5 : v + 0.5);
  endfunction

  task automatic apply(int a, int b, real th);
    int s, c, ed, eq;
    s = sat(32767.0 * $sin(th)); c = sat(32767.0 * $cos(th));
    @(negedge clk);
    alpha = 16'(a); beta = 16'(b); sin_t = 16'(s); cos_t = 16'(c); in_valid = 1;
    ed = sat((real'(a) * c + real'(b) * s) / 32768.0);
    eq = sat((real'(b) * c - real'(a) * s) / 32768.0);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || int'(d) - ed > 2 || ed - int'(d) > 2 ||
        int'(q) - eq > 2 || eq - int'(q) > 2) begin
      failures++;
      $display("FAIL %0d %0d %f -> %0d %0d exp %0d %0d", a, b, th, d, q, ed, eq);
    end
  endtask

  initial begin
    real th;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 24; k++) begin
      th = k * 0.2617993877991494;
      apply($rtoi(16000.0 * $cos(th)), $rtoi(16000.0 * $sin(th)), th);  // d = 16000, q = 0
    end
    apply(32767, 32767, 0.7853981633974483);  // saturates d
    for (int n = 0; n < 500; n++)
      apply(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
            real'($urandom_range(3600)) * 6.283185307179586 / 3600.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
