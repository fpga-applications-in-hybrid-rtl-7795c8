// tb_inv_park: random d/q vectors at random angles; checks
// alpha = d*cos - q*sin and beta = d*sin + q*cos within 2 LSB, including
// saturation, and the one-clock latency. A pure q vector must lead the
// angle by 90 degrees.
// The rotation follows the document's inverse Park equation; the tolerance
// and stimulus are this testbench's choice.
module tb_inv_park;
  import foc_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  q15_t d, q, sin_t, cos_t, alpha, beta;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  inv_park dut (.*);

  function automatic int sat(real v);
    if (v > 32767.0) return 32767;
    if (v < -32768.0) return -32768;
    return $rtoi(v < 0 ? v - 0.5 : v + 0.5);
  endfunction

  task automatic apply(int vd, int vq, real th);
    int s, c, ea, eb;
    s = sat(32767.0 * $sin(th)); c = sat(32767.0 * $cos(th));
    @(negedge clk);
    d = 16'(vd); q = 16'(vq); sin_t = 16'(s); cos_t = 16'(c); in_valid = 1;
    ea = sat((real'(vd) * c - real'(vq) * s) / 32768.0);
    eb = sat((real'(vd) * s + real'(vq) * c) / 32768.0);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || int'(alpha) - ea > 2 || ea - int'(alpha) > 2 ||
        int'(beta) - eb > 2 || eb - int'(beta) > 2) begin
      failures++;
      $display("FAIL %0d %0d %f -> %0d %0d exp %0d %0d", vd, vq, th, alpha, beta, ea, eb);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    apply(0, 10000, 0.0);                   // q on the beta axis at angle 0
    apply(0, 10000, 1.5707963267948966);    // ... and on -alpha at 90 degrees
    apply(-32768, 32767, 2.356194490192345); // saturates alpha
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
