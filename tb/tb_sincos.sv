// tb_sincos: sweeps every table step of the angle plus random angles;
// checks sine and cosine of the step centre against real arithmetic within
// 1 LSB, checks that sin^2 + cos^2 stays within 0.1 % of 1, and the
// one-clock latency.
// The document names a trigonometric function of the angle only; the table
// size is this design's choice.
module tb_sincos;
  import foc_pkg::*;

  localparam int AB = 10;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  angle_t theta;
  q15_t sin_o, cos_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sincos #(.ANGLE_BITS(AB)) dut (.*);

  task automatic apply(int unsigned t);
    real ang, m;
    int es, ec;
    @(negedge clk);
    theta = 16'(t); in_valid = 1;
    ang = (real'(t >> (16 - AB)) + 0.5) * 6.283185307179586 / real'(2 ** AB);
    es = $rtoi(32767.0 * $sin(ang) + (($sin(ang) < 0) ? -0.5 : 0.5));
    ec = $rtoi(32767.0 * $cos(ang) + (($cos(ang) < 0) ? -0.5 : 0.5));
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || int'(sin_o) - es > 1 || es - int'(sin_o) > 1 ||
        int'(cos_o) - ec > 1 || ec - int'(cos_o) > 1) begin
      failures++;
      $display("FAIL theta %h: %0d %0d exp %0d %0d", t, sin_o, cos_o, es, ec);
    end
    m = (real'(sin_o) * real'(sin_o) + real'(cos_o) * real'(cos_o)) / (32767.0 * 32767.0);
    checks++;
    if (m > 1.001 || m < 0.999) begin failures++; $display("FAIL norm %f", m); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 2 ** AB; k++) apply(k << (16 - AB));
    for (int n = 0; n < 500; n++) apply($urandom_range(65535));
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
