// tb_clarke: random phase currents, balanced sets at several angles and
// saturating corners; checks alpha = (2ia - ib - ic)/3 and
// beta = (ib - ic)/sqrt(3) against real arithmetic within 2 LSB (the
// hardware's coefficients are 16-bit), and the one-clock latency.
// The amplitude-invariant coefficients follow the document's Clarke model;
// the tolerance and stimulus are this testbench's choice.
module tb_clarke;
  import foc_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  q15_t ia, ib, ic, i_alpha, i_beta;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clarke dut (.*);

  function automatic int sat(real v);
    if (v > 32767.0) return 32767;
    if (v < -32768.0) return -32768;
    return $rtoi(v < 0 ? v - 0.5 : v + 0.5);
  endfunction

  task automatic apply(int a, int b, int c);
    int ea, eb;
    @(negedge clk);
    ia = 16'(a); ib = 16'(b); ic = 16'(c); in_valid = 1;
    ea = sat((2.0 * a - b - c) / 3.0);
    eb = sat((real'(b) - real'(c)) / 1.7320508075688772);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || int'(i_alpha) - ea > 2 || ea - int'(i_alpha) > 2 ||
        int'(i_beta) - eb > 2 || eb - int'(i_beta) > 2) begin
      failures++;
      $display("FAIL %0d %0d %0d -> %0d %0d exp %0d %0d", a, b, c, i_alpha, i_beta, ea, eb);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid held"); end
  endtask

  initial begin
    real th;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 36; k++) begin
      th = k * 3.141592653589793 / 18.0;
      apply($rtoi(20000.0 * $cos(th)), $rtoi(20000.0 * $cos(th - 2.0943951)),
            $rtoi(20000.0 * $cos(th + 2.0943951)));
    end
    apply(32767, -32768, -32768);
    apply(-32768, 32767, 32767);
    apply(0, 32767, -32768);
    for (int n = 0; n < 500; n++)
      apply(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
            int'($urandom_range(65535)) - 32768);
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
