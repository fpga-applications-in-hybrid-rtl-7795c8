// tb_wa_divider: random and corner divisions (numerator 0, equal operands,
// divisor 1, all-ones numerator, divisor 0); checks quotient, remainder,
// div0, that done arrives W+1 clocks after start, and that start while busy
// is ignored.
// The document asks for two dividers only; the bit-serial form and the
// divide-by-zero result are this design's choices.
module tb_wa_divider;
  localparam int W = 20;

  logic clk = 0, rst = 1, start = 0, busy, done, div0;
  logic [W-1:0] num = '0, den = '0, quot, rem;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  wa_divider #(.W(W)) dut (.*);

  task automatic divide(int n, int d);
    int t0;
    @(negedge clk);
    num = W'(n); den = W'(d); start = 1;
    @(posedge clk); t0 = cyc;
    @(negedge clk);
    num = W'($urandom); den = W'($urandom);  // a start while busy must be ignored
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != W + 1) begin failures++; $display("FAIL latency %0d", cyc - t0); end
    checks++;
    if (d == 0) begin
      if (!div0 || quot != '1) begin failures++; $display("FAIL div0 %0d", quot); end
    end else if (int'(quot) != n / d || int'(rem) != n % d || div0) begin
      failures++; $display("FAIL %0d/%0d = %0d r %0d", n, d, quot, rem);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    divide(0, 5); divide(1275, 1275); divide(12345, 1); divide(2**W - 1, 3); divide(77, 0);
    divide(285600, 1275); divide(5, 7);
    for (int n = 0; n < 300; n++)
      divide($urandom_range(2**W - 1), $urandom_range(1, 2047));
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
