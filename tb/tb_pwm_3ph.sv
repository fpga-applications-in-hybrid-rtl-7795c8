// tb_pwm_3ph: checks the PWM generator at its default size: switching
// period (2*PERIOD clocks = 10 us, 100 kHz at 200 MHz), upper-switch high
// time 2*duty - DEAD, dead band DEAD clocks (300 ns) between complementary
// edges on both sides, centre alignment of the three upper PWMs, duty update
// only at period boundaries, the modulation extremes, enable, and that the
// two switches of a leg are never on together.
// The 100 kHz period, 300 ns dead band and centre alignment follow the
// document; the 200 MHz clock and the update at the period start are this
// design's choices.
module tb_pwm_3ph;
  localparam int P = 1000, D = 60;

  logic clk = 0, rst = 1, enable = 0, load = 0;
  logic [15:0] duty_in [3];
  logic [2:0] pwm_h, pwm_l;
  logic period_start;
  logic [15:0] duty_act [3];
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pwm_3ph #(.PERIOD(P), .DEAD(D)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // per-phase measurement over one period
  int hi_cnt [3], lo_cnt [3], gap_cnt [3], rise_t [3], fall_t [3], l_fall [3], l_rise [3];
  logic [2:0] h_q, l_q;

  always @(posedge clk) begin
    h_q <= pwm_h; l_q <= pwm_l;
    for (int k = 0; k < 3; k++) begin
      if (pwm_h[k] && pwm_l[k]) begin failures++; checks++; $display("FAIL shoot-through"); end
      if (pwm_h[k] && !h_q[k]) rise_t[k] = cyc;
      if (!pwm_h[k] && h_q[k]) fall_t[k] = cyc;
      if (!pwm_l[k] && l_q[k]) l_fall[k] = cyc;
      if (pwm_l[k] && !l_q[k]) l_rise[k] = cyc;
    end
  end

  task automatic measure(input int ph, output int hi, output int lo);
    // count clocks of one full period starting at period_start
    hi = 0; lo = 0;
    @(posedge clk iff period_start);
    for (int i = 0; i < 2 * P; i++) begin
      @(posedge clk);
      if (pwm_h[ph]) hi++;
      if (pwm_l[ph]) lo++;
    end
  endtask

  initial begin
    int hi, lo, t0, t1;
    int duties [3] = '{300, 500, 800};
    for (int k = 0; k < 3; k++) duty_in[k] = 16'(duties[k]);
    repeat (3) @(posedge clk);
    rst = 0; enable = 1;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    repeat (2) @(posedge clk iff period_start);
    // period: 2000 clocks between period starts
    @(posedge clk iff period_start); t0 = cyc;
    @(posedge clk iff period_start); t1 = cyc;
    check(t1 - t0 == 2 * P, $sformatf("period %0d clocks", t1 - t0));
    for (int k = 0; k < 3; k++) begin
      measure(k, hi, lo);
      check(hi == 2 * duties[k] - D, $sformatf("phase %0d high %0d exp %0d", k, hi, 2*duties[k]-D));
      check(lo == 2 * (P - duties[k]) - D, $sformatf("phase %0d low %0d exp %0d", k, lo, 2*(P-duties[k])-D));
      // dead bands: lower off -> upper on, upper off -> lower on
      check(rise_t[k] - l_fall[k] == D, $sformatf("phase %0d dead band L->H %0d", k, rise_t[k]-l_fall[k]));
      check(l_rise[k] - fall_t[k] == D, $sformatf("phase %0d dead band H->L %0d", k, l_rise[k]-fall_t[k]));
    end
    // centre alignment: midpoints of the three high pulses coincide
    check((rise_t[0] + fall_t[0]) == (rise_t[1] + fall_t[1]) &&
          (rise_t[1] + fall_t[1]) == (rise_t[2] + fall_t[2]), "pulses not centre aligned");
    // update mid-period: must only take effect at the next period start
    @(posedge clk iff period_start);
    repeat (700) @(posedge clk);
    @(negedge clk); duty_in[0] = 16'd100; load = 1; @(negedge clk); load = 0;
    check(duty_act[0] == 16'd300, "duty changed before period boundary");
    @(posedge clk iff period_start); @(negedge clk);
    check(duty_act[0] == 16'd100, "duty not applied at period boundary");
    measure(0, hi, lo);
    check(hi == 2 * 100 - D, $sformatf("new duty high %0d", hi));
    // extremes: duty 0 -> upper never on; duty P -> upper always on
    @(negedge clk); duty_in[0] = 16'd0; duty_in[1] = 16'(P); load = 1; @(negedge clk); load = 0;
    @(posedge clk iff period_start);
    measure(0, hi, lo); check(hi == 0 && lo == 2 * P, $sformatf("duty 0: %0d %0d", hi, lo));
    measure(1, hi, lo); check(hi == 2 * P && lo == 0, $sformatf("duty P: %0d %0d", hi, lo));
    // disable
    @(negedge clk); enable = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 2 * P; i++) begin
      @(posedge clk);
      if (pwm_h != 0 || pwm_l != 0) begin check(0, "outputs on while disabled"); break; end
    end
    check(1, "disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
