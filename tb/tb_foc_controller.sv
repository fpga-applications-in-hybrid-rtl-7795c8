// tb_foc_controller: closed-loop test of the FOC controller against a
// simple motor model. The model keeps the stator current in d/q and lets it
// follow the applied voltage with a first-order lag once per PWM period
// (i += (v - i)/4); the phase currents it presents are that vector rotated
// to the rotor's electrical angle (encoder position * 4). The encoder turns
// at a fixed step rate, so the angle sweeps all six SVPWM sectors.
// Checked every PWM period:
//   - the ADC trigger comes every 2*PERIOD clocks (100 kHz at 200 MHz) and
//     new duties 5 clocks after it;
//   - measured id/iq equal the model's current (Clarke + Park, within the
//     sine table's resolution);
//   - vd/vq equal a step-by-step PI model fed with the measured currents;
//   - the duties equal min-max SVPWM of the inverse-Park voltage at the
//     sampled angle, and are the ones applied in the next period;
//   - high and low outputs of a phase are never on together.
// And over the run: torque mode drives iq to its reference and id to 0;
// speed mode saturates the speed loop for a large speed error and reverses
// iq for a negative one; the encoder direction flag follows the rotation;
// disabling turns all six switches off.
// The stage order, 100 kHz period and 0..1000 modulation range follow the
// document; the motor model, gains and tolerances are this testbench's own.
module tb_foc_controller;
  import foc_pkg::*;

  localparam int P = 1000;
  logic clk = 0, rst = 1, enable = 0, speed_mode = 0;
  q15_t torque_ref = '0, speed_ref = '0, ia = '0, ib = '0, ic = '0;
  logic enc_a = 0, enc_b = 0, enc_z = 0;
  logic adc_trigger, duty_valid, dir_up;
  logic [2:0] pwm_h, pwm_l, sector, pi_sat;
  logic [15:0] position, duty [3], duty_applied [3];
  logic signed [15:0] speed;
  q15_t id_meas, iq_meas, vd, vq;
  logic [7:0] enc_err;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  foc_controller dut (.*);

  // ---------------- encoder drive -----------------
  int enc_div = 20;
  bit enc_up = 1, enc_run = 1;
  initial begin
    logic [1:0] s;
    forever begin
      repeat (enc_div) @(negedge clk);
      if (enc_run) begin
        s = {enc_a, enc_b};
        case ({enc_up, s})
          3'b1_00: s = 2'b10; 3'b1_10: s = 2'b11; 3'b1_11: s = 2'b01; 3'b1_01: s = 2'b00;
          3'b0_00: s = 2'b01; 3'b0_01: s = 2'b11; 3'b0_11: s = 2'b10; default: s = 2'b00;
        endcase
        {enc_a, enc_b} = s;
      end
    end
  end

  // ---------------- motor model -----------------
  real m_id = 0.0, m_iq = 0.0;   // Q15 units
  always @* begin
    real th, al, be;
    th = real'(16'(position * 16'd4)) * 6.283185307179586 / 65536.0;
    al = m_id * $cos(th) - m_iq * $sin(th);
    be = m_id * $sin(th) + m_iq * $cos(th);
    ia = 16'($rtoi(al));
    ib = 16'($rtoi(-al / 2.0 + 0.8660254037844386 * be));
    ic = 16'($rtoi(-al / 2.0 - 0.8660254037844386 * be));
  end

  // ---------------- per-period checks -----------------
  int last_trig = -1, trig_cyc = 0, periods = 0, sect_seen [8];
  real s_id, s_iq, th_s;
  longint integ_d = 0, integ_q = 0;
  logic [15:0] duty_prev [3];
  bit have_prev = 0;

  function automatic longint clampl(longint v, longint lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real clip(real v, real lo, real hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  always @(posedge clk) begin
    if (!rst && adc_trigger) begin
      if (last_trig >= 0) begin
        checks++;
        if (cyc - last_trig != 2 * P) begin failures++; $display("FAIL trigger period %0d", cyc - last_trig); end
      end
      last_trig = cyc;
      // the values the controller samples on this edge
      s_id = m_id; s_iq = m_iq;
      th_s = (real'(16'(position * 16'd4) >> 6) + 0.5) * 6.283185307179586 / 1024.0;
      // duties loaded in the previous period are in force from now on
      if (have_prev && enable) begin
        checks++;
        #1;
        for (int k = 0; k < 3; k++)
          if (duty_applied[k] != duty_prev[k]) begin
            failures++; $display("FAIL applied %0d: %0d exp %0d", k, duty_applied[k], duty_prev[k]);
          end
      end
    end
  end

  always @(posedge clk) begin
    if (!rst && duty_valid) begin
      longint e, o;
      real va, vb, ph [3], mx, mn, d, err;
      periods++;
      checks++;
      if (cyc - last_trig != 5) begin failures++; $display("FAIL duty latency %0d", cyc - last_trig); end
      // measured currents
      checks++;
      if (fabs(real'(id_meas) - s_id) > 150.0 || fabs(real'(iq_meas) - s_iq) > 150.0) begin
        failures++; $display("FAIL meas %0d %0d exp %f %f", id_meas, iq_meas, s_id, s_iq);
      end
      // current PI models (KP 0.5, KI 0.125, limit 18000)
      if (!enable) begin integ_d = 0; integ_q = 0; end
      e = -longint'(id_meas);
      integ_d = clampl(integ_d + ((e * 512) >>> 12), 18000);
      o = clampl(((e * 2048) >>> 12) + integ_d, 18000);
      checks++;
      if (longint'(vd) != o) begin failures++; $display("FAIL vd %0d exp %0d", vd, o); end
      e = longint'(dut.iq_ref) - longint'(iq_meas);
      integ_q = clampl(integ_q + ((e * 512) >>> 12), 18000);
      o = clampl(((e * 2048) >>> 12) + integ_q, 18000);
      checks++;
      if (longint'(vq) != o) begin failures++; $display("FAIL vq %0d exp %0d", vq, o); end
      // SVPWM of the inverse-Park voltage
      va = (real'(vd) * $cos(th_s) - real'(vq) * $sin(th_s)) / 32768.0;
      vb = (real'(vd) * $sin(th_s) + real'(vq) * $cos(th_s)) / 32768.0;
      ph[0] = va; ph[1] = -va / 2 + 0.8660254 * vb; ph[2] = -va / 2 - 0.8660254 * vb;
      mx = ph[0]; mn = ph[0];
      for (int k = 1; k < 3; k++) begin
        if (ph[k] > mx) mx = ph[k];
        if (ph[k] < mn) mn = ph[k];
      end
      for (int k = 0; k < 3; k++) begin
        d = clip(clip(P * (0.5 + ph[k] - (mx + mn) / 2.0), 0, P), 20, 980);
        err = real'(duty[k]) - d;
        checks++;
        if (err > 3.0 || err < -3.0) begin
          failures++; $display("FAIL duty %0d = %0d exp %f", k, duty[k], d);
        end
        duty_prev[k] = duty[k];
      end
      have_prev = 1;
      sect_seen[sector]++;
      // motor model: first-order lag towards the applied voltage
      m_id += (real'(vd) - m_id) / 4.0;
      m_iq += (real'(vq) - m_iq) / 4.0;
    end
  end

  // no shoot-through, ever
  int overlap = 0;
  always @(posedge clk) if (|(pwm_h & pwm_l)) overlap++;

  task automatic run_periods(int n);
    int p0;
    p0 = periods;
    while (periods < p0 + n) @(posedge clk);
  endtask

  task automatic expect_cond(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  int sat_w = 0;
  always @(posedge clk) if (pi_sat[2]) sat_w++;

  initial begin
    bit ok;
    foreach (sect_seen[i]) sect_seen[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // disabled: all switches off
    repeat (3000) @(posedge clk);
    expect_cond(pwm_h == 0 && pwm_l == 0, "disabled outputs");
    // torque mode
    enable = 1; torque_ref = 16'sd8000;
    run_periods(150);
    ok = (iq_meas > 7800) && (iq_meas < 8200) && (id_meas > -200) && (id_meas < 200);
    expect_cond(ok, "torque mode convergence");
    expect_cond(dir_up == 1 && speed > 0, "forward rotation");
    // speed mode, large positive error: speed loop saturates at the iq limit
    speed_mode = 1; speed_ref = 16'sd20000;
    run_periods(120);
    expect_cond(sat_w > 0, "speed loop saturated");
    ok = (iq_meas > 16084) && (iq_meas < 16684);
    expect_cond(ok, "iq at limit");
    // negative speed request: torque reverses
    speed_ref = -16'sd12000;
    run_periods(150);
    expect_cond(iq_meas < -5000, "iq reversed");
    // reverse rotation
    enc_up = 0;
    run_periods(40);
    expect_cond(dir_up == 0 && speed < 0, "reverse rotation");
    // disable again
    enable = 0;
    repeat (4000) @(posedge clk);
    expect_cond(pwm_h == 0 && pwm_l == 0, "disabled again");
    expect_cond(overlap == 0, "no shoot-through");
    for (int s = 1; s <= 6; s++) expect_cond(sect_seen[s] > 0, $sformatf("sector %0d visited", s));
    expect_cond(enc_err == 0, "no encoder errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
