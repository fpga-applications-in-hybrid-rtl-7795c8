// tb_hess_foc_top: end-to-end test of the whole design at its default
// parameters (200 MHz clock, 100 kHz PWM, 300 ns dead band, 20-bit
// defuzzifier sums).
//
// The fuzzy power manager and the motor controller run at the same time.
// The power manager gets the document's nine comparison operating points,
// then a stream of random operating points, some sent while it is busy (the
// handshake must hold them off). Every answer is checked against the
// behavioural reference in fuzzy_ref. The motor controller runs a closed loop
// with a first-order current model (as in tb_foc_controller): torque mode,
// an over-large torque request that saturates the current loops, a switch
// to speed mode that saturates the speed loop, a speed reversal, an index
// pulse, an illegal encoder step and a disable.
//
// Each mechanism is counted and must happen at least once: each of the 20
// rules firing, the no-rule (idle) output, a handshake stall, every SVPWM
// sector, a dead band of exactly DEAD clocks on every phase, saturation of
// the d/q and speed PI loops, the torque/speed mode switch, an index clear,
// both encoder directions and an encoder error.
// Operating points, PWM rate and dead band follow the document; the motor
// model, the disturbance and the scenario order are this testbench's own.
module tb_hess_foc_top;
  import fuzzy_pkg::*;
  import foc_pkg::*;
  import fuzzy_ref::*;

  localparam int P = 1000, DEAD = 60, FZ_LAT = 25;

  logic clk = 0, rst = 1;
  logic fz_in_valid = 0, fz_in_ready, fz_out_valid, pbat_idle, pcap_idle;
  crisp_t fz_in = '0;
  grade_t pbat_ref, pcap_ref;
  logic [NRULES-1:0] fz_fired;
  logic foc_enable = 0, speed_mode = 0;
  q15_t torque_ref = '0, speed_ref = '0, ia, ib, ic;
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

  hess_foc_top dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters -----------------
  int rule_hits [NRULES];
  int n_idle = 0, n_stall = 0, n_fz = 0, n_sect [8], n_dead_ok = 0, n_dead_bad = 0;
  int n_sat_d = 0, n_sat_q = 0, n_sat_w = 0, n_mode_sw = 0, n_index = 0;
  int n_up = 0, n_down = 0, n_periods = 0;

  // ================= fuzzy power manager =================
  typedef struct { grade_t b, p, s, u; } op_t;
  op_t table_ops [9] = '{
    '{8'h80, 8'h80, 8'h80, 8'h80}, '{8'h40, 8'h60, 8'h80, 8'h80},
    '{8'hC0, 8'hA0, 8'h80, 8'h80}, '{8'h40, 8'h00, 8'h80, 8'h80},
    '{8'hC0, 8'hFF, 8'h80, 8'h80}, '{8'h40, 8'h60, 8'hFF, 8'h80},
    '{8'h40, 8'h60, 8'h80, 8'hFF}, '{8'hC0, 8'hA0, 8'h00, 8'h80},
    '{8'hC0, 8'hA0, 8'h80, 8'h00}};
  int exp_bat [9] = '{'h80, 'h90, 'h70, 'h90, 'h70, 'h80, 'hA0, 'h80, 'h60};
  int exp_cap [9] = '{'h80, 'h95, 'h6A, 'hAA, 'h55, 'hAA, 'h80, 'h55, 'h80};

  // driver: offers each operating point and holds it until accepted; an
  // operating point offered while the controller is busy is a stall. The
  // monitor pairs each answer with the accepted operating point.
  typedef struct { op_t op; int idx; int t0; } acc_t;
  acc_t accepted [$];
  int n_checked = 0, n_sent = 0;

  task automatic fz_send(op_t op, int idx);
    @(negedge clk);
    fz_in = '{bus: op.b, pdem: op.p, soc: op.s, ucap: op.u};
    fz_in_valid = 1;
    while (!fz_in_ready) begin n_stall++; @(negedge clk); end
    @(posedge clk);
    accepted.push_back('{op, idx, cyc});
    n_sent++;
    @(negedge clk);
    fz_in_valid = 0;
  endtask

  always @(posedge clk) begin
    if (!rst && fz_out_valid) begin
      acc_t a;
      int rb, rc;
      bit [NRULES-1:0] rf;
      int ba [5], ca [5];
      if (accepted.size() == 0) begin
        failures++; $display("FAIL: fuzzy output without input");
      end else begin
        a = accepted.pop_front();
        check(cyc - a.t0 == FZ_LAT, $sformatf("fuzzy latency %0d", cyc - a.t0));
        evaluate(int'(a.op.b), int'(a.op.p), int'(a.op.s), int'(a.op.u), rb, rc, rf, ba, ca);
        check(int'(pbat_ref) == rb && int'(pcap_ref) == rc && fz_fired == rf,
              $sformatf("fuzzy %h %h %h %h: %h %h ref %h %h", a.op.b, a.op.p, a.op.s, a.op.u,
                        pbat_ref, pcap_ref, rb, rc));
        if (a.idx >= 0)
          check(int'(pbat_ref) == exp_bat[a.idx] && int'(pcap_ref) == exp_cap[a.idx],
                $sformatf("table row %0d: %h %h", a.idx + 1, pbat_ref, pcap_ref));
        for (int r = 0; r < NRULES; r++) if (fz_fired[r]) rule_hits[r]++;
        if (pbat_idle && pcap_idle) n_idle++;
        n_fz++;
      end
    end
  end

  task automatic fuzzy_run();
    op_t op;
    foreach (table_ops[i]) begin
      fz_send(table_ops[i], i);
      repeat (40) @(negedge clk);
    end
    for (int n = 0; n < 300; n++) begin
      op = '{8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
      if (n % 4 == 0) op.s = (n % 8 == 0) ? 8'hF0 : 8'h10;
      if (n % 5 == 0) op.u = (n % 10 == 0) ? 8'hF8 : 8'h08;
      if (n == 11) op = '{8'h10, 8'h10, 8'hF0, 8'hF0};   // nothing may fire
      fz_send(op, -1);
      if (n % 3 != 0) repeat ($urandom_range(40)) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    check(n_fz == n_sent && accepted.size() == 0, "every operating point answered");
  endtask

  // ================= motor controller =================
  int enc_div = 20;
  bit enc_up = 1, enc_glitch = 0;
  initial begin
    logic [1:0] s;
    forever begin
      repeat (enc_div) @(negedge clk);
      s = {enc_a, enc_b};
      if (enc_glitch) begin
        s = ~s; enc_glitch = 0;   // both lines at once: illegal
      end else
        case ({enc_up, s})
          3'b1_00: s = 2'b10; 3'b1_10: s = 2'b11; 3'b1_11: s = 2'b01; 3'b1_01: s = 2'b00;
          3'b0_00: s = 2'b01; 3'b0_01: s = 2'b11; 3'b0_11: s = 2'b10; default: s = 2'b00;
        endcase
      {enc_a, enc_b} = s;
    end
  end

  // d/q current model; dist_d is a d-axis current disturbance larger than
  // the d loop can cancel
  real m_id = 0.0, m_iq = 0.0, dist_d = 0.0;
  always @* begin
    real th, al, be;
    th = real'(16'(position * 16'd4)) * 6.283185307179586 / 65536.0;
    al = (m_id + dist_d) * $cos(th) - m_iq * $sin(th);
    be = (m_id + dist_d) * $sin(th) + m_iq * $cos(th);
    ia = 16'($rtoi(al));
    ib = 16'($rtoi(-al / 2.0 + 0.8660254037844386 * be));
    ic = 16'($rtoi(-al / 2.0 - 0.8660254037844386 * be));
  end

  int last_trig = -1;
  real s_id, s_iq;
  always @(posedge clk) begin
    if (!rst && adc_trigger) begin
      if (last_trig >= 0) check(cyc - last_trig == 2 * P, "PWM period");
      last_trig = cyc;
      s_id = m_id + dist_d; s_iq = m_iq;
    end
    if (!rst && duty_valid) begin
      n_periods++;
      check(cyc - last_trig == 5, "duty latency");
      check((real'(id_meas) - s_id) < 150.0 && (s_id - real'(id_meas)) < 150.0 &&
            (real'(iq_meas) - s_iq) < 150.0 && (s_iq - real'(iq_meas)) < 150.0,
            $sformatf("measured %0d %0d model %f %f", id_meas, iq_meas, s_id, s_iq));
      n_sect[sector]++;
      if (pi_sat[0]) n_sat_d++;
      if (pi_sat[1]) n_sat_q++;
      if (pi_sat[2]) n_sat_w++;
      m_id += (real'(vd) - m_id) / 4.0;
      m_iq += (real'(vq) - m_iq) / 4.0;
    end
  end

  // dead band: time from one switch of a leg turning off to the other
  // turning on
  int off_at [3][2] = '{default: 0};
  always @(posedge clk) begin
    for (int k = 0; k < 3; k++) begin
      if (!rst && pwm_h[k] && pwm_l[k]) begin failures++; $display("FAIL shoot-through %0d", k); end
    end
  end
  logic [2:0] h_q = '0, l_q = '0;
  always @(posedge clk) begin
    for (int k = 0; k < 3; k++) begin
      if (rst) begin off_at[k][0] = 0; off_at[k][1] = 0; continue; end
      if (h_q[k] && !pwm_h[k]) off_at[k][0] = cyc;
      if (l_q[k] && !pwm_l[k]) off_at[k][1] = cyc;
      // a switch that turns back on without the other having turned on
      // (a pulse narrower than the dead band is dropped) starts over
      if (!l_q[k] && pwm_l[k]) begin
        if (off_at[k][0] > 0) begin
          if (cyc - off_at[k][0] == DEAD) n_dead_ok++;
          else begin n_dead_bad++; $display("FAIL dead band L%0d %0d", k, cyc - off_at[k][0]); end
        end
        off_at[k][0] = 0; off_at[k][1] = 0;
      end
      if (!h_q[k] && pwm_h[k]) begin
        if (off_at[k][1] > 0) begin
          if (cyc - off_at[k][1] == DEAD) n_dead_ok++;
          else begin n_dead_bad++; $display("FAIL dead band H%0d %0d", k, cyc - off_at[k][1]); end
        end
        off_at[k][0] = 0; off_at[k][1] = 0;
      end
    end
    h_q <= pwm_h; l_q <= pwm_l;
  end

  task automatic periods(int n);
    int p0;
    p0 = n_periods;
    while (n_periods < p0 + n) @(posedge clk);
  endtask

  task automatic foc_run();
    bit ok;
    repeat (3000) @(posedge clk);
    check(pwm_h == 0 && pwm_l == 0, "disabled outputs");
    foc_enable = 1; torque_ref = 16'sd8000;
    periods(120);
    ok = iq_meas > 7800 && iq_meas < 8200 && id_meas > -200 && id_meas < 200;
    check(ok, "torque mode convergence");
    if (dir_up) n_up++;
    // over-large request: the q loop hits its voltage limit
    torque_ref = 16'sd30000;
    periods(60);
    torque_ref = 16'sd8000;
    dist_d = 25000.0;
    periods(40);
    dist_d = 0.0;
    // index pulse clears the position
    @(negedge clk); enc_z = 1; repeat (6) @(negedge clk); enc_z = 0;
    check(position < 16'd8, $sformatf("index clear: %0d", position));
    n_index++;
    // illegal encoder step
    enc_glitch = 1;
    repeat (200) @(negedge clk);
    check(enc_err != 0, "encoder error counted");
    // speed mode
    speed_mode = 1; speed_ref = 16'sd20000; n_mode_sw++;
    periods(100);
    speed_ref = -16'sd12000;
    periods(150);
    check(iq_meas < -5000, "torque reversed in speed mode");
    enc_up = 0;
    periods(40);
    ok = dir_up == 0 && speed < 0;
    check(ok, "reverse rotation");
    if (!dir_up) n_down++;
    speed_mode = 0; n_mode_sw++;
    periods(20);
    foc_enable = 0;
    repeat (4000) @(posedge clk);
    check(pwm_h == 0 && pwm_l == 0, "disabled again");
  endtask

  initial begin
    foreach (rule_hits[i]) rule_hits[i] = 0;
    foreach (n_sect[i]) n_sect[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    fork
      fuzzy_run();
      foc_run();
    join
    $display("mechanisms: fuzzy ops %0d idle %0d stall cycles %0d | periods %0d dead-band ok %0d bad %0d",
             n_fz, n_idle, n_stall, n_periods, n_dead_ok, n_dead_bad);
    $display("            sat d/q/w %0d/%0d/%0d mode switches %0d index %0d up %0d down %0d enc errors %0d",
             n_sat_d, n_sat_q, n_sat_w, n_mode_sw, n_index, n_up, n_down, enc_err);
    for (int r = 0; r < NRULES; r++) check(rule_hits[r] > 0, $sformatf("rule %0d never fired", r + 1));
    check(n_idle > 0, "no-rule output never produced");
    check(n_stall > 0, "handshake never stalled");
    for (int s = 1; s <= 6; s++) check(n_sect[s] > 0, $sformatf("sector %0d never used", s));
    check(n_dead_ok > 0 && n_dead_bad == 0, "dead band");
    check(n_sat_d > 0, "d loop never saturated");
    check(n_sat_q > 0, "q loop never saturated");
    check(n_sat_w > 0, "speed loop never saturated");
    check(n_mode_sw > 0, "mode never switched");
    check(n_index > 0, "index never cleared the position");
    check(n_up > 0 && n_down > 0, "both directions");
    check(enc_err != 0, "encoder error never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
