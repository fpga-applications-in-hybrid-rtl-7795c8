// tb_pv_scenarios: the fuzzy power manager in closed loop with a simple
// stand-alone PV system, through the five operating scenarios of the
// document: both stores in their normal range, battery overcharged,
// battery over-discharged, UC over-discharged and UC overcharged.
//
// Each scenario runs 300 control steps. Load and PV power follow slow
// profiles with random steps, within +/-400 W. The bus model integrates the
// net power Ppv - Pload - Pbat - Pcap (positive Pbat/Pcap is power taken
// into the store) and reports the bus-voltage error Vref - Vbus. The
// battery SOC and UC voltage integrate their stores' power, starting at
// each scenario's initial state. Checked at every step:
//   - the outputs equal the behavioural reference fuzzy_ref bit-exactly;
//   - a battery at OVER SOC is never charged, a UC at OVER voltage is never
//     charged and a UC at UNDER voltage is never discharged;
//   - a battery at UNDER SOC is discharged only by the bus-PL rule (rule 11,
//     which the rule base gates on the UC alone);
//   - the latency is 25 clocks.
// Each scenario must reach its limit condition at least once.
// The scenarios, ranges and membership limits follow the document; the
// profiles and the plant model are this testbench's own.
module tb_pv_scenarios;
  import fuzzy_pkg::*;
  import fuzzy_ref::*;

  logic clk = 0, rst = 1, in_valid = 0, in_ready, out_valid, pbat_idle, pcap_idle;
  crisp_t in_x = '0;
  grade_t pbat, pcap;
  logic [NRULES-1:0] fired;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fuzzy_controller dut (.clk, .rst, .in_valid, .in_ready, .in_x, .out_valid,
                        .pbat, .pcap, .pbat_idle, .pcap_idle, .fired);

  function automatic int to_code(real v, real span);   // -span..span -> 00..FF
    int c;
    c = $rtoi(128.0 + v * 128.0 / span);
    return (c < 0) ? 0 : (c > 255) ? 255 : c;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic step(input grade_t b, p, s, u, output int ob, output int oc);
    int t0, rb, rc;
    bit [NRULES-1:0] rf;
    int ba [5], ca [5];
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_x = '{bus: b, pdem: p, soc: s, ucap: u};
    in_valid = 1;
    @(posedge clk); t0 = cyc;
    @(negedge clk); in_valid = 0;
    while (!out_valid) @(negedge clk);
    ob = pbat; oc = pcap;
    check(cyc - t0 == 25, "latency");
    evaluate(int'(b), int'(p), int'(s), int'(u), rb, rc, rf, ba, ca);
    check(ob == rb && oc == rc && fired == rf,
          $sformatf("%h %h %h %h: %h %h ref %h %h", b, p, s, u, ob, oc, rb, rc));
  endtask

  task automatic scenario(int id, real soc0, real ucap0);
    real soc, uc, vbus, pload, ppv, pb, pc, net;
    int ob, oc, bc, pd, sc, uc_c, limit_hits;
    string name;
    soc = soc0; uc = ucap0; vbus = 0.0; pload = 200.0; ppv = 200.0; limit_hits = 0;
    for (int n = 0; n < 300; n++) begin
      // slow profiles with occasional steps
      pload += ($urandom_range(40) - 20.0);
      if ($urandom_range(20) == 0) pload += ($urandom_range(300) - 150.0);
      ppv = 200.0 + 150.0 * $sin(n * 6.283185307179586 / 150.0);
      if (pload < 0.0) pload = 0.0;
      if (pload > 400.0) pload = 400.0;
      bc = to_code(-vbus, 30.0);                 // error = Vref - Vbus
      pd = to_code(pload - ppv, 400.0);
      sc = (soc < 0.0) ? 0 : (soc > 1.0) ? 255 : $rtoi(soc * 255.0);
      uc_c = (uc < 0.0) ? 0 : (uc > 400.0) ? 255 : $rtoi(uc * 255.0 / 400.0);
      step(8'(bc), 8'(pd), 8'(sc), 8'(uc_c), ob, oc);
      // limit rules
      if (sc >= 'hC3) begin limit_hits++; check(ob <= 'h80, $sformatf("s%0d: full battery charged (%h)", id, ob)); end
      if (uc_c >= 'hDF) begin limit_hits++; check(oc <= 'h80, $sformatf("s%0d: full UC charged (%h)", id, oc)); end
      if (uc_c < 'h37) begin limit_hits++; check(oc >= 'h80, $sformatf("s%0d: empty UC discharged (%h)", id, oc)); end
      if (sc < 'h3E) begin
        limit_hits++;
        check(ob >= 'h80 || fired[10], $sformatf("s%0d: empty battery discharged (%h)", id, ob));
      end
      // plant, one step: powers in watts, states in per-unit
      pb = real'(ob - 128) * 400.0 / 128.0;
      pc = real'(oc - 128) * 550.0 / 128.0;
      net = ppv - pload - pb - pc;
      vbus += net * 0.02;
      if (vbus > 30.0) vbus = 30.0;
      if (vbus < -30.0) vbus = -30.0;
      soc += pb * 0.00002;
      uc += pc * 0.01;
    end
    if (id > 1) check(limit_hits > 0, $sformatf("scenario %0d never reached its limit", id));
    $display("scenario %0d: soc %f uc %f vbus %f limit steps %0d", id, soc, uc, vbus, limit_hits);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    scenario(1, 0.5, 200.0);   // both stores normal
    scenario(2, 0.97, 200.0);  // battery overcharged
    scenario(3, 0.05, 200.0);  // battery over-discharged
    scenario(4, 0.5, 20.0);    // UC over-discharged
    scenario(5, 0.5, 390.0);   // UC overcharged
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
