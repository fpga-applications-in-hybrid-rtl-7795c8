// tb_fuzzy_controller: end-to-end check of the fuzzy power manager.
// Part 1 runs the operating points of the document's FPGA-versus-model
// comparison table and checks the outputs against the power values listed
// there (within 6 W) and against hand-computed codes. Part 2 drives random
// inputs and compares with the behavioural reference in fuzzy_ref. It also
// checks the fixed latency and that the handshake holds off new inputs.
// The operating points and expected powers follow the document's comparison
// table; the latency and handshake checked are this design's choices.
module tb_fuzzy_controller;
  import fuzzy_pkg::*;
  import fuzzy_ref::*;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid, pbat_idle, pcap_idle;
  crisp_t in_x = '0;
  grade_t pbat, pcap;
  logic [NRULES-1:0] fired;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fuzzy_controller dut (.clk, .rst, .in_valid, .in_ready, .in_x, .out_valid,
                        .pbat, .pcap, .pbat_idle, .pcap_idle, .fired);

  localparam int LATENCY = 25;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input grade_t b, p, s, u, output int ob, output int oc, output int lat);
    int t0;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_x = '{bus: b, pdem: p, soc: s, ucap: u};
    in_valid = 1;
    @(posedge clk); t0 = cycle;
    @(negedge clk); in_valid = 0;
    check(!in_ready, "in_ready must drop while busy");
    while (!out_valid) @(negedge clk);
    lat = cycle - t0;
    ob = pbat; oc = pcap;
  endtask

  // document's table: inputs (V, W, SOC, V) as codes, expected FPGA watts
  typedef struct { grade_t b, p, s, u; int exp_bat_w, exp_cap_w, exp_bat, exp_cap; } row_t;
  row_t rows [9] = '{
    '{8'h80, 8'h80, 8'h80, 8'h80,    0,    0, 'h80, 'h80},
    '{8'h40, 8'h60, 8'h80, 8'h80,   50,   90, 'h90, 'h95},
    '{8'hC0, 8'hA0, 8'h80, 8'h80,  -50,  -89, 'h70, 'h6A},
    '{8'h40, 8'h00, 8'h80, 8'h80,   50,  180, 'h90, 'hAA},
    '{8'hC0, 8'hFF, 8'h80, 8'h80,  -50, -180, 'h70, 'h55},
    '{8'h40, 8'h60, 8'hFF, 8'h80,    0,  180, 'h80, 'hAA},
    '{8'h40, 8'h60, 8'h80, 8'hFF,  103,    0, 'hA0, 'h80},
    '{8'hC0, 8'hA0, 8'h00, 8'h80,    0, -180, 'h80, 'h55},
    '{8'hC0, 8'hA0, 8'h80, 8'h00, -103,    0, 'h60, 'h80}
  };

  initial begin
    int ob, oc, lat, rb, rc, wb, wc, idle_seen;
    bit [NRULES-1:0] rf;
    int ba [5], ca [5];
    idle_seen = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    foreach (rows[i]) begin
      run(rows[i].b, rows[i].p, rows[i].s, rows[i].u, ob, oc, lat);
      wb = (ob - 128) * 400 / 128;
      wc = (oc - 128) * 550 / 128;
      check(ob == rows[i].exp_bat, $sformatf("row %0d pbat %h exp %h", i, ob, rows[i].exp_bat));
      check(oc == rows[i].exp_cap, $sformatf("row %0d pcap %h exp %h", i, oc, rows[i].exp_cap));
      check((wb - rows[i].exp_bat_w) <= 6 && (rows[i].exp_bat_w - wb) <= 6,
            $sformatf("row %0d pbat %0d W, table %0d W", i, wb, rows[i].exp_bat_w));
      check((wc - rows[i].exp_cap_w) <= 6 && (rows[i].exp_cap_w - wc) <= 6,
            $sformatf("row %0d pcap %0d W, table %0d W", i, wc, rows[i].exp_cap_w));
      check(lat == LATENCY, $sformatf("latency %0d, expected %0d", lat, LATENCY));
    end
    for (int n = 0; n < 400; n++) begin
      grade_t b, p, s, u;
      b = 8'($urandom); p = 8'($urandom); s = 8'($urandom); u = 8'($urandom);
      if (n % 4 == 0) s = (n % 8 == 0) ? 8'hF0 : 8'h10;
      if (n % 5 == 0) u = (n % 10 == 0) ? 8'hF8 : 8'h08;
      if (n == 7) begin b = 8'h10; p = 8'h10; s = 8'hF0; u = 8'hF0; end  // nothing fires
      run(b, p, s, u, ob, oc, lat);
      evaluate(int'(b), int'(p), int'(s), int'(u), rb, rc, rf, ba, ca);
      check(ob == rb && oc == rc && fired == rf,
            $sformatf("in %h %h %h %h: got %h %h %h ref %h %h %h", b, p, s, u, ob, oc, fired, rb, rc, rf));
      check(lat == LATENCY, "latency");
      if (pbat_idle) idle_seen++;
    end
    check(idle_seen > 0, "no-rule case never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
