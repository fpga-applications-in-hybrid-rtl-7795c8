// tb_rule_evaluator: drives the evaluator with grades produced by the
// reference membership functions and checks the aggregated Pbat/Pcap set
// grades and the fired-rule mask against fuzzy_ref, for random inputs and
// for inputs aimed at every rule. Each of the 20 rules must fire at least
// once. Latency one clock.
// The rule base follows the document's FPGA realisation; the register stage
// is this design's choice.
module tb_rule_evaluator;
  import fuzzy_pkg::*;
  import fuzzy_ref::*;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  crisp_t in_x = '0;
  grade_t grade [NGRADES];
  grade_t pbat_agg [NSETS];
  grade_t pcap_agg [NSETS];
  logic [NRULES-1:0] fired;
  int checks = 0, failures = 0;
  int fire_cnt [NRULES];

  always #5 clk = ~clk;

  rule_evaluator dut (.*);

  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  task automatic apply(int b, int p, int s, int u);
    int pb, pc, ba [5], ca [5];
    bit [NRULES-1:0] rf;
    @(negedge clk);
    in_x = '{bus: 8'(b), pdem: 8'(p), soc: 8'(s), ucap: 8'(u)};
    grade[0] = 8'(mx(mx(bus_set(b, 0), bus_set(b, 2)), bus_set(b, 4)));
    grade[1] = 8'(mx(bus_set(b, 1), bus_set(b, 3)));
    grade[2] = 8'(mx(ucap_over(u), ucap_under(u)));
    grade[3] = 8'(255 - mx(ucap_over(u), ucap_under(u)));
    grade[4] = 8'(mx(mx(pdem_set(p, 0), pdem_set(p, 2)), pdem_set(p, 4)));
    grade[5] = 8'(mx(pdem_set(p, 1), pdem_set(p, 3)));
    grade[6] = 8'h00; grade[7] = 8'hFF;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    evaluate(b, p, s, u, pb, pc, rf, ba, ca);
    checks++;
    if (!out_valid) begin failures++; $display("FAIL no out_valid"); end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (int'(pbat_agg[k]) != ba[k] || int'(pcap_agg[k]) != ca[k]) begin
        failures++;
        $display("FAIL in %h %h %h %h set %0d: bat %h/%h cap %h/%h", b, p, s, u, k,
                 pbat_agg[k], ba[k], pcap_agg[k], ca[k]);
      end
    end
    checks++;
    if (fired != rf) begin failures++; $display("FAIL fired %h exp %h", fired, rf); end
    for (int r = 0; r < NRULES; r++) if (fired[r]) fire_cnt[r]++;
  endtask

  int lv [3] = '{'h80, 'hF8, 'h10};
  int pk [5] = '{'h00, 'h40, 'h80, 'hC0, 'hFF};
  int pp [5] = '{'h00, 'h60, 'h80, 'hA0, 'hFF};

  initial begin
    foreach (fire_cnt[r]) fire_cnt[r] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    // aimed: each bus set, each demand set, with UC/SOC normal, over, under
    for (int k = 0; k < 5; k++)
      for (int j = 0; j < 3; j++) begin
        apply(pk[k], 'h80, lv[j], 'h80);
        apply(pk[k], 'h80, 'h80, lv[j]);
        apply('h80, pp[k], lv[j], 'h80);
        apply('h80, pp[k], 'h80, lv[j]);
        apply('h80, pp[k], 'h80, (j == 1) ? 'hF8 : 'h10);
      end
    for (int n = 0; n < 3000; n++)
      apply($urandom_range(255), $urandom_range(255), $urandom_range(255), $urandom_range(255));
    for (int r = 0; r < NRULES; r++) begin
      checks++;
      if (fire_cnt[r] == 0) begin failures++; $display("FAIL rule %0d never fired", r + 1); end
    end
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
