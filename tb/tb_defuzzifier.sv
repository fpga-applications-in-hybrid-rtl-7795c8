// tb_defuzzifier: random aggregated set grades, including sets with no
// grade at all; checks Pbat and Pcap against the weighted average computed
// in integer arithmetic, the zero-power code and idle flag when nothing
// fired, the ready handshake and the latency (2 + 20 + 1 clocks).
// The weighted-average formula and output centres follow the document; the
// idle code and latency are this design's choices.
module tb_defuzzifier;
  import fuzzy_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0, ready, out_valid, pbat_idle, pcap_idle;
  grade_t pbat_agg [NSETS];
  grade_t pcap_agg [NSETS];
  grade_t pbat, pcap;
  int checks = 0, failures = 0, cyc = 0, idle_seen = 0;
  int bc [5] = '{'h20, 'h60, 'h80, 'hA0, 'hE0};
  int cc [5] = '{'h2A, 'h55, 'h80, 'hAA, 'hD4};

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  defuzzifier dut (.*);

  initial begin
    int nb, db, nc, dc, eb, ec, t0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      nb = 0; db = 0; nc = 0; dc = 0;
      for (int k = 0; k < 5; k++) begin
        pbat_agg[k] = (n % 7 == 3) ? 8'h00 : ($urandom_range(2) == 0) ? 8'h00 : 8'($urandom_range(255));
        pcap_agg[k] = ($urandom_range(2) == 0) ? 8'h00 : 8'($urandom_range(255));
        nb += int'(pbat_agg[k]) * bc[k]; db += int'(pbat_agg[k]);
        nc += int'(pcap_agg[k]) * cc[k]; dc += int'(pcap_agg[k]);
      end
      eb = (db == 0) ? 'h80 : nb / db;
      ec = (dc == 0) ? 'h80 : nc / dc;
      in_valid = 1;
      @(posedge clk); t0 = cyc;
      @(negedge clk); in_valid = 0;
      checks++;
      if (ready) begin failures++; $display("FAIL ready while busy"); end
      while (!out_valid) @(negedge clk);
      checks++;
      if (cyc - t0 != 23) begin failures++; $display("FAIL latency %0d", cyc - t0); end
      checks++;
      if (int'(pbat) != eb || int'(pcap) != ec || pbat_idle != (db == 0) || pcap_idle != (dc == 0)) begin
        failures++; $display("FAIL %0d: %h %h exp %h %h", n, pbat, pcap, eb, ec);
      end
      if (pbat_idle) idle_seen++;
    end
    checks++;
    if (idle_seen == 0) begin failures++; $display("FAIL no idle case"); end
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
