// tb_wa_aggregator: random set grades; checks both weighted sums and both
// grade sums against integer arithmetic with the output centres written out
// (Pbat 20,60,80,A0,E0; Pcap 2A,55,80,AA,D4), and the one-cycle latency.
// The centres and 20-bit sums follow the document.
module tb_wa_aggregator;
  import fuzzy_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  grade_t pbat_agg [NSETS];
  grade_t pcap_agg [NSETS];
  logic [19:0] pbat_num, pbat_den, pcap_num, pcap_den;
  int checks = 0, failures = 0;
  int bc [5] = '{'h20, 'h60, 'h80, 'hA0, 'hE0};
  int cc [5] = '{'h2A, 'h55, 'h80, 'hAA, 'hD4};

  always #5 clk = ~clk;

  wa_aggregator dut (.*);

  initial begin
    int nb, db, nc, dc;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      nb = 0; db = 0; nc = 0; dc = 0;
      for (int k = 0; k < 5; k++) begin
        pbat_agg[k] = (n == 0) ? 8'hFF : 8'($urandom_range(255));
        pcap_agg[k] = (n == 0) ? 8'hFF : ($urandom_range(3) == 0) ? 8'h00 : 8'($urandom_range(255));
        nb += int'(pbat_agg[k]) * bc[k]; db += int'(pbat_agg[k]);
        nc += int'(pcap_agg[k]) * cc[k]; dc += int'(pcap_agg[k]);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(pbat_num) != nb || int'(pbat_den) != db ||
          int'(pcap_num) != nc || int'(pcap_den) != dc) begin
        failures++;
        $display("FAIL %0d: %0d/%0d %0d/%0d exp %0d/%0d %0d/%0d", n, pbat_num, pbat_den,
                 pcap_num, pcap_den, nb, db, nc, dc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
