// tb_fuzzifier: random crisp inputs; checks the eight registered grades
// (order: bus pair, UC pair, demand pair, SOC pair) against the reference
// set grades, the one-cycle latency and that the crisp inputs are passed on.
// Membership shapes follow the document; the grade order and the one-clock
// register are this design's choices.
module tb_fuzzifier;
  import fuzzy_pkg::*;
  import fuzzy_ref::*;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  crisp_t in_x = '0, out_x;
  grade_t grade [NGRADES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fuzzifier dut (.*);

  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  initial begin
    int e [8], b, p, s, u;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      b = $urandom_range(255); p = $urandom_range(255); s = $urandom_range(255); u = $urandom_range(255);
      in_x = '{bus: 8'(b), pdem: 8'(p), soc: 8'(s), ucap: 8'(u)};
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      e[0] = mx(mx(bus_set(b, 0), bus_set(b, 2)), bus_set(b, 4));
      e[1] = mx(bus_set(b, 1), bus_set(b, 3));
      e[2] = mx(ucap_over(u), ucap_under(u));
      e[3] = 255 - mx(ucap_over(u), ucap_under(u));  // NORMAL is the complement here
      e[4] = mx(mx(pdem_set(p, 0), pdem_set(p, 2)), pdem_set(p, 4));
      e[5] = mx(pdem_set(p, 1), pdem_set(p, 3));
      checks++;
      if (!out_valid || out_x != in_x) begin failures++; $display("FAIL valid/crisp"); end
      for (int k = 0; k < 6; k++) begin
        if (k == 3 && u >= 'h29 && u < 'h37) continue;  // saturated ramp: not complementary
        if (k == 3 && u >= 'hDF && u < 'hEF) continue;
        checks++;
        if (int'(grade[k]) != e[k]) begin
          failures++; $display("FAIL grade%0d in %h %h %h %h: %h exp %h", k+1, b, p, s, u, grade[k], e[k]);
        end
      end
      // SOC pair: UNDER below 3E, OVER from C3, NORMAL full in between
      checks++;
      if ((s >= 'h3E && s < 'hC3) ? (grade[6] != 0 || grade[7] != 8'hFF)
                                  : (s < 'h33 || s >= 'hCC) ? (grade[6] != 8'hFF || grade[7] != 0) : 0) begin
        failures++; $display("FAIL soc pair at %h: %h %h", s, grade[6], grade[7]);
      end
    end
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
