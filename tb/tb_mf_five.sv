// tb_mf_five: exhaustive check of the five-set membership units (bus-error
// and power-demand configurations) over all 256 input codes against the
// triangle formulas of fuzzy_ref, plus spot values read off the document's
// membership figures (full membership at each peak, crossing points).
// Breakpoints and slopes follow the document; saturation of the ramps is
// this design's choice.
module tb_mf_five;
  import fuzzy_pkg::*;
  import fuzzy_ref::*;

  grade_t x = '0;
  grade_t b_g1, b_g2, p_g1, p_g2;
  grade_t b_set [NSETS];
  grade_t p_set [NSETS];
  int checks = 0, failures = 0;

  mf_five u_bus (.x, .grade1(b_g1), .grade2(b_g2), .set_grade(b_set));
  mf_five #(.R(PDEM_R), .C(PDEM_C), .F(PDEM_F), .SU(PDEM_SU), .SD(PDEM_SD))
    u_pdem (.x, .grade1(p_g1), .grade2(p_g2), .set_grade(p_set));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int eb [5], ep [5];
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      for (int k = 0; k < 5; k++) begin
        eb[k] = bus_set(v, k);
        ep[k] = pdem_set(v, k);
        check(int'(b_set[k]) == eb[k], $sformatf("bus x=%h set %0d: %h exp %h", v, k, b_set[k], eb[k]));
        check(int'(p_set[k]) == ep[k], $sformatf("pdem x=%h set %0d: %h exp %h", v, k, p_set[k], ep[k]));
      end
      check(int'(b_g1) == eb[0] + eb[2] + eb[4] && int'(b_g2) == eb[1] + eb[3],
            $sformatf("bus pair x=%h", v));
      check(int'(p_g1) == ep[0] + ep[2] + ep[4] && int'(p_g2) == ep[1] + ep[3],
            $sformatf("pdem pair x=%h", v));
    end
    // figure values: bus error peaks at 00,40,80,C0,FF; halfway at 20 -> ~0.5
    x = 8'h40; #1; check(b_set[1] == 8'hFF && b_set[0] == 8'h00, "bus -15 V is NS");
    x = 8'h80; #1; check(b_set[2] == 8'hFF, "bus 0 V is Z");
    x = 8'hFF; #1; check(b_set[4] == 8'hFF, "bus 30 V is PL");
    x = 8'h20; #1; check(b_set[0] == 8'h7F && b_set[1] == 8'h80, "bus -22.5 V half NL, half NS");
    x = 8'h60; #1; check(p_set[1] == 8'hFF, "pdem -100 W is NS");
    x = 8'hA0; #1; check(p_set[3] == 8'hFF && p_set[4] == 8'h00, "pdem 100 W is PS");
    x = 8'h00; #1; check(p_set[0] == 8'hFF, "pdem -400 W is NL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
