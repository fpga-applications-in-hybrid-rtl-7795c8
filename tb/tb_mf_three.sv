// tb_mf_three: exhaustive check of the UNDER/NORMAL/OVER membership units
// (SOC and UC-voltage configurations) over all 256 codes. The expected
// grades are computed here from the breakpoints written out as numbers
// (SOC 33,3E,C3,CC; UC 29,37,DF,EF; slopes 17h and 1Ch, saturating).
// Breakpoints and slopes follow the document; the NORMAL plateau and the
// grade pairing are this design's choices.
module tb_mf_three;
  import fuzzy_pkg::*;

  grade_t x = '0;
  grade_t s_g1, s_g2, s_u, s_n, s_o, u_g1, u_g2, u_u, u_n, u_o;
  int checks = 0, failures = 0;

  mf_three u_soc (.x, .grade1(s_g1), .grade2(s_g2), .under_g(s_u), .normal_g(s_n), .over_g(s_o));
  mf_three #(.MF(UCAP_MF)) u_uc (.x, .grade1(u_g1), .grade2(u_g2), .under_g(u_u),
                                  .normal_g(u_n), .over_g(u_o));

  function automatic int cl(int v); return v < 0 ? 0 : v > 255 ? 255 : v; endfunction

  function automatic void ref3(int v, int a, int b, int c, int d, output int u, n, o);
    u = (v >= b) ? 0 : (v < a) ? 255 : cl(255 - (v - a) * 'h17);
    o = (v >= d) ? 255 : (v < c) ? 0 : cl((v - c) * 'h1C);
    if (v < a) n = 0;
    else if (v < b) n = cl((v - a) * 'h17);
    else if (v < c) n = 255;
    else if (v < d) n = cl(255 - (v - c) * 'h1C);
    else n = 0;
  endfunction

  initial begin
    int u, n, o;
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      ref3(v, 'h33, 'h3E, 'hC3, 'hCC, u, n, o);
      checks++;
      if (int'(s_u) != u || int'(s_n) != n || int'(s_o) != o || int'(s_g1) != (u > o ? u : o) || int'(s_g2) != n) begin
        failures++; $display("FAIL soc x=%h: %h %h %h exp %0d %0d %0d", v, s_u, s_n, s_o, u, n, o);
      end
      ref3(v, 'h29, 'h37, 'hDF, 'hEF, u, n, o);
      checks++;
      if (int'(u_u) != u || int'(u_n) != n || int'(u_o) != o || int'(u_g1) != (u > o ? u : o) || int'(u_g2) != n) begin
        failures++; $display("FAIL ucap x=%h: %h %h %h exp %0d %0d %0d", v, u_u, u_n, u_o, u, n, o);
      end
    end
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
