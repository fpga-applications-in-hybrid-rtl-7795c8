// fuzzy_ref: behavioural reference of the fuzzy power manager, for the
// testbenches. It computes every set's grade directly from the breakpoints
// of the input membership functions (no grade pairs, no range decoding),
// evaluates the rule table with MIN/MAX and divides with integer arithmetic.
// The breakpoints, slopes, rule base and output centres follow the document;
// writing the reference as per-set triangle formulas is this testbench's choice.
package fuzzy_ref;
  import fuzzy_pkg::*;

  function automatic int clamp255(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // One triangle side: rising from r to c with slope su, falling from c to f
  // with slope sd; zero outside [r, f).
  function automatic int tri_mf(int x, int r, int c, int f, int su, int sd);
    if (x < r || x >= f) return 0;
    if (x < c) return clamp255((x - r) * su);
    return clamp255(255 - (x - c) * sd);
  endfunction

  function automatic int bus_set(int x, int k);
    int p [5] = '{0, 64, 128, 192, 255};
    int r, f;
    r = (k == 0) ? 0 : p[k-1];
    f = (k == 4) ? 256 : (k == 3) ? 255 : p[k+1];
    return tri_mf(x, r, p[k], f, 4, 4);
  endfunction

  function automatic int pdem_set(int x, int k);
    case (k)
      0: return tri_mf(x, 0, 0, 96, 0, 3);
      1: return tri_mf(x, 64, 96, 128, 8, 8);
      2: return tri_mf(x, 96, 128, 160, 8, 8);
      3: return tri_mf(x, 128, 160, 192, 8, 8);
      default: return tri_mf(x, 160, 255, 256, 3, 0);
    endcase
  endfunction

  // UC voltage: UNDER below 29h falling to 37h, OVER from DFh rising to EFh.
  function automatic int ucap_over(int x);
    if (x < 'hDF) return 0;
    if (x >= 'hEF) return 255;
    return clamp255((x - 'hDF) * 'h1C);
  endfunction
  function automatic int ucap_under(int x);
    if (x >= 'h37) return 0;
    if (x < 'h29) return 255;
    return clamp255(255 - (x - 'h29) * 'h17);
  endfunction

  function automatic int term(src_e s, fset_e f, int bus, int pdem, int ucap);
    case (s)
      SRC_BUS:  return bus_set(bus, int'(f));
      SRC_PDEM: return pdem_set(pdem, int'(f));
      SRC_UCAP: return (f == FS_OVER) ? ucap_over(ucap) : ucap_under(ucap);
      default:  return 255;
    endcase
  endfunction

  function automatic bit gate(gate_e g, int x, int under_end, int over_start);
    if (g == G_NOT_OVER) return x < over_start;
    if (g == G_NOT_UNDR) return x >= under_end;
    return 1;
  endfunction

  // Returns {pbat, pcap} codes and the rule-fired mask.
  function automatic void evaluate(input int bus, pdem, soc, ucap,
                                   output int pbat, output int pcap,
                                   output bit [NRULES-1:0] fired,
                                   output int bat_agg [5], output int cap_agg [5]);
    int s, t1, t2, nb, db, nc, dc;
    int bc [5] = '{'h20, 'h60, 'h80, 'hA0, 'hE0};
    int cc [5] = '{'h2A, 'h55, 'h80, 'hAA, 'hD4};
    for (int k = 0; k < 5; k++) begin bat_agg[k] = 0; cap_agg[k] = 0; end
    for (int r = 0; r < NRULES; r++) begin
      t1 = term(RULES[r].a_src, RULES[r].a_set, bus, pdem, ucap);
      t2 = term(RULES[r].b_src, RULES[r].b_set, bus, pdem, ucap);
      s = (t1 < t2) ? t1 : t2;
      if (!gate(RULES[r].soc_gate, soc, 'h3E, 'hC3) || !gate(RULES[r].ucap_gate, ucap, 'h37, 'hDF))
        s = 0;
      fired[r] = (s != 0);
      if (s > bat_agg[int'(RULES[r].pbat)]) bat_agg[int'(RULES[r].pbat)] = s;
      if (s > cap_agg[int'(RULES[r].pcap)]) cap_agg[int'(RULES[r].pcap)] = s;
    end
    nb = 0; db = 0; nc = 0; dc = 0;
    for (int k = 0; k < 5; k++) begin
      nb += bat_agg[k] * bc[k]; db += bat_agg[k];
      nc += cap_agg[k] * cc[k]; dc += cap_agg[k];
    end
    pbat = (db == 0) ? 'h80 : nb / db;
    pcap = (dc == 0) ? 'h80 : nc / dc;
  endfunction
endpackage
