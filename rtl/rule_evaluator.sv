// rule_evaluator: second stage of the fuzzy power manager.
//
// Evaluates the 20 IF-THEN rules of fuzzy_pkg::RULES in parallel, one
// registered term per rule, all on the same clock edge, and aggregates the
// rule strengths per output set with MAX (Mamdani). A rule's strength is the
// grade of its fuzzy term, or the MIN of its two terms. A term reads the grade
// pair of its input and picks the grade by the crisp value: a five-set term
// (e.g. "bus error is NS") is alive only while the crisp input lies on the
// support of that set, and then its grade is the pair's even (NL/Z/PL) or odd
// (NS/PS) grade. "NOT OVER" and "NOT UNDER" on SOC and UC voltage act as
// crisp gates (the grade of OVER or UNDER is zero), as in the document's
// realisation; the single-term form "A AND gates" is the document's.
//
// Outputs: for Pbat and Pcap, the aggregated grade of each set NL..PL
// (the document's NL,NS,ZZ,PS,PL and NLARGE..PLARGE). Timing: one clock from
// in_valid to out_valid; aggregation is combinational after the rule
// registers.
module rule_evaluator
  import fuzzy_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  crisp_t in_x,
  input  grade_t grade [NGRADES],
  output logic   out_valid,
  output grade_t pbat_agg [NSETS],
  output grade_t pcap_agg [NSETS],
  output logic [NRULES-1:0] fired   // rules with non-zero strength
);

  grade_t strength [NRULES];

  function automatic logic in_support(input grade_t x, input mf5_t r, input mf5_t f,
                                      input fset_e s);
    int unsigned k;
    k = int'(s);
    return (int'(x) >= r[k]) && (int'(x) <= f[k]);
  endfunction

  function automatic grade_t term(input src_e src, input fset_e s, input crisp_t x,
                                  input grade_t g [NGRADES]);
    logic odd;
    odd = (s == FS_NS) || (s == FS_PS);
    unique case (src)
      SRC_BUS:  return in_support(x.bus, BUS_R, BUS_F, s) ?
                       g[G_BUS + (odd ? 1 : 0)] : 8'h00;
      SRC_PDEM: return in_support(x.pdem, PDEM_R, PDEM_F, s) ?
                       g[G_PDEM + (odd ? 1 : 0)] : 8'h00;
      SRC_UCAP: begin
        if (s == FS_OVER)  return (x.ucap >= UCAP_MF.c) ? g[G_UCAP] : 8'h00;
        if (s == FS_UNDER) return (x.ucap <  UCAP_MF.b) ? g[G_UCAP] : 8'h00;
        return g[G_UCAP + 1];
      end
      default:  return 8'hFF;  // SRC_NONE: neutral element of MIN
    endcase
  endfunction

  function automatic logic gate_ok(input gate_e gt, input grade_t x, input mf3_t mf);
    unique case (gt)
      G_NOT_OVER: return x < mf.c;
      G_NOT_UNDR: return x >= mf.b;
      default:    return 1'b1;
    endcase
  endfunction

  for (genvar r = 0; r < NRULES; r++) begin : g_rule
    localparam rule_t RL = RULES[r];
    always_ff @(posedge clk) begin
      if (rst) strength[r] <= 8'h00;
      else if (in_valid) begin
        if (gate_ok(RL.soc_gate, in_x.soc, SOC_MF) && gate_ok(RL.ucap_gate, in_x.ucap, UCAP_MF))
          strength[r] <= gmin(term(RL.a_src, RL.a_set, in_x, grade),
                              term(RL.b_src, RL.b_set, in_x, grade));
        else
          strength[r] <= 8'h00;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

  // MAX aggregation per consequent set.
  always_comb begin
    for (int k = 0; k < NSETS; k++) begin
      pbat_agg[k] = 8'h00;
      pcap_agg[k] = 8'h00;
    end
    for (int r = 0; r < NRULES; r++) begin
      pbat_agg[int'(RULES[r].pbat)] = gmax(pbat_agg[int'(RULES[r].pbat)], strength[r]);
      pcap_agg[int'(RULES[r].pcap)] = gmax(pcap_agg[int'(RULES[r].pcap)], strength[r]);
      fired[r] = (strength[r] != 8'h00);
    end
  end

endmodule
