// wa_aggregator: weighted-average sums of the defuzzifier.
//
// For each output (Pbat and Pcap) it forms the numerator
// sum_k grade_k * centre_k and the denominator sum_k grade_k over the five
// aggregated output sets NL..PL, the two sums of the weighted-average
// defuzzification formula. The centres are the document's output-set codes
// (fuzzy_pkg::PBAT_CTR, PCAP_CTR). The document keeps both sums in 20-bit
// words; so does this block (the largest numerator, 5*255*224, needs 19).
//
// Timing: one clock, registered; out_valid follows in_valid.
module wa_aggregator
  import fuzzy_pkg::*;
#(
  parameter int unsigned SUM_W = 20
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  grade_t           pbat_agg [NSETS],
  input  grade_t           pcap_agg [NSETS],
  output logic             out_valid,
  output logic [SUM_W-1:0] pbat_num,
  output logic [SUM_W-1:0] pbat_den,
  output logic [SUM_W-1:0] pcap_num,
  output logic [SUM_W-1:0] pcap_den
);

  logic [SUM_W-1:0] bn, bd, cn, cd;

  always_comb begin
    bn = '0; bd = '0; cn = '0; cd = '0;
    for (int k = 0; k < NSETS; k++) begin
      bn = bn + SUM_W'(pbat_agg[k]) * SUM_W'(PBAT_CTR[k]);
      bd = bd + SUM_W'(pbat_agg[k]);
      cn = cn + SUM_W'(pcap_agg[k]) * SUM_W'(PCAP_CTR[k]);
      cd = cd + SUM_W'(pcap_agg[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      pbat_num <= '0; pbat_den <= '0; pcap_num <= '0; pcap_den <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pbat_num <= bn; pbat_den <= bd; pcap_num <= cn; pcap_den <= cd;
      end
    end
  end

endmodule
