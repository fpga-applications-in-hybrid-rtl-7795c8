// fuzzy_controller: global-level fuzzy power manager of a battery /
// ultracapacitor hybrid energy storage system (HESS).
//
// From four crisp 8-bit inputs (bus-voltage error, power demand Pload - Ppv,
// battery SOC, UC voltage) it computes the power references of the battery
// (Pbat) and of the ultracapacitor (Pcap) for their bidirectional converters,
// so that the UC takes the fast, large swings, the battery the slow average,
// and neither is driven past its charge limits. Three stages, as in the
// document: fuzzifier (membership grades), rule evaluator (20 Mamdani rules
// with MIN/MAX), defuzzifier (weighted average with two dividers).
//
// Handshake: in_valid is accepted when in_ready is high; one operation is in
// flight at a time. out_valid pulses LATENCY = SUM_W + 5 clocks after the
// accepting edge (24 + 1 at the default 20-bit sums). Output codes:
// Pbat 8'h00..FF spans -400..400 W and Pcap -550..550 W, 8'h80 = 0 W.
// The document gives no handshake or latency; both are this design's.
module fuzzy_controller
  import fuzzy_pkg::*;
#(
  parameter int unsigned SUM_W = 20
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  output logic   in_ready,
  input  crisp_t in_x,
  output logic   out_valid,
  output grade_t pbat,
  output grade_t pcap,
  output logic   pbat_idle,          // no rule fired for Pbat
  output logic   pcap_idle,          // no rule fired for Pcap
  output logic [NRULES-1:0] fired    // rules that fired in the last evaluation
);

  logic   fz_valid, re_valid, df_ready, busy;
  crisp_t fz_x;
  grade_t grade [NGRADES];
  grade_t pbat_agg [NSETS];
  grade_t pcap_agg [NSETS];
  logic [NRULES-1:0] fired_now;

  // Busy from acceptance until the rule evaluator hands over to the
  // defuzzifier; afterwards the defuzzifier's ready covers the rest.
  always_ff @(posedge clk) begin
    if (rst)                       busy <= 1'b0;
    else if (in_valid && in_ready) busy <= 1'b1;
    else if (re_valid)             busy <= 1'b0;
  end
  assign in_ready = !busy && df_ready && !fz_valid && !re_valid;

  fuzzifier u_fuzz (
    .clk, .rst, .in_valid(in_valid && in_ready), .in_x,
    .out_valid(fz_valid), .out_x(fz_x), .grade);

  rule_evaluator u_rules (
    .clk, .rst, .in_valid(fz_valid), .in_x(fz_x), .grade,
    .out_valid(re_valid), .pbat_agg, .pcap_agg, .fired(fired_now));

  defuzzifier #(.SUM_W(SUM_W)) u_defuzz (
    .clk, .rst, .in_valid(re_valid), .ready(df_ready), .pbat_agg, .pcap_agg,
    .out_valid, .pbat, .pcap, .pbat_idle, .pcap_idle);

  always_ff @(posedge clk) begin
    if (rst)           fired <= '0;
    else if (re_valid) fired <= fired_now;
  end

endmodule
