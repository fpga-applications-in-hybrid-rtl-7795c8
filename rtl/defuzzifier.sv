// defuzzifier: third stage of the fuzzy power manager.
//
// One aggregator and two dividers, as the document describes: the
// aggregator forms the weighted-average numerator and denominator of Pbat and
// Pcap, and two dividers run in parallel to give the crisp outputs
// Pbat = sum(grade*centre)/sum(grade) and likewise Pcap, as 8-bit codes
// (8'h80 is zero power). The quotient is truncated; a weighted average of the
// centres always fits in 8 bits. When no rule fires for an output (its
// denominator is zero) the output is the zero-power code 8'h80 and idle is
// raised for it; that case is not covered by the document and the choice is
// this design's own.
//
// Timing: in_valid is taken when ready is high. out_valid pulses 2 + SUM_W + 1
// clocks later (aggregator register, divider load, SUM_W divide steps).
module defuzzifier
  import fuzzy_pkg::*;
#(
  parameter int unsigned SUM_W = 20
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  output logic   ready,
  input  grade_t pbat_agg [NSETS],
  input  grade_t pcap_agg [NSETS],
  output logic   out_valid,
  output grade_t pbat,
  output grade_t pcap,
  output logic   pbat_idle,
  output logic   pcap_idle
);

  logic             agg_valid;
  logic [SUM_W-1:0] bn, bd, cn, cd;
  logic             b_busy, c_busy, b_done, c_done, b_div0, c_div0;
  logic [SUM_W-1:0] b_q, c_q, b_r, c_r;
  logic             agg_pending;

  wa_aggregator #(.SUM_W(SUM_W)) u_agg (
    .clk, .rst, .in_valid(in_valid && ready), .pbat_agg, .pcap_agg,
    .out_valid(agg_valid), .pbat_num(bn), .pbat_den(bd), .pcap_num(cn), .pcap_den(cd));

  wa_divider #(.W(SUM_W)) u_div_bat (
    .clk, .rst, .start(agg_valid), .num(bn), .den(bd),
    .busy(b_busy), .done(b_done), .div0(b_div0), .quot(b_q), .rem(b_r));

  wa_divider #(.W(SUM_W)) u_div_cap (
    .clk, .rst, .start(agg_valid), .num(cn), .den(cd),
    .busy(c_busy), .done(c_done), .div0(c_div0), .quot(c_q), .rem(c_r));

  // One operation in flight: from acceptance until the dividers finish.
  always_ff @(posedge clk) begin
    if (rst) agg_pending <= 1'b0;
    else if (in_valid && ready) agg_pending <= 1'b1;
    else if (agg_valid)         agg_pending <= 1'b0;
  end
  assign ready = !agg_pending && !agg_valid && !b_busy && !c_busy;

  function automatic grade_t crisp(input logic div0, input logic [SUM_W-1:0] q);
    if (div0)              return OUT_IDLE;
    if (q > SUM_W'(8'hFF)) return 8'hFF;
    return q[7:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      pbat <= OUT_IDLE; pcap <= OUT_IDLE;
      pbat_idle <= 1'b0; pcap_idle <= 1'b0;
    end else begin
      out_valid <= b_done;
      if (b_done) begin
        pbat      <= crisp(b_div0, b_q);
        pcap      <= crisp(c_div0, c_q);
        pbat_idle <= b_div0;
        pcap_idle <= c_div0;
      end
    end
  end

  // Both dividers start together and take the same number of steps.
  always_ff @(posedge clk) begin
    if (!rst) assert (b_done == c_done) else $error("defuzzifier: dividers out of step");
  end

endmodule
