// inv_park: inverse Park transform (rotating d/q -> stationary alpha/beta),
// third FOC stage.
//
// alpha = d*cos(theta) - q*sin(theta)
// beta  = d*sin(theta) + q*cos(theta)
// the inverse of the Park rotation used by the park block, so that a
// voltage vector computed in d/q lands on the stator axes. Using the exact
// inverse of the document's Park rotation is what the document asks for;
// word lengths and rounding are this design's. Q1.15 in and out,
// rounded and saturated.
//
// Timing: one clock; out_valid follows in_valid.
module inv_park
  import foc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  q15_t d,
  input  q15_t q,
  input  q15_t sin_t,
  input  q15_t cos_t,
  output logic out_valid,
  output q15_t alpha,
  output q15_t beta
);

  logic signed [47:0] a_sum, b_sum;

  always_comb begin
    a_sum = qmul(d, cos_t) - qmul(q, sin_t);
    b_sum = qmul(d, sin_t) + qmul(q, cos_t);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      alpha <= '0;
      beta  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        alpha <= sat16(a_sum);
        beta  <= sat16(b_sum);
      end
    end
  end

endmodule
