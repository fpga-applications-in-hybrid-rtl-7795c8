// park: Park transform (stationary alpha/beta -> rotating d/q), second FOC
// stage.
//
// d =  alpha*cos(theta) + beta*sin(theta)
// q = -alpha*sin(theta) + beta*cos(theta)
// as in the document's rotation matrix. sin/cos come from the sincos block,
// aligned with alpha/beta by the caller. Q1.15 in and out, rounded and
// saturated.
//
// Timing: one clock; out_valid follows in_valid.
module park
  import foc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  q15_t alpha,
  input  q15_t beta,
  input  q15_t sin_t,
  input  q15_t cos_t,
  output logic out_valid,
  output q15_t d,
  output q15_t q
);

  logic signed [47:0] d_sum, q_sum;

  always_comb begin
    d_sum = qmul(alpha, cos_t) + qmul(beta, sin_t);
    q_sum = qmul(beta, cos_t) - qmul(alpha, sin_t);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      d <= '0;
      q <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        d <= sat16(d_sum);
        q <= sat16(q_sum);
      end
    end
  end

endmodule
