// clarke: Clarke (abc -> alpha/beta) transform, first FOC stage.
//
// alpha = 2/3*ia - 1/3*ib - 1/3*ic,  beta = 0.577*(ib - ic)
// These are the amplitude-invariant coefficients of the document's Clarke
// model (2/3, -1/3, -1/3; 0, 0.577, -0.577), so alpha equals ia for balanced
// currents. Coefficients are Q1.15 (21845, 10923, 18919); the result is
// rounded and saturated to Q1.15.
//
// Timing: one clock; out_valid follows in_valid.
module clarke
  import foc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  q15_t ia,
  input  q15_t ib,
  input  q15_t ic,
  output logic out_valid,
  output q15_t i_alpha,
  output q15_t i_beta
);

  localparam q15_t K_2_3  = 16'sd21845;  // 2/3
  localparam q15_t K_1_3  = 16'sd10923;  // 1/3
  localparam q15_t K_SQ13 = 16'sd18919;  // 1/sqrt(3) = 0.577

  logic signed [47:0] a_sum, b_sum;

  always_comb begin
    a_sum = qmul(K_2_3, ia) - qmul(K_1_3, ib) - qmul(K_1_3, ic);
    b_sum = qmul(K_SQ13, ib) - qmul(K_SQ13, ic);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      i_alpha   <= '0;
      i_beta    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_alpha <= sat16(a_sum);
        i_beta  <= sat16(b_sum);
      end
    end
  end

endmodule
