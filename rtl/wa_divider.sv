// wa_divider: unsigned divider of the weighted-average defuzzifier.
//
// Computes quot = num / den (truncated) and rem = num % den by restoring
// long division, one quotient bit per clock, most significant bit first.
// The document asks for a divider but does not say how it is built; the
// bit-serial restoring form is this design's choice, taken because it costs
// one subtractor.
//
// Handshake: pulse start with num/den valid while busy is low. The result is
// valid when done pulses, W+1 clocks after start (one load cycle, then W
// shift/subtract cycles). start while busy is ignored. den = 0 gives
// quot = all ones and raises div0 with done.
module wa_divider #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic         div0,
  output logic [W-1:0] quot,
  output logic [W-1:0] rem
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  q_sh;     // dividend bits still to shift in, becomes the quotient
  logic [W:0]    r_acc;    // partial remainder
  logic [W-1:0]  d_reg;
  logic [CW-1:0] cnt;

  logic [W:0] r_shift;
  logic [W:0] r_diff;

  always_comb begin
    r_shift = {r_acc[W-1:0], q_sh[W-1]};
    r_diff  = r_shift - {1'b0, d_reg};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      div0  <= 1'b0;
      q_sh  <= '0;
      r_acc <= '0;
      d_reg <= '0;
      cnt   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          q_sh  <= num;
          d_reg <= den;
          r_acc <= '0;
          cnt   <= CW'(W);
          div0  <= (den == '0);
        end
      end else begin
        if (r_diff[W]) begin       // negative: restore
          r_acc <= r_shift;
          q_sh  <= {q_sh[W-2:0], 1'b0};
        end else begin
          r_acc <= r_diff;
          q_sh  <= {q_sh[W-2:0], 1'b1};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quot = q_sh;
  assign rem  = r_acc[W-1:0];

endmodule
