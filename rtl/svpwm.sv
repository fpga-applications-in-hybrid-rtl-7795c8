// svpwm: space-vector PWM duty calculation, fourth FOC stage.
//
// From the stator voltage reference (v_alpha, v_beta, Q1.15 fractions of the
// DC-link voltage) it finds the sector of the voltage hexagon and the on-times
// of the two adjacent active vectors, then the switching instants of the
// three upper switches. As in the document's model: the reference is
// projected on three axes Vr1 = v_beta, Vr2 = (sqrt3*v_alpha - v_beta)/2,
// Vr3 = (-sqrt3*v_alpha - v_beta)/2; the sector number is
// N = [Vr1>0] + 2[Vr2>0] + 4[Vr3>0]; per sector two of the times
// X = sqrt3*Vr1*T, Y = -sqrt3*Vr3*T, Z = -sqrt3*Vr2*T (or their negatives)
// become T1 and T2; ta = (T - T1 - T2)/2, tb = ta + T1, tc = tb + T2 are
// routed to phases A, B, C by sector and saturated to 0..T. The upper-switch
// duty is T minus that switching instant, then held inside
// DUTY_MIN..DUTY_MAX ("the modulation range is limited").
//
// T = PERIOD = 1000 counts is the document's modulation range 0..1000; the
// limits DUTY_MIN/DUTY_MAX are this design's (the document gives none).
// The result equals min-max zero-sequence injection of the three phase
// voltages. Timing: one clock; out_valid follows in_valid.
module svpwm
  import foc_pkg::*;
#(
  parameter int unsigned PERIOD   = 1000,
  parameter int unsigned DUTY_MIN = 20,
  parameter int unsigned DUTY_MAX = 980
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  q15_t        v_alpha,
  input  q15_t        v_beta,
  output logic        out_valid,
  output logic [2:0]  sector,
  output logic [15:0] duty [3]   // upper-switch on-time of A, B, C in counts
);

  typedef logic signed [47:0] w_t;

  localparam w_t K_SQ3   = 48'sd56756;  // sqrt(3) in Q15
  localparam w_t K_SQ3_2 = 48'sd28378;  // sqrt(3)/2 in Q15
  localparam w_t K_3_2   = 48'sd49152;  // 3/2 in Q15
  localparam w_t T       = 48'(PERIOD);

  w_t x_t, y_t, z_t, t1, t2, ta, tb, tc;
  w_t cmp [3];
  logic [2:0] n;
  logic signed [47:0] vr2, vr3;

  function automatic w_t clampw(input w_t v, input w_t lo, input w_t hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  always_comb begin
    // projections, Q30 intermediate
    vr2 = w_t'(v_alpha) * K_SQ3_2 - (w_t'(v_beta) <<< 14);
    vr3 = -(w_t'(v_alpha) * K_SQ3_2) - (w_t'(v_beta) <<< 14);
    n   = {vr3 > 0, vr2 > 0, v_beta > 0};
    // X, Y, Z in counts
    x_t = (w_t'(v_beta) * K_SQ3 * T) >>> 30;
    y_t = ((w_t'(v_alpha) * K_3_2 + w_t'(v_beta) * K_SQ3_2) * T) >>> 30;
    z_t = ((w_t'(v_beta) * K_SQ3_2 - w_t'(v_alpha) * K_3_2) * T) >>> 30;
    unique case (n)
      3'd1:    begin t1 =  z_t; t2 =  y_t; end
      3'd2:    begin t1 =  y_t; t2 = -x_t; end
      3'd3:    begin t1 = -z_t; t2 =  x_t; end
      3'd4:    begin t1 = -x_t; t2 =  z_t; end
      3'd5:    begin t1 =  x_t; t2 = -y_t; end
      3'd6:    begin t1 = -y_t; t2 = -z_t; end
      default: begin t1 = '0;   t2 = '0;   end   // zero vector
    endcase
    ta = (T - t1 - t2) >>> 1;
    tb = ta + t1;
    tc = tb + t2;
    unique case (n)
      3'd1:    begin cmp[0] = tb; cmp[1] = ta; cmp[2] = tc; end
      3'd2:    begin cmp[0] = ta; cmp[1] = tc; cmp[2] = tb; end
      3'd4:    begin cmp[0] = tc; cmp[1] = tb; cmp[2] = ta; end
      3'd5:    begin cmp[0] = tc; cmp[1] = ta; cmp[2] = tb; end
      3'd6:    begin cmp[0] = tb; cmp[1] = tc; cmp[2] = ta; end
      default: begin cmp[0] = ta; cmp[1] = tb; cmp[2] = tc; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      sector    <= '0;
      for (int k = 0; k < 3; k++) duty[k] <= 16'(PERIOD / 2);
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sector <= n;
        for (int k = 0; k < 3; k++)
          duty[k] <= 16'(clampw(T - clampw(cmp[k], '0, T),
                                48'(DUTY_MIN), 48'(DUTY_MAX)));
      end
    end
  end

endmodule
