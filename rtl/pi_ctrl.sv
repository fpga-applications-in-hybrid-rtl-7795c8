// pi_ctrl: proportional-integral controller of the FOC loops (d-current,
// q-current and speed).
//
// Once per in_valid: e = ref - fb;  I += KI*e;  out = KP*e + I.
// Gains are fixed point, gain = KP / 2^GAIN_SHIFT. The integrator and the
// output are clamped to +/-OUT_LIM; clamping the integrator is the
// anti-windup. The document names the three PI controllers but gives no
// gains, limits or anti-windup; all of those are this design's.
//
// Timing: one clock; out_valid follows in_valid. clear zeroes the
// integrator.
module pi_ctrl
  import foc_pkg::*;
#(
  parameter int signed   KP         = 2048,   // 0.5 at GAIN_SHIFT 12
  parameter int signed   KI         = 256,    // 0.0625 at GAIN_SHIFT 12
  parameter int unsigned GAIN_SHIFT = 12,
  parameter int signed   OUT_LIM    = 29491   // 0.9 in Q1.15
) (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  input  logic in_valid,
  input  q15_t ref_in,
  input  q15_t fb,
  output logic out_valid,
  output q15_t out,
  output logic saturated
);

  localparam logic signed [47:0] LIM  = 48'(OUT_LIM);
  localparam logic signed [47:0] NLIM = -48'(OUT_LIM);

  logic signed [47:0] integ, e, i_next, o_next;

  function automatic logic signed [47:0] clamp(input logic signed [47:0] v);
    if (v > LIM)  return LIM;
    if (v < NLIM) return NLIM;
    return v;
  endfunction

  always_comb begin
    e      = 48'(ref_in) - 48'(fb);
    i_next = clamp(integ + ((e * 48'(KI)) >>> GAIN_SHIFT));
    o_next = ((e * 48'(KP)) >>> GAIN_SHIFT) + i_next;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      integ     <= '0;
      out       <= '0;
      out_valid <= 1'b0;
      saturated <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        integ     <= i_next;
        out       <= sat16(clamp(o_next));
        saturated <= (o_next > LIM) || (o_next < NLIM);
      end
    end
  end

endmodule
