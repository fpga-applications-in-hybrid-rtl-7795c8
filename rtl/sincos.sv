// sincos: sine and cosine of an electrical angle, for the Park and inverse
// Park transforms.
//
// The angle (16 bits per turn, 0..2*pi) is reduced to its top ANGLE_BITS
// bits; a quarter-wave table of 2^(ANGLE_BITS-2) Q1.15 entries,
// round(32767*sin((i+0.5)*2*pi/2^ANGLE_BITS)), is filled at elaboration and
// mirrored for the other quadrants. Sampling the table at half-step centres
// makes sine and cosine exact mirror images, so sin^2+cos^2 stays close to 1
// and no quadrant gets a larger error. The document only names a
// trigonometric-function block; the table form is this design's choice.
//
// Timing: one clock; out_valid follows in_valid.
module sincos
  import foc_pkg::*;
#(
  parameter int unsigned ANGLE_BITS = 10
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  angle_t theta,
  output logic   out_valid,
  output q15_t   sin_o,
  output q15_t   cos_o
);

  localparam int unsigned QN = 2 ** (ANGLE_BITS - 2);
  localparam int unsigned IW = ANGLE_BITS - 2;

  typedef q15_t table_t [QN];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < QN; i++)
      t[i] = 16'($rtoi(32767.0 * $sin((real'(i) + 0.5) * 6.283185307179586
                                        / real'(4 * QN)) + 0.5));
    return t;
  endfunction

  localparam table_t QTAB = make_table();

  // sin of step (quadrant q, index i), with half-step centred samples
  function automatic q15_t lookup(input logic [1:0] q, input logic [IW-1:0] i);
    logic [IW-1:0] j;
    j = (q[0]) ? ~i : i;             // mirror in quadrants 1 and 3
    return q[1] ? -QTAB[j] : QTAB[j];
  endfunction

  logic [ANGLE_BITS-1:0] s_idx, c_idx;

  always_comb begin
    s_idx = theta[15 -: ANGLE_BITS];
    c_idx = s_idx + ANGLE_BITS'(QN);  // cos(x) = sin(x + pi/2)
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      sin_o     <= '0;
      cos_o     <= 16'sh7FFF;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sin_o <= lookup(s_idx[ANGLE_BITS-1 -: 2], s_idx[IW-1:0]);
        cos_o <= lookup(c_idx[ANGLE_BITS-1 -: 2], c_idx[IW-1:0]);
      end
    end
  end

endmodule
