// foc_pkg: fixed-point types and helpers of the field-oriented motor
// controller.
//
// Currents, voltages and trigonometric values are signed Q1.15 words
// (16'sh7FFF is just under +1.0). A phase current of 1.0 is the full scale of
// the current sensing; a voltage of 1.0 is the DC-link voltage Vdc. Angles
// are unsigned 16-bit, 65536 steps per electrical turn (0..2*pi). The word
// lengths are this design's choice: the document generates its arithmetic
// from a fixed-point model and does not print the word lengths.
package foc_pkg;

  typedef logic signed [15:0] q15_t;
  typedef logic        [15:0] angle_t;

  localparam int signed Q15_MAX = 32767;
  localparam int signed Q15_MIN = -32768;

  // Saturate a wide signed value to Q1.15.
  function automatic q15_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)  return 16'sh7FFF;
    if (v < -48'sd32768) return 16'sh8000;
    return v[15:0];
  endfunction

  // Q1.15 product, rounded to nearest, as a 48-bit intermediate so that sums
  // of products can be saturated once.
  function automatic logic signed [47:0] qmul(input q15_t a, input q15_t b);
    logic signed [47:0] p;
    p = 48'(a) * 48'(b);
    return (p + 48'sd16384) >>> 15;
  endfunction

endpackage
