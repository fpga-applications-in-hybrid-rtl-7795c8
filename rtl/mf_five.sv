// mf_five: membership-function unit of a five-set input (NL, NS, Z, PS, PL).
//
// Maps one crisp byte to the grades of its fuzzy sets. Every set is a
// triangle (the two end sets are half-triangles) made of saturating ramps:
// grade = (x - R) * slope_up on the rising side and 8'hFF - (x - C) * slope_down
// on the falling side, clipped to 0..255, as in the document's membership
// formula. Neighbouring sets overlap, but sets of equal parity (NL, Z, PL and
// NS, PS) never do, so the unit reports two grades, as the document's
// fuzzifier does: grade1 carries whichever of NL/Z/PL is non-zero and grade2
// whichever of NS/PS is. The rule evaluator tells the sets apart by the range
// of the crisp input.
//
// Default parameters give the bus-voltage-error function of the document
// (peaks at 00,40,80,C0,FF, slope 4); the power-demand function uses the
// PDEM_* constants of fuzzy_pkg. The outputs are combinational; the
// fuzzifier registers them. The saturation at 0 and 255 is this design's own
// choice (the document's arithmetic wraps where a slope overshoots).
module mf_five
  import fuzzy_pkg::*;
#(
  parameter mf5_t R  = BUS_R,
  parameter mf5_t C  = BUS_C,
  parameter mf5_t F  = BUS_F,
  parameter mf5_t SU = BUS_SU,
  parameter mf5_t SD = BUS_SD
) (
  input  grade_t x,
  output grade_t grade1,            // NL, Z or PL grade
  output grade_t grade2,            // NS or PS grade
  output grade_t set_grade [NSETS]  // grade of every set, for observation
);

  function automatic grade_t set_mf(input grade_t v, input int unsigned k);
    int unsigned xi;
    xi = int'(v);
    if (xi < R[k] || xi >= F[k]) return 8'h00;
    if (xi < C[k])               return ramp_up(v, 8'(R[k]), 8'(SU[k]));
    return ramp_down(v, 8'(C[k]), 8'(SD[k]));
  endfunction

  always_comb begin
    for (int unsigned k = 0; k < NSETS; k++) set_grade[k] = set_mf(x, k);
    grade1 = gmax(gmax(set_grade[0], set_grade[2]), set_grade[4]);
    grade2 = gmax(set_grade[1], set_grade[3]);
  end

endmodule
