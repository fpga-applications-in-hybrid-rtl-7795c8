// mf_three: membership-function unit of a storage-state input
// (battery SOC or ultracapacitor voltage), sets UNDER, NORMAL and OVER.
//
// UNDER is full below A and falls with slope S1 from A (zero from B on);
// NORMAL rises from A with slope S1, is full from B to C and falls from C
// with slope S2 (zero from D on); OVER rises from C with slope S2 and is full
// from D on. Ramps saturate at 0 and 255. As in the document's fuzzifier the
// unit reports two grades: grade1 is the grade of UNDER or OVER (they never
// overlap), grade2 the grade of NORMAL.
//
// Defaults are the document's SOC breakpoints (33, 3E, C3, CC; slopes 17h,
// 1Ch); UCAP_MF in fuzzy_pkg holds the UC-voltage ones. Combinational.
module mf_three
  import fuzzy_pkg::*;
#(
  parameter mf3_t MF = SOC_MF
) (
  input  grade_t x,
  output grade_t grade1,     // UNDER or OVER grade
  output grade_t grade2,     // NORMAL grade
  output grade_t under_g,
  output grade_t normal_g,
  output grade_t over_g
);

  always_comb begin
    under_g  = (x >= MF.b) ? 8'h00 : ramp_down(x, MF.a, MF.s1);
    over_g   = (x >= MF.d) ? 8'hFF : ramp_up(x, MF.c, MF.s2);
    if (x < MF.a)      normal_g = 8'h00;
    else if (x < MF.b) normal_g = ramp_up(x, MF.a, MF.s1);
    else if (x < MF.c) normal_g = 8'hFF;
    else if (x < MF.d) normal_g = ramp_down(x, MF.c, MF.s2);
    else               normal_g = 8'h00;
    grade1 = gmax(under_g, over_g);
    grade2 = normal_g;
  end

endmodule
