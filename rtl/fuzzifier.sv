// fuzzifier: first stage of the fuzzy power manager.
//
// Four membership-function units, one per crisp input (bus-voltage error,
// power demand, battery SOC, UC voltage), each giving two grades. The stage
// registers the eight grades together with the crisp inputs, because the rule
// evaluator needs both: the crisp value tells which fuzzy set a grade belongs
// to. The grade order (grade[0..7] = grade1..grade8) is bus error, UC
// voltage, power demand, SOC, two grades each, as in the document's rule
// evaluator ports.
//
// Timing: one clock. out_valid follows in_valid by one cycle; a new input can
// be taken every cycle. Synchronous active-high reset clears the outputs (the
// document resets its grade registers to zero).
module fuzzifier
  import fuzzy_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  crisp_t in_x,
  output logic   out_valid,
  output crisp_t out_x,
  output grade_t grade [NGRADES]
);

  grade_t g_comb [NGRADES];
  grade_t unused5_bus [NSETS];
  grade_t unused5_pdem [NSETS];
  grade_t soc_u, soc_n, soc_o, ucap_u, ucap_n, ucap_o;

  mf_five #(.R(BUS_R), .C(BUS_C), .F(BUS_F), .SU(BUS_SU), .SD(BUS_SD)) u_bus (
    .x(in_x.bus), .grade1(g_comb[G_BUS]), .grade2(g_comb[G_BUS+1]), .set_grade(unused5_bus));

  mf_three #(.MF(UCAP_MF)) u_ucap (
    .x(in_x.ucap), .grade1(g_comb[G_UCAP]), .grade2(g_comb[G_UCAP+1]),
    .under_g(ucap_u), .normal_g(ucap_n), .over_g(ucap_o));

  mf_five #(.R(PDEM_R), .C(PDEM_C), .F(PDEM_F), .SU(PDEM_SU), .SD(PDEM_SD)) u_pdem (
    .x(in_x.pdem), .grade1(g_comb[G_PDEM]), .grade2(g_comb[G_PDEM+1]), .set_grade(unused5_pdem));

  mf_three #(.MF(SOC_MF)) u_soc (
    .x(in_x.soc), .grade1(g_comb[G_SOC]), .grade2(g_comb[G_SOC+1]),
    .under_g(soc_u), .normal_g(soc_n), .over_g(soc_o));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      for (int i = 0; i < NGRADES; i++) grade[i] <= 8'h00;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_x <= in_x;
        for (int i = 0; i < NGRADES; i++) grade[i] <= g_comb[i];
      end
    end
  end

endmodule
