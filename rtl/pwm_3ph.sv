// pwm_3ph: centre-aligned three-phase PWM with complementary outputs and
// dead band, for a SiC three-phase inverter.
//
// A free-running counter c runs 0..2*PERIOD-1; the triangle
// tri = (c < PERIOD) ? c : 2*PERIOD-1-c takes every value 0..PERIOD-1 twice.
// The raw upper-switch signal of a phase is high while tri >= PERIOD - duty,
// a pulse of 2*duty clocks centred on the triangle peak, so the three upper
// PWMs are centre aligned. Duties are taken from duty_in when load is pulsed
// and applied from the next period start (c = 0, all raw signals low), so a
// pulse is never cut. Each phase drives a complementary pair; after any edge
// of the raw signal both outputs stay off for DEAD clocks before the
// switch that should conduct turns on.
//
// Defaults are the document's: 100 kHz switching and 300 ns dead band, with
// the modulation range 0..1000, which at this design's assumed 200 MHz
// clock is PERIOD = 1000 (2000 clocks per period) and DEAD = 60.
// period_start pulses at c = 0, the triangle valley, where the lower
// switches conduct; the controller samples the phase currents there.
// enable low forces all six outputs off. DEAD must be at least 1. The
// outputs are registered: they lag the raw comparison by one clock.
module pwm_3ph #(
  parameter int unsigned PERIOD = 1000,
  parameter int unsigned DEAD   = 60
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        load,
  input  logic [15:0] duty_in [3],
  output logic [2:0]  pwm_h,        // upper switches UH, VH, WH
  output logic [2:0]  pwm_l,        // lower switches UL, VL, WL
  output logic        period_start,
  output logic [15:0] duty_act [3]  // duties in use this period
);

  localparam int unsigned CW = $clog2(2 * PERIOD);
  localparam int unsigned DW = $clog2(DEAD + 2);

  logic [CW-1:0] c;
  logic [CW-1:0] tri_v;
  logic [15:0]   duty_sh [3];
  logic          pend;
  logic [2:0]    raw, raw_q;
  logic [DW-1:0] dcnt [3];

  assign tri_v = (c < CW'(PERIOD)) ? c : CW'(2 * PERIOD - 1) - c;
  assign period_start = enable && (c == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      c       <= '0;
      pend    <= 1'b0;
      for (int k = 0; k < 3; k++) begin
        duty_sh[k]  <= '0;
        duty_act[k] <= '0;
      end
    end else begin
      c <= (c == CW'(2 * PERIOD - 1)) ? '0 : c + 1'b1;
      if (load) begin
        pend    <= 1'b1;
        duty_sh <= duty_in;
      end
      if (c == CW'(2 * PERIOD - 1) && (pend || load)) begin
        duty_act <= load ? duty_in : duty_sh;
        pend     <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 3; k++)
      raw[k] = enable && (32'(tri_v) + 32'(duty_act[k]) >= 32'(PERIOD));
  end

  // dead band: count clocks since the last raw edge
  always_ff @(posedge clk) begin
    if (rst) begin
      raw_q <= '0;
      for (int k = 0; k < 3; k++) dcnt[k] <= '0;
      pwm_h <= '0;
      pwm_l <= '0;
    end else begin
      raw_q <= raw;
      for (int k = 0; k < 3; k++) begin
        if (raw[k] != raw_q[k])       dcnt[k] <= '0;
        else if (dcnt[k] != DW'(DEAD - 1)) dcnt[k] <= dcnt[k] + 1'b1;
        pwm_h[k] <= enable &&  raw_q[k] && (raw[k] == raw_q[k]) && (dcnt[k] == DW'(DEAD - 1));
        pwm_l[k] <= enable && !raw_q[k] && (raw[k] == raw_q[k]) && (dcnt[k] == DW'(DEAD - 1));
      end
    end
  end

  // never both switches of a leg on
  always_ff @(posedge clk) begin
    if (!rst) assert ((pwm_h & pwm_l) == 3'b000) else $error("pwm_3ph: shoot-through");
  end

endmodule
