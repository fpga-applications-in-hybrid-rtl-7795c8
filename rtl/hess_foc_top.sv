// hess_foc_top: the two FPGA controllers of this design, side by side.
//
// 1. fuzzy_controller: global-level fuzzy power manager of a stand-alone PV
//    system with a battery / ultracapacitor hybrid energy store. From the
//    bus-voltage error, the power demand Pload - Ppv, the battery SOC and the
//    UC voltage (8-bit codes from the A/D converters) it produces the power
//    references Pbat and Pcap for the two bidirectional DC/DC converters.
// 2. foc_controller: field-oriented current/speed control of a PMSM with
//    100 kHz centre-aligned SVPWM, complementary outputs with dead band, and
//    quadrature-encoder position/speed feedback.
//
// The two share nothing but clock and reset; the converters, inverter,
// motor, A/D converters and resolver-to-digital converter are outside the
// FPGA and connect to the ports below. Port timing is that of the two
// blocks. Treating the two controllers as separate applications on one
// device follows the document; the common clock and reset are this design's
// choice.
module hess_foc_top
  import fuzzy_pkg::*;
  import foc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // fuzzy power manager
  input  logic        fz_in_valid,
  output logic        fz_in_ready,
  input  crisp_t      fz_in,
  output logic        fz_out_valid,
  output grade_t      pbat_ref,
  output grade_t      pcap_ref,
  output logic        pbat_idle,
  output logic        pcap_idle,
  output logic [NRULES-1:0] fz_fired,
  // FOC motor controller
  input  logic        foc_enable,
  input  logic        speed_mode,
  input  q15_t        torque_ref,
  input  q15_t        speed_ref,
  input  logic        enc_a,
  input  logic        enc_b,
  input  logic        enc_z,
  input  q15_t        ia,
  input  q15_t        ib,
  input  q15_t        ic,
  output logic        adc_trigger,
  output logic [2:0]  pwm_h,
  output logic [2:0]  pwm_l,
  output logic [15:0] position,
  output logic signed [15:0] speed,
  output q15_t        id_meas,
  output q15_t        iq_meas,
  output q15_t        vd,
  output q15_t        vq,
  output logic [2:0]  sector,
  output logic [15:0] duty [3],
  output logic        duty_valid,
  output logic [15:0] duty_applied [3],
  output logic [2:0]  pi_sat,
  output logic        dir_up,
  output logic [7:0]  enc_err
);

  fuzzy_controller u_fuzzy (
    .clk, .rst, .in_valid(fz_in_valid), .in_ready(fz_in_ready), .in_x(fz_in),
    .out_valid(fz_out_valid), .pbat(pbat_ref), .pcap(pcap_ref),
    .pbat_idle, .pcap_idle, .fired(fz_fired));

  foc_controller u_foc (
    .clk, .rst, .enable(foc_enable), .speed_mode, .torque_ref, .speed_ref,
    .enc_a, .enc_b, .enc_z, .ia, .ib, .ic, .adc_trigger, .pwm_h, .pwm_l,
    .position, .speed, .id_meas, .iq_meas, .vd, .vq, .sector, .duty,
    .duty_valid, .duty_applied, .pi_sat, .dir_up, .enc_err);

endmodule
