// foc_controller: field-oriented control (FOC) of a permanent-magnet
// synchronous motor, producing six PWM signals for a three-phase inverter.
//
// Once per PWM period, at the triangle valley (period_start, also the ADC
// trigger), the measured phase currents and the rotor angle are taken and
// pushed through the current loop:
//   Clarke (abc -> alpha/beta)  with  sin/cos of the electrical angle
//   Park (-> d/q)
//   d-current PI (reference 0) and q-current PI (reference: the torque
//     request, or the speed PI output in speed mode)
//   inverse Park (vd, vq -> v_alpha, v_beta)
//   SVPWM (sector, three upper-switch duties)
// and the new duties are loaded into the PWM generator for the next period.
// Each stage is one registered clock, so the duties are ready 5 clocks after
// period_start, far inside the 2000-clock period. The encoder interface gives
// position and speed; the electrical angle is
// position*POLE_PAIRS + ANGLE_OFFSET (one mechanical turn = 65536 counts).
// The speed PI runs each time a new speed sample arrives (outer loop).
//
// The stage order, the PI loops with the flux (d) reference at zero, the
// 100 kHz switching, the 300 ns dead band, 0..1000 modulation range and the
// 16-bit position counter follow the document. Gains, limits, pole pairs,
// word lengths and the sampling instant are this design's choices.
module foc_controller
  import foc_pkg::*;
#(
  parameter int unsigned PERIOD       = 1000,
  parameter int unsigned DEAD         = 60,
  parameter int unsigned DUTY_MIN     = 20,
  parameter int unsigned DUTY_MAX     = 980,
  parameter int unsigned SPEED_WIN    = 20000,
  parameter int unsigned POLE_PAIRS   = 4,
  parameter logic [15:0] ANGLE_OFFSET = 16'h0000,
  parameter int signed   KP_I         = 2048,
  parameter int signed   KI_I         = 512,
  parameter int signed   KP_W         = 4096,
  parameter int signed   KI_W         = 256,
  parameter int signed   IQ_LIM       = 16384,   // torque-current limit, 0.5
  parameter int signed   V_LIM        = 18000    // |vd|,|vq| limit, ~0.55 Vdc
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        speed_mode,    // 1: speed loop, 0: torque (iq) command
  input  q15_t        torque_ref,    // iq reference in torque mode
  input  q15_t        speed_ref,     // counts per speed window, speed mode
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
  output logic [15:0] duty_applied [3],  // duties the PWM uses this period
  output logic [2:0]  pi_sat,        // output limit hit: {speed, q, d}
  output logic        dir_up,        // last encoder step direction
  output logic [7:0]  enc_err
);

  logic   ps, speed_valid;
  angle_t theta;
  logic   cl_v, sc_v, pk_v, pid_v, piq_v, ip_v, sv_v, pw_v;
  q15_t   i_al, i_be, s_t, c_t, d_i, q_i, va, vb;
  q15_t   iq_ref, iq_ref_w;
  logic   sat_d, sat_q, sat_w;

  qei #(.SPEED_WIN(SPEED_WIN)) u_qei (
    .clk, .rst, .enc_a, .enc_b, .enc_z, .position, .speed, .speed_valid,
    .dir_up, .err_cnt(enc_err));

  assign theta = 16'(position * 16'(POLE_PAIRS)) + ANGLE_OFFSET;
  assign adc_trigger = ps;

  clarke u_clarke (.clk, .rst, .in_valid(ps), .ia, .ib, .ic,
                   .out_valid(cl_v), .i_alpha(i_al), .i_beta(i_be));

  sincos u_sincos (.clk, .rst, .in_valid(ps), .theta,
                   .out_valid(sc_v), .sin_o(s_t), .cos_o(c_t));

  park u_park (.clk, .rst, .in_valid(cl_v && sc_v), .alpha(i_al), .beta(i_be),
               .sin_t(s_t), .cos_t(c_t), .out_valid(pk_v), .d(d_i), .q(q_i));

  assign id_meas = d_i;
  assign iq_meas = q_i;

  // outer speed loop
  pi_ctrl #(.KP(KP_W), .KI(KI_W), .OUT_LIM(IQ_LIM)) u_pi_w (
    .clk, .rst, .clear(!enable || !speed_mode), .in_valid(speed_valid),
    .ref_in(speed_ref), .fb(speed), .out_valid(pw_v), .out(iq_ref_w),
    .saturated(sat_w));

  assign iq_ref = speed_mode ? iq_ref_w : torque_ref;

  // inner current loops; the flux reference is zero
  pi_ctrl #(.KP(KP_I), .KI(KI_I), .OUT_LIM(V_LIM)) u_pi_d (
    .clk, .rst, .clear(!enable), .in_valid(pk_v), .ref_in('0), .fb(d_i),
    .out_valid(pid_v), .out(vd), .saturated(sat_d));

  pi_ctrl #(.KP(KP_I), .KI(KI_I), .OUT_LIM(V_LIM)) u_pi_q (
    .clk, .rst, .clear(!enable), .in_valid(pk_v), .ref_in(iq_ref), .fb(q_i),
    .out_valid(piq_v), .out(vq), .saturated(sat_q));

  // the sin/cos registers hold the sampled angle until the next period
  inv_park u_ipark (.clk, .rst, .in_valid(pid_v && piq_v), .d(vd), .q(vq),
                    .sin_t(s_t), .cos_t(c_t), .out_valid(ip_v), .alpha(va), .beta(vb));

  svpwm #(.PERIOD(PERIOD), .DUTY_MIN(DUTY_MIN), .DUTY_MAX(DUTY_MAX)) u_svpwm (
    .clk, .rst, .in_valid(ip_v), .v_alpha(va), .v_beta(vb),
    .out_valid(sv_v), .sector, .duty);

  assign duty_valid = sv_v;

  pwm_3ph #(.PERIOD(PERIOD), .DEAD(DEAD)) u_pwm (
    .clk, .rst, .enable, .load(sv_v), .duty_in(duty), .pwm_h, .pwm_l,
    .period_start(ps), .duty_act(duty_applied));

  assign pi_sat = {sat_w, sat_q, sat_d};

endmodule
