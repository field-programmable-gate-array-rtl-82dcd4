// foc_top - field-oriented speed and current controller for a PMSM drive.
//
// One control pass runs every 10 us (100 kHz, the switching frequency), started
// by control_timer at the PWM carrier valley.  The pass is a chain of
// registered stages, each started by the previous stage's 'done':
//
//   clk  0  start: latch the two ADC results            (convert_data)
//        1  Ia, Ib, Ic                                  -> clarke
//        2  I_alpha, I_beta                             -> park (sin/cos of the
//                                                          previous pass)
//        3  I_d, I_q; angle += omega*Ts                 (omega_to_theta)
//        4  new angle -> sin_cos; speed PI starts on every SPEED_DIV-th pass
//        6  I_q* ready -> d and q current PIs (I_d* = 0)
//        8  U_d, U_q -> inv_park (new sin/cos)
//        9  U_alpha, U_beta -> svpwm (sector, d0..d2, da..dc)
//       13  leg duties in the PWM shadow register; used from the next valley
//
// Speed comes from encoder_reader (electrical rad/s, updated at 2 kHz); the
// angle is its integral plus the initial angle theta0 (loaded by theta0_load).
// The ADC itself is outside this module: adc_code_a/b are its latest results
// for phases a and b.  Quantities are Q16.16 SI units (A, V, rad/s); angles are
// 32-bit fractions of an electrical turn.  Gains and limits default to the
// speed loop KP 0.26, KI 2.01, +-22 A and the current loops KP 8.60, KI 227.27,
// +-18 V.
//
// The loop structure, the stage order (including the previous-pass sin/cos for
// Park), the rates and the default gains follow the reference design; the clock-
// by-clock schedule, the number formats and the status outputs are this design's
// choices.
module foc_top
  import foc_pkg::*;
#(
  parameter int  CLK_HZ       = 100_000_000,
  parameter int  F_SW_HZ      = 100_000,
  parameter int  SPEED_DIV    = 5,
  parameter real SPD_KP       = 0.26,
  parameter real SPD_KI       = 2.01,
  parameter real SPD_LIMIT    = 22.0,
  parameter real CUR_KP       = 8.60,
  parameter real CUR_KI       = 227.27,
  parameter real CUR_LIMIT    = 18.0,
  parameter int  ENC_PRESCALE = 100,
  parameter int  ENC_WINDOW   = 500,
  parameter int  POLE_PAIRS   = 4,
  parameter int  ENC_PPR      = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] adc_code_a,
  input  logic [11:0] adc_code_b,
  input  logic        enc_a,
  input  logic        enc_b,
  input  fx_t         omega_ref,
  input  angle_t      theta0,
  input  logic        theta0_load,
  input  fx_t         udc,
  output logic [2:0]  pwm_top,
  output logic [2:0]  pwm_bot,
  // status
  output fx_t         omega_meas,
  output logic        omega_valid,
  output angle_t      theta,
  output fx_t         i_d,
  output fx_t         i_q,
  output fx_t         i_q_ref,
  output fx_t         u_d,
  output fx_t         u_q,
  output sector_t     sector,
  output logic        spd_sat,
  output logic        id_sat,
  output logic        iq_sat,
  output logic        overmod,
  output logic signed [31:0] enc_position,
  output logic        enc_backward,
  output logic        enc_illegal,
  output logic        pass_start,
  output logic        pass_done
);
  localparam real TS_CUR = 1.0 / real'(F_SW_HZ);
  localparam real TS_SPD = real'(SPEED_DIV) / real'(F_SW_HZ);

  logic speed_en, spd_pending;
  logic conv_done, clk_done, park_done, th_done;
  logic cur_start, cur_start_d, id_done, iq_done, ip_done;
  fx_t  i_a, i_b, i_c, i_al, i_be, sin_t, cos_t, u_al, u_be;

  control_timer #(.CLK_HZ(CLK_HZ), .F_CTRL_HZ(F_SW_HZ), .SPEED_DIV(SPEED_DIV)) u_timer (
    .clk, .rst_n, .start(pass_start), .speed_en);

  encoder_reader #(.CLK_HZ(CLK_HZ), .CLK_PRESCALE(ENC_PRESCALE), .WINDOW_TICKS(ENC_WINDOW),
                   .ZP(POLE_PAIRS), .N_PPR(ENC_PPR)) u_enc (
    .clk, .rst_n, .enc_a, .enc_b, .position(enc_position), .omega_e(omega_meas), .omega_valid,
    .dir(enc_backward), .illegal(enc_illegal));

  convert_data u_conv (.clk, .rst_n, .start(pass_start), .code_a(adc_code_a), .code_b(adc_code_b),
                       .i_a, .i_b, .i_c, .done(conv_done));

  clarke u_clarke (.clk, .rst_n, .start(conv_done), .i_a, .i_b, .i_c,
                   .i_alpha(i_al), .i_beta(i_be), .done(clk_done));

  park u_park (.clk, .rst_n, .start(clk_done), .i_alpha(i_al), .i_beta(i_be), .sin_t, .cos_t,
               .i_d, .i_q, .done(park_done));

  omega_to_theta #(.TS(TS_CUR)) u_theta (.clk, .rst_n, .load(theta0_load), .theta0,
                   .start(park_done), .omega(omega_meas), .theta, .done(th_done));

  sin_cos u_sincos (.clk, .rst_n, .start(th_done), .theta, .sin_t, .cos_t, .done());

  // The speed loop runs on the passes flagged by speed_en.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spd_pending <= 1'b0; cur_start <= 1'b0; cur_start_d <= 1'b0;
    end else begin
      if (pass_start)   spd_pending <= speed_en;
      else if (th_done) spd_pending <= 1'b0;
      cur_start   <= th_done;
      cur_start_d <= cur_start;
    end
  end

  pi_controller #(.KP(SPD_KP), .KI(SPD_KI), .TS(TS_SPD), .LIMIT(SPD_LIMIT)) u_pi_spd (
    .clk, .rst_n, .clear(1'b0), .start(th_done & spd_pending), .ref_in(omega_ref),
    .fb_in(omega_meas), .u(i_q_ref), .saturation(spd_sat), .done());

  pi_controller #(.KP(CUR_KP), .KI(CUR_KI), .TS(TS_CUR), .LIMIT(CUR_LIMIT)) u_pi_d (
    .clk, .rst_n, .clear(1'b0), .start(cur_start_d), .ref_in('0), .fb_in(i_d),
    .u(u_d), .saturation(id_sat), .done(id_done));

  pi_controller #(.KP(CUR_KP), .KI(CUR_KI), .TS(TS_CUR), .LIMIT(CUR_LIMIT)) u_pi_q (
    .clk, .rst_n, .clear(1'b0), .start(cur_start_d), .ref_in(i_q_ref), .fb_in(i_q),
    .u(u_q), .saturation(iq_sat), .done(iq_done));

  inv_park u_ipark (.clk, .rst_n, .start(id_done & iq_done), .u_d, .u_q, .sin_t, .cos_t,
                    .u_alpha(u_al), .u_beta(u_be), .done(ip_done));

  svpwm #(.CLK_HZ(CLK_HZ), .F_SW_HZ(F_SW_HZ)) u_svpwm (
    .clk, .rst_n, .start(ip_done), .u_alpha(u_al), .u_beta(u_be), .udc,
    .pwm_top, .pwm_bot, .sector, .da(), .db(), .dc(), .overmod, .valley(), .done(pass_done));
endmodule
