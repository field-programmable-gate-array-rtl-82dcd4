// svpwm - space-vector PWM unit for a two-level three-phase inverter.
//
// Five parts, wired as a chain of start/done pulses:
//   sector_detect -> duty_d012 -> duty_abc -> pwm_compare
//                                 triangle_gen --^
// A new (U_alpha, U_beta) request ('start') yields the sector one clock later,
// d0/d1/d2 two clocks after that and the leg duties da/db/dc one more clock
// later (4 clocks, 'done').  The duties are handed to the comparator's shadow
// register and take effect at the next carrier valley.  The carrier runs on its
// own at F_SW_HZ, independent of the request rate.
//
// Inputs stay valid from 'start' until 'done' (the upstream stage holds them).
// Outputs: pwm_top/pwm_bot bit 0 = phase a, 1 = b, 2 = c; pwm_bot = ~pwm_top.
module svpwm
  import foc_pkg::*;
#(
  parameter int CLK_HZ  = 100_000_000,
  parameter int F_SW_HZ = 100_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  fx_t        u_alpha,
  input  fx_t        u_beta,
  input  fx_t        udc,
  output logic [2:0] pwm_top,
  output logic [2:0] pwm_bot,
  output sector_t    sector,
  output fx_t        da,
  output fx_t        db,
  output fx_t        dc,
  output logic       overmod,
  output logic       valley,
  output logic       done
);
  localparam int PEAK = CLK_HZ / (2 * F_SW_HZ);
  localparam int CW   = $clog2(PEAK + 1);

  logic          sec_done, d_done;
  fx_t           d0, d1, d2;
  logic [CW-1:0] carrier;
  logic          up, peak, period_end;

  sector_detect u_sector (.clk, .rst_n, .start, .u_alpha, .u_beta, .sector, .done(sec_done));

  duty_d012 u_d012 (.clk, .rst_n, .start(sec_done), .u_alpha, .u_beta, .sector, .udc,
                    .d0, .d1, .d2, .overmod, .done(d_done));

  duty_abc u_dabc (.clk, .rst_n, .start(d_done), .sector, .d0, .d1, .d2,
                   .da, .db, .dc, .done);

  triangle_gen #(.CLK_HZ(CLK_HZ), .F_SW_HZ(F_SW_HZ), .CW(CW)) u_tri (
    .clk, .rst_n, .carrier, .up, .valley, .peak, .period_end);

  pwm_compare #(.PEAK(PEAK), .CW(CW)) u_cmp (
    .clk, .rst_n, .load(done), .da, .db, .dc, .carrier, .up, .period_end,
    .pwm_top, .pwm_bot);
endmodule
