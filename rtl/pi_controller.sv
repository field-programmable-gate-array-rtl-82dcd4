// pi_controller - discrete PI regulator with output limit and anti-windup.
//
// Per update ('start'):
//     e(k)  = ref - fb
//     I'(k) = I(k-1) + KI*TS*e(k)                 (forward-Euler integral)
//     u_raw = KP*e(k) + I'(k)
//     saturation = |u_raw| > LIMIT
//     u(k)  = u_raw clamped to +-LIMIT
//     I(k)  = saturation ? I(k-1) : I'(k)        (integration stops while saturated)
// The saturation flag and the limit follow the anti-windup scheme of a saturating
// PI; freezing (rather than clearing) the integral is this design's reading of it.
// Gains are real parameters converted at elaboration: KP to Q16.16, KI*TS to a
// 32-fraction-bit constant, and the integrator keeps 32 fraction bits so a small
// KI*TS (1e-4 for the speed loop) is not lost to rounding.
//
// Timing: two clocks from 'start' to 'done' (error register, then multiply/sum/
// clamp).  u and saturation hold between updates.  'clear' zeroes the integrator.
//
// The PI form, the limit and the saturation flag follow the reference design;
// the Ki*Ts integral increment and the integrator width are this design's
// choices.
module pi_controller
  import foc_pkg::*;
#(
  parameter real KP    = 8.60,
  parameter real KI    = 227.27,
  parameter real TS    = 10.0e-6,
  parameter real LIMIT = 18.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic start,
  input  fx_t  ref_in,
  input  fx_t  fb_in,
  output fx_t  u,
  output logic saturation,
  output logic done
);
  localparam fx_t    KP_Q   = to_fx(KP);
  localparam longint KITS_Q = longint'($rtoi(KI * TS * 4294967296.0 + 0.5));  // 2^-32 units
  localparam fx_t    LIM_Q  = to_fx(LIMIT);

  fx_t  err;
  logic s1;

  // Q32.32 integrator, 72-bit working width for the sums.
  logic signed [71:0] integ, i_new, p_term, u_raw, lim_hi;

  always_comb begin
    p_term = 72'(err) * 72'(KP_Q) ;              // Q.32
    i_new  = integ + ((72'(err) * 72'(KITS_Q)) >>> 16);  // Q.48 -> Q.32
    u_raw  = p_term + i_new;
    lim_hi = 72'(LIM_Q) <<< 16;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err <= '0; s1 <= 1'b0; integ <= '0;
      u <= '0; saturation <= 1'b0; done <= 1'b0;
    end else begin
      s1   <= start;
      done <= s1;
      if (start) err <= fx_sat(64'(ref_in) - 64'(fb_in));
      if (clear) begin
        integ <= '0;
      end else if (s1) begin
        if (u_raw > lim_hi) begin
          u <= LIM_Q;  saturation <= 1'b1;
        end else if (u_raw < -lim_hi) begin
          u <= -LIM_Q; saturation <= 1'b1;
        end else begin
          u <= fx_t'(u_raw >>> 16); saturation <= 1'b0;
          integ <= i_new;
        end
      end
    end
  end
endmodule
