// foc_pkg - shared number format and helpers for the field-oriented motor controller.
//
// Every physical quantity (current in A, voltage in V, speed in rad/s, duty ratio
// where 1.0 means 100 %) travels as a signed 32-bit fixed-point value with 16
// fraction bits (Q16.16).  Angles travel as an unsigned 32-bit fraction of one
// electrical turn (2^32 = 2*pi), so they wrap for free.  The number format is a
// choice of this design; the controller equations it serves come from the
// classic FOC / SVPWM formulation.
//
// Helpers:
//   to_fx(r)      real constant -> Q16.16 (rounded), for parameter conversion only
//   fx_mul(a,b)   Q16.16 * Q16.16 -> Q16.16 with saturation
//   fx_sat(v)     64-bit Q16.16 value -> 32-bit, saturated
//   fx_clamp(v,l) clamp v to [-l, +l]
package foc_pkg;

  localparam int FX_W    = 32;
  localparam int FX_FRAC = 16;

  typedef logic signed [FX_W-1:0] fx_t;
  typedef logic        [31:0]     angle_t;

  localparam fx_t FX_ONE = fx_t'(1 << FX_FRAC);
  localparam fx_t FX_MAX = 32'sh7FFF_FFFF;
  localparam fx_t FX_MIN = 32'sh8000_0000;

  // Sector of the space-vector hexagon (1..6), 0 means "not yet known".
  typedef enum logic [2:0] {
    SEC_NONE = 3'd0, SEC_1 = 3'd1, SEC_2 = 3'd2, SEC_3 = 3'd3,
    SEC_4 = 3'd4, SEC_5 = 3'd5, SEC_6 = 3'd6
  } sector_t;

  function automatic fx_t to_fx(input real r);
    real s;
    s = r * 65536.0;
    return (s >= 0.0) ? fx_t'($rtoi(s + 0.5)) : -fx_t'($rtoi(-s + 0.5));
  endfunction

  function automatic fx_t fx_sat(input logic signed [63:0] v);
    if (v > 64'sh0000_0000_7FFF_FFFF) return FX_MAX;
    if (v < -64'sh0000_0000_8000_0000) return FX_MIN;
    return fx_t'(v);
  endfunction

  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return fx_sat(p >>> FX_FRAC);
  endfunction

  function automatic fx_t fx_clamp(input fx_t v, input fx_t lim);
    if (v > lim)  return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

endpackage
