// pwm_compare - carrier comparison and complementary gate outputs.
//
// Each phase duty (Q16.16, 0..1) is turned into a compare level
// c = round(duty * PEAK), clamped to 0..PEAK.  New levels wait in a shadow
// register ('load') and are copied to the active set on the last clock of a
// carrier period ('period_end'), so every period, valley to valley, uses one
// consistent set.  The high-side
// gate is on while carrier < c on the rising slope and while carrier <= c on the
// falling slope, which gives exactly 2*c on-clocks in a 2*PEAK-clock period,
// centred on the valley.  The low-side gate is the inverse of the high-side gate
// (no dead time is inserted).  Shadow loading is this design's choice.
//
// Bit order of pwm_top / pwm_bot: [0] = phase a, [1] = b, [2] = c.  Registered
// outputs, one clock after the carrier value they follow.
module pwm_compare
  import foc_pkg::*;
#(
  parameter int PEAK = 500,
  parameter int CW   = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  fx_t           da,
  input  fx_t           db,
  input  fx_t           dc,
  input  logic [CW-1:0] carrier,
  input  logic          up,
  input  logic          period_end,
  output logic [2:0]    pwm_top,
  output logic [2:0]    pwm_bot
);
  function automatic logic [CW-1:0] level_of(input fx_t d);
    logic signed [63:0] p;
    p = (64'(d) * 64'(PEAK) + 64'sd32768) >>> FX_FRAC;
    if (p < 0)           return '0;
    if (p > 64'(PEAK))   return CW'(PEAK);
    return CW'(p);
  endfunction

  logic [CW-1:0] shadow [3];
  logic [CW-1:0] active [3];
  logic [2:0]    on;

  always_comb begin
    for (int ph = 0; ph < 3; ph++)
      on[ph] = up ? (carrier < active[ph]) : (carrier <= active[ph]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int ph = 0; ph < 3; ph++) begin
        shadow[ph] <= '0;
        active[ph] <= '0;
      end
      pwm_top <= '0;
      pwm_bot <= '1;
    end else begin
      if (load) begin
        shadow[0] <= level_of(da);
        shadow[1] <= level_of(db);
        shadow[2] <= level_of(dc);
      end
      if (period_end) begin
        for (int ph = 0; ph < 3; ph++) active[ph] <= shadow[ph];
      end
      pwm_top <= on;
      pwm_bot <= ~on;
    end
  end
endmodule
