// inv_park - rotating (d,q) to stationary (alpha,beta) transform of the voltage
// command produced by the current controllers.
//
//     U_alpha = U_d*cos(theta) - U_q*sin(theta)
//     U_beta  = U_d*sin(theta) + U_q*cos(theta)
//
// Interface: 'start' marks valid inputs; outputs register one clock later with a
// one-clock 'done' pulse.  All values Q16.16.
//
// The equations follow the reference design; the format and latency are this
// design's choices.
module inv_park
  import foc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  u_d,
  input  fx_t  u_q,
  input  fx_t  sin_t,
  input  fx_t  cos_t,
  output fx_t  u_alpha,
  output fx_t  u_beta,
  output logic done
);
  logic signed [63:0] acc_a, acc_b;
  always_comb begin
    acc_a = 64'(u_d) * 64'(cos_t) - 64'(u_q) * 64'(sin_t);
    acc_b = 64'(u_d) * 64'(sin_t) + 64'(u_q) * 64'(cos_t);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_alpha <= '0; u_beta <= '0; done <= 1'b0;
    end else begin
      done <= start;
      if (start) begin
        u_alpha <= fx_sat(acc_a >>> FX_FRAC);
        u_beta  <= fx_sat(acc_b >>> FX_FRAC);
      end
    end
  end
endmodule
