// park - stationary (alpha,beta) to rotating (d,q) transform.
//
//     I_d =  I_alpha*cos(theta) + I_beta*sin(theta)
//     I_q =  I_beta*cos(theta)  - I_alpha*sin(theta)
// sin/cos come from the angle table as Q16.16.  The two products of each output
// are summed at full width and rounded once.
//
// Interface: 'start' marks valid inputs; outputs register one clock later with a
// one-clock 'done' pulse.
//
// The equations follow the reference design, as does the table-based sin/cos;
// the format and latency are this design's choices.
module park
  import foc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  i_alpha,
  input  fx_t  i_beta,
  input  fx_t  sin_t,
  input  fx_t  cos_t,
  output fx_t  i_d,
  output fx_t  i_q,
  output logic done
);
  logic signed [63:0] acc_d, acc_q;
  always_comb begin
    acc_d = 64'(i_alpha) * 64'(cos_t) + 64'(i_beta) * 64'(sin_t);
    acc_q = 64'(i_beta)  * 64'(cos_t) - 64'(i_alpha) * 64'(sin_t);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_d <= '0; i_q <= '0; done <= 1'b0;
    end else begin
      done <= start;
      if (start) begin
        i_d <= fx_sat(acc_d >>> FX_FRAC);
        i_q <= fx_sat(acc_q >>> FX_FRAC);
      end
    end
  end
endmodule
