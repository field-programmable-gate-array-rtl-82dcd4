// clarke - three-phase (a,b,c) to stationary (alpha,beta) transform.
//
//     I_alpha = 2/3*Ia - 1/3*Ib - 1/3*Ic
//     I_beta  = (Ib - Ic) / sqrt(3)
// the amplitude-invariant Clarke transform.  Constants are Q16.16 and the products
// are summed at full width before one rounding shift.
//
// Interface: 'start' marks valid inputs; results are registered one clock later
// with a one-clock 'done' pulse.  Inputs and outputs are Q16.16.
//
// The equations follow the reference design; the fixed-point format and the
// one-clock latency are this design's choices.
module clarke
  import foc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  i_a,
  input  fx_t  i_b,
  input  fx_t  i_c,
  output fx_t  i_alpha,
  output fx_t  i_beta,
  output logic done
);
  localparam fx_t K_2_3   = to_fx(2.0 / 3.0);
  localparam fx_t K_1_3   = to_fx(1.0 / 3.0);
  localparam fx_t K_1_SQ3 = to_fx(0.57735026918962576);

  logic signed [63:0] acc_alpha, acc_beta;
  always_comb begin
    acc_alpha = 64'(i_a) * 64'(K_2_3) - 64'(i_b) * 64'(K_1_3) - 64'(i_c) * 64'(K_1_3);
    acc_beta  = (64'(i_b) - 64'(i_c)) * 64'(K_1_SQ3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_alpha <= '0; i_beta <= '0; done <= 1'b0;
    end else begin
      done <= start;
      if (start) begin
        i_alpha <= fx_sat(acc_alpha >>> FX_FRAC);
        i_beta  <= fx_sat(acc_beta  >>> FX_FRAC);
      end
    end
  end
endmodule
