// duty_d012 - dwell-time ratios of the two active vectors and the zero vectors.
//
// In every sector the reference vector is built from one single-switch vector
// (V1, V3 or V5, ratio d1), one two-switch vector (V2, V4 or V6, ratio d2) and
// the zero vectors (d0):
//     [d1; d2] = 3/(2*Udc) * M_k * [U_alpha; U_beta],   d0 = 1 - d1 - d2
// With a = U_alpha and b = U_beta/sqrt(3), M_k * u becomes
//     sector 1: d1 ~  a - b,  d2 ~ 2b        sector 4: d1 ~ -2b,     d2 ~ -a + b
//     sector 2: d1 ~ -a + b,  d2 ~ a + b     sector 5: d1 ~ -a - b,  d2 ~  a - b
//     sector 3: d1 ~ 2b,      d2 ~ -a - b    sector 6: d1 ~  a + b,  d2 ~ -2b
// (derived from the hexagon geometry with the vector length 2/3*Udc).
// 3/(2*Udc) comes from recip_div, which runs continuously on the udc input.
// Over-modulation (d1 + d2 > 1) is this design's choice: the excess is taken
// half from each ratio, negatives are clamped to 0 and 'overmod' is raised.
//
// Timing: 'start' with valid u_alpha/u_beta/sector; 'done' two clocks later.
// Ratios are Q16.16 (1.0 = 65536) and hold until the next start.
module duty_d012
  import foc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  fx_t     u_alpha,
  input  fx_t     u_beta,
  input  sector_t sector,
  input  fx_t     udc,
  output fx_t     d0,
  output fx_t     d1,
  output fx_t     d2,
  output logic    overmod,
  output logic    done
);
  localparam fx_t K_1_SQ3 = to_fx(0.57735026918962576);

  logic [33:0] recip;

  // recip stays 0 until the first division ends, which gives zero duties
  recip_div u_recip (.clk, .rst_n, .udc, .recip, .valid());

  // ---- stage 1: sector matrix -------------------------------------------------
  fx_t  a, b, t1_n, t2_n, t1, t2;
  logic s1;

  always_comb begin
    a = u_alpha;
    b = fx_mul(u_beta, K_1_SQ3);
    unique case (sector)
      SEC_1:   begin t1_n = a - b;       t2_n = b <<< 1;     end
      SEC_2:   begin t1_n = b - a;       t2_n = a + b;       end
      SEC_3:   begin t1_n = b <<< 1;     t2_n = -(a + b);    end
      SEC_4:   begin t1_n = -(b <<< 1);  t2_n = b - a;       end
      SEC_5:   begin t1_n = -(a + b);    t2_n = a - b;       end
      SEC_6:   begin t1_n = a + b;       t2_n = -(b <<< 1);  end
      default: begin t1_n = '0;          t2_n = '0;          end
    endcase
  end

  // ---- stage 2: scale by 3/(2 Udc) and limit ------------------------------------
  function automatic fx_t scale_pos(input fx_t t, input logic [33:0] r);
    logic signed [71:0] p;
    p = (72'(t) * $signed({38'd0, r})) >>> 32;
    if (p < 0)            return '0;
    if (p > 72'(FX_MAX))  return FX_MAX;
    return fx_t'(p);
  endfunction

  fx_t  e1, e2, sum, excess, f1, f2;
  always_comb begin
    e1  = scale_pos(t1, recip);
    e2  = scale_pos(t2, recip);
    sum = fx_sat(64'(e1) + 64'(e2));
    excess = sum - FX_ONE;
    f1 = e1; f2 = e2;
    if (sum > FX_ONE) begin
      f1 = e1 - (excess >>> 1);
      f2 = e2 - (excess - (excess >>> 1));
      if (f1 < 0) begin f1 = '0; f2 = FX_ONE; end
      if (f2 < 0) begin f2 = '0; f1 = FX_ONE; end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1 <= '0; t2 <= '0; s1 <= 1'b0;
      d0 <= FX_ONE; d1 <= '0; d2 <= '0; overmod <= 1'b0; done <= 1'b0;
    end else begin
      s1   <= start;
      done <= s1;
      if (start) begin
        t1 <= t1_n;
        t2 <= t2_n;
      end
      if (s1) begin
        d1      <= f1;
        d2      <= f2;
        d0      <= FX_ONE - f1 - f2;
        overmod <= (sum > FX_ONE);
      end
    end
  end
endmodule
