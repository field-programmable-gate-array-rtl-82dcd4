// sector_detect - which 60-degree sector of the space-vector hexagon holds the
// reference voltage (U_alpha, U_beta).
//
// Sector k spans angles (k-1)*60 .. k*60 degrees, sector 1 starting on the alpha
// axis and counting anticlockwise.  No angle is computed: with s = sqrt(3)*U_alpha
//   U_beta >= 0:  U_beta < s -> 1,  else U_beta < -s -> 3,  else 2
//   U_beta <  0:  U_beta > s -> 4,  else U_beta > -s -> 6,  else 5
// (the lines U_beta = +-sqrt(3)*U_alpha are the 60/120-degree boundaries).
//
// Interface: 'start' marks a valid vector; 'sector' and 'done' register one clock
// later; 'sector' holds until the next start.
module sector_detect
  import foc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  fx_t     u_alpha,
  input  fx_t     u_beta,
  output sector_t sector,
  output logic    done
);
  localparam fx_t K_SQ3 = to_fx(1.7320508075688772);

  logic signed [63:0] s, b;
  sector_t            sec_n;

  always_comb begin
    s = (64'(u_alpha) * 64'(K_SQ3)) >>> FX_FRAC;
    b = 64'(u_beta);
    if (b >= 0) begin
      if (b < s)       sec_n = SEC_1;
      else if (b < -s) sec_n = SEC_3;
      else             sec_n = SEC_2;
    end else begin
      if (b > s)       sec_n = SEC_4;
      else if (b > -s) sec_n = SEC_6;
      else             sec_n = SEC_5;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sector <= SEC_NONE; done <= 1'b0;
    end else begin
      done <= start;
      if (start) sector <= sec_n;
    end
  end
endmodule
