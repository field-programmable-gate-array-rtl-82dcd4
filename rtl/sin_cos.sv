// sin_cos - sine and cosine of an electrical angle by table look-up.
//
// A quarter-wave table of 2^ADDR_BITS 16-bit samples holds
//     T[i] = round(32768 * sin((i + 0.5) * pi / 2^(ADDR_BITS+1)))   (max 32767)
// (file rtl/sin_quarter.hex, one hex word per line).  The top two angle bits pick
// the quadrant, the next ADDR_BITS bits the entry; quadrants 1 and 3 read the
// table mirrored, quadrants 2 and 3 negate it.  cos(theta) is read as
// sin(theta + quarter turn) through a second read port of the same table, so
// one block RAM serves both.  Resolution is 2*pi / 2^(ADDR_BITS+2).
//
// Interface: 'start' samples theta; one clock later sin_t/cos_t (Q16.16) are
// valid with a one-clock 'done' pulse.  Outputs hold until the next start.
//
// Table look-up follows the reference design; the table size, quarter-wave
// folding and sample offset are this design's choices.
module sin_cos
  import foc_pkg::*;
#(
  parameter int ADDR_BITS = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  angle_t theta,
  output fx_t    sin_t,
  output fx_t    cos_t,
  output logic   done
);
  localparam int N = 1 << ADDR_BITS;

  logic [15:0] rom [N];
  initial $readmemh("rtl/sin_quarter.hex", rom);

  angle_t theta_c;
  assign theta_c = theta + 32'h4000_0000;

  function automatic logic [ADDR_BITS-1:0] addr_of(input angle_t t);
    logic [ADDR_BITS-1:0] i;
    i = t[29 -: ADDR_BITS];
    return t[30] ? ~i : i;            // mirror in quadrants 1 and 3
  endfunction

  logic [15:0] s_raw, c_raw;
  logic        s_neg, c_neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_raw <= '0; c_raw <= 16'h7FFF;  // angle 0 until the first request
      s_neg <= 1'b0; c_neg <= 1'b0; done <= 1'b0;
    end else begin
      done <= start;
      if (start) begin
        s_raw <= rom[addr_of(theta)];
        c_raw <= rom[addr_of(theta_c)];
        s_neg <= theta[31];
        c_neg <= theta_c[31];
      end
    end
  end

  // Q1.15 table sample -> Q16.16, with the quadrant sign.
  assign sin_t = s_neg ? -fx_t'({s_raw, 1'b0}) : fx_t'({s_raw, 1'b0});
  assign cos_t = c_neg ? -fx_t'({c_raw, 1'b0}) : fx_t'({c_raw, 1'b0});
endmodule
