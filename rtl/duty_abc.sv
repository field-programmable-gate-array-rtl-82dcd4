// duty_abc - high-side duty ratio of each inverter leg from d0, d1, d2.
//
// Centred (symmetric) space-vector PWM: every leg is on for half the zero-vector
// time plus the active vectors in which it is switched high:
//   sector   da               db               dc
//     1      d0/2+d1+d2       d0/2+d2          d0/2
//     2      d0/2+d2          d0/2+d1+d2       d0/2
//     3      d0/2             d0/2+d1+d2       d0/2+d2
//     4      d0/2             d0/2+d2          d0/2+d1+d2
//     5      d0/2+d2          d0/2             d0/2+d1+d2
//     6      d0/2+d1+d2       d0/2             d0/2+d2
// (d1 belongs to the single-switch vector, d2 to the two-switch vector.)
//
// Timing: 'start' with valid inputs; da/db/dc (Q16.16) and 'done' one clock later.
//
// The table follows the reference design's leg-duty table cell by cell.
module duty_abc
  import foc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  sector_t sector,
  input  fx_t     d0,
  input  fx_t     d1,
  input  fx_t     d2,
  output fx_t     da,
  output fx_t     db,
  output fx_t     dc,
  output logic    done
);
  fx_t h, hi, mid, a_n, b_n, c_n;
  always_comb begin
    h   = d0 >>> 1;
    hi  = h + d1 + d2;
    mid = h + d2;
    unique case (sector)
      SEC_1:   begin a_n = hi;  b_n = mid; c_n = h;   end
      SEC_2:   begin a_n = mid; b_n = hi;  c_n = h;   end
      SEC_3:   begin a_n = h;   b_n = hi;  c_n = mid; end
      SEC_4:   begin a_n = h;   b_n = mid; c_n = hi;  end
      SEC_5:   begin a_n = mid; b_n = h;   c_n = hi;  end
      SEC_6:   begin a_n = hi;  b_n = h;   c_n = mid; end
      default: begin a_n = h;   b_n = h;   c_n = h;   end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      da <= '0; db <= '0; dc <= '0; done <= 1'b0;
    end else begin
      done <= start;
      if (start) begin
        da <= a_n; db <= b_n; dc <= c_n;
      end
    end
  end
endmodule
