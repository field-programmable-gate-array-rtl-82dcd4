// control_timer - control-period timer and speed-loop divider.
//
// 'start' pulses once every CLK_HZ/F_CTRL_HZ clocks (100 kHz: every 1000 clocks),
// on the clock after reset and then periodically; it launches one pass of the
// current-control chain.  Every SPEED_DIV-th start also raises 'speed_en'
// (20 kHz with the defaults) so the speed regulator runs at a lower rate.  The
// counter leaves reset together with the PWM carrier, so 'start' coincides with
// the carrier valley, the centre of the zero-vector interval.
//
// The 100 kHz control rate and the 20 kHz speed-loop divider follow the reference
// design's timing; aligning 'start' with the carrier valley is this design's choice.
module control_timer #(
  parameter int CLK_HZ    = 100_000_000,
  parameter int F_CTRL_HZ = 100_000,
  parameter int SPEED_DIV = 5
) (
  input  logic clk,
  input  logic rst_n,
  output logic start,
  output logic speed_en
);
  localparam int PERIOD = CLK_HZ / F_CTRL_HZ;
  localparam int PW     = $clog2(PERIOD);
  localparam int DW     = (SPEED_DIV > 1) ? $clog2(SPEED_DIV) : 1;

  logic [PW-1:0] cnt;
  logic [DW-1:0] div;

  assign start    = (cnt == '0);
  assign speed_en = start && (div == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      div <= '0;
    end else begin
      cnt <= (int'(cnt) == PERIOD - 1) ? '0 : cnt + 1'b1;
      if (start) div <= (int'(div) == SPEED_DIV - 1) ? '0 : div + 1'b1;
    end
  end
endmodule
