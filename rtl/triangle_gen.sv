// triangle_gen - symmetric triangular PWM carrier.
//
// An up/down counter runs 0,1,...,PEAK-1,PEAK,PEAK-1,...,1,0,... with
// PEAK = CLK_HZ / (2*F_SW_HZ), so one carrier period is 2*PEAK clocks
// (1000 clocks = 100 kHz at 100 MHz).  'up' is high on the rising slope
// (carrier values 0..PEAK-1), 'valley' is high while the carrier is 0, 'peak'
// while it is PEAK, and 'period_end' on the last clock of a period (carrier 1 on
// the falling slope), one clock before the next valley.  All outputs are decoded
// from the counter registers.
module triangle_gen #(
  parameter int CLK_HZ  = 100_000_000,
  parameter int F_SW_HZ = 100_000,
  parameter int CW      = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [CW-1:0] carrier,
  output logic          up,
  output logic          valley,
  output logic          peak,
  output logic          period_end
);
  localparam int PEAK = CLK_HZ / (2 * F_SW_HZ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carrier <= '0;
      up      <= 1'b1;
    end else if (up) begin
      carrier <= carrier + 1'b1;
      if (int'(carrier) == PEAK - 1) up <= 1'b0;
    end else begin
      carrier <= carrier - 1'b1;
      if (int'(carrier) == 1) up <= 1'b1;
    end
  end

  assign valley = (carrier == '0);
  assign peak   = (int'(carrier) == PEAK);
  assign period_end = !up && (int'(carrier) == 1);
endmodule
