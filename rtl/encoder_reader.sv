// encoder_reader - incremental (quadrature) encoder interface and speed measurement.
//
// 1. Each channel passes a two-flop synchroniser and a level filter that accepts
//    a new level only after FILTER_LEN consecutive equal samples, which removes
//    short noise spikes (filter type and length are this design's choice).
// 2. The previous and present filtered levels form the 4-bit combination
//    {a_prev, b_prev, a, b}.  Forward codes 0100, 0010, 1011, 1101 add one to the
//    edge count, backward codes 1000, 0001, 0111, 1110 subtract one; 0000-type codes
//    (no change) do nothing and double transitions (0011, 0110, 1001, 1100) are
//    flagged on 'illegal' and not counted.
// 3. A prescaler makes a 1 MHz tick from the clock; every WINDOW_TICKS ticks
//    (2000 Hz with the defaults) the edges x counted in the window give
//        omega_e = x * F_S * ZP / (4 * N_PPR) * 2*pi     [electrical rad/s]
//    by one constant multiply; the window count then restarts.
//
// Interface: enc_a/enc_b asynchronous inputs; position is the running signed edge
// count; omega_e (Q16.16) updates with a one-clock omega_valid pulse at the end of
// each window; dir is 1 when the last counted edge was backward.
module encoder_reader
  import foc_pkg::*;
#(
  parameter int  CLK_HZ       = 100_000_000,
  parameter int  CLK_PRESCALE = 100,   // clock -> 1 MHz tick
  parameter int  WINDOW_TICKS = 500,   // 1 MHz / 500 = 2000 Hz speed sampling
  parameter int  ZP           = 4,     // pole pairs
  parameter int  N_PPR        = 1024,  // encoder pulses per revolution
  parameter int  FILTER_LEN   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enc_a,
  input  logic        enc_b,
  output logic signed [31:0] position,
  output fx_t         omega_e,
  output logic        omega_valid,
  output logic        dir,
  output logic        illegal
);
  localparam real F_S     = real'(CLK_HZ) / real'(CLK_PRESCALE) / real'(WINDOW_TICKS);
  localparam fx_t K_SPEED = to_fx(F_S * real'(ZP) / (4.0 * real'(N_PPR)) * 2.0 * 3.14159265358979324);
  localparam int  FW      = (FILTER_LEN > 1) ? $clog2(FILTER_LEN) : 1;
  localparam int  PW      = $clog2(CLK_PRESCALE);
  localparam int  WW      = $clog2(WINDOW_TICKS);

  // ---- synchroniser and level filter --------------------------------------
  logic [1:0]    sync1, sync2, filt, prev;
  logic [FW-1:0] fcnt [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0; sync2 <= '0; filt <= '0; prev <= '0;
      fcnt[0] <= '0; fcnt[1] <= '0;
    end else begin
      sync1 <= {enc_a, enc_b};
      sync2 <= sync1;
      prev  <= filt;
      for (int ch = 0; ch < 2; ch++) begin
        if (sync2[ch] == filt[ch]) begin
          fcnt[ch] <= '0;
        end else if (int'(fcnt[ch]) >= FILTER_LEN - 1) begin
          filt[ch] <= sync2[ch];
          fcnt[ch] <= '0;
        end else begin
          fcnt[ch] <= fcnt[ch] + 1'b1;
        end
      end
    end
  end

  // ---- direction decode -----------------------------------------------------
  logic [3:0] combo;
  logic       fwd, bwd, dbl;
  assign combo = {prev, filt};       // {a_prev, b_prev, a, b}
  always_comb begin
    fwd = 1'b0; bwd = 1'b0; dbl = 1'b0;
    unique case (combo)
      4'b0100, 4'b0010, 4'b1011, 4'b1101: fwd = 1'b1;
      4'b1000, 4'b0001, 4'b0111, 4'b1110: bwd = 1'b1;
      4'b0011, 4'b0110, 4'b1001, 4'b1100: dbl = 1'b1;
      default: ;                     // no change
    endcase
  end

  // ---- window timing and speed -----------------------------------------------
  logic [PW-1:0]       pre_cnt;
  logic [WW-1:0]       win_cnt;
  logic                tick, win_end;
  logic signed [31:0]  x;
  logic signed [31:0]  x_next;

  assign tick    = (int'(pre_cnt) == CLK_PRESCALE - 1);
  assign win_end = tick && (int'(win_cnt) == WINDOW_TICKS - 1);
  assign x_next  = x + (fwd ? 32'sd1 : 32'sd0) - (bwd ? 32'sd1 : 32'sd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_cnt <= '0; win_cnt <= '0; x <= '0; position <= '0;
      omega_e <= '0; omega_valid <= 1'b0; dir <= 1'b0; illegal <= 1'b0;
    end else begin
      illegal     <= dbl;
      omega_valid <= win_end;
      pre_cnt     <= tick ? '0 : pre_cnt + 1'b1;
      if (tick) win_cnt <= win_end ? '0 : win_cnt + 1'b1;
      if (fwd) begin position <= position + 1; dir <= 1'b0; end
      if (bwd) begin position <= position - 1; dir <= 1'b1; end
      if (win_end) begin
        omega_e <= fx_sat(64'(x_next) * 64'(K_SPEED));
        x       <= '0;
      end else begin
        x <= x_next;
      end
    end
  end
endmodule
