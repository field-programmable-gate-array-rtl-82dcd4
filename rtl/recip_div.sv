// recip_div - free-running reciprocal of the DC-link voltage for the SVPWM.
//
// Repeatedly computes R = floor(1.5 * 2^48 / udc_q) with a restoring divider
// (one quotient bit per clock, 50 clocks per result), where udc_q is the Q16.16
// DC-link voltage.  R is 3/(2*Udc) with 32 fraction bits, the scale factor that
// turns a voltage into a duty ratio.  udc is sampled at the start of each
// division and taken as at least 1.0 V, so R always fits in 34 bits.  Until the
// first division ends, 'valid' is low and R is 0.
//
// Timing: a new R every 51 clocks; a change of udc shows within about 102 clocks.
//
// The reference design only says that duties are scaled by 3/(2*Udc); computing
// it with a free-running divider is this design's choice.
module recip_div
  import foc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fx_t         udc,
  output logic [33:0] recip,
  output logic        valid
);
  localparam int NB = 50;                          // dividend bits: 3 * 2^47
  localparam logic [NB-1:0] DIVIDEND = {2'b11, 48'd0} >> 1;

  logic [31:0]   divisor;
  logic [31:0]   rem;
  logic [32:0]   quo;             // low quotient bits; the rest are zero
  logic [5:0]    bit_i;
  logic          busy;
  logic [32:0]   trial;

  assign trial = {rem, DIVIDEND[bit_i]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      divisor <= 32'h0001_0000; rem <= '0; quo <= '0; bit_i <= '0; busy <= 1'b0;
      recip <= '0; valid <= 1'b0;
    end else if (!busy) begin
      divisor <= (udc < FX_ONE) ? 32'(FX_ONE) : 32'(udc);
      rem     <= '0;
      quo     <= '0;
      bit_i   <= 6'(NB - 1);
      busy    <= 1'b1;
    end else begin
      if (trial >= {1'b0, divisor}) begin
        rem <= 32'(trial - {1'b0, divisor});
        quo <= {quo[31:0], 1'b1};
      end else begin
        rem <= trial[31:0];
        quo <= {quo[31:0], 1'b0};
      end
      if (bit_i == '0) begin
        busy  <= 1'b0;
        valid <= 1'b1;
        recip <= (trial >= {1'b0, divisor}) ? {quo[32:0], 1'b1} : {quo[32:0], 1'b0};
      end else begin
        bit_i <= bit_i - 1'b1;
      end
    end
  end
endmodule
