// convert_data - turns the two 12-bit unipolar ADC results into phase currents.
//
// The current sensors map a phase current I onto U = GAIN*I + OFFSET volts, and the
// ADC maps 0..FS volts onto codes 0..4095 (unipolar mode), so
//     I = (code * FS / 4095 - OFFSET) / GAIN          (Q16.16 amperes)
// With the default 0.01 V/A and 0.5 V this is 100*code/4095 - 50 A, i.e. +-50 A.
// Only phases a and b are measured; phase c is taken as -(Ia + Ib), which holds
// for a three-wire load (this design's choice).
//
// Interface: 'start' samples code_a/code_b; one clock later i_a/i_b/i_c are valid
// and 'done' pulses for one clock.  Outputs hold until the next start.
module convert_data
  import foc_pkg::*;
#(
  parameter real ADC_FS_V            = 1.0,
  parameter real SENSOR_GAIN_V_PER_A = 0.01,
  parameter real SENSOR_OFFSET_V     = 0.5,
  parameter int  ADC_MAX_CODE        = 4095
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [11:0] code_a,
  input  logic [11:0] code_b,
  output fx_t         i_a,
  output fx_t         i_b,
  output fx_t         i_c,
  output logic        done
);
  // Amperes per code with 24 fraction bits, and the offset current in Q16.16.
  localparam real   AMP_PER_CODE = ADC_FS_V / real'(ADC_MAX_CODE) / SENSOR_GAIN_V_PER_A;
  localparam int    K_CODE       = $rtoi(AMP_PER_CODE * 16777216.0 + 0.5);
  localparam fx_t   I_OFFSET     = to_fx(SENSOR_OFFSET_V / SENSOR_GAIN_V_PER_A);

  function automatic fx_t code_to_amp(input logic [11:0] code);
    logic signed [47:0] p;
    p = $signed({36'd0, code}) * 48'(K_CODE);
    return fx_t'(p >>> 8) - I_OFFSET;
  endfunction

  fx_t ia_n, ib_n;
  assign ia_n = code_to_amp(code_a);
  assign ib_n = code_to_amp(code_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_a <= '0; i_b <= '0; i_c <= '0; done <= 1'b0;
    end else begin
      done <= start;
      if (start) begin
        i_a <= ia_n;
        i_b <= ib_n;
        i_c <= -(ia_n + ib_n);
      end
    end
  end
endmodule
