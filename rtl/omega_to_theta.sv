// omega_to_theta - electrical angle from electrical speed (forward-Euler integrator).
//
// Once per control period ('start') the angle advances by omega*TS:
//     acc += omega * TS * 2^32 / (2*pi)       (acc in units of 2^-48 turn)
// theta is the top 32 bits of the 48-bit accumulator, an unsigned fraction of one
// electrical turn that wraps at 2*pi.  'load' sets the angle to theta0 (the
// initial angle of the integrator) and has priority over 'start'.
// The integrator and its initial angle follow the control structure; the
// accumulator width and the Euler rule are this design's choices.
//
// Timing: theta and 'done' are registered one clock after 'start'.
module omega_to_theta
  import foc_pkg::*;
#(
  parameter real TS = 10.0e-6    // control period in seconds (100 kHz loop)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  angle_t theta0,
  input  logic   start,
  input  fx_t    omega,
  output angle_t theta,
  output logic   done
);
  // (omega (Q16.16) * K_INC) >> 16 = increment in 2^-48 turn.
  localparam longint K_INC = longint'($rtoi(TS * 281474976710656.0 / (2.0 * 3.14159265358979324) + 0.5));

  logic [47:0]        acc;
  logic signed [63:0] inc;
  assign inc   = (64'(omega) * 64'(K_INC)) >>> 16;
  assign theta = acc[47:16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      done <= 1'b0;
    end else begin
      done <= start & ~load;
      if (load)       acc <= {theta0, 16'd0};
      else if (start) acc <= acc + inc[47:0];
    end
  end
endmodule
