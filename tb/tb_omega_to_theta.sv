// tb_omega_to_theta - loads an initial angle, integrates several speeds
// (forward and backward) and compares the angle with theta0 + sum(omega*Ts)
// worked out in floating point, modulo one turn.
module tb_omega_to_theta;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, load = 0, done;
  angle_t theta0, theta;
  fx_t omega;
  int checks = 0, failures = 0;

  omega_to_theta dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real turns;           // expected angle in turns (unbounded)
    real w;
    omega = 0; theta0 = 32'h2000_0000;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    chk(theta == 32'h2000_0000, "theta0 loaded");
    turns = 0.125;
    for (int seg = 0; seg < 6; seg++) begin
      w = (seg == 0) ? 280.0 : (seg == 1) ? 30.0 : (seg == 2) ? -150.0 : real'($urandom % 4000) / 4.0 - 500.0;
      omega = to_fx(w);
      for (int k = 0; k < 500; k++) begin
        real exp_t, got_t, diff;
        @(negedge clk) start = 1;
        @(negedge clk) start = 0;
        chk(done, "done one clock after start");
        turns = turns + (real'(omega) / 65536.0) * 10.0e-6 / (2.0 * 3.14159265358979324);
        exp_t = turns - $floor(turns);
        got_t = real'(theta) / 4294967296.0;
        diff  = got_t - exp_t;
        if (diff > 0.5) diff -= 1.0;
        if (diff < -0.5) diff += 1.0;
        chk(diff < 1e-6 && diff > -1e-6, $sformatf("seg %0d step %0d theta %f exp %f", seg, k, got_t, exp_t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
