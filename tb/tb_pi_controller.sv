// tb_pi_controller - drives the current-loop PI (default gains) with a sequence of
// errors and compares output, saturation flag and integrator behaviour with a
// floating-point model of the same law: integral += KI*TS*e unless the limited
// output saturates.  Also checks the two-clock latency and the clear input.
module tb_pi_controller;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, clear = 0, done, saturation;
  fx_t ref_in, fb_in, u;
  int checks = 0, failures = 0, n_sat = 0;

  pi_controller dut (.*);
  always #5 clk = ~clk;

  localparam real KP = 8.60, KI = 227.27, TS = 10.0e-6, LIM = 18.0;

  function automatic real rabs(real r); return r < 0 ? -r : r; endfunction
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real integ, e, ip, ur, ue;
    bit  se;
    ref_in = 0; fb_in = 0; integ = 0.0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      // slow ramps of error, with bursts that drive the output into the limit
      if (k < 1000)      e = 0.5;
      else if (k < 1200) e = 4.0;
      else if (k < 2000) e = -0.3;
      else               e = real'($urandom % 2001) / 500.0 - 2.0;
      ref_in = to_fx(1.0 + e); fb_in = to_fx(1.0);
      e = real'(ref_in - fb_in) / 65536.0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      chk(!done, "not done after one clock");
      @(negedge clk);
      chk(done, "done two clocks after start");
      ip = integ + KI * TS * e;
      ur = KP * e + ip;
      se = (ur > LIM) || (ur < -LIM);
      ue = se ? ((ur > 0) ? LIM : -LIM) : ur;
      if (!se) integ = ip;
      if (se) n_sat++;
      chk(saturation == se, $sformatf("k=%0d saturation %0d exp %0d (ur=%f)", k, saturation, se, ur));
      chk(rabs(real'(u) / 65536.0 - ue) < 2e-3, $sformatf("k=%0d u %f exp %f", k, real'(u) / 65536.0, ue));
    end
    chk(n_sat > 10, "saturation was exercised");
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    ref_in = to_fx(0.1); fb_in = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    @(negedge clk);
    e = real'(to_fx(0.1)) / 65536.0;
    chk(rabs(real'(u) / 65536.0 - (KP * e + KI * TS * e)) < 2e-3, "clear zeroes the integrator");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
