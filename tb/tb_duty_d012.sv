// tb_duty_d012 - random voltage vectors inside and beyond the hexagon.  The
// expected ratios are solved here from the geometry (vector length 2/3*Udc,
// d1 on V1/V3/V5, d2 on V2/V4/V6) with a 2x2 inverse in floating point;
// d0 = 1 - d1 - d2.  Over-modulated vectors must give d0 = 0 and the flag.
// Also checks a change of Udc and the two-clock latency.
module tb_duty_d012;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, overmod;
  fx_t u_alpha, u_beta, udc, d0, d1, d2;
  sector_t sector;
  int checks = 0, failures = 0, n_over = 0;

  duty_d012 dut (.*);
  always #5 clk = ~clk;

  function automatic real rabs(real r); return r < 0 ? -r : r; endfunction
  function automatic real fx2r(fx_t v); return real'(v) / 65536.0; endfunction
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real vdc;
    u_alpha = 0; u_beta = 0; sector = SEC_NONE;
    vdc = 600.0; udc = to_fx(vdc);
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (120) @(posedge clk);        // first reciprocal
    for (int n = 0; n < 3000; n++) begin
      real deg, rad, m, ua, ub, ps, pd, det, e1, e2, ex, sum;
      int  s;
      if (n == 1500) begin vdc = 48.0; udc = to_fx(vdc); repeat (120) @(posedge clk); end
      deg = real'($urandom % 360000) / 1000.0;
      s   = int'($floor(deg / 60.0)) + 1;
      m   = (n % 10 == 9) ? 0.7 + real'($urandom % 1000) / 2000.0   // up to 1.2 of Udc/sqrt3 ... beyond
                          : real'($urandom % 1000) / 1000.0 * 0.577;
      rad = deg * 3.14159265358979324 / 180.0;
      ua  = m * vdc * $cos(rad);
      ub  = m * vdc * $sin(rad);
      // single-switch vector angle and two-switch vector angle of sector s
      ps = (s == 1 || s == 6) ? 0.0 : (s == 2 || s == 3) ? 120.0 : 240.0;
      pd = (s == 1 || s == 2) ? 60.0 : (s == 3 || s == 4) ? 180.0 : 300.0;
      ps = ps * 3.14159265358979324 / 180.0; pd = pd * 3.14159265358979324 / 180.0;
      det = $cos(ps) * $sin(pd) - $cos(pd) * $sin(ps);
      e1 = 1.5 / vdc * ( $sin(pd) * ua - $cos(pd) * ub) / det;
      e2 = 1.5 / vdc * (-$sin(ps) * ua + $cos(ps) * ub) / det;
      sum = e1 + e2;
      if (sum > 1.0) begin
        ex = sum - 1.0; e1 -= ex / 2.0; e2 -= ex / 2.0;
        if (e1 < 0) begin e1 = 0; e2 = 1; end
        if (e2 < 0) begin e2 = 0; e1 = 1; end
      end
      @(negedge clk) begin u_alpha = to_fx(ua); u_beta = to_fx(ub); sector = sector_t'(s); start = 1; end
      @(negedge clk) start = 0;
      chk(!done, "not done after one clock");
      @(negedge clk);
      chk(done, "done after two clocks");
      chk(overmod == (sum > 1.0), $sformatf("overmod flag sum %f", sum));
      if (sum > 1.0) n_over++;
      chk(rabs(fx2r(d1) - e1) < 1e-3, $sformatf("n%0d s%0d d1 %f exp %f", n, s, fx2r(d1), e1));
      chk(rabs(fx2r(d2) - e2) < 1e-3, $sformatf("n%0d s%0d d2 %f exp %f", n, s, fx2r(d2), e2));
      chk(d0 + d1 + d2 == FX_ONE, "d0 + d1 + d2 = 1");
      chk(d0 >= 0, "d0 not negative");
    end
    chk(n_over > 50, "over-modulation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
