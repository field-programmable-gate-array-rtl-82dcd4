// tb_svpwm - the whole SVPWM unit with the default 100 MHz clock and 100 kHz
// carrier.  For random reference vectors it measures the on-time of each
// high-side gate over one carrier period and rebuilds the applied voltage
//   U_alpha = (2*da - db - dc)/3 * Udc,  U_beta = (db - dc)/sqrt(3) * Udc
// which must match the request within the PWM resolution (Udc/500).  Also
// checks the 4-clock latency, the carrier period, the complementary low side
// and that all six sectors occur.
module tb_svpwm;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, overmod, valley;
  fx_t u_alpha, u_beta, udc, da, db, dc;
  logic [2:0] pwm_top, pwm_bot;
  sector_t sector;
  int checks = 0, failures = 0;
  int seen [7];

  svpwm dut (.*);
  always #5 clk = ~clk;

  function automatic real rabs(real r); return r < 0 ? -r : r; endfunction
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real vdc;
    int  lat;
    vdc = 600.0; udc = to_fx(vdc); u_alpha = 0; u_beta = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (200) @(posedge clk);
    for (int n = 0; n < 120; n++) begin
      real deg, rad, m, ua, ub, ga, gb;
      int  on [3];
      int  per;
      deg = real'($urandom % 360000) / 1000.0;
      m   = real'($urandom % 1000) / 1000.0 * 0.57;
      rad = deg * 3.14159265358979324 / 180.0;
      ua = m * vdc * $cos(rad); ub = m * vdc * $sin(rad);
      @(posedge clk iff valley);
      @(negedge clk) begin u_alpha = to_fx(ua); u_beta = to_fx(ub); start = 1; end
      @(negedge clk) start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      chk(lat == 4, $sformatf("latency %0d clocks", lat));
      seen[int'(sector)]++;
      // next full carrier period, valley to valley
      @(posedge clk iff valley);
      @(posedge clk);
      on = '{0, 0, 0}; per = 0;
      // the valley that ends this period shows 1000 clocks after the one above
      for (int t = 0; t < 1000; t++) begin
        @(negedge clk);
        if (valley) begin per++; chk(t == 998, $sformatf("valley after %0d clocks", t + 2)); end
        for (int ph = 0; ph < 3; ph++) if (pwm_top[ph]) on[ph]++;
        chk(pwm_bot == ~pwm_top, "low side is the inverse of the high side");
      end
      chk(per == 1, "one valley per 1000 clocks");
      ga = (2.0 * on[0] - on[1] - on[2]) / 3.0 / 1000.0 * vdc;
      gb = (on[1] - on[2]) / $sqrt(3.0) / 1000.0 * vdc;
      chk(rabs(ga - ua) < 1.5, $sformatf("n%0d U_alpha %f exp %f", n, ga, ua));
      chk(rabs(gb - ub) < 1.5, $sformatf("n%0d U_beta %f exp %f", n, gb, ub));
    end
    for (int s = 1; s <= 6; s++) chk(seen[s] > 0, $sformatf("sector %0d seen", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
