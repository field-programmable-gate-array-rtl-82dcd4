// tb_pwm_compare - feeds random duties through the comparator with the real
// carrier and counts on-clocks per carrier period: expected 2*round(d*500),
// bottom = inverse of top, and new duties used only from the next valley.
module tb_pwm_compare;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  fx_t da, db, dc;
  logic [15:0] carrier;
  logic up, valley, peak, period_end;
  logic [2:0] pwm_top, pwm_bot;
  int checks = 0, failures = 0;

  triangle_gen u_tri (.clk, .rst_n, .carrier, .up, .valley, .peak, .period_end);
  pwm_compare dut (.clk, .rst_n, .load, .da, .db, .dc, .carrier, .up, .period_end, .pwm_top, .pwm_bot);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int on [3];
    int expv [3];
    fx_t d [3];
    da = 0; db = 0; dc = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 60; p++) begin
      for (int ph = 0; ph < 3; ph++) begin
        d[ph] = (p == 0) ? FX_ONE : (p == 1) ? 0 : fx_t'($urandom % 65537);
        if (p > 2 && ph == 2) d[ph] = -fx_t'($urandom % 1000);     // below zero -> clamped
        expv[ph] = (d[ph] <= 0) ? 0 : 2 * ((int'(d[ph]) * 500 + 32768) >>> 16);
      end
      // load in the middle of a period: must not affect the running period
      @(posedge clk iff peak);
      @(negedge clk) begin da = d[0]; db = d[1]; dc = d[2]; load = 1; end
      @(negedge clk) load = 0;
      // measure the next full period, valley to valley (outputs lag one clock)
      @(posedge clk iff valley);
      @(posedge clk);
      on = '{0, 0, 0};
      for (int t = 0; t < 1000; t++) begin
        @(negedge clk);
        for (int ph = 0; ph < 3; ph++) begin
          if (pwm_top[ph]) on[ph]++;
        end
        chk(pwm_bot == ~pwm_top, "bottom is inverse of top");
      end
      for (int ph = 0; ph < 3; ph++)
        chk(on[ph] == expv[ph], $sformatf("period %0d phase %0d on %0d exp %0d", p, ph, on[ph], expv[ph]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
