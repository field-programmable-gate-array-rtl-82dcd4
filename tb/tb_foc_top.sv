// tb_foc_top - end-to-end run of the whole controller at its default parameters
// (100 MHz clock, 100 kHz control and PWM, 2 kHz encoder speed sampling).
//
// The bench plays the motor side open loop: it emits quadrature encoder pulses
// at chosen speeds and, before every control pass, ADC codes for phase currents
// with chosen d/q values at the angle the controller will use.  It checks:
//   * I_d/I_q against the chosen values (ADC + Clarke + Park + angle table),
//   * I_q* and U_d/U_q against a floating-point model of the three PI
//     regulators with their saturation and anti-windup, fed with the DUT's own
//     feedback values,
//   * the voltage rebuilt from the measured gate on-times of each carrier
//     period against the inverse Park of U_d/U_q (inverse Park + SVPWM),
//   * the pass latency (13 clocks, within 22 clocks = 224 ns) and 1000-clock
//     carrier period, the speed measurement and the angle integration.
// Every mechanism is counted and must occur: speed and current limiting,
// speed-loop updates, speed samples, forward and backward rotation, all six
// sectors, over-modulation (with a reduced DC link) and initial-angle loads.
module tb_foc_top;
  import foc_pkg::*;
  localparam real PI = 3.14159265358979324;

  logic clk = 0, rst_n = 0;
  logic [11:0] adc_code_a = 12'd2048, adc_code_b = 12'd2048;
  logic enc_a = 0, enc_b = 0;
  fx_t omega_ref = 0, udc;
  angle_t theta0 = 0;
  logic theta0_load = 0;
  logic [2:0] pwm_top, pwm_bot;
  fx_t omega_meas, i_d, i_q, i_q_ref, u_d, u_q;
  logic omega_valid, spd_sat, id_sat, iq_sat, overmod, pass_start, pass_done;
  logic signed [31:0] enc_position;
  logic enc_backward, enc_illegal;
  angle_t theta;
  sector_t sector;

  foc_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  function automatic real fx2r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic real rabs(real r); return r < 0 ? -r : r; endfunction
  function automatic real th2r(angle_t t); return real'(t) / 4294967296.0 * 2.0 * PI; endfunction
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  localparam int NPASS = 560;
  initial begin
    repeat (NPASS * 1000 + 20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- encoder emulation ----------------
  real enc_w = 0.0;            // electrical rad/s to emulate
  int  enc_ph = 1;             // start at (a,b) = (0,0)
  logic [1:0] seq [4] = '{2'b01, 2'b00, 2'b10, 2'b11};
  int  n_fwd = 0, n_bwd = 0;
  initial begin
    {enc_a, enc_b} = seq[1];
    forever begin
      if (enc_w == 0.0) @(posedge clk);
      else begin
        // edges per second = w * 4 * 1024 / (2*pi*4)
        int gap;
        gap = int'(100.0e6 / (rabs(enc_w) * 4096.0 / (8.0 * PI)));
        repeat (gap) @(posedge clk);
        if (enc_w > 0) begin enc_ph = (enc_ph + 1) % 4; n_fwd++; end
        else           begin enc_ph = (enc_ph + 3) % 4; n_bwd++; end
        {enc_a, enc_b} = seq[enc_ph];
      end
    end
  end

  // ---------------- per-period gate on-time monitor ----------------
  real exp_ua [NPASS + 4];
  real exp_ub [NPASS + 4];
  bit  exp_ok [NPASS + 4];
  int  acc [3];
  int  vidx = 1, n_pwm_checked = 0;   // pass index of the valley being seen
  real vdc_now = 600.0;
  int  last_valley_cyc = -1;
  int  cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n) begin
    for (int ph = 0; ph < 3; ph++) if (pwm_top[ph]) acc[ph]++;
    chk(pwm_bot == ~pwm_top, "complementary gates");
    if (pass_start) begin          // the control pass starts at the carrier valley
      if (last_valley_cyc >= 0) chk(cyc - last_valley_cyc == 1000, "carrier period 1000 clocks");
      last_valley_cyc = cyc;
      // the period ending here started at the previous valley and used the
      // duties computed by the pass before that
      if (vidx >= 2 && exp_ok[vidx - 2]) begin
        real ga, gb;
        ga = (2.0 * acc[0] - acc[1] - acc[2]) / 3.0 / 1000.0 * vdc_now;
        gb = (acc[1] - acc[2]) / $sqrt(3.0) / 1000.0 * vdc_now;
        chk(rabs(ga - exp_ua[vidx - 2]) < 1.5 && rabs(gb - exp_ub[vidx - 2]) < 1.5,
            $sformatf("period %0d applied (%f,%f) exp (%f,%f)", vidx, ga, gb, exp_ua[vidx - 2], exp_ub[vidx - 2]));
        n_pwm_checked++;
      end
      acc = '{0, 0, 0};
      vidx++;
    end
  end

  // ---------------- control-pass driver and checker ----------------
  int n_spd_sat = 0, n_cur_sat = 0, n_cur_lin = 0, n_spd_upd = 0, n_omega = 0, n_over = 0, n_load = 0;
  int seen [7];
  always @(posedge clk) if (rst_n && omega_valid) n_omega++;

  initial begin
    real id_set, iq_set, integ_s, integ_d, integ_q, w_ref;
    real th_prev, ia, ib, ialpha, ibeta;
    int  k, t0, lat;
    integ_s = 0; integ_d = 0; integ_q = 0;
    udc = to_fx(600.0);
    repeat (3) @(posedge clk);
    @(negedge clk);
    #1 rst_n = 1;                    // pass 0 starts on the next clock edge
    for (k = 0; k < NPASS; k++) begin
      // ---- scenario for this pass ----
      if (k < 150)      begin w_ref = 280.0; enc_w = 100.0; id_set = 0.5; iq_set = 5.0; end
      else if (k < 300) begin w_ref = 30.0;  enc_w = 30.0;  id_set = 0.1; iq_set = fx2r(i_q_ref) - 0.2; end
      else if (k < 450) begin w_ref = -50.0; enc_w = -50.0; id_set = -0.2; iq_set = fx2r(i_q_ref) + 0.3; end
      else              begin w_ref = -50.0; enc_w = -50.0; id_set = -0.2; iq_set = fx2r(i_q_ref) - 5.0; end
      if (k == 450) begin udc = to_fx(20.0); end
      omega_ref = to_fx(w_ref);
      // Park uses the sine/cosine of the previous pass, i.e. of the angle now
      th_prev = th2r(theta);
      // sweep the angle through all sectors by reloading the initial angle
      if (k >= 300 && k % 20 == 0) begin
        @(negedge clk) begin theta0 = angle_t'((k / 20) % 6) * 32'd715827883 + 32'h1555_5555; theta0_load = 1; end
        @(negedge clk) theta0_load = 0;
        n_load++;
        chk(theta == theta0, "initial angle loaded");
      end
      // ---- ADC codes for the chosen currents at the angle used by Park ----
      ialpha = id_set * $cos(th_prev) - iq_set * $sin(th_prev);
      ibeta  = id_set * $sin(th_prev) + iq_set * $cos(th_prev);
      ia = ialpha;
      ib = -0.5 * ialpha + $sqrt(3.0) / 2.0 * ibeta;
      adc_code_a = 12'($rtoi((0.01 * ia + 0.5) * 4095.0 + 0.5));
      adc_code_b = 12'($rtoi((0.01 * ib + 0.5) * 4095.0 + 0.5));
      // ---- one pass ----
      @(posedge clk iff pass_start);
      t0 = cyc;
      @(posedge clk iff pass_done);
      lat = cyc - t0;
      @(negedge clk);
      chk(lat == 13, $sformatf("pass latency %0d clocks", lat));
      chk(lat <= 22, "pass within 224 ns");
      if (k > 0) begin
        chk(rabs(fx2r(i_d) - id_set) < 0.06, $sformatf("k%0d I_d %f exp %f", k, fx2r(i_d), id_set));
        chk(rabs(fx2r(i_q) - iq_set) < 0.06, $sformatf("k%0d I_q %f exp %f", k, fx2r(i_q), iq_set));
      end
      // speed PI model (runs on every 5th pass)
      if (k % 5 == 0) begin
        real e, ip, ur, ue;
        bit  se;
        e  = fx2r(omega_ref - omega_meas);
        ip = integ_s + 2.01 * 50.0e-6 * e;
        ur = 0.26 * e + ip;
        se = rabs(ur) > 22.0;
        ue = se ? (ur > 0 ? 22.0 : -22.0) : ur;
        if (!se) integ_s = ip;
        chk(spd_sat == se, $sformatf("k%0d speed saturation %0d exp %0d", k, spd_sat, se));
        chk(rabs(fx2r(i_q_ref) - ue) < 2e-3, $sformatf("k%0d I_q* %f exp %f", k, fx2r(i_q_ref), ue));
        n_spd_upd++;
        if (spd_sat) n_spd_sat++;
      end
      // current PI models
      begin
        real e, ip, ur, ue;
        bit  se;
        e  = fx2r(0 - i_d);
        ip = integ_d + 227.27 * 10.0e-6 * e;
        ur = 8.60 * e + ip;
        se = rabs(ur) > 18.0;
        ue = se ? (ur > 0 ? 18.0 : -18.0) : ur;
        if (!se) integ_d = ip;
        chk(id_sat == se && rabs(fx2r(u_d) - ue) < 2e-3, $sformatf("k%0d U_d %f exp %f", k, fx2r(u_d), ue));
        e  = fx2r(i_q_ref - i_q);
        ip = integ_q + 227.27 * 10.0e-6 * e;
        ur = 8.60 * e + ip;
        se = rabs(ur) > 18.0;
        ue = se ? (ur > 0 ? 18.0 : -18.0) : ur;
        if (!se) integ_q = ip;
        chk(iq_sat == se && rabs(fx2r(u_q) - ue) < 2e-3, $sformatf("k%0d U_q %f exp %f", k, fx2r(u_q), ue));
        if (id_sat || iq_sat) n_cur_sat++; else n_cur_lin++;
      end
      // expected applied voltage (inverse Park with the new angle)
      begin
        real th;
        th = th2r(theta);
        exp_ua[k] = fx2r(u_d) * $cos(th) - fx2r(u_q) * $sin(th);
        exp_ub[k] = fx2r(u_d) * $sin(th) + fx2r(u_q) * $cos(th);
        exp_ok[k] = (k >= 1) && (k < 440) && !overmod;  // pass 0 runs before the first 3/(2Udc) exists
        // applied angle moved by omega*Ts this pass (unless just reloaded)
        if (k >= 300 && k % 20 == 0) th_prev = th2r(theta0);
        if (k > 0) begin
          real d;
          d = th - th_prev - fx2r(omega_meas) * 10.0e-6;
          d = d - 2.0 * PI * $floor(d / (2.0 * PI) + 0.5);
          chk(rabs(d) < 1e-4, $sformatf("k%0d angle step error %f", k, d));
        end
      end
      seen[int'(sector)]++;
      if (overmod) n_over++;
      chk(!enc_illegal, "no illegal encoder transition");
      if (k == 149) chk(enc_position == n_fwd, $sformatf("encoder position %0d exp %0d", enc_position, n_fwd));
      if (k == 200) chk(!enc_backward, "encoder reports forward rotation");
      if (k == 400) chk(enc_backward, "encoder reports backward rotation");
      // 30 rad/s gives 2.44 edges per 0.5 ms window: 2 or 3 counts of 12.27 rad/s
      if (k >= 200 && k < 300)
        chk(rabs(fx2r(omega_meas) - 24.5437) < 1e-3 || rabs(fx2r(omega_meas) - 36.8155) < 1e-3,
            $sformatf("k%0d measured speed %f", k, fx2r(omega_meas)));
      if (k == 449) begin
        // DC link drops: later periods use it; the monitor scales by the new value
        vdc_now = 20.0;
      end
    end
    chk(n_pwm_checked > 300, $sformatf("PWM periods checked %0d", n_pwm_checked));
    chk(n_spd_sat > 0, "speed regulator limited at least once");
    chk(n_spd_upd > 0 && n_spd_upd == (NPASS + 4) / 5, $sformatf("speed-loop updates %0d", n_spd_upd));
    chk(n_cur_sat > 0, "current regulator limited at least once");
    chk(n_cur_lin > 0, "current regulator linear at least once");
    chk(n_omega >= 10, $sformatf("speed samples %0d", n_omega));
    chk(n_fwd > 0 && n_bwd > 0, "forward and backward rotation");
    chk(n_over > 0, $sformatf("over-modulation passes %0d", n_over));
    chk(n_load > 0, "initial-angle loads");
    for (int s = 1; s <= 6; s++) chk(seen[s] > 0, $sformatf("sector %0d used", s));
    $display("mechanisms: speed-limit %0d  current-limit %0d  current-linear %0d  speed-updates %0d  speed-samples %0d  fwd-edges %0d  bwd-edges %0d  overmod %0d  angle-loads %0d  sectors %0d/%0d/%0d/%0d/%0d/%0d",
             n_spd_sat, n_cur_sat, n_cur_lin, n_spd_upd, n_omega, n_fwd, n_bwd, n_over, n_load,
             seen[1], seen[2], seen[3], seen[4], seen[5], seen[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
