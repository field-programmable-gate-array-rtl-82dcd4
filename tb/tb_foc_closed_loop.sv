// tb_foc_closed_loop - the controller driving an emulated inverter and PMSM.
//
// Plant (behavioural, in this bench): an average-value two-level inverter (the
// phase voltage of each period is on-time/period * Udc, from the measured gate
// signals) feeding a surface PMSM in the rotor frame:
//   L di_d/dt = u_d - R i_d + w_e L i_q
//   L di_q/dt = u_q - R i_q - w_e L i_d - w_e psi_f
//   J dw_m/dt = 1.5 p psi_f i_q - T_load,   w_e = p w_m
// with R = 0.5 ohm, L = 2.2 mH, J = 3.24e-3 kg m^2, p = 4, psi_f = 0.1861 Wb,
// Udc = 600 V, integrated with 1 us Euler steps.  The bench turns the rotor angle
// into quadrature pulses (1024 lines) and the phase currents into ADC codes
// (0.01 V/A + 0.5 V on a 0..1 V, 12-bit converter).
//
// Scenario (speed commands in electrical rad/s):
//   0-60 ms     280 rad/s, no load       -> speed must settle at 280
//   60-200 ms   280 rad/s, 15 Nm load    -> speed recovers; i_q carries the load;
//                                           phase-current frequency matches speed
//   200-500 ms  30 rad/s,  15 Nm load    -> speed must settle at 30
// The speed regulator's gains leave a slow closed-loop pole near 8 1/s, so the
// loaded speed error decays with a time constant of roughly 0.13 s.
// The current regulators' output limit is raised to 340 V (about Udc/sqrt(3)):
// the back-EMF alone at 280 rad/s is 52 V, above the default limit of 18.
module tb_foc_closed_loop;
  import foc_pkg::*;
  localparam real PI = 3.14159265358979324;
  localparam real R = 0.5, L = 0.0022, J = 3.24e-3, PP = 4.0, PSI = 0.1861, VDC = 600.0;

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

  foc_top #(.CUR_LIMIT(340.0)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  function automatic real rabs(real r); return r < 0 ? -r : r; endfunction
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int NPER = 50000;       // carrier periods simulated (500 ms)
  initial begin
    repeat (NPER * 1000 + 50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- plant state ----
  real id_m = 0, iq_m = 0, wm = 0, th_e = 0, th_m = 0, tload = 0;
  int  enc_target = 0, enc_now = 0;

  // quadrature output following the rotor, at most one edge per 16 clocks
  logic [1:0] seq [4] = '{2'b01, 2'b00, 2'b10, 2'b11};
  initial begin
    int ph, gap;
    ph = 1; gap = 0;
    {enc_a, enc_b} = seq[1];
    forever begin
      @(posedge clk);
      gap++;
      if (gap >= 16 && enc_now != enc_target) begin
        if (enc_target > enc_now) begin ph = (ph + 1) % 4; enc_now++; end
        else                      begin ph = (ph + 3) % 4; enc_now--; end
        {enc_a, enc_b} = seq[ph];
        gap = 0;
      end
    end
  end

  // ---- statistics windows ----
  real w_sum, iq_sum, w_min = 1.0e9;
  int  w_n, n_zc, n_spd_sat, zc_first, zc_last;
  bit  ia_pos;

  int acc [3];
  int per = 0;
  always @(negedge clk) if (rst_n) begin
    for (int ph = 0; ph < 3; ph++) if (pwm_top[ph]) acc[ph]++;
    if (pass_start) begin
      real va, vb, vc, valpha, vbeta, vd, vq, te, ia, ib, ialpha, ibeta;
      va = acc[0] / 1000.0 * VDC; vb = acc[1] / 1000.0 * VDC; vc = acc[2] / 1000.0 * VDC;
      valpha = (2.0 * va - vb - vc) / 3.0;
      vbeta  = (vb - vc) / $sqrt(3.0);
      acc = '{0, 0, 0};
      // 10 us of motor motion under this period's voltage
      for (int s = 0; s < 10; s++) begin
        real we, did, diq;
        vd =  valpha * $cos(th_e) + vbeta * $sin(th_e);
        vq = -valpha * $sin(th_e) + vbeta * $cos(th_e);
        we = PP * wm;
        did = (vd - R * id_m + we * L * iq_m) / L;
        diq = (vq - R * iq_m - we * L * id_m - we * PSI) / L;
        te  = 1.5 * PP * PSI * iq_m;
        id_m += did * 1.0e-6;
        iq_m += diq * 1.0e-6;
        wm   += (te - tload) / J * 1.0e-6;
        th_m += wm * 1.0e-6;
        th_e  = PP * th_m;
      end
      enc_target = int'($floor(th_m / (2.0 * PI) * 4096.0));
      // currents at the sampling instant -> ADC codes
      ialpha = id_m * $cos(th_e) - iq_m * $sin(th_e);
      ibeta  = id_m * $sin(th_e) + iq_m * $cos(th_e);
      ia = ialpha;
      ib = -0.5 * ialpha + $sqrt(3.0) / 2.0 * ibeta;
      adc_code_a = 12'($rtoi((0.01 * ia + 0.5) * 4095.0 + 0.5));
      adc_code_b = 12'($rtoi((0.01 * ib + 0.5) * 4095.0 + 0.5));
      // statistics
      w_sum += PP * wm; iq_sum += iq_m; w_n++;
      if (per >= 6000 && per < 20000 && PP * wm < w_min) w_min = PP * wm;
      // rising crossings of phase a, with 1 A hysteresis
      if (!ia_pos && ia > 1.0) begin
        ia_pos = 1;
        if (n_zc == 0) zc_first = per;
        zc_last = per; n_zc++;
      end else if (ia_pos && ia < -1.0) ia_pos = 0;
      per++;
    end
  end
  always @(posedge clk) if (rst_n && spd_sat && pass_done) n_spd_sat++;

  task automatic window_reset();
    w_sum = 0; iq_sum = 0; w_n = 0;
  endtask
  task automatic zc_reset();
    n_zc = 0; zc_first = 0; zc_last = 0;
  endtask

  task automatic run_until(input int period_no);
    while (per < period_no) @(posedge clk);
  endtask

  initial begin
    real w_avg, iq_avg, f_el, err_early;
    udc = to_fx(VDC);
    w_sum = 0; iq_sum = 0; w_n = 0; n_zc = 0; ia_pos = 0; n_spd_sat = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    #1 rst_n = 1;
    // ---- 280 rad/s, no load ----
    omega_ref = to_fx(280.0); tload = 0.0;
    run_until(4000);  window_reset();
    run_until(6000);
    w_avg = w_sum / w_n;
    $display("t=60ms  speed %f rad/s (el), i_q %f A", w_avg, iq_sum / w_n);
    chk(rabs(w_avg - 280.0) < 10.0, $sformatf("no-load speed %f, command 280", w_avg));
    chk(rabs(iq_sum / w_n) < 1.0, "no-load torque current near zero");
    chk(n_spd_sat > 0, "speed regulator limited during acceleration");
    // ---- 280 rad/s, 15 Nm load ----
    tload = 15.0;
    run_until(10000); window_reset();
    run_until(12000);
    err_early = rabs(w_sum / w_n - 280.0);
    window_reset(); zc_reset();
    run_until(18000); window_reset();
    run_until(20000);
    w_avg = w_sum / w_n; iq_avg = iq_sum / w_n;
    $display("lowest speed after the load step %f rad/s", w_min);
    f_el = (n_zc - 1) / ((zc_last - zc_first) * 10.0e-6);
    $display("t=200ms speed %f rad/s (el), electrical frequency %f Hz, i_q %f A (load needs %f A)",
             w_avg, f_el, iq_avg, 15.0 / (1.5 * PP * PSI));
    chk(rabs(w_avg - 280.0) < 25.0, $sformatf("loaded speed %f, command 280", w_avg));
    chk(rabs(w_avg - 280.0) < 0.6 * err_early, $sformatf("speed error not shrinking: %f then %f", err_early, rabs(w_avg - 280.0)));
    chk(rabs(f_el - w_avg / (2.0 * PI)) < 1.5, $sformatf("current frequency %f Hz, speed says %f Hz", f_el, w_avg / (2.0 * PI)));
    chk(rabs(iq_avg - 15.0 / (1.5 * PP * PSI)) < 1.5, $sformatf("torque current %f", iq_avg));
    // ---- 30 rad/s, 15 Nm load ----
    omega_ref = to_fx(30.0);
    run_until(48000); window_reset();
    run_until(50000);
    w_avg = w_sum / w_n; iq_avg = iq_sum / w_n;
    $display("t=500ms speed %f rad/s (el), i_q %f A", w_avg, iq_avg);
    chk(rabs(w_avg - 30.0) < 3.0, $sformatf("loaded speed %f, command 30", w_avg));
    chk(rabs(iq_avg - 15.0 / (1.5 * PP * PSI)) < 2.0, $sformatf("torque current %f", iq_avg));
    chk(!enc_illegal, "encoder emulation clean");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
