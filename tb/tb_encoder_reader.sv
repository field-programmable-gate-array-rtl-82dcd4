// tb_encoder_reader - quadrature pulses at known rates, forward then backward,
// with noise spikes and one illegal double transition.  Checks the position
// count, direction, illegal flag, glitch rejection, the 2000 Hz speed-sample
// rate (50000 clocks at 100 MHz) and the speed value of
// omega = x * 2000 * 4 / (4 * 1024) * 2*pi worked out here in floating point.
module tb_encoder_reader;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, enc_a = 0, enc_b = 0;
  logic signed [31:0] position;
  fx_t  omega_e;
  logic omega_valid, dir, illegal;
  int checks = 0, failures = 0, n_illegal = 0, n_valid = 0;
  longint cyc = 0, last_valid = -1;

  encoder_reader dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Speed samples: rate check, and value check against the current edge rate.
  int exp_x = 0;
  always @(posedge clk) if (rst_n && omega_valid) begin
    n_valid++;
    if (last_valid >= 0) chk(cyc - last_valid == 50000, $sformatf("speed sample spacing %0d", cyc - last_valid));
    last_valid = cyc;
    if (exp_x != 9999) begin
      real w;
      w = real'(exp_x) * 2000.0 * 4.0 / (4.0 * 1024.0) * 2.0 * 3.14159265358979324;
      chk((real'(omega_e) / 65536.0 - w) < 1e-3 && (w - real'(omega_e) / 65536.0) < 1e-3,
          $sformatf("omega %f exp %f", real'(omega_e) / 65536.0, w));
    end
  end
  always @(posedge clk) if (rst_n && illegal) n_illegal++;

  // Forward sequence of (a,b): 01 -> 00 -> 10 -> 11 -> 01 ...
  logic [1:0] fwd_seq [4] = '{2'b01, 2'b00, 2'b10, 2'b11};
  int ph = 1;                       // start idle at (0,0)

  task automatic step(input bit forward, input int hold);
    ph = forward ? (ph + 1) % 4 : (ph + 3) % 4;
    {enc_a, enc_b} = fwd_seq[ph];
    repeat (hold) @(posedge clk);
  endtask

  initial begin
    int p0;
    {enc_a, enc_b} = fwd_seq[1];
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (20) @(posedge clk);
    exp_x = 9999;                     // first window is partial
    // 100 forward edges, 2000 clocks apart -> exactly 25 per window after the first
    for (int k = 0; k < 100; k++) step(1, 2000);
    chk(position == 100, $sformatf("position after 100 forward edges = %0d", position));
    chk(dir == 1'b0, "direction forward");
    // a 2-clock spike on channel a must not count
    p0 = position;
    enc_a = ~enc_a; repeat (2) @(posedge clk); enc_a = ~enc_a; repeat (50) @(posedge clk);
    chk(position == p0, "2-clock spike rejected");
    // steady forward rate: wait for a window boundary, then check whole windows
    @(posedge clk iff omega_valid);
    @(posedge clk);
    exp_x = 25;
    repeat (100) step(1, 2000);
    exp_x = 9999;
    // backward, 40 per window
    repeat (30) step(0, 1250);
    @(posedge clk iff omega_valid);
    @(posedge clk);
    exp_x = -40;
    repeat (80) step(0, 1250);
    exp_x = 9999;
    chk(dir == 1'b1, "direction backward");
    p0 = position;
    // double transition: both channels change at once -> flagged, not counted
    {enc_a, enc_b} = ~{enc_a, enc_b};
    repeat (50) @(posedge clk);
    chk(n_illegal == 1, $sformatf("illegal transitions flagged %0d", n_illegal));
    chk(position == p0, "illegal transition not counted");
    chk(n_valid >= 8, "speed samples seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
