// tb_sector_detect - random voltage vectors (angles kept away from the exact
// boundaries by 0.05 degree) and exact axis cases; expected sector =
// floor(angle / 60 degrees) + 1 from atan2 in floating point.
module tb_sector_detect;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  fx_t u_alpha, u_beta;
  sector_t sector;
  int checks = 0, failures = 0;
  int seen [7];

  sector_detect dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    u_alpha = 0; u_beta = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      real deg, mag, rad;
      int  exp_s;
      if (n < 6) deg = real'(n) * 60.0 + 30.0;
      else begin
        deg = real'($urandom % 360000) / 1000.0;
        if ((deg - 60.0 * $floor(deg / 60.0)) < 0.05) deg += 0.1;
        if ((deg - 60.0 * $floor(deg / 60.0)) > 59.95) deg -= 0.1;
      end
      mag = 1.0 + real'($urandom % 40000) / 100.0;
      rad = deg * 3.14159265358979324 / 180.0;
      exp_s = int'($floor(deg / 60.0)) + 1;
      @(negedge clk) begin u_alpha = to_fx(mag * $cos(rad)); u_beta = to_fx(mag * $sin(rad)); start = 1; end
      @(negedge clk) start = 0;
      chk(done, "done one clock after start");
      chk(int'(sector) == exp_s, $sformatf("angle %f sector %0d exp %0d", deg, sector, exp_s));
      seen[int'(sector)]++;
    end
    // on the positive alpha axis: sector 1; on the negative alpha axis: sector 3
    @(negedge clk) begin u_alpha = to_fx(10.0); u_beta = 0; start = 1; end
    @(negedge clk) start = 0;
    chk(sector == SEC_1, "0 degrees -> sector 1");
    @(negedge clk) begin u_alpha = to_fx(-10.0); u_beta = 0; start = 1; end
    @(negedge clk) start = 0;
    chk(sector == SEC_3, "180 degrees -> sector 3");
    for (int s = 1; s <= 6; s++) chk(seen[s] > 100, $sformatf("sector %0d visited", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
