// tb_control_timer - start every 1000 clocks (100 kHz), speed_en on every 5th
// start only (20 kHz).
module tb_control_timer;
  logic clk = 0, rst_n = 0, start, speed_en;
  int checks = 0, failures = 0;

  control_timer dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int last_s, last_e, n_s, n_e;
    last_s = -1; last_e = -1; n_s = 0; n_e = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 30000; t++) begin
      @(negedge clk);
      if (speed_en) chk(start, "speed_en only with start");
      if (start) begin
        if (last_s >= 0) chk(t - last_s == 1000, $sformatf("start spacing %0d", t - last_s));
        last_s = t; n_s++;
      end
      if (speed_en) begin
        if (last_e >= 0) chk(t - last_e == 5000, $sformatf("speed_en spacing %0d", t - last_e));
        last_e = t; n_e++;
      end
    end
    chk(n_s == 30, $sformatf("starts %0d", n_s));
    chk(n_e == 6, $sformatf("speed enables %0d", n_e));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
