// tb_triangle_gen - checks the carrier shape: +-1 steps, peak 500, period 1000
// clocks (100 kHz at 100 MHz), and the valley/peak/period_end/up decodes.
module tb_triangle_gen;
  logic clk = 0, rst_n = 0, up, valley, peak, period_end;
  logic [15:0] carrier;
  int checks = 0, failures = 0;

  triangle_gen dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int prev, last_valley, maxv, n_periods;
    logic prev_up;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    prev = carrier; prev_up = up; last_valley = -1; maxv = 0; n_periods = 0;
    for (int t = 1; t < 20000; t++) begin
      @(negedge clk);
      chk(carrier == prev + 1 || carrier == prev - 1, "carrier moves by one");
      chk(prev_up == (carrier > prev), "up flag announces the next step");
      chk(valley == (carrier == 0), "valley decode");
      chk(peak == (carrier == 500), "peak decode");
      chk(period_end == (!up && carrier == 1), "period_end decode");
      if (carrier > maxv) maxv = carrier;
      if (valley) begin
        if (last_valley >= 0) begin chk(t - last_valley == 1000, $sformatf("period %0d", t - last_valley)); n_periods++; end
        last_valley = t;
      end
      prev = carrier;
      prev_up = up;
    end
    chk(maxv == 500, "peak value 500");
    chk(n_periods >= 18, "periods seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
