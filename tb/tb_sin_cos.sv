// tb_sin_cos - sweeps the angle over all four quadrants and compares the table
// outputs with $sin/$cos (error bound: half a table step plus rounding).
module tb_sin_cos;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  angle_t theta;
  fx_t sin_t, cos_t;
  int checks = 0, failures = 0;

  sin_cos dut (.*);
  always #5 clk = ~clk;

  function automatic real rabs(real r); return r < 0 ? -r : r; endfunction
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    theta = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      real th;
      theta = (n < 16) ? angle_t'(n) << 28 : angle_t'($urandom);
      th = real'(theta) / 4294967296.0 * 2.0 * 3.14159265358979324;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      chk(done, "done one clock after start");
      chk(rabs(real'(sin_t) / 65536.0 - $sin(th)) < 1.0e-3, $sformatf("sin(%f)=%f", th, real'(sin_t) / 65536.0));
      chk(rabs(real'(cos_t) / 65536.0 - $cos(th)) < 1.0e-3, $sformatf("cos(%f)=%f", th, real'(cos_t) / 65536.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
