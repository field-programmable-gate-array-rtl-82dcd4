// tb_inv_park - random d/q voltages and angles through the inverse Park transform,
// compared with the alpha/beta values computed in floating point.
module tb_inv_park;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  fx_t u_d, u_q, sin_t, cos_t, u_alpha, u_beta;
  int checks = 0, failures = 0;

  inv_park dut (.*);
  always #5 clk = ~clk;

  function automatic real fx2r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic fx_t r2fx(real r); return fx_t'($rtoi(r * 65536.0)); endfunction
  function automatic real rabs(real r); return r < 0 ? -r : r; endfunction
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    u_d = 0; u_q = 0; sin_t = 0; cos_t = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      real a, b, th, ed, eq;
      a  = (real'($urandom % 20001) - 10000.0) / 200.0;
      b  = (real'($urandom % 20001) - 10000.0) / 200.0;
      th = real'($urandom % 3600) * 3.14159265358979 / 1800.0;
      ed = a * $cos(th) - b * $sin(th);
      eq = a * $sin(th) + b * $cos(th);
      @(negedge clk) begin
        u_d = r2fx(a); u_q = r2fx(b); sin_t = r2fx($sin(th)); cos_t = r2fx($cos(th)); start = 1;
      end
      @(negedge clk) start = 0;
      chk(done, "done after one clock");
      chk(rabs(fx2r(u_alpha) - ed) < 3e-3, $sformatf("ualpha %f exp %f", fx2r(u_alpha), ed));
      chk(rabs(fx2r(u_beta) - eq) < 3e-3, $sformatf("ubeta %f exp %f", fx2r(u_beta), eq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
