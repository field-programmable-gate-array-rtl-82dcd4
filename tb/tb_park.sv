// tb_park - random alpha/beta currents and angles through the Park transform,
// compared with the d/q values computed in floating point.
module tb_park;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  fx_t i_alpha, i_beta, sin_t, cos_t, i_d, i_q;
  int checks = 0, failures = 0;

  park dut (.*);
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
    i_alpha = 0; i_beta = 0; sin_t = 0; cos_t = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      real a, b, th, ed, eq;
      a  = (real'($urandom % 20001) - 10000.0) / 200.0;
      b  = (real'($urandom % 20001) - 10000.0) / 200.0;
      th = real'($urandom % 3600) * 3.14159265358979 / 1800.0;
      ed = a * $cos(th) + b * $sin(th);
      eq = b * $cos(th) - a * $sin(th);
      @(negedge clk) begin
        i_alpha = r2fx(a); i_beta = r2fx(b); sin_t = r2fx($sin(th)); cos_t = r2fx($cos(th)); start = 1;
      end
      @(negedge clk) start = 0;
      chk(done, "done after one clock");
      chk(rabs(fx2r(i_d) - ed) < 3e-3, $sformatf("id %f exp %f", fx2r(i_d), ed));
      chk(rabs(fx2r(i_q) - eq) < 3e-3, $sformatf("iq %f exp %f", fx2r(i_q), eq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
