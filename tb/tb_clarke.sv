// tb_clarke - random phase currents through the Clarke transform, compared with
// the alpha/beta values computed in floating point; also checks the latency.
module tb_clarke;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  fx_t i_a, i_b, i_c, i_alpha, i_beta;
  int checks = 0, failures = 0;

  clarke dut (.*);
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
    i_a = 0; i_b = 0; i_c = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      real a, b, c, ea, eb;
      a = (real'($urandom % 20001) - 10000.0) / 200.0;
      b = (real'($urandom % 20001) - 10000.0) / 200.0;
      c = (n % 2) ? -(a + b) : (real'($urandom % 20001) - 10000.0) / 200.0;
      ea = 2.0 / 3.0 * a - b / 3.0 - c / 3.0;
      eb = (b - c) / $sqrt(3.0);
      @(negedge clk) begin i_a = r2fx(a); i_b = r2fx(b); i_c = r2fx(c); start = 1; end
      @(negedge clk) start = 0;
      chk(done, "done after one clock");
      chk(rabs(fx2r(i_alpha) - ea) < 2e-3, $sformatf("alpha %f exp %f", fx2r(i_alpha), ea));
      chk(rabs(fx2r(i_beta) - eb) < 2e-3, $sformatf("beta %f exp %f", fx2r(i_beta), eb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
