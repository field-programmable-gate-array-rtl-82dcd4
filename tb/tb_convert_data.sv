// tb_convert_data - checks the ADC-code to phase-current conversion against
// I = (code/4095 - 0.5)/0.01 computed in floating point, the derived phase c,
// and the one-clock latency.
module tb_convert_data;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [11:0] code_a, code_b;
  fx_t i_a, i_b, i_c;
  int checks = 0, failures = 0;

  convert_data dut (.*);
  always #5 clk = ~clk;

  function automatic real fx2r(fx_t v); return real'(v) / 65536.0; endfunction
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    code_a = 0; code_b = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      real ea, eb;
      code_a = (n == 0) ? 12'd0 : (n == 1) ? 12'hFFF : 12'($urandom);
      code_b = (n == 0) ? 12'd2048 : 12'($urandom);
      ea = (real'(code_a) / 4095.0 - 0.5) / 0.01;
      eb = (real'(code_b) / 4095.0 - 0.5) / 0.01;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      chk(done, "done one clock after start");
      chk((fx2r(i_a) - ea) < 1e-3 && (ea - fx2r(i_a)) < 1e-3, $sformatf("ia code %0d got %f exp %f", code_a, fx2r(i_a), ea));
      chk((fx2r(i_b) - eb) < 1e-3 && (eb - fx2r(i_b)) < 1e-3, "ib");
      chk(i_c == -(i_a + i_b), "ic = -(ia+ib)");
      @(negedge clk) chk(!done, "done is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
