// tb_duty_abc - random d0/d1/d2 in every sector.  Expected leg duties are built
// here from the switching states of the sector's two active vectors
// (leg duty = d0/2 + d1*state(single-switch vector) + d2*state(two-switch vector)).
module tb_duty_abc;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  sector_t sector;
  fx_t d0, d1, d2, da, db, dc;
  int checks = 0, failures = 0;

  duty_abc dut (.*);
  always #5 clk = ~clk;

  // switching states {a,b,c} of V1..V6
  logic [2:0] vstate [1:6] = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d0 = 0; d1 = 0; d2 = 0; sector = SEC_NONE;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      int s, vs, vd;
      fx_t a, b, e [3];
      s = (n % 6) + 1;
      a = fx_t'($urandom % 32768); b = fx_t'($urandom % 32768);
      // single-switch vector has an odd index, the two-switch vector an even one
      vs = (s % 2 == 1) ? s : (s % 6) + 1;
      vd = (s % 2 == 0) ? s : (s % 6) + 1;
      for (int leg = 0; leg < 3; leg++)
        e[leg] = ((FX_ONE - a - b) >>> 1) + (vstate[vs][2-leg] ? a : 0) + (vstate[vd][2-leg] ? b : 0);
      @(negedge clk) begin sector = sector_t'(s); d1 = a; d2 = b; d0 = FX_ONE - a - b; start = 1; end
      @(negedge clk) start = 0;
      chk(done, "done one clock after start");
      chk(da == e[0], $sformatf("sector %0d da %0d exp %0d", s, da, e[0]));
      chk(db == e[1], $sformatf("sector %0d db %0d exp %0d", s, db, e[1]));
      chk(dc == e[2], $sformatf("sector %0d dc %0d exp %0d", s, dc, e[2]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
