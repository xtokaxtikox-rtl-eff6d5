// tb_sto_mul - self-checking testbench for sto_mul.
//
// All 8 input combinations of the 3-input multiplier, then the density of
// the product of independent streams 0.5, 0.6 and 0.8 (expected 0.24).
module tb_sto_mul;
  logic [2:0] m;
  logic       r;
  int checks = 0, failures = 0;

  sto_mul #(.N(3)) dut (.m, .r);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int v = 0; v < 8; v++) begin
      m = 3'(v);
      #1;
      check(r == (v == 7), $sformatf("m=%b r=%b", m, r));
    end
    ones = 0;
    for (int n = 0; n < 20000; n++) begin
      m[0] = ($urandom % 1000) < 500;
      m[1] = ($urandom % 1000) < 600;
      m[2] = ($urandom % 1000) < 800;
      #1;
      if (r) ones++;
    end
    check(ones / 20000.0 > 0.22 && ones / 20000.0 < 0.26, $sformatf("product density %f", ones / 20000.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
