// tb_sto_not - self-checking testbench for sto_not.
//
// Both input values, then the density of the complement of a 0.3 stream
// (expected 0.7).
module tb_sto_not;
  logic a, y;
  int checks = 0, failures = 0;

  sto_not dut (.a, .y);

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
    a = 1'b0; #1; check(y == 1'b1, "not 0");
    a = 1'b1; #1; check(y == 1'b0, "not 1");
    ones = 0;
    for (int n = 0; n < 20000; n++) begin
      a = ($urandom % 1000) < 300;
      #1;
      if (y) ones++;
    end
    check(ones / 20000.0 > 0.68 && ones / 20000.0 < 0.72, $sformatf("complement density %f", ones / 20000.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
