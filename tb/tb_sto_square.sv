// tb_sto_square - self-checking testbench for sto_square.
//
// Random stream: every output bit must be a[n] & a[n-1] (a[-1] = 0 after
// reset), and a 0.6 stream must give a density of 0.36 within 0.02.
module tb_sto_square;
  logic clk = 1'b0;
  logic rst, a, y;
  int checks = 0, failures = 0;

  sto_square dut (.clk, .rst, .a, .y);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    int ones;
    rst = 1'b0;
    #1 rst = 1'b1; a = 1'b1;
    @(negedge clk); rst = 1'b0;
    prev = 1'b0;
    ones = 0;
    for (int n = 0; n < 20000; n++) begin
      a = ($urandom % 1000) < 600;
      #1;
      check(y == (a & prev), $sformatf("clock %0d", n));
      if (y) ones++;
      prev = a;
      @(negedge clk);
    end
    check(ones / 20000.0 > 0.34 && ones / 20000.0 < 0.38, $sformatf("square density %f", ones / 20000.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
