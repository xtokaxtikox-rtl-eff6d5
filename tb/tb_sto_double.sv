// tb_sto_double - self-checking testbench for sto_double.
//
// Replays the 8-bit example of the doubling unit (input 0,1,1,0,0,1,0,0 in
// time order gives 0,1,1,1,0,1,1,0), checks y[n] = a[n] | a[n-1] on a
// random stream, and that a sparse 0.1 stream comes out at 0.19 within 0.02
// (1 - 0.9^2 for independent bits).
module tb_sto_double;
  logic clk = 1'b0;
  logic rst, a, y;
  int checks = 0, failures = 0;

  sto_double dut (.clk, .rst, .a, .y);

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
    logic [7:0] orig = 8'b0010_0110;   // bit 0 is the first in time
    logic [7:0] dbl  = 8'b0110_1110;
    logic prev;
    int ones;
    rst = 1'b0;
    #1 rst = 1'b1; a = 1'b1;
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 8; n++) begin
      a = orig[n];
      #1;
      check(y == dbl[n], $sformatf("example bit %0d: got %b expected %b", n + 1, y, dbl[n]));
      @(negedge clk);
    end
    prev = orig[7];
    ones = 0;
    for (int n = 0; n < 20000; n++) begin
      a = ($urandom % 1000) < 100;
      #1;
      check(y == (a | prev), $sformatf("clock %0d", n));
      if (y) ones++;
      prev = a;
      @(negedge clk);
    end
    check(ones / 20000.0 > 0.17 && ones / 20000.0 < 0.21, $sformatf("double density %f", ones / 20000.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
