// tb_sto_add - self-checking testbench for sto_add.
//
// Random inputs; the expected output on clock n after reset is input
// n mod 3. Also checks that three streams of densities 0.1, 0.5 and 0.9
// average to 0.5 within 0.02, and that N = 2 alternates between its inputs.
module tb_sto_add;
  logic       clk = 1'b0;
  logic       rst;
  logic [2:0] m;
  logic       r;
  logic [1:0] m2;
  logic       r2;
  int checks = 0, failures = 0;

  sto_add #(.N(3)) dut  (.clk, .rst, .m, .r);
  sto_add #(.N(2)) dut2 (.clk, .rst, .m(m2), .r(r2));

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
    int ones;
    rst = 1'b0;
    #1 rst = 1'b1; m = '0; m2 = '0;
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      m = 3'($urandom); m2 = 2'($urandom);
      #1;
      check(r == m[n % 3], $sformatf("clock %0d: r=%b m=%b", n, r, m));
      check(r2 == m2[n % 2], $sformatf("clock %0d: N=2 r=%b m=%b", n, r2, m2));
      @(negedge clk);
    end
    ones = 0;
    for (int n = 0; n < 20000; n++) begin
      m[0] = ($urandom % 1000) < 100;
      m[1] = ($urandom % 1000) < 500;
      m[2] = ($urandom % 1000) < 900;
      #1;
      if (r) ones++;
      @(negedge clk);
    end
    check(ones / 20000.0 > 0.48 && ones / 20000.0 < 0.52, $sformatf("average density %f", ones / 20000.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
