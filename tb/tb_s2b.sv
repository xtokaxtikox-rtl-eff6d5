// tb_s2b - self-checking testbench for s2b.
//
// Feeds a random stream whose 1s are counted here and compares `ones` and
// `total` after every clock. A second, 4-bit instance checks that both
// counters stop at the maximum of the total counter and raise `full`.
module tb_s2b;
  logic        clk = 1'b0;
  logic        rst;
  logic        stream;
  logic [15:0] ones, total;
  logic        full;
  logic [3:0]  ones4, total4;
  logic        full4;
  int checks = 0, failures = 0;

  s2b #(.W(16)) dut  (.clk, .rst, .stream, .ones, .total, .full);
  s2b #(.W(4))  dut4 (.clk, .rst, .stream, .ones(ones4), .total(total4), .full(full4));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_ones, n4;
    rst = 1'b0;
    #1 rst = 1'b1; stream = 1'b0;
    @(negedge clk); rst = 1'b0;
    #1;
    check(ones == 0 && total == 0 && !full, "cleared by reset");
    n_ones = 0; n4 = 0;
    for (int n = 1; n <= 3000; n++) begin
      stream = ($urandom % 100) < 30;
      if (stream) n_ones++;
      if (stream && n <= 15) n4++;
      @(negedge clk);
      check(total == 16'(n) && ones == 16'(n_ones),
            $sformatf("clock %0d: ones %0d total %0d, expected %0d %0d", n, ones, total, n_ones, n));
      if (n == 15) check(full4, "4-bit instance full after 15 clocks");
      if (n >= 15) check(total4 == 4'd15 && ones4 == 4'(n4), "4-bit instance holds when full");
    end
    check(!full, "16-bit instance not full");
    rst = 1'b1; #1;
    check(ones == 0 && total == 0, "cleared again");
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
