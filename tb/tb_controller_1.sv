// tb_controller_1 - self-checking testbench for controller_1.
//
// Random i, c, d: each output bit must equal ~(p | d & p_prev), p = i & c.
// Then densities: with independent streams i = 0.6, c = 0.5 the output is
// 1 - 0.3 = 0.7 when d = 0, and 1 - (1 - 0.7^2) = 0.49 when d = 1.
module tb_controller_1;
  logic       clk = 1'b0;
  logic       rst, c, d;
  logic [1:0] i, o;
  int checks = 0, failures = 0;

  controller_1 dut (.clk, .rst, .i, .c, .d, .o);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] p, p_prev, exp_o;
    real want;
    int ones [2];
    rst = 1'b0;
    #1 rst = 1'b1; i = '0; c = 1'b0; d = 1'b0;
    @(negedge clk); rst = 1'b0;
    p_prev = '0;
    for (int n = 0; n < 5000; n++) begin
      i = 2'($urandom); c = 1'($urandom); d = 1'($urandom);
      #1;
      p = i & {2{c}};
      exp_o = ~(p | ({2{d}} & p_prev));
      check(o == exp_o, $sformatf("clock %0d: o=%b expected %b", n, o, exp_o));
      p_prev = p;
      @(negedge clk);
    end
    for (int dv = 0; dv < 2; dv++) begin
      d = 1'(dv);
      ones = '{0, 0};
      for (int n = 0; n < 20000; n++) begin
        i[0] = ($urandom % 1000) < 600;
        i[1] = ($urandom % 1000) < 600;
        c    = ($urandom % 1000) < 500;
        #1;
        for (int k = 0; k < 2; k++) if (o[k]) ones[k]++;
        @(negedge clk);
      end
      for (int k = 0; k < 2; k++) begin
        want = (dv == 0) ? 0.7 : 0.49;
        check(ones[k] / 20000.0 > want - 0.02 && ones[k] / 20000.0 < want + 0.02,
              $sformatf("d=%0d channel %0d density %f expected %f", dv, k, ones[k] / 20000.0, want));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
