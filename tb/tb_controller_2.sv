// tb_controller_2 - self-checking testbench for controller_2 (CNT_W = 8).
//
// Random streams: a saturating counter kept here must agree with the output
// sign on every clock. Then thresholds: input 0.3 against threshold 0.6
// must settle with the output at 1 (input below threshold), input 0.8
// against 0.6 at 0, and each channel decides on its own.
module tb_controller_2;
  logic       clk = 1'b0;
  logic       rst, thr;
  logic [1:0] i, o;
  int checks = 0, failures = 0;

  controller_2 #(.CNT_W(8)) dut (.clk, .rst, .i, .thr, .o);

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
    int cnt [2];
    int sat_hits, ones [2];
    rst = 1'b0;
    #1 rst = 1'b1; i = '0; thr = 1'b0;
    @(negedge clk); rst = 1'b0;
    #1;
    check(o == 2'b00, "zero after reset");
    cnt = '{0, 0};
    sat_hits = 0;
    for (int n = 0; n < 20000; n++) begin
      // Slowly drifting densities so the counters visit both limits.
      int pi0 = (n / 2000) % 2 ? 800 : 200;
      i[0] = ($urandom % 1000) < pi0;
      i[1] = ($urandom % 1000) < 1000 - pi0;
      thr  = ($urandom % 1000) < 500;
      for (int k = 0; k < 2; k++) begin
        if (i[k] && !thr && cnt[k] < 127) cnt[k]++;
        else if (!i[k] && thr && cnt[k] > -128) cnt[k]--;
        if (cnt[k] == 127 || cnt[k] == -128) sat_hits++;
      end
      @(negedge clk);
      for (int k = 0; k < 2; k++)
        check(o[k] == (cnt[k] < 0), $sformatf("clock %0d channel %0d: o=%b count %0d", n, k, o[k], cnt[k]));
    end
    check(sat_hits > 0, "counter limits reached");
    // Settled decisions.
    ones = '{0, 0};
    for (int n = 0; n < 6000; n++) begin
      i[0] = ($urandom % 1000) < 300;
      i[1] = ($urandom % 1000) < 800;
      thr  = ($urandom % 1000) < 600;
      @(negedge clk);
      if (n >= 1000) for (int k = 0; k < 2; k++) if (o[k]) ones[k]++;
    end
    check(ones[0] > 4900, $sformatf("input 0.3 < threshold 0.6: output 1 for %0d of 5000", ones[0]));
    check(ones[1] < 100, $sformatf("input 0.8 > threshold 0.6: output 1 for %0d of 5000", ones[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
