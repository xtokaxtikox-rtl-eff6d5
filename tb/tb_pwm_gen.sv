// tb_pwm_gen - self-checking testbench for pwm_gen (PWM_W = 4).
//
// Every 16-clock carrier period the number of high clocks must lie between
// the level of the previous period and that level plus the dither range
// (0..3), capped at 16. Every triangle must rise and fall for equally long,
// its period must be 2 * 15 * dwell * 16 clocks with dwell in 1..4, and at
// least two different periods must occur (pseudo-random period).
module tb_pwm_gen;
  localparam int PW = 4;
  logic          clk = 1'b0;
  logic          rst;
  logic          pwm_out;
  logic [PW-1:0] level;
  logic          rising;
  int checks = 0, failures = 0;

  pwm_gen #(.PWM_W(PW), .DWELL_W(2), .DITHER_W(2), .SEED(16'h1234)) dut (
    .clk, .rst, .pwm_out, .level, .rising
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int highs, prev_level, cur_level, lo, hi;
    int t, t_bottom, t_top, rise, fall;
    int periods_seen [int];
    logic prev_rising;
    rst = 1'b0;
    #1 rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    // First carrier period after reset runs at duty 0.
    prev_level = 0;
    t = 0; t_bottom = -1; t_top = -1;
    prev_rising = 1'b1;
    while (periods_seen.num() < 2 || t < 40000) begin
      highs = 0;
      cur_level = int'(level);
      for (int k = 0; k < 16; k++) begin
        if (pwm_out) highs++;
        @(negedge clk);
        t++;
        if (prev_rising && !rising) t_top = t;
        if (!prev_rising && rising) begin
          if (t_bottom >= 0) begin
            rise = t_top - t_bottom;
            fall = t - t_top;
            check(rise == fall, $sformatf("rise %0d fall %0d", rise, fall));
            check((t - t_bottom) % (2 * 15 * 16) == 0 && (t - t_bottom) / (2 * 15 * 16) inside {[1:4]},
                  $sformatf("period %0d", t - t_bottom));
            periods_seen[t - t_bottom] = 1;
          end
          t_bottom = t;
        end
        prev_rising = rising;
        if (t > 150000) break;
      end
      lo = prev_level;
      hi = (prev_level + 3 > 16) ? 16 : prev_level + 3;
      check(highs >= lo && highs <= hi,
            $sformatf("carrier period with %0d high clocks, level was %0d", highs, prev_level));
      prev_level = cur_level;
      if (t > 150000) break;
    end
    check(periods_seen.num() >= 2, $sformatf("%0d distinct triangle periods", periods_seen.num()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
