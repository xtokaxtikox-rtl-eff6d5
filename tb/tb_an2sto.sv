// tb_an2sto - self-checking testbench for an2sto (PWM_W = 4).
//
// The comparator input is driven with random bits; the stream must repeat
// them two clocks later. The reference PWM must toggle, and its density
// over whole triangle periods must be about one half (the triangle spends
// equal time at every level).
module tb_an2sto;
  logic       clk = 1'b0;
  logic       rst, cmp_in, pwm_out, stream;
  logic [3:0] level;
  int checks = 0, failures = 0;

  an2sto #(.PWM_W(4), .SEED(16'h4321)) dut (.clk, .rst, .cmp_in, .pwm_out, .stream, .level);

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
    logic [1:0] hist;
    int pwm_ones, edges;
    logic prev_pwm;
    rst = 1'b0;
    #1 rst = 1'b1; cmp_in = 1'b0;
    @(negedge clk); rst = 1'b0;
    hist = '0;
    pwm_ones = 0; edges = 0; prev_pwm = pwm_out;
    for (int n = 0; n < 30000; n++) begin
      cmp_in = 1'($urandom);
      @(negedge clk);
      hist = {hist[0], cmp_in};
      if (n >= 1) check(stream == hist[1], $sformatf("clock %0d: stream %b expected %b", n, stream, hist[1]));
      if (pwm_out) pwm_ones++;
      if (pwm_out != prev_pwm) edges++;
      prev_pwm = pwm_out;
    end
    check(edges > 100, $sformatf("PWM edges %0d", edges));
    check(pwm_ones / 30000.0 > 0.4 && pwm_ones / 30000.0 < 0.65, $sformatf("PWM density %f", pwm_ones / 30000.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
