// tb_lfsr - self-checking testbench for lfsr.
//
// Checks the reset seed, the load of a seed, the replacement of a zero seed,
// 5000 steps of the 32-bit register against the polynomial
// x^32 + x^22 + x^2 + x + 1 computed here bit by bit, and that an 8-bit
// instance has period 255 (maximal length).
module tb_lfsr;
  logic        clk = 1'b0;
  logic        rst;
  logic        load;
  logic [31:0] seed;
  logic [31:0] q;
  logic [7:0]  q8;
  int checks = 0, failures = 0;

  lfsr #(.W(32), .RESET_SEED(32'hDEAD_BEEF)) dut (.clk, .rst, .load, .seed, .parallel_out(q));
  lfsr #(.W(8),  .RESET_SEED(8'h01))         dut8 (.clk, .rst, .load(1'b0), .seed(8'h00), .parallel_out(q8));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] step32(input logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ref_s;
    int period;
    rst = 1'b0; load = 1'b0; seed = '0;
    #1 rst = 1'b1;
    #1;
    check(q == 32'hDEAD_BEEF, "reset seed");
    check(q8 == 8'h01, "reset seed 8-bit");
    @(negedge clk); rst = 1'b0;
    // Period of the 8-bit register.
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (q8 != 8'h01 && period < 1000);
    check(period == 255, $sformatf("8-bit period %0d, expected 255", period));
    // Load a seed.
    seed = 32'h1234_5678; load = 1'b1;
    @(negedge clk); load = 1'b0;
    check(q == 32'h1234_5678, "load seed");
    ref_s = q;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      ref_s = step32(ref_s);
      check(q == ref_s, $sformatf("step %0d: got %h expected %h", n, q, ref_s));
    end
    // Zero seed is replaced by 1.
    seed = '0; load = 1'b1;
    @(negedge clk); load = 1'b0;
    check(q == 32'h1, "zero seed replaced by 1");
    @(negedge clk);
    check(q == 32'h3, "step after seed 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
