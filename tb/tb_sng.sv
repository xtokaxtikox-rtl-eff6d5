// tb_sng - self-checking testbench for sng.
//
// A copy of the LFSR sequence is computed here from the polynomial; on
// every clock the output must equal (pseudo-random number < value). For
// several values the density of 1s over 40000 clocks must be within 0.01
// of value / 2^32. Value 0 must give no 1 at all.
module tb_sng;
  logic        clk = 1'b0;
  logic        rst;
  logic        load;
  logic [31:0] seed;
  logic [31:0] value;
  logic        stream;
  int checks = 0, failures = 0;

  sng #(.W(32), .RESET_SEED(32'h0BAD_CAFE)) dut (.clk, .rst, .load, .seed, .value, .stream);

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
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ref_s;
    real fracs [5] = '{0.0, 0.125, 0.5, 0.8, 0.97};
    int ones, mism;
    rst = 1'b0;
    #1 rst = 1'b1; load = 1'b0; seed = 32'h0; value = '0;
    @(negedge clk); rst = 1'b0;
    ref_s = 32'h0BAD_CAFE;
    // The reset seed is the first number; check the reseed path too.
    seed = 32'h7777_1111; load = 1'b1;
    @(negedge clk); load = 1'b0;
    ref_s = 32'h7777_1111;
    foreach (fracs[f]) begin
      value = 32'(longint'(fracs[f] * 4294967296.0));
      ones = 0; mism = 0;
      for (int n = 0; n < 40000; n++) begin
        #1;
        if (stream !== (ref_s < value)) mism++;
        if (stream) ones++;
        @(negedge clk);
        ref_s = step32(ref_s);
      end
      check(mism == 0, $sformatf("value %f: %0d clocks differ from prn < value", fracs[f], mism));
      check(ones / 40000.0 > fracs[f] - 0.01 && ones / 40000.0 < fracs[f] + 0.01,
            $sformatf("value %f: density %f", fracs[f], ones / 40000.0));
      if (fracs[f] == 0.0) check(ones == 0, "value 0 gives no 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
