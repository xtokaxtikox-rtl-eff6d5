// tb_xtokaxtikox_top - end-to-end testbench of the stochastic line follower,
// with every parameter of the top at its default.
//
// Two analog front-end models close the loop: each smooths its channel's
// PWM reference into a triangle and compares it with a fixed sensor voltage
// (1.5 V for a sensor over light, 3.0 V over the dark line, 3.3 V supply).
// Densities are measured over whole periods of channel 1's triangle.
//
//   latency      Controller I with c ~ 1: motor = ~cmp_in three clocks later
//   an2sto       sensor stream density ~ Vin / 3.3 V
//   controller I motor density ~ 1 - i*c (d = 0) and 1 - i*(2c - P11)
//                (d = 1), P11 the measured density of c[n] & c[n-1]
//   controller II with the comparator's long runs the counter follows the
//                stream, so motor ~ 1 - i; threshold 0 keeps the motor off,
//                threshold ~1 keeps it on
//   side units   adder, multiplier, complement, squarer, doubler and
//                stochastic-to-binary counts checked bit by bit
//
// Mechanisms counted (each must occur): pseudo-random triangle period
// (distinct periods), doubling repeats, Controller II on and off decisions,
// Controller II counter saturation, controller switch, SNG reload,
// stochastic-to-binary counter full.
module tb_xtokaxtikox_top;
  logic        clk = 1'b0;
  logic        rst;
  logic [1:0]  cmp_in, pwm_ref, motor;
  logic        ctrl_sel, d, prng_load;
  logic [31:0] c_val, thr_val;
  logic [7:0]  ref_level [2];
  logic [2:0]  au_m;
  logic        au_sum, au_prod, au_not, au_sq, au_dbl;
  logic [15:0] au_ones, au_total;
  int          vin_mv [2];
  real         vref_mv [2];
  int checks = 0, failures = 0;
  longint cyc = 0;

  xtokaxtikox_top dut (
    .clk, .rst, .cmp_in, .pwm_ref, .ctrl_sel, .c_val, .d, .thr_val, .prng_load,
    .motor, .ref_level, .au_m, .au_sum, .au_prod, .au_not, .au_sq, .au_dbl, .au_ones, .au_total
  );

  for (genvar k = 0; k < 2; k++) begin : g_afe
    analog_frontend_model u_afe (
      .clk, .pwm(pwm_ref[k]), .vin_mv(vin_mv[k]), .cmp(cmp_in[k]), .vref_mv(vref_mv[k])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near(input real a, input real b, input real tol);
    return (a > b - tol) && (a < b + tol);
  endfunction

  // ---- Mechanism counters ----------------------------------------------
  int n_periods_distinct, n_double_repeat, n_c2_on, n_c2_off, n_c2_sat, n_switch, n_reload, n_s2b_full;
  int periods [longint];
  longint last_bottom = -1;
  logic [7:0] prev_level0 = '0;
  logic prev_sel = 1'b0;

  always @(posedge clk) if (!rst) begin
    // New triangle period on channel 1: level leaves 0.
    if (prev_level0 == 8'd0 && ref_level[0] == 8'd1) begin
      if (last_bottom >= 0) periods[cyc - last_bottom] = 1;
      last_bottom = cyc;
    end
    prev_level0 <= ref_level[0];
    if (d && (dut.u_ctrl1.p_d & ~dut.u_ctrl1.p) != 2'b00) n_double_repeat++;
    if (ctrl_sel && motor != 2'b11) n_c2_off++;
    if (ctrl_sel && motor != 2'b00) n_c2_on++;
    if (dut.u_ctrl2.cnt[0] == 8'sh7f || dut.u_ctrl2.cnt[0] == -8'sh80) n_c2_sat++;
    if (ctrl_sel != prev_sel) n_switch++;
    prev_sel <= ctrl_sel;
    if (au_total == 16'hFFFF) n_s2b_full++;
  end

  // ---- Side-by-side units: bit-exact reference ------------------------
  int   ref_sel = 0;
  logic ref_prev0 = 1'b0;
  int   au_ones_ref = 0, au_total_ref = 0;
  int   au_mism = 0, au_cycles = 0;

  always @(negedge clk) begin
    if (!rst) begin
      if (au_sum  != au_m[ref_sel])           au_mism++;
      if (au_prod != &au_m)                   au_mism++;
      if (au_not  != ~au_m[0])                au_mism++;
      if (au_sq   != (au_m[0] & ref_prev0))   au_mism++;
      if (au_dbl  != (au_m[0] | ref_prev0))   au_mism++;
      if (au_ones != 16'(au_ones_ref) || au_total != 16'(au_total_ref)) au_mism++;
      au_cycles++;
    end
  end
  always @(posedge clk) begin
    if (!rst) begin
      ref_sel   <= (ref_sel + 1) % 3;
      ref_prev0 <= au_m[0];
      if (au_total_ref < 65535) begin
        au_total_ref <= au_total_ref + 1;
        if (au_m[0]) au_ones_ref <= au_ones_ref + 1;
      end
    end
  end
  always @(negedge clk) au_m <= 3'($urandom);

  // ---- Measurement over whole triangle periods of channel 1 -------------
  real dens_i [2], dens_m [2];
  real dens_c, dens_cc;   // density of c, and of c[n] & c[n-1]

  task automatic wait_bottom();
    longint start = last_bottom;
    while (last_bottom == start) @(posedge clk);
  endtask

  task automatic measure(input int nper);
    longint ones_i [2], ones_m [2], n, ones_c, ones_cc;
    logic c_prev;
    ones_i = '{0, 0}; ones_m = '{0, 0}; n = 0; ones_c = 0; ones_cc = 0; c_prev = 1'b0;
    wait_bottom();
    for (int p = 0; p < nper; p++) begin
      longint start = last_bottom;
      while (last_bottom == start) begin
        @(negedge clk);
        for (int k = 0; k < 2; k++) begin
          if (cmp_in[k]) ones_i[k]++;
          if (motor[k])  ones_m[k]++;
        end
        if (dut.c_s) ones_c++;
        if (dut.c_s && c_prev) ones_cc++;
        c_prev = dut.c_s;
        n++;
      end
    end
    for (int k = 0; k < 2; k++) begin
      dens_i[k] = real'(ones_i[k]) / real'(n);
      dens_m[k] = real'(ones_m[k]) / real'(n);
    end
    dens_c  = real'(ones_c) / real'(n);
    dens_cc = real'(ones_cc) / real'(n);
    $display("  measured over %0d clocks: i = %f %f  motor = %f %f", n, dens_i[0], dens_i[1], dens_m[0], dens_m[1]);
  endtask

  function automatic logic [31:0] frac(input real f);
    return 32'(longint'(f * 4294967296.0));
  endfunction

  initial begin
    repeat (15_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] hist [4];
    int lat_mism;
    real c, want;
    vin_mv = '{1500, 3000};
    ctrl_sel = 1'b0; d = 1'b0; prng_load = 1'b0;
    c_val = 32'hFFFF_FFFF; thr_val = '0;
    rst = 1'b0;
    #1 rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // SNG reload: the c generator restarts from its seed.
    @(negedge clk); prng_load = 1'b1;
    @(negedge clk); prng_load = 1'b0;
    check(dut.u_sng_c.u_lfsr.parallel_out == 32'h1D87_2B41, "c SNG reloaded with its seed");
    n_reload++;

    // Latency: with c ~ 1 and d = 0 the motor is the inverted sensor stream,
    // three clocks late.
    lat_mism = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = cmp_in;
      if (n >= 4 && motor != ~hist[3]) lat_mism++;
    end
    check(lat_mism == 0, $sformatf("latency: %0d clocks differ from ~cmp_in three clocks earlier", lat_mism));

    // Controller I, d = 0, c = 0.75.
    $display("Controller I, c = 0.75, d = 0");
    c = 0.75; c_val = frac(c);
    measure(3);
    check(near(dens_i[0], 1500.0 / 3300.0, 0.04), $sformatf("sensor 1 density %f", dens_i[0]));
    check(near(dens_i[1], 3000.0 / 3300.0, 0.06), $sformatf("sensor 2 density %f", dens_i[1]));
    for (int k = 0; k < 2; k++) begin
      want = 1.0 - dens_i[k] * c;
      check(near(dens_m[k], want, 0.03), $sformatf("ctrl I motor %0d density %f expected %f", k, dens_m[k], want));
    end
    check(dens_m[0] > dens_m[1] + 0.2, "motor on the light side faster than on the dark side");

    // Controller I, d = 1, c = 0.25.
    $display("Controller I, c = 0.25, d = 1");
    c = 0.25; c_val = frac(c); d = 1'b1;
    measure(3);
    // Within a run of sensor 1s the doubler outputs c[n] | c[n-1], whose
    // density is 2c - P(c[n] & c[n-1]). Consecutive SNG bits are not
    // independent (the LFSR shifts), so P(c[n] & c[n-1]) is measured.
    $display("  c density %f, adjacent-pair density %f (independent: %f)", dens_c, dens_cc, c * c);
    check(near(dens_c, c, 0.01), $sformatf("c density %f", dens_c));
    for (int k = 0; k < 2; k++) begin
      want = 1.0 - dens_i[k] * (2.0 * c - dens_cc);
      check(near(dens_m[k], want, 0.03), $sformatf("ctrl I doubled motor %0d density %f expected %f", k, dens_m[k], want));
    end
    d = 1'b0;

    // Controller II, threshold 0.7.
    $display("Controller II, threshold 0.7");
    ctrl_sel = 1'b1; thr_val = frac(0.7);
    measure(3);
    for (int k = 0; k < 2; k++) begin
      want = 1.0 - dens_i[k];
      check(near(dens_m[k], want, 0.04), $sformatf("ctrl II motor %0d density %f expected %f", k, dens_m[k], want));
    end

    // Controller II, threshold 0: never below the threshold, motors off.
    thr_val = '0;
    repeat (2000) @(negedge clk);
    measure(1);
    check(dens_m[0] == 0.0 && dens_m[1] == 0.0, "threshold 0 keeps both motors off");
    // Threshold ~1: inputs always below it, motors on.
    thr_val = 32'hFFFF_FFFF;
    repeat (2000) @(negedge clk);
    measure(1);
    check(dens_m[0] > 0.999 && dens_m[1] > 0.999, "threshold ~1 keeps both motors on");

    // Back to Controller I.
    ctrl_sel = 1'b0; c_val = frac(0.75);
    measure(1);
    check(dens_m[0] > 0.5, "controller I drives the motors again");

    // Side units.
    check(au_mism == 0, $sformatf("side units: %0d mismatches in %0d clocks", au_mism, au_cycles));

    // Mechanisms.
    n_periods_distinct = periods.num();
    $display("mechanisms: distinct triangle periods %0d, doubling repeats %0d, ctrl II on %0d off %0d saturated %0d, switches %0d, reloads %0d, s2b full %0d",
             n_periods_distinct, n_double_repeat, n_c2_on, n_c2_off, n_c2_sat, n_switch, n_reload, n_s2b_full);
    check(n_periods_distinct >= 2, "pseudo-random triangle period seen");
    check(n_double_repeat > 0, "doubling repeat seen");
    check(n_c2_on > 0 && n_c2_off > 0, "controller II on and off seen");
    check(n_c2_sat > 0, "controller II counter saturation seen");
    check(n_switch >= 2, "controller switch seen");
    check(n_reload > 0, "SNG reload seen");
    check(n_s2b_full > 0, "stochastic-to-binary counter full seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
