// xtokaxtikox_top - stochastic line-follower controller.
//
// A fully stochastic path from two analog light sensors to two DC motors,
// with no ADC, DAC or binary arithmetic on the way:
//
//   comparator pins -> an2sto (x2) -> i1, i2 -> Controller I or II -> motor
//
// Each an2sto drives its own pwm_ref pin (different LFSR seeds, so the two
// sensor streams are uncorrelated); outside the chip an R-C and a comparator
// return a stream whose density equals the sensor voltage over the supply.
// Controller I scales each sensor stream by the constant stream c (doubled
// when d = 1) and inverts it; Controller II compares each sensor stream with
// the threshold stream and outputs the sign. `ctrl_sel` picks the
// controller (0 = I, 1 = II). The motor outputs are stochastic streams that
// an external R-C low-pass filter and motor driver turn into a drive level.
// The constant streams c and threshold come from two SNGs fed by the binary
// inputs c_val and thr_val (value / 2^LFSR_W); `prng_load` reloads their
// LFSRs with their reset seeds.
//
// Beside the controller, with ports of their own, stand the general
// stochastic units: a 3-input adder and multiplier on au_m, and the
// complement, squarer, doubler and stochastic-to-binary counter on au_m[0].
//
// Timing: everything runs on `clk`, `rst` is active high and asynchronous.
// A sensor bit reaches `motor` three clocks after it appears on `cmp_in`
// (two synchronizer flops, then the registered motor output).
//
// The overall chain, the two controllers and all units follow the published
// design. Holding both controllers behind a select, using SNGs for c and
// the threshold, the registered motor output and the side-by-side units are
// this design's own choices.
module xtokaxtikox_top #(
  parameter int unsigned LFSR_W = 32,
  parameter int unsigned PWM_W  = 8,
  parameter int unsigned CNT_W  = 8,
  parameter int unsigned S2B_W  = 16
) (
  input  logic              clk,
  input  logic              rst,
  // Analog interface (sensor side).
  input  logic [1:0]        cmp_in,
  output logic [1:0]        pwm_ref,
  // Controller configuration.
  input  logic              ctrl_sel,
  input  logic [LFSR_W-1:0] c_val,
  input  logic              d,
  input  logic [LFSR_W-1:0] thr_val,
  input  logic              prng_load,
  // Analog interface (motor side).
  output logic [1:0]        motor,
  // Reference levels of the two input generators (observation).
  output logic [PWM_W-1:0]  ref_level [2],
  // Side-by-side stochastic arithmetic units.
  input  logic [2:0]        au_m,
  output logic              au_sum,
  output logic              au_prod,
  output logic              au_not,
  output logic              au_sq,
  output logic              au_dbl,
  output logic [S2B_W-1:0]  au_ones,
  output logic [S2B_W-1:0]  au_total
);
  localparam logic [LFSR_W-1:0] C_SEED   = LFSR_W'(32'h1D87_2B41);
  localparam logic [LFSR_W-1:0] THR_SEED = LFSR_W'(32'h5EED_0C3A);

  logic [1:0]       i_s;          // sensor streams {i2, i1}
  logic             c_s, thr_s;   // constant streams
  logic [1:0]       o1_s, o2_s;   // controller outputs
  logic             full_unused;

  // ---- An2Sto inputs --------------------------------------------------
  an2sto #(.PWM_W(PWM_W), .SEED(16'hACE1)) u_in1 (
    .clk, .rst, .cmp_in(cmp_in[0]), .pwm_out(pwm_ref[0]), .stream(i_s[0]), .level(ref_level[0])
  );
  an2sto #(.PWM_W(PWM_W), .SEED(16'h3B29)) u_in2 (
    .clk, .rst, .cmp_in(cmp_in[1]), .pwm_out(pwm_ref[1]), .stream(i_s[1]), .level(ref_level[1])
  );

  // ---- Constant streams -----------------------------------------------
  sng #(.W(LFSR_W), .RESET_SEED(C_SEED)) u_sng_c (
    .clk, .rst, .load(prng_load), .seed(C_SEED), .value(c_val), .stream(c_s)
  );
  sng #(.W(LFSR_W), .RESET_SEED(THR_SEED)) u_sng_thr (
    .clk, .rst, .load(prng_load), .seed(THR_SEED), .value(thr_val), .stream(thr_s)
  );

  // ---- Stochastic machine ---------------------------------------------
  controller_1 u_ctrl1 (.clk, .rst, .i(i_s), .c(c_s), .d, .o(o1_s));
  controller_2 #(.CNT_W(CNT_W)) u_ctrl2 (.clk, .rst, .i(i_s), .thr(thr_s), .o(o2_s));

  // ---- Sto2An: registered stream to the motor pins ---------------------
  always_ff @(posedge clk or posedge rst) begin
    if (rst) motor <= '0;
    else     motor <= ctrl_sel ? o2_s : o1_s;
  end

  // ---- Side-by-side arithmetic units ----------------------------------
  sto_add #(.N(3))    u_add (.clk, .rst, .m(au_m), .r(au_sum));
  sto_mul #(.N(3))    u_mul (.m(au_m), .r(au_prod));
  sto_not             u_not (.a(au_m[0]), .y(au_not));
  sto_square          u_sq  (.clk, .rst, .a(au_m[0]), .y(au_sq));
  sto_double          u_dbl (.clk, .rst, .a(au_m[0]), .y(au_dbl));
  s2b #(.W(S2B_W))    u_s2b (.clk, .rst, .stream(au_m[0]), .ones(au_ones), .total(au_total),
                             .full(full_unused));
endmodule
