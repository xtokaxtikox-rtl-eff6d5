// an2sto - digital side of the stochastic analog input.
//
// The analog voltage is never converted to binary. A pwm_gen drives
// `pwm_out`; outside the chip an R-C turns it into a triangular reference
// and a comparator outputs 1 while the sensor voltage is above that
// reference. The comparator output `cmp_in` is already the stochastic
// bitstream; this block only brings it into the clock domain with a
// two-flop synchronizer, so `stream` lags `cmp_in` by two clocks.
//
// Interface: `clk`, `rst` (active high, asynchronous), `cmp_in` from the
// comparator, `pwm_out` to the R-C, `stream` to the stochastic machine,
// `level` is the reference generator's current level (observation). The
// comparator-against-PWM-triangle scheme follows the published design; the
// synchronizer is this design's own addition.
module an2sto #(
  parameter int unsigned PWM_W = 8,
  parameter logic [15:0] SEED  = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cmp_in,
  output logic             pwm_out,
  output logic             stream,
  output logic [PWM_W-1:0] level
);
  logic sync1;
  logic rising_unused;

  pwm_gen #(.PWM_W(PWM_W), .SEED(SEED)) u_pwm (
    .clk, .rst, .pwm_out, .level, .rising(rising_unused)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sync1  <= 1'b0;
      stream <= 1'b0;
    end else begin
      sync1  <= cmp_in;
      stream <= sync1;
    end
  end
endmodule
