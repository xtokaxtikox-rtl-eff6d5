// analog_frontend_model - testbench model of one stochastic input channel's
// analog parts: the R-C that smooths the PWM reference and the comparator.
//
// Behavioural, not synthesizable. On every clock the capacitor voltage
// moves towards the PWM pin level (0 or VCC_MV) by 1/TAU of the
// difference, a first-order R-C with time constant TAU clocks. The
// comparator output is 1 while the sensor voltage `vin_mv` is above the
// capacitor voltage, and is updated on the clock edge. The `vref_mv`
// output is the capacitor voltage, for observation.
module analog_frontend_model #(
  parameter real VCC_MV = 3300.0,
  parameter real TAU    = 4096.0
) (
  input  logic clk,
  input  logic pwm,
  input  int   vin_mv,
  output logic cmp,
  output real  vref_mv
);
  initial begin
    vref_mv = 0.0;
    cmp     = 1'b0;
  end

  always @(posedge clk) begin
    vref_mv <= vref_mv + ((pwm ? VCC_MV : 0.0) - vref_mv) / TAU;
    cmp     <= (real'(vin_mv) > vref_mv);
  end
endmodule
