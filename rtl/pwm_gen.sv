// pwm_gen - reference generator for the stochastic analog input.
//
// The PWM output, smoothed by an external R-C, becomes the triangular
// reference voltage that an external comparator holds against the sensor
// voltage. The comparator output is then high for a fraction of time equal
// to the sensor voltage over the supply: a stochastic bitstream.
//
// How it works: a PWM_W-bit carrier counter runs freely. A duty `level`
// ramps 0 -> 2^PWM_W-1 -> 0, one step per `dwell` carrier periods, so the
// filtered output is a triangle whose rise and fall last equally long (a 50%
// duty-cycle triangle). At the start of every rise a new dwell in
// 1..2^DWELL_W is drawn from a 16-bit LFSR, so the period of the triangle
// changes pseudo-randomly, which spreads the comparator's pulses and
// de-correlates channels with different seeds. Each carrier period also adds
// a pseudo-random dither of 0..2^DITHER_W-1 to the level, a small variation
// of the reference amplitude that makes the comparator toggle near the
// crossing.
//
// Interface: `clk` (CLK_IN), `rst` (active high, asynchronous), `pwm_out`
// (PWM_OUT), and for observation the current `level` and the ramp
// direction `rising`. A triangle period lasts 2 * (2^PWM_W - 1) * dwell *
// 2^PWM_W clocks. The triangle with pseudo-random period, the PWM origin of
// the reference and the amplitude variations follow the published design;
// the ramp shape, resolution, dwell range and dither size are this design's
// own choices.
module pwm_gen #(
  parameter int unsigned PWM_W    = 8,
  parameter int unsigned DWELL_W  = 2,
  parameter int unsigned DITHER_W = 2,
  parameter logic [15:0] SEED     = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst,
  output logic             pwm_out,
  output logic [PWM_W-1:0] level,
  output logic             rising
);
  logic [PWM_W-1:0] cnt;        // carrier counter
  logic [PWM_W:0]   duty;       // level + dither, up to 2^PWM_W (always on)
  logic [DWELL_W:0] dwell;      // carrier periods per level step, 1..2^DWELL_W
  logic [DWELL_W:0] dwell_cnt;
  logic [15:0]      prn;
  logic             carrier_end;

  lfsr #(.W(16), .RESET_SEED(SEED)) u_lfsr (
    .clk, .rst, .load(1'b0), .seed(16'h0), .parallel_out(prn)
  );

  assign carrier_end = (cnt == '1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt       <= '0;
      duty      <= '0;
      level     <= '0;
      rising    <= 1'b1;
      dwell     <= (DWELL_W+1)'(1);
      dwell_cnt <= (DWELL_W+1)'(1);
    end else begin
      cnt <= cnt + 1'b1;
      if (carrier_end) begin
        // Next carrier period: new dithered duty.
        duty <= (PWM_W+1)'(level) + (PWM_W+1)'(prn[DITHER_W-1:0]);
        if (dwell_cnt == dwell) begin
          dwell_cnt <= (DWELL_W+1)'(1);
          if (rising) begin
            if (level == '1) begin
              rising <= 1'b0;
              level  <= level - 1'b1;
            end else begin
              level  <= level + 1'b1;
            end
          end else begin
            if (level == '0) begin
              // Bottom of the triangle: start a new period with a new dwell.
              rising <= 1'b1;
              level  <= level + 1'b1;
              dwell  <= (DWELL_W+1)'(prn[DITHER_W +: DWELL_W]) + 1'b1;
            end else begin
              level  <= level - 1'b1;
            end
          end
        end else begin
          dwell_cnt <= dwell_cnt + 1'b1;
        end
      end
    end
  end

  assign pwm_out = ((PWM_W+1)'(cnt) < duty);
endmodule
