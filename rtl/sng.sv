// sng - stochastic number generator (binary-to-stochastic converter).
//
// A pseudo-random W-bit number from an LFSR is compared every clock with the
// binary input `value`; the output bit is 1 when the pseudo-random number is
// smaller. Over many clocks the fraction of 1s converges to value / 2^W.
//
// Interface: `clk`, `rst` (active high, asynchronous), `load`/`seed` reseed
// the LFSR, `value` is the number to encode, `stream` is the bitstream. The
// comparator is combinational on the LFSR register, so `stream` changes one
// clock after the LFSR advances and immediately when `value` changes.
//
// The structure (LFSR feeding a less-than comparator, 32-bit width, A < B
// gives 1) follows the published design. The published unit clocks its LFSR
// from a local ring oscillator; here the clock is a port, so the unit can be
// placed in one clock domain with the rest of the system.
module sng #(
  parameter int unsigned  W          = 32,
  parameter logic [W-1:0] RESET_SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic [W-1:0] value,
  output logic         stream
);
  logic [W-1:0] prn;

  lfsr #(.W(W), .RESET_SEED(RESET_SEED)) u_lfsr (
    .clk, .rst, .load, .seed, .parallel_out(prn)
  );

  assign stream = (prn < value);
endmodule
