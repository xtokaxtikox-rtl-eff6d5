// lfsr - pseudo-random number generator of the stochastic number generator.
//
// A W-bit Fibonacci linear-feedback shift register. Every clock the state
// shifts left by one and the new LSB is the XOR of the tap bits. With the
// default W = 32 the taps are 32, 22, 2, 1, a maximal-length polynomial, so
// the state walks through all 2^32 - 1 non-zero values. Widths 8, 12, 16 and
// 24 also get maximal-length taps; any other width falls back to the two top
// bits, which is not maximal length in general.
//
// Interface: `rst` (active high, asynchronous) puts RESET_SEED in the
// register, `load` copies `seed` in on the next clock edge, and
// `parallel_out` is the current state. A zero seed would lock the register,
// so zero is replaced by 1. The width and the reset/load/seed/parallel_out
// pins follow the pseudo-random generator of the stochastic number
// generator; the polynomial and the zero-seed guard are this design's own.
module lfsr #(
  parameter int unsigned   W          = 32,
  parameter logic [W-1:0]  RESET_SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] seed,
  output logic [W-1:0] parallel_out
);
  logic [W-1:0] state;

  // Tap mask of a maximal-length polynomial for this width (bit k set for
  // tap k+1 of the polynomial).
  function automatic logic [W-1:0] tap_mask();
    case (W)
      8:       return W'(32'h0000_00B8);   // 8, 6, 5, 4
      12:      return W'(32'h0000_0829);   // 12, 6, 4, 1
      16:      return W'(32'h0000_B400);   // 16, 14, 13, 11
      24:      return W'(32'h00E1_0000);   // 24, 23, 22, 17
      32:      return W'(32'h8020_0003);   // 32, 22, 2, 1
      default: return W'(3) << (W - 2);
    endcase
  endfunction

  localparam logic [W-1:0] TAPS = tap_mask();

  always_ff @(posedge clk or posedge rst) begin
    if (rst)
      state <= (RESET_SEED == '0) ? W'(1) : RESET_SEED;
    else if (load)
      state <= (seed == '0) ? W'(1) : seed;
    else
      state <= {state[W-2:0], ^(state & TAPS)};
  end

  assign parallel_out = state;
endmodule
