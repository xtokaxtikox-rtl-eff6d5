// sto_add - N-input stochastic scaled adder (average).
//
// A modulo-N counter steps 0, 1, ..., N-1, 0, ... and selects which input
// stream is passed to the output on each clock, in round-robin order. Each
// input is therefore sampled 1/N of the time and the output encodes
// (m[0] + ... + m[N-1]) / N.
//
// Interface: `m[k]` is input k+1 (m1 at index 0), `r` the output. `r` is a
// combinational function of `m` and the select register; `rst` (active
// high, asynchronous) sets the select to input 0. The multiplexer with a
// modulo counter on its select and N = 3 follow the published unit; the
// published version clocks the counter from a local ring oscillator, here it
// uses the system clock.
module sto_add #(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] m,
  output logic         r
);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;
  logic [SW-1:0] sel;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)
      sel <= '0;
    else if (sel == SW'(N - 1))
      sel <= '0;
    else
      sel <= sel + 1'b1;
  end

  assign r = m[sel];
endmodule
