// sto_square - stochastic squarer.
//
// The stream is multiplied (AND) by a copy of itself delayed by one clock.
// The delay de-correlates the two operands, so for a stream with independent
// bits the output encodes A^2. This is the synchronous form of the
// published squarer, with a register as the delay; `rst` (active high,
// asynchronous) clears the register. `y` is combinational in `a` and the
// register.
module sto_square (
  input  logic clk,
  input  logic rst,
  input  logic a,
  output logic y
);
  logic a_d;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) a_d <= 1'b0;
    else     a_d <= a;
  end

  assign y = a & a_d;
endmodule
