// sto_double - stochastic multiply-by-two.
//
// Every 1 in the input stream is repeated in the following bit: the output
// is the OR of the stream and the stream delayed by one clock,
// y[n] = a[n] | a[n-1]. For sparse streams this doubles the number of 1s;
// two 1s in a row give three, not four, so the result is approximate and
// saturates towards 1 as A approaches 0.5. This is the published unit; the
// delay is a register here, cleared by `rst` (active high, asynchronous).
module sto_double (
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

  assign y = a | a_d;
endmodule
