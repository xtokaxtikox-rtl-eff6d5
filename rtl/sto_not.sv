// sto_not - stochastic complement.
//
// A stream encoding A is inverted bit by bit, giving a stream that encodes
// 1 - A. Combinational, no clock. This is the published complement unit.
module sto_not (
  input  logic a,
  output logic y
);
  assign y = ~a;
endmodule
