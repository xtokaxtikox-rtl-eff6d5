// sto_mul - N-input stochastic multiplier.
//
// For independent streams the probability that all N bits are 1 is the
// product of their values, so the product is the AND of the inputs. Purely
// combinational: no clock, output valid in the same cycle. N = 3 is the
// published example.
module sto_mul #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] m,
  output logic         r
);
  assign r = &m;
endmodule
