// controller_1 - proportional stochastic controller (Controller I).
//
// For each of the two channels the sensor stream i is multiplied (AND) by
// the speed-limit stream c. When the activation input d is 1 the product
// is doubled by ORing it with itself delayed one clock. The result is
// inverted, so the output encodes about 1 - i*c (or 1 - 2*i*c with d): a
// dark sensor (large i) slows its motor, a light one lets it run. The
// inversion suits motor drivers that switch on with a low input.
//
//   o[k] = ~( p[k] | (d & p_d[k]) ),   p[k] = i[k] & c,  p_d = p delayed 1
//
// Interface: `clk`, `rst` (active high, asynchronous, clears the delay
// registers), `i` = {i2, i1}, `c`, `d`, `o` = {o2, o1}. The outputs are
// combinational in the inputs and the delay registers. The AND, the gated
// one-clock repeat and the final inversion follow the published circuit
// (whose equations give o = i*c; the published text and circuit add the
// inversion, which is kept here).
module controller_1 (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] i,
  input  logic       c,
  input  logic       d,
  output logic [1:0] o
);
  logic [1:0] p;
  logic [1:0] p_d;

  for (genvar k = 0; k < 2; k++) begin : g_ch
    sto_mul #(.N(2)) u_mul (.m({c, i[k]}), .r(p[k]));
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) p_d <= '0;
    else     p_d <= p;
  end

  assign o = ~(p | ({2{d}} & p_d));
endmodule
