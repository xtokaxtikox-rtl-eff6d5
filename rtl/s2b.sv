// s2b - stochastic-to-binary converter.
//
// Two W-bit counters: `ones` counts the clocks on which `stream` is 1 and
// `total` counts every clock. The encoded value is ones / total. When
// `total` reaches its maximum both counters stop and `full` is raised, so
// the ratio stays valid; `rst` (active high, asynchronous) clears them for
// the next measurement. Both counters update on the same clock edge, so a
// bit sampled at edge k is included in the values seen after edge k.
//
// The two-counter structure follows the published converter; the width and
// the stop-when-full rule are this design's own.
module s2b #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         stream,
  output logic [W-1:0] ones,
  output logic [W-1:0] total,
  output logic         full
);
  assign full = (total == '1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ones  <= '0;
      total <= '0;
    end else if (!full) begin
      total <= total + 1'b1;
      if (stream) ones <= ones + 1'b1;
    end
  end
endmodule
