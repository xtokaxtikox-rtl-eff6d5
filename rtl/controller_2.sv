// controller_2 - on-off stochastic controller with threshold (Controller II).
//
// Each channel has a CNT_W-bit two's-complement up/down counter. On a clock
// where exactly one of the sensor stream i and the threshold stream thr is
// 1 the counter moves: up if it was i, down if it was thr (enable = i XOR
// thr, direction = i). Over time the count drifts by (i - thr) per clock,
// so its sign tells which stream encodes the larger value. The output is the
// counter's MSb: 1 while the input is below the threshold (motor on).
//
// Interface: `clk`, `rst` (active high, asynchronous, clears the counters
// to zero), `i` = {i2, i1}, `thr` shared by both channels, `o` = {o2, o1}
// (registered MSbs). The counter saturates at its most positive and most
// negative values, so a long run cannot wrap round and flip the sign. The
// counter, its enable and direction, and the MSb output follow the
// published circuit; the width and the saturation are this design's own.
module controller_2 #(
  parameter int unsigned CNT_W = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] i,
  input  logic       thr,
  output logic [1:0] o
);
  localparam logic signed [CNT_W-1:0] MAXV = {1'b0, {(CNT_W-1){1'b1}}};
  localparam logic signed [CNT_W-1:0] MINV = {1'b1, {(CNT_W-1){1'b0}}};

  logic signed [CNT_W-1:0] cnt [2];

  for (genvar k = 0; k < 2; k++) begin : g_ch
    logic en, up;
    assign en = i[k] ^ thr;
    assign up = i[k];

    always_ff @(posedge clk or posedge rst) begin
      if (rst)
        cnt[k] <= '0;
      else if (en) begin
        if (up && cnt[k] != MAXV)
          cnt[k] <= cnt[k] + 1'b1;
        else if (!up && cnt[k] != MINV)
          cnt[k] <= cnt[k] - 1'b1;
      end
    end

    assign o[k] = cnt[k][CNT_W-1];
  end
endmodule
