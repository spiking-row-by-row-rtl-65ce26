// event_pool: pooling of an output event before it leaves its layer.
//
// With pooling enabled the event address is divided by two in both
// directions (x/2, y/2), so a 2x2 block of neurons maps onto one neuron of
// the next layer; disabled, the event passes unchanged. Purely
// combinational. The halving follows the published routing figure; making
// it a per-layer enable is this design's choice.
module event_pool
  import snn_pkg::*;
(
  input  logic   en,
  input  event_t ev_in,
  output event_t ev_out
);

  always_comb begin
    ev_out = ev_in;
    if (en) begin
      ev_out.x = ev_in.x >> 1;
      ev_out.y = ev_in.y >> 1;
    end
  end

endmodule
