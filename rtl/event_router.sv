// event_router: output multiplexer that sends each engine spike onwards.
//
// A spike arrives with the layer of the engine that produced it. Its
// address is pooled (x/2, y/2) if that layer has pooling enabled. If the
// layer is the last configured one (layer number >= last_layer) the spike
// goes, with its engine id, to the AER output queue; otherwise its pooled
// (x,y) goes to the event queue of the next layer, where every engine of
// that layer will convolve it. dest_ok tells, per source layer, whether the
// destination queue has room, for the arbiter. Combinational.
// The routing rule (engine id plus layer mask choosing between next layer
// and AER output, pooling before the choice) follows the published event
// routing figure; the queues and dest_ok handshake are this design's.
module event_router
  import snn_pkg::*;
#(
  parameter int unsigned N_LAYERS = 2
) (
  input  logic                in_valid,
  input  spike_t              in_spike,
  input  layer_t              in_layer,
  input  logic [N_LAYERS-1:0] pool_en,
  input  layer_t              last_layer,
  input  logic [N_LAYERS-1:0] layer_full,
  input  logic                out_full,
  output logic [N_LAYERS-1:0] dest_ok,
  output logic [N_LAYERS-1:0] layer_push,
  output event_t              layer_din,
  output logic                out_push,
  output spike_t              out_din
);

  event_t pooled;
  logic   to_out;
  logic   pen;

  always_comb begin
    pen = 1'b0;
    for (int l = 0; l < N_LAYERS; l++)
      if (in_layer == layer_t'(l)) pen = pool_en[l];
  end

  event_pool u_pool (
    .en(pen), .ev_in('{y: in_spike.y, x: in_spike.x}), .ev_out(pooled)
  );

  function automatic logic is_last(layer_t l, layer_t lastl);
    return (l >= lastl) || (int'(l) >= int'(N_LAYERS) - 1);
  endfunction

  always_comb begin
    for (int l = 0; l < N_LAYERS; l++) begin
      if (is_last(layer_t'(l), last_layer)) dest_ok[l] = !out_full;
      else                                  dest_ok[l] = !layer_full[(l + 1) % N_LAYERS];
    end
    to_out     = is_last(in_layer, last_layer);
    layer_din  = pooled;
    out_din    = '{ceid: in_spike.ceid, y: pooled.y, x: pooled.x};
    out_push   = in_valid && to_out;
    layer_push = '0;
    for (int l = 1; l < N_LAYERS; l++)
      if (in_valid && !to_out && (int'(in_layer) + 1 == l)) layer_push[l] = 1'b1;
  end

endmodule
