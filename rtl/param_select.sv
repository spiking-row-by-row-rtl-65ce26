// param_select: layer-parameter multiplexer of one convolution engine.
//
// The configuration holds one parameter bank per layer (threshold, leakage,
// refractory period, kernel size, pooling). The engine's entry of the layer
// mask (mls) selects which bank the engine uses, so engines of different
// layers run with different kernels and time constants at the same time.
// Combinational; an out-of-range layer number selects bank 0. This is the
// structure of the published parameter-selection figure, one mux per
// parameter per engine, widened to every per-layer parameter.
module param_select
  import snn_pkg::*;
#(
  parameter int unsigned N_LAYERS = 2
) (
  input  layer_params_t lp [N_LAYERS],
  input  layer_t        mls,
  output layer_params_t prm
);

  always_comb begin
    prm = lp[0];
    for (int l = 0; l < N_LAYERS; l++)
      if (mls == layer_t'(l)) prm = lp[l];
  end

endmodule
