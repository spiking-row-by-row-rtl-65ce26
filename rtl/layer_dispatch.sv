// layer_dispatch: starts the engines of one layer on its next event.
//
// The engines whose layer-mask entry equals LAYER form the layer; they share
// a kernel size and therefore run in step. When processing is enabled, the
// layer's event queue is not empty and none of its engines is busy, the head
// event is popped and every engine of the layer gets a one-cycle start pulse
// with that event (combinational, same cycle as the pop). An event for a
// layer with no engines is popped and dropped. Grouping engines by the layer
// mask follows the published design; the all-idle start rule is this
// design's choice.
module layer_dispatch
  import snn_pkg::*;
#(
  parameter int unsigned N_CE  = 64,
  parameter int unsigned LAYER = 0
) (
  input  logic            enable,
  input  layer_t          ml [N_CE],
  input  logic [N_CE-1:0] ce_busy,
  input  logic            q_empty,
  output logic            q_pop,
  output logic [N_CE-1:0] start
);

  logic [N_CE-1:0] member;

  always_comb begin
    for (int i = 0; i < N_CE; i++) member[i] = (ml[i] == layer_t'(LAYER));
    q_pop = enable && !q_empty && ((member & ce_busy) == '0);
    start = q_pop ? member : '0;
  end

endmodule
