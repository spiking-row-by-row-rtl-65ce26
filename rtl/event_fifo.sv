// event_fifo: synchronous first-in first-out queue for events.
//
// Queues sit in front of each layer (input events waiting for the layer's
// engines) and in front of the AER output. push writes din when not full;
// pop removes the head when not empty; dout always shows the head. A push
// and a pop in the same cycle are both honoured. Depth must be a power of
// two. The queues are this design's choice: the published text does not say
// how events wait between layers.
module event_fifo #(
  parameter int unsigned WIDTH = 14,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;
  logic do_push, do_pop;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign count   = wp - rp;
  assign dout    = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wp[AW-1:0]] <= din;

endmodule
