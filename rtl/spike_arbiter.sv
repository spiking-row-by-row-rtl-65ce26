// spike_arbiter: round-robin choice of one output spike per clock among
// the convolution engines.
//
// An engine is eligible when it requests (req) and the queue its spike goes
// to has room (ok), so a full queue for one layer never blocks the engines of
// another. gnt is one-hot and combinational; the engine sees it as its
// sp_ready in the same cycle. After a grant the search starts just after the
// granted engine, so every eligible engine is served within N grants. The
// published text only names an output multiplexer; the round-robin policy
// is this design's choice.
module spike_arbiter #(
  parameter int unsigned N = 64,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic [N-1:0]  ok,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx,
  output logic          gnt_any
);

  logic [IW-1:0] last;      // most recently granted engine
  logic [N-1:0]  elig;
  int unsigned   idx;

  assign elig = req & ok;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    gnt_any = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last) + k) % N;
      if (!gnt_any && elig[idx]) begin
        gnt_any  = 1'b1;
        gnt_idx  = IW'(idx);
        gnt[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       last <= IW'(N - 1);
    else if (gnt_any) last <= gnt_idx;
  end

`ifndef SYNTHESIS
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) ((gnt & ~elig) == '0));
`endif

endmodule
