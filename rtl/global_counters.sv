// global_counters: the two global time bases of the processor, one for
// leakage and one for the refractory period.
//
// Each counter advances by one every `prescale` clock cycles (a prescale of
// 0 or 1 means every cycle) while `run` is high, wraps at 2^TSW, and toggles
// its epoch bit when it wraps; the engines compare these counts with the
// timestamps they store per neuron, and the epoch bit feeds the overflow
// flags. `*_wrap` pulses for one cycle at each overflow. Two counters follow
// the published design; prescalers, width and epoch bits are this design's
// choice. Synchronous active-low reset clears both counters and epochs.
module global_counters
  import snn_pkg::*;
#(
  parameter int unsigned TW = TSW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  logic [PSW-1:0] leak_prescale,
  input  logic [PSW-1:0] ref_prescale,
  output logic [TW-1:0]  now_leak,
  output logic           ep_leak,
  output logic           leak_wrap,
  output logic [TW-1:0]  now_ref,
  output logic           ep_ref,
  output logic           ref_wrap
);

  logic [PSW-1:0] div_leak, div_ref;
  logic tick_leak, tick_ref;

  assign tick_leak = run && (div_leak + 1'b1 >= leak_prescale);
  assign tick_ref  = run && (div_ref  + 1'b1 >= ref_prescale);
  assign leak_wrap = tick_leak && (&now_leak);
  assign ref_wrap  = tick_ref  && (&now_ref);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_leak <= '0; div_ref <= '0;
      now_leak <= '0; now_ref <= '0;
      ep_leak  <= 1'b0; ep_ref <= 1'b0;
    end else begin
      if (run) begin
        div_leak <= tick_leak ? '0 : div_leak + 1'b1;
        div_ref  <= tick_ref  ? '0 : div_ref  + 1'b1;
      end
      if (tick_leak) now_leak <= now_leak + 1'b1;
      if (tick_ref)  now_ref  <= now_ref  + 1'b1;
      if (leak_wrap) ep_leak  <= ~ep_leak;
      if (ref_wrap)  ep_ref   <= ~ep_ref;
    end
  end

endmodule
