// scnn_top: multi-kernel, multi-layer spiking convolution processor.
//
// N_CE convolution engines, each holding one IMG_W x IMG_H map of leaky
// integrate-and-fire neurons, are grouped into up to N_LAYERS layers by a
// host-written layer mask. Each engine picks its layer's parameters
// (threshold, leakage, refractory period, kernel size, pooling) through its
// own param_select multiplexer, so layers with different kernel sizes run
// side by side. Events enter on a four-phase AER port and queue in front of
// layer 0; every engine of a layer convolves each event of the layer's
// queue. Engine spikes are picked one per clock by a round-robin arbiter,
// pooled if the layer says so, and routed by the source layer: to the
// queue of the next layer as (x,y), or, from the last active layer, to the
// AER output queue as {engine id, y, x}. Two global counters give time for
// leakage and refractory period.
//
// Ports: clk/rst_n (synchronous, active low); the host bus cfg_* (see
// config_regs for the register map); aer_in_* and aer_out_* four-phase AER
// ports, input address {y,x} (14 bits), output {ceid,y,x} (20 bits).
// Timing: an event costs an engine K*IMG_W+2 cycles; a layer takes its next
// event when all its engines are idle. Spikes waiting for the arbiter stall
// their engine; a full queue stalls the engines that feed it and, for layer
// 0, holds back the AER input acknowledge.
//
// From the published design: 64 engines in 2 layers on a 128x128 map,
// kernels up to 7x7, layer mask, per-layer parameter banks selected per
// engine, routing by engine id and layer to the next layer or the AER
// output with pooling, 32-bit host bus, four-phase AER in and out, two
// global counters. The queues, arbiter, dispatch rule and register map are
// this design's own.
module scnn_top
  import snn_pkg::*;
#(
  parameter int unsigned N_CE       = 64,
  parameter int unsigned N_LAYERS   = 2,
  parameter int unsigned IMG_W      = 128,
  parameter int unsigned IMG_H      = 128,
  parameter int unsigned KMAX       = 7,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // host configuration bus
  input  logic        cfg_we,
  input  logic [15:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  // AER input
  input  logic        aer_in_req,
  input  event_t      aer_in_data,
  output logic        aer_in_ack,
  // AER output
  output logic        aer_out_req,
  output spike_t      aer_out_data,
  input  logic        aer_out_ack
);

  localparam int unsigned WAW = $clog2(KMAX * KMAX);
  localparam int unsigned IW  = (N_CE > 1) ? $clog2(N_CE) : 1;

  // configuration
  logic           enable, clear;
  layer_t         last_layer;
  logic [PSW-1:0] leak_ps, ref_ps;
  layer_params_t  lp [N_LAYERS];
  layer_t         ml [N_CE];
  logic           wt_we;
  logic [CEW-1:0] wt_ce;
  logic [WAW-1:0] wt_addr;
  logic [WW-1:0]  wt_data;

  // time
  logic [TSW-1:0] now_leak, now_ref;
  logic           ep_leak, ep_ref, leak_wrap, ref_wrap;

  // engines
  logic [N_CE-1:0] ce_busy, ce_clearing, ce_start, sp_valid, sp_ready;
  spike_t          sp [N_CE];
  layer_params_t   prm [N_CE];

  // layer queues
  logic [N_LAYERS-1:0] q_push, q_pop, q_full, q_empty;
  event_t              q_din [N_LAYERS];
  event_t              q_dout [N_LAYERS];
  logic [N_CE-1:0]     start_l [N_LAYERS];

  // arbitration / routing
  logic [N_CE-1:0]     ce_ok;
  logic [IW-1:0]       gnt_idx;
  logic                gnt_any;
  logic [N_LAYERS-1:0] dest_ok, r_layer_push, pool_en;
  event_t              r_layer_din;
  logic                out_push, out_full, out_empty, out_pop;
  spike_t              out_din, out_dout;

  // AER input
  logic   rx_valid;
  event_t rx_data;

  config_regs #(.N_CE(N_CE), .N_LAYERS(N_LAYERS), .KMAX(KMAX)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .st_busy(|ce_busy), .st_clearing(|ce_clearing),
    .enable, .clear, .last_layer, .leak_ps, .ref_ps, .lp, .ml,
    .wt_we, .wt_ce, .wt_addr, .wt_data
  );

  global_counters u_time (
    .clk, .rst_n, .run(enable), .leak_prescale(leak_ps), .ref_prescale(ref_ps),
    .now_leak, .ep_leak, .leak_wrap, .now_ref, .ep_ref, .ref_wrap
  );

  aer_rx #(.DW($bits(event_t))) u_rx (
    .clk, .rst_n, .req(aer_in_req), .data(aer_in_data), .ack(aer_in_ack),
    .ev_valid(rx_valid), .ev_data(rx_data), .ev_ready(!q_full[0])
  );

  // ------------------------------------------------------------ layers
  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    if (l == 0) begin : g_src_aer
      assign q_push[l] = rx_valid;
      assign q_din[l]  = rx_data;
    end else begin : g_src_prev
      assign q_push[l] = r_layer_push[l];
      assign q_din[l]  = r_layer_din;
    end

    event_fifo #(.WIDTH($bits(event_t)), .DEPTH(FIFO_DEPTH)) u_q (
      .clk, .rst_n, .push(q_push[l]), .din(q_din[l]), .pop(q_pop[l]),
      .dout(q_dout[l]), .full(q_full[l]), .empty(q_empty[l]),
      .count()
    );

    layer_dispatch #(.N_CE(N_CE), .LAYER(l)) u_disp (
      .enable(enable && !(|ce_clearing) && !clear), .ml, .ce_busy,
      .q_empty(q_empty[l]), .q_pop(q_pop[l]), .start(start_l[l])
    );

    assign pool_en[l] = lp[l].pool;
  end

  always_comb begin
    ce_start = '0;
    for (int l = 0; l < N_LAYERS; l++) ce_start |= start_l[l];
  end

  // ------------------------------------------------------------ engines
  for (genvar i = 0; i < N_CE; i++) begin : g_ce
    event_t ev_i;

    param_select #(.N_LAYERS(N_LAYERS)) u_psel (
      .lp, .mls(ml[i]), .prm(prm[i])
    );

    always_comb begin
      ev_i = q_dout[0];
      for (int l = 0; l < N_LAYERS; l++)
        if (ml[i] == layer_t'(l)) ev_i = q_dout[l];
    end

    conv_engine #(.IMG_W(IMG_W), .IMG_H(IMG_H), .KMAX(KMAX)) u_ce (
      .clk, .rst_n, .ce_id(CEW'(i)), .prm(prm[i]),
      .now_leak, .ep_leak, .now_ref, .ep_ref,
      .clear, .start(ce_start[i]), .ev(ev_i),
      .busy(ce_busy[i]), .clearing(ce_clearing[i]),
      .wt_we(wt_we && (wt_ce == CEW'(i))), .wt_addr, .wt_data,
      .sp_valid(sp_valid[i]), .sp_ready(sp_ready[i]), .sp(sp[i])
    );

    always_comb begin
      ce_ok[i] = 1'b0;
      for (int l = 0; l < N_LAYERS; l++)
        if (ml[i] == layer_t'(l)) ce_ok[i] = dest_ok[l];
    end
  end

  // ------------------------------------------------------------ output path
  spike_arbiter #(.N(N_CE)) u_arb (
    .clk, .rst_n, .req(sp_valid), .ok(ce_ok), .gnt(sp_ready),
    .gnt_idx, .gnt_any
  );

  event_router #(.N_LAYERS(N_LAYERS)) u_route (
    .in_valid(gnt_any), .in_spike(sp[gnt_idx]), .in_layer(ml[gnt_idx]),
    .pool_en, .last_layer, .layer_full(q_full), .out_full,
    .dest_ok, .layer_push(r_layer_push), .layer_din(r_layer_din),
    .out_push, .out_din
  );

  event_fifo #(.WIDTH($bits(spike_t)), .DEPTH(FIFO_DEPTH)) u_outq (
    .clk, .rst_n, .push(out_push), .din(out_din), .pop(out_pop),
    .dout(out_dout), .full(out_full), .empty(out_empty), .count()
  );

  aer_tx #(.DW($bits(spike_t))) u_tx (
    .clk, .rst_n, .in_valid(!out_empty), .in_data(out_dout), .in_ready(out_pop),
    .req(aer_out_req), .data(aer_out_data), .ack(aer_out_ack)
  );

endmodule
