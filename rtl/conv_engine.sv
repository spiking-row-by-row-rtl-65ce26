// conv_engine: event-driven spiking convolution engine (one feature map).
//
// The engine owns the leaky integrate-and-fire neurons of one IMG_W x IMG_H
// feature map. For an input event at (x,y) it adds a KxK kernel, centred on
// the event, to the membrane potentials, reading the neuron array row by
// row: for each of the K kernel rows it streams the whole image row y-off+r
// (off = (K-1)/2) through a two-stage read-modify-write pipeline, one
// neuron per clock. Every neuron of a visited row is brought up to date:
// leakage since its leakage timestamp is removed (linear decay towards zero
// by `leak` per leakage tick) and the timestamp is renewed. Neurons inside
// the kernel window that are not refractory then add their weight
// (saturating); a neuron reaching the threshold fires: its potential returns
// to zero, its refractory timestamp is set, and a spike {ce_id,y,x} is
// offered on sp_valid/sp_ready. Rows outside the map are passed over in the
// same time, so an event always costs K*IMG_W + 2 cycles from the start
// pulse to busy falling (130 cycles for 1x1 and 898 for 7x7 at 128 columns,
// i.e. 1.44 us and 9.98 us at 90 MHz).
//
// Timestamps are TSW-bit copies of the global counters; an overflow flag
// per neuron and per counter (ovf_flag_ram) adds 2^TSW to the elapsed time
// when the counter has wrapped once since the timestamp was written. A
// neuron that is not refractory when visited gets its refractory timestamp
// refreshed as "one overflow ago" so it stays non-refractory. Every neuron
// must therefore be visited (or spike) at least once per counter period.
// Counter values are sampled when the event starts and used for the whole
// event.
//
// Back-pressure: while a spike waits with sp_ready low the pipeline stalls
// (sp_valid/sp stay stable). A `clear` pulse in idle sweeps the whole neuron
// memory (IMG_W*IMG_H cycles) to potential zero, not refractory. Weights are
// written through wt_* at index KMAX*r + c (kernel row r, column c).
//
// From the published design: LIF neurons with leakage and refractory
// period, state and weights in block RAM, row-by-row access, timestamps
// against global counters with overflow flags, threshold spike carrying the
// engine id, kernels 1x1..7x7, and the latency figures (reproduced by
// scanning full rows). Linear leakage, the refresh rule, the stall and the
// clear sweep are this design's own choices.
module conv_engine
  import snn_pkg::*;
#(
  parameter int unsigned IMG_W = 128,
  parameter int unsigned IMG_H = 128,
  parameter int unsigned KMAX  = 7,
  localparam int unsigned NN   = IMG_W * IMG_H,
  localparam int unsigned AW   = $clog2(NN),
  localparam int unsigned WAW  = $clog2(KMAX * KMAX),
  localparam int unsigned XW   = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned YW   = (IMG_H > 1) ? $clog2(IMG_H) : 1,
  localparam int unsigned SW   = ((XW > YW) ? XW : YW) + 3   // signed row/column offsets
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [CEW-1:0] ce_id,
  input  layer_params_t  prm,
  // global counters
  input  logic [TSW-1:0] now_leak,
  input  logic           ep_leak,
  input  logic [TSW-1:0] now_ref,
  input  logic           ep_ref,
  // control
  input  logic           clear,
  input  logic           start,
  input  event_t         ev,
  output logic           busy,
  output logic           clearing,
  // weight write
  input  logic           wt_we,
  input  logic [WAW-1:0] wt_addr,
  input  logic [WW-1:0]  wt_data,
  // output spikes
  output logic           sp_valid,
  input  logic           sp_ready,
  output spike_t         sp
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN} state_t;
  state_t state;

  // event context, sampled at start
  event_t         ev_q;
  logic [TSW-1:0] t_leak, t_ref;
  logic           e_leak, e_ref;
  logic [KW-1:0]  ksz, off;

  // stage 0: read issue
  logic           s0_act;
  logic [KW-1:0]  r_cnt;
  logic [XW-1:0]  c_cnt;
  logic signed [SW-1:0] row0, kc0;
  logic           rowok0, inwin0, last0;
  logic [AW-1:0]  raddr0;
  logic [WAW-1:0] waddr0;
  logic           issue;

  // stage 1: compute / write back
  logic           s1_valid, s1_rowok, s1_inwin;
  logic [AW-1:0]  s1_addr;
  coord_t         s1_row, s1_col;
  logic           stall, s1_done;

  // clear sweep
  logic [AW-1:0]  clr_addr;

  // memories
  logic [NEURON_W-1:0] n_rdata;
  logic [WW-1:0]       w_rdata;
  logic                wr_leak_flag, wr_ref_flag;
  logic                n_we;
  logic [AW-1:0]       n_waddr;
  neuron_t             n_wdata;
  logic                fl_wrwrap_leak, fl_wrwrap_ref;

  // ---------------------------------------------------------------- stage 0
  always_comb begin
    if (prm.ksize == '0)                ksz = KW'(1);
    else if (int'(prm.ksize) > int'(KMAX)) ksz = KW'(KMAX);
    else                                  ksz = prm.ksize;
    off    = (ksz - KW'(1)) >> 1;
    row0   = SW'(ev_q.y) + SW'(r_cnt) - SW'(off);
    kc0    = SW'(c_cnt) - SW'(ev_q.x) + SW'(off);
    rowok0 = (row0 >= 0) && (row0 < SW'(IMG_H));
    inwin0 = rowok0 && (kc0 >= 0) && (kc0 < SW'(ksz));
    raddr0 = rowok0 ? AW'(row0[SW-2:0] * (SW-1)'(IMG_W) + (SW-1)'(c_cnt)) : '0;
    waddr0 = inwin0 ? WAW'(r_cnt * KW'(KMAX) + KW'(kc0)) : '0;
    last0  = (r_cnt == ksz - KW'(1)) && (c_cnt == XW'(IMG_W - 1));
    issue  = (state == S_RUN) && s0_act && !stall;
  end

  // ---------------------------------------------------------------- stage 1
  neuron_t n_old, n_new;
  logic    fire, refractory, integrate;
  logic [TSW:0]    el_leak, el_ref;
  logic [TSW+VW:0] decay;
  logic signed [VW-1:0] v_leaked, v_int;
  logic [VW:0]     v_mag;

  always_comb begin
    n_old   = neuron_t'(n_rdata);
    el_leak = {wr_leak_flag, t_leak} - {1'b0, n_old.ts_leak};
    el_ref  = {wr_ref_flag,  t_ref}  - {1'b0, n_old.ts_ref};
    decay   = el_leak * prm.leak;
    v_mag   = n_old.v[VW-1] ? (VW+1)'(-(VW+1)'(n_old.v)) : (VW+1)'(n_old.v);
    if ((TSW+VW+1)'(v_mag) <= decay) v_leaked = '0;
    else if (n_old.v[VW-1])          v_leaked = n_old.v + VW'(decay);
    else                             v_leaked = n_old.v - VW'(decay);
    refractory = (el_ref < (TSW+1)'(prm.refrac));
    integrate  = s1_inwin && !refractory;
    v_int      = integrate ? sat_add(v_leaked, w_rdata) : v_leaked;
    fire       = integrate && (v_int >= prm.thresh);

    n_new.v       = fire ? '0 : v_int;
    n_new.ts_leak = t_leak;
    n_new.ts_ref  = (refractory && !fire) ? n_old.ts_ref : t_ref;
    // leakage flag: fresh; refractory flag: fresh on a spike, unchanged while
    // refractory, "one overflow ago" once the period is over
    fl_wrwrap_ref = fire ? 1'b0 : (refractory ? wr_ref_flag : 1'b1);
  end

  assign stall    = s1_valid && s1_rowok && fire && !sp_ready;
  assign s1_done  = s1_valid && !stall;
  assign sp_valid = s1_valid && s1_rowok && fire;
  assign sp       = '{ceid: ce_id, y: s1_row, x: s1_col};

  // ---------------------------------------------------------- write port mux
  always_comb begin
    if (state == S_CLEAR) begin
      n_we           = 1'b1;
      n_waddr        = clr_addr;
      n_wdata        = '{v: '0, ts_leak: t_leak, ts_ref: t_ref};
      fl_wrwrap_leak = 1'b0;
    end else begin
      n_we           = s1_done && s1_rowok;
      n_waddr        = s1_addr;
      n_wdata        = n_new;
      fl_wrwrap_leak = 1'b0;
    end
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      s0_act   <= 1'b0;
      s1_valid <= 1'b0;
      r_cnt    <= '0;
      c_cnt    <= '0;
      clr_addr <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (clear) begin
            state    <= S_CLEAR;
            clr_addr <= '0;
          end else if (start) begin
            state  <= S_RUN;
            s0_act <= 1'b1;
            r_cnt  <= '0;
            c_cnt  <= '0;
          end
        end
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == AW'(NN - 1)) state <= S_IDLE;
        end
        S_RUN: begin
          if (issue) begin
            if (c_cnt == XW'(IMG_W - 1)) begin
              c_cnt <= '0;
              r_cnt <= r_cnt + 1'b1;
            end else begin
              c_cnt <= c_cnt + 1'b1;
            end
            if (last0) s0_act <= 1'b0;
          end
          if (!stall) s1_valid <= issue;
          if (!s0_act && s1_done) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // event context and stage-1 bookkeeping
  always_ff @(posedge clk) begin
    if (state == S_IDLE) begin
      ev_q   <= ev;
      t_leak <= now_leak;
      t_ref  <= now_ref;
      e_leak <= ep_leak;
      e_ref  <= ep_ref;
    end
    if (issue) begin
      s1_addr  <= raddr0;
      s1_rowok <= rowok0;
      s1_inwin <= inwin0;
      s1_row   <= coord_t'(row0);
      s1_col   <= coord_t'(c_cnt);
    end
  end

  assign busy     = (state != S_IDLE);
  assign clearing = (state == S_CLEAR);

  // ---------------------------------------------------------------- memories
  sdp_ram #(.WIDTH(NEURON_W), .DEPTH(NN)) u_neurons (
    .clk, .we(n_we), .waddr(n_waddr), .wdata(n_wdata),
    .re(issue), .raddr(raddr0), .rdata(n_rdata)
  );

  sdp_ram #(.WIDTH(WW), .DEPTH(KMAX * KMAX)) u_weights (
    .clk, .we(wt_we), .waddr(wt_addr), .wdata(wt_data),
    .re(issue), .raddr(waddr0), .rdata(w_rdata)
  );

  ovf_flag_ram #(.DEPTH(NN)) u_leak_flags (
    .clk, .cur_epoch(e_leak), .we(n_we), .waddr(n_waddr),
    .wr_wrapped(fl_wrwrap_leak), .re(issue), .raddr(raddr0), .wrapped(wr_leak_flag)
  );

  ovf_flag_ram #(.DEPTH(NN)) u_ref_flags (
    .clk, .cur_epoch(e_ref), .we(n_we), .waddr(n_waddr),
    .wr_wrapped((state == S_CLEAR) ? 1'b1 : fl_wrwrap_ref), .re(issue), .raddr(raddr0),
    .wrapped(wr_ref_flag)
  );

endmodule
