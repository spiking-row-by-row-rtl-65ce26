// config_regs: host configuration registers behind the 32-bit bus.
//
// A host processor writes 32-bit words (cfg_we, cfg_addr, cfg_wdata; one
// word per cycle, no wait states) and reads them back one cycle after
// presenting cfg_addr. Register map (word addresses, see snn_pkg):
//   0x0000 CTRL   [0] enable event processing, [1] clear all neurons
//                 (write 1, self-clearing pulse), [6:4] index of the last
//                 active layer
//   0x0001/2      leakage / refractory counter prescaler (cycles per tick)
//   0x0003 STATUS read only: [0] an engine is busy, [1] neurons being cleared
//   0x0010+4l     layer l bank: +0 threshold, +1 leakage, +2 refractory
//                 period, +3 {[3] pooling, [2:0] kernel size}
//   0x0100+e      layer mask entry of engine e
//   0x1000+64e+i  kernel weight i = 7*row+col of engine e (write only,
//                 passed straight to the engine on wt_*)
// Reset: processing disabled, all layers active, prescalers 1, every engine
// in layer 0, layer banks at threshold 1, no leakage, no refractory period,
// 1x1 kernel, no pooling.
// The 32-bit host bus, the layer mask and the per-layer parameter banks are
// the published design; the register map and reset values are this
// design's choice.
module config_regs
  import snn_pkg::*;
#(
  parameter int unsigned N_CE     = 64,
  parameter int unsigned N_LAYERS = 2,
  parameter int unsigned KMAX     = 7,
  localparam int unsigned WAW     = $clog2(KMAX * KMAX)
) (
  input  logic           clk,
  input  logic           rst_n,
  // host bus
  input  logic           cfg_we,
  input  logic [15:0]    cfg_addr,
  input  logic [31:0]    cfg_wdata,
  output logic [31:0]    cfg_rdata,
  // status
  input  logic           st_busy,
  input  logic           st_clearing,
  // configuration
  output logic           enable,
  output logic           clear,
  output layer_t         last_layer,
  output logic [PSW-1:0] leak_ps,
  output logic [PSW-1:0] ref_ps,
  output layer_params_t  lp [N_LAYERS],
  output layer_t         ml [N_CE],
  output logic           wt_we,
  output logic [CEW-1:0] wt_ce,
  output logic [WAW-1:0] wt_addr,
  output logic [WW-1:0]  wt_data
);

  localparam logic [15:0] WT_END = A_WEIGHT + 16'(64 * N_CE);

  logic [15:0] wofs;
  assign wofs = cfg_addr - A_WEIGHT;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      enable     <= 1'b0;
      clear      <= 1'b0;
      last_layer <= layer_t'(N_LAYERS - 1);
      leak_ps    <= PSW'(1);
      ref_ps     <= PSW'(1);
      for (int l = 0; l < N_LAYERS; l++)
        lp[l] <= '{thresh: VW'(1), leak: '0, refrac: '0, ksize: KW'(1), pool: 1'b0};
      for (int e = 0; e < N_CE; e++) ml[e] <= '0;
    end else begin
      clear <= 1'b0;
      if (cfg_we) begin
        if (cfg_addr == A_CTRL) begin
          enable     <= cfg_wdata[0];
          clear      <= cfg_wdata[1];
          last_layer <= cfg_wdata[4 +: LIDW];
        end
        if (cfg_addr == A_LEAK_PS) leak_ps <= cfg_wdata[PSW-1:0];
        if (cfg_addr == A_REF_PS)  ref_ps  <= cfg_wdata[PSW-1:0];
        for (int l = 0; l < N_LAYERS; l++) begin
          if (cfg_addr == A_LAYER + 16'(4 * l))     lp[l].thresh <= cfg_wdata[VW-1:0];
          if (cfg_addr == A_LAYER + 16'(4 * l + 1)) lp[l].leak   <= cfg_wdata[VW-1:0];
          if (cfg_addr == A_LAYER + 16'(4 * l + 2)) lp[l].refrac <= cfg_wdata[TSW-1:0];
          if (cfg_addr == A_LAYER + 16'(4 * l + 3)) begin
            lp[l].ksize <= cfg_wdata[KW-1:0];
            lp[l].pool  <= cfg_wdata[KW];
          end
        end
        for (int e = 0; e < N_CE; e++)
          if (cfg_addr == A_MASK + 16'(e)) ml[e] <= cfg_wdata[LIDW-1:0];
      end
    end
  end

  // weight writes go straight to the engines
  always_comb begin
    wt_we   = cfg_we && (cfg_addr >= A_WEIGHT) && (cfg_addr < WT_END)
              && (wofs[5:0] < 6'(KMAX * KMAX));
    wt_ce   = CEW'(wofs[15:6]);
    wt_addr = WAW'(wofs[5:0]);
    wt_data = cfg_wdata[WW-1:0];
  end

  // read back
  always_ff @(posedge clk) begin
    if (!rst_n) cfg_rdata <= '0;
    else begin
      cfg_rdata <= '0;
      if (cfg_addr == A_CTRL)    cfg_rdata <= 32'({last_layer, 3'b000, enable});
      if (cfg_addr == A_LEAK_PS) cfg_rdata <= 32'(leak_ps);
      if (cfg_addr == A_REF_PS)  cfg_rdata <= 32'(ref_ps);
      if (cfg_addr == A_STATUS)  cfg_rdata <= 32'({st_clearing, st_busy});
      for (int l = 0; l < N_LAYERS; l++) begin
        if (cfg_addr == A_LAYER + 16'(4 * l))     cfg_rdata <= 32'(unsigned'(lp[l].thresh));
        if (cfg_addr == A_LAYER + 16'(4 * l + 1)) cfg_rdata <= 32'(lp[l].leak);
        if (cfg_addr == A_LAYER + 16'(4 * l + 2)) cfg_rdata <= 32'(lp[l].refrac);
        if (cfg_addr == A_LAYER + 16'(4 * l + 3)) cfg_rdata <= 32'({lp[l].pool, lp[l].ksize});
      end
      for (int e = 0; e < N_CE; e++)
        if (cfg_addr == A_MASK + 16'(e)) cfg_rdata <= 32'(ml[e]);
    end
  end

endmodule
