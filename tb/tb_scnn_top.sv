// tb_scnn_top: end-to-end self-checking test of the whole processor at reduced size (4 engines, 16x16 map, queues of 4).
//
// Configures the processor over the host bus exactly as software would:
// two layers, engines 0..N/2-1 in layer 0 with 3x3 kernels and engines
// N/2..N-1 in layer 1 with 5x5 kernels, pooling on in both layers, random
// kernel weights, leakage and refractory period off (so the result does not
// depend on when each event is processed), then clears the neurons through
// the control register and enables processing. Events are sent on the AER
// input with the four-phase handshake; a slow AER receiver takes the output.
//
// Checking, with a neuron model kept in the testbench:
//   1. layer 0: every layer-0 engine convolves the input events in order;
//      the pooled (x/2,y/2) spikes must match, as a multiset, the events
//      the design queues for layer 1 (their order depends on arbitration);
//   2. layer 1: the model runs every layer-1 engine on those queued events
//      in queue order; its spikes, pooled and tagged with the engine id,
//      must match the AER output as a multiset.
// Mechanisms counted, each must happen at least once: engine stall on a
// busy output path, several engines spiking in the same cycle, a full layer
// queue, AER input back-pressure, a full output queue, routing to the next
// layer, routing to the AER output, a global counter overflow, the clear
// sweep, status read-back over the bus.
module tb_scnn_top;
  import snn_pkg::*;
  localparam int NCE = 4, NL = 2, W = 16, H = 16, KM = 7;
  localparam int NEV = 40;
  localparam int K0 = 3, K1 = 5, TH0 = 30, TH1 = 25;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [15:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic aer_in_req = 0, aer_in_ack;
  event_t aer_in_data = '0;
  logic aer_out_req, aer_out_ack = 0;
  spike_t aer_out_data;

  scnn_top #(.N_CE(4), .N_LAYERS(2), .IMG_W(16), .IMG_H(16), .KMAX(7), .FIFO_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------ model
  int wt [NCE][KM*KM];
  int V [NCE][H][W];

  // one event on one engine, leakage and refractory period off;
  // appends the engine's spikes to sx/sy in row-major order
  task automatic model_ce(int e, int x, int y, int K, int th, ref int sx[$], ref int sy[$]);
    int off, row, kc, v;
    off = (K - 1) / 2;
    for (int r = 0; r < K; r++) begin
      row = y + r - off;
      if (row < 0 || row >= H) continue;
      for (int dc = 0; dc < K; dc++) begin
        int c;
        c = x - off + dc;
        if (c < 0 || c >= W) continue;
        kc = dc;
        v = V[e][row][c] + wt[e][r*KM + kc];
        if (v > 127) v = 127;
        if (v < -128) v = -128;
        if (v >= th) begin v = 0; sx.push_back(c); sy.push_back(row); end
        V[e][row][c] = v;
      end
    end
  endtask

  // ------------------------------------------------------------ bus
  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic rd(logic [15:0] a, output logic [31:0] d);
    @(negedge clk); cfg_addr = a;
    @(negedge clk); d = cfg_rdata;
  endtask

  // ------------------------------------------------------------ observation
  int obs1 [$];      // events queued for layer 1, key = y*256+x
  int obs_out [$];   // AER output, key = (ceid*256+y)*256+x
  int n_stall = 0, n_multi = 0, n_qfull = 0, n_rx_bp = 0, n_ofull = 0, n_wrap = 0;
  int n_to_l1 = 0, n_to_out = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.q_push[1] && !dut.q_full[1]) begin
      obs1.push_back(int'(dut.q_din[1].y) * 256 + int'(dut.q_din[1].x));
      n_to_l1++;
    end
    if (dut.out_push && !dut.out_full) n_to_out++;
    if ((dut.sp_valid & ~dut.sp_ready) != '0) n_stall++;
    if (!$onehot0(dut.sp_valid)) n_multi++;
    if (dut.q_full != '0) n_qfull++;
    if (aer_in_req && !aer_in_ack && dut.q_full[0]) n_rx_bp++;
    if (dut.out_full) n_ofull++;
    if (dut.leak_wrap || dut.ref_wrap) n_wrap++;
  end

  // AER output receiver, deliberately slow
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (aer_out_req) begin
        obs_out.push_back((int'(aer_out_data.ceid) * 256 + int'(aer_out_data.y)) * 256 + int'(aer_out_data.x));
        repeat ($urandom_range(12)) @(posedge clk);
        #1 aer_out_ack = 1;
        wait (!aer_out_req);
        @(posedge clk); #1 aer_out_ack = 0;
      end
    end
  end

  // ------------------------------------------------------------ test
  int evx [NEV], evy [NEV];

  function automatic void chk_multiset(int a[$], int b[$], string what);
    a.sort(); b.sort();
    checks++;
    if (a.size() != b.size()) begin
      failures++; $display("FAIL %s: %0d observed, %0d expected", what, a.size(), b.size());
    end else begin
      for (int i = 0; i < a.size(); i++)
        if (a[i] != b[i]) begin failures++; $display("FAIL %s: item %0d differs", what, i); break; end
    end
    if (a.size() != b.size())
      for (int i = 0, j = 0; i < a.size() || j < b.size(); ) begin
        if (j >= b.size() || (i < a.size() && a[i] < b[j])) begin $display("  extra %h", a[i]); i++; end
        else if (i >= a.size() || b[j] < a[i]) begin $display("  missing %h", b[j]); j++; end
        else begin i++; j++; end
      end
  endfunction

  initial begin
    logic [31:0] d;
    int exp1 [$], expo [$];
    int sx [$], sy [$];
    int idle_cnt, n_clear_polls;

    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;

    // configuration
    wr(A_LEAK_PS, 32'd1);
    wr(A_REF_PS, 32'd1);
    wr(A_LAYER + 0, 32'(TH0)); wr(A_LAYER + 1, 0); wr(A_LAYER + 2, 0); wr(A_LAYER + 3, 32'(8 | K0));
    wr(A_LAYER + 4, 32'(TH1)); wr(A_LAYER + 5, 0); wr(A_LAYER + 6, 0); wr(A_LAYER + 7, 32'(8 | K1));
    for (int e = 0; e < NCE; e++) wr(A_MASK + 16'(e), (e < NCE / 2) ? 0 : 1);
    for (int e = 0; e < NCE; e++)
      for (int i = 0; i < KM*KM; i++) begin
        wt[e][i] = $urandom_range(25) - 5;
        wr(A_WEIGHT + 16'(64*e + i), 32'(wt[e][i]));
      end
    rd(A_MASK + 16'(NCE - 1), d);
    checks++;
    if (d != 1) begin failures++; $display("FAIL mask read-back"); end

    // clear all neurons, wait on the status register
    wr(A_CTRL, 32'h0000_0012);
    n_clear_polls = 0;
    do begin rd(A_STATUS, d); n_clear_polls++; end while (d[1]);
    checks++;
    if (n_clear_polls < 2) begin failures++; $display("FAIL clear sweep not seen"); end
    for (int e = 0; e < NCE; e++) for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) V[e][r][c] = 0;
    wr(A_CTRL, 32'h0000_0011);  // enable, last layer 1

    // events, clustered so the layers fire; sent back to back
    for (int k = 0; k < NEV; k++) begin
      evx[k] = W / 2 - 4 + $urandom_range(7);
      evy[k] = H / 2 - 4 + $urandom_range(7);
      @(negedge clk);
      aer_in_data.x = coord_t'(evx[k]); aer_in_data.y = coord_t'(evy[k]);
      #1 aer_in_req = 1;
      wait (aer_in_ack);
      #1 aer_in_req = 0;
      wait (!aer_in_ack);
    end

    // wait until nothing moves for a while
    idle_cnt = 0;
    while (idle_cnt < 3 * (K1 * W + 2) + 200) begin
      @(posedge clk);
      if (dut.ce_busy != '0 || dut.q_empty != '1 || !dut.out_empty || aer_out_req) idle_cnt = 0;
      else idle_cnt++;
    end

    // layer 0 model
    for (int k = 0; k < NEV; k++)
      for (int e = 0; e < NCE / 2; e++) begin
        sx.delete(); sy.delete();
        model_ce(e, evx[k], evy[k], K0, TH0, sx, sy);
        foreach (sx[i]) exp1.push_back((sy[i] / 2) * 256 + sx[i] / 2);
      end
    chk_multiset(obs1, exp1, "events into layer 1");

    // layer 1 model, on the queued events in queue order
    foreach (obs1[k])
      for (int e = NCE / 2; e < NCE; e++) begin
        sx.delete(); sy.delete();
        model_ce(e, obs1[k] % 256, obs1[k] / 256, K1, TH1, sx, sy);
        foreach (sx[i]) expo.push_back((e * 256 + sy[i] / 2) * 256 + sx[i] / 2);
      end
    chk_multiset(obs_out, expo, "AER output");

    $display("input events %0d, into layer 1 %0d, AER out %0d", NEV, n_to_l1, obs_out.size());
    $display("stall cycles %0d, simultaneous spikes %0d, layer queue full %0d, AER in back-pressure %0d, output queue full %0d, counter overflows %0d, clear polls %0d",
             n_stall, n_multi, n_qfull, n_rx_bp, n_ofull, n_wrap, n_clear_polls);
    checks++;
    if (n_stall == 0 || n_multi == 0 || n_qfull == 0 || n_rx_bp == 0 || n_ofull == 0 ||
        n_to_l1 == 0 || n_to_out == 0 || n_wrap == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
