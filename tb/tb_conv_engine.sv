// tb_conv_engine: self-checking test of one convolution engine on a 16x12
// map. A reference model in the testbench keeps every neuron's potential,
// last leakage time and last spike time as plain integers of absolute time
// (no wrap-around), and applies the same neuron rules: linear leakage of all
// neurons in the visited rows, refractory period, saturating weight add,
// fire-and-reset at threshold, spikes in row-major order. The engine sees
// only the 8-bit counters and epoch bits, and the time runs past a counter
// overflow. Checks:
//   - the cycle count of one event is K*IMG_W+2 for K = 1, 3, 5, 7;
//   - every output spike (engine id, x, y), in order, against the model,
//     with random back-pressure on sp_ready and random kernel sizes;
//   - sp_valid/sp stay stable while a spike waits.
// Mechanisms counted (each must occur): stall, refractory suppression,
// leakage, saturation, rows outside the map, counter overflow.
module tb_conv_engine;
  import snn_pkg::*;
  localparam int W = 16, H = 12, KM = 7;

  logic clk = 0, rst_n = 0;
  logic [CEW-1:0] ce_id = 6'd13;
  layer_params_t prm;
  logic [TSW-1:0] now_leak, now_ref;
  logic ep_leak, ep_ref;
  logic clear = 0, start = 0, busy, clearing;
  event_t ev;
  logic wt_we = 0;
  logic [5:0] wt_addr = 0;
  logic [WW-1:0] wt_data = 0;
  logic sp_valid, sp_ready = 1;
  spike_t sp;

  conv_engine #(.IMG_W(W), .IMG_H(H), .KMAX(KM)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------------------------------------------------------- time
  int T = 0;
  always_comb begin
    now_leak = TSW'(T % 256); ep_leak = 1'((T / 256) % 2);
    now_ref  = TSW'(T % 256); ep_ref  = 1'((T / 256) % 2);
  end

  // ---------------------------------------------------------------- model
  int V [H][W], lastT [H][W], spkT [H][W];
  int wt [KM*KM];
  spike_t expq [$];
  int n_refr = 0, n_leak = 0, n_sat = 0, n_oob = 0, n_stall = 0, n_spk = 0;

  function automatic int satv(int v);
    if (v > 127) begin n_sat++; return 127; end
    if (v < -128) begin n_sat++; return -128; end
    return v;
  endfunction

  task automatic model_event(int x, int y, int K);
    int off, row, kc, d, v;
    off = (K - 1) / 2;
    for (int r = 0; r < K; r++) begin
      row = y + r - off;
      if (row < 0 || row >= H) begin n_oob++; continue; end
      for (int c = 0; c < W; c++) begin
        v = V[row][c];
        d = (T - lastT[row][c]) * int'(prm.leak);
        if (d > 0 && v != 0) n_leak++;
        if ((v < 0 ? -v : v) <= d) v = 0; else v = (v < 0) ? v + d : v - d;
        lastT[row][c] = T;
        kc = c - x + off;
        if (kc >= 0 && kc < K) begin
          if (T - spkT[row][c] < int'(prm.refrac)) n_refr++;
          else begin
            v = satv(v + wt[r*KM + kc]);
            if (v >= int'(prm.thresh)) begin
              v = 0; spkT[row][c] = T;
              expq.push_back('{ceid: ce_id, y: coord_t'(row), x: coord_t'(c)});
            end
          end
        end
        V[row][c] = v;
      end
    end
  endtask

  // ---------------------------------------------------------------- output
  spike_t held; logic was_waiting = 0;
  always @(posedge clk) if (rst_n) begin
    if (was_waiting) begin
      checks++;
      if (!sp_valid || sp != held) begin failures++; $display("FAIL spike changed while waiting"); end
    end
    was_waiting <= sp_valid && !sp_ready;
    held <= sp;
    if (sp_valid && !sp_ready) n_stall++;
    if (sp_valid && sp_ready) begin
      checks++; n_spk++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected spike (%0d,%0d)", sp.x, sp.y); end
      else begin
        if (sp != expq[0]) begin
          failures++; $display("FAIL spike got id%0d (%0d,%0d) exp id%0d (%0d,%0d)", sp.ceid, sp.x, sp.y,
                               expq[0].ceid, expq[0].x, expq[0].y);
        end
        void'(expq.pop_front());
      end
    end
  end

  logic rand_ready = 0;
  always @(negedge clk) sp_ready <= rand_ready ? ($urandom_range(9) < 6) : 1'b1;

  // ---------------------------------------------------------------- stimulus
  // cycles: clock cycles from the one presenting start (counted) to the
  // first cycle in which the engine is idle again, i.e. the event period
  task automatic run_event(int x, int y, int K, output int cycles);
    prm.ksize = KW'(K);
    model_event(x, y, K);
    @(negedge clk); start = 1; ev.x = coord_t'(x); ev.y = coord_t'(y);
    @(posedge clk); #1 start = 0;
    cycles = 1;
    while (busy) begin @(posedge clk); #1 cycles++; end
  endtask

  initial begin
    int cyc;
    prm = '{thresh: 8'sd40, leak: 8'd1, refrac: 8'd3, ksize: 3'd3, pool: 1'b0};
    for (int i = 0; i < KM*KM; i++) wt[i] = $urandom_range(90) - 60;
    ev = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < KM*KM; i++) begin
      @(negedge clk); wt_we = 1; wt_addr = 6'(i); wt_data = WW'(wt[i]);
    end
    @(negedge clk); wt_we = 0;
    // clear the neurons
    T = 180;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    while (busy) @(negedge clk);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      V[r][c] = 0; lastT[r][c] = T; spkT[r][c] = -100000;
    end
    // latency with the output always ready: K*W + 2
    for (int K = 1; K <= 7; K += 2) begin
      run_event(W / 2, H / 2, K, cyc);
      checks++;
      if (cyc != K * W + 2) begin failures++; $display("FAIL latency K=%0d: %0d cycles, exp %0d", K, cyc, K*W + 2); end
      else $display("latency K=%0d: %0d cycles", K, cyc);
    end
    // random events, random kernel size, random back-pressure, time crossing an overflow
    rand_ready = 1;
    for (int k = 0; k < 250; k++) begin
      T += $urandom_range(2);
      run_event($urandom_range(W - 1), $urandom_range(H - 1), $urandom_range(1, 7), cyc);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d spikes missing", expq.size()); end
    $display("spikes %0d stalls %0d refractory %0d leak %0d sat %0d out-of-map rows %0d end time %0d",
             n_spk, n_stall, n_refr, n_leak, n_sat, n_oob, T);
    checks++;
    if (n_spk == 0 || n_stall == 0 || n_refr == 0 || n_leak == 0 || n_sat == 0 || n_oob == 0 || T < 256) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
