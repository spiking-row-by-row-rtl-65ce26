// tb_event_router: self-checking test of the output multiplexer. For three
// layers, every source layer, pooling setting and last-layer setting, checks
// where a spike goes (next layer queue or AER output), its pooled address,
// that the output keeps the engine id, and the per-layer dest_ok flags.
module tb_event_router;
  import snn_pkg::*;
  localparam int L = 3;
  logic in_valid, out_full, out_push;
  spike_t in_spike, out_din;
  layer_t in_layer, last_layer;
  logic [L-1:0] pool_en, layer_full, dest_ok, layer_push;
  event_t layer_din;
  int checks = 0, failures = 0;

  event_router #(.N_LAYERS(L)) dut (.*);

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 500; k++) begin
      int src, lastl, xe, ye;
      logic tout;
      in_valid   = 1'b1;
      in_spike   = spike_t'($urandom);
      src        = $urandom_range(L-1);
      lastl      = $urandom_range(L-1);
      in_layer   = layer_t'(src);
      last_layer = layer_t'(lastl);
      pool_en    = L'($urandom);
      layer_full = L'($urandom);
      out_full   = 1'($urandom);
      #1;
      tout = (src >= lastl) || (src == L - 1);
      xe = pool_en[src] ? in_spike.x / 2 : in_spike.x;
      ye = pool_en[src] ? in_spike.y / 2 : in_spike.y;
      chk(out_push == tout, "out_push");
      chk(layer_push == (tout ? L'(0) : L'(1) << (src + 1)), "layer_push");
      if (tout) chk(out_din.ceid == in_spike.ceid && int'(out_din.x) == xe && int'(out_din.y) == ye, "out data");
      else      chk(int'(layer_din.x) == xe && int'(layer_din.y) == ye, "layer data");
      for (int l = 0; l < L; l++) begin
        logic lt;
        lt = (l >= lastl) || (l == L - 1);
        chk(dest_ok[l] == (lt ? !out_full : !layer_full[l + 1]), "dest_ok");
      end
      in_valid = 1'b0; #1;
      chk(!out_push && layer_push == '0, "no push without valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
