// tb_layer_dispatch: self-checking test of the per-layer event dispatcher.
// Random layer masks, busy vectors and queue states; checks that the event
// is popped only when enabled, queued and every engine of the layer idle,
// and that exactly the engines of the layer get the start pulse.
module tb_layer_dispatch;
  import snn_pkg::*;
  localparam int N = 8, LY = 1;
  logic enable, q_empty, q_pop;
  layer_t ml [N];
  logic [N-1:0] ce_busy, start;
  int checks = 0, failures = 0, pops = 0;

  layer_dispatch #(.N_CE(N), .LAYER(LY)) dut (.*);

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      logic [N-1:0] mem;
      logic exp_pop;
      enable = ($urandom_range(9) != 0);
      q_empty = ($urandom_range(3) == 0);
      for (int i = 0; i < N; i++) begin
        ml[i] = layer_t'($urandom_range(2));
        mem[i] = (ml[i] == layer_t'(LY));
      end
      ce_busy = N'($urandom) & N'($urandom) & N'($urandom);
      #1;
      exp_pop = enable && !q_empty && ((mem & ce_busy) == 0);
      if (exp_pop) pops++;
      checks++;
      if (q_pop != exp_pop || start != (exp_pop ? mem : '0)) begin
        failures++; $display("FAIL k=%0d pop %b exp %b start %b mem %b", k, q_pop, exp_pop, start, mem);
      end
    end
    checks++;
    if (pops == 0) begin failures++; $display("FAIL never dispatched"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
