// tb_param_select: self-checking test of the per-engine layer parameter
// multiplexer. Loads the two banks of the example in the architecture
// description (leakage 50/10, refractory 20/5 for layers 0/1), then random
// banks for four layers, and checks the selected bank for every mask value.
module tb_param_select;
  import snn_pkg::*;
  layer_params_t lp2 [2], lp4 [4], prm2, prm4;
  layer_t mls2, mls4;
  int checks = 0, failures = 0;

  param_select #(.N_LAYERS(2)) dut2 (.lp(lp2), .mls(mls2), .prm(prm2));
  param_select #(.N_LAYERS(4)) dut4 (.lp(lp4), .mls(mls4), .prm(prm4));

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    lp2[0] = '{thresh: 8'sd30, leak: 8'd50, refrac: 8'd20, ksize: 3'd3, pool: 1'b1};
    lp2[1] = '{thresh: 8'sd40, leak: 8'd10, refrac: 8'd5,  ksize: 3'd5, pool: 1'b0};
    for (int l = 0; l < 2; l++) begin
      mls2 = layer_t'(l); #1;
      checks++;
      if (prm2.leak != (l == 0 ? 8'd50 : 8'd10) || prm2.refrac != (l == 0 ? 8'd20 : 8'd5)) begin
        failures++; $display("FAIL example layer %0d", l);
      end
    end
    for (int k = 0; k < 200; k++) begin
      for (int l = 0; l < 4; l++) lp4[l] = layer_params_t'($urandom);
      mls4 = layer_t'($urandom_range(3)); #1;
      checks++;
      if (prm4 !== lp4[mls4]) begin failures++; $display("FAIL random mls=%0d", mls4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
