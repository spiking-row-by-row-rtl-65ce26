// tb_config_regs: self-checking test of the host configuration registers.
// Writes every register over the bus and reads it back, checks the decoded
// outputs (layer banks, layer mask, prescalers, control), the one-cycle
// clear pulse, the status bits and the weight write strobe and address.
module tb_config_regs;
  import snn_pkg::*;
  localparam int NCE = 4, NL = 2;
  logic clk = 0, rst_n = 0, cfg_we = 0, st_busy = 0, st_clearing = 0;
  logic [15:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic enable, clear, wt_we;
  layer_t last_layer;
  logic [PSW-1:0] leak_ps, ref_ps;
  layer_params_t lp [NL];
  layer_t ml [NCE];
  logic [CEW-1:0] wt_ce;
  logic [5:0] wt_addr;
  logic [WW-1:0] wt_data;
  int checks = 0, failures = 0;

  config_regs #(.N_CE(NCE), .N_LAYERS(NL)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic rd(logic [15:0] a, int exp, string what);
    @(negedge clk); cfg_addr = a;
    @(negedge clk); chk(int'(cfg_rdata), exp, what);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    chk(int'(enable), 0, "reset enable");
    chk(int'(last_layer), NL - 1, "reset last layer");
    wr(A_LEAK_PS, 32'd1234); chk(int'(leak_ps), 1234, "leak_ps"); rd(A_LEAK_PS, 1234, "rd leak_ps");
    wr(A_REF_PS, 32'd77);    chk(int'(ref_ps), 77, "ref_ps");     rd(A_REF_PS, 77, "rd ref_ps");
    for (int l = 0; l < NL; l++) begin
      wr(A_LAYER + 16'(4*l),     32'(20 + l));
      wr(A_LAYER + 16'(4*l + 1), 32'(50 - 40*l));
      wr(A_LAYER + 16'(4*l + 2), 32'(20 - 15*l));
      wr(A_LAYER + 16'(4*l + 3), 32'(l == 0 ? 8'h0B : 8'h05));
    end
    for (int l = 0; l < NL; l++) begin
      chk(int'(lp[l].thresh), 20 + l, "thresh");
      chk(int'(lp[l].leak), 50 - 40*l, "leak");
      chk(int'(lp[l].refrac), 20 - 15*l, "refrac");
      chk(int'(lp[l].ksize), l == 0 ? 3 : 5, "ksize");
      chk(int'(lp[l].pool), l == 0 ? 1 : 0, "pool");
      rd(A_LAYER + 16'(4*l + 1), 50 - 40*l, "rd leak");
      rd(A_LAYER + 16'(4*l + 3), l == 0 ? 11 : 5, "rd ksize");
    end
    for (int e = 0; e < NCE; e++) wr(A_MASK + 16'(e), 32'(e % 2));
    for (int e = 0; e < NCE; e++) begin chk(int'(ml[e]), e % 2, "mask"); rd(A_MASK + 16'(e), e % 2, "rd mask"); end
    // control: enable, last layer 0, clear pulse
    @(negedge clk); cfg_we = 1; cfg_addr = A_CTRL; cfg_wdata = 32'h0000_0003;
    @(negedge clk); cfg_we = 0; chk(int'(clear), 1, "clear pulse"); chk(int'(enable), 1, "enable");
    chk(int'(last_layer), 0, "last layer");
    @(negedge clk); chk(int'(clear), 0, "clear self-clears");
    rd(A_CTRL, 1, "rd ctrl");
    st_busy = 1; st_clearing = 0; rd(A_STATUS, 1, "status busy");
    st_busy = 0; st_clearing = 1; rd(A_STATUS, 2, "status clearing");
    // weights
    @(negedge clk); cfg_we = 1; cfg_addr = A_WEIGHT + 16'(64*3 + 17); cfg_wdata = 32'hF5;
    #1 chk(int'(wt_we), 1, "wt_we"); chk(int'(wt_ce), 3, "wt_ce"); chk(int'(wt_addr), 17, "wt_addr");
    chk(int'(wt_data), 8'hF5, "wt_data");
    cfg_addr = A_WEIGHT + 16'(64*1 + 49);
    #1 chk(int'(wt_we), 0, "no weight beyond 7x7");
    cfg_addr = A_MASK; #1 chk(int'(wt_we), 0, "no weight on mask write");
    @(negedge clk); cfg_we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
