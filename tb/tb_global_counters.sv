// tb_global_counters: self-checking test of the two global time counters.
// With prescalers 3 (leakage) and 1 (refractory) it counts cycles, and
// checks every cycle that each count equals elapsed cycles / prescale mod
// 256, that the epoch bit equals the number of wraps mod 2 and that a wrap
// pulse comes exactly at each overflow. Also checks that run=0 freezes
// both counters.
module tb_global_counters;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic [PSW-1:0] leak_prescale = 3, ref_prescale = 1;
  logic [TSW-1:0] now_leak, now_ref;
  logic ep_leak, ep_ref, leak_wrap, ref_wrap;
  int checks = 0, failures = 0;
  int cyc = 0, lw = 0, rw = 0;

  global_counters dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d (cycle %0d)", what, got, exp, cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1; run = 1;
    for (int k = 0; k < 2000; k++) begin
      @(posedge clk); #1;
      cyc++;
      if (leak_wrap) lw++;
      if (ref_wrap) rw++;
      chk(int'(now_leak), (cyc / 3) % 256, "now_leak");
      chk(int'(now_ref), cyc % 256, "now_ref");
      chk(int'(ep_leak), (cyc / 3 / 256) % 2, "ep_leak");
      chk(int'(ep_ref), (cyc / 256) % 2, "ep_ref");
    end
    chk(rw, 2000 / 256, "ref wraps");
    chk(lw, 2000 / 3 / 256, "leak wraps");
    @(negedge clk); run = 0;
    begin
      int a, b;
      a = int'(now_ref); b = int'(now_leak);
      repeat (10) @(posedge clk);
      #1 chk(int'(now_ref), a, "frozen ref"); chk(int'(now_leak), b, "frozen leak");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
