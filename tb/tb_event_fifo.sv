// tb_event_fifo: self-checking test of the event queue against a
// SystemVerilog queue, with random pushes and pops, checking head data,
// full, empty and count every cycle, and that pushes when full are dropped.
module tb_event_fifo;
  localparam int W = 14, D = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  logic [W-1:0] din = 0, dout;
  logic [3:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, nfull = 0;

  event_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      chk(int'(count), q.size(), "count");
      chk(int'(empty), int'(q.size() == 0), "empty");
      chk(int'(full), int'(q.size() == D), "full");
      if (q.size() > 0) chk(int'(dout), int'(q[0]), "head");
      if (full) nfull++;
      // bias towards filling in the first half, draining in the second
      push = ($urandom_range(99) < (k < 1500 ? 70 : 30));
      pop  = ($urandom_range(99) < (k < 1500 ? 30 : 70));
      din  = W'($urandom);
      begin
        logic was_full;
        was_full = full;
        @(posedge clk);
        if (pop && q.size() > 0) void'(q.pop_front());
        if (push && !was_full) q.push_back(din);
      end
    end
    chk(int'(nfull > 0), 1, "queue became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
