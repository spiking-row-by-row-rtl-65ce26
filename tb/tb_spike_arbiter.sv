// tb_spike_arbiter: self-checking test of the round-robin spike arbiter.
// Random request and destination-ready patterns; each cycle the expected
// grant is the first eligible engine after the last granted one, computed
// by the testbench. Also checks that with all engines requesting, each of
// them is granted once in every N consecutive grants.
module tb_spike_arbiter;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, ok = '0, gnt;
  logic [2:0] gnt_idx;
  logic gnt_any;
  int checks = 0, failures = 0;
  int last = N - 1;

  spike_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp;
    int seen [N];
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      req = N'($urandom); ok = (k < 1000) ? N'($urandom) : '1;
      if (k >= 1500) req = '1;
      #1;
      exp = -1;
      for (int j = 1; j <= N; j++) begin
        int i;
        i = (last + j) % N;
        if (exp < 0 && req[i] && ok[i]) exp = i;
      end
      checks++;
      if (exp < 0) begin
        if (gnt_any || gnt != 0) begin failures++; $display("FAIL grant without eligible"); end
      end else begin
        if (!gnt_any || int'(gnt_idx) != exp || gnt != (N'(1) << exp)) begin
          failures++; $display("FAIL k=%0d exp %0d got %0d gnt %b", k, exp, gnt_idx, gnt);
        end
        last = exp;
        if (k >= 1500) seen[exp]++;
      end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (seen[i] != 500 / N && seen[i] != 500 / N + 1) begin failures++; $display("FAIL fairness %0d: %0d", i, seen[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
