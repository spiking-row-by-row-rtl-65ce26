// tb_aer_tx: self-checking test of the AER output port. A queue model
// offers random events; a receiver model acknowledges after random delays
// and checks the address while req is high. Checks order, count, that data
// is stable from req rising until ack falls, and that req waits for ack to
// fall before the next event (four-phase).
module tb_aer_tx;
  localparam int DW = 20;
  logic clk = 0, rst_n = 0, in_valid, in_ready, req, ack = 0;
  logic [DW-1:0] in_data, data;
  logic [DW-1:0] q [$], expq [$];
  int checks = 0, failures = 0, got = 0;

  aer_tx #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // queue model: head shown on in_data, popped by in_ready
  always @(posedge clk) if (rst_n) begin
    if (in_ready && in_valid) void'(q.pop_front());
  end
  always_comb begin
    in_valid = (q.size() != 0);
    in_data  = in_valid ? q[0] : '0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 150; k++) begin
      logic [DW-1:0] d;
      d = DW'($urandom);
      q.push_back(d); expq.push_back(d);
      repeat ($urandom_range(3)) @(posedge clk);
    end
  end

  // receiver
  initial begin
    logic [DW-1:0] d;
    wait (rst_n);
    while (got < 150) begin
      wait (req);
      d = data;
      checks++;
      if (expq.size() == 0 || d != expq[0]) begin failures++; $display("FAIL data %h", d); end
      if (expq.size() != 0) void'(expq.pop_front());
      got++;
      repeat ($urandom_range(5)) @(posedge clk);
      #1 ack = 1;
      wait (!req);
      checks++;
      if (data != d) begin failures++; $display("FAIL data changed"); end
      repeat ($urandom_range(5)) @(posedge clk);
      checks++;
      if (req) begin failures++; $display("FAIL req rose before ack fell"); end
      #1 ack = 0;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0 || req) begin failures++; $display("FAIL leftover"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
