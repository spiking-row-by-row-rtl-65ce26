// tb_aer_rx: self-checking test of the AER input port. A sender model runs
// the four-phase handshake (address, req up, wait ack, req down, wait ack
// down) with random gaps; the queue side is sometimes not ready. Checks
// that every event is delivered once, in order, with its address; that ack
// stays low while the queue is not ready (back-pressure seen); and that ack
// never rises while req is low.
module tb_aer_rx;
  localparam int DW = 14;
  logic clk = 0, rst_n = 0, req = 0, ack, ev_valid, ev_ready = 1;
  logic [DW-1:0] data = 0, ev_data;
  logic [DW-1:0] sent [$];
  int checks = 0, failures = 0, got = 0, held = 0;

  aer_rx #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // queue side
  always @(posedge clk) if (rst_n) begin
    if (ev_valid) begin
      checks++;
      if (sent.size() == 0 || ev_data != sent[0]) begin failures++; $display("FAIL data %h", ev_data); end
      if (sent.size() != 0) void'(sent.pop_front());
      got++;
    end
    if (req && !ack && !ev_ready) held++;
    ev_ready <= ($urandom_range(3) != 0);
  end

  // ack must only rise after req
  // and only when the queue could take the event
  logic ack_q = 0, ready_q = 0;
  always @(posedge clk) begin
    if (ack && !ack_q && !req) begin failures++; $display("FAIL ack without req"); end
    if (ack && !ack_q) begin
      checks++;
      if (!ready_q) begin failures++; $display("FAIL event taken while the queue was full"); end
    end
    ack_q <= ack;
    ready_q <= ev_ready;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      repeat ($urandom_range(4)) @(posedge clk);
      data = DW'($urandom); sent.push_back(data);
      #2 req = 1;
      wait (ack); @(posedge clk); #2 req = 0;
      wait (!ack);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (got != 200 || sent.size() != 0) begin failures++; $display("FAIL got %0d", got); end
    checks++;
    if (held == 0) begin failures++; $display("FAIL back-pressure never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
