// tb_sdp_ram: self-checking test of the simple dual-port RAM.
// Writes random words, reads them back one cycle later, checks that the
// read data holds while re is low and that a same-cycle read returns the
// old contents. Reference: a plain array kept by the testbench.
module tb_sdp_ram;
  localparam int W = 24, D = 64;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  sdp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    // fill
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = W'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    // read back in random order
    for (int k = 0; k < 200; k++) begin
      int a;
      a = $urandom_range(D-1);
      @(negedge clk); re = 1; raddr = 6'(a);
      @(negedge clk); re = 0; chk(rdata, ref_mem[a], "read");
      raddr = 6'(a + 1 + $urandom_range(D-3));   // a different address, not read
      @(negedge clk); chk(rdata, ref_mem[a], "hold");
    end
    // read and write the same address in one cycle: old data
    @(negedge clk); we = 1; re = 1; waddr = 6'd7; raddr = 6'd7; wdata = ~ref_mem[7];
    @(negedge clk); we = 0; re = 0; chk(rdata, ref_mem[7], "read-during-write");
    ref_mem[7] = ~ref_mem[7];
    @(negedge clk); re = 1; raddr = 6'd7;
    @(negedge clk); re = 0; chk(rdata, ref_mem[7], "after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
