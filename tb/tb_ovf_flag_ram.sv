// tb_ovf_flag_ram: self-checking test of the overflow flag memory.
// Writes entries in one counter epoch, toggles the epoch (an overflow) and
// checks that exactly those entries report a wrap, that rewriting clears it
// and that "one overflow ago" writes report a wrap until the next overflow.
module tb_ovf_flag_ram;
  localparam int D = 32;
  logic clk = 0, we = 0, re = 0, cur_epoch = 0, wr_wrapped = 0, wrapped;
  logic [4:0] waddr = 0, raddr = 0;
  int checks = 0, failures = 0;
  int epoch_of [D];  // absolute overflow count at which each entry was written

  ovf_flag_ram #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int ovf = 0;

  task automatic wr(int a, logic ago);
    @(negedge clk); we = 1; waddr = 5'(a); wr_wrapped = ago;
    epoch_of[a] = ago ? ovf - 1 : ovf;
    @(negedge clk); we = 0; wr_wrapped = 0;
  endtask

  task automatic rd_chk(int a);
    logic exp;
    @(negedge clk); re = 1; raddr = 5'(a);
    @(negedge clk); re = 0;
    exp = (ovf - epoch_of[a]) == 1;
    checks++;
    if (wrapped !== exp) begin failures++; $display("FAIL addr %0d wrapped %b exp %b", a, wrapped, exp); end
  endtask

  initial begin
    for (int a = 0; a < D; a++) wr(a, 0);
    for (int a = 0; a < D; a++) rd_chk(a);
    // overflow
    ovf++; cur_epoch = ~cur_epoch;
    for (int a = 0; a < D; a++) rd_chk(a);
    // rewrite half of the entries, some as "one overflow ago"
    for (int a = 0; a < D; a += 2) wr(a, a % 4 == 0);
    for (int a = 0; a < D; a++) rd_chk(a);
    // next overflow: rewritten plain entries now wrapped once
    ovf++; cur_epoch = ~cur_epoch;
    for (int a = 2; a < D; a += 4) rd_chk(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
