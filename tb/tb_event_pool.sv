// tb_event_pool: self-checking test of event pooling: every address with
// pooling off passes unchanged, with pooling on is halved in x and y.
module tb_event_pool;
  import snn_pkg::*;
  logic en;
  event_t ev_in, ev_out;
  int checks = 0, failures = 0;

  event_pool dut (.*);

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int y = 0; y < 128; y += 3)
      for (int x = 0; x < 128; x += 5)
        for (int e = 0; e < 2; e++) begin
          en = e[0]; ev_in.x = 7'(x); ev_in.y = 7'(y);
          #1;
          checks++;
          if (int'(ev_out.x) != (e ? x / 2 : x) || int'(ev_out.y) != (e ? y / 2 : y)) begin
            failures++; $display("FAIL en=%0d (%0d,%0d) -> (%0d,%0d)", e, x, y, ev_out.x, ev_out.y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
