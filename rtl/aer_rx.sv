// aer_rx: Address-Event Representation input port.
//
// Four-phase handshake with the sending device: the sender drives an
// address and raises req; once the address is taken the receiver raises
// ack; the sender drops req; the receiver drops ack. req arrives
// asynchronously and passes a two-flop synchroniser; the address is
// bundled data, stable while req is high. The event is handed on with a
// one-cycle ev_valid when the queue behind has room (ev_ready); otherwise
// ack is held back, which stalls the sender. The four-phase AER protocol is
// the published one; the synchroniser and back-pressure are this design's.
module aer_rx #(
  parameter int unsigned DW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic [DW-1:0] data,
  output logic          ack,
  output logic          ev_valid,
  output logic [DW-1:0] ev_data,
  input  logic          ev_ready
);

  logic [1:0] req_sync;
  logic       req_s;

  assign req_s = req_sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_sync <= '0;
      ack      <= 1'b0;
      ev_valid <= 1'b0;
      ev_data  <= '0;
    end else begin
      req_sync <= {req_sync[0], req};
      ev_valid <= 1'b0;
      if (!ack && req_s && ev_ready) begin
        ack      <= 1'b1;
        ev_valid <= 1'b1;
        ev_data  <= data;
      end else if (ack && !req_s) begin
        ack <= 1'b0;
      end
    end
  end

endmodule
