// aer_tx: Address-Event Representation output port.
//
// Takes the head of the output queue (valid/ready, ready is a one-cycle
// pop), drives it on data and raises req; waits for the receiver's ack,
// drops req, and waits for ack to fall before the next event (four-phase
// handshake). ack passes a two-flop synchroniser. data is held from the
// rise of req until ack has fallen. The protocol is the published AER
// four-phase handshake; the rest is this design's.
module aer_tx #(
  parameter int unsigned DW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  output logic          in_ready,
  output logic          req,
  output logic [DW-1:0] data,
  input  logic          ack
);

  typedef enum logic [1:0] {T_IDLE, T_REQ, T_RELEASE} tstate_t;
  tstate_t    st;
  logic [1:0] ack_sync;
  logic       ack_s;

  assign ack_s    = ack_sync[1];
  assign in_ready = (st == T_IDLE) && !ack_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= T_IDLE;
      req      <= 1'b0;
      data     <= '0;
      ack_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack};
      case (st)
        T_IDLE:
          if (in_valid && !ack_s) begin
            data <= in_data;
            req  <= 1'b1;
            st   <= T_REQ;
          end
        T_REQ:
          if (ack_s) begin
            req <= 1'b0;
            st  <= T_RELEASE;
          end
        T_RELEASE:
          if (!ack_s) st <= T_IDLE;
        default: st <= T_IDLE;
      endcase
    end
  end

endmodule
