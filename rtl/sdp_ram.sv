// sdp_ram: simple dual-port block RAM, one write port and one read port.
//
// Models the FPGA block RAM that holds neuron state (membrane potential and
// the two timestamps) and kernel weights. The read is synchronous: rdata
// shows mem[raddr] on the clock edge after re is high, and holds its value
// while re is low, which lets a pipeline stall without re-reading. A read of
// the address being written in the same cycle returns the old contents.
// No reset: contents are cleared by whoever owns the RAM (the convolution
// engine sweeps it on a clear command).
module sdp_ram #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
