// ovf_flag_ram: one-bit distributed RAM recording, per neuron, whether the
// global counter has overflowed since that neuron's timestamp was written.
//
// The global counter keeps an epoch bit that toggles on every overflow.
// Writing an address stores the epoch current at that moment (or, with
// wr_wrapped, its inverse, which marks the entry as already one overflow
// old). A read returns wrapped = 1 when the stored epoch differs from the
// present one, i.e. when the counter has wrapped once since the write; the
// reader then adds 2^TSW to the elapsed time. Two overflows without a write
// cannot be told from none: the owner must revisit every entry at least once
// per counter period. The flag-bit idea comes from the published design; the
// epoch encoding, which avoids setting every flag at the moment of an
// overflow, is this design's choice. Read is synchronous (same timing as
// sdp_ram) so the flag lines up with the neuron data read alongside it.
module ovf_flag_ram #(
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          cur_epoch,   // epoch bit of the global counter
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wr_wrapped,  // store as "one overflow ago"
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          wrapped
);

  logic flag [DEPTH];
  logic rd_bit;

  always_ff @(posedge clk) begin
    if (we) flag[waddr] <= cur_epoch ^ wr_wrapped;
    if (re) rd_bit <= flag[raddr];
  end

  assign wrapped = rd_bit ^ cur_epoch;

endmodule
