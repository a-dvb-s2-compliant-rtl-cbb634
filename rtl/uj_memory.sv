// uj_memory: a processor's local store of compressed check-node messages.
//
// One record per layer (the processor handles one checknode per layer):
// {u signs[DCMAX], min1[W-1], min2[W-1], index of the first minimum}: 21 bits
// for degree 8 and W = 6 instead of 8 x 6 = 48 bits of full messages, 30 bits
// for the default DCMAX = 16. The
// read is combinational, the write takes effect on the rising clock edge.
// The record contents follow the document; the bit order is this design's.
module uj_memory #(
  parameter int unsigned NL = ldpc_pkg::NL_DEF,
  parameter int unsigned RW = ldpc_pkg::rec_width(ldpc_pkg::W_DEF, ldpc_pkg::DCMAX_DEF),
  localparam int unsigned LW = (NL > 1) ? $clog2(NL) : 1
) (
  input  logic          clk,
  input  logic [LW-1:0] rd_addr,
  output logic [RW-1:0] rd_data,
  input  logic          wr_en,
  input  logic [LW-1:0] wr_addr,
  input  logic [RW-1:0] wr_data
);

  logic [RW-1:0] mem [NL];

  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
