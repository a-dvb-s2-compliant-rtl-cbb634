// matrix_table: the partitioned parity-check matrix, as the list of circulant
// blocks the decoder walks through.
//
// Entry layout {last, slot, shift, group}: the bit group to address, the
// rotation of its PxP circulant (the network command), a flag closing the
// layer, and the write slot (0 = regular word, k = alternate copy k when the
// group occurs k-th of several times in the layer). Entries of one layer are
// consecutive; an iteration walks entries 0 .. n_entries-1. The table is a
// writable memory filled through the cfg port before decoding, so the matrix
// of any code rate can be loaded; the entry format is this design's choice.
// Combinational read, write on the rising clock edge.
module matrix_table #(
  parameter int unsigned DEPTH = ldpc_pkg::DEPTH_DEF,
  parameter int unsigned EW    = 20,
  localparam int unsigned DW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          cfg_we,
  input  logic [DW-1:0] cfg_addr,
  input  logic [EW-1:0] cfg_entry,
  input  logic [DW-1:0] rd_addr,
  output logic [EW-1:0] rd_entry
);

  logic [EW-1:0] mem [DEPTH];

  assign rd_entry = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (cfg_we) mem[cfg_addr] <= cfg_entry;
  end

endmodule
