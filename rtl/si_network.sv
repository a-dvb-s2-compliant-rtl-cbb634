// si_network: the network between the P S_i memories and the P processors.
//
// A read rotation delivers memory lane (p + shift) mod P to processor p; the
// write rotation sends processor p's result back to the same memory lane.
// Both use the one network command (shift) issued with the matrix entry that
// is being processed. Combinational. The document shows a single
// interconnection network driven by the matrix block; building it as two
// barrel shifters, one per direction, is this design's choice.
module si_network #(
  parameter int unsigned P   = ldpc_pkg::P_DEF,
  parameter int unsigned SW  = ldpc_pkg::SW_DEF,
  localparam int unsigned SHW = (P > 1) ? $clog2(P) : 1
) (
  input  logic [SHW-1:0]       shift,
  input  logic [P-1:0][SW-1:0] mem_rd,
  output logic [P-1:0][SW-1:0] proc_rd,
  input  logic [P-1:0][SW-1:0] proc_wr,
  output logic [P-1:0][SW-1:0] mem_wr
);

  barrel_shifter #(.P(P), .W(SW), .DIR_LEFT(1'b1)) u_rd (
    .din(mem_rd), .shift(shift), .dout(proc_rd)
  );

  barrel_shifter #(.P(P), .W(SW), .DIR_LEFT(1'b0)) u_wr (
    .din(proc_wr), .shift(shift), .dout(mem_wr)
  );

endmodule
