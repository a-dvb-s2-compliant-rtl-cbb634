// barrel_shifter: cyclic rotation of P lanes of W bits by a run-time amount.
//
// With DIR_LEFT=1 output lane p takes input lane (p + shift) mod P, which is
// how a processor picks its S_i from the memory that holds it; with
// DIR_LEFT=0 output lane q takes input lane (q - shift) mod P, the inverse
// used to write results back. shift must be below P. The rotator is built
// from $clog2(P) stages, stage k rotating by 2^k mod P when bit k of shift is
// set, so P need not be a power of two (360 in the main configuration).
// Purely combinational. The document names a 360x360 barrel shifter; the
// staged construction is this design's choice.
module barrel_shifter #(
  parameter int unsigned P        = ldpc_pkg::P_DEF,
  parameter int unsigned W        = ldpc_pkg::SW_DEF,
  parameter bit          DIR_LEFT = 1'b1,
  localparam int unsigned SHW     = (P > 1) ? $clog2(P) : 1
) (
  input  logic [P-1:0][W-1:0] din,
  input  logic [SHW-1:0]      shift,
  output logic [P-1:0][W-1:0] dout
);

  logic [P-1:0][W-1:0] stage [SHW+1];

  assign stage[0] = din;

  for (genvar k = 0; k < SHW; k++) begin : g_stage
    localparam int unsigned AMT = (2 ** k) % P;
    for (genvar p = 0; p < P; p++) begin : g_lane
      localparam int unsigned SRC = DIR_LEFT ? (p + AMT) % P : (p + P - AMT) % P;
      assign stage[k+1][p] = shift[k] ? stage[k][SRC] : stage[k][p];
    end
  end

  assign dout = stage[SHW];

endmodule
