// si_merge: recombines the copies of one S_i that several processors updated
// in the same layer.
//
// If m processors read the same S_i in one layer, each writes its own updated
// copy S^k = S + (u_k new - u_k old) while the regular word keeps S. The
// combined sum is S_updated = sum(S^k, k=1..m) - (m-1)*S, which carries all m
// updates. m = 0 passes s_reg through. The formula is the document's two-step
// update; saturating the result to SW bits is this design's choice.
// Combinational.
module si_merge #(
  parameter int unsigned SW    = ldpc_pkg::SW_DEF,
  parameter int unsigned M_ALT = ldpc_pkg::M_ALT_DEF,
  localparam int unsigned MW   = $clog2(M_ALT + 1)
) (
  input  logic signed [SW-1:0]             s_reg,
  input  logic        [M_ALT-1:0][SW-1:0]  s_alt,
  input  logic        [MW-1:0]             m,
  output logic signed [SW-1:0]             s_out
);

  localparam int unsigned AW = SW + $clog2(M_ALT + 1) + 2;
  localparam logic signed [AW-1:0] SMAX = AW'((2 ** (SW - 1)) - 1);
  localparam logic signed [AW-1:0] SMIN = -AW'(2 ** (SW - 1));

  logic signed [AW-1:0] acc;

  always_comb begin
    acc = AW'(s_reg);
    for (int k = 0; k < M_ALT; k++) begin
      if (MW'(k) < m) begin
        acc = acc + AW'($signed(s_alt[k])) - AW'(s_reg);
      end
    end
    if (acc > SMAX)      s_out = SMAX[SW-1:0];
    else if (acc < SMIN) s_out = SMIN[SW-1:0];
    else                 s_out = acc[SW-1:0];
  end

endmodule
