// check_processor: one of the P processors; it updates one checknode per
// layer with the offset (corrected) min-sum rule, doing the bitnode and
// checknode work together on the S_i sums.
//
// Read phase, one edge per cycle (rd_en, edge = 0..dc-1):
//   u_old = stored message of this edge (0 in the first iteration),
//   v     = S_i - u_old (kept at full width in a local buffer),
//   |v| saturated to W-1 bits feeds a running search of the first and second
//   minimum, the index of the first minimum and the product of the v signs.
// Write phase, one edge per cycle (wr_en, edge = 0..dc-1):
//   u_new = sign(all v but this one) * max(min - OFFSET, 0), where min is the
//   second minimum for the edge that holds the first one, the first
//   minimum otherwise;  s_out = sat(v + u_new).
// rec_new is the compressed record {u signs, min1, min2, index} (magnitudes
// after the offset) that replaces rec_old in the u_j memory. parity_odd is
// the XOR of the hard decisions of the S_i read in the layer; flip tells, in
// the write phase, that s_out has another sign than the S_i read for the edge.
// The state is registered on the rising clock edge; s_out, flip and rec_new
// are combinational from it. The arithmetic follows the document; the S_i
// width, the offset value, the serial edge order and the stopping flags are
// this design's choices.
module check_processor #(
  parameter int unsigned W      = ldpc_pkg::W_DEF,
  parameter int unsigned SW     = ldpc_pkg::SW_DEF,
  parameter int unsigned DCMAX  = ldpc_pkg::DCMAX_DEF,
  parameter int unsigned OFFSET = ldpc_pkg::OFFSET_DEF,
  localparam int unsigned EW    = $clog2(DCMAX),
  localparam int unsigned MAGW  = W - 1,
  localparam int unsigned RW    = DCMAX + 2 * MAGW + EW
) (
  input  logic          clk,
  input  logic          first_iter,
  input  logic [RW-1:0] rec_old,
  input  logic [EW-1:0] edge_idx,
  input  logic          rd_en,
  input  logic [SW-1:0] s_in,
  input  logic          wr_en,
  output logic [SW-1:0] s_out,
  output logic          flip,
  output logic [RW-1:0] rec_new,
  output logic          parity_odd
);

  localparam int unsigned VW = SW + 1;
  localparam logic [MAGW-1:0] MAGMAX = '1;
  localparam logic signed [VW:0] SMAX = (VW+1)'((2 ** (SW - 1)) - 1);
  localparam logic signed [VW:0] SMIN = -(VW+1)'(2 ** (SW - 1));

  // ---------------------------------------------------------------- record
  typedef struct packed {
    logic [DCMAX-1:0] sgn;
    logic [MAGW-1:0]  min1;
    logic [MAGW-1:0]  min2;
    logic [EW-1:0]    idx;
  } rec_t;

  rec_t old_r, new_r;
  assign old_r   = rec_t'(rec_old);
  assign rec_new = RW'(new_r);

  // ---------------------------------------------------------------- state
  logic signed [VW-1:0] vbuf [DCMAX];   // v of each edge
  logic [DCMAX-1:0]     vsgn;           // sign of v per edge
  logic [DCMAX-1:0]     hd;             // hard decision of the S_i read
  logic [MAGW-1:0]      min1_q, min2_q;
  logic [EW-1:0]        idx_q;
  logic                 sprod_q;
  logic                 par_q;

  // ---------------------------------------------------------------- read
  logic [MAGW-1:0]      uold_mag;
  logic signed [VW-1:0] uold, v;
  logic [VW-1:0]        vabs;
  logic [MAGW-1:0]      vmag;

  always_comb begin
    uold_mag = (edge_idx == old_r.idx) ? old_r.min2 : old_r.min1;
    if (first_iter)                uold = '0;
    else if (old_r.sgn[edge_idx])  uold = -VW'(uold_mag);
    else                           uold = VW'(uold_mag);
    v    = VW'($signed(s_in)) - uold;
    vabs = v[VW-1] ? VW'(-v) : VW'(v);
    vmag = (vabs > VW'(MAGMAX)) ? MAGMAX : vabs[MAGW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      vbuf[edge_idx] <= v;
      vsgn[edge_idx] <= v[VW-1];
      hd[edge_idx]   <= s_in[SW-1];
      if (edge_idx == '0) begin
        min1_q  <= vmag;
        min2_q  <= MAGMAX;
        idx_q   <= '0;
        sprod_q <= v[VW-1];
        par_q   <= s_in[SW-1];
      end else begin
        sprod_q <= sprod_q ^ v[VW-1];
        par_q   <= par_q ^ s_in[SW-1];
        if (vmag < min1_q) begin
          min2_q <= min1_q;
          min1_q <= vmag;
          idx_q  <= edge_idx;
        end else if (vmag < min2_q) begin
          min2_q <= vmag;
        end
      end
    end
  end

  // ---------------------------------------------------------------- write
  logic [MAGW-1:0]      m1o, m2o, unew_mag;
  logic signed [VW-1:0] unew;
  logic signed [VW:0]   ssum;

  always_comb begin
    m1o = (min1_q > MAGW'(OFFSET)) ? min1_q - MAGW'(OFFSET) : '0;
    m2o = (min2_q > MAGW'(OFFSET)) ? min2_q - MAGW'(OFFSET) : '0;
    new_r.sgn  = vsgn ^ {DCMAX{sprod_q}};
    new_r.min1 = m1o;
    new_r.min2 = m2o;
    new_r.idx  = idx_q;

    unew_mag = (edge_idx == idx_q) ? m2o : m1o;
    unew     = new_r.sgn[edge_idx] ? -VW'(unew_mag) : VW'(unew_mag);
    ssum     = (VW+1)'(vbuf[edge_idx]) + (VW+1)'(unew);
    if (ssum > SMAX)      s_out = SMAX[SW-1:0];
    else if (ssum < SMIN) s_out = SMIN[SW-1:0];
    else                  s_out = ssum[SW-1:0];
    flip = wr_en && (s_out[SW-1] != hd[edge_idx]);
  end

  assign parity_odd = par_q;

endmodule
