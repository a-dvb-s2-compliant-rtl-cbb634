// ldpc_controller: the state machine that sequences the decoder.
//
//   LOAD   : takes NG beats of P channel LLRs (llr_valid) into the regular
//            words of the S_i memories, lane-direct; clears pending copies.
//   RD     : walks the entries of one layer, one per cycle: the entry's bit
//            group goes on the common address bus, its rotation on the
//            network command, and the processors run their read phase. A
//            group with pending alternate copies is merged by the memories;
//            its pending count is cleared.
//   WR     : walks the same entries again; processors return S_i, which go
//            back to the regular word or, when the entry's slot is k > 0, to
//            alternate copy k (the group's pending count becomes k). The new
//            u_j records are written on the first write cycle.
//   After the last entry (n_entries - 1) an iteration ends. Decoding stops
//   when an iteration saw every checknode parity even and no S_i sign change
//   (the hard decisions then form a codeword), or after max_iter iterations.
//   OUT    : reads the NG groups with merging and streams P hard decisions a
//            beat (hd_valid).  Then done pulses for one cycle.
// A layer of degree dc takes 2*dc cycles. Reset is synchronous, active low.
// The order of the steps follows the document's description of a checknode
// update; the stopping test and the load/read-out sequence are this design's.
module ldpc_controller #(
  parameter int unsigned P     = ldpc_pkg::P_DEF,
  parameter int unsigned NG    = ldpc_pkg::NG_DEF,
  parameter int unsigned NL    = ldpc_pkg::NL_DEF,
  parameter int unsigned DCMAX = ldpc_pkg::DCMAX_DEF,
  parameter int unsigned M_ALT = ldpc_pkg::M_ALT_DEF,
  parameter int unsigned DEPTH = ldpc_pkg::DEPTH_DEF,
  localparam int unsigned GW   = (NG > 1) ? $clog2(NG) : 1,
  localparam int unsigned LW   = (NL > 1) ? $clog2(NL) : 1,
  localparam int unsigned SHW  = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned MW   = $clog2(M_ALT + 1),
  localparam int unsigned DW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned EW   = $clog2(DCMAX),
  localparam int unsigned TW   = 1 + MW + SHW + GW
) (
  input  logic           clk,
  input  logic           rst_n,
  // command and status
  input  logic           start,
  input  logic [DW:0]    n_entries,
  input  logic [7:0]     max_iter,
  output logic           busy,
  output logic           done,
  output logic [7:0]     iterations,
  output logic           converged,
  // channel input and decisions
  input  logic           llr_valid,
  output logic           llr_ready,
  output logic           hd_valid,
  output logic [GW-1:0]  hd_group,
  // matrix table
  output logic [DW-1:0]  tab_addr,
  input  logic [TW-1:0]  tab_entry,
  // S_i memories (shared address bus) and interconnect
  output logic           load_sel,
  output logic           mem_rd_en,
  output logic [GW-1:0]  mem_rd_addr,
  output logic [MW-1:0]  mem_pend,
  output logic           mem_wr_en,
  output logic [GW-1:0]  mem_wr_addr,
  output logic [MW-1:0]  mem_wr_slot,
  output logic [SHW-1:0] shift,
  input  logic           any_merge_flip,
  // processors and u_j memories
  output logic           first_iter,
  output logic [EW-1:0]  edge_idx,
  output logic           proc_rd_en,
  output logic           proc_wr_en,
  output logic [LW-1:0]  layer,
  output logic           uj_wr_en,
  input  logic           any_parity_odd,
  input  logic           any_flip
);

  typedef struct packed {
    logic           last;
    logic [MW-1:0]  slot;
    logic [SHW-1:0] shift;
    logic [GW-1:0]  group;
  } entry_t;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RD, S_WR, S_OUT, S_DONE} state_t;

  state_t         state;
  entry_t         ent;
  logic [DW-1:0]  ptr, base;
  logic [EW-1:0]  e_q;
  logic [GW-1:0]  gcnt;
  logic [LW-1:0]  layer_q;
  logic [7:0]     iter_q;
  logic           first_q, bad_q, conv_q;
  logic [MW-1:0]  pend_q [NG];

  assign ent      = entry_t'(tab_entry);
  assign tab_addr = ptr;

  // --------------------------------------------------------------- outputs
  always_comb begin
    busy        = (state != S_IDLE);
    done        = (state == S_DONE);
    llr_ready   = (state == S_LOAD);
    load_sel    = (state == S_LOAD);
    hd_valid    = (state == S_OUT);
    hd_group    = gcnt;
    mem_rd_en   = (state == S_RD) || (state == S_OUT);
    mem_rd_addr = (state == S_OUT) ? gcnt : ent.group;
    mem_pend    = pend_q[mem_rd_addr];
    mem_wr_en   = (state == S_WR) || (state == S_LOAD && llr_valid);
    mem_wr_addr = (state == S_LOAD) ? gcnt : ent.group;
    mem_wr_slot = (state == S_LOAD) ? '0 : ent.slot;
    shift       = ent.shift;
    first_iter  = first_q;
    edge_idx    = e_q;
    proc_rd_en  = (state == S_RD);
    proc_wr_en  = (state == S_WR);
    layer       = layer_q;
    uj_wr_en    = (state == S_WR) && (e_q == '0);
    iterations  = iter_q;
    converged   = conv_q;
  end

  // --------------------------------------------------------------- sequence
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ptr     <= '0;
      base    <= '0;
      e_q     <= '0;
      gcnt    <= '0;
      layer_q <= '0;
      iter_q  <= '0;
      first_q <= 1'b1;
      bad_q   <= 1'b0;
      conv_q  <= 1'b0;
      for (int g = 0; g < NG; g++) pend_q[g] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_LOAD;
          gcnt    <= '0;
          ptr     <= '0;
          base    <= '0;
          e_q     <= '0;
          layer_q <= '0;
          iter_q  <= '0;
          first_q <= 1'b1;
          bad_q   <= 1'b0;
          conv_q  <= 1'b0;
          for (int g = 0; g < NG; g++) pend_q[g] <= '0;
        end
        S_LOAD: if (llr_valid) begin
          if (gcnt == GW'(NG - 1)) begin
            gcnt  <= '0;
            state <= S_RD;
          end else begin
            gcnt <= gcnt + 1'b1;
          end
        end
        S_RD: begin
          if (mem_pend != '0) pend_q[ent.group] <= '0;
          if (any_merge_flip) bad_q <= 1'b1;
          if (ent.last) begin
            state <= S_WR;
            ptr   <= base;
            e_q   <= '0;
          end else begin
            ptr <= ptr + 1'b1;
            e_q <= e_q + 1'b1;
          end
        end
        S_WR: begin
          if (ent.slot != '0 && ent.slot > pend_q[ent.group]) pend_q[ent.group] <= ent.slot;
          if (any_flip || (e_q == '0 && any_parity_odd)) bad_q <= 1'b1;
          e_q <= e_q + 1'b1;
          ptr <= ptr + 1'b1;
          if (ent.last) begin
            e_q  <= '0;
            base <= ptr + 1'b1;
            if ({1'b0, ptr} + 1'b1 == n_entries) begin
              // end of an iteration
              iter_q  <= iter_q + 1'b1;
              first_q <= 1'b0;
              ptr     <= '0;
              base    <= '0;
              layer_q <= '0;
              bad_q   <= 1'b0;
              if (!(bad_q || any_flip || (e_q == '0 && any_parity_odd))) begin
                conv_q <= 1'b1;
                state  <= S_OUT;
              end else if (iter_q + 1'b1 >= max_iter) begin
                state <= S_OUT;
              end else begin
                state <= S_RD;
              end
            end else begin
              layer_q <= layer_q + 1'b1;
              state   <= S_RD;
            end
          end
        end
        S_OUT: begin
          if (mem_pend != '0) pend_q[gcnt] <= '0;
          if (any_merge_flip) conv_q <= 1'b0;
          if (gcnt == GW'(NG - 1)) begin
            gcnt  <= '0;
            state <= S_DONE;
          end else begin
            gcnt <= gcnt + 1'b1;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A layer may hold at most DCMAX entries.
  a_degree: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RD && !ent.last) |-> (e_q != EW'(DCMAX - 1)));

endmodule
