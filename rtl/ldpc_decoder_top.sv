// ldpc_decoder_top: a layered (horizontal shuffle) LDPC decoder for
// quasi-cyclic codes such as the DVB-S2 ones, with P processors in parallel.
//
// Bit b = g*P + l of the frame lives in lane l of S_i memory (word g). A
// layer is P checknodes, one per processor; each of its circulant blocks
// (one matrix-table entry) is served in one cycle: all P memories read word g
// on the shared address bus, the interconnect rotates the P values by the
// block's shift and each processor takes one S_i. After the layer's read
// phase the processors return updated S_i through the inverse rotation in a
// write phase of the same length. Processors keep their compressed check
// messages in local u_j memories. When a bit group occurs more than once in a
// layer, the table's slot field sends each update to its own alternate word;
// the memories merge the copies (sum S^k - (m-1)S) on the next read.
//
// Use: fill the matrix table (cfg_we/cfg_addr/cfg_entry, entry layout
// {last, slot, shift, group}), pulse start, stream NG beats of P LLRs
// (llr_valid/llr_ready, lane l of beat g = bit g*P+l, positive = 0), then
// collect NG beats of P hard decisions (hd_valid, hd_group, hd). done pulses
// at the end with iterations and converged (every parity check satisfied).
// The block structure (memories on a common address bus, one network,
// processors with local u_j memories, a matrix block issuing the network
// command) follows the document; the two-phase layer timing, the table
// format and the frame interface are this design's.
// Cycles per frame: NG (load) + iterations * sum over layers of 2*dc + NG
// (read-out) + 1, counted from the start pulse to the done pulse.
module ldpc_decoder_top #(
  parameter int unsigned P      = ldpc_pkg::P_DEF,
  parameter int unsigned NG     = ldpc_pkg::NG_DEF,
  parameter int unsigned NL     = ldpc_pkg::NL_DEF,
  parameter int unsigned W      = ldpc_pkg::W_DEF,
  parameter int unsigned SW     = ldpc_pkg::SW_DEF,
  parameter int unsigned DCMAX  = ldpc_pkg::DCMAX_DEF,
  parameter int unsigned M_ALT  = ldpc_pkg::M_ALT_DEF,
  parameter int unsigned OFFSET = ldpc_pkg::OFFSET_DEF,
  parameter int unsigned DEPTH  = ldpc_pkg::DEPTH_DEF,
  localparam int unsigned GW    = (NG > 1) ? $clog2(NG) : 1,
  localparam int unsigned LW    = (NL > 1) ? $clog2(NL) : 1,
  localparam int unsigned SHW   = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned MW    = $clog2(M_ALT + 1),
  localparam int unsigned DW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned EW    = $clog2(DCMAX),
  localparam int unsigned TW    = 1 + MW + SHW + GW,
  localparam int unsigned RW    = DCMAX + 2 * (W - 1) + EW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // matrix table load
  input  logic                 cfg_we,
  input  logic [DW-1:0]        cfg_addr,
  input  logic [TW-1:0]        cfg_entry,
  input  logic [DW:0]          n_entries,
  input  logic [7:0]           max_iter,
  // frame
  input  logic                 start,
  input  logic                 llr_valid,
  output logic                 llr_ready,
  input  logic [P-1:0][W-1:0]  llr,
  output logic                 hd_valid,
  output logic [GW-1:0]        hd_group,
  output logic [P-1:0]         hd,
  output logic                 busy,
  output logic                 done,
  output logic [7:0]           iterations,
  output logic                 converged
);

  // --------------------------------------------------------------- control
  logic [DW-1:0]  tab_addr;
  logic [TW-1:0]  tab_entry;
  logic           load_sel, mem_rd_en, mem_wr_en;
  logic [GW-1:0]  mem_rd_addr, mem_wr_addr;
  logic [MW-1:0]  mem_pend, mem_wr_slot;
  logic [SHW-1:0] shift;
  logic           first_iter, proc_rd_en, proc_wr_en, uj_wr_en;
  logic [EW-1:0]  edge_idx;
  logic [LW-1:0]  layer;
  logic [P-1:0]   merge_flip, flip, parity_odd;

  matrix_table #(.DEPTH(DEPTH), .EW(TW)) u_table (
    .clk, .cfg_we, .cfg_addr, .cfg_entry, .rd_addr(tab_addr), .rd_entry(tab_entry)
  );

  ldpc_controller #(
    .P(P), .NG(NG), .NL(NL), .DCMAX(DCMAX), .M_ALT(M_ALT), .DEPTH(DEPTH)
  ) u_ctrl (
    .clk, .rst_n, .start, .n_entries, .max_iter, .busy, .done, .iterations,
    .converged, .llr_valid, .llr_ready, .hd_valid, .hd_group, .tab_addr,
    .tab_entry, .load_sel, .mem_rd_en, .mem_rd_addr, .mem_pend, .mem_wr_en,
    .mem_wr_addr, .mem_wr_slot, .shift, .any_merge_flip(|merge_flip),
    .first_iter, .edge_idx, .proc_rd_en, .proc_wr_en, .layer, .uj_wr_en,
    .any_parity_odd(|parity_odd), .any_flip(|flip)
  );

  // --------------------------------------------------------------- datapath
  logic [P-1:0][SW-1:0] mem_rd, proc_rd, proc_wr, mem_wr, mem_wdata;

  si_network #(.P(P), .SW(SW)) u_net (
    .shift, .mem_rd, .proc_rd, .proc_wr, .mem_wr
  );

  for (genvar l = 0; l < P; l++) begin : g_lane
    logic [RW-1:0] rec_old, rec_new;

    // channel LLRs enter lane-direct, sign-extended to the S_i width
    assign mem_wdata[l] = load_sel ? SW'($signed(llr[l])) : mem_wr[l];
    assign hd[l]        = mem_rd[l][SW-1];

    si_memory #(.NG(NG), .SW(SW), .M_ALT(M_ALT)) u_si (
      .clk, .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .pend(mem_pend),
      .rd_data(mem_rd[l]), .merge_flip(merge_flip[l]), .wr_en(mem_wr_en),
      .wr_addr(mem_wr_addr), .wr_slot(mem_wr_slot), .wr_data(mem_wdata[l])
    );

    check_processor #(.W(W), .SW(SW), .DCMAX(DCMAX), .OFFSET(OFFSET)) u_proc (
      .clk, .first_iter, .rec_old, .edge_idx, .rd_en(proc_rd_en),
      .s_in(proc_rd[l]), .wr_en(proc_wr_en), .s_out(proc_wr[l]),
      .flip(flip[l]), .rec_new, .parity_odd(parity_odd[l])
    );

    uj_memory #(.NL(NL), .RW(RW)) u_uj (
      .clk, .rd_addr(layer), .rd_data(rec_old), .wr_en(uj_wr_en),
      .wr_addr(layer), .wr_data(rec_new)
    );
  end

endmodule
