// si_memory: one lane of the S_i storage (one of the P "Si memories").
//
// Word g holds S_i of bit g*P + lane, for the NG bit groups. Words k*NG + g,
// k = 1..M_ALT, hold alternate copies S^k of the same S_i, written when
// several processors update that S_i inside one layer. A read of group g with
// pend = m > 0 returns sum(S^k) - (m-1)*S through si_merge and, in the same
// clock edge, writes that merged value back to word g so later reads see it
// directly. The read is combinational (register-file style), writes are on
// the rising clock edge. The caller must not issue a merging read and a write
// in the same cycle (the decoder reads and writes in separate phases).
// merge_flip flags a merge that changes the sign, i.e. a hard decision.
// Storing the alternate copies in extra words of the same lane and merging on
// the memory side of the interconnect are this design's choices.
module si_memory #(
  parameter int unsigned NG    = ldpc_pkg::NG_DEF,
  parameter int unsigned SW    = ldpc_pkg::SW_DEF,
  parameter int unsigned M_ALT = ldpc_pkg::M_ALT_DEF,
  localparam int unsigned GW   = (NG > 1) ? $clog2(NG) : 1,
  localparam int unsigned MW   = $clog2(M_ALT + 1)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [GW-1:0] rd_addr,
  input  logic [MW-1:0] pend,
  output logic [SW-1:0] rd_data,
  output logic          merge_flip,
  input  logic          wr_en,
  input  logic [GW-1:0] wr_addr,
  input  logic [MW-1:0] wr_slot,
  input  logic [SW-1:0] wr_data
);

  localparam int unsigned WORDS = NG * (M_ALT + 1);
  localparam int unsigned AW    = $clog2(WORDS);

  logic [SW-1:0] mem [WORDS];

  logic [M_ALT-1:0][SW-1:0] alt;
  logic [SW-1:0]            reg_word;
  logic                     merging;

  assign reg_word = mem[AW'(rd_addr)];
  for (genvar k = 0; k < M_ALT; k++) begin : g_alt
    assign alt[k] = mem[AW'((k + 1) * NG) + AW'(rd_addr)];
  end

  si_merge #(.SW(SW), .M_ALT(M_ALT)) u_merge (
    .s_reg(reg_word), .s_alt(alt), .m(pend), .s_out(rd_data)
  );

  assign merging    = rd_en && (pend != '0);
  assign merge_flip = merging && (rd_data[SW-1] != reg_word[SW-1]);

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem[AW'(wr_slot) * AW'(NG) + AW'(wr_addr)] <= wr_data;
    end else if (merging) begin
      mem[AW'(rd_addr)] <= rd_data;
    end
  end

  property p_no_write_during_merge;
    @(posedge clk) !(wr_en && merging);
  endproperty
  a_no_write_during_merge: assert property (p_no_write_during_merge);

endmodule
