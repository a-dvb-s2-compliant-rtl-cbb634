// tb_ldpc_decoder_full: the decoder at its default size (360 processors,
// 180 bit groups = 64800-bit frames) decoding three noisy frames of
// a random rate-1/2 quasi-cyclic code of 90 layers, checknode degree 7 (630 circulant
// blocks, the block count of the DVB-S2 rate-1/2 normal frame), with up to
// 25 iterations, compared bit-exactly with the reference model in
// ldpc_tb_driver.
module tb_ldpc_decoder_full;
  localparam int unsigned P = ldpc_pkg::P_DEF, NG = ldpc_pkg::NG_DEF, NL = 90;
  localparam int unsigned W = ldpc_pkg::W_DEF, SW = ldpc_pkg::SW_DEF, DCMAX = ldpc_pkg::DCMAX_DEF;
  localparam int unsigned M_ALT = ldpc_pkg::M_ALT_DEF, OFFSET = ldpc_pkg::OFFSET_DEF;
  localparam int unsigned DEPTH = ldpc_pkg::DEPTH_DEF;
  localparam int unsigned GW = $clog2(NG), SHW = $clog2(P), MW = $clog2(M_ALT + 1);
  localparam int unsigned DW = $clog2(DEPTH), TW = 1 + MW + SHW + GW;

  logic clk = 0;
  logic rst_n, cfg_we, start, llr_valid, llr_ready, hd_valid, busy, done, converged;
  logic [DW-1:0] cfg_addr;
  logic [TW-1:0] cfg_entry;
  logic [DW:0] n_entries;
  logic [7:0] max_iter, iterations;
  logic [P-1:0][W-1:0] llr;
  logic [GW-1:0] hd_group;
  logic [P-1:0] hd;

  always #5 clk = ~clk;

  ldpc_decoder_top dut (.*);

  ldpc_tb_driver #(.P(P), .NG(NG), .NL(NL), .W(W), .SW(SW), .DCMAX(DCMAX), .M_ALT(M_ALT),
                   .OFFSET(OFFSET), .DEPTH(DEPTH), .DC(7), .DUP_DIV(6), .N_FRAMES(3),
                   .MAX_IT(25), .NOISE0(3), .NOISE_STEP(1)) drv (
    .*, .hw_merge(dut.mem_rd_en && dut.mem_pend != '0),
    .hw_alt_write(dut.mem_wr_en && dut.mem_wr_slot != '0)
  );

  initial begin
    repeat (200000) @(posedge clk);
    drv.failures++;
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures);
    $finish;
  end
endmodule
