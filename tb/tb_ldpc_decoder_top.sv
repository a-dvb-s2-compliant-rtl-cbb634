// tb_ldpc_decoder_top: end-to-end test of the decoder at reduced size
// (16 processors, 12 bit groups, 6 layers of degree 6): ten frames of growing
// noise are decoded and compared bit-exactly with a reference model (see
// ldpc_tb_driver). Exercises merges of alternate copies, alternate-word
// writes, early stop on a codeword and the iteration limit.
module tb_ldpc_decoder_top;
  localparam int unsigned P = 16, NG = 12, NL = 6, W = 6, SW = 8, DCMAX = 8;
  localparam int unsigned M_ALT = 2, OFFSET = 1, DEPTH = 48;
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

  ldpc_decoder_top #(.P(P), .NG(NG), .NL(NL), .W(W), .SW(SW), .DCMAX(DCMAX),
                     .M_ALT(M_ALT), .OFFSET(OFFSET), .DEPTH(DEPTH)) dut (.*);

  ldpc_tb_driver #(.P(P), .NG(NG), .NL(NL), .W(W), .SW(SW), .DCMAX(DCMAX), .M_ALT(M_ALT),
                   .OFFSET(OFFSET), .DEPTH(DEPTH), .DC(6), .DUP_DIV(4), .N_FRAMES(10),
                   .MAX_IT(12), .NOISE0(0), .NOISE_STEP(1)) drv (
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
