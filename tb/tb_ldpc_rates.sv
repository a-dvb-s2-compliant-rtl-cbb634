// tb_ldpc_rates: the decoder at its default size running one 64800-bit frame
// for each code rate of the throughput table: 1/4, 1/3, 1/2, 3/5 and 3/4,
// i.e. 135, 120, 90, 72 and 45 layers of checknode degree 4, 5, 7, 11 and
// 14 (the DVB-S2 normal-frame shapes), each as a random quasi-cyclic code
// with up to 25 iterations. Every frame is checked bit-exactly against the
// reference model and for its cycle count, and the throughput at 25
// iterations is printed for 200 and 300 MHz:
//   cycles = 1 + 2*180 + 25 * 2 * (layers * degree).
module tb_ldpc_rates;
  localparam int unsigned P = ldpc_pkg::P_DEF, NG = ldpc_pkg::NG_DEF;
  localparam int unsigned W = ldpc_pkg::W_DEF, SW = ldpc_pkg::SW_DEF, DCMAX = ldpc_pkg::DCMAX_DEF;
  localparam int unsigned M_ALT = ldpc_pkg::M_ALT_DEF, OFFSET = ldpc_pkg::OFFSET_DEF;
  localparam int unsigned DEPTH = ldpc_pkg::DEPTH_DEF;
  localparam int unsigned GW = $clog2(NG), SHW = $clog2(P), MW = $clog2(M_ALT + 1);
  localparam int unsigned DW = $clog2(DEPTH), TW = 1 + MW + SHW + GW;
  localparam int NR = 5;
  localparam int LAYERS [NR] = '{135, 120, 90, 72, 45};
  localparam int DEG    [NR] = '{4, 5, 7, 11, 14};
  localparam string NAME [NR] = '{"1/4", "1/3", "1/2", "3/5", "3/4"};

  logic clk = 0;
  always #5 clk = ~clk;

  int checks, failures;
  bit all_done;

  for (genvar r = 0; r < NR; r++) begin : g_rate
    logic rst_n, cfg_we, start, llr_valid, llr_ready, hd_valid, busy, done, converged;
    logic [DW-1:0] cfg_addr;
    logic [TW-1:0] cfg_entry;
    logic [DW:0] n_entries;
    logic [7:0] max_iter, iterations;
    logic [P-1:0][W-1:0] llr;
    logic [GW-1:0] hd_group;
    logic [P-1:0] hd;

    ldpc_decoder_top dut (.*);

    ldpc_tb_driver #(.P(P), .NG(NG), .NL(LAYERS[r]), .W(W), .SW(SW), .DCMAX(DCMAX),
                     .M_ALT(M_ALT), .OFFSET(OFFSET), .DEPTH(DEPTH), .DC(DEG[r]),
                     .DUP_DIV(6), .N_FRAMES(1), .MAX_IT(25), .NOISE0(4), .NOISE_STEP(0),
                     .REQ_MECH(1'b0), .STANDALONE(1'b0)) drv (
      .*, .hw_merge(dut.mem_rd_en && dut.mem_pend != '0),
      .hw_alt_write(dut.mem_wr_en && dut.mem_wr_slot != '0)
    );
  end

  always_comb begin
    all_done = g_rate[0].drv.finished && g_rate[1].drv.finished && g_rate[2].drv.finished
            && g_rate[3].drv.finished && g_rate[4].drv.finished;
    checks   = g_rate[0].drv.checks + g_rate[1].drv.checks + g_rate[2].drv.checks
            + g_rate[3].drv.checks + g_rate[4].drv.checks;
    failures = g_rate[0].drv.failures + g_rate[1].drv.failures + g_rate[2].drv.failures
            + g_rate[3].drv.failures + g_rate[4].drv.failures;
  end

  initial begin
    wait (all_done);
    for (int r = 0; r < NR; r++) begin
      automatic int cyc = 1 + 2 * int'(NG) + 25 * 2 * LAYERS[r] * DEG[r];
      $display("rate %s: %0d layers, degree %0d, %0d cycles per frame at 25 iterations: %0d Mbit/s at 200 MHz, %0d Mbit/s at 300 MHz",
               NAME[r], LAYERS[r], DEG[r], cyc, 64800 * 200 / cyc, 64800 * 300 / cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
