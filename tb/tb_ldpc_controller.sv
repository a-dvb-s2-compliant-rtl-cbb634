// tb_ldpc_controller: drives the sequencer with a two-layer table in which
// bit group 1 occurs twice in layer 0 (slots 1 and 2) and again in layer 1.
// Checks, cycle by cycle: the load beats, the read and write phases of each
// layer (addresses, rotations, edge numbers, write slots, u_j write), the
// pending count seen by the layer-1 read of group 1, the iteration limit when
// parity never clears, early stop when it does, the read-out beats and the
// number of cycles per frame.
module tb_ldpc_controller;
  localparam int unsigned P = 4, NG = 4, NL = 2, DCMAX = 4, M_ALT = 2, DEPTH = 8;
  localparam int unsigned GW = 2, LW = 1, SHW = 2, MW = 2, DW = 3, EW = 2, TW = 1 + MW + SHW + GW;
  logic clk = 0, rst_n = 0;
  logic start = 0, llr_valid = 0;
  logic [DW:0] n_entries = 4'd6;
  logic [7:0] max_iter = 8'd3;
  logic busy, done, converged, llr_ready, hd_valid, load_sel, mem_rd_en, mem_wr_en;
  logic [7:0] iterations;
  logic [GW-1:0] hd_group, mem_rd_addr, mem_wr_addr;
  logic [DW-1:0] tab_addr;
  logic [TW-1:0] tab_entry;
  logic [MW-1:0] mem_pend, mem_wr_slot;
  logic [SHW-1:0] shift;
  logic any_merge_flip = 0, first_iter, proc_rd_en, proc_wr_en, uj_wr_en;
  logic any_parity_odd = 0, any_flip = 0;
  logic [EW-1:0] edge_idx;
  logic [LW-1:0] layer;
  int checks = 0, failures = 0;

  // table: {last, slot, shift, group}
  int tg[6] = '{0, 1, 1, 1, 2, 3};
  int ts[6] = '{1, 2, 3, 0, 1, 2};
  int tsl[6] = '{0, 1, 2, 0, 0, 0};
  int tl[6] = '{0, 0, 1, 0, 0, 1};
  assign tab_entry = {tl[tab_addr % 6] != 0, MW'(tsl[tab_addr % 6]), SHW'(ts[tab_addr % 6]), GW'(tg[tab_addr % 6])};

  ldpc_controller #(.P(P), .NG(NG), .NL(NL), .DCMAX(DCMAX), .M_ALT(M_ALT), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input bit parity_bad, input int exp_iter);
    int cyc = 0;
    any_parity_odd = parity_bad;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    llr_valid = 1;
    for (int g = 0; g < NG; g++) begin
      #1;
      chk(llr_ready && load_sel && mem_wr_en && mem_wr_addr == GW'(g) && mem_wr_slot == 0, "load");
      @(negedge clk); cyc++;
    end
    llr_valid = 0;
    for (int it = 0; it < exp_iter; it++) begin
      for (int L = 0; L < 2; L++) begin
        for (int e = 0; e < 3; e++) begin
          automatic int i = L * 3 + e;
          #1;
          chk(proc_rd_en && !proc_wr_en && mem_rd_en && mem_rd_addr == GW'(tg[i]) && shift == SHW'(ts[i])
              && edge_idx == EW'(e) && layer == LW'(L) && first_iter == (it == 0), "read phase");
          // group 1 written to two alternate words in layer 0 is pending in layer 1
          if (i == 3) chk(mem_pend == 2'd2, "pending copies merged");
          else if (i == 1) chk(mem_pend == (it == 0 ? 2'd0 : 2'd0), "no pending");
          @(negedge clk); cyc++;
        end
        for (int e = 0; e < 3; e++) begin
          automatic int i = L * 3 + e;
          #1;
          chk(proc_wr_en && mem_wr_en && mem_wr_addr == GW'(tg[i]) && mem_wr_slot == MW'(tsl[i])
              && shift == SHW'(ts[i]) && edge_idx == EW'(e) && uj_wr_en == (e == 0), "write phase");
          @(negedge clk); cyc++;
        end
      end
    end
    for (int g = 0; g < NG; g++) begin
      #1;
      chk(hd_valid && hd_group == GW'(g) && mem_rd_en && mem_rd_addr == GW'(g), "read-out");
      @(negedge clk); cyc++;
    end
    #1;
    chk(done, "done");
    chk(iterations == 8'(exp_iter), "iteration count");
    chk(converged == !parity_bad, "converged flag");
    chk(cyc == NG + exp_iter * 12 + NG, "cycles per frame");
    @(negedge clk); #1;
    chk(!busy, "idle");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(1'b1, 3);   // parity never satisfied: stops at max_iter
    run_frame(1'b0, 1);   // everything satisfied: stops after one iteration
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
