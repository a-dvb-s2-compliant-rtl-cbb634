// tb_si_memory: random writes to regular and alternate words, then reads with
// random pending counts. A read with pend = m must return the saturated
// sum(S^k) - (m-1)*S, write it back to the regular word and flag a sign
// change; a read with pend = 0 returns the regular word unchanged.
module tb_si_memory;
  localparam int unsigned NG = 16, SW = 8, M_ALT = 2, GW = 4, MW = 2;
  logic clk = 0;
  logic rd_en, wr_en, merge_flip;
  logic [GW-1:0] rd_addr, wr_addr;
  logic [MW-1:0] pend, wr_slot;
  logic [SW-1:0] rd_data, wr_data;
  int sh [3][NG];
  int checks = 0, failures = 0, flips = 0;

  si_memory #(.NG(NG), .SW(SW), .M_ALT(M_ALT)) dut (.*);
  always #5 clk = ~clk;

  function automatic int sat(int x);
    return x > 127 ? 127 : (x < -128 ? -128 : x);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; pend = 0; wr_slot = 0; wr_data = 0;
    for (int k = 0; k < 3; k++)
      for (int g = 0; g < NG; g++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = GW'(g); wr_slot = MW'(k); wr_data = SW'($urandom_range(100) - 50);
        sh[k][g] = int'($signed(wr_data));
      end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      automatic int g, m, exp_v;
      @(negedge clk);
      if ($urandom % 3 == 0) begin
        rd_en = 0; wr_en = 1;
        wr_addr = GW'($urandom_range(NG - 1)); wr_slot = MW'($urandom_range(2));
        wr_data = SW'($urandom_range(120) - 60);
        sh[wr_slot][wr_addr] = int'($signed(wr_data));
      end else begin
        wr_en = 0; rd_en = 1;
        g = $urandom_range(NG - 1); m = $urandom_range(2);
        rd_addr = GW'(g); pend = MW'(m);
        #1;
        exp_v = sh[0][g];
        for (int k = 1; k <= m; k++) exp_v += sh[k][g] - sh[0][g];
        exp_v = sat(exp_v);
        checks++;
        if (int'($signed(rd_data)) != exp_v) failures++;
        checks++;
        if (merge_flip != (m > 0 && ((exp_v < 0) != (sh[0][g] < 0)))) failures++;
        if (merge_flip) flips++;
        sh[0][g] = exp_v;   // merged value becomes the regular word
      end
    end
    @(negedge clk); rd_en = 0; wr_en = 0;
    for (int g = 0; g < NG; g++) begin
      rd_en = 1; rd_addr = GW'(g); pend = 0; #1;
      checks++;
      if (int'($signed(rd_data)) != sh[0][g]) failures++;
    end
    checks++;
    if (flips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
