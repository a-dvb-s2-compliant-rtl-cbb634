// tb_check_processor: runs random checknodes (degree 2..8, random S_i and
// random old records) through a read phase and a write phase and compares
// every updated S_i, the new compressed record and the parity flag with an
// offset min-sum computed here edge by edge from the excluded minimum.
module tb_check_processor;
  localparam int unsigned W = 6, SW = 8, DCMAX = 8, OFFSET = 1;
  localparam int unsigned EW = 3, MAGW = 5, RW = DCMAX + 2 * MAGW + EW;
  logic clk = 0;
  logic first_iter, rd_en, wr_en, flip, parity_odd;
  logic [RW-1:0] rec_old, rec_new;
  logic [EW-1:0] edge_idx;
  logic [SW-1:0] s_in, s_out;
  int checks = 0, failures = 0;

  check_processor #(.W(W), .SW(SW), .DCMAX(DCMAX), .OFFSET(OFFSET)) dut (.*);
  always #5 clk = ~clk;

  function automatic int sat(int x, int lo, int hi);
    return x > hi ? hi : (x < lo ? lo : x);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dc, s[DCMAX], uo[DCMAX], v[DCMAX], mg[DCMAX], un[DCMAX];
    int o_m1, o_m2, o_idx, par, exp_s;
    logic [DCMAX-1:0] o_sgn;
    rd_en = 0; wr_en = 0; first_iter = 0; rec_old = '0; edge_idx = '0; s_in = '0;
    for (int t = 0; t < 2000; t++) begin
      dc = 2 + $urandom_range(DCMAX - 2);
      first_iter = (t % 7 == 0);
      o_sgn = DCMAX'($urandom); o_m1 = $urandom_range(31); o_m2 = o_m1 + $urandom_range(31 - o_m1);
      o_idx = $urandom_range(dc - 1);
      rec_old = {o_sgn, MAGW'(o_m1), MAGW'(o_m2), EW'(o_idx)};
      par = 0;
      for (int e = 0; e < dc; e++) begin
        automatic int mag;
        s[e] = (t % 3 == 0) ? $urandom_range(255) - 128 : $urandom_range(60) - 30;
        mag = (e == o_idx) ? o_m2 : o_m1;
        uo[e] = first_iter ? 0 : (o_sgn[e] ? -mag : mag);
        v[e] = s[e] - uo[e];
        mg[e] = sat(v[e] < 0 ? -v[e] : v[e], 0, 31);
        par ^= (s[e] < 0);
      end
      // u_new = sign product of the others * max(min of the others - OFFSET, 0)
      for (int e = 0; e < dc; e++) begin
        automatic int mn = 31, sg = 0;
        for (int k = 0; k < dc; k++) if (k != e) begin
          if (mg[k] < mn) mn = mg[k];
          sg ^= (v[k] < 0);
        end
        mn = (mn > OFFSET) ? mn - OFFSET : 0;
        un[e] = sg ? -mn : mn;
      end
      for (int e = 0; e < dc; e++) begin
        @(negedge clk);
        rd_en = 1; edge_idx = EW'(e); s_in = SW'(s[e]);
      end
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (parity_odd != par[0]) failures++;
      for (int e = 0; e < dc; e++) begin
        wr_en = 1; edge_idx = EW'(e); #1;
        exp_s = sat(v[e] + un[e], -128, 127);
        checks++;
        if (int'($signed(s_out)) != exp_s) begin
          failures++;
          if (failures < 6) $display("t=%0d e=%0d dc=%0d s_out=%0d exp=%0d v=%0d un=%0d s=%0d uo=%0d fi=%0d", t, e, dc, $signed(s_out), exp_s, v[e], un[e], s[e], uo[e], first_iter);
        end
        checks++;
        if (flip != ((exp_s < 0) != (s[e] < 0))) failures++;
        @(negedge clk);
      end
      wr_en = 0;
      // the new record must reproduce every u_new
      for (int e = 0; e < dc; e++) begin
        automatic int mag = (e == int'(rec_new[EW-1:0])) ? int'(rec_new[EW+MAGW-1:EW]) : int'(rec_new[EW+2*MAGW-1:EW+MAGW]);
        automatic int u = rec_new[RW-DCMAX+e] ? -mag : mag;
        checks++;
        if (u != un[e]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
