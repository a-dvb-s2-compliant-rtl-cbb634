// ldpc_tb_driver: stimulus, reference model and checker for the complete
// decoder, shared by the reduced-size and the full-size testbenches.
//
// It builds a random quasi-cyclic code: NL layers of DC circulant blocks over
// NG bit groups, where with probability 1/DUP_DIV a block reuses a bit group
// already present in its layer (with another rotation), so that several
// processors update the same S_i in one layer. Entries of a group that occurs
// m > 1 times in a layer get write slots 1..m. The table is loaded through
// the configuration port. Each frame is the all-zero codeword (a codeword of
// every linear code) seen through noise of growing strength, quantised to
// W-bit LLRs. The reference model below decodes the same frame with the same
// fixed-point arithmetic and the same copy/merge bookkeeping, written as
// plain loops over bits; hard decisions, iteration counts, the converged flag
// and the cycles per frame must match. It also counts the mechanisms the
// frames exercised and fails any that never occurred.
module ldpc_tb_driver #(
  parameter int unsigned P        = 16,
  parameter int unsigned NG       = 12,
  parameter int unsigned NL       = 6,
  parameter int unsigned W        = 6,
  parameter int unsigned SW       = 8,
  parameter int unsigned DCMAX    = 8,
  parameter int unsigned M_ALT    = 2,
  parameter int unsigned OFFSET   = 1,
  parameter int unsigned DEPTH    = 48,
  parameter int unsigned DC       = 6,
  parameter int unsigned DUP_DIV  = 4,
  parameter int unsigned N_FRAMES = 6,
  parameter int unsigned MAX_IT   = 12,
  parameter int unsigned NOISE0   = 0,   // noise amplitude of frame 0
  parameter int unsigned NOISE_STEP = 5, // added per frame
  parameter bit          REQ_MECH = 1'b1, // fail if a mechanism never occurred
  parameter bit          STANDALONE = 1'b1, // print the result and finish
  localparam int unsigned GW  = (NG > 1) ? $clog2(NG) : 1,
  localparam int unsigned SHW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned MW  = $clog2(M_ALT + 1),
  localparam int unsigned DW  = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned TW  = 1 + MW + SHW + GW
) (
  input  logic                clk,
  output logic                rst_n,
  output logic                cfg_we,
  output logic [DW-1:0]       cfg_addr,
  output logic [TW-1:0]       cfg_entry,
  output logic [DW:0]         n_entries,
  output logic [7:0]          max_iter,
  output logic                start,
  output logic                llr_valid,
  input  logic                llr_ready,
  output logic [P-1:0][W-1:0] llr,
  input  logic                hd_valid,
  input  logic [GW-1:0]       hd_group,
  input  logic [P-1:0]        hd,
  input  logic                busy,
  input  logic                done,
  input  logic [7:0]          iterations,
  input  logic                converged,
  input  logic                hw_merge,      // a merging read this cycle
  input  logic                hw_alt_write   // a write to an alternate word
);

  localparam int unsigned NE = NL * DC;
  localparam int SMAX = 2 ** (SW - 1) - 1, SMIN = -(2 ** (SW - 1));
  localparam int LMAX = 2 ** (W - 1) - 1, LMIN = -(2 ** (W - 1));
  localparam int MAGMAX = 2 ** (W - 1) - 1;

  int checks = 0, failures = 0;
  bit finished = 1'b0;

  // code
  int grp [NE], shf [NE], slt [NE];
  // reference state
  int sreg [M_ALT+1][NG][P];
  int pend [NG];
  int umsg [NL][P][DC];
  int chan [NG][P];
  // mechanism counters (model side and design side)
  int n_merge = 0, n_alt = 0, n_flipmerge = 0, n_ssat = 0, n_early = 0, n_maxit = 0;
  int n_outmerge = 0, n_hw_merge = 0, n_hw_alt = 0;
  int n_multi_it = 0;

  function automatic int sat(int x, int lo, int hi);
    return x > hi ? hi : (x < lo ? lo : x);
  endfunction

  task automatic fail(input string what);
    failures++;
    if (failures < 12) $display("FAIL: %s (t=%0t)", what, $time);
  endtask

  // ------------------------------------------------------------ code build
  task automatic build_code();
    for (int L = 0; L < NL; L++) begin
      int cnt [NG];
      for (int g = 0; g < NG; g++) cnt[g] = 0;
      for (int e = 0; e < DC; e++) begin
        automatic int i = L * DC + e;
        automatic int g;
        automatic bit ok;
        do begin
          ok = 1;
          if (e > 0 && ($urandom % DUP_DIV) == 0) g = grp[L * DC + $urandom_range(e - 1)];
          else g = $urandom_range(NG - 1);
          if (cnt[g] >= int'(M_ALT)) ok = 0;
          shf[i] = $urandom_range(P - 1);
          for (int k = L * DC; k < i; k++) if (grp[k] == g && shf[k] == shf[i]) ok = 0;
        end while (!ok);
        grp[i] = g;
        cnt[g]++;
      end
      for (int e = 0; e < DC; e++) begin
        automatic int i = L * DC + e;
        automatic int seen = 0;
        if (cnt[grp[i]] > 1) begin
          for (int k = L * DC; k <= i; k++) if (grp[k] == grp[i]) seen++;
          slt[i] = seen;
        end else slt[i] = 0;
      end
    end
  endtask

  // ------------------------------------------------------------ reference
  task automatic model_merge(input int g, input bit readout, inout bit bad);
    if (pend[g] > 0) begin
      for (int l = 0; l < P; l++) begin
        automatic int acc = sreg[0][g][l];
        for (int k = 1; k <= pend[g]; k++) acc += sreg[k][g][l] - sreg[0][g][l];
        acc = sat(acc, SMIN, SMAX);
        if ((acc < 0) != (sreg[0][g][l] < 0)) begin bad = 1; n_flipmerge++; end
        sreg[0][g][l] = acc;
      end
      if (readout) n_outmerge++; else n_merge++;
      pend[g] = 0;
    end
  endtask

  task automatic model_decode(output int it, output bit conv);
    bit bad;
    for (int g = 0; g < NG; g++) begin
      pend[g] = 0;
      for (int l = 0; l < P; l++) sreg[0][g][l] = chan[g][l];
    end
    it = 0;
    conv = 0;
    forever begin
      bad = 0;
      for (int L = 0; L < NL; L++) begin
        int s_rd [P][DC], v [P][DC], mg [P][DC], un [P][DC];
        for (int e = 0; e < DC; e++) begin
          automatic int i = L * DC + e;
          model_merge(grp[i], 1'b0, bad);
          for (int p = 0; p < P; p++) s_rd[p][e] = sreg[0][grp[i]][(p + shf[i]) % P];
        end
        for (int p = 0; p < P; p++) begin
          automatic int par = 0;
          for (int e = 0; e < DC; e++) begin
            automatic int uo = (it == 0) ? 0 : umsg[L][p][e];
            v[p][e] = s_rd[p][e] - uo;
            mg[p][e] = sat(v[p][e] < 0 ? -v[p][e] : v[p][e], 0, MAGMAX);
            par ^= (s_rd[p][e] < 0);
          end
          if (par) bad = 1;
          for (int e = 0; e < DC; e++) begin
            automatic int mn = MAGMAX, sg = 0;
            for (int k = 0; k < DC; k++) if (k != e) begin
              if (mg[p][k] < mn) mn = mg[p][k];
              sg ^= (v[p][k] < 0);
            end
            mn = (mn > int'(OFFSET)) ? mn - int'(OFFSET) : 0;
            un[p][e] = sg ? -mn : mn;
            umsg[L][p][e] = un[p][e];
          end
        end
        for (int e = 0; e < DC; e++) begin
          automatic int i = L * DC + e;
          for (int p = 0; p < P; p++) begin
            automatic int raw = v[p][e] + un[p][e];
            automatic int sn = sat(raw, SMIN, SMAX);
            if (raw != sn) n_ssat++;
            if ((sn < 0) != (s_rd[p][e] < 0)) bad = 1;
            sreg[slt[i]][grp[i]][(p + shf[i]) % P] = sn;
          end
          if (slt[i] > 0) begin
            n_alt++;
            if (slt[i] > pend[grp[i]]) pend[grp[i]] = slt[i];
          end
        end
      end
      it++;
      if (!bad) begin conv = 1; break; end
      if (it >= int'(MAX_IT)) break;
    end
    begin
      bit obad = 0;
      for (int g = 0; g < NG; g++) model_merge(g, 1'b1, obad);
      if (obad) conv = 0;
    end
  endtask

  // ------------------------------------------------------------ design side
  always @(posedge clk) begin
    if (hw_merge) n_hw_merge++;
    if (hw_alt_write) n_hw_alt++;
  end

  initial begin
    int exp_it, cyc, exp_cyc;
    bit exp_conv;
    rst_n = 0; cfg_we = 0; cfg_addr = '0; cfg_entry = '0; start = 0; llr_valid = 0; llr = '0;
    n_entries = (DW+1)'(NE);
    max_iter = 8'(MAX_IT);
    build_code();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(NE); i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = DW'(i);
      cfg_entry = {(i % DC) == DC - 1, MW'(slt[i]), SHW'(shf[i]), GW'(grp[i])};
    end
    @(negedge clk); cfg_we = 0;

    for (int f = 0; f < int'(N_FRAMES); f++) begin
      automatic int amp = NOISE0 + f * NOISE_STEP;
      automatic int mean = 6;
      automatic int n_hw_merge0 = n_hw_merge, n_hw_alt0 = n_hw_alt;
      automatic int n_merge0 = n_merge + n_outmerge, n_alt0 = n_alt;
      for (int g = 0; g < NG; g++)
        for (int l = 0; l < P; l++) begin
          automatic int nz = 0;
          for (int k = 0; k < 4; k++) nz += $urandom_range(2 * amp) - amp;
          chan[g][l] = sat(mean + nz / 2, LMIN, LMAX);
        end
      model_decode(exp_it, exp_conv);
      if (exp_conv && exp_it < int'(MAX_IT)) n_early++;
      if (!exp_conv) n_maxit++;
      if (exp_it > 1) n_multi_it++;

      // run the design
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      for (int g = 0; g < NG; g++) begin
        llr_valid = 1;
        for (int l = 0; l < P; l++) llr[l] = W'(chan[g][l]);
        #1;
        checks++;
        if (!llr_ready) fail("llr_ready low during load");
        @(negedge clk); cyc++;
      end
      llr_valid = 0;
      while (!done) begin
        if (hd_valid) begin
          for (int l = 0; l < P; l++) begin
            checks++;
            if (hd[l] != (sreg[0][hd_group][l] < 0)) fail($sformatf("frame %0d hard decision group %0d lane %0d", f, hd_group, l));
          end
        end
        @(negedge clk); cyc++;
        if (cyc > 1000000) break;
      end
      exp_cyc = 1 + 2 * int'(NG) + exp_it * 2 * int'(NE);
      checks++;
      if (int'(iterations) != exp_it) fail($sformatf("frame %0d iterations %0d expected %0d", f, iterations, exp_it));
      checks++;
      if (converged != exp_conv) fail($sformatf("frame %0d converged %0d expected %0d", f, converged, exp_conv));
      checks++;
      if (cyc != exp_cyc) fail($sformatf("frame %0d cycles %0d expected %0d", f, cyc, exp_cyc));
      checks++;
      if (n_hw_merge - n_hw_merge0 != n_merge + n_outmerge - n_merge0) fail("number of merging reads");
      checks++;
      if (n_hw_alt - n_hw_alt0 != (n_alt - n_alt0) * 1) fail("number of alternate-word writes");
      $display("frame %0d: noise %0d, %0d iterations, converged %0d, %0d cycles", f, amp, exp_it, exp_conv, cyc);
    end

    $display("mechanisms: merges=%0d readout_merges=%0d alt_writes=%0d merge_sign_flips=%0d S_saturations=%0d early_stops=%0d max_iter_stops=%0d multi_iteration_frames=%0d",
             n_merge, n_outmerge, n_alt, n_flipmerge, n_ssat, n_early, n_maxit, n_multi_it);
    if (REQ_MECH) begin
      checks++; if (n_merge == 0) fail("no merge of alternate copies");
      checks++; if (n_alt == 0) fail("no alternate-word write");
      checks++; if (n_early == 0) fail("no early stop on a valid codeword");
      checks++; if (n_multi_it == 0) fail("no frame needed more than one iteration");
    end
    finished = 1'b1;
    if (STANDALONE) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule
