// tb_si_merge: random S and copies; the output must equal
// sum(S^k, k<=m) - (m-1)*S saturated to the signed S_i width, for m = 0..3.
module tb_si_merge;
  localparam int unsigned SW = 8, M_ALT = 3;
  logic signed [SW-1:0] s_reg, s_out;
  logic [M_ALT-1:0][SW-1:0] s_alt;
  logic [1:0] m;
  int checks = 0, failures = 0, sat_hits = 0;

  si_merge #(.SW(SW), .M_ALT(M_ALT)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      automatic int exp_v;
      s_reg = SW'($urandom);
      for (int k = 0; k < M_ALT; k++) s_alt[k] = (t % 2) ? SW'(int'(s_reg) + $urandom_range(20) - 10) : SW'($urandom);
      m = 2'(t % 4);
      #1;
      exp_v = -(int'(m) - 1) * int'(s_reg);
      if (m == 0) exp_v = int'(s_reg);
      for (int k = 0; k < int'(m); k++) exp_v += int'($signed(s_alt[k]));
      if (exp_v > 127) begin exp_v = 127; sat_hits++; end
      if (exp_v < -128) begin exp_v = -128; sat_hits++; end
      checks++;
      if (int'(s_out) != exp_v) begin
        failures++;
        if (failures < 5) $display("mismatch m=%0d s=%0d got %0d exp %0d", m, s_reg, s_out, exp_v);
      end
    end
    checks++;
    if (sat_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
