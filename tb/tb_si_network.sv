// tb_si_network: processor p must receive memory lane (p+shift) mod P, and a
// value a processor returns must land in the lane it was read from.
module tb_si_network;
  localparam int unsigned P = 12, SW = 8, SHW = $clog2(P);
  logic [SHW-1:0] shift;
  logic [P-1:0][SW-1:0] mem_rd, proc_rd, proc_wr, mem_wr;
  int checks = 0, failures = 0;

  si_network #(.P(P), .SW(SW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      shift = SHW'(t % P);
      for (int p = 0; p < P; p++) mem_rd[p] = SW'($urandom);
      #1;
      proc_wr = proc_rd;   // processors echo what they read
      #1;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (proc_rd[p] != mem_rd[(p + t % P) % P]) failures++;
        checks++;
        if (mem_wr[p] != mem_rd[p]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
