// tb_uj_memory: writes a random record into every layer address, then
// rewrites some, and reads all back against a shadow copy while random
// data sits on the disabled write port.
module tb_uj_memory;
  localparam int unsigned NL = 90, RW = 21;
  logic clk = 0;
  logic [6:0] rd_addr, wr_addr;
  logic [RW-1:0] rd_data, wr_data;
  logic wr_en;
  logic [RW-1:0] shadow [NL];
  int checks = 0, failures = 0;

  uj_memory #(.NL(NL), .RW(RW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    for (int r = 0; r < 3; r++) begin
      for (int a = 0; a < NL; a++) begin
        if (r == 0 || ($urandom % 2)) begin
          @(negedge clk);
          wr_en = 1; wr_addr = 7'(a); wr_data = RW'($urandom);
          shadow[a] = wr_data;
        end
      end
      @(negedge clk); wr_en = 0;
      for (int a = 0; a < NL; a++) begin
        // random data on the write port with the enable low must not land
        wr_addr = 7'($urandom_range(NL - 1)); wr_data = RW'($urandom);
        @(negedge clk);
        rd_addr = 7'(a); #1;
        checks++;
        if (rd_data != shadow[a]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
