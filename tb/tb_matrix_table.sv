// tb_matrix_table: loads every entry through the configuration port and
// reads them back, with random data on the disabled port, and also while
// other entries are being overwritten.
module tb_matrix_table;
  localparam int unsigned DEPTH = 720, EW = 20, DW = $clog2(DEPTH);
  logic clk = 0;
  logic cfg_we;
  logic [DW-1:0] cfg_addr, rd_addr;
  logic [EW-1:0] cfg_entry, rd_entry;
  logic [EW-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  matrix_table #(.DEPTH(DEPTH), .EW(EW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_entry = 0; rd_addr = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = DW'(a); cfg_entry = EW'($urandom); shadow[a] = cfg_entry;
    end
    @(negedge clk); cfg_we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      // random data on the disabled configuration port must not land
      cfg_addr = DW'($urandom_range(DEPTH - 1)); cfg_entry = EW'($urandom);
      @(negedge clk);
      rd_addr = DW'(a); #1;
      checks++;
      if (rd_entry != shadow[a]) failures++;
    end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = DW'($urandom_range(DEPTH - 1)); cfg_entry = EW'($urandom);
      rd_addr = DW'($urandom_range(DEPTH - 1)); #1;
      checks++;
      if (rd_entry != shadow[rd_addr]) failures++;   // old contents until the clock edge
      shadow[cfg_addr] = cfg_entry;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
