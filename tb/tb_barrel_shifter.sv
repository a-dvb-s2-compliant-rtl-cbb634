// tb_barrel_shifter: checks both rotation directions of the 360-lane barrel
// shifter against an index computation, for random data and every shift
// amount in a sweep, and checks that the two directions invert each other.
module tb_barrel_shifter;
  localparam int unsigned P = 360, W = 8, SHW = $clog2(P);
  logic [P-1:0][W-1:0] din, dl, dr, back;
  logic [SHW-1:0] shift;
  int checks = 0, failures = 0;

  barrel_shifter #(.P(P), .W(W), .DIR_LEFT(1'b1)) u_l (.din(din), .shift(shift), .dout(dl));
  barrel_shifter #(.P(P), .W(W), .DIR_LEFT(1'b0)) u_r (.din(din), .shift(shift), .dout(dr));
  barrel_shifter #(.P(P), .W(W), .DIR_LEFT(1'b0)) u_b (.din(dl), .shift(shift), .dout(back));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int p = 0; p < P; p++) din[p] = W'($urandom);
      shift = (t < P) ? SHW'(t) : SHW'($urandom_range(P - 1));
      #1;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (dl[p] != din[(p + int'(shift)) % P]) failures++;
        if (dr[p] != din[(p + P - int'(shift)) % P]) failures++;
        if (back[p] != din[p]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
