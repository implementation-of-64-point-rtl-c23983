// tb_neg_j_mult: checks the trivial -j multiplier: with sel high,
// (a + jb)(-j) = b - ja; with sel low the sample passes unchanged.
module tb_neg_j_mult;
  localparam int DW = 20;
  int checks = 0, failures = 0;
  logic sel;
  logic signed [DW-1:0] in_re, in_im, out_re, out_im;
  neg_j_mult #(.DW(DW)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      int a, b, er, ei;
      a = int'($urandom_range(200000)) - 100000;
      b = int'($urandom_range(200000)) - 100000;
      sel = 1'($urandom);
      in_re = DW'(a); in_im = DW'(b);
      #1;
      er = sel ? b : a;
      ei = sel ? -a : b;
      checks++;
      if (out_re != DW'(er) || out_im != DW'(ei)) begin
        failures++;
        $display("sel=%0d (%0d,%0d) -> (%0d,%0d)", sel, a, b, out_re, out_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
