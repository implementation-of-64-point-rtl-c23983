// tb_cmplx_mult_w64: checks the twiddle multiplier between the processing
// elements. For every sample position t (all 64, several times, random
// data) the output must be the input times W64^e with e = t[2:0] *
// (t5 + 2 t4 + 4 t3) mod 64, computed here in double precision, within two
// LSBs; for e = 0 the sample must pass exactly. Latency is one en cycle.
module tb_cmplx_mult_w64;
  localparam int DW = 20, CW = 20;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0, out_re, out_im;
  logic [5:0] in_idx = '0;
  logic out_valid;
  int checks = 0, failures = 0;
  cmplx_mult_w64 #(.DW(DW), .CW(CW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 64 * 6; i++) begin
      int a, b, t, e;
      real er, ei, ang;
      a = int'($urandom_range(300000)) - 150000;
      b = int'($urandom_range(300000)) - 150000;
      t = i % 64;
      e = ((t % 8) * (((t >> 5) & 1) + 2 * ((t >> 4) & 1) + 4 * ((t >> 3) & 1))) % 64;
      @(negedge clk);
      en = 1'b1; in_valid = 1'b1; in_re = DW'(a); in_im = DW'(b); in_idx = 6'(t);
      @(negedge clk);
      en = 1'b0;
      ang = -6.283185307179586 * e / 64.0;
      er = a * $cos(ang) - b * $sin(ang);
      ei = a * $sin(ang) + b * $cos(ang);
      checks++;
      if (!out_valid || (real'(out_re) - er) > 2.0 || (er - real'(out_re)) > 2.0 ||
          (real'(out_im) - ei) > 2.0 || (ei - real'(out_im)) > 2.0) begin
        failures++;
        $display("t=%0d e=%0d (%0d,%0d): got (%0d,%0d) expected (%f,%f)", t, e, a, b, out_re, out_im, er, ei);
      end
      if (e == 0) begin
        checks++;
        if (out_re != DW'(a) || out_im != DW'(b)) begin
          failures++;
          $display("t=%0d: e=0 not exact", t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
