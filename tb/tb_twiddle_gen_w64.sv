// tb_twiddle_gen_w64: checks all 64 twiddle factors W64^e = cos(2 pi e/64)
// - j sin(2 pi e/64) against double-precision values, within one LSB of the
// 18 fractional bits, and that e = 0 gives exactly 1.0.
module tb_twiddle_gen_w64;
  localparam int CW = 20;
  int checks = 0, failures = 0;
  logic [5:0] e;
  logic signed [CW-1:0] w_re, w_im;
  twiddle_gen_w64 #(.CW(CW)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      real cr, ci, ang;
      e = 6'(k);
      #1;
      ang = 6.283185307179586 * k / 64.0;
      cr = $cos(ang) * 262144.0;
      ci = -$sin(ang) * 262144.0;
      checks++;
      if ((real'(w_re) - cr) > 1.0 || (cr - real'(w_re)) > 1.0 ||
          (real'(w_im) - ci) > 1.0 || (ci - real'(w_im)) > 1.0) begin
        failures++;
        $display("e=%0d got (%0d,%0d) expected (%f,%f)", k, w_re, w_im, cr, ci);
      end
    end
    e = 0;
    #1;
    checks++;
    if (w_re != 20'sd262144 || w_im != 0) begin
      failures++;
      $display("W^0 is not exactly 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
