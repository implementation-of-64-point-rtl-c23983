// tb_const_mult_w8: checks the W8 constant multiplier for all four
// exponents against double-precision complex products (within one LSB),
// the exact results for e = 0 and e = 2, the one-register latency, and that
// the register holds while en is low.
module tb_const_mult_w8;
  localparam int DW = 20, CW = 20;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  logic [1:0] sel_e = '0;
  logic signed [DW-1:0] in_re = '0, in_im = '0, out_re, out_im;
  logic out_valid;
  int checks = 0, failures = 0;
  const_mult_w8 #(.DW(DW), .CW(CW)) dut (.*);
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
    for (int i = 0; i < 600; i++) begin
      int a, b, s;
      real er, ei, ang;
      logic signed [DW-1:0] held_re;
      a = int'($urandom_range(400000)) - 200000;
      b = int'($urandom_range(400000)) - 200000;
      s = int'($urandom_range(3));
      @(negedge clk);
      en = 1'b1; in_valid = 1'b1; sel_e = 2'(s); in_re = DW'(a); in_im = DW'(b);
      @(negedge clk);
      en = 1'b0;
      ang = -6.283185307179586 * s / 8.0;
      er = a * $cos(ang) - b * $sin(ang);
      ei = a * $sin(ang) + b * $cos(ang);
      checks++;
      if (!out_valid || (real'(out_re) - er) > 1.0 || (er - real'(out_re)) > 1.0 ||
          (real'(out_im) - ei) > 1.0 || (ei - real'(out_im)) > 1.0) begin
        failures++;
        $display("e=%0d (%0d,%0d): got (%0d,%0d) expected (%f,%f)", s, a, b, out_re, out_im, er, ei);
      end
      if (s == 0 || s == 2) begin
        checks++;
        if (out_re != DW'(s == 0 ? a : b) || out_im != DW'(s == 0 ? b : -a)) begin
          failures++;
          $display("trivial exponent %0d not exact", s);
        end
      end
      // en low: output must hold even though the input changes.
      held_re = out_re;
      in_re = ~in_re;
      @(negedge clk);
      checks++;
      if (out_re != held_re) begin
        failures++;
        $display("output moved with en low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
