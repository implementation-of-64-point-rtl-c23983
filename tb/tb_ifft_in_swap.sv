// tb_ifft_in_swap: checks the input FFT/IFFT stage. The mode is read with
// the first valid sample of each 64-sample frame and held for the frame
// even when the ifft input changes; in IFFT mode real and imaginary parts
// are exchanged, in FFT mode they pass. Samples are checked one en cycle
// later; cycles without a valid sample must not advance the frame.
module tb_ifft_in_swap;
  localparam int DW = 20;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0, ifft = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0, out_re, out_im;
  logic out_valid, out_mode;
  int checks = 0, failures = 0;
  ifft_in_swap #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit modes [6] = '{1, 0, 0, 1, 1, 0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 6; f++) begin
      for (int n = 0; n < 64; n++) begin
        int a, b;
        @(negedge clk);
        if ($urandom_range(4) == 0) begin
          // an enabled cycle without a valid sample, with the wrong mode
          en = 1'b1; in_valid = 1'b0; ifft = ~modes[f];
          @(negedge clk);
          checks++;
          if (out_valid) begin failures++; $display("valid without input"); end
        end
        a = int'($urandom_range(100000)) - 50000;
        b = int'($urandom_range(100000)) - 50000;
        en = 1'b1; in_valid = 1'b1; in_re = DW'(a); in_im = DW'(b);
        ifft = (n == 0) ? modes[f] : 1'($urandom);
        @(negedge clk);
        en = 1'b0;
        checks++;
        if (!out_valid || out_mode != modes[f] ||
            out_re != DW'(modes[f] ? b : a) || out_im != DW'(modes[f] ? a : b)) begin
          failures++;
          $display("frame %0d sample %0d: mode %0d got (%0d,%0d) from (%0d,%0d)", f, n, out_mode,
                   out_re, out_im, a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
