// tb_ifft_out_scale: checks the output stage. In FFT mode the sample passes
// unchanged; in IFFT mode real and imaginary parts are exchanged and divided
// by 64, rounded half up (floor((v + 32) / 64)). out_k must be the
// bit-reversed position. Latency is one en cycle.
module tb_ifft_out_scale;
  localparam int DW = 20;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0, mode = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0, out_re, out_im;
  logic [5:0] in_idx = '0, out_k;
  logic out_valid;
  int checks = 0, failures = 0;
  ifft_out_scale #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  function automatic int div64(input int v);
    return (v + 32) >>> 6;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      int a, b, er, ei, t;
      a = (i < 4) ? -32 + 32 * i : int'($urandom_range(1000000)) - 500000;
      b = int'($urandom_range(1000000)) - 500000;
      t = int'($urandom_range(63));
      @(negedge clk);
      en = 1'b1; in_valid = 1'b1; mode = 1'(i % 3 == 0); in_re = DW'(a); in_im = DW'(b); in_idx = 6'(t);
      @(negedge clk);
      en = 1'b0;
      er = mode ? div64(b) : a;
      ei = mode ? div64(a) : b;
      checks++;
      if (!out_valid || out_re != DW'(er) || out_im != DW'(ei) ||
          out_k != {in_idx[0], in_idx[1], in_idx[2], in_idx[3], in_idx[4], in_idx[5]}) begin
        failures++;
        $display("mode %0d (%0d,%0d) pos %0d: got (%0d,%0d) k %0d, exp (%0d,%0d)", mode, a, b, t,
                 out_re, out_im, out_k, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
