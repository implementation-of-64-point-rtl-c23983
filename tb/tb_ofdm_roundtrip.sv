// tb_ofdm_roundtrip: OFDM-style workload on the 64-point processor at its
// default parameters. Four symbols of QPSK data (+/-4000 per component on
// all 64 subcarriers) are transformed to the time domain in IFFT mode; the
// time-domain results, put back into natural order with out_k, are then
// fed through the same processor in FFT mode, interleaved in one stream:
//   IFFT0 IFFT1 IFFT2 IFFT3 FFT0 FFT1 FFT2 FFT3 zeros zeros
// Each recovered subcarrier must be within 64 LSB of the transmitted value
// (the time-domain words are rounded to integers) and decode to the same
// QPSK symbol. The IFFT->FFT switch is counted at the output and must occur.
module tb_ofdm_roundtrip;
  localparam int DW = 20, NS = 4, A = 4000;
  logic                 clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, ifft = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0, out_re, out_im;
  logic                 out_valid, out_ifft;
  logic [5:0]           out_k;
  fft64_r23sdf dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sym_re [NS][64], sym_im [NS][64];     // transmitted subcarriers
  int td_re [NS][64], td_im [NS][64];       // time-domain symbols
  bit td_done [NS][64];
  int n_out = 0, n_switch = 0, max_err = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit last_mode = 1'b0;
  always @(posedge clk) begin
    if (out_valid) begin
      int f, e1, e2;
      if (n_out > 0 && last_mode && !out_ifft) n_switch++;
      last_mode = out_ifft;
      f = n_out / 64;
      if (f < NS) begin
        // IFFT results: keep in natural order
        td_re[f][out_k] = int'(out_re);
        td_im[f][out_k] = int'(out_im);
        td_done[f][out_k] = 1'b1;
        checks++;
        if (!out_ifft) begin failures++; $display("frame %0d not in IFFT mode", f); end
      end else if (f < 2 * NS) begin
        f = f - NS;
        e1 = int'(out_re) - sym_re[f][out_k]; if (e1 < 0) e1 = -e1;
        e2 = int'(out_im) - sym_im[f][out_k]; if (e2 < 0) e2 = -e2;
        if (e1 > max_err) max_err = e1;
        if (e2 > max_err) max_err = e2;
        checks++;
        if (e1 > 64 || e2 > 64 || out_ifft ||
            ((out_re < 0) != (sym_re[f][out_k] < 0)) || ((out_im < 0) != (sym_im[f][out_k] < 0))) begin
          failures++;
          $display("symbol %0d subcarrier %0d: got (%0d,%0d) sent (%0d,%0d)", f, out_k, out_re, out_im,
                   sym_re[f][out_k], sym_im[f][out_k]);
        end
      end
      n_out++;
    end
  end

  task automatic send_frame(input bit mode, input int f, input int kind);
    for (int n = 0; n < 64; n++) begin
      in_valid <= 1'b1;
      ifft     <= mode;
      case (kind)
        0:       begin in_re <= DW'(sym_re[f][n]); in_im <= DW'(sym_im[f][n]); end
        1:       begin
                   if (!td_done[f][n]) begin failures++; $display("time sample %0d/%0d not ready", f, n); end
                   in_re <= DW'(td_re[f][n]); in_im <= DW'(td_im[f][n]);
                 end
        default: begin in_re <= '0; in_im <= '0; end
      endcase
      @(posedge clk);
    end
  endtask

  initial begin
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < 64; k++) begin
        sym_re[s][k] = $urandom_range(1) ? A : -A;
        sym_im[s][k] = $urandom_range(1) ? A : -A;
        td_done[s][k] = 1'b0;
      end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < NS; s++) send_frame(1'b1, s, 0);
    for (int s = 0; s < NS; s++) send_frame(1'b0, s, 1);
    send_frame(1'b0, 0, 2);
    send_frame(1'b0, 0, 2);
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_out < 2 * NS * 64) begin failures++; $display("only %0d outputs", n_out); end
    checks++;
    if (n_switch == 0) begin failures++; $display("no IFFT->FFT switch"); end
    $display("symbols=%0d recovered, max subcarrier error=%0d LSB", NS, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
