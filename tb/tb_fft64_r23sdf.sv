// tb_fft64_r23sdf: end-to-end test of the 64-point FFT/IFFT processor at its
// default parameters (20-bit data, 20-bit coefficients).
//
// Eight frames are streamed through: an impulse, a single tone and random
// data, in a mode sequence that switches between FFT and IFFT several times,
// with random one- to three-cycle gaps in the input that stall the pipeline,
// followed by two frames of zeros that push the last results out. Every
// output is compared with a double-precision DFT (or inverse DFT divided by
// 64) computed here, within a small rounding tolerance; the bin index out_k,
// the frame mode out_ifft and the latency (result j leaves in the cycle after input j+73 is accepted)
// are checked
// for every result. The test also counts the mechanisms it must exercise
// (stalls, FFT->IFFT and IFFT->FFT switches, IFFT frames) and fails if one
// never happened.
module tb_fft64_r23sdf;
  localparam int DW     = 20;
  localparam int NF     = 8;             // frames checked
  localparam int NT     = NF + 2;        // plus two flush frames of zeros
  localparam int LAT    = 73;            // result j leaves after input j+LAT
  localparam real TWO_PI = 6.283185307179586;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic                 ifft = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic                 out_valid;
  logic signed [DW-1:0] out_re, out_im;
  logic [5:0]           out_k;
  logic                 out_ifft;

  fft64_r23sdf dut (.*);

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  int  xr [NT][64], xi [NT][64];
  bit  fmode [NT];
  real er [NT][64], ei [NT][64];
  int  n_out = 0;
  int  n_stall = 0, n_to_ifft = 0, n_to_fft = 0, n_ifft_frames = 0;
  int  max_err = 0;

  // Independent reference: direct DFT in double precision.
  task automatic reference(input int f);
    for (int k = 0; k < 64; k++) begin
      real sr, si, ang, c, s;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < 64; n++) begin
        ang = TWO_PI * real'((n * k) % 64) / 64.0;
        c = $cos(ang);
        s = fmode[f] ? $sin(ang) : -$sin(ang);
        sr += real'(xr[f][n]) * c - real'(xi[f][n]) * s;
        si += real'(xr[f][n]) * s + real'(xi[f][n]) * c;
      end
      if (fmode[f]) begin sr /= 64.0; si /= 64.0; end
      er[f][k] = sr; ei[f][k] = si;
    end
  endtask

  function automatic int iabs(input real v);
    return (v < 0.0) ? int'(-v) : int'(v);
  endfunction

  function automatic logic [5:0] brev(input logic [5:0] v);
    return {v[0], v[1], v[2], v[3], v[4], v[5]};
  endfunction

  // Count accepted input samples.
  int n_acc = 0;
  always @(posedge clk) if (rst_n && in_valid) n_acc <= n_acc + 1;

  // Output checker.
  always @(posedge clk) begin
    if (out_valid) begin
      int f, pos, tol, e1, e2;
      f   = n_out / 64;
      pos = n_out % 64;
      if (f < NT) begin
        tol = fmode[f] ? 2 : 32;
        e1 = iabs(real'(out_re) - er[f][out_k]);
        e2 = iabs(real'(out_im) - ei[f][out_k]);
        if (e1 > max_err) max_err = e1;
        if (e2 > max_err) max_err = e2;
        checks++;
        if (e1 > tol || e2 > tol) begin
          failures++;
          $display("MISMATCH frame %0d k=%0d got (%0d,%0d) exp (%f,%f)", f, out_k,
                   out_re, out_im, er[f][out_k], ei[f][out_k]);
        end
        checks++;
        if (out_k != brev(6'(pos))) begin
          failures++;
          $display("ORDER frame %0d pos %0d: out_k=%0d", f, pos, out_k);
        end
        checks++;
        if (out_ifft != fmode[f]) begin
          failures++;
          $display("MODE frame %0d: out_ifft=%0d", f, out_ifft);
        end
        // Latency: output j is produced when input j+LAT is accepted, so
        // j+LAT+1 inputs have been counted when it is seen.
        checks++;
        if (n_acc != n_out + LAT + 1) begin
          failures++;
          $display("LATENCY output %0d after %0d inputs", n_out, n_acc);
        end
      end
      n_out++;
    end
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit modes [NF] = '{0, 1, 1, 0, 1, 0, 0, 1};
    // Stimulus.
    for (int f = 0; f < NT; f++) begin
      fmode[f] = (f < NF) ? modes[f] : 1'b0;
      for (int n = 0; n < 64; n++) begin
        case (f)
          0:       begin xr[f][n] = (n == 0) ? 4000 : 0; xi[f][n] = 0; end
          1:       begin xr[f][n] = (n == 5) ? 5000 : 0; xi[f][n] = (n == 9) ? -3000 : 0; end
          2:       begin
                     xr[f][n] = int'(4000.0 * $cos(TWO_PI * 3.0 * n / 64.0));
                     xi[f][n] = int'(4000.0 * $sin(TWO_PI * 3.0 * n / 64.0));
                   end
          NF, NF + 1: begin xr[f][n] = 0; xi[f][n] = 0; end
          default: begin
                     xr[f][n] = int'($urandom_range(11000)) - 5500;
                     xi[f][n] = int'($urandom_range(11000)) - 5500;
                   end
        endcase
      end
      reference(f);
      if (f > 0 && fmode[f] && !fmode[f-1]) n_to_ifft++;
      if (f > 0 && !fmode[f] && fmode[f-1]) n_to_fft++;
      if (f < NF && fmode[f]) n_ifft_frames++;
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int f = 0; f < NT; f++) begin
      for (int n = 0; n < 64; n++) begin
        if ($urandom_range(9) == 0) begin
          int gap = int'($urandom_range(3, 1));
          in_valid <= 1'b0;
          ifft     <= ~fmode[f];   // must be ignored outside the first sample
          repeat (gap) @(posedge clk);
          n_stall += gap;
        end
        in_valid <= 1'b1;
        ifft     <= (n == 0) ? fmode[f] : ~fmode[f];
        in_re    <= DW'(xr[f][n]);
        in_im    <= DW'(xi[f][n]);
        @(posedge clk);
      end
    end
    // Only the first NF frames and the part of the zero frames that has
    // left are compared.
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);

    checks++;
    if (n_out < NF * 64) begin
      failures++;
      $display("only %0d outputs, expected at least %0d", n_out, NF * 64);
    end
    checks++; if (n_stall == 0)       begin failures++; $display("no stall happened"); end
    checks++; if (n_to_ifft == 0)     begin failures++; $display("no FFT->IFFT switch"); end
    checks++; if (n_to_fft == 0)      begin failures++; $display("no IFFT->FFT switch"); end
    checks++; if (n_ifft_frames == 0) begin failures++; $display("no IFFT frame"); end
    $display("stall cycles=%0d fft->ifft=%0d ifft->fft=%0d ifft frames=%0d outputs=%0d max error=%0d",
             n_stall, n_to_ifft, n_to_fft, n_ifft_frames, n_out, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
