// ifft_out_scale: output stage of the FFT/IFFT processor: real/imaginary
// swap, division by 64 and the FFT/IFFT output multiplexer.
//
// In FFT mode (mode = 0) the transform result passes unchanged. In IFFT
// mode the real and imaginary parts are exchanged back and the result is
// divided by the transform length 64, an arithmetic shift right by six bits
// rounded half up, which completes IDFT(x) = swap(DFT(swap(x)))/64.
//
// out_k gives the frequency (or, in IFFT mode, time) index of the output
// sample: the pipeline emits index k at position bitrev6(k) of its frame.
// Timing: one register stage moving when en is high. The rounding of the
// division is this design's choice.
module ifft_out_scale #(
  parameter int unsigned DW = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  logic                 mode,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  logic [5:0]           in_idx,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic [5:0]           out_k
);
  import fft_pkg::*;

  logic signed [DW:0]   rnd_re, rnd_im;
  logic signed [DW-1:0] div_re, div_im;

  // Swap first, then divide: the new real part comes from the imaginary one.
  assign rnd_re = (DW+1)'(in_im) + (DW+1)'(32);
  assign rnd_im = (DW+1)'(in_re) + (DW+1)'(32);
  assign div_re = DW'(rnd_re >>> 6);
  assign div_im = DW'(rnd_im >>> 6);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_k     <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      out_re    <= mode ? div_re : in_re;
      out_im    <= mode ? div_im : in_im;
      out_k     <= bitrev6(in_idx);
    end
  end
endmodule
