// ifft_in_swap: input stage of the FFT/IFFT processor, the FFT/IFFT
// multiplexer with the real/imaginary swap in front of the first
// processing element.
//
// The inverse transform is computed with the forward datapath through the
// identity IDFT(x) = swap(DFT(swap(x)))/N, where swap(a + jb) = b + ja. In
// IFFT mode this stage therefore passes the input with its real and
// imaginary parts exchanged; in FFT mode it passes it unchanged.
//
// The mode is taken per 64-sample frame: ifft is sampled with the first
// valid sample of a frame and held for the rest of the frame, and out_mode
// reports the mode applied to the sample in the output register, so the
// output stage can undo the swap for the same frame. Frames are counted
// from reset, 64 valid samples each. Timing: one register stage moving when
// en is high. The per-frame sampling of the mode is this design's choice.
module ifft_in_swap #(
  parameter int unsigned DW = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  logic                 ifft,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic                 out_mode
);
  logic [5:0] pos;
  logic       mode_hold;
  logic       mode;

  assign mode = (pos == 6'd0) ? ifft : mode_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      mode_hold <= 1'b0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_mode  <= 1'b0;
    end else if (en) begin
      out_valid <= in_valid;
      if (in_valid) begin
        pos       <= pos + 1'b1;
        mode_hold <= mode;
        out_mode  <= mode;
        out_re    <= mode ? in_im : in_re;
        out_im    <= mode ? in_re : in_im;
      end
    end
  end
endmodule
