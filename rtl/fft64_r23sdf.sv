// fft64_r23sdf: 64-point FFT/IFFT processor built as a radix-2^3
// single-path delay feedback (R2^3SDF) pipeline. A 64-point radix-8
// decimation-in-frequency FFT has two radix-8 stages; each is done by one
// radix-2^3 processing element (three radix-2 butterflies with feedback
// buffers, a trivial -j multiplier and a W8 constant multiplier), and the
// only general twiddle multiplication, by W64^e, sits between the two:
//
//   in -> FFT/IFFT swap -> PE(N=64: 32,16,8) -> W64 multiplier
//      -> PE(N=8: 4,2,1) -> swap, /64 and FFT/IFFT mux -> out
//
// The twiddle factors are generated from a 17-value quarter cosine instead
// of a twiddle ROM, and the general multiplier uses fixed-width modified
// Booth multipliers. The inverse transform reuses the forward datapath:
// IDFT(x) = swap(DFT(swap(x)))/64, with swap exchanging real and imaginary
// parts.
//
// The stage layout, the -j, W8 and W64 multipliers, the ROM-less twiddles,
// the Booth multipliers and the swap / divide-by-64 IFFT path follow the
// published radix-2^3 SDF architecture. The flow control, the per-frame mode
// handling, the number format, the rounding and the out_k output are this
// design's own choices.
//
// Interface: one complex sample per cycle with in_valid high, in natural
// order, in frames of 64 counted from reset. ifft is read with the first
// sample of each frame and selects the inverse transform for that frame.
// The pipeline only moves on cycles with in_valid high: a gap in the input
// stalls it, and the last 73 results of a stream leave only as further
// samples (for example a frame of zeros) are pushed in. out_valid pulses
// for each result; results leave in bit-reversed order, and out_k gives the
// bin index k of each (position bitrev6(k) of the output frame), out_ifft
// the mode of its frame. Latency: result j (counted over the stream) is
// presented in the cycle after input sample j+73 is accepted; 63 of those
// samples are the six feedback buffers and 10 the registers after the input
// register.
//
// Number format: two's-complement, DW bits per component, the same width
// throughout. FFT results are not scaled, so the input must leave
// log2(64) = 6 bits of headroom plus one for the complex sum: keep
// |re|, |im| below 2^(DW-1)/(64*sqrt(2)) (5792 for DW = 20). Coefficients
// are CW bits with CW-2 fractional bits (CW <= 31).
module fft64_r23sdf #(
  parameter int unsigned DW = 20,
  parameter int unsigned CW = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 ifft,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic [5:0]           out_k,
  output logic                 out_ifft
);
  logic                 en, en_q;
  logic                 v0, v1, v2, v3, vo;
  logic                 m0;
  logic signed [DW-1:0] r0, i0, r1, i1, r2, i2, r3, i3;
  logic [5:0]           x1, x3;

  assign en = in_valid;

  ifft_in_swap #(.DW(DW)) u_in (
    .clk(clk), .rst_n(rst_n), .en(en),
    .in_valid(in_valid), .ifft(ifft), .in_re(in_re), .in_im(in_im),
    .out_valid(v0), .out_re(r0), .out_im(i0), .out_mode(m0)
  );

  r23sdf_pe #(.DW(DW), .CW(CW), .N(64), .IDXW(6)) u_pe64 (
    .clk(clk), .rst_n(rst_n), .en(en),
    .in_valid(v0), .in_re(r0), .in_im(i0),
    .out_valid(v1), .out_re(r1), .out_im(i1), .out_idx(x1)
  );

  cmplx_mult_w64 #(.DW(DW), .CW(CW)) u_tw (
    .clk(clk), .rst_n(rst_n), .en(en),
    .in_valid(v1), .in_re(r1), .in_im(i1), .in_idx(x1),
    .out_valid(v2), .out_re(r2), .out_im(i2)
  );

  r23sdf_pe #(.DW(DW), .CW(CW), .N(8), .IDXW(6)) u_pe8 (
    .clk(clk), .rst_n(rst_n), .en(en),
    .in_valid(v2), .in_re(r2), .in_im(i2),
    .out_valid(v3), .out_re(r3), .out_im(i3), .out_idx(x3)
  );

  // Frame mode bookkeeping: the mode of each frame is recorded as the frame
  // enters the first processing element and read back as the same frame
  // reaches the output stage. At most two frames are in flight.
  logic [3:0] mode_hist;
  logic [1:0] f_in, f_out;
  logic       pos_in_first;
  logic [5:0] pos_in;
  logic       mode_out;

  assign pos_in_first = (pos_in == 6'd0);
  assign mode_out     = mode_hist[f_out];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_hist <= '0;
      f_in      <= '0;
      f_out     <= '0;
      pos_in    <= '0;
    end else if (en) begin
      if (v0) begin
        pos_in <= pos_in + 1'b1;
        if (pos_in_first) mode_hist[f_in] <= m0;
        if (pos_in == 6'd63) f_in <= f_in + 1'b1;
      end
      if (v3 && x3 == 6'd63) f_out <= f_out + 1'b1;
    end
  end

  ifft_out_scale #(.DW(DW)) u_out (
    .clk(clk), .rst_n(rst_n), .en(en),
    .in_valid(v3), .mode(mode_out), .in_re(r3), .in_im(i3), .in_idx(x3),
    .out_valid(vo), .out_re(out_re), .out_im(out_im), .out_k(out_k)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q     <= 1'b0;
      out_ifft <= 1'b0;
    end else begin
      en_q <= en;
      if (en) out_ifft <= mode_out;
    end
  end

  assign out_valid = vo & en_q;
endmodule
