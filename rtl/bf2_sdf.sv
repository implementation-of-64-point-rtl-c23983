// bf2_sdf: one radix-2 single-path delay feedback butterfly (BF2I, BF2II or
// BF2III of a radix-2^3 processing element), with its D-word feedback buffer.
//
// Samples arrive one per enabled cycle in natural order. A phase counter
// splits every 2*D valid input samples into two halves. In the first half the
// input x[n] is written into the feedback buffer and the buffer's output
// (a difference left there by the previous block) is sent on. In the second
// half the input x[n+D] meets x[n] coming out of the buffer: the sum
// x[n]+x[n+D] is sent on and the difference x[n]-x[n+D] is written back, to
// leave during the next first half. Output order is therefore all sums of a
// block, then all its differences, and the stage delays the stream by D
// samples plus one register.
//
// Interface: every register moves only when en is high. in_valid marks a
// real sample at the input (low while upstream stages fill). out_valid marks
// a real sample in the output register; the first D outputs after reset are
// suppressed because the buffer held no difference yet. out_idx is the
// position of the output sample, counted modulo 2^IDXW from the first valid
// output, which downstream twiddle logic decodes. Data are two's-complement
// with the same width in and out; sums wrap, so the caller keeps headroom
// (the top module documents the input range). Register and counter layout
// are this design's own choices.
module bf2_sdf #(
  parameter int unsigned DW   = 20,
  parameter int unsigned D    = 32,
  parameter int unsigned IDXW = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic [IDXW-1:0]      out_idx
);
  localparam int unsigned PW = $clog2(D) + 1;  // phase counter, modulo 2*D

  logic [PW-1:0]        cnt;
  logic                 phase;     // 0: fill / drain, 1: butterfly
  logic                 primed;    // a butterfly half has been seen
  logic                 step;
  logic [IDXW-1:0]      ocnt;
  logic [2*DW-1:0]      dl_in, dl_out;
  logic signed [DW-1:0] fb_re, fb_im;
  logic signed [DW-1:0] sum_re, sum_im, dif_re, dif_im;

  assign phase = cnt[PW-1];
  assign step  = en && in_valid;

  assign {fb_re, fb_im} = dl_out;
  assign sum_re = fb_re + in_re;
  assign sum_im = fb_im + in_im;
  assign dif_re = fb_re - in_re;
  assign dif_im = fb_im - in_im;
  assign dl_in  = phase ? {dif_re, dif_im} : {in_re, in_im};

  sdf_delay_line #(.W(2*DW), .DEPTH(D)) u_dl (
    .clk (clk),
    .rst_n(rst_n),
    .en  (step),
    .din (dl_in),
    .dout(dl_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      primed    <= 1'b0;
      ocnt      <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_idx   <= '0;
    end else if (en) begin
      out_valid <= step && (phase || primed);
      if (step) begin
        cnt <= cnt + 1'b1;
        if (phase) primed <= 1'b1;
        out_re <= phase ? sum_re : fb_re;
        out_im <= phase ? sum_im : fb_im;
        if (phase || primed) begin
          out_idx <= ocnt;
          ocnt    <= ocnt + 1'b1;
        end
      end
    end
  end
endmodule
