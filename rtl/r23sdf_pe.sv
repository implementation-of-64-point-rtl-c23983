// r23sdf_pe: one radix-2^3 single-path delay feedback processing element.
// It computes, on a stream of N samples, the three radix-2 stages that
// together form one radix-8 butterfly stage of a decimation-in-frequency
// FFT:
//
//   BF2I (delay N/2) -> -j -> BF2II (delay N/4) -> c -> BF2III (delay N/8)
//
// With t the position of a sample inside its N-sample block (L = log2 N
// bits), the trivial multiplier after BF2I applies -j when t[L-1] and
// t[L-2] are both 1, and the constant multiplier after BF2II applies
// W8^(t[L-1] + 2*t[L-2]) when t[L-3] is 1 (1 otherwise). These follow from
// splitting the input index as n = (N/2)n1 + (N/4)n2 + (N/8)n3 + n' and the
// output index as k = k1 + 2k2 + 4k3 + 8k': the exponent terms
// (N/4)n2*k1 and (N/8)n3*(k1 + 2k2) are the only ones left between the
// butterflies. The output of a block leaves in the order t = {k1,k2,k3,n'}.
// For N = 64 the element is followed by the W64 twiddle multiplier; for
// N = 8 it is the last stage and needs none.
//
// Interface and timing: the same en / valid / position convention as
// bf2_sdf. Positions are counted modulo 2^IDXW (the frame length) from the
// first valid output; IDXW >= log2 N. Latency from the first valid input to
// the first valid output is 7N/8 valid samples plus the registers of the
// three butterflies and the constant multiplier.
module r23sdf_pe #(
  parameter int unsigned DW   = 20,
  parameter int unsigned CW   = 20,
  parameter int unsigned N    = 64,
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
  localparam int unsigned L = $clog2(N);

  logic                 v1, v2, v3;
  logic signed [DW-1:0] r1, i1, r1j, i1j, r2, i2, r3, i3;
  logic [IDXW-1:0]      x1, x2;  // positions after BF2I and BF2II
  logic                 sel_j;
  logic [1:0]           sel_e;

  bf2_sdf #(.DW(DW), .D(N/2), .IDXW(IDXW)) u_bf2i (
    .clk(clk), .rst_n(rst_n), .en(en),
    .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(v1), .out_re(r1), .out_im(i1), .out_idx(x1)
  );

  assign sel_j = x1[L-1] & x1[L-2];

  neg_j_mult #(.DW(DW)) u_negj (
    .sel(sel_j), .in_re(r1), .in_im(i1), .out_re(r1j), .out_im(i1j)
  );

  bf2_sdf #(.DW(DW), .D(N/4), .IDXW(IDXW)) u_bf2ii (
    .clk(clk), .rst_n(rst_n), .en(en),
    .in_valid(v1), .in_re(r1j), .in_im(i1j),
    .out_valid(v2), .out_re(r2), .out_im(i2), .out_idx(x2)
  );

  assign sel_e = x2[L-3] ? {x2[L-2], x2[L-1]} : 2'd0;

  const_mult_w8 #(.DW(DW), .CW(CW)) u_c (
    .clk(clk), .rst_n(rst_n), .en(en),
    .in_valid(v2), .sel_e(sel_e), .in_re(r2), .in_im(i2),
    .out_valid(v3), .out_re(r3), .out_im(i3)
  );

  bf2_sdf #(.DW(DW), .D(N/8), .IDXW(IDXW)) u_bf2iii (
    .clk(clk), .rst_n(rst_n), .en(en),
    .in_valid(v3), .in_re(r3), .in_im(i3),
    .out_valid(out_valid), .out_re(out_re), .out_im(out_im), .out_idx(out_idx)
  );
endmodule
