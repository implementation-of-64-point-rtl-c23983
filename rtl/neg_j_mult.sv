// neg_j_mult: the trivial "-j" multiplier that sits between BF2I and BF2II
// of a radix-2^3 processing element.
//
// When sel is high the sample is multiplied by -j, (a + jb)(-j) = b - ja:
// the real and imaginary parts trade places and the new imaginary part is
// negated, so no multiplier is needed. When sel is low the sample passes
// unchanged. The block is purely combinational; the caller decodes sel from
// the sample position. Negating the most negative code wraps to itself, which
// the headroom rule of the top module keeps from happening.
module neg_j_mult #(
  parameter int unsigned DW = 20
) (
  input  logic                 sel,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);
  always_comb begin
    if (sel) begin
      out_re = in_im;
      out_im = -in_re;
    end else begin
      out_re = in_re;
      out_im = in_im;
    end
  end
endmodule
