// cmplx_mult_w64: the reconfigurable complex multiplier between the two
// radix-2^3 processing elements. It multiplies each sample by its twiddle
// factor W64^e, with the factor made on the fly by twiddle_gen_w64 rather
// than read from a ROM.
//
// After the first processing element (delays 32, 16, 8) the sample at
// output position t = {t5..t0} belongs to input sub-sequence n = t[2:0] and
// partial frequency index k = t5 + 2*t4 + 4*t3, so the exponent is
// e = n*k mod 64. For e = 0 (the multiplier would see 1.0) the sample
// passes exactly. Otherwise four fixed-width Booth multiplications form
//   re = a*wr - b*wi,   im = a*wi + b*wr     (x = a + jb, W = wr + j wi)
// each rounded to DW bits before the final additions.
//
// Timing: one register stage moving when en is high; valid and the sample
// position travel with the data. The exponent decoding follows from the
// radix-2^3 index map; the four-multiplier structure and the register are
// this design's own choices.
module cmplx_mult_w64 #(
  parameter int unsigned DW = 20,
  parameter int unsigned CW = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  logic [5:0]           in_idx,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);
  logic [2:0]           n_sub, k_part;
  logic [5:0]           e;
  logic signed [CW-1:0] w_re, w_im;
  logic signed [DW-1:0] p_rr, p_ii, p_ri, p_ir;
  logic signed [DW-1:0] nx_re, nx_im;

  assign n_sub  = in_idx[2:0];
  assign k_part = {in_idx[3], in_idx[4], in_idx[5]};
  assign e      = 6'(n_sub) * 6'(k_part);  // modulo 64

  twiddle_gen_w64 #(.CW(CW)) u_tw (.e(e), .w_re(w_re), .w_im(w_im));

  booth_mult_fw #(.AW(DW), .BW(CW), .FRAC(CW-2), .OW(DW)) u_m_rr (.a(in_re), .b(w_re), .p(p_rr));
  booth_mult_fw #(.AW(DW), .BW(CW), .FRAC(CW-2), .OW(DW)) u_m_ii (.a(in_im), .b(w_im), .p(p_ii));
  booth_mult_fw #(.AW(DW), .BW(CW), .FRAC(CW-2), .OW(DW)) u_m_ri (.a(in_re), .b(w_im), .p(p_ri));
  booth_mult_fw #(.AW(DW), .BW(CW), .FRAC(CW-2), .OW(DW)) u_m_ir (.a(in_im), .b(w_re), .p(p_ir));

  always_comb begin
    if (e == 6'd0) begin
      nx_re = in_re;
      nx_im = in_im;
    end else begin
      nx_re = p_rr - p_ii;
      nx_im = p_ri + p_ir;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      out_re    <= nx_re;
      out_im    <= nx_im;
    end
  end
endmodule
