// const_mult_w8: the constant multiplier ("c") between BF2II and BF2III of a
// radix-2^3 processing element. It multiplies a sample by W8^e,
// W8 = exp(-j*2*pi/8), for e = 0..3 chosen by the caller.
//
//   e = 0: x                         (pass)
//   e = 1: x(1 - j)/sqrt(2)   -> re = (a+b)K,  im = (b-a)K
//   e = 2: x(-j)              -> re = b,       im = -a
//   e = 3: x(-1 - j)/sqrt(2)  -> re = (b-a)K,  im = -(a+b)K
//
// with x = a + jb and K = 1/sqrt(2). Only the one fixed coefficient K is
// needed, so the products are by a constant, not general multiplications.
// K is held with CW-2 fractional bits (round(2^18/sqrt(2)) = 185364 for the
// default CW = 20); products are rounded half up back to DW bits.
//
// Timing: one register stage, moving when en is high; valid travels with the
// data. The register stage and the rounding
// are this design's own choices.
module const_mult_w8 #(
  parameter int unsigned DW   = 20,
  parameter int unsigned CW   = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  logic [1:0]           sel_e,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);
  import fft_pkg::*;

  localparam int unsigned FRAC = CW - 2;
  localparam logic signed [CW-1:0] K = CW'(q30_round(qcos30(5'd8), FRAC));
  localparam int unsigned PW = DW + 1 + CW;

  logic signed [DW:0]   s_ab, d_ba;   // a+b and b-a, one bit wider
  logic signed [PW-1:0] p_s, p_d;
  logic signed [DW-1:0] k_s, k_d;     // (a+b)K and (b-a)K, rounded
  logic signed [DW-1:0] nx_re, nx_im;

  assign s_ab = (DW+1)'(in_re) + (DW+1)'(in_im);
  assign d_ba = (DW+1)'(in_im) - (DW+1)'(in_re);
  assign p_s  = PW'(s_ab) * PW'(K) + (PW'(1) <<< (FRAC - 1));
  assign p_d  = PW'(d_ba) * PW'(K) + (PW'(1) <<< (FRAC - 1));
  assign k_s  = DW'(p_s >>> FRAC);
  assign k_d  = DW'(p_d >>> FRAC);

  always_comb begin
    case (sel_e)
      2'd1:    begin nx_re = k_s;   nx_im = k_d;    end
      2'd2:    begin nx_re = in_im; nx_im = -in_re; end
      2'd3:    begin nx_re = k_d;   nx_im = -k_s;   end
      default: begin nx_re = in_re; nx_im = in_im;  end
    endcase
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
