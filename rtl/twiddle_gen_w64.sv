// twiddle_gen_w64: ROM-less twiddle factor generator for the 64-point
// processor. For an exponent e = 0..63 it returns W64^e = cos(2*pi*e/64)
// - j*sin(2*pi*e/64) as two CW-bit coefficients with CW-2 fractional bits.
//
// No 64-entry twiddle ROM is kept. The exponent is split into a quadrant
// q = e[5:4] and an angle r = e[3:0] inside it; cos and sin of r*pi/32 are
// read from the same 17-value quarter cosine (sin(r*pi/32) =
// cos((16-r)*pi/32)), and the quadrant only swaps the two and flips signs:
//
//   q = 0: ( cos r,  sin r)   q = 1: (-sin r,  cos r)
//   q = 2: (-cos r, -sin r)   q = 3: ( sin r, -cos r)     (cos e, sin e)
//
// The quarter-wave values are constants of fft_pkg, rounded here to CW-2
// fractional bits. Purely combinational.
module twiddle_gen_w64 #(
  parameter int unsigned CW = 20
) (
  input  logic [5:0]           e,
  output logic signed [CW-1:0] w_re,
  output logic signed [CW-1:0] w_im
);
  import fft_pkg::*;

  localparam int unsigned FRAC = CW - 2;

  logic [1:0]           q;
  logic [3:0]           r;
  logic signed [CW-1:0] c, s, cos_e, sin_e;

  assign q = e[5:4];
  assign r = e[3:0];
  assign c = CW'(q30_round(qcos30({1'b0, r}), FRAC));
  assign s = CW'(q30_round(qcos30(5'd16 - {1'b0, r}), FRAC));

  always_comb begin
    case (q)
      2'd0:    begin cos_e = c;  sin_e = s;  end
      2'd1:    begin cos_e = -s; sin_e = c;  end
      2'd2:    begin cos_e = -c; sin_e = -s; end
      default: begin cos_e = s;  sin_e = -c; end
    endcase
    w_re = cos_e;
    w_im = -sin_e;
  end
endmodule
