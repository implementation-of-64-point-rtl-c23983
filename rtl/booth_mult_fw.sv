// booth_mult_fw: fixed-width radix-4 modified Booth multiplier.
//
// The coefficient b is recoded into radix-4 Booth digits
// d_i = -2*b[2i+1] + b[2i] + b[2i-1] (b[-1] = 0), each in {-2..2}, so a
// BW-bit coefficient gives ceil(BW/2) partial products d_i * a, each a
// shift and optional negation of the data word a. The partial products are
// summed with weights 4^i. The result is returned at a fixed width: the
// full product is rounded half up by FRAC bits and the low OW bits kept, so
// with a Q2.(BW-2) coefficient and FRAC = BW-2 the output has the scale of
// a. Rounding once, after summing all partial products, gives the smallest
// truncation error a fixed-width output can have; which compensation scheme
// the fixed-width multiplier uses is this design's own choice.
// Purely combinational.
module booth_mult_fw #(
  parameter int unsigned AW   = 20,
  parameter int unsigned BW   = 20,
  parameter int unsigned FRAC = 18,
  parameter int unsigned OW   = 20
) (
  input  logic signed [AW-1:0] a,
  input  logic signed [BW-1:0] b,
  output logic signed [OW-1:0] p
);
  localparam int unsigned ND = (BW + 1) / 2;   // Booth digits
  localparam int unsigned PW = AW + 2 * ND + 1; // full product width

  logic [2*ND:0]        bx;   // b, sign-extended, with b[-1] = 0 below
  logic signed [PW-1:0] acc;
  logic signed [PW-1:0] pp;
  logic signed [PW-1:0] a_x;
  logic signed [PW-1:0] rnd;

  assign bx  = {(2*ND)'(b), 1'b0};
  assign a_x = PW'(a);

  always_comb begin
    acc = '0;
    for (int i = 0; i < ND; i++) begin
      case (bx[2*i +: 3])
        3'b001, 3'b010: pp = a_x;
        3'b011:         pp = a_x <<< 1;
        3'b100:         pp = -(a_x <<< 1);
        3'b101, 3'b110: pp = -a_x;
        default:        pp = '0;
      endcase
      acc = acc + (pp <<< (2 * i));
    end
    rnd = acc + (PW'(1) <<< (FRAC - 1));
    p   = OW'(rnd >>> FRAC);
  end
endmodule
