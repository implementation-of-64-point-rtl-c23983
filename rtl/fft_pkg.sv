// fft_pkg: constants and helper functions shared by the 64-point radix-2^3
// single-path delay feedback (R2^3SDF) FFT/IFFT processor.
//
// Twiddle factors are not held in a ROM. The only constants are the 17
// values of a quarter cosine wave, cos(k*pi/32) for k = 0..16, given here at
// 30 fractional bits: QCOS[k] = round(2^30 * cos(k*pi/32)). Every W64^e is
// derived from them by quadrant symmetry (twiddle_gen_w64), and the 1/sqrt(2)
// of the W8 constant multiplier is QCOS[8]. Coefficients are used in a
// two's-complement format with two integer bits (sign and one), so +1.0 is
// representable: a CW-bit coefficient has CW-2 fractional bits.
package fft_pkg;

  // Quarter-wave cosine table, Q2.30.
  function automatic logic signed [31:0] qcos30(input logic [4:0] k);
    case (k)
      5'd0:    return 32'sd1073741824;
      5'd1:    return 32'sd1068571464;
      5'd2:    return 32'sd1053110176;
      5'd3:    return 32'sd1027506862;
      5'd4:    return 32'sd992008094;
      5'd5:    return 32'sd946955747;
      5'd6:    return 32'sd892783698;
      5'd7:    return 32'sd830013654;
      5'd8:    return 32'sd759250125;
      5'd9:    return 32'sd681174602;
      5'd10:   return 32'sd596538995;
      5'd11:   return 32'sd506158392;
      5'd12:   return 32'sd410903207;
      5'd13:   return 32'sd311690799;
      5'd14:   return 32'sd209476638;
      5'd15:   return 32'sd105245103;
      default: return 32'sd0;
    endcase
  endfunction

  // Round a Q2.30 value to FRAC fractional bits (FRAC <= 30), half up.
  function automatic logic signed [31:0] q30_round(input logic signed [31:0] v, input int frac);
    logic signed [32:0] t;
    t = 33'(v) + (33'sd1 <<< (29 - frac));
    return 32'(t >>> (30 - frac));
  endfunction

  // Reverse the six bits of a sample position: the processor emits bin k at
  // output position bitrev6(k).
  function automatic logic [5:0] bitrev6(input logic [5:0] v);
    return {v[0], v[1], v[2], v[3], v[4], v[5]};
  endfunction

endpackage
