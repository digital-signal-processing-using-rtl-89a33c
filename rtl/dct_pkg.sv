// dct_pkg: integer coefficients a(k,i) of the eight-point DCT used by
// dct8_1d (y(k) = sum_i a(k,i) x(i)) and idct8_1d (x(i) = sum_k a(k,i) y(k)).
//
// The coefficients are cosines scaled by 64:
//   a(0,i) = 45                       (64*cos(pi/4) = 45.25, kept unaltered;
//                                      45 = 32 + 8 + 4 + 1, four shifted terms)
//   a(k,i) = +/- M(j), k = 1..7        j and the sign follow from
//                                      cos((2i+1)*k*pi/16) = +/- cos(j*pi/16)
// where M(j) is 64*cos(j*pi/16) rounded to the nearest number of the form
// 2^p + 2^q (p >= q, p = q allowed), so that each product is two left shifts
// and one addition:
//   j     1   2   3   4   5   6   7
//   M    64  64  48  48  36  24  12
// The results are scaled by 128 relative to an orthonormal DCT
// (45/128 ~ 1/sqrt(8), 64/128 = 1/2), so each transform output is shifted
// right by OUT_SHIFT = 7 bits.
//
// Keeping the dc coefficient exact as a four-term sum and reducing the
// others to two terms is the published scheme; the integer values, the
// scale of 64 and the shift of 7 are this design's choices.
package dct_pkg;

  localparam int N         = 8;
  localparam int OUT_SHIFT = 7;

  // dc coefficient 45 = (1<<5) + (1<<3) + (1<<2) + (1<<0)
  localparam int DC_COEF     = 45;
  localparam int DC_SHIFT0   = 5;
  localparam int DC_SHIFT1   = 3;
  localparam int DC_SHIFT2   = 2;
  localparam int DC_SHIFT3   = 0;

  // Altered magnitude M(j) for cos(j*pi/16), j = 0..8.
  function automatic int cos_mag(int j);
    case (j)
      0, 1, 2: return 64;
      3, 4:    return 48;
      5:       return 36;
      6:       return 24;
      7:       return 12;
      default: return 0;
    endcase
  endfunction

  // Signed coefficient a(k,i).
  function automatic int coef(int k, int i);
    int n;
    int sgn;
    if (k == 0) return DC_COEF;
    n   = ((2 * i + 1) * k) % 32;     // angle in units of pi/16, period 2*pi
    sgn = 1;
    if (n > 16) n = 32 - n;           // cos(2*pi - t) = cos(t)
    if (n > 8) begin                  // cos(pi - t) = -cos(t)
      n   = 16 - n;
      sgn = -1;
    end
    return sgn * cos_mag(n);
  endfunction

  // Shift amounts of the two terms of |a(k,i)| = 2^hi + 2^lo (k > 0).
  function automatic int coef_shift_hi(int k, int i);
    int m;
    m = (coef(k, i) < 0) ? -coef(k, i) : coef(k, i);
    for (int b = 30; b >= 0; b--)
      if (m[b]) return ((m & (m - 1)) == 0) ? b - 1 : b;
    return 0;
  endfunction

  function automatic int coef_shift_lo(int k, int i);
    int m;
    m = (coef(k, i) < 0) ? -coef(k, i) : coef(k, i);
    for (int b = 0; b <= 30; b++)
      if (m[b]) return ((m & (m - 1)) == 0) ? b - 1 : b;
    return 0;
  endfunction

  function automatic bit coef_negative(int k, int i);
    return coef(k, i) < 0;
  endfunction

endpackage
