// tb_ref_pkg: bit-exact reference models for the testbenches, written
// independently of the RTL.
//
// The full-adder cells are modelled from their published truth tables, not
// from gate equations: for each kind an 8-bit mask holds the sum (or carry)
// of input row {a,b,cin} in bit {a,b,cin}. Ripple-carry adders, carry-save
// rows, 4:2 and 8:2 compressors, the constant multipliers and the 1-D
// transforms are then modelled on words of up to 64 bits, bit by bit, with
// the same cell placement as the hardware (approximate cells below bit k).
// The DCT coefficients are derived here from real cosines: 64*cos rounded to
// the nearest 2^p + 2^q, and 45 for the dc row.
package tb_ref_pkg;

  // kind 0 = accurate, 1..4 = approximations 1..4
  localparam logic [7:0] SUM_TT  [5] = '{8'h96, 8'h82, 8'h17, 8'h13, 8'h8A};
  localparam logic [7:0] COUT_TT [5] = '{8'hE8, 8'hEC, 8'hE8, 8'hEC, 8'hF0};

  function automatic logic [1:0] fa(int kind, logic a, logic b, logic c);
    int row;
    row = {29'd0, a, b, c};
    return {COUT_TT[kind][row], SUM_TT[kind][row]};   // {cout, sum}
  endfunction

  function automatic int kind_at(int pos, int k, int kind);
    return (pos < k) ? kind : 0;
  endfunction

  function automatic longint unsigned wmask(int w);
    return (w >= 64) ? '1 : ((64'd1 << w) - 1);
  endfunction

  function automatic longint unsigned rca(longint unsigned a, longint unsigned b,
                                          logic cin, int w, int k, int kind);
    longint unsigned s;
    logic c;
    logic [1:0] r;
    s = 0;
    c = cin;
    for (int i = 0; i < w; i++) begin
      r = fa(kind_at(i, k, kind), a[i], b[i], c);
      s[i] = r[0];
      c = r[1];
    end
    return s;
  endfunction

  // one carry-save row: returns sum word in s, carry word in c
  function automatic void csa(longint unsigned x, longint unsigned y, longint unsigned z,
                              int w, int k, int kind,
                              output longint unsigned s, output longint unsigned c);
    logic [1:0] r;
    s = 0;
    c = 0;
    for (int i = 0; i < w; i++) begin
      r = fa(kind_at(i, k, kind), x[i], y[i], z[i]);
      s[i] = r[0];
      if (i + 1 < w) c[i+1] = r[1];
    end
  endfunction

  function automatic void comp42(longint unsigned w0, longint unsigned w1,
                                 longint unsigned w2, longint unsigned w3,
                                 int w, int k, int kind,
                                 output longint unsigned s, output longint unsigned c);
    longint unsigned s1, c1;
    csa(w0, w1, w2, w, k, kind, s1, c1);
    csa(s1, c1, w3, w, k, kind, s, c);
  endfunction

  function automatic void comp82(longint unsigned v[8], int w, int k, int kind,
                                 output longint unsigned s, output longint unsigned c);
    longint unsigned m0, m1, m2, m3;
    comp42(v[0], v[1], v[2], v[3], w, k, kind, m0, m1);
    comp42(v[4], v[5], v[6], v[7], w, k, kind, m2, m3);
    comp42(m0, m1, m2, m3, w, k, kind, s, c);
  endfunction

  // sign-extend the low w bits of v to a longint
  function automatic longint sext(longint unsigned v, int w);
    longint unsigned m;
    m = wmask(w);
    v = v & m;
    if (w < 64 && v[w-1]) v = v | ~m;
    return longint'(v);
  endfunction

  // ---- coefficients ------------------------------------------------------
  function automatic int nearest_two_term(real mag);
    int best;
    real err, best_err;
    best = 0;
    best_err = 1.0e9;
    for (int p = 0; p < 8; p++)
      for (int q = 0; q <= p; q++) begin
        err = mag - real'((1 << p) + (1 << q));
        if (err < 0) err = -err;
        if (err < best_err) begin
          best_err = err;
          best = (1 << p) + (1 << q);
        end
      end
    return best;
  endfunction

  function automatic int coef(int k, int i);
    real c;
    int  m;
    if (k == 0) return 45;
    c = 64.0 * $cos(real'((2 * i + 1) * k) * 3.14159265358979 / 16.0);
    m = nearest_two_term(c < 0 ? -c : c);
    return (c < 0) ? -m : m;
  endfunction

  // ---- constant multipliers ----------------------------------------------
  function automatic longint unsigned dc_mult(longint x, int ow, int k, int kind);
    longint unsigned s, c, m;
    m = wmask(ow);
    comp42((x << 5) & m, (x << 3) & m, (x << 2) & m, x & m, ow, k, kind, s, c);
    return rca(s, c, 1'b0, ow, k, kind) & m;
  endfunction

  function automatic longint unsigned sa_mult(longint x, int coefv, int ow, int k, int kind);
    longint unsigned m;
    longint v;
    int mag, hi, lo;
    m   = wmask(ow);
    mag = (coefv < 0) ? -coefv : coefv;
    v   = (coefv < 0) ? -x : x;
    hi  = -1;
    lo  = -1;
    for (int b = 0; b < 31; b++)
      if (mag[b]) begin
        if (lo < 0) lo = b;
        hi = b;
      end
    if (hi == lo) begin   // single power of two: 2^(hi-1) + 2^(hi-1)
      hi = hi - 1;
      lo = hi;
    end
    return rca((v << hi) & m, (v << lo) & m, 1'b0, ow, k, kind) & m;
  endfunction

  // ---- 1-D transforms ----------------------------------------------------
  // inverse = 0: out(o) = sum_j a(o,j) in(j) ; inverse = 1: out(o) = sum_j a(j,o) in(j)
  // Returns the signed result after the arithmetic shift by 7.
  function automatic longint transform_out(longint in_v[8], int o, bit inverse,
                                           int acc_w, int k, int kind);
    longint unsigned prod[8];
    longint unsigned s, c, acc;
    int cf;
    for (int j = 0; j < 8; j++) begin
      cf = inverse ? coef(j, o) : coef(o, j);
      if ((inverse ? j : o) == 0) prod[j] = dc_mult(in_v[j], acc_w, k, kind);
      else                        prod[j] = sa_mult(in_v[j], cf, acc_w, k, kind);
    end
    comp82(prod, acc_w, k, kind, s, c);
    acc = rca(s, c, 1'b0, acc_w, k, kind);
    return sext(acc, acc_w) >>> 7;
  endfunction

  // exact integer transform with the same coefficients
  function automatic longint transform_exact(longint in_v[8], int o, bit inverse);
    longint acc;
    acc = 0;
    for (int j = 0; j < 8; j++)
      acc += longint'(inverse ? coef(j, o) : coef(o, j)) * in_v[j];
    return acc >>> 7;
  endfunction

endpackage
