// Reference arithmetic for the testbenches: GF(2^m) and elliptic curves.
//
// Bit-by-bit models written independently of the RTL: a carry-less product
// followed by long division by f(x), inversion checked by multiplication,
// and affine point arithmetic with explicit inversions. Field elements are
// held in 256 bits, so m <= 255. f_low holds the terms of f(x) below x^m.
package gf_ref_pkg;

  typedef logic [255:0] fe_t;
  typedef logic [511:0] wide_t;

  function automatic wide_t clmul(fe_t a, fe_t b);
    wide_t r = '0;
    for (int i = 0; i < 256; i++)
      if (b[i]) r ^= wide_t'(a) << i;
    return r;
  endfunction

  function automatic fe_t pmod(wide_t v, int m, fe_t f_low);
    wide_t f = wide_t'(f_low) | (wide_t'(1) << m);
    for (int i = 511; i >= m; i--)
      if (v[i]) v ^= f << (i - m);
    return fe_t'(v);
  endfunction

  function automatic fe_t fmul(fe_t a, fe_t b, int m, fe_t f_low);
    return pmod(clmul(a, b), m, f_low);
  endfunction

  function automatic fe_t fsq(fe_t a, int m, fe_t f_low);
    return fmul(a, a, m, f_low);
  endfunction

  // a^(2^m - 2) by square-and-multiply over the exponent bits
  function automatic fe_t finv(fe_t a, int m, fe_t f_low);
    fe_t r = fe_t'(1);
    fe_t base = a;
    // exponent 2^m - 2: bits 1 .. m-1 set
    for (int i = 0; i < m; i++) begin
      if (i != 0) r = fmul(r, base, m, f_low);
      base = fsq(base, m, f_low);
    end
    return r;
  endfunction

  typedef struct {
    fe_t x;
    fe_t y;
    bit  inf;
  } pt_t;

  function automatic pt_t pt_add(pt_t p, pt_t q, fe_t a, int m, fe_t f_low);
    pt_t r;
    fe_t l;
    r.inf = 0;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y != q.y || p.x == '0) begin
        r.inf = 1; r.x = '0; r.y = '0;
        return r;
      end
      l = fmul(p.y, finv(p.x, m, f_low), m, f_low) ^ p.x;
      r.x = fsq(l, m, f_low) ^ l ^ a;
    end else begin
      l = fmul(p.y ^ q.y, finv(p.x ^ q.x, m, f_low), m, f_low);
      r.x = fsq(l, m, f_low) ^ l ^ p.x ^ q.x ^ a;
    end
    r.y = fmul(p.x ^ r.x, l, m, f_low) ^ r.x ^ p.y;
    return r;
  endfunction

  // k*P, least significant bit first (the RTL goes most significant first)
  function automatic pt_t pt_mul(fe_t k, pt_t p, fe_t a, int m, fe_t f_low);
    pt_t acc;
    pt_t d = p;
    acc.inf = 1; acc.x = '0; acc.y = '0;
    for (int i = 0; i < m; i++) begin
      if (k[i]) acc = pt_add(acc, d, a, m, f_low);
      d = pt_add(d, d, a, m, f_low);
    end
    return acc;
  endfunction

  // b such that (x, y) lies on y^2 + xy = x^3 + a x^2 + b
  function automatic fe_t curve_b(fe_t x, fe_t y, fe_t a, int m, fe_t f_low);
    fe_t x2 = fsq(x, m, f_low);
    return fsq(y, m, f_low) ^ fmul(x, y, m, f_low) ^ fmul(x2, x, m, f_low)
         ^ fmul(a, x2, m, f_low);
  endfunction

  function automatic fe_t rand_fe(int m);
    fe_t r;
    for (int i = 0; i < 8; i++) r[32*i +: 32] = $urandom;
    return r & ((fe_t'(1) << m) - 1);
  endfunction

endpackage
