// ecc_ref_pkg: reference arithmetic for the testbenches (8-bit fields).
//
// Independent of the RTL: GF(2^8) products by shift-and-add with reduction
// after every shift, inverses by exhaustive search, affine elliptic-curve
// group law with all special cases, random curve points found by searching
// for a y that satisfies the curve equation, and conversions between affine
// and the projective forms the processor uses (binary: x = X/Z, y = Y/Z^2;
// prime: x = X/Z^2, y = Y/Z^3).
package ecc_ref_pkg;

  typedef struct {
    int x;
    int y;
    bit inf;
  } apt_t;

  // Some degree-8 irreducible polynomials (low 8 bits, x^8 implied) and primes.
  localparam int NPOLY = 6;
  localparam int POLYS [NPOLY] = '{8'h1B, 8'h1D, 8'h2B, 8'h2D, 8'h39, 8'h3F};
  localparam int NPRIME = 8;
  localparam int PRIMES [NPRIME] = '{251, 241, 233, 211, 199, 127, 97, 23};

  // ---------------- GF(2^8) ----------------
  function automatic int bmul(int a, int b, int poly);
    int r = 0;
    int x = a & 255;
    for (int i = 0; i < 8; i++) begin
      if ((b >> i) & 1) r ^= x;
      x = x << 1;
      if (x & 256) x = (x ^ poly) & 255;
    end
    return r;
  endfunction

  function automatic int binv(int a, int poly);
    for (int c = 1; c < 256; c++) if (bmul(a, c, poly) == 1) return c;
    return 0;
  endfunction

  function automatic int bdiv(int a, int b, int poly);
    return bmul(a, binv(b, poly), poly);
  endfunction

  function automatic bit b_on_curve(apt_t p, int a, int b, int poly);
    int l, r;
    if (p.inf) return 1;
    l = bmul(p.y, p.y, poly) ^ bmul(p.x, p.y, poly);
    r = bmul(bmul(p.x, p.x, poly), p.x, poly) ^ bmul(a, bmul(p.x, p.x, poly), poly) ^ b;
    return l == r;
  endfunction

  function automatic apt_t b_dbl(apt_t p, int a, int poly);
    apt_t r;
    int lam;
    r.inf = 0;
    if (p.inf || p.x == 0) begin r.inf = 1; r.x = 0; r.y = 0; return r; end
    lam = p.x ^ bdiv(p.y, p.x, poly);
    r.x = bmul(lam, lam, poly) ^ lam ^ a;
    r.y = bmul(p.x, p.x, poly) ^ bmul(lam ^ 1, r.x, poly);
    return r;
  endfunction

  function automatic apt_t b_add(apt_t p, apt_t q, int a, int poly);
    apt_t r;
    int lam;
    if (p.inf) return q;
    if (q.inf) return p;
    r.inf = 0;
    if (p.x == q.x) begin
      if (p.y == q.y) return b_dbl(p, a, poly);
      r.inf = 1; r.x = 0; r.y = 0; return r;
    end
    lam = bdiv(p.y ^ q.y, p.x ^ q.x, poly);
    r.x = bmul(lam, lam, poly) ^ lam ^ p.x ^ q.x ^ a;
    r.y = bmul(lam, p.x ^ r.x, poly) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic apt_t b_rand_point(int a, int b, int poly);
    apt_t p;
    p.inf = 0;
    forever begin
      p.x = $urandom_range(1, 255);
      for (int y = 0; y < 256; y++) begin
        p.y = y;
        if (b_on_curve(p, a, b, poly)) return p;
      end
    end
  endfunction

  // ---------------- GF(p) ----------------
  function automatic int pmul(int a, int b, int p);
    return (a * b) % p;
  endfunction

  function automatic int pinv(int a, int p);
    for (int c = 1; c < p; c++) if (pmul(a, c, p) == 1) return c;
    return 0;
  endfunction

  function automatic int psub(int a, int b, int p);
    return ((a - b) % p + p) % p;
  endfunction

  function automatic bit p_on_curve(apt_t q, int a, int b, int p);
    if (q.inf) return 1;
    return pmul(q.y, q.y, p) == ((pmul(pmul(q.x, q.x, p), q.x, p) + pmul(a, q.x, p) + b) % p);
  endfunction

  function automatic bit p_curve_ok(int a, int b, int p);
    return ((4 * pmul(pmul(a, a, p), a, p) + 27 * pmul(b, b, p)) % p) != 0;
  endfunction

  function automatic apt_t p_dbl(apt_t q, int a, int p);
    apt_t r;
    int lam;
    r.inf = 0;
    if (q.inf || q.y == 0) begin r.inf = 1; r.x = 0; r.y = 0; return r; end
    lam = pmul((3 * pmul(q.x, q.x, p) + a) % p, pinv((2 * q.y) % p, p), p);
    r.x = psub(pmul(lam, lam, p), (2 * q.x) % p, p);
    r.y = psub(pmul(lam, psub(q.x, r.x, p), p), q.y, p);
    return r;
  endfunction

  function automatic apt_t p_add(apt_t q, apt_t s, int a, int p);
    apt_t r;
    int lam;
    if (q.inf) return s;
    if (s.inf) return q;
    r.inf = 0;
    if (q.x == s.x) begin
      if (q.y == s.y) return p_dbl(q, a, p);
      r.inf = 1; r.x = 0; r.y = 0; return r;
    end
    lam = pmul(psub(s.y, q.y, p), pinv(psub(s.x, q.x, p), p), p);
    r.x = psub(psub(pmul(lam, lam, p), q.x, p), s.x, p);
    r.y = psub(pmul(lam, psub(q.x, r.x, p), p), q.y, p);
    return r;
  endfunction

  function automatic apt_t p_rand_point(int a, int b, int p);
    apt_t q;
    q.inf = 0;
    forever begin
      q.x = $urandom_range(0, p - 1);
      for (int y = 1; y < p; y++) begin
        q.y = y;
        if (p_on_curve(q, a, b, p)) return q;
      end
    end
  endfunction

  // ---------------- coordinates ----------------
  // Binary field, x = X/Z, y = Y/Z^2.
  function automatic void b_to_proj(apt_t q, int z, int poly, output int X, output int Y, output int Z);
    X = bmul(q.x, z, poly);
    Y = bmul(q.y, bmul(z, z, poly), poly);
    Z = z;
  endfunction

  function automatic apt_t b_to_aff(int X, int Y, int Z, int poly);
    apt_t r;
    r.inf = (Z == 0);
    r.x = r.inf ? 0 : bdiv(X, Z, poly);
    r.y = r.inf ? 0 : bdiv(Y, bmul(Z, Z, poly), poly);
    return r;
  endfunction

  // Prime field, x = X/Z^2, y = Y/Z^3.
  function automatic void p_to_proj(apt_t q, int z, int p, output int X, output int Y, output int Z);
    X = pmul(q.x, pmul(z, z, p), p);
    Y = pmul(q.y, pmul(pmul(z, z, p), z, p), p);
    Z = z;
  endfunction

  function automatic apt_t p_to_aff(int X, int Y, int Z, int p);
    apt_t r;
    int zi;
    r.inf = (Z == 0);
    zi = r.inf ? 0 : pinv(Z, p);
    r.x = pmul(X, pmul(zi, zi, p), p);
    r.y = pmul(Y, pmul(pmul(zi, zi, p), zi, p), p);
    if (r.inf) begin r.x = 0; r.y = 0; end
    return r;
  endfunction

  function automatic bit same(apt_t u, apt_t v);
    if (u.inf || v.inf) return u.inf == v.inf;
    return u.x == v.x && u.y == v.y;
  endfunction

  // Double-and-add-always reference with the processor's bit order. degenerate
  // is set when an addition meets ACC == P, which the mixed addition does not
  // handle.
  function automatic apt_t smul(int k, apt_t pt, bit prime, int a, int md, output bit degenerate);
    apt_t acc;
    acc.inf = 1; acc.x = 0; acc.y = 0;
    degenerate = 0;
    for (int i = 7; i >= 0; i--) begin
      acc = prime ? p_dbl(acc, a, md) : b_dbl(acc, a, md);
      if ((k >> i) & 1) begin
        if (!acc.inf && acc.x == pt.x && acc.y == pt.y) degenerate = 1;
        acc = prime ? p_add(acc, pt, a, md) : b_add(acc, pt, a, md);
      end
    end
    return acc;
  endfunction

endpackage
