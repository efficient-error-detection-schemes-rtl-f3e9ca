// ec_ref_pkg: reference elliptic-curve arithmetic for the testbenches.
//
// Works in affine coordinates with an explicit infinity flag, using the
// textbook chord-and-tangent formulas, 512-bit products reduced with `%`,
// and inversion by Fermat's little theorem. It shares no code and no
// formulas with the projective micro-programs of the design, so it is an
// independent check of them. Slow but simple: fine for simulation only.
package ec_ref_pkg;
  import ecc_pkg::*;

  typedef struct {
    fe_t x;
    fe_t y;
    bit  inf;
  } apoint_t;

  function automatic fe_t rmul(fe_t a, fe_t b, fe_t p);
    logic [2*N-1:0] t;
    t = (2*N)'(a) * (2*N)'(b);
    t = t % (2*N)'(p);
    return t[N-1:0];
  endfunction

  function automatic fe_t radd(fe_t a, fe_t b, fe_t p);
    logic [N:0] s;
    s = ((N+1)'(a) + (N+1)'(b)) % (N+1)'(p);
    return s[N-1:0];
  endfunction

  function automatic fe_t rsub(fe_t a, fe_t b, fe_t p);
    return radd(a, p - b, p);
  endfunction

  function automatic fe_t rinv(fe_t a, fe_t p);
    fe_t e, r, base;
    e = p - 2;
    r = 1;
    base = a;
    for (int i = 0; i < int'(N); i++) begin
      if (e[i]) r = rmul(r, base, p);
      base = rmul(base, base, p);
    end
    return r;
  endfunction

  function automatic apoint_t aadd(apoint_t a, apoint_t b, fe_t p);
    apoint_t r;
    fe_t lam, three;
    if (a.inf) return b;
    if (b.inf) return a;
    if (a.x == b.x) begin
      if (radd(a.y, b.y, p) == 0) begin
        r.x = 0; r.y = 0; r.inf = 1;
        return r;
      end
      // tangent, a = -3: lambda = (3x^2 - 3) / 2y
      three = 3;
      lam = rsub(rmul(three, rmul(a.x, a.x, p), p), three, p);
      lam = rmul(lam, rinv(radd(a.y, a.y, p), p), p);
    end else begin
      lam = rmul(rsub(b.y, a.y, p), rinv(rsub(b.x, a.x, p), p), p);
    end
    r.x = rsub(rsub(rmul(lam, lam, p), a.x, p), b.x, p);
    r.y = rsub(rmul(lam, rsub(a.x, r.x, p), p), a.y, p);
    r.inf = 0;
    return r;
  endfunction

  // k * P by plain right-to-left double-and-add
  function automatic apoint_t amul(fe_t k, apoint_t pt, fe_t p);
    apoint_t acc, d;
    acc.x = 0; acc.y = 0; acc.inf = 1;
    d = pt;
    for (int i = 0; i < int'(N); i++) begin
      if (k[i]) acc = aadd(acc, d, p);
      d = aadd(d, d, p);
    end
    return acc;
  endfunction

  function automatic bit on_curve(apoint_t a, fe_t p, fe_t b);
    fe_t lhs, rhs;
    if (a.inf) return 1;
    lhs = rmul(a.y, a.y, p);
    rhs = rmul(rmul(a.x, a.x, p), a.x, p);
    rhs = rsub(rhs, rmul(fe_t'(3), a.x, p), p);
    rhs = radd(rhs, b, p);
    return lhs == rhs;
  endfunction

  // projective (X:Y:Z) equals affine point?
  function automatic bit proj_eq(point_t q, apoint_t a, fe_t p);
    if (a.inf) return (q.z == 0) && (q.x == 0) && (q.y != 0);
    if (q.z == 0) return 0;
    return (q.x == rmul(a.x, q.z, p)) && (q.y == rmul(a.y, q.z, p));
  endfunction

  function automatic point_t to_proj(apoint_t a);
    point_t q;
    if (a.inf) return POINT_INF;
    q.x = a.x; q.y = a.y; q.z = 1;
    return q;
  endfunction

  function automatic apoint_t gen();
    apoint_t g;
    g.x = P256_GX; g.y = P256_GY; g.inf = 0;
    return g;
  endfunction
endpackage
