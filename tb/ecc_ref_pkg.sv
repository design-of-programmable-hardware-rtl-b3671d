// ecc_ref_pkg: software reference for the elliptic-curve testbenches.
// Plain 64-bit integer arithmetic, inversion by Fermat's little theorem
// (x^(p-2) mod p), so it shares no algorithm with the hardware under test.
// Test curve: y^2 = x^3 + x + 35 over GF(65521); G = (2, 29470) has prime
// order 65761, which is also the number of points on the curve.
package ecc_ref_pkg;
  localparam longint P  = 65521;
  localparam longint A  = 1;
  localparam longint B  = 35;
  localparam longint GX = 2;
  localparam longint GY = 29470;
  localparam longint N  = 65761;

  typedef struct { longint x; longint y; bit inf; } pt_t;

  function automatic longint mmul(longint x, longint y, longint m);
    return (x * y) % m;
  endfunction

  function automatic longint mpow(longint x, longint e, longint m);
    longint r = 1;
    x = x % m;
    while (e > 0) begin
      if (e[0]) r = mmul(r, x, m);
      x = mmul(x, x, m);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic longint minv(longint x, longint m);
    return mpow(x, m - 2, m);
  endfunction

  function automatic pt_t padd(pt_t s, pt_t t);
    pt_t r;
    longint lam;
    if (s.inf) return t;
    if (t.inf) return s;
    if (s.x == t.x && (s.y + t.y) % P == 0) begin r.x = 0; r.y = 0; r.inf = 1; return r; end
    if (s.x == t.x) lam = mmul((3 * mmul(s.x, s.x, P) + A) % P, minv(2 * s.y % P, P), P);
    else            lam = mmul((t.y - s.y + P) % P, minv((t.x - s.x + P) % P, P), P);
    r.x = (mmul(lam, lam, P) - s.x - t.x + 2 * P) % P;
    r.y = (mmul(lam, (s.x - r.x + P) % P, P) - s.y + P) % P;
    r.inf = 0;
    return r;
  endfunction

  function automatic pt_t pmul(longint k, pt_t s);
    pt_t r;
    r.x = 0; r.y = 0; r.inf = 1;
    while (k > 0) begin
      if (k[0]) r = padd(r, s);
      s = padd(s, s);
      k = k >> 1;
    end
    return r;
  endfunction

  function automatic bit on_curve(pt_t s);
    return s.inf || (mmul(s.y, s.y, P) == (mmul(mmul(s.x, s.x, P), s.x, P) + A * s.x + B) % P);
  endfunction

  function automatic pt_t gen();
    pt_t g;
    g.x = GX; g.y = GY; g.inf = 0;
    return g;
  endfunction
endpackage
