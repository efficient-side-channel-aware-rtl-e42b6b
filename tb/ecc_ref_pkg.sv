// ecc_ref_pkg: reference arithmetic for the testbenches.
//
// Plain modular arithmetic on wide vectors (operands up to 256 bits), written
// directly from the textbook formulas and independent of the RTL: modular
// add/sub/mul, exponentiation, Fermat inversion, Montgomery constants, affine
// Weierstrass and Edwards point arithmetic, and scalar multiplication by
// double-and-add from the most significant bit.
package ecc_ref_pkg;
  typedef logic [255:0] big_t;
  typedef logic [511:0] dbl_t;

  function automatic big_t addm(big_t a, big_t b, big_t m);
    dbl_t s = dbl_t'(a) + dbl_t'(b);
    return big_t'(s % dbl_t'(m));
  endfunction
  function automatic big_t subm(big_t a, big_t b, big_t m);
    dbl_t s = dbl_t'(a) + dbl_t'(m) - dbl_t'(b % m);
    return big_t'(s % dbl_t'(m));
  endfunction
  function automatic big_t mulm(big_t a, big_t b, big_t m);
    dbl_t p = dbl_t'(a) * dbl_t'(b);
    return big_t'(p % dbl_t'(m));
  endfunction
  function automatic big_t powm(big_t a, big_t e, big_t m);
    big_t r = 1;
    big_t x = a % m;
    for (int i = 0; i < 256; i++) begin
      if (e[i]) r = mulm(r, x, m);
      x = mulm(x, x, m);
    end
    return r;
  endfunction
  function automatic big_t invm(big_t a, big_t m);
    return powm(a, m - 2, m);
  endfunction
  function automatic big_t divm(big_t a, big_t b, big_t m);
    return mulm(a, invm(b, m), m);
  endfunction
  // 2^e mod m
  function automatic big_t pow2m(int e, big_t m);
    big_t r = 1 % m;
    for (int i = 0; i < e; i++) r = addm(r, r, m);
    return r;
  endfunction
  function automatic big_t rnd(big_t m);
    big_t r = '0;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r % m;
  endfunction

  typedef struct { big_t x; big_t y; bit inf; } pt_t;

  // Weierstrass y^2 = x^3 + a x + b, affine, with point at infinity
  function automatic pt_t w_add(pt_t p, pt_t q, big_t a, big_t m);
    pt_t r; big_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    r.inf = 0;
    if (p.x == q.x) begin
      if (addm(p.y, q.y, m) == 0) begin r.inf = 1; r.x = 0; r.y = 0; return r; end
      l = divm(addm(mulm(3, mulm(p.x, p.x, m), m), a, m), addm(p.y, p.y, m), m);
    end else
      l = divm(subm(q.y, p.y, m), subm(q.x, p.x, m), m);
    r.x = subm(subm(mulm(l, l, m), p.x, m), q.x, m);
    r.y = subm(mulm(l, subm(p.x, r.x, m), m), p.y, m);
    return r;
  endfunction
  function automatic pt_t w_mul(big_t k, pt_t p, big_t a, big_t m);
    pt_t r; r.inf = 1; r.x = 0; r.y = 0;
    for (int i = 255; i >= 0; i--) begin
      r = w_add(r, r, a, m);
      if (k[i]) r = w_add(r, p, a, m);
    end
    return r;
  endfunction

  // Edwards x^2 + y^2 = 1 + d x^2 y^2, unified affine addition
  function automatic pt_t e_add(pt_t p, pt_t q, big_t d, big_t m);
    pt_t r; big_t t;
    t = mulm(d, mulm(mulm(p.x, q.x, m), mulm(p.y, q.y, m), m), m);
    r.x = divm(addm(mulm(p.x, q.y, m), mulm(p.y, q.x, m), m), addm(1, t, m), m);
    r.y = divm(subm(mulm(p.y, q.y, m), mulm(p.x, q.x, m), m), subm(1, t, m), m);
    r.inf = 0;
    return r;
  endfunction
  function automatic pt_t e_mul(big_t k, pt_t p, big_t d, big_t m);
    pt_t r; r.inf = 0; r.x = 0; r.y = 1;
    for (int i = 255; i >= 0; i--) begin
      r = e_add(r, r, d, m);
      if (k[i]) r = e_add(r, p, d, m);
    end
    return r;
  endfunction

  // random point and curve constant: Weierstrass a random (b implied),
  // Edwards d from the point
  function automatic void w_curve(big_t m, output pt_t p, output big_t a);
    p.inf = 0; p.x = rnd(m); p.y = rnd(m); a = rnd(m);
  endfunction
  function automatic void e_curve(big_t m, output pt_t p, output big_t d);
    big_t x2, y2;
    do begin
      p.inf = 0; p.x = rnd(m); p.y = rnd(m);
      x2 = mulm(p.x, p.x, m); y2 = mulm(p.y, p.y, m);
    end while (x2 == 0 || y2 == 0 || addm(x2, y2, m) == 1);
    d = divm(subm(addm(x2, y2, m), 1, m), mulm(x2, y2, m), m);
  endfunction
endpackage
