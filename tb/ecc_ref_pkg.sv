// ecc_ref_pkg: reference arithmetic for the testbenches.
//
// Plain modular arithmetic on wide integers (products reduced with %), with no
// Montgomery representation, used to compute expected results independently
// of the hardware: the complete addition formulas written out directly,
// a Montgomery-ladder reference, a projective-equality test and an on-curve
// test for y^2 z = x^3 + b z^3. All values are held in 544-bit vectors, enough
// for products of two 258-bit numbers.
package ecc_ref_pkg;

  typedef logic [543:0] big_t;
  typedef struct packed { big_t x, y, z; } rpoint_t;

  function automatic big_t addm(big_t a, big_t b, big_t p);
    return (a + b) % p;
  endfunction

  function automatic big_t subm(big_t a, big_t b, big_t p);
    return ((a % p) + p - (b % p)) % p;
  endfunction

  function automatic big_t mulm(big_t a, big_t b, big_t p);
    return ((a % p) * (b % p)) % p;
  endfunction

  function automatic big_t powm(big_t a, big_t e, big_t p);
    big_t r = 1;
    big_t x = a % p;
    for (int i = 0; i < 544; i++) begin
      if (e[i]) r = mulm(r, x, p);
      x = mulm(x, x, p);
    end
    return r;
  endfunction

  // Eq. for complete addition on a = 0 curves, b3 = 3b (plain, not Montgomery)
  function automatic rpoint_t padd(rpoint_t a, rpoint_t c, big_t b3, big_t p);
    big_t xy, yy, zz, yz, xz, xx, t;
    rpoint_t r;
    xy = addm(mulm(a.x, c.y, p), mulm(c.x, a.y, p), p);
    yy = mulm(a.y, c.y, p);
    zz = mulm(mulm(b3, a.z, p), c.z, p);
    yz = addm(mulm(a.y, c.z, p), mulm(c.y, a.z, p), p);
    xz = addm(mulm(a.x, c.z, p), mulm(c.x, a.z, p), p);
    xx = mulm(a.x, c.x, p);
    t  = mulm(mulm(b3, yz, p), xz, p);
    r.x = subm(mulm(xy, subm(yy, zz, p), p), t, p);
    r.y = addm(mulm(addm(yy, zz, p), subm(yy, zz, p), p),
               mulm(mulm(mulm(3, b3, p), xx, p), xz, p), p);
    r.z = addm(mulm(yz, addm(yy, zz, p), p), mulm(mulm(3, xx, p), xy, p), p);
    return r;
  endfunction

  // m*P by left-to-right double-and-add over nbits bits, starting from O
  function automatic rpoint_t pmul(big_t m, int nbits, rpoint_t pt, big_t b3, big_t p);
    rpoint_t r;
    r.x = 0; r.y = 1; r.z = 0;
    for (int i = nbits - 1; i >= 0; i--) begin
      r = padd(r, r, b3, p);
      if (m[i]) r = padd(r, pt, b3, p);
    end
    return r;
  endfunction

  // (X1:Y1:Z1) == (X2:Y2:Z2) as projective points (neither all zero)
  function automatic bit peq(rpoint_t a, rpoint_t c, big_t p);
    return (mulm(a.x, c.z, p) == mulm(c.x, a.z, p)) &&
           (mulm(a.y, c.z, p) == mulm(c.y, a.z, p)) &&
           (mulm(a.x, c.y, p) == mulm(c.x, a.y, p)) &&
           !((a.x % p == 0) && (a.y % p == 0) && (a.z % p == 0));
  endfunction

  // Y^2 Z == X^3 + b Z^3
  function automatic bit on_curve(rpoint_t a, big_t b, big_t p);
    big_t l, r;
    l = mulm(mulm(a.y, a.y, p), a.z, p);
    r = addm(mulm(mulm(a.x, a.x, p), a.x, p), mulm(b, mulm(mulm(a.z, a.z, p), a.z, p), p), p);
    return l == r;
  endfunction

  // affine x of a projective point: X * Z^-1 (p prime)
  function automatic big_t affine_x(rpoint_t a, big_t p);
    return mulm(a.x, powm(a.z, p - 2, p), p);
  endfunction

  function automatic big_t affine_y(rpoint_t a, big_t p);
    return mulm(a.y, powm(a.z, p - 2, p), p);
  endfunction

endpackage
