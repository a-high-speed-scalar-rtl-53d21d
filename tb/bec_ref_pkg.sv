// Reference arithmetic for the testbenches: GF(2^233) arithmetic written
// the slow, obvious way (shift-and-add multiplication with reduction after
// every shift), the unified point addition and the doubling written straight
// from their formulas, a plain double-and-add scalar multiplication, and
// helpers to draw random curve constants and points on the curve.
package bec_ref_pkg;
  import bec_pkg::*;

  function automatic felem_t rand_fe();
    felem_t v;
    for (int i = 0; i < K; i++) v[i] = 1'($urandom_range(0, 1));
    return v;
  endfunction

  // Shift-and-add multiplication, reducing by POLY after each shift.
  function automatic felem_t fmul(felem_t a, felem_t b);
    logic [K:0] x;
    felem_t     r;
    r = '0;
    x = {1'b0, a};
    for (int i = 0; i < K; i++) begin
      if (b[i]) r ^= x[K-1:0];
      x = x << 1;
      if (x[K]) x ^= POLY;
    end
    return r;
  endfunction

  function automatic felem_t fsq(felem_t a);
    return fmul(a, a);
  endfunction

  // Inverse by Fermat: a^(2^K - 2).
  function automatic felem_t finv(felem_t a);
    felem_t r, s;
    r = felem_t'(1);
    s = a;
    for (int i = 1; i < K; i++) begin
      s = fsq(s);
      r = fmul(r, s);
    end
    return r;
  endfunction

  // Absolute trace: sum of a^(2^i), i = 0..K-1 (0 or 1).
  function automatic logic ftrace(felem_t a);
    felem_t s, t;
    s = a;
    t = a;
    for (int i = 1; i < K; i++) begin
      t = fsq(t);
      s ^= t;
    end
    return s[0];
  endfunction

  // Half trace (K odd): a solution y of y^2 + y = c when Tr(c) = 0.
  function automatic felem_t fhtr(felem_t c);
    felem_t s, t;
    s = c;
    t = c;
    for (int i = 1; i <= (K - 1) / 2; i++) begin
      t = fsq(fsq(t));
      s ^= t;
    end
    return s;
  endfunction

  // Curve constant d (d1 = d2 = d) with Tr(d) = 1: a complete curve.
  function automatic felem_t rand_d();
    felem_t d;
    do d = rand_fe(); while (!ftrace(d));
    return d;
  endfunction

  // A random affine point (x, y, 1) on
  //   d(x + y) + d(x^2 + y^2) = xy + xy(x + y) + x^2 y^2.
  // For fixed x this is a (y^2 + y) = d(x + x^2) with a = d + x + x^2.
  function automatic point_t rand_point(felem_t d);
    point_t p;
    felem_t x, a, c;
    forever begin
      x = rand_fe();
      a = d ^ x ^ fsq(x);
      c = fmul(fmul(d, x ^ fsq(x)), finv(a));
      if (!ftrace(c)) break;
    end
    p.x = x;
    p.y = fhtr(c);
    p.z = felem_t'(1);
    return p;
  endfunction

  // Projective curve equation (d1 = d2 = d).
  function automatic logic on_curve(point_t p, felem_t d);
    felem_t lhs, rhs, xy;
    xy  = fmul(p.x, p.y);
    lhs = fmul(fmul(d, p.x ^ p.y), fmul(p.z, fsq(p.z))) ^
          fmul(fmul(d, fsq(p.x) ^ fsq(p.y)), fsq(p.z));
    rhs = fmul(xy, fsq(p.z)) ^ fmul(fmul(xy, p.x ^ p.y), p.z) ^ fsq(xy);
    return lhs == rhs;
  endfunction

  // Same point in projective coordinates (Z nonzero).
  function automatic logic same_point(point_t p, point_t q);
    return fmul(p.x, q.z) == fmul(q.x, p.z) && fmul(p.y, q.z) == fmul(q.y, p.z)
           && p.z != '0 && q.z != '0;
  endfunction

  function automatic point_t neg(point_t p);
    point_t n;
    n.x = p.y;
    n.y = p.x;
    n.z = p.z;
    return n;
  endfunction

  // Unified addition (X1:Y1:Z1) + (X2:Y2:Z2), curve with d1 = d2.
  function automatic point_t padd(point_t p1, point_t p2, felem_t d1);
    felem_t a, b, c, d, e, f, g, h, i, j, k, l, u, v;
    point_t o;
    a = fmul(p1.x, p2.x);
    b = fmul(p1.y, p2.y);
    c = fmul(p1.z, p2.z);
    d = fmul(d1, c);
    e = fsq(c);
    f = fsq(d);
    g = fmul(p1.x ^ p1.z, p2.x ^ p2.z);
    h = fmul(p1.y ^ p1.z, p2.y ^ p2.z);
    i = a ^ g;
    j = b ^ h;
    k = fmul(p1.x ^ p1.y, p2.x ^ p2.y);
    l = fmul(d1, k);
    u = fmul(c, f ^ fmul(l, k ^ i ^ j ^ c));
    v = u ^ fmul(d, f) ^ fmul(l, fmul(d1, e) ^ fmul(a, b) ^ fmul(g, h));
    o.x = v ^ fmul(d, fmul(a ^ d, g ^ d));
    o.y = v ^ fmul(d, fmul(b ^ d, h ^ d));
    o.z = u;
    return o;
  endfunction

  // Doubling 2(X1:Y1:Z1), curve with d1 = d2.
  function automatic point_t pdbl(point_t p, felem_t d1, felem_t d2);
    felem_t a, b, c, dd, e, f, g, h, i, j, k;
    point_t o;
    a  = fsq(p.x);
    b  = fsq(a);
    c  = fsq(p.y);
    dd = fsq(c);
    e  = fsq(p.z);
    f  = fmul(d1, fsq(e));
    g  = b ^ dd;
    h  = fmul(a, e);
    i  = fmul(c, e);
    j  = h ^ i;
    k  = g ^ fmul(d2, j);
    o.x = k ^ h ^ dd;
    o.y = k ^ i ^ b;
    o.z = f ^ j ^ g;
    return o;
  endfunction

  // Left-to-right double-and-add; the neutral element is (0:0:1).
  function automatic point_t smul(logic [K-1:0] e, int t, point_t p, felem_t d);
    point_t q;
    q = '{x: '0, y: '0, z: felem_t'(1)};
    for (int i = t - 1; i >= 0; i--) begin
      q = pdbl(q, d, d);
      if (e[i]) q = padd(q, p, d);
    end
    return q;
  endfunction

endpackage
