// gf_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL: bit-serial shift-and-add multiplication, inversion by Fermat's
// little theorem (a^(2^k - 2)), trace as the sum of the k conjugates, the
// half-trace for solving z^2 + z = g, and affine point addition, doubling and
// double-and-add scalar multiplication on y^2 + xy = x^3 + a x^2 + b.
// Elements are 163-bit vectors in polynomial basis modulo
// x^163 + x^7 + x^6 + x^3 + 1. Not synthesizable (uses $urandom).
package gf_ref_pkg;

  localparam int RK = 163;
  typedef logic [RK-1:0] fe_t;
  localparam logic [RK:0] RPOLY = (164'd1 << 163) | 164'h0c9;   // x^163 + x^7 + x^6 + x^3 + 1
  localparam fe_t RA = fe_t'(1);
  localparam fe_t RB = 163'h2_0a60_1907_b8c9_53ca_1481_eb10_512f_7874_4a32_05fd;

  typedef struct packed {
    fe_t x;
    fe_t y;
  } pt_t;

  function automatic fe_t rnd();
    fe_t v;
    for (int i = 0; i < RK; i += 32) v = {v[RK-33:0], 32'($urandom)};
    return v;
  endfunction

  function automatic fe_t fmul(fe_t a, fe_t b);
    logic [RK:0] acc;
    acc = '0;
    for (int i = RK-1; i >= 0; i--) begin
      acc = acc << 1;
      if (acc[RK]) acc = acc ^ RPOLY;
      if (b[i]) acc = acc ^ {1'b0, a};
    end
    return acc[RK-1:0];
  endfunction

  function automatic fe_t fsq(fe_t a);
    return fmul(a, a);
  endfunction

  function automatic fe_t finv(fe_t a);
    // a^(2^k-2) = (a^2)(a^4)...(a^(2^(k-1)))
    fe_t r, p;
    r = fe_t'(1);
    p = a;
    for (int i = 1; i < RK; i++) begin
      p = fsq(p);
      r = fmul(r, p);
    end
    return r;
  endfunction

  function automatic fe_t fdiv(fe_t a, fe_t b);
    return fmul(a, finv(b));
  endfunction

  function automatic logic ftrace(fe_t a);
    fe_t s, p;
    s = a;
    p = a;
    for (int i = 1; i < RK; i++) begin
      p = fsq(p);
      s = s ^ p;
    end
    return s[0];
  endfunction

  // Solution of z^2 + z = g with trace t (T(g) must be 0): half-trace.
  function automatic fe_t fsolve(fe_t g, logic t);
    fe_t s, p;
    s = '0;
    p = g;
    for (int i = 0; i < RK; i++) begin
      if (i % 2 == 0) s = s ^ p;
      p = fsq(p);
    end
    if (ftrace(s) != t) s = s ^ fe_t'(1);
    return s;
  endfunction

  function automatic fe_t gfun(fe_t x);
    return x ^ RA ^ fdiv(RB, fsq(x));
  endfunction

  function automatic logic on_curve(pt_t p);
    return (fsq(p.y) ^ fmul(p.x, p.y)) == (fmul(fsq(p.x), p.x) ^ fmul(RA, fsq(p.x)) ^ RB);
  endfunction

  function automatic pt_t padd(pt_t p, pt_t q);
    pt_t r;
    fe_t l;
    l = fdiv(p.y ^ q.y, p.x ^ q.x);
    r.x = fsq(l) ^ l ^ p.x ^ q.x ^ RA;
    r.y = fmul(l, p.x ^ r.x) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t pdbl(pt_t p);
    pt_t r;
    fe_t l;
    l = p.x ^ fdiv(p.y, p.x);
    r.x = fsq(l) ^ l ^ RA;
    r.y = fsq(p.x) ^ fmul(l ^ fe_t'(1), r.x);
    return r;
  endfunction

  function automatic pt_t pneg(pt_t p);
    pt_t r;
    r.x = p.x;
    r.y = p.x ^ p.y;
    return r;
  endfunction

  // Double-and-add, scalar with its top set bit anywhere.
  function automatic pt_t smul(fe_t k, pt_t p);
    pt_t q;
    int top;
    top = -1;
    for (int i = 0; i < RK; i++) if (k[i]) top = i;
    q = p;
    for (int i = top - 1; i >= 0; i--) begin
      q = pdbl(q);
      if (k[i]) q = padd(q, p);
    end
    return q;
  endfunction

  // A random point of the prime-order subgroup: a random curve point, doubled.
  function automatic pt_t rand_point();
    pt_t p;
    fe_t g;
    forever begin
      p.x = rnd();
      if (p.x == '0) continue;
      g = gfun(p.x);
      if (ftrace(g) == 1'b0) break;
    end
    p.y = fmul(fsolve(g, 1'($urandom)), p.x);
    return pdbl(p);
  endfunction

  // Collapsed word: x with bit 0 replaced by T(y/x).
  function automatic fe_t collapse(pt_t p);
    return {p.x[RK-1:1], ftrace(fdiv(p.y, p.x))};
  endfunction

endpackage
