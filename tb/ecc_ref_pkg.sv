// ecc_ref_pkg: reference elliptic-curve arithmetic for the testbenches.
//
// Straightforward affine point arithmetic over GF(p) and GF(2^m) (m <= 256)
// with wide-integer and carry-less arithmetic, used to compute the expected
// results of the processor independently of its datapath: modular inverse by
// Fermat's little theorem (a^(p-2), or a^(2^m-2) over GF(2^m)), and K*P by the
// plain left-to-right double-and-add method with the point at infinity.
package ecc_ref_pkg;
  localparam int unsigned W = 256;
  typedef logic [W:0]       fe_t;
  typedef logic [2*W+7:0]   wide_t;

  typedef struct packed {
    logic inf;
    fe_t  x;
    fe_t  y;
  } pt_t;

  typedef struct {
    logic  bin;     // 1: GF(2^m)
    fe_t   p;
    int    m;
    fe_t   a;
  } curve_t;

  function automatic fe_t pmod(wide_t x, fe_t pm, int mm);
    for (int k = 2*W+7; k >= mm; k--) if (x[k]) x ^= (wide_t'(pm) << (k - mm));
    return fe_t'(x);
  endfunction

  function automatic fe_t fmul(curve_t c, fe_t a, fe_t b);
    wide_t acc = '0;
    if (!c.bin) return fe_t'((wide_t'(a) * wide_t'(b)) % wide_t'(c.p));
    for (int k = 0; k <= W; k++) if (b[k]) acc ^= (wide_t'(a) << k);
    return pmod(acc, c.p, c.m);
  endfunction

  function automatic fe_t fadd(curve_t c, fe_t a, fe_t b);
    if (c.bin) return a ^ b;
    return fe_t'((wide_t'(a) + wide_t'(b)) % wide_t'(c.p));
  endfunction

  function automatic fe_t fsub(curve_t c, fe_t a, fe_t b);
    if (c.bin) return a ^ b;
    return fe_t'((wide_t'(a) + wide_t'(c.p) - wide_t'(b)) % wide_t'(c.p));
  endfunction

  function automatic fe_t finv(curve_t c, fe_t a);
    fe_t r = fe_t'(1), s = a, e;
    if (c.bin) begin
      for (int k = 1; k < c.m; k++) begin s = fmul(c, s, s); r = fmul(c, r, s); end
      return r;
    end
    e = c.p - fe_t'(2);
    for (int k = 0; k <= W; k++) begin
      if (e[k]) r = fmul(c, r, s);
      s = fmul(c, s, s);
    end
    return r;
  endfunction

  function automatic pt_t pneg(curve_t c, pt_t q);
    pt_t r = q;
    r.y = c.bin ? (q.x ^ q.y) : fsub(c, '0, q.y);
    return r;
  endfunction

  function automatic pt_t pdbl(curve_t c, pt_t q);
    pt_t r;
    fe_t l;
    r.inf = 1'b0;
    if (q.inf) return q;
    if (c.bin) begin
      if (q.x == '0) begin r = q; r.inf = 1'b1; return r; end
      l   = q.x ^ fmul(c, q.y, finv(c, q.x));
      r.x = fmul(c, l, l) ^ l ^ c.a;
      r.y = fmul(c, l, q.x ^ r.x) ^ r.x ^ q.y;
    end else begin
      if (q.y == '0) begin r = q; r.inf = 1'b1; return r; end
      l   = fmul(c, fadd(c, fadd(c, fmul(c, q.x, q.x), fadd(c, fmul(c, q.x, q.x), fmul(c, q.x, q.x))), c.a),
                 finv(c, fadd(c, q.y, q.y)));
      r.x = fsub(c, fmul(c, l, l), fadd(c, q.x, q.x));
      r.y = fsub(c, fmul(c, l, fsub(c, q.x, r.x)), q.y);
    end
    return r;
  endfunction

  function automatic pt_t padd(curve_t c, pt_t q1, pt_t q2);
    pt_t r;
    fe_t l;
    if (q1.inf) return q2;
    if (q2.inf) return q1;
    if (q1.x == q2.x) begin
      if (q1.y == q2.y) return pdbl(c, q1);
      r = q1; r.inf = 1'b1; return r;
    end
    r.inf = 1'b0;
    if (c.bin) begin
      l   = fmul(c, q1.y ^ q2.y, finv(c, q1.x ^ q2.x));
      r.x = fmul(c, l, l) ^ l ^ q1.x ^ q2.x ^ c.a;
      r.y = fmul(c, l, q2.x ^ r.x) ^ r.x ^ q2.y;
    end else begin
      l   = fmul(c, fsub(c, q1.y, q2.y), finv(c, fsub(c, q1.x, q2.x)));
      r.x = fsub(c, fsub(c, fmul(c, l, l), q1.x), q2.x);
      r.y = fsub(c, fmul(c, l, fsub(c, q2.x, r.x)), q2.y);
    end
    return r;
  endfunction

  function automatic pt_t pmul(curve_t c, fe_t k, int len, pt_t q);
    pt_t r;
    r = q; r.inf = 1'b1;
    for (int i = len - 1; i >= 0; i--) begin
      r = pdbl(c, r);
      if (k[i]) r = padd(c, r, q);
    end
    return r;
  endfunction

  // x * r mod p with r = 2^m (GF(p)) or x^m (GF(2^m))
  function automatic fe_t to_mont(curve_t c, fe_t x);
    fe_t rr;
    rr = c.bin ? (c.p ^ (fe_t'(1) << c.m)) : fe_t'((wide_t'(1) << c.m) % wide_t'(c.p));
    return fmul(c, x, rr);
  endfunction

  function automatic fe_t rnd_fe(curve_t c);
    wide_t x = '0;
    for (int k = 0; k < (W + 31) / 32; k++) x[k*32 +: 32] = $urandom;
    if (c.bin) return fe_t'(x & ((wide_t'(1) << c.m) - 1'b1));
    return fe_t'(x % wide_t'(c.p));
  endfunction
endpackage
