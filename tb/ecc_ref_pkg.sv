// ecc_ref_pkg: reference GF(2^163) arithmetic (bit-serial multiply, Fermat
// inversion) and affine-coordinate point addition, doubling and double-and-
// add scalar multiplication on y^2 + xy = x^3 + a x^2 + b, used to check
// the point multiplier independently of its projective ladder.
// The curve constants are those of the sect163k1 standard.
package ecc_ref_pkg;
  localparam int M = 163;
  typedef logic [M-1:0] fe_t;
  localparam fe_t FPOLY = fe_t'('hC9);

  // sect163k1 domain parameters (a = b = 1)
  localparam fe_t GX = 163'h2_fe13c053_7bbc11ac_aa07d793_de4e6d5e_5c94eee8;
  localparam fe_t GY = 163'h2_89070fb0_5d38ff58_321f2e80_0536d538_ccdaa3d9;
  localparam fe_t ORDER = 163'h4_00000000_00000000_00020108_a2e0cc0d_99f8a5ef;

  typedef struct { fe_t x; fe_t y; bit inf; } pt_t;

  function automatic fe_t fmul(fe_t a, fe_t b);
    fe_t r = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = {r[M-2:0], 1'b0} ^ (r[M-1] ? FPOLY : '0);
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  function automatic fe_t finv(fe_t a);   // a^(2^M - 2)
    fe_t r = 1, s = a;
    for (int i = 1; i < M; i++) begin
      s = fmul(s, s);
      r = fmul(r, s);
    end
    return r;
  endfunction

  function automatic bit on_curve(fe_t x, fe_t y, fe_t a, fe_t b);
    fe_t x2 = fmul(x, x);
    return (fmul(y, y) ^ fmul(x, y)) == (fmul(x2, x) ^ fmul(a, x2) ^ b);
  endfunction

  function automatic pt_t padd(pt_t p, pt_t q, fe_t a);
    pt_t r;
    fe_t lam;
    if (p.inf) return q;
    if (q.inf) return p;
    r.inf = 0;
    if (p.x == q.x) begin
      if (p.y != q.y || p.x == 0) begin r.inf = 1; r.x = 0; r.y = 0; return r; end
      lam = p.x ^ fmul(p.y, finv(p.x));
      r.x = fmul(lam, lam) ^ lam ^ a;
      r.y = fmul(p.x, p.x) ^ fmul(lam ^ 1, r.x);
    end else begin
      lam = fmul(p.y ^ q.y, finv(p.x ^ q.x));
      r.x = fmul(lam, lam) ^ lam ^ p.x ^ q.x ^ a;
      r.y = fmul(lam, p.x ^ r.x) ^ r.x ^ p.y;
    end
    return r;
  endfunction

  function automatic pt_t pmul(logic [M-1:0] k, pt_t p, fe_t a);
    pt_t r;
    r.inf = 1; r.x = 0; r.y = 0;
    for (int i = M - 1; i >= 0; i--) begin
      r = padd(r, r, a);
      if (k[i]) r = padd(r, p, a);
    end
    return r;
  endfunction
endpackage
