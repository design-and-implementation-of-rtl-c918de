// rsa_ref_pkg: plain shift-and-add modular arithmetic used by the RSA
// testbenches as an independent reference (no Montgomery form).
// Plain shift-and-add arithmetic, deliberately unlike the Montgomery
// hardware.
package rsa_ref_pkg;
  localparam int unsigned RW = 1024;
  typedef logic [RW+1:0] num_t;

  function automatic num_t addmod(num_t a, num_t b, num_t m);
    num_t s = a + b;
    return (s >= m) ? s - m : s;
  endfunction

  function automatic num_t mulmod(num_t a, num_t b, num_t m);
    num_t r = '0;
    while (a >= m) a = a - m;
    for (int i = RW; i >= 0; i--) begin
      r = addmod(r, r, m);
      if (b[i]) r = addmod(r, a, m);
    end
    return r;
  endfunction

  function automatic num_t expmod(num_t x, num_t e, int ebits, num_t m);
    num_t r = 1;
    for (int i = ebits - 1; i >= 0; i--) begin
      r = mulmod(r, r, m);
      if (e[i]) r = mulmod(r, x, m);
    end
    return r;
  endfunction

  // 2^k mod m
  function automatic num_t pow2mod(int k, num_t m);
    num_t r = 1;
    for (int i = 0; i < k; i++) r = addmod(r, r, m);
    return r;
  endfunction

  // random odd modulus of exactly n bits, and a random value below m
  function automatic num_t rand_mod(int n);
    num_t r = '0;
    for (int i = 0; i < (n + 31) / 32; i++) r[32*i +: 32] = $urandom;
    r = r & ((num_t'(1) << n) - 1);
    r[n-1] = 1'b1;
    r[0] = 1'b1;
    return r;
  endfunction

  function automatic num_t rand_below(num_t m, int n);
    num_t r = '0;
    for (int i = 0; i < (n + 31) / 32; i++) r[32*i +: 32] = $urandom;
    r = r & ((num_t'(1) << n) - 1);
    while (r >= m) r = r - m;
    return r;
  endfunction
endpackage
