// x25519_ref_pkg: reference model of the Curve25519 arithmetic for the testbenches.
//
// Plain wide-integer arithmetic modulo p = 2^255 - 19 (products reduced with the
// % operator), the x-only Montgomery ladder step of RFC 7748 written with an
// explicit swap, inversion by square-and-multiply, and a complete scalar
// multiplication with a selectable scalar length and starting Z of R1. It
// shares no code with the RTL, so it serves as an independent reference.
package x25519_ref_pkg;
  import c25519_pkg::*;

  typedef struct {
    fe_t x2, z2, x3, z3;
  } ladder_t;

  function automatic fe_t fmul(input fe_t a, input fe_t b);
    logic [509:0] t;
    t = 510'(a) * 510'(b);
    return fe_t'(t % 510'(P_MOD));
  endfunction

  function automatic fe_t fadd(input fe_t a, input fe_t b);
    logic [256:0] t;
    t = 257'(a) + 257'(b);
    return fe_t'(t % 257'(P_MOD));
  endfunction

  function automatic fe_t fsub(input fe_t a, input fe_t b);
    logic [256:0] t;
    t = 257'(a) + 257'(P_MOD) - 257'(b % P_MOD);
    return fe_t'(t % 257'(P_MOD));
  endfunction

  function automatic fe_t finv(input fe_t z);
    fe_t r, base;
    logic [254:0] e;
    e = P_MOD - 255'(2);
    r = fe_t'(1);
    base = fe_t'(z % P_MOD);
    for (int i = 0; i < 255; i++) begin
      if (e[i]) r = fmul(r, base);
      base = fmul(base, base);
    end
    return r;
  endfunction

  // One ladder step; s = 1 doubles R1 instead of R0. R0 = (x2,z2), R1 = (x3,z3).
  function automatic ladder_t step(input ladder_t q, input fe_t x1, input logic s);
    fe_t xa, za, xb, zb, a, aa, b, bb, e, c, d, da, cb;
    ladder_t o;
    if (s) begin xa = q.x3; za = q.z3; xb = q.x2; zb = q.z2; end
    else   begin xa = q.x2; za = q.z2; xb = q.x3; zb = q.z3; end
    a  = fadd(xa, za); aa = fmul(a, a);
    b  = fsub(xa, za); bb = fmul(b, b);
    e  = fsub(aa, bb);
    c  = fadd(xb, zb); d = fsub(xb, zb);
    da = fmul(d, a);   cb = fmul(c, b);
    xb = fmul(fadd(da, cb), fadd(da, cb));
    zb = fmul(x1, fmul(fsub(da, cb), fsub(da, cb)));
    xa = fmul(aa, bb);
    za = fmul(e, fadd(aa, fmul(A24, e)));
    if (s) begin o.x3 = xa; o.z3 = za; o.x2 = xb; o.z2 = zb; end
    else   begin o.x2 = xa; o.z2 = za; o.x3 = xb; o.z3 = zb; end
    return o;
  endfunction

  // Scalar multiplication over the low nbits bits of k, R1 starting at (lam*u : lam).
  function automatic fe_t scalarmult(input logic [279:0] k, input int nbits,
                                     input fe_t u, input fe_t lam);
    ladder_t q;
    q.x2 = fe_t'(1); q.z2 = '0;
    q.x3 = fmul(u, lam); q.z3 = fe_t'(lam % P_MOD);
    for (int i = nbits - 1; i >= 0; i--) q = step(q, u, k[i]);
    return fmul(q.x2, finv(q.z2));
  endfunction

  function automatic logic [255:0] clamp(input logic [255:0] k);
    logic [255:0] c;
    c = k;
    c[2:0] = 3'b000; c[255] = 1'b0; c[254] = 1'b1;
    return c;
  endfunction

  // RFC 7748 X25519: clamped scalar, top bit of u ignored, 255 ladder steps.
  function automatic fe_t x25519(input logic [255:0] k, input logic [255:0] u);
    return scalarmult(280'(clamp(k)), 255, fe_t'(u), fe_t'(1));
  endfunction

  // Byte strings of RFC 7748 are little-endian; this turns one into a number.
  function automatic logic [255:0] le_bytes(input logic [255:0] s);
    logic [255:0] r;
    for (int i = 0; i < 32; i++) r[i*8 +: 8] = s[(31-i)*8 +: 8];
    return r;
  endfunction

endpackage
