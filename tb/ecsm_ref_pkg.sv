// ecsm_ref_pkg: behavioural reference arithmetic for the testbenches.
//
// Bit-serial GF(2^M) multiplication (shift-and-add, reducing one bit at a
// time, independent of the Karatsuba tree and the two-fold reduction of the
// RTL), Fermat inversion, and affine point doubling/addition on
// y^2 + xy = x^3 + x^2 + b (a = 1) with double-and-add scalar multiplication.
// Also the NIST B-163 curve coefficient and base point used as test data.
package ecsm_ref_pkg;
  import ecsm_pkg::*;

  localparam logic [M:0] F_POLY = (1 << M) | (1 << K1) | (1 << K2) | (1 << K3) | 1;

  localparam fe_t B163_B  = 163'h2_0A60_1907_B8C9_53CA_1481_EB10_512F_7874_4A32_05FD;
  localparam fe_t B163_GX = 163'h3_F0EB_A162_86A2_D57E_A099_1168_D499_4637_E834_3E36;
  localparam fe_t B163_GY = 163'h0_D51F_BC6C_71A0_094F_A2CD_D545_B11C_5C0C_7973_24F1;

  typedef struct {
    fe_t x;
    fe_t y;
    bit  inf;
  } pt_t;

  function automatic fe_t ref_mul(fe_t a, fe_t b);
    logic [M:0] aa;
    fe_t r;
    aa = {1'b0, a};
    r  = '0;
    for (int i = 0; i < M; i++) begin
      if (b[i]) r ^= aa[M-1:0];
      aa = aa << 1;
      if (aa[M]) aa ^= F_POLY;
    end
    return r;
  endfunction

  // Unreduced polynomial product, for the Karatsuba multiplier alone.
  function automatic logic [2*M-2:0] ref_pmul(fe_t a, fe_t b);
    logic [2*M-2:0] r;
    r = '0;
    for (int i = 0; i < M; i++) if (b[i]) r ^= ((2*M-1)'(a) << i);
    return r;
  endfunction

  function automatic fe_t ref_inv(fe_t a);
    fe_t r;
    r = a;
    for (int i = 1; i < M - 1; i++) r = ref_mul(ref_mul(r, r), a);
    return ref_mul(r, r);
  endfunction

  function automatic bit on_curve(pt_t p, fe_t b);
    fe_t x2;
    if (p.inf) return 1'b1;
    x2 = ref_mul(p.x, p.x);
    return (ref_mul(p.y, p.y) ^ ref_mul(p.x, p.y)) == (ref_mul(x2, p.x) ^ x2 ^ b);
  endfunction

  function automatic pt_t pt_dbl(pt_t p);
    pt_t r;
    fe_t l;
    if (p.inf || p.x == '0) begin
      r.inf = 1'b1; r.x = '0; r.y = '0;
      return r;
    end
    l = p.x ^ ref_mul(p.y, ref_inv(p.x));
    r.inf = 1'b0;
    r.x = ref_mul(l, l) ^ l ^ fe_t'(1);
    r.y = ref_mul(p.x, p.x) ^ ref_mul(l ^ fe_t'(1), r.x);
    return r;
  endfunction

  function automatic pt_t pt_add(pt_t p, pt_t q);
    pt_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return pt_dbl(p);
      r.inf = 1'b1; r.x = '0; r.y = '0;
      return r;
    end
    l = ref_mul(p.y ^ q.y, ref_inv(p.x ^ q.x));
    r.inf = 1'b0;
    r.x = ref_mul(l, l) ^ l ^ p.x ^ q.x ^ fe_t'(1);
    r.y = ref_mul(l, p.x ^ r.x) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t pt_mul(fe_t k, pt_t p);
    pt_t r;
    r.inf = 1'b1; r.x = '0; r.y = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = pt_dbl(r);
      if (k[i]) r = pt_add(r, p);
    end
    return r;
  endfunction
endpackage
