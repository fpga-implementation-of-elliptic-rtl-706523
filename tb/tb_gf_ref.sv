// tb_gf_ref: reference arithmetic for the testbenches, written independently
// of the RTL.
//
// GF(2^163) multiplication is done bit by bit with reduction interleaved in
// every shift step (the RTL reduces once at the end); inversion uses Fermat's
// little theorem, a^(2^m - 2), by repeated squaring (the RTL uses
// Itoh-Tsujii); point multiplication works in affine coordinates with the
// textbook double-and-add method (the RTL uses a projective Montgomery
// ladder). The curve is y^2 + xy = x^3 + x^2 + b with the NIST B-163
// constants, typed in here separately from the RTL package.
package tb_gf_ref;

  localparam int M = 163;
  typedef logic [M-1:0]   fe_t;
  typedef logic [2*M-2:0] fe2_t;

  localparam fe_t POLY_LOW = fe_t'(8'b1100_1001);  // z^7 + z^6 + z^3 + 1
  localparam fe_t REF_B  = 163'h20a601907b8c953ca1481eb10512f78744a3205fd;
  localparam fe_t REF_GX = 163'h3f0eba16286a2d57ea0991168d4994637e8343e36;
  localparam fe_t REF_GY = 163'h0d51fbc6c71a0094fa2cdd545b11c5c0c797324f1;

  typedef struct packed {
    logic inf;
    fe_t  x;
    fe_t  y;
  } pt_t;

  function automatic fe_t gf_mul(fe_t a, fe_t b);
    fe_t r = '0;
    for (int i = M - 1; i >= 0; i--) begin
      logic top = r[M-1];
      r = r << 1;
      if (top) r ^= POLY_LOW;
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  // Bit-serial reduction of an unreduced 2m-1 bit polynomial.
  function automatic fe_t gf_reduce(fe2_t c);
    for (int i = 2 * M - 2; i >= M; i--) begin
      if (c[i]) begin
        c[i] = 1'b0;
        c[i-M]   ^= 1'b1;
        c[i-M+3] ^= 1'b1;
        c[i-M+6] ^= 1'b1;
        c[i-M+7] ^= 1'b1;
      end
    end
    return c[M-1:0];
  endfunction

  // Carry-less product without reduction.
  function automatic fe2_t clmul(fe_t a, fe_t b);
    fe2_t r = '0;
    for (int i = 0; i < M; i++) if (b[i]) r ^= (fe2_t'(a) << i);
    return r;
  endfunction

  function automatic fe_t gf_inv(fe_t a);
    fe_t r = fe_t'(1);
    fe_t t = a;
    for (int i = 1; i < M; i++) begin
      t = gf_mul(t, t);
      r = gf_mul(r, t);
    end
    return r;
  endfunction

  function automatic logic on_curve(pt_t p);
    fe_t x2, lhs, rhs;
    if (p.inf) return 1'b1;
    x2  = gf_mul(p.x, p.x);
    lhs = gf_mul(p.y, p.y) ^ gf_mul(p.x, p.y);
    rhs = gf_mul(x2, p.x) ^ x2 ^ REF_B;
    return lhs == rhs;
  endfunction

  function automatic pt_t pt_dbl(pt_t p);
    pt_t  r;
    fe_t  lam;
    if (p.inf || p.x == '0) begin
      r = '0; r.inf = 1'b1; return r;
    end
    lam   = p.x ^ gf_mul(p.y, gf_inv(p.x));
    r.inf = 1'b0;
    r.x   = gf_mul(lam, lam) ^ lam ^ fe_t'(1);
    r.y   = gf_mul(p.x, p.x) ^ gf_mul(lam ^ fe_t'(1), r.x);
    return r;
  endfunction

  function automatic pt_t pt_add(pt_t p, pt_t q);
    pt_t r;
    fe_t lam;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return pt_dbl(p);
      r = '0; r.inf = 1'b1; return r;
    end
    lam   = gf_mul(p.y ^ q.y, gf_inv(p.x ^ q.x));
    r.inf = 1'b0;
    r.x   = gf_mul(lam, lam) ^ lam ^ p.x ^ q.x ^ fe_t'(1);
    r.y   = gf_mul(lam, p.x ^ r.x) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t pt_mul(fe_t d, pt_t p);
    pt_t r = '0;
    r.inf = 1'b1;
    for (int i = M - 1; i >= 0; i--) begin
      r = pt_dbl(r);
      if (d[i]) r = pt_add(r, p);
    end
    return r;
  endfunction

  function automatic pt_t base_point();
    pt_t g;
    g.inf = 1'b0; g.x = REF_GX; g.y = REF_GY;
    return g;
  endfunction

  function automatic fe_t rand_fe();
    fe_t r;
    for (int i = 0; i < M; i += 32) r = (r << 32) | fe_t'($urandom);
    return r;
  endfunction

endpackage
