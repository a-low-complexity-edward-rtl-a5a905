// bec_ref_pkg: behavioural reference arithmetic for the testbenches.
//
// Plain bit-serial GF(2^233) arithmetic, written independently of the RTL
// structure: carry-less multiplication bit by bit, reduction one bit at a time
// from the top, multiplication by shift-and-add with an interleaved reduction,
// inversion by Fermat's little theorem (a^(2^233 - 2)) with square-and-multiply,
// and the Montgomery ladder with the differential addition-and-doubling law.
package bec_ref_pkg;
  localparam int M = 233;
  localparam int K = 74;

  typedef logic [M-1:0]   fe_t;
  typedef logic [2*M-2:0] dfe_t;

  function automatic fe_t rand_fe();
    fe_t r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom();
    return r;
  endfunction

  // carry-less product of an M-bit and an N-bit polynomial (N <= M)
  function automatic dfe_t clmul(fe_t a, fe_t b);
    dfe_t p = '0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        if (a[i] && b[j]) p[i+j] = ~p[i+j];
    return p;
  endfunction

  // bit-by-bit reduction modulo x^233 + x^74 + 1
  function automatic fe_t reduce(dfe_t c);
    for (int i = 2*M-2; i >= M; i--)
      if (c[i]) begin
        c[i]       = 1'b0;
        c[i-M+K]   = ~c[i-M+K];
        c[i-M]     = ~c[i-M];
      end
    return c[M-1:0];
  endfunction

  // shift-and-add multiplication, MSB first, reducing every step
  function automatic fe_t mul(fe_t a, fe_t b);
    logic [M:0] acc = '0;
    for (int i = M-1; i >= 0; i--) begin
      acc = {acc[M-1:0], 1'b0};
      if (acc[M]) begin
        acc[M] = 1'b0; acc[K] = ~acc[K]; acc[0] = ~acc[0];
      end
      if (b[i]) acc[M-1:0] = acc[M-1:0] ^ a;
    end
    return acc[M-1:0];
  endfunction

  function automatic fe_t sqr(fe_t a);
    return mul(a, a);
  endfunction

  // a^(2^233 - 2) = product of a^(2^i) for i = 1 .. 232
  function automatic fe_t inv(fe_t a);
    fe_t r = fe_t'(1);
    fe_t s = a;
    for (int i = 1; i < M; i++) begin
      s = sqr(s);
      r = mul(r, s);
    end
    return r;
  endfunction

  typedef struct { fe_t w1, z1, w2, z2; } ladder_t;

  // One differential addition and doubling: P doubled, Q replaced by P + Q.
  function automatic void dadd(inout fe_t wp, inout fe_t zp, inout fe_t wq, inout fe_t zq,
                               input fe_t e1, input fe_t e2, input fe_t w);
    fe_t a, b, c, wd, zd, za, wa;
    a  = mul(wp, zp);
    b  = mul(wp, wq);
    c  = mul(zp, zq);
    wd = sqr(a);
    zd = sqr(sqr(mul(e1, wp) ^ zp));
    za = sqr(mul(e2, b) ^ c);
    wa = mul(b, c) ^ mul(w, za);
    wp = wd; zp = zd; wq = wa; zq = za;
  endfunction

  // Montgomery ladder from (O, P) over nbits key bits, most significant first.
  function automatic ladder_t ladder(logic [M-1:0] k, int nbits, fe_t e1, fe_t e2,
                                     fe_t w, fe_t x, fe_t y);
    ladder_t s;
    s.w1 = '0; s.z1 = y; s.w2 = x; s.z2 = y;
    for (int i = nbits-1; i >= 0; i--) begin
      if (k[i]) dadd(s.w2, s.z2, s.w1, s.z1, e1, e2, w);
      else      dadd(s.w1, s.z1, s.w2, s.z2, e1, e2, w);
    end
    return s;
  endfunction
endpackage
