// bch_pkg: Galois-field and BCH code-group arithmetic shared by the codec,
// the segment allocators and the testbenches.
//
// A code group is the set of primitive narrow-sense binary BCH codes over
// GF(2^m) whose generator polynomial g_t(x) is the least common multiple of
// the minimal polynomials of alpha^1, alpha^3, ..., alpha^(2t-1). Every code is
// shortened to the same number of information bits, so a code is fully named
// by its correction capability t. The functions below are written for
// elaboration time (constant functions): they compute field elements, coset
// leaders, minimal polynomials, the redundancy r(t) = deg g_t and the true
// capability of the code chosen for a requested t. m may range from 3 to 16.
//
// The primitive polynomials are this design's choice (the usual ones from
// code tables); the method of building the group follows the document.
package bch_pkg;

  localparam int unsigned GF_MAXW = 16;
  typedef logic [GF_MAXW-1:0] gf_t;

  // Primitive polynomial of GF(2^m), bit i = coefficient of x^i.
  function automatic logic [GF_MAXW:0] prim_poly(input int unsigned m);
    case (m)
      3:  return 17'h0000b;  // x^3+x+1
      4:  return 17'h00013;  // x^4+x+1
      5:  return 17'h00025;  // x^5+x^2+1
      6:  return 17'h00043;  // x^6+x+1
      7:  return 17'h00089;  // x^7+x^3+1
      8:  return 17'h0011d;  // x^8+x^4+x^3+x^2+1
      9:  return 17'h00211;  // x^9+x^4+1
      10: return 17'h00409;  // x^10+x^3+1
      11: return 17'h00805;  // x^11+x^2+1
      12: return 17'h01053;  // x^12+x^6+x^4+x+1
      13: return 17'h0201b;  // x^13+x^4+x^3+x+1
      14: return 17'h04443;  // x^14+x^10+x^6+x+1
      15: return 17'h08003;  // x^15+x+1
      default: return 17'h1002d;  // x^16+x^5+x^3+x^2+1
    endcase
  endfunction

  // Product of two elements of GF(2^m) in polynomial basis.
  function automatic gf_t gf_mul(input gf_t a, input gf_t b, input int unsigned m);
    logic [GF_MAXW:0] p;
    logic [GF_MAXW:0] acc;
    logic [GF_MAXW:0] aa;
    p   = prim_poly(m);
    acc = '0;
    aa  = {1'b0, a};
    for (int unsigned i = 0; i < GF_MAXW; i++) begin
      if (i < m) begin
        if (b[i]) acc = acc ^ aa;
        aa = aa << 1;
        if (aa[m]) aa = aa ^ p;
      end
    end
    return acc[GF_MAXW-1:0];
  endfunction

  // alpha^e, e taken modulo 2^m - 1 (square and multiply).
  function automatic gf_t gf_alpha_pow(input longint unsigned e, input int unsigned m);
    gf_t base;
    gf_t res;
    longint unsigned ee;
    ee   = e % ((64'd1 << m) - 1);
    base = gf_t'(2);
    res  = gf_t'(1);
    while (ee != 0) begin
      if (ee[0]) res = gf_mul(res, base, m);
      base = gf_mul(base, base, m);
      ee   = ee >> 1;
    end
    return res;
  endfunction

  // True when j is the smallest member of its cyclotomic coset mod 2^m - 1.
  function automatic bit is_leader(input int unsigned j, input int unsigned m);
    longint unsigned n;
    longint unsigned c;
    longint unsigned jl;
    jl = longint'(j);
    n = (64'd1 << m) - 1;
    c = jl;
    for (int unsigned k = 1; k < m; k++) begin
      c = (c * 2) % n;
      if (c < jl) return 1'b0;
    end
    return 1'b1;
  endfunction

  // Number of elements in the cyclotomic coset of j.
  function automatic int unsigned coset_size(input int unsigned j, input int unsigned m);
    longint unsigned n;
    longint unsigned c;
    longint unsigned jl;
    jl = longint'(j);
    n = (64'd1 << m) - 1;
    c = (jl * 2) % n;
    for (int unsigned k = 1; k <= m; k++) begin
      if (c == jl) return k;
      c = (c * 2) % n;
    end
    return m;
  endfunction

  // Minimal polynomial of alpha^j over GF(2): product of (x + alpha^c) over
  // the coset of j. Bit i of the result is the coefficient of x^i.
  function automatic logic [GF_MAXW:0] min_poly(input int unsigned j, input int unsigned m);
    gf_t coef [GF_MAXW+1];
    gf_t root;
    longint unsigned n;
    longint unsigned c;
    int unsigned sz;
    logic [GF_MAXW:0] res;
    n  = (64'd1 << m) - 1;
    sz = coset_size(j, m);
    for (int unsigned i = 0; i <= GF_MAXW; i++) coef[i] = '0;
    coef[0] = gf_t'(1);
    c = longint'(j) % n;
    for (int unsigned k = 0; k < GF_MAXW; k++) begin
      if (k < sz) begin
        root = gf_alpha_pow(c, m);
        // multiply coef(x) by (x + root)
        for (int i = GF_MAXW; i >= 1; i--) coef[i] = coef[i-1] ^ gf_mul(coef[i], root, m);
        coef[0] = gf_mul(coef[0], root, m);
        c = (c * 2) % n;
      end
    end
    for (int unsigned i = 0; i <= GF_MAXW; i++) res[i] = coef[i][0];
    return res;
  endfunction

  // Redundancy r(t) = deg g_t(x) of the least-redundancy code correcting t errors.
  function automatic int unsigned bch_redundancy(input int unsigned t, input int unsigned m);
    int unsigned r;
    r = 0;
    for (int unsigned q = 0; q < t; q++)
      if (is_leader(2*q + 1, m)) r += coset_size(2*q + 1, m);
    return r;
  endfunction

  // Largest t' >= t whose code is the same as that of t (same generator).
  function automatic int unsigned bch_capability(input int unsigned t, input int unsigned m);
    int unsigned tc;
    tc = t;
    while (tc < (1 << (m - 1)) && !is_leader(2*tc + 1, m)) tc++;
    return tc;
  endfunction

  function automatic int unsigned clog2u(input int unsigned v);
    int unsigned w;
    w = 0;
    while (w < 32 && (32'd1 << w) < v) w++;
    return w;
  endfunction

endpackage
