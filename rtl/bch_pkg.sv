// bch_pkg: Galois-field helpers and code constants for the t-error-correcting,
// w-bit parallel binary BCH code used by the flash controller.
//
// The code is built as in the usual construction: G(x) is the product of the
// minimal polynomials m1(x) m3(x) ... m(2t-1)(x) over GF(2^m), so it has degree
// m*t and m*t parity registers are needed. The functions below compute the
// minimal polynomials and G(x) at elaboration time from (m, t, primitive
// polynomial), so no coefficient table is stored anywhere: changing M, T or
// PRIM_POLY regenerates every array.
//
// Defaults: t = 4 (the controller's ECC corrects 4 bits), m = 13 and the
// primitive polynomial x^13+x^4+x^3+x+1 (chosen here: a 512-byte sector plus
// 52 parity bits needs a code length above 4096, and 2^13-1 = 8191 is the
// smallest that fits), w = 8 (one byte of the x8 flash I/O per clock).
package bch_pkg;

  localparam int unsigned GF_M       = 13;
  localparam int unsigned BCH_T      = 4;
  localparam int unsigned BCH_W      = 8;
  localparam int unsigned PRIM_POLY  = 32'h201B;   // x^13 + x^4 + x^3 + x + 1
  localparam int unsigned SECTOR_BYTES = 512;

  // Widest polynomial the helpers handle (degree m*t must stay below this).
  localparam int unsigned MAXP = 256;
  typedef logic [MAXP-1:0] poly_t;

  // Field elements are held in 16 bits, the upper bits zero (m <= 16).
  typedef logic [15:0] gf_t;

  // a*b in GF(2^m) with the given primitive polynomial (shift-and-add).
  function automatic gf_t gf_mul(gf_t a, gf_t b, int unsigned m, int unsigned prim);
    gf_t r = '0;
    gf_t x = a;
    for (int unsigned i = 0; i < m; i++) begin
      if (b[i]) r ^= x;
      x = x << 1;
      if (x[m]) x ^= gf_t'(prim);
    end
    return r;
  endfunction

  // alpha^e, alpha being the root of the primitive polynomial (alpha = 2).
  function automatic gf_t gf_alpha_pow(longint e, int unsigned m, int unsigned prim);
    longint n = (longint'(1) << m) - 1;
    longint k = ((e % n) + n) % n;
    gf_t r = 16'd1;
    gf_t b = 16'd2;
    while (k != 0) begin
      if (k[0]) r = gf_mul(r, b, m, prim);
      b = gf_mul(b, b, m, prim);
      k = k >> 1;
    end
    return r;
  endfunction

  // Minimal polynomial of alpha^j: product of (x + alpha^e) over the
  // cyclotomic class e = j*2^s mod (2^m - 1). Returned as a GF(2) polynomial,
  // bit i holding the coefficient of x^i.
  function automatic poly_t min_poly(int unsigned j, int unsigned m, int unsigned prim);
    longint n = (longint'(1) << m) - 1;
    gf_t c [0:16];
    longint e = longint'(j) % n;
    int unsigned deg = 0;
    poly_t p = '0;
    for (int i = 0; i <= 16; i++) c[i] = '0;
    c[0] = 16'd1;
    do begin
      gf_t r = gf_alpha_pow(e, m, prim);
      // c(x) <- c(x) * (x + r)
      for (int i = 16; i >= 1; i--) c[i] = c[i-1] ^ gf_mul(c[i], r, m, prim);
      c[0] = gf_mul(c[0], r, m, prim);
      deg++;
      e = (e * 2) % n;
    end while (e != longint'(j) % n && deg < 16);
    for (int i = 0; i <= 16; i++) p[i] = c[i][0];
    return p;
  endfunction

  function automatic int unsigned poly_degree(poly_t p);
    int unsigned d = 0;
    for (int unsigned i = 0; i < MAXP; i++) if (p[i]) d = i;
    return d;
  endfunction

  // Carry-less product of two GF(2) polynomials.
  function automatic poly_t poly_mul(poly_t a, poly_t b);
    poly_t r = '0;
    for (int unsigned i = 0; i < MAXP; i++) if (b[i]) r ^= (a << i);
    return r;
  endfunction

  // True when alpha^j shares its minimal polynomial with some alpha^i,
  // i odd and i < j (then m_j(x) is already a factor of G(x)).
  function automatic bit class_seen(int unsigned j, int unsigned m);
    longint n = (longint'(1) << m) - 1;
    longint e = longint'(j) % n;
    for (int unsigned s = 0; s < m; s++) begin
      if (e[0] && e < longint'(j)) return 1'b1;
      e = (e * 2) % n;
    end
    return 1'b0;
  endfunction

  // Generator polynomial G(x) = lcm(m1, m3, ..., m(2t-1)).
  function automatic poly_t gen_poly(int unsigned t, int unsigned m, int unsigned prim);
    poly_t g = poly_t'(1);
    for (int unsigned j = 1; j < 2 * t; j += 2)
      if (!class_seen(j, m)) g = poly_mul(g, min_poly(j, m, prim));
    return g;
  endfunction

  // Odd part of j: alpha^j and alpha^odd(j) have the same minimal polynomial.
  function automatic int unsigned odd_part(int unsigned j);
    int unsigned o = j;
    while (o != 0 && !o[0]) o = o >> 1;
    return o;
  endfunction

endpackage
