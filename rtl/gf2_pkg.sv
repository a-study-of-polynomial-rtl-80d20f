// gf2_pkg: polynomial arithmetic over GF(2) shared by the residue-number designs.
// Polynomials are bit vectors, bit i holding the coefficient of x^i.  The
// functions here are used at elaboration time to derive the constants of the
// single-radix conversion (SRC): the products M_i of all channel moduli but one
// and their inverses I_i = M_i^-1 mod m_i.  Deriving them from the moduli,
// rather than storing printed tables, keeps the constants consistent with the
// chosen moduli.  The package also defines the byte-in-residues type of the
// residue AES.
package gf2_pkg;

  // Wide enough for the largest SRC product in this project (degree 508).
  localparam int BP_W = 512;
  typedef logic [BP_W-1:0] bpoly_t;

  // Degree of a polynomial, -1 for the zero polynomial.
  function automatic int bdeg(bpoly_t a);
    int d;
    d = -1;
    for (int i = 0; i < BP_W; i++) if (a[i]) d = i;
    return d;
  endfunction

  // Carry-less product, truncated to BP_W bits.
  function automatic bpoly_t bmul(bpoly_t a, bpoly_t b);
    bpoly_t r;
    r = '0;
    for (int i = 0; i < BP_W; i++) if (b[i]) r ^= a << i;
    return r;
  endfunction

  // Remainder of a modulo m (m must not be zero).
  function automatic bpoly_t bmod(bpoly_t a, bpoly_t m);
    bpoly_t v;
    int d;
    v = a;
    d = bdeg(m);
    for (int i = BP_W - 1; i >= d; i--) if (v[i]) v ^= m << (i - d);
    return v;
  endfunction

  // Inverse of a modulo an irreducible m, by the extended Euclidean algorithm
  // with degrees tracked incrementally (keeps elaboration work linear).
  function automatic bpoly_t binv(bpoly_t a, bpoly_t m);
    bpoly_t u, v, g1, g2, t;
    int du, dv, j, tmp;
    u  = bmod(a, m);
    v  = m;
    g1 = 1;
    g2 = 0;
    du = bdeg(u);
    dv = bdeg(v);
    while (du > 0) begin
      if (du < dv) begin
        t = u;  u = v;  v = t;
        t = g1; g1 = g2; g2 = t;
        tmp = du; du = dv; dv = tmp;
      end
      j = du - dv;
      u  ^= v << j;
      g1 ^= g2 << j;
      while (du >= 0 && !u[du]) du--;
    end
    return bmod(g1, m);
  endfunction

  // ---------------------------------------------------------------- residue AES
  // Channel moduli of the residue AES: m1 = x^4+x+1, m2 = x^4+x^3+1 and the
  // redundant m3 = x^4+x^3+x^2+x+1.  AES field polynomial x^8+x^4+x^3+x+1.
  localparam logic [4:0] AES_M1 = 5'b10011;
  localparam logic [4:0] AES_M2 = 5'b11001;
  localparam logic [4:0] AES_M3 = 5'b11111;
  localparam logic [8:0] AES_POLY = 9'h11B;

  // One AES byte held as three 4-bit residues.
  typedef struct packed {
    logic [3:0] r3;   // residue modulo m3 (redundant channel)
    logic [3:0] r2;   // residue modulo m2
    logic [3:0] r1;   // residue modulo m1
  } prns_byte_t;

  // Byte (or any polynomial of degree < 12) modulo a degree-4 modulus.
  function automatic logic [3:0] mod4(logic [11:0] a, logic [4:0] m);
    logic [11:0] v;
    v = a;
    for (int i = 11; i >= 4; i--) if (v[i]) v ^= 12'(m) << (i - 4);
    return v[3:0];
  endfunction

  // Product of two residues modulo a degree-4 modulus.
  function automatic logic [3:0] mulmod4(logic [3:0] a, logic [3:0] b, logic [4:0] m);
    logic [11:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 12'(a) << i;
    return mod4(p, m);
  endfunction

endpackage
