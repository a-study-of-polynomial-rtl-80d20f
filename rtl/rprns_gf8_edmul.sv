// rprns_gf8_edmul: GF(2^8) multiplier with error detection in a redundant
// polynomial residue number system (RPRNS), field x^8+x^4+x^3+x+1.
// Both operands are reduced modulo four degree-6 channel moduli
// m1 = x^6+x+1, m2 = x^6+x^5+1, m3 = x^6+x^3+1 and the redundant
// m4 = x^6+x^4+x^2+x+1; the four channels multiply independently modulo their
// modulus; single-radix conversion (SRC) p = sum((p_i*I_i mod m_i)*M_i), with
// M_i the product of the other three moduli and I_i its inverse modulo m_i,
// rebuilds the 24-bit weighted product.  A correct product has degree at most
// 14, so a one in bits 23..15 (9-bit OR) means a channel produced a wrong
// residue.  Bits 14..0 are reduced modulo the field polynomial.
// Purely combinational, as in the document.  The constants M_i and I_i are
// computed at elaboration time from the moduli.
// fault_xor (4 x 6 bits, channel 1 in the low bits) is XORed into the channel
// products; it is a test input of this design for fault injection and is tied
// to zero in normal use.  prod_res gives the (possibly faulted) channel
// products, channel 1 in bits 5..0.
module rprns_gf8_edmul
  import gf2_pkg::*;
#(
  parameter logic [6:0] M1 = 7'b1000011,
  parameter logic [6:0] M2 = 7'b1100001,
  parameter logic [6:0] M3 = 7'b1001001,
  parameter logic [6:0] M4 = 7'b1010111,
  parameter logic [8:0] FPOLY = 9'h11B
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  input  logic [23:0] fault_xor,
  output logic [23:0] prod_res,
  output logic [7:0]  p,
  output logic        err
);
  localparam logic [6:0] MODS [4] = '{M1, M2, M3, M4};

  // Remainder of a polynomial of degree < 24 modulo a degree-6 modulus.
  function automatic logic [5:0] mod6(logic [23:0] x, logic [6:0] m);
    for (int i = 23; i >= 6; i--) if (x[i]) x[i-:7] = x[i-:7] ^ m;
    return x[5:0];
  endfunction

  function automatic logic [5:0] mulmod6(logic [5:0] x, logic [5:0] y, logic [6:0] m);
    logic [23:0] t;
    t = '0;
    for (int i = 0; i < 6; i++) if (y[i]) t ^= 24'(x) << i;
    return mod6(t, m);
  endfunction

  function automatic logic [23:0] bigm(int k);
    bpoly_t r;
    r = bpoly_t'(1);
    for (int i = 0; i < 4; i++) if (i != k) r = bmul(r, bpoly_t'(MODS[i]));
    return 24'(r);
  endfunction

  function automatic logic [5:0] inv_m(int k);
    return 6'(binv(bpoly_t'(bigm(k)), bpoly_t'(MODS[k])));
  endfunction

  localparam logic [23:0] BM [4] = '{bigm(0), bigm(1), bigm(2), bigm(3)};
  localparam logic [5:0]  BI [4] = '{inv_m(0), inv_m(1), inv_m(2), inv_m(3)};

  logic [5:0]  ra [4], rb [4], q [4];
  logic [23:0] src;
  logic [14:0] z;

  always_comb begin
    src = '0;
    for (int k = 0; k < 4; k++) begin
      ra[k] = mod6(24'(a), MODS[k]);
      rb[k] = mod6(24'(b), MODS[k]);
      prod_res[6*k +: 6] = mulmod6(ra[k], rb[k], MODS[k]) ^ fault_xor[6*k +: 6];
      q[k] = mulmod6(prod_res[6*k +: 6], BI[k], MODS[k]);
      for (int i = 0; i < 6; i++) if (q[k][i]) src ^= BM[k] << i;
    end
    err = |src[23:15];
    // Reduction of the degree-14 product by the field polynomial.
    z = src[14:0];
    for (int i = 14; i >= 8; i--) if (z[i]) z[i-:9] = z[i-:9] ^ FPOLY;
    p = z[7:0];
  end
endmodule
