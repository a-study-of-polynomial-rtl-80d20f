// prns_err_detect: single-radix conversion (SRC) of one residue-AES byte and
// overflow detection.  With moduli m1, m2, m3 of degree 4 the conversion
//   X = sum_i ((r_i * I_i) mod m_i) * M_i,  M_i = prod_{k!=i} m_k,
//   I_i = M_i^-1 mod m_i
// returns a polynomial of degree < 12.  A correct byte has degree < 8, so a
// one in bits 11..8 (the illegitimate range created by the redundant channel)
// flags an error; any error confined to one residue always lands there.  The
// constants M_i and I_i are derived from the moduli at elaboration time.
// value[7:0] is the byte itself when err is low.  Combinational.
// The document describes the detection as a partial conversion of the top
// four bits followed by a 4-input gate that flags any one; the full 12-bit
// value is also brought out here because the core uses it to recover the
// ciphertext byte.
module prns_err_detect
  import gf2_pkg::*;
(
  input  prns_byte_t  din,
  output logic [11:0] value,
  output logic        err
);
  localparam bpoly_t MOD1 = bpoly_t'(AES_M1);
  localparam bpoly_t MOD2 = bpoly_t'(AES_M2);
  localparam bpoly_t MOD3 = bpoly_t'(AES_M3);
  localparam bpoly_t BM1 = bmul(MOD2, MOD3);
  localparam bpoly_t BM2 = bmul(MOD1, MOD3);
  localparam bpoly_t BM3 = bmul(MOD1, MOD2);
  localparam logic [3:0] I1 = 4'(binv(BM1, MOD1));
  localparam logic [3:0] I2 = 4'(binv(BM2, MOD2));
  localparam logic [3:0] I3 = 4'(binv(BM3, MOD3));
  localparam logic [8:0] M1 = 9'(BM1);
  localparam logic [8:0] M2 = 9'(BM2);
  localparam logic [8:0] M3 = 9'(BM3);

  function automatic logic [11:0] mul_m(logic [3:0] q, logic [8:0] m);
    logic [11:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (q[i]) p ^= 12'(m) << i;
    return p;
  endfunction

  logic [3:0] q1, q2, q3;
  always_comb begin
    q1 = mulmod4(din.r1, I1, AES_M1);
    q2 = mulmod4(din.r2, I2, AES_M2);
    q3 = mulmod4(din.r3, I3, AES_M3);
    value = mul_m(q1, M1) ^ mul_m(q2, M2) ^ mul_m(q3, M3);
    err   = |value[11:8];
  end
endmodule
