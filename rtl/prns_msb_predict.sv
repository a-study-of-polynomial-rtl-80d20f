// prns_msb_predict: recovers bit 7 of a byte from its residues modulo
// m1 = x^4+x+1 and m2 = x^4+x^3+1 by partial conversion: only bit 7 of the
// two-channel SRC sum is formed, which reduces to the XOR of six residue bits
//   a7 = r1[0]^r1[1]^r1[3]^r2[0]^r2[1]^r2[3].
// The residue MixColumn uses it to predict the overflow of x*A before the
// multiplication (only a byte with a7 = 1 needs the reduction term).
// The SRC constants are derived from the moduli at elaboration, so the XOR
// network follows from them.  Combinational.
module prns_msb_predict
  import gf2_pkg::*;
(
  input  logic [3:0] r1,
  input  logic [3:0] r2,
  output logic       a7
);
  localparam bpoly_t MOD1 = bpoly_t'(AES_M1);
  localparam bpoly_t MOD2 = bpoly_t'(AES_M2);
  // Two-channel SRC: M1 = m2, M2 = m1.
  localparam logic [3:0] I1 = 4'(binv(MOD2, MOD1));
  localparam logic [3:0] I2 = 4'(binv(MOD1, MOD2));

  logic [3:0] q1, q2;
  logic [7:0] p1, p2;
  always_comb begin
    q1 = mulmod4(r1, I1, AES_M1);
    q2 = mulmod4(r2, I2, AES_M2);
    p1 = '0;
    p2 = '0;
    for (int i = 0; i < 4; i++) begin
      if (q1[i]) p1 ^= 8'(AES_M2) << i;
      if (q2[i]) p2 ^= 8'(AES_M1) << i;
    end
    a7 = p1[7] ^ p2[7];
  end
endmodule
