// prns_sbox_lut: SubBytes of one residue core of the residue-number AES.
// Any two of the three residues identify a byte uniquely, so each core keeps
// a 256 x 4-bit table addressed by its own residue (low nibble) and the
// residue of the next core (high nibble: core 1 uses r2, core 2 uses r3,
// core 3 uses r1).  The entry is the core's own residue of SubBytes(byte):
//   T_k[{r_next, r_k}] = S(a) mod m_k  for the byte a with those residues,
// S(a) = affine(a^254) in GF(2^8) modulo x^8+x^4+x^3+x+1.  The table is filled
// at elaboration time by running over all 256 bytes, so no conversion circuit
// exists in hardware; synthesis turns it into a 256-entry ROM or logic.
// Table look-up addressed by residues follows the document; computing the
// contents from the formula is this design's choice.  Combinational read.
module prns_sbox_lut
  import gf2_pkg::*;
#(
  parameter int CORE = 1
) (
  input  logic [3:0] r_own,
  input  logic [3:0] r_next,
  output logic [3:0] dout
);
  localparam logic [4:0] MODS [3] = '{AES_M1, AES_M2, AES_M3};
  localparam logic [4:0] M_OWN  = MODS[(CORE - 1) % 3];
  localparam logic [4:0] M_NEXT = MODS[CORE % 3];

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    p = '0;
    for (int i = 7; i >= 0; i--) begin
      p = {p[6:0], 1'b0} ^ (p[7] ? AES_POLY[7:0] : 8'h00);
      if (b[i]) p ^= a;
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] a);
    logic [7:0] inv, sq, b;
    // a^254 = a^(2+4+8+16+32+64+128)
    inv = 8'h01;
    sq  = a;
    for (int i = 1; i < 8; i++) begin
      sq  = gmul(sq, sq);
      inv = gmul(inv, sq);
    end
    b = inv;
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  function automatic logic [3:0] rmod(logic [11:0] x, logic [4:0] m);
    logic [11:0] v;
    v = x;
    for (int i = 11; i >= 4; i--) if (v[i]) v ^= 12'(m) << (i - 4);
    return v[3:0];
  endfunction

  function automatic logic [1023:0] make_table();
    logic [1023:0] t;
    t = '0;
    for (int a = 0; a < 256; a++) begin
      int idx;
      idx = int'({rmod(12'(a), M_NEXT), rmod(12'(a), M_OWN)});
      t |= 1024'(rmod(12'(sbox(8'(a))), M_OWN)) << (4 * idx);
    end
    return t;
  endfunction

  localparam logic [1023:0] TABLE = make_table();

  assign dout = TABLE[4 * int'({r_next, r_own}) +: 4];
endmodule
