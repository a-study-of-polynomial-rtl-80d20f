// aes_ref_pkg: behavioural reference models for the testbenches.
// A plain AES-128 encryption (FIPS-197), with the S-box computed from the
// field inverse by exhaustive search, and polynomial helpers over GF(2).
// Written independently of the RTL it checks.
package aes_ref_pkg;

  typedef logic [7:0] state_t [16];

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] a);
    logic [7:0] inv, s;
    inv = 0;
    for (int b = 1; b < 256; b++) if (gmul(a, 8'(b)) == 8'h01) inv = 8'(b);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  // Encrypt one block; bytes in FIPS-197 input order.
  function automatic void encrypt(input logic [7:0] pt [16], input logic [7:0] key [16],
                                  output logic [7:0] ct [16]);
    logic [7:0] s [16], t [16], k [16], tmp [4], rc;
    rc = 8'h01;
    for (int i = 0; i < 16; i++) begin s[i] = pt[i] ^ key[i]; k[i] = key[i]; end
    for (int r = 1; r <= 10; r++) begin
      // key expansion
      tmp[0] = sbox(k[13]) ^ rc; tmp[1] = sbox(k[14]); tmp[2] = sbox(k[15]); tmp[3] = sbox(k[12]);
      for (int i = 0; i < 4; i++) k[i] ^= tmp[i];
      for (int i = 4; i < 16; i++) k[i] ^= k[i-4];
      rc = gmul(rc, 8'h02);
      // SubBytes + ShiftRows
      for (int c = 0; c < 4; c++)
        for (int rr = 0; rr < 4; rr++) t[4*c+rr] = sbox(s[4*((c+rr)%4)+rr]);
      // MixColumns
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          s[4*c+0] = gmul(t[4*c],2) ^ gmul(t[4*c+1],3) ^ t[4*c+2] ^ t[4*c+3];
          s[4*c+1] = t[4*c] ^ gmul(t[4*c+1],2) ^ gmul(t[4*c+2],3) ^ t[4*c+3];
          s[4*c+2] = t[4*c] ^ t[4*c+1] ^ gmul(t[4*c+2],2) ^ gmul(t[4*c+3],3);
          s[4*c+3] = gmul(t[4*c],3) ^ t[4*c+1] ^ t[4*c+2] ^ gmul(t[4*c+3],2);
        end
      end else s = t;
      for (int i = 0; i < 16; i++) s[i] ^= k[i];
    end
    ct = s;
  endfunction

  // Polynomial remainder of a (degree < 32) modulo m.
  function automatic logic [31:0] pmod32(logic [31:0] a, logic [31:0] m);
    int d;
    d = 0;
    for (int i = 0; i < 32; i++) if (m[i]) d = i;
    for (int i = 31; i >= d; i--) if (a[i]) a ^= m << (i - d);
    return a;
  endfunction

endpackage
