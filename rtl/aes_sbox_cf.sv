// aes_sbox_cf: AES SubBytes computed with composite-field arithmetic.
// The byte is mapped by the isomorphism delta into GF((2^4)^2), built as
// GF(2^4)[y]/(y^2 + y + lambda) with lambda = {1100}; GF(2^4) is itself the
// composite field GF((2^2)^2) over GF(2^2) = GF(2)[x]/(x^2+x+1) with
// phi = {10}.  In the composite field the inverse of (ah*y + al) is
// (ah*d^-1)*y + (ah^al)*d^-1 with d = lambda*ah^2 ^ ah*al ^ al^2, where the
// GF(2^4) squarer, the constant multiplier by lambda and the GF(2^4) inverse
// are the small XOR/AND equations of the low-area AES.  The result is mapped
// back with delta^-1 and passed through the AES affine transform.
// delta, delta^-1, the squarer, x lambda, x phi and the GF(2^4) inverse follow
// the document; the GF(2^2) multiplier uses the standard equations for
// x^2+x+1.  The back-mapping and the affine transform are kept as two steps
// (the document merges them into one matrix; the function is the same).
// Purely combinational: in -> out in zero cycles.
module aes_sbox_cf (
  input  logic [7:0] din,
  output logic [7:0] dout
);
  // Row i gives output bit i; bit j of a row selects input bit j.
  localparam logic [7:0] DELTA [8] = '{8'b01000011, 8'b01010010, 8'b10011110,
    8'b11000110, 8'b10101110, 8'b10101100, 8'b11011110, 8'b10100000};
  localparam logic [7:0] DELTA_INV [8] = '{8'b01110101, 8'b00110000, 8'b10011110,
    8'b00111110, 8'b01110110, 8'b01100010, 8'b01000100, 8'b11100010};

  function automatic logic [7:0] matmul(logic [7:0] m [8], logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) y[i] = ^(m[i] & x);
    return y;
  endfunction

  function automatic logic [1:0] gf2_mul(logic [1:0] a, logic [1:0] b);
    return {(a[1] & b[1]) ^ (a[1] & b[0]) ^ (a[0] & b[1]),
            (a[1] & b[1]) ^ (a[0] & b[0])};
  endfunction

  function automatic logic [1:0] gf2_phi(logic [1:0] a);
    return {a[1] ^ a[0], a[1]};
  endfunction

  function automatic logic [3:0] gf4_mul(logic [3:0] a, logic [3:0] b);
    logic [1:0] hh;
    hh = gf2_mul(a[3:2], b[3:2]);
    return {hh ^ gf2_mul(a[3:2], b[1:0]) ^ gf2_mul(a[1:0], b[3:2]),
            gf2_phi(hh) ^ gf2_mul(a[1:0], b[1:0])};
  endfunction

  function automatic logic [3:0] gf4_sq(logic [3:0] a);
    return {a[3], a[2] ^ a[3], a[1] ^ a[2], a[0] ^ a[1] ^ a[3]};
  endfunction

  function automatic logic [3:0] gf4_lambda(logic [3:0] a);
    return {a[0] ^ a[2], a[0] ^ a[1] ^ a[2] ^ a[3], a[3], a[2]};
  endfunction

  function automatic logic [3:0] gf4_inv(logic [3:0] a);
    logic [3:0] c;
    c[3] = a[3] ^ (a[3] & a[2] & a[1]) ^ (a[3] & a[0]) ^ a[2];
    c[2] = (a[3] & a[2] & a[1]) ^ (a[3] & a[2] & a[0]) ^ (a[3] & a[0]) ^ a[2]
         ^ (a[2] & a[1]);
    c[1] = a[3] ^ (a[3] & a[2] & a[1]) ^ (a[3] & a[1] & a[0]) ^ a[2]
         ^ (a[2] & a[0]) ^ a[1];
    c[0] = (a[3] & a[2] & a[1]) ^ (a[3] & a[2] & a[0]) ^ (a[3] & a[1])
         ^ (a[3] & a[1] & a[0]) ^ (a[3] & a[0]) ^ a[2] ^ (a[2] & a[1]) ^ (a[2] & a[1] & a[0])
         ^ a[1] ^ a[0];
    return c;
  endfunction

  function automatic logic [7:0] affine(logic [7:0] b);
    logic [7:0] s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  logic [7:0] iso, inv_iso;
  logic [3:0] ah, al, d, dinv;

  always_comb begin
    iso  = matmul(DELTA, din);
    ah   = iso[7:4];
    al   = iso[3:0];
    d    = gf4_lambda(gf4_sq(ah)) ^ gf4_mul(ah, al) ^ gf4_sq(al);
    dinv = gf4_inv(d);
    inv_iso = {gf4_mul(ah, dinv), gf4_mul(ah ^ al, dinv)};
    dout = affine(matmul(DELTA_INV, inv_iso));
  end
endmodule
