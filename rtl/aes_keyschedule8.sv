// aes_keyschedule8: on-the-fly AES-128 key expansion, one key byte per cycle.
// Round-key bytes are produced as one stream, rk[n] with n = 16*round + j.
// A 16-stage shift register H holds the last 16 bytes produced (H[0] newest),
// so with fixed taps
//   rk[n] = rk[n-16] ^ ( j<4 ? S(rk[n-3] or rk[n-7] for j=3) ^ (j==0 ? Rcon : 0)
//                              : rk[n-4] )
// which is the byte-serial form of w[i] = w[i-4] ^ SubWord(RotWord(w[i-1]))
// ^ Rcon and w[i] = w[i-4] ^ w[i-1].  During load (the first 16 cycles of a
// block) the cipher key is shifted in instead.  The S-box sits outside: the
// byte to substitute leaves on sb_in and its image returns on sb_out, so the
// plain core can use its own S-box and the residue cores their shared tables.
// Outputs: rk_out is the byte produced 4 cycles earlier (the AddRoundKey
// operand of the round loop); last_rk is the byte produced this cycle (used by
// the final AddRoundKey of round 10).  A new round key takes 16 cycles.
// A second 4-stage register g keeps the produced bytes rk[n-4] so that round
// key 10 is still completed while the next block's key is being loaded.
// The document gives the on-the-fly scheme, the extra S-box, the fixed-tap
// shift registers and the 16-cycle rate; the tap positions are this design's.
// W=4 runs one residue channel of the residue AES (all operations are linear
// except the external S-box).
module aes_keyschedule8 #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         load,     // shift key_in in (block cycles 0..15)
  input  logic [3:0]   j,        // byte index in the round key
  input  logic [W-1:0] key_in,
  input  logic [W-1:0] rcon,
  output logic [W-1:0] sb_in,
  input  logic [W-1:0] sb_out,
  output logic [W-1:0] rk_out,
  output logic [W-1:0] last_rk
);
  logic [W-1:0] h [16];
  logic [W-1:0] g [4];   // last four produced bytes, never overwritten by a load

  always_comb begin
    sb_in = (j == 4'd3) ? h[6] : h[2];
    if (j < 4'd4) last_rk = h[15] ^ sb_out ^ ((j == 4'd0) ? rcon : '0);
    else          last_rk = h[15] ^ g[3];
  end

  always_ff @(posedge clk) begin
    h[0] <= load ? key_in : last_rk;
    for (int i = 1; i < 16; i++) h[i] <= h[i-1];
    g[0] <= last_rk;
    for (int i = 1; i < 4; i++) g[i] <= g[i-1];
  end

  assign rk_out = h[3];
endmodule
