// aes8_core: low-area AES-128 encryption core with an 8-bit data path.
// An iterative round loop processes one byte per cycle: AddRoundKey (XOR),
// SubBytes (composite-field S-box), ShiftRow (addressable shift register,
// 12 cycles) and MixColumn (rotating accumulators, 4 cycles) close a loop of
// exactly 16 cycles, so one round of a 16-byte state passes every 16 cycles
// and a block takes 10 rounds = 160 cycles.  The key schedule runs alongside
// it, producing each round key on the fly from its own S-box.  The plaintext
// goes through a 4-cycle input Delay to meet the round-key stream; the last
// round skips MixColumn and a second XOR adds the final round key at the
// ShiftRow output.
// Interface: pulse start with text_in/key_in byte 0 (bytes in FIPS-197 order,
// column by column) and give bytes 1..15 on the next 15 cycles.  Ciphertext
// bytes 0..15 leave on dout with dout_valid, 160..175 cycles after start.  A
// new block may start when ready is high, at the latest every 160 cycles.
// The sub-blocks, the 8-bit path and the 160-cycle rate follow the document;
// the cycle map of the control and the key schedule taps are this design's.
module aes8_core (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] text_in,
  input  logic [7:0] key_in,
  output logic       ready,
  output logic [7:0] dout,
  output logic       dout_valid,
  output logic       busy
);
  logic       accept, key_load, sel_text, rcon_init, rcon_step, out_first;
  logic [7:0] idx;
  logic [3:0] j;
  logic [7:0] text_d, ark, sb, sr_out, mc_out, rk, last_rk, rcon;
  logic [7:0] ksb_in, ksb_out;

  aes_ctrl u_ctrl (
    .clk, .rst_n, .start, .ready, .accept, .idx, .j, .key_load, .sel_text,
    .rcon_init, .rcon_step, .out_valid(dout_valid), .out_first, .busy
  );

  shift_delay #(.W(8), .DEPTH(4)) u_delay (.clk, .din(text_in), .dout(text_d));

  assign ark = (sel_text ? text_d : mc_out) ^ rk;

  aes_sbox_cf u_sbox (.din(ark), .dout(sb));

  aes_shiftrow_srl #(.W(8)) u_shiftrow (.clk, .phase(j), .din(sb), .dout(sr_out));

  aes_mixcolumn8 #(.W(8), .POLY(9'h11B)) u_mixcol (
    .clk, .phase(j[1:0]), .din(sr_out), .msb(1'b0), .dout(mc_out)
  );

  aes_rcon_lfsr u_rcon (.clk, .init(rcon_init), .step(rcon_step), .rcon);

  aes_keyschedule8 #(.W(8)) u_key (
    .clk, .load(key_load), .j, .key_in, .rcon, .sb_in(ksb_in), .sb_out(ksb_out),
    .rk_out(rk), .last_rk
  );

  aes_sbox_cf u_key_sbox (.din(ksb_in), .dout(ksb_out));

  assign dout = sr_out ^ last_rk;
endmodule
