// prns_gf4_core: one residue channel of the error-detecting AES.
// The core runs the byte-serial AES round loop of the low-area design on
// 4-bit residues modulo its channel polynomial POLY: input Delay,
// AddRoundKey (XOR), SubBytes by table look-up, ShiftRow, MixColumn and the
// on-the-fly key schedule, with the same 16-cycle loop and 160-cycle block.
// All of it is linear over the residues except two points where a core needs
// information from the other channels:
//  * SubBytes: the table is addressed by the own residue and the next core's
//    residue (ark_nb for the state, ksb_nb for the key schedule);
//  * MixColumn: multiplication by x needs bit 7 of the full byte, predicted
//    outside by partial conversion and given on msb.
// fault_xor is XORed into the state S-box output; it is a test input for
// injecting faults and is tied to zero in normal use.
// Controls (j, key_load, sel_text) come from the shared sequencer, see
// aes_ctrl.  sr_out is the ShiftRow output (checked outside for errors);
// dout = sr_out ^ last round-key residue is the ciphertext residue in round 10.
module prns_gf4_core #(
  parameter int         CORE = 1,
  parameter logic [4:0] POLY = 5'b10011
) (
  input  logic       clk,
  input  logic [3:0] j,
  input  logic       key_load,
  input  logic       sel_text,
  input  logic [3:0] text_r,
  input  logic [3:0] key_r,
  input  logic [3:0] rcon_r,
  input  logic       msb,
  input  logic [3:0] fault_xor,
  output logic [3:0] ark_r,
  input  logic [3:0] ark_nb,
  output logic [3:0] ksb_r,
  input  logic [3:0] ksb_nb,
  output logic [3:0] sr_out,
  output logic [3:0] dout
);
  logic [3:0] text_d, mc_out, rk, last_rk, sb, ksb_out;

  shift_delay #(.W(4), .DEPTH(4)) u_delay (.clk, .din(text_r), .dout(text_d));

  assign ark_r = (sel_text ? text_d : mc_out) ^ rk;

  prns_sbox_lut #(.CORE(CORE)) u_sbox (.r_own(ark_r), .r_next(ark_nb), .dout(sb));

  aes_shiftrow_srl #(.W(4)) u_shiftrow (
    .clk, .phase(j), .din(sb ^ fault_xor), .dout(sr_out)
  );

  aes_mixcolumn8 #(.W(4), .POLY(POLY)) u_mixcol (
    .clk, .phase(j[1:0]), .din(sr_out), .msb, .dout(mc_out)
  );

  aes_keyschedule8 #(.W(4)) u_key (
    .clk, .load(key_load), .j, .key_in(key_r), .rcon(rcon_r), .sb_in(ksb_r),
    .sb_out(ksb_out), .rk_out(rk), .last_rk
  );

  prns_sbox_lut #(.CORE(CORE)) u_key_sbox (.r_own(ksb_r), .r_next(ksb_nb), .dout(ksb_out));

  assign dout = sr_out ^ last_rk;
endmodule
