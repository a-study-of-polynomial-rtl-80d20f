// prns_aes8_ed: error-detecting AES-128 encryption in a redundant polynomial
// residue number system, 8-bit external data path.
// Each byte is carried as three 4-bit residues modulo m1 = x^4+x+1,
// m2 = x^4+x^3+1 and the redundant m3 = x^4+x^3+x^2+x+1, and three residue
// cores (prns_gf4_core) run the byte-serial AES in lock step, one residue
// each.  Two residues already determine a byte; the third splits the 12-bit
// conversion range into legal values (degree < 8) and an illegal range, so a
// fault confined to one core always shows up as ones in bits 11..8 of the
// converted value.  That check (prns_err_detect) runs on every ShiftRow output
// byte during the rounds and on the ciphertext.  SubBytes uses per-core tables
// addressed by two residues, MixColumn gets bit 7 of its input byte from a
// partial conversion of r1 and r2 (prns_msb_predict), and the round constant
// is generated normally and converted to residues.
// Interface and timing equal aes8_core: start with byte 0, bytes 1..15 on the
// next cycles, ciphertext on dout (converted back to a byte) and dout_res
// (residues) 160..175 cycles after start, one block per 160 cycles.
// err flags an illegal byte in the current cycle (while a block is in the
// loop); dout_err, valid with dout_valid, is set when any error has been seen
// in the block being output.  fault_xor injects faults into the S-box outputs
// of the cores ([3:0] core 1, [7:4] core 2, [11:8] core 3); tie it to zero.
// The architecture follows the document; the conversion of the ciphertext
// back to bytes, the error flag timing and the fault input are this design's.
module prns_aes8_ed
  import gf2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  text_in,
  input  logic [7:0]  key_in,
  input  logic [11:0] fault_xor,
  output logic        ready,
  output logic        busy,
  output logic [7:0]  dout,
  output prns_byte_t  dout_res,
  output logic        dout_valid,
  output logic        dout_err,
  output logic        err
);
  logic       accept, key_load, sel_text, rcon_init, rcon_step, out_first;
  logic [7:0] idx, rcon;
  logic [3:0] j;
  prns_byte_t text_r, key_r, rcon_r, ark, ksb, sr_out;
  logic       a7, sr_illegal, out_illegal, chk;
  logic [11:0] sr_value, out_value;
  logic       rerr, oerr;

  aes_ctrl u_ctrl (
    .clk, .rst_n, .start, .ready, .accept, .idx, .j, .key_load, .sel_text,
    .rcon_init, .rcon_step, .out_valid(dout_valid), .out_first, .busy
  );

  aes_rcon_lfsr u_rcon (.clk, .init(rcon_init), .step(rcon_step), .rcon);

  to_prns3 u_text_cv (.din(text_in), .dout(text_r));
  to_prns3 u_key_cv  (.din(key_in),  .dout(key_r));
  to_prns3 u_rcon_cv (.din(rcon),    .dout(rcon_r));

  prns_gf4_core #(.CORE(1), .POLY(AES_M1)) u_core1 (
    .clk, .j, .key_load, .sel_text, .text_r(text_r.r1), .key_r(key_r.r1),
    .rcon_r(rcon_r.r1), .msb(a7), .fault_xor(fault_xor[3:0]),
    .ark_r(ark.r1), .ark_nb(ark.r2), .ksb_r(ksb.r1), .ksb_nb(ksb.r2),
    .sr_out(sr_out.r1), .dout(dout_res.r1)
  );
  prns_gf4_core #(.CORE(2), .POLY(AES_M2)) u_core2 (
    .clk, .j, .key_load, .sel_text, .text_r(text_r.r2), .key_r(key_r.r2),
    .rcon_r(rcon_r.r2), .msb(a7), .fault_xor(fault_xor[7:4]),
    .ark_r(ark.r2), .ark_nb(ark.r3), .ksb_r(ksb.r2), .ksb_nb(ksb.r3),
    .sr_out(sr_out.r2), .dout(dout_res.r2)
  );
  prns_gf4_core #(.CORE(3), .POLY(AES_M3)) u_core3 (
    .clk, .j, .key_load, .sel_text, .text_r(text_r.r3), .key_r(key_r.r3),
    .rcon_r(rcon_r.r3), .msb(a7), .fault_xor(fault_xor[11:8]),
    .ark_r(ark.r3), .ark_nb(ark.r1), .ksb_r(ksb.r3), .ksb_nb(ksb.r1),
    .sr_out(sr_out.r3), .dout(dout_res.r3)
  );

  // Overflow prediction for MixColumn: bit 7 of the ShiftRow output byte.
  prns_msb_predict u_msb (.r1(sr_out.r1), .r2(sr_out.r2), .a7);

  // Error detection after ShiftRow, and conversion of the ciphertext.
  prns_err_detect u_sr_chk  (.din(sr_out),   .value(sr_value),  .err(sr_illegal));
  prns_err_detect u_out_cv  (.din(dout_res), .value(out_value), .err(out_illegal));

  // The ShiftRow output carries a block from block cycle 16 to 175.
  assign chk  = dout_valid || (busy && !accept && idx >= 8'd16);
  assign err  = chk && (sr_illegal || (dout_valid && out_illegal));
  assign dout = out_value[7:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rerr <= 1'b0;
      oerr <= 1'b0;
    end else begin
      if (out_first)       oerr <= rerr || err;
      else if (dout_valid) oerr <= oerr || err;
      if (accept)                  rerr <= 1'b0;
      else if (err && !dout_valid) rerr <= 1'b1;
    end
  end

  assign dout_err = dout_valid && (out_first ? (rerr || err) : (oerr || err));
endmodule
