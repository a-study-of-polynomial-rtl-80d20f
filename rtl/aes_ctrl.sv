// aes_ctrl: block sequencer of the byte-serial AES cores.
// A counter gives the block cycle idx; cycle 0 is the cycle start is accepted,
// with the first plaintext and key bytes on the inputs.  Bytes 0..15 enter on
// cycles 0..15, a round takes 16 cycles and the ciphertext leaves on cycles
// 160..175.  A new block may start when idle or exactly on cycle 160 of the
// previous one, so blocks follow each other every 160 cycles while the last
// ciphertext bytes stream out.  Decoded controls:
//   j         idx mod 16: byte index, ShiftRow tap and MixColumn phase
//   key_load  idx < 16: the key schedule shifts the cipher key in
//   sel_text  4 <= idx < 20: AddRoundKey takes the delayed plaintext
//   rcon_init / rcon_step: reset and advance the round constant
//   out_valid the 16 ciphertext cycles; out_first the first of them
//   busy      the round loop carries a block (idx 4..175)
// The document specifies only a counter with a decoder; the cycle map is this
// design's.  rst_n is an active-low synchronous reset.
module aes_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       ready,
  output logic       accept,
  output logic [7:0] idx,
  output logic [3:0] j,
  output logic       key_load,
  output logic       sel_text,
  output logic       rcon_init,
  output logic       rcon_step,
  output logic       out_valid,
  output logic       out_first,
  output logic       busy
);
  logic [7:0] cnt;
  logic       running;
  logic [3:0] orem;

  assign ready     = !running || cnt == 8'd160;
  assign accept    = start && ready;
  assign idx       = accept ? 8'd0 : cnt;
  assign j         = idx[3:0];
  assign key_load  = (accept || running) && idx < 8'd16;
  assign sel_text  = idx >= 8'd4 && idx < 8'd20;
  assign rcon_init = idx < 8'd16;
  assign rcon_step = idx[3:0] == 4'd0 && idx >= 8'd16;
  assign out_first = running && cnt == 8'd160;
  assign out_valid = out_first || orem != 4'd0;
  assign busy      = (running && cnt >= 8'd4) || orem != 4'd0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= 8'd0;
      running <= 1'b0;
      orem    <= 4'd0;
    end else begin
      if (accept) begin
        cnt     <= 8'd1;
        running <= 1'b1;
      end else if (running) begin
        cnt <= cnt + 8'd1;
        if (cnt == 8'd175) running <= 1'b0;
      end
      if (out_first) orem <= 4'd15;
      else if (orem != 4'd0) orem <= orem - 4'd1;
    end
  end

  // A block may only start when idle or on cycle 160 of the running block.
  a_start_ok: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> ready);
endmodule
