// aes_shiftrow_srl: ShiftRows on a byte-serial AES state stream.
// The state enters column by column (a0, a1, ... a15, row = index mod 4,
// column = index div 4) into a 24-stage shift register, the structure that an
// FPGA maps onto addressable LUT shift registers (SRL16/SRL32).  A read tap
// chosen each cycle by the output position k = phase picks the byte ShiftRows
// places at position k: state(r, (c+r) mod 4) with c = k div 4, r = k mod 4.
// The byte stream leaves 12 cycles after it enters, so the first output a0
// appears while a12 is being written, and the unit takes a continuous stream
// with no gaps between states.  Tap 0 is the input itself (no register).
// The document gives the structure, the 24 stages and the 12-cycle latency; the
// tap decoding is written here as a function of the phase rather than as the
// document's A5..A0 address table, which it reproduces.
// Interface: din/dout are W-bit residues or bytes; phase must count 0..15 with
// phase 0 on the cycle the first output byte of a state is due.
module aes_shiftrow_srl #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic [3:0]   phase,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int DEPTH = 24;

  logic [W-1:0] sr [DEPTH];

  // Distance back in the stream of the byte wanted at output position k.
  function automatic int tap(int k);
    int c, r, idx;
    c = k / 4;
    r = k % 4;
    idx = 4 * ((c + r) % 4) + r;
    return 12 + k - idx;
  endfunction

  always_ff @(posedge clk) begin
    sr[0] <= din;
    for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
  end

  always_comb begin
    dout = din;
    for (int k = 0; k < 16; k++)
      if (phase == 4'(k) && tap(k) != 0) dout = sr[tap(k) - 1];
  end
endmodule
