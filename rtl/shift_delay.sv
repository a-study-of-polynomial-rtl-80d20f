// shift_delay: a DEPTH-stage shift register delay line of W-bit words.
// The AES cores use it as the input Delay, which holds the plaintext back by
// four cycles so that it meets the first round-key byte at AddRoundKey.
// dout is din from DEPTH cycles earlier.
module shift_delay #(
  parameter int W     = 8,
  parameter int DEPTH = 4
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] sr [DEPTH];
  always_ff @(posedge clk) begin
    sr[0] <= din;
    for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
  end
  assign dout = sr[DEPTH-1];
endmodule
