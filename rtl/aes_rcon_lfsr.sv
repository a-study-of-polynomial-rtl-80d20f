// aes_rcon_lfsr: AES round-constant generator.
// An 8-bit linear feedback shift register that multiplies its content by x
// modulo x^8+x^4+x^3+x+1 at each step: 01, 02, 04, ... 80, 1B, 36.  It is
// reset to 01 by init (which wins over step) and advances by one on step,
// once per round key.  Structure and start value follow the document.
module aes_rcon_lfsr (
  input  logic       clk,
  input  logic       init,
  input  logic       step,
  output logic [7:0] rcon
);
  always_ff @(posedge clk) begin
    if (init) rcon <= 8'h01;
    else if (step) rcon <= {rcon[6:0], 1'b0} ^ (rcon[7] ? 8'h1B : 8'h00);
  end
endmodule
