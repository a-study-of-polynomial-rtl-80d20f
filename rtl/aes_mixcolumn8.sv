// aes_mixcolumn8: byte-serial AES MixColumns, one column per four cycles.
// Four accumulators R0..R3 rotate as the bytes c0..c3 of a column arrive:
//   R0 <= R1 ^ c,  R1 <= R2 ^ c,  R2 <= R3 ^ {03}c,  R3 <= R0 ^ {02}c,
// with the feedback cut on the first byte of a column.  After the fourth byte
// R0..R3 hold the four mixed bytes; they are loaded in parallel into a shift
// register that streams them out while the next column accumulates, so the
// unit takes a continuous stream with a latency of 4 cycles.
// The same unit serves a residue channel of the residue-number AES: the data
// are then W=4-bit residues modulo POLY, and multiplication by x needs bit 7 of
// the full byte (msb, predicted outside by partial conversion) because
// (A*x mod m) mod POLY = (r*x mod POLY) ^ a7*(m mod POLY), m = x^8+x^4+x^3+x+1.
// For the plain byte design POLY = m, the correction term is zero and msb is
// unused.  Structure and accumulator equations follow the document; the
// residue form of x time is derived here from the document's overflow rule.
// Interface: phase counts 0..3 with phase 0 on the first byte of a column.
module aes_mixcolumn8 #(
  parameter int          W    = 8,
  parameter logic [W:0]  POLY = 9'h11B
) (
  input  logic         clk,
  input  logic [1:0]   phase,
  input  logic [W-1:0] din,
  input  logic         msb,
  output logic [W-1:0] dout
);
  localparam logic [8:0] AES_POLY = 9'h11B;

  // The AES polynomial reduced modulo the channel polynomial.
  function automatic logic [W-1:0] poly_mod_chan();
    logic [8:0] a;
    a = AES_POLY;
    for (int i = 8; i >= W; i--) if (a[i]) a ^= 9'(POLY) << (i - W);
    return a[W-1:0];
  endfunction
  localparam logic [W-1:0] CORR = poly_mod_chan();

  function automatic logic [W-1:0] xtime(logic [W-1:0] r, logic a7);
    logic [W:0] t;
    t = {r, 1'b0};
    if (t[W]) t ^= POLY;
    return t[W-1:0] ^ (a7 ? CORR : '0);
  endfunction

  logic [W-1:0] acc [4];
  logic [W-1:0] nacc [4];
  logic [W-1:0] p2s [4];
  logic [W-1:0] c2, c3;

  always_comb begin
    c2 = xtime(din, msb);
    c3 = c2 ^ din;
    if (phase == 2'd0) begin
      nacc[0] = din;
      nacc[1] = din;
      nacc[2] = c3;
      nacc[3] = c2;
    end else begin
      nacc[0] = acc[1] ^ din;
      nacc[1] = acc[2] ^ din;
      nacc[2] = acc[3] ^ c3;
      nacc[3] = acc[0] ^ c2;
    end
  end

  always_ff @(posedge clk) begin
    acc <= nacc;
    if (phase == 2'd3) p2s <= nacc;
    else begin
      p2s[0] <= p2s[1];
      p2s[1] <= p2s[2];
      p2s[2] <= p2s[3];
      p2s[3] <= '0;
    end
  end

  assign dout = p2s[0];
endmodule
