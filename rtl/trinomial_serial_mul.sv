// trinomial_serial_mul: MSB-first bit-serial multiplier modulo the trinomial
// x^D + x^K + 1, the channel multiplier of the large residue-number
// multipliers.  Operand a is parallel and must stay stable; operand b enters
// one bit per enabled cycle, most significant bit first.  Each enabled cycle
// computes acc = (acc * x mod (x^D+x^K+1)) + b_bit * a; with first = 1 the old
// accumulator is ignored, so after D enabled cycles (first on the first one)
// acc = a*b mod (x^D+x^K+1).  The multiply by x of a trinomial needs only two
// XOR gates, which is why the document chooses trinomial channel moduli.
// acc holds its value while en = 0.  acc_next is the value the next enabled
// edge will store, so a caller can use the final product one cycle earlier.
module trinomial_serial_mul #(
  parameter int D = 84,
  parameter int K = 5
) (
  input  logic         clk,
  input  logic         en,
  input  logic         first,
  input  logic [D-1:0] a,
  input  logic         b_bit,
  output logic [D-1:0] acc,
  output logic [D-1:0] acc_next
);
  localparam logic [D-1:0] LOW = (D'(1) << K) | D'(1);

  logic [D-1:0] ax, shifted;

  always_comb begin
    ax = b_bit ? a : '0;
    shifted = {acc[D-2:0], 1'b0} ^ (acc[D-1] ? LOW : '0);
    acc_next = (first ? '0 : shifted) ^ ax;
  end

  always_ff @(posedge clk)
    if (en) acc <= acc_next;

  initial assert (K > 0 && K < D) else $error("trinomial_serial_mul: need 0 < K < D");
endmodule
