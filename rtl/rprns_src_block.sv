// rprns_src_block: single-radix conversion (SRC) over all channels of a
// five-channel redundant residue system except channel EXCL, used by the
// fault-tolerant GF(2^163) multiplier (and, with the fifth slot unused, by the
// error-detecting one).  Channel moduli are the trinomials
// x^D + x^k_i + 1.  For the four included channels j the block forms
// q_j = p_j * I_j mod m_j with a bit-serial multiplier (trinomial_serial_mul),
// I_j = M_j^-1 mod m_j being shifted out of a constant register, and then
// value = sum(q_j * M_j), where M_j is the product of the other three included
// moduli.  The constant multiplications by M_j are fixed XOR networks.
// If the four channels are fault free the value is the product itself
// (degree <= 2*163-2); a fault in an included channel puts ones above that
// degree, reported on overflow.
// Timing: load (together with the parent's start) reloads the I_j registers;
// en and first run the D serial steps like trinomial_serial_mul.  value and
// overflow are combinational from the value the last step is about to store,
// so they are valid while the last enabled step is being applied.
module rprns_src_block
  import gf2_pkg::*;
#(
  parameter int D    = 127,
  parameter int EXCL = 0,
  parameter int K0   = 1,
  parameter int K1   = 7,
  parameter int K2   = 15,
  parameter int K3   = 30,
  parameter int K4   = 63,
  parameter int PDEG = 324     // highest degree of a legitimate result
) (
  input  logic           clk,
  input  logic           load,
  input  logic           en,
  input  logic           first,
  input  logic [5*D-1:0] p_res,
  output logic [4*D-1:0] value,
  output logic           overflow
);
  localparam int KS [5] = '{K0, K1, K2, K3, K4};

  // Channel index of the n-th included channel.
  function automatic int chan(int n);
    return n < EXCL ? n : n + 1;
  endfunction

  function automatic bpoly_t modulus(int c);
    return (bpoly_t'(1) << D) | (bpoly_t'(1) << KS[c]) | bpoly_t'(1);
  endfunction

  function automatic bpoly_t big_m(int n);
    bpoly_t r;
    r = bpoly_t'(1);
    for (int k = 0; k < 4; k++) if (k != n) r = bmul(r, modulus(chan(k)));
    return r;
  endfunction

  localparam bpoly_t BIGM [4] = '{big_m(0), big_m(1), big_m(2), big_m(3)};

  logic [D-1:0] q_next [4];

  for (genvar n = 0; n < 4; n++) begin : g_ch
    localparam int C = chan(n);
    localparam logic [D-1:0] IC = D'(binv(BIGM[n], modulus(C)));
    logic [D-1:0] i_sr, q;

    always_ff @(posedge clk)
      if (load)    i_sr <= IC;
      else if (en) i_sr <= i_sr << 1;

    trinomial_serial_mul #(.D(D), .K(KS[C])) u_mul_i (
      .clk, .en, .first, .a(p_res[D*C +: D]), .b_bit(i_sr[D-1]), .acc(q),
      .acc_next(q_next[n])
    );
  end

  always_comb begin
    value = '0;
    for (int n = 0; n < 4; n++)
      for (int t = 0; t < 3 * D + 1; t++)
        if (BIGM[n][t]) value ^= (4 * D)'(q_next[n]) << t;
    overflow = |value[4*D-1:PDEG+1];
  end
endmodule
