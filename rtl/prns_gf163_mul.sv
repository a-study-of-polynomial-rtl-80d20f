// prns_gf163_mul: GF(2^163) multiplier in a polynomial residue number system
// (PRNS) with four trinomial channels, field f = x^163+x^7+x^6+x^3+1.
// Operands and result are in residue form: four 84-bit residues modulo
// m_i = x^84 + x^k_i + 1, k = 5, 9, 11, 13 (channel 1 in the low bits).
// Per channel one bit-serial multiplier (trinomial_serial_mul) forms
// p_i = a_i*b_i mod m_i in 84 cycles, then a second one forms
// q_i = p_i*I_i mod m_i in another 84 cycles, the constant I_i = M_i^-1 mod m_i
// being shifted in from a register.  Reduction modulo f uses the partial
// single-radix conversion: only the upper part c_hi (degrees 163..324) of the
// double-length product p = sum(q_i*M_i) is rebuilt, for which only the terms
// of M_i with degree >= 84 matter; c' = c_hi*x^163 mod f is computed by a
// fixed XOR network; the residues of (c_hi*x^163 + c') are added to p_i,
// which gives the residues of p mod f.
// Timing: start is accepted when ready; a_res/b_res are read in that cycle
// only.  The result appears on p_res with done high 168 cycles later
// (84 + 84 serial steps; the conversion takes the last step's value directly
// and is registered on the last edge); ready returns with done.
// The channel moduli, the 168-cycle schedule and the conversion follow the
// document; the handshake is this design's choice.  Constants M_i and I_i are
// computed at elaboration time from the moduli.
module prns_gf163_mul
  import gf2_pkg::*;
#(
  parameter int D  = 84,
  parameter int K1 = 5,
  parameter int K2 = 9,
  parameter int K3 = 11,
  parameter int K4 = 13,
  parameter int M  = 163,
  parameter logic [M:0] F = (164'(1) << 163) | 164'h000_0000_0000_0000_0000_0000_0000_0000_0000_0000_00c9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [4*D-1:0] a_res,
  input  logic [4*D-1:0] b_res,
  output logic           ready,
  output logic           done,
  output logic [4*D-1:0] p_res
);
  localparam int N  = 4;
  localparam int PW = 2 * M - 1;          // product width, degrees 0..2M-2
  localparam int KS [N] = '{K1, K2, K3, K4};

  function automatic bpoly_t modulus(int i);
    return (bpoly_t'(1) << D) | (bpoly_t'(1) << KS[i]) | bpoly_t'(1);
  endfunction

  function automatic bpoly_t big_m(int k);
    bpoly_t r;
    r = bpoly_t'(1);
    for (int i = 0; i < N; i++) if (i != k) r = bmul(r, modulus(i));
    return r;
  endfunction

  // Residue of a polynomial of degree < PW modulo channel i.
  function automatic logic [D-1:0] to_res(logic [PW-1:0] v, int i);
    logic [PW-1:0] t;
    t = v;
    for (int j = PW - 1; j >= D; j--)
      if (t[j]) begin
        t[j] = 1'b0;
        t[j - D + KS[i]] ^= 1'b1;
        t[j - D] ^= 1'b1;
      end
    return t[D-1:0];
  endfunction

  localparam bpoly_t BIGM [N] = '{big_m(0), big_m(1), big_m(2), big_m(3)};

  // ---------------------------------------------------------------- control
  logic [7:0] cnt;
  logic       run, ph1, ph2, first1, first2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run  <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= run && cnt == 8'(2 * D - 1);
      if (start && ready) begin
        run <= 1'b1;
        cnt <= 8'd1;
      end else if (run) begin
        if (cnt == 8'(2 * D - 1)) run <= 1'b0;
        cnt <= cnt + 8'd1;
      end
    end
  end

  assign ready  = !run;
  assign first1 = start && ready;
  assign ph1    = first1 || (run && cnt < 8'(D));
  assign ph2    = run && cnt >= 8'(D);
  assign first2 = run && cnt == 8'(D);

  // ---------------------------------------------------------------- channels
  logic [D-1:0] p [N], q [N], q_next [N];
  logic [PW-1:0] src_hi;
  logic [PW-1:0] v;

  for (genvar i = 0; i < N; i++) begin : g_ch
    localparam logic [D-1:0] IC = D'(binv(BIGM[i], modulus(i)));

    logic [D-1:0] a_q, b_sr, i_sr;
    logic         b_bit, i_bit;

    always_ff @(posedge clk) begin
      if (first1) begin
        a_q  <= a_res[D*i +: D];
        b_sr <= b_res[D*i +: D] << 1;
        i_sr <= IC;
      end else begin
        if (ph1) b_sr <= b_sr << 1;
        if (ph2) i_sr <= i_sr << 1;
      end
    end

    assign b_bit = first1 ? b_res[D*i + D - 1] : b_sr[D-1];
    assign i_bit = i_sr[D-1];

    trinomial_serial_mul #(.D(D), .K(KS[i])) u_mul_ab (
      .clk, .en(ph1), .first(first1), .a(first1 ? a_res[D*i +: D] : a_q),
      .b_bit, .acc(p[i]), .acc_next()
    );
    trinomial_serial_mul #(.D(D), .K(KS[i])) u_mul_i (
      .clk, .en(ph2), .first(first2), .a(p[i]), .b_bit(i_bit), .acc(q[i]), .acc_next(q_next[i])
    );
  end

  // Partial conversion: upper half of sum(q_i * M_i), using only the terms of
  // M_i of degree >= D (the lower terms cannot reach degree M).
  always_comb begin
    src_hi = '0;
    for (int i = 0; i < N; i++)
      for (int t = D; t < PW; t++)
        if (BIGM[i][t]) src_hi ^= PW'(q_next[i]) << t;
    // v = c_hi * x^M + (c_hi * x^M mod f)
    v = {src_hi[PW-1:M], {M{1'b0}}};
    for (int j = PW - 1; j >= M; j--)
      if (v[j]) v[j-M +: M] ^= F[M-1:0];
    v[PW-1:M] = src_hi[PW-1:M];
  end

  always_ff @(posedge clk)
    if (run && cnt == 8'(2 * D - 1))
      for (int i = 0; i < N; i++) p_res[D*i +: D] <= p[i] ^ to_res(v, i);
endmodule
