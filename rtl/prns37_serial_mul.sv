// prns37_serial_mul: channel-serial GF(2^163) multiplier in a polynomial
// residue number system of 37 channels with degree-9 moduli (333 bits of
// range for a product of at most 325 bits), field f = x^163+x^7+x^6+x^3+1.
// One generic GF(2^9) multiplier, which takes the channel modulus as an
// input, is shared by all channels.  Operation, one channel per cycle:
//  1. channel phase (37 cycles): for channel k the shared multiplier forms
//     p_k = a_k*b_k mod m_k, a second one q_k = p_k*I_k mod m_k, and the
//     Mul_M AND/XOR network adds q_k*M_k into a 333-bit accumulator; after
//     37 cycles the accumulator holds the product in ordinary form (SRC);
//  2. reduction phase (17 cycles): digit-serial reduction modulo f, ten bits
//     per cycle from degree 332 down to 162; only the low part
//     x^7+x^6+x^3+1 of f is multiplied (an 8 x 10 constant multiplier);
//  3. conversion phase (37 cycles): the reduced product is reduced modulo one
//     channel modulus per cycle and shifted into the result register.
// M_k and I_k are constants ("stored in memories"); here they are computed at
// elaboration time from the moduli and read from constant tables by channel
// index.  Operands and result are in residue form, channel k in bits
// 9k+8..9k.  start (when ready) samples the operands; done pulses with the
// result 92 cycles later.  Architecture and moduli follow the document; the
// handshake and the exact cycle split are this design's.
module prns37_serial_mul
  import gf2_pkg::*;
#(
  parameter int N = 37,
  parameter int M = 163,
  parameter logic [M:0] F = (164'(1) << 163) | 164'hc9,
  parameter int L = 10,
  parameter logic [9:0] MODS [37] = '{
    10'b1000010001, 10'b1000100001, 10'b1000011011, 10'b1101100001, 10'b1000101101,
    10'b1011010001, 10'b1000110011, 10'b1100110001, 10'b1001011001, 10'b1001101001,
    10'b1100010011, 10'b1100100011, 10'b1010000111, 10'b1110000101, 10'b1010010101,
    10'b1010100101, 10'b1010100011, 10'b1100010101, 10'b1010101111, 10'b1010110111,
    10'b1110110101, 10'b1010111101, 10'b1011110101, 10'b1011001111, 10'b1111001101,
    10'b1011011011, 10'b1101101101, 10'b1100011111, 10'b1111100011, 10'b1100111011,
    10'b1101110011, 10'b1101001111, 10'b1111001011, 10'b1101011011, 10'b1101101011,
    10'b1110001111, 10'b1111000111}
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [9*N-1:0] a_res,
  input  logic [9*N-1:0] b_res,
  output logic           ready,
  output logic           done,
  output logic [9*N-1:0] p_res
);
  localparam int W     = 9 * N;                       // 333-bit range
  localparam int NRED  = (W - M + L - 1) / L;         // 17 digit steps
  typedef bpoly_t barr_t [N];

  // Quotient of a by m (exact division by a channel modulus).
  function automatic bpoly_t bdiv(bpoly_t a, bpoly_t m);
    bpoly_t r, q;
    int d;
    r = a;
    q = '0;
    d = bdeg(m);
    for (int i = BP_W - 1; i >= d; i--)
      if (r[i]) begin
        r ^= m << (i - d);
        q[i - d] = 1'b1;
      end
    return q;
  endfunction

  function automatic barr_t make_m();
    barr_t r;
    bpoly_t all;
    all = bpoly_t'(1);
    for (int k = 0; k < N; k++) all = bmul(all, bpoly_t'(MODS[k]));
    for (int k = 0; k < N; k++) r[k] = bdiv(all, bpoly_t'(MODS[k]));
    return r;
  endfunction

  localparam barr_t BIGM = make_m();

  function automatic barr_t make_i();
    barr_t r;
    for (int k = 0; k < N; k++) r[k] = binv(BIGM[k], bpoly_t'(MODS[k]));
    return r;
  endfunction

  localparam barr_t BIGI = make_i();

  // Generic GF(2^9) multiplication modulo a run-time modulus.
  function automatic logic [8:0] mul9(logic [8:0] x, logic [8:0] y, logic [9:0] m);
    logic [9:0] p;
    p = '0;
    for (int i = 8; i >= 0; i--) begin
      p = {p[8:0], 1'b0};
      if (p[9]) p ^= m;
      if (y[i]) p ^= {1'b0, x};
    end
    return p[8:0];
  endfunction

  // Remainder of a degree < M polynomial modulo a run-time degree-9 modulus.
  function automatic logic [8:0] mod9(logic [M-1:0] v, logic [9:0] m);
    logic [M-1:0] t;
    t = v;
    for (int i = M - 1; i >= 9; i--) if (t[i]) t ^= M'(m) << (i - 9);
    return t[8:0];
  endfunction

  typedef enum logic [1:0] {IDLE, CHAN, RED, CONV} phase_t;
  phase_t     phase;
  logic [5:0] k;
  logic [W-1:0] a_q, b_q, acc;
  logic [9:0]   mk;
  logic [8:0]   ik, pk, qk, rk;
  logic [W-1:0] mm, mul_m;
  logic [W-1:0] red_next;

  assign ready = phase == IDLE;

  always_comb begin
    mk = MODS[k < 6'(N) ? k : '0];
    ik = 9'(BIGI[k < 6'(N) ? k : '0]);
    mm = W'(BIGM[k < 6'(N) ? k : '0]);
    pk = mul9(a_q[9*k +: 9], b_q[9*k +: 9], mk);
    qk = mul9(pk, ik, mk);
    // Mul_M: AND/XOR network, q_k times the constant M_k.
    mul_m = '0;
    for (int j = 0; j < 9; j++) if (qk[j]) mul_m ^= mm << j;
    // One reduction digit: bits hi..hi-L+1 folded with the low part of f.
    red_next = acc;
    for (int j = 0; j < L; j++) begin
      int pos;
      pos = W - 1 - L * int'(k) - j;
      if (pos >= M && red_next[pos]) begin
        red_next[pos] = 1'b0;
        red_next ^= W'(F[M-1:0]) << (pos - M);
      end
    end
    rk = mod9(acc[M-1:0], mk);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= IDLE;
      k     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (phase)
        IDLE: if (start) begin
          a_q   <= a_res;
          b_q   <= b_res;
          acc   <= '0;
          k     <= '0;
          phase <= CHAN;
        end
        CHAN: begin
          acc <= acc ^ mul_m;
          k   <= k == 6'(N - 1) ? '0 : k + 6'd1;
          if (k == 6'(N - 1)) phase <= RED;
        end
        RED: begin
          acc <= red_next;
          k   <= k == 6'(NRED - 1) ? '0 : k + 6'd1;
          if (k == 6'(NRED - 1)) phase <= CONV;
        end
        CONV: begin
          p_res <= {rk, p_res[W-1:9]};
          k     <= k == 6'(N - 1) ? '0 : k + 6'd1;
          if (k == 6'(N - 1)) begin
            phase <= IDLE;
            done  <= 1'b1;
          end
        end
        default: phase <= IDLE;
      endcase
    end
  end
endmodule
