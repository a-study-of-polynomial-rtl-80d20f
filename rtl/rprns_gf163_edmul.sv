// rprns_gf163_edmul: error-detecting GF(2^163) multiplier in a redundant
// polynomial residue number system of four 127-bit trinomial channels,
// x^127 + x^k + 1 with k = 1, 7, 15, 30, field f = x^163+x^7+x^6+x^3+1.
// Three channels (381 bits) already cover the 325-bit product; the fourth is
// redundant.  A fault in any one channel moves the converted product by a
// multiple of that channel's M_i, which always has terms above degree 324.
// Operation:
//  1. the binary operands are reduced modulo each channel (XOR network) and
//     each channel multiplies its residues bit-serially (127 cycles);
//  2. one SRC block (rprns_src_block, the unused fifth slot left out)
//     multiplies the residues by I_i bit-serially (127 cycles) and rebuilds
//     the 508-bit product;
//  3. any one above degree 324 flags an error; the low part is reduced
//     modulo f.
// Interface: start (when ready) samples a, b and fault_xor; after 254 cycles
// done pulses with the product on p and the error flag on err.  fault_xor
// (4 x 127 bits, channel 1 low) is XORed into the channel products; it is
// this design's fault-injection test input, tie it to zero.
// The channel count and length, the overflow check and the 254-cycle
// schedule follow the document; the choice of the four trinomials (the first
// four of the fault-tolerant multiplier's set), the binary interface and the
// handshake are this design's.
module rprns_gf163_edmul
  import gf2_pkg::*;
#(
  parameter int D  = 127,
  parameter int K0 = 1,
  parameter int K1 = 7,
  parameter int K2 = 15,
  parameter int K3 = 30,
  parameter int M  = 163,
  parameter logic [M:0] F = (164'(1) << 163) | 164'hc9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  input  logic [4*D-1:0] fault_xor,
  output logic           ready,
  output logic           done,
  output logic [M-1:0]   p,
  output logic           err
);
  localparam int KS [4] = '{K0, K1, K2, K3};
  localparam int PDEG = 2 * M - 2;
  localparam int CW = $clog2(2 * D + 1);

  function automatic logic [D-1:0] to_res(logic [M-1:0] v, int c);
    logic [M-1:0] t;
    t = v;
    for (int j = M - 1; j >= D; j--)
      if (t[j]) begin
        t[j] = 1'b0;
        t[j - D + KS[c]] ^= 1'b1;
        t[j - D] ^= 1'b1;
      end
    return t[D-1:0];
  endfunction

  // ---------------------------------------------------------------- control
  logic [CW-1:0] cnt;
  logic          run, first1, ph1, ph2, first2, last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0;
      cnt <= '0;
    end else if (first1) begin
      run <= 1'b1;
      cnt <= CW'(1);
    end else if (run) begin
      if (last) run <= 1'b0;
      cnt <= cnt + CW'(1);
    end
  end

  assign ready  = !run;
  assign first1 = start && ready;
  assign ph1    = first1 || (run && cnt < CW'(D));
  assign ph2    = run && cnt >= CW'(D);
  assign first2 = run && cnt == CW'(D);
  assign last   = run && cnt == CW'(2 * D - 1);

  // ---------------------------------------------------------------- channels
  logic [4*D-1:0] p_res;

  for (genvar c = 0; c < 4; c++) begin : g_ch
    logic [D-1:0] a_q, b_sr, f_q, prod;
    logic         b_bit;
    logic [D-1:0] a_in, b_in;

    assign a_in = to_res(a, c);
    assign b_in = to_res(b, c);

    always_ff @(posedge clk) begin
      if (first1) begin
        a_q  <= a_in;
        b_sr <= b_in << 1;
        f_q  <= fault_xor[D*c +: D];
      end else if (ph1) begin
        b_sr <= b_sr << 1;
      end
    end

    assign b_bit = first1 ? b_in[D-1] : b_sr[D-1];

    trinomial_serial_mul #(.D(D), .K(KS[c])) u_mul (
      .clk, .en(ph1), .first(first1), .a(first1 ? a_in : a_q), .b_bit,
      .acc(prod), .acc_next()
    );

    assign p_res[D*c +: D] = prod ^ f_q;
  end

  // ---------------------------------------------------------------- SRC
  // The SRC block serves a five-slot channel set; slot 4 is the one it
  // leaves out, so its residue input is unused and tied to zero.
  logic [4*D-1:0] value;
  logic           ovf;

  rprns_src_block #(
    .D(D), .EXCL(4), .K0(K0), .K1(K1), .K2(K2), .K3(K3), .PDEG(PDEG)
  ) u_src (
    .clk, .load(first1), .en(ph2), .first(first2), .p_res({{D{1'b0}}, p_res}),
    .value, .overflow(ovf)
  );

  // ---------------------------------------------------------------- reduce
  logic [PDEG:0] sel;

  always_comb begin
    sel = value[PDEG:0];
    for (int j = PDEG; j >= M; j--) if (sel[j]) sel ^= (PDEG + 1)'(F) << (j - M);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) done <= 1'b0;
    else        done <= last;
    if (last) begin
      p   <= sel[M-1:0];
      err <= ovf;
    end
  end
endmodule
