// rprns_gf163_ftmul: fault-tolerant GF(2^163) multiplier in a redundant
// polynomial residue number system, field f = x^163+x^7+x^6+x^3+1.
// Five channels with moduli x^127 + x^k + 1, k = 1, 7, 15, 30, 63; any four
// of them cover the 325-bit product and leave room to detect an error.
// Operation:
//  1. the binary operands are reduced modulo each channel (XOR network) and
//     each channel multiplies its residues bit-serially (127 cycles);
//  2. five SRC blocks (rprns_src_block), block i leaving out channel i, each
//     multiply their residues by I_j bit-serially (127 cycles) and rebuild the
//     508-bit weighted product;
//  3. a result with ones above degree 324 is illegitimate; the first SRC
//     result that is legitimate is selected (a fault in one channel corrupts
//     every SRC block except the one that bypasses it) and reduced modulo f.
// Interface: start (when ready) samples a, b and fault_xor; after 254 cycles
// done pulses with the product on p.  err reports that some SRC result was
// illegitimate (a fault was present), bad_ch the channels whose bypassing SRC
// was legitimate while another was not (the located faulty channel), and
// fail that no SRC result was legitimate (not correctable).
// fault_xor (5 x 127 bits, channel 1 low) is XORed into the channel products;
// it is this design's test input for fault injection, tie it to zero.
// The moduli, the SRC-per-bypassed-channel structure, the overflow check with
// selection multiplexer and the 254-cycle schedule follow the document; the
// binary interface, the priority order and the status outputs are this
// design's choices.
module rprns_gf163_ftmul
  import gf2_pkg::*;
#(
  parameter int D  = 127,
  parameter int K0 = 1,
  parameter int K1 = 7,
  parameter int K2 = 15,
  parameter int K3 = 30,
  parameter int K4 = 63,
  parameter int M  = 163,
  parameter logic [M:0] F = (164'(1) << 163) | 164'hc9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  input  logic [5*D-1:0] fault_xor,
  output logic           ready,
  output logic           done,
  output logic [M-1:0]   p,
  output logic           err,
  output logic           fail,
  output logic [4:0]     bad_ch
);
  localparam int KS [5] = '{K0, K1, K2, K3, K4};
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
  logic [5*D-1:0] p_res;

  for (genvar c = 0; c < 5; c++) begin : g_ch
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

  // ---------------------------------------------------------------- SRC sets
  logic [4*D-1:0] value [5];
  logic [4:0]     ovf;

  for (genvar s = 0; s < 5; s++) begin : g_src
    rprns_src_block #(
      .D(D), .EXCL(s), .K0(K0), .K1(K1), .K2(K2), .K3(K3), .K4(K4), .PDEG(PDEG)
    ) u_src (
      .clk, .load(first1), .en(ph2), .first(first2), .p_res,
      .value(value[s]), .overflow(ovf[s])
    );
  end

  // ------------------------------------------- choose legitimate and reduce
  logic [PDEG:0] sel;
  logic [M-1:0]  red;

  always_comb begin
    sel = value[0][PDEG:0];
    for (int s = 4; s >= 0; s--) if (!ovf[s]) sel = value[s][PDEG:0];
    for (int j = PDEG; j >= M; j--) if (sel[j]) sel ^= (PDEG + 1)'(F) << (j - M);
    red = sel[M-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b0;
    end else begin
      done <= last;
    end
    if (last) begin
      p      <= red;
      err    <= |ovf;
      fail   <= &ovf;
      bad_ch <= (|ovf) ? ~ovf : 5'b0;
    end
  end
endmodule
