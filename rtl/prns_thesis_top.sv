// prns_thesis_top: the residue-number-system designs side by side, sharing
// only clock and reset.  They are independent circuits, each with its own
// ports (prefixes in brackets):
//  * aes8_core         [aes_]  low-area byte-serial AES-128, composite-field
//                              S-box, 160 cycles per block;
//  * prns_aes8_ed      [raes_] the same AES computed on three 4-bit residues
//                              with error detection;
//  * rprns_gf8_edmul   [m8_]   combinational GF(2^8) multiplier with error
//                              detection over four 6-bit residue channels;
//  * prns_gf163_mul    [m163_] GF(2^163) multiplier over four 84-bit trinomial
//                              residue channels, 168 cycles;
//  * rprns_gf163_ftmul [ft_]   fault-tolerant GF(2^163) multiplier over five
//                              127-bit channels, 254 cycles;
//  * prns37_serial_mul [s37_]  channel-serial GF(2^163) multiplier over 37
//                              9-bit residue channels, 92 cycles;
//  * rprns_gf163_edmul [ed_]   error-detecting GF(2^163) multiplier over four
//                              127-bit channels, 254 cycles.
// Interfaces and timing are those of the instantiated modules; see their
// headers.  The fault_xor inputs are fault-injection test inputs, tied to
// zero in use.
module prns_thesis_top
  import gf2_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // byte-serial AES-128
  input  logic          aes_start,
  input  logic [7:0]    aes_text_in,
  input  logic [7:0]    aes_key_in,
  output logic          aes_ready,
  output logic [7:0]    aes_dout,
  output logic          aes_dout_valid,
  output logic          aes_busy,
  // error-detecting residue AES-128
  input  logic          raes_start,
  input  logic [7:0]    raes_text_in,
  input  logic [7:0]    raes_key_in,
  input  logic [11:0]   raes_fault_xor,
  output logic          raes_ready,
  output logic          raes_busy,
  output logic [7:0]    raes_dout,
  output prns_byte_t    raes_dout_res,
  output logic          raes_dout_valid,
  output logic          raes_dout_err,
  output logic          raes_err,
  // error-detecting GF(2^8) multiplier
  input  logic [7:0]    m8_a,
  input  logic [7:0]    m8_b,
  input  logic [23:0]   m8_fault_xor,
  output logic [23:0]   m8_prod_res,
  output logic [7:0]    m8_p,
  output logic          m8_err,
  // residue GF(2^163) multiplier
  input  logic          m163_start,
  input  logic [335:0]  m163_a_res,
  input  logic [335:0]  m163_b_res,
  output logic          m163_ready,
  output logic          m163_done,
  output logic [335:0]  m163_p_res,
  // fault-tolerant GF(2^163) multiplier
  input  logic          ft_start,
  input  logic [162:0]  ft_a,
  input  logic [162:0]  ft_b,
  input  logic [634:0]  ft_fault_xor,
  output logic          ft_ready,
  output logic          ft_done,
  output logic [162:0]  ft_p,
  output logic          ft_err,
  output logic          ft_fail,
  output logic [4:0]    ft_bad_ch,
  // channel-serial 37-channel GF(2^163) multiplier
  input  logic          s37_start,
  input  logic [332:0]  s37_a_res,
  input  logic [332:0]  s37_b_res,
  output logic          s37_ready,
  output logic          s37_done,
  output logic [332:0]  s37_p_res,
  // error-detecting GF(2^163) multiplier
  input  logic          ed_start,
  input  logic [162:0]  ed_a,
  input  logic [162:0]  ed_b,
  input  logic [507:0]  ed_fault_xor,
  output logic          ed_ready,
  output logic          ed_done,
  output logic [162:0]  ed_p,
  output logic          ed_err
);
  aes8_core u_aes (
    .clk, .rst_n, .start(aes_start), .text_in(aes_text_in), .key_in(aes_key_in),
    .ready(aes_ready), .dout(aes_dout), .dout_valid(aes_dout_valid), .busy(aes_busy)
  );

  prns_aes8_ed u_raes (
    .clk, .rst_n, .start(raes_start), .text_in(raes_text_in), .key_in(raes_key_in),
    .fault_xor(raes_fault_xor), .ready(raes_ready), .busy(raes_busy),
    .dout(raes_dout), .dout_res(raes_dout_res), .dout_valid(raes_dout_valid),
    .dout_err(raes_dout_err), .err(raes_err)
  );

  rprns_gf8_edmul u_m8 (
    .a(m8_a), .b(m8_b), .fault_xor(m8_fault_xor), .prod_res(m8_prod_res),
    .p(m8_p), .err(m8_err)
  );

  prns_gf163_mul u_m163 (
    .clk, .rst_n, .start(m163_start), .a_res(m163_a_res), .b_res(m163_b_res),
    .ready(m163_ready), .done(m163_done), .p_res(m163_p_res)
  );

  rprns_gf163_ftmul u_ft (
    .clk, .rst_n, .start(ft_start), .a(ft_a), .b(ft_b), .fault_xor(ft_fault_xor),
    .ready(ft_ready), .done(ft_done), .p(ft_p), .err(ft_err), .fail(ft_fail),
    .bad_ch(ft_bad_ch)
  );

  prns37_serial_mul u_s37 (
    .clk, .rst_n, .start(s37_start), .a_res(s37_a_res), .b_res(s37_b_res),
    .ready(s37_ready), .done(s37_done), .p_res(s37_p_res)
  );

  rprns_gf163_edmul u_ed (
    .clk, .rst_n, .start(ed_start), .a(ed_a), .b(ed_b), .fault_xor(ed_fault_xor),
    .ready(ed_ready), .done(ed_done), .p(ed_p), .err(ed_err)
  );
endmodule
