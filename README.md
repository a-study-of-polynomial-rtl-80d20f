# Polynomial residue number systems for GF(2^m) hardware

Cryptographic hardware spends most of its effort on arithmetic over binary
fields: the AES works in GF(2^8), and elliptic-curve cryptography over curve
K-163 works in GF(2^163). This repository holds SystemVerilog for the same
arithmetic done in a **polynomial residue number system (PRNS)**. A field
element, which is a polynomial over GF(2), is replaced by its remainders
modulo several small, pairwise coprime polynomials, the *channel moduli*.

Addition and multiplication then work channel by channel, with no carries
or data passing between channels. That gives three properties:

* **Small independent channels.** A 163-bit multiplication becomes four
  84-bit multiplications that run side by side.
* **Error detection.** Add one *redundant* channel. A correct result
  converted back to ordinary form lies in a *legitimate range* (its degree
  is low enough). A wrong residue in any single channel pushes the result
  into the *illegitimate range*, where it always has ones in the high bits.
* **Fault tolerance.** Add two redundant channels. Convert the result once
  for each channel, each time leaving that channel out. The one conversion
  that skips the faulty channel is legitimate; use it.

The designs are:

| module | what it is | timing |
|---|---|---|
| `aes8_core` | low-area AES-128 encryption, 8-bit data path, composite-field S-box | 160 cycles/block |
| `prns_aes8_ed` | the same AES computed on three 4-bit residues, with error detection | 160 cycles/block |
| `rprns_gf8_edmul` | GF(2^8) multiplier, four 6-bit channels, error detection | combinational |
| `prns_gf163_mul` | GF(2^163) multiplier, four 84-bit trinomial channels | 168 cycles |
| `rprns_gf163_ftmul` | fault-tolerant GF(2^163) multiplier, five 127-bit channels | 254 cycles |
| `rprns_gf163_edmul` | error-detecting GF(2^163) multiplier, four 127-bit channels | 254 cycles |
| `prns37_serial_mul` | GF(2^163) multiplier, 37 9-bit channels processed one per cycle | 92 cycles |
| `prns_thesis_top` | all of the above side by side, sharing clock and reset | |

## Converting back: single-radix conversion

Everything below rests on one formula. Take moduli m_1..m_N and let M be
their product. Let M_i = M / m_i, and let I_i = M_i^-1 mod m_i. The
polynomial with residues r_i is then

    X = sum_i ( (r_i * I_i) mod m_i ) * M_i          (all additions are XOR)

X has degree below deg M. Every M_i and I_i is a constant. So a conversion
is, per channel, a small constant modular multiply followed by a wide
constant multiply, which is a fixed XOR network. The package `gf2_pkg`
computes all M_i and I_i at elaboration time from the moduli, using
carry-less multiply and an extended Euclid inverse. No constant table is
typed in by hand. Changing a modulus parameter therefore changes every
constant consistently.

**Partial conversion.** Often only some bits of X are needed:

* bit 7 of a byte, to predict an overflow;
* the top bits, to detect an error;
* the upper half of a product, to reduce it modulo the field polynomial.

Terms of M_i that cannot reach those bits are then dropped.

## The residue AES (`prns_aes8_ed`)

Each byte is held as three 4-bit residues:

* r1 = a mod (x^4+x+1);
* r2 = a mod (x^4+x^3+1);
* r3 = a mod (x^4+x^3+x^2+x+1), the redundant channel.

Three identical residue cores (`prns_gf4_core`) run the byte-serial AES
round loop in lock step. A shared counter (`aes_ctrl`) drives them, and each
core handles one residue of every byte. Most of AES is linear over GF(2),
so it carries over to residues directly: the XOR of AddRoundKey, the byte
moves of ShiftRows, and the key-schedule XORs. Two places need more:

* **SubBytes** is not linear. Two residues already fix the byte, so each
  core has a 256-entry table of 4-bit words (`prns_sbox_lut`). It is
  addressed by the core's own residue and the next core's residue, taken
  cyclically: core 1 uses (r2,r1), core 2 uses (r3,r2), core 3 uses
  (r1,r3). The entry is the core's residue of S(a). Each core's key schedule
  has a second copy of its table. Entry `{r_next, r_own}` holds
  `S(a) mod m_own`, where a is the byte whose residues are r_own and
  r_next. The table is filled at elaboration time by running over all 256
  bytes with S(a) = affine(a^254), so no table file is needed. Example: byte AA has residues (7,6,F), and
  the three tables return (1,0,9), the residues of S(AA) = AC.
* **MixColumns** multiplies by x, and for a byte with bit 7 set the product
  must be reduced by x^8+x^4+x^3+x+1. A residue core cannot see bit 7.
  `prns_msb_predict` therefore rebuilds bit 7 from r1 and r2 by partial
  conversion. Each core then computes
  `x*r mod m_k  XOR  a7 * ((x^8+x^4+x^3+x+1) mod m_k)`.

**Error detection.** `prns_err_detect` converts a three-residue byte into a
12-bit value. A legal byte has bits 11..8 equal to zero. A wrong residue in
one core moves the value by a multiple of M_i, which has degree 8 or more,
so bits 11..8 are then never all zero. The check runs on the ShiftRow output
in every cycle the loop carries data (block cycles 16 to 175):

* `err` flags the current cycle;
* `dout_err` flags the block being output, together with its ciphertext.

All single-core faults are detected, up to 4 wrong bits in one core.
Random faults spread over several cores escape with probability 2^8/2^12,
so 93.75% of them are detected.

The same conversion gives the ciphertext back as a byte. `dout_res` gives
it as residues.

**Round constant.** It is produced as a normal byte (`aes_rcon_lfsr`) and
converted to residues.

## The byte-serial AES (`aes8_core`)

The residue AES reuses the building blocks of this small AES-128 encryption
core. They are written with a width parameter W, which is 8 here and 4 in
the residue cores. One byte enters per cycle. The state circulates through
a 16-cycle loop, one round per pass, and a block takes 10 passes:

* **Input delay** (`shift_delay`): 4 cycles, so that the plaintext meets
  the first round-key byte.
* **AddRoundKey**: the plaintext in round 0, the MixColumns output
  afterwards.
* **SubBytes** (`aes_sbox_cf`): combinational. The inverse is computed in
  the composite field GF((2^4)^2), with GF(2^4) built as GF((2^2)^2).
* **ShiftRows** (`aes_shiftrow_srl`): a 24-stage shift register. A
  phase-dependent read tap picks the byte that belongs in each output
  position, giving a latency of 12 cycles.
* **MixColumns** (`aes_mixcolumn8`): four accumulators rotate while the
  four bytes of a column arrive. A parallel-to-serial register then sends
  the column out, with a latency of 4 cycles.
* **Key schedule** (`aes_keyschedule8`): on the fly, with its own S-box.
  It produces one round-key byte per cycle, a new round key every 16
  cycles.

In the last round the ShiftRow output, XORed with the last round key, is the
ciphertext.

**Interface.**

* Raise `start` with byte 0 of the text and key, when `ready` is high.
* Present bytes 1..15 on the next 15 cycles.
* `dout_valid` is high for 16 cycles, starting exactly 160 cycles after
  `start`, with the ciphertext bytes in order.
* The next block may start in the cycle where the previous one's ciphertext
  begins, which gives one block per 160 cycles.
* Reset is synchronous and active low.

**Three points in the S-box.** The composite-field S-box needs three
details that are easy to get wrong. All 256 values are checked exhaustively
in `tb_aes_sbox_cf`.

* The isomorphism matrix and its inverse are used as given in the module.
* GF(2^2) multiplication uses the product with the high bit
  `(a1&b1) ^ (a0&b1) ^ (a1&b0)` and the low bit `(a1&b1) ^ (a0&b0)`.
* Bit 0 of the GF(2^4) inverse contains the product a3·a1·a0 exactly once.

The inverse isomorphism and the affine transform are applied one after the
other, not merged into a single matrix.

## GF(2^8) error-detecting multiplier (`rprns_gf8_edmul`)

The channels are modulo x^6+x+1, x^6+x^5+1 and x^6+x^3+1, plus the
redundant channel x^6+x^4+x^2+x+1. Each channel multiplies modulo its
modulus. SRC then gives a 24-bit value. A correct product has degree at
most 14, so any one in bits 23..15 is an error; this is a 9-input OR.
Bits 14..0 are reduced modulo x^8+x^4+x^3+x+1.

The module is purely combinational. `fault_xor` flips chosen bits of the
channel products, to test detection. `prod_res` shows the channel products.

## GF(2^163) multiplier over four trinomial channels (`prns_gf163_mul`)

Field: f = x^163+x^7+x^6+x^3+1.

Channels: x^84+x^k+1 with k = 5, 9, 11, 13. The channels cover 336 bits;
a product has at most 325.

Operands and result are in residue form, with channel 1 in the low 84 bits.
Each channel works in two phases of 84 cycles each, one per bit:

1. **Channel product.** A bit-serial, MSB-first multiplier
   (`trinomial_serial_mul`) computes p_i = a_i·b_i mod m_i. A trinomial
   makes the "times x" step two XOR gates.
2. **Times I_i.** A second serial multiplier computes
   q_i = p_i·I_i mod m_i, with I_i shifted out of a constant register.

**Reduction modulo f without full conversion.** Let c_hi be the part of
the double-length product of degree 163 and above. Then
p mod f = p + c_hi·x^163 + c', where c' = (c_hi·x^163) mod f. The design:

1. rebuilds only c_hi, as the upper part of sum(q_i·M_i), using only the
   terms of M_i of degree 84 or more;
2. computes c' by a fixed XOR network;
3. takes the residues of (c_hi·x^163 + c');
4. adds them to p_i.

The result is the residues of a·b mod f.

The conversion uses the value of the last serial step before it is
registered. Start to `done` is therefore exactly 168 cycles, and `ready`
returns together with `done`.

## Fault-tolerant GF(2^163) multiplier (`rprns_gf163_ftmul`)

The design has five channels, x^127+x^k+1 with k = 1, 7, 15, 30, 63. Any
four of them span 508 bits, which covers the 325-bit product and leaves
room to detect an error.

Operation:

1. Binary operands are reduced into the five channels.
2. Each channel multiplies bit-serially (127 cycles).
3. Five `rprns_src_block` instances each convert four of the channels,
   block i leaving out channel i. Each multiplies by its I_j bit-serially
   (127 cycles), then applies the constant M_j networks.
4. Each block's result is legitimate if bits 507..325 are zero. A fault in
   channel c makes every block except block c illegitimate.
5. The first legitimate result is selected, reduced modulo f and registered
   254 cycles after start.

Status outputs:

* `err`: some block was illegitimate.
* `bad_ch`: the located faulty channel, one-hot.
* `fail`: no block was legitimate, for example with faults in two channels.

`fault_xor` adds a fault pattern to any channel products, to exercise this.

## Error-detecting GF(2^163) multiplier (`rprns_gf163_edmul`)

This is the fault-tolerant multiplier cut down to detection only. It has
four channels, x^127+x^k+1 with k = 1, 7, 15, 30. Three of them (381 bits)
already hold the 325-bit product, so the fourth is redundant.

The design uses the same bit-serial channel multipliers and a single
`rprns_src_block` that converts all four channels. A fault in any one
channel shifts the converted result by a multiple of that channel's M_i.
That puts ones above degree 324, and `err` goes high. Faults spread over
several channels escape only if they cancel above degree 324, which has a
chance of 2^-127. The product is reduced modulo f and delivered, with
`err`, 254 cycles after `start`.

## Channel-serial GF(2^163) multiplier over 37 small channels (`prns37_serial_mul`)

This is the first form of the GF(2^163) multiplier, with small channels
instead of trinomials. The channels are 37 distinct irreducible polynomials
of degree 9, from x^9+x^4+1 to x^9+x^8+x^7+x^6+x^2+x+1; they are listed in
the `MODS` parameter. Together they span 333 bits. Operands and result are
in residue form, with channel k in bits 9k+8..9k.

The design has one arithmetic unit, used for every channel in turn. It has
two GF(2^9) multipliers that take the modulus as an input, so the same
logic serves any channel. A counter walks through three phases:

1. **Channels (37 cycles).** For channel k the unit computes
   p_k = a_k·b_k mod m_k, then q_k = p_k·I_k mod m_k. An AND/XOR network
   adds q_k·M_k into a 333-bit accumulator. After the last channel, the
   accumulator holds the full double-length product in ordinary form.
2. **Reduction (17 cycles).** The product is reduced modulo f ten bits per
   cycle, from degree 332 down to 162. Bit j of the current digit is
   replaced by x^(j-163)·(x^7+x^6+x^3+1). Only those low terms of f are
   needed, so the step is a small constant multiplier, not a 163-bit one.
3. **Back to residues (37 cycles).** One channel per cycle, the reduced
   product is divided by m_k, and the remainder is shifted into `p_res`.

The constants M_k = M/m_k and I_k are computed from the moduli at
elaboration and indexed by the channel counter. `done` comes 92 cycles
after `start`. The result stays in residue form, so it can be fed straight
back as an operand, and the top-level test does this.

## How far it can be trusted

Each block has a self-checking test bench in `tb/` that compares against an
independent reference:

* the AES against FIPS-197 examples and a behavioural AES
  (`tb/aes_ref_pkg.sv`);
* the multipliers against carry-less multiply and reduction written in the
  test bench.

| test bench | what it covers |
|---|---|
| `tb_aes_sbox_cf`, `tb_to_prns3`, `tb_prns_msb_predict`, `tb_prns_sbox_lut`, `tb_prns_err_detect` | exhaustive over all inputs |
| `tb_aes8_core` | FIPS-197 vectors, random blocks back to back, 160-cycle latency |
| `tb_prns_aes8_ed` | as above, plus single-core fault injection: every injected fault is flagged and clean blocks are never flagged |
| `tb_rprns_gf8_edmul` | all 65536 products, plus a random single-channel fault per product, plus the worked example A = 9D, B = 67 |
| `tb_prns_gf163_mul` | random and corner operands, 168-cycle latency, start in the done cycle |
| `tb_rprns_gf163_ftmul` | clean, single-channel (corrected and located) and double-channel (reported) faults, 254-cycle latency |
| `tb_rprns_gf163_edmul` | clean products, single- and two-channel faults all flagged, 254-cycle latency |
| `tb_prns37_serial_mul` | random and corner operands, 92-cycle latency, `ready` low while busy, start in the done cycle |
| `tb_prns_thesis_top` | all designs at full size at once; counts each mechanism (back-to-back AES start, MixColumn overflow prediction, detected fault, multiplier reduction, bypass, uncorrectable fault, chained 37-channel product, error-detecting multiplier fault) and fails if one never happened |

To simulate a test bench with Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        tb/aes_ref_pkg.sv rtl/gf2_pkg.sv tb/tb_prns_thesis_top.sv \
        --top-module tb_prns_thesis_top && obj_dir/Vtb_prns_thesis_top

Each test bench prints
`TB_RESULT checks=N failures=M`.

## Where this differs from the original architecture

* **FPGA shift registers.** The original targets FPGA LUT shift registers
  (SRL16/32) for ShiftRows, the input delay and the key schedule. Here these
  are ordinary register chains with multiplexed taps. They behave the same
  but map less densely.
* **ShiftRows taps** are computed from the byte position rather than listed
  in a table. The key-schedule tap positions are this design's own.
* **Serial steps.** Each serial multiplier takes one step per bit (84 or
  127). The total cycle counts, 168 and 254, match the original; the split
  between steps and register stages differs.
* **Residue-AES error check.** Bits 11..8 are checked with an OR: any one
  set is an error. A 4-input AND would only catch the all-ones pattern.
* **Choices not fixed by the original:**
  - the fault-injection inputs;
  - the `err`/`dout_err`/`bad_ch`/`fail` status outputs;
  - the start/ready/done handshakes and the synchronous reset;
  - the conversion of the residue-AES ciphertext back to a byte;
  - binary operands for the fault-tolerant multiplier;
  - the priority order among legitimate SRC results.
* **Not included:**
  - a 32-bit-data-path residue AES whose internals come from other work;
  - the channel-parallel form of the 37-channel multiplier, which has 37
    channel multipliers side by side;
  - an error-detecting GF(2^163) multiplier with five 84-bit channels, an
    alternative to the four 127-bit channels built here.
* **Channel choice.** The four trinomials of `rprns_gf163_edmul` are not
  fixed by the original; the first four of the fault-tolerant set are used.
* **37-channel multiplier timing.** Its cycle count is 92, one short of the
  93 quoted for the original. The per-channel constants come from constant
  tables rather than a block memory.
