// to_prns3: converts a byte into its three residues, the representation of the
// residue-number AES: r1 = a mod (x^4+x+1), r2 = a mod (x^4+x^3+1) and the
// redundant r3 = a mod (x^4+x^3+x^2+x+1).  Each residue is a fixed XOR
// network (a polynomial remainder), as the document describes.  Combinational.
module to_prns3
  import gf2_pkg::*;
(
  input  logic [7:0]  din,
  output prns_byte_t  dout
);
  always_comb begin
    dout.r1 = mod4(12'(din), AES_M1);
    dout.r2 = mod4(12'(din), AES_M2);
    dout.r3 = mod4(12'(din), AES_M3);
  end
endmodule
