// tb_prns_sbox_lut: the three residue S-box tables, each addressed by its own
// and its neighbour's residue of a byte a, must return the residues of
// S(a) for all 256 bytes.  Checks the worked example [AA] -> [AC] separately.
module tb_prns_sbox_lut;
  import aes_ref_pkg::*;
  logic [3:0] r1, r2, r3, s1, s2, s3;
  int checks = 0, failures = 0;
  prns_sbox_lut #(.CORE(1)) u1 (.r_own(r1), .r_next(r2), .dout(s1));
  prns_sbox_lut #(.CORE(2)) u2 (.r_own(r2), .r_next(r3), .dout(s2));
  prns_sbox_lut #(.CORE(3)) u3 (.r_own(r3), .r_next(r1), .dout(s3));
  initial begin
    for (int a = 0; a < 256; a++) begin
      int s;
      r1 = 4'(pmod32(a, 32'h13));
      r2 = 4'(pmod32(a, 32'h19));
      r3 = 4'(pmod32(a, 32'h1f));
      s = int'(sbox(8'(a)));
      #1;
      checks++;
      if (s1 !== 4'(pmod32(s, 32'h13)) || s2 !== 4'(pmod32(s, 32'h19)) ||
          s3 !== 4'(pmod32(s, 32'h1f))) begin
        failures++;
        $display("byte %02x: got %h %h %h", a, s1, s2, s3);
      end
    end
    r1 = 4'h7; r2 = 4'h6; r3 = 4'hf;
    #1;
    checks++;
    if ({s1, s2, s3} !== 12'h109) begin failures++; $display("[AA] example: %h%h%h", s1, s2, s3); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
