// tb_prns_msb_predict: for all 256 bytes, bit 7 predicted from the residues
// modulo x^4+x+1 and x^4+x^3+1 must equal bit 7 of the byte.
module tb_prns_msb_predict;
  import aes_ref_pkg::*;
  logic [3:0] r1, r2;
  logic a7;
  int checks = 0, failures = 0;
  prns_msb_predict dut (.*);
  initial begin
    for (int a = 0; a < 256; a++) begin
      r1 = 4'(pmod32(a, 32'h13));
      r2 = 4'(pmod32(a, 32'h19));
      #1;
      checks++;
      if (a7 !== a[7]) begin failures++; $display("byte %02x: a7 %b", a, a7); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
