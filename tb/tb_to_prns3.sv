// tb_to_prns3: exhaustive check of the byte-to-residue converter against a
// polynomial remainder computed in the testbench, for all 256 bytes.
module tb_to_prns3;
  import aes_ref_pkg::*;
  import gf2_pkg::*;
  logic [7:0] din;
  prns_byte_t dout;
  int checks = 0, failures = 0;
  to_prns3 dut (.*);
  initial begin
    for (int a = 0; a < 256; a++) begin
      din = 8'(a);
      #1;
      checks++;
      if (dout.r1 !== 4'(pmod32(a, 32'h13)) || dout.r2 !== 4'(pmod32(a, 32'h19)) ||
          dout.r3 !== 4'(pmod32(a, 32'h1f))) begin
        failures++;
        $display("byte %02x: got %h", a, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
