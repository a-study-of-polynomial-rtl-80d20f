// tb_prns_err_detect: exhaustive check of the 12-bit residue-to-binary
// conversion and error flag.  For all 4096 residue triples the converted value
// must have exactly those residues; the flag must be set exactly when the
// value is not a byte.  All 256 legal bytes must convert back unflagged, and
// every single-residue corruption of a legal byte must be flagged.
module tb_prns_err_detect;
  import aes_ref_pkg::*;
  import gf2_pkg::*;
  prns_byte_t din;
  logic [11:0] value;
  logic err;
  int checks = 0, failures = 0;
  prns_err_detect dut (.*);
  function automatic prns_byte_t res(int a);
    prns_byte_t r;
    r.r1 = 4'(pmod32(a, 32'h13));
    r.r2 = 4'(pmod32(a, 32'h19));
    r.r3 = 4'(pmod32(a, 32'h1f));
    return r;
  endfunction
  initial begin
    for (int t = 0; t < 4096; t++) begin
      din = prns_byte_t'(t);
      #1;
      checks++;
      if (res(int'(value)) !== din || err !== (value > 12'hff)) begin
        failures++;
        $display("residues %h: value %h err %b", din, value, err);
      end
    end
    for (int a = 0; a < 256; a++) begin
      din = res(a);
      #1;
      checks++;
      if (value !== 12'(a) || err) begin failures++; $display("byte %02x wrong", a); end
      for (int c = 0; c < 3; c++)
        for (int e = 1; e < 16; e++) begin
          din = res(a) ^ prns_byte_t'(e << (4 * c));
          #1;
          checks++;
          if (!err) begin failures++; $display("byte %02x core %0d err %h missed", a, c, e); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
