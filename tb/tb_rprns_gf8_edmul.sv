// tb_rprns_gf8_edmul: exhaustive check of the error-detecting GF(2^8)
// residue multiplier.  All 65536 operand pairs must give the field product
// with no error flag; for each pair a random nonzero fault in one random
// channel must raise the flag.  The worked example A = 9D, B = 67 of the
// residue chapter is checked residue by residue, including its injected
// single-bit and multi-bit faults in channel 3.
module tb_rprns_gf8_edmul;
  import aes_ref_pkg::*;
  logic [7:0] a, b, p;
  logic [23:0] fault_xor = 0, prod_res;
  logic err;
  int checks = 0, failures = 0;
  rprns_gf8_edmul dut (.*);
  initial begin
    a = 8'h9d; b = 8'h67; fault_xor = 0;
    #1;
    checks++;
    if (prod_res !== {6'b100000, 6'b001100, 6'b100111, 6'b011000} || err || p !== gmul(a, b)) begin
      failures++; $display("example: residues %b err %b p %02x", prod_res, err, p);
    end
    fault_xor = 24'b000001 << 12;   // channel 3: 001100 -> 001101
    #1;
    checks++;
    if (!err) begin failures++; $display("example single-bit fault missed"); end
    fault_xor = 24'b111001 << 12;   // channel 3: 001100 -> 110101
    #1;
    checks++;
    if (!err) begin failures++; $display("example multi-bit fault missed"); end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y); fault_xor = 0;
        #1;
        checks++;
        if (p !== gmul(a, b) || err) begin
          failures++;
          if (failures < 10) $display("%02x*%02x: got %02x err %b", x, y, p, err);
        end
        fault_xor = 24'($urandom_range(63, 1)) << (6 * $urandom_range(3));
        #1;
        checks++;
        if (!err) begin
          failures++;
          if (failures < 10) $display("%02x*%02x: fault %h missed", x, y, fault_xor);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
