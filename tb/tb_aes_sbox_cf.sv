// tb_aes_sbox_cf: exhaustive check of the composite-field S-box against the
// reference S-box computed from the GF(2^8) inverse.
module tb_aes_sbox_cf;
  import aes_ref_pkg::*;
  logic clk = 0;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  aes_sbox_cf dut (.din, .dout);
  initial begin
    for (int a = 0; a < 256; a++) begin
      din = 8'(a);
      #1;
      checks++;
      if (dout !== sbox(8'(a))) begin
        failures++;
        $display("S(%02x) = %02x, expected %02x", a, dout, sbox(8'(a)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
