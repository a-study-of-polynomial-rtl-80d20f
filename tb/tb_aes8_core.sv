// tb_aes8_core: self-checking test of the byte-serial AES-128 core.
// Encrypts the two FIPS-197 example blocks and random blocks, some of them
// back to back (the next block starting on cycle 160 of the previous one),
// and compares every ciphertext byte with the reference model.  Checks that
// the first ciphertext byte leaves exactly 160 cycles after start.
module tb_aes8_core;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] text_in = 0, key_in = 0, dout;
  logic ready, dout_valid, busy;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  aes8_core dut (.*);

  logic [127:0] exp_q [$];
  int start_cyc [$];
  int obyte = 0;
  logic [127:0] cur;
  int cur_start;

  // Output monitor.
  always @(negedge clk) if (rst_n && dout_valid) begin
    if (obyte == 0) begin
      cur = exp_q.pop_front();
      cur_start = start_cyc.pop_front();
      checks++;
      if (cycle - cur_start != 160) begin
        failures++;
        $display("latency %0d, expected 160", cycle - cur_start);
      end
    end
    checks++;
    if (dout !== cur[8*obyte +: 8]) begin
      failures++;
      $display("byte %0d: got %02x expected %02x", obyte, dout, cur[8*obyte +: 8]);
    end
    obyte = (obyte + 1) % 16;
  end

  // Inputs change on the falling edge, away from the sampling edge.
  task automatic send(input logic [7:0] pt [16], input logic [7:0] k [16]);
    logic [7:0] ct [16];
    encrypt(pt, k, ct);
    @(negedge clk);
    while (!ready) @(negedge clk);
    exp_q.push_back({ct[15],ct[14],ct[13],ct[12],ct[11],ct[10],ct[9],ct[8],
                     ct[7],ct[6],ct[5],ct[4],ct[3],ct[2],ct[1],ct[0]});
    start_cyc.push_back(cycle);
    for (int i = 0; i < 16; i++) begin
      start   = (i == 0);
      text_in = pt[i];
      key_in  = k[i];
      @(negedge clk);
    end
    start = 0;
    // return one cycle before cycle 160 of this block
    repeat (160 - 17) @(negedge clk);
  endtask

  initial begin
    logic [7:0] pt [16], k [16];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // FIPS-197 Appendix C.1
    for (int i = 0; i < 16; i++) begin pt[i] = 8'(i * 8'h11); k[i] = 8'(i); end
    send(pt, k);
    // FIPS-197 Appendix B
    pt = '{8'h32,8'h43,8'hf6,8'ha8,8'h88,8'h5a,8'h30,8'h8d,8'h31,8'h31,8'h98,8'ha2,8'he0,8'h37,8'h07,8'h34};
    k  = '{8'h2b,8'h7e,8'h15,8'h16,8'h28,8'hae,8'hd2,8'ha6,8'hab,8'hf7,8'h15,8'h88,8'h09,8'hcf,8'h4f,8'h3c};
    send(pt, k);
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 16; i++) begin pt[i] = 8'($urandom); k[i] = 8'($urandom); end
      send(pt, k);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d blocks missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
