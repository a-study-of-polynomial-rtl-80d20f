// tb_prns_aes8_ed: self-checking test of the error-detecting residue AES.
// Encrypts the FIPS-197 example blocks and random blocks back to back and
// compares every ciphertext byte (converted back to binary) and its three
// residues with the reference model.  The first ciphertext byte must leave
// exactly 160 cycles after start.  Some blocks get a one-cycle fault injected
// into a single residue core in the middle of the rounds; for those the
// design must raise err during the block and dout_err with the ciphertext,
// and clean blocks must never raise either flag.
module tb_prns_aes8_ed;
  import aes_ref_pkg::*;
  import gf2_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] text_in = 0, key_in = 0, dout;
  logic [11:0] fault_xor = 0;
  prns_byte_t dout_res;
  logic ready, dout_valid, busy, dout_err, err;
  int checks = 0, failures = 0;
  int cycle = 0;
  int err_cycles = 0, faults_sent = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  prns_aes8_ed dut (.*);

  logic [127:0] exp_q [$];
  int start_cyc [$];
  bit faulty_q [$];
  int obyte = 0;
  logic [127:0] cur;
  int cur_start;
  bit cur_faulty, flagged;

  always @(negedge clk) if (rst_n && err) err_cycles++;

  always @(negedge clk) if (rst_n && dout_valid) begin
    logic [7:0] e;
    if (obyte == 0) begin
      cur = exp_q.pop_front();
      cur_start = start_cyc.pop_front();
      cur_faulty = faulty_q.pop_front();
      flagged = 0;
      checks++;
      if (cycle - cur_start != 160) begin
        failures++;
        $display("latency %0d, expected 160", cycle - cur_start);
      end
    end
    e = cur[8*obyte +: 8];
    if (dout_err) flagged = 1;
    if (!cur_faulty) begin
      checks += 3;
      if (dout !== e) begin
        failures++;
        $display("byte %0d: got %02x expected %02x", obyte, dout, e);
      end
      if (dout_res.r1 !== 4'(pmod32(32'(e), 32'h13)) ||
          dout_res.r2 !== 4'(pmod32(32'(e), 32'h19)) ||
          dout_res.r3 !== 4'(pmod32(32'(e), 32'h1f))) begin
        failures++;
        $display("byte %0d: wrong residues %h", obyte, dout_res);
      end
      if (dout_err) begin
        failures++;
        $display("byte %0d: false error flag", obyte);
      end
    end
    if (obyte == 15 && cur_faulty) begin
      checks++;
      if (!flagged) begin
        failures++;
        $display("injected fault not reported");
      end
    end
    obyte = (obyte + 1) % 16;
  end

  task automatic send(input logic [7:0] pt [16], input logic [7:0] k [16], input bit fault);
    logic [7:0] ct [16];
    int e0;
    encrypt(pt, k, ct);
    @(negedge clk);
    while (!ready) @(negedge clk);
    exp_q.push_back({ct[15],ct[14],ct[13],ct[12],ct[11],ct[10],ct[9],ct[8],
                     ct[7],ct[6],ct[5],ct[4],ct[3],ct[2],ct[1],ct[0]});
    start_cyc.push_back(cycle);
    faulty_q.push_back(fault);
    for (int i = 0; i < 16; i++) begin
      start   = (i == 0);
      text_in = pt[i];
      key_in  = k[i];
      @(negedge clk);
    end
    start = 0;
    repeat (30) @(negedge clk);
    // block cycle 46: one cycle with a fault in one core
    if (fault) begin
      int core = $urandom_range(2);
      fault_xor = 12'(($urandom_range(14) + 1) << (4 * core));
      e0 = err_cycles;
      faults_sent++;
    end
    @(negedge clk);
    fault_xor = 0;
    repeat (160 - 48) @(negedge clk);
    if (fault) begin
      checks++;
      if (err_cycles == e0) begin
        failures++;
        $display("err not raised after fault");
      end
    end
  endtask

  initial begin
    logic [7:0] pt [16], k [16];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 16; i++) begin pt[i] = 8'(i * 8'h11); k[i] = 8'(i); end
    send(pt, k, 0);
    pt = '{8'h32,8'h43,8'hf6,8'ha8,8'h88,8'h5a,8'h30,8'h8d,8'h31,8'h31,8'h98,8'ha2,8'he0,8'h37,8'h07,8'h34};
    k  = '{8'h2b,8'h7e,8'h15,8'h16,8'h28,8'hae,8'hd2,8'ha6,8'hab,8'hf7,8'h15,8'h88,8'h09,8'hcf,8'h4f,8'h3c};
    send(pt, k, 0);
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < 16; i++) begin pt[i] = 8'($urandom); k[i] = 8'($urandom); end
      send(pt, k, n % 2 == 1);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d blocks missing", exp_q.size()); end
    checks++;
    if (faults_sent == 0) begin failures++; $display("no fault injected"); end
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
