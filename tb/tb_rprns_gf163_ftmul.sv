// tb_rprns_gf163_ftmul: self-checking test of the fault-tolerant residue
// GF(2^163) multiplier.  Random products are compared with a reference
// a*b mod f, (1) fault free, (2) with a random fault pattern in one random
// channel, which must be corrected (right product, err set, bad_ch naming the
// channel, fail clear), and (3) with faults in two channels, which must be
// reported as not correctable (fail set).  Checks the 254-cycle latency.
module tb_rprns_gf163_ftmul;
  localparam int D = 127, M = 163, PW = 2 * M - 1;
  localparam logic [M:0] F = (164'(1) << 163) | 164'hc9;

  logic clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] a = 0, b = 0, p;
  logic [5*D-1:0] fault_xor = 0;
  logic ready, done, err, fail;
  logic [4:0] bad_ch;
  int checks = 0, failures = 0, cycle = 0;
  int corrected = 0, uncorrectable = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  rprns_gf163_ftmul dut (.*);

  function automatic logic [M-1:0] fmul(logic [M-1:0] x, logic [M-1:0] y);
    logic [PW-1:0] r;
    r = '0;
    for (int i = 0; i < M; i++) if (y[i]) r ^= PW'(x) << i;
    for (int j = PW - 1; j >= M; j--) if (r[j]) r ^= PW'(F) << (j - M);
    return r[M-1:0];
  endfunction

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  function automatic logic [D-1:0] rnd_fault();
    logic [D-1:0] r;
    for (int i = 0; i < D; i += 32) r[i +: 32] = $urandom;
    if (r == 0) r = 1;
    if ($urandom_range(1)) r = D'(1) << $urandom_range(D - 1);   // single-bit fault
    return r;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 15; n++) begin
      int mode, c1, c2, s;
      logic [M-1:0] e;
      mode = n < 4 ? 0 : (n < 12 ? 1 : 2);
      a = rnd(); b = rnd();
      e = fmul(a, b);
      fault_xor = '0;
      c1 = $urandom_range(4);
      c2 = (c1 + 1 + $urandom_range(3)) % 5;
      if (mode >= 1) fault_xor[D*c1 +: D] = rnd_fault();
      if (mode == 2) fault_xor[D*c2 +: D] = rnd_fault();
      while (!ready) @(negedge clk);
      s = cycle;
      start = 1;
      @(negedge clk);
      start = 0;
      a = '0; b = '0; fault_xor = '0;
      while (!done) @(negedge clk);
      checks += 2;
      if (cycle - s != 254) begin failures++; $display("latency %0d, expected 254", cycle - s); end
      case (mode)
        0: if (p !== e || err || fail || bad_ch != 0) begin
             failures++; $display("clean run %0d wrong: err %b fail %b", n, err, fail);
           end
        1: if (p !== e || !err || fail || bad_ch != 5'(1 << c1)) begin
             failures++; $display("fault in channel %0d not corrected: err %b fail %b bad %b", c1, err, fail, bad_ch);
           end else corrected++;
        default: if (!fail) begin
             failures++; $display("double fault %0d,%0d not reported", c1, c2);
           end else uncorrectable++;
      endcase
    end
    checks += 2;
    if (corrected == 0) begin failures++; $display("no corrected fault"); end
    if (uncorrectable == 0) begin failures++; $display("no uncorrectable fault"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
