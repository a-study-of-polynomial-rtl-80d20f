// tb_rprns_gf163_edmul: self-checking test of the error-detecting residue
// GF(2^163) multiplier over four 127-bit channels.  Random products are
// compared with a reference a*b mod f (1) fault free, where err must stay
// low, (2) with a random fault pattern (often a single bit) in one random
// channel and (3) with faults in two channels; in both faulty cases err must
// be set.  A missed two-channel fault has probability 2^-127, so none is
// expected.  Checks the 254-cycle latency and that ready is low while busy.
module tb_rprns_gf163_edmul;
  localparam int D = 127, M = 163, PW = 2 * M - 1, LAT = 254;
  localparam logic [M:0] F = (164'(1) << 163) | 164'hc9;

  logic clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] a = 0, b = 0, p;
  logic [4*D-1:0] fault_xor = 0;
  logic ready, done, err;
  int checks = 0, failures = 0, cycle = 0;
  int detected = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  rprns_gf163_edmul dut (.*);

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
    for (int n = 0; n < 14; n++) begin
      int mode, c1, c2, s;
      logic [M-1:0] e;
      mode = n < 5 ? 0 : (n < 11 ? 1 : 2);
      a = rnd(); b = rnd();
      if (n == 0) a = '0;
      if (n == 1) a = M'(1);
      e = fmul(a, b);
      fault_xor = '0;
      c1 = $urandom_range(3);
      c2 = (c1 + 1 + $urandom_range(2)) % 4;
      if (mode >= 1) fault_xor[D*c1 +: D] = rnd_fault();
      if (mode == 2) fault_xor[D*c2 +: D] = rnd_fault();
      while (!ready) @(negedge clk);
      s = cycle;
      start = 1;
      @(negedge clk);
      start = 0;
      a = '0; b = '0; fault_xor = '0;
      while (!done) begin
        checks++;
        if (ready) begin failures++; $display("ready high while busy"); end
        @(negedge clk);
      end
      checks += 2;
      if (cycle - s != LAT) begin failures++; $display("latency %0d, expected %0d", cycle - s, LAT); end
      if (mode == 0) begin
        if (p !== e || err) begin failures++; $display("clean run %0d wrong: err %b", n, err); end
      end else begin
        if (!err) begin failures++; $display("fault (mode %0d, channel %0d) not detected", mode, c1); end
        else detected++;
      end
    end
    checks++;
    if (detected == 0) begin failures++; $display("no fault detected"); end
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
