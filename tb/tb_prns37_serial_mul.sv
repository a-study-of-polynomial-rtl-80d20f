// tb_prns37_serial_mul: self-checking test of the 37-channel channel-serial
// residue GF(2^163) multiplier.  Random field elements (plus 0, 1 and
// all-ones) are converted here to residues modulo the 37 degree-9 moduli, the
// design multiplies them, and the result residues are compared with the
// residues of the reference product a*b mod f.  Checks that done follows the
// accepted start by exactly 92 cycles, that ready is low while busy, and that
// a new start is accepted in the cycle done is high.
module tb_prns37_serial_mul;
  localparam int N = 37, M = 163, PW = 2 * M - 1, LAT = 92;
  localparam logic [M:0] F = (164'(1) << 163) | 164'hc9;

  logic clk = 0, rst_n = 0, start = 0;
  logic [9*N-1:0] a_res = 0, b_res = 0, p_res;
  logic ready, done;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  prns37_serial_mul dut (.*);

  function automatic logic [PW-1:0] clmul(logic [M-1:0] a, logic [M-1:0] b);
    logic [PW-1:0] r;
    r = '0;
    for (int i = 0; i < M; i++) if (b[i]) r ^= PW'(a) << i;
    return r;
  endfunction

  function automatic logic [M-1:0] fmod(logic [PW-1:0] v);
    logic [PW-1:0] t;
    t = v;
    for (int j = PW - 1; j >= M; j--) if (t[j]) t ^= PW'(F) << (j - M);
    return t[M-1:0];
  endfunction

  function automatic logic [9*N-1:0] residues(logic [M-1:0] v);
    logic [9*N-1:0] r;
    for (int i = 0; i < N; i++) begin
      logic [M-1:0] t;
      t = v;
      for (int j = M - 1; j >= 9; j--) if (t[j]) t ^= M'(dut.MODS[i]) << (j - 9);
      r[9*i +: 9] = t[8:0];
    end
    return r;
  endfunction

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom;   // upper overflow discarded
    return r;
  endfunction

  logic [9*N-1:0] exp_q [$];
  int start_q [$];
  logic busy = 0;

  always @(negedge clk) begin
    if (busy && !done) begin
      checks++;
      if (ready) begin failures++; $display("ready high while busy"); end
    end
    if (done) begin
      logic [9*N-1:0] e;
      int s;
      e = exp_q.pop_front();
      s = start_q.pop_front();
      checks += 2;
      if (p_res !== e) begin failures++; $display("product residues wrong"); end
      if (cycle - s != LAT) begin failures++; $display("latency %0d, expected %0d", cycle - s, LAT); end
    end
  end

  initial begin
    logic [M-1:0] a, b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      case (n)
        0: begin a = '0; b = rnd(); end
        1: begin a = M'(1); b = rnd(); end
        2: begin a = '1; b = '1; end
        default: begin a = rnd(); b = rnd(); end
      endcase
      while (!ready) @(negedge clk);
      a_res = residues(a);
      b_res = residues(b);
      exp_q.push_back(residues(fmod(clmul(a, b))));
      start_q.push_back(cycle);
      start = 1;
      @(negedge clk);
      start = 0;
      busy = 1;
      a_res = '0;
      b_res = '0;
      if (n % 3 == 2) begin
        repeat (LAT - 1) @(negedge clk);
        busy = 0;
        repeat (20) @(negedge clk);
      end else begin
        repeat (LAT - 1) @(negedge clk);    // next start lands on the done cycle
        busy = 0;
      end
    end
    while (!ready) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
