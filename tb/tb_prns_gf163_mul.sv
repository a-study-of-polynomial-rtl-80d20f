// tb_prns_gf163_mul: self-checking test of the 4-channel residue GF(2^163)
// multiplier.  Random field elements (plus 0, 1 and all-ones) are converted
// to residues here, multiplied by the design, and the result residues are
// compared with the residues of the reference product a*b mod f.  Checks that
// done follows the accepted start by exactly 168 cycles and that a new start
// is accepted in the cycle done is high.
module tb_prns_gf163_mul;
  localparam int D = 84, M = 163, PW = 2 * M - 1;
  localparam logic [M:0] F = (164'(1) << 163) | 164'hc9;
  localparam int KS [4] = '{5, 9, 11, 13};

  logic clk = 0, rst_n = 0, start = 0;
  logic [4*D-1:0] a_res = 0, b_res = 0, p_res;
  logic ready, done;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  prns_gf163_mul dut (.*);

  function automatic logic [PW-1:0] clmul(logic [M-1:0] a, logic [M-1:0] b);
    logic [PW-1:0] r;
    r = '0;
    for (int i = 0; i < M; i++) if (b[i]) r ^= PW'(a) << i;
    return r;
  endfunction

  function automatic logic [M-1:0] fmod(logic [PW-1:0] v);
    for (int j = PW - 1; j >= M; j--) if (v[j]) v ^= PW'(F) << (j - M);
    return v[M-1:0];
  endfunction

  function automatic logic [4*D-1:0] residues(logic [PW-1:0] v);
    logic [4*D-1:0] r;
    for (int i = 0; i < 4; i++) begin
      logic [PW-1:0] t;
      t = v;
      for (int j = PW - 1; j >= D; j--)
        if (t[j]) t ^= ((PW'(1) << D) | (PW'(1) << KS[i]) | PW'(1)) << (j - D);
      r[D*i +: D] = t[D-1:0];
    end
    return r;
  endfunction

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom;   // upper overflow discarded
    return r;
  endfunction

  logic [4*D-1:0] exp_q [$];
  int start_q [$];

  always @(negedge clk) if (done) begin
    logic [4*D-1:0] e;
    int s;
    e = exp_q.pop_front();
    s = start_q.pop_front();
    checks += 2;
    if (p_res !== e) begin failures++; $display("product residues wrong"); end
    if (cycle - s != 168) begin failures++; $display("latency %0d, expected 168", cycle - s); end
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
      a_res = residues(PW'(a));
      b_res = residues(PW'(b));
      exp_q.push_back(residues(PW'(fmod(clmul(a, b)))));
      start_q.push_back(cycle);
      start = 1;
      @(negedge clk);
      start = 0;
      a_res = '0;
      b_res = '0;
      if (n % 3 == 2) repeat (200) @(negedge clk);
      else repeat (166) @(negedge clk);  // next start lands on the done cycle
    end
    while (!ready) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
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
