// tb_prns_thesis_top: end-to-end test of all designs in the top at their
// default sizes, run concurrently.  Each design is checked against reference
// models written here, and each mechanism is counted and must occur:
//  aes     - AES blocks correct, including a back-to-back start at cycle 160;
//  raes    - residue AES blocks correct, MixColumn overflow predicted from
//            residues, an injected fault detected and flagged with the block;
//  m8      - GF(2^8) products correct and injected channel faults detected;
//  m163    - residue GF(2^163) products correct (reduction modulo f needed);
//  ft      - fault-tolerant products correct, a single-channel fault bypassed
//            and located, a double fault reported as uncorrectable;
//  s37     - channel-serial 37-channel products correct, including a product
//            whose operand is the previous residue result (chained);
//  ed      - error-detecting GF(2^163) products correct, a channel fault
//            detected.
module tb_prns_thesis_top;
  import aes_ref_pkg::*;
  import gf2_pkg::*;

  localparam int M = 163, PW = 2 * M - 1;
  localparam logic [M:0] F = (164'(1) << 163) | 164'hc9;
  localparam int KS [4] = '{5, 9, 11, 13};

  logic clk = 0, rst_n = 0;
  logic aes_start = 0, raes_start = 0, m163_start = 0, ft_start = 0, s37_start = 0, ed_start = 0;
  logic [7:0] aes_text_in = 0, aes_key_in = 0, raes_text_in = 0, raes_key_in = 0;
  logic [11:0] raes_fault_xor = 0;
  logic [7:0] m8_a = 0, m8_b = 0;
  logic [23:0] m8_fault_xor = 0, m8_prod_res;
  logic [335:0] m163_a_res = 0, m163_b_res = 0, m163_p_res;
  logic [162:0] ft_a = 0, ft_b = 0, ft_p;
  logic [634:0] ft_fault_xor = 0;
  logic aes_ready, aes_dout_valid, aes_busy;
  logic [7:0] aes_dout, raes_dout, m8_p;
  logic raes_ready, raes_busy, raes_dout_valid, raes_dout_err, raes_err;
  prns_byte_t raes_dout_res;
  logic m8_err, m163_ready, m163_done, ft_ready, ft_done, ft_err, ft_fail;
  logic [4:0] ft_bad_ch;
  logic [332:0] s37_a_res = 0, s37_b_res = 0, s37_p_res;
  logic s37_ready, s37_done;
  logic [162:0] ed_a = 0, ed_b = 0, ed_p;
  logic [507:0] ed_fault_xor = 0;
  logic ed_ready, ed_done, ed_err;

  int checks = 0, failures = 0, cycle = 0;
  int n_aes_blocks = 0, n_aes_b2b = 0, n_raes_blocks = 0, n_raes_msb = 0,
      n_raes_detect = 0, n_m8 = 0, n_m8_detect = 0, n_m163 = 0, n_m163_red = 0,
      n_ft = 0, n_ft_bypass = 0, n_ft_fail = 0, n_s37 = 0, n_s37_chain = 0, n_ed = 0, n_ed_detect = 0;
  bit aes_done_all = 0, raes_done_all = 0, m8_done_all = 0, m163_done_all = 0, ft_done_all = 0, s37_done_all = 0, ed_done_all = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  prns_thesis_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ references
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
  function automatic logic [335:0] residues(logic [PW-1:0] v);
    logic [335:0] r;
    for (int i = 0; i < 4; i++) begin
      logic [PW-1:0] t;
      t = v;
      for (int j = PW - 1; j >= 84; j--)
        if (t[j]) t ^= ((PW'(1) << 84) | (PW'(1) << KS[i]) | PW'(1)) << (j - 84);
      r[84*i +: 84] = t[83:0];
    end
    return r;
  endfunction
  function automatic logic [M-1:0] rnd163();
    logic [M-1:0] r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction
  function automatic logic [127:0] pack(logic [7:0] b [16]);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[8*i +: 8] = b[i];
    return r;
  endfunction

  // ------------------------------------------------------------ AES
  logic [127:0] aes_exp [$];
  int aes_t0 [$];
  int aes_ob = 0;
  logic [127:0] aes_cur;
  always @(negedge clk) if (rst_n && aes_dout_valid) begin
    if (aes_ob == 0) begin
      int t0;
      aes_cur = aes_exp.pop_front();
      t0 = aes_t0.pop_front();
      check(cycle - t0 == 160, "aes latency 160");
    end
    check(aes_dout == aes_cur[8*aes_ob +: 8], "aes ciphertext byte");
    aes_ob = (aes_ob + 1) % 16;
    if (aes_ob == 0) n_aes_blocks++;
  end

  initial begin : aes_drv
    logic [7:0] pt [16], k [16], ct [16];
    wait (rst_n);
    for (int n = 0; n < 3; n++) begin
      for (int i = 0; i < 16; i++) begin
        pt[i] = n == 0 ? 8'(i * 8'h11) : 8'($urandom);
        k[i]  = n == 0 ? 8'(i) : 8'($urandom);
      end
      encrypt(pt, k, ct);
      @(negedge clk);
      while (!aes_ready) @(negedge clk);
      if (n > 0 && aes_busy) n_aes_b2b++;
      aes_exp.push_back(pack(ct));
      aes_t0.push_back(cycle);
      for (int i = 0; i < 16; i++) begin
        aes_start = (i == 0); aes_text_in = pt[i]; aes_key_in = k[i];
        @(negedge clk);
      end
      aes_start = 0;
      repeat (160 - 17) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    aes_done_all = 1;
  end

  // ------------------------------------------------------------ residue AES
  logic [127:0] raes_exp [$];
  bit raes_faulty [$];
  int raes_ob = 0;
  logic [127:0] raes_cur;
  bit raes_cur_f, raes_flag;
  always @(negedge clk) if (rst_n && raes_busy && dut.u_raes.a7) n_raes_msb++;
  always @(negedge clk) if (rst_n && raes_dout_valid) begin
    if (raes_ob == 0) begin
      raes_cur = raes_exp.pop_front();
      raes_cur_f = raes_faulty.pop_front();
      raes_flag = 0;
    end
    if (raes_dout_err) raes_flag = 1;
    if (!raes_cur_f) begin
      check(raes_dout == raes_cur[8*raes_ob +: 8], "residue AES ciphertext byte");
      check(!raes_dout_err, "residue AES no false error");
    end
    raes_ob = (raes_ob + 1) % 16;
    if (raes_ob == 0) begin
      if (raes_cur_f) begin
        check(raes_flag, "residue AES fault flagged");
        if (raes_flag) n_raes_detect++;
      end else n_raes_blocks++;
    end
  end

  initial begin : raes_drv
    logic [7:0] pt [16], k [16], ct [16];
    wait (rst_n);
    for (int n = 0; n < 3; n++) begin
      for (int i = 0; i < 16; i++) begin pt[i] = 8'($urandom); k[i] = 8'($urandom); end
      if (n == 0) begin
        pt = '{8'h32,8'h43,8'hf6,8'ha8,8'h88,8'h5a,8'h30,8'h8d,8'h31,8'h31,8'h98,8'ha2,8'he0,8'h37,8'h07,8'h34};
        k  = '{8'h2b,8'h7e,8'h15,8'h16,8'h28,8'hae,8'hd2,8'ha6,8'hab,8'hf7,8'h15,8'h88,8'h09,8'hcf,8'h4f,8'h3c};
      end
      encrypt(pt, k, ct);
      @(negedge clk);
      while (!raes_ready) @(negedge clk);
      raes_exp.push_back(pack(ct));
      raes_faulty.push_back(n == 1);
      for (int i = 0; i < 16; i++) begin
        raes_start = (i == 0); raes_text_in = pt[i]; raes_key_in = k[i];
        @(negedge clk);
      end
      raes_start = 0;
      repeat (70) @(negedge clk);
      if (n == 1) raes_fault_xor = 12'h040;    // core 2, one cycle
      @(negedge clk);
      raes_fault_xor = 0;
      repeat (160 - 88) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    raes_done_all = 1;
  end

  // ------------------------------------------------------------ GF(2^8)
  initial begin : m8_drv
    wait (rst_n);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      m8_a = 8'($urandom); m8_b = 8'($urandom); m8_fault_xor = 0;
      #1;
      check(m8_p == gmul(m8_a, m8_b) && !m8_err, "GF(2^8) product");
      n_m8++;
      m8_fault_xor = 24'($urandom_range(63, 1)) << (6 * $urandom_range(3));
      #1;
      check(m8_err, "GF(2^8) fault detected");
      if (m8_err) n_m8_detect++;
    end
    m8_fault_xor = 0;
    m8_done_all = 1;
  end

  // ------------------------------------------------------------ GF(2^163)
  initial begin : m163_drv
    logic [M-1:0] a, b;
    wait (rst_n);
    for (int n = 0; n < 3; n++) begin
      logic [PW-1:0] full;
      int t0;
      a = rnd163(); b = rnd163();
      full = clmul(a, b);
      @(negedge clk);
      while (!m163_ready) @(negedge clk);
      m163_a_res = residues(PW'(a));
      m163_b_res = residues(PW'(b));
      t0 = cycle;
      m163_start = 1;
      @(negedge clk);
      m163_start = 0;
      while (!m163_done) @(negedge clk);
      check(cycle - t0 == 168, "GF(2^163) latency 168");
      check(m163_p_res == residues(PW'(fmod(full))), "GF(2^163) residue product");
      n_m163++;
      if (full[PW-1:M] != 0) n_m163_red++;
    end
    m163_done_all = 1;
  end

  // ------------------------------------------------------------ fault tolerant
  initial begin : ft_drv
    logic [M-1:0] a, b;
    wait (rst_n);
    for (int n = 0; n < 3; n++) begin
      int t0, c;
      a = rnd163(); b = rnd163();
      c = $urandom_range(4);
      @(negedge clk);
      while (!ft_ready) @(negedge clk);
      ft_a = a; ft_b = b; ft_fault_xor = '0;
      if (n >= 1) ft_fault_xor[127*c +: 127] = 127'($urandom) | 127'(1);
      if (n == 2) ft_fault_xor[127*((c + 2) % 5) +: 127] = 127'(5);
      t0 = cycle;
      ft_start = 1;
      @(negedge clk);
      ft_start = 0;
      ft_fault_xor = '0;
      while (!ft_done) @(negedge clk);
      check(cycle - t0 == 254, "fault-tolerant latency 254");
      case (n)
        0: begin check(ft_p == fmod(clmul(a, b)) && !ft_err, "fault-tolerant product"); n_ft++; end
        1: begin
          check(ft_p == fmod(clmul(a, b)) && ft_err && !ft_fail && ft_bad_ch == 5'(1 << c),
                "single channel fault corrected");
          if (ft_p == fmod(clmul(a, b)) && ft_bad_ch == 5'(1 << c)) n_ft_bypass++;
        end
        default: begin check(ft_fail, "double fault reported"); if (ft_fail) n_ft_fail++; end
      endcase
    end
    ft_done_all = 1;
  end

  // ------------------------------------------------------------ 37 channels
  function automatic logic [332:0] residues37(logic [M-1:0] v);
    logic [332:0] r;
    for (int i = 0; i < 37; i++) begin
      logic [M-1:0] t;
      t = v;
      for (int j = M - 1; j >= 9; j--) if (t[j]) t ^= M'(dut.u_s37.MODS[i]) << (j - 9);
      r[9*i +: 9] = t[8:0];
    end
    return r;
  endfunction

  initial begin : s37_drv
    logic [M-1:0] a, b, prev;
    wait (rst_n);
    prev = '0;
    for (int n = 0; n < 4; n++) begin
      int t0;
      a = (n == 3) ? prev : rnd163();
      b = rnd163();
      @(negedge clk);
      while (!s37_ready) @(negedge clk);
      // the chained product takes the previous result residues unchanged
      s37_a_res = (n == 3) ? s37_p_res : residues37(a);
      s37_b_res = residues37(b);
      t0 = cycle;
      s37_start = 1;
      @(negedge clk);
      s37_start = 0;
      while (!s37_done) @(negedge clk);
      check(cycle - t0 == 92, "37-channel latency 92");
      prev = fmod(clmul(a, b));
      check(s37_p_res == residues37(prev), "37-channel residue product");
      if (s37_p_res == residues37(prev)) begin
        n_s37++;
        if (n == 3) n_s37_chain++;
      end
    end
    s37_done_all = 1;
  end

  // ------------------------------------------------------------ error detecting
  initial begin : ed_drv
    logic [M-1:0] a, b;
    wait (rst_n);
    for (int n = 0; n < 2; n++) begin
      int t0;
      a = rnd163(); b = rnd163();
      @(negedge clk);
      while (!ed_ready) @(negedge clk);
      ed_a = a; ed_b = b; ed_fault_xor = '0;
      if (n == 1) ed_fault_xor[127*$urandom_range(3) +: 127] = 127'(1) << $urandom_range(126);
      t0 = cycle;
      ed_start = 1;
      @(negedge clk);
      ed_start = 0;
      ed_fault_xor = '0;
      while (!ed_done) @(negedge clk);
      check(cycle - t0 == 254, "error-detecting latency 254");
      if (n == 0) begin
        check(ed_p == fmod(clmul(a, b)) && !ed_err, "error-detecting product");
        if (ed_p == fmod(clmul(a, b))) n_ed++;
      end else begin
        check(ed_err, "error-detecting multiplier fault flagged");
        if (ed_err) n_ed_detect++;
      end
    end
    ed_done_all = 1;
  end

  // ------------------------------------------------------------ summary
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (aes_done_all && raes_done_all && m8_done_all && m163_done_all && ft_done_all && s37_done_all && ed_done_all);
    $display("aes blocks %0d back-to-back %0d | raes blocks %0d msb-predicted %0d faults detected %0d",
             n_aes_blocks, n_aes_b2b, n_raes_blocks, n_raes_msb, n_raes_detect);
    $display("m8 products %0d faults detected %0d | m163 products %0d reduced %0d | ft products %0d bypass %0d uncorrectable %0d",
             n_m8, n_m8_detect, n_m163, n_m163_red, n_ft, n_ft_bypass, n_ft_fail);
    $display("s37 products %0d chained %0d | ed products %0d faults detected %0d", n_s37, n_s37_chain, n_ed, n_ed_detect);
    check(n_aes_blocks == 3, "all AES blocks out");
    check(n_aes_b2b > 0, "AES back-to-back start happened");
    check(n_raes_blocks == 2, "all clean residue AES blocks out");
    check(n_raes_msb > 0, "MixColumn overflow prediction happened");
    check(n_raes_detect > 0, "residue AES fault detection happened");
    check(n_m8 > 0 && n_m8_detect > 0, "GF(2^8) detection happened");
    check(n_m163 > 0 && n_m163_red > 0, "GF(2^163) reduction happened");
    check(n_ft > 0 && n_ft_bypass > 0 && n_ft_fail > 0, "fault-tolerant bypass and failure happened");
    check(n_s37 == 4 && n_s37_chain == 1, "37-channel products and chained product happened");
    check(n_ed == 1 && n_ed_detect == 1, "error-detecting product and detection happened");
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
