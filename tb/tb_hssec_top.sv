// tb_hssec_top: end-to-end test of the co-processor at its default (and only)
// configuration, driven through its host ports only.
//
// Phases:
//   1. SHA-1 and SHA-512 of the padded message "abc" (FIPS 180-2 answers).
//   2. AES-128 CBC, SP 800-38A F.2.1 first two blocks (key, IV, C1, C2).
//   3. All three cores together in ECB on one 24-bank random message: every
//      bank is enciphered, SHA-1 hashes it as six 512-bit blocks and SHA-512
//      as three 1024-bit blocks; the host drops send at random.
//   4. AES-128 alone, streaming: one block enters the core every 10 cycles.
//   5. SHA-1 alone and SHA-512 alone, streaming: a block every 40 / 80 cycles.
// Every result is compared with the reference models. The mechanisms of the
// design are counted and each must occur: key and IV loading, ECB and CBC
// blocks, SHA-1 and SHA-512 blocks and digests, input back-pressure (ready
// low), a halt (send low while a result is on the ports), a result waiting
// for the ports, and a core waiting in its last cycle for its holding
// register.
module tb_hssec_top;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic aes_en = 0, sha1_en = 0, sha2_en = 0, mode = 0, key = 0;
  logic [31:0] data_in = 0;
  logic in_valid = 0, in_last = 0, ready, send = 1;
  logic out_hot, out_aes, out_sha12;
  logic [31:0] data_out, sha_out;
  bit random_send = 0;

  hssec_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------ expected results
  logic [127:0] exp_aes [$];
  logic [159:0] exp_s1 [$];
  logic [511:0] exp_s2 [$];
  int n_aes_out = 0, n_s1_out = 0, n_s2_out = 0;

  // ------------------------------------------------------ output collector
  logic [511:0] acc;
  int beat = 0;
  always @(posedge clk) if (rst_n && out_hot && send) begin
    if (out_aes) begin
      acc = {acc[479:0], data_out};
      chk(sha_out == 0, "second port idle during ciphertext");
      if (++beat == 4) begin
        chk(exp_aes.size() > 0 && acc[127:0] === exp_aes[0], "ciphertext");
        if (exp_aes.size() > 0) void'(exp_aes.pop_front());
        beat = 0; n_aes_out++;
      end
    end else if (!out_sha12) begin
      acc = {acc[447:0], data_out, sha_out};
      if (++beat == 3) begin
        chk(exp_s1.size() > 0 && acc[191:32] === exp_s1[0], "SHA-1 digest");
        if (exp_s1.size() > 0) void'(exp_s1.pop_front());
        beat = 0; n_s1_out++;
      end
    end else begin
      acc = {acc[447:0], data_out, sha_out};
      if (++beat == 8) begin
        chk(exp_s2.size() > 0 && acc === exp_s2[0], "SHA-512 digest");
        if (exp_s2.size() > 0) void'(exp_s2.pop_front());
        beat = 0; n_s2_out++;
      end
    end
  end

  // -------------------------------------------------- mechanism counters
  int n_backpressure = 0, n_halt = 0, n_wait_port = 0, n_core_hold = 0;
  int n_aes_start = 0, n_s1_start = 0, n_s2_start = 0, n_cbc = 0, n_key = 0;
  int cyc = 0, last_aes = 0, last_s1 = 0, last_s2 = 0;
  int aes_gap [$], s1_gap [$], s2_gap [$];
  always @(negedge clk) cyc++;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !key && !ready && !out_hot) n_backpressure++;
    if (out_hot && !send) n_halt++;
    if (out_hot && (dut.u_io.aes_full + dut.u_io.s1_full + dut.u_io.s2_full) > 1) n_wait_port++;
    if (dut.u_aes.last && !dut.aes_out_ready) n_core_hold++;
    if (in_valid && key && ready) n_key++;
    if (dut.u_cu.aes_start) begin
      n_aes_start++; if (mode) n_cbc++;
      aes_gap.push_back(cyc - last_aes); last_aes = cyc;
    end
    if (dut.u_cu.s1_start) begin n_s1_start++; s1_gap.push_back(cyc - last_s1); last_s1 = cyc; end
    if (dut.u_cu.s2_start) begin n_s2_start++; s2_gap.push_back(cyc - last_s2); last_s2 = cyc; end
  end

  always @(negedge clk) send <= random_send ? ($urandom % 3 == 0) : 1'b1;

  // --------------------------------------------------------------- host
  task automatic put(input logic [31:0] w, input bit is_key, input bit last);
    data_in = w; key = is_key; in_last = last; in_valid = 1;
    @(posedge clk);
    while (!ready) @(posedge clk);
    #1;
    in_valid = 0; key = 0; in_last = 0;
  endtask

  task automatic load_key(input logic [127:0] k, input logic [127:0] iv);
    for (int i = 0; i < 4; i++) put(k[127-32*i -: 32], 1, 0);
    if (mode) for (int i = 0; i < 4; i++) put(iv[127-32*i -: 32], 1, 0);
  endtask

  task automatic put_bank(input logic [127:0] b, input bit last);
    for (int i = 0; i < 4; i++) put(b[127-32*i -: 32], 0, last && i == 3);
  endtask

  task automatic drain();
    int idle;
    idle = 0;
    while (idle < 200) begin
      @(posedge clk);
      if (out_hot || exp_aes.size() || exp_s1.size() || exp_s2.size()) idle = 0;
      else idle++;
    end
    #1;
  endtask

  function automatic int count_gap(ref int q [$], input int v);
    int n;
    n = 0;
    foreach (q[i]) if (q[i] == v) n++;
    return n;
  endfunction

  initial begin
    logic [127:0] akey, chainv;
    logic [159:0] h1;
    logic [511:0] h2;
    logic [127:0] banks [24];
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;

    // 1. "abc", both hashes (SHA-512 sees one block, SHA-1 only the first)
    sha1_en = 1; sha2_en = 0;
    exp_s1.push_back(SHA1_ABC);
    for (int b = 0; b < 4; b++) put_bank(sha1_abc_block()[511-128*b -: 128], b == 3);
    drain();
    sha1_en = 0; sha2_en = 1;
    exp_s2.push_back(SHA512_ABC);
    for (int b = 0; b < 8; b++) put_bank(sha512_abc_block()[1023-128*b -: 128], b == 7);
    drain();
    chk(n_s1_out == 1 && n_s2_out == 1, "abc digests");

    // 2. CBC, SP 800-38A
    sha2_en = 0; aes_en = 1; mode = 1;
    load_key(AES_KEY_B, CBC_IV);
    exp_aes.push_back(CBC_C1);
    exp_aes.push_back(CBC_C2);
    put_bank(CBC_P1, 0);
    put_bank(CBC_P2, 1);
    drain();
    chk(n_aes_out == 2, "CBC blocks");
    // CBC continues from C2 with random data and a new IV after a key reload
    akey = rand128(); chainv = rand128();
    load_key(akey, chainv);
    for (int i = 0; i < 6; i++) begin
      banks[i] = rand128();
      chainv = ref_aes(akey, banks[i] ^ chainv);
      exp_aes.push_back(chainv);
      put_bank(banks[i], i == 5);
    end
    drain();

    // 3. all three, ECB, 24 banks, random send
    mode = 0; sha1_en = 1; sha2_en = 1; random_send = 1;
    akey = rand128();
    load_key(akey, '0);
    for (int i = 0; i < 24; i++) begin
      banks[i] = rand128();
      exp_aes.push_back(ref_aes(akey, banks[i]));
    end
    h1 = sha1_init(); h2 = sha512_init();
    for (int g = 0; g < 6; g++) h1 = ref_sha1(h1, {banks[4*g], banks[4*g+1], banks[4*g+2], banks[4*g+3]});
    for (int g = 0; g < 3; g++)
      h2 = ref_sha512(h2, {banks[8*g], banks[8*g+1], banks[8*g+2], banks[8*g+3],
                           banks[8*g+4], banks[8*g+5], banks[8*g+6], banks[8*g+7]});
    exp_s1.push_back(h1); exp_s2.push_back(h2);
    for (int i = 0; i < 24; i++) put_bank(banks[i], i == 23);
    drain();
    random_send = 0;

    // 4. AES alone, streaming
    sha1_en = 0; sha2_en = 0;
    aes_gap.delete();
    for (int i = 0; i < 16; i++) begin
      banks[i] = rand128();
      exp_aes.push_back(ref_aes(akey, banks[i]));
      put_bank(banks[i], i == 15);
    end
    drain();
    chk(count_gap(aes_gap, 10) >= 12, "AES-128 block every 10 cycles");
    foreach (aes_gap[i]) if (i > 0) chk(aes_gap[i] >= 10, "AES-128 never faster than 10 cycles");

    // 5. SHA-1 alone, SHA-512 alone, streaming
    aes_en = 0; sha1_en = 1;
    s1_gap.delete();
    h1 = sha1_init();
    for (int g = 0; g < 4; g++) begin
      for (int i = 0; i < 4; i++) banks[4*g+i] = rand128();
      h1 = ref_sha1(h1, {banks[4*g], banks[4*g+1], banks[4*g+2], banks[4*g+3]});
    end
    exp_s1.push_back(h1);
    for (int i = 0; i < 16; i++) put_bank(banks[i], i == 15);
    drain();
    chk(count_gap(s1_gap, 40) == 3, "SHA-1 block every 40 cycles");
    sha1_en = 0; sha2_en = 1;
    s2_gap.delete();
    h2 = sha512_init();
    for (int g = 0; g < 3; g++) begin
      for (int i = 0; i < 8; i++) banks[8*g+i] = rand128();
      h2 = ref_sha512(h2, {banks[8*g], banks[8*g+1], banks[8*g+2], banks[8*g+3],
                           banks[8*g+4], banks[8*g+5], banks[8*g+6], banks[8*g+7]});
    end
    exp_s2.push_back(h2);
    for (int i = 0; i < 24; i++) put_bank(banks[i], i == 23);
    drain();
    chk(count_gap(s2_gap, 80) == 2, "SHA-512 block every 80 cycles");

    chk(exp_aes.size() == 0 && exp_s1.size() == 0 && exp_s2.size() == 0, "every result seen");
    $display("mechanisms: key words %0d, AES blocks %0d (CBC %0d), SHA-1 blocks %0d, SHA-512 blocks %0d",
             n_key, n_aes_start, n_cbc, n_s1_start, n_s2_start);
    $display("            digests SHA-1 %0d SHA-512 %0d, back-pressure %0d, halt %0d, port wait %0d, core hold %0d",
             n_s1_out, n_s2_out, n_backpressure, n_halt, n_wait_port, n_core_hold);
    chk(n_key > 0, "key loading happened");
    chk(n_cbc > 0 && n_aes_start > n_cbc, "ECB and CBC happened");
    chk(n_s1_start > 0 && n_s2_start > 0 && n_s1_out > 0 && n_s2_out > 0, "hash blocks and digests happened");
    chk(n_backpressure > 0, "input back-pressure happened");
    chk(n_halt > 0, "halt happened");
    chk(n_wait_port > 0, "result waiting for the ports happened");
    chk(n_core_hold > 0, "core hold happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
