// tb_hssec_throughput: the co-processor's headline workload -- AES-128,
// SHA-1 and SHA-512 working in parallel on one long message at the full
// rate of 128 bits per 10 cycles each.
//
// A 64-bank (8 kbit) message is streamed with all three engines enabled, once
// in ECB and once in CBC, with the host always ready to take results. Every
// ciphertext and both digests are compared with the reference models, and
// the steady-state intervals between engine starts must be exactly 10 (AES),
// 40 (SHA-1) and 80 (SHA-512) cycles, i.e. 12.8 bits per cycle for each
// engine. The elapsed cycles from the first data word to the last SHA-512
// start are also bounded.
module tb_hssec_throughput;
  import tb_ref_pkg::*;
  localparam int BANKS = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic aes_en = 0, sha1_en = 0, sha2_en = 0, mode = 0, key = 0;
  logic [31:0] data_in = 0;
  logic in_valid = 0, in_last = 0, ready, send = 1;
  logic out_hot, out_aes, out_sha12;
  logic [31:0] data_out, sha_out;

  hssec_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s at %0t", what, $time); end
  endtask

  logic [127:0] exp_aes [$];
  logic [159:0] exp_s1 [$];
  logic [511:0] exp_s2 [$];
  logic [511:0] acc;
  int beat = 0;
  always @(posedge clk) if (rst_n && out_hot && send) begin
    if (out_aes) begin
      acc = {acc[479:0], data_out};
      if (++beat == 4) begin
        chk(exp_aes.size() > 0 && acc[127:0] === exp_aes[0], "ciphertext");
        if (exp_aes.size() > 0) void'(exp_aes.pop_front());
        beat = 0;
      end
    end else begin
      acc = {acc[447:0], data_out, sha_out};
      if (!out_sha12 && ++beat == 3) begin
        chk(exp_s1.size() > 0 && acc[191:32] === exp_s1[0], "SHA-1 digest");
        if (exp_s1.size() > 0) void'(exp_s1.pop_front());
        beat = 0;
      end else if (out_sha12 && ++beat == 8) begin
        chk(exp_s2.size() > 0 && acc === exp_s2[0], "SHA-512 digest");
        if (exp_s2.size() > 0) void'(exp_s2.pop_front());
        beat = 0;
      end
    end
  end

  int cyc = 0, last_aes = 0, last_s1 = 0, last_s2 = 0;
  int aes_gap [$], s1_gap [$], s2_gap [$];
  always @(negedge clk) cyc++;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cu.aes_start) begin aes_gap.push_back(cyc - last_aes); last_aes = cyc; end
    if (dut.u_cu.s1_start)  begin s1_gap.push_back(cyc - last_s1);   last_s1 = cyc;  end
    if (dut.u_cu.s2_start)  begin s2_gap.push_back(cyc - last_s2);   last_s2 = cyc;  end
  end

  task automatic put(input logic [31:0] w, input bit is_key, input bit last);
    data_in = w; key = is_key; in_last = last; in_valid = 1;
    @(posedge clk);
    while (!ready) @(posedge clk);
    #1;
    in_valid = 0; key = 0; in_last = 0;
  endtask

  task automatic run(input bit cbc);
    logic [127:0] akey, iv, chainv;
    logic [127:0] banks [BANKS];
    logic [159:0] h1;
    logic [511:0] h2;
    int t0, steady;
    mode = cbc;
    akey = rand128(); iv = rand128();
    for (int i = 0; i < 4; i++) put(akey[127-32*i -: 32], 1, 0);
    if (cbc) for (int i = 0; i < 4; i++) put(iv[127-32*i -: 32], 1, 0);
    chainv = iv;
    for (int i = 0; i < BANKS; i++) begin
      banks[i] = rand128();
      if (cbc) begin
        chainv = ref_aes(akey, banks[i] ^ chainv);
        exp_aes.push_back(chainv);
      end else begin
        exp_aes.push_back(ref_aes(akey, banks[i]));
      end
    end
    h1 = sha1_init(); h2 = sha512_init();
    for (int g = 0; g < BANKS / 4; g++)
      h1 = ref_sha1(h1, {banks[4*g], banks[4*g+1], banks[4*g+2], banks[4*g+3]});
    for (int g = 0; g < BANKS / 8; g++)
      h2 = ref_sha512(h2, {banks[8*g], banks[8*g+1], banks[8*g+2], banks[8*g+3],
                           banks[8*g+4], banks[8*g+5], banks[8*g+6], banks[8*g+7]});
    exp_s1.push_back(h1); exp_s2.push_back(h2);
    aes_gap.delete(); s1_gap.delete(); s2_gap.delete();
    t0 = cyc;
    // keep in_valid high; the core paces the stream with ready
    for (int i = 0; i < BANKS; i++)
      for (int w = 0; w < 4; w++) begin
        data_in = banks[i][127-32*w -: 32]; in_valid = 1; in_last = (i == BANKS - 1 && w == 3);
        @(posedge clk);
        while (!ready) @(posedge clk);
        #1;
      end
    in_valid = 0; in_last = 0;
    while (s2_gap.size() < BANKS / 8) @(posedge clk);
    #1;
    $display("%s: %0d bits in %0d cycles to the last SHA-512 start", cbc ? "CBC" : "ECB",
             128 * BANKS, last_s2 - t0);
    chk(last_s2 - t0 <= 10 * BANKS, "elapsed cycles within 10 per 128 bits");
    repeat (300) @(posedge clk); #1;
    // drop the first interval of each engine (time since the previous run)
    steady = 0;
    foreach (aes_gap[i]) if (i > 0) begin chk(aes_gap[i] == 10, "AES interval 10"); steady++; end
    foreach (s1_gap[i])  if (i > 0) chk(s1_gap[i] == 40, "SHA-1 interval 40");
    foreach (s2_gap[i])  if (i > 0) chk(s2_gap[i] == 80, "SHA-512 interval 80");
    chk(steady == BANKS - 1 && s1_gap.size() == BANKS / 4, "block counts");
    chk(exp_aes.size() == 0 && exp_s1.size() == 0 && exp_s2.size() == 0, "every result seen");
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    aes_en = 1; sha1_en = 1; sha2_en = 1;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
