// tb_control_unit: the control unit with a host that writes whenever it may
// and three model cores that stay busy 10, 40 and 80 cycles per start. Every
// committed bank gets a sequence number; each start must take the next
// sequence numbers of its core (AES one bank, SHA-1 four, SHA-512 eight) and
// see the right last flag, so a bank overwritten too early or taken out of
// order shows. Also checks that nothing moves while halted or with every
// core disabled, and that the pointers return to 0 once drained.
module tb_control_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic aes_en = 0, sha1_en = 0, sha2_en = 0, halt = 0;
  logic in_fire = 0, in_last = 0, in_ready;
  logic [2:0] wr_bank, aes_bank;
  logic [1:0] wr_word;
  logic aes_can_start, aes_start, s1_can_start, s1_start, s1_group, s1_last;
  logic s2_can_start, s2_start, s2_last;

  control_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s at %0t", what, $time); end
  endtask

  // model cores
  int aes_busy = 0, s1_busy = 0, s2_busy = 0;
  assign aes_can_start = (aes_busy <= 1);
  assign s1_can_start  = (s1_busy <= 1);
  assign s2_can_start  = (s2_busy <= 1);

  int seq_of [8];
  bit last_of [8];
  int next_seq = 0, aes_seq = 0, s1_seq = 0, s2_seq = 0, total = 0, last_seq = -1;
  int n_aes = 0, n_s1 = 0, n_s2 = 0, n_halt = 0;

  always @(posedge clk) if (rst_n) begin
    if (aes_busy > 0) aes_busy <= aes_busy - 1;
    if (s1_busy > 0)  s1_busy  <= s1_busy - 1;
    if (s2_busy > 0)  s2_busy  <= s2_busy - 1;
    if (halt) begin
      chk(!aes_start && !s1_start && !s2_start && !in_ready, "halt");
      n_halt++;
    end
    if (in_fire) chk(in_ready, "write while not ready");
    if (in_fire && wr_word == 2'd3) begin
      seq_of[wr_bank] = next_seq;
      last_of[wr_bank] = in_last;
      next_seq++;
    end
    if (aes_start) begin
      chk(seq_of[aes_bank] == aes_seq, "AES bank order");
      aes_seq++; n_aes++;
      aes_busy <= 10;
    end
    if (s1_start) begin
      for (int i = 0; i < 4; i++)
        chk(seq_of[4*s1_group+i] == s1_seq + i, "SHA-1 group");
      chk(s1_last == (s1_seq + 3 == last_seq), "SHA-1 last flag");
      s1_seq += 4; n_s1++;
      s1_busy <= 40;
    end
    if (s2_start) begin
      for (int i = 0; i < 8; i++) chk(seq_of[i] == s2_seq + i, "SHA-512 block");
      chk(s2_last == (s2_seq + 7 == last_seq), "SHA-512 last flag");
      s2_seq += 8; n_s2++;
      s2_busy <= 80;
    end
  end

  // host: writes one word per cycle whenever ready, `banks` banks in all
  task automatic host(input int banks);
    int words;
    words = 0;
    last_seq = next_seq + banks - 1;
    while (words < 4 * banks) begin
      in_fire = in_ready;
      in_last = (words == 4 * banks - 1);
      halt = ($urandom % 16 == 0);
      if (halt) in_fire = 0;
      @(posedge clk);
      if (in_fire) words++;
      #1;
    end
    in_fire = 0; in_last = 0; halt = 0;
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    chk(!in_ready, "disabled: not ready");
    aes_en = 1; sha1_en = 1; sha2_en = 1;
    #1;
    host(24);
    repeat (300) @(posedge clk); #1;
    chk(aes_seq == 24 && s1_seq == 24 && s2_seq == 24, "all banks consumed");
    chk(wr_bank == 0 && aes_bank == 0 && !s1_group, "pointers back to 0");
    // SHA-1 only, then AES only
    aes_en = 0; sha2_en = 0;
    aes_seq = next_seq; s2_seq = next_seq;
    host(12);
    repeat (200) @(posedge clk); #1;
    chk(s1_seq == next_seq, "SHA-1 alone");
    sha1_en = 0; aes_en = 1;
    s1_seq = next_seq; aes_seq = next_seq;
    host(11);
    repeat (100) @(posedge clk); #1;
    chk(aes_seq == next_seq, "AES alone");
    chk(n_halt > 0 && n_aes == 35 && n_s1 == 9 && n_s2 == 3, "event counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
