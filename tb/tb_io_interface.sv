// tb_io_interface: key and IV words reach the key port with the right index
// (4 words in ECB, 8 in CBC), data words reach the control unit, and results
// leave in the documented beat order and priority (AES-128, then SHA-1, then
// SHA-512) with the OUT flags set. Holding send low halts the output, raises
// halt and drops ready; a result arriving while its holding register is full
// is refused through out_ready.
module tb_io_interface;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic [31:0] data_in = 0;
  logic in_valid = 0, key = 0, in_last = 0, mode = 0, ready, send = 1;
  logic out_hot, out_aes, out_sha12;
  logic [31:0] data_out, sha_out;
  logic cu_in_ready = 1, halt, data_fire, data_last, key_we;
  logic [31:0] data_word, key_wdata;
  logic [2:0] key_idx;
  logic aes_fire = 0, s1_fire = 0, s2_fire = 0;
  logic [127:0] aes_ct = '0;
  logic [159:0] s1_digest = '0;
  logic [511:0] s2_digest = '0;
  logic aes_out_ready, s1_out_ready, s2_out_ready;

  io_interface dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s at %0t", what, $time); end
  endtask

  // collect output beats
  logic [31:0] got_d [$], got_s [$];
  logic [1:0]  got_src [$];
  always @(posedge clk) if (rst_n && out_hot && send) begin
    got_d.push_back(data_out);
    got_s.push_back(sha_out);
    got_src.push_back(out_aes ? 2'd1 : out_sha12 ? 2'd3 : 2'd2);
  end

  initial begin
    logic [127:0] ct;
    logic [159:0] d1;
    logic [511:0] d2;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // CBC: 8 key words, then 4 ECB key words
    mode = 1; key = 1; in_valid = 1;
    for (int i = 0; i < 12; i++) begin
      if (i == 8) mode = 0;
      data_in = 32'h100 + 32'(i);
      #1;
      chk(ready && key_we && !data_fire && key_idx == 3'(i < 8 ? i : i - 8) && key_wdata == data_in, "key word");
      @(posedge clk); #1;
    end
    key = 0; data_in = 32'hdead0001; in_last = 1; #1;
    chk(data_fire && !key_we && data_word == 32'hdead0001 && data_last, "data word");
    cu_in_ready = 0; #1;
    chk(!ready && !data_fire, "ready follows the control unit");
    in_valid = 0; in_last = 0; cu_in_ready = 1;
    // three results at once
    ct = rand128(); d1 = {rand128(), 32'h12345678}; d2 = {rand128(), rand128(), rand128(), rand128()};
    aes_ct = ct; s1_digest = d1; s2_digest = d2;
    aes_fire = 1; s1_fire = 1; s2_fire = 1;
    @(posedge clk); #1;
    aes_fire = 0; s1_fire = 0; s2_fire = 0;
    chk(!aes_out_ready && !s1_out_ready && !s2_out_ready, "holding registers full");
    // halt for a few cycles in the middle of the SHA-512 digest
    wait (out_sha12 && out_hot);
    @(posedge clk); #1;
    send = 0; #1;
    chk(halt && !ready, "halt while send is low");
    repeat (5) @(posedge clk); #1;
    send = 1;
    repeat (30) @(posedge clk); #1;
    chk(got_d.size() == 15, "beat count");
    for (int i = 0; i < 4; i++) chk(got_src[i] == 2'd1 && got_d[i] == ct[127-32*i -: 32] && got_s[i] == 0, "AES beats");
    for (int i = 0; i < 3; i++) begin
      chk(got_src[4+i] == 2'd2 && got_d[4+i] == d1[159-64*i -: 32], "SHA-1 beats");
      chk(got_s[4+i] == ((i < 2) ? d1[127-64*i -: 32] : 32'h0), "SHA-1 second port");
    end
    for (int i = 0; i < 8; i++)
      chk(got_src[7+i] == 2'd3 && {got_d[7+i], got_s[7+i]} == d2[511-64*i -: 64], "SHA-512 beats");
    chk(aes_out_ready && s1_out_ready && s2_out_ready && !out_hot, "all sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
