// tb_key_scheduler: the three operand generators driven at the same time as
// the cores would drive them: AES round keys 1..10, SHA-1 W_t pairs with K_t,
// SHA-512 W_t+1 with K_t+1 (one round ahead), all against the reference models.
module tb_key_scheduler;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic aes_load = 0, aes_step = 0, s1_load = 0, s1_step = 0, s2_load = 0, s2_step = 0;
  logic [3:0] aes_round = 0;
  logic [5:0] s1_cyc = 0;
  logic [6:0] s2_cyc = 0;
  logic [127:0] aes_key0 = '0, aes_rk;
  logic [511:0] s1_block = '0;
  logic [1023:0] s2_block = '0;
  logic [31:0] s1_w0, s1_w1, s1_k;
  logic [63:0] s2_w_next, s2_k_next;
  logic [127:0] rk [11];

  key_scheduler dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s", what); end
  endtask

  initial begin
    logic [511:0] b1;
    logic [1023:0] b2;
    logic [31:0] k1;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3; n++) begin
      aes_key0 = rand128();
      ref_key_expand(aes_key0, rk);
      b1 = {rand128(), rand128(), rand128(), rand128()};
      for (int i = 0; i < 8; i++) b2[128*i +: 128] = rand128();
      s1_block = b1; s2_block = b2;
      aes_load = 1; s1_load = 1; s2_load = 1;
      @(posedge clk); #1;
      aes_load = 0; s1_load = 0; s2_load = 0;
      for (int c = 0; c < 80; c++) begin
        // AES restarts every 10 cycles, SHA-1 every 40
        aes_round = 4'(c % 10 + 1);
        s1_cyc = 6'(c % 40);
        s2_cyc = 7'(c);
        #1;
        chk(aes_rk === rk[c % 10 + 1], "aes round key");
        chk(s1_w0 === ref_sha1_w(b1, 2 * (c % 40)), "sha1 w0");
        chk(s1_w1 === ref_sha1_w(b1, 2 * (c % 40) + 1), "sha1 w1");
        k1 = (c % 40 < 10) ? 32'h5a827999 : (c % 40 < 20) ? 32'h6ed9eba1 :
             (c % 40 < 30) ? 32'h8f1bbcdc : 32'hca62c1d6;
        chk(s1_k === k1, "sha1 k");
        if (c < 79) begin
          chk(s2_w_next === ref_sha512_w(b2, c + 1), "sha512 w");
          chk(s2_k_next === hssec_pkg::SHA512_K[c + 1], "sha512 k");
        end
        aes_step = (c % 10 != 9);
        aes_load = (c % 10 == 9);
        s1_step  = (c % 40 != 39);
        s1_load  = (c % 40 == 39);
        s2_step  = 1;
        @(posedge clk); #1;
        aes_step = 0; aes_load = 0; s1_step = 0; s1_load = 0; s2_step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
