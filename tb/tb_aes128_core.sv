// tb_aes128_core: the AES-128 round datapath with round keys supplied by the
// testbench from the reference expansion. Checks the FIPS-197 vectors and
// random blocks, the 10+1 cycle latency, one block accepted every 10 cycles
// when blocks are offered back to back, and the hold in round 10 while
// out_ready is low.
module tb_aes128_core;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, start = 0, out_ready = 1;
  logic [127:0] block_in = '0, key0 = '0, rk;
  logic can_start, ks_load, ks_step, ct_fire, ct_valid;
  logic [3:0] round;
  logic [127:0] ct_now, ct;
  logic [127:0] ref_rk [11];

  aes128_core dut (.*);
  always #5 clk = ~clk;
  always_comb rk = (round <= 4'd10) ? ref_rk[round] : '0;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected ciphertexts, in order
  logic [127:0] exp_q [$];
  int unsigned cyc = 0, last_start = 0, start_cyc [$];
  always @(negedge clk) cyc++;

  always @(posedge clk) begin
    if (rst_n && ct_valid) begin
      logic [127:0] e;
      int unsigned sc;
      e = exp_q.pop_front();
      sc = start_cyc.pop_front();
      checks++;
      if (ct !== e) begin
        failures++;
        $display("ct %h expected %h", ct, e);
      end
      if (out_ready_hist == 0) begin
        checks++;
        if (cyc - sc != 11) begin
          failures++;
          $display("latency %0d, expected 11", cyc - sc);
        end
      end
    end
  end
  int out_ready_hist = 0;

  task automatic offer(input logic [127:0] pt);
    start = 1; block_in = pt;
    while (!can_start) begin @(posedge clk); #1; end
    exp_q.push_back(ref_aes(key0, pt));
    start_cyc.push_back(cyc + 1);  // start is taken at the coming edge
    if (last_start != 0) begin
      checks++;
      if (cyc - last_start != 10) begin
        failures++;
        $display("start interval %0d, expected 10", cyc - last_start);
      end
    end
    last_start = cyc;
    @(posedge clk); #1;
    start = 0;
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    key0 = AES_KEY_C1; ref_key_expand(key0, ref_rk);
    checks++; if (ref_aes(AES_KEY_C1, AES_PT_C1) !== AES_CT_C1) failures++;
    checks++; if (ref_aes(AES_KEY_B, AES_PT_B) !== AES_CT_B) failures++;
    offer(AES_PT_C1);
    for (int i = 0; i < 8; i++) offer(rand128());
    repeat (12) @(posedge clk); #1;
    last_start = 0;
    key0 = AES_KEY_B; ref_key_expand(key0, ref_rk);
    offer(AES_PT_B);
    // hold round 10 for a while
    out_ready = 0; out_ready_hist = 1;
    repeat (20) @(posedge clk); #1;
    checks++; if (ct_valid || can_start) failures++;
    out_ready = 1;
    repeat (3) @(posedge clk); #1;
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
