// tb_sha1_core: the SHA-1 compression core with W_t and K_t supplied by the
// testbench from the reference model and the chaining value held in a
// testbench register (as the register file does). Checks the FIPS 180-2
// "abc" digest, random multi-block messages against the reference, blocks
// accepted every 40 cycles back to back, the return to the initial value
// after a message, and the wait while out_ready is low.
module tb_sha1_core;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, start = 0, last_in = 0, out_ready = 1;
  logic [159:0] h_in, h_init, h_out;
  logic [31:0] w0, w1, k;
  logic can_start, ws_load, ws_step, done, done_last;
  logic [5:0] cyc;
  logic [511:0] blk_q, next_blk = '0;

  sha1_core dut (.*);
  always #5 clk = ~clk;

  assign h_init = sha1_init();
  always_comb begin
    w0 = ref_sha1_w(blk_q, 2 * int'(cyc));
    w1 = ref_sha1_w(blk_q, 2 * int'(cyc) + 1);
    k  = (cyc < 10) ? 32'h5a827999 : (cyc < 20) ? 32'h6ed9eba1 :
         (cyc < 30) ? 32'h8f1bbcdc : 32'hca62c1d6;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_in  <= sha1_init();
      blk_q <= '0;
    end else begin
      if (done)    h_in  <= done_last ? h_init : h_out;
      if (ws_load) blk_q <= next_blk;
    end
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ncyc = 0, last_load = 0;
  logic [159:0] digest_q [$];
  always @(negedge clk) ncyc++;
  always @(posedge clk) begin
    if (rst_n && done_last) begin
      logic [159:0] e;
      e = digest_q.pop_front();
      checks++;
      if (h_out !== e) begin failures++; $display("digest %h expected %h", h_out, e); end
    end
  end

  logic [159:0] model_h;
  bit first_of_msg = 1;
  task automatic send_block(input logic [511:0] b, input bit last, input bit b2b);
    if (first_of_msg) model_h = sha1_init();
    model_h = ref_sha1(model_h, b);
    first_of_msg = last;
    if (last) digest_q.push_back(model_h);
    start = 1; last_in = last; next_blk = b;
    while (!can_start) begin @(posedge clk); #1; end
    if (b2b) begin
      checks++;
      if (ncyc - last_load != 40) begin failures++; $display("block interval %0d", ncyc - last_load); end
    end
    last_load = ncyc;
    @(posedge clk); #1;
    start = 0;
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    checks++; if (ref_sha1(sha1_init(), sha1_abc_block()) !== SHA1_ABC) failures++;
    send_block(sha1_abc_block(), 1, 0);
    for (int m = 0; m < 3; m++)
      for (int i = 0; i < 3; i++)
        send_block({rand128(), rand128(), rand128(), rand128()}, i == 2, 1);
    // digest held back by out_ready
    while (digest_q.size() != 0) begin @(posedge clk); #1; end
    out_ready = 0;
    send_block(sha1_abc_block(), 1, 0);
    repeat (60) @(posedge clk); #1;
    checks++;
    if (digest_q.size() != 1 || can_start) begin
      failures++; $display("stall: %0d digests pending, can_start %b", digest_q.size(), can_start);
    end
    out_ready = 1;
    repeat (3) @(posedge clk); #1;
    checks++;
    if (digest_q.size() != 0) begin failures++; $display("digest missing after stall"); end
    checks++; if (h_in !== sha1_init()) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
