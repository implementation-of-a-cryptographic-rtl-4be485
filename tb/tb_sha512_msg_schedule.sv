// tb_sha512_msg_schedule: W_1..W_79 one per cycle (one word ahead) for random blocks, against
// the reference schedule.
module tb_sha512_msg_schedule;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, load = 0, step = 0;
  logic [1023:0] block = '0;
  logic [63:0] w_next;

  sha512_msg_schedule dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      logic [1023:0] b;
      for (int i = 0; i < 8; i++) b[128*i +: 128] = rand128();
      if (n == 0) b = sha512_abc_block();
      block = b; load = 1;
      @(posedge clk); #1;
      load = 0; block = '0;
      for (int t = 0; t < 79; t++) begin
        checks++;
        if (w_next !== ref_sha512_w(b, t + 1)) begin failures++; $display("W%0d %h", t + 1, w_next); end
        step = 1;
        @(posedge clk); #1;
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
