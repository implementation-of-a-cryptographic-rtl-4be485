// tb_aes_key_expansion: round keys 1..10 for the FIPS-197 key and for random
// keys, against the reference expansion; also a reload in mid-sequence.
module tb_aes_key_expansion;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, load = 0, step = 0;
  logic [3:0] round = 0;
  logic [127:0] key0 = '0, rk;
  logic [127:0] ref_rk [11];

  aes_key_expansion dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_key(input logic [127:0] k, input int stop_at);
    ref_key_expand(k, ref_rk);
    key0 = k;
    load = 1; round = 0;
    @(posedge clk); #1;
    load = 0;
    for (int r = 1; r <= stop_at; r++) begin
      checks++;
      if (rk !== ref_rk[r]) begin
        failures++;
        $display("key %h round %0d: %h expected %h", k, r, rk, ref_rk[r]);
      end
      round = 4'(r);
      step  = (r < 10);
      @(posedge clk); #1;
      step = 0;
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run_key(AES_KEY_B, 10);
    checks++; if (ref_rk[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
    run_key(rand128(), 5);     // abandoned half way
    for (int i = 0; i < 20; i++) run_key(rand128(), 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
