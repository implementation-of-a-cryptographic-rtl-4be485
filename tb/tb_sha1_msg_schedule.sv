// tb_sha1_msg_schedule: W_0..W_79 two per cycle for random blocks, against
// the reference schedule; a new block may be loaded at any time.
module tb_sha1_msg_schedule;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, load = 0, step = 0;
  logic [511:0] block = '0;
  logic [31:0] w0, w1;

  sha1_msg_schedule dut (.*);
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
    for (int n = 0; n < 6; n++) begin
      logic [511:0] b;
      b = {rand128(), rand128(), rand128(), rand128()};
      if (n == 0) b = sha1_abc_block();
      block = b; load = 1;
      @(posedge clk); #1;
      load = 0; block = '0;
      for (int c = 0; c < 40; c++) begin
        checks += 2;
        if (w0 !== ref_sha1_w(b, 2*c))   begin failures++; $display("W%0d %h", 2*c, w0); end
        if (w1 !== ref_sha1_w(b, 2*c+1)) begin failures++; $display("W%0d %h", 2*c+1, w1); end
        step = 1;
        @(posedge clk); #1;
        step = 0;
        if (c == 7) begin @(posedge clk); #1; end   // an idle cycle holds the window
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
