// tb_padding_unit: random word writes against a testbench copy of the eight
// banks, checking the whole 1024-bit read view after every write.
module tb_padding_unit;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [2:0] bank = 0;
  logic [1:0] word = 0;
  logic [31:0] wdata = 0;
  logic [1023:0] data, model;

  padding_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word once in order, then random traffic
    for (int i = 0; i < 32; i++) begin
      we = 1; bank = 3'(i / 4); word = 2'(i % 4); wdata = $urandom;
      model[1023-32*i -: 32] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    checks++; if (data !== model) failures++;
    for (int n = 0; n < 500; n++) begin
      we = ($urandom % 3) != 0; bank = 3'($urandom); word = 2'($urandom); wdata = $urandom;
      if (we) model[1023-32*(4*int'(bank)+int'(word)) -: 32] = wdata;
      @(posedge clk); #1;
      checks++;
      if (data !== model) begin failures++; $display("mismatch after write %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
