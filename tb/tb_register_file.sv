// tb_register_file: reset values and random per-word writes against a
// testbench model of the 32 words.
module tb_register_file;
  int checks = 0, failures = 0;
  localparam logic [1023:0] RV = {32{32'h5a5a0000}} ^ {992'h0, 32'h1234};
  logic clk = 0, rst_n = 1;
  logic [31:0] we = '0;
  logic [1023:0] wdata = '0, rdata, model;

  register_file #(.WORDS(32), .RESET_VAL(RV)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    checks++; if (rdata !== RV) begin failures++; $display("reset value"); end
    model = RV;
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      we = $urandom & $urandom;
      for (int i = 0; i < 32; i++) begin
        wdata[32*i +: 32] = $urandom;
        if (we[i]) model[32*i +: 32] = wdata[32*i +: 32];
      end
      @(posedge clk); #1;
      checks++;
      if (rdata !== model) begin failures++; $display("mismatch after write %0d: %h vs %h", n, rdata ^ model, we); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
