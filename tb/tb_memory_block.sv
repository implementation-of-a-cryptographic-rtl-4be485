// tb_memory_block: reset contents (initialization constants in the chaining
// registers), key and IV word loading, chaining-value write-back, and the
// padding-unit view.
module tb_memory_block;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic pad_we = 0, key_we = 0, chain_we = 0, h1_we = 0, h512_we = 0;
  logic [2:0] pad_bank = 0, key_idx = 0;
  logic [1:0] pad_word = 0;
  logic [31:0] pad_wdata = 0, key_wdata = 0;
  logic [1023:0] pad_data;
  logic [127:0] aes_key, chain, chain_wdata = '0;
  logic [159:0] h1, h1_init, h1_wdata = '0;
  logic [511:0] h512, h512_init, h512_wdata = '0;

  memory_block dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s", what); end
  endtask

  initial begin
    logic [127:0] k, iv;
    logic [159:0] v1;
    logic [511:0] v2;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    chk(h1 === 160'h67452301efcdab8998badcfe10325476c3d2e1f0, "SHA-1 initial value");
    chk(h512[511:448] === 64'h6a09e667f3bcc908 && h512[63:0] === 64'h5be0cd19137e2179,
        "SHA-512 initial value");
    chk(h1_init === h1 && h512_init === h512, "init constants");
    // key then IV, word by word
    k = AES_KEY_B; iv = CBC_IV;
    for (int i = 0; i < 8; i++) begin
      key_we = 1; key_idx = 3'(i);
      key_wdata = (i < 4) ? k[127-32*i -: 32] : iv[127-32*(i-4) -: 32];
      @(posedge clk); #1;
    end
    key_we = 0;
    chk(aes_key === k, "cipher key");
    chk(chain === iv, "IV");
    chain_wdata = rand128(); chain_we = 1;
    @(posedge clk); #1; chain_we = 0;
    chk(chain === chain_wdata && aes_key === k, "chaining value write");
    v1 = {rand128(), 32'h0bad_cafe}; v2 = {rand128(), rand128(), rand128(), rand128()};
    h1_wdata = v1; h512_wdata = v2; h1_we = 1; h512_we = 1;
    @(posedge clk); #1; h1_we = 0; h512_we = 0;
    chk(h1 === v1 && h512 === v2 && aes_key === k && chain === chain_wdata, "chaining values");
    h1_wdata = h1_init; h512_wdata = h512_init; h1_we = 1; h512_we = 1;
    @(posedge clk); #1; h1_we = 0; h512_we = 0;
    chk(h1 === h1_init && h512 === h512_init, "re-initialisation");
    for (int i = 0; i < 32; i++) begin
      pad_we = 1; pad_bank = 3'(i / 4); pad_word = 2'(i % 4); pad_wdata = 32'(i * 32'h01010101);
      @(posedge clk); #1;
    end
    pad_we = 0;
    for (int i = 0; i < 32; i++) chk(pad_data[1023-32*i -: 32] === 32'(i * 32'h01010101), "padding unit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
