// tb_sha512_k_rom: table entries against values printed in FIPS 180-2, the
// zero beyond entry 79, and that all 80 entries differ.
module tb_sha512_k_rom;
  int checks = 0, failures = 0;
  logic [6:0]  t;
  logic [63:0] k;
  logic [63:0] seen [80];

  sha512_k_rom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_k(input int i, input logic [63:0] v);
    t = 7'(i); #1;
    checks++;
    if (k !== v) begin failures++; $display("K%0d = %h expected %h", i, k, v); end
  endtask

  initial begin
    expect_k(0,  64'h428a2f98d728ae22);
    expect_k(1,  64'h7137449123ef65cd);
    expect_k(2,  64'hb5c0fbcfec4d3b2f);
    expect_k(8,  64'hd807aa98a3030242);
    expect_k(40, 64'ha2bfe8a14cf10364);
    expect_k(78, 64'h5fcb6fab3ad6faec);
    expect_k(79, 64'h6c44198c4a475817);
    expect_k(80, 64'h0);
    expect_k(127, 64'h0);
    for (int i = 0; i < 80; i++) begin t = 7'(i); #1; seen[i] = k; end
    for (int i = 0; i < 80; i++)
      for (int j = i + 1; j < 80; j++) begin
        checks++;
        if (seen[i] == seen[j]) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
