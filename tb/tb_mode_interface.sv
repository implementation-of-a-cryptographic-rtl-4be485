// tb_mode_interface: ECB passes the bank through; CBC xors it with the stored
// chaining value, or with the ciphertext of the same cycle when one is being
// produced; the chaining value is written only in CBC. Includes the
// SP 800-38A first-block input (P1 xor IV).
module tb_mode_interface;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic mode, ct_fire, chain_we;
  logic [127:0] bank, chain, ct_now, aes_in, chain_wdata;

  mode_interface dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = 1; bank = CBC_P1; chain = CBC_IV; ct_fire = 0; ct_now = '0; #1;
    checks++; if (aes_in !== 128'h6bc0bce12a459991e134741a7f9e1925) failures++;
    for (int n = 0; n < 200; n++) begin
      mode = 1'($urandom); ct_fire = 1'($urandom);
      bank = rand128(); chain = rand128(); ct_now = rand128();
      #1;
      checks += 3;
      if (aes_in !== (mode ? bank ^ (ct_fire ? ct_now : chain) : bank)) failures++;
      if (chain_we !== (mode && ct_fire)) failures++;
      if (chain_we && chain_wdata !== ct_now) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
