// mode_interface: the AES-128 mode of operation between the padding unit
// and the AES core.
//
// In ECB (mode = 0) a bank is enciphered as it is. In CBC (mode = 1) it is
// first xored with the chaining value: the IV for the first block, afterwards
// the previous ciphertext. Each ciphertext is written back as the new
// chaining value. Because a new block may start in the very cycle the
// previous ciphertext is produced, the ciphertext of that cycle is forwarded
// past the register file.
//
// Interface / timing: purely combinational. chain_wdata is the ciphertext
// of this cycle itself; chain_we decides whether it is stored.
module mode_interface (
  input  logic         mode,       // 0 = ECB, 1 = CBC
  input  logic [127:0] bank,       // plaintext block from the padding unit
  input  logic [127:0] chain,      // chaining value from the register file
  input  logic         ct_fire,    // AES core produces a ciphertext this cycle
  input  logic [127:0] ct_now,
  output logic [127:0] aes_in,     // block handed to the AES core
  output logic         chain_we,
  output logic [127:0] chain_wdata
);

  logic [127:0] chain_eff;

  always_comb begin
    chain_eff   = ct_fire ? ct_now : chain;
    aes_in      = mode ? (bank ^ chain_eff) : bank;
    chain_we    = mode && ct_fire;
    chain_wdata = ct_now;
  end

endmodule
