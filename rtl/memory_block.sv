// memory_block: the shared storage of the co-processor.
//
// Three parts: the padding unit (8 banks x 128 bits of fetched input data),
// the general-purpose register file (2 x 16 x 32 bits) and the initialization
// constants of SHA-1 and SHA-512. The register file is organised as follows
// (this allocation is this implementation's choice):
//   words  0..15  SHA-512 chaining value H0..H7, high word first
//   words 16..20  SHA-1 chaining value H0..H4
//   words 21..24  AES-128 cipher key (round key 0), word 0 first
//   words 25..28  CBC chaining value: the IV, then the last ciphertext
//   words 29..31  spare
// At reset the chaining values hold the initialization constants; a core
// writes them back (through h*_wdata) at the end of each block, and writes
// the constants again after the last block of a message.
//
// Interface / timing: all writes are synchronous; all reads combinational.
// key_we writes one word (key_idx 0..3 = key, 4..7 = IV); chain_we writes the
// CBC value; h1_we / h512_we write a whole chaining value. h1_init and
// h512_init are the initialization-constant part, brought out as constant
// outputs for the cores' start of a message.
module memory_block (
  input  logic          clk,
  input  logic          rst_n,
  // padding unit
  input  logic          pad_we,
  input  logic [2:0]    pad_bank,
  input  logic [1:0]    pad_word,
  input  logic [31:0]   pad_wdata,
  output logic [1023:0] pad_data,
  // key / IV word port
  input  logic          key_we,
  input  logic [2:0]    key_idx,
  input  logic [31:0]   key_wdata,
  output logic [127:0]  aes_key,
  // CBC chaining value
  input  logic          chain_we,
  input  logic [127:0]  chain_wdata,
  output logic [127:0]  chain,
  // SHA-1 chaining value
  input  logic          h1_we,
  input  logic [159:0]  h1_wdata,
  output logic [159:0]  h1,
  output logic [159:0]  h1_init,
  // SHA-512 chaining value
  input  logic          h512_we,
  input  logic [511:0]  h512_wdata,
  output logic [511:0]  h512,
  output logic [511:0]  h512_init
);
  import hssec_pkg::*;

  localparam int unsigned RF_WORDS = 32;
  localparam int unsigned RF_S512  = 0;
  localparam int unsigned RF_SHA1  = 16;
  localparam int unsigned RF_KEY   = 21;
  localparam int unsigned RF_CHAIN = 25;

  // initialization constants
  function automatic logic [RF_WORDS*32-1:0] rf_reset();
    logic [RF_WORDS*32-1:0] v;
    v = '0;
    for (int j = 0; j < 8; j++) begin
      v[32*(RF_S512+2*j)   +: 32] = SHA512_H0[j][63:32];
      v[32*(RF_S512+2*j+1) +: 32] = SHA512_H0[j][31:0];
    end
    for (int j = 0; j < 5; j++) v[32*(RF_SHA1+j) +: 32] = SHA1_H0[j];
    return v;
  endfunction

  localparam logic [RF_WORDS*32-1:0] RF_RESET = rf_reset();

  always_comb begin
    for (int j = 0; j < 8; j++) h512_init[511-64*j -: 64] = SHA512_H0[j];
    for (int j = 0; j < 5; j++) h1_init[159-32*j -: 32]   = SHA1_H0[j];
  end

  // padding unit
  padding_unit #(.NUM_BANKS(NUM_BANKS), .BANK_W(BANK_W)) u_pad (
    .clk, .we(pad_we), .bank(pad_bank), .word(pad_word), .wdata(pad_wdata),
    .data(pad_data));

  // register file write steering
  logic [RF_WORDS-1:0]    rf_we;
  logic [RF_WORDS*32-1:0] rf_wd, rf_rd;

  always_comb begin
    rf_we = '0;
    rf_wd = '0;
    for (int j = 0; j < 16; j++) begin
      rf_we[RF_S512+j]            = h512_we;
      rf_wd[32*(RF_S512+j) +: 32] = h512_wdata[511-32*j -: 32];
    end
    for (int j = 0; j < 5; j++) begin
      rf_we[RF_SHA1+j]            = h1_we;
      rf_wd[32*(RF_SHA1+j) +: 32] = h1_wdata[159-32*j -: 32];
    end
    for (int j = 0; j < 4; j++) begin
      rf_we[RF_CHAIN+j]            = chain_we;
      rf_wd[32*(RF_CHAIN+j) +: 32] = chain_wdata[127-32*j -: 32];
    end
    if (key_we) begin
      rf_we[RF_KEY + 32'(key_idx)]            = 1'b1;
      rf_wd[32*(RF_KEY + 32'(key_idx)) +: 32] = key_wdata;
    end
  end

  register_file #(.WORDS(RF_WORDS), .RESET_VAL(RF_RESET)) u_rf (
    .clk, .rst_n, .we(rf_we), .wdata(rf_wd), .rdata(rf_rd));

  always_comb begin
    for (int j = 0; j < 16; j++) h512[511-32*j -: 32]   = rf_rd[32*(RF_S512+j) +: 32];
    for (int j = 0; j < 5; j++)  h1[159-32*j -: 32]     = rf_rd[32*(RF_SHA1+j) +: 32];
    for (int j = 0; j < 4; j++)  aes_key[127-32*j -: 32] = rf_rd[32*(RF_KEY+j) +: 32];
    for (int j = 0; j < 4; j++)  chain[127-32*j -: 32]   = rf_rd[32*(RF_CHAIN+j) +: 32];
  end

endmodule
