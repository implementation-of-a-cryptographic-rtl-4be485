// hssec_top: HSSec, a cryptographic co-processor that runs AES-128
// encryption (ECB or CBC), SHA-1 and SHA-512 side by side on one input
// stream.
//
// The three cores share one 1024-bit padding unit, one register file and one
// key scheduler, and are kept in step by a single rule: every core consumes
// 128 bits of input per 10 clock cycles. AES-128 enciphers a bank in 10+1
// cycles (a new block every 10), SHA-1 hashes four banks in 40 cycles (two
// rounds per cycle) and SHA-512 eight banks in 80 cycles. Data enter 32 bits
// per cycle, so a bank is fetched in 4 cycles and the input keeps ahead of
// the cores.
//
// Ports (host side):
//   aes_en, sha1_en, sha2_en : enable the cores; with all three low no data is
//                              accepted. Change them only between messages.
//   mode                     : 0 = ECB, 1 = CBC for AES-128.
//   key                      : data_in carries key words (key, then IV in CBC).
//   data_in, in_valid, ready : 32-bit input; a word moves when both are high.
//   in_last                  : with the last data word of a message.
//   send                     : host takes the output beat; low halts the core.
//   out_hot, out_aes, out_sha12, data_out, sha_out : result output (see
//                              io_interface for the beat order).
// Messages for the hash functions must arrive already padded (whole 512- or
// 1024-bit blocks); AES-128 data must be whole 128-bit blocks.
module hssec_top (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        aes_en,
  input  logic        sha1_en,
  input  logic        sha2_en,
  input  logic        mode,
  input  logic        key,
  input  logic [31:0] data_in,
  input  logic        in_valid,
  input  logic        in_last,
  output logic        ready,
  input  logic        send,
  output logic        out_hot,
  output logic        out_aes,
  output logic        out_sha12,
  output logic [31:0] data_out,
  output logic [31:0] sha_out
);

  // I/O interface <-> control unit / memory
  logic        halt, data_fire, data_last, cu_in_ready;
  logic [31:0] data_word;
  logic        key_we;
  logic [2:0]  key_idx;
  logic [31:0] key_wdata;
  logic [2:0]  wr_bank;
  logic [1:0]  wr_word;

  // memory block
  logic [1023:0] pad_data;
  logic [127:0]  aes_key, chain, chain_wdata;
  logic          chain_we;
  logic [159:0]  h1, h1_init, h1_out;
  logic [511:0]  h512, h512_init, h512_out;

  // AES-128
  logic         aes_can_start, aes_start, aes_ks_load, aes_ks_step;
  logic [2:0]   aes_bank;
  logic [3:0]   aes_round;
  logic [127:0] aes_rk, aes_in, ct_now;
  logic         ct_fire, aes_out_ready;

  // SHA-1
  logic         s1_can_start, s1_start, s1_group, s1_last;
  logic         s1_ws_load, s1_ws_step, s1_done, s1_done_last, s1_out_ready;
  logic [5:0]   s1_cyc;
  logic [31:0]  s1_w0, s1_w1, s1_k;

  // SHA-512
  logic         s2_can_start, s2_start, s2_last;
  logic         s2_ws_load, s2_ws_step, s2_done, s2_done_last, s2_out_ready;
  logic [6:0]   s2_cyc;
  logic [63:0]  s2_w_next, s2_k_next;

  io_interface u_io (
    .clk, .rst_n,
    .data_in, .in_valid, .key, .in_last, .mode, .ready,
    .send, .out_hot, .out_aes, .out_sha12, .data_out, .sha_out,
    .cu_in_ready, .halt, .data_fire, .data_last, .data_word,
    .key_we, .key_idx, .key_wdata,
    .aes_fire(ct_fire), .aes_ct(ct_now), .aes_out_ready,
    .s1_fire(s1_done_last), .s1_digest(h1_out), .s1_out_ready,
    .s2_fire(s2_done_last), .s2_digest(h512_out), .s2_out_ready);

  control_unit u_cu (
    .clk, .rst_n, .aes_en, .sha1_en, .sha2_en, .halt,
    .in_fire(data_fire), .in_last(data_last), .in_ready(cu_in_ready),
    .wr_bank, .wr_word,
    .aes_can_start, .aes_start, .aes_bank,
    .s1_can_start, .s1_start, .s1_group, .s1_last,
    .s2_can_start, .s2_start, .s2_last);

  memory_block u_mem (
    .clk, .rst_n,
    .pad_we(data_fire), .pad_bank(wr_bank), .pad_word(wr_word),
    .pad_wdata(data_word), .pad_data,
    .key_we, .key_idx, .key_wdata, .aes_key,
    .chain_we, .chain_wdata, .chain,
    .h1_we(s1_done), .h1_wdata(s1_done_last ? h1_init : h1_out), .h1, .h1_init,
    .h512_we(s2_done), .h512_wdata(s2_done_last ? h512_init : h512_out),
    .h512, .h512_init);

  mode_interface u_mode (
    .mode, .bank(pad_data[1023-128*int'(aes_bank) -: 128]), .chain,
    .ct_fire, .ct_now, .aes_in, .chain_we, .chain_wdata);

  key_scheduler u_ks (
    .clk, .rst_n,
    .aes_load(aes_ks_load), .aes_step(aes_ks_step), .aes_round,
    .aes_key0(aes_key), .aes_rk,
    .s1_load(s1_ws_load), .s1_step(s1_ws_step), .s1_cyc,
    .s1_block(s1_group ? pad_data[511:0] : pad_data[1023:512]),
    .s1_w0, .s1_w1, .s1_k,
    .s2_load(s2_ws_load), .s2_step(s2_ws_step), .s2_cyc,
    .s2_block(pad_data), .s2_w_next, .s2_k_next);

  aes128_core u_aes (
    .clk, .rst_n, .start(aes_start), .block_in(aes_in), .key0(aes_key),
    .rk(aes_rk), .out_ready(aes_out_ready), .can_start(aes_can_start),
    .ks_load(aes_ks_load), .ks_step(aes_ks_step), .round(aes_round),
    .ct_fire, .ct_now, .ct_valid(), .ct());

  sha1_core u_sha1 (
    .clk, .rst_n, .start(s1_start), .last_in(s1_last), .h_in(h1),
    .h_init(h1_init), .w0(s1_w0), .w1(s1_w1), .k(s1_k),
    .out_ready(s1_out_ready), .can_start(s1_can_start),
    .ws_load(s1_ws_load), .ws_step(s1_ws_step), .cyc(s1_cyc),
    .done(s1_done), .done_last(s1_done_last), .h_out(h1_out));

  sha512_core u_sha512 (
    .clk, .rst_n, .start(s2_start), .last_in(s2_last), .h_in(h512),
    .h_init(h512_init), .m0(pad_data[1023:960]), .w_next(s2_w_next), .k_next(s2_k_next),
    .out_ready(s2_out_ready), .can_start(s2_can_start),
    .ws_load(s2_ws_load), .ws_step(s2_ws_step), .cyc(s2_cyc),
    .done(s2_done), .done_last(s2_done_last), .h_out(h512_out));

endmodule
