// key_scheduler: the block that supplies every time-dependent operand of the
// three cores.
//
// It holds the AES-128 on-the-fly key expansion (one round key per cycle), the
// SHA-1 message schedule (two W_t per cycle), the SHA-512 message schedule
// (one W_t per cycle) and the round constants of both hash functions (K_t of
// SHA-1 by t/20, K_t of SHA-512 from an 80-entry table). For SHA-512 the
// operands of round t+1 (W_t+1, K_t+1) are supplied during round t, as the
// core pre-computes with them one cycle early. Each part is driven
// by the load/step strobes and the round counter of the core it serves, so
// the three run independently and in parallel.
//
// Timing: every output is valid in the cycle the matching core computes the
// round it belongs to (registered windows / round key, combinational
// constants indexed by the core's counter).
module key_scheduler (
  input  logic          clk,
  input  logic          rst_n,
  // AES-128
  input  logic          aes_load,
  input  logic          aes_step,
  input  logic [3:0]    aes_round,
  input  logic [127:0]  aes_key0,
  output logic [127:0]  aes_rk,
  // SHA-1
  input  logic          s1_load,
  input  logic          s1_step,
  input  logic [5:0]    s1_cyc,
  input  logic [511:0]  s1_block,
  output logic [31:0]   s1_w0,
  output logic [31:0]   s1_w1,
  output logic [31:0]   s1_k,
  // SHA-512
  input  logic          s2_load,
  input  logic          s2_step,
  input  logic [6:0]    s2_cyc,
  input  logic [1023:0] s2_block,
  output logic [63:0]   s2_w_next,
  output logic [63:0]   s2_k_next
);
  import hssec_pkg::*;

  aes_key_expansion u_aes_ks (
    .clk, .rst_n, .load(aes_load), .step(aes_step), .round(aes_round),
    .key0(aes_key0), .rk(aes_rk));

  sha1_msg_schedule u_s1_ms (
    .clk, .rst_n, .load(s1_load), .step(s1_step), .block(s1_block),
    .w0(s1_w0), .w1(s1_w1));

  sha512_msg_schedule u_s2_ms (
    .clk, .rst_n, .load(s2_load), .step(s2_step), .block(s2_block), .w_next(s2_w_next));

  sha512_k_rom u_s2_k (.t(s2_cyc + 7'd1), .k(s2_k_next));

  // rounds 2c and 2c+1 always share one SHA-1 constant
  always_comb s1_k = sha1_k(2 * int'(s1_cyc));

endmodule
