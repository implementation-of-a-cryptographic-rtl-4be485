// sha512_core: SHA-512 compression, one round per clock.
//
// A 1024-bit block is loaded in one cycle (the working variables a..h take the
// chaining value) and its 80 rounds follow, one per cycle. The last round
// cycle also forms h_in + state, and the next block may be loaded in that
// same cycle, so blocks follow each other every 80 cycles (latency 80+1).
// Pre-computation: the sum h + K_t + W_t has no dependency on round t-1's
// result (h of round t is g of round t-1), so it is formed one cycle early
// from g, K_t+1 and W_t+1 and kept in a register. The round then adds only
// three terms for T1 (pre + Sigma1(e) + Ch(e,f,g)) instead of five. At load
// the register takes H7 + K_0 + M_0. The exact pre-computed block of the
// original design is not published in detail; this is the standard form of
// the technique.
//
// Interface / timing:
//   can_start : start accepted this cycle. start is taken with last_in (this
//               block ends the message).
//   h_in      : chaining value H0..H7 (H0 in bits 511:448), stable in a block.
//   h_init    : initial hash value, used for the block after a message end.
//   m0        : first 64-bit word of the block being loaded (W_0).
//   w_next, k_next : W_t+1 and K_t+1 during round t = cyc (key scheduler);
//               ws_load / ws_step drive the message schedule.
//   done      : combinational, last round cycle; h_out is the new chain.
//   done_last : done and the block ended the message (h_out is the digest).
//   out_ready : the digest can be taken; a last block waits in round 79 if low.
module sha512_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         last_in,
  input  logic [511:0] h_in,
  input  logic [511:0] h_init,
  input  logic [63:0]  m0,
  input  logic [63:0]  w_next,
  input  logic [63:0]  k_next,
  input  logic         out_ready,
  output logic         can_start,
  output logic         ws_load,
  output logic         ws_step,
  output logic [6:0]   cyc,
  output logic         done,
  output logic         done_last,
  output logic [511:0] h_out
);
  import hssec_pkg::*;

  logic         busy, last_q;
  logic [6:0]   cyc_q;
  logic [511:0] state_q, h_start, nxt;
  logic [63:0]  pre_q, pre_nxt;
  logic         final_c;

  assign final_c   = busy && (cyc_q == 7'(SHA2_CYCLES - 1));
  assign done      = final_c && (out_ready || !last_q);
  assign done_last = done && last_q;
  assign can_start = !busy || done;
  assign ws_load   = start && can_start;
  assign ws_step   = busy && !final_c;
  assign cyc       = cyc_q;

  always_comb begin
    if (done) h_start = last_q ? h_init : h_out;
    else      h_start = h_in;
  end

  always_comb begin
    logic [63:0] a, b, c, d, e, f, g, h, t1, t2;
    {a, b, c, d, e, f, g, h} = state_q;
    t1 = pre_q + big_sigma1_512(e) + ((e & f) ^ (~e & g));
    pre_nxt = g + k_next + w_next;
    t2 = big_sigma0_512(a) + ((a & b) ^ (a & c) ^ (b & c));
    h = g; g = f; f = e; e = d + t1;
    d = c; c = b; b = a; a = t1 + t2;
    nxt = {a, b, c, d, e, f, g, h};
    for (int i = 0; i < 8; i++)
      h_out[64*i +: 64] = h_in[64*i +: 64] + nxt[64*i +: 64];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      last_q  <= 1'b0;
      cyc_q   <= '0;
      state_q <= '0;
      pre_q   <= '0;
    end else if (ws_load) begin
      busy    <= 1'b1;
      last_q  <= last_in;
      cyc_q   <= 7'd0;
      state_q <= h_start;
      pre_q   <= h_start[63:0] + SHA512_K[0] + m0;
    end else if (ws_step) begin
      cyc_q   <= cyc_q + 7'd1;
      state_q <= nxt;
      pre_q   <= pre_nxt;
    end else if (done) begin
      busy    <= 1'b0;
    end
  end

endmodule
