// sha1_core: SHA-1 compression, partially unrolled to two rounds per clock.
//
// The 80 SHA-1 rounds of a 512-bit block run in 40 cycles: each cycle chains
// two round operations (ROTL5 + f_t + e + K_t + W_t, then ROTL30 on b), as in
// the two-operation block of the design. As there, the operands that do not
// depend on the first round (K_t + W_t + e, and K_t+1 + W_t+1 + d for the
// second round) are summed beside the round path. Rounds t = 2*cyc and 2*cyc+1 are done
// in cycle cyc (0..39) after a load cycle. The last round cycle also forms
// h_in + state, and a new block may be loaded in that same cycle, so blocks
// follow each other every 40 cycles (latency 40+1).
//
// Interface / timing:
//   can_start : start accepted this cycle. start is taken with last_in (this
//               block ends the message).
//   h_in      : chaining value H0..H4 (H0 in bits 159:128), stable during a block.
//   h_init    : initial hash value, used for the block after a message end.
//   w0, w1    : W_t and W_t+1 for this cycle (from the message schedule);
//               ws_load (load the block) / ws_step (advance) drive it.
//   k         : K_t for this cycle (t = 2*cyc; K is the same for both rounds).
//   done      : combinational, last cycle of a block; h_out is the new chain.
//   done_last : done and the block ended the message (h_out is the digest).
//   out_ready : the digest can be taken; a last block waits in cycle 39 if low.
// The 40-cycle rate follows the document; the start/bypass scheme is this
// implementation's own.
module sha1_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         last_in,
  input  logic [159:0] h_in,
  input  logic [159:0] h_init,
  input  logic [31:0]  w0,
  input  logic [31:0]  w1,
  input  logic [31:0]  k,
  input  logic         out_ready,
  output logic         can_start,
  output logic         ws_load,
  output logic         ws_step,
  output logic [5:0]   cyc,
  output logic         done,
  output logic         done_last,
  output logic [159:0] h_out
);
  import hssec_pkg::*;

  logic         busy, last_q;
  logic [5:0]   cyc_q;
  logic [159:0] state_q, h_start, cur, nxt;
  logic         final_c;

  assign final_c   = busy && (cyc_q == 6'(SHA1_CYCLES - 1));
  assign done      = final_c && (out_ready || !last_q);
  assign done_last = done && last_q;
  assign can_start = !busy || done;
  assign ws_load   = start && can_start;
  assign ws_step   = busy && !final_c;
  assign cyc       = cyc_q;

  // chaining value the next block starts from (bypass when starting in the
  // same cycle the previous block completes)
  always_comb begin
    if (done) h_start = last_q ? h_init : h_out;
    else      h_start = h_in;
  end

  always_comb begin
    logic [31:0] a, b, c, d, e, tmp, pre0, pre1;
    int unsigned t;
    cur = state_q;
    t   = 2 * int'(cyc);
    {a, b, c, d, e} = cur;
    // terms that do not depend on the first round's result are added
    // first: K + W + e for round t and K + W + d for round t+1 (d becomes
    // round t+1's e), so only ROTL5 + f + pre remains on the chained path
    pre0 = k + w0 + e;
    pre1 = k + w1 + d;
    // round t
    tmp = rotl32(a, 5) + sha1_f(t, b, c, d) + pre0;
    e = d; d = c; c = rotl32(b, 30); b = a; a = tmp;
    // round t+1
    tmp = rotl32(a, 5) + sha1_f(t + 1, b, c, d) + pre1;
    e = d; d = c; c = rotl32(b, 30); b = a; a = tmp;
    nxt = {a, b, c, d, e};
    for (int i = 0; i < 5; i++)
      h_out[32*i +: 32] = h_in[32*i +: 32] + nxt[32*i +: 32];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      last_q  <= 1'b0;
      cyc_q   <= '0;
      state_q <= '0;
    end else if (ws_load) begin
      busy    <= 1'b1;
      last_q  <= last_in;
      cyc_q   <= 6'd0;
      state_q <= h_start;
    end else if (ws_step) begin
      cyc_q   <= cyc_q + 6'd1;
      state_q <= nxt;
    end else if (done) begin
      busy    <= 1'b0;
    end
  end

endmodule
