// control_unit: central control of the co-processor.
//
// It keeps the three cores fed from the one padding unit. Input words fill the
// banks in order 0..7 and wrap. When the fourth word of a bank is written the
// bank is committed: it is marked as pending for every enabled core and
// remembers whether it ends the message (last). A bank can be written again
// only once no core still needs it.
//   * AES-128 takes one pending bank at a time, in order.
//   * SHA-1 takes banks 0-3 or 4-7 once all four are pending.
//   * SHA-512 takes all eight banks once they are pending.
// A core takes its banks in the cycle it starts (its message schedule or
// state register captures them), so its pending flags clear at once and the
// banks may refill while it computes: input (4 cycles per bank) runs ahead of
// the 10 cycles the cores spend per 128 bits.
// While the output is held up by the host (halt) no core is started and no
// input is accepted. When nothing is pending and no bank is half written, the
// bank pointers return to 0, so the enables and mode may be changed between
// messages.
//
// Interface / timing: the start strobes are combinational from registered
// flags and the cores' can_start; all state changes at the clock edge.
module control_unit (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       aes_en,
  input  logic       sha1_en,
  input  logic       sha2_en,
  input  logic       halt,
  // input side
  input  logic       in_fire,      // a data word is written this cycle
  input  logic       in_last,      // ... and it ends the message
  output logic       in_ready,     // a data word can be accepted
  output logic [2:0] wr_bank,
  output logic [1:0] wr_word,
  // AES-128
  input  logic       aes_can_start,
  output logic       aes_start,
  output logic [2:0] aes_bank,
  // SHA-1
  input  logic       s1_can_start,
  output logic       s1_start,
  output logic       s1_group,     // 0 = banks 0-3, 1 = banks 4-7
  output logic       s1_last,
  // SHA-512
  input  logic       s2_can_start,
  output logic       s2_start,
  output logic       s2_last
);

  logic [7:0] pend_aes, pend_s1, pend_s2, last_b;
  logic [2:0] wr_bank_q, aes_ptr;
  logic [1:0] wr_word_q;
  logic       s1_ptr;
  logic       any_en, bank_free, commit, drained;
  logic [7:0] s1_mask;

  assign any_en    = aes_en || sha1_en || sha2_en;
  assign wr_bank   = wr_bank_q;
  assign wr_word   = wr_word_q;
  assign bank_free = !(pend_aes[wr_bank_q] || pend_s1[wr_bank_q] || pend_s2[wr_bank_q]);
  assign in_ready  = any_en && !halt && bank_free;
  assign commit    = in_fire && (wr_word_q == 2'd3);
  assign drained   = (pend_aes == '0) && (pend_s1 == '0) && (pend_s2 == '0)
                   && (wr_word_q == 2'd0) && !in_fire;

  assign aes_bank  = aes_ptr;
  assign aes_start = !halt && pend_aes[aes_ptr] && aes_can_start;

  assign s1_group  = s1_ptr;
  assign s1_mask   = s1_ptr ? 8'hf0 : 8'h0f;
  assign s1_start  = !halt && ((pend_s1 & s1_mask) == s1_mask) && s1_can_start;
  assign s1_last   = last_b[s1_ptr ? 7 : 3];

  assign s2_start  = !halt && (pend_s2 == 8'hff) && s2_can_start;
  assign s2_last   = last_b[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_aes  <= '0;
      pend_s1   <= '0;
      pend_s2   <= '0;
      last_b    <= '0;
      wr_bank_q <= '0;
      wr_word_q <= '0;
      aes_ptr   <= '0;
      s1_ptr    <= 1'b0;
    end else begin
      if (in_fire) begin
        wr_word_q <= wr_word_q + 2'd1;
        if (commit) begin
          wr_bank_q         <= wr_bank_q + 3'd1;
          pend_aes[wr_bank_q] <= aes_en;
          pend_s1[wr_bank_q]  <= sha1_en;
          pend_s2[wr_bank_q]  <= sha2_en;
          last_b[wr_bank_q]   <= in_last;
        end
      end
      if (aes_start) begin
        pend_aes[aes_ptr] <= 1'b0;
        aes_ptr           <= aes_ptr + 3'd1;
      end
      if (s1_start) begin
        for (int i = 0; i < 8; i++)
          if (s1_mask[i]) pend_s1[i] <= 1'b0;
        s1_ptr  <= !s1_ptr;
      end
      if (s2_start)
        for (int i = 0; i < 8; i++) pend_s2[i] <= 1'b0;
      if (drained) begin
        wr_bank_q <= '0;
        aes_ptr   <= '0;
        s1_ptr    <= 1'b0;
      end
    end
  end

  // a core only starts on banks that were committed, and a bank is never
  // overwritten while a core still needs it
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    in_fire |-> bank_free);

endmodule
