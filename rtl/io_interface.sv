// io_interface: the co-processor's link to the host.
//
// Input side: one 32-bit data port. A word presented with in_valid while
// ready is high is taken. With key = 1 it is a key word: the first four words
// are the AES-128 cipher key and, in CBC mode, the next four the IV (most
// significant word first); they go to the register file. Otherwise it is
// message data for the padding unit, at the bank and word the control unit
// points to; in_last marks the final word of a message.
//
// Output side: one result owns the outputs at a time. Results wait in one
// holding register per core (ciphertext 128 bits, SHA-1 digest 160 bits,
// SHA-512 digest 512 bits) and are sent in the priority order AES-128, SHA-1,
// SHA-512. While out_hot is high, out_aes tells whether the ciphertext is on
// the ports, and otherwise out_sha12 tells SHA-1 (0) from SHA-512 (1):
//   AES-128 : 4 beats, data_out = C[127:96] first, sha_out = 0
//   SHA-1   : 3 beats of 64 bits, data_out/sha_out = H0/H1, H2/H3, H4/0
//   SHA-512 : 8 beats of 64 bits, data_out/sha_out = high/low word of H0..H7
// A beat is taken when the host holds send high; while a result is on the
// ports and send is low the co-processor halts (no input, no core starts),
// and a core whose result cannot be held waits in its last cycle.
//
// Interface / timing: ready, the beat data and the flags come from registers
// or from this cycle's inputs; everything changes at the clock edge. One idle
// cycle separates two results. The incoming word itself (data_word,
// key_wdata) and in_last pass through unregistered; this block only decides
// where they are written.
module io_interface (
  input  logic          clk,
  input  logic          rst_n,
  // host input side
  input  logic [31:0]   data_in,
  input  logic          in_valid,
  input  logic          key,
  input  logic          in_last,
  input  logic          mode,
  output logic          ready,
  // host output side
  input  logic          send,
  output logic          out_hot,
  output logic          out_aes,
  output logic          out_sha12,
  output logic [31:0]   data_out,
  output logic [31:0]   sha_out,
  // control unit / memory block
  input  logic          cu_in_ready,
  output logic          halt,
  output logic          data_fire,
  output logic          data_last,
  output logic [31:0]   data_word,
  output logic          key_we,
  output logic [2:0]    key_idx,
  output logic [31:0]   key_wdata,
  // results
  input  logic          aes_fire,
  input  logic [127:0]  aes_ct,
  output logic          aes_out_ready,
  input  logic          s1_fire,
  input  logic [159:0]  s1_digest,
  output logic          s1_out_ready,
  input  logic          s2_fire,
  input  logic [511:0]  s2_digest,
  output logic          s2_out_ready
);
  import hssec_pkg::*;

  logic [2:0]   kw_q;
  logic         fire;
  logic         aes_full, s1_full, s2_full;
  logic [127:0] aes_hold;
  logic [159:0] s1_hold;
  logic [511:0] s2_hold;
  out_src_e     src_q;
  logic [2:0]   beat_q, last_beat;
  logic         beat_fire;

  // ------------------------------------------------------------- input
  assign ready     = !halt && (key || cu_in_ready);
  assign fire      = in_valid && ready;
  assign data_fire = fire && !key;
  assign data_last = in_last;
  assign data_word = data_in;
  assign key_we    = fire && key;
  assign key_idx   = kw_q;
  assign key_wdata = data_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         kw_q <= '0;
    else if (data_fire) kw_q <= '0;
    else if (key_we)    kw_q <= ((kw_q == 3'd3 && !mode) || kw_q == 3'd7) ? 3'd0 : kw_q + 3'd1;
  end

  // ------------------------------------------------------------ output
  assign out_hot   = (src_q != SRC_NONE);
  assign out_aes   = (src_q == SRC_AES);
  assign out_sha12 = (src_q == SRC_SHA512);
  assign halt      = out_hot && !send;
  assign beat_fire = out_hot && send;

  assign aes_out_ready = !aes_full;
  assign s1_out_ready  = !s1_full;
  assign s2_out_ready  = !s2_full;

  always_comb begin
    data_out  = '0;
    sha_out   = '0;
    last_beat = 3'd0;
    unique case (src_q)
      SRC_AES: begin
        data_out  = aes_hold[127-32*int'(beat_q) -: 32];
        last_beat = 3'd3;
      end
      SRC_SHA1: begin
        data_out  = s1_hold[159-64*int'(beat_q) -: 32];
        if (beat_q < 3'd2) sha_out = s1_hold[127-64*int'(beat_q) -: 32];
        last_beat = 3'd2;
      end
      SRC_SHA512: begin
        data_out  = s2_hold[511-64*int'(beat_q) -: 32];
        sha_out   = s2_hold[479-64*int'(beat_q) -: 32];
        last_beat = 3'd7;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aes_full <= 1'b0;
      s1_full  <= 1'b0;
      s2_full  <= 1'b0;
      aes_hold <= '0;
      s1_hold  <= '0;
      s2_hold  <= '0;
      src_q    <= SRC_NONE;
      beat_q   <= '0;
    end else begin
      if (aes_fire) begin aes_full <= 1'b1; aes_hold <= aes_ct;    end
      if (s1_fire)  begin s1_full  <= 1'b1; s1_hold  <= s1_digest; end
      if (s2_fire)  begin s2_full  <= 1'b1; s2_hold  <= s2_digest; end
      if (!out_hot) begin
        beat_q <= '0;
        if (aes_full)     src_q <= SRC_AES;
        else if (s1_full) src_q <= SRC_SHA1;
        else if (s2_full) src_q <= SRC_SHA512;
      end else if (beat_fire) begin
        if (beat_q == last_beat) begin
          src_q  <= SRC_NONE;
          beat_q <= '0;
          unique case (src_q)
            SRC_AES:    aes_full <= 1'b0;
            SRC_SHA1:   s1_full  <= 1'b0;
            SRC_SHA512: s2_full  <= 1'b0;
            default: ;
          endcase
        end else begin
          beat_q <= beat_q + 3'd1;
        end
      end
    end
  end

  // a beat refused by the host stays on the ports unchanged
  a_hold_beat: assert property (@(posedge clk) disable iff (!rst_n)
    (out_hot && !send) |=> (out_hot && $stable(data_out) && $stable(sha_out)
                            && $stable(src_q)));

endmodule
