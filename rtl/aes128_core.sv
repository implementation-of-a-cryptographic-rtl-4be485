// aes128_core: AES-128 encryption, one round per clock.
//
// A block takes 10+1 cycles: in the start cycle the (already chained) input
// block is xored with round key 0 (the cipher key) into the state register;
// rounds 1..10 follow, one per cycle, using the round key supplied by the key
// scheduler. Round 10 (no MixColumns) writes the ciphertext register instead
// of the state register, so the next block may start in that same cycle: a
// block is accepted every 10 cycles, which gives 128 bits per 10 clocks.
//
// Interface / timing:
//   can_start : a start is accepted this cycle (idle, or in round 10 with the
//               result register free, out_ready = 1).
//   start     : block_in is taken (only when can_start).
//   ks_load / ks_step / round : drive the key scheduler (see aes_key_expansion).
//   rk        : round key for the round being computed.
//   out_ready : the consumer can take a ciphertext; if low, round 10 waits.
//   ct_fire / ct_now : combinational, the ciphertext produced this cycle.
//   ct_valid / ct : registered, one cycle after ct_fire (11 cycles after start).
// The 10+1 cycle latency follows the document; the ready/start handshake and
// the stall in round 10 are this implementation's own.
module aes128_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] block_in,
  input  logic [127:0] key0,
  input  logic [127:0] rk,
  input  logic         out_ready,
  output logic         can_start,
  output logic         ks_load,
  output logic         ks_step,
  output logic [3:0]   round,
  output logic         ct_fire,
  output logic [127:0] ct_now,
  output logic         ct_valid,
  output logic [127:0] ct
);
  import hssec_pkg::*;

  logic         busy;
  logic [3:0]   round_q;
  logic [127:0] state_q;
  logic [127:0] sub, shf, mix, rnd_out;
  logic         last;

  assign round = round_q;
  assign last  = busy && (round_q == 4'(AES_ROUNDS));

  // SubBytes: byte k of the block is bits [127-8k -: 8]
  for (genvar k = 0; k < 16; k++) begin : g_sub
    sbox u_sbox (.in_byte(state_q[127-8*k -: 8]), .out_byte(sub[127-8*k -: 8]));
  end

  always_comb begin
    // ShiftRows: byte r+4c takes byte r+4((c+r) mod 4)
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        shf[127-8*(r+4*c) -: 8] = sub[127-8*(r+4*((c+r)%4)) -: 8];
    // MixColumns
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = shf[127-8*(4*c)   -: 8];
      a1 = shf[127-8*(4*c+1) -: 8];
      a2 = shf[127-8*(4*c+2) -: 8];
      a3 = shf[127-8*(4*c+3) -: 8];
      mix[127-8*(4*c)   -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      mix[127-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      mix[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      mix[127-8*(4*c+3) -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    rnd_out = (last ? shf : mix) ^ rk;
  end

  assign can_start = !busy || (last && out_ready);
  assign ks_load   = start && can_start;
  assign ks_step   = busy && !last;
  assign ct_fire   = last && out_ready;
  assign ct_now    = rnd_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      round_q  <= '0;
      state_q  <= '0;
      ct_valid <= 1'b0;
      ct       <= '0;
    end else begin
      ct_valid <= ct_fire;
      if (ct_fire) ct <= rnd_out;
      if (ks_load) begin
        state_q <= block_in ^ key0;
        round_q <= 4'd1;
        busy    <= 1'b1;
      end else if (ks_step) begin
        state_q <= rnd_out;
        round_q <= round_q + 4'd1;
      end else if (ct_fire) begin
        busy    <= 1'b0;
      end
    end
  end

endmodule
