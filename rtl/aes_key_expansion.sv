// aes_key_expansion: on-the-fly AES-128 round-key generator (part of the
// key scheduler).
//
// Each new round key is produced from the previous one in one clock: the last
// 32-bit word of the previous key is rotated one byte to the left (RotWord),
// passed through four S-boxes (SubWord), xored with Rcon, and then xored down
// the four words. Round key 0 is the cipher key itself and is applied by the
// AES core directly; this block holds round keys 1..10 in turn.
//
// Interface / timing:
//   load  : the AES core starts a block this cycle; next cycle rk = round key 1
//           derived from key0.
//   step  : the AES core finished round `round` (1..9); next cycle rk holds
//           round key round+1. load has priority over step.
//   rk    : registered current round key.
module aes_key_expansion (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         step,
  input  logic [3:0]   round,
  input  logic [127:0] key0,
  output logic [127:0] rk
);
  import hssec_pkg::*;

  logic [127:0] src;
  logic [7:0]   rcon;
  logic [31:0]  rot, sub, t;
  logic [31:0]  n0, n1, n2, n3;

  always_comb begin
    src  = load ? key0 : rk;
    rcon = load ? aes_rcon(4'd1) : aes_rcon(round + 4'd1);
    rot  = {src[23:0], src[31:24]};          // RotWord of the last word
  end

  for (genvar i = 0; i < 4; i++) begin : g_subword
    sbox u_sbox (.in_byte(rot[8*i +: 8]), .out_byte(sub[8*i +: 8]));
  end

  always_comb begin
    t  = sub ^ {rcon, 24'h0};
    n0 = src[127:96] ^ t;
    n1 = src[95:64]  ^ n0;
    n2 = src[63:32]  ^ n1;
    n3 = src[31:0]   ^ n2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            rk <= '0;
    else if (load || step) rk <= {n0, n1, n2, n3};
  end

endmodule
