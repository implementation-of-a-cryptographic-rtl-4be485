// sha1_msg_schedule: SHA-1 message schedule, two words per clock (part of
// the key scheduler).
//
// A 16-word window holds W_t .. W_t+15. At load the window takes the 512-bit
// message block (M0 in bits 511:480). Each step shifts the window by two,
// appending W_t+16 = ROTL1(W_t+13 ^ W_t+8 ^ W_t+2 ^ W_t) and
// W_t+17 = ROTL1(W_t+14 ^ W_t+9 ^ W_t+3 ^ W_t+1).
//
// Interface / timing: w0/w1 are W_t/W_t+1 straight from the window register,
// valid the cycle after load and after each step.
module sha1_msg_schedule (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         step,
  input  logic [511:0] block,
  output logic [31:0]  w0,
  output logic [31:0]  w1
);
  import hssec_pkg::*;

  logic [31:0] win [16];
  logic [31:0] n16, n17;

  assign w0  = win[0];
  assign w1  = win[1];
  assign n16 = rotl32(win[13] ^ win[8] ^ win[2] ^ win[0], 1);
  assign n17 = rotl32(win[14] ^ win[9] ^ win[3] ^ win[1], 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) win[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < 16; i++) win[i] <= block[511-32*i -: 32];
    end else if (step) begin
      for (int i = 0; i < 14; i++) win[i] <= win[i+2];
      win[14] <= n16;
      win[15] <= n17;
    end
  end

endmodule
