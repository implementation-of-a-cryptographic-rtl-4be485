// sha512_msg_schedule: SHA-512 message schedule, one 64-bit word per clock
// (part of the key scheduler).
//
// A 16-word window holds W_t .. W_t+15. At load the window takes the 1024-bit
// message block (M0 in bits 1023:960). Each step shifts the window by one,
// appending W_t+16 = sigma1(W_t+14) + W_t+9 + sigma0(W_t+1) + W_t.
//
// Interface / timing: w_next is W_t+1 straight from the window register,
// valid the cycle after load and after each step. It is one word ahead
// because the SHA-512 core adds W into a pre-computed sum one cycle early
// (W_0 comes to the core directly from the message at load).
module sha512_msg_schedule (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          step,
  input  logic [1023:0] block,
  output logic [63:0]   w_next
);
  import hssec_pkg::*;

  logic [63:0] win [16];
  logic [63:0] n16;

  assign w_next = win[1];
  assign n16 = small_sigma1_512(win[14]) + win[9] + small_sigma0_512(win[1]) + win[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) win[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < 16; i++) win[i] <= block[1023-64*i -: 64];
    end else if (step) begin
      for (int i = 0; i < 15; i++) win[i] <= win[i+1];
      win[15] <= n16;
    end
  end

endmodule
