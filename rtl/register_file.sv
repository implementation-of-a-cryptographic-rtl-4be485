// register_file: general-purpose register file of the memory block, two
// halves of 16 x 32-bit words.
//
// Every word has its own write enable and write data, and all words are read
// in parallel, so each core can update its whole chaining value in one cycle
// while the I/O interface loads key words one at a time. Words reset to
// RESET_VAL (word 0 in the least significant 32 bits).
//
// Timing: writes take effect at the clock edge; reads are combinational from
// the registers.
module register_file #(
  parameter int unsigned        WORDS     = 32,
  parameter logic [WORDS*32-1:0] RESET_VAL = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [WORDS-1:0]    we,
  input  logic [WORDS*32-1:0] wdata,
  output logic [WORDS*32-1:0] rdata
);

  logic [31:0] regs [WORDS];

  for (genvar i = 0; i < WORDS; i++) begin : g_word
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     regs[i] <= RESET_VAL[32*i +: 32];
      else if (we[i]) regs[i] <= wdata[32*i +: 32];
    end
    assign rdata[32*i +: 32] = regs[i];
  end

endmodule
