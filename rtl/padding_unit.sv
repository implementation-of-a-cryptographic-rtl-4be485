// padding_unit: the shared input buffer of the co-processor.
//
// Eight banks of 128 bits. A bank is the input block of AES-128, four
// consecutive banks (0-3 or 4-7) are a SHA-1 message block and all eight a
// SHA-512 message block, so one 1024-bit buffer serves all three cores.
// Words arrive 32 bits at a time; word 0 of a bank is its most significant
// word, and bank 0 is the most significant bank of the 1024-bit view.
//
// Interface / timing: one synchronous 32-bit write port (bank, word); the
// whole content is readable in parallel (banks / data), so each core takes
// the bank or banks it needs in the cycle it starts. The buffer holds data as
// fetched; message padding is left to the host in this implementation.
module padding_unit #(
  parameter int unsigned NUM_BANKS = 8,
  parameter int unsigned BANK_W    = 128
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [$clog2(NUM_BANKS)-1:0]  bank,
  input  logic [$clog2(BANK_W/32)-1:0]  word,
  input  logic [31:0]                   wdata,
  output logic [NUM_BANKS*BANK_W-1:0]   data
);

  localparam int unsigned WPB = BANK_W / 32;   // words per bank

  logic [31:0] mem [NUM_BANKS * WPB];

  always_ff @(posedge clk) begin
    if (we) mem[int'(bank) * WPB + int'(word)] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < NUM_BANKS * WPB; i++)
      data[NUM_BANKS*BANK_W-1-32*i -: 32] = mem[i];
  end

endmodule
