// sha512_k_rom: SHA-512 round constant K_t lookup table (part of
// the key scheduler).
//
// K_t is the first 64 bits of the fractional part of the cube root of the
// t-th prime (t = 0..79), held in hssec_pkg::SHA512_K. Indices above 79 return
// zero. Combinational.
module sha512_k_rom (
  input  logic [6:0]  t,
  output logic [63:0] k
);
  import hssec_pkg::*;

  always_comb k = (t < 7'd80) ? SHA512_K[t] : 64'h0;

endmodule
