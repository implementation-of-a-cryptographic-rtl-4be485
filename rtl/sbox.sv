// sbox: AES SubBytes substitution of one byte.
//
// Purely combinational. The value is computed rather than stored: the
// multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 (x^254, with 0
// mapping to 0) followed by the FIPS-197 affine transform (see
// hssec_pkg::sbox_f). The co-processor keeps its S-boxes beside the memory
// block; the AES round datapath uses sixteen of them and the key scheduler
// four more (SubWord). Realising each as a computed function instead of a
// 256-entry table is a choice of this implementation.
module sbox (
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);
  import hssec_pkg::*;

  always_comb out_byte = sbox_f(in_byte);

endmodule
