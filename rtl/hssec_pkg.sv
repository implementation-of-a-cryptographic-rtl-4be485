// hssec_pkg: types, constants and combinational helper functions shared by
// the HSSec co-processor (AES-128, SHA-1 and SHA-512 on one input stream).
//
// Contents:
//   * SHA-1 and SHA-512 initial hash values and the SHA-1 round constants, as
//     defined by the Secure Hash Standard (FIPS 180-2).
//   * The 80 SHA-512 round constants. K_t is the first 64 bits of the
//     fractional part of the cube root of the t-th prime (t = 0..79).
//   * AES helpers: the S-box, computed as the GF(2^8) multiplicative inverse
//     (modulo x^8+x^4+x^3+x+1) followed by the FIPS-197 affine transform,
//     xtime, and the round constant Rcon.
//   * SHA-1 and SHA-512 boolean functions and rotations.
//   * The output source encoding used on the result ports.
package hssec_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned BANK_W      = 128;  // one padding-unit bank
  localparam int unsigned NUM_BANKS   = 8;    // padding unit depth
  localparam int unsigned AES_ROUNDS  = 10;
  localparam int unsigned SHA1_CYCLES = 40;   // two rounds per cycle
  localparam int unsigned SHA2_CYCLES = 80;   // one round per cycle

  // -------------------------------------------------------- output source
  typedef enum logic [1:0] {
    SRC_NONE   = 2'd0,
    SRC_AES    = 2'd1,
    SRC_SHA1   = 2'd2,
    SRC_SHA512 = 2'd3
  } out_src_e;

  // ----------------------------------------------------- SHA-1 constants
  localparam logic [31:0] SHA1_H0 [5] = '{
    32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476, 32'hc3d2e1f0};

  function automatic logic [31:0] sha1_k(input int unsigned t);
    if (t < 20)      return 32'h5a827999;
    else if (t < 40) return 32'h6ed9eba1;
    else if (t < 60) return 32'h8f1bbcdc;
    else             return 32'hca62c1d6;
  endfunction

  // f_1 (Ch), f_2 (Parity), f_3 (Maj), f_4 (Parity)
  function automatic logic [31:0] sha1_f(input int unsigned t,
                                         input logic [31:0] b, c, d);
    if (t < 20)      return (b & c) | (~b & d);
    else if (t < 40) return b ^ c ^ d;
    else if (t < 60) return (b & c) | (b & d) | (c & d);
    else             return b ^ c ^ d;
  endfunction

  function automatic logic [31:0] rotl32(input logic [31:0] x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // --------------------------------------------------- SHA-512 constants
  localparam logic [63:0] SHA512_H0 [8] = '{
    64'h6a09e667f3bcc908, 64'hbb67ae8584caa73b, 64'h3c6ef372fe94f82b,
    64'ha54ff53a5f1d36f1, 64'h510e527fade682d1, 64'h9b05688c2b3e6c1f,
    64'h1f83d9abfb41bd6b, 64'h5be0cd19137e2179};

  localparam logic [63:0] SHA512_K [80] = '{
    64'h428a2f98d728ae22, 64'h7137449123ef65cd,
    64'hb5c0fbcfec4d3b2f, 64'he9b5dba58189dbbc,
    64'h3956c25bf348b538, 64'h59f111f1b605d019,
    64'h923f82a4af194f9b, 64'hab1c5ed5da6d8118,
    64'hd807aa98a3030242, 64'h12835b0145706fbe,
    64'h243185be4ee4b28c, 64'h550c7dc3d5ffb4e2,
    64'h72be5d74f27b896f, 64'h80deb1fe3b1696b1,
    64'h9bdc06a725c71235, 64'hc19bf174cf692694,
    64'he49b69c19ef14ad2, 64'hefbe4786384f25e3,
    64'h0fc19dc68b8cd5b5, 64'h240ca1cc77ac9c65,
    64'h2de92c6f592b0275, 64'h4a7484aa6ea6e483,
    64'h5cb0a9dcbd41fbd4, 64'h76f988da831153b5,
    64'h983e5152ee66dfab, 64'ha831c66d2db43210,
    64'hb00327c898fb213f, 64'hbf597fc7beef0ee4,
    64'hc6e00bf33da88fc2, 64'hd5a79147930aa725,
    64'h06ca6351e003826f, 64'h142929670a0e6e70,
    64'h27b70a8546d22ffc, 64'h2e1b21385c26c926,
    64'h4d2c6dfc5ac42aed, 64'h53380d139d95b3df,
    64'h650a73548baf63de, 64'h766a0abb3c77b2a8,
    64'h81c2c92e47edaee6, 64'h92722c851482353b,
    64'ha2bfe8a14cf10364, 64'ha81a664bbc423001,
    64'hc24b8b70d0f89791, 64'hc76c51a30654be30,
    64'hd192e819d6ef5218, 64'hd69906245565a910,
    64'hf40e35855771202a, 64'h106aa07032bbd1b8,
    64'h19a4c116b8d2d0c8, 64'h1e376c085141ab53,
    64'h2748774cdf8eeb99, 64'h34b0bcb5e19b48a8,
    64'h391c0cb3c5c95a63, 64'h4ed8aa4ae3418acb,
    64'h5b9cca4f7763e373, 64'h682e6ff3d6b2b8a3,
    64'h748f82ee5defb2fc, 64'h78a5636f43172f60,
    64'h84c87814a1f0ab72, 64'h8cc702081a6439ec,
    64'h90befffa23631e28, 64'ha4506cebde82bde9,
    64'hbef9a3f7b2c67915, 64'hc67178f2e372532b,
    64'hca273eceea26619c, 64'hd186b8c721c0c207,
    64'heada7dd6cde0eb1e, 64'hf57d4f7fee6ed178,
    64'h06f067aa72176fba, 64'h0a637dc5a2c898a6,
    64'h113f9804bef90dae, 64'h1b710b35131c471b,
    64'h28db77f523047d84, 64'h32caab7b40c72493,
    64'h3c9ebe0a15c9bebc, 64'h431d67c49c100d4c,
    64'h4cc5d4becb3e42b6, 64'h597f299cfc657e2a,
    64'h5fcb6fab3ad6faec, 64'h6c44198c4a475817
  };

  function automatic logic [63:0] rotr64(input logic [63:0] x, input int unsigned n);
    return (x >> n) | (x << (64 - n));
  endfunction

  function automatic logic [63:0] big_sigma0_512(input logic [63:0] x);
    return rotr64(x, 28) ^ rotr64(x, 34) ^ rotr64(x, 39);
  endfunction
  function automatic logic [63:0] big_sigma1_512(input logic [63:0] x);
    return rotr64(x, 14) ^ rotr64(x, 18) ^ rotr64(x, 41);
  endfunction
  function automatic logic [63:0] small_sigma0_512(input logic [63:0] x);
    return rotr64(x, 1) ^ rotr64(x, 8) ^ (x >> 7);
  endfunction
  function automatic logic [63:0] small_sigma1_512(input logic [63:0] x);
    return rotr64(x, 19) ^ rotr64(x, 61) ^ (x >> 6);
  endfunction

  // --------------------------------------------------------- AES helpers
  function automatic logic [7:0] xtime(input logic [7:0] x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // x^254 = x^-1 in GF(2^8) (0 maps to 0), then the affine transform.
  function automatic logic [7:0] sbox_f(input logic [7:0] x);
    logic [7:0] sq, inv, s;
    sq  = gf_mul(x, x);          // x^2
    inv = sq;
    for (int i = 0; i < 6; i++) begin
      sq  = gf_mul(sq, sq);      // x^4, x^8, ... x^128
      inv = gf_mul(inv, sq);
    end
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8]
           ^ inv[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  // Rcon for round r = 1..10, in the top byte of a word.
  function automatic logic [7:0] aes_rcon(input logic [3:0] r);
    logic [7:0] v;
    v = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < int'(r)) v = xtime(v);
    return v;
  endfunction

endpackage
