// tb_ref_pkg: software reference models used by the testbenches.
//
// Written independently of the RTL datapaths: the AES S-box table is built
// with the classic generator walk (p multiplied by 3, q divided by 3 in
// GF(2^8)) instead of the inverse-by-exponentiation of the RTL; AES-128,
// SHA-1 and SHA-512 follow FIPS-197 / FIPS 180-2 word by word with plain
// loops. The models themselves are checked against published test vectors
// in the testbenches. Also: the standard message padding for a short
// byte-string message, and the known-answer vectors.
package tb_ref_pkg;
  import hssec_pkg::SHA512_K;
  import hssec_pkg::SHA1_H0;
  import hssec_pkg::SHA512_H0;

  // FIPS-197 Appendix C.1 / B
  localparam logic [127:0] AES_KEY_C1 = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] AES_PT_C1  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] AES_CT_C1  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
  localparam logic [127:0] AES_KEY_B  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] AES_PT_B   = 128'h3243f6a8885a308d313198a2e0370734;
  localparam logic [127:0] AES_CT_B   = 128'h3925841d02dc09fbdc118597196a0b32;
  // SP 800-38A F.2.1 (CBC-AES128), first two blocks
  localparam logic [127:0] CBC_IV     = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] CBC_P1     = 128'h6bc1bee22e409f96e93d7e117393172a;
  localparam logic [127:0] CBC_P2     = 128'hae2d8a571e03ac9c9eb76fac45af8e51;
  localparam logic [127:0] CBC_C1     = 128'h7649abac8119b246cee98e9b12e9197d;
  localparam logic [127:0] CBC_C2     = 128'h5086cb9b507219ee95db113a917678b2;
  // FIPS 180-2 "abc"
  localparam logic [159:0] SHA1_ABC   = 160'ha9993e364706816aba3e25717850c26c9cd0d89d;
  localparam logic [511:0] SHA512_ABC = 512'hddaf35a193617abacc417349ae20413112e6fa4e89a97ea20a9eeee64b55d39a2192992a274fc1a836ba3c23a3feebbd454d4423643ce80e2a9ac94fa54ca49f;

  function automatic logic [7:0] rotl8(input logic [7:0] x, input int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] tbl [256];
    logic [7:0] p, q, s;
    p = 8'h01; q = 8'h01;
    tbl[0] = 8'h63;
    do begin
      p = p ^ {p[6:0], 1'b0} ^ (p[7] ? 8'h1b : 8'h00);
      q = q ^ {q[6:0], 1'b0};
      q = q ^ {q[5:0], 2'b0};
      q = q ^ {q[3:0], 4'b0};
      if (q[7]) q = q ^ 8'h09;
      s = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      tbl[p] = s ^ 8'h63;
    end while (p != 8'h01);
    return tbl[x];
  endfunction

  function automatic logic [7:0] mul2(input logic [7:0] x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
  endfunction

  // round keys rk[0..10]
  function automatic void ref_key_expand(input logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] = t[31:24] ^ rc;
        rc = mul2(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] ref_aes(input logic [127:0] key, input logic [127:0] pt);
    logic [127:0] rk [11];
    logic [7:0] s [4][4];
    logic [7:0] t [4][4];
    logic [127:0] out;
    ref_key_expand(key, rk);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[r][c] = pt[127-8*(4*c+r) -: 8] ^ rk[0][127-8*(4*c+r) -: 8];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) t[r][c] = ref_sbox(s[r][(c + r) % 4]);
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          if (rnd < 10)
            s[r][c] = mul2(t[r][c]) ^ mul2(t[(r+1)%4][c]) ^ t[(r+1)%4][c]
                    ^ t[(r+2)%4][c] ^ t[(r+3)%4][c];
          else
            s[r][c] = t[r][c];
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          s[r][c] = s[r][c] ^ rk[rnd][127-8*(4*c+r) -: 8];
    end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) out[127-8*(4*c+r) -: 8] = s[r][c];
    return out;
  endfunction

  function automatic logic [31:0] rl(input logic [31:0] x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction
  function automatic logic [63:0] rr(input logic [63:0] x, input int n);
    return (x >> n) | (x << (64 - n));
  endfunction

  function automatic logic [159:0] sha1_init();
    return {SHA1_H0[0], SHA1_H0[1], SHA1_H0[2], SHA1_H0[3], SHA1_H0[4]};
  endfunction
  function automatic logic [511:0] sha512_init();
    logic [511:0] v;
    for (int i = 0; i < 8; i++) v[511-64*i -: 64] = SHA512_H0[i];
    return v;
  endfunction

  function automatic logic [31:0] ref_sha1_w(input logic [511:0] blk, input int t);
    logic [31:0] w [80];
    for (int i = 0; i < 16; i++) w[i] = blk[511-32*i -: 32];
    for (int i = 16; i < 80; i++) w[i] = rl(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16], 1);
    return w[t];
  endfunction

  function automatic logic [159:0] ref_sha1(input logic [159:0] h, input logic [511:0] blk);
    logic [31:0] a, b, c, d, e, f, k, tmp;
    {a, b, c, d, e} = h;
    for (int t = 0; t < 80; t++) begin
      if (t < 20)      begin f = (b & c) | (~b & d);          k = 32'h5a827999; end
      else if (t < 40) begin f = b ^ c ^ d;                   k = 32'h6ed9eba1; end
      else if (t < 60) begin f = (b & c) | (b & d) | (c & d); k = 32'h8f1bbcdc; end
      else             begin f = b ^ c ^ d;                   k = 32'hca62c1d6; end
      tmp = rl(a, 5) + f + e + k + ref_sha1_w(blk, t);
      e = d; d = c; c = rl(b, 30); b = a; a = tmp;
    end
    return {h[159:128] + a, h[127:96] + b, h[95:64] + c, h[63:32] + d, h[31:0] + e};
  endfunction

  function automatic logic [63:0] ref_sha512_w(input logic [1023:0] blk, input int t);
    logic [63:0] w [80];
    for (int i = 0; i < 16; i++) w[i] = blk[1023-64*i -: 64];
    for (int i = 16; i < 80; i++)
      w[i] = (rr(w[i-2], 19) ^ rr(w[i-2], 61) ^ (w[i-2] >> 6)) + w[i-7]
           + (rr(w[i-15], 1) ^ rr(w[i-15], 8) ^ (w[i-15] >> 7)) + w[i-16];
    return w[t];
  endfunction

  function automatic logic [511:0] ref_sha512(input logic [511:0] h, input logic [1023:0] blk);
    logic [63:0] v [8];
    logic [63:0] t1, t2;
    logic [511:0] o;
    for (int i = 0; i < 8; i++) v[i] = h[511-64*i -: 64];
    for (int t = 0; t < 80; t++) begin
      t1 = v[7] + (rr(v[4], 14) ^ rr(v[4], 18) ^ rr(v[4], 41))
         + ((v[4] & v[5]) ^ (~v[4] & v[6])) + SHA512_K[t] + ref_sha512_w(blk, t);
      t2 = (rr(v[0], 28) ^ rr(v[0], 34) ^ rr(v[0], 39))
         + ((v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]));
      for (int i = 7; i > 0; i--) v[i] = v[i-1];
      v[4] = v[4] + t1;
      v[0] = t1 + t2;
    end
    for (int i = 0; i < 8; i++) o[511-64*i -: 64] = h[511-64*i -: 64] + v[i];
    return o;
  endfunction

  // one-block padded "abc" messages
  function automatic logic [511:0] sha1_abc_block();
    logic [511:0] b;
    b = '0;
    b[511:480] = 32'h61626380;
    b[63:0]    = 64'd24;
    return b;
  endfunction
  function automatic logic [1023:0] sha512_abc_block();
    logic [1023:0] b;
    b = '0;
    b[1023:992] = 32'h61626380;
    b[127:0]    = 128'd24;
    return b;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
