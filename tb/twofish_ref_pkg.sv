// twofish_ref_pkg -- reference model of Twofish with a 128-bit key, for the testbenches.
//
// schedule() computes the 40 round subkeys and the two S-box key words from a user key,
// as the Twofish specification defines them: the key's even and odd words go through h
// with the constants 2i*0x01010101 and (2i+1)*0x01010101, and S0, S1 come from the RS
// code over GF(2^8) mod x^8+x^6+x^3+x^2+1.  The result is laid out as the cipher unit
// stores it (K0..K39, then S0, S1).  encrypt() and decrypt() run the 16 Feistel rounds
// word by word, in the specification's form with explicit swaps, which is not how the
// unit is structured.  The q permutations and the MDS code are taken from the design's
// package.  The model is not synthesizable.
package twofish_ref_pkg;
  import twofish_pkg::*;

  typedef word_t keys_t [NWORDS];

  function automatic byte_t rs_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = x[7] ? ((x << 1) ^ 8'h4D) : (x << 1);
    end
    return p;
  endfunction

  function automatic keys_t schedule(block_t key);
    keys_t k;
    byte_t m [16];
    word_t mw [4];
    byte_t rs [4][8] = '{'{8'h01, 8'hA4, 8'h55, 8'h87, 8'h5A, 8'h58, 8'hDB, 8'h9E},
                         '{8'hA4, 8'h56, 8'h82, 8'hF3, 8'h1E, 8'hC6, 8'h68, 8'hE5},
                         '{8'h02, 8'hA1, 8'hFC, 8'hC1, 8'h47, 8'hAE, 8'h3D, 8'h19},
                         '{8'hA4, 8'h55, 8'h87, 8'h5A, 8'h58, 8'hDB, 8'h9E, 8'h03}};
    for (int i = 0; i < 16; i++) m[i] = key[127 - 8*i -: 8];
    for (int i = 0; i < 4; i++) mw[i] = {m[4*i+3], m[4*i+2], m[4*i+1], m[4*i]};
    for (int i = 0; i < 20; i++) begin
      word_t a, b;
      a = h_fun(32'(2*i) * 32'h01010101, mw[2], mw[0]);
      b = rol(h_fun(32'(2*i + 1) * 32'h01010101, mw[3], mw[1]), 8);
      k[2*i]     = a + b;
      k[2*i + 1] = rol(a + 2*b, 9);
    end
    for (int i = 0; i < 2; i++) begin
      word_t s = '0;
      for (int j = 0; j < 4; j++) begin
        byte_t acc = '0;
        for (int c = 0; c < 8; c++) acc ^= rs_mul(m[8*i + c], rs[j][c]);
        s[8*j +: 8] = acc;
      end
      k[S0_IDX + i] = s;
    end
    return k;
  endfunction

  function automatic word_t g(word_t x, keys_t k);
    return h_fun(x, k[S0_IDX], k[S1_IDX]);
  endfunction

  function automatic block_t encrypt(block_t pt, keys_t k);
    word_t r [4];
    regs_t p = unpack_block(pt);
    r = '{p.r0 ^ k[0], p.r1 ^ k[1], p.r2 ^ k[2], p.r3 ^ k[3]};
    for (int n = 0; n < 16; n++) begin
      word_t t0, t1, f0, f1, n0, n1;
      t0 = g(r[0], k);
      t1 = g(rol(r[1], 8), k);
      f0 = t0 + t1 + k[2*n + 8];
      f1 = t0 + 2*t1 + k[2*n + 9];
      n0 = ror(r[2] ^ f0, 1);
      n1 = rol(r[3], 1) ^ f1;
      r[2] = r[0];
      r[3] = r[1];
      r[0] = n0;
      r[1] = n1;
    end
    return pack_block('{r[2] ^ k[4], r[3] ^ k[5], r[0] ^ k[6], r[1] ^ k[7]});
  endfunction

  function automatic block_t decrypt(block_t ct, keys_t k);
    word_t r [4];
    regs_t c = unpack_block(ct);
    // undo the output whitening and the missing final swap
    r = '{c.r2 ^ k[6], c.r3 ^ k[7], c.r0 ^ k[4], c.r1 ^ k[5]};
    for (int n = 15; n >= 0; n--) begin
      word_t t0, t1, f0, f1, p2, p3;
      t0 = g(r[2], k);
      t1 = g(rol(r[3], 8), k);
      f0 = t0 + t1 + k[2*n + 8];
      f1 = t0 + 2*t1 + k[2*n + 9];
      p2 = rol(r[0], 1) ^ f0;
      p3 = ror(r[1] ^ f1, 1);
      r[0] = r[2];
      r[1] = r[3];
      r[2] = p2;
      r[3] = p3;
    end
    return pack_block('{r[0] ^ k[0], r[1] ^ k[1], r[2] ^ k[2], r[3] ^ k[3]});
  endfunction

endpackage
