// serpent_ref_pkg -- reference model of Serpent with a 128-bit key for the testbenches:
// key schedule, encryption and decryption, on a four-word array with the S-boxes applied
// bit by bit.  Byte order as in the published (NESSIE) test vectors: each 32-bit word is
// taken little-endian from consecutive bytes.  A round key is returned packed as
// {K[0], K[1], K[2], K[3]}, word 0 most significant.
package serpent_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [31:0]  w32;
  typedef blk_t         rkeys_t [33];

  int S [8][16] = '{
    '{3, 8, 15, 1, 10, 6, 5, 11, 14, 13, 4, 2, 7, 0, 9, 12},
    '{15, 12, 2, 7, 9, 0, 5, 10, 1, 11, 14, 8, 6, 13, 3, 4},
    '{8, 6, 7, 9, 3, 12, 10, 15, 13, 1, 14, 4, 0, 11, 5, 2},
    '{0, 15, 11, 8, 12, 9, 6, 3, 13, 1, 2, 4, 10, 7, 5, 14},
    '{1, 15, 8, 3, 12, 0, 11, 6, 2, 5, 4, 10, 9, 14, 7, 13},
    '{15, 5, 2, 11, 4, 10, 9, 12, 0, 3, 14, 8, 13, 6, 7, 1},
    '{7, 2, 12, 5, 8, 4, 6, 11, 14, 9, 1, 15, 13, 3, 10, 0},
    '{1, 13, 15, 0, 14, 8, 2, 11, 7, 4, 12, 10, 9, 3, 5, 6}};

  function automatic w32 rl(w32 x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic w32 le(logic [31:0] b);
    return {b[7:0], b[15:8], b[23:16], b[31:24]};
  endfunction

  typedef w32 quad_t [4];

  function automatic quad_t apply_s(int box, quad_t x, bit inv);
    quad_t y = '{0, 0, 0, 0};
    for (int b = 0; b < 32; b++) begin
      int v, o;
      v = 0;
      for (int j = 0; j < 4; j++) v |= int'(x[j][b]) << j;
      if (!inv) o = S[box % 8][v];
      else for (int k = 0; k < 16; k++) if (S[box % 8][k] == v) o = k;
      for (int j = 0; j < 4; j++) y[j][b] = o[j];
    end
    return y;
  endfunction

  function automatic quad_t lt(quad_t x);
    x[0] = rl(x[0], 13); x[2] = rl(x[2], 3);
    x[1] ^= x[0] ^ x[2]; x[3] ^= x[2] ^ (x[0] << 3);
    x[1] = rl(x[1], 1);  x[3] = rl(x[3], 7);
    x[0] ^= x[1] ^ x[3]; x[2] ^= x[3] ^ (x[1] << 7);
    x[0] = rl(x[0], 5);  x[2] = rl(x[2], 22);
    return x;
  endfunction

  function automatic quad_t ilt(quad_t x);
    x[2] = rl(x[2], 10); x[0] = rl(x[0], 27);
    x[2] ^= x[3] ^ (x[1] << 7); x[0] ^= x[1] ^ x[3];
    x[3] = rl(x[3], 25); x[1] = rl(x[1], 31);
    x[3] ^= x[2] ^ (x[0] << 3); x[1] ^= x[0] ^ x[2];
    x[2] = rl(x[2], 29); x[0] = rl(x[0], 19);
    return x;
  endfunction

  function automatic quad_t unpack_k(blk_t k);
    return '{k[127:96], k[95:64], k[63:32], k[31:0]};
  endfunction

  function automatic rkeys_t schedule(blk_t key);
    w32 w [140];
    rkeys_t K;
    for (int i = 0; i < 4; i++) w[i] = le(key[127 - 32*i -: 32]);
    w[4] = 32'h1;                    // the 128-bit key is padded with a single 1 bit
    for (int i = 5; i < 8; i++) w[i] = 0;
    for (int i = 0; i < 132; i++)
      w[i + 8] = rl(w[i] ^ w[i+3] ^ w[i+5] ^ w[i+7] ^ 32'h9e3779b9 ^ w32'(i), 11);
    for (int i = 0; i < 33; i++) begin
      quad_t q;
      q = apply_s((3 - i + 32) % 8, '{w[8+4*i], w[9+4*i], w[10+4*i], w[11+4*i]}, 0);
      K[i] = {q[0], q[1], q[2], q[3]};
    end
    return K;
  endfunction

  function automatic blk_t encrypt(rkeys_t K, blk_t pt);
    quad_t x, k;
    for (int i = 0; i < 4; i++) x[i] = le(pt[127 - 32*i -: 32]);
    for (int r = 0; r < 32; r++) begin
      k = unpack_k(K[r]);
      for (int i = 0; i < 4; i++) x[i] ^= k[i];
      x = apply_s(r, x, 0);
      if (r < 31) x = lt(x);
      else begin
        k = unpack_k(K[32]);
        for (int i = 0; i < 4; i++) x[i] ^= k[i];
      end
    end
    return {le(x[0]), le(x[1]), le(x[2]), le(x[3])};
  endfunction

  function automatic blk_t decrypt(rkeys_t K, blk_t ct);
    quad_t x, k;
    for (int i = 0; i < 4; i++) x[i] = le(ct[127 - 32*i -: 32]);
    k = unpack_k(K[32]);
    for (int i = 0; i < 4; i++) x[i] ^= k[i];
    for (int r = 31; r >= 0; r--) begin
      if (r < 31) x = ilt(x);
      x = apply_s(r, x, 1);
      k = unpack_k(K[r]);
      for (int i = 0; i < 4; i++) x[i] ^= k[i];
    end
    return {le(x[0]), le(x[1]), le(x[2]), le(x[3])};
  endfunction

endpackage
