// aes_ref_pkg -- reference model of AES-128 for the testbenches: key expansion, encryption
// and decryption of one block.  Written independently of the RTL: the S-box comes from
// exponent/logarithm tables of the generator 3 of GF(2^8), the state is a 4x4 byte array
// and the inverse cipher is computed step by step as the standard lists it.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [7:0]   b8;
  typedef b8            st_t [4][4];   // [row][column]

  b8 sb  [256];
  b8 isb [256];
  bit ready = 0;

  function automatic b8 mul2(b8 a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic b8 mul(b8 a, b8 b);
    b8 r = 0;
    while (b != 0) begin
      if (b[0]) r ^= a;
      a = mul2(a);
      b = b >> 1;
    end
    return r;
  endfunction

  function automatic void init();
    b8 ex [256];
    b8 lg [256];
    b8 x;
    if (ready) return;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      ex[i] = x;
      lg[x] = b8'(i);
      x = mul(x, 8'h03);
    end
    for (int a = 0; a < 256; a++) begin
      b8 inv, s;
      inv = (a == 0) ? 8'h00 : ex[(255 - lg[a]) % 255];
      s = inv;
      for (int k = 1; k <= 4; k++) s ^= b8'((inv << k) | (inv >> (8 - k)));
      s ^= 8'h63;
      sb[a] = s;
      isb[s] = b8'(a);
    end
    ready = 1;
  endfunction

  function automatic st_t to_st(blk_t b);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic blk_t from_st(st_t s);
    blk_t b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = s[r][c];
    return b;
  endfunction

  typedef blk_t keys_t [11];

  function automatic keys_t expand(blk_t key);
    logic [31:0] w [44];
    b8 rcon;
    keys_t k;
    init();
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    rcon = 8'h01;
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t;
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
        t[31:24] ^= rcon;
        rcon = mul2(rcon);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) k[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return k;
  endfunction

  function automatic st_t mixcol(st_t s, b8 m0, b8 m1, b8 m2, b8 m3);
    st_t o;
    b8 m [4];
    m = '{m0, m1, m2, m3};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[r][c] = mul(m[0], s[r][c]) ^ mul(m[1], s[(r+1)%4][c])
                ^ mul(m[2], s[(r+2)%4][c]) ^ mul(m[3], s[(r+3)%4][c]);
    return o;
  endfunction

  // One encryption round: SubBytes, ShiftRows, MixColumns (not in the last), AddRoundKey.
  function automatic blk_t enc_round(blk_t in, blk_t rk, bit last);
    st_t s, t;
    init();
    s = to_st(in);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) t[r][c] = sb[s[r][(c + r) % 4]];
    if (!last) t = mixcol(t, 8'h02, 8'h03, 8'h01, 8'h01);
    return from_st(t) ^ rk;
  endfunction

  // One round of the inverse cipher: InvShiftRows, InvSubBytes, AddRoundKey,
  // InvMixColumns (not in the last).
  function automatic blk_t dec_round(blk_t in, blk_t rk, bit last);
    st_t s, t;
    init();
    s = to_st(in);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) t[r][(c + r) % 4] = isb[s[r][c]];
    s = to_st(from_st(t) ^ rk);
    if (!last) s = mixcol(s, 8'h0e, 8'h0b, 8'h0d, 8'h09);
    return from_st(s);
  endfunction

  function automatic blk_t encrypt(keys_t k, blk_t pt);
    blk_t x;
    x = pt ^ k[0];
    for (int rd = 1; rd <= 10; rd++) x = enc_round(x, k[rd], rd == 10);
    return x;
  endfunction

  function automatic blk_t decrypt(keys_t k, blk_t ct);
    blk_t x;
    x = ct ^ k[10];
    for (int rd = 9; rd >= 0; rd--) x = dec_round(x, k[rd], rd == 0);
    return x;
  endfunction

endpackage
