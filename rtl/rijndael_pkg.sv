// rijndael_pkg -- types, constants and combinational helper functions shared by the
// Rijndael (AES-128) encryption/decryption units.
//
// A 128-bit block is held MSB-first: byte 0 of the block (the first input byte of the
// standard) is bits [127:120].  The 4x4 state is column-major, so byte index r+4c is row r,
// column c.  The cipher itself is the public Rijndael/AES-128 specification; the document
// that describes these hardware architectures only names the cipher.
//
// The S-box is produced by a constant function from its algebraic definition (inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1 followed by the affine map), instead of a literal table.
// One 512-entry table holds the forward S-box at addresses 0..255 and the inverse S-box at
// 256..511, so a single memory can serve encryption and decryption: the mode bit is the
// top address bit.  This is how a 4 kbit dual-port block RAM of a Virtex device can serve
// two byte lookups of both directions; that mapping is this design's reading of the reported RAM count.
package rijndael_pkg;

  localparam int unsigned BLOCK_BITS = 128;   // block size, bits
  localparam int unsigned NR         = 10;    // rounds of Rijndael with a 128-bit key
  localparam int unsigned NKEYS      = NR + 1; // round keys, including the whitening key

  typedef logic [BLOCK_BITS-1:0] block_t;
  typedef logic [7:0]            byte_t;

  // Direction of one block; travels with the block through every unit.
  typedef enum logic {MODE_ENC = 1'b0, MODE_DEC = 1'b1} mode_e;

  // ---------------------------------------------------------------- GF(2^8) arithmetic
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic byte_t ginv(byte_t a);
    byte_t r, s;
    r = 8'h01;
    s = a;
    for (int i = 1; i < 8; i++) begin      // 254 = 0b11111110
      s = gmul(s, s);
      r = gmul(r, s);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox_fwd(byte_t a);
    byte_t b;
    b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_t sbox_inv(byte_t a);
    return ginv(rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05);
  endfunction

  typedef byte_t sbox_table_t [512];

  // Combined table: address {mode, byte}.
  function automatic sbox_table_t build_sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) begin
      t[i]       = sbox_fwd(byte_t'(i));
      t[256 + i] = sbox_inv(byte_t'(i));
    end
    return t;
  endfunction

  // ---------------------------------------------------------------- state helpers
  function automatic byte_t get_byte(block_t s, int unsigned idx);
    return s[BLOCK_BITS-1-8*idx -: 8];
  endfunction

  // ShiftRows (dec = 0) or InvShiftRows (dec = 1).  Byte-wise, so it commutes with the
  // S-box layer and both directions can share one S-box-then-shift order.
  function automatic block_t shift_rows(block_t s, logic dec);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        int unsigned src;
        src = dec ? (r + 4 * ((c + 4 - r) % 4)) : (r + 4 * ((c + r) % 4));
        o[BLOCK_BITS-1-8*(r+4*c) -: 8] = get_byte(s, src);
      end
    return o;
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) begin
      byte_t a0, a1, a2, a3;
      a0 = get_byte(s, 4*c);   a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      o[BLOCK_BITS-1-8*(4*c)   -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      o[BLOCK_BITS-1-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      o[BLOCK_BITS-1-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      o[BLOCK_BITS-1-8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  function automatic block_t inv_mix_columns(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) begin
      byte_t a0, a1, a2, a3;
      a0 = get_byte(s, 4*c);   a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      o[BLOCK_BITS-1-8*(4*c)   -: 8] = gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09);
      o[BLOCK_BITS-1-8*(4*c+1) -: 8] = gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d);
      o[BLOCK_BITS-1-8*(4*c+2) -: 8] = gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b);
      o[BLOCK_BITS-1-8*(4*c+3) -: 8] = gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e);
    end
    return o;
  endfunction

  // The part of a round that follows the S-box layer.
  //   encryption: ShiftRows, MixColumns (skipped in the last round), AddRoundKey
  //   decryption: InvShiftRows, AddRoundKey, InvMixColumns (skipped in the last round)
  // Decryption uses the round keys of encryption in reverse order, unmodified.
  function automatic block_t round_tail(block_t subbed, block_t rkey, logic dec, logic last);
    block_t sr;
    sr = shift_rows(subbed, dec);
    if (!dec) return (last ? sr : mix_columns(sr)) ^ rkey;
    else      return last ? (sr ^ rkey) : inv_mix_columns(sr ^ rkey);
  endfunction

endpackage
