// serpent_pkg -- constants and round functions of Serpent with a 128-bit key, shared by
// the Serpent encryption/decryption units.
//
// The cipher is the public Serpent specification in its bitslice form; the document that
// describes the hardware only gives the round structure (key mixing, 32 copies of one of
// eight 4x4 S-boxes, linear transformation; 32 rounds; final key K32).  A 128-bit block
// is held MSB-first (block byte 0 in bits [127:120]); the four 32-bit words X0..X3 take
// bytes 0-3, 4-7, 8-11 and 12-15, each little-endian.  Internally a block or a round key
// is the packed struct words_t with X0 in the most significant word.  S-box i maps the
// nibble {X3[b], X2[b], X1[b], X0[b]} of every bit position b; the inverse S-boxes are
// computed from the forward ones when the design is elaborated.
package serpent_pkg;

  localparam int unsigned ROUNDS = 32;
  localparam int unsigned NKEYS  = ROUNDS + 1;      // K0..K32

  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  typedef struct packed {
    word_t x0, x1, x2, x3;
  } words_t;

  typedef logic [3:0] nib_t;
  typedef nib_t sbox_t [8][16];

  localparam sbox_t SBOX = '{
    '{4'd3,  4'd8,  4'd15, 4'd1,  4'd10, 4'd6,  4'd5,  4'd11, 4'd14, 4'd13, 4'd4,  4'd2,  4'd7,  4'd0,  4'd9,  4'd12},
    '{4'd15, 4'd12, 4'd2,  4'd7,  4'd9,  4'd0,  4'd5,  4'd10, 4'd1,  4'd11, 4'd14, 4'd8,  4'd6,  4'd13, 4'd3,  4'd4},
    '{4'd8,  4'd6,  4'd7,  4'd9,  4'd3,  4'd12, 4'd10, 4'd15, 4'd13, 4'd1,  4'd14, 4'd4,  4'd0,  4'd11, 4'd5,  4'd2},
    '{4'd0,  4'd15, 4'd11, 4'd8,  4'd12, 4'd9,  4'd6,  4'd3,  4'd13, 4'd1,  4'd2,  4'd4,  4'd10, 4'd7,  4'd5,  4'd14},
    '{4'd1,  4'd15, 4'd8,  4'd3,  4'd12, 4'd0,  4'd11, 4'd6,  4'd2,  4'd5,  4'd4,  4'd10, 4'd9,  4'd14, 4'd7,  4'd13},
    '{4'd15, 4'd5,  4'd2,  4'd11, 4'd4,  4'd10, 4'd9,  4'd12, 4'd0,  4'd3,  4'd14, 4'd8,  4'd13, 4'd6,  4'd7,  4'd1},
    '{4'd7,  4'd2,  4'd12, 4'd5,  4'd8,  4'd4,  4'd6,  4'd11, 4'd14, 4'd9,  4'd1,  4'd15, 4'd13, 4'd3,  4'd10, 4'd0},
    '{4'd1,  4'd13, 4'd15, 4'd0,  4'd14, 4'd8,  4'd2,  4'd11, 4'd7,  4'd4,  4'd12, 4'd10, 4'd9,  4'd3,  4'd5,  4'd6}
  };

  // Inverse S-boxes, built from the forward ones: nibble 16*s + y holds x with S_s(x) = y.
  function automatic logic [511:0] build_inverse();
    logic [511:0] t;
    t = '0;
    for (int sb = 0; sb < 8; sb++)
      for (int v = 0; v < 16; v++)
        t[4 * (16 * sb + int'(SBOX[sb][v])) +: 4] = nib_t'(v);
    return t;
  endfunction

  localparam logic [511:0] SBOX_INV = build_inverse();

  function automatic word_t bswap(word_t x);
    return {x[7:0], x[15:8], x[23:16], x[31:24]};
  endfunction

  function automatic words_t from_block(block_t b);
    return '{bswap(b[127:96]), bswap(b[95:64]), bswap(b[63:32]), bswap(b[31:0])};
  endfunction

  function automatic block_t to_block(words_t w);
    return {bswap(w.x0), bswap(w.x1), bswap(w.x2), bswap(w.x3)};
  endfunction

  // 32 copies of S-box `idx` (inverse when inv = 1), applied bit-slice-wise.
  function automatic words_t sbox_layer(words_t w, int unsigned idx, logic inv);
    words_t o;
    for (int b = 0; b < 32; b++) begin
      nib_t v, r;
      v = {w.x3[b], w.x2[b], w.x1[b], w.x0[b]};
      r = inv ? SBOX_INV[4 * (16 * (idx % 8) + int'(v)) +: 4] : SBOX[idx % 8][v];
      o.x0[b] = r[0];
      o.x1[b] = r[1];
      o.x2[b] = r[2];
      o.x3[b] = r[3];
    end
    return o;
  endfunction

  function automatic word_t rotl(word_t x, int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic word_t rotr(word_t x, int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic words_t lin(words_t w);
    word_t x0, x1, x2, x3;
    x0 = rotl(w.x0, 13);
    x2 = rotl(w.x2, 3);
    x1 = w.x1 ^ x0 ^ x2;
    x3 = w.x3 ^ x2 ^ (x0 << 3);
    x1 = rotl(x1, 1);
    x3 = rotl(x3, 7);
    x0 = x0 ^ x1 ^ x3;
    x2 = x2 ^ x3 ^ (x1 << 7);
    x0 = rotl(x0, 5);
    x2 = rotl(x2, 22);
    return '{x0, x1, x2, x3};
  endfunction

  function automatic words_t lin_inv(words_t w);
    word_t x0, x1, x2, x3;
    x0 = w.x0; x1 = w.x1; x2 = w.x2; x3 = w.x3;
    x2 = rotr(x2, 22);
    x0 = rotr(x0, 5);
    x2 = x2 ^ x3 ^ (x1 << 7);
    x0 = x0 ^ x1 ^ x3;
    x3 = rotr(x3, 7);
    x1 = rotr(x1, 1);
    x3 = x3 ^ x2 ^ (x0 << 3);
    x1 = x1 ^ x0 ^ x2;
    x2 = rotr(x2, 3);
    x0 = rotr(x0, 13);
    return '{x0, x1, x2, x3};
  endfunction

  // Regular encryption round r (0..31): key mixing, S-box r mod 8, linear transformation;
  // round 31 adds K32 instead of the linear transformation.
  function automatic words_t enc_round(words_t x, int unsigned r, words_t kr, words_t k32);
    words_t s;
    s = sbox_layer(x ^ kr, r, 1'b0);
    return (r == ROUNDS - 1) ? (s ^ k32) : lin(s);
  endfunction

  // Inverse of regular round r for a block already stripped of K32 when r = 31.
  function automatic words_t dec_round(words_t x, int unsigned r, words_t kr);
    words_t s;
    s = (r == ROUNDS - 1) ? x : lin_inv(x);
    return sbox_layer(s, r, 1'b1) ^ kr;
  endfunction

endpackage
