// rc6_pkg -- constants and helper functions of RC6-32/20/16 (32-bit words, 20 rounds,
// 128-bit key), shared by the RC6 encryption/decryption unit.
//
// The cipher is the public RC6 specification; the document that describes the hardware
// architecture only names it.  A 128-bit block is held MSB-first (block byte 0 in bits
// [127:120]); the four 32-bit registers A, B, C, D take bytes 0-3, 4-7, 8-11 and 12-15,
// each little-endian, as the cipher's specification loads them.
package rc6_pkg;

  localparam int unsigned W      = 32;              // word size
  localparam int unsigned R      = 20;              // rounds
  localparam int unsigned NWORDS = 2 * R + 4;       // round key words S[0..43]

  typedef logic [W-1:0]   word_t;
  typedef logic [127:0]   block_t;

  typedef struct packed {
    word_t a, b, c, d;
  } regs_t;

  function automatic word_t bswap(word_t x);
    return {x[7:0], x[15:8], x[23:16], x[31:24]};
  endfunction

  function automatic regs_t unpack_block(block_t blk);
    regs_t r;
    r.a = bswap(blk[127:96]);
    r.b = bswap(blk[95:64]);
    r.c = bswap(blk[63:32]);
    r.d = bswap(blk[31:0]);
    return r;
  endfunction

  function automatic block_t pack_block(regs_t r);
    return {bswap(r.a), bswap(r.b), bswap(r.c), bswap(r.d)};
  endfunction

  function automatic word_t rotl(word_t x, logic [4:0] n);
    return word_t'(({x, x} << n) >> W);
  endfunction

  function automatic word_t rotr(word_t x, logic [4:0] n);
    return word_t'({x, x} >> n);
  endfunction

  // f(x) = (x * (2x + 1)) <<< 5, the data-dependent quadratic function of RC6.
  function automatic word_t quad(word_t x);
    word_t p;
    p = x * {x[W-2:0], 1'b1};
    return rotl(p, 5'd5);
  endfunction

  // Encryption round given t = f(B), u = f(D):
  //   A' = ((A ^ t) <<< u) + S[2i], C' = ((C ^ u) <<< t) + S[2i+1], (A,B,C,D) <- (B,C',D,A')
  function automatic regs_t round_fwd(regs_t q, word_t t, word_t u, word_t s_lo, word_t s_hi);
    return '{q.b, rotl(q.c ^ u, t[4:0]) + s_hi, q.d, rotl(q.a ^ t, u[4:0]) + s_lo};
  endfunction

  // Decryption round given t = f(A), u = f(C) of the incoming registers (which are B and D
  // after the undoing rotation (A,B,C,D) <- (D,A,B,C)).
  function automatic regs_t round_inv(regs_t q, word_t t, word_t u, word_t s_lo, word_t s_hi);
    return '{rotr(q.d - s_lo, u[4:0]) ^ t, q.a, rotr(q.b - s_hi, t[4:0]) ^ u, q.c};
  endfunction

endpackage
