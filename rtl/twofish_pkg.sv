// twofish_pkg -- types, constants and round functions of Twofish with a 128-bit key.
//
// The functions follow the Twofish specification.  q0 and q1 are the fixed 8-bit
// permutations, each built from four 4-bit tables:
//   a0,b0 = high,low nibble of x;  a1 = a0^b0;  b1 = a0 ^ ror4(b0,1) ^ (8*a0 mod 16);
//   a2 = t0[a1];  b2 = t1[b1];  repeat the mixing;  a4 = t2[a3];  b4 = t3[b3];
//   q(x) = 16*b4 + a4.
// The key-dependent S-boxes use the two S-box key words S0 and S1:
//   y0 = q1[q0[q0[x0]^s0_0]^s1_0],  y1 = q0[q0[q1[x1]^s0_1]^s1_1],
//   y2 = q1[q1[q0[x2]^s0_2]^s1_2],  y3 = q0[q1[q1[x3]^s0_3]^s1_3],
// and g multiplies (y0..y3) by the MDS matrix over GF(2^8) mod x^8+x^6+x^5+x^3+1.
// The block is four 32-bit words, each taken little-endian from 4 consecutive bytes,
// byte 0 of the block being bits 127:120.
//
// Key words as this design stores them: index 0..39 hold the round subkeys K0..K39,
// index 40 holds S0 and index 41 holds S1.
package twofish_pkg;

  localparam int unsigned ROUNDS = 16;
  localparam int unsigned NWORDS = 42;
  localparam int unsigned S0_IDX = 40;
  localparam int unsigned S1_IDX = 41;

  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;
  typedef logic [127:0] block_t;
  typedef struct packed { word_t r0, r1, r2, r3; } regs_t;

  typedef logic [3:0] nib_t;
  typedef nib_t       ntab_t [16];

  localparam ntab_t Q0_T0 = '{4'h8, 4'h1, 4'h7, 4'hD, 4'h6, 4'hF, 4'h3, 4'h2,
                              4'h0, 4'hB, 4'h5, 4'h9, 4'hE, 4'hC, 4'hA, 4'h4};
  localparam ntab_t Q0_T1 = '{4'hE, 4'hC, 4'hB, 4'h8, 4'h1, 4'h2, 4'h3, 4'h5,
                              4'hF, 4'h4, 4'hA, 4'h6, 4'h7, 4'h0, 4'h9, 4'hD};
  localparam ntab_t Q0_T2 = '{4'hB, 4'hA, 4'h5, 4'hE, 4'h6, 4'hD, 4'h9, 4'h0,
                              4'hC, 4'h8, 4'hF, 4'h3, 4'h2, 4'h4, 4'h7, 4'h1};
  localparam ntab_t Q0_T3 = '{4'hD, 4'h7, 4'hF, 4'h4, 4'h1, 4'h2, 4'h6, 4'hE,
                              4'h9, 4'hB, 4'h3, 4'h0, 4'h8, 4'h5, 4'hC, 4'hA};
  localparam ntab_t Q1_T0 = '{4'h2, 4'h8, 4'hB, 4'hD, 4'hF, 4'h7, 4'h6, 4'hE,
                              4'h3, 4'h1, 4'h9, 4'h4, 4'h0, 4'hA, 4'hC, 4'h5};
  localparam ntab_t Q1_T1 = '{4'h1, 4'hE, 4'h2, 4'hB, 4'h4, 4'hC, 4'h3, 4'h7,
                              4'h6, 4'hD, 4'hA, 4'h5, 4'hF, 4'h9, 4'h0, 4'h8};
  localparam ntab_t Q1_T2 = '{4'h4, 4'hC, 4'h7, 4'h5, 4'h1, 4'h6, 4'h9, 4'hA,
                              4'h0, 4'hE, 4'hD, 4'h8, 4'h2, 4'hB, 4'h3, 4'hF};
  localparam ntab_t Q1_T3 = '{4'hB, 4'h9, 4'h5, 4'h1, 4'hC, 4'h3, 4'hD, 4'hE,
                              4'h6, 4'h4, 4'h7, 4'hF, 4'h2, 4'h0, 4'h8, 4'hA};

  function automatic nib_t ror4(nib_t x);
    return {x[0], x[3:1]};
  endfunction

  function automatic byte_t q_perm(byte_t x, ntab_t t0, ntab_t t1, ntab_t t2, ntab_t t3);
    nib_t a, b, a2, b2;
    a  = x[7:4] ^ x[3:0];
    b  = x[7:4] ^ ror4(x[3:0]) ^ {x[4], 3'b000};
    a2 = t0[a];
    b2 = t1[b];
    a  = a2 ^ b2;
    b  = a2 ^ ror4(b2) ^ {a2[0], 3'b000};
    return {t3[b], t2[a]};
  endfunction

  function automatic byte_t q0(byte_t x);
    return q_perm(x, Q0_T0, Q0_T1, Q0_T2, Q0_T3);
  endfunction

  function automatic byte_t q1(byte_t x);
    return q_perm(x, Q1_T0, Q1_T1, Q1_T2, Q1_T3);
  endfunction

  // Multiplication in GF(2^8) modulo x^8+x^6+x^5+x^3+1 (0x169).
  function automatic byte_t mds_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = x[7] ? ((x << 1) ^ 8'h69) : (x << 1);
    end
    return p;
  endfunction

  function automatic word_t mds(byte_t y0, byte_t y1, byte_t y2, byte_t y3);
    byte_t z0, z1, z2, z3;
    z0 = y0                   ^ mds_mul(y1, 8'hEF) ^ mds_mul(y2, 8'h5B) ^ mds_mul(y3, 8'h5B);
    z1 = mds_mul(y0, 8'h5B)   ^ mds_mul(y1, 8'hEF) ^ mds_mul(y2, 8'hEF) ^ y3;
    z2 = mds_mul(y0, 8'hEF)   ^ mds_mul(y1, 8'h5B) ^ y2                 ^ mds_mul(y3, 8'hEF);
    z3 = mds_mul(y0, 8'hEF)   ^ y1                 ^ mds_mul(y2, 8'hEF) ^ mds_mul(y3, 8'h5B);
    return {z3, z2, z1, z0};
  endfunction

  // h(X, (L0, L1)) for a 128-bit key: l0 is XORed after the first q stage, l1 after
  // the second.  The round function calls it with l0 = S0, l1 = S1.
  function automatic word_t h_fun(word_t x, word_t l0, word_t l1);
    byte_t y0, y1, y2, y3;
    y0 = q1(q0(q0(x[7:0])   ^ l0[7:0])   ^ l1[7:0]);
    y1 = q0(q0(q1(x[15:8])  ^ l0[15:8])  ^ l1[15:8]);
    y2 = q1(q1(q0(x[23:16]) ^ l0[23:16]) ^ l1[23:16]);
    y3 = q0(q1(q1(x[31:24]) ^ l0[31:24]) ^ l1[31:24]);
    return mds(y0, y1, y2, y3);
  endfunction

  function automatic word_t rol(word_t x, int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic word_t ror(word_t x, int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic word_t bswap(word_t x);
    return {x[7:0], x[15:8], x[23:16], x[31:24]};
  endfunction

  function automatic regs_t unpack_block(block_t b);
    return '{bswap(b[127:96]), bswap(b[95:64]), bswap(b[63:32]), bswap(b[31:0])};
  endfunction

  function automatic block_t pack_block(regs_t r);
    return {bswap(r.r0), bswap(r.r1), bswap(r.r2), bswap(r.r3)};
  endfunction

endpackage
