// rc6_ref_pkg -- reference model of RC6-32/20/16 for the testbenches: key schedule,
// encryption and decryption of one block, written from the cipher's specification with
// plain loops over a four-word array.
package rc6_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [31:0]  w32;
  typedef w32 skeys_t [44];

  function automatic w32 rl(w32 x, int n);
    n = n & 31;
    return (n == 0) ? x : ((x << n) | (x >> (32 - n)));
  endfunction

  function automatic w32 rr(w32 x, int n);
    n = n & 31;
    return (n == 0) ? x : ((x >> n) | (x << (32 - n)));
  endfunction

  function automatic w32 le(logic [31:0] bytes_msb_first);
    return {bytes_msb_first[7:0], bytes_msb_first[15:8], bytes_msb_first[23:16], bytes_msb_first[31:24]};
  endfunction

  function automatic skeys_t schedule(blk_t key);
    w32 L [4];
    skeys_t S;
    w32 A, B;
    int i, j;
    for (int k = 0; k < 4; k++) L[k] = le(key[127 - 32*k -: 32]);
    S[0] = 32'hB7E15163;
    for (int k = 1; k < 44; k++) S[k] = S[k-1] + 32'h9E3779B9;
    A = 0; B = 0; i = 0; j = 0;
    for (int s = 0; s < 3 * 44; s++) begin
      A = rl(S[i] + A + B, 3);
      S[i] = A;
      B = rl(L[j] + A + B, int'(A + B));
      L[j] = B;
      i = (i + 1) % 44;
      j = (j + 1) % 4;
    end
    return S;
  endfunction

  function automatic blk_t encrypt(skeys_t S, blk_t pt);
    w32 r [4];
    w32 t, u, tmp;
    for (int k = 0; k < 4; k++) r[k] = le(pt[127 - 32*k -: 32]);
    r[1] += S[0];
    r[3] += S[1];
    for (int i = 1; i <= 20; i++) begin
      t = rl(r[1] * (2 * r[1] + 1), 5);
      u = rl(r[3] * (2 * r[3] + 1), 5);
      r[0] = rl(r[0] ^ t, int'(u)) + S[2*i];
      r[2] = rl(r[2] ^ u, int'(t)) + S[2*i + 1];
      tmp = r[0]; r[0] = r[1]; r[1] = r[2]; r[2] = r[3]; r[3] = tmp;
    end
    r[0] += S[42];
    r[2] += S[43];
    return {le(r[0]), le(r[1]), le(r[2]), le(r[3])};
  endfunction

  function automatic blk_t decrypt(skeys_t S, blk_t ct);
    w32 r [4];
    w32 t, u, tmp;
    for (int k = 0; k < 4; k++) r[k] = le(ct[127 - 32*k -: 32]);
    r[2] -= S[43];
    r[0] -= S[42];
    for (int i = 20; i >= 1; i--) begin
      tmp = r[3]; r[3] = r[2]; r[2] = r[1]; r[1] = r[0]; r[0] = tmp;
      u = rl(r[3] * (2 * r[3] + 1), 5);
      t = rl(r[1] * (2 * r[1] + 1), 5);
      r[2] = rr(r[2] - S[2*i + 1], int'(t)) ^ u;
      r[0] = rr(r[0] - S[2*i], int'(u)) ^ t;
    end
    r[3] -= S[1];
    r[1] -= S[0];
    return {le(r[0]), le(r[1]), le(r[2]), le(r[3])};
  endfunction

endpackage
