// twofish_iterative -- Twofish encryption/decryption unit (128-bit key) in the basic
// iterative architecture: one Twofish round of combinational logic, a 128-bit register
// (R0..R3) and an input multiplexer.
//
// Loading a block applies the input whitening (encryption: Ri = Pi ^ Ki; decryption: the
// output whitening with K4..K7 and the final swap undone) on the way into the register.
// In each of the next 16 cycles one Feistel round is computed and fed back:
//   F0 = g(R0) + g(R1 <<< 8) + K[2r+8],  F1 = g(R0) + 2 g(R1 <<< 8) + K[2r+9],
//   (R0,R1,R2,R3) <- ((R2 ^ F0) >>> 1, (R3 <<< 1) ^ F1, R0, R1).
// The output whitening is applied on the way out in the cycle of the last round, in which
// the next block may already be loaded, so one block takes 16 clock cycles.
//
// Encryption and decryption share the register, the multiplexer and the two g functions
// with their key-dependent S-boxes and MDS multiplications, the largest part of the round:
// decryption feeds them R2 and R3 instead of R0 and R1 and undoes the round with its own
// rotations and XORs, taking the round keys in reverse order.
//
//   blk_valid/blk_ready/blk_data/blk_mode  block in (mode 1 = decrypt)
//   keys                                   K0..K39, then the S-box key words S0, S1
//   res_valid/res_ready/res_data/res_mode  block out; res_ready low stalls the last round
//
// The architecture follows the document; the sharing split, the key layout and the
// handshake are this design's choices.  The cipher itself follows the Twofish
// specification.
module twofish_iterative
  import twofish_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   blk_valid,
  output logic   blk_ready,
  input  block_t blk_data,
  input  logic   blk_mode,
  input  word_t  keys [NWORDS],
  output logic   res_valid,
  input  logic   res_ready,
  output block_t res_data,
  output logic   res_mode
);

  localparam int unsigned RW = $clog2(ROUNDS + 1);

  regs_t         st_q, st_in, st_round;
  block_t        out_blk;
  logic          mode_q;
  logic          busy, last, done, ready;
  logic [RW-1:0] round;
  word_t         t0, t1, f0, f1;
  int unsigned   n;

  control_unit #(.ROUNDS(ROUNDS)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .start (blk_valid),
    .stall (res_valid && !res_ready),
    .ready (ready),
    .busy  (busy),
    .round (round),
    .last  (last),
    .done  (done)
  );

  always_comb begin
    regs_t in_r;
    // Cipher round 0..15 when encrypting, 15..0 when decrypting.
    n  = mode_q ? (ROUNDS - int'(round)) : (int'(round) - 1);

    // Shared g functions.
    t0 = h_fun(mode_q ? st_q.r2 : st_q.r0, keys[S0_IDX], keys[S1_IDX]);
    t1 = h_fun(rol(mode_q ? st_q.r3 : st_q.r1, 8), keys[S0_IDX], keys[S1_IDX]);
    f0 = t0 + t1 + keys[2*n + 8];
    f1 = t0 + (t1 << 1) + keys[2*n + 9];

    if (!mode_q) st_round = '{ror(st_q.r2 ^ f0, 1), rol(st_q.r3, 1) ^ f1, st_q.r0, st_q.r1};
    else         st_round = '{st_q.r2, st_q.r3, rol(st_q.r0, 1) ^ f0, ror(st_q.r1 ^ f1, 1)};

    // Output whitening on the round output.
    if (!mode_q)
      out_blk = pack_block('{st_round.r2 ^ keys[4], st_round.r3 ^ keys[5],
                             st_round.r0 ^ keys[6], st_round.r1 ^ keys[7]});
    else
      out_blk = pack_block('{st_round.r0 ^ keys[0], st_round.r1 ^ keys[1],
                             st_round.r2 ^ keys[2], st_round.r3 ^ keys[3]});

    // Input whitening of a block being loaded.
    in_r = unpack_block(blk_data);
    if (!blk_mode)
      st_in = '{in_r.r0 ^ keys[0], in_r.r1 ^ keys[1], in_r.r2 ^ keys[2], in_r.r3 ^ keys[3]};
    else
      st_in = '{in_r.r2 ^ keys[6], in_r.r3 ^ keys[7], in_r.r0 ^ keys[4], in_r.r1 ^ keys[5]};
  end

  assign blk_ready = ready;
  assign res_valid = last;
  assign res_data  = out_blk;
  assign res_mode  = mode_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= '0;
      mode_q <= 1'b0;
    end else if (ready && blk_valid) begin
      st_q   <= st_in;
      mode_q <= blk_mode;
    end else if (busy && !last) begin
      st_q   <= st_round;
    end
  end

endmodule
