// twofish_pipelined -- Twofish encryption/decryption unit (128-bit key) with full mixed
// inner- and outer-round pipelining, for non-feedback modes (ECB, counter mode).
//
// All 16 rounds are unrolled and each holds INNER_STAGES pipeline registers, so a new
// block may enter every clock cycle: throughput = 128 bits per clock period, latency =
// 16 * INNER_STAGES cycles.  The input whitening is applied on the way into the first
// round and the output whitening (with the final swap undone) on the way out of the last,
// both chosen by the direction bit each block carries.  When the output cannot take a
// block (res_ready low), the whole pipeline holds.
//
//   blk_valid/blk_ready/blk_data/blk_mode  block in (mode 1 = decrypt), one per cycle
//   keys                                   K0..K39, then the S-box key words S0, S1
//   res_valid/res_ready/res_data/res_mode  block out
//
// The architecture follows the document; the default of 23 inner stages per round is
// derived from its reported throughput (15.2 Gbit/s, 8.42 ns per block) and latency
// (3092 ns, about 367 cycles); the direction bit per block and the shared pipeline hold
// are this design's choices.  The cipher follows the Twofish specification.
module twofish_pipelined
  import twofish_pkg::*;
#(
  parameter int unsigned INNER_STAGES = 23
) (
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

  logic  en;
  logic  v [ROUNDS+1];
  logic  m [ROUNDS+1];
  regs_t s [ROUNDS+1];
  regs_t in_r, pre, post;

  assign en        = res_ready;
  assign blk_ready = en;

  always_comb begin
    in_r = unpack_block(blk_data);
    if (!blk_mode)
      pre = '{in_r.r0 ^ keys[0], in_r.r1 ^ keys[1], in_r.r2 ^ keys[2], in_r.r3 ^ keys[3]};
    else
      pre = '{in_r.r2 ^ keys[6], in_r.r3 ^ keys[7], in_r.r0 ^ keys[4], in_r.r1 ^ keys[5]};
    if (!m[ROUNDS])
      post = '{s[ROUNDS].r2 ^ keys[4], s[ROUNDS].r3 ^ keys[5],
               s[ROUNDS].r0 ^ keys[6], s[ROUNDS].r1 ^ keys[7]};
    else
      post = '{s[ROUNDS].r0 ^ keys[0], s[ROUNDS].r1 ^ keys[1],
               s[ROUNDS].r2 ^ keys[2], s[ROUNDS].r3 ^ keys[3]};
  end

  assign v[0] = blk_valid;
  assign m[0] = blk_mode;
  assign s[0] = pre;

  for (genvar p = 1; p <= ROUNDS; p++) begin : g_round
    twofish_pipe_round #(.POS(p), .STAGES(INNER_STAGES)) u_round (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (en),
      .in_valid  (v[p-1]),
      .in_mode   (m[p-1]),
      .in_state  (s[p-1]),
      .key_enc_0 (keys[2*(p - 1) + 8]),
      .key_enc_1 (keys[2*(p - 1) + 9]),
      .key_dec_0 (keys[2*(ROUNDS - p) + 8]),
      .key_dec_1 (keys[2*(ROUNDS - p) + 9]),
      .sbox_key0 (keys[S0_IDX]),
      .sbox_key1 (keys[S1_IDX]),
      .out_valid (v[p]),
      .out_mode  (m[p]),
      .out_state (s[p])
    );
  end

  assign res_valid = v[ROUNDS];
  assign res_mode  = m[ROUNDS];
  assign res_data  = pack_block(post);

endmodule
